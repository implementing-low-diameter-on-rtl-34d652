// ocn_fifo: router input queue.
//
// A DEPTH-entry first-in first-out buffer of flits with valid/ready on both
// sides. enq_rdy depends only on the occupancy register (it is high when the
// queue is not full), so no combinational path runs from a router's output
// back through its neighbour, and the ready wires between tiles stay short
// and registered. A full queue still accepts a flit in the cycle it sends one
// only if it was not full at the start of the cycle; with DEPTH = 2 this gives
// one flit per cycle through the queue.
//
// Timing: a flit enqueued at edge t is visible at deq_flit/deq_val after edge
// t (one cycle of latency). The source names router buffers but gives neither
// their depth nor their kind; the depth of two entries is this design's own.
module ocn_fifo
  import ocn_pkg::*;
#(
  parameter int unsigned DEPTH = 2
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  enq_val,
  output logic  enq_rdy,
  input  flit_t enq_flit,
  output logic  deq_val,
  input  logic  deq_rdy,
  output flit_t deq_flit
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  flit_t           mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [AW:0]     count;

  logic do_enq, do_deq;

  assign enq_rdy  = (count != (AW+1)'(DEPTH));
  assign deq_val  = (count != '0);
  assign deq_flit = mem[rd_ptr];
  assign do_enq   = enq_val && enq_rdy;
  assign do_deq   = deq_val && deq_rdy;

  function automatic logic [AW-1:0] incr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_enq) wr_ptr <= incr(wr_ptr);
      if (do_deq) rd_ptr <= incr(rd_ptr);
      case ({do_enq, do_deq})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (do_enq) mem[wr_ptr] <= enq_flit;
  end

  // Handshake rules: never more than DEPTH entries, never pop an empty queue.
  always_ff @(posedge clk) begin
    if (!rst) begin
      assert (count <= (AW+1)'(DEPTH)) else $error("ocn_fifo: overflow");
    end
  end

endmodule
