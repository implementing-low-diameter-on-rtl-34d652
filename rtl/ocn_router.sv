// ocn_router: input-queued wormhole router of the tiled manycore network.
//
// Ports 0..CONC-1 connect the cores that share this router (concentration),
// ports CONC..CONC+3 the near channels (N, S, E, W) and, when RUCHE > 0, ports
// CONC+4..CONC+7 the far (ruche) channels (N, S, E, W). The radix is therefore
// CONC+4 without ruche channels and CONC+8 with them, which is how the source
// says concentration and ruche channels raise the router radix.
//
// Each input has an ocn_fifo. The flit at the head of every queue is routed by
// ocn_route_compute; each output has an ocn_rr_arbiter that picks among the
// inputs whose head flit wants it. Once an output has sent a flit that is not
// `last`, it stays locked to that input until the packet's last flit passes,
// so the flits of a packet are never interleaved with another packet's.
//
// Timing: the switch is combinational from the queue heads to the outputs;
// the next router (or core) registers the flit in its own input queue. A flit
// written into this router's input queue at edge t leaves through an output at
// edge t+1 when nothing blocks it, so a router costs one cycle and a channel,
// however long, none, in line with the source's observation that a packet can
// cross a long channel within one cycle. Input ready is the queue's not-full
// flag, so no ready path crosses a tile. Queue depth, arbitration and wormhole
// flow control are this design's choices; the source does not describe the
// router's insides.
module ocn_router
  import ocn_pkg::*;
#(
  parameter int unsigned CONC       = 1,
  parameter int unsigned RUCHE      = 2,
  parameter int unsigned BUF_DEPTH  = 2,
  parameter int unsigned NP         = router_radix(CONC, RUCHE)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [XW-1:0] pos_x,
  input  logic [YW-1:0] pos_y,

  input  logic          in_val  [NP],
  output logic          in_rdy  [NP],
  input  flit_t         in_flit [NP],

  output logic          out_val  [NP],
  input  logic          out_rdy  [NP],
  output flit_t         out_flit [NP]
);

  localparam int unsigned PW = $clog2(NP);

  logic          head_val  [NP];
  logic          head_rdy  [NP];
  flit_t         head_flit [NP];
  logic [PW-1:0] head_port [NP];

  // Input queues and route computation.
  for (genvar i = 0; i < NP; i++) begin : g_in
    ocn_fifo #(.DEPTH(BUF_DEPTH)) u_q (
      .clk, .rst,
      .enq_val (in_val[i]),  .enq_rdy (in_rdy[i]),  .enq_flit (in_flit[i]),
      .deq_val (head_val[i]), .deq_rdy (head_rdy[i]), .deq_flit (head_flit[i])
    );
    ocn_route_compute #(.CONC(CONC), .RUCHE(RUCHE)) u_rc (
      .pos_x, .pos_y,
      .dst_x (head_flit[i].dst_x), .dst_y (head_flit[i].dst_y), .dst_t (head_flit[i].dst_t),
      .out_port (head_port[i])
    );
  end

  // Switch allocation: one arbiter per output, with a wormhole lock.
  logic [NP-1:0] req   [NP];   // req[o][i]: input i wants output o
  logic [NP-1:0] grant [NP];   // grant[o][i]
  logic          fire  [NP];   // output o transfers a flit this cycle
  logic          locked [NP];
  logic [PW-1:0] owner  [NP];

  for (genvar o = 0; o < NP; o++) begin : g_out
    logic [NP-1:0] raw_req;
    logic [NP-1:0] arb_grant;
    logic [PW-1:0] win;

    always_comb begin
      for (int unsigned i = 0; i < NP; i++)
        raw_req[i] = head_val[i] && (head_port[i] == PW'(o));
    end

    // While locked only the owner of the worm may use the output.
    always_comb begin
      req[o] = raw_req;
      if (locked[o]) begin
        req[o] = '0;
        req[o][owner[o]] = raw_req[owner[o]];
      end
    end

    ocn_rr_arbiter #(.N(NP)) u_arb (
      .clk, .rst,
      .req    (req[o]),
      .update (fire[o]),
      .grant  (arb_grant)
    );

    always_comb begin
      grant[o] = arb_grant;
      win      = '0;
      for (int unsigned i = 0; i < NP; i++)
        if (arb_grant[i]) win = PW'(i);
    end

    assign out_val[o]  = |arb_grant;
    assign out_flit[o] = head_flit[win];
    assign fire[o]     = out_val[o] && out_rdy[o];

    always_ff @(posedge clk) begin
      if (rst) begin
        locked[o] <= 1'b0;
        owner[o]  <= '0;
      end else if (fire[o]) begin
        locked[o] <= !head_flit[win].last;
        owner[o]  <= win;
      end
    end

    // A locked output carries only flits of the owning input.
    always_ff @(posedge clk) begin
      if (!rst && locked[o] && out_val[o])
        assert (win == owner[o]) else $error("ocn_router: worm interleaved on output %0d", o);
    end
  end

  // An input is popped when the output its head flit was granted accepts it.
  always_comb begin
    for (int unsigned i = 0; i < NP; i++) begin
      head_rdy[i] = 1'b0;
      for (int unsigned o = 0; o < NP; o++)
        if (grant[o][i] && out_rdy[o]) head_rdy[i] = 1'b1;
    end
  end

endmodule
