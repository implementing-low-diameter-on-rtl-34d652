// ocn_dummy_core: stand-in for a core on one router terminal port.
//
// During physical design of the network tiles, simple "dummy cores" sit on the
// router's injection and ejection ports so that synthesis keeps all router
// logic; the source states this role but not the dummy core's contents. This
// one is a traffic source and a checking sink.
//
// Source: a 16-bit Fibonacci LFSR (taps 16,15,13,4), seeded from core_id (core_id * 0x9e37 XOR 0xc35a, forced odd),
// steps every cycle. When `enable` is high and no packet is in flight, a new
// packet starts in a cycle where the LFSR's low byte is below `rate` (so the
// injection rate is about rate/256 packets per cycle). Its destination core is
// taken from the LFSR and converted to router column, row and terminal; it has
// PKT_LEN flits, the last one marked `last`. The payload is
// {core_id, packet count, flit index}. A packet in flight is always completed
// even if `enable` drops.
//
// Sink: always ready. Counts flits and packets, folds each payload into a rotating XOR
// signature, and sets the sticky `misroute` flag if a flit arrives whose
// destination fields are not this core's (my_x, my_y, my_t).
//
// Core numbering: core c sits at column c % CORES_X and row c / CORES_X of the
// core array; its router is at (column / conc_x, row / conc_y) and its
// terminal index is (row % conc_y) * conc_x + (column % conc_x).
module ocn_dummy_core
  import ocn_pkg::*;
#(
  parameter int unsigned CORES_X = 16,
  parameter int unsigned CORES_Y = 16,
  parameter int unsigned CONC    = 1,
  parameter int unsigned PKT_LEN = 2,
  parameter int unsigned CW      = $clog2(CORES_X * CORES_Y)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic [CW-1:0] core_id,
  input  logic [XW-1:0] my_x,
  input  logic [YW-1:0] my_y,
  input  logic [TW-1:0] my_t,
  input  logic          enable,
  input  logic [7:0]    rate,

  output logic          inj_val,
  input  logic          inj_rdy,
  output flit_t         inj_flit,
  input  logic          ej_val,
  output logic          ej_rdy,
  input  flit_t         ej_flit,

  output logic [15:0]   sent_cnt,     // flits injected
  output logic [15:0]   recv_cnt,     // flits ejected
  output logic [15:0]   recv_pkts,    // packets ejected (flits marked last)
  output logic [31:0]   signature,
  output logic          misroute
);

  localparam int unsigned NCORES = CORES_X * CORES_Y;
  localparam int unsigned CX = conc_x(CONC);
  localparam int unsigned CY = conc_y(CONC);
  localparam int unsigned LW = (PKT_LEN > 1) ? $clog2(PKT_LEN) : 1;
  localparam int unsigned SEQ_W = PAYLOAD_W - CW - LW;

  logic [15:0]      lfsr;
  logic             busy;
  logic [LW-1:0]    idx;
  logic [SEQ_W-1:0] seq;
  logic [XW-1:0]    cur_x;
  logic [YW-1:0]    cur_y;
  logic [TW-1:0]    cur_t;

  // Destination core drawn from the LFSR's high byte, then split into router coordinates.
  logic [CW-1:0] pick;
  logic [15:0]   col, row;
  always_comb begin
    pick = CW'((32'(lfsr[15:8]) * 32'(NCORES)) >> 8);
    col  = 16'(pick) % 16'(CORES_X);
    row  = 16'(pick) / 16'(CORES_X);
  end

  wire start = !busy && enable && (lfsr[7:0] < rate);

  always_ff @(posedge clk) begin
    if (rst) begin
      lfsr     <= (16'(core_id) * 16'h9e37 ^ 16'hc35a) | 16'h1;
      busy     <= 1'b0;
      idx      <= '0;
      seq      <= '0;
      cur_x    <= '0;
      cur_y    <= '0;
      cur_t    <= '0;
      sent_cnt <= '0;
    end else begin
      lfsr <= {lfsr[14:0], lfsr[15] ^ lfsr[14] ^ lfsr[12] ^ lfsr[3]};
      if (start) begin
        busy  <= 1'b1;
        idx   <= '0;
        cur_x <= XW'(col / 16'(CX));
        cur_y <= YW'(row / 16'(CY));
        cur_t <= TW'((row % 16'(CY)) * 16'(CX) + (col % 16'(CX)));
      end else if (inj_val && inj_rdy) begin
        sent_cnt <= sent_cnt + 1'b1;
        if (idx == LW'(PKT_LEN - 1)) begin
          busy <= 1'b0;
          seq  <= seq + 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  always_comb begin
    inj_val          = busy;
    inj_flit.last    = (idx == LW'(PKT_LEN - 1));
    inj_flit.dst_x   = cur_x;
    inj_flit.dst_y   = cur_y;
    inj_flit.dst_t   = cur_t;
    inj_flit.payload = {core_id, seq, idx};
  end

  assign ej_rdy = 1'b1;

  always_ff @(posedge clk) begin
    if (rst) begin
      recv_cnt  <= '0;
      recv_pkts <= '0;
      signature <= '0;
      misroute  <= 1'b0;
    end else if (ej_val) begin
      recv_cnt  <= recv_cnt + 1'b1;
      if (ej_flit.last) recv_pkts <= recv_pkts + 1'b1;
      signature <= {signature[30:0], signature[31]} ^ ej_flit.payload[31:0];
      if (ej_flit.dst_x != my_x || ej_flit.dst_y != my_y || ej_flit.dst_t != my_t)
        misroute <= 1'b1;
    end
  end

endmodule
