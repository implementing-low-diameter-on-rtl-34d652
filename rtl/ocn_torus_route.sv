// ocn_torus_route: minimal routing with dateline virtual channels for the
// folded-torus network.
//
// In a folded torus tile k of a row does not sit next to its ring neighbours:
// the ring visits the tiles in the order 0, 2, 4, ..., then back through the
// odd tiles ..., 3, 1, and returns to 0. Tile k's place on the ring is
//   ring(k) = k / 2            for even k,
//   ring(k) = N - (k + 1) / 2  for odd k,
// where N is the number of tiles in the row (or column). Moving forward along
// the ring leaves an even tile through its east (north) port and an odd tile
// through its west (south) port; backward is the other way round. This
// follows from the tile's two-lane cross-over and the wrap-around loops at
// the array edge (see ocn_torus_tile and ocn_top).
//
// Routing is dimension ordered, X then Y; in each ring the flit takes the
// shorter way (forward on a tie). To keep each ring free of deadlock the
// hop that crosses the dateline, between ring places N-1 and 0, moves the
// packet to virtual channel 1; a packet starts each dimension on virtual
// channel 0. The dateline scheme and the routing are this design's choices:
// the source shows the torus wiring but not how its routers avoid deadlock.
// Purely combinational.
module ocn_torus_route
  import ocn_pkg::*;
#(
  parameter int unsigned CONC = 1,
  parameter int unsigned RX   = 16,   // tiles per row (ring length in X)
  parameter int unsigned RY   = 16    // tiles per column (ring length in Y)
) (
  input  logic [XW-1:0] pos_x,
  input  logic [YW-1:0] pos_y,
  input  logic [XW-1:0] dst_x,
  input  logic [YW-1:0] dst_y,
  input  logic [TW-1:0] dst_t,
  input  logic          in_is_x,    // the flit arrived on an X-dimension port
  input  logic          in_is_y,    // the flit arrived on a Y-dimension port
  input  logic          in_vc,      // virtual channel it arrived on
  output logic [$clog2(CONC + 4)-1:0] out_port,
  output logic          out_vc
);

  localparam int unsigned PW = $clog2(CONC + 4);

  function automatic int unsigned ring_place(int unsigned k, int unsigned n);
    return (k % 2 == 0) ? k / 2 : n - (k + 1) / 2;
  endfunction

  always_comb begin
    int unsigned rc, rd, fwd;
    bit          go_fwd, at_line, even;
    out_port = PW'(dst_t);
    out_vc   = 1'b0;
    rc = 0; rd = 0; fwd = 0; go_fwd = 1'b0; at_line = 1'b0; even = 1'b0;
    if (dst_x != pos_x) begin
      rc     = ring_place(int'(pos_x), RX);
      rd     = ring_place(int'(dst_x), RX);
      fwd    = (rd + RX - rc) % RX;
      go_fwd = (fwd <= RX / 2);
      at_line  = go_fwd ? (rc == RX - 1) : (rc == 0);
      even   = (pos_x[0] == 1'b0);
      out_port = PW'(near_port(CONC, (go_fwd == even) ? DIR_E : DIR_W));
      out_vc   = at_line | (in_is_x & in_vc);
    end else if (dst_y != pos_y) begin
      rc     = ring_place(int'(pos_y), RY);
      rd     = ring_place(int'(dst_y), RY);
      fwd    = (rd + RY - rc) % RY;
      go_fwd = (fwd <= RY / 2);
      at_line  = go_fwd ? (rc == RY - 1) : (rc == 0);
      even   = (pos_y[0] == 1'b0);
      out_port = PW'(near_port(CONC, (go_fwd == even) ? DIR_N : DIR_S));
      out_vc   = at_line | (in_is_y & in_vc);
    end
  end

endmodule
