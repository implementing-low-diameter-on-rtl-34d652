// ocn_route_compute: ruche-aware dimension-ordered routing.
//
// Given the router's own grid position and a flit's destination fields, returns the
// router output port the flit takes. Routing is X first, then Y. In each
// dimension a flit that still has at least RUCHE routers to go takes the far
// (ruche) channel, which skips RUCHE-1 routers in one hop; the remaining
// distance, below RUCHE, is covered on the near channel. A distance d therefore
// costs floor(d/RUCHE) ruche hops plus (d mod RUCHE) near hops. At the
// destination router the flit leaves on the terminal port named by dst_t.
//
// The ruche channels and their skip distance follow the source; the order of
// dimensions and the rule "far first, near last" are this design's choices,
// made so the route is minimal and free of deadlock (all hops in one dimension
// move monotonically, X before Y). North is the direction of increasing y and
// east of increasing x. Purely combinational.
module ocn_route_compute
  import ocn_pkg::*;
#(
  parameter int unsigned CONC  = 1,
  parameter int unsigned RUCHE = 2
) (
  input  logic [XW-1:0] pos_x,
  input  logic [YW-1:0] pos_y,
  input  logic [XW-1:0] dst_x,
  input  logic [YW-1:0] dst_y,
  input  logic [TW-1:0] dst_t,
  output logic [$clog2(router_radix(CONC, RUCHE))-1:0] out_port
);

  localparam int unsigned PW = $clog2(router_radix(CONC, RUCHE));

  always_comb begin
    logic [XW:0] dx;
    logic [YW:0] dy;
    dx = '0;
    dy = '0;
    out_port = PW'(dst_t);
    if (dst_x > pos_x) begin
      dx = {1'b0, dst_x} - {1'b0, pos_x};
      out_port = (RUCHE > 0 && dx >= (XW+1)'(RUCHE)) ? PW'(far_port(CONC, DIR_E)) : PW'(near_port(CONC, DIR_E));
    end else if (dst_x < pos_x) begin
      dx = {1'b0, pos_x} - {1'b0, dst_x};
      out_port = (RUCHE > 0 && dx >= (XW+1)'(RUCHE)) ? PW'(far_port(CONC, DIR_W)) : PW'(near_port(CONC, DIR_W));
    end else if (dst_y > pos_y) begin
      dy = {1'b0, dst_y} - {1'b0, pos_y};
      out_port = (RUCHE > 0 && dy >= (YW+1)'(RUCHE)) ? PW'(far_port(CONC, DIR_N)) : PW'(near_port(CONC, DIR_N));
    end else if (dst_y < pos_y) begin
      dy = {1'b0, pos_y} - {1'b0, dst_y};
      out_port = (RUCHE > 0 && dy >= (YW+1)'(RUCHE)) ? PW'(far_port(CONC, DIR_S)) : PW'(near_port(CONC, DIR_S));
    end
  end

endmodule
