// tb_ocn_tile: self-checking test of the hard macro (concentration 4, ruche
// factor 3, so each edge has a near lane, a far lane and two feedthrough
// lanes) placed at grid position (4,4).
// Checks that every feedthrough lane passes a flit and its ready straight to
// the opposite edge in the same cycle, that the near and far lanes of every
// edge reach the router, and that router outputs leave on the right edge
// lane or terminal one cycle after entering.
module tb_ocn_tile;
  import ocn_pkg::*;
  localparam int CONC = 4, RUCHE = 3, LANES = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic  edge_in_val [4][LANES], edge_in_rdy [4][LANES], edge_out_val [4][LANES], edge_out_rdy [4][LANES];
  flit_t edge_in_flit [4][LANES], edge_out_flit [4][LANES];
  logic  inj_val [CONC], inj_rdy [CONC], ej_val [CONC], ej_rdy [CONC];
  flit_t inj_flit [CONC], ej_flit [CONC];
  logic [XW-1:0] pos_x = 4'd4;
  logic [YW-1:0] pos_y = 4'd4;

  ocn_tile #(.CONC(CONC), .RUCHE(RUCHE)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic flit_t mk(int tx, int ty, int tt, int tag);
    flit_t f;
    f = '0;
    f.last = 1'b1; f.dst_x = XW'(tx); f.dst_y = YW'(ty); f.dst_t = TW'(tt);
    f.payload = PAYLOAD_W'(tag);
    return f;
  endfunction

  task automatic idle();
    for (int d = 0; d < 4; d++)
      for (int j = 0; j < LANES; j++) begin
        edge_in_val[d][j] = 0; edge_in_flit[d][j] = '0; edge_out_rdy[d][j] = 1;
      end
    for (int t = 0; t < CONC; t++) begin inj_val[t] = 0; inj_flit[t] = '0; ej_rdy[t] = 1; end
  endtask

  // Send one flit into the router through an edge lane (lane 0 or 1) or a
  // terminal (d < 0, lane = terminal) and expect it one cycle later at an
  // output edge lane (od >= 0) or terminal (od < 0, ol = terminal).
  task automatic through_router(int d, int lane, flit_t f, int od, int ol, string what);
    @(negedge clk);
    if (d >= 0) begin edge_in_val[d][lane] = 1; edge_in_flit[d][lane] = f; end
    else begin inj_val[lane] = 1; inj_flit[lane] = f; end
    @(posedge clk); #1;
    check(d >= 0 ? edge_in_rdy[d][lane] : inj_rdy[lane], {what, ": accepted"});
    if (d >= 0) edge_in_val[d][lane] = 0; else inj_val[lane] = 0;
    #1;
    if (od >= 0) check(edge_out_val[od][ol] && edge_out_flit[od][ol] == f, {what, ": output one cycle later"});
    else check(ej_val[ol] && ej_flit[ol] == f, {what, ": ejected one cycle later"});
    @(posedge clk); #1;
  endtask

  initial begin
    idle();
    repeat (3) @(posedge clk);
    rst = 0;
    // Feedthrough lanes: combinational, straight across the tile.
    for (int d = 0; d < 4; d++)
      for (int j = 2; j < LANES; j++) begin
        @(negedge clk);
        edge_in_val[d][j] = 1; edge_in_flit[d][j] = mk(d, j, 0, 16 * d + j);
        edge_out_rdy[d ^ 1][j] = 0;
        #1;
        check(edge_out_val[d ^ 1][j] && edge_out_flit[d ^ 1][j] == mk(d, j, 0, 16 * d + j), "feedthrough data crosses the tile");
        check(!edge_in_rdy[d][j], "feedthrough ready low from the far side");
        edge_out_rdy[d ^ 1][j] = 1;
        #1;
        check(edge_in_rdy[d][j], "feedthrough ready high from the far side");
        for (int dd = 0; dd < 4; dd++) check(!edge_out_val[dd][0] && !edge_out_val[dd][1], "feedthrough does not touch the router");
        edge_in_val[d][j] = 0;
      end
    // Router paths: terminal -> far east (x 4 -> 7), near west, far north, near south.
    through_router(-1, 0, mk(7, 4, 0, 1), int'(DIR_E), 1, "terminal 0 to far east");
    through_router(-1, 1, mk(3, 9, 0, 2), int'(DIR_W), 0, "terminal 1 to near west");
    through_router(-1, 2, mk(4, 7, 1, 3), int'(DIR_N), 1, "terminal 2 to far north");
    through_router(-1, 3, mk(4, 3, 1, 4), int'(DIR_S), 0, "terminal 3 to near south");
    // Edge inputs to terminals: near and far lanes of every edge.
    for (int d = 0; d < 4; d++)
      for (int l = 0; l < 2; l++)
        through_router(d, l, mk(4, 4, (d + l) % CONC, 100 + 4 * d + l), -1, (d + l) % CONC, "edge lane to terminal");
    // Far west input continuing far east (straight through the router).
    through_router(int'(DIR_W), 1, mk(12, 4, 0, 200), int'(DIR_E), 1, "far west in, far east out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
