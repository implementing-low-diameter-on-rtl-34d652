// tb_ocn_torus_tile: self-checking test of the folded-torus hard macro
// (concentration 1) at tile (3,1) of an 8x4 grid.
// Checks that the feedthrough lane of every edge passes valid, the virtual
// channel bit and the flit to the opposite edge in the same cycle and returns
// both ready bits; that the far lane of every edge reaches the router (a flit
// for this tile is ejected one cycle later); and that a flit from the core
// leaves on the far lane of the side the torus routing picks, one cycle after
// it was queued.
module tb_ocn_torus_tile;
  import ocn_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic edge_in_val [4][2], edge_in_vc [4][2], edge_out_val [4][2], edge_out_vc [4][2];
  flit_t edge_in_flit [4][2], edge_out_flit [4][2];
  logic [1:0] edge_in_rdy [4][2], edge_out_rdy [4][2];
  logic inj_val [1], inj_rdy [1], ej_val [1], ej_rdy [1];
  flit_t inj_flit [1], ej_flit [1];
  logic [XW-1:0] pos_x = 4'd3;
  logic [YW-1:0] pos_y = 4'd1;

  ocn_torus_tile #(.CONC(1), .RX(8), .RY(4)) dut (.*);

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

  function automatic flit_t mk(int tx, int ty, int tag);
    flit_t f;
    f = '0; f.last = 1'b1; f.dst_x = XW'(tx); f.dst_y = YW'(ty); f.payload = PAYLOAD_W'(tag);
    return f;
  endfunction

  initial begin
    for (int d = 0; d < 4; d++)
      for (int j = 0; j < 2; j++) begin
        edge_in_val[d][j] = 0; edge_in_vc[d][j] = 0; edge_in_flit[d][j] = '0; edge_out_rdy[d][j] = 2'b11;
      end
    inj_val[0] = 0; inj_flit[0] = '0; ej_rdy[0] = 1;
    repeat (3) @(posedge clk);
    rst = 0;
    // Feedthrough lanes.
    for (int d = 0; d < 4; d++) begin
      @(negedge clk);
      edge_in_val[d][1] = 1; edge_in_vc[d][1] = 1'(d); edge_in_flit[d][1] = mk(d, 0, 50 + d);
      edge_out_rdy[d ^ 1][1] = 2'(d + 1);
      #1;
      check(edge_out_val[d ^ 1][1] && edge_out_vc[d ^ 1][1] == 1'(d) && edge_out_flit[d ^ 1][1] == mk(d, 0, 50 + d),
            "feedthrough carries valid, channel and flit across");
      check(edge_in_rdy[d][1] == 2'(d + 1), "feedthrough returns both ready bits");
      check(!edge_out_val[d][0] && !edge_out_val[d ^ 1][0], "feedthrough bypasses the router");
      edge_in_val[d][1] = 0; edge_out_rdy[d ^ 1][1] = 2'b11;
    end
    // Far lane of every edge into the router, ejected here.
    for (int d = 0; d < 4; d++) begin
      @(negedge clk);
      edge_in_val[d][0] = 1; edge_in_vc[d][0] = 1'(d % 2); edge_in_flit[d][0] = mk(3, 1, 60 + d);
      @(posedge clk); #1;
      check(edge_in_rdy[d][0][d % 2], "far lane accepted");
      edge_in_val[d][0] = 0;
      #1;
      check(ej_val[0] && ej_flit[0] == mk(3, 1, 60 + d), "far lane reaches the router, ejected one cycle later");
      @(posedge clk);
    end
    // Core to column 5: ring places 6 (x=3) -> 5 (x=5), backward; odd tile -> east.
    // Core to column 1: ring places 6 -> 7, forward; odd tile -> west.
    // Core to row 3: ring places 3 (y=1) -> 2 (y=3), backward; odd tile -> north.
    begin
      automatic int tgt_x [3] = '{5, 1, 3};
      automatic int tgt_y [3] = '{1, 1, 3};
      automatic int side  [3] = '{int'(DIR_E), int'(DIR_W), int'(DIR_N)};
      for (int k = 0; k < 3; k++) begin
        @(negedge clk);
        inj_val[0] = 1; inj_flit[0] = mk(tgt_x[k], tgt_y[k], 70 + k);
        #1;
        check(inj_rdy[0], "core flit accepted");
        @(posedge clk); #1;
        inj_val[0] = 0;
        #1;
        check(edge_out_val[side[k]][0] && !edge_out_vc[side[k]][0] && edge_out_flit[side[k]][0] == mk(tgt_x[k], tgt_y[k], 70 + k),
              "core flit leaves on the routed side, channel 0");
        @(posedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
