// tb_ocn_top: end-to-end test of the network in five of its topologies on an
// 8x8 core array: mesh-c1r2 (8x8 routers), mesh-c4r3 (4x4 routers),
// mesh-c8r0 (2x4 routers), torus-c1 (8x8 routers) and torus-c4 (4x4 routers). Each runs ocn_top_harness: zero-load latency,
// random all-to-all traffic with backpressure, and dummy-core traffic.
module tb_ocn_top;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic start = 1'b0;
  logic done_a, done_b, done_c, done_d, done_e;
  int ca, fa, cb, fb, cc, fc, cd, fd, ce, fe;

  ocn_top_harness #(.CORES_X(8), .CORES_Y(8), .CONC(1), .RUCHE(2)) h_a (.clk, .rst, .start, .done(done_a), .checks(ca), .failures(fa));
  ocn_top_harness #(.CORES_X(8), .CORES_Y(8), .CONC(4), .RUCHE(3)) h_b (.clk, .rst, .start, .done(done_b), .checks(cb), .failures(fb));
  ocn_top_harness #(.CORES_X(8), .CORES_Y(8), .CONC(8), .RUCHE(0)) h_c (.clk, .rst, .start, .done(done_c), .checks(cc), .failures(fc));
  ocn_top_harness #(.CORES_X(8), .CORES_Y(8), .CONC(1), .RUCHE(0), .TORUS(1'b1)) h_d (.clk, .rst, .start, .done(done_d), .checks(cd), .failures(fd));
  ocn_top_harness #(.CORES_X(8), .CORES_Y(8), .CONC(4), .RUCHE(0), .TORUS(1'b1)) h_e (.clk, .rst, .start, .done(done_e), .checks(ce), .failures(fe));

  initial begin
    repeat (400000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc + cd + ce, fa + fb + fc + fd + fe + 1);
    $finish;
  end

  initial begin
    repeat (4) @(posedge clk);
    rst = 1'b0;
    repeat (2) @(posedge clk);
    start = 1'b1;
    wait (done_a && done_b && done_c && done_d && done_e);
    $display("TB_RESULT checks=%0d failures=%0d", ca + cb + cc + cd + ce, fa + fb + fc + fd + fe);
    $finish;
  end
endmodule
