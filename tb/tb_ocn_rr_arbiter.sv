// tb_ocn_rr_arbiter: self-checking test of the round-robin arbiter.
// Compares each grant with a reference round-robin model under random
// requests and random update strobes, and checks fairness: with all inputs
// requesting, N consecutive grants visit every input once.
module tb_ocn_rr_arbiter;
  localparam int N = 9;
  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [N-1:0] req, grant;
  logic update;
  int checks = 0, failures = 0;

  ocn_rr_arbiter #(.N(N)) dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int ptr = 0;   // reference: highest-priority index
  function automatic logic [N-1:0] ref_grant(logic [N-1:0] r, int p);
    for (int k = 0; k < N; k++) if (r[(p + k) % N]) return (N)'(1) << ((p + k) % N);
    return '0;
  endfunction

  initial begin
    logic [N-1:0] seen;
    req = '0; update = 0;
    repeat (2) @(posedge clk);
    rst = 0;
    @(negedge clk);
    // Fairness with every input requesting.
    req = '1; update = 1; seen = '0;
    for (int i = 0; i < N; i++) begin
      #1;
      check($onehot(grant), "one grant with all requesting");
      seen |= grant;
      @(posedge clk); @(negedge clk);
    end
    check(seen == '1, "every input served in N grants");
    ptr = 0;
    // Align the reference with the arbiter: after N full rounds the pointer is back at 0.
    for (int cyc = 0; cyc < 4000; cyc++) begin
      req = N'($urandom);
      update = 1'($urandom_range(0, 1));
      #1;
      check(grant == ref_grant(req, ptr), "grant matches round-robin model");
      @(posedge clk);
      if (update && grant != 0) begin
        for (int i = 0; i < N; i++) if (grant[i]) ptr = (i + 1) % N;
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
