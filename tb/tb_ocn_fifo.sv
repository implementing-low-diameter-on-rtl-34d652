// tb_ocn_fifo: self-checking test of the router input queue.
// Pushes random flits with random stalls on both sides and compares the
// output order with a reference queue; checks that a full queue drops ready,
// that an empty queue drops valid, and that back-to-back traffic moves one
// flit per cycle with one cycle of latency.
module tb_ocn_fifo;
  import ocn_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic  enq_val, enq_rdy, deq_val, deq_rdy;
  flit_t enq_flit, deq_flit;
  int checks = 0, failures = 0;

  ocn_fifo #(.DEPTH(2)) dut (.*);

  flit_t model [$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int sent = 0, got = 0;
  initial begin
    enq_val = 0; deq_rdy = 0; enq_flit = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    check(!deq_val && enq_rdy, "empty after reset");
    // Fill to full without draining.
    enq_val = 1; enq_flit = flit_t'(64'h1111); @(negedge clk);
    check(deq_val && deq_flit == flit_t'(64'h1111), "one-cycle latency");
    enq_flit = flit_t'(64'h2222); @(negedge clk);
    check(!enq_rdy, "ready low when full");
    enq_val = 0;
    deq_rdy = 1; @(negedge clk);
    check(deq_flit == flit_t'(64'h2222) && enq_rdy, "second entry after pop");
    @(negedge clk);
    check(!deq_val, "empty after two pops");
    deq_rdy = 0;
    // Streaming: one flit per cycle with both sides always ready.
    deq_rdy = 1;
    for (int i = 0; i < 20; i++) begin
      enq_val = 1; enq_flit = flit_t'(64'(1000 + i));
      @(negedge clk);
      check(enq_rdy && deq_val && deq_flit == flit_t'(64'(1000 + i)), "streaming at full rate");
    end
    enq_val = 0; @(negedge clk);
    // Random traffic against a reference queue.
    for (int cyc = 0; cyc < 5000; cyc++) begin
      enq_val = ($urandom_range(0, 2) != 0);
      deq_rdy = ($urandom_range(0, 2) != 0);
      enq_flit = flit_t'({$urandom, $urandom});
      #1;
      if (deq_val) begin
        check(model.size() > 0 && deq_flit == model[0], "data order");
      end else begin
        check(model.size() == 0, "valid while data queued");
      end
      check(enq_rdy == (model.size() < 2), "ready matches occupancy");
      @(posedge clk);
      if (deq_val && deq_rdy) begin void'(model.pop_front()); got++; end
      if (enq_val && enq_rdy) begin model.push_back(enq_flit); sent++; end
      @(negedge clk);
    end
    check(got > 1000, "enough traffic moved");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
