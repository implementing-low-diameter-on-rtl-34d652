// tb_ocn_router: self-checking test of one router (concentration 1, ruche
// factor 2, radix 9) placed at grid position (5,5).
// 1. Zero-load latency: a flit written into an input queue leaves on the
//    correct output one cycle later.
// 2. Throughput: a stream of single-flit packets through one input-output
//    pair moves one flit per cycle.
// 3. Random traffic on all nine inputs, multi-flit packets, random
//    backpressure on all outputs: every flit must come out on the output a
//    reference route function picks, in order per input-output pair, and the
//    flits of a packet must stay together on an output (wormhole lock).
// Counts contention (flits of two inputs pending for one output) and stalls.
module tb_ocn_router;
  import ocn_pkg::*;
  localparam int NP = 9;
  localparam int PX = 5, PY = 5;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic  in_val [NP], in_rdy [NP], out_val [NP], out_rdy [NP];
  flit_t in_flit [NP], out_flit [NP];
  logic [XW-1:0] pos_x = XW'(PX);
  logic [YW-1:0] pos_y = YW'(PY);

  ocn_router #(.CONC(1), .RUCHE(2)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s @%0t", what, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference route (X then Y; far channel while 2 or more routers remain).
  function automatic int ref_port(int tx, int ty);
    if (tx > PX) return (tx - PX >= 2) ? 7 : 3;
    if (tx < PX) return (PX - tx >= 2) ? 8 : 4;
    if (ty > PY) return (ty - PY >= 2) ? 5 : 1;
    if (ty < PY) return (PY - ty >= 2) ? 6 : 2;
    return 0;
  endfunction

  function automatic flit_t mk(int tx, int ty, int src, int pkt, int idx, bit last);
    flit_t f;
    f = '0;
    f.dst_x = XW'(tx); f.dst_y = YW'(ty); f.dst_t = '0; f.last = last;
    f.payload = PAYLOAD_W'({4'(src), 16'(pkt), 4'(idx)});
    return f;
  endfunction

  flit_t txq [NP][$];          // flits waiting to be offered at each input
  flit_t expq [NP][NP][$];     // expected flits per [input][output]
  int    lock_src [NP];        // per output: input currently owning it, -1 if free
  int    delivered = 0, contention = 0, stalls = 0;
  bit    random_mode = 0;
  int    ready_pct = 100;

  // Input drivers.
  always @(negedge clk) begin
    for (int i = 0; i < NP; i++) begin
      in_val[i]  <= (txq[i].size() > 0) && (!random_mode || $urandom_range(0, 3) != 0);
      in_flit[i] <= (txq[i].size() > 0) ? txq[i][0] : '0;
    end
    for (int o = 0; o < NP; o++) out_rdy[o] <= ($urandom_range(1, 100) <= ready_pct);
  end

  // Monitor: inputs accepted and outputs delivered.
  always @(posedge clk) if (!rst) begin
    int want [NP];
    for (int o = 0; o < NP; o++) begin
      want[o] = 0;
      for (int i = 0; i < NP; i++) if (expq[i][o].size() > 0) want[o]++;
    end
    for (int i = 0; i < NP; i++)
      if (in_val[i] && in_rdy[i]) void'(txq[i].pop_front());
    for (int o = 0; o < NP; o++) begin
      if (want[o] > 1) contention++;
      if (out_val[o] && !out_rdy[o]) stalls++;
      if (out_val[o] && out_rdy[o]) begin
        int src;
        src = int'(out_flit[o].payload[23:20]);
        check(src < NP && expq[src][o].size() > 0, "flit on an output no flit was routed to");
        if (src < NP && expq[src][o].size() > 0) begin
          check(out_flit[o] == expq[src][o][0], "flit order and content per input-output pair");
          void'(expq[src][o].pop_front());
        end
        check(lock_src[o] < 0 || lock_src[o] == src, "packets interleaved on one output");
        lock_src[o] = out_flit[o].last ? -1 : src;
        delivered++;
      end
    end
  end

  task automatic send_pkt(int src, int tx, int ty, int pkt, int len);
    for (int k = 0; k < len; k++) begin
      flit_t f;
      f = mk(tx, ty, src, pkt, k, k == len - 1);
      txq[src].push_back(f);
      expq[src][ref_port(tx, ty)].push_back(f);
    end
  endtask

  initial begin
    int t0, pkt;
    for (int o = 0; o < NP; o++) begin lock_src[o] = -1; out_rdy[o] = 1; end
    for (int i = 0; i < NP; i++) begin in_val[i] = 0; in_flit[i] = '0; end
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);

    // 1. Zero-load latency: inject one flit at input 0 heading east far.
    send_pkt(0, 9, 5, 1, 1);
    @(posedge clk); #1;   // accepted at this edge
    t0 = 0;
    while (!(out_val[7]) && t0 < 10) begin @(posedge clk); #1; t0++; end
    check(t0 == 0 && out_val[7], "router latency of one cycle");
    repeat (3) @(posedge clk);

    // 2. Throughput: 32 single-flit packets from input 3 (near E) to terminal.
    for (int k = 0; k < 32; k++) send_pkt(3, 5, 5, 100 + k, 1);
    begin
      longint start; int cnt;
      cnt = delivered;
      @(posedge clk);
      start = $time;
      while (delivered < cnt + 32) @(posedge clk);
      check(($time - start) / 10 <= 34, "one flit per cycle through the router");
    end
    repeat (3) @(posedge clk);

    // 3. Random traffic with backpressure.
    random_mode = 1;
    ready_pct = 70;
    pkt = 1000;
    for (int n = 0; n < 600; n++) begin
      send_pkt($urandom_range(0, NP - 1), $urandom_range(0, 15), $urandom_range(0, 15), pkt++, $urandom_range(1, 4));
    end
    begin
      automatic int guard = 0;
      automatic bit empty = 0;
      while (!empty && guard < 50000) begin
        @(posedge clk);
        guard++;
        empty = 1;
        for (int i = 0; i < NP; i++) begin
          if (txq[i].size() > 0) empty = 0;
          for (int o = 0; o < NP; o++) if (expq[i][o].size() > 0) empty = 0;
        end
      end
      check(empty, "all flits delivered");
    end
    check(contention > 0, "output contention occurred");
    check(stalls > 0, "output backpressure occurred");
    $display("delivered=%0d contention=%0d stalls=%0d", delivered, contention, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
