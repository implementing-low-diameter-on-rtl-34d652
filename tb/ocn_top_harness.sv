// ocn_top_harness: traffic harness around one ocn_top instance, used by the
// network testbenches. Parameters select the network size and topology.
//
// When `start` rises it runs, with the external core ports:
//  1. Zero-load packets, one at a time, between random cores (plus the two
//     opposite corners). For each it checks that the packet arrives at the
//     right core and that the time from injecting the first flit to ejecting
//     the last is H + L - 1 cycles, H being the routers on the minimal ruche
//     route (floor(d/R) + d mod R hops per dimension, plus one) and L the
//     packet length.
//  2. NRAND random packets of 1-4 flits from every core at once, with random
//     ejection backpressure. Each flit must reach the core it names, in order
//     per source-destination pair, and a packet's flits must arrive together.
// Then it switches to dummy-core mode for DUMMY_CYCLES cycles at injection
// rate 40/256, drains, and checks that the dummy cores received every flit
// they sent, whole packets only, and no misrouted flit.
// Mechanism counters (ruche hops, feedthrough crossings, near hops, multi-flit
// packets, injection and ejection stalls, shared-router injections, mode
// switches) are printed; one that never happened is a failure.
module ocn_top_harness
  import ocn_pkg::*;
#(
  parameter int unsigned CORES_X = 8,
  parameter int unsigned CORES_Y = 8,
  parameter int unsigned CONC    = 1,
  parameter int unsigned RUCHE   = 2,
  parameter bit          TORUS   = 1'b0,
  parameter int unsigned NZERO   = 40,
  parameter int unsigned NRAND   = 20,
  parameter int unsigned DUMMY_CYCLES = 2000
) (
  input  logic clk,
  input  logic rst,
  input  logic start,
  output logic done,
  output int   checks,
  output int   failures
);

  localparam int N  = CORES_X * CORES_Y;
  localparam int CX = conc_x(CONC);
  localparam int CY = conc_y(CONC);
  localparam int DUMMY_PKT_LEN = 2;

  logic        inj_val  [N], inj_rdy [N], ej_val [N], ej_rdy [N];
  flit_t       inj_flit [N], ej_flit [N];
  logic        dummy_mode;
  logic [7:0]  dummy_rate;
  logic [15:0] dummy_sent [N], dummy_recv [N], dummy_recv_pkts [N];
  logic [31:0] dummy_signature;
  logic        dummy_misroute;

  ocn_top #(.CORES_X(CORES_X), .CORES_Y(CORES_Y), .CONC(CONC), .RUCHE(RUCHE), .TORUS(TORUS), .PKT_LEN(DUMMY_PKT_LEN)) dut (
    .clk, .rst,
    .core_inj_val (inj_val), .core_inj_rdy (inj_rdy), .core_inj_flit (inj_flit),
    .core_ej_val  (ej_val),  .core_ej_rdy  (ej_rdy),  .core_ej_flit  (ej_flit),
    .dummy_mode, .dummy_rate, .dummy_sent, .dummy_recv, .dummy_recv_pkts,
    .dummy_signature, .dummy_misroute
  );

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL[%s-c%0d r%0d]: %s @%0t", TORUS ? "torus" : "mesh", CONC, RUCHE, what, $time); end
  endtask

  // Core number -> router column, row, terminal.
  function automatic int rx_of(int c); return (c % CORES_X) / CX; endfunction
  function automatic int ry_of(int c); return (c / CORES_X) / CY; endfunction
  function automatic int rt_of(int c); return ((c / CORES_X) % CY) * CX + (c % CORES_X) % CX; endfunction

  localparam int RXN = CORES_X / CX;
  localparam int RYN = CORES_Y / CY;
  int n_dateline = 0;

  // Place of tile k on its folded ring of n tiles.
  function automatic int ring_place(int k, int n);
    return (k % 2 == 0) ? k / 2 : n - (k + 1) / 2;
  endfunction

  // Hops in one dimension from router a to router b on a row of n routers.
  // Mesh: far hops while R or more remain, then near hops. Folded torus: the
  // shorter way round the ring (forward on a tie), every hop through one
  // feedthrough; counts dateline crossings.
  function automatic int dim_hops(int a, int b, int n, output int far_hops, output int near_hops);
    int d;
    if (TORUS) begin
      int rc, rd, fwd;
      rc = ring_place(a, n); rd = ring_place(b, n);
      fwd = (rd - rc + n) % n;
      if (fwd <= n / 2) begin far_hops = fwd;     if (fwd > 0 && rc + fwd >= n) n_dateline++; end
      else              begin far_hops = n - fwd; if (rc - (n - fwd) < 0) n_dateline++; end
      near_hops = 0;
      return far_hops;
    end
    d = b - a;
    if (d < 0) d = -d;
    if (RUCHE > 0) begin far_hops = d / RUCHE; near_hops = d % RUCHE; end
    else begin far_hops = 0; near_hops = d; end
    return far_hops + near_hops;
  endfunction

  // Mechanism counters.
  int n_far = 0, n_ft = 0, n_near = 0, n_multi = 0, n_inj_stall = 0, n_ej_stall = 0;
  int n_shared = 0, n_mode = 0, n_zero = 0;

  flit_t txq [N][$];
  flit_t expq [N][N][$];     // [src][dst]
  int    ej_owner [N];
  int    ej_pct = 100;
  int    outstanding = 0;
  longint t_first_inj = -1, t_last_ej = -1;

  function automatic flit_t mk(int src, int dst, int seq, int idx, bit last);
    flit_t f;
    f = '0;
    f.last = last;
    f.dst_x = XW'(rx_of(dst)); f.dst_y = YW'(ry_of(dst)); f.dst_t = TW'(rt_of(dst));
    f.payload = PAYLOAD_W'({8'(src), 16'(seq), 4'(idx)});
    return f;
  endfunction

  int seq_no = 0;
  task automatic queue_pkt(int src, int dst, int len);
    int fx, nx, fy, ny;
    void'(dim_hops(rx_of(src), rx_of(dst), RXN, fx, nx));
    void'(dim_hops(ry_of(src), ry_of(dst), RYN, fy, ny));
    n_far += fx + fy; n_near += nx + ny;
    if (TORUS) n_ft += fx + fy;
    else if (RUCHE > 1) n_ft += (fx + fy) * (RUCHE - 1);
    if (len > 1) n_multi++;
    for (int k = 0; k < len; k++) begin
      flit_t f;
      f = mk(src, dst, seq_no, k, k == len - 1);
      txq[src].push_back(f);
      expq[src][dst].push_back(f);
      outstanding++;
    end
    seq_no++;
  endtask

  // Drivers.
  always @(negedge clk) begin
    for (int c = 0; c < N; c++) begin
      inj_val[c]  <= !dummy_mode && txq[c].size() > 0;
      inj_flit[c] <= (txq[c].size() > 0) ? txq[c][0] : '0;
      ej_rdy[c]   <= ($urandom_range(1, 100) <= ej_pct);
    end
  end

  // Monitor.
  always @(posedge clk) if (!rst) begin
    int injecting [int];
    injecting.delete();
    for (int c = 0; c < N; c++) begin
      if (inj_val[c] && !inj_rdy[c]) n_inj_stall++;
      if (inj_val[c] && inj_rdy[c]) begin
        void'(txq[c].pop_front());
        if (t_first_inj < 0) t_first_inj = $time;
        if (injecting.exists(ry_of(c) * 64 + rx_of(c))) n_shared++;
        injecting[ry_of(c) * 64 + rx_of(c)] = 1;
      end
      if (ej_val[c] && !ej_rdy[c]) n_ej_stall++;
      if (ej_val[c] && ej_rdy[c]) begin
        int src;
        src = int'(ej_flit[c].payload[27:20]);
        check(ej_flit[c].dst_x == XW'(rx_of(c)) && ej_flit[c].dst_y == YW'(ry_of(c)) && ej_flit[c].dst_t == TW'(rt_of(c)),
              "flit ejected at the core it names");
        check(src < N && expq[src][c].size() > 0 && ej_flit[c] == expq[src][c][0], "flit order per source-destination pair");
        if (src < N && expq[src][c].size() > 0) void'(expq[src][c].pop_front());
        check(ej_owner[c] < 0 || ej_owner[c] == src, "packet flits arrive together");
        ej_owner[c] = ej_flit[c].last ? -1 : src;
        outstanding--;
        t_last_ej = $time;
      end
    end
  end

  task automatic wait_drain(int limit);
    int g;
    g = 0;
    while (outstanding > 0 && g < limit) begin @(posedge clk); g++; end
    check(outstanding == 0, "all packets delivered");
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    dummy_mode = 0; dummy_rate = 0;
    for (int c = 0; c < N; c++) ej_owner[c] = -1;
    wait (start);
    @(negedge clk);
    // 1. Zero-load latency.
    for (int n = 0; n < NZERO; n++) begin
      int s, d, len, fx, nx, fy, ny, h, got;
      if (n == 0) begin s = 0; d = N - 1; end
      else if (n == 1) begin s = N - 1; d = 0; end
      else begin s = $urandom_range(0, N - 1); d = $urandom_range(0, N - 1); end
      len = $urandom_range(1, 4);
      h = dim_hops(rx_of(s), rx_of(d), RXN, fx, nx) + dim_hops(ry_of(s), ry_of(d), RYN, fy, ny) + 1;
      t_first_inj = -1;
      queue_pkt(s, d, len);
      wait_drain(1000);
      got = int'((t_last_ej - t_first_inj) / 10);
      check(got == h + len - 1, "zero-load latency H + L - 1");
      if (got != h + len - 1)
        $display("  src %0d dst %0d len %0d: %0d cycles, expected %0d", s, d, len, got, h + len - 1);
      n_zero++;
      repeat (2) @(negedge clk);
    end
    // 2. Random traffic from every core with ejection backpressure.
    ej_pct = 60;
    for (int n = 0; n < int'(NRAND); n++)
      for (int c = 0; c < N; c++)
        queue_pkt(c, $urandom_range(0, N - 1), $urandom_range(1, 4));
    wait_drain(200000);
    ej_pct = 100;
    repeat (5) @(negedge clk);
    // 3. Dummy-core mode.
    dummy_mode = 1; dummy_rate = 8'd40; n_mode++;
    repeat (DUMMY_CYCLES) @(negedge clk);
    dummy_rate = 8'd0;
    repeat (2000) @(negedge clk);
    begin
      int sent, recv, pk;
      sent = 0; recv = 0; pk = 0;
      for (int c = 0; c < N; c++) begin sent += int'(dummy_sent[c]); recv += int'(dummy_recv[c]); pk += int'(dummy_recv_pkts[c]); end
      $display("[%s-c%0d r%0d] dummy cores: sent %0d flits, received %0d flits in %0d packets, signature %h",
               TORUS ? "torus" : "mesh", CONC, RUCHE, sent, recv, pk, dummy_signature);
      check(sent > 0 && sent == recv, "dummy cores receive every flit sent");
      check(pk * DUMMY_PKT_LEN == recv, "dummy cores receive whole packets");
      check(!dummy_misroute, "no dummy-core misroute");
    end
    dummy_mode = 0; n_mode++;
    repeat (3) @(negedge clk);
    $display("[%s-c%0d r%0d] zero-load %0d, far hops %0d, feedthroughs %0d, near hops %0d, multi-flit %0d, inj stalls %0d, ej stalls %0d, shared-router %0d, mode switches %0d, dateline crossings %0d",
             TORUS ? "torus" : "mesh", CONC, RUCHE, n_zero, n_far, n_ft, n_near, n_multi, n_inj_stall, n_ej_stall, n_shared, n_mode, n_dateline);
    check((RUCHE == 0 && !TORUS) || n_far > 0, "far-channel hops happened");
    check((RUCHE < 2 && !TORUS) || n_ft > 0, "feedthrough crossings happened");
    check(TORUS || n_near > 0, "near hops happened");
    check(!TORUS || n_dateline > 0, "dateline crossings happened");
    check(n_multi > 0, "multi-flit packets happened");
    check(n_inj_stall > 0, "injection backpressure happened");
    check(n_ej_stall > 0, "ejection backpressure happened");
    check(CONC == 1 || n_shared > 0, "concentrated injection happened");
    check(n_mode == 2, "mode switches happened");
    done = 1;
  end
endmodule
