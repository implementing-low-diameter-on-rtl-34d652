// tb_ocn_torus_router: self-checking test of the folded-torus router
// (concentration 1) at tile (2,3) of an 8x4 grid.
// 1. A flit from the core for column 6 leaves east on virtual channel 0 one
//    cycle after it was queued.
// 2. Virtual-channel independence: with channel 0 of the east link blocked, a
//    packet on channel 1 still passes, while a channel-0 packet waits.
// 3. Random multi-flit traffic on all inputs and both virtual channels, with
//    random per-channel backpressure: every flit leaves on the port and
//    channel a reference route gives, in order per input queue and output
//    channel, with the flits of a packet together on their output channel.
module tb_ocn_torus_router;
  import ocn_pkg::*;
  localparam int NXR = 8, NYR = 4, PX = 2, PY = 3;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic term_in_val [1], term_in_rdy [1], term_out_val [1], term_out_rdy [1];
  flit_t term_in_flit [1], term_out_flit [1];
  logic net_in_val [4], net_in_vc [4], net_out_val [4], net_out_vc [4];
  flit_t net_in_flit [4], net_out_flit [4];
  logic [1:0] net_in_rdy [4], net_out_rdy [4];
  logic [XW-1:0] pos_x = XW'(PX);
  logic [YW-1:0] pos_y = YW'(PY);

  ocn_torus_router #(.CONC(1), .RX(NXR), .RY(NYR)) dut (.*);

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

  function automatic int rp(int k, int n); return (k % 2 == 0) ? k / 2 : n - (k + 1) / 2; endfunction

  // Reference: returns output slot 0 (core) or 1 + 2*dir + vc.
  function automatic int ref_slot(int in_slot, flit_t f);
    int in_dir, in_vc, rc, rd, fwd, dir, vc;
    bit go_fwd, line;
    in_dir = (in_slot == 0) ? -1 : (in_slot - 1) / 2;
    in_vc  = (in_slot == 0) ? 0 : (in_slot - 1) % 2;
    if (int'(f.dst_x) != PX) begin
      rc = rp(PX, NXR); rd = rp(int'(f.dst_x), NXR); fwd = (rd - rc + NXR) % NXR;
      go_fwd = fwd <= NXR / 2;
      line = go_fwd ? (rc == NXR - 1) : (rc == 0);
      dir = (go_fwd == (PX % 2 == 0)) ? 2 : 3;
      vc = (line || ((in_dir == 2 || in_dir == 3) && in_vc == 1)) ? 1 : 0;
      return 1 + 2 * dir + vc;
    end
    if (int'(f.dst_y) != PY) begin
      rc = rp(PY, NYR); rd = rp(int'(f.dst_y), NYR); fwd = (rd - rc + NYR) % NYR;
      go_fwd = fwd <= NYR / 2;
      line = go_fwd ? (rc == NYR - 1) : (rc == 0);
      dir = (go_fwd == (PY % 2 == 0)) ? 0 : 1;
      vc = (line || ((in_dir == 0 || in_dir == 1) && in_vc == 1)) ? 1 : 0;
      return 1 + 2 * dir + vc;
    end
    return 0;
  endfunction

  // Input slots: 0 core, 1 + 2*dir + vc network. One driver queue per slot;
  // the two channels of a network port take turns on the link.
  flit_t txq [9][$];
  flit_t expq [9][9][$];
  int    owner [9];
  int    rdy_pct = 100;
  bit    block_e0 = 0;
  int    vc_turn [4];

  always @(negedge clk) begin
    term_in_val[0]  <= txq[0].size() > 0;
    term_in_flit[0] <= txq[0].size() > 0 ? txq[0][0] : '0;
    for (int d = 0; d < 4; d++) begin
      int pick;
      pick = -1;
      for (int k = 0; k < 2; k++) begin
        int v;
        v = (vc_turn[d] + k) % 2;
        if (pick < 0 && txq[1 + 2 * d + v].size() > 0) pick = v;
      end
      vc_turn[d] = (vc_turn[d] + 1) % 2;
      net_in_val[d]  <= pick >= 0;
      net_in_vc[d]   <= (pick == 1);
      net_in_flit[d] <= pick >= 0 ? txq[1 + 2 * d + pick][0] : '0;
      net_out_rdy[d] <= {1'($urandom_range(1, 100) <= rdy_pct), 1'($urandom_range(1, 100) <= rdy_pct && !(block_e0 && d == 2))};
    end
    term_out_rdy[0] <= $urandom_range(1, 100) <= rdy_pct;
  end

  always @(posedge clk) if (!rst) begin
    if (term_in_val[0] && term_in_rdy[0]) void'(txq[0].pop_front());
    for (int d = 0; d < 4; d++)
      if (net_in_val[d] && net_in_rdy[d][net_in_vc[d]]) void'(txq[1 + 2 * d + int'(net_in_vc[d])].pop_front());
    for (int s = 0; s < 9; s++) begin
      bit fire;
      flit_t f;
      if (s == 0) begin fire = term_out_val[0] && term_out_rdy[0]; f = term_out_flit[0]; end
      else begin
        fire = net_out_val[(s - 1) / 2] && int'(net_out_vc[(s - 1) / 2]) == (s - 1) % 2;
        f = net_out_flit[(s - 1) / 2];
        if (fire) check(net_out_rdy[(s - 1) / 2][(s - 1) % 2], "valid only on a ready channel");
      end
      if (fire) begin
        int src;
        src = int'(f.payload[11:8]);
        check(src < 9 && expq[src][s].size() > 0 && expq[src][s][0] == f, "flit on the reference port and channel, in order");
        if (src < 9 && expq[src][s].size() > 0) void'(expq[src][s].pop_front());
        check(owner[s] < 0 || owner[s] == src, "packet flits stay together on a channel");
        owner[s] = f.last ? -1 : src;
      end
    end
  end

  int pk = 0;
  task automatic send(int slot, int tx, int ty, int len);
    for (int k = 0; k < len; k++) begin
      flit_t f;
      f = '0; f.last = (k == len - 1); f.dst_x = XW'(tx); f.dst_y = YW'(ty);
      f.payload = PAYLOAD_W'({16'(pk), 4'(slot), 8'(k)});
      txq[slot].push_back(f);
      expq[slot][ref_slot(slot, f)].push_back(f);
    end
    pk++;
  endtask

  function automatic bit all_empty();
    for (int i = 0; i < 9; i++) begin
      if (txq[i].size() > 0) return 0;
      for (int o = 0; o < 9; o++) if (expq[i][o].size() > 0) return 0;
    end
    return 1;
  endfunction

  initial begin
    for (int s = 0; s < 9; s++) owner[s] = -1;
    for (int d = 0; d < 4; d++) vc_turn[d] = 0;
    repeat (3) @(posedge clk);
    rst = 0;
    @(negedge clk);
    // 1. Latency.
    send(0, 6, 3, 1);
    @(posedge clk); #1;
    check(term_in_rdy[0], "core flit accepted");
    @(posedge clk); #1;
    @(negedge clk);
    check(all_empty(), "core flit left east on channel 0 one cycle after queuing");
    // 2. Channel 0 of the east link blocked: channel 1 still flows.
    block_e0 = 1;
    send(0, 6, 3, 3);          // core -> east, channel 0: must wait
    send(1 + 2 * 3 + 1, 6, 3, 2); // from west on channel 1, continuing east on channel 1
    repeat (10) @(negedge clk);
    check(expq[7][1 + 2 * 2 + 1].size() == 0, "channel-1 packet passes a blocked channel 0");
    check(expq[0][1 + 2 * 2 + 0].size() == 3, "channel-0 packet waits");
    block_e0 = 0;
    repeat (10) @(negedge clk);
    check(all_empty(), "blocked packet leaves once channel 0 frees");
    // 3. Random traffic.
    rdy_pct = 70;
    for (int n = 0; n < 500; n++) begin
      int slot;
      slot = $urandom_range(0, 8);
      send(slot, $urandom_range(0, NXR - 1), $urandom_range(0, NYR - 1), $urandom_range(1, 4));
    end
    begin
      int g;
      g = 0;
      while (!all_empty() && g < 40000) begin @(posedge clk); g++; end
    end
    check(all_empty(), "all flits delivered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
