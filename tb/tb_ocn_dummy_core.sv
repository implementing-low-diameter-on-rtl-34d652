// tb_ocn_dummy_core: self-checking test of the dummy core (4x4 cores,
// concentration 4, so a 2x2 router grid; 3-flit packets).
// Source side: with rate 0 nothing is sent; with traffic enabled every packet
// has 3 flits with one destination inside the grid, `last` only on the third,
// the core's id and a rising packet number in the payload; over many packets
// every core of the array is chosen as a destination; sent_cnt matches the
// flits that left; a rate of 64/256 gives roughly a quarter of the idle
// cycles a new packet. Sink side: recv_cnt, recv_pkts and the XOR signature
// match a model, and misroute rises only for a flit addressed elsewhere.
module tb_ocn_dummy_core;
  import ocn_pkg::*;
  localparam int CORES_X = 4, CORES_Y = 4, CONC = 4, PKT_LEN = 3, CW = 4;

  logic clk = 1'b0, rst = 1'b1;
  always #5 clk = ~clk;

  logic [CW-1:0] core_id = 4'd6;     // column 2, row 1 -> router (1,0), terminal 2
  logic [XW-1:0] my_x = 4'd1;
  logic [YW-1:0] my_y = 4'd0;
  logic [TW-1:0] my_t = 3'd2;
  logic enable, inj_val, inj_rdy, ej_val, ej_rdy, misroute;
  logic [7:0] rate;
  flit_t inj_flit, ej_flit;
  logic [15:0] sent_cnt, recv_cnt, recv_pkts;
  logic [31:0] signature;

  ocn_dummy_core #(.CORES_X(CORES_X), .CORES_Y(CORES_Y), .CONC(CONC), .PKT_LEN(PKT_LEN)) dut (.*);

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

  int flits = 0, pkts = 0, idx = 0, idle_cycles = 0, starts = 0;
  flit_t first;
  bit [15:0] dest_seen = '0;
  bit busy_q = 0;

  always @(posedge clk) if (!rst) begin
    if (!inj_val && enable) idle_cycles++;
    if (inj_val && !busy_q) starts++;
    busy_q = inj_val && !(inj_rdy && inj_flit.last);
    if (inj_val && inj_rdy) begin
      if (idx == 0) begin
        first = inj_flit;
        check(inj_flit.dst_x < 2 && inj_flit.dst_y < 2 && inj_flit.dst_t < 4, "destination inside the grid");
        dest_seen[(int'(inj_flit.dst_y) * 2 + int'(inj_flit.dst_t) / 2) * 4 + int'(inj_flit.dst_x) * 2 + int'(inj_flit.dst_t) % 2] = 1'b1;
      end else begin
        check(inj_flit.dst_x == first.dst_x && inj_flit.dst_y == first.dst_y && inj_flit.dst_t == first.dst_t,
              "one destination per packet");
      end
      check(inj_flit.last == (idx == PKT_LEN - 1), "last on the final flit only");
      check(inj_flit.payload[PAYLOAD_W-1 -: CW] == core_id, "payload carries the core id");
      check(int'(inj_flit.payload[1:0]) == idx, "payload carries the flit index");
      check(int'(inj_flit.payload[PAYLOAD_W-CW-1:2]) == pkts, "payload carries the packet number");
      flits++;
      if (idx == PKT_LEN - 1) begin idx = 0; pkts++; end else idx++;
    end
  end

  initial begin
    logic [31:0] sig_model;
    int rx;
    enable = 0; rate = 0; inj_rdy = 0; ej_val = 0; ej_flit = '0;
    repeat (3) @(posedge clk);
    rst = 0;
    // Rate 0: nothing leaves.
    @(negedge clk); enable = 1; rate = 0; inj_rdy = 1;
    repeat (200) @(negedge clk);
    check(flits == 0, "no traffic at rate 0");
    // Heavy traffic with random backpressure.
    rate = 8'd255;
    repeat (3000) begin @(negedge clk); inj_rdy = ($urandom_range(0, 3) != 0); end
    // Let the packet in flight finish after enable drops.
    enable = 0; inj_rdy = 1;
    repeat (10) @(negedge clk);
    check(!inj_val && idx == 0, "packet in flight completes when disabled");
    check(dest_seen == 16'hffff, "every core chosen as a destination");
    check(int'(sent_cnt) == flits, "sent_cnt counts injected flits");
    // Rate 64/256: about a quarter of idle cycles start a packet.
    idle_cycles = 0; starts = 0;
    enable = 1; rate = 8'd64;
    repeat (8000) @(negedge clk);
    enable = 0;
    repeat (10) @(negedge clk);
    $display("idle=%0d starts=%0d", idle_cycles, starts);
    check(starts * 100 > idle_cycles * 18 && starts * 100 < idle_cycles * 32, "injection rate near rate/256");
    // Sink: flits for this core, then one for another core.
    sig_model = '0; rx = 0;
    for (int k = 0; k < 50; k++) begin
      @(negedge clk);
      ej_val = ($urandom_range(0, 1) == 1);
      ej_flit = '0;
      ej_flit.dst_x = my_x; ej_flit.dst_y = my_y; ej_flit.dst_t = my_t;
      ej_flit.last = (k % 3 == 2);
      ej_flit.payload = PAYLOAD_W'({$urandom, $urandom});
      check(ej_rdy, "sink always ready");
      @(posedge clk);
      if (ej_val) begin
        sig_model = {sig_model[30:0], sig_model[31]} ^ ej_flit.payload[31:0];
        rx++;
      end
    end
    @(negedge clk); ej_val = 0; #1;
    check(int'(recv_cnt) == rx && signature == sig_model && !misroute, "sink count and signature");
    ej_val = 1; ej_flit.dst_t = 3'd0;
    @(negedge clk); ej_val = 0; #1;
    check(misroute, "misroute flag on a foreign flit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
