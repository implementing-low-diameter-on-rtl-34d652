// tb_ocn_route_compute: self-checking test of ruche-aware routing.
// Walks flits hop by hop from random sources to random destinations on a
// 16x16 router grid (ruche factor 2) and an 8x8 grid (concentration 4, ruche
// factor 3): at each step it applies the route unit's choice to a position
// model. Checks that the flit reaches its destination and exits on the right
// terminal, that X is finished before Y, and that the hop count equals
// floor(d/R) + (d mod R) per dimension.
module tb_ocn_route_compute;
  import ocn_pkg::*;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [XW-1:0] ax, bx; logic [YW-1:0] ay, by;
  logic [XW-1:0] dxa, dxb; logic [YW-1:0] dya, dyb; logic [TW-1:0] dta, dtb;
  logic [3:0] pa;   // radix 9 -> 4 bits
  logic [3:0] pb;   // radix 12 -> 4 bits

  ocn_route_compute #(.CONC(1), .RUCHE(2)) dut_a (.pos_x(ax), .pos_y(ay), .dst_x(dxa), .dst_y(dya), .dst_t(dta), .out_port(pa));
  ocn_route_compute #(.CONC(4), .RUCHE(3)) dut_b (.pos_x(bx), .pos_y(by), .dst_x(dxb), .dst_y(dyb), .dst_t(dtb), .out_port(pb));

  function automatic int abs_i(int v); return v < 0 ? -v : v; endfunction

  initial begin
    // Configuration A: 16x16, C=1, R=2. Ports: 0 term, 1..4 near NSEW, 5..8 far NSEW.
    for (int n = 0; n < 3000; n++) begin
      automatic int sx = $urandom_range(0, 15), sy = $urandom_range(0, 15);
      automatic int tx = $urandom_range(0, 15), ty = $urandom_range(0, 15);
      automatic int x = sx, y = sy, hops = 0, exp_hops;
      automatic bit y_started = 0, done = 0;
      dxa = XW'(tx); dya = YW'(ty); dta = '0;
      exp_hops = abs_i(tx - sx) / 2 + abs_i(tx - sx) % 2 + abs_i(ty - sy) / 2 + abs_i(ty - sy) % 2;
      while (!done && hops < 40) begin
        ax = XW'(x); ay = YW'(y); #1;
        case (int'(pa))
          0: done = 1;
          1: begin y++;    y_started = 1; end
          2: begin y--;    y_started = 1; end
          3: begin x++;    check(!y_started, "X after Y"); end
          4: begin x--;    check(!y_started, "X after Y"); end
          5: begin y += 2; y_started = 1; end
          6: begin y -= 2; y_started = 1; end
          7: begin x += 2; check(!y_started, "X after Y"); end
          8: begin x -= 2; check(!y_started, "X after Y"); end
          default: begin check(0, "illegal port"); done = 1; end
        endcase
        if (!done) begin
          hops++;
          check(x >= 0 && x < 16 && y >= 0 && y < 16, "stays on the grid");
        end
      end
      check(x == tx && y == ty, "reaches destination (A)");
      check(hops == exp_hops, "minimal ruche hop count (A)");
    end
    // Configuration B: 8x8, C=4, R=3. Ports: 0..3 term, 4..7 near, 8..11 far.
    for (int n = 0; n < 3000; n++) begin
      automatic int sx = $urandom_range(0, 7), sy = $urandom_range(0, 7);
      automatic int tx = $urandom_range(0, 7), ty = $urandom_range(0, 7), tt = $urandom_range(0, 3);
      automatic int x = sx, y = sy, hops = 0, exp_hops, port = -1;
      automatic bit done = 0;
      dxb = XW'(tx); dyb = YW'(ty); dtb = TW'(tt);
      exp_hops = abs_i(tx - sx) / 3 + abs_i(tx - sx) % 3 + abs_i(ty - sy) / 3 + abs_i(ty - sy) % 3;
      while (!done && hops < 40) begin
        bx = XW'(x); by = YW'(y); #1;
        port = int'(pb);
        case (port)
          0, 1, 2, 3: done = 1;
          4: y++;
          5: y--;
          6: x++;
          7: x--;
          8: y += 3;
          9: y -= 3;
          10: x += 3;
          11: x -= 3;
          default: begin check(0, "illegal port"); done = 1; end
        endcase
        if (!done) hops++;
      end
      check(x == tx && y == ty && port == tt, "reaches destination terminal (B)");
      check(hops == exp_hops, "minimal ruche hop count (B)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
