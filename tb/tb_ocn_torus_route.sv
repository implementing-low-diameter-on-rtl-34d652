// tb_ocn_torus_route: self-checking test of folded-torus routing on an 8x4
// router grid. A position model follows the physical wiring of the folded
// torus: an east hop from tile k reaches tile k+2, except that tile N-2 reaches
// N-1 and tile N-1 reaches N-2 through the edge loop; a west hop reaches k-2,
// except 1 -> 0 and 0 -> 1. Flits are walked from random sources to random
// destinations; each must arrive, X before Y, in the fewest hops (a
// breadth-first search on the same wiring gives the minimum), and the hop
// across the dateline link (between tiles 0 and 1) and every later hop in that
// dimension must use virtual channel 1, all earlier hops channel 0.
module tb_ocn_torus_route;
  import ocn_pkg::*;
  localparam int NXR = 8, NYR = 4;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  logic [XW-1:0] px, dx; logic [YW-1:0] py, dy; logic [TW-1:0] dt;
  logic in_is_x, in_is_y, in_vc, out_vc;
  logic [2:0] port;   // radix 5 -> 3 bits: 0 term, 1 N, 2 S, 3 E, 4 W

  ocn_torus_route #(.CONC(1), .RX(NXR), .RY(NYR)) dut (
    .pos_x(px), .pos_y(py), .dst_x(dx), .dst_y(dy), .dst_t(dt),
    .in_is_x, .in_is_y, .in_vc, .out_port(port), .out_vc);

  function automatic int step(int k, int n, bit up);
    if (up) return (k + 2 <= n - 1) ? k + 2 : (k == n - 2) ? n - 1 : n - 2;
    else    return (k >= 2) ? k - 2 : (k == 1) ? 0 : 1;
  endfunction

  function automatic int bfs(int a, int b, int n);
    int dst_hops [16];
    int q [$];
    for (int i = 0; i < n; i++) dst_hops[i] = -1;
    dst_hops[a] = 0; q.push_back(a);
    while (q.size() > 0) begin
      int k, m;
      k = q.pop_front();
      for (int u = 0; u < 2; u++) begin
        m = step(k, n, u == 1);
        if (dst_hops[m] < 0) begin dst_hops[m] = dst_hops[k] + 1; q.push_back(m); end
      end
    end
    return dst_hops[b];
  endfunction

  initial begin
    for (int n = 0; n < 4000; n++) begin
      automatic int sx = $urandom_range(0, NXR - 1), sy = $urandom_range(0, NYR - 1);
      automatic int tx = $urandom_range(0, NXR - 1), ty = $urandom_range(0, NYR - 1);
      automatic int x = sx, y = sy, hops = 0, dim = 0, vc = 0, p;
      automatic bit done = 0, crossed = 0, y_started = 0;
      dx = XW'(tx); dy = YW'(ty); dt = '0;
      while (!done && hops < 40) begin
        int nx, ny, ndim;
        px = XW'(x); py = YW'(y);
        in_is_x = (dim == 1); in_is_y = (dim == 2); in_vc = 1'(vc);
        #1;
        p = int'(port);
        nx = x; ny = y; ndim = dim;
        case (p)
          0: done = 1;
          1: begin ny = step(y, NYR, 1); ndim = 2; end
          2: begin ny = step(y, NYR, 0); ndim = 2; end
          3: begin nx = step(x, NXR, 1); ndim = 1; end
          4: begin nx = step(x, NXR, 0); ndim = 1; end
          default: begin check(0, "illegal port"); done = 1; end
        endcase
        if (!done) begin
          bit on_line;
          if (ndim != dim) crossed = 0;
          if (ndim == 2) y_started = 1;
          check(!(ndim == 1 && y_started), "X after Y");
          on_line = (ndim == 1) ? ((x == 0 && nx == 1) || (x == 1 && nx == 0)) : ((y == 0 && ny == 1) || (y == 1 && ny == 0));
          if (on_line) crossed = 1;
          check(out_vc == crossed, "virtual channel follows the dateline");
          vc = int'(out_vc);
          x = nx; y = ny; dim = ndim; hops++;
        end
      end
      check(x == tx && y == ty, "reaches destination");
      check(hops == bfs(sx, tx, NXR) + bfs(sy, ty, NYR), "minimal hop count");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
