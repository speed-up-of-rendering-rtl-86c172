// Self-checking testbench of scan_conversion. Triangles are set up here
// (edge functions, bounding box, depth plane in 64-bit integers) and the
// expected fragment list is built by testing every box position: covered
// positions in raster order, plus the final position with last = 1. The
// output is compared beat by beat, with random back-pressure on some
// triangles. Also checks the rate: without back-pressure a triangle takes
// one cycle per bounding-box position plus one cycle to be accepted.
module tb_scan_conversion;
  import rp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   in_valid, in_ready, out_valid, out_ready, busy;
  setup_t in_setup;
  frag_t  out_frag;

  scan_conversion dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  frag_t exp_q[$];

  function automatic setup_t make_setup(input int x0, y0, z0, x1, y1, z1, x2, y2, z2,
                                        input int gidx);
    setup_t s;
    longint area, a[3], b[3], c[3], px, py, xl, xh, yl, yh;
    int xs[3] = '{x0, x1, x2};
    int ys[3] = '{y0, y1, y2};
    area = longint'(x1 - x0) * (y2 - y0) - longint'(x2 - x0) * (y1 - y0);
    for (int i = 0; i < 3; i++) begin
      int j = (i + 1) % 3;
      a[i] = ys[i] - ys[j];
      b[i] = xs[j] - xs[i];
      c[i] = longint'(xs[i]) * ys[j] - longint'(xs[j]) * ys[i];
      if (area < 0) begin a[i] = -a[i]; b[i] = -b[i]; c[i] = -c[i]; end
    end
    xl = x0; xh = x0; yl = y0; yh = y0;
    foreach (xs[i]) begin
      if (xs[i] < xl) xl = xs[i];
      if (xs[i] > xh) xh = xs[i];
      if (ys[i] < yl) yl = ys[i];
      if (ys[i] > yh) yh = ys[i];
    end
    px = (longint'(z1 - z0) * (y2 - y0) - longint'(z2 - z0) * (y1 - y0)) * 4096 / area;
    py = (longint'(x1 - x0) * (z2 - z0) - longint'(x2 - x0) * (z1 - z0)) * 4096 / area;
    s.gidx = gidx_t'(gidx);
    s.xmin = xcoord_t'(xl); s.xmax = xcoord_t'(xh);
    s.ymin = ycoord_t'(yl); s.ymax = ycoord_t'(yh);
    s.e0 = '{a: EW'(a[0]), b: EW'(b[0]), c: EW'(c[0])};
    s.e1 = '{a: EW'(a[1]), b: EW'(b[1]), c: EW'(c[1])};
    s.e2 = '{a: EW'(a[2]), b: EW'(b[2]), c: EW'(c[2])};
    s.dzdx = PW'(px);
    s.dzdy = PW'(py);
    s.zorg = PW'(longint'(z0) * 4096 + px * (xl - x0) + py * (yl - y0));
    return s;
  endfunction

  // reference fragments of a set-up triangle; returns the number of box positions
  function automatic int expect_frags(input setup_t s);
    int n = 0;
    for (int y = int'(s.ymin); y <= int'(s.ymax); y++)
      for (int x = int'(s.xmin); x <= int'(s.xmax); x++) begin
        bit ins = 1;
        bit fin = (x == int'(s.xmax)) && (y == int'(s.ymax));
        longint zf;
        frag_t f;
        edge_t es[3] = '{s.e0, s.e1, s.e2};
        foreach (es[k])
          if (longint'($signed(es[k].a)) * x + longint'($signed(es[k].b)) * y
              + longint'($signed(es[k].c)) < 0) ins = 0;
        zf = (longint'($signed(s.zorg)) + longint'($signed(s.dzdx)) * (x - int'(s.xmin))
              + longint'($signed(s.dzdy)) * (y - int'(s.ymin))) >>> 12;
        if (zf < 0) zf = 0;
        if (zf > 65535) zf = 65535;
        n++;
        if (ins || fin) begin
          f = '{gidx: s.gidx, x: xcoord_t'(x), y: ycoord_t'(y), z: depth_t'(zf),
                covered: ins, last: fin};
          exp_q.push_back(f);
        end
      end
    return n;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  bit stall_mode = 0;
  always @(posedge clk) out_ready <= stall_mode ? ($urandom_range(2) != 0) : 1'b1;

  // output checker
  int got = 0;
  frag_t e;
  always @(posedge clk) begin
    if (rst_n && out_valid && out_ready) begin
      got++;
      if (exp_q.size() == 0) check(0, "unexpected fragment");
      else begin
        e = exp_q.pop_front();
        check(out_frag == e, "fragment");
        if (out_frag != e && failures < 10)
          $display("  got %p exp %p", out_frag, e);
      end
    end
  end

  task automatic send(input setup_t s, input bit timed);
    int n, t0, t1;
    n = expect_frags(s);
    in_valid = 1; in_setup = s;
    do @(posedge clk); while (!in_ready);
    t0 = $time;
    #1 in_valid = 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    t1 = $time;
    if (timed) check((t1 - t0) / 10 == n + 1, "cycles per triangle");
    #1;
  endtask

  initial begin
    in_valid = 0; in_setup = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    send(make_setup(10, 10, 1000, 30, 12, 2000, 15, 40, 3000, 1), 1);
    send(make_setup(100, 100, 500, 80, 130, 500, 120, 125, 500, 2), 1);      // other winding
    send(make_setup(5, 5, 100, 5, 5, 100, 9, 9, 100, 3), 1);                  // degenerate
    send(make_setup(0, 0, 65000, 639, 0, 65535, 0, 3, 0, 4), 1);              // wide, depth clamps
    for (int i = 0; i < 60; i++) begin
      int x0, y0;
      x0 = $urandom_range(600);
      y0 = $urandom_range(440);
      send(make_setup(x0, y0, $urandom_range(65535),
                      x0 + $urandom_range(39), y0 + $urandom_range(39), $urandom_range(65535),
                      x0 + $urandom_range(39), y0 + $urandom_range(39), $urandom_range(65535),
                      i + 10), 0);
      if (i == 30) stall_mode = 1;
    end
    stall_mode = 0;
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "all fragments seen");
    check(got > 1000, "enough fragments");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
