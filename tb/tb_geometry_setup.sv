// Self-checking testbench of geometry_setup. Random triangles (both
// windings, degenerate ones, ones partly off screen) are set up and the
// result is checked two ways: field by field against 64-bit integer
// arithmetic written out here, and by meaning: each vertex lies on or
// inside all three edges, the depth plane gives each on-screen vertex's
// depth back to within one unit, and a degenerate triangle covers nothing.
// Also checks the one-cycle latency, the output hold under back-pressure,
// and back-face culling: with cull_back high a triangle of negative area is
// dropped with an ev_backface pulse, and every other triangle goes through.
module tb_geometry_setup;
  import rp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic   in_valid, in_ready, out_valid, out_ready, cull_back, ev_backface;
  tri_t   in_tri;
  setup_t out_setup;

  geometry_setup dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic longint sx(input logic [EW-1:0] v); return longint'($signed(v)); endfunction
  function automatic longint sp(input logic [PW-1:0] v); return longint'($signed(v)); endfunction

  function automatic longint edge_at(input edge_t e, input longint x, input longint y);
    return sx(e.a) * x + sx(e.b) * y + sx(e.c);
  endfunction

  task automatic check_setup(input tri_t t, input setup_t s);
    longint x[3], y[3], z[3], area, nx, ny, px, py, zo, xl, xh, yl, yh, zr;
    for (int i = 0; i < 3; i++) begin
      vertex_t v;
      v = (i == 0) ? t.v0 : (i == 1) ? t.v1 : t.v2;
      x[i] = v.x; y[i] = v.y; z[i] = v.z;
    end
    area = (x[1] - x[0]) * (y[2] - y[0]) - (x[2] - x[0]) * (y[1] - y[0]);
    xl = x[0]; xh = x[0]; yl = y[0]; yh = y[0];
    for (int i = 1; i < 3; i++) begin
      if (x[i] < xl) xl = x[i];
      if (x[i] > xh) xh = x[i];
      if (y[i] < yl) yl = y[i];
      if (y[i] > yh) yh = y[i];
    end
    if (xh > 639) xh = 639;
    if (yh > 479) yh = 479;
    if (xl > xh) xl = xh;
    if (yl > yh) yl = yh;
    check(s.gidx == t.gidx, "gidx");
    check(s.xmin == xl && s.xmax == xh && s.ymin == yl && s.ymax == yh, "bbox");
    if (area == 0) begin
      // covers nothing anywhere in the box
      check(edge_at(s.e0, xl, yl) < 0 && edge_at(s.e0, xh, yh) < 0, "degenerate rejects");
      return;
    end
    for (int i = 0; i < 3; i++) begin
      check(edge_at(s.e0, x[i], y[i]) >= 0 && edge_at(s.e1, x[i], y[i]) >= 0
            && edge_at(s.e2, x[i], y[i]) >= 0, "vertex inside");
    end
    // the vertex opposite each edge gives |area|
    check(edge_at(s.e0, x[2], y[2]) == (area < 0 ? -area : area), "edge scale");
    nx = ((z[1] - z[0]) * (y[2] - y[0]) - (z[2] - z[0]) * (y[1] - y[0])) * 4096;
    ny = ((x[1] - x[0]) * (z[2] - z[0]) - (x[2] - x[0]) * (z[1] - z[0])) * 4096;
    px = nx / area;
    py = ny / area;
    zo = z[0] * 4096 + px * (xl - x[0]) + py * (yl - y[0]);
    check(sp(s.dzdx) == px && sp(s.dzdy) == py && sp(s.zorg) == zo, "depth plane");
    for (int i = 0; i < 3; i++) begin
      if (x[i] <= 639 && y[i] <= 479) begin
        zr = (sp(s.zorg) + sp(s.dzdx) * (x[i] - xl) + sp(s.dzdy) * (y[i] - yl)) >>> 12;
        check(zr >= z[i] - 1 - (x[i] - xl + y[i] - yl) / 2048 && zr <= z[i] + 1,
              "plane through vertex");
      end
    end
  endtask

  function automatic tri_t rand_tri(input int kind);
    tri_t t;
    t.gidx = gidx_t'($urandom);
    t.v0 = '{x: xcoord_t'($urandom_range(639)), y: ycoord_t'($urandom_range(479)), z: depth_t'($urandom)};
    t.v1 = '{x: xcoord_t'($urandom_range(639)), y: ycoord_t'($urandom_range(479)), z: depth_t'($urandom)};
    t.v2 = '{x: xcoord_t'($urandom_range(639)), y: ycoord_t'($urandom_range(479)), z: depth_t'($urandom)};
    if (kind == 1) t.v2 = t.v1;                              // degenerate
    if (kind == 2) t.v1.x = xcoord_t'($urandom_range(1023, 640)); // off the right edge
    if (kind == 3) begin                                       // small triangle
      t.v1.x = (t.v0.x < 620) ? t.v0.x + 10'd9 : t.v0.x - 10'd9;
      t.v2.y = (t.v0.y < 460) ? t.v0.y + 9'd7 : t.v0.y - 9'd7;
      t.v1.y = t.v0.y; t.v2.x = t.v0.x;
    end
    return t;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    tri_t t;
    in_valid = 0; out_ready = 0; in_tri = '0; cull_back = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!out_valid && in_ready, "idle after reset");
    // latency and hold
    t = rand_tri(0);
    in_valid = 1; in_tri = t;
    @(posedge clk); #1;
    in_valid = 0; in_tri = rand_tri(0);
    check(out_valid, "result after one cycle");
    check(!in_ready, "busy while output held");
    repeat (3) @(posedge clk); #1;
    check(out_valid, "held under back-pressure");
    check_setup(t, out_setup);
    out_ready = 1; @(posedge clk); #1;
    check(!out_valid, "taken");
    // streaming
    for (int i = 0; i < 3000; i++) begin
      t = rand_tri(i % 4);
      in_valid = 1; in_tri = t; out_ready = 1;
      @(posedge clk); #1;
      in_valid = 0;
      check(out_valid, "stream valid");
      check(!ev_backface, "no culling while cull_back is low");
      check_setup(t, out_setup);
    end
    // back-face culling
    begin
      int n_back, n_front;
      longint area;
      n_back = 0; n_front = 0;
      cull_back = 1;
      for (int i = 0; i < 2000; i++) begin
        t = rand_tri(i % 4);
        area = (longint'(t.v1.x) - t.v0.x) * (longint'(t.v2.y) - t.v0.y)
             - (longint'(t.v2.x) - t.v0.x) * (longint'(t.v1.y) - t.v0.y);
        in_valid = 1; in_tri = t; out_ready = 1;
        @(posedge clk); #1;
        in_valid = 0;
        check(out_valid == (area >= 0), "back-facing triangle dropped, others kept");
        check(ev_backface == (area < 0), "back-face pulse");
        if (area < 0) n_back++;
        else begin
          n_front++;
          check_setup(t, out_setup);
        end
      end
      @(posedge clk); #1;
      check(!ev_backface && !out_valid, "pulse lasts one cycle");
      check(n_back > 100 && n_front > 100, "both windings seen");
      cull_back = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
