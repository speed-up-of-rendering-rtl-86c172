// Full-size testbench of render_pipeline_top: every parameter at its
// default (640 x 480 screen, IQ 512, PQ 1024, TQ 32 entries, 150 + 10
// lighting cycles per polygon, 3 cycles per pixel).
//
// Loads the texture and colour memories, clears the whole frame, renders a
// scene of near, far and hidden triangles spread over the screen, with
// back-face culling on for every second one, reads the full 640 x 480 image
// back and compares it with a reference renderer here, together with the
// numbers of back-facing, visible and invisible polygons. Queue events
// are counted and reported.
module tb_render_full;
  import rp_pkg::*;
  localparam int W = 640, H = 480, N = W * H, AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  logic tri_valid, tri_ready, cm_we, tex_we, clear_start, clear_busy, idle;
  tri_t tri_in;
  gidx_t cm_waddr;
  colour_rec_t cm_wdata;
  logic [11:0] tex_waddr;
  rgb_t tex_wdata, clear_colour, fb_rdata;
  logic signed [7:0] light_x, light_y, light_z;
  logic [7:0] ambient;
  logic [AW-1:0] fb_raddr;
  logic [9:0]  iq_count;
  logic [10:0] pq_count;
  logic [5:0]  tq_count;
  logic iq_full, pq_full, tq_full, ev_culled, ev_visible, light_busy, shade_starved;
  logic cull_back, ev_backface;

  render_pipeline_top dut (.*);

  // ---------------------------------------------------------------- reference
  rgb_t        tex_m [4096];
  colour_rec_t cm_m  [int];
  depth_t      zref  [N];
  rgb_t        fbref [N];
  int          ref_visible = 0, ref_culled = 0, ref_back = 0;

  function automatic rgb_t lit(input colour_rec_t r);
    int d, i;
    rgb_t o;
    d = int'(r.nx) * int'(light_x) + int'(r.ny) * int'(light_y) + int'(r.nz) * int'(light_z);
    i = int'(ambient) + ((d > 0) ? d / 64 : 0);
    if (i > 255) i = 255;
    o.r = 8'((int'(r.base.r) * (i + 1)) / 256);
    o.g = 8'((int'(r.base.g) * (i + 1)) / 256);
    o.b = 8'((int'(r.base.b) * (i + 1)) / 256);
    return o;
  endfunction

  function automatic logic [7:0] m8(input logic [7:0] a, input logic [7:0] b);
    return 8'((int'(a) * (int'(b) + 1)) >> 8);
  endfunction

  task automatic ref_render(input tri_t t, input bit cull);
    longint x[3], y[3], z[3], area, px, py, zo, xl, xh, yl, yh, e, zf;
    longint ea[3], eb[3], ec[3];
    bit vis, ins;
    rgb_t c, tx;
    x[0] = t.v0.x; y[0] = t.v0.y; z[0] = t.v0.z;
    x[1] = t.v1.x; y[1] = t.v1.y; z[1] = t.v1.z;
    x[2] = t.v2.x; y[2] = t.v2.y; z[2] = t.v2.z;
    area = (x[1] - x[0]) * (y[2] - y[0]) - (x[2] - x[0]) * (y[1] - y[0]);
    if (cull && area < 0) begin
      ref_back++;
      return;
    end
    for (int i = 0; i < 3; i++) begin
      int j;
      j = (i + 1) % 3;
      ea[i] = y[i] - y[j]; eb[i] = x[j] - x[i]; ec[i] = x[i] * y[j] - x[j] * y[i];
      if (area < 0) begin ea[i] = -ea[i]; eb[i] = -eb[i]; ec[i] = -ec[i]; end
    end
    xl = x[0]; xh = x[0]; yl = y[0]; yh = y[0];
    for (int i = 1; i < 3; i++) begin
      if (x[i] < xl) xl = x[i];
      if (x[i] > xh) xh = x[i];
      if (y[i] < yl) yl = y[i];
      if (y[i] > yh) yh = y[i];
    end
    if (xh > W - 1) xh = W - 1;
    if (yh > H - 1) yh = H - 1;
    if (xl > xh) xl = xh;
    if (yl > yh) yl = yh;
    vis = 0;
    if (area != 0) begin
      px = ((z[1] - z[0]) * (y[2] - y[0]) - (z[2] - z[0]) * (y[1] - y[0])) * 4096 / area;
      py = ((x[1] - x[0]) * (z[2] - z[0]) - (x[2] - x[0]) * (z[1] - z[0])) * 4096 / area;
      zo = z[0] * 4096 + px * (xl - x[0]) + py * (yl - y[0]);
      c = lit(cm_m.exists(int'(t.gidx)) ? cm_m[int'(t.gidx)] : '0);
      for (longint yy = yl; yy <= yh; yy++)
        for (longint xx = xl; xx <= xh; xx++) begin
          ins = 1;
          for (int k = 0; k < 3; k++) begin
            e = ea[k] * xx + eb[k] * yy + ec[k];
            if (e < 0) ins = 0;
          end
          if (ins) begin
            zf = (zo + px * (xx - xl) + py * (yy - yl)) >>> 12;
            if (zf < 0) zf = 0;
            if (zf > 65535) zf = 65535;
            if (zf < longint'(zref[yy * W + xx])) begin
              zref[yy * W + xx] = depth_t'(zf);
              tx = tex_m[{yy[5:0], xx[5:0]}];
              fbref[yy * W + xx] = '{r: m8(c.r, tx.r), g: m8(c.g, tx.g), b: m8(c.b, tx.b)};
              vis = 1;
            end
          end
        end
    end
    if (vis) ref_visible++; else ref_culled++;
  endtask

  // ---------------------------------------------------------- mechanism counts
  int n_iq_full = 0, n_pq_full = 0, n_tq_full = 0, n_culled = 0, n_visible = 0, n_back = 0;
  int n_starved = 0, n_light_idle = 0;
  always @(posedge clk) begin
    if (rst_n && !clear_busy) begin
      if (iq_full) n_iq_full++;
      if (pq_full) n_pq_full++;
      if (tq_full) n_tq_full++;
      if (ev_culled) n_culled++;
      if (ev_backface) n_back++;
      if (ev_visible) n_visible++;
      if (shade_starved) n_starved++;
      if (!light_busy && !idle && iq_count == 0) n_light_idle++;
    end
  end

  initial begin
    repeat (6000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  tri_t scene[$];
  // back-face culling is on for every second triangle
  function automatic bit scene_cull(input int i);
    return i % 2 == 1;
  endfunction

  function automatic tri_t mk(input int cx, input int cy, input int r, input int zlo,
                              input int zhi, input int g);
    tri_t t;
    int xs[3], ys[3];
    for (int i = 0; i < 3; i++) begin
      xs[i] = cx + $urandom_range(2 * r) - r;
      ys[i] = cy + $urandom_range(2 * r) - r;
      if (xs[i] < 0) xs[i] = 0;
      if (ys[i] < 0) ys[i] = 0;
      if (xs[i] > W + 5) xs[i] = W + 5;
      if (ys[i] > H + 5) ys[i] = H + 5;
    end
    t.gidx = gidx_t'(g);
    t.v0 = '{x: xcoord_t'(xs[0]), y: ycoord_t'(ys[0]), z: depth_t'($urandom_range(zhi, zlo))};
    t.v1 = '{x: xcoord_t'(xs[1]), y: ycoord_t'(ys[1]), z: depth_t'($urandom_range(zhi, zlo))};
    t.v2 = '{x: xcoord_t'(xs[2]), y: ycoord_t'(ys[2]), z: depth_t'($urandom_range(zhi, zlo))};
    return t;
  endfunction

  initial begin
    int t_start, t_end, bad, g;
    tri_valid = 0; tri_in = '0; cull_back = 0; cm_we = 0; cm_waddr = '0; cm_wdata = '0;
    tex_we = 0; tex_waddr = '0; tex_wdata = '0; clear_start = 0; fb_raddr = '0;
    clear_colour = '{r: 8'h20, g: 8'h40, b: 8'h60};
    light_x = 8'sd40; light_y = 8'sd60; light_z = 8'sd90; ambient = 8'd50;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // texture and colour memory
    for (int i = 0; i < 4096; i++) begin
      tex_m[i] = rgb_t'($urandom) | 24'h808080;
      tex_we = 1; tex_waddr = 12'(i); tex_wdata = tex_m[i];
      @(posedge clk); #1;
    end
    tex_we = 0;
    for (int i = 0; i < 600; i++) begin
      colour_rec_t r;
      g = i * 97 + 5;
      r.base = rgb_t'($urandom);
      r.nx = 8'($urandom_range(254)) - 8'd127;
      r.ny = 8'($urandom_range(254)) - 8'd127;
      r.nz = 8'($urandom_range(127));
      cm_m[g] = r;
      cm_we = 1; cm_waddr = gidx_t'(g); cm_wdata = r;
      @(posedge clk); #1;
    end
    cm_we = 0;
    // clear
    clear_start = 1; @(posedge clk); #1; clear_start = 0;
    while (clear_busy) @(posedge clk);
    #1;
    for (int i = 0; i < N; i++) begin zref[i] = Z_FAR; fbref[i] = clear_colour; end
    // scene
    g = 0;
    for (int i = 0; i < 20; i++) begin
      scene.push_back(mk($urandom_range(W - 1), $urandom_range(H - 1), 60, 20000, 30000, g * 97 + 5));
      g++;
    end
    for (int i = 0; i < 200; i++) begin
      scene.push_back(mk($urandom_range(W - 1), $urandom_range(H - 1), 6, 1000, 15000, g * 97 + 5));
      g++;
    end
    for (int i = 0; i < 150; i++) begin
      scene.push_back(mk($urandom_range(W - 1), $urandom_range(H - 1), 20, 40000, 60000, g * 97 + 5));
      g++;
    end
    foreach (scene[i]) ref_render(scene[i], scene_cull(i));
    t_start = $time / 10;
    foreach (scene[i]) begin
      tri_valid = 1; tri_in = scene[i]; cull_back = scene_cull(i);
      @(posedge clk);
      while (!tri_ready) @(posedge clk);
      #1;
    end
    tri_valid = 0;
    @(posedge clk);
    while (!idle) @(posedge clk);
    t_end = $time / 10;
    #1;
    // read back the frame
    bad = 0;
    for (int i = 0; i < N; i++) begin
      fb_raddr = AW'(i);
      @(posedge clk); #1;
      if (fb_rdata != fbref[i]) begin
        bad++;
        if (bad < 5) $display("  pixel %0d,%0d: got %h expected %h", i % W, i / W, fb_rdata, fbref[i]);
      end
    end
    check(bad == 0, "final image");
    check(n_visible == ref_visible, "visible polygon count");
    check(n_culled == ref_culled, "invisible polygon count");
    check(n_back == ref_back, "back-facing polygon count");
    check(n_back > 0, "back-facing polygon dropped");
    check(n_culled > 0, "invisible polygon dropped");
    $display("render: %0d polygons, %0d back-facing dropped, %0d visible, %0d invisible dropped, %0d cycles",
             scene.size(), n_back, n_visible, n_culled, t_end - t_start);
    $display("cycles with IQ full %0d, PQ full %0d, TQ full %0d, shading starved %0d, lighting idle %0d",
             n_iq_full, n_pq_full, n_tq_full, n_starved, n_light_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
