// Queue-configuration testbench: runs the pipeline with each of the five
// published queue configurations (256 bytes to 4 Kbytes overall:
// IQ/PQ/TQ = 32/64/2 up to 512/1024/32 entries) and both published
// polygon cycles (long: 150 + 10 lighting cycles; short: 30 + 10; 3 cycles
// per pixel in both), on a 64 x 48 screen.
//
// Each configuration renders the same synthetic two-object scene in both
// orders: "near over far" (the near object first, so most of the far object
// is hidden and its polygons are dropped before lighting) and "far over
// near" (everything is visible when it arrives and gets lit). The checks:
//   * every configuration finds the same numbers of visible and dropped
//     polygons for a given order;
//   * near-over-far takes fewer cycles than far-over-near in every
//     configuration (the cycles saved by deferred lighting are used);
//   * a larger queue configuration never takes more cycles than the 256-byte
//     one, and the 4K configuration takes fewer, with the long cycle;
//   * the short polygon cycle is never slower than the long one.
// The cycle counts are printed as a table. They come from a synthetic scene
// and do not reproduce any published figure.
module tb_queue_configs;
  import rp_pkg::*;
  localparam int W = 64, H = 48, N = W * H, AW = $clog2(N);
  localparam int NCFG = 5;
  localparam int IQD[NCFG] = '{32, 64, 128, 256, 512};
  localparam int PQD[NCFG] = '{64, 128, 256, 512, 1024};
  localparam int TQD[NCFG] = '{2, 4, 8, 16, 32};
  localparam int LCY[2]    = '{150, 30};

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

  // scene: object A near (z 1000..8000), object B far (z 30000..60000), same area
  tri_t obj_a[$], obj_b[$];
  bit   scene_ready = 0;

  function automatic tri_t mk(input int cx, input int cy, input int r, input int zlo,
                              input int zhi, input int g);
    tri_t t;
    int xs[3], ys[3];
    for (int i = 0; i < 3; i++) begin
      xs[i] = cx + $urandom_range(2 * r) - r;
      ys[i] = cy + $urandom_range(2 * r) - r;
      if (xs[i] < 0) xs[i] = 0;
      if (ys[i] < 0) ys[i] = 0;
    end
    t.gidx = gidx_t'(g);
    t.v0 = '{x: xcoord_t'(xs[0]), y: ycoord_t'(ys[0]), z: depth_t'($urandom_range(zhi, zlo))};
    t.v1 = '{x: xcoord_t'(xs[1]), y: ycoord_t'(ys[1]), z: depth_t'($urandom_range(zhi, zlo))};
    t.v2 = '{x: xcoord_t'(xs[2]), y: ycoord_t'(ys[2]), z: depth_t'($urandom_range(zhi, zlo))};
    return t;
  endfunction

  initial begin
    for (int i = 0; i < 80; i++) obj_a.push_back(mk(32 + $urandom_range(16) - 8, 24 + $urandom_range(12) - 6, 9, 1000, 8000, i));
    for (int i = 0; i < 160; i++) obj_b.push_back(mk(32 + $urandom_range(20) - 10, 24 + $urandom_range(14) - 7, 6, 30000, 60000, 1000 + i));
    scene_ready = 1;
  end

  // [polygon cycle][order][configuration]
  int  cycles  [2][2][NCFG];
  int  visible [2][2][NCFG];
  int  culled  [2][2][NCFG];
  bit  done    [2][2][NCFG];

  for (genvar l = 0; l < 2; l++) begin : g_light
  for (genvar o = 0; o < 2; o++) begin : g_order
    for (genvar c = 0; c < NCFG; c++) begin : g_cfg
      logic tri_valid, tri_ready, clear_busy, idle;
      tri_t tri_in;
      logic clear_start;
      logic [AW-1:0] fb_raddr;
      rgb_t fb_rdata;
      logic [$clog2(IQD[c]+1)-1:0] iq_count;
      logic [$clog2(PQD[c]+1)-1:0] pq_count;
      logic [$clog2(TQD[c]+1)-1:0] tq_count;
      logic iq_full, pq_full, tq_full, ev_culled, ev_visible, light_busy, shade_starved;
      logic ev_backface;

      render_pipeline_top #(.SCREEN_W(W), .SCREEN_H(H), .IQ_DEPTH(IQD[c]), .PQ_DEPTH(PQD[c]),
                            .TQ_DEPTH(TQD[c]), .LIGHT_CYCLES(LCY[l]), .FETCH_CYCLES(10)) dut (
        .clk, .rst_n, .tri_valid, .tri_ready, .tri_in, .cull_back(1'b0),
        .cm_we(1'b0), .cm_waddr('0), .cm_wdata('0), .tex_we(1'b0), .tex_waddr('0), .tex_wdata('0),
        .light_x(8'sd0), .light_y(8'sd0), .light_z(8'sd127), .ambient(8'd64),
        .clear_start, .clear_colour('0), .clear_busy, .fb_raddr, .fb_rdata, .idle,
        .iq_count, .pq_count, .tq_count, .iq_full, .pq_full, .tq_full,
        .ev_backface, .ev_culled, .ev_visible, .light_busy, .shade_starved);

      always @(posedge clk) begin
        if (rst_n && ev_culled) culled[l][o][c]++;
        if (rst_n && ev_visible) visible[l][o][c]++;
      end

      initial begin
        int t0;
        tri_t sc[$];
        tri_valid = 0; tri_in = '0; clear_start = 0; fb_raddr = '0;
        wait (scene_ready && rst_n);
        @(posedge clk); #1;
        clear_start = 1; @(posedge clk); #1; clear_start = 0;
        while (clear_busy) @(posedge clk);
        #1;
        if (o == 0) begin sc = obj_a; foreach (obj_b[i]) sc.push_back(obj_b[i]); end
        else        begin sc = obj_b; foreach (obj_a[i]) sc.push_back(obj_a[i]); end
        t0 = $time / 10;
        foreach (sc[i]) begin
          tri_valid = 1; tri_in = sc[i];
          @(posedge clk);
          while (!tri_ready) @(posedge clk);
          #1;
        end
        tri_valid = 0;
        @(posedge clk);
        while (!idle) @(posedge clk);
        cycles[l][o][c] = $time / 10 - t0;
        done[l][o][c] = 1;
      end
    end
  end
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit all;
    repeat (2) @(posedge clk);
    rst_n = 1;
    do begin
      @(posedge clk);
      all = 1;
      for (int l = 0; l < 2; l++) for (int o = 0; o < 2; o++) for (int c = 0; c < NCFG; c++)
        if (!done[l][o][c]) all = 0;
    end while (!all);
    $display("              long polygon cycle             short polygon cycle     (cycles)");
    $display("queue bytes   near-over-far  far-over-near   near-over-far  far-over-near");
    for (int c = 0; c < NCFG; c++)
      $display("%5d         %8d       %8d        %8d       %8d", 256 << c,
               cycles[0][0][c], cycles[0][1][c], cycles[1][0][c], cycles[1][1][c]);
    $display("near over far: %0d visible, %0d dropped; far over near: %0d visible, %0d dropped",
             visible[0][0][0], culled[0][0][0], visible[0][1][0], culled[0][1][0]);
    for (int l = 0; l < 2; l++)
      for (int o = 0; o < 2; o++)
        for (int c = 0; c < NCFG; c++) begin
          check(visible[l][o][c] == visible[0][o][0] && culled[l][o][c] == culled[0][o][0],
                "same polygon counts in every configuration");
          check(visible[l][o][c] + culled[l][o][c] == 240, "every polygon accounted for");
          check(cycles[l][o][c] <= cycles[l][o][0], "larger queues never slower than 256 bytes");
          if (l == 1) check(cycles[1][o][c] <= cycles[0][o][c], "short cycle never slower");
        end
    for (int l = 0; l < 2; l++)
      for (int c = 0; c < NCFG; c++)
        check(cycles[l][0][c] < cycles[l][1][c], "hidden polygons save cycles");
    check(culled[0][0][0] > culled[0][1][0] + 20, "near-over-far drops many more polygons");
    check(cycles[0][0][NCFG-1] < cycles[0][0][0], "4K queues faster than 256 bytes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
