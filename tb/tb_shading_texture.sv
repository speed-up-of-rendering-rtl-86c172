// Self-checking testbench of shading_texture on a 64 x 48 screen, with the
// texture buffer (read latency 1) and the frame buffer modelled here.
// Lighted polygon records and their pixels are offered from two queues
// (with random gaps on some polygons); every frame-buffer write is checked
// against address y*64+x and colour (c * (texel+1)) >> 8 computed here.
// Pixels are coded as row entries (line change) and pixel entries. Checks
// the published rate of three cycles per pixel plus one per row entry, with
// no other gap between polygons when both queues are ready, that a
// polygon's record is taken only
// after the previous polygon's last pixel, and the frame-buffer clear.
module tb_shading_texture;
  import rp_pkg::*;
  localparam int W = 64, H = 48, N = W * H, AW = $clog2(N);

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

  logic clear_start, clear_busy, tq_valid, tq_ready, pq_valid, pq_ready;
  rgb_t clear_colour, tex_rdata, fb_wdata;
  tq_entry_t tq_data;
  pq_entry_t pq_data;
  logic [11:0] tex_raddr;
  logic fb_we, starved, busy;
  logic [AW-1:0] fb_waddr;

  shading_texture #(.SCREEN_W(W), .SCREEN_H(H)) dut (.*);

  rgb_t tex [4096];
  rgb_t fb [N];
  always @(posedge clk) begin
    tex_rdata <= tex[tex_raddr];
    if (fb_we) fb[fb_waddr] <= fb_wdata;
  end

  // queue sources
  tq_entry_t tq_src[$];
  pq_entry_t pq_src[$];
  bit gaps = 0;
  bit tq_gate = 1, pq_gate = 1;
  // expected writes
  typedef struct { int addr; rgb_t c; int rows; } wr_t;
  wr_t exp_w[$];
  int write_t[$];
  int pix_done = 0, tq_taken = 0;
  int poly_pixels[$];
  int need;
  int write_rows[$];
  ycoord_t cur_y;
  bit cur_v = 0;

  // Sources change only 1 time unit after a clock edge, so the unit always
  // samples stable inputs.
  initial begin
    tq_valid = 0; tq_data = '0; pq_valid = 0; pq_data = '0;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (tq_valid && tq_ready) begin
        // a record is taken only once all pixels of earlier polygons are done
        need = 0;
        for (int i = 0; i < tq_taken; i++) need += poly_pixels[i];
        check(pix_done >= need - 1, "record not taken early");
        void'(tq_src.pop_front());
        tq_taken++;
      end
      if (pq_valid && pq_ready) void'(pq_src.pop_front());
      if (fb_we && !clear_busy) begin
        wr_t e;
        if (exp_w.size() == 0) check(0, "unexpected write");
        else begin
          e = exp_w.pop_front();
          check(int'(fb_waddr) == e.addr && fb_wdata == e.c, "frame-buffer write");
        end
        write_t.push_back($time / 10);
        write_rows.push_back(e.rows);
        pix_done++;
      end
    end
    #1;
    tq_gate  = !gaps || ($urandom_range(3) == 0);
    pq_gate  = !gaps || ($urandom_range(1) == 0);
    tq_valid = tq_gate && (tq_src.size() > 0);
    tq_data  = (tq_src.size() > 0) ? tq_src[0] : '0;
    pq_valid = pq_gate && (pq_src.size() > 0);
    pq_data  = (pq_src.size() > 0) ? pq_src[0] : '0;
  end

  function automatic logic [7:0] m8(input logic [7:0] a, input logic [7:0] b);
    return 8'((int'(a) * (int'(b) + 1)) >> 8);
  endfunction

  task automatic add_polygon(input int npix);
    tq_entry_t t;
    t.gidx = gidx_t'($urandom);
    t.colour = rgb_t'($urandom);
    tq_src.push_back(t);
    poly_pixels.push_back(npix);
    for (int i = 0; i < npix; i++) begin
      xcoord_t x;
      ycoord_t y;
      rgb_t tx;
      wr_t e;
      x = xcoord_t'($urandom_range(W - 1));
      if (!cur_v || $urandom_range(1) == 0) y = ycoord_t'($urandom_range(H - 1));
      else y = cur_y;
      e.rows = 0;
      // a row entry marks each change of line, also between polygons
      if (!cur_v || y != cur_y) begin
        pq_src.push_back(pq_row(y));
        e.rows = 1;
        cur_y = y;
        cur_v = 1;
      end
      pq_src.push_back(pq_pixel(x, i == npix - 1));
      tx = tex[{y[5:0], x[5:0]}];
      e.addr = int'(y) * W + int'(x);
      e.c = '{r: m8(t.colour.r, tx.r), g: m8(t.colour.g, tx.g), b: m8(t.colour.b, tx.b)};
      exp_w.push_back(e);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total, starved_seen;
    clear_start = 0; clear_colour = '{r: 8'h12, g: 8'h34, b: 8'h56};
    for (int i = 0; i < 4096; i++) tex[i] = rgb_t'($urandom);
    for (int i = 0; i < N; i++) fb[i] = rgb_t'($urandom);
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    // clear
    clear_start = 1; @(posedge clk); #1; clear_start = 0;
    while (clear_busy) @(posedge clk);
    @(posedge clk); #1;
    begin
      int bad;
      bad = 0;
      for (int i = 0; i < N; i++) if (fb[i] != clear_colour) bad++;
      check(bad == 0, "frame buffer cleared");
    end
    // back-to-back polygons, both queues always ready: 3 cycles per pixel
    total = 0;
    for (int p = 0; p < 10; p++) begin
      int n;
      n = $urandom_range(12, 1);
      total += n;
      add_polygon(n);
    end
    while (exp_w.size() > 0) @(posedge clk);
    @(posedge clk); #1;
    for (int i = 1; i < write_t.size(); i++)
      check(write_t[i] - write_t[i-1] == 3 + write_rows[i], "three cycles per pixel, one per row entry");
    check(write_rows.sum() < total, "some pixels share a line");
    check(write_t.size() == total, "all pixels written");
    // random gaps on both queues
    gaps = 1;
    starved_seen = 0;
    for (int p = 0; p < 60; p++) add_polygon($urandom_range(20, 1));
    while (exp_w.size() > 0) begin
      @(posedge clk);
      if (starved) starved_seen++;
    end
    check(starved_seen > 0, "waited for pixels at least once");
    repeat (5) @(posedge clk); #1;
    check(!busy && tq_src.size() == 0 && pq_src.size() == 0, "idle and drained");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
