// Self-checking testbench of depth_compare on a 64 x 48 screen with a
// Z-buffer modelled here (one write port, read latency 1). After a clear,
// random polygons (lists of fragments, some uncovered, depths random) are
// fed in, and a reference Z-buffer here predicts the pixel queue stream
// (a row entry at each change of line, then passed pixels,
// end flag on each visible polygon's last passed pixel), the
// index queue stream (one global index per visible polygon) and the number
// of invisible polygons. Both queue sides get random back-pressure. Also
// checks the clear (every word far), back-to-back fragments on one pixel,
// and the timing of one cycle per fragment plus two per polygon plus one
// per row entry.
module tb_depth_compare;
  import rp_pkg::*;
  localparam int W = 64, H = 48, N = W * H, AW = $clog2(N);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic clear_start, clear_busy, in_valid, in_ready;
  frag_t in_frag;
  logic [AW-1:0] z_raddr, z_waddr;
  depth_t z_rdata, z_wdata;
  logic z_we;
  logic pq_valid, pq_ready, iq_valid, iq_ready, ev_culled, ev_visible, busy;
  pq_entry_t pq_data;
  gidx_t iq_data;

  depth_compare #(.SCREEN_W(W), .SCREEN_H(H)) dut (.*);

  // Z-buffer model
  depth_t zmem [N];
  always @(posedge clk) begin
    if (z_we) zmem[z_waddr] <= z_wdata;
    z_rdata <= zmem[z_raddr];
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  depth_t    ref_z [N];
  pq_entry_t exp_pq[$];
  gidx_t     exp_iq[$];
  int        exp_culled = 0, got_culled = 0, got_visible = 0;
  int        last_rows;  // row entries of the latest polygon
  bit        ref_row_v = 0;
  ycoord_t   ref_row_y;

  // reference coding of one passed pixel, announcing its line when needed
  task automatic ref_pixel(input xcoord_t x, input ycoord_t y, input bit last,
                           inout bit row_v, inout ycoord_t row_y);
    if (!row_v || row_y != y) begin
      exp_pq.push_back(pq_row(y));
      last_rows++;
      row_v = 1;
      row_y = y;
    end
    exp_pq.push_back(pq_pixel(x, last));
  endtask

  bit bp = 0;
  always @(posedge clk) begin
    pq_ready <= bp ? ($urandom_range(3) != 0) : 1'b1;
    iq_ready <= bp ? ($urandom_range(3) != 0) : 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n) begin
      if (pq_valid && pq_ready) begin
        if (exp_pq.size() == 0) check(0, "unexpected PQ entry");
        else check(pq_data == exp_pq.pop_front(), "PQ entry");
      end
      if (iq_valid && iq_ready) begin
        if (exp_iq.size() == 0) check(0, "unexpected IQ entry");
        else check(iq_data == exp_iq.pop_front(), "IQ entry");
      end
      if (pq_valid && iq_valid) check(0, "PQ and IQ offered together");
      if (ev_culled) got_culled++;
      if (ev_visible) got_visible++;
    end
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // send one polygon of n fragments; returns cycles from first accept to idle
  task automatic polygon(input int n, input gidx_t g, input int zlo, input int zhi,
                         output int cycles, input int at = -1, input int same = 0);
    frag_t fr[$];
    bit used [N];
    int idx, nvis = 0, t0;
    xcoord_t px;
    ycoord_t py;
    bit have = 0;
    last_rows = 0;
    for (int i = 0; i < n; i++) begin
      frag_t f;
      if (same != 0) idx = at;
      else if (at >= 0) idx = at + i;
      else do idx = $urandom_range(N - 1); while (used[idx]);
      used[idx] = 1;
      f.gidx = g; f.x = xcoord_t'(idx % W); f.y = ycoord_t'(idx / W);
      f.z = depth_t'($urandom_range(zhi, zlo));
      if (same != 0) f.z = depth_t'(zlo + same * i);
      f.covered = ($urandom_range(4) != 0) || (i == 0) || (at >= 0);
      f.last = (i == n - 1);
      fr.push_back(f);
    end
    // reference
    foreach (fr[i]) begin
      int a = int'(fr[i].y) * W + int'(fr[i].x);
      if (fr[i].covered && fr[i].z < ref_z[a]) begin
        ref_z[a] = fr[i].z;
        if (!have) exp_iq.push_back(g);
        else ref_pixel(px, py, 1'b0, ref_row_v, ref_row_y);
        px = fr[i].x;
        py = fr[i].y;
        have = 1;
      end
    end
    if (have) ref_pixel(px, py, 1'b1, ref_row_v, ref_row_y);
    else exp_culled++;
    // drive
    foreach (fr[i]) begin
      in_valid = 1; in_frag = fr[i];
      @(posedge clk);
      while (!in_ready) @(posedge clk);
      if (i == 0) t0 = $time;
      #1;
    end
    in_valid = 0;
    @(posedge clk);
    while (busy) @(posedge clk);
    cycles = ($time - t0) / 10;
    #1;
  endtask

  initial begin
    int cyc;
    clear_start = 0; in_valid = 0; in_frag = '0;
    for (int i = 0; i < N; i++) begin zmem[i] = depth_t'($urandom); ref_z[i] = Z_FAR; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    clear_start = 1; @(posedge clk); #1; clear_start = 0;
    check(clear_busy, "clear busy");
    while (clear_busy) @(posedge clk);
    #1;
    begin
      int bad = 0;
      for (int i = 0; i < N; i++) if (zmem[i] != Z_FAR) bad++;
      check(bad == 0, "Z-buffer cleared");
    end
    // timing: one polygon, no back-pressure, all new pixels
    polygon(10, 16'h0101, 100, 200, cyc);
    check(last_rows > 1, "several lines in the timing polygon");
    check(cyc == 10 + 2 + last_rows, "one cycle per fragment, two per polygon, one per row entry");
    // one line: a single row entry, none for a following polygon on that line
    polygon(12, 16'h0102, 100, 200, cyc, 20 * W + 3);
    check(last_rows == 1 && cyc == 12 + 2 + 1, "one row entry for a polygon on one line");
    polygon(12, 16'h0103, 100, 200, cyc, 20 * W + 30);
    check(last_rows == 0 && cyc == 12 + 2, "no row entry when the line carries over");
    // back-to-back fragments on one pixel: the second compare must see the
    // first one's write (nearer every time: all pass; farther: only the first)
    polygon(6, 16'h0301, 5000, 5000, cyc, 5 * W + 9, -100);
    polygon(6, 16'h0302, 3000, 3000, cyc, 6 * W + 9, 100);
    // equal depth does not pass: the same flat polygon drawn twice is hidden the second time
    begin
      int c0;
      c0 = exp_culled;
      polygon(5, 16'h0202, 700, 700, cyc, 3 * W + 7);
      polygon(5, 16'h0203, 700, 700, cyc, 3 * W + 7);
      check(exp_culled == c0 + 1, "redrawn polygon at equal depth is invisible");
    end
    // many polygons, near first then mostly hidden far ones
    for (int p = 0; p < 40; p++) polygon($urandom_range(60, 1), gidx_t'(p), 1000, 30000, cyc);
    bp = 1;
    for (int p = 0; p < 200; p++) polygon($urandom_range(30, 1), gidx_t'(p + 100), 20000, 65000, cyc);
    for (int p = 0; p < 100; p++) polygon($urandom_range(40, 1), gidx_t'(p + 400), 0, 65534, cyc);
    bp = 0;
    repeat (5) @(posedge clk);
    check(exp_pq.size() == 0 && exp_iq.size() == 0, "all queue entries seen");
    check(got_culled == exp_culled, "invisible polygon count");
    check(exp_culled > 5, "some polygons invisible");
    check(got_visible == 347 - exp_culled, "visible polygon count");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
