// Self-checking testbench of lighting_setup with the colour-related data
// memory modelled here (read latency 1). Random colour records and light
// settings; each lighted record on the TQ side is compared with the
// Lambertian formula evaluated here in plain integers. Checks the
// published timing of 150 + 10 cycles per polygon (pop to push, and pop to
// pop when the TQ is ready), a smaller setting of 30 + 10 cycles, and that
// a full TQ holds the record until it is taken.
module tb_lighting_setup;
  import rp_pkg::*;

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

  logic signed [7:0] light_x, light_y, light_z;
  logic [7:0] ambient;

  // colour memory model shared by both instances
  colour_rec_t cmem [int];
  function automatic colour_rec_t rec_of(input gidx_t g);
    if (cmem.exists(int'(g))) return cmem[int'(g)];
    return '0;
  endfunction

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

  // instance A: published timing 150 + 10
  logic a_iqv, a_iqr, a_tqv, a_tqr, a_busy;
  gidx_t a_iqd, a_cma;
  colour_rec_t a_cmd;
  tq_entry_t a_tqd;
  lighting_setup dut_a (.clk, .rst_n, .iq_valid(a_iqv), .iq_ready(a_iqr), .iq_data(a_iqd),
    .cm_raddr(a_cma), .cm_rdata(a_cmd), .light_x, .light_y, .light_z, .ambient,
    .tq_valid(a_tqv), .tq_ready(a_tqr), .tq_data(a_tqd), .busy(a_busy));
  always @(posedge clk) a_cmd <= rec_of(a_cma);

  // instance B: short polygon cycle 30 + 10
  logic b_iqv, b_iqr, b_tqv, b_tqr, b_busy;
  gidx_t b_iqd, b_cma;
  colour_rec_t b_cmd;
  tq_entry_t b_tqd;
  lighting_setup #(.LIGHT_CYCLES(30)) dut_b (.clk, .rst_n, .iq_valid(b_iqv), .iq_ready(b_iqr),
    .iq_data(b_iqd), .cm_raddr(b_cma), .cm_rdata(b_cmd), .light_x, .light_y, .light_z,
    .ambient, .tq_valid(b_tqv), .tq_ready(b_tqr), .tq_data(b_tqd), .busy(b_busy));
  always @(posedge clk) b_cmd <= rec_of(b_cma);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // IQ sources: always offer the next index
  gidx_t a_list[$], b_list[$];
  int a_pop_t[$], a_push_t[$], b_pop_t[$], b_push_t[$];
  int a_idx = 0, b_idx = 0;
  int a_hold = 0;
  assign a_iqd = (a_idx < a_list.size()) ? a_list[a_idx] : '0;
  assign a_iqv = (a_idx < a_list.size());
  assign b_iqd = (b_idx < b_list.size()) ? b_list[b_idx] : '0;
  assign b_iqv = (b_idx < b_list.size());

  always @(posedge clk) begin
    if (rst_n) begin
      if (a_iqv && a_iqr) begin a_pop_t.push_back($time / 10); a_idx <= a_idx + 1; end
      if (b_iqv && b_iqr) begin b_pop_t.push_back($time / 10); b_idx <= b_idx + 1; end
      if (a_tqv && a_tqr) begin
        check(a_tqd.gidx == a_list[a_push_t.size()], "A gidx");
        check(a_tqd.colour == lit(rec_of(a_tqd.gidx)), "A colour");
        a_push_t.push_back($time / 10);
      end
      if (b_tqv && b_tqr) begin
        check(b_tqd.gidx == b_list[b_push_t.size()], "B gidx");
        check(b_tqd.colour == lit(rec_of(b_tqd.gidx)), "B colour");
        b_push_t.push_back($time / 10);
      end
      if (a_tqv && !a_tqr) a_hold++;
    end
  end

  // TQ side of A: refuses for a while around polygon 3
  always @(posedge clk) a_tqr <= !(a_push_t.size() == 3 && a_hold < 25);
  assign b_tqr = 1'b1;

  initial begin
    light_x = 8'sd50; light_y = -8'sd30; light_z = 8'sd100; ambient = 8'd40;
    for (int i = 0; i < 12; i++) begin
      colour_rec_t r;
      gidx_t g;
      g = gidx_t'($urandom);
      r.base = rgb_t'($urandom);
      r.nx = 8'($urandom_range(254)) - 8'd127;
      r.ny = 8'($urandom_range(254)) - 8'd127;
      r.nz = 8'($urandom_range(254)) - 8'd127;
      cmem[int'(g)] = r;
      a_list.push_back(g);
      b_list.push_back(g);
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (a_push_t.size() < 12 || b_push_t.size() < 12) @(posedge clk);
    for (int i = 0; i < 12; i++) begin
      int lat_a;
      lat_a = (i == 3) ? 160 + 25 - 1 : 160 - 1;
      check(a_push_t[i] - a_pop_t[i] == lat_a, "A pop-to-push cycles");
      if (a_push_t[i] - a_pop_t[i] != lat_a) $display("  polygon %0d: %0d cycles", i, a_push_t[i] - a_pop_t[i]);
      check(b_push_t[i] - b_pop_t[i] == 39, "B pop-to-push cycles");
      if (i > 0 && i != 4) check(a_pop_t[i] - a_pop_t[i-1] == 160, "A 160 cycles per polygon");
      if (i > 0) check(b_pop_t[i] - b_pop_t[i-1] == 40, "B 40 cycles per polygon");
    end
    check(a_hold == 25, "A held while TQ full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
