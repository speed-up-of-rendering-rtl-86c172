// Self-checking testbench of sync_fifo, the queue used for IQ, PQ and TQ.
// Random pushes and pops against a queue model: checks data order, the
// occupancy count, in_ready exactly when not full, out_valid exactly when
// not empty, a full queue refusing a push, and one-cycle push-to-output
// latency. Runs one small instance and one at the PQ's length of 1024.
module tb_sync_fifo;
  localparam int W = 20;

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

  // small instance
  logic         a_iv, a_ir, a_ov, a_or;
  logic [W-1:0] a_id, a_od;
  logic [3:0]   a_cnt;
  sync_fifo #(.WIDTH(W), .DEPTH(8)) dut_a (
    .clk, .rst_n, .in_valid(a_iv), .in_ready(a_ir), .in_data(a_id),
    .out_valid(a_ov), .out_ready(a_or), .out_data(a_od), .count(a_cnt));

  // PQ-length instance
  logic         b_iv, b_ir, b_ov, b_or;
  logic [W-1:0] b_id, b_od;
  logic [10:0]  b_cnt;
  sync_fifo #(.WIDTH(W), .DEPTH(1024)) dut_b (
    .clk, .rst_n, .in_valid(b_iv), .in_ready(b_ir), .in_data(b_id),
    .out_valid(b_ov), .out_ready(b_or), .out_data(b_od), .count(b_cnt));

  logic [W-1:0] qa[$], qb[$];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_a(input int cycles, input int push_pct, input int pop_pct);
    for (int i = 0; i < cycles; i++) begin
      a_iv = ($urandom_range(99) < push_pct);
      a_id = W'($urandom);
      a_or = ($urandom_range(99) < pop_pct);
      #1;
      check(a_cnt == 4'(qa.size()), "count A");
      check(a_ir == (qa.size() < 8), "in_ready A");
      check(a_ov == (qa.size() > 0), "out_valid A");
      if (a_ov && qa.size() > 0) check(a_od == qa[0], "data A");
      @(posedge clk);
      if (a_ov && a_or) void'(qa.pop_front());
      if (a_iv && a_ir) qa.push_back(a_id);
      #1;
    end
  endtask

  initial begin
    a_iv = 0; a_or = 0; a_id = '0; b_iv = 0; b_or = 0; b_id = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(!a_ov && a_ir && a_cnt == 0, "empty after reset");
    // latency: push one beat, visible next cycle
    a_iv = 1; a_id = 20'h12345;
    @(posedge clk); #1;
    a_iv = 0;
    check(a_ov && a_od == 20'h12345, "one-cycle latency");
    a_or = 1; @(posedge clk); #1; a_or = 0;
    check(!a_ov, "empty after pop");
    // fill phase, drain phase, mixed phase
    run_a(400, 90, 10);
    run_a(400, 10, 90);
    run_a(4000, 50, 50);
    run_a(400, 80, 40);
    // full refusal: fill completely, then push without pop
    a_or = 0; a_iv = 1;
    while (qa.size() < 8) begin
      a_id = W'($urandom); #1;
      @(posedge clk); qa.push_back(a_id); #1;
    end
    a_id = 20'hFFFFF; #1;
    check(!a_ir && a_cnt == 8, "full");
    @(posedge clk); #1;
    a_iv = 0;
    check(a_cnt == 8, "push refused when full");
    while (qa.size() > 0) begin
      a_or = 1; #1;
      check(a_od == qa[0], "drain data");
      @(posedge clk); void'(qa.pop_front()); #1;
    end
    a_or = 0;
    // large instance: fill to 1024 and drain, order kept
    b_iv = 1; b_or = 0;
    for (int i = 0; i < 1024; i++) begin
      b_id = W'(i * 7 + 3); #1;
      check(b_ir, "B ready while filling");
      @(posedge clk); qb.push_back(b_id); #1;
    end
    b_iv = 0; #1;
    check(!b_ir && b_cnt == 1024, "B full at 1024");
    b_or = 1;
    for (int i = 0; i < 1024; i++) begin
      #1; check(b_ov && b_od == qb[i], "B order");
      @(posedge clk);
    end
    #1; check(!b_ov && b_cnt == 0, "B empty");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
