// Self-checking testbench of sdp_ram, the memory used for the Z-buffer,
// frame buffer, texture buffer and colour-related data memory. Random writes
// and reads against an array model: checks one-cycle read latency,
// read-before-write on a same-address collision, and that unwritten words
// are untouched by writes elsewhere. Uses a full 640 x 480 depth instance.
module tb_sdp_ram;
  localparam int DW = 24, DEPTH = 640 * 480, AW = 19;

  logic clk = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;

  sdp_ram #(.DW(DW), .DEPTH(DEPTH)) dut (.clk, .we, .waddr, .wdata, .raddr, .rdata);

  logic [DW-1:0] model [int];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
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
    int a;
    we = 0; waddr = '0; raddr = '0; wdata = '0;
    // write a set of addresses including both ends
    for (int i = 0; i < 2000; i++) begin
      a = (i == 0) ? 0 : (i == 1) ? DEPTH - 1 : $urandom_range(DEPTH - 1);
      we = 1; waddr = AW'(a); wdata = DW'($urandom);
      @(posedge clk); #1;
      model[a] = wdata;
    end
    we = 0;
    // read back: data appears one cycle after the address
    foreach (model[k]) begin
      raddr = AW'(k);
      @(posedge clk); #1;
      check(rdata == model[k], "read back");
    end
    // collision: read and write the same address in one edge
    a = 12345;
    raddr = AW'(a); we = 1; waddr = AW'(a); wdata = 24'hABCDEF;
    if (!model.exists(a)) begin
      // give it a known old value first
      we = 1; wdata = 24'h111111; @(posedge clk); #1; model[a] = 24'h111111;
      wdata = 24'hABCDEF;
    end
    @(posedge clk); #1;
    we = 0;
    check(rdata == model[a], "read-before-write old value");
    model[a] = 24'hABCDEF;
    @(posedge clk); #1;
    check(rdata == 24'hABCDEF, "new value next cycle");
    // read port holds data when address is held
    @(posedge clk); #1;
    check(rdata == 24'hABCDEF, "stable read");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
