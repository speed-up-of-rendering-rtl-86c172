// Simple dual-port synchronous RAM: one write port, one read port.
//
// Used for every memory of the pipeline: the Z-buffer (one depth word per
// pixel), the frame buffer (one RGB word per pixel), the texture buffer and
// the colour-related data memory indexed by the global polygon index.
// A write takes effect at the rising edge when we is high. The read port
// registers raddr's word at every rising edge, so rdata is valid one cycle
// after the address (read latency 1). A read of the address being written in
// the same edge returns the old word (read-before-write). The contents are
// not reset; the units that read a memory clear it first or are given
// data by the host.
//
// The memories and their roles follow the published block diagram; their
// word widths, the single-cycle read latency and the port arrangement are
// this design's own choices.
module sdp_ram #(
  parameter int unsigned DW    = 16,
  parameter int unsigned DEPTH = 640 * 480,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
