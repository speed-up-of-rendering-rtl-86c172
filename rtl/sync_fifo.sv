// Synchronous first-word-fall-through FIFO: the building block of the three
// queues of the pipeline (IQ, PQ and TQ).
//
// Storage is a DEPTH-entry array with read and write pointers and an
// occupancy counter. The head entry is visible on out_data whenever
// out_valid is high; a beat moves when valid and ready are both high on a
// rising clock edge (valid/ready handshake on both sides). A push and a pop
// may happen in the same cycle; in_ready is low only while the queue is full.
// Latency from push to out_valid is one cycle.
//
// The queue depths used by the pipeline follow the published queue lengths;
// the handshake, the first-word-fall-through behaviour and the occupancy
// output are this design's own choices. Reset empties the queue.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 512,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1,
  localparam int unsigned CW   = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  // write side
  input  logic             in_valid,
  output logic             in_ready,
  input  logic [WIDTH-1:0] in_data,
  // read side
  output logic             out_valid,
  input  logic             out_ready,
  output logic [WIDTH-1:0] out_data,
  // status
  output logic [CW-1:0]    count
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wptr, rptr;
  logic             push, pop;

  assign in_ready  = (count != CW'(DEPTH));
  assign out_valid = (count != '0);
  assign out_data  = mem[rptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (push) mem[wptr] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr  <= '0;
      rptr  <= '0;
      count <= '0;
    end else begin
      if (push) wptr <= next_ptr(wptr);
      if (pop)  rptr <= next_ptr(rptr);
      case ({push, pop})
        2'b10:   count <= count + CW'(1);
        2'b01:   count <= count - CW'(1);
        default: count <= count;
      endcase
    end
  end

  // Handshake rule: the occupancy never exceeds the depth.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) count <= CW'(DEPTH))
    else $error("sync_fifo: occupancy %0d above depth %0d", count, DEPTH);

endmodule
