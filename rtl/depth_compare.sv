// Depth compare: the early Z test that decides which polygons reach the
// deferred lighting stage.
//
// Each fragment's depth is compared with the Z-buffer word at its pixel; a
// covered fragment passes when z < stored depth and then writes its depth
// back. The coordinates of passed pixels go to the pixel queue (PQ). When
// the first pixel of a polygon passes, the polygon's global index goes to
// the index queue (IQ), so a polygon enters the IQ at most once and only if
// it is visible. A polygon none of whose pixels passes is invisible: nothing
// of it is queued and ev_culled pulses for one cycle.
//
// PQ entries are 2 bytes of coded coordinates (see pq_entry_t): a row entry
// announces a line, a pixel entry gives x on the announced line. A row
// entry is sent before the first passed pixel after reset and whenever a
// passed pixel's line differs from the last one announced, also across
// polygons (the stream is in order); a row entry takes one extra cycle.
// Pixel entries carry an end-of-polygon flag. Because only the end of a
// polygon tells which passed pixel was its last, one passed pixel is held
// back in a register and written when the next one passes, or with
// last = 1 when the polygon ends. The global index is sent at the first
// passed pixel, not at the polygon's end, so that shading can drain the PQ
// while a large polygon is still being compared.
//
// clear_start (one-cycle pulse) requests a Z-buffer clear: once idle the
// unit writes Z_FAR to every pixel, one per cycle, with clear_busy high.
//
// The unit is a two-stage pipeline. In the first stage the incoming
// fragment's Z-buffer word is read; in the second it is compared and, if it
// passes, written back. Because the read of one fragment happens in the same
// cycle as the write of the one before it, the last write is kept in a
// forwarding register and used instead of the memory word when the addresses
// match (consecutive polygons may share a pixel).
//
// Interface: fragments in with valid/ready; PQ and IQ out with valid/ready
// (never both offered in the same cycle); a Z-buffer with one write port and
// a read port of latency 1. Timing: one fragment per cycle, plus two cycles
// per polygon, plus one cycle per row entry, plus the cycles a full queue
// holds it.
//
// Sending passed pixels to the PQ, the global index to the IQ and dropping
// invisible polygons follow the published architecture, as does the 2-byte
// PQ entry; the row/pixel coding, the hold-back register, the pipelining and
// the clear sweep are this design's own.
module depth_compare
  import rp_pkg::*;
#(
  parameter int unsigned SCREEN_W = 640,
  parameter int unsigned SCREEN_H = 480,
  localparam int unsigned NPIX    = SCREEN_W * SCREEN_H,
  localparam int unsigned AW      = $clog2(NPIX)
) (
  input  logic      clk,
  input  logic      rst_n,
  // Z-buffer clear
  input  logic      clear_start,
  output logic      clear_busy,
  // fragments from scan conversion
  input  logic      in_valid,
  output logic      in_ready,
  input  frag_t     in_frag,
  // Z-buffer ports
  output logic [AW-1:0] z_raddr,
  input  depth_t        z_rdata,
  output logic          z_we,
  output logic [AW-1:0] z_waddr,
  output depth_t        z_wdata,
  // pixel queue
  output logic      pq_valid,
  input  logic      pq_ready,
  output pq_entry_t pq_data,
  // index queue
  output logic      iq_valid,
  input  logic      iq_ready,
  output gidx_t     iq_data,
  // status
  output logic      ev_culled,
  output logic      ev_visible,
  output logic      busy
);

  typedef enum logic [1:0] {S_RUN, S_END, S_CLR} state_e;

  state_e  state;
  // compare stage
  logic    v1;
  frag_t   f1;
  // polygon state
  logic    any_passed;
  logic    pend_v;
  xcoord_t pend_x;
  ycoord_t pend_y;
  // line of the last row entry sent
  logic    row_v;
  ycoord_t row_y;
  // forwarding of the last Z-buffer write
  logic          fw_v;
  logic [AW-1:0] fw_addr;
  depth_t        fw_z;
  // clear
  logic          clr_req;
  logic [AW-1:0] clr_addr;

  logic [AW-1:0] f1_addr;
  depth_t        zcur;
  logic          pass, need_pq, need_iq, need_row, go, accept;

  function automatic logic [AW-1:0] pix_addr(input xcoord_t px, input ycoord_t py);
    return AW'(py) * AW'(SCREEN_W) + AW'(px);
  endfunction

  assign f1_addr = pix_addr(f1.x, f1.y);
  assign zcur    = (fw_v && fw_addr == f1_addr) ? fw_z : z_rdata;
  assign pass    = v1 && f1.covered && (f1.z < zcur);
  assign need_pq = pass && pend_v;
  assign need_iq = pass && !any_passed;
  // the held pixel is on a line not yet announced: a row entry goes first
  assign need_row = pend_v && (!row_v || row_y != pend_y);
  // the compare stage completes (or is empty); a row entry costs one cycle
  assign go      = (state == S_RUN)
                && (!v1 || ((!need_pq || (pq_ready && !need_row)) && (!need_iq || iq_ready)));

  assign in_ready = go && !clr_req && !(v1 && f1.last);
  assign accept   = in_valid && in_ready;
  // read the incoming fragment's depth; hold the address while stalled
  assign z_raddr  = in_ready ? pix_addr(in_frag.x, in_frag.y) : f1_addr;

  always_comb begin
    z_we    = 1'b0;
    z_waddr = f1_addr;
    z_wdata = f1.z;
    if (state == S_CLR) begin
      z_we    = 1'b1;
      z_waddr = clr_addr;
      z_wdata = Z_FAR;
    end else if (pass && go) begin
      z_we = 1'b1;
    end
  end

  assign pq_valid = ((state == S_RUN) && need_pq) || ((state == S_END) && pend_v);
  assign pq_data  = need_row ? pq_row(pend_y) : pq_pixel(pend_x, state == S_END);
  assign iq_valid = (state == S_RUN) && need_iq;
  assign iq_data  = f1.gidx;

  assign ev_culled  = (state == S_END) && !pend_v;
  assign ev_visible = (state == S_END) && pend_v && !need_row && pq_ready;
  assign clear_busy = (state == S_CLR) || clr_req;
  assign busy       = v1 || (state != S_RUN) || clr_req || pend_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_RUN;
      v1         <= 1'b0;
      f1         <= '0;
      any_passed <= 1'b0;
      pend_v     <= 1'b0;
      pend_x     <= '0;
      pend_y     <= '0;
      row_v      <= 1'b0;
      row_y      <= '0;
      fw_v       <= 1'b0;
      fw_addr    <= '0;
      fw_z       <= '0;
      clr_req    <= 1'b0;
      clr_addr   <= '0;
    end else begin
      if (clear_start) clr_req <= 1'b1;
      if (pq_valid && pq_ready && need_row) begin
        row_v <= 1'b1;
        row_y <= pend_y;
      end
      unique case (state)
        S_RUN: begin
          if (go) begin
            if (pass) begin
              any_passed <= 1'b1;
              pend_v     <= 1'b1;
              pend_x     <= f1.x;
              pend_y     <= f1.y;
              fw_v       <= 1'b1;
              fw_addr    <= f1_addr;
              fw_z       <= f1.z;
            end
            v1 <= accept;
            if (accept) f1 <= in_frag;
            if (v1 && f1.last) begin
              state <= S_END;
            end else if (!v1 && clr_req) begin
              clr_req  <= 1'b0;
              clr_addr <= '0;
              fw_v     <= 1'b0;
              state    <= S_CLR;
            end
          end
        end
        S_END: begin
          if (!pend_v || (pq_ready && !need_row)) begin
            pend_v     <= 1'b0;
            any_passed <= 1'b0;
            state      <= S_RUN;
          end
        end
        S_CLR: begin
          if (clr_addr == AW'(NPIX - 1)) state <= S_RUN;
          clr_addr <= clr_addr + AW'(1);
        end
        default: state <= S_RUN;
      endcase
    end
  end

endmodule
