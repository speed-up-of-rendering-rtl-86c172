// Shading and texture mapping: pairs each lighted polygon from the triangle
// queue (TQ) with that polygon's pixels from the pixel queue (PQ), and writes
// shaded, textured pixels into the frame buffer.
//
// The unit takes a lighted polygon record from the TQ, then pops PQ entries
// until a pixel entry carries the end-of-polygon flag; the next record is then
// taken from the TQ. Queue order is the order of the polygons, so the TQ head
// always belongs to the PQ head. A row entry sets the current line (one
// cycle), which stays until the next row entry; a pixel entry gives x on
// that line. For each pixel it reads the
// texel at (x mod 2^TEX_LOG2, y mod 2^TEX_LOG2) (a repeating texture) and
// writes
//   pixel = (colour * (texel + 1)) >> 8      per channel
// to frame-buffer address y*SCREEN_W + x.
//
// clear_start (one-cycle pulse) requests a frame-buffer clear: once no
// polygon is in progress the unit writes clear_colour to every pixel, one
// per cycle, with clear_busy high.
//
// Timing: PIXEL_CYCLES cycles per pixel (the PQ pop cycle, then
// PIXEL_CYCLES-1 cycles of texture read and modulation; the frame-buffer
// write is in the last). When the TQ holds the next record, it is taken in
// the last cycle of the previous polygon's last pixel, so polygons follow
// each other without a gap. The default of three cycles per pixel is the
// published figure. Each row entry adds one cycle.
//
// The queue pairing follows the published architecture; the shading
// function (flat lighted colour modulated by one texture), the texture
// addressing and the clear sweep are this design's own choices.
module shading_texture
  import rp_pkg::*;
#(
  parameter int unsigned SCREEN_W     = 640,
  parameter int unsigned SCREEN_H     = 480,
  parameter int unsigned PIXEL_CYCLES = 3,
  parameter int unsigned TEX_LOG2     = 6,
  localparam int unsigned NPIX        = SCREEN_W * SCREEN_H,
  localparam int unsigned AW          = $clog2(NPIX),
  localparam int unsigned TAW         = 2 * TEX_LOG2,
  localparam int unsigned CNTW        = $clog2(PIXEL_CYCLES + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  // frame-buffer clear
  input  logic          clear_start,
  input  rgb_t          clear_colour,
  output logic          clear_busy,
  // triangle queue
  input  logic          tq_valid,
  output logic          tq_ready,
  input  tq_entry_t     tq_data,
  // pixel queue
  input  logic          pq_valid,
  output logic          pq_ready,
  input  pq_entry_t     pq_data,
  // texture buffer read port
  output logic [TAW-1:0] tex_raddr,
  input  rgb_t           tex_rdata,
  // frame buffer write port
  output logic          fb_we,
  output logic [AW-1:0] fb_waddr,
  output rgb_t          fb_wdata,
  // status
  output logic          starved,   // holds a polygon, PQ empty
  output logic          busy
);

  typedef enum logic [1:0] {S_IDLE, S_PIX, S_SHADE, S_CLR} state_e;

  state_e          state;
  rgb_t            colour;
  xcoord_t         pix_x;
  ycoord_t         pix_y;
  logic            pix_last;
  logic [CNTW-1:0] cnt;
  logic            clr_req;
  logic [AW-1:0]   clr_addr;
  rgb_t            clr_col;
  logic            last_cycle;

  assign last_cycle = (state == S_SHADE) && (cnt == CNTW'(PIXEL_CYCLES - 1));

  assign tq_ready  = ((state == S_IDLE) && !clr_req) || (last_cycle && pix_last);
  assign pq_ready  = (state == S_PIX);
  assign tex_raddr = {pix_y[TEX_LOG2-1:0], pix_x[TEX_LOG2-1:0]};

  always_comb begin
    fb_we    = 1'b0;
    fb_waddr = AW'(pix_y) * AW'(SCREEN_W) + AW'(pix_x);
    fb_wdata = '{r: mul8(colour.r, tex_rdata.r),
                 g: mul8(colour.g, tex_rdata.g),
                 b: mul8(colour.b, tex_rdata.b)};
    if (state == S_CLR) begin
      fb_we    = 1'b1;
      fb_waddr = clr_addr;
      fb_wdata = clr_col;
    end else if (last_cycle) begin
      fb_we = 1'b1;
    end
  end

  assign starved    = (state == S_PIX) && !pq_valid;
  assign clear_busy = (state == S_CLR) || clr_req;
  assign busy       = (state != S_IDLE) || clr_req;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      colour   <= '0;
      pix_x    <= '0;
      pix_y    <= '0;
      pix_last <= 1'b0;
      cnt      <= '0;
      clr_req  <= 1'b0;
      clr_addr <= '0;
      clr_col  <= '0;
    end else begin
      if (clear_start) begin
        clr_req <= 1'b1;
        clr_col <= clear_colour;
      end
      unique case (state)
        S_IDLE: begin
          if (clr_req) begin
            clr_req  <= 1'b0;
            clr_addr <= '0;
            state    <= S_CLR;
          end else if (tq_valid) begin
            colour <= tq_data.colour;
            state  <= S_PIX;
          end
        end
        S_PIX: begin
          if (pq_valid && pq_data.is_row) begin
            pix_y <= ycoord_t'(pq_data.coord);
          end else if (pq_valid) begin
            pix_x    <= pq_data.coord;
            pix_last <= pq_data.last;
            cnt      <= CNTW'(1);
            state    <= S_SHADE;
          end
        end
        S_SHADE: begin
          if (!last_cycle) begin
            cnt <= cnt + CNTW'(1);
          end else if (!pix_last) begin
            state <= S_PIX;
          end else if (tq_valid) begin
            colour <= tq_data.colour;
            state  <= S_PIX;
          end else begin
            state <= S_IDLE;
          end
        end
        S_CLR: begin
          if (clr_addr == AW'(NPIX - 1)) state <= S_IDLE;
          clr_addr <= clr_addr + AW'(1);
        end
      endcase
    end
  end

  initial begin
    assert (PIXEL_CYCLES >= 3) else $fatal(1, "shading_texture: a pixel needs at least 3 cycles");
  end

endmodule
