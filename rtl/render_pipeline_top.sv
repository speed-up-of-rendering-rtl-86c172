// Triple-queue rendering pipeline with deferred lighting.
//
// A screen-space triangle goes through geometry setup and scan conversion
// into the depth compare, which tests its pixels against the Z-buffer before
// any lighting is done. Coordinates of passed pixels go to the pixel queue
// (PQ); the global index of each visible polygon goes to the index queue
// (IQ); invisible polygons are dropped. The lighting and colour setup unit
// reads the colour-related data of each indexed polygon, lights it and puts
// the result in the triangle queue (TQ). Shading and texture mapping pairs
// each TQ record with its PQ pixels, reads the texture buffer and writes the
// frame buffer. The three queues decouple the polygon-rate part (lighting)
// from the pixel-rate parts on both sides, so the cycles lighting saves on
// hidden polygons turn into a shorter frame instead of pipeline bubbles.
//
// Ports: triangles in with valid/ready (tri_t: global index and three
// vertices) and cull_back, which drops back-facing triangles in geometry
// setup; host write ports of the colour-related data memory (indexed by
// global index) and of the texture buffer; light direction and ambient
// level; a frame clear (clear_start pulse clears the Z-buffer to far and the
// frame buffer to clear_colour; clear_busy while in progress); a frame-buffer
// read port of latency 1; idle when no work is anywhere in the pipeline; and
// status bits for observing the queues (occupancies, full flags, the
// back-face and invisible-polygon pulses, lighting busy and shading waiting for pixels).
//
// Defaults: 640 x 480 screen; queue lengths of the 4 Kbyte configuration
// (IQ 512 x 2-byte indices, PQ 1024 pixel entries, TQ 32 lighted polygons);
// 150 lighting cycles plus 10 colour-fetch cycles per polygon and 3 cycles
// per pixel in shading. These are the published figures. Geometry
// transform is outside this module: triangles arrive in screen space.
module render_pipeline_top
  import rp_pkg::*;
#(
  parameter int unsigned SCREEN_W     = 640,
  parameter int unsigned SCREEN_H     = 480,
  parameter int unsigned IQ_DEPTH     = 512,
  parameter int unsigned PQ_DEPTH     = 1024,
  parameter int unsigned TQ_DEPTH     = 32,
  parameter int unsigned LIGHT_CYCLES = 150,
  parameter int unsigned FETCH_CYCLES = 10,
  parameter int unsigned PIXEL_CYCLES = 3,
  parameter int unsigned TEX_LOG2     = 6,
  localparam int unsigned NPIX        = SCREEN_W * SCREEN_H,
  localparam int unsigned AW          = $clog2(NPIX),
  localparam int unsigned TAW         = 2 * TEX_LOG2
) (
  input  logic              clk,
  input  logic              rst_n,
  // triangles from the geometry transform
  input  logic              tri_valid,
  output logic              tri_ready,
  input  tri_t              tri_in,
  input  logic              cull_back,   // drop back-facing triangles
  // colour-related data memory, host write port
  input  logic              cm_we,
  input  gidx_t             cm_waddr,
  input  colour_rec_t       cm_wdata,
  // texture buffer, host write port
  input  logic              tex_we,
  input  logic [TAW-1:0]    tex_waddr,
  input  rgb_t              tex_wdata,
  // light
  input  logic signed [7:0] light_x,
  input  logic signed [7:0] light_y,
  input  logic signed [7:0] light_z,
  input  logic [7:0]        ambient,
  // frame clear
  input  logic              clear_start,
  input  rgb_t              clear_colour,
  output logic              clear_busy,
  // frame buffer, host read port
  input  logic [AW-1:0]     fb_raddr,
  output rgb_t              fb_rdata,
  // status
  output logic              idle,
  output logic [$clog2(IQ_DEPTH+1)-1:0] iq_count,
  output logic [$clog2(PQ_DEPTH+1)-1:0] pq_count,
  output logic [$clog2(TQ_DEPTH+1)-1:0] tq_count,
  output logic              iq_full,
  output logic              pq_full,
  output logic              tq_full,
  output logic              ev_backface,
  output logic              ev_culled,
  output logic              ev_visible,
  output logic              light_busy,
  output logic              shade_starved
);

  // geometry setup -> scan conversion
  logic   su_valid, su_ready;
  setup_t su_data;
  // scan conversion -> depth compare
  logic   fr_valid, fr_ready;
  frag_t  fr_data;
  logic   sc_busy;
  // depth compare <-> Z-buffer
  logic [AW-1:0] z_raddr, z_waddr;
  depth_t        z_rdata, z_wdata;
  logic          z_we;
  logic          dc_busy, z_clear_busy;
  // depth compare -> queues
  logic      pqi_valid, pqi_ready, iqi_valid, iqi_ready;
  pq_entry_t pqi_data;
  gidx_t     iqi_data;
  // queues -> consumers
  logic      pqo_valid, pqo_ready, iqo_valid, iqo_ready;
  pq_entry_t pqo_data;
  gidx_t     iqo_data;
  // lighting <-> colour memory, lighting -> TQ
  gidx_t       cm_raddr;
  colour_rec_t cm_rdata;
  logic        tqi_valid, tqi_ready, tqo_valid, tqo_ready;
  tq_entry_t   tqi_data, tqo_data;
  logic        lt_busy;
  // shading <-> texture, frame buffer
  logic [TAW-1:0] tex_raddr;
  rgb_t           tex_rdata;
  logic           fb_we;
  logic [AW-1:0]  fb_waddr;
  rgb_t           fb_wdata;
  logic           sh_busy, fb_clear_busy;

  geometry_setup #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_setup (
    .clk, .rst_n,
    .in_valid (tri_valid), .in_ready (tri_ready), .in_tri (tri_in),
    .cull_back,
    .out_valid(su_valid),  .out_ready(su_ready),  .out_setup(su_data),
    .ev_backface
  );

  scan_conversion u_scan (
    .clk, .rst_n,
    .in_valid (su_valid), .in_ready (su_ready), .in_setup(su_data),
    .out_valid(fr_valid), .out_ready(fr_ready), .out_frag(fr_data),
    .busy     (sc_busy)
  );

  depth_compare #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H)) u_depth (
    .clk, .rst_n,
    .clear_start, .clear_busy(z_clear_busy),
    .in_valid (fr_valid), .in_ready(fr_ready), .in_frag(fr_data),
    .z_raddr, .z_rdata, .z_we, .z_waddr, .z_wdata,
    .pq_valid (pqi_valid), .pq_ready(pqi_ready), .pq_data(pqi_data),
    .iq_valid (iqi_valid), .iq_ready(iqi_ready), .iq_data(iqi_data),
    .ev_culled, .ev_visible, .busy(dc_busy)
  );

  sdp_ram #(.DW(ZW), .DEPTH(NPIX)) u_zbuf (
    .clk, .we(z_we), .waddr(z_waddr), .wdata(z_wdata),
    .raddr(z_raddr), .rdata(z_rdata)
  );

  sync_fifo #(.WIDTH(GIDX_W), .DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n,
    .in_valid (iqi_valid), .in_ready (iqi_ready), .in_data (iqi_data),
    .out_valid(iqo_valid), .out_ready(iqo_ready), .out_data(iqo_data),
    .count    (iq_count)
  );

  sync_fifo #(.WIDTH($bits(pq_entry_t)), .DEPTH(PQ_DEPTH)) u_pq (
    .clk, .rst_n,
    .in_valid (pqi_valid), .in_ready (pqi_ready), .in_data (pqi_data),
    .out_valid(pqo_valid), .out_ready(pqo_ready), .out_data(pqo_data),
    .count    (pq_count)
  );

  lighting_setup #(.LIGHT_CYCLES(LIGHT_CYCLES), .FETCH_CYCLES(FETCH_CYCLES)) u_light (
    .clk, .rst_n,
    .iq_valid (iqo_valid), .iq_ready(iqo_ready), .iq_data(iqo_data),
    .cm_raddr, .cm_rdata,
    .light_x, .light_y, .light_z, .ambient,
    .tq_valid (tqi_valid), .tq_ready(tqi_ready), .tq_data(tqi_data),
    .busy     (lt_busy)
  );

  sdp_ram #(.DW($bits(colour_rec_t)), .DEPTH(2 ** GIDX_W)) u_cmem (
    .clk, .we(cm_we), .waddr(cm_waddr), .wdata(cm_wdata),
    .raddr(cm_raddr), .rdata(cm_rdata)
  );

  sync_fifo #(.WIDTH($bits(tq_entry_t)), .DEPTH(TQ_DEPTH)) u_tq (
    .clk, .rst_n,
    .in_valid (tqi_valid), .in_ready (tqi_ready), .in_data (tqi_data),
    .out_valid(tqo_valid), .out_ready(tqo_ready), .out_data(tqo_data),
    .count    (tq_count)
  );

  shading_texture #(.SCREEN_W(SCREEN_W), .SCREEN_H(SCREEN_H),
                    .PIXEL_CYCLES(PIXEL_CYCLES), .TEX_LOG2(TEX_LOG2)) u_shade (
    .clk, .rst_n,
    .clear_start, .clear_colour, .clear_busy(fb_clear_busy),
    .tq_valid (tqo_valid), .tq_ready(tqo_ready), .tq_data(tqo_data),
    .pq_valid (pqo_valid), .pq_ready(pqo_ready), .pq_data(pqo_data),
    .tex_raddr, .tex_rdata,
    .fb_we, .fb_waddr, .fb_wdata,
    .starved  (shade_starved), .busy(sh_busy)
  );

  sdp_ram #(.DW($bits(rgb_t)), .DEPTH(2 ** TAW)) u_tex (
    .clk, .we(tex_we), .waddr(tex_waddr), .wdata(tex_wdata),
    .raddr(tex_raddr), .rdata(tex_rdata)
  );

  sdp_ram #(.DW($bits(rgb_t)), .DEPTH(NPIX)) u_fb (
    .clk, .we(fb_we), .waddr(fb_waddr), .wdata(fb_wdata),
    .raddr(fb_raddr), .rdata(fb_rdata)
  );

  assign iq_full    = !iqi_ready;
  assign pq_full    = !pqi_ready;
  assign tq_full    = !tqi_ready;
  assign light_busy = lt_busy;
  assign clear_busy = z_clear_busy || fb_clear_busy;
  assign idle       = !su_valid && !sc_busy && !dc_busy && !iqo_valid && !pqo_valid
                   && !lt_busy && !tqo_valid && !sh_busy;

endmodule
