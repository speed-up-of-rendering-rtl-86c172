// Geometry setup: turns one screen-space triangle into the data scan
// conversion needs.
//
// For the triangle (v0, v1, v2) it computes
//   * three edge functions E(x,y) = a*x + b*y + c, one per edge, signed so
//     that the inside of the triangle has E >= 0 whatever its winding;
//   * the bounding box, clipped to the screen;
//   * the depth plane z(x,y) = zorg + dzdx*(x-xmin) + dzdy*(y-ymin) in fixed
//     point with ZFRAC fraction bits, where
//       area = (x1-x0)(y2-y0) - (x2-x0)(y1-y0)
//       dzdx = (((z1-z0)(y2-y0) - (z2-z0)(y1-y0)) << ZFRAC) / area
//       dzdy = (((x1-x0)(z2-z0) - (x2-x0)(z1-z0)) << ZFRAC) / area
//       zorg = (z0 << ZFRAC) + dzdx*(xmin-x0) + dzdy*(ymin-y0)
//     (division truncates toward zero).
// A degenerate triangle (area 0) gets edge functions that reject every pixel,
// so it produces no pixels and ends up discarded as invisible.
//
// Back-face culling: a triangle with area < 0 faces away (its vertices run
// counter-clockwise on a screen whose y axis points down). While cull_back
// is high such a triangle is accepted and dropped here, with a one-cycle
// ev_backface pulse; while it is low both windings are drawn. cull_back is
// sampled with each triangle.
//
// Interface: valid/ready in and out. The arithmetic is combinational from the
// input and the result is held in one output register, so a triangle takes
// one cycle and a new one is accepted every cycle the output is free.
//
// The published architecture names this stage only and runs with back-face
// culling; its arithmetic, the coverage rule (pixel centres on integer
// coordinates, edges inclusive), which winding faces the viewer and the
// one-cycle timing are this design's own.
module geometry_setup
  import rp_pkg::*;
#(
  parameter int unsigned SCREEN_W = 640,
  parameter int unsigned SCREEN_H = 480
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  tri_t   in_tri,
  input  logic   cull_back,
  output logic   out_valid,
  input  logic   out_ready,
  output setup_t out_setup,
  output logic   ev_backface
);

  setup_t s_d;
  logic   back;   // triangle faces away

  always_comb begin
    logic signed [EW-1:0] x0, y0, x1, y1, x2, y2;
    logic signed [PW-1:0] z0, z1, z2;
    logic signed [EW-1:0] area;
    logic signed [PW-1:0] nx, ny, px, py, zo;
    logic signed [EW-1:0] a0, b0, c0, a1, b1, c1, a2, b2, c2;
    logic [XW-1:0] xlo, xhi;
    logic [YW-1:0] ylo, yhi;

    x0 = EW'(in_tri.v0.x); y0 = EW'(in_tri.v0.y); z0 = PW'(in_tri.v0.z);
    x1 = EW'(in_tri.v1.x); y1 = EW'(in_tri.v1.y); z1 = PW'(in_tri.v1.z);
    x2 = EW'(in_tri.v2.x); y2 = EW'(in_tri.v2.y); z2 = PW'(in_tri.v2.z);

    // edge v0->v1, v1->v2, v2->v0
    a0 = y0 - y1; b0 = x1 - x0; c0 = x0 * y1 - x1 * y0;
    a1 = y1 - y2; b1 = x2 - x1; c1 = x1 * y2 - x2 * y1;
    a2 = y2 - y0; b2 = x0 - x2; c2 = x2 * y0 - x0 * y2;
    area = (x1 - x0) * (y2 - y0) - (x2 - x0) * (y1 - y0);
    back = (area < 0);

    if (area < 0) begin
      a0 = -a0; b0 = -b0; c0 = -c0;
      a1 = -a1; b1 = -b1; c1 = -c1;
      a2 = -a2; b2 = -b2; c2 = -c2;
    end else if (area == 0) begin
      a0 = '0; b0 = '0; c0 = -EW'(1);
    end

    // bounding box, clipped to the screen
    xlo = in_tri.v0.x; xhi = in_tri.v0.x;
    ylo = in_tri.v0.y; yhi = in_tri.v0.y;
    if (in_tri.v1.x < xlo) xlo = in_tri.v1.x;
    if (in_tri.v2.x < xlo) xlo = in_tri.v2.x;
    if (in_tri.v1.x > xhi) xhi = in_tri.v1.x;
    if (in_tri.v2.x > xhi) xhi = in_tri.v2.x;
    if (in_tri.v1.y < ylo) ylo = in_tri.v1.y;
    if (in_tri.v2.y < ylo) ylo = in_tri.v2.y;
    if (in_tri.v1.y > yhi) yhi = in_tri.v1.y;
    if (in_tri.v2.y > yhi) yhi = in_tri.v2.y;
    if (xhi > XW'(SCREEN_W - 1)) xhi = XW'(SCREEN_W - 1);
    if (yhi > YW'(SCREEN_H - 1)) yhi = YW'(SCREEN_H - 1);
    if (xlo > xhi) xlo = xhi;
    if (ylo > yhi) ylo = yhi;

    // depth plane
    nx = ((z1 - z0) * PW'(y2 - y0) - (z2 - z0) * PW'(y1 - y0)) <<< ZFRAC;
    ny = (PW'(x1 - x0) * (z2 - z0) - PW'(x2 - x0) * (z1 - z0)) <<< ZFRAC;
    if (area != 0) begin
      px = nx / PW'(area);
      py = ny / PW'(area);
    end else begin
      px = '0;
      py = '0;
    end
    zo = (z0 <<< ZFRAC) + px * PW'(EW'(xlo) - x0) + py * PW'(EW'(ylo) - y0);

    s_d.gidx = in_tri.gidx;
    s_d.xmin = xlo; s_d.xmax = xhi;
    s_d.ymin = ylo; s_d.ymax = yhi;
    s_d.e0   = '{a: a0, b: b0, c: c0};
    s_d.e1   = '{a: a1, b: b1, c: c1};
    s_d.e2   = '{a: a2, b: b2, c: c2};
    s_d.zorg = zo;
    s_d.dzdx = px;
    s_d.dzdy = py;
  end

  assign in_ready = !out_valid || out_ready;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_setup   <= '0;
      ev_backface <= 1'b0;
    end else begin
      ev_backface <= in_valid && in_ready && cull_back && back;
      if (in_ready) begin
        out_valid <= in_valid && !(cull_back && back);
        if (in_valid) out_setup <= s_d;
      end
    end
  end

endmodule
