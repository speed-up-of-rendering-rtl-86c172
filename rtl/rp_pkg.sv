// Shared types and constants of the triple-queue rendering pipeline.
//
// The pipeline renders screen-space triangles into a 640 x 480 image. A
// triangle is set up into three edge equations, a bounding box and a depth
// plane; scan conversion walks the box and emits fragments; the depth compare
// sends surviving pixel coordinates to the pixel queue (PQ) and the global
// index of each visible polygon to the index queue (IQ); the deferred lighting
// unit turns indices into lighted polygon records for the triangle queue (TQ);
// shading pairs TQ records with PQ pixels and writes the frame buffer.
//
// The screen size, the 16-bit global index and the queue organisation follow
// the published architecture. Depth width (16 bits), the 12-bit fraction of
// the depth plane, the 8-bit colour channels and the layouts of the records
// below are this design's own choices.
package rp_pkg;

  localparam int unsigned XW      = 10;  // x coordinate bits (0..639)
  localparam int unsigned YW      = 9;   // y coordinate bits (0..479)
  localparam int unsigned ZW      = 16;  // depth bits, 16'hFFFF is far
  localparam int unsigned GIDX_W  = 16;  // global polygon index, 2 bytes
  localparam int unsigned ZFRAC   = 12;  // fraction bits of the depth plane
  localparam int unsigned PW      = 56;  // depth-plane arithmetic width
  localparam int unsigned EW      = 32;  // edge-function arithmetic width

  localparam logic [ZW-1:0] Z_FAR = '1;

  typedef logic [XW-1:0]     xcoord_t;
  typedef logic [YW-1:0]     ycoord_t;
  typedef logic [ZW-1:0]     depth_t;
  typedef logic [GIDX_W-1:0] gidx_t;

  typedef struct packed {
    logic [7:0] r;
    logic [7:0] g;
    logic [7:0] b;
  } rgb_t;

  // Screen-space vertex, as delivered by the geometry transform.
  typedef struct packed {
    xcoord_t x;
    ycoord_t y;
    depth_t  z;
  } vertex_t;

  // One triangle entering the pipeline.
  typedef struct packed {
    gidx_t   gidx;
    vertex_t v0;
    vertex_t v1;
    vertex_t v2;
  } tri_t;

  // Edge function E(x,y) = a*x + b*y + c; a pixel is inside when E >= 0.
  typedef struct packed {
    logic [EW-1:0] a;
    logic [EW-1:0] b;
    logic [EW-1:0] c;
  } edge_t;

  // Output of geometry setup: everything scan conversion needs.
  typedef struct packed {
    gidx_t         gidx;
    xcoord_t       xmin;
    xcoord_t       xmax;
    ycoord_t       ymin;
    ycoord_t       ymax;
    edge_t         e0;
    edge_t         e1;
    edge_t         e2;
    logic [PW-1:0] zorg;   // depth at (xmin,ymin), ZFRAC fraction bits
    logic [PW-1:0] dzdx;   // depth step per pixel in x
    logic [PW-1:0] dzdy;   // depth step per line in y
  } setup_t;

  // Fragment from scan conversion to depth compare. A polygon's last beat
  // has last=1; it may be an uncovered position that only closes the polygon.
  typedef struct packed {
    gidx_t   gidx;
    xcoord_t x;
    ycoord_t y;
    depth_t  z;
    logic    covered;
    logic    last;
  } frag_t;

  // PQ entry, 2 bytes of coded pixel coordinates. A row entry (is_row = 1)
  // sets the current line y = coord; a pixel entry (is_row = 0) is the pixel
  // (coord, current line), and last = 1 marks the final pixel of a polygon.
  // The current line carries over from one polygon to the next.
  typedef struct packed {
    logic       is_row;
    logic       last;
    logic [3:0] zero;
    xcoord_t    coord;
  } pq_entry_t;

  function automatic pq_entry_t pq_row(input ycoord_t y);
    return '{is_row: 1'b1, last: 1'b0, zero: 4'd0, coord: XW'(y)};
  endfunction

  function automatic pq_entry_t pq_pixel(input xcoord_t x, input logic last);
    return '{is_row: 1'b0, last: last, zero: 4'd0, coord: x};
  endfunction

  // Colour-related data of one polygon, addressed by its global index:
  // base colour and a unit normal (signed, 127 = 1.0).
  typedef struct packed {
    rgb_t             base;
    logic signed [7:0] nx;
    logic signed [7:0] ny;
    logic signed [7:0] nz;
  } colour_rec_t;

  // TQ entry: the lighted polygon.
  typedef struct packed {
    gidx_t gidx;
    rgb_t  colour;
  } tq_entry_t;

  // Channel-wise product (a * (b + 1)) >> 8, so that b = 255 leaves a unchanged.
  function automatic logic [7:0] mul8(input logic [7:0] a, input logic [7:0] b);
    logic [16:0] p;
    p = 17'(a) * (17'(b) + 17'd1);
    return p[15:8];
  endfunction

endpackage
