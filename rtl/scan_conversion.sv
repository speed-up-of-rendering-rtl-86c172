// Scan conversion: converts one set-up triangle into the group of pixels it
// covers, each with its interpolated depth.
//
// The unit walks the triangle's bounding box in raster order (x fastest),
// one position per cycle. At each position it evaluates the three edge
// functions and the depth plane directly from the set-up coefficients:
//   E_i = a_i*x + b_i*y + c_i              covered when all E_i >= 0
//   z   = (zorg + dzdx*(x-xmin) + dzdy*(y-ymin)) >> ZFRAC, clamped to 0..FFFF
// A covered position is emitted as a fragment. The last position of the box
// is always emitted, with covered = 0 if it is outside, and carries last = 1
// so the depth compare knows where each polygon ends; a polygon therefore
// always yields at least one beat.
//
// Interface: set-up triangles in with valid/ready (accepted only while the
// unit is idle), fragments out with valid/ready. The walk stalls while a
// fragment is offered and not taken. Timing: one cycle to accept, then one
// cycle per bounding-box position when the output is never stalled.
//
// The published architecture gives this stage's function (pixels out of a
// polygon, in the conventional order) but not its insides: the bounding-box
// walk and the direct evaluation are this design's simplest choice.
module scan_conversion
  import rp_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  output logic   in_ready,
  input  setup_t in_setup,
  output logic   out_valid,
  input  logic   out_ready,
  output frag_t  out_frag,
  output logic   busy
);

  setup_t  cur;
  logic    walking;
  xcoord_t x;
  ycoord_t y;

  logic covered, at_end;
  depth_t zpix;

  function automatic logic signed [EW-1:0] edge_eval(input edge_t e, input xcoord_t px,
                                                     input ycoord_t py);
    return $signed(e.a) * $signed(EW'(px)) + $signed(e.b) * $signed(EW'(py))
           + $signed(e.c);
  endfunction

  always_comb begin
    logic signed [PW-1:0] zf;
    covered = (edge_eval(cur.e0, x, y) >= 0) && (edge_eval(cur.e1, x, y) >= 0)
           && (edge_eval(cur.e2, x, y) >= 0);
    at_end  = (x == cur.xmax) && (y == cur.ymax);
    zf = $signed(cur.zorg) + $signed(cur.dzdx) * $signed(PW'(x - cur.xmin))
       + $signed(cur.dzdy) * $signed(PW'(y - cur.ymin));
    zf = zf >>> ZFRAC;
    if (zf < 0)                    zpix = '0;
    else if (zf > PW'(Z_FAR))      zpix = Z_FAR;
    else                           zpix = zf[ZW-1:0];
  end

  assign in_ready  = !walking;
  assign out_valid = walking && (covered || at_end);
  assign busy      = walking;

  always_comb begin
    out_frag.gidx    = cur.gidx;
    out_frag.x       = x;
    out_frag.y       = y;
    out_frag.z       = zpix;
    out_frag.covered = covered;
    out_frag.last    = at_end;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      walking <= 1'b0;
      cur     <= '0;
      x       <= '0;
      y       <= '0;
    end else if (!walking) begin
      if (in_valid) begin
        cur     <= in_setup;
        x       <= in_setup.xmin;
        y       <= in_setup.ymin;
        walking <= 1'b1;
      end
    end else if (!out_valid || out_ready) begin
      if (at_end) begin
        walking <= 1'b0;
      end else if (x == cur.xmax) begin
        x <= cur.xmin;
        y <= y + YW'(1);
      end else begin
        x <= x + XW'(1);
      end
    end
  end

endmodule
