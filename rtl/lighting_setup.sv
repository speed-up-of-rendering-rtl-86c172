// Lighting and colour setup: the deferred per-polygon lighting stage that
// sits between the index queue (IQ) and the triangle queue (TQ).
//
// It pops a global polygon index from the IQ, reads that polygon's
// colour-related data (base colour and unit normal) from the colour memory
// by the index, lights it with one directional light and an ambient term,
// and pushes the lighted polygon record to the TQ:
//   d  = nx*lx + ny*ly + nz*lz                (normals and light, 127 = 1.0)
//   I  = min(255, ambient + max(d, 0) >> 6)
//   c' = (c * (I + 1)) >> 8                    per colour channel
// Because only visible polygons reach the IQ, polygons hidden by the depth
// compare never spend lighting cycles.
//
// Timing: a polygon occupies the unit for FETCH_CYCLES + LIGHT_CYCLES cycles,
// counted from the cycle it is popped from the IQ to the cycle its record is
// offered to the TQ, inclusive; the next polygon can be popped the cycle
// after the push. A full TQ holds the record and the unit. The defaults are
// the published figures: 150 lighting cycles per polygon plus ten cycles to
// receive the colour-related data.
//
// Interface: IQ in and TQ out with valid/ready; a colour memory read port of
// latency 1; light direction and ambient level as static inputs.
//
// The lighting model itself is not given by the published design: the
// Lambertian model with one light and the colour record layout are this
// design's own choices.
module lighting_setup
  import rp_pkg::*;
#(
  parameter int unsigned LIGHT_CYCLES = 150,
  parameter int unsigned FETCH_CYCLES = 10,
  localparam int unsigned TOTAL       = LIGHT_CYCLES + FETCH_CYCLES,
  localparam int unsigned CNTW        = $clog2(TOTAL + 1)
) (
  input  logic              clk,
  input  logic              rst_n,
  // index queue
  input  logic              iq_valid,
  output logic              iq_ready,
  input  gidx_t             iq_data,
  // colour memory
  output gidx_t             cm_raddr,
  input  colour_rec_t       cm_rdata,
  // light
  input  logic signed [7:0] light_x,
  input  logic signed [7:0] light_y,
  input  logic signed [7:0] light_z,
  input  logic [7:0]        ambient,
  // triangle queue
  output logic              tq_valid,
  input  logic              tq_ready,
  output tq_entry_t         tq_data,
  output logic              busy
);

  logic            active;
  gidx_t           gidx;
  logic [CNTW-1:0] cnt;
  logic [7:0]      intensity;

  always_comb begin
    logic signed [7:0]  n8x, n8y, n8z;
    logic signed [17:0] nx, ny, nz, lx, ly, lz, d;
    logic [17:0]        sum;
    n8x = cm_rdata.nx; n8y = cm_rdata.ny; n8z = cm_rdata.nz;
    nx = 18'(n8x); ny = 18'(n8y); nz = 18'(n8z);  // sign-extending casts
    lx = 18'(light_x); ly = 18'(light_y); lz = 18'(light_z);
    d  = nx * lx + ny * ly + nz * lz;
    if (d < 0) sum = 18'(ambient);
    else       sum = 18'(ambient) + 18'(d >>> 6);
    intensity = (sum > 18'd255) ? 8'd255 : sum[7:0];
  end

  assign cm_raddr = gidx;
  assign iq_ready = !active;
  assign tq_valid = active && (cnt == CNTW'(TOTAL - 1));
  assign tq_data  = '{gidx:   gidx,
                      colour: '{r: mul8(cm_rdata.base.r, intensity),
                                g: mul8(cm_rdata.base.g, intensity),
                                b: mul8(cm_rdata.base.b, intensity)}};
  assign busy     = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      gidx   <= '0;
      cnt    <= '0;
    end else if (!active) begin
      if (iq_valid) begin
        active <= 1'b1;
        gidx   <= iq_data;
        cnt    <= CNTW'(1);
      end
    end else if (cnt != CNTW'(TOTAL - 1)) begin
      cnt <= cnt + CNTW'(1);
    end else if (tq_ready) begin
      active <= 1'b0;
    end
  end

  initial begin
    assert (TOTAL >= 3) else $fatal(1, "lighting_setup: colour fetch needs at least 3 cycles");
  end

endmodule
