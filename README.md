# Triple-queue rendering pipeline with deferred lighting

A classic polygon rendering pipeline wastes time in two ways. First, it lights
every polygon, including the many that end up completely hidden behind
others. Second, it stalls whenever the polygon rate and the pixel rate drift
apart: a large polygon keeps the pixel stages busy while the polygon stages
wait, and a run of tiny polygons does the reverse.

This design deals with both problems. It moves the depth test ahead of
lighting ("deferred lighting"), so a hidden polygon never reaches the lighting
unit. It also places three small queues around the lighting unit, so the
lighting cycles saved this way turn into a shorter frame instead of idle
slots in the pipeline:

* **IQ** (index queue): the 16-bit global index of each visible polygon,
  waiting to be lit;
* **PQ** (pixel queue): the coordinates of every pixel that passed the depth
  test, waiting for its polygon's lighting;
* **TQ** (triangle queue): lighted polygon records, waiting for shading.

The arrangement follows the triple-queue architecture of B.-S. Liang and
C.-W. Jen ("Speed up of rendering pipeline by deferred lighting and triple
queue structure"). That work gives the structure, the queue sizes and the
per-unit cycle costs. The arithmetic inside each unit is this design's own
(see [Departures and own choices](#departures-and-own-choices)).

```
 triangles     +----------+   +-----------+   +---------+  pixels  +----+
 (screen  ---> | geometry |-->|   scan    |-->|  depth  |--------->| PQ |-----------+
  space)       |  setup   |   | conversion|   | compare |          +----+           |
               +----------+   +-----------+   +---------+                           v
                                                |    ^  global   +----+   +----------+   +----+   +-------------+
                                                |    |  index -->| IQ |-->| lighting |-->| TQ |-->| shading and |--> frame
                                                v    |           +----+   | & colour |   +----+   | texture map |    buffer
                                              Z-buffer                    |  setup   |            +-------------+
                                                                          +----------+                  ^
                                                           colour-related data memory ^   texture buffer |
```

## How polygons and pixels stay paired

This is the part of the design that needs the most care. A polygon's pixels
travel through the PQ, while its lighting result travels through the IQ, the
lighting unit and the TQ. Shading has to join the two streams again.

* **Order.** Each of the three queues is first-in first-out, and the depth
  compare handles polygons in the order they were submitted. The TQ head is
  therefore always the record of the polygon whose pixels are at the PQ head.
  Pixels come out in the order of a conventional pipeline, so the final image
  is the same.
* **End-of-polygon flag.** Every PQ pixel entry carries a `last` bit.
  Shading takes a TQ record, consumes pixels until one has `last = 1`, and
  then takes the next record. A pixel is known to be its polygon's last
  *passing* pixel only once the polygon has ended, so the depth compare
  holds one passed pixel back in a register. That pixel is written out when
  the next one passes, or with `last = 1` when the polygon ends.
* **Current line.** A 2-byte PQ entry cannot hold both coordinates, so a
  pixel entry holds only x. Row entries, sent when the line changes, give y.
  The depth compare and shading each keep a "current line", and the two
  stay equal because both see the same ordered stream. The line carries
  over between polygons. A dropped polygon sends nothing, so it cannot put
  the two ends out of step.
* **Invisible polygons.** If no pixel of a polygon passes the depth test,
  nothing of it is queued. Its index never enters the IQ, so it costs no
  lighting cycles, and `ev_culled` pulses.
* **No deadlock with a large polygon.** The global index goes into the IQ when
  the polygon's *first* pixel passes, not when the polygon ends. Otherwise a
  polygon with more passing pixels than the PQ holds would wait forever: the
  PQ would be full of its pixels, and shading could not drain them without
  its TQ record. Because the index goes in early, the polygon is lit and
  shaded while it is still being depth-tested.

## Units

| Unit | Module | Does | Timing |
|---|---|---|---|
| Geometry setup | `geometry_setup` | Edge functions, clipped bounding box and depth plane of a screen-space triangle. Back-face culling under `cull_back` | 1 cycle, one triangle per cycle |
| Scan conversion | `scan_conversion` | Walks the bounding box in raster order. Emits covered pixels with depth, and the box's last position flagged `last` | 1 cycle to accept, then 1 cycle per box position |
| Depth compare | `depth_compare` | Z test (`z < stored`) with write-back. Passed pixels go to the PQ, the first-pass index to the IQ. Z-buffer clear | 1 fragment per cycle (read stage, then compare-and-write stage with forwarding), +2 cycles per polygon, +1 per PQ row entry |
| IQ, PQ, TQ | `sync_fifo` | First-word-fall-through FIFOs with valid/ready | push to visible: 1 cycle |
| Lighting and colour setup | `lighting_setup` | Reads the polygon's colour record by global index, lights it and pushes the result to the TQ | `FETCH_CYCLES + LIGHT_CYCLES` (10 + 150) per polygon |
| Shading and texture mapping | `shading_texture` | Joins TQ records with PQ pixels, applies the texture, writes the frame buffer. Frame-buffer clear | `PIXEL_CYCLES` (3) per pixel, +1 per PQ row entry, no other gap between polygons |
| Z-buffer, frame buffer, texture buffer, colour-related data memory | `sdp_ram` | One write port and one registered read port | read latency 1 |
| Whole pipeline | `render_pipeline_top` | Connects all of the above | |

All handshakes are valid/ready: a beat moves on a rising edge where both are
high. Reset (`rst_n`) is asynchronous and active low. It resets control state
only; the memories are not reset, and `clear_start` clears the Z-buffer and
the frame buffer (one word per cycle, 307,200 cycles at 640 x 480).

### Number formats

Shared types are in `rp_pkg`.

* Vertex: x 10 bits, y 9 bits, depth 16 bits (`FFFF` is far). A triangle
  (`tri_t`) is a 16-bit global index plus three vertices.
* Edge function `E = a*x + b*y + c`, 32-bit signed coefficients. A pixel at
  integer coordinates (x, y) is covered when all three `E >= 0`. Zero-area
  triangles cover nothing.
* Winding: `area = (x1-x0)(y2-y0) - (x2-x0)(y1-y0)`. A triangle with
  `area < 0` runs counter-clockwise on the screen (y points down) and faces
  away. While the `cull_back` input is high, geometry setup drops such a
  triangle and pulses `ev_backface`. While it is low, setup flips the
  triangle's edge signs and both windings render. `cull_back` is sampled
  with each triangle, so it may change from one triangle to the next.
* Depth plane: `z = (zorg + dzdx*(x-xmin) + dzdy*(y-ymin)) >> 12`, 56-bit
  signed with 12 fraction bits, clamped to 0..FFFF. Setup divides by twice the
  triangle area; the division truncates toward zero.
* Colour-related data record (48 bits): base RGB and a signed 8-bit unit
  normal (127 = 1.0). Lighting:
  `I = min(255, ambient + max(n.l, 0) >> 6)`, and each channel becomes
  `(c * (I + 1)) >> 8`.
* TQ record: global index and lighted RGB (40 bits).
* PQ entry (16 bits), coded in two kinds:
  * row entry `{1, 0, 0000, y}` sets the current line;
  * pixel entry `{0, last, 0000, x}` is pixel (x, current line).

  The depth compare sends a row entry only when a passed pixel lies on a
  different line from the last one announced. The line carries over from one
  polygon to the next, so a run of small polygons on one line costs one
  entry per pixel.
* Texture: 64 x 64 RGB, repeating, addressed by `{y[5:0], x[5:0]}`. Each
  output channel is `(lit * (texel + 1)) >> 8`. The frame-buffer address is
  `y*640 + x`.

## Parameters of `render_pipeline_top`

| Parameter | Default | Origin |
|---|---|---|
| `SCREEN_W` x `SCREEN_H` | 640 x 480 | published display resolution |
| `IQ_DEPTH` | 512 | published 4 Kbyte configuration (a quarter of the bytes, 2 bytes/entry) |
| `PQ_DEPTH` | 1024 | published 4 Kbyte configuration (half of the bytes, 2 bytes/entry) |
| `TQ_DEPTH` | 32 | published 4 Kbyte configuration (a quarter of the bytes, 32 bytes/entry) |
| `LIGHT_CYCLES` | 150 | published "long polygon cycle"; 30 for the "short polygon cycle" |
| `FETCH_CYCLES` | 10 | published cost of receiving the colour-related data |
| `PIXEL_CYCLES` | 3 | published shading cost per pixel (minimum 3 here) |
| `TEX_LOG2` | 6 | own choice (64 x 64 texture) |

The published queue configurations range from 256 bytes to 4 Kbytes overall:

| Overall | 256 | 512 | 1K | 2K | 4K |
|---|---|---|---|---|---|
| IQ entries | 32 | 64 | 128 | 256 | 512 |
| PQ entries | 64 | 128 | 256 | 512 | 1024 |
| TQ entries | 2 | 4 | 8 | 16 | 32 |

The 4K set is the default because the best published result comes from it:
about 53% of the cycles of a pipeline without queues, on a scene where a near
object hides much of a later one. The published global index is 2 bytes
wide, so the colour memory holds 65,536 polygon records. The scenes in the
published evaluation need about 560 to 3,900 polygons each. That estimate
comes from the difference between the published cycle counts for the two
lighting costs.

## Departures and own choices

The published design gives the structure, the queue lengths and the cycle
costs. The following are this design's own choices:

* **Queue entry sizes.** The published PQ entry is 2 bytes of "coded"
  coordinates, but the coding is not specified. The row/pixel coding above is
  this design's own. It keeps the 2-byte size but adds a one-cycle row entry
  at each change of line. The published TQ entry is budgeted at 32 bytes.
  Here it holds only what this lighting model produces (40 bits), and keeps
  the published length.
* **Lighting and shading arithmetic.** The published design gives only their
  costs in cycles. Lighting here is per-polygon Lambertian with one
  directional light, shading is a flat colour times one texture, and there is
  no alpha blending.
* **Front-end rates.** No rates are published for setup, scan conversion or
  the depth compare. They are simple here. Scan conversion walks the full
  bounding box at one position per cycle, so uncovered positions cost a
  cycle each. The depth compare takes one fragment per cycle. For small
  triangles the front end can therefore be slower than shading's 3 cycles per
  pixel, and shading then waits for pixels.
* **Geometry transform** is not included. Triangles enter already in screen
  space.
* **Back-face culling.** The published evaluation runs with back faces
  culled, but does not say where. Here it is done in geometry setup, so a
  back face costs one cycle and nothing further down. Which winding faces
  away is this design's choice.
* **Clearing**, the handshakes and the reset behaviour are not specified in
  the published design and were chosen here.

## Simulation

Each testbench in `tb/` checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Build any of them with Verilator 5, for
example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl rtl/rp_pkg.sv \
    tb/tb_render_pipeline_top.sv --top-module tb_render_pipeline_top -o sim
./obj_dir/sim
```

| Testbench | Checks |
|---|---|
| `tb_sync_fifo` | random traffic against a queue model; count, full and empty flags; refusal when full; a 1024-entry instance |
| `tb_sdp_ram` | read latency, read-before-write, a 640 x 480 instance |
| `tb_geometry_setup` | every field against 64-bit reference arithmetic; vertices inside their own edges; plane through the vertices; degenerate and off-screen triangles; back faces dropped only while `cull_back` is high |
| `tb_scan_conversion` | fragment stream against a reference box walk; one cycle per position; back-pressure |
| `tb_depth_compare` | PQ stream (row and pixel entries) and IQ stream and the invisible-polygon count against a reference Z-buffer; equal depth fails; back-to-back fragments on one pixel (forwarding); clear; one cycle per fragment, one per row entry, none when the line carries over |
| `tb_lighting_setup` | lighted colour against the formula; 160 and 40 cycles per polygon; hold while the TQ is full |
| `tb_shading_texture` | every frame-buffer write from coded PQ entries; 3 cycles per pixel plus 1 per row entry, no other gap between polygons; record taken only after the last pixel; clear |
| `tb_render_pipeline_top` | whole pipeline on 64 x 48 with the 256-byte queues and the short polygon cycle. Back-face culling is on for the last part of the scene. The final image is compared pixel by pixel with a reference renderer. IQ full, PQ full, TQ full, back faces and invisible polygons dropped, shading waiting for pixels and idle lighting must each occur |
| `tb_queue_configs` | all five published queue configurations with both polygon cycles, each rendering a two-object scene in both orders. Drawing the near object first must be faster in every case, larger queues must never be slower than the 256-byte set, and the short cycle never slower than the long one |
| `tb_render_full` | whole pipeline with every parameter at its default (640 x 480, 4K queues, 150 + 10 cycles). It renders 370 triangles, with culling on for every second one, and compares the full image and the polygon counts |

The end-to-end runs report the number of cycles and how often each queue
event occurred. On the queue-configuration scene with the long polygon
cycle, drawing the near object first takes 18,597 to 20,839 cycles across
the five configurations. Drawing the far object first takes about 34,400 to
34,600 cycles, which is set by lighting every polygon. With the short
polygon cycle both orders take about 18,000 to 18,300 cycles at every queue
size: lighting is then no longer the bottleneck, and the pixel work is.
These figures come from a synthetic scene, so they do not reproduce the
published scenes or their speed-up figures: the published evaluation used
two 3-D models whose data are not given with it.
