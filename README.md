# Ray-tracing rendering processor for augmented-reality object insertion

This is the RTL of a ray-tracing renderer for a mobile AR pipeline. It draws
virtual 3D objects into a camera image, with shadows on the real background.
The background is never modelled as geometry. A CNN first turns the camera
image into four per-pixel attribute maps: albedo, surface normal, lighting and
depth. These maps are compressed by clustering similar neighbouring tiles. To
shade a background pixel, a ray looks up its pixel's cluster record and reaches
the background at the stored depth. That costs one memory read per pixel,
however complex the real scene is. Only the virtual objects need ray tracing.
They are stored as axis-aligned bounding boxes that hold triangles.

The processor has 48 processing elements (PEs) in an 8 x 6 array. Each PE
traces one pixel at a time, on its own, with a private copy of the scene.
A token that visits one PE per clock cycle drives two global units:

* a scheduler that hands out pixel tasks and collects the results;
* a memory controller that serves requests to the shared attribute memory.

Pixels take very different amounts of time, and their memory requests arrive
at random. The token handles both without an all-to-all arbiter.

The same PEs also run the CNN's multiply-accumulate work in a second mode (IR,
inverse rendering). In that mode the PEs act as stationary MAC units with
selectable 8-, 16- or 32-bit lanes.

```
            camera-image attribute maps (from the CNN)       scene load (boxes, triangles)
                          |                                          |
                    +-----v------+                                   | broadcast
                    | bg_cluster |  tile average + neighbour merge   |
                    +-----+------+                                   |
                          | index table, cluster table               |
                    +-----v------+      +-------+     +--------------v----------------+
                    |   pamem    |<-----| ppcd  |<----| uac |<---- gmac <----+        |
                    +------------+      +-------+     +-----+        ^  | PA |        |
                                                                     |  v    | pa_req |
   rttc (token, one PE per clock) ------------------------------> sel|       |        |
                                                                     |  +----+--------v---+
   grts (pixel tasks, retire results) <--------------------------> sel  | pe_array 8 x 6  |
        |                                                               |  pe: pe_ctrl,   |
        v pixels (id, colour)                                           |  pcu, obj_mem,  |
                                                                        |  bbie, tie      |
                                                                        +-----------------+
```

## Files

| file | contents |
|---|---|
| `rtl/prt_pkg.sv` | shared types: attribute record `pa_t`, `bbox_t`, `tri_t`, vector, opcodes, modes |
| `rtl/prt_top.sv` | the processor |
| `rtl/pe_array.sv`, `rtl/pe.sv` | 8 x 6 array; one processing element |
| `rtl/pe_ctrl.sv` | per-PE ray-tracing sequencer |
| `rtl/pcu.sv` | PE compute unit: `mp_mac.sv`, `div64.sv`, `sqrt64.sv` |
| `rtl/bbie.sv`, `rtl/tie.sv` | box and triangle intersection evaluators |
| `rtl/obj_mem.sv` | per-PE object memory |
| `rtl/clk_gate.sv` | latch-based clock gate |
| `rtl/rttc.sv`, `rtl/grts.sv`, `rtl/gmac.sv` | token, scheduler, memory access controller |
| `rtl/uac.sv`, `rtl/ppcd.sv`, `rtl/pamem.sv` | address converter, decoder, attribute memory |
| `rtl/bg_cluster.sv` | background clustering |
| `tb/tb_*.sv` | one self-checking testbench per block, plus `tb_prt_top` (reduced size) and `tb_prt_full` (default size) |
| `tb/prt_ref_pkg.sv` | test scene and reference renderer used by the PE and full-chip tests |

## What one PE does with a pixel

`pe_ctrl` is the part that takes the most reading. For one task (pixel `x, y`)
it runs these steps:

1. **Attribute fetch.** It raises `pa_req` with the task ID and waits for the
   pixel's clustered background record from the memory controller.
2. **Ray set-up.** The primary ray is `O + t*D` with `D = (x - cx, y - cy, f)`,
   so the direction's z component is the focal length. The PCU divider forms
   the three reciprocals `inv_k = 2^24 / D_k`, which the box test needs. A zero
   component gets the largest positive value.
3. **Traversal.** Every box record in OBJMEM is visited in order. There are
   two kinds of box:
   * An **EBBOX** (empty box) stands for something that should cast a shadow
     but is never drawn. Primary rays skip it without a test.
   * A **TBBOX** (target box) holds a run of triangles. If the box test
     (`bbie`) reports a hit, each of its triangles goes through `tie`.

   The nearest hit is kept as an exact fraction `tnum/tden`. It starts at the
   background distance `depth / f`, so a triangle only wins if it is in front
   of the real surface at that pixel. Two fractions are compared by cross
   multiplication, with 128-bit products, so no division is needed.
4. **Object pixel.** The triangle normal is turned to face the camera, then
   shifted right until every component is below 2^14. The PCU runs 15 steps
   in a row:
   * MACs for `N.L`, `N.N` and `L.L`;
   * two square roots;
   * one divide, which gives `cos = floor(256 * N.L / (|N| |L|))`, capped at
     255.

   The shading register then holds
   `min(255, (a*l >> 11) + (a*l*cos >> 16))`. Here `a` is the albedo of the
   box and `l` is the background *lighting* value at this pixel. The
   inverse-rendered lighting of the real scene therefore lights the inserted
   object.
5. **Background pixel.** The ray meets the background at `t = depth / f`. The
   point is computed as `P = O + (D * depth * inv_z) >>> 24`. A shadow ray runs
   from `P` along the light direction `L`. It needs three more reciprocals, and
   it is tested against *all* boxes, EBBOX and TBBOX alike. The colour is
   `(albedo * lighting) >> 8`, halved if any box blocks the light.
6. **Result.** `done` holds the colour and task ID until the scheduler
   acknowledges them.

Cost per pixel with the 3-box test scene: about 200 cycles for reciprocals,
plus about 120 for the shading steps or about 200 for the shadow ray. That
comes to about 360 cycles per pixel per PE. The default 128 x 128 frame takes
164 k cycles on 48 PEs.

### Number formats

| quantity | format |
|---|---|
| coordinates, directions, light | signed 16-bit integers (`CW`) |
| reciprocal direction | signed 32-bit, 24 fractional bits (`FRAC`) |
| box distances `tmin`/`tmax` | signed 64-bit, 24 fractional bits |
| triangle `tnum`, `tden`, `u`, `v` | signed 64-bit integers (exact for 16-bit inputs) |
| normal `e1 x e2` | signed 40-bit |
| colours, albedo, lighting | unsigned 8-bit |
| background depth | unsigned 16-bit, same unit as z |

### Intersection units

* `bbie` is the slab test: `t = (b - O_k) * inv_k` for each face pair. Entry is
  the largest near value and exit the smallest far value. The ray hits when
  `exit >= entry` and `exit >= 0`. It has one register stage and accepts one
  box per cycle.
* `tie` is Moller-Trumbore without division. It forms `det`, `u*det`, `v*det`
  and `t*det`, flips them all when `det < 0`, and reports a hit when
  `u >= 0`, `v >= 0`, `u + v <= det` and `t > 0`. Both faces count. It has two
  register stages and accepts one triangle per cycle.

A ray that runs exactly inside a box's face plane, with a zero direction
component, is counted as a miss. This is the usual slab-test edge case.

### Compute unit (PCU)

| op | does | latency (edges after the one that takes `start`) |
|---|---|---|
| `OP_CLR` | clear accumulator | 1 |
| `OP_MAC` | `acc += dot(a, b)`: 4 x 8b, 2 x 16b or 1 x 32b signed lanes | 1, one per cycle |
| `OP_DIV` | 64 / 64-bit unsigned, radix 2 | 64 |
| `OP_SQRT` | floor square root of 64 bits, digit by digit | 32 |

The divider and the square root each run on their own gated clock. It is
enabled only while the unit works and the PE is in RT mode. The one edge that
takes `start` always passes, so an operation issued in IR mode keeps its
operands and simply waits until RT mode returns. OBJMEM, BBIE and
TIE run on a second gated clock that is off in IR mode. Both gates are
`clk_gate`: a latch that is transparent while the clock is low, followed by an
AND gate. The latch warning from lint is expected. On silicon the gate maps to
a library ICG cell.

## Token-based scheduling and memory access

`rttc` is a round-robin counter: in RT mode it selects PE `sel`, one per clock.

* **`grts`** looks only at PE `sel`. If that PE is finished, the scheduler
  passes its result to the pixel port (registered, one cycle later) and
  acknowledges it, which makes the PE idle again. Otherwise, if the PE is idle
  and tasks remain, it gets the next pixel (ID, x, y) in raster order.
  `frame_done` pulses when all `IMG_W*IMG_H` results have come back. Results
  arrive in completion order and carry their pixel ID.
* **`gmac`** also looks only at PE `sel`. If that PE has a request and nothing
  in flight, its task ID goes down the address path, tagged with the PE
  number. At most one request is issued per cycle, so the shared memory needs
  only one port. The answer is routed back by its tag. An assertion checks
  that no answer arrives for a PE with nothing in flight. `ev_conflict` marks
  cycles in which two or more PEs wait at once.

A PE therefore waits at most one token round, 48 cycles, plus the 2-cycle
memory path. In the default test frame, conflicts occur in about half of all
cycles. The token keeps them serialised without any arbitration logic.

## Background compression

* **`bg_cluster`** takes the full-resolution attribute maps, one pixel per
  cycle. The pixels arrive one `TILE x TILE` tile at a time, with tiles in
  raster order. For each tile it works as follows:
  1. It averages every attribute over the tile. This is the average filter;
     the divide is a shift, arithmetic for the signed normal.
  2. It compares the average with the cluster of the left neighbour, then with
     the cluster of the upper neighbour. They are similar when albedo,
     lighting and each normal component are within `cl_thr`, and depth is
     within `cl_thr_d`.
  3. It joins the first similar cluster. Otherwise it opens a new cluster whose
     record is this tile's average.
  4. When all `NCLUST` clusters are in use, the tile joins its left neighbour's
     cluster, else the upper one's, else cluster 0.

  A cluster's record is fixed by its first tile. Each tile costs
  `TILE^2 + 1` cycles.
* **`pamem`** holds two tables: tile to cluster ID (`NTILES` x 6 bits), and
  cluster ID to `pa_t` (`NCLUST` x 56 bits).
* **`uac`** maps a task ID to its tile address:
  `(y / TILE) * (IMG_W / TILE) + x / TILE`.
* **`ppcd`** makes two dependent reads, tile to ID and ID to record. It is
  fully pipelined with a latency of 2.

At the defaults the full 128 x 128 x 56-bit map is 917,504 bits. The
compressed tables take 1,536 + 3,584 = 5,120 bits, or 1,536 + 56*k bits when
only k clusters are used. That is a saving of 179x with the tables at full
size, and up to 576x when a single cluster is in use.

## IR (inverse-rendering) mode

With `mode = MODE_IR`:

* The token stops and RT tasks are not accepted.
* Each PE multiplies its 32-bit stationary register by the broadcast operand
  `ir_data` at precision `ir_prec`, and accumulates into a 64-bit register.
* `ir_ld` with `ir_ld_sel` loads one PE's stationary register. It can hold
  weights (weight stationary) or activations (input stationary). The
  broadcast operand is the other one.
* `ir_clr` clears all accumulators. `ir_rsel` selects the PE whose
  accumulator shows on `ir_racc`.

The CNN itself, with its layers, weights and the order of operands, is
software and is not part of this RTL.

## Using the top level

Parameters of `prt_top`:

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 8, 6 | PE array |
| `IMG_W`, `IMG_H` | 128, 128 | frame size in pixels (one task per pixel) |
| `TILE` | 8 | clustering tile side (power of two, divides `IMG_W`) |
| `NCLUST` | 64 | cluster table entries |

OBJMEM is 256 x 144 bits per PE (`prt_pkg::OBJ_AW`). The 16-bit coordinate
width and the 24 fractional bits are package constants.

Sequence:

1. Reset (`rst_n` low, asynchronous).
2. In RT mode, write the scene with `obj_we/obj_waddr/obj_wdata`. Use
   `bbox2word()` for box records at addresses `0 .. nbbox-1`. Put triangles
   (`tri_t`, three vertices) anywhere above them. A box record names its first
   triangle (`tri_base`), its triangle count and its albedo. Set `nbbox`, the
   camera (`cam_org`, `cam_cx`, `cam_cy`, `cam_f > 0`) and the light direction
   `light`, pointing towards the light with components below 2^14.
3. Pulse `cl_start` and stream the attribute maps on `pix_valid`/`pix`
   (accepted while `pix_ready`). Wait for `cl_done`.
4. Pulse `start`. Collect `px_valid/px_id/px_color` until `frame_done`.

Simulate the full-size end-to-end test with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb \
    rtl/prt_pkg.sv tb/tb_prt_full.sv --top-module tb_prt_full -o sim
./obj_dir/sim
```

It takes about 15 s to build and 3 s to run. Each testbench prints
`TB_RESULT checks=N failures=M`. Swap in any other `tb/tb_<block>.sv` and its
module name to test one block.

## Verification

Every block has a self-checking testbench, and each testbench fails against a
deliberately broken copy of its block.

* Arithmetic units are checked against the simulator's own operators and
  against real-valued geometry.
* The PE, `tb_prt_top` and `tb_prt_full` compare every pixel with
  `prt_ref_pkg`. This reference renderer uses real arithmetic for
  intersections, normals and cosines. It skips pixels whose outcome hinges on
  a grazing test (about 1%) and allows object pixels 3 codes of rounding.
* The end-to-end tests count each mechanism and fail if one never occurs:
  * TBBOX hit;
  * EBBOX skipped by a primary ray;
  * triangle hit;
  * background pixel;
  * shadowed background pixel;
  * memory access conflict;
  * tile merged into a cluster;
  * IR-mode MAC after a mode switch.
* Checked latencies: MAC 1 cycle; divide 64; square root 32; BBIE 1; TIE 2;
  PPCD 2; clustering `TILE^2 + 1` cycles per tile.

## Where this design departs from, or goes beyond, the processor it implements

* **Shading.** The per-pixel shading algorithm is this design's own: Lambert
  with one directional light and a shadow factor of one half. Reflection and
  refraction rays (mirror and glass materials) are not traced.
* **Sizes.** The following are this design's own choices: image size,
  OBJMEM size, tile size, cluster count, all number formats, and the latencies
  of the divider and square root. Only the 8 x 6 array, the 8/16/32-bit MAC
  and the 64-bit divide and square root are fixed by the design this RTL
  implements.
* **Compression.** Background compression uses a two-level table at tile
  granularity. Savings of several thousand times over the raw map would need
  larger tiles or a different per-pixel code.
* **Spheres.** There is no sphere primitive. Spheres must be given as
  triangles.
* **Scheduling.** One task is one pixel. Tiles of pixels per task, or
  secondary rays as separate tasks, are not modelled.
* **Clock gating.** The gating is coarse: one gate for the traversal hardware
  and one per iterative unit.
* **Not included.** The CNN encoder and decoder, the chip's pads, clocking and
  host interface are not included. All configuration is through top-level
  ports.

## Capacity against the evaluated scenes

Per PE, OBJMEM holds 256 words, shared between box records and triangles.

* **Utah teapot and Stanford bunny: do not fit.** The common teapot mesh has
  about 6,300 triangles and the original bunny about 69,000, so neither fits
  as a whole. They would need OBJMEM to grow (`OBJ_AW`), or the object to be
  rendered in parts.
* **Teacup and four-sphere scenes: unknown.** Their triangle counts are not
  known.
* **Frame rate.** The frame rates of the evaluated scenes depend on a
  resolution and clock not fixed here. At 164 k cycles per 128 x 128 frame of
  the test scene, 26 frames/s needs a clock of about 4.3 MHz.
