# Low-latency stereo pixel streaming for a mixed-reality headset

A head-mounted display feels wrong when the picture lags behind the head.
This design cuts that lag by never storing the displayed image. The
processor writes the newest head pose into registers. For every pixel the
display is about to show, the hardware works out where that pixel comes from
in a pre-rendered 360-degree scene, a cubemap held in DRAM. It reads that one
pixel and sends it straight to the display. This is post-render warping
("timewarp") done as an inverse mapping in raster order. Correction for the
curved combiner lenses is folded into the same per-pixel lookup.

There are two identical engines, one per eye. Each drives a 240 Hz
640x480 display. The whole design runs on the pixel clock: 9.92 ns, with
800x525 clocks per frame. An engine therefore finishes a frame every 420,000
clocks (4.17 ms). A small rasteriser draws flat-coloured polygons (the
projected faces of AR objects) over the stream. In AR mode it draws them on
black, with no DRAM reads at all.

## Data path of one eye

```
 pose regs ──► quat_to_rot ─┐ (sampled once per frame)
                            ▼
 raster dispatcher ──► 8 lanes, lane i handles pixel x0+i of each group of 8
   lane:  lens_lut bank ─► index_calc ─► FIFO(16) ─► pixel_fetch ◄──► DRAM port
                                                        │
 pixel_packer (8 x 24-bit word) ◄────────────────────────┘
        │
 vector_graphics (polygon overlay, 3 stages)
        │
 video FIFO (16,384 words of 8 pixels) ─► video_controller ─► RGB/DE/HS/VS
```

* **Raster dispatcher** (inside `pixel_streaming_engine`). It walks the
  destination image 8 pixels at a time and issues a group only when all 8
  index units can take it. At the end of a frame it waits for the index
  pipelines to drain, which takes about 15 clocks. It then samples the
  configuration and rotation for the next frame, so a whole frame uses one
  pose. After that it runs ahead of the display until back-pressure from the
  full video FIFO stops it.
* **Lanes.** DRAM latency is long and random, and the source pixels are
  scattered, so bursts and caching do not help. Throughput therefore comes
  from eight independent lanes, each with reads in flight. FIFOs between the
  units let each unit run at its own rate.
* **Pixel packer.** It waits until every lane holds its next pixel, then
  forms one 8-pixel word. The packer keeps its own raster position and marks
  the first word of a frame (`sof`).
* **Video FIFO and controller.** The FIFO absorbs DRAM jitter and refills
  during blanking. The controller pops one word every 8 active clocks and
  shifts it out one pixel per clock.

## Per-pixel index calculation (`index_calc`)

This is the core of the design. Each lane has one 15-stage pipeline that
accepts one pixel per clock:

| stage | work |
|---|---|
| 1 | Read the lens map: (x, y) gives the source position (sx, sy) and a valid bit. |
| 2 | Form the view ray p = (sx-320, sy-240, 320). If translation is enabled, also subtract (tx, ty, tz). |
| 3 | Rotate by the inverse pose: r = Rᵀ·p. The inverse of a rotation is its transpose. |
| 4 | Pick the cube face and form the numerators \|sc\|·500 and \|tc\|·500. |
| 5–14 | Run a radix-2 restoring divider by \|major component\|, two quotients of 10 bits each. |
| 15 | Compute u,v = 500 ± quotient (clamped to 999) and the address base + 4·(face·10⁶ + v·1000 + u). |

Notes on the arithmetic:

* **Focal length.** 320 pixels gives a 90° horizontal field of view over 640
  columns.
* **Rotation matrix.** `quat_to_rot` builds R from the quaternion
  (qw,qx,qy,qz) with the standard formula: R₀₀ = a²+b²-c²-d², R₀₁ = 2bc-2ad,
  and so on. The quaternion is signed Q1.14 and R is signed Q3.14 (18 bits).
  The products are summed at full precision and then shifted down with
  truncation. R is registered once and shared by both eyes.
* **Precision of r.** r keeps 4 fraction bits, 23 bits signed.
* **Cube faces.** The convention is the usual graphics one. The component
  with the largest magnitude picks the face: +X,-X,+Y,-Y,+Z,-Z = faces 0..5.
  The two other components, in the orders (-z,-y), (z,-y), (x,z), (x,-z),
  (x,-y), (-x,-y), give (sc, tc). Coordinates: x to the right, y down,
  z forward. Ties go to X, then Y.
* **Face layout in DRAM.** The faces are 1000x1000 pixels of 32 bits, stored
  one after another: face f starts at base + 4·10⁶·f. RGB is in bits 23:0.
* **Nearest-neighbour sampling.** The quotient is truncated. There is no
  filtering.
* **Skipped pixels.** If the lens map entry is invalid, or AR mode is on, the
  pixel is marked skip. It leaves the fetch unit as black without a DRAM read.

The whole pipeline stalls when its last stage holds a result that nobody
takes. The lens map bank is read with `rd_en = in_ready`, so its output
register holds during a stall.

## Lens map

There is one 640x480 map per eye, with one entry per destination pixel:
`{valid, source y[8:0], source x[9:0]}`. So there are separate column and row
tables, looked up by the destination pixel. Each eye's map is split into 8
banks by `x mod 8`, so each lane reads its own bank once per clock. A bank is
38,400 x 20 bits and the read latency is one clock. The map is loaded over
the register bus. It is also what makes the two eyes' images converge.

## Memory side

* **`pixel_fetch`.** It keeps up to 16 reads in flight. A 1-bit tag FIFO
  records, in order, whether each accepted request was a read or a skip.
  Returned data goes to a 16-deep FIFO. A request is accepted only while the
  tag FIFO has room, so the response channel needs no ready signal.
* **`mem_arbiter`.** This is the interconnect. There are four of them in the
  top level. Each puts 4 lanes onto one DRAM read port with round-robin
  grant, tagging each request with the lane number as a 2-bit ID. Responses
  are routed back by ID. HP port 2e+k serves lanes 4k..4k+3 of eye e.
* **DRAM port protocol.**
  * Request: `ar_valid`/`ar_ready`, a 32-bit byte address and a 2-bit ID.
  * Response: `r_valid`, 32-bit data and the ID.
  * Responses with the same ID must come back in order (as in AXI).
    Responses with different IDs may interleave.
* **Bandwidth.** Each eye needs 0.73 reads per clock on average: 307,200
  active pixels per 420,000 clocks. Its two ports can take 2 per clock.

### Access pattern versus head pose

Because every output pixel is inverse-mapped into the cubemap, the order of
DRAM reads depends on the pose. `tb_memory_poses` runs three full-size
stereo frames with different poses and counts the distinct 64-byte DRAM
lines read for the first 8 scanlines:

| pose | left | right | shared by both eyes |
|---|---|---|---|
| 5 degrees yaw | 339 | 355 | 0 |
| 90 degrees roll | 405 | 405 | 0 |
| 180 degrees roll | 213 | 220 | 2 |

With a small rotation the scanlines run along cubemap rows, so neighbouring
pixels share lines. With a 90 degree roll each output row walks down a
cubemap column and touches a new line on almost every read. The two eyes
look at different parts of the cubemap and hardly share lines, so a shared
cache between the eyes would gain little. The output timing does not depend
on the pose: the testbench requires zero underflows in all three frames.

## Video timing, fill time and underflow (`video_controller`)

* **Timing.** 640x480 active inside 800x525. The porches and syncs are the
  standard 640x480 ones: 16/96/48 horizontal, 10/2/33 vertical, with syncs
  active low. Outputs are registered.
* **Fill wait.** After `enable` rises the controller waits 16,000 clocks
  (0.16 ms) so the FIFO can fill, then runs frames back to back. Because of
  the output register, the first active pixel appears 16,001 clocks after the
  enable edge.
* **Underflow.** If the FIFO is empty when a word is due, the 8 pixels go
  out black and the underflow counter is incremented.
* **Re-alignment.** During vertical blanking, any head-of-FIFO word that is
  not a frame's first word is dropped and counted. After an underflow, the
  next frame therefore starts on the right word again.

## Vector graphics (`vector_graphics`)

* **Polygons.** Up to 9 convex polygons per eye, each with 4 vertices
  (signed 12-bit screen coordinates) and a colour. A triangle repeats a
  vertex.
* **Inside test.** The unit evaluates the four edge functions
  E = (x-xj)(yk-yj) - (y-yj)(xk-xj) for every pixel. A pixel is inside when
  no edge function is negative, or none is positive, and at least one is
  non-zero. Both windings work.
* **Overlap.** The highest-numbered covering polygon wins.
* **Parallelism and pipeline.** All 8 pixels of a word are tested in
  parallel. The three pipeline stages are products, signs, and colour
  select.
* **Sampling.** Polygons are sampled when a frame's first word enters, so
  they change only at frame boundaries. The projection of 3D objects to
  these 2D vertices is done by the processor, not here.
* **Boxes.** A box seen from outside shows at most three faces, so 9
  polygons per eye cover three boxes. The host draws the farthest box into
  the lowest slots, so that the overlap rule acts as a painter's algorithm.
  `tb_ar_boxes` does this projection for two head poses and both eyes. It
  then checks every displayed pixel, the left/right disparity, and that the
  boxes shift on screen when the head turns.

## Registers (`pose_regs`, AXI4-Lite, 24-bit byte address, full-word access)

| address | content |
|---|---|
| 0x000 | CTRL: [0] enable, [1] AR mode, [2] translation enable |
| 0x004 | cubemap base byte address |
| 0x008..0x014 | qw, qx, qy, qz, signed Q1.14 in bits 15:0 |
| 0x018..0x020 | tx, ty, tz, signed pixels in bits 11:0 |
| 0x024 / 0x028 | read-only: underflow counts / frame counts {right, left} |
| 0x100 + eye·0x200 + p·0x20 + 4j | polygon p vertex j: x[11:0], y[27:16] |
| 0x100 + eye·0x200 + p·0x20 + 0x10 | polygon p: [24] enable, [23:0] colour |
| addr[23] = 1 | lens map write: eye = addr[22], y = addr[20:12], x = addr[11:2], data {valid[31], sy[24:16], sx[9:0]} |

Each write takes AW and W together and answers one clock later. Reads answer
one clock after AR. Byte strobes are ignored. Reset loads the identity
quaternion and zeroes everything else. Use `enable` to start streaming once;
there is no restart without reset.

## Parameters

| parameter | default | origin |
|---|---|---|
| `LANES` (package) | 8 | source design ("8 pixels per clock") |
| `VFIFO_DEPTH` | 16,384 | source design (quoted there as 16,348 elements; taken as 2¹⁴) |
| `FILL_CYCLES` | 16,000 | source design |
| video 640x480 in 800x525 | — | source design (the 525 follows from its 9.92 ns clock at 240 Hz) |
| cube face 1000x1000, 4-byte pixels | — | source design |
| `N_HP` | 4 | source design (four DRAM ports) |
| `N_POLY` | 9 | own choice: three boxes with up to three visible faces each |
| `FOCAL` | 320 | derived from the 90° horizontal field of view |
| `OUTST`, `IDX_DEPTH` | 16, 16 | own choice |
| fixed-point formats, porches, register map | — | own choice |

## How far to trust it, and where it departs from the source design

* The source design built the pixel engine with high-level synthesis and
  vendor AXI crossbars. Its internal structure is only described in outline.
  The dispatcher, lane banking of the lens map, fixed-point formats, divider,
  cube face convention, FIFO depths between units, register map and the
  underflow re-alignment are this design's own choices.
* The source design describes the cubemap as needing "an additional task to
  determine the correct cube face". How it does that is not given; the
  major-axis method here is the standard one.
* Not in this RTL: the DRAM and its controller, the processor (pose
  acquisition and 3D-to-2D projection), the HDMI transmitter cards, the
  tracking camera, the projectors, and the embedded GPU. The testbenches
  contain a simple DRAM model.
* The design is fixed at 640x480. Other resolutions need new constants in
  `mr_pkg` and a larger lens map.
* Every module passes Verilator lint and a second SystemVerilog front end.
  Logic synthesis and timing at 100 MHz on an FPGA have not been checked.

## Files

| file | content |
|---|---|
| `rtl/mr_pkg.sv` | shared constants and types |
| `rtl/headset_top.sv` | top level: registers, rotation, two engines, interconnect |
| `rtl/pixel_streaming_engine.sv` | one eye |
| `rtl/pose_regs.sv` | register file |
| `rtl/quat_to_rot.sv` | rotation matrix |
| `rtl/lens_lut.sv` | lens map bank |
| `rtl/index_calc.sv` | per-pixel index calculation |
| `rtl/pixel_fetch.sv` | fetch unit |
| `rtl/mem_arbiter.sv` | interconnect |
| `rtl/pixel_packer.sv` | pixel packer |
| `rtl/vector_graphics.sv` | polygon overlay |
| `rtl/video_controller.sv` | video controller |
| `rtl/sync_fifo.sv` | FIFO |
| `tb/tb_<module>.sv` | self-checking testbench per module |
| `tb/tb_ref_pkg.sv` | reference models used by the testbenches |
| `tb/tb_memory_poses.sv` | DRAM access pattern for three head poses |
| `tb/tb_ar_boxes.sv` | AR overlay of three projected boxes, stereo |

Each testbench prints `TB_RESULT checks=N failures=M`. They check against
independent integer models in `tb_ref_pkg`:

* DRAM words are a hash of the address.
* The test lens map is a mild bend whose sign differs between the eyes.

`tb_headset_top` runs the full-size design end to end, in about a minute:

1. It loads both 307,200-entry lens maps over the bus.
2. It streams 11 frames per eye and compares every pixel of every complete
   frame with the reference model.
3. Along the way it changes the pose, turns on translation, switches to AR
   mode and back, and slows the DRAM until the video FIFO underflows.

It requires each of these to have happened: FIFO-full stall, interconnect
contention, DRAM back-pressure, off-map pixels, AR frames, translated
frames, polygon pixels, underflow and re-alignment. It also checks the
420,000-clock frame period and the fill wait.

## Simulating with Verilator

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_headset_top \
  -y rtl -y tb +libext+.sv rtl/mr_pkg.sv tb/tb_ref_pkg.sv tb/tb_headset_top.sv -o sim
./obj_dir/sim +verilator+rand+reset+2
```

Replace `tb_headset_top` with any other testbench name. Lint a module with
`verilator --lint-only -Wall -y rtl rtl/mr_pkg.sv rtl/<module>.sv`.
