# Blob analysis on a wired-dataflow pixel stream

This is the RTL of a real-time blob analysis front end. The design is built
as a chain of image operators that a pixel stream flows through at one pixel
per clock. None of them can stall the stream.

- The rotation core turns each grey-level image about its centre.
- A threshold turns it into a binary image.
- A connected components labeler (CCL) gives every blob of foreground pixels a unique label.
- Three measurement cores report the area, bounding box and centre of gravity of every blob.

Two of these operators are "irregular": they cannot produce an output pixel
from a small neighbourhood of input pixels.

- **Labelling** needs the whole image before any final label is known.
- **Warping** reads its input in an order set by the transformation, not the scan order.

Both are still wrapped so that, seen from outside, they take one pixel per
clock and give one pixel per clock, like any streaming filter. The price is
one or two images of latency and two copies of each core working in
ping-pong. Most of this README is about how that works.

```
             angle                threshold            discard
               |                      |                   |
 grey in -> [rotation] -> grey -> [bin] -> 0/1 -> [on-the-fly CCL] -> labels out
             (2 warpers)                          (2 labelers)        |
                                                        +-------------+-------------+
                                                        |             |             |
                                                    [centroid]     [area]     [bounding box]
```

All parameters of all operators arrive through one 32-bit configuration
FIFO and one configuration controller.

## Pixel stream and configuration

**Stream.** Every operator uses the same stream interface:

- `valid`: one pixel this clock.
- `flags` (`rtip_flags_t`): `sof` on the first pixel of an image, `eol` on the last pixel of each line, `eof` on the last pixel of the image.
- The data.

Pixels come in raster order. Gaps (cycles with `valid` low) are allowed anywhere. There is no ready signal: an operator must accept a pixel every clock. Frame width is taken from the `eol` flags. Frame height is a configuration value that the labeler needs to know which row touches the bottom border.

**Parameter sampling.** Operators sample their run-time parameters at their own `sof`. A parameter change therefore never splits an image. Because each operator samples at its own `sof`, a change reaches the operators in the order the images do.

**Configuration words.** Each word is `{op[31:24], reg[23:16], value[15:0]}`:

| op | reg | parameter | reset value |
|----|-----|-----------|-------------|
| 0 frame  | 0 | width (clamped to `X_MAX`) | `X_MAX` |
| 0 frame  | 1 | height (clamped to `Y_MAX`) | `Y_MAX` |
| 1 rotate | 0 | angle, 16-bit binary angle (65536 = full turn; a positive angle turns the picture clockwise as displayed, rows counting downwards) | 0 |
| 2 bin    | 0 | threshold (`value[7:0]`, low `PW` bits used); foreground is `pixel >= threshold` | 128 (write it when `PW` < 8) |
| 3 ccl    | 0 | bit 0: replace blobs touching the border by label 255 | 0 |

The controller takes one word per clock whenever its FIFO is not empty. If a word targets an unknown operator or register, it is dropped and `cfg_err` pulses.

## Connected components labeling

### The algorithm

The labeler uses the classical two-pass method with 4-connectivity.

**First pass** (`ccl_pass1`). It looks at the current pixel, its left neighbour and its top neighbour (an L-shaped mask). The top neighbour comes from a one-line buffer of temporary labels. For a foreground pixel:

- With no labelled neighbour, it gets a new label.
- With one labelled neighbour, or two with the same label, it gets that label.
- With two different labels, it gets the smaller one. The pair (larger, smaller) is written into the equivalence table.

A pair identical to the last one written is not written again. This matters because a single boundary between two regions yields the same pair on every row.

Each label that touches the image border is reported to the resolver. This feeds the optional border-blob discard.

**Frame delay** (`frame_delay`). An ordinary operator that stores one image and outputs, for each incoming pixel, the value stored at the same position one image earlier. It is read before it is written, so one memory of `X_MAX*Y_MAX` words serves as both stores.

**Equivalence resolution** (`ccl_equiv_resolve`). It runs between the two passes and turns the pairs into one final label per class. It is described below.

**Second pass** (`ccl_pass2`). It reads the temporary labels back out of the frame delay, one image later, and replaces each with its final label from the resolver's table. 0 stays 0. With discard on, a blob that touches the border becomes 255.

Limits:

- 254 labels: 8-bit labels, with 255 reserved for discarded blobs.
- `N_PAIRS` = 512 table entries.

When a frame needs more labels, the last label is reused and `label_ovf` pulses. Excess pairs are dropped and `pair_ovf` pulses. The image is still labelled, but possibly wrongly.

### Equivalence resolution by repeated table scans

The table is a plain memory holding two label columns. No content-addressable memory is used. Classes are found by a depth-first search:

1. Visit the temporary labels 1, 2, ... in order.
2. A label not yet assigned starts a new class. Its final label is its own number, and it is pushed on a stack.
3. Pop a label. Scan the whole pair table, one entry per clock.
4. Every still-unassigned label found paired with the popped one joins the class and is pushed.
5. Move on to the next label when the stack is empty.

Because labels are visited in increasing order, every class is named after its smallest temporary label. Final labels therefore stay within 1..254. They need not be consecutive: in a small example with temporary labels 1..5 where 3≡2 and 4≡3, the finals are 1, 2 and 5.

A label that appears in no pair is known from a bit the first pass sets. It costs one clock and needs no scan.

The cost is one table scan per label in a pair, so the time is O(labels × pairs). In the worst case it is about 254 × (512 + 2) ≈ 130,600 clocks. The resolver reports the cycles it used (`res_cycles_*`) and whether a class touches the border.

### On-the-fly operation: two labelers in ping-pong

A single labeler (`ccl_labeler`: pass 1 → frame delay → pass 2, with the resolver beside them) works on two images at once:

- Pass 1 labels image n+1 into the frame delay.
- Meanwhile, pass 2 reads out image n.

Resolution of image n can only start once pass 1 of image n has ended. It must also be finished before pass 2 of image n begins, and that pass begins when image n+1 starts. In a single labeler these windows collide.

`ccl_pingpong` therefore uses two labelers:

- A switch that toggles at every `sof` sends odd images to one labeler and even images to the other.
- A multiplexer, whose select is delayed by the labeler latency, merges the outputs.

Timeline of both labelers:

```
input image:       1        2        3        4        5
odd  labeler:   pass1(1)  resolve  pass1(3)  resolve  pass1(5)
                                   pass2(1)           pass2(3)
even labeler:            pass1(2)  resolve  pass1(4)  resolve
                                            pass2(2)
labels output:                      img 1    img 2    img 3
```

The labels of image n leave while image n+2 enters, 3 clocks behind it.

**Resolution budget.** Each labeler has one whole image period for its resolution: from the end of its image to the start of its next image, which comes two images later. If the search is still running when that `sof` arrives, `overrun` pulses. The search is then abandoned and the image is labelled from an incomplete table.

In pixel clocks, an image of X × Y pixels gives the resolver about X·Y clocks. A safe bound for the table scan is N(N−1) for N pairs. With N = 512 this is 261,632 clocks, so images of at least 512 × 511 pixels never overrun whatever their content. The resolver here needs about half of that in its worst case. Smaller images work as long as they contain few pairs.

Each labeler resolves its table on its own; the two tables share nothing.

## Rotation: inverse-mapping warper

The rotation core maps every output pixel (x, y) back to a source position:

- u = ux·x + uy·y + u0
- v = vx·x + vy·y + v0

The output pixel is the source pixel nearest to (u, v), or 0 when (u, v) falls outside the source image. This is inverse mapping with nearest-neighbour interpolation: one pixel in and one pixel out per clock.

**Sub-blocks:**

- `warp_affine` walks the output raster. It adds the coefficients to Q16.16 accumulators instead of multiplying: `ux`, `vx` along a line, and `uy`, `vy` from line to line. It rounds to the nearest integer and flags positions outside the image.
- `warp_frame_buffer` holds one source image and is read at (u, v).
- `warp_core` ties the two together. The output is 2 clocks behind the scan.
- `warp_pingpong` holds two `warp_core`s. While one stores image n+1, the other produces the rotated image n in step with the incoming pixels. So the rotated image n leaves while image n+1 enters, and its timing (flags, gaps) is that of image n+1.

**Coefficients.** `rot_coef` produces the six coefficients from the angle and the frame size:

- It is an iterative CORDIC with 18 micro-rotations and 30-bit fractions.
- Arctangent constants are computed at elaboration: `round(atan(2^-i) · 2^24 / 2π)`.
- The rotation is about the image centre ((W−1)/2, (H−1)/2):
  - u = c(x−cx) + s(y−cy) + cx
  - v = −s(x−cx) + c(y−cy) + cy
- It runs continuously and follows a new angle within 40 clocks. The warper samples the coefficients at its `sof`.

Any other affine map can be obtained by driving `warp_pingpong` with other coefficients.

## Measurement cores

`blob_area`, `blob_bbox` and `blob_centroid` watch the labelled stream.

**Collection.** Each keeps one record per label in two banks:

- The bank being filled is cleared lazily: a per-label "seen" bit marks which records are valid.
- At `eof` the banks swap and `frame_done` pulses.
- Results of an image can be read from then until the end of the following image.
- Labels 0 and 255 are ignored.

**Read ports:**

- Area and bounding box are read combinationally by label.
- The centre of gravity needs a division. A request starts a shared restoring divider. The result (the truncated means of x and y) is acknowledged `max(XW, YW) + 1` clocks later, or after one clock if the label is absent.

## Latency summary

| stage | latency |
|-------|---------|
| rotation (`warp_pingpong`) | one image, then 2 clocks |
| binarisation | 1 clock |
| on-the-fly labeler | two images, then 3 clocks |
| whole chain (`blob_frontend`) | labels of input image n leave during input image n+3, 6 clocks behind |

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `X_MAX`, `Y_MAX` | 512, 512 | largest frame; sets frame-delay and frame-buffer sizes |
| `N_PAIRS` | 512 | equivalence table entries |
| `PW` | 8 | grey-level bits |
| `MAX_LABEL` / `BORDER_LABEL` (package) | 254 / 255 | label range |

At the defaults the top holds about 8.5 Mbit of memory:

- two frame delays of 512×512×8 bits, one per labeler;
- two frame buffers of 512×512×8 bits, one per warper;
- the label tables.

## How closely this follows the published design

**Taken from the published framework and labeler:**

- the wired-dataflow style (cascaded operators, uniform interfaces, one configuration FIFO and controller);
- the two-pass algorithm with an L mask and 4-connectivity;
- the split into first pass, library frame delay, autonomous equivalence resolver and second pass;
- plain memories with a depth-first search instead of a CAM;
- two labelers in odd/even ping-pong, with their timing;
- 254 labels, label 255 for border blobs, 512 pairs, and the N(N−1) on-the-fly bound;
- the inverse-mapping, nearest-neighbour warper built from a frame buffer and an affine transformation, in two-instance ping-pong;
- the example chain rotation → bin → CCL → centroid, area, bounding box.

**Chosen in this design, where the published description is silent:**

- the stream signals and flags;
- all bit widths;
- the configuration word format and reset values;
- the order of the depth-first search, and hence the rule "final label = smallest temporary label of the class";
- skipping repeated pairs;
- no link from the resolver to the frame delay: the original block diagram draws one but does not say what it carries, and a plain frame delay needs nothing from the resolver;
- what happens on label or pair overflow, and on overrun;
- the CORDIC coefficient unit, the rotation centre and the sign of the angle;
- Q16.16 coordinates, rounding, and background 0 outside the source image;
- the measurement cores' insides and read ports (the original only names them);
- `>=` as the threshold comparison.

**Not built:**

- the framework's library of other operators (convolutions, filters, FFTs and so on);
- the FPGA boards;
- the CAM-based resolver, which was considered and rejected for the labeler.

**Clock rate.** The labeler in the original was run at 50 Mpixel/s and on a 30 frames/s stream. This RTL processes one pixel per clock, but its clock rate has not been measured on any device.

## Files

`rtl/`:

| file | content |
|------|---------|
| `rtip_pkg.sv` | stream flags, label constants, coefficient and configuration types |
| `blob_frontend.sv` | top: the full chain |
| `rtip_sync_fifo.sv`, `rtip_config_ctrl.sv` | configuration FIFO and controller |
| `rot_coef.sv`, `warp_pingpong.sv`, `warp_core.sv`, `warp_affine.sv`, `warp_frame_buffer.sv` | rotation |
| `bin_threshold.sv` | binarisation |
| `ccl_pingpong.sv`, `ccl_labeler.sv`, `ccl_pass1.sv`, `frame_delay.sv`, `ccl_equiv_resolve.sv`, `ccl_pass2.sv` | labeling |
| `blob_area.sv`, `blob_bbox.sv`, `blob_centroid.sv` | measurements |

`tb/`:

- One self-checking testbench `tb_<module>.sv` per module.
- `tb_blob_frontend_full.sv` runs the top at its default sizes.
- `tb_ccl_onthefly_512.sv` and `tb_blob_frontend_exotic.sv` run the two sizing cases described below.
- `ccl_ref_pkg.sv` is a software reference labeler (flood fill) used by the CCL testbenches. It also holds a small 12 × 19 example image with 5 temporary labels and two equivalent pairs.

## Simulating

With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/rtip_pkg.sv tb/ccl_ref_pkg.sv tb/tb_blob_frontend.sv --top-module tb_blob_frontend
./obj_dir/Vtb_blob_frontend
```

Replace the testbench name to run another one. `ccl_ref_pkg.sv` is only needed by the CCL and top-level testbenches.

Every testbench:

- compares the block with values computed independently inside the testbench;
- ends by printing `TB_RESULT checks=<n> failures=<n>`;
- has a watchdog that ends a hung run as a failure.

What the testbenches check:

- **Labeler testbenches.** They check every output label against the reference. This includes the border discard, the latency, the odd/even alternation, overrun on small busy images, and the resolution cycle counts.
- **`tb_blob_frontend`** runs the whole chain at 64 × 64 maximum size with 32 × 32 images. It checks every output label, area, box and centroid. Along the way it changes the angle and the threshold, and causes label overflow, pair overflow, overrun and a bad configuration word. It counts each of these events and fails if one never occurred.
- **`tb_blob_frontend_full`** streams five 512 × 512 images back to back through the top at its default parameters, rotated by 90°. It checks every label of the first two output images and the area, box and centre of every blob of the first.
- **`tb_ccl_onthefly_512`** drives the on-the-fly labeler at its defaults with 512 × 511 frames, the smallest size with a guaranteed resolution budget. The frames are built so that all 254 labels and exactly 512 pairs are used and every label takes part in a pair, which is the search's worst case. The longest resolution takes 130,560 clocks of the 261,632 available; no overrun occurs and every label is checked.
- **`tb_blob_frontend_exotic`** rebuilds the top for 654 × 567 frames of 3-bit pixels (`X_MAX = 654`, `Y_MAX = 567`, `PW = 3`), rotates by half a turn and checks every label of two images. It shows that an unusual sensor format needs only new parameter values.
