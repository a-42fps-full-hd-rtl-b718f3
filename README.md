# ORB feature extraction for full-HD video streams

This is synthesizable SystemVerilog for an accelerator that turns a stream of
1920 x 1080 grey-scale frames into ORB features. Each feature is a keypoint
`(scale, x, y)`, one of 32 orientations, and a 256-bit rotated-BRIEF
descriptor. It is an implementation of the architecture published as "A 42fps
Full-HD ORB Feature Extraction Accelerator with Reduced Memory Overhead". The
RTL, the choices where that description is silent, and the testbenches were
written independently of its authors.

The design rests on two ideas.

1. **Detection and description run at different speeds.** Keypoint detection
   runs at pixel rate on all four pyramid scales at once, with no
   back-pressure. Description works on one keypoint at a time. The two halves
   are joined only by a keypoint FIFO per scale.
2. **Patches are not kept on chip.** The smoothed image is written to external
   memory, and only for scales 0 and 2. Patches for scales 1 and 3 are made
   again on the fly from the stored scale below. Consecutive keypoints in one
   row share the patch columns they overlap, so those columns are not read
   twice.

```
 pixels ─► pad ─► scale 0 ─ds─► scale 1 ─ds─► scale 2 ─ds─► scale 3
                    │  │          │             │  │          │
              smooth│  │kp      kp│       smooth│  │kp      kp│
                    ▼  ▼          ▼             ▼  ▼          ▼
              writer0  └──────► keypoint buffer (4 FIFOs) ◄───┘   writer2
                 │                      │                           │
                 ▼                      ▼                           ▼
           ┌─────────────── external memory (scale 0, scale 2) ──────────┐
           └──────────────────────────► patch loader ◄───────────────────┘
                                          │  │
                         reuse buffer ◄───┘  └──► patch buffer
                              │  └─► orientation ─┐      │
                              └──────► descriptor ◄──────┘
                                            │
                                   descriptor buffer ─► features
```

## The pyramid: one scale detector per level

`scale_detector` is instantiated four times. Scale `s+1` is fed by the
downsampled output of scale `s`. The sizes follow from a 5-to-4 reduction
(factor 1.25) and are worked out at elaboration by `orb_pkg::scale_len`:

| scale | size        |
|-------|-------------|
| 0     | 1920 x 1080 |
| 1     | 1536 x 864  |
| 2     | 1229 x 691  |
| 3     | 983 x 553   |

A trailing group of `r` pixels yields `{0,1,1,2,3}[r]` outputs.

**Sliding window.** In each scale, seven row FIFOs (`source_buffer`, built
from `line_fifo`) feed a 7 x 7 register file (`window_regfile`). Each accepted
pixel shifts the window one column. `win[r][c]` is the pixel `c` columns left
of and `r` rows above the column directly over the accepted pixel. The window
centre is therefore 3 columns and 4 rows behind the input. `scale_detector`
tracks that offset and tags every result with the centre's frame
coordinates.

At the left edge the window wraps across rows. Those positions are discarded:
FAST only runs on centres at least 3 pixels inside the frame. Smoothed pixels
within 2 pixels of the border are written to memory but carry no meaning.

**Three units read the window at the same time:**

- **FAST-9** (`fast_detector` = 2 x `fast_test_unit` + `fast_score_unit`):
  - Sixteen comparators form a dark string and a bright string.
  - Bit `i` of the second string is the AND of the nine bits centred on `i`.
  - The flag is the OR of that string.
  - The mask is the string OR-ed with its rotations by 1 to 4, so it marks
    exactly the pixels on a passing arc.
  - The score is the sum of `|I_circle - I_centre|` over the mask, computed
    by an adder tree.
  - All of this is combinational.
- **Smoothing** (`smoothing_unit`):
  - 5 x 5 binomial kernel (`[1 4 6 4 1]` outer product, divided by 256).
  - Built from six groups of equal-weight taps using shifts and adds only.
  - Only scales 0 and 2 instantiate it.
- **Downsampling** (`downsampler`):
  - Works on the newest 2 x 2 corner of the window.
  - In each group of five source pixels, phase `k+1` emits output `k`:
    `I0`, `(3 I1 + I2) >> 2`, `(2 I2 + 2 I3) >> 2`, `(I3 + 3 I4) >> 2`.
  - The same filter is applied horizontally on two rows, then vertically.

**Padding rows.** A scale's pipeline is several rows deep, so the last rows
of a frame would stay inside it until the next frame pushes them out. The top
therefore appends `PAD_ROWS` (20) rows of zeros to every frame and holds
`in_ready` low while it does. Those rows are downsampled too, so every scale
is flushed.

## Non-maximum suppression and the score recorder

`nms_3x3` makes a row-wise 3 x 3 test in four stages:

- M0 and M1 compare a pixel with its left and right neighbours.
- M2 compares it with the three pixels of the row above.
- M3 compares it with the three pixels of the row below.

A candidate buffer of `W-1` entries `{flag, keep, score}` keeps the rows
aligned. Neighbours are judged by their original FAST flags, so the result is
exactly "a corner whose score is higher than every corner neighbour". Equal
scores suppress neither pixel. The result for row `y` comes out while row
`y+1` streams in.

`score_recorder` spreads keypoints evenly over the image instead of keeping a
global top-N.

- **Segments and tables.** Each row is cut into eight segments. Two record
  tables take turns, one segment each.
- **Score steps.** A table holds eight steps,
  `S_j = 9t + (4080 - 9t)·j/8`, where `t` is the FAST threshold. It also holds
  eight counters: `N_j` counts the segment's keypoints scoring above `S_j`.
- **Pointer.** The pointer is the first `j` with `N_j < tn`.
- **Threshold.** At the end of the segment, the threshold is
  - `t_s = S[ptr]` if `N[ptr] > tn/2`,
  - otherwise `t_s = (S[ptr] + S[ptr-1]) / 2`, with `S[-1] = S0`.
- **Filtering.** Keypoints wait in a local FIFO (256 entries), tagged with
  their table. Once their threshold is known, they pass only if they score
  above it.

With `tn = 255` every NMS survivor passes. Small `tn` keeps only the few best
keypoints per segment.

## From keypoints to patches

`keypoint_buffer` holds four FIFOs, one per scale, each 512 x 22 bits. Its
arbiter stays on the FIFO it served last while that FIFO's head is in the
same row. Consecutive keypoints of a row therefore reach the loader together
and can share columns. Otherwise it goes round robin.

`patch_loader` is the most involved block. For each keypoint it goes through
these steps:

1. **Border.** The 43 x 43 patch (radius 21) must lie inside the scale.
   Otherwise the keypoint is dropped and counted in `n_border`. Radius 21
   covers a 31-pixel pattern rotated by 45°.
2. **Reuse.** Suppose the previous keypoint had the same scale and row, and
   lies `d < 43` columns to the left. Then its columns are still in the
   `reuse_buffer`, and only the `d` new columns are needed. The reuse buffer
   addresses a column by `x mod 43`, so shared columns never move.
3. **Scale mapping.** Scales 1 and 3 are not stored.
   - Target column `X` needs source columns `5(X/4) + X%4` and, when
     `X%4 != 0`, the next one; rows likewise.
   - The loader reads that region of the scale below.
   - The bytes pass through the same 5-to-4 filter as the detector's
     downsampler: horizontally on the fly, vertically against one kept row.
   - The result matches the detector's own downsampling of the smoothed
     scale, not a smoothed downsampled scale. This is a small, deliberate
     approximation.
4. **Wait.** Fetching starts only when the smoothed-image writer reports,
   through `rows_done`, that every needed row is stored.
5. **Fetch and stream.** Bytes are read one per request on the read channel,
   in order, and written into the reuse buffer. A second pointer walks the
   patch in raster order, one row behind the fetch. It reads each pixel back
   from the reuse buffer and writes it to the `patch_buffer` and the
   orientation unit, one pixel per cycle. Reused columns are already in
   place, so the stream only waits where the fetch has not yet reached.
   A patch therefore takes about max(fetch time, 1849) cycles.
6. **Stream tail.** Once the fetch has finished, the pointer runs freely to
   the last pixel.
7. **Hold.** The loader takes no new keypoint until the descriptor is done,
   because both buffers are read during descriptor generation. It starts a
   keypoint only when the descriptor buffer has room for its feature.

The first pixel of a new frame (`new_frame`) invalidates the columns kept for
reuse.

## Orientation and descriptor

`orientation_unit` takes the patch as it streams by.

- Two MACs accumulate `m_x = Σ x·I` and `m_y = Σ y·I` over the disc
  `x² + y² ≤ 15²`.
- A 20-step restoring divider then forms `min(|m_x|,|m_y|) / max(...)` as a
  20-bit fraction.
- The fraction is compared with `tan(5.625°)`, `tan(16.875°)`,
  `tan(28.125°)` and `tan(39.375°)`.
- The result is folded by octant and quadrant into an id `0..31`, i.e.
  `round(atan2(m_y, m_x) / 11.25°) mod 32`.
- `out_valid` comes 22 cycles after the last pixel.

`descriptor_gen` makes one binary test per cycle.

- Each test pair is rotated by the orientation using a 9-entry Q8 sine table:
  `x_r = x cos − y sin`, `y_r = y cos + x sin`.
- Coordinates are rounded and clamped to ±21.
- Pixel `a` is read from the reuse buffer (slot-addressed) and pixel `b` from
  the patch buffer, both in the same cycle.
- Bit `i` is `p(a_i) < p(b_i)`.
- The descriptor is complete 258 cycles after `start`.

**The test pattern is not the trained ORB pattern.** Those 256 pairs are not
part of this design's source. The pairs are generated at elaboration by a
32-bit xorshift (shifts 13, 17, 5; seed `0x2545F491`), with each coordinate
`(v mod 31) − 15`. To reproduce OpenCV descriptors, replace
`descriptor_gen::make_pattern`.

`descriptor_buffer` queues finished features, 100 entries of 285 bits, for
the output port.

## Top-level interface (`orb_top`)

| port | dir | meaning |
|------|-----|---------|
| `cfg_t`, `cfg_tn` | in | FAST threshold; keypoints per segment for the score recorder |
| `in_valid/in_ready/in_sof/in_pix` | in/out | pixel stream. One pixel per cycle at most. `in_sof` marks a frame's first pixel. `in_ready` is low only while padding rows are inserted. |
| `wr0_*`, `wr2_*` | out | byte writes of smoothed scale 0 (at `BASE0 + y·W + x`) and scale 2 (at `BASE2 + y·W2 + x`), valid/ready |
| `rd_valid/rd_ready/rd_addr`, `rsp_valid/rsp_data` | out/in | byte reads. Responses return in request order, at any latency. |
| `f_valid/f_ready/f_data` | out | features `{scale[1:0], x, y, orient[4:0], desc[255:0]}`, with `desc[i]` = test `i` |
| `kp_pulse`, `n_fetch`, `n_reuse`, `n_border` | out | statistics: keypoints entering each FIFO, bytes read, keypoints that reused columns, border drops |
| `rec_overrun`, `kp_overflow`, `sm_overflow` | out | sticky error flags: a local keypoint buffer, a keypoint FIFO or a smoothed-pixel FIFO had to drop data |

**Timing and back-pressure:**

- The detector never stalls the input apart from the padding rows.
- The write channels must on average keep up with one byte per pixel per
  stored scale.
- Each writer FIFO (3840 entries) absorbs two full-HD rows of stalls, and
  horizontal blanking gives it time to drain.
- All flip-flops use an asynchronous active-low reset. Memories are not
  reset.

## Size, speed and how they compare

**On-chip memory.** The arrays at default parameters add up to about
612 kbit. The published design states 583 kbit.

| buffer | here | published |
|--------|------|-----------|
| source buffers, 7 rows x 5668 px | 310 kb | 310 kb |
| candidate buffers | 77 kb | 97.5 kb |
| smoothed-image FIFOs | 67.5 kb | 60 kb |
| keypoint FIFOs | 44 kb | 44 kb |
| local keypoint buffers | 35 kb | in "others" |
| reuse + patch buffer | 2 x 14.4 kb | 2 x 14.5 kb |
| descriptor buffer | 27.8 kb | 28.2 kb |

The rest of the difference is small items. The local keypoint buffers
between each detector and the keypoint FIFOs are counted separately here.
Each smoothed-image FIFO entry carries one frame-start bit next to the
pixel.

**Throughput.** Without memory stalls a feature takes about 2130 cycles:

- 1849 cycles for the patch, with the fetch overlapping the stream;
- 22 cycles of orientation;
- 258 cycles of descriptor.

Memory stalls lengthen the fetch. The full-size simulation used a memory
that refuses 20 % of read requests. It handled one 1080p frame with 1555
features in 4.58 M cycles, about 2950 cycles per feature. At 100 MHz, 1000
features per frame therefore take about 21 to 30 ms, depending on the
memory. That is 34 to 47 fps, around the published 42 fps.

**External memory.** Per full-HD frame:

- writes: 2.92 MB (scales 0 and 2);
- reads: about 1.6 kB per feature, less with reuse.

The simulated frame averaged 2.6 bytes of external traffic per input pixel.

## Where this design departs from the published one

- **Smoothing kernel.** Taps 2, 10, 14 and 22 weigh 6, which is the binomial
  kernel whose weights sum to 256, rather than 5.
- **Test pattern.** Pseudo-random pairs replace the learned ORB pairs (see
  above).
- **Orientation arithmetic.** A divider plus tangent comparisons replace the
  CORDIC. Its latency is still 20 iterations.
- **Patch loader.** The fetched bytes go through the reuse buffer on their
  way to the patch buffer. The stream follows one row behind the fetch. It
  drops keypoints whose 43 x 43 patch would leave the image. It waits on a
  `rows_done` count to know that patch data are in memory.
- **Smoothed-pixel FIFOs.** Each entry has one extra bit that marks the
  frame's first pixel. The writer counts addresses from there.
- **Choices where the description is silent, all this design's own:**
  - the padding rows;
  - the evenly spaced score steps and strict comparisons;
  - `S[-1] = S0`;
  - the depth of the local keypoint buffer;
  - the same-row arbitration of the keypoint FIFOs;
  - the bus protocols;
  - the address map;
  - the feature format.

## Files

- `rtl/orb_pkg.sv`: widths, the keypoint and feature structs, and
  `scale_len`.
- `rtl/orb_top.sv`: wiring, the padding-row controller, and the shared
  buffers.
- One file per block. Helpers: `sync_fifo` (first-word fall-through FIFO) and
  `line_fifo` (one row delay).
- `tb/tb_<block>.sv`: a self-checking testbench per block. Each prints
  `TB_RESULT checks=N failures=M`.
- `tb/orb_ref_pkg.sv`: reference models written straight from the algorithm
  definitions, not from the RTL structure:
  - FAST by scanning all arcs;
  - direct convolution;
  - explicit bilinear weights;
  - real-valued `atan2`.
- `tb/ext_mem_model.sv`: a behavioural external memory with random stalls
  and fixed read latency.
- `tb/tb_orb_top.sv`: end to end at 160 x 120, two frames. It checks every
  keypoint of every scale, both stored smoothed images, and each feature's
  orientation and descriptor. It requires every mechanism to occur at least
  once:
  - padding;
  - column reuse;
  - border drops;
  - memory stalls;
  - waiting for rows;
  - a full descriptor buffer;
  - output back-pressure;
  - threshold drops;
  - features on all scales.
- `tb/tb_orb_full.sv`: one 1920 x 1080 frame with the top at default
  parameters and the same checks, with 280 blank cycles after each row. It
  takes about 15 s in Verilator.

To run a testbench with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb --top-module tb_orb_top \
    rtl/orb_pkg.sv tb/orb_ref_pkg.sv tb/tb_orb_top.sv -Mdir obj -o sim
obj/sim
```

`-Wno-fatal` keeps Verilator's width and unused-signal warnings from
stopping the build. The assertions use `disable iff (!rst_n)` on a reset
that the flip-flops also use asynchronously, which Verilator reports as
`SYNCASYNCNET`; both uses are intended.

Frame size and buffer depths are parameters of `orb_top`. The testbenches
override `W`, `H`, `BASE2` and `DESC_DEPTH` to run small frames.
