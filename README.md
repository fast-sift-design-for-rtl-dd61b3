# Layer-parallel SIFT feature extractor

This is synthesizable SystemVerilog for a real-time SIFT (scale-invariant
feature transform) front end. It finds feature points in a grey-scale video
stream and gives each one a dominant gradient orientation. It takes one pixel
per clock cycle and never stores a frame.

A textbook SIFT pipeline blurs each scale of a Gaussian pyramid from the scale
below it. That keeps several full images per octave in memory. This design
uses three ideas instead:

* **Every scale straight from one integral image.** Each Gaussian scale is
  approximated by a small sum of square box filters. A box sum costs four
  look-ups in an integral image, so one integral image serves all four scales
  of an octave. All scales come out for the same pixel in the same cycle
  ("layer-parallel"). The same holds for the three difference-of-Gaussian
  (DoG) layers and for the keypoint tests. An octave therefore needs only a
  few rows of integral image and two rows per DoG layer.
* **A brightness test instead of sub-pixel refinement.** Weak candidates are
  dropped when |DoG| is below a fixed fraction of full scale. The
  Taylor-expansion contrast test of classic SIFT is not used.
* **Two stages with a stall.** Stage one streams the frame and runs the
  keypoint tests. When it finds a point, the whole of stage one freezes.
  Stage two then recomputes the patch around the point from the integral rows
  that are still in the buffer, finds its orientation, writes a record and
  lets stage one go on. Points are rare, so the frame rate depends mostly on
  the pixel count.

The configuration is two octaves by four scales: three DoG layers per octave,
one of which is tested for extrema. The defaults are a 640x480 frame.

```
 pixels ─► noise_smoothing ─► octave_engine (octave 0) ──scale 3, even rows/cols──► octave_engine (octave 1)
                                  │ integral rows, candidate                            │
                                  ▼                                                     ▼
                               sift_top stage-two control: stall, serve octave 0 first
                                  │
                                  ▼
                        orientation_assignment (13 lanes x pec_unit) ─► output_buffer ─► kp
```

## Files

| file | role |
|---|---|
| `rtl/sift_pkg.sv` | widths, the `pec_op_e` enum and the `keypoint_t` record |
| `rtl/noise_smoothing.sv` | 3x3 binomial pre-filter |
| `rtl/integral_image.sv` | streaming integral image and its column-organised row buffer |
| `rtl/gaussian_pyramid.sv` | four box-kernel scales and three DoG layers |
| `rtl/keypoint_localization.sv` | 28-flag keypoint test |
| `rtl/octave_engine.sv` | one octave: the three blocks above |
| `rtl/pec_unit.sv` | bit-serial square root / division / inverse square root |
| `rtl/orientation_assignment.sv` | stage two: patch recompute, gradients, 36-bin histogram |
| `rtl/output_buffer.sv` | FIFO of finished feature points |
| `rtl/sift_top.sv` | the engine |
| `tb/sift_ref_pkg.sv` | whole-image reference model used by the testbenches |
| `tb/tb_*.sv` | one self-checking testbench per block, plus full-size VGA and HD end-to-end ones |

## Top-level interface (`sift_top`)

| port | dir | meaning |
|---|---|---|
| `in_valid`, `in_ready`, `in_pix[7:0]` | in/out/in | pixels in raster order. The first pixel after reset is top-left. There is no frame side-band: the size comes from `IMG_W` and `IMG_H`. |
| `kp_valid`, `kp_ready`, `kp` | out/in/out | feature points, `keypoint_t` = {octave, row[11:0], col[11:0], orient[5:0], peak[17:0]} |
| `stall` | out | high while stage one is held for stage two |

`orient` is a 10-degree bin (0..35) of the angle atan2(dy, dx), where
dx = p(r, c+1) − p(r, c−1) and dy = p(r+1, c) − p(r−1, c). Rows grow down the
image, so bin 9 points down. `peak` is the histogram value of that bin.
Reported coordinates:

* **Octave 0** uses the smoothed grid. This is the input grid shifted one pixel
  down and right, so input pixel = reported position − 1.
* **Octave 1** uses its own half-size grid. Its pixel (i, j) is smoothed pixel
  (2i, 2j) after the scale-3 blur.

Parameters: `IMG_W` = 640, `IMG_H` = 480, `DEPTH` = 24 (integral rows kept),
`ROW_LAG` = 9 (rows between the newest integral row and the filter row), and
`FIFO_DEPTH` = 16. Coordinates are 12 bits wide, so frames up to 4095 pixels
wide fit. For 1920x1080 set `IMG_W`/`IMG_H`; nothing else changes.

## Stage one

### Smoothing

A 3x3 binomial kernel, [1 2 1]ᵀ[1 2 1]/16 with rounding, made from shifts and
adds. Its output is tagged at the bottom-right pixel of its window, which is
where the one-pixel shift above comes from. Taps outside the frame are zero.

### Integral image held by column

`integral_image` keeps the newest `DEPTH` integral rows. It does not store them
as rows. It stores **one word per column**, and each word holds that column's
last `DEPTH` integral values, newest in slot 0. For each pixel the block:

1. reads its column's word;
2. shifts in II(r,c) = II(r−1,c) + rowsum(r,c);
3. writes the word back.

So the filters see a whole column of rows each cycle, for one read and one
write per pixel.

Values are kept modulo 2²⁰ (`II_W`). A box sum is a four-corner difference.
The wrap-around cancels in that difference as long as the true sum is below
2²⁰, and the largest sum here is 49·255. Slots that lie above row 0 still hold
old data. Every reader masks them by row number, and nothing clears them.

A second, asynchronous read port (`rd_col` → `rd_word`) serves stage two while
stage one is frozen. `last_row`/`last_col` tell the reader which row each
column holds in slot 0:

* a column at or left of `last_col` already has row `last_row`;
* a column to its right still has row `last_row − 1`.

### The four scales

The filter works on row rf = r − 9 and column cf = c − 3 relative to the pixel
just written. It forms vertical strip differences V_h(c) = II(rf+h, c) −
II(rf−h−1, c) for half-widths h = 1, 2, 3. Column registers then give the box
sum V_h(cf+h) − V_h(cf−h−1). The scales are:

| scale | kernel | weight sum | reciprocal (Q16) |
|---|---|---|---|
| 0 | 3x3 box | 9 | 7282 |
| 1 | 5x5 box + inner 3x3 box (centre weight 2) | 34 | 1928 |
| 2 | 7x7 box + inner 5x5 box | 74 | 886 |
| 3 | 7x7 box | 49 | 1337 |

Each sum is brought back to 8 bits as (S·recip + 2¹⁵) >> 16, a constant
multiply. DoG_k = G_{k+1} − G_k is 9 bits signed. The scale-1 kernel is the
"5x5 box with a heavier 3x3 centre" restructuring. Which of the other box sizes
goes to which scale is this design's choice. It was picked so that the blur
grows with the scale.

### The keypoint test: a 28-bit reject vector

`keypoint_localization` keeps two rows of each DoG layer and builds the 3x3x3
cube around (rf−1, cf−1). It computes all tests at once, one reject flag per
bit of S:

* **S[25:0], extremum.** There is one bit per neighbour. Number the
  neighbours in (layer, row, column) order, each 0..2, skipping the centre
  (1,1,1). Neighbour n sets S[25−n] when the centre does not strictly beat it.
  A centre ≥ 0 must be a strict maximum and a centre < 0 a strict minimum.
* **S[26], edge.** This uses the Hessian of the middle layer by central
  differences, with Dxy kept ×4 so everything is an integer. The point is
  rejected when det ≤ 0 or when 16·tr²·r ≥ (r+1)²·det16, with r = `EDGE_R` = 10.
* **S[27], brightness.** The point is rejected when |DoG| < 255·0.04, tested as
  100·|DoG| < 255·`BRIGHT_PCT`.

A point is a candidate when S == 0 and it lies at least `MARGIN` = 10 pixels
inside its octave. The margin is there so that stage two's 19x19 re-fetch stays
inside the frame.

### Second octave

Scale 3 of octave 0 at even rows and columns is the base image of octave 1. It
flows through an identical `octave_engine` on the same clock, at a quarter of
the pixel rate, and freezes with octave 0.

## Stage two

### The stall protocol

`sift_top` computes `pend_o = cand_o & ~served_o` for each octave, and
`stall = pend0 | pend1`. `stall` drops `in_ready` and the enable of every
stage-one register, so the candidate and the integral buffers stay exactly as
they were. Stage two starts on the pending octave; octave 0 goes first if both
are pending. When the record enters the output buffer, the point is marked
served. `stall` then falls unless the other octave is still pending. The served
flags clear on the first cycle stage one moves again.

Each point costs a fixed **348 cycles** of stall:

* 1 cycle to start;
* 346 cycles in the orientation unit;
* 1 cycle to hand the record over.

A full output buffer stretches this until the reader takes a record. An
assertion (`a_frozen`) checks that stage one never moves while stage two works.

### Orientation: 13 lanes with their own PEC unit

`orientation_assignment` runs these steps after `start`:

1. **FETCH, 20 cycles.** Reads integral columns ce−10 … ce+9. From each word it
   keeps the strip differences that a 5x5 and a 3x3 box need for the 15 patch
   rows. The row of each slot comes from `last_row`/`last_col` as described
   above.
2. **PATCH, 15 cycles.** Rebuilds one row of the 15x15 scale-1 patch per cycle,
   with 15 column units in parallel. The arithmetic is bit-identical to
   scale 1 of stage one.
3. **GRAD, 13 rows × 21 cycles.** 13 lanes, one per inner column. Each lane
   works as follows:
   * It forms dx and dy by central differences.
   * Its `pec_unit` computes ⌊√(dx²+dy²)⌋ (9 cycles).
   * The same unit then computes min(|dx|,|dy|)·256 / max(|dx|,|dy|) (9 cycles).
   * The ratio is compared with tan 10°, 20°, 30° and 40° in Q8 (45, 93, 148,
     215). The number of thresholds it reaches, k (0..4), is the bin within
     the octant.
   * The bin within the quadrant is b = k when |dx| ≥ |dy| and b = 8 − k
     otherwise (0..8). The signs of dx and dy then give the bin within the
     circle:

     | signs | bin |
     |---|---|
     | dx ≥ 0, dy ≥ 0 | b |
     | dx < 0, dy ≥ 0 | 17 − b |
     | dx < 0, dy < 0 | 18 + b |
     | dx ≥ 0, dy < 0 | 35 − b |

   At the end of each row, all 13 magnitudes are added into a 36-bin histogram.
4. **SELECT, 37 cycles.** A counter scans the bins and keeps the first largest.

The total is 1 + 20 + 15 + 13·21 + 37 = 346 cycles, whatever the data.
Magnitudes are not Gaussian-weighted and there is no peak interpolation.

### PEC unit: one bit per cycle

`pec_unit` finds the largest N-bit Y that passes a monotone test. It works
from the top bit down: it tries each bit at 1 with the lower bits at 0, and
keeps the bit if the test still holds.

| op | test | result |
|---|---|---|
| `PEC_SQRT` | Y·Y ≤ A | ⌊√A⌋ |
| `PEC_DIV` | Y·B ≤ A·2^FRAC | ⌊A·2^FRAC/B⌋ |
| `PEC_INVSQRT` | A·Y·Y ≤ 2^(2·FRAC) | ⌊2^FRAC/√A⌋ |

It is busy exactly N cycles, and `done` follows. Results that do not fit in N
bits saturate to all ones. The inverse square root is built and tested, but
this engine does not use it, because it would serve only descriptor
normalisation.

## Throughput

Cycles per frame = pixels + 348 × points, plus any time the reader leaves the
output buffer full.

* **VGA at 100 MHz and 30 frames/s.** A frame has a budget of 3,333,333 cycles
  and the pixels use 307,200 of them. That leaves room for about 8,700 points
  per frame. The end-to-end test measures 366,730 cycles for a VGA frame with
  171 points.
* **1920x1080 at the same rate.** This needs `IMG_W`=1920 and `IMG_H`=1080. It
  then leaves room for about 3,600 points per frame. The HD test measures
  2,812,426 cycles for a frame with 2123 points.

Memory at the default size is 554,536 bits after synthesis. Most of it is
the two integral buffers: 640·24·20 and 320·24·20 bits.

## Where this design departs from the published architecture

* **No local descriptor.** Stage two ends after orientation. The descriptor
  vector, its normalisation and the Gaussian weighting mask of the original
  architecture are not built. The `kp` stream is where such a stage would
  attach.
* **Cycle counts.** Orientation takes a fixed 346 cycles using 13 PEC units,
  not one shared unit. The original schedules orientation in about 214
  cycles, plus 20 for normalisation and 286 for the descriptor (520 in all).
  This design uses 348 cycles per point in all.
* **No per-row start-up.** Rows stream back to back. The original spends a few
  cycles per row on start-up.
* **Own choices where the architecture is silent:**
  * the smoothing kernel;
  * which box sizes make scales 0, 2 and 3;
  * the normalising reciprocals;
  * max-or-min chosen by the sign of the centre;
  * r = 10;
  * 36 unweighted bins;
  * the tangent table;
  * decimation on even rows and columns;
  * the margin;
  * every width, handshake and buffer depth.
* **Edges of the frame.** The bottom `ROW_LAG`+2 rows and the right 4 columns
  of each octave are never tested, because the frame ends before their windows
  are complete. Points within 10 pixels of an octave's border are dropped.
  There is no carry-over between frames. At start-up the slots above row 0 are
  masked, so consecutive frames are independent.

## Verification

Each block has a self-checking testbench. It compares the block with values
computed directly (whole-image box sums, direct integral sums, integer square
roots by search) and not with a copy of the RTL. Each testbench ends with
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

| testbench | what it covers |
|---|---|
| `tb_noise_smoothing` | every output of two random frames with gaps and stalls |
| `tb_integral_image` | every slot of every column word, and random reads of the second port |
| `tb_gaussian_pyramid` | all four scales and three DoG layers of every position |
| `tb_keypoint_localization` | every flag of every decision; requires accepts, brightness and edge rejects, and margin drops |
| `tb_octave_engine` | scales and decisions of a 48x44 frame of blobs |
| `tb_pec_unit` | all three operations on random and corner operands; exactly N cycles |
| `tb_orientation_assignment` | dominant bin and peak on ramps in many directions; the 346-cycle latency; result held under back-pressure |
| `tb_output_buffer` | order, contents, full flag, and holding a refused record |
| `tb_sift_top` | 96x80 frame with a 2-entry FIFO, compared point by point with the model |
| `tb_sift_top_full` | one 640x480 frame with every parameter at its default: 171 points, each compared |
| `tb_sift_top_hd` | one 1920x1080 frame with 2123 points, each compared, against the 100 MHz / 30 frames/s budget |

`tb_sift_top` also counts each mechanism and fails if one never happens:

* stalls, and the exact 348-cycle length of every stall the FIFO did not
  stretch;
* points from both octaves;
* brightness and edge rejections;
* a full output buffer.

The VGA and HD tests also check the 30 frames/s cycle budget at 100 MHz. The
HD test also covers both octaves finding a point in the same cycle.

Simulate with plain Verilator 5 from the repository root:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/sift_pkg.sv \
          tb/tb_sift_top_full.sv --top tb_sift_top_full -o sim -Mdir obj_full
./obj_full/sim
```

Replace `tb_sift_top_full` with any other testbench name. Verilator finds the
other files through `-I`. `-Wno-fatal` is there for the reference model, which
mixes 32- and 64-bit integers and so triggers width warnings. The RTL alone
passes `verilator --lint-only` at the default warning level without a
message. With `-Wall`, three kinds of warning remain, all deliberate:

* `PINCONNECTEMPTY`: the unused `level` and `busy` outputs are left open.
* `SYNCASYNCNET`: `rst_n` is both the asynchronous reset and the `disable iff`
  of the assertions.
* `UNUSEDSIGNAL`: some block outputs are not needed by the top, and the
  column addresses have bits above the buffer size. The unused outputs are
  the scales of octave 1, the reject vectors and the busy flags. The VGA frame takes a few seconds to simulate and the HD frame about 20
seconds.
To change the image, edit the blob generator at the top of the end-to-end
testbench; the reference model follows automatically.
