# Two-layer HOE optical flow processor (SystemVerilog)

This is a streaming hardware engine for dense optical flow. For each pixel of frame *t* it
estimates the motion vector (u, v) and a luminance change ξ (for example from lighting),
using frames t-1, t and t+1. The method is Horn–Schunck with a brightness-change term
(the "HOE" formulation), solved on two resolution layers. Three ideas keep the hardware
small and fast:

* **Image division.** The frame is cut into overlapping blocks of 244 × 192 pixels and
  solved block by block. The blocks overlap by 15 pixels on each side horizontally and
  16 vertically, so the flow at block edges is still correct once the overlap is cut
  away. All on-chip memories only need to hold one block. A WXGA frame (1280 × 800) is
  30 blocks: 6 columns × 214 useful pixels and 5 rows × 160 useful rows.
* **A Gauss–Seidel sweep that can be pipelined.** Each iteration averages only the
  **four diagonal neighbours** of a pixel, not all eight. Pixel (i, j) then needs the
  row above, already updated in this sweep, and the row below, not yet updated. It never
  needs its left neighbour. So a 12-stage pipeline can issue one pixel per clock and
  still use Gauss–Seidel ordering. Over-relaxation with ω = 1.75 speeds up convergence.
* **Warm start.** The previous frame's final flow is the initial value. The upper layer
  gets it sub-sampled and halved.

## Algorithm as implemented

For each pixel, with gradients Ix, Iy, It and diagonal means ū, v̄, ξ̄:

```
N   = Ix*ū + Iy*v̄ + It + ξ̄
D   = α² + Ix² + Iy² + λ²            (λ = α/β)
u  += 1.75 * ((ū − Ix*N/D) − u)
v  += 1.75 * ((v̄ − Iy*N/D) − v)
ξ  += 1.75 * ((ξ̄ − λ²*N/D) − ξ)
ū   = (u[i−1,j−1] + u[i+1,j−1] + u[i−1,j+1] + u[i+1,j+1]) / 4
```

The two upper terms come from the current sweep and the two lower terms from the previous
sweep. In `motion_calc_unit` this ordering is not coded explicitly. It follows from two
facts:

* the motion memory is updated **in place**;
* a result is written back 12 cycles after its pixel was issued.

A pixel's upper-right neighbour was issued W−1 cycles earlier, so it is already written.
The row below has not been reached yet. This holds whenever the block is at least
LAT + 2 = 14 pixels wide, which an assertion checks. Multiplying by 1.75 is done as
`2d − d/4`.

At block borders the neighbour coordinates are mirrored: row −1 reads row 1, and column −1
reads column 1. So no neighbour ever lies in the pixel's own row, and the sweep is exactly an
in-place raster Gauss–Seidel sweep. This holds even when the first sweep is fed by a gradient
stream with gaps (see below).

Two layers are used:

1. **Upper layer** (half resolution, 122 × 96 per block). It smooths t-1, t and t+1 with a
   5 × 5 Gaussian and keeps every second pixel of every second row. It then computes
   gradients, seeds the flow with the halved previous flow, and runs **24 sweeps**.
2. **Bilinear interpolation.** The upper result is up-sampled to full resolution and
   doubled. This gives the *propagation flow*.
3. **Lower layer** (full resolution, 244 × 192). It warps t-1 forward and t+1 backward
   with the propagation flow, using bilinear sub-pixel sampling:
   `CF(x,y) = I(x−p_u, y−p_v, t−1)` and `CB(x,y) = I(x+p_u, y+p_v, t+1)`.
   Gradients of (CF, t, CB) then give the equations for a flow **correction**. It is seeded
   with previous flow − propagation flow and solved in **6 sweeps**. The final output is
   correction + propagation flow.

## Block pipeline and data movement

```
             step s:   upper layer  <- block s        lower layer <- block s-1
 ext. memory ─pix,prev─▶ upper_layer ──final sweep──▶ bilinear memory bank (s mod 2)
 ext. memory ─pix,prev─▶ lower_layer ◀─propagation flow── bank ((s-1) mod 2)
                          lower_layer ──final flow──▶ ext. memory
```

`of_top` runs the two layers as a two-stage pipeline over blocks. In step *s* the upper
layer processes block *s* and the lower layer processes block *s−1*. A step ends when both
layers have finished, so N blocks take N+1 steps. The bilinear interpolation memory has
two banks, so one layer's write and the other layer's read never collide.

Inside a layer, pixels stream through the units at one per clock. Each window unit keeps
only a few image rows in a circular line buffer (`line_ring`):

| unit | line buffer | window | starts output | output latency |
|---|---|---|---|---|
| `hier_image_unit` (Gaussian + 2:1) | 6 rows of source | 5 × 5 | 1 cycle after its window is complete; centre row r is filtered while row r+3 arrives | 1 cycle |
| `grad_unit` | 4 rows | 3 × 3 × 3 frames | row r while row r+2 arrives | 6 cycles, valid in the 6th cycle |
| `mc_unit` | 8 rows of source | rows r−3 … r+3 | row r while row r+4 arrives (from the 5th row; the 9th row for row 4) | 1 cycle |
| `motion_calc_unit` | — (block memories) | 4 diagonals | — | 12 cycles issue → write-back |

After its last input pixel, each window unit drains its remaining rows by itself. Rows
beyond the block are clamped, so the first rows are produced early from replicated border
rows.

Motion calculation starts as soon as gradients come out. A layer works in two phases:

* **LOAD.** The block streams in. Each gradient goes into the gradient memory and, in the
  same cycle, is issued to `motion_calc_unit` as a pixel of the **first sweep**. The
  initial values reach the motion memory through its second write port. They must stay
  at least one row ahead of the gradients, because a pixel reads the row below. The
  previous-flow stream is therefore taken before the source rows that need it, and the
  source stream is held back (`ready` low) if it is not. An assertion checks this.
* **ITER.** Once the last gradient is out, the remaining NITER − 1 sweeps run from the
  memories at one pixel per clock. During the final sweep every written value also goes
  out. The upper layer writes it to the bilinear memory. The lower layer adds the
  propagation flow and sends it out as `out_*`.

Cycles per block at the default size (measured on a two-block run):

| layer | LOAD (input + first sweep) | ITER | total |
|---|---|---|---|
| upper | ≈ 48 k: 46 848 full-resolution beats plus the filter latency | 23 × 11 712 + 13 | ≈ 317 k |
| lower | ≈ 48 k: 46 848 beats, warp and filter latency | 5 × 46 848 + 13 | ≈ 283 k |

A block step lasts as long as the slower layer, so about 317 k cycles. The two-block run
takes 917 260 cycles for its three steps.

## Throughput compared with real-time targets

The original processor targets WXGA at 30 fps with a 178.3 MHz clock. That is 30 blocks per
frame, or 198 k cycles per block step. This implementation needs about 317 k cycles per
step, so at 178.3 MHz it reaches about 19 fps on WXGA. At 30 fps it would need about
285 MHz. For VGA (9 blocks) the original needs 57.5 MHz; this design would need about
86 MHz.

There are two reasons:

* The upper layer takes its input at full resolution, one pixel per clock. It cannot
  finish the input phase in fewer than 46 848 cycles, yet its 24 sweeps cost
  24 × 11 712 = 281 k cycles on their own.
* With 6 lower-layer sweeps at one pixel per clock, 281 k cycles are needed even with
  perfect overlap.

The original timing diagram shows about four sweep-times per step. How six lower
iterations fit into that budget is not known, so this design does not attempt it.
Memory capacity is not a limit: any frame size is handled as a sequence of 244 × 192
blocks. At the default word lengths, all on-chip memories together hold about 723 kB.

## Number formats (`of_pkg`)

| quantity | format |
|---|---|
| pixel | unsigned 8 bit |
| Ix, Iy, It | signed 12 bit, 2 fraction bits (filter sums ÷ 32) |
| u, v, ξ | signed 16 bit, 6 fraction bits (±512) |
| α², λ² inputs | unsigned 16 bit, in units of 1/16 (the units of Ix²) |
| N/D | truncating division with 8 extra fraction bits |

With these units, Ix·N/D comes out directly in flow units (see `motion_calc_unit`).
Results saturate to 16 bits.

## Top-level interface (`of_top`)

* Pulse `start` with `num_blocks` set. `done` pulses when the last block's flow has come out.
* `up_pix_*` / `up_prev_*` carry what the upper layer needs:
  * the source pixels of t-1, t and t+1 (`pix3_t`);
  * the previous-frame final flow (`flow2_t`).

  These are valid/ready streams of W × H beats per block, in raster order, at full
  resolution.
* `lo_pix_*` / `lo_prev_*` carry the same data for the same block one step later. The
  external memory controller serves all four streams. Each stream has its own ready, and
  a stream only takes beats while its layer is loading.
* `out_valid`, `out_blk`, `out_x`, `out_y` and `out_flow` give the final flow of the whole
  block, overlap included, one pixel per clock, with no back-pressure. Cropping the
  overlap and placing the block in the frame is up to the external address generator.
* `alpha2` and `lambda2` set the smoothness weights. The testbenches use α² = 4
  (`alpha2 = 64`) and λ² = 1 (`lambda2 = 16`).
* Status outputs: `up_busy`, `lo_busy`, `up_iterating`, `lo_iterating` and `mc_clamp`.

Parameters: `W` = 244, `H` = 192 (both even, W/2 ≥ 14), `NITER_UP` = 24, `NITER_LO` = 6.

## Design choices not fixed by the original description

* Gaussian weights: binomial (1,4,6,4,1)², rounded.
* Gradient filter: central difference smoothed (1,2,1) across the other axis and across
  the three frames; It = (t+1) − (t−1) smoothed (1,2,1)².
* Clamped borders in every filter. Mirrored borders in the diagonal average.
* Upper block size of W/2 × H/2 (one 2:1 step, and flow doubling between the layers).
  The original text also gives 61 × 48 for the upper memories. That cannot be squared
  with its own statement that the upper layer has a quarter of the pixels.
* Lower-layer seeding: previous flow − propagation flow. ξ starts at 0.
* The vertical warp reach is limited to [−3, 3) pixels by the 8-row buffer. Larger
  displacements are clamped, and `mc_clamp` reports it. Horizontal reach is the whole
  block.
* A fixed number of sweeps, with no convergence threshold.
* Stream handshakes, the hand-over between LOAD and ITER, the second write port of the
  motion memory and the double-banked bilinear memory.
* Memories are arrays with combinational multi-port reads (the motion memory is read at
  5 addresses per cycle). An SRAM implementation would replace these with banked or
  line-buffered copies.
* Only two layers are built. Using the same hardware for three or more layers, by
  spending spare upper-layer cycles on extra iterations, is not implemented.

## Files

`rtl/`: `of_pkg` (types, formats), `line_ring`, `block_ram`, `hier_image_unit`, `grad_unit`,
`mc_unit`, `init_value_gen`, `motion_calc_unit`, `bilinear_interp_unit`, `upper_layer`,
`lower_layer`, `of_top`.

`tb/`: one self-checking testbench per module (`tb_<module>.sv`) and `of_tb_pkg` (a moving
sinusoid test pattern). `tb_of_top` runs four 32 × 24 blocks. `tb_of_top_full` runs two
blocks at the default size. `tb_image_division` (with its helper `div_runner`, which plays
the external memory for one frame cut into blocks) compares divided and undivided
processing.

## Verification

The unit testbenches compare against independent reference models written in the
testbench:

* Gaussian, gradient filter and bilinear warp checked bit-exactly;
* the full SOR Gauss–Seidel recurrence checked bit-exactly against a plain in-place
  loop, with the first sweep fed by a gradient stream both without and with random gaps;
* the cycle counts and latencies above: 1, 6 and 12 cycles, and (NITER − 1)·W·H + 12 + 1
  cycles from the last streamed gradient to the end of a solve.

The layer and top testbenches feed a smooth pattern moving by a known amount. They check
that the recovered flow is close to the truth:

| test | case | rms error |
|---|---|---|
| upper layer | zero start | ≈ 0.134 px |
| upper layer | warm start | ≈ 0.134 px |
| lower layer | exact propagation | ≈ 0.05 px |
| lower layer | 0.5 px correction needed | ≈ 0.07 px |
| top, 32 × 24 blocks | — | 0.11–0.21 px |
| top, full size | — | ≈ 0.16 px |

They also check:

* the two layers work at the same time;
* both bilinear banks are used;
* the motion-compensation clamp acts on a 3.5 px vertical motion (where accuracy
  degrades as expected) on most of that block's pixels and almost nowhere else, which
  also shows that each block gets its own propagation flow;
* the first sweep overlaps the input: only NITER − 1 sweeps remain after it;
* the warm start is at least as accurate as a cold start;
* output counts and raster order are correct.

`tb_image_division` repeats the block-division experiment on a 96 × 24 frame of a zooming
scene, whose true flow differs at every pixel. It processes the frame as one block, as two
64-pixel blocks with 16 overlap pixels on each side of the cut, and as two 48-pixel blocks
without overlap. At the seam, the overlapped result is closer to the truth (≈ 0.079 px rms)
than the one without overlap (≈ 0.099 px), and about as close as the undivided one
(≈ 0.082 px). It is not bit-identical to the undivided result. With a fixed number of
sweeps the solution is not fully converged, and within one sweep information travels
across the whole block.

Run any of them with plain Verilator, for example:

```
verilator --binary --timing --assert -Wno-fatal rtl/of_pkg.sv tb/of_tb_pkg.sv \
  $(ls rtl/*.sv | grep -v of_pkg) tb/tb_of_top.sv --top-module tb_of_top
./obj_dir/Vtb_of_top
```

Each testbench prints `TB_RESULT checks=N failures=M`. The full-size top test simulates
about one million cycles in a few seconds.
