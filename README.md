# H.264/AVC high profile intra prediction engine

This is the intra prediction and reconstruction core of an H.264 high-profile
encoder. Its target is 1080p at 30 frames per second. It processes one 16x16
macroblock (MB) at a time, eight pixels per clock, and takes at most 862
cycles per MB.

The main problem it solves is the data dependency of intra prediction. To
predict a 4x4 or 8x8 block, the standard needs the *reconstructed* pixels of
the blocks to its left and above. A straightforward encoder therefore has to
predict, transform, quantise, dequantise, inverse transform and reconstruct
one block before it can even try modes for the next block.

This engine breaks that chain with two ideas:

1. **Open-loop prediction.**
   - During mode decision, neighbours that lie inside the current MB are taken from the *original* pixels, not the reconstructed ones.
   - Neighbours across the MB border are already reconstructed, so they are used as they are.
   - At the high quality levels of HD video, original and reconstructed pixels are close, so the choice of mode hardly changes.
   - Every sub-block can now be evaluated as soon as its pixels are loaded, so there are no bubbles.
2. **Two-stage schedule.**
   - First, all Intra_4x4 modes, all Intra_8x8 modes and the chroma modes are evaluated back to back (open loop).
   - Then only the winning choice is reconstructed, in the order the standard demands (closed loop).
   - An inter MB skips the first stage. It uses the same reconstruction hardware with the motion-compensated prediction.

Intra_16x16 is not supported. With the cost function used here, Intra_8x8
takes its place at almost no loss in quality.

## Data organisation

Everything moves as 64-bit words of eight 8-bit pixels, or as eight 16-bit
coefficients. An MB occupies 48 words:

| words  | contents                               |
|--------|----------------------------------------|
| 0..31  | luma, row y in words 2y (x 0..7) and 2y+1 (x 8..15) |
| 32..39 | Cb (U) 8x8, one row per word           |
| 40..47 | Cr (V) 8x8, one row per word           |

The four MB buffers all use this layout:
- current MB (original pixels);
- motion-compensated (MC) data, for inter MBs;
- reconstructed pixels;
- quantised levels, where each level is stored at the pixel position of its coefficient.

Work is issued as **jobs**. A job is one of these:
- one 8x8 luma block;
- two 4x4 luma blocks side by side;
- two 4x4 chroma blocks;
- in Intra_4x4 reconstruction, one luma 4x4 block in lanes 0..3 and one chroma 4x4 block in lanes 4..7.

Each job uses one prediction mode and is issued one row per clock. A job
descriptor (`job_t` in `intra_pkg`) travels with the data through the
transform. The cost logic, the quantiser and the write-back logic read it
there to know what they hold. `job_pos()` maps (job, row, lane) to
(word, lane) in the MB layout.

## Schedule

| stage | work | clocks |
|-------|------|--------|
| clear | reset best costs | 1 |
| Intra_4x4 prediction | 8 pairs of 4x4 blocks x 9 modes x 4 rows | 288 |
| Intra_8x8 prediction | 4 blocks x 9 modes x 8 rows | 288 |
| 8x8 to 4x4 change | transform stall | ~4 |
| chroma prediction | 3 modes x 2 components x 8 rows | 48 |
| drain and decide | transform empties, decision taken | ~7 |
| reconstruction, Intra_4x4 | 16 jobs, one at a time | ~230 |
| reconstruction, Intra_8x8 or inter | 4 luma 8x8 jobs, then 4 chroma jobs | ~165 |

Measured from `start` to `done`:

| MB type | cycles |
|---------|--------|
| Intra_4x4 | 862 |
| Intra_8x8 | 798 |
| inter | 162 |

The prediction stage issues one row every clock. The only pause, a few
clocks, comes at the change from 8x8 to 4x4 blocks, where the transform
briefly has no free buffer.

A reconstruction job is one pass through this chain:

predict → subtract → forward transform → quantise → dequantise → inverse transform → add → write back.

Within a job, each row only waits on the previous one. The next job is issued
only after the last column of the previous one has been written, because it
may need those pixels as neighbours. In Intra_4x4 the chroma blocks U0..U3 and
V0..V3 ride along in lanes 4..7 of luma jobs 0..7. This fills the lanes that a
single 4x4 luma block leaves idle.

## Reconfigurable datapath

**Luma predictor** (`luma_predictor`)
- Gives eight predicted pixels per clock: either one row of an 8x8 block, or one row of each of two 4x4 blocks.
- The nine directional modes use the same formulas for both block sizes, with the block size as a parameter.
- So one set of per-lane equations serves both cases.
- It also reports whether the mode is usable with the neighbours that exist. A mode that needs a missing neighbour is still evaluated, but it can never win.

**Predictor assigner** (`predictor_assigner`)
- Builds the neighbour set of each block.
- Inside the MB it takes neighbours from the original pixels (prediction stage) or the reconstructed pixels (reconstruction stage).
- Outside the MB it takes them from the row-above and left-column inputs.
- It applies the standard's availability rules, including the above-right rule of the 4x4 and 8x8 decoding order.
- For Intra_8x8 it applies the [1 2 1] reference sample filter.

**Chroma predictor** (`chroma_predictor`)
- Supports DC (per 4x4 quarter, with the standard's rules), horizontal and vertical.

**Multi-transform** (`multi_transform`)
- One instance does two 4x4 DCTs, one 8x8 DCT, two 4x4 IDCTs or one 8x8 IDCT, chosen per block.
- It has two ping-pong buffers:
  - The first pass works on the rows as they arrive.
  - The second pass reads the other buffer out, one word per clock.
- The forward transform emits coefficients **row by row**. The inverse transform takes coefficient rows (horizontal pass first, as a decoder does) and emits residuals **column by column**.
- So a forward block can be fed straight back in as an inverse block, and the result is bit-exact with a standard decoder.
- The fed-back dequantised rows enter through the same input multiplexer as fresh residuals. They have priority; the controller holds its next row for those clocks.
- The 8x8 forward transform uses the standard's 8x8 integer kernel on both passes and divides by 64 with rounding, so coefficients fit in 16 bits.

**Quantiser and inverse quantiser** (`quantizer`, `inv_quantizer`)
- These are the standard's flat-matrix quantiser (the reference encoder's) and the standard's dequantiser.
- The rounding offset is 1/3 for intra and 1/6 for inter.
- Chroma uses the chroma QP table.
- Eight coefficients are processed per clock, combinationally.

**Chroma DC path** (`uv_dc_buffer`)

H.264 transforms the four DC coefficients of each chroma component a
second time, with a 2x2 Hadamard transform, and quantises them together. So
no chroma 4x4 block can be quantised on its own.

This design exploits the fact that chroma prediction needs no pixels from
inside the MB:
- As soon as the chroma mode is fixed (at the decision clock, or at `start` for an inter MB), one unit forms all eight DC terms at once.
- A DC term of the 4x4 core transform is simply the sum of the block's 16 residuals: original minus predicted.
- The unit then applies the 2x2 transform, quantises, inverse transforms and scales the results.
- Levels and dequantised values are held in registers.

During reconstruction they replace position (0,0) of each chroma block:
- on the levels going into the coefficient buffer;
- on the dequantised row fed back into the inverse transform.

The AC coefficients take the normal path.

## Mode decision

Costs are a DCT-based SATD (sum of absolute transformed differences). They are
computed on the forward transform output while the prediction stage runs:

- **4x4 blocks (luma and chroma):** the sum of |Y(i,j)| * S(i,j) / 2.
  - S is 2 where i and j are both even, and 1 elsewhere.
  - This is a cheap stand-in for the quantiser's position-dependent scaling.
- **8x8 blocks:** the sum of |Y(i,j)| / 2, with no position weighting.
  - The /2 is this design's choice. The 8x8 integer transform has about twice the gain of the 4x4 one, and without /2 Intra_8x8 would almost never win.
- **MB cost:** the sum of the best sub-block costs, plus a header penalty of 4·λ(QP) per sub-block.
  - That is 16 sub-blocks for Intra_4x4 and 4 for Intra_8x8.
  - λ is the QP2QUANT table of the H.264 reference encoder.
  - The penalty is this design's choice. It makes larger blocks win more often as QP rises.
- **Chroma:** one mode for the MB, chosen on the summed cost of its eight 4x4 blocks.

Only the best mode of each sub-block and its cost are stored, not all 9 x 20
candidate costs. The MB-level comparison is combinational. The controller
gives it one clock after the transform has drained.

## Using the top (`intra_top`)

1. Write the 48 words of the current MB through `cur_wr_*`. For an inter MB, also write the motion-compensated prediction through `mc_wr_*`.
2. Present the neighbours and availability flags:
   - `up_luma` (x = -1..23): the reconstructed luma row above the MB.
   - `up_u` and `up_v`: the reconstructed chroma rows above the MB.
   - `mb_top`, `mb_left`, `mb_topleft`, `mb_topright`.

   The row above comes from a line store outside this core.
3. Pulse `start` with `qp` and `inter` valid. `busy` stays high until `done` pulses.
4. After `done`:
   - `rec_rd_addr/data` read the reconstructed MB.
   - `coef_rd_addr/data` read the quantised levels.
   - `mb_i8`, `best4`, `best8` and `best_uv` give the modes.
   - `cost_i4` and `cost_i8` give the two MB costs; `cost_uv` the chroma cost.

The left neighbour column is taken from the reconstructed pixel buffer at
`done`. So MBs of one row must be processed in raster order, and `mb_left`
tells whether that column belongs to a real neighbour.

`rst_n` is an asynchronous active-low reset of the control state. The buffers
are not reset.

## Departures and limits

The design follows a published two-stage architecture. That architecture
quotes these figures: 906 cycles per MB, a 6-clock decision, 12288 bits of
on-chip memory, 223 MHz for 1080p in 90 nm. Levels and reconstruction are
meant to be those of a conforming encoder. The scope is 8-bit 4:2:0 video,
frame macroblocks and flat scaling lists. Decoding the levels with the
chosen modes gives back exactly the engine's reconstruction, for luma and
chroma. The differences:

- **Chroma plane prediction is not built.** Three modes at eight pixels per clock fill the 48-clock chroma slot.
- **Storage exceeds 12288 bits.** The buffers total 15360 bits, and the transform holds another 2x64 words. A 12288-bit budget would need the MC data to share storage with another buffer.
- **The mode decision gets one clock, not six.** It is combinational.
- **Reconstruction is simpler but not faster.** Each job is issued only after the previous job's write-back, instead of overlapping tightly. Even so, an Intra_4x4 MB still ends in 862 cycles, under the 906-cycle budget.
- **Timing is not checked.** There has been no timing analysis, so the 223 MHz target for 1080p30 (911 cycles per MB available) is unverified.

## Verification

Each block has a self-checking testbench in `tb/`, compared with models
written separately from the RTL (shared ones in `tb/tb_ref_pkg.sv`):

- `tb_luma_predictor`: all modes, sizes, rows and availability combinations.
- `tb_chroma_predictor`: all modes, rows and availability combinations.
- `tb_predictor_assigner`: availability from the block decoding order, original vs. reconstructed sources, the 8x8 filter.
- `tb_multi_transform`: all four configurations against matrix arithmetic, with random back-pressure, and output latency.
- `tb_quantizer`, `tb_inv_quantizer`: random coefficients at every QP.
- `tb_mode_decision`: full prediction-stage streams with random usability and QP.
- `tb_intra_ctrl`: the exact job/row sequence of each MB type under random back-pressure, and the length of the prediction stage (628 clocks plus a few for draining).
- `tb_uv_dc_buffer`: the chroma DC path for random content, modes, QPs, and intra and inter MBs.
- `tb_mb_buffer`, `tb_coef_buffer`, `tb_recon_buffer`: random writes and reads.
- `tb_frame_workload`: a 4 x 3 MB picture encoded in raster order at QP 22, 30 and 38, with the row above taken from the engine's own reconstruction, as a line store would supply it.
  - Each MB must match a separate decoder pixel for pixel and finish within 906 cycles.
  - Worst MB: 862 cycles. Mean: 830 to 846.
- `tb_intra_top`: end-to-end test of seven MBs at the default parameters.
  - The MBs are noise, ramps and gradients at QP 20..40, with and without neighbours, plus one inter MB.
  - The testbench decodes each MB on its own from the chosen modes and the levels, and requires the engine's reconstruction to match pixel for pixel.
  - It also checks that the reconstruction error is plausible, that the chosen modes are usable, and that each MB ends within 906 cycles.
  - It counts Intra_4x4 MBs, Intra_8x8 MBs, inter MBs, transform stalls and rejected (unusable) modes, and fails if any of these never happens.

Each testbench prints `TB_RESULT checks=<n> failures=<n>`. To run one with
Verilator (modules are found in `rtl/` by name; the two packages are listed
first):

```
verilator --binary --timing -Wno-fatal -y rtl -Itb rtl/intra_pkg.sv tb/tb_ref_pkg.sv \
    tb/tb_intra_top.sv --top-module tb_intra_top -o sim && ./obj_dir/sim
```

Replace `tb_intra_top` with any other testbench name. The end-to-end test
takes a few seconds to build and well under a second to run.
