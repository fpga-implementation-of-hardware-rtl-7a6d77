# H.264 intra prediction, transform and quantisation datapath

This is the arithmetic core of an H.264/AVC intra encoder, in synthesizable
SystemVerilog. A 4x4 block of luma pixels goes in together with its 13
already-coded neighbour pixels and a quantisation parameter. The design:

1. predicts the block in all nine 4x4 intra modes at once;
2. picks the cheapest mode;
3. transforms and quantises the prediction error into the levels an entropy
   coder would send;
4. decodes those levels again, exactly as a decoder would, to produce the
   reconstructed pixels. Later blocks are predicted from these pixels.

Everything is pipelined. A new 4x4 block can enter on every clock.
Alongside the 4x4 loop sit two more predictors, each with its own mode
decision: a 16x16 luma predictor and an 8x8 chroma predictor, with four
modes each. For every macroblock, a final comparison reports whether its
luma is cheaper to code as sixteen 4x4 blocks or as one 16x16 block.

The architecture follows a published FPGA design that covers transform,
quantisation and intra prediction. That design computes the transform by
multiplying with the constant matrix, calculates all prediction modes in
parallel, and takes separate valid inputs for each neighbour group. Where
the published description stops short, this RTL uses the H.264 standard's
own equations and tables. The sections below say where this design makes
its own choices.

## The coding loop

```
 blk_orig ─────────────────────────┐
 nb_* ──► intra4x4_pred ──9 preds──► sad_mode_decision ──► (orig − pred) ──► fwd_transform4x4
          (combinational)           (1 cycle)              residual          (2 cycles)
                                        │ chosen pred                             │ Y
                                        ▼                                         ▼
                                   6-cycle delay                              quant4x4 ──► level  (+4)
                                        │                                    (1 cycle)
                                        │                                         │ Z
                                        │                                     dequant4x4 (1 cycle)
                                        │                                         │ W
                                        │                                  inv_transform4x4 (2 cycles)
                                        ▼                                         │ residual'
                                     recon4x4  ◄──────────────────────────────────┘
                                     (1 cycle) ──► recon  (+8)
```

Latencies, counted from the clock edge that samples `blk_valid`:

| output | cycles later |
|---|---|
| `i4_valid`, `i4_mode`, `i4_sad` | 1 |
| `level_valid`, `level`, `level_mode` | 4 |
| `recon_valid`, `recon` | 8 |

Two values travel down the pipeline beside each block: its QP and its chosen
prediction. So blocks with different QPs can follow each other on
consecutive cycles. The pipeline has no back-pressure.

The neighbour pixels are plain inputs. Intra prediction needs the
reconstructed pixels of earlier blocks, so the caller must keep those and
feed them back. The design has no neighbour line buffer. If the next block
depends on the block just sent, that block has to wait until its `recon`
comes out (8 cycles). Blocks that do not depend on each other can be
interleaved at full rate: different slices, pictures or colour components.

## Intra prediction

### 4x4 luma (`intra4x4_pred`)

```
 M | A B C D | E F G H        M, A..H  : row above (E..H above-right)
 --+---------                 I..L     : column to the left
 I | a b c d                  a..p     : the block, raster order
 J | e f g h
 K | i j k l
 L | m n o p
```

Neighbours come in four groups, and each group has its own valid input:
`A..D`, `E..H`, `I..L` and `M`. Groups are missing at picture and slice
edges. The block computes all nine H.264 modes in parallel:

| mode | name | needs |
|---|---|---|
| 0 | vertical | A..D |
| 1 | horizontal | I..L |
| 2 | DC | — (mean of what is present, 128 if nothing) |
| 3 | diagonal down-left | A..D (E..H, or D repeated) |
| 4 | diagonal down-right | A..D, I..L, M |
| 5 | vertical-right | A..D, I..L, M |
| 6 | horizontal-down | A..D, I..L, M |
| 7 | vertical-left | A..D (E..H, or D repeated) |
| 8 | horizontal-up | I..L |

The directional modes use 2-tap `(p+q+1)>>1` and 3-tap `(p+2q+r+2)>>2`
filters along their direction. Internally the 13 neighbours are laid out
along one line, `L K J I M A B C D E F G H`. Each mode then becomes a window
into that line, offset by the pixel position. `mode_valid` reports which
modes have their neighbours.

### 16x16 luma and 8x8 chroma (`intra_plane_pred`, parameter `N`)

One parameterised module serves both sizes. It has four modes:

- **0 vertical:** each column copies the pixel above it.
- **1 horizontal:** each row copies the pixel to its left.
- **2 DC:** one mean of the top (H) and left (V) neighbours, used for the
  whole block.
- **3 plane:** a linear ramp in x and y, fitted to the neighbours in integer
  arithmetic:

  ```
  Hg = Σk (k+1)(top[N/2+k] − top[N/2−2−k]),   Vg likewise on the left column
  a  = 16 (top[N−1] + left[N−1])
  b  = (S·Hg + 32) >> 6,  c = (S·Vg + 32) >> 6,  S = 5 (N=16) or 34 (N=8)
  pred(x,y) = clip((a + b(x − N/2 + 1) + c(y − N/2 + 1) + 16) >> 5)
  ```

  An index of −1 refers to the corner pixel.

**Departure from H.264:** for chroma, H.264 computes a separate DC value
for each 4x4 quadrant. This design uses one mean for the whole 8x8 block,
as in the architecture it follows. Luma 16x16 DC is identical to H.264.

## Mode decision (`sad_mode_decision`)

For each candidate the module forms the sum of absolute differences (SAD)
against the source block, in parallel. It registers the available mode with
the smallest SAD, together with that mode's prediction and the source block.
Ties go to the lower mode number. If no mode is available, mode 0 is
reported. The module is parameterised by the number of modes and pixels:
9×16 for 4x4 luma, 4×256 for 16x16 luma and 4×64 for chroma.

SAD is this design's choice of cost. It ignores the rate of each mode and
the transformed error.

## 4x4 or 16x16 per macroblock (`luma_mode_select`)

This block groups every sixteen consecutive 4x4 results into one
macroblock. It sums their SADs, and when the sixteenth arrives it compares
the sum with the macroblock's 16x16 SAD. 16x16 coding wins ties, because it
signals one mode instead of sixteen.

The 16x16 SAD is held from its last `mb_valid`. The caller must therefore
present a macroblock to the 16x16 path before the last of its 4x4 blocks.
A natural order is the macroblock first, then its sixteen 4x4 blocks. If no
16x16 SAD arrived for a macroblock, it is reported as 4x4 and
`luma_i16_missing` is set. The result appears two cycles after the
sixteenth `blk_valid`.

The 4x4 loop codes every block whatever this choice is. The choice is a
report for the caller.

## Transform and quantisation

This is the hardest part to get right.

### Forward transform (`fwd_transform4x4`)

The core transform is `Y = Cf · X · Cf^T`, with

```
      | 1  1  1  1 |
 Cf = | 2  1 -1 -2 |
      | 1 -1 -1  1 |
      | 1 -2  2 -1 |
```

It is written as multiplications by the constant matrix entries. It is not
an add/shift butterfly. The row pass comes first, then the column pass, with
one register stage each. Residuals lie in −255..255, so |Y| ≤ 36·255 = 9180,
and every coefficient fits in 16 bits. A row of four coefficients is 64
bits. The transform's post-scaling is not applied here; the quantiser's
factors absorb it.

### Quantiser (`quant4x4`)

```
|Z| = (|Y| · MF + f) >> qbits,   sign(Z) = sign(Y),   qbits = 15 + ⌊QP/6⌋
```

QP ranges over 0..51. Raising QP by 6 doubles the step size, which here is
one more bit of shift. MF depends on `QP mod 6` and on the position class of
the coefficient:

| QP mod 6 | (0,0)(0,2)(2,0)(2,2) | (1,1)(1,3)(3,1)(3,3) | other |
|---|---|---|---|
| 0 | 13107 | 5243 | 8066 |
| 1 | 11916 | 4660 | 7490 |
| 2 | 10082 | 4194 | 6554 |
| 3 | 9362 | 3647 | 5825 |
| 4 | 8192 | 3355 | 5243 |
| 5 | 7282 | 2893 | 4559 |

The rounding offset `f` is 2^qbits/3 for intra blocks (`INTRA=1`, the
default) and 2^qbits/6 otherwise. Rounding is applied to the magnitude, so
it is symmetric about zero.

### Inverse quantiser (`dequant4x4`)

```
W = Z · V · 2^⌊QP/6⌋
```

V is the H.264 rescaling table:

| QP mod 6 | 0 | 1 | 2 | 3 | 4 | 5 |
|---|---|---|---|---|---|---|
| even-even class | 10 | 11 | 13 | 14 | 16 | 18 |
| odd-odd class | 16 | 18 | 20 | 23 | 25 | 29 |
| other | 13 | 14 | 16 | 18 | 20 | 23 |

V includes a factor of 64, which the inverse transform removes. W is held in
32 bits.

### Inverse transform (`inv_transform4x4`)

This is the exact-integer H.264 inverse transform. Each 1-D pass computes
`e0=w0+w2`, `e1=w0−w2`, `e2=(w1>>>1)−w3`, `e3=w1+(w3>>>1)` and outputs
`(e0+e3, e1+e2, e1−e2, e0−e3)`. Rows are processed first, then columns, and
the final step is `(x+32)>>>6`. The arithmetic is exact integer arithmetic,
so a decoder reproduces the encoder's reconstruction bit for bit. The row
pass is 40 bits wide so that no 32-bit input can overflow it.

### Reconstruction (`recon4x4`)

Computes `clip(pred + residual, 0, 255)`.

## Top-level interface (`h264_intra_tq_top`)

The top has no parameters. Pixels are 8 bits. Blocks are unpacked arrays in
raster order, where element `4*row+col` is the pixel at (row, col).
Reset (`rst_n`) is asynchronous and active low. It clears only the valid
flags; the data registers are not reset.

| group | ports |
|---|---|
| 4x4 in | `blk_valid`, `qp[5:0]`, `blk_orig[16]`, `nb_top[8]` (A..H), `nb_left[4]` (I..L), `nb_corner` (M), `nb_top_valid`, `nb_topright_valid`, `nb_left_valid`, `nb_corner_valid` |
| 4x4 out | `i4_valid`, `i4_mode[3:0]`, `i4_sad[11:0]`; `level_valid`, `level_mode[3:0]`, `level[16]` (16-bit signed); `recon_valid`, `recon[16]` |
| 16x16 in | `mb_valid`, `mb_orig[256]`, `mb_top[16]`, `mb_left[16]`, `mb_corner`, `mb_top_valid`, `mb_left_valid`, `mb_corner_valid` |
| 16x16 out (+1) | `i16_valid`, `i16_mode[1:0]`, `i16_sad[15:0]`, `i16_pred[256]` |
| chroma in | `ch_valid`, `ch_orig[64]`, `ch_top[8]`, `ch_left[8]`, `ch_corner`, `ch_top_valid`, `ch_left_valid`, `ch_corner_valid` |
| chroma out (+1) | `ch_out_valid`, `ch_mode[1:0]`, `ch_sad[13:0]`, `ch_pred[64]` |
| luma choice | `luma_sel_valid`, `luma_use_i16`, `luma_i16_missing`, `luma_sad4_sum[15:0]`, `luma_sad16[15:0]` |

The chroma path handles one component (Cb or Cr) per transfer.

Shared types and tables live in `rtl/h264_pkg.sv`: pixel and coefficient
types, the mode enums, the Cf matrix and the MF/V lookup functions.

## What is outside this datapath

Several parts of a full encoder are not part of this RTL:

- motion estimation and motion compensation (inter prediction);
- the deblocking loop filter;
- entropy coding;
- a neighbour line buffer;
- transform coding of the 16x16 and chroma residuals (the Hadamard DC
  transform of H.264).

The `level` outputs and the neighbour inputs are where those parts would
connect.

Limits to keep in mind:

- The design has been checked only in simulation, against reference models
  of the H.264 equations. It has not been checked against a conforming
  bitstream or decoder, and no FPGA timing closure was attempted. The
  published design reports 293.5 MHz on a Virtex-5; nothing here confirms
  that clock rate.
- Each pipeline stage holds a whole 4x4 block. This favours throughput over
  area.
- Every block port is brought out in parallel: a whole 4x4 block, and the
  16x16 and 8x8 blocks, cross the top's boundary in one clock. This suits
  embedding in a larger encoder, not a pin-limited FPGA. The published
  design fits into 69 I/O pins and also uses block RAM, so it must
  serialise its interface and buffer pixels in some way; how it does so is
  not given. Neither is built here. Generic synthesis of this top gives
  about 5200 flip-flop bits, about twice the published 2687 registers.
- The transform multiplies by constants of ±1 and ±2. A synthesis tool will
  usually turn these into adds and shifts rather than DSP multipliers.

## Verifying and simulating

Each module has a self-checking testbench in `tb/`. The testbenches share
reference models in `tb/h264_ref_pkg.sv`. Those models are written
independently of the RTL from the textbook form of the equations: `p[x,y]`
neighbour notation, matrix products and typed-in tables. Each testbench
prints `TB_RESULT checks=N failures=M` and stops itself with a watchdog.

| testbench | what it covers |
|---|---|
| `tb_intra4x4_pred` | all 9 modes × all 16 neighbour-availability combinations, random pixels |
| `tb_intra_plane_pred` | 16x16 and 8x8 instances, all modes and availabilities, plane clipping |
| `tb_sad_mode_decision` | random candidates, forced ties, no available mode, 1-cycle latency |
| `tb_fwd_transform4x4` | random and extreme residuals, 2-cycle latency, gaps in valid |
| `tb_quant4x4`, `tb_dequant4x4` | all 52 QPs, full coefficient range, latency |
| `tb_inv_transform4x4` | small, large and odd inputs (half-shift, negative rounding), latency |
| `tb_recon4x4` | clipping at both ends, latency |
| `tb_luma_mode_select` | both outcomes, equal costs, missing 16x16 SAD, 16x16 SAD arriving on the deciding cycle |
| `tb_h264_intra_tq_top` | end to end at full size (see below) |

The end-to-end test has three phases:

1. **Closed-loop coding.** It codes a 32x32 synthetic picture at QP 4, 22,
   34 and 51, macroblock by macroblock. Each macroblock goes to the 16x16
   path first, then its sixteen 4x4 blocks go through the loop. The
   design's own reconstruction is fed back as neighbours, and a neighbour
   group counts as missing until it has been coded.
2. **Streaming.** It sends 2000 blocks back to back with random
   availability and QP. A macroblock goes to the 16x16 path every sixteen
   blocks.
3. **16x16 and chroma.** It drives the 16x16 and chroma predictors.

The test checks every output and latency. It also fails if any of these
never happens:

- each of the 9 + 4 + 4 modes is chosen;
- both luma choices (4x4 and 16x16) are made;
- top-right substitution occurs;
- a block with no neighbours is coded;
- reconstruction clips;
- every QP/6 shift group is used;
- 2000 consecutive full-rate outputs are produced.

To run one test with Verilator (5.x), from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/h264_pkg.sv tb/h264_ref_pkg.sv \
    $(ls rtl/*.sv | grep -v h264_pkg) tb/tb_h264_intra_tq_top.sv \
    --top-module tb_h264_intra_tq_top -Mdir obj_top
./obj_top/Vtb_h264_intra_tq_top
```

The two packages come first and are listed once each.
For a unit test, list `rtl/h264_pkg.sv`, `tb/h264_ref_pkg.sv`, the module's
file and its testbench. Every test runs in well under a second.

## Changing it

- **Pixel and coefficient widths** are the `localparam`s at the top of
  `h264_pkg`. If you widen the pixels, also widen `clip_pixel` and the
  SAD-width expressions.
- **Pipeline depth.** To add or remove a pipeline stage, adjust the
  companion delay lines in `h264_intra_tq_top`. These are `qp_d`, `mode_d`
  and `pred_d`, and each carries a comment giving its offset. The top test
  checks the latencies and will flag a mismatch.
- **Inter blocks.** For inter blocks, instantiate `quant4x4` with
  `INTRA(0)`.
