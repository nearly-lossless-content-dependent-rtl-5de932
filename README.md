# Content-dependent low-power 8x8 DCT

This is a 2-D 8x8 forward DCT for low-power video encoders. Its arithmetic
is distributed arithmetic (DA), and it skips work it can predict will not
matter. After quantisation most DCT coefficients of a video block are zero
or coarse. The design estimates, before transforming a vector, how many
bits of precision its AC outputs can use. It then runs the bit-serial
ROM-and-accumulator units (RACs) for only that many cycles and holds them
idle (clock-gated in silicon) for the rest. DC and AC4 are computed exactly
with adders, so the most visible coefficient never loses precision.

The RTL follows the architecture of the paper "Nearly Lossless
Content-Dependent Low-Power DCT Design for Mobile Video Applications":
- the row-column structure
- selective gated input registers
- scaled coefficients with a DC/AC4 butterfly
- a classifier driven by peak-to-peak pixel amplitude (PPA) and QP
- dynamic effective bitwidth extraction
- six RACs per 1-D core

The paper leaves widths, threshold values, handshakes and the transpose
buffering open. These are filled in here and listed under
[Choices made here](#choices-made-here-not-in-the-source).

## Data flow

```
 in_data (9 b, 1/cycle, raster order)
    |
 +--v--------------------- dct1d_core, STAGE=1 (row) -------------------+
 | D0..D7 (one enabled per cycle) -> butterfly -> E0..E3, O0..O3        |
 | aic (PPA, mode, QP) -> bit budgets                                   |
 | E0..E3 -> dc_ac4_bfly -> Y0, Y4  (exact, bit-parallel)               |
 | E0..E3 -> debe -> RAC2, RAC6        O0..O3 -> debe -> RAC1/3/5/7     |
 +--------------------------------+-------------------------------------+
                                  | 8 x 12 b, one row every 8 cycles
                       transpose_regs (2 x 8x8, ping-pong)
                                  | 12 b, column-major, 1/cycle
 +--------------------------------v---- dct1d_core, STAGE=2 (column) ---+
 |            same core, 12 b in / 16 b out, thresholds x2              |
 +--------------------------------+-------------------------------------+
                                  | 8 x 16 b, one column every 8 cycles
                                 p2s
                                  |
 out_data (16 b, 1/cycle), out_u, out_v
```

The design takes one sample per clock. It reaches that because a 1-D core
needs 8 cycles to receive a vector and its DA phase is also 8 cycles long:
one bit position per cycle, at most 8 bits. Nothing stalls, and input
gaps (`in_valid` low) are allowed anywhere.

## The 1-D core

### Scaled coefficients
The 8-point DCT matrix has entries `a..g` (a = cos(pi/4)/2, b = cos(pi/16)/2,
c = cos(2pi/16)/2, ..., g = cos(7pi/16)/2). After a first even/odd butterfly,
E_i = x_i + x_(7-i) and O_i = x_i - x_(7-i), the matrix splits into:

```
Y0 =  a a a a  . E        Y1 = b  d  e  g . O
Y2 =  c f -f -c . E       Y3 = d -g -b -e . O
Y4 =  a -a -a a . E       Y5 = e -b  g  d . O
Y6 =  f -c c -f . E       Y7 = g -e  d -b . O
```

Every core multiplies the matrix by 1/a. Then Y0 and Y4 need no
multiplication: `dc_ac4_bfly` forms s03 = E0+E3 and s12 = E1+E2, then
DC = s03+s12 and AC4 = s03-s12. The other six rows become constants
K = round(4096 * x/a), with 12 fractional bits, in `dct_pkg`. Because
a*a = 1/8, the 2-D output is **8 times the orthonormal 2-D DCT**
(F(u,v) = C(u)C(v)/4 * sum ...). Remove that factor in the quantiser.

### RAC (ROM and accumulator)
Each RAC computes an inner product with four constant coefficients. Per
cycle it takes one bit position of its four inputs, and those four bits
address a 16-word ROM. Each ROM word is the sum of the coefficients whose
address bit is set. Bits go most significant first, with
`acc <= 2*acc + ROM[bits]`. The first bit is the sign bit, so its ROM word
is subtracted. If N bits were processed and s low bits were skipped, the
result is `acc << s`, rounded to an integer and saturated. All four odd
RACs share one address, enable and sign control. The two even RACs share
another.

### Deciding how many bits: AIC and DEBE
This is the part that makes the design content-dependent.

1. **Advanced input classifier (`aic`).** While the eight samples arrive,
   it tracks their maximum and minimum. At the eighth sample it compares
   PPA = max - min with three thresholds per group, each `TH * QP`. The
   column core uses `2 * TH * QP`. The number of thresholds reached is
   the class (0..3), and `CLASS_BITS` turns it into a bit budget:
   0, 4, 6 or 8 bits. Class 0 means that group's AC outputs are zero.
   There are separate tables for intra and inter blocks. Within a table,
   the even group (RAC2/6) and the odd group (RAC1/3/5/7) have their own
   thresholds. A flat vector has a small PPA, so it gets a small budget,
   and a large QP lowers the budget further.
2. **Dynamic effective bitwidth extraction (`debe`).** The E/O registers
   keep the butterfly results at full width. For each group, `debe` finds
   the effective width W: the narrowest two's complement width that holds
   all four values, which drops the copies of the sign bit. The group then
   processes N = min(W, budget, 8) bits, from bit W-1 down to bit W-N.
   - If N = W, the DA result is exact up to coefficient rounding.
   - If W > 8, the low W-8 bits are dropped (floor). This happens when
     the 8-cycle budget is too small (e.g. large inter residuals, or the
     column pass of intra blocks).
   - If the budget is smaller than W, the classifier has chosen a coarser
     result.

   After N steps the RAC enables drop for the rest of the 8-cycle period.

A DA pass over the top N bits is linear, so the output of a group equals
`round(sum_i K_i * floor(v_i / 2^s) * 2^s / 4096)` with s = W - N. The
testbench reference model uses this whole-word form (`tb/dct_ref_pkg.sv`).

Each vector's decision is available as `vec_stat_t`: the classes, W and N
of both groups. These come out on `row_stat`/`col_stat`, for observation
and power estimation.

### Core timing
`dct1d_ctrl` counts samples modulo 8. Input register `D[count]` is the only
one enabled, and the cycle after the eighth sample `load` captures E/O and
the budgets and clears the RACs. Eight DA cycles follow, then the
eight results are registered: 9 clock edges after the edge that took the
eighth sample. A new `load` can fall on that same edge, so vectors flow
with no gap.

## Transpose and output
`transpose_regs` holds two 8x8 banks of 12-bit words. Each row result is
written in one cycle as a whole row. When a bank has its eight rows, it is
read column by column through a multiplexer, one element per cycle, into
the column core. The row side fills the other bank meanwhile. Reading takes
64 cycles, exactly the time needed to fill a bank, so neither side waits.
An assertion flags a write into a bank that is still full. `p2s` sends each
column's eight results out one per cycle.

## Top-level interface (`dct2d_top`)
| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `in_valid`, `in_data` | in | 1, 9 signed | samples in raster order, 64 per block: pixels 0..255 or residuals -255..255 |
| `in_mode`, `in_qp` | in | 1, 5 | `MB_INTRA`/`MB_INTER` and QP 1..31, taken with each block's first sample |
| `out_valid`, `out_data` | out | 1, 16 signed | coefficient, 8 x orthonormal DCT |
| `out_u`, `out_v` | out | 3, 3 | horizontal/vertical frequency; columns u = 0..7 in turn, v = 0..7 inside |
| `out_mode`, `out_qp` | out | 1, 5 | the block's mode and QP |
| `row_stat(_valid)`, `col_stat(_valid)` | out | 22, 1 | per-vector classifier/DEBE record |

Latency: a block's first coefficient is valid on the 29th clock edge
after the edge that took its last sample. With back-to-back blocks the
output runs continuously at one coefficient per clock. At this rate, CIF
4:2:0 video at 30 frames/s (4.56 M samples/s) needs a 4.56 MHz clock.

## Accuracy and work saved
`tb_quality` runs generated content through the design: shading, edges,
texture, noise, and the inter residual of a shifted copy. At QP 6, 8, 10
and 12 it quantises and dequantises both the design's coefficients and a
floating-point DCT the H.263 way, inverse transforms both, and compares
PSNR:

| mode | QP 6 | QP 8 | QP 10 | QP 12 |
|---|---|---|---|---|
| intra, PSNR drop (dB) | -0.02 | -0.04 | -0.01 | 0.06 |
| inter, PSNR drop (dB) | 0.05 | -0.23 | 0.15 | 0.15 |
| intra, RAC bit-cycles used | 76% | 75% | 74% | 69% |
| inter, RAC bit-cycles used | 68% | 62% | 57% | 53% |

These results come from synthetic content, not real video sequences. The
threshold defaults were chosen with this content, so the numbers show the
design behaves as intended; they are not an independent benchmark. With
the classifier disabled (all classes 3), the 8-bit truncation alone costs
under 0.1 dB here.

## Choices made here (not in the source)
- **Threshold tables and class budgets.** The source gives no values.
  Defaults in units of QP: intra even {1,1,2}, intra odd {1,2,4}, inter
  even {2,4,8}, inter odd {3,6,12}. Bits per class are {0,4,6,8}. The
  first intra tables tried ({1,2,4}/{2,3,6}) cost up to about 2 dB
  on intra content, which is why they are lower now. All of these are parameters of
  `aic`/`dct1d_core`.
- **Meaning of "threshold"**: the test is PPA >= TH * QP, doubled for the
  column pass.
- **Widths.** Input 9 bits signed. Row results are 12-bit integers (rounded).
  Outputs are 16 bits. Coefficients have 12 fractional bits. RAC outputs
  saturate.
- **DEBE bit order and truncation.** Bits go MSB first and the skipped low
  bits are floored (truncated, not rounded).
- **RAC2/6 inputs.** They are four-input DAs on E0..E3. A large DC level
  therefore widens the even group, and the 8-bit limit then truncates it,
  mainly in the column pass.
- **Fixed DA phase of 8 cycles** regardless of N, so latency does not
  depend on content.
- **Ping-pong transpose** and the column-major read order.
- **Block mode/QP** are taken with a block's first sample and travel with it.
- **Clock gating** is written as register and accumulator enables. Insert
  gated-clock cells in implementation.
- **Reset**: asynchronous, active low, clearing all state.
- **Output scaling**: the 1/a^2 = 8 factor is left in the output.

## Files
`rtl/`:
- `dct_pkg.sv`: constants (scaled coefficients), `mb_mode_e`, `vec_stat_t`
- `sgr_bfly.sv`: D0..D7 selective gated registers, butterfly, E/O registers
- `aic.sv`: advanced input classifier
- `debe.sv`: dynamic effective bitwidth extraction
- `rac.sv`: DA ROM and accumulator
- `dc_ac4_bfly.sv`: DC/AC4 butterfly
- `dct1d_ctrl.sv`: 1-D core sequencer
- `dct1d_core.sv`: 1-D 8-point DCT core
- `transpose_regs.sv`: ping-pong transpose register array
- `p2s.sv`: parallel-to-serial output
- `dct2d_top.sv`: the 2-D DCT

`tb/`:
- `dct_ref_pkg.sv`: reference model and floating-point DCT
- `tb_<block>.sv`: a self-checking testbench per block
- `tb_dct2d_top.sv`: end-to-end test at the default sizes, 400 blocks. It
  also checks latency and throughput and counts every mechanism.
- `tb_quality.sv`: the quality/computation run above

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating
From the project root, with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
  rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct2d_top.sv -y rtl -y tb \
  --top-module tb_dct2d_top -o sim
./obj_dir/sim
```

Replace `tb_dct2d_top` with any other testbench name. For a lint run, use
`verilator --lint-only -Wall -Irtl rtl/dct_pkg.sv rtl/dct2d_top.sv -y rtl`.

To change the trade-off between power and quality, edit the `TH_*` and
`CLASS_BITS` parameters of `dct1d_core`. Then mirror the change in the
threshold functions of `tb/dct_ref_pkg.sv`, because the testbenches assume
the defaults.
