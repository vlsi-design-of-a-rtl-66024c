# Pipelined multiplierless 8-point DCT

This is a fixed-point 8-point forward Discrete Cosine Transform for image
and video coding. It has no multipliers. It follows the ISO/IEC 23002-2
fixed-point DCT, in which each cosine factor is a short sum of arithmetic
right shifts. The whole transform is built from 32-bit adders, subtractors
and wiring.

The unit takes one vector of eight samples per clock: one row or one column
of an 8x8 block. It returns the eight coefficients three clocks later. One
bank of pipeline registers cuts the longest path through the adder network,
from six adders/subtractors down to three. This raises the clock rate
without lowering the throughput of one vector, or eight pixels, per clock.
A parameter removes that register bank to give the unpipelined version.
At the published operating points (0.13 um CMOS), the pipelined unit runs
at 217 MHz, or 1739 Mpixels/s. The unpipelined one runs at 125 MHz, or
1000 Mpixels/s.

## The data flow

Write the inputs as `ind0..ind7` and the outputs as `outd0..outd7`. The
transform is a butterfly network with three rotations.

1. **Input butterflies.** `x0,x1 = ind0 ± ind7`, `x4,x5 = ind1 ± ind6`,
   `x2,x3 = ind2 ± ind5`, `x6,x7 = ind3 ± ind4`. The sums feed the even
   half of the network and the differences feed the odd half.
2. **Even half.** `xa,x6 = x0 ± x6` and `xb,x2 = x4 ± x2`. Then
   `outd0 = xa + xb` and `outd4 = xa − xb`. `outd2` and `outd6` come from
   rotating `(x6, x2)` with the PMUL_3 pair.
3. **Odd half.** `(x3, x5)` is rotated with PMUL_1 and `(x1, x7)` with
   PMUL_2. Then come two butterfly levels:
   `xa = x1 + x3`, `outd3 = x1 − x3`, `xb = x7 + x5`, `outd5 = x7 − x5`,
   `outd1 = xa + xb`, `outd7 = xa − xb`.

### The PMUL constant pairs

A PMUL unit (`dct_pmul`) returns two products of one input X. Together the
two products form the cosine and sine of one rotation angle, times a common
gain. Two units of the same kind rotate a pair of values, for example
`x3' = p1(x3) + p2(x5)` and `x5' = p1(x5) − p2(x3)`. The header of
`dct_stage2` lists the sign pattern of each of the three rotations.

| kind | p1 = pmul_k_1(X) | p2 = pmul_k_2(X) | gains | p2/p1 |
|---|---|---|---|---|
| 1 | `X − (X>>3) − (X>>7)` | `t + (t>>1)`, `t = (X>>3) − (X>>7)` | 0.8672, 0.1758 | 0.2027 ≈ tan(π/16) |
| 2 | `(u>>2) − u`, `u = (X>>9) − X` | `X>>1` | 0.7485, 0.5 | 0.6680 ≈ tan(3π/16) |
| 3 | `(s>>2) + (X>>4)`, `s = X + (X>>5)` | `s − (s>>2)` | 0.3203, 0.7734 | 2.4146 ≈ 1/tan(π/8) |

All shifts are arithmetic (sign-preserving).

### Output scaling

This is a *scaled* DCT. Output k equals the orthonormal DCT coefficient
X(k) times a fixed gain:

| k | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 |
|---|---|---|---|---|---|---|---|---|
| gain | 2.8284 | 2.5244 | 1.6743 | 1.7850 | 2.8284 | 1.7850 | 1.6743 | 2.5244 |

`outd0` is exactly the sum of the eight inputs. The odd gains differ by a
factor of √2 between the pairs (1,7) and (3,5). Each output's deviation
from the exact DCT basis is at most 1.1% of the summed input magnitude,
plus truncation in the shifts. In a codec these gains are folded into the
quantiser. Words are 32 bits, and all adders wrap on overflow. Pixel data
at 8 to 16 bits, even after a second pass, is far from overflow.

## Where the pipeline is cut

Count one level for each adder or subtractor. Shifts are wires and do not
count. The deepest paths are six levels. One runs through the input
butterfly, the two levels of a PMUL_1 or PMUL_2 product, the rotation sum
and two odd butterflies. The register bank sits after level 3, which splits
every path into at most 3 + 3 levels:

- `dct_stage1` holds levels 1 to 3. These are the input butterflies, the
  even butterflies up to `outd0`/`outd4`, and the four PMUL_1/PMUL_2 units.
- `dct_stage2` holds levels 4 to 6. These are the two PMUL_3 units, all
  rotation sums and the odd butterflies.

Each PMUL unit lies wholly on one side of the cut. Twelve 32-bit words
cross it, and `dct_pkg::cut_idx_e` names them:

- `outd0` and `outd4`;
- the PMUL_3 inputs `x2` and `x6`;
- the eight PMUL_1/PMUL_2 products.

The unit thus has 28 32-bit registers: 8 input, 12 pipeline and 8 output.

The published pipelined design reports 42 registers, that is 26 at its
cut. It does not say where that cut lies, and no single cut of this graph
carries as many as 26 words. The unpipelined version keeps the published
count of 16 registers.

## Interface and timing

`dct8_top #(W = 32, PIPELINED = 1)`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock |
| `rst_n` | in | 1 | synchronous reset, active low; clears every register and valid flag |
| `in_valid` | in | 1 | `ind` holds a vector this clock |
| `ind[0:7]` | in | 8 × W signed | input samples |
| `out_valid` | out | 1 | `outd` holds a result |
| `outd[0:7]` | out | 8 × W signed | coefficients, natural order |

A vector that is present with `in_valid` at clock edge n appears on `outd`,
with `out_valid` high, after edge n+3. With `PIPELINED = 0` it appears after
edge n+2. There is no back-pressure, and the unit never stalls: a vector can
be presented on every clock.

Clocks without `in_valid` make bubbles. Each bubble travels with its own
valid flag. The registers hold their previous data during a bubble. A reset
discards every vector in flight.

The published design has only a clock. The valid flags, the hold behaviour
and the reset were added here so that the unit can run in a stream with
gaps.

## Two-dimensional 8x8 transform

An 8x8 DCT is computed row-column: pass each row of a block through the
unit, transpose the 8x8 block of results, then pass each column. This code
has no transpose buffer, because the published design specifies none. The
end-to-end testbench does the transposition in the testbench itself.

A 176x144 frame takes 3168 row vectors and 3168 column vectors, so
6336 clocks on one unit. At 8 pixels per clock, one 1-D pass over
7680x4320 video at 30 frames/s needs 124 MHz. A full 2-D transform on a
single unit needs twice that.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | `DCT_N`, `DCT_W`, names of the cut words, PMUL kinds |
| `rtl/dct_pmul.sv` | one PMUL constant pair, selected by `KIND` |
| `rtl/dct_stage1.sv` | levels 1–3 of the data flow (combinational) |
| `rtl/dct_stage2.sv` | levels 4–6 of the data flow (combinational) |
| `rtl/dct_regbank.sv` | N × W register bank with a valid flag (input, pipeline and output registers) |
| `rtl/dct8_top.sv` | the unit |
| `tb/tb_dct_ref_pkg.sv` | reference model: the algorithm written as sequential software on 32-bit integers |
| `tb/tb_dct_pmul.sv`, `tb/tb_dct_stage1.sv`, `tb/tb_dct_stage2.sv`, `tb/tb_dct_regbank.sv` | unit tests |
| `tb/tb_dct8_top.sv` | end-to-end test at default parameters |
| `tb/tb_dct8_top_nopipe.sv` | the same test with `PIPELINED = 0` |

## Simulating

Run each testbench with Verilator 5, from the directory that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_dct8_top rtl/dct_pkg.sv tb/tb_dct_ref_pkg.sv tb/tb_dct8_top.sv
./obj_dir/Vtb_dct8_top
```

To run another test, replace `tb_dct8_top` with its name. Each testbench
ends with `TB_RESULT checks=N failures=M`. Each also has a watchdog that
counts a failure if the simulation hangs.

## What the tests establish

- **Bit-exactness.** Every output of every test matches `dct_ref`. This is
  an independent model that runs the algorithm as a sequence of
  overwritten variables. It shares no code with the RTL. Inputs include
  pixel-range data, full-range 32-bit words (to exercise wrap-around), and
  extreme values.
- **Meaning.** In the end-to-end tests, every coefficient of the row pass is
  compared with the real-valued DCT times the gain in the table above.
- **Timing.** Each result must arrive exactly 3 clocks after its input (2
  clocks with `PIPELINED = 0`), in order. A 3168-vector pass must finish in
  3168 + latency + 2 clocks, that is one vector per clock.
- **Mechanisms.** Each end-to-end test counts every mechanism listed below
  and fails if any of them never occurs:
  - pipeline fill;
  - a full pipeline;
  - back-to-back streaming;
  - bubbles;
  - a reset that flushes vectors in flight.
- **Workload.** The end-to-end tests transform a synthetic 176x144
  (QCIF-sized) luminance frame as 396 8x8 blocks: a row pass, a
  transposition, then a column pass.

## Departures and open points

- **The PMUL_2 first product.** It is implemented as `(u>>2) − u` with
  `u = (X>>9) − X`, so the whole term `u` is subtracted (gain 0.7485). If
  instead `X>>9` and `X` were subtracted one after the other (gain −1.25),
  the odd outputs would no longer be DCT coefficients. With the version
  used here, all three PMUL pairs are rotations by π/16, 3π/16 and π/8, and
  the real-valued check passes.
- **The pipeline cut.** The cut and its register count (12, against a
  published 26) are this design's own choices; see above.
- **Path depth.** The published longest path is seven adders/subtractors.
  With the PMUL_2 product above it is six, and the split is 3 + 3 levels.
- **Operator count.** The published totals are 19 adders and 27
  subtractors. The source here has 19 adders and 25 subtractors, because
  `(X>>9) − X` is computed once in each PMUL_2 unit instead of twice.
- **Not included.** The 2-D transpose buffer, and the hand-placed
  standard-cell operators of the original custom implementation. Timing
  closure at the published frequencies depends on the target technology
  and has not been checked here.
