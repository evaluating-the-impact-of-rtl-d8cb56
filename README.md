# 8x8 FDCT/IDCT core with two configurable 1-D blocks

This core computes the 8x8 two-dimensional discrete cosine transform used by JPEG
and MPEG, in either direction: forward (FDCT, pixels to coefficients) or inverse
(IDCT, coefficients to pixels). It takes one matrix row of eight 12-bit samples per
clock and returns one matrix every eight clocks. That is 8 pixels per cycle, so a
1080p 30 fps 4:2:2 stream (124.3 Mpixel/s) needs only a 15.6 MHz clock.

The core uses the row-column method. A 1-D transform of each row is followed by a
transposition and a 1-D transform of each column. Three ideas make it small and fast:

* **One 1-D dataflow serves both directions.** The 8-point transform is a
  fixed-point LLM-style fast DCT (Massimino's variant, with a well-balanced odd part).
  It is arranged as three steps: butterflies, rotations and shifts. The FDCT
  traverses them forwards. The IDCT traverses the same steps backwards, because
  every operator in them is its own transpose.
* **Cheap constant multipliers.** The rotation constants are 11-bit fixed-point
  integers (binary point B11). Each multiplication is a hardwired shift-add. The
  row results are clipped to 14 bits, so the transpose store is 8x8 words of 14 bits.
* **A transpose buffer that never waits.** Matrices are written alternately by rows
  and by columns and read the other way. A new matrix can therefore fill the lines
  the previous one has just released. A one-word bypass lets the first column leave
  in the same cycle the last row arrives. The buffer sustains one line in and one
  line out per cycle, the minimum of eight cycles per matrix.

```
           12b x8                 14b x8                  14b x8                 12b x8
 s_data -> [input reg] -> [row 1-D block] -> [transpose buffer] -> [col 1-D block] -> [output reg] -> m_data
                            STEP0/1/2          8x8 x 14b regs        STEP0/1/2
                            (3 stages)         FSM S0..S4, bypass    (3 stages)
```

## The 1-D block: one dataflow, two directions

The block computes `sqrt(8)` times the orthonormal 8-point DCT. Output 0 is then the
plain sum of the inputs. With `c_n = cos(n*pi/16)`, the steps in the forward
direction are:

**STEP0, seven butterflies** (a butterfly maps `(a, b)` to `(a+b, a-b)`):

```
s07 = x0+x7  d07 = x0-x7   s16 = x1+x6  d16 = x1-x6     (level 1, 4 butterflies)
s25 = x2+x5  d25 = x2-x5   s34 = x3+x4  d34 = x3-x4
e0 = s07+s34  e3 = s07-s34   e1 = s16+s25  e2 = s16-s25 (level 2, 2 butterflies)
p0 = e0+e1    p4 = e0-e1                                 (level 3, 1 butterfly)
```

**STEP1, four rotations and six sums.** A rotation with constants `(C, K1, K2)`
computes `tmp = C*(x+y)`, `x' = tmp + K1*x` and `y' = tmp + K2*y`. It needs three
multiplications and three additions.

```
(Y2, Y6)   = R6 (e3, e2)                       Y0 = p0, Y4 = p4
z3 = d34 + d16,   z4 = d25 + d07
(z3', z4') = R17(z3, z4)
(a34, a07) = R37(d34, d07)    (a25, a16) = R13(d25, d16)
Y7 = a34 + z3'   Y3 = a16 + z3'   Y1 = a07 + z4'   Y5 = a25 + z4'
```

| rotation | C | K1 | K2 | C, K1, K2 as exact values |
|---|---|---|---|---|
| R6  | 1108  | 1567  | -3784 | sqrt2*c6, sqrt2*(c2-c6), -sqrt2*(c2+c6) |
| R17 | 2408  | -4017 | -799  | sqrt2*c3, -sqrt2*(c3+c5), sqrt2*(c5-c3) |
| R37 | -1843 | 612   | 3075  | sqrt2*(c7-c3), sqrt2*(-c1+c3+c5-c7), sqrt2*(c1+c3-c5-c7) |
| R13 | -5249 | 4205  | 6293  | -sqrt2*(c1+c3), sqrt2*(c1+c3-c5+c7), sqrt2*(c1+c3+c5-c7) |

Each integer is `round(value * 2^11)`. Every multiplier is a sum of shifted copies of
its operand, one for each set bit of the constant (`dct_rotate`).

**STEP2, shifts.** This step removes the `2^11` of the constants and sets the scale
of the pass (next section).

**Going backwards.** The IDCT is the transpose of the FDCT matrix, and a flow graph
computes the transposed matrix when it is run backwards. Each piece here stays
simple when reversed:

* A butterfly is its own transpose.
* A rotation has the symmetric matrix `[[C+K1, C], [C, C+K2]]`, so the same block
  with the same constants works in both directions.
* The two places where a value fans out to two sums become two sums
  (`z3 = Y7+Y3`, `z4 = Y1+Y5`). The four final sums become the four sums that
  rebuild `d34, d16, d25, d07`.

The IDCT is therefore STEP2 (shifts), STEP1 (the reversed rotations and sums), and
STEP0 (butterfly levels 3, 2, 1). `dct_step0` and `dct_step1` each take a `dir`
input that selects the order.

**Positions and pipelining.** The FDCT needs STEP0 first and STEP2 last, and the IDCT
the other way round. So the block has three positions:

* A: STEP0 for the FDCT, STEP2 for the IDCT.
* B: STEP1.
* C: STEP2 for the FDCT, STEP0 for the IDCT.

The direction bit travels with each line. Positions A and C hold the logic of both
of their step kinds, so an FDCT matrix may directly follow an IDCT matrix in the
pipeline.

* `PIPELINED=1` adds registers after A and after B. The three pipeline stages end
  in the register of the next block, so the block has 2 cycles of latency.
* `PIPELINED=0` makes the block purely combinational.

## Fixed-point scaling and rounding

This is the subtle part of the design. Every number below can be changed in
`dct_pkg`, `dct_step2` and `dct_1d`.

| pass | input | what the pass produces | final step |
|---|---|---|---|
| row FDCT | 12-bit pixels | `4 * sqrt8 * DCT` | Y0, Y4: `<<2`. Rotated outputs: round(`v / 2^9`) |
| column FDCT | 14-bit row results | `sqrt8 * DCT / 32` | Y0, Y4: round(`v / 2^5`). Rotated outputs: round(`v / 2^16`) |
| row IDCT | 12-bit coefficients | `4 * sqrt8 * IDCT` | input `<<5`. Rotations rounded by `2^11`. End: round-half-even(`v / 2^3`) |
| column IDCT | 14-bit row results | `sqrt8 * IDCT / 32` | input `<<3`. Rotations rounded by `2^11`. End: round-half-even(`v / 2^8`) |

Two passes multiply the result by `4 * 8`, and the final division by 32 removes that
factor. The core's output is therefore the orthonormal 2-D DCT, the JPEG
definition, with DC = (sum of the pixels) / 8.

The row result keeps two extra bits (factor 4). This makes a full-range block fill
the 14-bit transpose word exactly: 8 pixels x -256 x 4 = -8192. Row results outside
-8192..8191 are saturated. The column results are saturated to 12 bits in both
directions.

The IDCT gets three guard bits in each pass and ends each pass with
round-half-to-even. Plain round-half-up gave a mean error of about 0.01 per pixel,
well over the 0.0015 that IEEE 1180 allows. Ties to even remove that bias.

Rounding the row result to a 14-bit word sets the accuracy floor. For the full
-256..255 range the overall mean square error is about 0.021. That is slightly over
the IEEE 1180 limit of 0.02, and about the same as the 0.0205 published for this
modified algorithm. Measured with `tb_ieee1180` at 10000 blocks per range (IDCT
outputs clipped to -256..255 as the standard prescribes):

| input range | peak err | peak mean err | peak MSE | overall mean err | overall MSE |
|---|---|---|---|---|---|
| -256..255 (and negated) | 1 | < 0.015 | < 0.06 | <= 0.0004 | 0.0208 / 0.0210 |
| -5..5 (and negated) | 1 | < 0.015 | < 0.06 | <= 0.0002 | 0.0133 |
| -300..300 (and negated) | 1 | < 0.015 | < 0.06 | <= 0.0002 | 0.0190 / 0.0193 |

The FDCT agrees with the exact orthonormal DCT within 1 in every output sample, for
pixels in -256..255.

## Transpose buffer

`dct_tbuffer` is an 8x8 array of 14-bit registers with one 8-word write port and one
8-word read port. Matrix n is written by rows and read by columns. Matrix n+1 is
then written by columns and read by rows, and so on. In steady state the states are:

| state | write | read |
|---|---|---|
| S0 | rows 0..6 of the first matrix | nothing |
| S1 | row 7 | column 0. Its word 7 is the word being written (bypass) |
| S2 | columns 0..6 of the next matrix | columns 1..7 |
| S3 | column 7 | row 0, with the same bypass |
| S4 | rows 0..6 of the next matrix | rows 1..7 |

After S4 the buffer goes back to S1. In S2 and S4 the line being written has always
been read one cycle or more earlier, so no word is overwritten before it is used.

The control is two line counters and two orientation flags, from which `state` is
decoded. So it tolerates gaps in the input: reads continue while writes wait. When
no further matrix comes, the last one drains on its own. Two assertions check the
rules:

* a matrix completes only after the previous one has been read out;
* a line is written only after it has been read.

## Interface and timing (`dct2d_2x`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `s_valid` / `s_ready` | in / out | 1 | input handshake, one matrix row per transfer |
| `s_dir` | in | `dir_e` | `DIR_FDCT` or `DIR_IDCT`; the same for all 8 rows of a matrix |
| `s_data` | in | 8 x 12 signed | row `x[r][0..7]`, rows in order 0..7 |
| `m_valid` / `m_ready` | out / in | 1 | output handshake |
| `m_dir` | out | `dir_e` | direction of the result |
| `m_data` | out | 8 x 12 signed | column k of the result, `F[0..7][k]`, columns in order 0..7 |
| `m_last` | out | 1 | marks column 7 of each result |
| `tbuf_state` | out | `tb_state_e` | transpose-buffer state, for observation |

* **Handshake.** The handshake follows AXI4-Stream rules. A transfer happens when
  valid and ready are both high, and a pending output holds until it is taken (an
  assertion checks this).
* **Stalls.** The whole datapath advances as one unit whenever the output register
  is empty or being read: `s_ready = !m_valid || m_ready`. Back-pressure stalls
  every stage together.
* **Output order.** The result comes out transposed, column by column, because the
  design transposes the data only once between the two passes.
* **Throughput.** One matrix per 8 cycles with no gaps. FDCT and IDCT matrices may
  be mixed freely.
* **Latency.** From the transfer of the last input row to the transfer of the first
  result column, with `m_ready` high: 6 cycles with `PIPELINED=1`, 2 cycles with
  `PIPELINED=0`.

## Configurations

`PIPELINED` (default 1) selects between two of the four architectures this design
family defines:

* **2xDCT Pipe** (`PIPELINED=1`): the most energy-efficient of the four, and the
  default.
* **2xDCT Comb** (`PIPELINED=0`): the same core with combinational 1-D blocks. It
  needs a slower clock for the same work; at 8 cycles per matrix the throughput
  per clock is identical.

Two single-block variants are not included. In those, one 1-D block does the row
pass and then the column pass, and the transpose buffer also serves as the
input/output register (17 or 21 cycles per matrix).

## Design choices beyond the algorithm

The following are this design's own decisions:

* **Constants.** The exact constant values: round(value * 2^11) of the LLM rotation
  coefficients.
* **Scaling and rounding.** The pass scaling (two extra bits between the passes),
  the three IDCT guard bits and the round-half-to-even at the end of an IDCT pass.
* **Internal width.** 40-bit internal arithmetic, wide enough that no intermediate
  can overflow.
* **Saturation.** Column results are saturated to 12 bits. Clipping IDCT results to
  -256..255 is left to the user.
* **Handshake and framing.** The valid/ready handshake with a global stall, the
  `m_last` framing output and the per-line direction bit. The AXI-style protocol
  lives in the top module. The transpose buffer's control only sequences its own
  reads and writes and takes a common enable.
* **Pipeline registers.** Each of the three pipeline stages holds one step. Only
  two of the registers sit inside the 1-D block. The third is the register that
  follows it: the transpose buffer after the row block, the output register after
  the column block.
* **Row and column blocks.** The two blocks differ only in the STEP2 shifts and the
  final rounding (`IS_COLUMN`). They use the same rotation constants.
* **1-D block layout.** Both kinds of step logic at positions A and C, so that
  directions can be mixed in the pipeline.
* **Reset.** Only control state (valid bits, counters, direction tags) is reset.
  Data registers are not.
* **Multipliers.** Shift-add over the set bits of each constant, without canonical
  signed-digit recoding. A synthesis tool may restructure them.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | widths, types, B11 rotation constants, rounding and saturation functions |
| `rtl/dct_rotate.sv` | planar rotation, three shift-add constant multipliers |
| `rtl/dct_step0.sv` | seven butterflies, both orders |
| `rtl/dct_step1.sv` | R6, R17, R37, R13 and the six sums, both directions |
| `rtl/dct_step2.sv` | scaling shifts, row or column flavour |
| `rtl/dct_1d.sv` | configurable 1-D FDCT/IDCT block, combinational or 3-stage pipelined |
| `rtl/dct_tbuffer.sv` | transpose buffer with FSM and bypass |
| `rtl/dct2d_2x.sv` | top: the complete 2-D core |
| `tb/dct_ref_pkg.sv` | real-valued reference DCT/IDCT for the testbenches |
| `tb/tb_*.sv` | self-checking testbenches, one per module, plus the ones below |

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each
has a watchdog.

* **`tb_dct_rotate`, `tb_dct_step0`, `tb_dct_step1`, `tb_dct_step2`:** exact or
  toleranced comparison with independent formulas: integer products, the explicit
  butterfly matrix and its transpose, the cosine sums, and shifts written as real
  divisions.
* **`tb_dct_1d`:** all four row/column, pipelined/combinational instances against the
  real-valued DCT and IDCT. It uses random stalls and gaps and checks the 2-cycle
  latency.
* **`tb_dct_tbuffer`:** transposition, direction tags, the same-cycle bypass, one read
  per cycle, 48 lines in 48 cycles back to back, and every state S0..S4.
* **`tb_dct2d_2x`:** the whole core at its default parameters. FDCT and IDCT results
  must be within 1 of the exact 2-D transform. It checks the rate (8 cycles per
  matrix), the latency (6) and `m_last`. It counts the bypass in S1 and S3, output
  stalls, input gaps, direction switches and drain reads, and fails if any never
  happened.
* **`tb_dct2d_2x_comb`:** the same test for `PIPELINED=0`, with latency 2.
* **`tb_ieee1180`:** the IEEE-1180 style IDCT accuracy test above, 6 x 10000 blocks.
  It uses `$urandom` instead of the standard's own generator. OMSE is checked
  against 0.02, except for the two -256..255 ranges. Those are checked against
  0.0215 (5% above the published figure), for the reason given above.
* **`tb_psnr`:** a JPEG-style image test. A generated 128x128 grey image is
  transformed by the core. Its coefficients are quantised with the standard JPEG
  luminance table at quality 50, 75 and 100, and the image is rebuilt. The test
  compares the PSNR with that of the exact transform.

  | quality | exact FDCT | core FDCT, exact IDCT | core FDCT and core IDCT |
  |---|---|---|---|
  | 50  | 35.40 dB | 35.40 dB | 35.40 dB |
  | 75  | 37.01 dB | 37.01 dB | 37.01 dB |
  | 100 | 58.84 dB | 58.79 dB | 58.73 dB |

  The core must stay within 0.1 dB (FDCT only) and 0.3 dB (round trip) of the
  exact flow.

To run a testbench with Verilator 5:

```
verilator --binary --timing -Wno-fatal -y rtl -y tb \
    rtl/dct_pkg.sv tb/dct_ref_pkg.sv tb/tb_dct2d_2x.sv --top-module tb_dct2d_2x -o sim
obj_dir/sim
```

Replace `tb_dct2d_2x` by any other testbench name. Each one runs in seconds.
