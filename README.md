# 8x8 forward BinDCT: a multiplierless 2-D DCT pipeline

The discrete cosine transform of 8x8 pixel blocks is the core of JPEG, MPEG
and H.26x coding. Its cosine coefficients are irrational, so a direct
implementation needs multipliers. The BinDCT avoids them. It starts from a fast
DCT factorisation (Chen's), writes each plane rotation of that factorisation as
a chain of *lifting steps*, and rounds each lifting coefficient to a dyadic
fraction k/2^n. Each multiplication then becomes a few shifts and additions.
The transform that results is not exactly the DCT. It is a close, scaled
approximation whose scale factors a quantiser can absorb.

This RTL implements the 8x8 two-dimensional forward BinDCT by the row-column
method:

```
 pix[0..7] (9-bit rows)                                          coef[0..7] (17-bit columns)
 ──────────► bindct_1d (rows) ──► transpose_8x8 ──► bindct_1d (columns) ──────────►
             4-stage pipeline     one 8x8 array     4-stage pipeline
```

Each 1-D unit is a four-stage pipeline that handles all eight samples of a
vector in parallel. A new row can enter on every clock, and a coefficient
column leaves on every clock. The structure, the four pipeline stages and the
word lengths come from M. H. Jabbar, *BinDCT Design and Implementation on FPGA
with Low Power Architecture* (MSc dissertation, Liverpool John Moores
University, 2008). That work targets a low-power, small-area FPGA
implementation. The section "Where this RTL makes its own choices" lists every
decision made here that is not taken from the dissertation.

## The 1-D transform, step by step

Notation: `x[0..7]` are the input samples and `X[0..7]` the outputs in
frequency order. `>>` is an arithmetic right shift, which rounds down
(floor). Each constant multiplication `c*v` is computed as a sum of shifted
copies of `v`, followed by one right shift:

| constant | approximates                       | value  | shift-and-add           |
|----------|------------------------------------|--------|-------------------------|
| 13/32    | tan(pi/8)                          | 0.4142 | (8v + 4v + v) >> 5      |
| 11/32    | sin(pi/8)cos(pi/8)                 | 0.3536 | (8v + 2v + v) >> 5      |
| 11/16    | sin(pi/4) and tan(3pi/16)          | 0.7071, 0.6682 | (8v + 2v + v) >> 4 |
| 3/16     | tan(pi/16) and sin(pi/16)cos(pi/16)| 0.1989, 0.1913 | (2v + v) >> 4    |
| 15/32    | sin(3pi/16)cos(3pi/16)             | 0.4619 | (16v - v) >> 5          |

The package `bindct_pkg` holds these operators. Each stage ends in a register:

| stage | even half (upper)                                   | odd half (lower)                                    |
|-------|-----------------------------------------------------|-----------------------------------------------------|
| 1     | `s[i] = x[i] + x[7-i]`                              | `d[i] = x[i] - x[7-i]`                              |
| 2     | `e0 = s0+s3, e1 = s1+s2, e2 = s1-s2, e3 = s0-s3`    | pi/4 rotation of (d1, d2) as three lifting steps: `v = d1 - 13/32 d2`, `m6 = d2 + 11/16 v`, `m5 = v - 13/32 m6` |
| 3     | `X0 = e0 + e1`, `X4 = X0/2 - e1`, `X2 = e3 + 13/32 e2`, `X6 = 11/32 X2 - e2` | butterfly: `h0 = d0 + m6`, `h1 = d0 - m6`, `h2 = d3 - m5`, `h3 = d3 + m5` |
| 4     | X0, X4, X2, X6 re-timed                             | `X1 = h0 + 3/16 h3`, `X7 = 3/16 X1 - h3`, `X5 = h2 + 11/16 h1`, `X3 = h1 - 15/32 X5` |

The pi/4 rotation in stage 2 uses three lifting steps, so it is unscaled. The
other three rotations use two lifting steps each. This is the *scaled lifting*
form: the rotation of (a, b) by angle t, with `p = tan t` and `u = sin t cos t`,
gives `P = a + p b = R1 / cos t` and `Q = u P - b = cos t * R2`, where R1 and R2
are the exact rotated values. Each output therefore differs from the
unnormalised DCT-II `Y[k] = sum x[n] cos((2n+1) k pi / 16)` by a fixed factor:

| output | X0 | X1            | X2           | X3             | X4        | X5              | X6         | X7           |
|--------|----|---------------|--------------|----------------|-----------|-----------------|------------|--------------|
| equals | Y0 | Y1/cos(pi/16) | Y2/cos(pi/8) | cos(3pi/16) Y3 | Y4/sqrt 2 | Y5/cos(3pi/16)  | cos(pi/8) Y6 | cos(pi/16) Y7 |

With exact (irrational) coefficients, this flow graph reproduces the scaled
DCT exactly. The only error is the dyadic rounding of the coefficients and the
floor rounding of each product. On 9-bit inputs, the 1-D outputs stay within
about 31 of the scaled DCT, on a full scale of 2048. For the 2-D result the
bound is about 163 on a full scale of 16384, i.e. 1 %.

A 2-D coefficient `coef[v]` in output column `k` carries the product of the
row factor for `k` and the column factor for `v`. A JPEG-style quantiser folds
these factors into its quantisation table.

## Word lengths

The largest gain from the input to any signal in the 1-D flow graph is 8, at
the DC term. The widths follow from that:

* Input samples are 9-bit signed. For 8-bit grey-scale pixels, present
  `pixel - 128`.
* Between the passes, 13 bits (`MID_W`) hold eight times the 9-bit range.
* Output coefficients are 17-bit signed (`OUT_W`). The 2-D DC term needs 16
  bits.
* Inside a 1-D unit, every lane is as wide as that unit's output. The constant
  operators compute at 32 bits and truncate back.

`FRAC` (default 0) carries extra fraction bits through both passes. The
samples enter shifted left by `FRAC`, so the floor of every lifting step falls
below the integer LSB. A combinational adder after the last register then
rounds the result back to 17 integer bits, half up. `FRAC = 5` gives the
5-bit-fraction variant. Most of the error comes from the dyadic coefficients
themselves, so in the test image the gain in accuracy is small (maximum
deviation 162 instead of 163).

## The transposition matrix

`transpose_8x8` stores a single 8x8 block, yet accepts a new row on every
clock while it outputs the previous block's columns. It does this by
alternating the direction in which it writes:

* Block k is written along direction D, for example row-wise.
* Block k is read along the other direction, line 0 to line 7, on the eight
  clocks that follow its last row. Those lines are the block's columns.
* Block k+1 is written along the direction that block k is read. Its line i
  arrives at the earliest on the clock that reads line i of block k. A read
  returns the old contents, so block k+1 only overwrites cells already read.
* The next block is written along the opposite direction, and so on.

Rows may arrive with any gaps. The reader starts one clock after the last row
of a block and then runs eight clocks without pause. The next block's last row
cannot arrive before the last of those clocks, so no stall or back-pressure is
needed. An assertion in the module (`a_no_overrun`) states this rule.
`bindct_pkg::line_dir_t` encodes the direction.

## Interface and timing of `bindct_2d`

| port        | dir | width  | meaning |
|-------------|-----|--------|---------|
| clk         | in  | 1      | clock, rising edge |
| rst_n       | in  | 1      | asynchronous active-low reset |
| pix_valid   | in  | 1      | a row is on `pix` |
| pix         | in  | 8 x 9  | one row of the block, signed, left to right |
| coef_valid  | out | 1      | a coefficient column is on `coef` |
| coef_first  | out | 1      | marks column 0 of a block |
| coef        | out | 8 x 17 | `coef[v]` = coefficient of vertical frequency v, horizontal frequency k, on the k-th column clock of the block |

* A block is eight valid rows, top to bottom. Gaps between rows are allowed,
  and there is no ready signal.
* The latency of each 1-D unit is 4 clocks.
* The transposer outputs column 0 two clocks after row 7 arrives.
* For the whole design, column 0 of a block appears 10 clocks after its row 7
  was presented. The eight columns follow on consecutive clocks.
* Throughput is one 8x8 block per 8 clocks, sustained.
* Each stage's data register loads only when its valid input is high, so idle
  cycles do not toggle the datapath.

## Where this RTL makes its own choices

The following are this implementation's own decisions. They are not taken
from the dissertation:

* **Coefficient set.** The values 13/32, 11/32, 11/16, 3/16, 3/16, 11/16,
  15/32 are dyadic approximations of the Chen-factorisation lifting
  parameters. They are believed to match Liang and Tran's BinDCT-C1
  configuration, but have not been checked against the published table. Another
  BinDCT-C configuration would change only the operators in `bindct_pkg` and
  their use in the stages.
* **Assignment of lifting steps to stages**, as in the table above. No stage
  has more than three dependent shift-add steps.
* **Rounding.** Products are floored (arithmetic right shift). With
  `FRAC > 0`, the output is rounded half up.
* **Width between passes** (13 bits) and the `FRAC` option (default 0).
* **Valid-flag handshake** and asynchronous reset.
* **Organisation of the transposition matrix.** It uses one array with
  alternating direction instead of two buffers, to save area.
* Data gating and the balancing of stage latencies are not implemented. The
  dissertation proposes both only as future work. The inverse transform is
  also not part of this design.

Clock rate and power depend on the FPGA implementation and are not
characterised here.

## Files

| file | contents |
|------|----------|
| `rtl/bindct_pkg.sv`     | widths, shift-and-add operators, line-direction enum |
| `rtl/bindct_stage1.sv` .. `rtl/bindct_stage4.sv` | the four pipeline stages |
| `rtl/bindct_1d.sv`      | 8-point 1-D BinDCT (stages 1-4) |
| `rtl/transpose_8x8.sv`  | transposition matrix |
| `rtl/bindct_2d.sv`      | top level, 2-D BinDCT |
| `tb/bindct_ref_pkg.sv`  | integer reference model (written with multiplications), floating-point scaled DCT |
| `tb/tb_bindct_stage1.sv` .. `tb/tb_bindct_stage4.sv` | each stage against the reference, with random valid patterns |
| `tb/tb_bindct_1d.sv`    | 1-D unit: bit-exact against the reference, 4-clock latency, deviation from the scaled DCT |
| `tb/tb_transpose_8x8.sv`| transposition at full rate and with gaps, 2-clock latency |
| `tb/tb_bindct_2d.sv`    | whole design at default parameters (see below) |
| `tb/tb_bindct_2d_frac5.sv` | the same with `FRAC = 5` |

`tb_bindct_2d` generates a 64x64 8-bit test image (gradient, sharp-edged
checkerboard, noise), then extreme blocks (all -256, all 255, checkerboards)
and random blocks. It sends the first half of the blocks back to back and the
rest with random idle clocks between rows. It checks:

* every coefficient, bit-exact, against the reference model;
* the 10-clock latency;
* that each block's columns leave on consecutive clocks;
* that every coefficient is within 2 % of the DC full scale of the scaled
  floating-point DCT.

It also counts full-rate blocks, gapped blocks, overlapped blocks (read while
the next is written) and full-range blocks, and fails if any of these counts
is zero.

Every testbench prints `TB_RESULT checks=N failures=M` and stops with a
watchdog if the design hangs.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert --top-module tb_bindct_2d \
  rtl/bindct_pkg.sv tb/bindct_ref_pkg.sv rtl/bindct_stage1.sv rtl/bindct_stage2.sv \
  rtl/bindct_stage3.sv rtl/bindct_stage4.sv rtl/bindct_1d.sv rtl/transpose_8x8.sv \
  rtl/bindct_2d.sv tb/tb_bindct_2d.sv
./obj_dir/Vtb_bindct_2d
```

Replace the top module and the last file to run another testbench. All the
testbenches finish in well under a second.
