# 8x8 integer cosine transform processor, ICT(10, 9, 6, 2, 3, 1)

This is a pipelined processor that computes the two-dimensional integer cosine
transform (ICT) of 8x8 image blocks. The ICT replaces the irrational cosines of
the DCT with the small integers a=10, b=9, c=6, d=2, e=3, f=1 (and g=1), so the
whole transform is built from additions, subtractions and wired shifts. Only the
final, optional normalization uses a multiplier.

Pixels stream in one per clock cycle, row by row, block after block, with no
gaps. Coefficients stream out one per clock cycle, either unnormalized (23 bits)
or normalized to 12 bits. Every adder in the two 1-D processors does useful work
in every cycle it is clocked.

The architecture follows a published 0.35 µm ICT chip: its processor structure,
its register and adder names, its two clock rates, its shift-register
transposition memory and its 23/12-bit output choice. That publication leaves
many details open: the exact operation schedules, the split of the odd kernel
into shift-and-add terms, word widths, rounding, reset and the interface
signals. Those are this design's own choices. They are listed under
[Departures and choices](#departures-and-choices).

## The kernel and how it is factored

The 1-D transform is `Y = J x`, with

```
      g   g   g   g   g   g   g   g           a=10 b=9 c=6 d=2
      a   b   c   d  -d  -c  -b  -a           e=3  f=1  g=1
      e   f  -f  -e  -e  -f   f   e
J =   b  -d  -a  -c   c   a   d  -b
      g  -g  -g   g   g  -g  -g   g
      c  -a   d   b  -b  -d   a  -c
      f  -e   e  -f  -f   e  -e   f
      d  -c   b  -a   a  -b   c  -d
```

The normalized transform is `X = K J x`, where `K` is diagonal and `k_u` is
1 over the norm of row u: 1/√8 for u = 0 and 4, 1/√40 for u = 2 and 6, and
1/√442 for odd u. In two dimensions, `X = K (J x Jᵗ) Kᵗ`. The processor
computes `J x Jᵗ` exactly in integers and scales it by `k_u·k_v` at the end.

The 1-D transform is split into three levels:

1. **Butterfly.** `a_k = x(k) + x(7−k)` and `a_(7−k) = x(k) − x(7−k)` for k = 0..3.
2. **Even half (J4e).** This half acts on a0..a3:
   `b0 = a0+a3`, `b1 = a1+a2`, `b3 = a0−a3`, `b2 = a1−a2`. Then
   `Y0 = b0+b1`, `Y4 = b0−b1`, `Y2 = 3·b3 + b2` and `Y6 = b3 − 3·b2`.
   The factor 3 is `2b + b`.
3. **Odd half (J4o).** This half acts on a7..a4. The 4x4 odd kernel, with
   entries 10, 9, 6 and 2, is written as `2·A + 8·B − C`. A, B and C hold only
   0, ±1 and ±8, so every product is a wired shift:

   ```
   d0 = a7 + a4   d2 = a6 + a5   d1 = a7 − a4   d3 = a5 − a6
   e0 = d0 − d3   e3 = d1 + d2   e1 = d0 − d2   e2 = d3 − d1      (the 2·A part)
   f0 = a6 − 8a7  f2 = 8a6 + a4  f1 = a7 + 8a5  f3 = a5 + 8a4
   g0 = 8d2 − f0  g2 = 8d0 − f2  g1 = 8d1 − f1  g3 = 8d3 − f3     (the 8·B − C part)
   Y1 = 2e0 + g0  Y3 = 2e1 + g1  Y5 = 2e2 + g2  Y7 = 2e3 + g3
   ```

   For example, `Y1 = 2(a7+a6−a5+a4) + 8(a6+a5) − (a6 − 8a7)`, which is
   `10a7 + 9a6 + 6a5 + 2a4`.

## Two clock rates and the slot schedule

This is the part of the design that needs the most care.

**Clocks.** Samples arrive at the sample rate f_s, one per `clk` cycle. This is
the rate called Clk1. The arithmetic runs at f_s/2, the rate called Clk2. Each
arithmetic unit does one operation per Clk2 cycle. An 8-sample vector therefore
lasts four Clk2 cycles, called **slots**. In the example above, the even half
needs four additions and four subtractions per vector (b0, b1, Y0, Y2 and b2,
b3, Y4, Y6). One adder and one subtracter, each busy in all four slots, do
exactly that work.

In this RTL, Clk2 is not a second clock. It is a clock enable, `ce2`, that is
high in every other `clk` cycle. `timing_gen` also produces the two multiplexer
selects, M1 (f_s/4) and M2 (f_s/8). Read together, `{M2, M1}` is the slot number
0..3. `{M2, M1, ~ce2}` is the sample number 0..7 within a vector.

**Adders.** Every arithmetic element is `bcl_addsub`, a look-ahead-carry
(parallel-prefix) adder/subtracter with a pipeline register halfway through its
carry tree. Operands presented in slot t give a result that is stored on the
Clk2 edge that ends slot t+1.

**Shift registers.** Each unit's result shifts into its own shift register on
every Clk2 edge, whether or not the slot did useful work. A result started in
slot t is therefore at position k of that register in slot t+2+k. The operand
multiplexers only ever select register positions. The whole schedule comes down
to the tables below, where t = 0 is the slot in which the last input word (a3 or
a4) is at position 0 of the input register:

| unit (register)            | t=−2 | t=−1 | t=0 | t=1 | t=2 | t=3 | t=5 | t=6 | t=7 | t=8 |
|----------------------------|------|------|-----|-----|-----|-----|-----|-----|-----|-----|
| J4e adder (SRB1)           |      | b1   | b0  |     | Y0  |     | Y2  |     |     |     |
| J4e subtracter (SRB2)      |      | b2   | b3  |     | Y4  |     | Y6  |     |     |     |
| J4e times-3 (SRB3)         |      |      |     | 3b2 | 3b3 |     |     |     |     |     |
| J4o AE5 add/sub (SRD1)     |      | d2   | d0  |     | e0  |     | e3  |     |     |     |
| J4o AE6 sub (SRD2)         |      | d3   | d1  |     | e1  |     | e2  |     |     |     |
| J4o AE7 add/sub (SRF1)     | f0   |      | f2  | g0  |     | g2  |     |     |     |     |
| J4o AE8 add/sub (SRF2)     |      | f1   | f3  |     | g1  |     | g3  |     |     |     |
| J4o AE9 add (output)       |      |      |     |     |     |     | Y1  | Y3  | Y5  | Y7  |

Each unit uses each value of t mod 4 exactly once. Schedules of consecutive
vectors therefore interleave without conflict, and the units are busy in every
slot. The only exception is the times-3 unit, which is needed in two slots out
of four. The processors receive the phase `t mod 4`, which is `{M2, M1} − 1`.

All eight coefficients of a vector are present in the shift registers at
t = 10. The output mixer copies them in that slot and then sends them out in
natural order Y0..Y7, one per `clk`. The whole 1-D processor has a latency of
exactly 40 `clk` cycles, five vector periods. The output vector is therefore
aligned to the same sample counter as the input, which lets the second 1-D
processor run from the same M1/M2.

The input processor follows the same pattern. It has an 11-stage sample shift
register at f_s and two 4:1 multiplexers. In slot k of the next vector, these
pick x(k) (stage 7+k) and x(7−k) (stage 3k). A parallel adder and subtracter
then form a_k and a_(7−k).

## Transposition memory

The two 1-D processors share one block of storage: an 8x8 file of registers
(`transpose_mem`). The file works as one 64-stage shift path. In each `clk`
cycle a word enters at corner (7,7) and the word at corner (0,0) leaves. The
path runs either row-major or column-major, and the direction changes every 64
cycles. Bit 6 of a 7-bit counter holds the direction.

A block written while the file shifts by rows is read while it shifts by
columns, so it leaves transposed. The next block enters by columns at the same
time, and it leaves by rows, also transposed. So one 64-word file is enough and
no double buffer is needed. The memory delays every word by exactly 64 cycles.

## Normalization and output modes

`norm_mult` multiplies each 2-D coefficient Y(u,v) by `k_u·k_v`. It works in
three pipeline stages:

1. Select the constant.
2. Multiply a 23 x 22-bit signed product.
3. Round and saturate.

There are six distinct scale factors. They are held with 24 fraction bits and
rounded up:

```
NORM_SCALE[i][j] = ceil(2^24 / sqrt(n_i * n_j)),  n = {8, 40, 442}
```

Products round to nearest with ties away from zero, then saturate to 12 bits.
Rounding the constants up matters, because Y/8, Y/40 and Y/442 can be exactly
n + ½. The slightly larger constant keeps such products on the far side of the
tie.

With `norm_sel = 0` the coefficient passes through unscaled. `norm_sel` is
sampled together with the coefficient entering the multiplier, so the mode can
change on any coefficient boundary.

## Top-level interface and timing (`ict2d_top`)

| port          | dir | width | meaning |
|---------------|-----|-------|---------|
| `clk`         | in  | 1     | sample clock (f_s) |
| `rst_n`       | in  | 1     | asynchronous active-low reset |
| `x`           | in  | 9     | signed pixel, −256..255 |
| `norm_sel`    | in  | 1     | 1: 12-bit normalized output (sign-extended), 0: 23-bit unnormalized output |
| `dout`        | out | 23    | coefficient stream |
| `dout_valid`  | out | 1     | high from the first coefficient of the first block on |
| `dout_start`  | out | 1     | marks Y(0,0) of every block |
| `ce2`, `m1`, `m2` | out | 1 | Clk2 phase and multiplexer selects, for observation |
| `mem_by_cols` | out | 1     | current direction of the transposition memory |

**Input.** Pixel x[r][c] of block b is presented in cycle 64b + 8r + c, counting
from the first cycle after reset. The stream must not stop. There is no
handshake.

**Output.** Coefficients leave column by column. In cycle 147 + 64b + 8v + u,
`dout` holds coefficient (u = vertical frequency, v = horizontal frequency) of
block b. The latency of 147 cycles is made of 40 (rows) + 64 (memory) + 40
(columns) + 3 (normalization). Throughput is one coefficient per cycle.

**Widths.** Each 1-D pass widens the data by 7 bits: 9 → 16 → 23. The largest
possible |Y(u,v)| is 54·54·256 = 746 496, which fits in 23 bits. Normalized,
the DC term of an all −256 block is −2048, still inside 12 bits.

## Files

All RTL is in `rtl/`, one module or package per file:

| file | content |
|------|---------|
| `ict_pkg.sv` | widths, normalization constants, coefficient classes |
| `bcl_addsub.sv` | pipelined look-ahead-carry adder/subtracter |
| `timing_gen.sv` | Clk2 enable, M1, M2 |
| `ict_input_proc.sv` | 11-stage sample register, pair multiplexers, butterfly |
| `ict_j4e.sv` | even-half processor |
| `ict_j4o.sv` | odd-half processor |
| `ict_out_mixer.sv` | reordering to natural order at f_s |
| `ict_1d.sv` | 1-D processor (input processor + J4e + J4o + mixer) |
| `transpose_mem.sv` | 8x8 row/column shift-register file |
| `norm_mult.sv` | normalization multiplier and bypass |
| `ict2d_top.sv` | 2-D processor |

The testbenches are in `tb/`. `ict_ref_pkg.sv` holds the kernel written out in
full and direct matrix products for the reference values. It does not use the
factorizations the hardware uses.

## Simulating

With Verilator 5, run for example:

```
verilator --binary --timing -Irtl -Itb rtl/ict_pkg.sv tb/ict_ref_pkg.sv \
    rtl/*.sv tb/tb_ict2d_top.sv --top-module tb_ict2d_top
./obj_dir/Vtb_ict2d_top
```

Replace `tb_ict2d_top` with any other testbench name. Every testbench is
self-checking and ends with a line `TB_RESULT checks=N failures=M`. Each also
has a watchdog that ends the run with a failure if it hangs.

| testbench | what it checks |
|-----------|----------------|
| `tb_bcl_addsub` | random additions and subtractions at 16 and 23 bits against `a ± b`, including carry corner cases, with the enable held low at random |
| `tb_timing_gen` | phase and period of Clk2, M1 and M2 after reset |
| `tb_ict_input_proc` | `x(k) ± x(7−k)` for every pair, in the right slot, including extreme samples |
| `tb_ict_j4e`, `tb_ict_j4o` | each half against the full kernel rows, 100 back-to-back vectors, at the exact slot t = 10 |
| `tb_ict_out_mixer` | natural-order output and that values offered outside the load cycle are ignored |
| `tb_ict_1d` | 9-bit and 16-bit processors against direct products, with the 40-cycle latency, over 200 back-to-back vectors including worst-case ones |
| `tb_transpose_mem` | transposition in both directions, with 64-cycle delay and both kinds of direction change |
| `tb_norm_mult` | scaling, rounding, bypass and saturation against floating-point row norms |
| `tb_ict2d_top` | end to end at the real size: 24 back-to-back blocks (random, all 255, all −256, odd-odd worst case) against the direct 2-D product. It covers the 147-cycle latency, `dout_valid`/`dout_start`, both output modes and both memory directions, and fails if any of these never occurs |
| `tb_ieee1180_accuracy` | 4000 random blocks in each of the ranges −256..255 and −5..5, normalized, against the exact orthonormal transform rounded to integers, judged by the IEEE 1180-1990 error limits (peak ≤ 1, mean square ≤ 0.06 per coefficient and ≤ 0.02 overall, mean ≤ 0.015 per coefficient and ≤ 0.0015 overall) |

The accuracy run measures a peak error of 1 and an overall mean square error of
0.0003 for −256..255, and no error at all for −5..5. The only departures from
the exact rounded value come from the finite precision of the six scale
constants. The 9-bit input rules out the third IEEE 1180 range, ±300.

## Departures and choices

The following follow the source chip:

- the ICT(10,9,6,2,3,1) kernel and the even/odd decomposition;
- an input processor with an 11-stage register, two 4:1 multiplexers and an
  adder/subtracter pair;
- a J4e processor with registers SRA1, SRB1, SRB2, SRB3, an adder, a subtracter
  and a times-3 unit;
- a J4o processor with SRA2, SRD1, SRD2, SRF1, SRF2 and units AE5..AE9 in the
  roles described, with wired ×2 and ×8;
- 100% use of the adders;
- processors at f_s/2 with an output mixer at f_s;
- M1 and M2 as multiplexer selects;
- an 8x8 shift-register transposition memory with a 7-bit counter, alternating
  rows and columns;
- look-ahead adders pipelined in the middle;
- a final multiplier with a 23-bit unnormalized or 12-bit normalized output.

The following are this design's own:

- **Slot schedules and register depths.** These are given in the table above.
  The source does not give them in a form that could be reproduced.
- **The odd-kernel split.** The exact d/e/f/g terms were chosen to fit the
  described unit and register roles.
- **Clk2 as a clock enable** of a single clock, not a second clock tree. Clock
  trunks, periphery buffers, pads and power distribution are physical design
  and are not represented.
- **The prefix adder.** It uses a Kogge–Stone network, with the register after
  half of the levels.
- **Merged output ordering.** The even half's own output-ordering circuit is
  merged into the 1-D output mixer.
- **Widths and rounding.** The input is 9-bit signed, each pass adds 7 bits
  (uniform inside each processor), the scale constants have 24 bits and
  rounding is to nearest with ties away from zero.
- **Reset and interface.** Only the counters have a reset, and datapath
  registers start at arbitrary values. Data must start right after reset. The
  `dout_valid` and `dout_start` flags and the observation outputs are added.
- **Output order.** Coefficients leave in column order, without reordering to
  raster order.
- **Scope.** The design implements the forward transform only, like the
  source.
