# 8x8 DCT processor built from time-shared 8-point pipelines

This is a two-dimensional 8x8 discrete cosine transform (DCT) processor. It takes
one 16-bit sample per clock and produces one coefficient per clock. It is built
around a 1D 8-point DCT datapath whose arithmetic is folded onto very few units.
One transform needs 13 multiplications and 29 additions. The datapath does them
with only **3 multipliers and 6 adders**. Every unit is reused in each of the 8
clock slots of a fixed cyclic schedule, and successive transforms overlap in time.
Two copies of that datapath do the row transforms and the column transforms. A
transpose buffer sits between them, an input block buffer sits in front, and a
common control unit generates all addresses and phases.

These points follow the published architecture that this RTL implements:

- the split into input buffer, row pipeline, transpose buffer, column pipeline
  and common control unit;
- the 8-point transform with 13 multiplications and 29 additions;
- a period of 8 clocks, with one input port and one output port, both in natural order;
- 3 multipliers and 6 adders per 1D pipeline, so 6 multipliers in the 2D processor;
- 16-bit data;
- no block RAM: all buffers are in flip-flops or distributed memory.

This implementation chose the rest. That covers the factorisation, the slot
assignment, the register set, the widths, the handshake, the frame timing and the
output order. The sections below say where.

## Files

| file | contents |
|---|---|
| `rtl/dct_pkg.sv` | multiplier constants, latency, transpose address function |
| `rtl/pu_add.sv`, `rtl/pu_mul.sv` | adder/subtractor unit; multiplier unit that multiplies by a constant and rounds |
| `rtl/dct8_1d.sv` | 8-point DCT pipeline (3 multipliers, 6 adders, period 8) |
| `rtl/in_buf.sv` | two-bank input block buffer with valid/ready input |
| `rtl/tr_buf.sv` | two-bank transpose buffer |
| `rtl/dct_ctrl.sv` | common control unit (frame counter, phases, addresses, valid tracking) |
| `rtl/dct2d_top.sv` | top level: the 2D processor |
| `tb/tb_*.sv` | one self-checking testbench per module above; `tb_dct2d_top` runs the whole processor at its default size |

## The 8-point transform and its factorisation

The transform is the orthonormal DCT-II:

    X[k] = c(k)/2 * sum_{n=0..7} x[n] cos((2n+1) k pi / 16),   c(0) = 1/sqrt(2), c(k>0) = 1

It is computed with Chen's factorisation, and every plane rotation in it uses three
products instead of four. Write `Ck = cos(k pi/16)`.

1. Input butterflies: `a[n] = x[n] + x[7-n]` and `b[n] = x[n] - x[7-n]`, for n = 0..3.
   That is 8 additions.
2. Even half:
   - `c0 = a0+a3`, `c3 = a0-a3`, `c1 = a1+a2`, `c2 = a1-a2`;
   - `X0 = (c0+c1)*C4/2` and `X4 = (c0-c1)*C4/2`;
   - the rotation `X2 = C2'*c3 + C6'*c2`, `X6 = C6'*c3 - C2'*c2`, where the prime means the constant is halved.

   That is 9 additions and 5 multiplications.
3. Odd half:
   - `s = C4*(b2+b1)` and `r = C4*(b2-b1)`;
   - `P = b0+s`, `Q = b3-r`, `R = b0-s`, `S = b3+r`;
   - the rotation `(X1, X7) = (C1'P + C7'Q, C7'P - C1'Q)`;
   - the rotation `(X5, X3) = (C5'R + C3'S, C3'R - C5'S)`.

   That is 12 additions and 8 multiplications.

Each rotation `(cA*P + cB*Q, cB*P - cA*Q)` is computed as follows:

    t = cB*(P+Q);   Xa = t + (cA-cB)*P;   Xb = t - (cA+cB)*Q

This gives exactly 13 multiplications and 29 additions. All the multiplier
constants are in `dct_pkg`. Each is `round(v * 2^17)` in an 18-bit signed word, and
the package comment gives the formula for each one.

## The cyclic schedule (the core of `dct8_1d`)

The datapath has no pipeline stages in the usual sense. There are six adder units
(`pu_add`) and three multiplier units (`pu_mul`). Each unit has a multiplexer on its
inputs, switched by the 3-bit `phase`. Each intermediate value has its own register,
written in one fixed slot. The schedule below is the whole design. T counts clocks
from the clock in which `x[0]` is on `din`, and the slot is T mod 8. An operation in
slot T reads registers and writes its result at the end of T.

| slot | T | adders | multipliers | output register gets |
|---|---|---|---|---|
| 0 | 8 | a0, b0, c1, c2, b2+b1, b2-b1 | – | X3 |
| 1 | 9 | c0, c3 | s, r, (C2+C6)'c2 | X4 |
| 2 | 10 | c0+c1, c0-c1, c3+c2, P, Q, R | (C2-C6)'c3 | X5 |
| 3 | 11 | S, P+Q | X0, X4, C6'(c3+c2) | X6 |
| 4 | 12 | X2, X6, R+S | C7'(P+Q), (C1-C7)'P, (C1+C7)'Q | X7 |
| 5 | 5 / 13 | a3, b3 (next block) / X1, X7 | C3'(R+S), (C5-C3)'R, (C5+C3)'S | X0 |
| 6 | 6 / 14 | a2, b2 (next block) / X5, X3 | – | X1 |
| 7 | 7 | a1, b1 | – | X2 |

Slots 5 and 6 do work for two transforms at once. In those slots the input
butterflies of transform i+1 run beside the last additions of transform i. Per slot
0..7 the adders are used 6, 2, 6, 2, 3, 4, 4, 2 times (29 in all), and the
multipliers 0, 3, 1, 3, 3, 3, 0, 0 times (13 in all). No register lives longer than 8 clocks, so a new transform can
start in every period without corrupting the previous one. The input needs only four
storage registers (`x[0..3]`). `x[4..7]` are used from the input register one clock
after they arrive.

Timing:
- `X[k]` goes into the output register at T = 13+k and is on `dout` during T = 14+k.
- The latency from `x[0]` to `X[0]` is therefore 14 clocks (`dct_pkg::LAT`).
- The throughput is 8 samples per 8 clocks.
- The caller owns `phase`. It must be n while `x[n]` is on `din`, and it must count
  0..7 without gaps. The pipeline cannot stall; idle periods are run as bubbles.

Precision:
- The internal width is IN_W+8 bits: 5 bits of growth plus `GUARD` = 3 fraction bits.
- Each product is rounded to the nearest integer. The output is rounded back to
  IN_W+2 bits.
- Against an exact floating-point DCT, every 1D coefficient is within 1 LSB in the
  tests, including full-scale inputs.

## 2D processor: frames and buffers

Everything runs on a 64-clock frame, one 8x8 block per frame. In `dct_ctrl` a
free-running 6-bit counter `f` defines the input frame. Two delayed copies of it set
the timing of the later stages:

- `g = f - 14` is the transpose-side position. It is the transpose write address and
  the column pipeline's phase, and the transpose bank flips when `g` wraps.
- `h = g - 14` is the output position. It gives the coefficient indices
  `out_u = h[2:0]` and `out_v = h[5:3]`.

How one block moves through the stages:

1. **Input buffer** (`in_buf`). Samples of a block arrive in row-major order with
   `in_valid`/`in_ready`, at any rate. They fill one of two 64-word banks. When a
   bank is full and a frame starts, the whole bank streams into the row pipeline
   during that frame, one word per clock, aligned with phase 0. If both banks are
   full, `in_ready` goes low. A frame with no full bank is a bubble: the pipelines
   run on zeros and the block-valid flag is low.
2. **Row pipeline** (`dct8_1d`, IN_W = 16). It writes row r, coefficient k at
   `g = 8r + k` into one bank of the transpose buffer.
3. **Transpose buffer** (`tr_buf`). During the next frame the other pipeline reads
   that bank at `{g[2:0], g[5:3]}`, so it receives column after column, each in
   natural order. Meanwhile the next block's rows fill the other bank.
4. **Column pipeline** (`dct8_1d`, IN_W = 18). Column v, coefficient u leaves at
   `h = 8v + u`.

Block-valid flags move from the input frame to the transpose frame to the output
frame, and become `out_valid`.

Top-level timing:
- The first coefficient of a block, (u,v) = (0,0), appears 64 + 2*14 = 92 clocks
  after the start of the frame in which the block entered the row pipeline.
- The output is column-major: v is the slow index and u the fast one, and both are
  given on `out_u`/`out_v`.
- `out_data` has IN_W+4 = 20 bits and carries the orthonormal 2D DCT-II.

### Ports of `dct2d_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| in_valid, in_ready | in/out | 1 | input handshake; a sample transfers when both are high |
| in_data | in | 16 | signed sample, blocks in row-major order |
| out_valid | out | 1 | a coefficient of a real block is on out_data |
| out_data | out | 20 | signed coefficient |
| out_u, out_v | out | 3 | vertical and horizontal frequency index |

## Departures and open points

- **Schedule and register count.** The unit counts (3 multipliers, 6 adders) and the
  period of 8 match the published design. The slot assignment here was made by hand.
  The published 1D datapath has 63 registers. This one uses 48 word
  registers plus the output register.
- **Word widths.** The column pipeline's internal words are 26 bits, so its
  multipliers are 26x18. On devices with 25x18 or 18x18 DSP blocks, each product
  would need more than one block. Reducing the transpose width (rounding the row
  results to 16 bits) would fix that at some loss of accuracy. That change is not
  made here.
- **Output order.** Coefficients leave column by column. A raster or zig-zag order
  would need one more 64-word buffer.
- **Input buffer.** Its role here is to decouple an irregular input stream from the
  strict 8-clock rhythm of the pipelines. The published architecture has an input buffer
  memory but does not describe what it does.
- **Resources.** Synthesised, the whole processor has about 1400 flip-flop bits. It
  also has 5.3 kbit of buffer memory in two-bank arrays (input 2x64x16, transpose
  2x64x18). No FPGA timing has been measured.

## Simulating

Every testbench checks itself. It prints `TB_RESULT checks=N failures=M` and then
calls `$finish`. For example, to build and run the full processor test:

    verilator --binary --timing --assert -Wno-fatal --top-module tb_dct2d_top \
        -y rtl -y tb +libext+.sv rtl/dct_pkg.sv tb/tb_dct2d_top.sv
    ./obj_dir/Vtb_dct2d_top

What the testbenches do:

- `tb_dct2d_top` runs at the default parameters. It sends 12 blocks: full-scale,
  checkerboard and random. It checks every coefficient against a floating-point 2D
  DCT within 3 LSB. It also checks the (u,v) order and the 92-clock latency of each
  block. It counts back-pressure clocks, empty frames and back-to-back blocks, and
  fails if any of the three never happened.
- `tb_dct8_1d` checks each 1D coefficient within 1 LSB, in the exact clock that the
  14-clock latency predicts.
- `tb_dct2d_stream` sends a 64x64-sample image (64 blocks) with the input always valid. It checks every coefficient and checks that all 4096 coefficients leave in 4096 consecutive clocks.
- `tb_in_buf`, `tb_tr_buf` and `tb_dct_ctrl` check their module's outputs cycle by
  cycle against models of their own.

To change the data width, set `IN_W` on `dct2d_top`. The pipelines and buffers follow
it. `GUARD` on `dct8_1d` trades accuracy against width. The constants in `dct_pkg`
are tied to `CF` = 17 fraction bits. Recompute them from the formulas there if `CF`
changes.
