# 8x8 2-D Integer Cosine Transform processor, ICT(10,9,6,2,3,1)

This is a streaming forward transform for image compression. It takes one
pixel per clock and returns one coefficient per clock, with no gap between
8x8 blocks. The transform is the integer cosine transform ICT(10,9,6,2,3,1).
Its kernel is a matrix of small integers that plays the role of the DCT, so
the whole transform needs only shifts and adds. The one exception is a final
per-coefficient scaling, done by a single pipelined multiplier.

The RTL follows the parallel-pipelined architecture published as *Parallel-Pipelined Architecture for
2-D ICT VLSI Implementation*:

* Two identical 1-D processors do the work, one on rows and one on columns.
* The two share a single 64-word register file, which also transposes the data.
* Each 1-D processor splits its rows into an even half and an odd half. Its
  adders run at half the sample rate and are never idle.
* A pipelined multiplier applies the normalization last.

The word widths, the handshake, the cycle schedules and the rounding are
choices made for this RTL. They are marked as such below.

## The transform

The order-8 ICT is `T = K J`. `J` is an integer matrix with entries
`a=10, b=9, c=6, d=2, e=3, f=1, g=1`:

```
      g   g   g   g   g   g   g   g
      a   b   c   d  -d  -c  -b  -a
      e   f  -f  -e  -e  -f   f   e
J =   b  -d  -a  -c   c   a   d  -b
      g  -g  -g   g   g  -g  -g   g
      c  -a   d   b  -b  -d   a  -c
      f  -e   e  -f  -f   e  -e   f
      d  -c   b  -a   a  -b   c  -d
```

`K` is diagonal, with `K(l) = 1/||row l of J||`. That gives `1/sqrt(8)` for
rows 0 and 4, `1/sqrt(40)` for rows 2 and 6, and `1/sqrt(442)` for the odd
rows. The 2-D transform of a block `x` is

```
X = K (J x J^t) K,   i.e.  X(l,k) = K(l) K(k) Y(l,k),  Y = J x J^t
```

The processor first computes the integer 2-D transform `Y` exactly, with
no rounding. It then scales each `Y(l,k)` by one of six constants
`K(l)K(k)`.

### Splitting the 1-D transform

The reordered kernel factors into a butterfly followed by two 4x4 blocks.
With `s(n) = x(n)+x(7-n)` and `d(n) = x(n)-x(7-n)`, for `n = 0..3`:

```
even:  Y0 = u0+u1        Y4 = u0-u1           u0 = s0+s3   u1 = s1+s2
       Y2 = 3 v0 + v1    Y6 = v0 - 3 v1       v0 = s0-s3   v1 = s1-s2

odd:   Y1 = 10 d0 + 9 d1 +  6 d2 +  2 d3
       Y3 =  9 d0 - 2 d1 - 10 d2 -  6 d3
       Y5 =  6 d0 -10 d1 +  2 d2 +  9 d3
       Y7 =  2 d0 - 6 d1 +  9 d2 - 10 d3
```

The even half is the matrix `J4e`. The odd half is `J4o`.

## Data flow and timing

```
pixels ──► j1d_proc (rows) ──► transpose_rf ──► j1d_proc (columns) ──► norm_mult ──► coefficients
 9 b          22 clk      15 b      64 clk      15 b      22 clk     21 b    4 clk      12 b
```

**Input.** Pixels enter in row-major order, `x(i,j)` with `j` fastest. Blocks
follow one another directly. The first pixel after reset is `x(0,0)` of
block 0.

**Output.** Coefficients leave in column-major order: `k` (horizontal
frequency) is the outer index and `l` is the inner one. Each coefficient is
tagged with `out_row = l` and `out_col = k`.

**Latency.** `X(0,0)` of a block appears exactly 112 accepted pixels after
`x(0,0)` of that block:

| stage | clocks |
|---|---|
| row processor | 22 |
| register file | 64 |
| column processor | 22 |
| multiplier | 4 |

**Stalls.** `in_valid` is the clock enable of the whole pipeline. When it is
low, every register holds its value. The pipeline therefore moves only while
pixels arrive. To push the last block out, feed another 112 pixels: the next
block's pixels or any filler. `out_valid` is high exactly when `out_data`
carries a coefficient.

**Timing schedule.** The modules need no handshake between them. Each one
knows where it is in the stream from a counter:

* Each 1-D processor has a 3-bit counter `cnt`, the position within the
  8-clock row period. The parameter `PHASE` aligns it: the column processor
  gets `PHASE = 86 mod 8`.
* The register file has a 6-bit counter, aligned by its own `PHASE = 22`.

All these counters are reset together and advance together.

## The 1-D J processor (`j1d_proc`)

All arithmetic in the 1-D processor fires on every second clock. That is the
half-rate (fs/2) operation of the original design. Here it is done with one
clock and an enable on alternate clocks, not with a divided clock.

### Input processor (`j_input_proc`)

The input processor has three parts:

* an 11-stage shift register, where `sr[0]` holds the newest sample;
* two tap multiplexers;
* an adder and a subtractor working in parallel.

Pairs leave one every two clocks. The tap schedule below is this design's
own. It is the schedule that makes 11 stages exactly sufficient:

| `cnt` before the edge | taps `x(n)`, `x(7-n)` | pair registered |
|---|---|---|
| 7 | `sr[7]`, `sr[0]` | `s0,d0`, held during cnt 0,1 |
| 1 | `sr[8]`, `sr[3]` | `s1,d1`, held during cnt 2,3 |
| 3 | `sr[9]`, `sr[6]` | `s2,d2`, held during cnt 4,5 |
| 5 | `sr[10]`, `sr[9]` | `s3,d3`, held during cnt 6,7 |

### Even half (`j4e_proc`)

The even half has one adder and one subtractor. Per row it needs four add/
subtract pairs and has four half-rate slots, so it is busy every slot. Each
multiplication by 3 is a shift and an add. It is computed one slot before
the subtraction that uses it.

| `cnt` at the firing edge | adder | subtractor | also |
|---|---|---|---|
| 5 | `u1 = s1+s2` | `v1 = s1-s2` | |
| 7 | `u0 = s0+s3` | `v0 = s0-s3` | `3v1` |
| 1 (next row) | `Y0 = u0+u1` | `Y4 = u0-u1` | `3v0`, latch the new `s0` |
| 3 (next row) | `Y2 = 3v0+v1` | `Y6 = v0-3v1` | latch the new `s1` |

### Odd half (`j4o_proc`)

The odd half works one column of `J4o` at a time. While `d(n)` is held,
three shared shift-add adders form its multiples:

* `2d = d<<1`
* `6d = (d<<2)+(d<<1)`
* `9d = (d<<3)+d`
* `10d = (d<<3)+(d<<1)`

Four accumulators then add or subtract the multiple that their row of `J4o`
needs. After `d3`, the sums are copied to output registers, which hold them
for a full row period.

### Output mixer (`out_mixer`)

The mixer captures all eight results in one clock, on the edge that ends
`cnt = 4`. That is the first clock at which every result is valid at the
same time. It then shifts them out as `Y0..Y7`, one per clock.

The row processor and the column processor are the same module. They differ
only in input width and `PHASE`. Each 1-D pass adds 6 bits, because the
largest absolute row sum of `J` is 54.

## The transposition register file (`transpose_rf`)

The register file turns rows into columns with only one block of storage.
In every clock, the row processor writes a word and the column processor
reads a word at the same address. The old word is read out and the new word
replaces it.

The address sequence alternates from block to block:

* In mode 0, word `t` of a block goes to address `t`.
* In mode 1, word `t` goes to address `{t[2:0], t[5:3]}`, which swaps the
  row and column fields.

A block written in row order is therefore read back in column order while
the next block is written. The next block, written in "column" addresses,
is in turn read back in column order through the plain addresses. The
transpose of each block comes out exactly 64 clocks after the block went in.
No double buffer is needed.

## Normalization (`norm_mult`) and accuracy

There are six distinct normalization constants. Each is stored as
`round(K(l)K(k) * 2^24)` in `ict_pkg`; the largest is `1/8 = 2^21`.

The multiplier has four pipeline stages:

1. Select the constant from `(l,k)`.
2. Form two partial products, with the low 12 bits and the high 11 bits of
   the constant.
3. Add the partial products and a rounding term.
4. Drop the 24 fraction bits.

An assertion flags any valid result that would not fit in `W_OUT` bits.

Rounding is to the nearest integer, with ties away from zero. This matters
because `Y/8` ties are common for the `(0/4, 0/4)` coefficients. With
round-half-up, those coefficients had a mean error of 0.067. IEEE 1180-1990
allows 0.015 per coefficient, and the original design claims to meet that
standard.

`tb_ict2d_accuracy` runs the IEEE 1180 style test: 10000 random blocks for
each range, each range also sign-reversed. It compares every coefficient
with the floating-point ICT:

| pixels | peak error | worst per-coefficient mean | overall mean | worst per-coefficient MSE |
|---|---|---|---|---|
| [-256,255] | 0.505 | 0.006 | 0.00004 | 0.087 |
| [-5,5] and negated | 0.500 | 0.008 | 0.0003 | 0.088 |
| [-300,300], negated, negated [-256,255] (W_IN=10) | 0.507 | 0.009 | 0.0002 | 0.087 |

Every output is the correctly rounded exact value. The only exception is an
error of at most `|Y|/2^24` that comes from the 24-bit constants. The MSE of
about 1/12 is the error of rounding itself. IEEE 1180's mean-square limits
(0.06 per coefficient, 0.02 overall) are written for an inverse transform
compared after its own rounding. A forward transform with rounded outputs
cannot meet them, so the testbench checks the mean-square error only
against the rounding bound.

## Interface of `ict2d_top`

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | sample clock |
| `rst_n` | in | 1 | asynchronous reset, active low |
| `in_valid` | in | 1 | a pixel is present; low stalls the pipeline |
| `in_data` | in | `W_IN` (9) | signed pixel |
| `out_valid` | out | 1 | a coefficient is present |
| `out_data` | out | `W_OUT` (12) | signed coefficient `X(l,k)` |
| `out_row` | out | 3 | `l` |
| `out_col` | out | 3 | `k` |

The defaults cover pixels in [-256, 255], for which every coefficient lies
within ±2048. For 10-bit data, such as the [-300,300] test range, set
`W_IN=10, W_OUT=13`.

## Files

| file | contents |
|---|---|
| `rtl/ict_pkg.sv` | growth per pass, normalization constants, row classes |
| `rtl/ict2d_top.sv` | the 2-D processor |
| `rtl/j1d_proc.sv` | 1-D J processor |
| `rtl/j_input_proc.sv` | input shift register and butterfly |
| `rtl/j4e_proc.sv` | even half |
| `rtl/j4o_proc.sv` | odd half |
| `rtl/out_mixer.sv` | parallel-to-serial output mixer |
| `rtl/transpose_rf.sv` | 64-word transposition register file |
| `rtl/norm_mult.sv` | pipelined normalization multiplier |
| `tb/tb_ict_ref_pkg.sv` | reference model: full matrix product, floating-point normalization |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_ict2d_accuracy.sv` | IEEE 1180 style accuracy run |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops by itself.
A watchdog ends the run if it hangs. For example:

```
verilator --binary --timing --assert rtl/ict_pkg.sv tb/tb_ict_ref_pkg.sv \
    -y rtl -y tb tb/tb_ict2d_top.sv --top-module tb_ict2d_top
./obj_dir/Vtb_ict2d_top
```

For another testbench, replace `tb_ict2d_top` with its name.

* `tb_ict2d_top` runs the default configuration end to end. It streams 40
  blocks: extremes, a checkerboard, small values and full-range random data.
  It checks:
  * every value against the floating-point transform;
  * the output order and index tags;
  * the 112-clock latency;
  * that each mechanism happens at least once: random stalls, register-file
    blocks in both directions, and all six normalization classes.
* The unit testbenches check each block on its own schedule, with stalls.
* The accuracy run takes about 10 seconds of simulation.

## Departures from the original design and open points

* **Odd half.** The original factorizes `J4o` into shift/add steps. That
  version uses four adders, one subtractor, eight multiplexers and four
  intermediate registers. The factorization is not reproduced here. This
  RTL uses the column-by-column accumulation described above, which takes
  three adders for the multiples plus four accumulators. The results are
  the same. The adder count is higher.
* **Even half.** The original lists three intermediate registers. The
  schedule here keeps eight: `s0, s1, u0, u1, v0, v1, 3v0, 3v1`. The
  ordering of the output coefficients is left to the output mixer.
* **Half-rate clock.** The half-rate units use a clock enable, not a
  separate fs/2 clock.
* **Design choices not given by the original:**
  * the tap schedule, slot schedules and mixer order;
  * the natural output order of the 1-D processor;
  * the column-major output order of the 2-D processor;
  * the word widths;
  * the 24-bit constants and the rounding rule;
  * the stall-by-enable handshake and the reset behaviour.
* **Physical figures.** The original reports 300 MHz and 9.3 mm² in a
  0.35 µm standard-cell process. Neither is claimed or checked for this RTL.
  The deepest logic path in the 1-D processors is in the odd half: a
  shift-add, a multiplexer and an accumulating adder. In the multiplier it
  is a 21x12 partial product.
