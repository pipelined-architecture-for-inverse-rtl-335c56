# Pipelined in-place 8-point IDCT, with an 8x8 row-column wrapper

This design computes the inverse discrete cosine transform one sample per
clock cycle. The pipeline is built the same way as a single-path
delay-feedback FFT. A fast 8-point IDCT, written as a constant-geometry
recursion, is first rescheduled so that every stage works **in place**. Then
it is **projected vertically**: each column of the signal-flow graph becomes
one hardware unit.

Each butterfly stage reduces to one multiplier followed by a processing
element (PE). The PE holds an adder, a subtractor and a feedback shift
register. The few operations that do not fit the butterfly pattern go to a
small front end.

The multipliers sit outside the feedback loops, so they can be pipelined as
deeply as needed. The clock rate is then limited only by the adder in the PE.

`idct2d_top` uses two copies of the 8-point pipeline, with a transpose memory
between them, to build the 8x8 2-D IDCT that image and video decoders use. Its
accuracy is measured with the IEEE 1180-1990 procedure.

```
in_coef ─<<ROW_SHIFT─► idct1d_pipeline ─► transpose_unit ─<<COL_SHIFT─► idct1d_pipeline ─► round_clip ─► out_pixel
            (rows)                    (2 x 64 words, ping-pong)       (columns)           (9-bit pixels)

idct1d_pipeline:
  special_subtractor ─► elastic_buffer ─► special_subtractor        front end
  ─► coef_multiplier(stage 0) ─► butterfly_pe(D=1)
  ─► coef_multiplier(stage 1) ─► butterfly_pe(D=2)
  ─► coef_multiplier(stage 2) ─► butterfly_pe(D=4)
```

## The 8-point algorithm

The recursion splits an N-point IDCT into two N/2-point IDCTs:

- one of the even coefficients;
- one of running alternating sums of the odd coefficients (X1−X3+X5−X7, and
  so on).

The two halves are then joined by a butterfly. The rotation constants are the
numbers d_i, defined by

    d1 = sqrt(1/2),   d(2i) = sqrt((1 + d(i)) / 2),   d(2i+1) = sqrt((1 − d(i)) / 2)

so that d1..d7 = cos(π/4), cos(π/8), cos(3π/8), cos(π/16), cos(7π/16),
cos(3π/16) and cos(5π/16). `idct_pkg::d_coef` evaluates this recursion in
real arithmetic during elaboration. There is no table of constants in the
source.

The in-place schedule of this design has three parts:

1. **Pre-subtractions.** All subtractions between inputs happen first. A chain
   on the odd coefficients and one on X2/X6 produce, in frame slots 0..7:

       X7,  X3−X5,  X5−X7,  X1−X3+X5−X7,  X6,  X2−X6,  X4,  X0

2. **Three stages of multiply, then butterfly.** Each stage multiplies every
   slot by its own constant. Its butterfly then pairs slot p with slot p+D,
   for D = 1, 2 and 4.

3. **Output.** In the end each slot holds one output sample.

The sample orders follow from the schedule:

| frame slot         | 0  | 1  | 2  | 3  | 4  | 5  | 6  | 7  |
|--------------------|----|----|----|----|----|----|----|----|
| input coefficient  | X7 | X5 | X3 | X1 | X6 | X2 | X4 | X0 |
| output sample      | x5 | x4 | x6 | x7 | x2 | x3 | x1 | x0 |

`idct_pkg::in_order` and `idct_pkg::out_order` return these two maps.

## Frames and tags

Each sample carries a tag `tag_t = {valid, slot[2:0]}` through the pipeline.
Every unit delays the tag by exactly as many cycles as it delays the data.

A frame is 8 consecutive valid cycles, with the slot counting 0..7. Any number
of idle cycles may come between frames. An idle cycle acts as the first half
of a butterfly group, so a gap never corrupts a frame still inside a PE.

Control decisions use only the tag's slot. There is no global frame counter
to keep in step.

## Front end: special subtractors and elastic buffer

A **special subtractor** is a registered `y = sub ? a − b : a`.

- **First subtractor.** Its b input is its own previous output. It subtracts
  in slots 1, 2, 3 and 5. This turns X7, X5, X3, X1 into the chain X7, X5−X7,
  X3−X5+X7, X1−X3+X5−X7, and X2 into X2−X6.
- **Elastic buffer.** This is a two-tap feedforward shift register. It passes
  slot 0 and slots 3..7 through with one cycle of delay, and gives slot 2 two
  cycles of delay (the old slot-1 value). For slot 1 it presents the operand
  pair (slot 2, slot 0) with `sub` set.
- **Second subtractor.** It forms X3−X5 from that pair and passes the other
  slots through.

The front end has a latency of 4 cycles.

## Multipliers and the butterfly PE

`coef_multiplier` multiplies each sample by the constant for its slot. The
multiplier pipeline is `MUL_PIPE` registers deep. The constants are:

| stage | slots 0..7 |
|-------|------------|
| 0 | 2·(d1/2, 1/4, d1/2, 1/4, d1/2, 1/4, d1/2, d1/2) |
| 1 | 2d3, 2d2, 1, 1, 2d3, 2d2, 1, 1 |
| 2 | 2·(2d7, 2d5, 2d6, 2d4, 1, 1, 1, 1) |

Constants are W-bit signed numbers with W−3 fraction bits (the largest is
3.92), rounded to nearest. The product is brought back to W bits in one of two
ways, chosen by `QUANT`:

- round half up (`QUANT_ROUND`);
- floor, i.e. two's-complement truncation (`QUANT_TRUNC`).

`butterfly_pe` with pair distance D works on groups of 2D slots:

- The first D samples of a group go into a D-long feedback shift register. At
  the same time the register's previous content, which is the sums of the last
  group, leaves through the output.
- Each of the next D samples meets its partner at the head of the register.
  The difference `second − first` goes straight to the output. The sum goes
  into the register and leaves D cycles later, in its partner's slot + D.

So output slot p carries x(p+D) − x(p), and slot p+D carries x(p+D) + x(p).

The adder and subtractor are busy only half the time. That is the price of
needing no reordering network. The output is registered, so a PE has a
latency of D+1 cycles.

The 1-D latency, from an input sample to the output sample in the same slot,
is `4 + 3·MUL_PIPE + 2 + 3 + 5 = 14 + 3·MUL_PIPE` cycles. That is 20 cycles at
the default `MUL_PIPE = 2`.

## Scaling and word length

Every intermediate value passes through a multiplier. So signal levels are
set by scaling the constants, with no extra hardware.

This design puts a gain of 2 into stages 0 and 2. As a result, one 1-D pass
outputs **4 times** the orthonormal IDCT

    x[n] = 1/2 · Σ c(k) X[k] cos((2n+1)kπ/16),   c(0) = 1/√2

Take coefficient frames that are the DCT of a signal bounded by B. For these,
every node stays below 5.2·B. For arbitrary frames the bound is
10.6·max|X|.

`idct2d_top` sets the fixed point as follows:

- The 12-bit input coefficient enters with `ROW_SHIFT = 3` fraction bits.
- The row result is stored at full width.
- The row result goes into the column pass with `COL_SHIFT = 0` more bits.
- `round_clip` removes `ROW_SHIFT + COL_SHIFT + 4 = 7` fraction bits, rounding
  half up, and clips to [−256, 255].

These defaults are safe for coefficient blocks that come from pixel blocks
within ±300, which covers all IEEE 1180 test data. Dequantised coefficients in
a real decoder need not come from such a block. An arbitrary 12-bit
coefficient block can wrap around in either pass, so a decoder that must
survive any input should keep ROW_SHIFT = 3 and widen the word. By the
10.6·max|X| bound, W = 23 has room for every 12-bit block. That follows from
the bound; the testbenches do not cover it.

To spend a wider W on accuracy instead, raise `ROW_SHIFT` by the number of
extra bits, as the sweep below does.

### IEEE 1180-1990 results

`tb_ieee1180` runs six data sets of 10000 random blocks each:

- pixels in [−256, 255], [−5, 5] and [−300, 300];
- the same three sets with every pixel negated.

The standard's limits are:

- peak |error| ≤ 1;
- mean square error ≤ 0.06 at each pixel position and ≤ 0.02 overall;
- |mean error| ≤ 0.015 at each pixel position and ≤ 0.0015 overall.

Both quantisation methods are swept over the word width, with
`ROW_SHIFT = W − 14`. The table gives the worst value of each statistic over
the six sets, with the limits in the header row:

| W, quantisation | peak (1) | pixel mse (0.06) | overall mse (0.02) | pixel \|mean\| (0.015) | overall \|mean\| (0.0015) | all limits met |
|---|---|---|---|---|---|---|
| 15, round | 2 | 0.33 | 0.185 | 0.164 | 0.0150 | no |
| 16, round | 1 | 0.135 | 0.077 | 0.059 | 0.0069 | no |
| **17, round (default)** | 1 | 0.058 | 0.035 | 0.026 | 0.0027 | no |
| 18, round | 1 | 0.029 | 0.017 | 0.013 | 0.0013 | yes |
| 19, round | 1 | 0.014 | 0.0085 | 0.0067 | 0.0008 | yes |
| 20, round | 1 | 0.0080 | 0.0045 | 0.0039 | 0.0004 | yes |
| 19, truncate | 1 | 0.24 | 0.015 | 0.24 | 0.0033 | no |
| 20, truncate | 1 | 0.098 | 0.0069 | 0.098 | 0.0013 | no |
| 21, truncate | 1 | 0.045 | 0.0035 | 0.045 | 0.0006 | no |
| 22, truncate | 1 | 0.023 | 0.0020 | 0.023 | 0.0003 | no |
| 23, truncate | 1 | 0.012 | 0.0010 | 0.012 | 0.0002 | yes |
| 24, truncate | 1 | 0.0062 | 0.0005 | 0.0062 | 0.0001 | yes |

Each extra bit roughly halves every error statistic.

The published analysis of this architecture reports 17 bits for rounding and
22 bits for truncation. This implementation needs **one bit more in both
cases**. The likely cause is its own schedule and constant scaling.

The defaults stay at 17 bits and rounding. At this width every output pixel
is within ±1 of the exact result, but the error statistics miss the mean and
mean-square limits. Set `W = 18, ROW_SHIFT = 4` for a compliant decoder.

Truncation errors all lean the same way, so with truncation the per-pixel
mean error is almost equal to the mean-square error. That bias is what sets
the truncation word length.

## 2-D wrapper

### Interface (`idct2d_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock; synchronous active-low reset |
| in_valid | in | 1 | a coefficient is present |
| in_coef | in | 12 | F[u][v]: rows u = 0..7 in turn, each row in v order 7,5,3,1,6,2,4,0 |
| out_valid | out | 1 | a pixel is present |
| out_pixel | out | 9 | pixel, rounded and clipped to [−256, 255] |
| out_row, out_col | out | 3 | position of out_pixel |

A row must be 8 consecutive valid cycles. Idle cycles are allowed between
rows and between blocks.

Pixels come out column by column (n = 0..7). Within a column, rows come in the
order 5,4,6,7,2,3,1,0.

### Transpose unit

`transpose_unit` holds two 64-word banks, used ping-pong. The row pass writes
one bank while the column pass reads the other.

- **Write.** Row-pass slot p of row u goes to column `out_order(p)`.
- **Read.** The memory is read column by column. Within a column the rows come
  in the input order 7,5,3,1,6,2,4,0, which is the order the column pipeline
  needs.

A bank is read starting one cycle after its last word is written. The read
takes 64 gap-free cycles. If the other bank is already full when a read ends,
the next read starts straight away. So the reader keeps up with back-to-back
blocks. A simulation assertion flags any bank overwritten before it was read.

### Timing

Throughput is one coefficient in and one pixel out per clock.

With gap-free input, the first pixel of a block appears `2·(14 + 3·MUL_PIPE)
+ 66` cycles after its first coefficient: 106 cycles with the defaults.

### Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| W | 17 | internal word width, including sign |
| QUANT | QUANT_ROUND | quantisation after each multiplier: `QUANT_ROUND` or `QUANT_TRUNC` |
| MUL_PIPE | 2 | register stages in each multiplier |
| ROW_SHIFT | 3 | fraction bits given to the input coefficient |
| COL_SHIFT | 0 | extra left shift between the transpose memory and the column pass |

## Source files

| file | contents |
|------|----------|
| rtl/idct_pkg.sv | tag type, sample orders, d_i recursion, per-slot constants |
| rtl/special_subtractor.sv | registered subtract-or-bypass |
| rtl/elastic_buffer.sv | front-end reorder and operand selection |
| rtl/coef_multiplier.sv | pipelined constant multiplier with rounding or truncation |
| rtl/butterfly_pe.sv | butterfly PE with D-long feedback shift register |
| rtl/idct1d_pipeline.sv | the 8-point pipeline |
| rtl/transpose_unit.sv | 8x8 ping-pong transpose memory |
| rtl/round_clip.sv | final rounding and 9-bit clipping |
| rtl/idct2d_top.sv | 8x8 row-column IDCT |

## Verification

Each testbench checks itself and ends with a line
`TB_RESULT checks=<n> failures=<m>`.

The reference models are plain double-precision formulas, computed at run
time in `tb/idct_ref_pkg.sv`: the direct DCT and IDCT, and the IEEE 1180
random generator.

| testbench | what it checks |
|-----------|----------------|
| tb_special_subtractor | a−b / bypass and the 1-cycle delay |
| tb_elastic_buffer | reorder pattern and latency, with idle gaps between frames |
| tb_coef_multiplier | products against constants computed from cos(), for both quantisations, and the latency |
| tb_butterfly_pe | D = 1, 2, 4 against the butterfly rule, with gaps between frames |
| tb_idct1d_pipeline | random frames against the exact IDCT (×4), W = 17 rounding and W = 22 truncation, exact latency; a MUL_PIPE = 5 copy must match bit for bit, 9 cycles later |
| tb_transpose_unit | position-coded blocks, back to back and with gaps |
| tb_round_clip | rounding and clipping edges |
| tb_idct2d_top | 400 blocks at default parameters, each pixel within ±1 of the exact IDCT, first-output latency, and counts of clipping, gaps and back-to-back blocks |
| tb_ieee1180 | the accuracy test above, swept over W for both quantisations; W ≥ 18 rounding and W ≥ 23 truncation must meet every limit, and the default must meet the peak limit |

To run one testbench with Verilator (5.x), from the top directory:

```
verilator --binary --timescale 1ns/1ps -Irtl -Itb -y rtl \
    rtl/idct_pkg.sv tb/idct_ref_pkg.sv tb/tb_idct2d_top.sv --top-module tb_idct2d_top
./obj_dir/Vtb_idct2d_top
```

Use the same command for any other testbench; only the name changes.
`tb_ieee1180` runs 60000 blocks through twelve decoders. It takes about half
a minute to build and a few seconds to run.

## Design choices and departures

**Own schedule.** The published architecture describes the units, the PE
operation, the special subtractor and the elastic buffer. The exact in-place
schedule used here is this design's own derivation from the recursion. That
covers the slot orders, the per-slot constants, the front-end pattern and the
D = 1, 2, 4 butterfly distances. It was checked numerically against the direct
IDCT formula.

**Butterfly pairing.** The published description pairs elements at distance 2
in the first butterfly stage and at distance 1 in the second. This schedule
instead uses distances 1, 2, 4, in the order of a radix-2 pipeline.

**Front end.** The published front end does three subtractions at offsets 1,
2 and 3. Here, a feedback chain at offset 1 plus one subtraction at offset 2
do the same job. The X2−X6 subtraction is folded into the same chain.

**Own choices.** The following are not described in the published
architecture and are choices of this design:

- the frame tag with idle-cycle support;
- registered PE outputs;
- the multiplier pipeline depth;
- the gain of 2 in stages 0 and 2;
- `ROW_SHIFT` and `COL_SHIFT`;
- round-half-up in the multipliers and the final rounding;
- the transpose memory organisation and its back-to-back handling;
- the output order of the 2-D wrapper.

**Word length.** See the IEEE 1180 results above: 18 bits with rounding and
23 bits with truncation, against the published 17 and 22.

**Input range.** Coefficient blocks must be the DCT of pixel blocks within
about ±300. For arbitrary blocks, use a wider W, which gives headroom for
every node.
