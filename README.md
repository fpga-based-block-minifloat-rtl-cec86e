# Block minifloat training accelerator for N-BEATS

This RTL trains an N-BEATS time-series forecasting network almost entirely in
4-bit arithmetic. Matrix products use **block minifloat (BM)** numbers. A BM
number is a tiny floating-point value: a sign, `e` exponent bits and `m`
mantissa bits. Each 12 x 12 block of such values shares one wide exponent
`beta`.

The precision is mixed by role:

| Data | Format |
|---|---|
| Inputs, errors, gradients | BM<0,3> |
| Weights | BM<2,1> |
| ReLU activations | unsigned BM<0,4> |
| Residual stream between N-BEATS blocks | BM<0,15>, 16 bits |

The hardware has two engines:

* **The FC block.** It is a 72 x 72 systolic GEMM kernel built from 36 x 24
  processing elements (PEs). Each PE computes six 4-bit significand products
  with a single DSP multiply. The kernel serves the forward pass, error
  propagation and weight-gradient computation of every fully connected
  layer. It transposes operands on the fly where a phase needs it, and it
  normalises its wide integer results back to BM with an optional ReLU.
* **The vector path.** A residual buffer feeds a BM vector unit and a MAPE
  error unit. The vector unit does residual add and subtract, error addition,
  format conversion, and the SGD weight update with stochastic rounding. The
  MAPE unit computes the loss gradient.

## Number representation in the RTL

All arithmetic works on integers. An element code of format <e,m> decodes to
an integer `I`:

* `I = M` when the exponent field `E` is 0, which is always the case for e = 0;
* `I = (2^m + M) << (E-1)` otherwise.

The element's value is `(-1)^s * I * 2^beta`. The format's own bias is folded
into `beta`, so `beta` is always the weight of the integer's least
significant bit.

Code layout: mantissa in the low bits, exponent above it, then the sign. The
unsigned format has no sign bit. There is no Inf or NaN: results saturate to
the largest code.

`bm_pkg` holds the format type `bm_fmt_t` (fields `uns`, `e`, `m`), the named
formats (`FMT_0_3`, `FMT_1_2`, `FMT_2_1`, `FMT_U0_4`, `FMT_0_15`) and the shared
helpers:

* decode to integer;
* choose the normalising shift;
* `bm_encode`, which rounds an integer to a format. It rounds to nearest or
  stochastically, denormalises small values, and saturates.

## The GEMM kernel (`bm_gemm`)

### Packed PE (`bm_pe`, `dsp_pack_mul`, `bm_decoder`, `beta_comp`)

A PE owns a 2 x 3 patch of the output tile. Each cycle it receives two A
elements and three B elements.

1. `bm_decoder` turns each 4-bit code into a 4-bit significand and a 0-3 bit
   shift.
2. `dsp_pack_mul` places the two A significands at bit offsets 0 and 21 of a
   25-bit operand, and the three B significands at offsets 0, 7 and 14 of an
   18-bit operand. One 25 x 18 multiply then yields all six products, each at
   most 105, in separate 7-bit fields. No carry crosses into the next field.
3. Each product is shifted left by its two element shifts plus `W_TAIL` guard
   bits and added to a 23-bit accumulator. The width is
   `Kadd = 1 + 4 + 4 + W_EX + W_TAIL`.

`beta_comp` keeps the block exponent of the running sum. This is the largest
`beta_a + beta_b` seen so far in the tile's K loop.

* When a step brings a larger exponent, the accumulator is shifted right.
* Otherwise the new term is shifted right.

Products are therefore aligned before they are added, as in floating point,
but the adders stay integer adders. Alignment is exact when the exponents of
a K loop are within `W_TAIL` of each other. Otherwise bits below the guard
bits are truncated.

### Array and drain (`bm_pe_array`)

The array is output-stationary. A values flow right and B values flow down.
Skew registers on the edges let the caller present each K step unskewed.

Along with the operands, each step carries:

* its formats, so the format can change between tiles without a pipeline
  flush;
* its block exponents;
* its first-step and last-step flags.

On the last step, each PE copies its six sums and its exponent into a shadow
register. The shadow registers form a chain that drains one 72-wide tile row
per cycle. The next tile accumulates during the drain. `in_ready` drops only
when a tile ends before the previous one has finished draining. This is the
only stall of the kernel.

### Normalisation (`bm_gemm_post`)

Drained rows go into a ping-pong buffer. For each 12 x 12 output block, the
stage proceeds in three steps:

1. The largest magnitude is found.
2. A right shift `Z` is chosen: `Z = max(0, bits(max) - bits the format can hold)`.
   The new block exponent is `ref - W_TAIL + Z`.
3. While the next tile fills the other bank, every element is rounded to
   nearest into the output format, with saturation.

With ReLU on, negative results become zero. A mask of positive results is
output for the ReLU derivative in the backward pass. The output format and
ReLU flag are latched per tile.

Result rows leave top row first, with one exponent per 12-column block.

### Latency

A tile of K steps is accepted at one step per cycle. Its first result row
appears about `PE_ROWS + PE_COLS + 72 + 4` cycles after its last step. This
covers the skew and the drain, plus the calibration and one output register.
After that, rows leave at one per cycle.

## FC block (`fc_block`, `bm_feeder`, `tile_transpose`)

Each operand passes through a feeder. The feeder is a ping-pong pair of 72 x 72
register banks: it writes one tile by rows and reads the other by rows or by
columns. The block exponents are transposed with the tile.

The direct path also passes through the banks. This keeps both feeders at the
same latency, so their outputs stay aligned step for step. The feeders also
count K tiles and generate the first/last flags.

| Path | Phase | Product | Feeder A | Feeder B |
|---|---|---|---|---|
| 1 | forward | A x W^T | direct | transposed |
| 2 | error propagation | e x W | direct | direct |
| 3 | weight gradient | e^T x A | transposed | direct |

Per GEMM the caller sets:

* `path`;
* `k_tiles`, the number of 72-deep K tiles per output tile;
* the operand formats;
* the output format: BM<0,4> with ReLU, BM<0,3>, or high-precision BM<0,15>
  for the block-input error and the branch outputs.

Tile streams must arrive in K order for each output tile. Path, formats and
`k_tiles` may change only once the feeders are empty.

## Vector path (`nbeats_accel`, `bm_vec_unit`, `mape_err`, `bm_buffer`, `lfsr`)

### Vector unit

`bm_vec_unit` processes one 12 x 12 block at one row per cycle.

1. It aligns the two operands to a common exponent `max(beta_a, beta_b - b_shift)`
   with `W_TAIL` guard bits.
2. It adds, subtracts, or passes `a` or `-a` through (the conversion
   operation).
3. After a one-cycle calibration state, it re-normalises the block to the
   output format.

`b_shift` scales operand b by a power of two. This is how the learning rate
enters the SGD update `W - 2^-b_shift * g`.

When `stoch` is set, rounding is stochastic. Each of the 12 lanes has its own
16-bit LFSR, and the discarded bits are compared with random bits. Otherwise
rounding is to nearest.

A block takes 12 cycles in, 1 cycle of calibration and 12 cycles out.

### MAPE unit

`mape_err` computes `sign(p - l) / (H * |l|)` for one row at a time.

* A 16-step restoring divider runs in each lane.
* A common exponent is then chosen for the row.
* The cost is 18 cycles per row.
* Lanes where `l = 0` or `p = l` give zero.

### Residual buffer and commands

The top holds the residual buffer RES. Each RES row has 12 BM<0,15> elements
plus an exponent. One command operates on one RES block of 12 rows:

* The rows are read as operand `a` or as the prediction.
* The `hp_*` stream supplies operand `b` or the label.
* With `cmd_wb` set, results are written back over the same rows. Vector
  results are also shown on `vec_out_*`.
* `cmd_done` pulses when the command finishes.
* `res_ld_*` and `res_rd_*` load and read RES while no command runs.

This is enough to perform the vector steps of the training algorithm:

* the backcast subtraction and forecast addition of the residuals;
* the MAPE error on the forecast;
* the conversions to 4-bit inputs, including the negated one for the backcast
  error;
* the SGD update.

## Top level and what sits outside it

`nbeats_accel` instantiates `fc_block` and the vector path side by side. The
following are **not** in the RTL and reach the top only as ports:

* the HBM memories and their controllers;
* the weight, input, activation, low-precision and high-precision buffers;
* the sequencer that walks the layers and blocks of the training algorithm.

The FC operand streams (`fc_a_*`, `fc_b_*`), the FC result rows (`fc_out_*`)
and the vector commands are the interface that sequencer would drive.

## Departures and open points

* **No training sequencer.** Nothing generates the layer loop, the buffer
  addresses or the HBM traffic. A host or testbench must drive the ports.
* **Transposer structure.** The transposer is a pair of register banks, not a
  shift-register array. Its direct mode, which exists to equalise latency, is
  a design choice.
* **Assumed widths.** `W_EX = 10` and `W_TAIL = 4` are assumed. They give a
  23-bit accumulator.
* **Accumulation error.** Accumulation is exact only while the exponents of a
  K loop stay within `W_TAIL` of each other. Otherwise truncation happens
  below the guard bits.
* **Stochastic rounding.** It is implemented as "add random bits below the
  output LSB, then truncate". The LFSR taps and seeds are design choices.
* **Residual buffer size.** The depth is 1024 rows, which is 12288 elements.
  A batch of 1080 sequences with 18 residual values each needs 19440
  elements, so the residual of a full batch must be handled in two passes.
* **Tile shape.** The FC block requires a square tile, which the default
  72 x 72 kernel satisfies. Layers smaller than a tile, or not a multiple of
  it, must be zero padded by whoever feeds the streams.
* **Kernel latency.** The reference latency for a pipelined BM GEMM is
  `ceil(Row*Col / Tl^2) * K + 2*Blk + Tl`. This kernel meets the first term:
  one K step per cycle, with tiles overlapped. Its tail is longer, about
  `PE_ROWS + PE_COLS + Tl + 4` instead of `2*Blk + Tl`. The difference comes
  from the edge skew of the array and the per-tile calibration pass.
  `tb_bm_gemm` checks the bound this design meets.
* **Supported formats.** Formats are limited to `e <= 2` for the 4-bit
  operands. The high-precision format BM<0,15> is used only for outputs and
  the vector path.

## Simulating

Every testbench is self-checking. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops, and each has a watchdog. Build
and run one with Verilator 5, for example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_nbeats_accel \
    rtl/bm_pkg.sv rtl/*.sv tb/tb_nbeats_accel.sv -Mdir obj_tb
obj_tb/Vtb_nbeats_accel
```

`bm_pkg.sv` must come first. Repeating it through the wildcard only produces
a warning. The testbenches are:

| Testbench | What it checks |
|---|---|
| `tb_bm_pe` | One PE over 30 random K-12 runs in all three format pairs. It checks exact integer sums, the block exponent, and the pass-through timing. |
| `tb_bm_gemm` | The kernel at 6 x 4 PEs (a 12 x 12 tile) and 6 x 6 blocks. Three tiles run back to back with different formats and ReLU. It checks the raw array sums (exact), every normalised output (within one LSB), the ReLU mask and the latency bound. |
| `tb_bm_vec_unit` | Add, subtract, SGD with stochastic rounding, and conversion and its negation, on 6 x 6 blocks. Outputs must be within one LSB of exact. Stochastic rounding must round away from zero in at least 20 % of the rounded cases and toward zero in at least 20 %. |
| `tb_nbeats_accel` | End to end at 3 x 2 PEs (a 6 x 6 tile). It runs all three FC paths and an extra single-K-tile GEMM that forces kernel stalls, then residual subtraction, MAPE and three SGD updates through RES. It counts stalls, drain overlap, both transposes, ReLU zeroing, high-precision outputs, write-backs, MAPE and stochastic rounding. Each must occur. |
| `tb_nbeats_full` | The same sequence with the top at its default size: 36 x 24 PEs, 12 x 12 blocks, 1024 RES rows. The Verilator build at this size is large and takes several minutes. |

`tb_bm_gemm` also covers the decoder, the packed multiplier, the exponent
logic, the array and the normalisation stage. `tb_nbeats_accel` covers the
feeders, the transposer, the buffer and the MAPE unit.

## Files

* `rtl/bm_pkg.sv`: types, formats, encode and decode helpers.
* `rtl/bm_decoder.sv`, `rtl/dsp_pack_mul.sv`, `rtl/beta_comp.sv`,
  `rtl/bm_pe.sv`, `rtl/bm_pe_array.sv`, `rtl/bm_gemm_post.sv`,
  `rtl/bm_gemm.sv`: the GEMM kernel.
* `rtl/tile_transpose.sv`, `rtl/bm_feeder.sv`, `rtl/fc_block.sv`: the FC
  block.
* `rtl/lfsr.sv`, `rtl/bm_vec_unit.sv`, `rtl/mape_err.sv`,
  `rtl/bm_buffer.sv`: the vector path.
* `rtl/nbeats_accel.sv`: the top.
* `tb/`: the testbenches listed above.
