# Radix-8 fused multiply-add unit (binary64, or two binary32 lanes)

This RTL computes `R = X*Y + W` on IEEE-754 binary64 numbers and rounds only
once, at the end. Multiplication and addition use the same hardware:

- A multiplication is `X*Y + (-0)`.
- An addition is `X*1.0 + W`.

The unit aims for low latency. Three ideas get it there:

1. **Radix-8 Booth multiplier.** It makes 18 partial products for a 53-bit
   significand instead of 27 (radix 4). A tree of 4:2 compressors reduces them
   to two carry-save words. The multiplier does not add them up itself.
2. **Dual data path.** After the multiplication, an operation takes either a
   *far* path or a *close* path:
   - The far path needs a full-width alignment shifter but only a tiny
     normalization.
   - The close path needs a full normalization shifter but no alignment
     shifter.
   
   An operation never needs both long shifts, so the critical path holds only
   one of them. The addend is aligned *after* the multiplier, not beside it.
3. **Normalize before the final addition.** On the far path, the two
   carry-save words are shifted into place before they are added. The last
   stage then performs the final addition, a shift of at most 3 bits, and
   the rounding. Rounding is one increment at a known bit position, done by a
   compound adder that computes `M` and `M+1` together. The rounding decision
   only picks one of them.

The pipeline has three stages:

| Stage | What it does |
|---|---|
| 1 | Unpack the operands, handle exponents, multiply |
| 2 | Choose the path. Far: align, compress, normalize the two words. Close: add, normalize |
| 3 | Final addition, round, detect zero, handle exceptions, pack |

- A multiply-add or a multiplication takes **3 cycles**.
- An addition does not need the multiplier. It skips stage 1 and takes **2
  cycles**.

In single-precision mode, each 64-bit operand word carries two binary32
numbers. The unit then does two binary32 multiply-adds per operation.

## Interface and timing (`maf_top`)

| Port | Dir | Width | Meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | Clock. Asynchronous active-low reset; it clears the valid bits only. |
| `in_valid` / `in_ready` | in / out | 1 | The operation is accepted in a cycle where both are high. |
| `in_op` | in | 2 | `maf_op_e`: `OP_MAF` (X*Y+W), `OP_MUL` (X*Y, `in_w` ignored), `OP_ADD` (X+W, `in_y` ignored). |
| `in_single` | in | 1 | 0: binary64 operands. 1: two binary32 operations, lane 0 in bits 31:0 and lane 1 in bits 63:32 of each word. |
| `in_x`, `in_y`, `in_w` | in | 64 | Operands. |
| `out_valid` | out | 1 | A result is on `out_res`, for one cycle. |
| `out_res` | out | 64 | The binary64 result, or `{lane 1, lane 0}` binary32 results. |
| `out_flags` | out | 4 | `{invalid, overflow, underflow, inexact}` of the binary64 result, or of lane 0. |
| `out_flags_hi` | out | 4 | The same flags for binary32 lane 1; zero in binary64 mode. |

Timing:

- An operation accepted at a clock edge has its result registered 3 edges
  later, or 2 edges later for `OP_ADD`.
- One operation can be accepted every cycle.
- `in_ready` is low in only one case: an addition is offered while stage 1
  holds an operation. The addition would reach stage 2 at the same time as
  that operation, so it waits one cycle.
- An addition only overtakes an *empty* stage 1, so results always leave in
  the order the operations were accepted.
- There is no output back-pressure.
- The assertion `a_one_into_stage2` states the one-operation-per-cycle rule
  for stage 2.

The precision can change from one operation to the next. Each pipeline stage
carries the precision of the operation it holds.

## Stage 1: unpacking and exponent difference (`maf_prep`, `exp_handler`)

`maf_prep` does the following:

- Splits each operand into sign, exponent and significand, with the hidden
  bit made explicit.
- Applies the operation code.
- Classifies the operands.

NaN, infinity, zero-product and invalid cases (such as `0*Inf`, or `Inf-Inf`)
are decided here. The result is a fixed word that stages 2 and 3 only carry
along. The rest of the datapath can therefore assume two things: the product
is a nonzero normal product, and `W` is zero or normal.

`exp_handler` computes, with `EX`, `EY`, `EW` the biased exponents:

```
ep = EX + EY - 1023             product exponent (product significand in [1,4))
df = EW - ep                    exponent difference
sh = 56 - df, clamped to 0..162 alignment shift of the addend
```

A zero `W` forces `df` to its most negative value and `sh` to 162. The addend
then drops out of the alignment frame, and the far path passes the product
through.

## The radix-8 Booth multiplier (`booth8_multiplier`)

The multiplier `y` is cut into overlapping 4-bit groups
`{y[3i+2], y[3i+1], y[3i], y[3i-1]}`, with `y[-1] = 0`. Each group is
recoded to a digit in -4..+4:

| group | digit | group | digit |
|---|---|---|---|
| 0000, 1111 | 0 | 1000 | -4 |
| 0001, 0010 | +1 | 1001, 1010 | -3 |
| 0011, 0100 | +2 | 1011, 1100 | -2 |
| 0101, 0110 | +3 | 1101, 1110 | -1 |
| 0111 | +4 | | |

A 53-bit unsigned multiplier needs 18 digits. The top digit sees zeros above
bit 52, so it is never negative.

- **Encoder.** `booth8_encoder` gives a sign and a one-hot magnitude (1, 2, 3
  or 4).
- **Row generator.** `booth8_ppgen` selects `x`, `2x`, `3x` or `4x`. It
  inverts the row for a negative digit.
- **3x.** This is the only "hard" multiple. It is formed once, as `2x + x`,
  by a single adder that all rows share.
- **Negative rows.** A negative row is a one's complement. The missing `+1`s
  of all rows are gathered into one extra row, at the row positions `3i`.
- **Compressor tree.** `csa_tree` takes the 19 rows, sign-extended to 106
  bits, through four levels of 4:2 compressors: 19 → 10 → 6 → 4 → 2. At a
  level where three rows are left over, a 3:2 row handles them.

The result is two 106-bit words, `psum` and `pcarry`. Their sum modulo
2^106 is the exact product. They are registered at the end of stage 1 **in
carry-save form**. The carry-propagate addition happens in stage 2, merged
with the addend.

## Stage 2: choosing the path (`maf_stage2`)

The path is chosen from the effective operation and `df` alone, before any
addition:

```
close path:  effective subtraction and -1 <= df <= 2
far path:    everything else
```

The product significand lies in [1,4). An addend with `df` from -1 to 2 can
therefore cancel any number of leading bits, down to an exact zero. Outside
that window, at most one leading bit can cancel.

Published descriptions of this scheme usually put the window at -1..1. That
misses one case: a product near 4 minus an addend in [4,8) with `df = 2` can
cancel massively. Here `df = 2` is included in the close path. (A test copy
of the stage that uses -1..1 fails 187 of about 7800 checks.)

Both paths are built. A multiplexer picks the one in use, and the other's
output is ignored.

### A detail both paths share: the hidden 2^106 in the carry-save product

Sign extension and the one's complement rows mean that `psum + pcarry` can
equal `P + 2^106`, not the product `P`. The multiplier drops that carry.
Stage 2, though, adds the two words inside a wider adder, where the carry
would land and corrupt the result.

So stage 2 computes `pcout`, the carry out of `psum + pcarry`. Each path
then subtracts `2^106` when `pcout` is set. This correction goes in the
fourth input of its 4:2 compressor, which also carries the `+1` of the
addend's two's complement. It costs no extra adder stage.

(A test copy of the far path without the correction fails about a quarter
of its checks.)

### Far path (`far_path`, `align_shifter`)

**Alignment.** The addend significand is shifted right by `sh` into a
161-bit frame (3·53 + 2 bits). With `sh = 0` it sits at the top of the
frame, 56 bits above the product's integer bit. Bits shifted out of the
frame become a sticky bit.

**Sign known in advance.** On this path the sign of the result follows from
`df`, so the result is never complemented after an addition:

- For an effective subtraction with `df >= 3`, the addend is at least
  `8·2^ep` and the product is below `4·2^ep`, so the addend is larger.
- For `df <= -2`, the product is larger.

The smaller operand is the one negated.

**Compression.** A 163-bit 4:2 compressor reduces four words to two:

- Product larger (or an addition): the two product words; the aligned
  addend, inverted for a subtraction; and a correction word holding `+1` and
  `-2^106`.
- Addend larger: the two product words inverted; the aligned addend; and a
  correction word holding `+2`, plus `+2^106` when `pcout` is set.

**Subtraction with a sticky bit.** When the sticky bit is set in a
subtraction, the `+1` is left out. The true addend lies strictly between
the truncated addend and the truncated addend plus one unit. The difference
computed is therefore one unit below the exact value, and the sticky bit
records that something lies in between. This case arises only when the
product is larger: a larger addend is never shifted out of the frame.

**Normalization before addition.** On this path the leading one can move by
only a few bits. Its position is known from `df` to within four bits:

- For an addend that does not dominate, it sits around the product's top
  bits.
- Otherwise it sits around the addend's top bit.

Both carry-save words are shifted left by `56 - clamp(df, 0, 56)`, without
adding them. After the shift, the leading one of their sum is in the top
four bits. Bits pushed out at the top of the two words cancel each other,
because the sum itself fits.

The path hands stage 3 two 163-bit words, the alignment sticky bit, and the
exponent of the top bit, which is `ep + max(df,0) + 2`. No leading-zero
count is needed anywhere on this path.

### Close path (`close_path`, `lzc`)

**Placement.** With `df` limited to four values, the addend goes into a
108-bit window through a 4-way multiplexer, at bit offset `51 + df`. There
is no shifter. Everything fits in the window, so nothing is lost and there
is no sticky bit.

**Addition.** A 108-bit 4:2 compressor adds:

- the product words;
- the inverted addend;
- `+1`, and `-2^106` when `pcout` is set.

Then come an adder, a complement stage (an absolute value, with the sign
flip reported), a leading-zero counter, and a normalization shifter.

The sign and the leading-zero count depend on the sum, so this path adds in
stage 2. It passes its normalized significand to stage 3 in the same
two-word form as the far path, with the second word zero.

**Zero.** An exact cancellation leaves an all-zero significand. Stage 3
turns it into `+0`.

**Leading zeros.** The count is exact: it is taken from the adder's output,
not anticipated in parallel with it. This is slower than a leading-zero
anticipator, but it is never off by one, so no correction shift is needed.

## Stage 3: final addition, rounding, zero detection and packing (`round_unit`)

The result arrives as two 163-bit words, with their leading one in the top
four bits. Stage 3 works as follows:

- **Final addition.** One 163-bit adder adds the two words.
- **Last shift.** A shift of 0 to 3 bits, decided from the top four bits of
  the sum, puts the leading one at the top. The exponent drops by the same
  amount.
- **Significand bits.** The top 53 bits are the significand; the next bit is
  the round bit. All lower bits are ORed with the sticky bit from stage 2.

- **Round up or not.** Round-to-nearest-even rounds up when
  `round and (sticky or lsb)`.
- **Compound adder.** It forms `M` and `M + inc` in parallel, and the
  decision selects one. In binary64 mode `inc` is 1. A binary32 result uses
  the same 53-bit significand: it is rounded at its 24th bit
  (`inc = 2^29`), and the 29 bits below that bit join the round and sticky
  bits.
- **Carry out.** If `M + inc` overflows, the significand becomes 1.0 and the
  exponent rises by one.
- **Zero.** A zero sum (exact cancellation) gives `+0`.
- **Underflow.** An exponent below the normal range, before rounding,
  flushes the result to a signed zero and raises underflow and inexact.
- **Overflow.** An exponent at or above the all-ones value after rounding
  gives a signed infinity and raises overflow and inexact.
- **Fixed results.** A result fixed in stage 1 passes through. In
  single-precision mode it is narrowed: every NaN becomes `7FC00000`.

## Single-precision mode: two binary32 lanes (`maf_lane`, `fp32_widen`, `fp64_narrow`)

- **Widening.** A binary32 value is exactly representable in binary64.
  `fp32_widen` rebiases the exponent by 896 and moves the fraction to the
  top. Subnormal inputs become zeros.
- **Why the result is correct.** A widened operation runs through a
  binary64-wide lane, which keeps the exact sum's leading 53 bits plus round
  and sticky. Rounding that to 24 bits gives the correctly rounded binary32
  result.
- **Lanes.**
  - **Lane 0** is the binary64 lane. A multiplexer at its input picks the
    binary64 operands or the widened low binary32 halves.
  - **Lane 1** is a second instance of the same lane. It handles the high
    halves and its registers load only in single-precision mode.
  - Both lanes share the operation code and the valid and handshake logic in
    `maf_top`.

**Departure from the original design.** The original design builds its
second binary32 lane by splitting and re-using parts of the binary64
datapath, to save area. It does not say which parts. Lane 1 here is a plain
copy, so it is correct but not area-efficient. Splitting the 53×53 Booth
array into two 24×24 arrays, and splitting the shifters and adders the same
way, would be the place to start saving area.

## Special values and exceptions

| Case | Result | Flag |
|---|---|---|
| Any NaN operand | Quiet NaN `7FF8000000000000` | `invalid` for a signaling NaN |
| `0 * Inf` | Quiet NaN | `invalid` |
| `Inf - Inf` (effective subtraction) | Quiet NaN | `invalid` |
| Other infinities | Signed infinity, as IEEE-754 specifies | — |
| Exact cancellation | `+0` | — |
| Zero product plus zero addend | Zero; the sign follows IEEE-754 for round-to-nearest | — |
| Subnormal input | Treated as a signed zero (denormals-are-zero) | — |
| Subnormal result | Flushed to zero | `underflow` |

**Not supported:**

- gradual underflow;
- the directed rounding modes.

## Where the design follows the original and where it does not

Taken from the original description:

- the operation `X*Y + W`;
- addition as `X*1 + W` and multiplication as `X*Y + 0`;
- the exponent difference and the alignment shift with its offset of 56;
- radix-8 Booth recoding with its digit table, and the shared `3x` adder;
- the 4:2 compressor tree;
- three stages, with the addend aligned after the multiplier;
- far/close paths, each with one long shifter;
- a 4:2 compressor at the head of each path;
- normalization before the final addition, with the final addition and the
  rounding (by a compound adder) in the last stage;
- round-to-nearest-even;
- the stage-1 bypass for additions;
- one binary64 or two binary32 operations.

This design's own choices:

- **Close window.** -1..2 instead of -1..1 (see above).
- **Far-path normalization.** A df-driven shift of the carry-save words,
  then a 0–3-bit shift after the final addition. The original gives the far
  path only its alignment shifter and does not say how its result reaches
  the rounding position.
- **Leading zeros.** An exact leading-zero counter after the adder, not a
  leading-zero anticipator.
- **Stage 3 adder.** The final addition, the short shift and the rounding
  increment come one after the other. The original merges addition and
  rounding into a single dual adder.
- **Close path adds in stage 2.** Its sign and leading-zero count depend on
  the sum, so it adds in stage 2. Only the far path's addition is deferred
  to stage 3.
- **Separate per-path rounding.** The original mentions a half-adder per
  path to prepare rounding. It is not built: both paths deliver a normalized
  significand with round and sticky bits, and one rounding unit serves both.
- **Row tricks.** One's complement rows plus one row of `+1`s, and full sign
  extension of the rows.
- **The `2^106` correction** of the carry-save product.
- **Interface.** The handshake, the latencies in cycles, the reset, the flag
  set, the NaN encoding, denormals-are-zero / flush-to-zero, the lane
  layout, and the copied second lane.

## Files

| File | Content |
|---|---|
| `rtl/maf_pkg.sv` | Widths, opcodes, flag and stage-register structs |
| `rtl/maf_top.sv` | Handshake, valid bits, precision multiplexers, two lanes |
| `rtl/maf_lane.sv` | One lane: stages 1–3, their registers, the addition bypass |
| `rtl/maf_stage1.sv`, `rtl/maf_prep.sv`, `rtl/exp_handler.sv` | Stage 1 |
| `rtl/booth8_multiplier.sv`, `rtl/booth8_encoder.sv`, `rtl/booth8_ppgen.sv`, `rtl/csa_tree.sv`, `rtl/csa42.sv` | Multiplier |
| `rtl/maf_stage2.sv`, `rtl/far_path.sv`, `rtl/close_path.sv`, `rtl/align_shifter.sv`, `rtl/lzc.sv` | Stage 2 |
| `rtl/round_unit.sv` | Stage 3 |
| `rtl/fp32_widen.sv`, `rtl/fp64_narrow.sv` | binary32 ↔ binary64 |
| `tb/maf_ref_pkg.sv` | Reference model and random operand helpers |
| `tb/*_tb.sv` | One self-checking testbench per block, plus the end-to-end and workload benches |

## Verification

Every testbench compares against values computed independently of the RTL.
Each prints `TB_RESULT checks=N failures=M` and has a watchdog.

**The reference model** (`tb/maf_ref_pkg.sv`) works as follows:

- It computes `X*Y + W` exactly as a wide integer (768 bits).
- It rounds once, to binary64 or binary32, under the same rules for
  specials, DAZ and FTZ as the RTL.
- The end-to-end bench cross-checks it against the simulator's own binary64
  `*` and `+` for plain products and sums.

**Block benches:**

- The multiplier bench checks random, corner-case and fixed operands against
  the exact product.
- The path benches drive random carry-save splits of exact products.

**`maf_top_tb`** is the end-to-end bench. It runs at the default parameters:

- about 4000 random operations, with random gaps;
- a mix of multiply-add, multiply and add;
- a quarter of the operations in two-lane binary32 mode;
- near-cancelling addends, extreme exponents, and specials.

It checks every result, both flag sets, the order and the exact latency. It
counts each mechanism and fails if one never happens. The mechanisms are:

- far path and close path;
- addition bypass, and the stall it causes;
- exact zero;
- round up, and round up with carry out;
- overflow and underflow;
- invalid, and other special cases;
- single-precision operations, and mode switches;
- a reset with operations in flight.

**`maf_workload_tb`** repeats an accuracy experiment 20 times:

- It runs 100 random multiply-adds on in-range operands per round, issued
  back to back, in binary64 and then in two-lane binary32.
- Every result must be the correctly rounded fused value.
- It reports how many differ from a separate multiply-then-add. In one run:
  421 of 2000 binary64 results, and 1404 of 4000 binary32 results. A quarter
  of the addends were chosen to cancel closely, which inflates these numbers.

Simulating with plain Verilator (5.x), from the project root:

```sh
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module maf_top_tb rtl/maf_pkg.sv tb/maf_ref_pkg.sv tb/maf_top_tb.sv
./obj_dir/Vmaf_top_tb
```

- Substitute any other `*_tb` for a single block.
- The two packages must come first on the command line; `-y` finds the
  other modules.
- Each bench finishes in seconds.
- The simulator is two-state. Everything the benches read is reset or
  written first.

To change the design:

- Widths and constants are in `maf_pkg`. The datapath is written for the
  binary64 format; the 53-bit significand and the 161-bit frame are
  parameters of the shifter, compressor and multiplier blocks.
- The block benches name their parameters explicitly, at the default values
  (`csa_tree` is also tested with 7 rows). To try another size, change the
  `localparam` at the top of the bench.

## Limits

- **Rounding.** Round-to-nearest-even only.
- **Subnormals.** No subnormal inputs or outputs (DAZ/FTZ).
- **Second lane area.** The second binary32 lane is a copy, not a split of
  the binary64 datapath.
- **Timing.** No timing figures are given. Stage depth is as described
  above; the design has not been run through timing analysis for any
  technology.
