# Pipelined double precision multiplier with a tiled significand multiplier

This is a fully pipelined IEEE-754 binary64 multiplier. It takes one pair of
operands every clock and returns the product seven clocks later. The result is
rounded by truncation, and two flags report overflow and underflow.

The main idea is in the significand multiplier. On an FPGA, a 53 x 53-bit
product cannot come from a single hard multiplier. It has to be put together
from smaller products. Here the 53 x 53 partial-product board is cut into nine
rectangles ("tiles"). Each tile is small enough for one DSP block multiplier
(at most 24 x 17 unsigned bits). The tiles are grouped so that, inside each
group, neighbouring tiles are exactly 17 bits apart. A DSP post-adder cascade
can sum a group like that with no extra logic. Only one wide addition is left
outside the DSP blocks.

## Interface

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock; everything is on the rising edge |
| `rst`       | in  | 1     | synchronous, active-high reset |
| `enable`    | in  | 1     | clock enable of the whole pipeline |
| `a`, `b`    | in  | 64    | operands, binary64 (sign, 11-bit exponent, 52-bit fraction) |
| `fpout`     | out | 64    | `a * b`, truncated |
| `overflow`  | out | 1     | the result is too large; `fpout` is ±Infinity |
| `underflow` | out | 1     | the result is too small, or an operand is denormal; `fpout` is ±0 |

Timing: `a` and `b` are sampled on a rising edge while `enable` is high. The
result, with its flags, appears on `fpout` six enabled edges later, so the
latency is seven clock cycles. A new pair can be given on every cycle. With
`enable` low, no register changes and operations in flight wait. The pipeline
has no valid signal, so the user keeps count of the cycles. After reset every
pipeline slot holds a multiplication by zero, and `fpout` reads +0 with both
flags low until the first real result comes out.

## The tiling (`tile_mantissa_mul`)

Let `A` and `B` be the 53-bit significands, hidden bit included. The nine tiles are:

```
 M1 = A[23:0]  x B[16:0]   41 bits   weight 2^0
 M2 = A[23:0]  x B[33:17]  41 bits   weight 2^17
 M3 = A[16:0]  x B[52:34]  36 bits   weight 2^34
 M4 = A[33:17] x B[52:34]  36 bits   weight 2^51
 M8 = A[40:24] x B[23:0]   41 bits   weight 2^24
 M7 = A[52:41] x B[23:0]   36 bits   weight 2^41
 M6 = A[52:34] x B[40:24]  36 bits   weight 2^58
 M5 = A[52:34] x B[52:41]  31 bits   weight 2^75
 M0 = A[33:24] x B[33:24]  20 bits   weight 2^48
```

A tile's weight is the sum of the lowest bit indices of its two ranges. The
tiles cover every bit pair `(A[i], B[j])` exactly once. This gives

```
 A*B = S0 + 2^24 * S1 + 2^48 * M0
 S0  = M1 + 2^17 M2 + 2^34 M3 + 2^51 M4      (87 bits)
 S1  = M8 + 2^17 M7 + 2^34 M6 + 2^51 M5      (82 bits)
```

Inside S0 and inside S1, each tile sits 17 bits above the previous one. So
each sum is built as a cascade: a step takes the running sum, shifts it right
by 17 bits and adds the next tile. The 17 bits shifted out are already final
and are just collected:

```
 s01 = M2 + (M1  >> 17)        s11 = M7 + (M8  >> 17)
 s02 = M3 + (s01 >> 17)        s12 = M6 + (s11 >> 17)
 s03 = M4 + (s02 >> 17)        s13 = M5 + (s12 >> 17)
 S0  = {s03, s02[16:0], s01[16:0], M1[16:0]}
 S1  = {s13, s12[16:0], s11[16:0], M8[16:0]}
```

This is the operation of a DSP48 slice whose adder takes the previous slice's
output shifted right by 17. The last step adds S0, the shifted S1 and the
shifted M0 in one 82-bit adder. The low 24 bits of S0 pass straight through.
Only this final sum needs general-purpose adders.

All nine tiles are instances of `comb_multiplier`, a plain unsigned multiplier
with parameters for its two widths. The RTL uses no vendor primitives. It
only relies on synthesis to map each tile and its adder onto a DSP block.

## Pipeline (`mult`)

| stage | significand path | exponent / sign path |
|-------|------------------|----------------------|
| 1 | operands unpacked; the hidden bit is added to give `mul_a` and `mul_b` (`operand_unpack`) | sign = Sa xor Sb; `Ea + Eb` by a 12-bit ripple-carry adder (`adder1`); operand classes |
| 2 | nine tile products | bias removed: `Ea + Eb - 1023`, 13-bit signed (`exp_bias_sub`) |
| 3 | `s01`, `s11` | delayed |
| 4 | `s02`, `s12` | delayed |
| 5 | S0, S1 | delayed |
| 6 | 106-bit product | delayed |
| 7 | normalize and truncate (`normalize_round`) | exponent update, overflow/underflow, packing (`exc_update`); output register |

Sign, exponent and operand classes travel with the product in a small delay
line of packed structs. Assertions in `mult` check that the two flags are
never high together, that `overflow` always comes with ±Infinity, and that
`underflow` always comes with ±0.

## Normalization, rounding and exceptions

Both significands lie in [1, 2), so their product lies in [1, 4). If product
bit 105 is set, the fraction is bits 104:53 and the exponent goes up by one.
Otherwise the fraction is bits 103:52. All lower bits are dropped: the
rounding is truncation, i.e. toward zero.

Let `E = Ea + Eb - 1023`, and let the final exponent be `E` plus the
normalization increment.

- Final exponent of 0 or below: **underflow**. The result is ±0 and
  `underflow` = 1. An `E` below 0 can never be repaired. An `E` of exactly 0
  is repaired when the product needs the one-place shift.
- Final exponent from 1 to 2046: a normal result.
- Final exponent of 2047 or above: **overflow**. The result is ±Infinity
  (exponent 2047, fraction 0) and `overflow` = 1. This includes `E` = 2046
  pushed over the limit by normalization.

Operands that are not normal numbers are handled before the rules above. The
sign is always the XOR of the operand signs.

- Exponent 2047 (Inf or NaN) in either operand: ±Infinity, `overflow` = 1.
  This takes precedence over the other cases. NaN is not propagated, and
  Inf × 0 also gives Infinity.
- A denormal operand: flushed. The result is ±0 with `underflow` = 1.
- A zero operand: ±0 with no flag.

## What is taken from the reference design and what is not

Taken from it:

- the port list;
- the seven-cycle latency and one result per clock;
- the 1/11/52 format and the bias of 1023;
- the ripple-carry exponent adder with 12-bit ports;
- the nine tile ranges, equation S0 + 2^24 S1 + 2^48 M0, the 17-bit
  right-shift cascades and the three final additions;
- truncation rounding;
- the exponent classification and the ±Inf/±0 results;
- the flushing of denormal operands.

Choices made here:

- where the stage boundaries fall;
- `enable` as a clock enable, and a synchronous active-high reset;
- the 13-bit signed intermediate exponent (a 12-bit one cannot hold the range
  -1021..3069);
- the handling of zero and Inf/NaN operands.

Differences from the reference design's reported results:

- **Flip-flops.** The reference reports 197 flip-flops (433 slice registers
  elsewhere). This design has about 1300 register bits. That is what a
  seven-stage pipeline of this width needs, because a single 106-bit stage
  alone is 106 bits.
- **`underflow` on a normal result.** The reference's waveform of
  99 × -9.75 shows `underflow` high next to a correct normal result
  (-965.25). Here `underflow` stays low for that case, as the exponent rules
  require.
- **Not measured.** The reported 436.8 MHz on a Virtex-6 and the
  9-DSP-block figure depend on the FPGA flow and were not checked.

## Files

- `rtl/fpmul_pkg.sv`: widths, bias, tile offsets, `fp64_t` and `opclass_t`
- `rtl/mult.sv`: the top-level pipeline
- `rtl/operand_unpack.sv`, `rtl/adder1.sv`, `rtl/exp_bias_sub.sv`: stage 1 and 2 logic
- `rtl/tile_mantissa_mul.sv`, `rtl/comb_multiplier.sv`: the tiled significand multiplier
- `rtl/normalize_round.sv`, `rtl/exc_update.sv`: stage 7 logic
- `tb/tb_<module>.sv`: one self-checking testbench per module

## Verification

Each testbench compares its module with a model written independently in the
testbench and prints `TB_RESULT checks=N failures=M`.

- `tb_tile_mantissa_mul` compares the tiled product with a 106-bit `*` on
  every clock while `enable` drops at random. It also checks the five-cycle
  latency of that block.
- `tb_mult` runs the whole multiplier.
  - It checks the worked example 99 × -9.75 = -965.25 (`0x4058C00000000000` ×
    `0xC023800000000000` = `0xC08E2A0000000000`), including its seven-cycle
    latency.
  - It then streams 100,000 directed and random operand pairs with random
    stalls and a reset in mid-stream. The reference model works from the bit
    fields, and normal results are also compared with the simulator's
    `real` product: a truncated result must equal the round-to-nearest
    result, or lie one unit in the last place below it.
  - It counts each mechanism: normalization shift or none, overflow from the
    exponent sum, overflow from normalization, underflow, the repaired
    zero exponent, zero, denormal and Inf operands, inexact truncation, stall
    and reset. A mechanism that never occurs counts as a failure.

To simulate with Verilator, for example the top level:

```
verilator --binary --timing --assert -Irtl rtl/fpmul_pkg.sv tb/tb_mult.sv --top-module tb_mult -o sim
./obj_dir/sim
```

The other testbenches build the same way: replace `tb_mult` with
`tb_<module>`. The whole run takes well under a second.
