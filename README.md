# Pipelined single precision floating point unit

This is a floating point unit for IEEE 754 single precision (32-bit) numbers. It adds,
subtracts, multiplies and divides, and it rounds in any of the four IEEE rounding modes.
It is fully pipelined. A new operation can enter on every clock, and its result comes
out four clocks later, together with the IEEE exception flags. Subnormal numbers are
handled in full, as inputs and as results.

The structure is the classic one for a small FPU:

```
           opa  opb  fpu_op  rmode
             |    |     |      |
        [ input latch (edge 0) ]---------------------------+
          |                  |                             |
  pre-normalize          pre-normalize               exceptions unit
  for add/sub            for mul/div                 (NaN, inf, zero operands)
  (align fractions)      (normalize subnormals,              |
          |               exponent, sign)                    |  carried along
          |  edge 1          |         |                     |  the pipeline
      add/sub            multiply    divide                  |
          |  edge 2          |         |                     |
          +---------- post-normalize and round ---- rmode    |
                             |  edge 3                       |
                     [ output register (edge 4) ] <----------+
                             |
     fpout, zero, ine, overflow, underflow, inf, qnan, snan, div_by_zero
```

All three arithmetic units work on every operation. The post-normalization stage uses
the result of the unit that `fpu_op` selects. The exceptions unit decides early whether
the result is fixed by a special operand. If it is, its result replaces the arithmetic
result at the output register.

## Interface and timing

| port | dir | width | meaning |
|---|---|---|---|
| `clk` | in | 1 | clock; all registers use its rising edge |
| `fpu_op` | in | 3 | 0 add, 1 subtract, 2 multiply, 3 divide; codes 4–7 return a quiet NaN |
| `rmode` | in | 2 | 0 nearest even, 1 toward zero, 2 toward +inf, 3 toward −inf |
| `opa`, `opb` | in | 32 | operands (`opa − opb`, `opa / opb`) |
| `fpout` | out | 32 | result |
| `zero` | out | 1 | result is ±0 |
| `ine` | out | 1 | inexact: the rounded result differs from the exact one (also set on overflow) |
| `overflow` | out | 1 | the rounded result exceeds the largest finite number |
| `underflow` | out | 1 | the result is tiny (below 2^-126 before rounding) and inexact |
| `inf` | out | 1 | result is ±infinity |
| `qnan` | out | 1 | result is a NaN (always the quiet NaN `0x7FC00000`) |
| `snan` | out | 1 | an operand was a signalling NaN |
| `div_by_zero` | out | 1 | a finite nonzero number was divided by zero |

`fpu_op`, `rmode`, `opa` and `opb` are sampled at a rising edge, called edge 0. The
result and every flag for that operation are valid after edge 4, and they stay valid
until edge 5. The unit has no valid signal, no stall and no reset. It simply starts an
operation on every clock. For the first four clocks after power-up the outputs are
meaningless.

## Number format

A single has a sign bit (31), an 8-bit exponent biased by 127 (bits 30..23) and a 23-bit
mantissa (bits 22..0). Normal numbers have an implicit leading 1. Exponent field 0 holds
zeros and subnormals, and field 255 holds infinities and NaNs. A NaN whose mantissa MSB
is 0 is signalling. The unit never produces a signalling NaN. An operand that is one
sets `snan`, and the result is a quiet NaN.

Inside the datapath a significand is 24 bits wide, with the hidden bit made explicit. A
subnormal's hidden bit is 0, and its exponent is taken as 1.

## The three arithmetic paths

**Add and subtract** (`fpu_pre_norm_addsub`, `fpu_addsub`). Subtraction is turned into
addition by flipping the sign of B. If A's exponent is strictly greater than B's, A is
the large operand L; otherwise B is. The small fraction is shifted right by the exponent
difference. Fractions carry three extra low bits, the guard, round and sticky bits.
Every bit shifted out is ORed into the sticky bit, so rounding later sees whether
anything nonzero was lost. Equal signs add the fractions, and different signs subtract
S from L. The difference can go negative only when the exponents are equal, and no bits
were shifted out in that case. A negative difference is two's-complemented back to a
magnitude, and the result takes S's sign. An exact zero from a subtraction is +0,
except in round-toward-−inf mode, where it is −0.

**Multiply** (`fpu_pre_norm_muldiv`, `fpu_mul`). The pre-normalizer shifts a subnormal
significand left until its leading 1 sits at bit 23 and lowers its exponent to match.
This lets the multiplier and divider assume normalized inputs. The result exponent is
eA + eB − 127 and the sign is the XOR of the signs. The 24×24 product is exact (48 bits,
with a value in [1, 4)).

**Divide** (`fpu_pre_norm_muldiv`, `fpu_div`). The exponent is eA − eB + 127. The
significands are divided by a restoring divider that is unrolled into 27
compare-and-subtract steps inside one pipeline stage. This keeps a divide issuing every
clock, like the other operations, at the cost of a long combinational path. The quotient
is floor(fA·2^26 / fB), with a value in (1/2, 2). A nonzero remainder becomes a sticky
bit.

The pre-normalizer's exponent is a 10-bit two's complement number. It is brought out as
`{exp_ovf, exp_out}` and can be negative: a product of two tiny numbers reaches about
−171. The other outputs of that block are `underflow[2:0]`, `inf`, `sign` and
`sign_exe`. They report operand classes: A subnormal, B subnormal, result exponent below
1, an infinite operand, the result sign, and both operands negative. The datapath uses only the exponent, the fractions
and `sign`, so the top level leaves `underflow`, `inf` and `sign_exe` unconnected.

## Normalization and rounding

This stage (`fpu_post_norm`) is the subtle part of the unit. Every arithmetic unit hands
over the same unrounded form, `unrounded_t` in `fpu_pkg`. It carries a sign, a signed
biased exponent `exp`, a 50-bit significand `sig` and a sticky bit. The value is
sig · 2^-48 · 2^(exp−127), so `sig` has two integer bits (49:48). The three units place
their raw results to fit this form:

| unit | raw result | binary point | placed in |
|---|---|---|---|
| add/sub | 28-bit sum | after bit 26 | `sig[49:22]` |
| multiply | 48-bit product | after bit 46 | `sig[49:2]` |
| divide | 27-bit quotient, remainder sticky | after bit 26 | `sig[48:22]` |

Post-normalization then does the following:

1. **Normalize.** Let lz be the number of leading zeros of `sig`. A left shift of lz − 1
   moves the leading 1 to bit 48. The shift is capped at `exp − 1`, so the exponent never
   drops below 1. A result below the normal range therefore stays subnormal, with its
   leading 1 below bit 48. A negative shift becomes a right shift, and the bits it drops
   go into the sticky bit. This happens after a carry into bit 49, or when the exponent is
   below 1, as with products and quotients of tiny numbers.
2. **Round.** Bits 48..25 are the 24-bit significand, bit 24 is the guard bit, and bits
   23..0 together with the incoming sticky bit form the sticky bit. The rounding modes
   add one at bit 25 as follows:
   - nearest even: when guard AND (sticky OR lsb)
   - toward +inf: for a positive result when guard OR sticky
   - toward −inf: for a negative result when guard OR sticky
   - toward zero: never

   A carry out of bit 48 shifts right by one and raises the exponent. A subnormal that
   rounds up to 2^-126 becomes normal without special handling, because its hidden bit
   turns to 1.
3. **Overflow.** A biased exponent of 255 or more after rounding is an overflow. The
   result is ±infinity if the mode rounds away from zero for that sign, and ±max finite
   otherwise. Round to nearest always gives infinity.
4. **Flags.** `ine` = guard OR sticky OR overflow. `underflow` means tiny before rounding
   (the leading 1 still below bit 48) and also inexact. `zero` means the packed result is
   ±0.

## Special operands

`fpu_except` classifies the latched operands:

| case | result | flags |
|---|---|---|
| any NaN operand | quiet NaN `0x7FC00000` | `qnan`; `snan` if one was signalling |
| (+inf) + (−inf), 0 × inf, 0 / 0, inf / inf | quiet NaN | `qnan` |
| other infinite operand | ±inf | `inf` |
| finite nonzero / 0 | ±inf | `inf`, `div_by_zero` |
| 0 × finite, 0 / nonzero, finite / inf | ±0 | `zero` |
| `fpu_op` 4..7 | quiet NaN | `qnan` |

Zero operands of an add or subtract go through the arithmetic path, which gets the zero
signs right. The unit's verdict travels down the pipeline in three registers, beside the
data it belongs to.

## Where this design departs from, or adds to, its source description

The block structure follows a published description of a pipelined single precision FPU:
two pre-normalizers, the three units, a post-normalize and round unit, and an exceptions
unit. That description also sets the four-clock latency, the one-per-clock rate, the
rounding mode codes, the flag names and the SNAN rule. The following are this design's
own:

- **Normalize, then round.** The flow charts of the source round before they normalize.
  Here the result is normalized first and then rounded, which is the order the name
  "post normalize and round" gives. Rounding before normalizing would round at the wrong
  bit whenever the leading one moves.
- **Stage split.** The split into four stages is this design's own; only the total
  latency is given. So are the divider algorithm (an unrolled restoring divider), the
  multiplier (left to synthesis), the three guard/round/sticky bits and the 50-bit
  unrounded form.
- **Operation codes.** The codes 0..3 for add, sub, mul, div come from a reference
  simulation. Codes 4..7 returning NaN is this design's choice. The source also mentions
  a float-to-integer conversion but does not define it, so no conversion is built.
- **Flag definitions.** The source names the flags (`ine`, `overflow`, `underflow`, `inf`,
  `zero`, `qnan`, `snan`, `div_by_zero`) but does not define them. They follow IEEE 754,
  with underflow detected before rounding.
- **NaN result.** The NaN result is always the canonical `0x7FC00000`. The operand's
  payload is not propagated.
- **Pre-normalizer outputs.** The mul/div pre-normalizer keeps the port names of the
  source's entity diagram. The meaning of `exp_ovf`, `underflow`, `inf` and `sign_exe`
  is this design's reading of those names.
- **No reset, no handshake.** The source mentions neither.

## Verification

Each block has a self-checking testbench in `tb/`. Each testbench compares against
values computed independently in the testbench:

- `tb_fpu` is the end-to-end test, run with every parameter at its default. It issues
  200,000 random operations back to back, one per clock, after 22 hand-computed vectors.
  The vectors include 1/3 in all four modes, max×2 overflow and ties at the subnormal
  boundary. It also checks that no output is ever a signalling NaN. The operands cover every class: normal, subnormal, zero, infinity, quiet
  and signalling NaN, near-equal pairs for cancellation, and extreme exponents. Each
  result and all nine flags are compared, bit for bit, exactly four clocks after issue.
  The test also counts how often each mechanism occurred and fails if one never did:
  each operation and rounding mode, overflow, underflow, subnormal results, inexact and
  exact results, NaN, signalling NaN, divide by zero, zero, cancellation to zero and
  undefined operation codes.
- `tb_fpu_waveform` replays the order of operations and rounding modes of the reference
  simulation waveform for this unit. That waveform runs add, subtract and multiply under
  each of the four modes, then a short divide, add and multiply sequence. This test uses
  its own operands, chosen so that `ine`, `inf`, `underflow`, `zero` and `div_by_zero`
  each rise at least once.
- The golden model, `tb/fpu_ref_pkg.sv`, does not reuse the RTL's datapath. It forms the
  exact sum on a 2^-149 grid with 320-bit integers, the exact product, and a 104-bit
  quotient with a remainder. It then rounds the exact value in one function.
- The unit testbenches check the blocks one at a time:
  - `tb_fpu_pre_norm_addsub`: alignment and sticky bits
  - `tb_fpu_addsub`: sums, differences and zero signs
  - `tb_fpu_mul`: products
  - `tb_fpu_div`: quotients and sticky bits
  - `tb_fpu_pre_norm_muldiv`: normalization and exponents
  - `tb_fpu_post_norm`: rounding across the whole exponent range in every mode
  - `tb_fpu_except`: every pair of operand classes under all eight operation codes

Every testbench ends by printing `TB_RESULT checks=N failures=M`.

What is not verified: timing closure. The divide stage holds 27 chained 26-bit
subtractors, and the multiply stage holds a 24×24 multiplier, so the clock rate depends
on the target. Gate-level behaviour was not simulated.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/fpu_pkg.sv tb/fpu_ref_pkg.sv tb/tb_fpu.sv --top-module tb_fpu -o sim
./obj_dir/sim
```

`-y` lets Verilator find every other module by its file name. The packages are listed
first because the modules import them. For a unit test, replace `tb_fpu` with that
block's testbench. `-Wno-fatal` keeps lint warnings from stopping the build. The RTL
leaves three pre-normalizer status outputs unused at the top level, and Verilator warns
about them.

## Files

| file | contents |
|---|---|
| `rtl/fpu_pkg.sv` | widths, bias, operation and rounding-mode enums, `fp32_t`, `unrounded_t`, `exc_t` |
| `rtl/fpu.sv` | top level: input latch, pipeline registers, output merge |
| `rtl/fpu_pre_norm_addsub.sv` | operand ordering and fraction alignment |
| `rtl/fpu_pre_norm_muldiv.sv` | subnormal normalization, exponent and sign for mul/div |
| `rtl/fpu_addsub.sv` | fraction add/subtract |
| `rtl/fpu_mul.sv` | 24×24 significand multiplier |
| `rtl/fpu_div.sv` | unrolled restoring significand divider |
| `rtl/fpu_post_norm.sv` | normalization, rounding, overflow/underflow |
| `rtl/fpu_except.sv` | special-operand handling |
| `tb/fpu_ref_pkg.sv` | exact integer golden model |
| `tb/tb_*.sv` | testbenches |
