# Inexact double-precision floating-point adder

This is a combinational IEEE 754 binary64 adder. It is made faster and
smaller by computing some bits approximately, not by pipelining. Two of
its adders are *revised lower-part-OR adders* (LOAs). In a LOA the low bits
of the sum are the OR of the operand bits, and no carry passes from those
bits into the upper part. One LOA is the exponent subtractor, the other the
significand (mantissa) adder. The leading-zero counter skips the bits the
LOA leaves inexact, and the rounder is left out, so results are truncated.
The default configuration has:

- an inexact least significant bit in the exponent subtractor
  (`EXP_LOA_N = 1`);
- 8 inexact low bits out of 53 in the significand adder (`MANT_LOA_N = 8`).

Setting both to 0 gives an exact truncating adder.

The price is accuracy, and for the exponent it can be large (see
[How wrong the results can be](#how-wrong-the-results-can-be)). The design
suits error-tolerant work such as image or signal processing. It is not a
replacement for an IEEE-correct adder.

## The revised LOA (`loa_adder`)

```
 a[K-1:N], b[K-1:N] --> M-bit exact adder (+cin at bit N) --> sum[K-1:N], cout
 a[N-1:0], b[N-1:0] --> N OR gates                        --> sum[N-1:0]
                                               K = M + N
```

The original LOA uses an AND gate to make a carry from the top OR bit into
the exact part. Here that carry is dropped too. The critical path is
therefore only the M-bit exact adder. This design adds a `cin` input that
enters the exact part at bit N, not at bit 0. It is used in two ways:

* **Significand subtraction** is `m_large + ~m_small + 1`, with the `+1` on
  `cin`. The upper M bits then hold the exact difference of the upper
  fields. The low N bits are `m_large | ~m_small`.
* **Exponent subtraction** does not use `cin`. It adds the exact two's
  complement of `eb` to `ea`. This matters: the `~eb + cin` form would get
  3 of every 4 exponent pairs wrong by +1, equal exponents included.
  With `-eb`, for `EXP_LOA_N = 1` the difference is exact unless both
  exponents are odd, and then it is one too small.

With `N = 0` a LOA is an exact adder. With `N = K` it is only OR gates, and
`cout = cin`.

## Datapath

```
 a = {sa, ea, fa}    b = {sb, eb, fb}        (zero exponent = zero operand)
        |                  |
        +--> exp_subtractor (LOA, EXP_LOA_N) --> swap, e_large, shamt
        |                  |
        +--> mantissa_swap (swap) --> m_large --------------+
                                  --> m_small -> right_shifter (shamt)
                                                   | m_aligned   | lost
 sa, sb, swap --> sign_logic --> eff_sub --> mantissa_adder (LOA, MANT_LOA_N)
                      ^                     | mag[53:0]      | neg
                      +---------------------+----------------+
                      |                     v
                      |                 normalizer --> frac, carry, lz, is_zero
                      |                     v
                      |      exponent_update (e_large + carry - lz)
                      v                     v
 s_res ----------> special_cases (NaN/inf/zero operands, overflow, underflow)
                                  --> sum, flags
```

The steps, in order:

1. **Exponent subtractor.** It forms the approximate `ea - eb`. The LOA
   carry out gives the comparison: no carry means B has the larger
   exponent (`swap`). The distance `shamt` is the magnitude of the
   approximate difference.
2. **Swap and align.** The significand of the larger-exponent operand, with
   its hidden one, goes to the adder directly. The other is shifted right by
   `shamt`. Bits shifted out are lost; no guard, round or sticky bits are
   kept. Their OR only sets the `inexact` flag.
3. **Sign logic.** `eff_sub = sa ^ sb`. The result takes the sign of the
   larger-exponent operand. It is inverted when the significand difference
   came out negative. That happens with equal exponents, or when the
   approximate comparison picked the wrong operand.
4. **Significand adder.** This is a 53-bit LOA. For an addition its carry
   out becomes result bit 53. For a subtraction a carry out of 0 means the
   difference is negative, and the sum is negated exactly.
5. **Normalizer.**
   * If bit 53 is set, the result shifts right by one and the exponent
     goes up by one.
   * Otherwise the leading-zero count of bits 52 down to `MANT_LOA_N` sets
     the left shift. The counter always looks at bit 52 at least.
   * If none of those bits is set, the result is zero. The low bits are
     treated as approximation residue.

   This last rule is what makes `x - x = 0`: the OR part of the LOA leaves
   ones in the low bits even when the true difference is zero.
6. **Exponent update.** `e_large + carry - lz` is computed exactly. A value
   of 2047 or more is an overflow. A value of 0 or less is an underflow.
7. **Special cases.** Priority runs from top to bottom:

   | condition | result | flags |
   |---|---|---|
   | NaN operand, or +inf + -inf | quiet NaN `7FF8_0000_0000_0000` | nan |
   | one infinite operand | that infinity | |
   | both operands zero | zero, negative only if both are | zero |
   | one zero operand | the other operand | |
   | overflow | signed infinity | overflow, inexact |
   | zero result from the normalizer | +0 | zero |
   | underflow | signed zero | underflow, zero, inexact |
   | otherwise | `{s_res, e_res, frac}` | inexact if bits were lost |

   An operand whose exponent field is 0 is treated as zero, so subnormals
   are flushed. Flushing a nonzero subnormal sets `inexact`. Subnormal
   results are never produced. The approximation errors of the two LOAs are
   *not* flagged.

Everything is combinational, with no clock or registers. `sum` and `flags`
are valid one propagation delay after `a` and `b` change.

## How wrong the results can be

**Exponent LSB (`EXP_LOA_N = 1`).** This approximation costs the most.
When both exponents are odd, the alignment distance is one too small:

* Equal odd exponents are treated as one apart. For example,
  `1.0 + 1.0 = 1.5`: binary 1.0 has the odd biased exponent 1023, so the
  second operand is halved.
* `1.5 - 1.5` gives about `-0.75` (`BFE8_0000_0000_01FE`).
* Equal even exponents are handled exactly: `2.0 + 2.0 = 4.0`.
* For exponents d >= 2 apart, one operand is shifted by one place too
  few. The relative error of the sum is then below `2^(1-d)`.

**Significand (`MANT_LOA_N = 8`).** On an addition the result is never
above the truncated exact sum and at most 2^8 units below it. Truncation
without guard bits adds up to about 2 ulp on top.

**Measured mean relative error.** These are means of the relative error
over random same-sign operand pairs with exponents at most 30 apart, from
`tb_floating_point_adder_variants`:

| configuration | mean relative error |
|---|---|
| default (`EXP_LOA_N=1, MANT_LOA_N=8`) | about 6e-3 |
| `EXP_LOA_N=2, MANT_LOA_N=26` | about 2e-2 |
| all-OR significand adder (`EXP_LOA_N=0, MANT_LOA_N=53`) | about 2e-2 |

The default's error comes almost entirely from the exponent LSB.

## Parameters

All are on `floating_point_adder`.

| parameter | default | meaning |
|---|---|---|
| `EXP_W` | 11 | exponent bits |
| `FRAC_W` | 52 | stored fraction bits; the significand is `FRAC_W+1` |
| `EXP_LOA_N` | 1 | OR-gate bits in the exponent subtractor, 0..`EXP_W` |
| `MANT_LOA_N` | 8 | OR-gate bits in the significand adder, 0..`FRAC_W+1` |

The defaults come from two sources:

* **Format and exponent LSB.** The binary64 format and the single inexact
  exponent bit follow the published design.
* **`MANT_LOA_N = 8`.** The design states no width for the inexact part of
  the significand adder; 8 is this implementation's own choice.

**Fully inexact significand adder.** The published work also studies an
all-bit inexact significand adder. Use `MANT_LOA_N = 53`; the tests pair
it with `EXP_LOA_N = 0`.

**Other formats.** The RTL is written for any `EXP_W` and `FRAC_W`.
Besides binary64, binary32 (`EXP_W = 8`, `FRAC_W = 23`) is tested against
real arithmetic. The bit-exact reference model in `tb/fp_ref_pkg.sv` is
fixed to binary64.

## Files

| file | contents |
|---|---|
| `rtl/fp_pkg.sv` | default widths; `fp_flags_t` `{overflow, underflow, zero, inexact, nan}` |
| `rtl/loa_adder.sv` | revised LOA |
| `rtl/exp_subtractor.sv` | inexact exponent subtractor and comparator |
| `rtl/mantissa_swap.sv` | significand swap |
| `rtl/right_shifter.sv` | truncating alignment shifter with lost-bit output |
| `rtl/mantissa_adder.sv` | inexact significand add/subtract with sign recovery |
| `rtl/sign_logic.sv` | effective operation and result sign |
| `rtl/normalizer.sv` | approximate leading-zero count and normalization shift |
| `rtl/exponent_update.sv` | result exponent, overflow and underflow |
| `rtl/special_cases.sv` | special operands, result select, flags |
| `rtl/floating_point_adder.sv` | top level |
| `tb/fp_ref_pkg.sv` | integer reference model of the whole adder, for any LOA widths |
| `tb/tb_<block>.sv` | one self-checking testbench per block |
| `tb/tb_floating_point_adder.sv` | end-to-end test at the default parameters |
| `tb/tb_floating_point_adder_exact.sv` | approximations off; checked against real arithmetic |
| `tb/tb_floating_point_adder_variants.sv` | other LOA widths, plus the error statistics above |
| `tb/tb_floating_point_adder_single.sv` | binary32 build, exact and approximate, checked against real arithmetic |

## Simulating

Every testbench prints one line, `TB_RESULT checks=N failures=M`, and then
stops. With Verilator 5:

```
verilator --binary --timing -Wno-fatal --top-module tb_floating_point_adder \
    -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/fp_pkg.sv tb/fp_ref_pkg.sv tb/tb_floating_point_adder.sv
./obj_dir/Vtb_floating_point_adder
```

For a block testbench, replace the top module and the last file, for
example `tb_normalizer` and `tb/tb_normalizer.sv`. Those testbenches do not
need `fp_ref_pkg.sv`. Each run takes well under a second.

What the tests establish:

* **Default configuration, end to end.** `tb_floating_point_adder` compares
  about 20,000 random and directed additions with the reference model, bit
  for bit, flags included. It counts each mechanism and fails if one never
  happens. The mechanisms are: swap, effective subtraction, negative
  difference, carry and left normalization, approximate zero, exponent
  approximation error, overflow, underflow, NaN, infinity, zero operand and
  inexact. It also checks the error bounds above against real arithmetic.
* **Approximations off.** `tb_floating_point_adder_exact` checks that the
  error stays within `2^-51` of the larger operand, and that `x - x` is 0.
* **Blocks.** Each block testbench checks its block against an independent
  integer calculation.

The reference model describes the same algorithm, so it catches wiring and
coding errors. It cannot show whether the algorithm matches an intent that
was never written down. The choices marked below are such cases.

## Departures and own choices

* **No rounder, no guard bits.** Results are truncated. Without guard bits
  even the exact configuration can lose an operand's last bit when the
  exponents differ by one and the subtraction cancels heavily.
* **Carry-in of the LOA** at bit N, and the exponent subtraction through
  the exact negation of `eb`: both are this implementation's choices.
* **Zero from residue.** Treating a result with only inexact bits set as
  zero is this implementation's rule.
* **Subnormals** are flushed to zero, on input and on output.
* **Special values.** The NaN encoding, the infinity rules and the flag
  semantics follow IEEE 754 conventions. The design only names the flags.
* **No pipeline.** The adder is purely combinational; no pipeline stages
  are specified for it.
* **Significand adder width.** The adder is 53 bits wide (hidden bit
  included), with its carry out as a 54th result bit. In the published
  schematic the instance is labelled as a 52-bit LOA.
* **Not reproduced.** The published FPGA area and delay figures (108 LUTs,
  31.2 ns on a Spartan-3E, against 140 LUTs and 54.7 ns for an accurate
  adder) cannot be checked here. No FPGA flow is part of this code.
