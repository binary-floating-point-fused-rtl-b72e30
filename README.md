# Reduced-latency double-precision fused multiply-add

This is a combinational IEEE 754 binary64 fused multiply-add unit. It computes

    W = A + (-1)^op * (B * C)

with a single rounding, in all four standard rounding modes. It also delivers
the invalid, overflow, underflow and inexact flags. Normal and subnormal
operands, zeros, infinities and NaNs are all handled.

The organisation follows the reduced-latency scheme of Lang and Bruguera. A
classic FMA (the IBM RS/6000 style) runs four steps in sequence:

1. multiply;
2. add in a carry-propagate adder;
3. normalize;
4. round.

Here the normalization shift is moved in front of the addition. Addition and
rounding then merge into one "add/round" step built around a dual adder. To
make that possible, three things are computed side by side, directly from the
carry-save form of the unnormalized sum:

- the sign of the sum;
- the normalization amount, by leading-zero anticipation (LZA);
- the first level of the final adder.

None of them waits for a carry-propagate addition. The unit has no registers;
a result is valid one propagation delay after the operands.

## Interface

`fma_top` (all ports are plain logic vectors):

| port | dir | width | meaning |
|------|-----|-------|---------|
| `a` | in | 64 | addend A |
| `b` | in | 64 | multiplicand B |
| `c` | in | 64 | multiplier C |
| `op` | in | 1 | 0: A + B·C, 1: A − B·C |
| `rnd_mode` | in | 2 | `11` nearest-even, `01` toward +∞, `10` toward −∞, `00` toward zero |
| `w` | out | 64 | result |
| `flags` | out | 4 | packed struct `{invalid, overflow, underflow, inexact}` |

Conventions:

- Tininess is detected before rounding. Underflow is raised only for a tiny
  result that is also inexact.
- A NaN operand is returned made quiet, taking A first, then B, then C.
- Invalid operations return `FFF8000000000000`. These are `∞·0`, `∞ − ∞`, or
  any signalling NaN input.
- An exact zero sum is +0, or −0 when rounding toward −∞.

## Datapath

```
 B,C ──► booth_multiplier ──► ps, pc (108 b) ─┐
 A ──► addend_align (invert, >> sh, st1) ─────┼─► addend_csa ──► s, c (163 b)
 Ea,Eb,Ec ──► align_control (sh, E, pre, limit)┘        │
                                   ┌────────────────────┼──────────────────┐
                              sign_detect        lza_logic+lza_encoder   adder_anticipation
                               (comp)              (shift S1..S7)        (half adders, p / y,
                                   │                     │                 inverted if comp)
                                   └──────────► norm_shifter (54 coarse, then 64..1)
                                                         │
                                                  add_round (dual adder, two rounding paths)
                                                         │
                                                  fma_exceptions (specials, packing, flags)
```

| module | role |
|--------|------|
| `booth_multiplier` (`booth_ppgen`, `csa_tree`, `csa_row`) | Radix-4 Booth recoding of C into 27 digits. It forms 27 partial products of B and reduces them with 3:2 carry-save rows to a sum word and a carry word. No carry-propagate adder is used. |
| `align_control` | Computes the exponent path. |
| `addend_align` | One's-complements A for an effective subtraction, then shifts it right by 0..161 in eight stages. It also collects the sticky bit `st1` of the bits shifted out. |
| `addend_csa` | A single 3:2 row adds the aligned addend to the two product words. Above the product the row reduces to two multiplexers. |
| `sign_detect` | Decides whether the sum is negative. |
| `lza_logic`, `lza_encoder` | The leading-digit indicator string and its encoding, most significant bit first. |
| `adder_anticipation` | Half adders and propagate/generate ahead of the shifter. |
| `norm_shifter` | Shifts both words left: 54 positions when `pre`, then 64, 32, …, 1 under S1..S7. Each stage can start as soon as its control bit is known. |
| `add_round` | Final addition, rounding and post-normalization. |
| `fma_exceptions` | Special operands, exponent overflow, subnormal packing and flags. |
| `sign_processing` | The effective operation and the result sign. |

`align_control` forms:

- `d = Ea − (Eb + Ec − 1023)`;
- the addend shift `56 − d`, limited to 161;
- the flag E ("exponents do not decide the sign");
- the decision for the coarse pre-shift;
- the exponent of the normalized frame.

## The bit frame

Every wide vector after the multiplier is 163 bits, index 162 down to 0:

- The product occupies bits 105..0.
- An unshifted addend has its leading bit at 160. That is 56 positions above
  the product's top: two guard positions more than its 53 bits. Because of
  this, a product far below A still leaves round and guard bits at zero.
- Bits 162 and 161 are sign extension. They keep the sum of addend and product
  free of overflow in two's complement.

The product words from the Booth tree are only correct modulo 2^108. Their
raw sum is the product plus 2^108 exactly when the top bit of either word is
set. `addend_csa` uses this to choose the upper part of its row.

Normalization shifts the result so that its leading one lands at bit 161. It
lands at bit 160 when the LZA was one position short. Below that, the leading
one sits lower only for a subnormal result.

## Sign detection without an adder

In an effective subtraction, the sum `s + c` may be negative. The result then
has to be complemented, which is the `comp` signal. Exactly one of the two CSA
words is negative at that point. Instead of adding them, the circuit compares
two magnitudes in a binary tree comparator:

- the one's complement of the negative word, which is its magnitude minus one;
- the positive word.

The sum is negative when the negative word's magnitude is larger, and also when
the two compared values are equal (that is the exact −1 case).

Sign detection is skipped in two cases:

- For `d ≥ 2` the product cannot reach the addend, so the sum is negative.
- For `d < 0` the sum is positive.

The comparator is only needed when `d` is 0 or 1, or when an operand is
subnormal. Then the exponents say nothing about the sign.

## Leading-zero anticipation and its one-position error

`lza_logic` derives an indicator string from the two CSA words, with no
addition. It uses the t/g/z signals of each position and its neighbours. The
first 1 of the string marks the leading digit of the sum, or the position one
above it. This one-position uncertainty is inherent in anticipation, and the
design lets it through. The testbench of `lza_logic` checks that the error is
never larger than one position, and that both outcomes occur.

`lza_encoder` produces the shift amount most significant bit first:

- S1 (64) says "no 1 in positions 0..63".
- S2 looks at the half selected by S1, and so on down to S7.

The first shifter stage can thus start before the whole count exists. For
results that would fall below the normal range, `align_control` supplies a
limit position, and a 1 is forced into the string there. Normalization then
stops at exponent 1, and the result comes out subnormal.

## The half adders in front of the shifter, and the two +1s

The gap between the LZA and the shifter is used for the first level of the
final adder. One half-adder row turns `s, c` into a sum word and a carry word,
and from those the bit propagate `p` and generate `g` are formed.

When `comp = 1`, the circuit needs `−(s + c) = ~s + ~c + 2`. The half-adder
sum is the same for inverted inputs, so only the carry row is duplicated. The
two +1s are placed as follows:

- The first +1 fills the free bit 0 of the inverted carry row.
- The second +1 goes into the free bit 0 of the generate word, which is output
  already moved to the weight of its carry (`y = {g, cin}`).

Because the second +1 sits inside a shifted word, it travels through the
normalization shifter with the data. Adding it after the shift would put it at
the wrong weight.

When addend bits were shifted out (`st1 = 1`), the true sum lies strictly
between two truncated values. The second +1 is then dropped. The +1 of the
addend's own two's complement is handled the same way in `addend_csa`.

## Add/round

After the shift, the value `p + y` is split into three parts:

- **Low part, bits 106..0.** It delivers only its carry into bit 107 and a
  sticky bit. The sticky comes straight from the carry-save form: with
  `t_i = p_i ^ y_i ^ (p_{i-1} | y_{i-1})`, the low sum is zero exactly when
  all `t_i` are zero.
- **Z group, bits 110..107.** This small group absorbs the low carry and the
  rounding increment. It has two variants:
  - "no overflow": leading one at 160, round bit 107;
  - "overflow": leading one at 161, round bit 108, so the increment is added
    one position higher.

  For rounding away from zero, a second increment `Rd1` is added when the
  sticky is set. That makes the two carries needed for "round bit plus one
  ulp" happen in one small addition.
- **Dual adder, bits 162..111.** It produces `Y0` (the sum) and `Y1` (the sum
  plus one). The carry out of the chosen Z variant selects between them.

The path is selected by the unrounded top bits. The rounded value is read at
bit 161 (`adj = 1`) or 160 (`adj = 0`). That read performs the correction for
the LZA error without a second shifter.

Round-to-nearest-even is done as nearest-up. On a tie (round bit 1, sticky 0),
the LSB of the chosen path is then forced to zero.

A carry out of the overflow path (`adj = 2`) is implemented but never happens
in practice. Every all-ones result that rounds up is one the LZA anticipates
one position short.

## Subnormals, specials and flags

Subnormal operands are read with exponent 1 and hidden bit 0. Subnormal
results come from three mechanisms that work together:

- a floor of 2 on the frame exponent;
- the shift limit described above;
- a coarse pre-shift that is never taken when it would cross that limit.

Tininess is judged on the unrounded normalized value. `fma_exceptions` does
the following:

- handles NaN, infinity and zero operands with the rules listed under
  Interface;
- packs the exponent `e_no + adj`, or 0 for a subnormal;
- turns an exponent of 2047 or more into infinity, or into the largest finite
  number when the rounding mode points toward zero.

## What follows the published design and what is this design's own

The following follow the published design:

- the overall organisation;
- Booth radix-4 multiplication with a CSA tree;
- the alignment shift of `56 − d` over 161 bits with its sticky;
- one shared 3:2 CSA feeding the three parallel paths;
- the one's-complement tree comparator and its sign equation;
- the Schmookler–Nowka style indicator;
- the MSB-first shift encoder and the 54-bit coarse shift;
- the anticipated half adders with a duplicated carry row;
- sticky from carry-save form;
- the Rd/Rd1 round decision, dual adder, two paths and LSB correction;
- the sign logic with `op`;
- the absence of registers.

These are this design's own:

- **Frame width.** The frame is 163 bits, one sign position more than the
  162-bit frame the scheme is usually drawn with. As a result the dual adder
  is 52 bits, not 51.
- **Comparator width.** The sign comparator spans all 163 bits rather than
  109, so that subnormal operands are covered.
- **Equal case.** The sign equation includes the "equal magnitudes" term.
- **Subnormal results.** They are produced by the exponent floor, the forced
  LZA bit and the pre-shift condition. The general scheme leaves subnormals
  open.
- **Placement of the +1s.** The complement +1s are placed as described above.
- **Zero addend.** A zero addend never causes an effective subtraction.
- **Encodings and conventions.** These cover the rounding-mode encoding, the
  NaN priority and default NaN, and the flag conventions.
- **Overflow-path selection.** It is taken from the unrounded top bits, which
  is functionally the same as the usual select equation.

There are also limits. The unit is not pipelined. Area and delay were not
measured against an FPGA: generic synthesis reports no flip-flops and about
4,300 coarse cells for the whole unit.

## The basic organisation, for comparison

`fma_basic_top` builds the classic four-step unit from the same upper part:
the multiplier, the addend alignment and the 3:2 row are shared. It has the
same ports and gives the same results. Only the lower part differs, and
there every step waits for the one before it:

| module | role |
|--------|------|
| `basic_cpa` | Adds the two 163-bit words. The top bit of the sum is the sign of the result, so no separate sign detector is needed. |
| `basic_complementer` | Negates a negative sum to get its magnitude. The negation adds 1 only when no addend bits were lost in the alignment. Otherwise the true value lies between two frame values, and the lower one plus the sticky bit is the right magnitude. |
| `basic_normalizer` | Shifts the magnitude left: 54 positions when `pre`, then 64..1 under the same LZA amount. A last stage shifts by one more when the LZA was one short, and the exponent drops by one. |
| `basic_rounder` | Takes the round bit and the sticky bit, the OR of everything below plus `st1`. It rounds in the selected mode and renormalizes on a carry-out. |

The LZA runs beside the adder on the CSA words. It is the same circuit as in
the reduced-latency unit. The rounder reports its result in the same form as
`add_round`, so both units share `fma_exceptions`.

On the published FPGA results the basic unit was about 25% slower and about
6% smaller. Those figures are not reproduced here. The point of building it
is a second, independent route through the same arithmetic.

## Verification

Each block has a self-checking testbench in `tb/`. Each one compares the block
against an independent arithmetic statement of what it must do:

- product words summing to `mb·mc`;
- shifter output against a wide shift;
- `p + y` against `s + c` or its negation;
- the sign against a signed sum;
- the LZA error bound;
- rounding against a direct rounding of the same value;
- and so on.

`tb/tb_fma_top.sv` runs the whole unit at its default size. It compares the
unit bit-exactly, result and flags, against `tb/fma_ref_pkg.sv`. That package
is an exact reference model: it forms `A ± B·C` as a 4400-bit integer and
rounds it once.

The stimulus covers:

- random bit patterns;
- close exponents;
- near-total cancellation;
- tiny and subnormal results;
- overflow;
- special values;
- exact ties;
- all-ones carries.

In total that is 40,000 vectors across all modes, plus four published example
vectors with their stated results, one per rounding mode.

The testbench also counts how often each mechanism occurred. A mechanism that
never occurs counts as a failure. The mechanisms are:

- complement and no complement;
- coarse shift or not;
- LZA exact and one short;
- the subnormal limit;
- addend sticky;
- tie correction;
- rounding carry into the next binade;
- each rounding mode;
- overflow, underflow and invalid;
- NaN propagation;
- exact cancellation;
- the equal-exponent comparison.

`tb/tb_fma_basic_top.sv` runs the basic unit on the same stimulus and the
same reference. It also runs the reduced-latency unit next to it, and the
two must agree bit for bit on every vector. Its mechanism list swaps in the
basic unit's own events: a negative adder result and the one-bit
normalization correction.

To simulate, for example the whole unit:

```
verilator --binary --timing -Wno-fatal -Irtl -Itb -y rtl +libext+.sv \
  --top-module tb_fma_top rtl/fma_pkg.sv tb/fma_ref_pkg.sv tb/tb_fma_top.sv
./obj_dir/Vtb_fma_top
```

`-y rtl` lets the simulator find the modules by name. `-Wno-fatal` keeps the
testbenches' width warnings from stopping the build; these come from
`$urandom % n` expressions. The whole unit's testbench runs in under a
second.

Each testbench ends with a line `TB_RESULT checks=N failures=M`. A block
testbench is run the same way with its own top module, `tb_<block>`. List
`rtl/fma_pkg.sv` (and `tb/fma_ref_pkg.sv`) before the testbench.
