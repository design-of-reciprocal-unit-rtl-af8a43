# Newton-Raphson reciprocal unit for single-precision mantissas

This unit computes 1/d for a floating-point mantissa d in [1, 2), so that a
division x/d becomes the multiplication x · (1/d). It uses the Newton-Raphson
recurrence

    R[j+1] = R[j] · (2 − R[j] · d)

which roughly doubles the number of correct bits on every step. A small table
supplies a first guess R[0] good to about 6 bits. Two steps then reach the 24
bits of an IEEE-754 single-precision mantissa.

Each step needs two multiplications and the subtraction 2 − R·d. The
subtraction is never built as an adder. Because R·d is close to 1, 2 − R·d is
the bitwise inverse of R·d plus a small constant. That constant is folded into
the next multiplier or into the previous multiplier's adder tree.

The main design idea is **redundant (carry-save) arithmetic**. A carry-save
multiplier stops before its final carry-propagate adder and returns a pair of
vectors (sum, carry) whose sum is the product. The fastest configuration keeps
R in carry-save form through both iterations, and only one carry-propagate
adder (CPA) sits at the very end.

## The four configurations

Two arithmetic alternatives exist. Each one can be built as a pipeline
(unrolled) or as a loop (iterative).

| | first multiplier (R·d) | second multiplier (R·x) | R between steps |
|---|---|---|---|
| alternative 1 | normal (carry-propagate) | cs/normal | normal form, CPA after each step |
| alternative 2 | cs/normal | 2cs | carry-save pair, one CPA at the output |

* **normal** multiplier: both operands and the result in normal two's
  complement form.
* **cs/normal** multiplier: one operand is a carry-save pair, the other is
  normal, and the result is a carry-save pair.
* **2cs** multiplier: both operands and the result are carry-save pairs.

`nr_recip_top` holds all four side by side. They share only `clk` and `rst`;
each has its own ports:

| prefix | module | configuration | throughput | latency |
|---|---|---|---|---|
| `u2_` | `nr_unrolled #(.ALT(2))` | alternative 2, pipelined (the fastest) | 1 per cycle | 3 clock edges |
| `u1_` | `nr_unrolled #(.ALT(1))` | alternative 1, pipelined | 1 per cycle | 3 clock edges |
| `i2_` | `nr_iterative #(.ALT(2))` | alternative 2, one SP unit reused | 1 per 5 cycles | `done` 4 edges after `start` |
| `i1_` | `nr_iterative #(.ALT(1))` | alternative 1, one SP unit reused | 1 per 5 cycles | `done` 4 edges after `start` |

Inputs are a 24-bit mantissa `d` (bit 23 is the hidden one, 23 fraction bits).
Outputs are `r`, 25 bits: 1 integer bit and 24 fraction bits, truncated. All
resets are synchronous and active high.

## Structure

```
 d ──► recip_table ──R0──► SP unit ──► register ──► SP unit ──► (CPA) ──► r
        5 bits in           step 1                   step 2     alt. 2 only
        6 bits out
```

Each *SP unit* does one Newton-Raphson step. It has a pipeline register
between its two multipliers:

```
 alternative 1 (sp_unit_normal)            alternative 2 (sp_unit_cs)
 R,d ─► mult_normal ─► inv_array            (Rs,Rc),d ─► mult_csn(+K) ─► inv_array
          p = R·d       x = (~p, 2+ulp)                   p = R·d − 2 − 2ulp   x = (~ps, ~pc)
        ─► REG (x, R, d) ─► mult_csn ─► cpa  ─► REG (x, Rs, Rc, d) ─► mult_2cs ─► (Rs', Rc')
                       recode x, times R                         recode R, times xs and xc
```

The unrolled unit (`nr_unrolled`) chains two SP units with a register between
them. That gives three registers from `d` to `r`, and a new operand can enter
every cycle. There is no stall and no back-pressure: `out_valid` follows
`in_valid` exactly three edges later.

The iterative unit (`nr_iterative`) has a single SP unit. A multiplexer in
front of it takes the table value on the first pass and the loop register on
the second. A four-state controller runs it: IDLE, HALF1 (first half of the SP
unit), HALF2 (second half, which loads the loop register) and DONE.

* `start` is accepted in IDLE and in DONE. `d` is captured at that point.
* Each pass takes two cycles.
* `done` is high for the one cycle in DONE, four edges after the start edge.
  `r` is valid then and holds until the next operation ends.
* A `start` while `busy` is ignored.

## Number format and how the carry-save pairs stay exact

This is the least obvious part of the design. It lives in `nr_pkg`.

**Fixed point.** Every internal value is a signed 32-bit fixed-point number
with 3 integer bits and 29 fraction bits (`fix_t`). The mantissa's 23 fraction
bits are padded with 6 zeros. The 5 fraction bits beyond the result's 24 are
guard bits. Each multiplier forms its full 64-bit product and truncates back to
29 fraction bits. A carry-save result truncates its two vectors separately, so
it can end up to 2 units of 2^-29 low.

**Why pairs must be exact.** A carry-save pair (s, c) stands for s + c.
Ordinary modular arithmetic is not enough here, for two reasons:

* A pair is used as a *multiplicand* in `mult_2cs`, which forms R·xs + R·xc
  separately. If xs + xc were X + 2^32 instead of X, the product would be off
  by R · 2^32. For a fractional R that is not a multiple of the product's range.
* A pair is *recoded* in every carry-save multiplier. The recoding has the same
  problem.

**`cs_norm`.** After truncation, the two 3-bit integer fields of the pair are
added. Every value the unit carries lies in [−2, 2), so a field sum outside
[−5, 2] can only mean that the pair has wrapped by ±8. In that case the sign
bits of both vectors are flipped. This is a 4-bit addition on the top bits and
does not propagate carries across the word. The end-to-end test counts these
corrections: one of the four multipliers of the main pipeline needs one in
about a quarter of the cycles.

**The "+1" of the inverter array.** The inverse of p is −p − ulp, so
2 − p = ~p + 2 + ulp. The extra 2 comes from the 3-integer-bit format.

* Alternative 1: the normal product p is inverted. The constant 2 + ulp
  travels as the second vector of a pair (~p, 2 + ulp), and the following
  cs/normal multiplier recodes it. The "+1" is therefore added inside that
  multiplier.
* Alternative 2: both vectors of p are inverted, which needs 2 + 2 ulp. That
  constant cannot be added in the second multiplier, because it would have to
  be multiplied by R. Instead, the first multiplier adds −(2 + 2 ulp) as a
  constant row of its tree (parameter `K` of `mult_csn`). The two inverted
  vectors then add up to exactly 2 − R·d.

## Inside the carry-save multipliers

* **`recoder`** turns a carry-save pair into 16 radix-4 digits in {−2…2}
  without adding the two vectors. It works in two local transfer steps per
  2-bit group:
  1. Each group gives v = s + c in [0, 6]. Transfer t1 = (v ≥ 4) upward and
     keep w = v − 4·t1.
  2. Add the incoming t1: u = w + t1 in [0, 4]. Transfer t2 = (u ≥ 2) upward.
     The digit is u − 4·t2 + the incoming t2.

  The transfer out of the top group is dropped. This is exact because the
  value is far from the ends of the range.
* **`pp_gen`** forms each row as 0, M or 2M, inverted for negative digits and
  by default fully sign-extended to 64 bits. The "+1" of each inverted row goes into one
  extra row of single bits.
* **`csa_tree`** reduces any number of rows with levels of 3:2 adders until
  two rows remain.
* **`mult_2cs`** recodes R once. It then feeds xs and xc to two partial
  product generators and two trees, and merges the four tree outputs with two
  more 3:2 levels (a 4:2 stage).
* **Shared recoder.** In alternative 2 both multipliers of an SP unit recode
  the same R. With `SHARE_RECODER = 1`, `sp_unit_cs` registers the 16 digits
  from the first multiplier's recoder (`dig_out` of `mult_csn`, 48 bits
  instead of the 64 bits of Rs and Rc). The second multiplier is then built
  with `EXT_DIG = 1`: it has no recoder of its own and takes the digits on
  `dig_in`. This removes the recoder from the second multiplier's path. The
  results are bit-identical to the default. The default (0) keeps a recoder in
  each multiplier. The testbenches of `sp_unit_cs`, `nr_unrolled` and
  `nr_iterative` run both settings side by side and compare them.
* **Reduced sign extension.** Full sign extension fills the upper left of the
  partial product array with copies of each row's sign, and all of it goes
  through the tree. With `REDUCED_SE = 1`, `pp_gen` keeps each row's 32 low
  bits, puts the *inverted* sign bit just above them and leaves zeros higher
  up. This works because −s·2^k = (1 − s)·2^k − 2^k. The missing −2^k terms of
  all rows add up to one constant, −Σ 2^(32+2i). That constant lies entirely
  above bit 31, so it fits into the same extra row as the "+1" bits, and the
  row count stays the same. The rows add up to the same product. The tree
  splits it differently between sum and carry, though, and the two vectors
  are truncated separately. A carry-save result can therefore differ from the
  default by 1 unit in the last place. The accuracy bounds are the same; the
  testbenches check the reduced version against the same limits as the
  default.
* **`mult_normal`** and **`cpa`** use the language's `*` and `+` and leave the
  circuit to synthesis.

## The initial table

`recip_table` is addressed by the 5 fraction bits below the hidden one. It
returns 6 bits under the leading one of R0 = 0.1xxxxxx. Entry i is the
reciprocal of the midpoint of its interval, rounded:

    entry(i) = round(2^13 / (65 + 2i)) − 64

The entries are computed by a constant function at elaboration time. Their
worst relative error is 2^-5.85.

## Accuracy

All 2^23 mantissas were simulated through the default unit
(`tb_workload_exhaustive`, about 20 s):

| | worst relative error 1 − R·d | operands above the nominal precision |
|---|---|---|
| R0 (table) | 2^-5.85 | 0.59 % above 2^-6 |
| R1 | 2^-11.70 | 0.59 % above 2^-12 |
| R2 (before the final truncation) | 2^-23.37 | 0.67 % above 2^-24 |

The final 25-bit result compared with the exactly truncated reciprocal
floor(2^47 / D):

* 92.2 % equal it;
* 7.4 % are 1 unit low;
* 0.06 % are 2 units low;
* 0.3 % are 1 unit high.

Every result is within 2^-23 of 1/d. The design does **not** deliver a
correctly rounded or correctly truncated 24-bit reciprocal. If that is needed,
add a third iteration or a final correction step. The units round by
truncation throughout, and there is no exponent or special-value handling: the
unit works on the mantissa only.

## Design choices not fixed by the algorithm

Most of the structure above comes from the method itself: the table sizes, two
iterations, the inverter trick, the three multiplier types, where the pipeline
registers sit, the recoder shared by the two halves of the 2cs multiplier, and
fully sign-extended partial products. The following are this implementation's
own choices:

* the 3.29 fixed-point format and its 5 guard bits;
* `cs_norm`;
* the transfer scheme of the recoder;
* where the "+1" of alternative 2 is added;
* the entry formula of the table;
* the valid signals, the reset and the iterative controller;
* the CPA after alternative 2;
* the exact bit layout of the reduced sign extension: the inverted sign bit
  and the constant in the "+1" row.

The shared recoder and the reduced sign extension are improvements proposed
for the same structure, so both are options that are off by default. The
defaults give the plain version.

The iterative unit reuses the SP unit with its internal pipeline register, so
each pass costs two cycles. A loop without that register would take one longer
cycle per pass.

The following are **not** included:

* double precision;
* a 4-in/4-out table;
* a deeper pipeline.

All of these are possible extensions of the same structure.

## Files

`rtl/` (one module or package per file):

* `nr_pkg.sv`: widths, `fix_t`, `cs_t`, conversion functions, `cs_norm`.
* `recip_table.sv`, `recoder.sv`, `pp_gen.sv`, `csa_tree.sv`: building blocks.
* `mult_normal.sv`, `mult_csn.sv`, `mult_2cs.sv`, `inv_array.sv`, `cpa.sv`:
  the multipliers, the inverter array and the CPA.
* `sp_unit_normal.sv`, `sp_unit_cs.sv`: one iteration each, alternative 1 and 2.
* `nr_unrolled.sv`, `nr_iterative.sv`, `nr_recip_top.sv`: the units and the top.

`tb/` holds one self-checking testbench `tb_<module>.sv` per module. Each
compares against integer or real arithmetic computed in the testbench. There
are also two extra benches:

* `tb_mult_compare.sv` checks the three multipliers against each other, with
  the normal one as reference.
* `tb_workload_exhaustive.sv` is the 2^23-mantissa sweep above.

`tb_util_pkg.sv` holds the shared reference functions.

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself with a
watchdog if it hangs.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb \
    rtl/nr_pkg.sv tb/tb_util_pkg.sv tb/tb_nr_recip_top.sv --top-module tb_nr_recip_top
./obj_dir/Vtb_nr_recip_top
```

Replace `tb_nr_recip_top` with any other testbench name. `tb_nr_recip_top` is
the end-to-end test at default parameters. It runs all four configurations on
30000 operands each, with a reset in the middle of the stream. It counts
back-to-back issue, pipeline bubbles, the iterative multiplexer's two choices,
ignored starts and carry-save wrap corrections, and fails if any of them never
happens. It reads a few internal signals by hierarchical name.

To change the design:

* Widths live in `nr_pkg`. `FRAC` sets the guard bits; keep `FIX_W` even for
  the recoder.
* The table size is the `TIN`/`TOUT` parameters of `recip_table`.
* `SHARE_RECODER` of `nr_unrolled` and `nr_iterative` (alternative 2 only)
  selects one recoder per SP unit instead of two. `nr_recip_top` uses the
  default, two recoders.
* `REDUCED_SE` of `nr_unrolled` and `nr_iterative` selects the reduced sign
  extension in every carry-save multiplier. The default is full sign extension.
* The number of iterations is the `ITER` parameter of `nr_unrolled` and
  `nr_iterative`. A double-precision version would need wider `MANT_W`/`FRAC`
  and `ITER = 4`.
