# A pipelined double-precision floating-point adder in the SNAP style

Adding two floating-point numbers usually takes two long shifts in a row. The
smaller operand is first shifted right to align the binary points. After a
subtraction, the result is then shifted left to remove its leading zeros. This
adder uses two facts to avoid doing both shifts on the same operation:

1. **The two shifts never both need to be long.** A long left shift is only
   needed when the operation subtracts and the exponents differ by at most one.
   In that case the alignment shift is zero or one place, so no shifter is
   needed for it. When the alignment shift is long, normalization needs at
   most one place. The design therefore has a *close* path and a *far* path
   that share one mantissa adder.
2. **Rounding is a choice, not a second addition.** The mantissa adder returns
   `A+C`, `A+C+1` and `A+C+2` together. `A` is the larger-exponent mantissa and
   `C` is the aligned other one. Rounding up after a right shift by one means
   adding 2 at the old lsb, so it picks `A+C+2`. Rounding up without a shift
   picks `A+C+1`. The guard/round/sticky bits and the rounding mode decide
   which sum is taken.

The RTL implements IEEE-754 double-precision addition and subtraction with all
four rounding modes. It is pipelined over three clock cycles and can start a
new operation every cycle. Two variants of the adder are built from the same
source:

| variant | `COMPARE` | how a negative close-path difference is avoided |
|---|---|---|
| adder I  | 0 (default) | A **ones complementer** after the adder inverts `A + NOT(C)` when the exponents are equal and `A < C`. |
| adder II | 1 | A **mantissa comparator** in the swap control also swaps on `Ex = Ey && Mx < My`. Then `A >= C` always holds and there is no ones complementer. |

Two combinational precision converters come with the adders:
single→double (exact) and double→single (rounded, with an overflow flag).

## Number format and conventions

* `NE = 11` exponent bits and `NM = 53` mantissa bits, counting the hidden 1.
  This is IEEE double precision with bias 1023. Both values are parameters of
  `fpa_pkg`/`fp_adder`, but only the double-precision default has been tested.
* Rounding mode `rm`: 0 = to nearest even, 1 = toward zero, 2 = toward +∞,
  3 = toward −∞.
* **Only normal operands are handled as numbers.** A denormal operand is read
  as a zero of the same sign. A result below the normal range is flushed to a
  signed zero and raises `underflow`. No denormal result is ever produced.
* Infinity and NaN operands follow the usual addition table:
  * any NaN gives a NaN;
  * `+∞ + −∞` (after the effective sign of Y is applied) gives a NaN and
    raises `invalid`;
  * otherwise an infinite operand passes through.

  The NaN produced is always the canonical quiet NaN `0x7FF8_0000_0000_0000`.
* On overflow the result is ∞ or the largest finite number, depending on the
  rounding mode, and `overflow` is raised.
* An exact zero from a subtraction is +0, or −0 when rounding toward −∞.

## Pipeline and interface (`fp_adder`)

```
 x, y, sub, rm, in_valid
   │  stage 1: exponent subtract, |Ex-Ey|, larger exponent, swap (+compare),
   │           right shifter with G/R/S, special-operand table
   ├─ register
   │  stage 2: choose C (unshifted / >>1 / shifter), mantissa adder
   │           (A+C', A+C'+1, A+C'+2), LZA + encoder, GRS unit, sign select,
   │           path select, ones complementer (adder I only)
   ├─ register
   │  stage 3: close-path left shift + fine adjust, exponent offset,
   │           exponent adjust (e and e+1), result mux, flags
   └─ register → z, invalid, overflow, underflow, out_valid
```

The inputs are sampled on a rising `clk` edge when `in_valid` is high. The
result and `out_valid` appear three edges later. `sub = 1` computes `x − y`.
`rst_n` is asynchronous and active low. It clears only the valid bits; the
data registers are not reset.

`fpa_top` is the top level. It holds adder I (`a1_*` inputs, `r1_*` outputs)
and adder II (`a2_*`, `r2_*`) side by side, each with its own ports. It also
holds the converters (`s2d_*`, `d2s_*`), which are combinational.

## Alignment: exponent path, swap and the right shifter

* `fpa_exp_sub` computes `Ex − Ey` and the flags `Ex < Ey` and `Ex = Ey`.
* `fpa_mux_abs` takes the absolute value of that difference, which is the
  alignment distance.
* `fpa_exp_select` passes on the larger exponent. All later exponent
  arithmetic starts from this value.
* `fpa_swap` routes the larger-exponent mantissa to `A` and the other one to
  `B`.
  * In adder I the swap signal is just `Ex < Ey`.
  * In adder II, `fpa_compare` forms `h = (Mx < My && Ex = Ey) || Ex < Ey`,
    so `A >= C` also holds when the exponents are equal.

`fpa_rshift` shifts `B` right by the distance. It keeps the `NM` bits that
stay inside `A`'s frame plus the guard and round bits below them. The sticky
bit is the OR of everything further down.

Take care at a distance of exactly `NM + 1 = 54`. The leading 1 of `B` then
lands in the round position, and the sticky bit is the OR of the 52 fraction
bits, which may be 0. A common shortcut sets sticky to 1 for every distance
of 54 or more. That gives a wrong result in the round-to-nearest tie case, so
this shifter treats 54 as a normal shift. Sticky is forced to the OR of all of
`B` only from 55 upward.

`fpa_c_mux` then chooses the adder's `C` from three candidates:
* the unshifted `B`, for a distance of 0;
* `B >> 1`, whose lsb becomes the guard bit, for a distance of 1;
* the shifter output, for larger distances.

## Rounding by selection: mantissa adder, GRS unit and path select

This part is the hardest to follow. It is also where the design's behaviour
is decided.

For a true subtraction (operand signs differ after applying `sub`), `C` is
inverted. `fpa_mant_adder` then returns three sums, each `NM+2` bits wide:
* `s0 = A + C'`
* `s1 = A + C' + 1`
* `s2 = A + C' + 2`

With `C' = NOT C`, `s1` is the exact two's-complement difference of the top
bits. For a true addition, `C' = C`.

**Low bits.** `fpa_grs` rebuilds the exact low-order bits of the result from
the guard/round/sticky bits of `C`:
* For an addition they are simply G, R, S.
* For a subtraction they are the negated G/R/S value.
  * If that value is non-zero, a borrow is taken from the upper part. The
    unrounded upper part is then `s0`, not `s1`. The signal `c_low` records
    which one it is.
  * The bit that enters at the lsb on a left shift by one (`shift_in`) also
    comes from these low bits.

**Normalization cases.** `fpa_path_select` classifies each operation into one
of four cases:

| case | when | normalized value | candidates for rounding |
|---|---|---|---|
| right shift by 1 (`R1`) | true addition that carries out | sum >> 1 | `s0`/`s1` or `s2`, then >> 1 |
| none | leading 1 already in place | sum | base or base + 1 |
| left shift by 1 (`L1`) | far subtraction that lost its leading 1 | (sum << 1) \| `shift_in` | base or base + 1, shifted |
| close (massive left shift) | subtraction with \|Ex−Ey\| ≤ 1 whose difference has a leading zero | `v << lz` from the LZA | none needed, see below |

For each of the first three cases the GRS unit makes a round-up decision in
the selected mode:
* nearest-even uses guard and sticky, with ties to even;
* the directed modes compare the result sign with the rounding direction and
  round up on any non-zero low bits.

The stage 2 register keeps the rounded candidate for every case. Stage 3 only
selects among them.

**The carry-into-the-next-binade case.** Suppose a true addition does not
carry out, so `A+C = 01.11…1`, but rounding up makes it `10.00…0`. This
operation must be treated as a right shift by one. The path select therefore
classifies it from the rounded sum, not the raw one.

**Carry out of rounding.** Each rounded candidate is `NM+1` bits wide, so a
carry out of rounding shows in the top bit (`rc`). In that case
`fpa_result_mux` takes the mantissa one place lower. It also takes the
exponent from the `+1` output of `fpa_exp_adjust`, which computes both `e` and
`e+1` in parallel.

**Close path.** When the exponents differ by at most one and the operation
subtracts, at most one bit of `C` lies below `A`'s lsb. The difference is
therefore exact in `NM+1` bits. If it has a leading zero, the left shift of at
least one place brings all of its significant bits into the result, so no
rounding is needed. Without a leading zero it is handled by the "none" case
and rounded like any other result.
* In adder I, when `Ex = Ey` and `A < C`, the difference is negative. Then
  `s0 = A + NOT(C)` is exactly the ones complement of `C − A`, and
  `fpa_ones_compl` inverts it. The result sign flips through `fpa_sign_select`.
* In adder II this case cannot occur.

## Leading-zero anticipation and fine adjust

`fpa_lza` predicts the normalization shift from `A` and `C` while the adder is
running, so the count does not wait for the sum. It works on `W = NM+1` bits,
the mantissa plus the one guard bit of the close path.

Per bit it forms:
* `t = a XOR NOT(c)`
* `g = a AND NOT(c)`
* `z = NOT(a) AND c`

The indicator bit is

```
f[i] = t[i+1] & (g[i] & ~z[i-1] | z[i] & ~g[i-1])
     | ~t[i+1] & (z[i] & ~z[i-1] | g[i] & ~g[i-1])
```

with `t` taken as 1 above the msb and `g`, `z` taken as 0 below the lsb. The
first set bit of `f` is at the true leading one or one place above it, for
either sign of the difference.

`fpa_encode` turns `f` into a shift count. `fpa_lshift` shifts by that count.
`fpa_fine_adjust` checks the msb afterwards: if it is still 0, it shifts once
more and reports `adj`. `fpa_exp_offset` turns the case, the count and `adj`
into a signed exponent correction:
* +1 for `R1`;
* 0 for none;
* −1 for `L1`;
* −(lz + adj) for the close path.

`fpa_exp_adjust` applies that correction and flags overflow (exponent all ones
or more) and underflow (zero or below).

## Result multiplexor and flags

`fpa_result_mux` chooses the mantissa and exponent of the selected case and
packs the sign, exponent and fraction. It then applies overrides in this
priority order:
1. the special-operand result from `fpa_special`;
2. an exact zero;
3. overflow;
4. underflow (flush to a signed zero).

`invalid` is raised only for ∞ − ∞. `overflow` and `underflow` are raised
only by finite operands.

## Precision converters

* `fpa_cvt_s2d` is exact. It rebiases the exponent by +896 and extends the
  fraction with zeros. It normalizes a denormal single with a leading-zero
  count, because every single-precision value is a normal double.
  Infinities, zeros and NaN payloads are kept.
* `fpa_cvt_d2s` rebiases by −896 and rounds the 53-bit significand to 24 bits
  in the given mode, using a guard bit and a sticky OR.
  * An exponent above the single range raises `d2s_overflow` and gives ∞ or
    the largest finite single, depending on the mode.
  * Results below the single normal range, and denormal doubles, become a
    signed zero with `d2s_underflow`. This is the same convention as the adder.

## Where this design departs from the reference design

The reference is a three-cycle, two-phase latch design that handles normal
operands only. Compared with it:

* **Registers.** Edge-triggered flip-flops replace the two-phase latches. The
  positions of the three stage cuts are this design's own. The latency (three
  cycles) and the throughput (one per cycle) are kept.
* **Special operands are implemented.** The reference datapath does not
  handle NaN or ∞ operands. Here they follow the addition table above.
  * Denormal operands are read as zeros; the reference leaves them undefined.
  * Denormal results are truncated to zero, as in the reference.
* **Two known errors of the reference are corrected:**
  1. A true addition whose rounding carries into a new leading bit was
     classified as "no shift" and returned `A+C` instead of `A+C+1`. Here it
     is classified as a right shift by one. In this design the result
     multiplexor's carry-out renormalization (`rc`) would give the right
     value even without that fix. The fix still matters for the path
     select's own output, and its unit testbench checks it.
  2. The sticky bit was forced to 1 for an exponent difference of 54, which
     is wrong when the 52 shifted fraction bits are all zero. Here 54 is
     handled like any other shift.
* **Own choices.** The rounding-mode encoding, the three flag outputs, the
  quiet-NaN encoding and the sign of an exact zero are this design's own.
  So are the LZA equations, the GRS low-bit scheme and the converters'
  treatment of denormals and NaNs.
* **Adder II's comparator is 53 bits wide.** It includes the hidden bit
  rather than only the 52 stored fraction bits. Since it is only used when
  the exponents are equal, the hidden bits are equal and the result is the
  same.

## Verification

Every module has a self-checking testbench in `tb/` that compares its outputs
with values computed independently. The reference model in `tb/fpa_ref_pkg.sv`
has two parts:
* an exact integer model of the adder, which computes the sum of the two
  significands exactly and then rounds it;
* converter checks based on `real` arithmetic.

| testbench | what it covers |
|---|---|
| `fp_adder_tb` | Both variants, back to back, every cycle, with a three-cycle latency check. About 128,000 checks: directed cases (carry out of `A+C+1`, exponent distances 54 and 55, massive cancellation, exact and signed zeros, overflow and underflow edges, NaN and infinities) and random operand pairs biased toward exponent distances 0, 1, 2 and 52–56, near-cancelling fractions, range edges and special values, in all four rounding modes. Round-to-nearest results well inside the normal range are also compared with the simulator's own double addition. |
| `fpa_top_tb` | The whole top at default parameters. About 146,000 checks. It counts how often each mechanism occurs and counts a failure for any that never does. The mechanisms are: right shift by one, no shift, left shift by one, massive left shift, LZA fine adjust, rounding carry-out, ones-complement/compare swap, sticky at distance 54, exact zero, overflow, underflow, invalid, NaN propagation, denormal single input, and converter overflow. |
| `fpa_spec_tb` | Both adders of the top, through every case of a partition of normal-operand arithmetic: 424 cases in all. <br>• True addition for each exponent difference up to 52 and beyond, in either order (107 cases). <br>• Far subtraction for each difference from 2 to 53 and beyond (106 cases). <br>• Close subtraction for each leading-zero count of the exact difference (210 cases), plus exact cancellation. <br>Each case is built, then classified again from the operands, and counts as a failure if never reached. Each case runs 24 operations over the four rounding modes. Special fraction patterns are included: an all-ones upper sum, and a zero fraction at distance 54. |
| `<module>_tb` | One per block, exhaustive where the input space is small, otherwise directed plus random. |

All testbenches pass. Each block testbench was also run against a
deliberately broken copy of its block and reported failures. With the
sticky bit forced to 1 at distance 54, `fpa_spec_tb` also fails on the
full adder.

The verification is simulation-based, not formal. Denormal results and any
format other than double precision have not been exercised.

## Simulating

With Verilator 5:

```
verilator --binary --timing -Irtl -Itb \
  rtl/fpa_pkg.sv tb/fpa_ref_pkg.sv tb/fpa_stim_pkg.sv rtl/*.sv tb/fpa_top_tb.sv \
  --top-module fpa_top_tb
./obj_dir/Vfpa_top_tb
```

To run another testbench, replace `fpa_top_tb` with its name. Each testbench
ends with `TB_RESULT checks=<n> failures=<n>` and has a watchdog that stops it
if it hangs.

## Files

| file | role |
|---|---|
| `rtl/fpa_pkg.sv` | format parameters, rounding-mode and normalization-case enums |
| `rtl/fp_adder.sv` | the pipelined adder (`COMPARE` selects the variant) |
| `rtl/fpa_top.sv` | both adders and both converters side by side |
| `rtl/fpa_exp_sub.sv`, `fpa_mux_abs.sv`, `fpa_exp_select.sv` | exponent path |
| `rtl/fpa_compare.sv`, `fpa_swap.sv`, `fpa_rshift.sv`, `fpa_c_mux.sv` | alignment |
| `rtl/fpa_mant_adder.sv`, `fpa_grs.sv`, `fpa_path_select.sv`, `fpa_ones_compl.sv`, `fpa_sign_select.sv` | addition and rounding decisions |
| `rtl/fpa_lza.sv`, `fpa_encode.sv`, `fpa_lshift.sv`, `fpa_fine_adjust.sv` | close-path normalization |
| `rtl/fpa_exp_offset.sv`, `fpa_exp_adjust.sv`, `fpa_result_mux.sv` | exponent correction and result assembly |
| `rtl/fpa_special.sv` | NaN/∞ handling |
| `rtl/fpa_cvt_s2d.sv`, `fpa_cvt_d2s.sv` | precision converters |
| `tb/fpa_ref_pkg.sv`, `tb/fpa_stim_pkg.sv`, `tb/tb_common.svh` | reference model, stimulus helpers, shared check macros |
