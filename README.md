# SNAP-style IEEE multiply-add-fused unit

A floating-point unit often has to compute `a*b + c`. You can do it with a
multiplier whose rounded result feeds a separate adder ("chaining"). Then the
multiply latency and the add latency simply add up. A fused multiply-add
datapath overlaps the two. The usual fused design (the IBM RS/6000 style)
rounds only once, at the end, so its result differs from an IEEE multiply
followed by an IEEE add.

This unit implements the *partially overlapped* organization proposed for the
Stanford Nanosecond Arithmetic Processor (SNAP) by Quach and Flynn. Its fused
result is **bit-for-bit the same as a rounded IEEE multiply followed by a
rounded IEEE add**, yet the adder does not wait for the rounded product:

* the multiplier's partial-product tree leaves the product in carry-save form,
  as two vectors `S` and `C`;
* while the multiplier side adds and rounds `S + C`, the adder side already
  aligns `S`, `C` and `c`;
* the multiplier's rounding logic hands the adder side one small number,
  `r_Mul`. With it, the adder side can add the *rounded* product without ever
  seeing it.

The same datapath also executes a plain add (`c ± d`, with `d` taking the
place of `S` in the shifters) and a plain multiply. All arithmetic is IEEE 754
double precision: a 53-bit significand and an 11-bit exponent.

## The key identity: adding a rounded product that has not been added yet

The Wallace tree delivers `S` and `C` with `S + C = ma*mb`, a 106-bit product
of two 53-bit significands. The value is in [1, 4). Its unit in the last
place (ULP) after rounding to 53 bits is bit 52. If `S + C >= 2`, it is
bit 53.

Split `S` and `C` at the ULP. Let `S_hi`, `C_hi` be the vectors with every
bit below the ULP cleared, and let `cl` be the carry that the low parts
`S_lo + C_lo` send across the ULP. Then the truncated product is exactly
`S_hi + C_hi + cl*ULP`. The rounded product adds the rounding increment
`inc` (0 or 1):

```
round(S + C) = S_hi + C_hi + r_Mul * ULP,     r_Mul = cl + inc  (0, 1 or 2)
```

`mul_round` computes both possible low-part carries with two short adders,
one for a ULP at bit 52 and one for a ULP at bit 53. It sums the upper bits
with a compound adder, which yields the sum and the sum + 1 together. The
low carry picks one of the two. Bit 105 then tells where the ULP is, and the
rounding logic decides `inc`. The adder side receives `S_hi`, `C_hi`,
`r_Mul` and the ULP position, which is three addends and a constant. It
never needs the rounded product itself.

The adder side clears the bits below the ULP with a *rounding mask*: ones
from the ULP position upward. The lowest one of that mask, times `r_Mul`,
is the *rounding constant*. Both are shifted along with `S` and `C` during
alignment.

## Alignment cases

Let `X` be the product (or `d` for an add) and `Y = c`. `exp_diff`
compares `Ex = Ea + Eb - bias` (the product before its own normalization,
with significand in [1, 4)) against `Ey`. The boundary between the two
paths is 2, not 1, because `S + C` can reach 4.

| case | operation   | exponents            | path | what is shifted            |
|------|-------------|----------------------|------|----------------------------|
| 1    | add         | Ex > Ey              | far  | c, right                   |
| 2    | add         | Ex <= Ey             | far  | S, C and rounding constant |
| 3    | subtract    | 0 <= Ex - Ey <= 2    | near | c, by 0..2 (multiplexer)   |
| 4    | subtract    | Ex - Ey > 2          | far  | c, right                   |
| 5    | subtract    | 1 <= Ey - Ex <= 2    | near | S, C, by 1..2 (multiplexer)|
| 6    | subtract    | Ey - Ex > 2          | far  | S, C and rounding constant |

Two right shifters do all alignment. Shifter L carries `S` (or `d`).
Shifter R carries `C` when the product is the smaller operand, and `c`
otherwise. They work in a 112-bit window. In that window the operand LSB
sits at bit 57 and 1.0 at bit 109. Any shift below 57 therefore loses no
bit. This matters because `S` and `C` are shifted separately: truncating
each of them would lose the carry between their dropped parts. A shift of
57 or more replaces the small operand by a single one in bit 0, a sticky
bit. That gives the same rounding in every mode, because the operand lies
far below the other operand's ULP.

### Far path (`far_path`)

A 4-2 carry-save adder takes the aligned `S`, `C`, `c` and the rounding
constant. It is built from two 3-2 levels. For a subtraction the
subtrahend's vectors are complemented. The compound adder's `+1` output
supplies the two's-complement carry-in. A subtracted carry-save `X` needs
`+2` in total, and the constant term absorbs the second one:
`-(s + c + r) = ~s + ~c + (1 - r) + 1`. The larger operand is known here,
so the sum is positive and within [0.5, 8). Normalization is therefore a
four-way choice of the leading bit. `round_select` then rounds to 53 bits.

### Near path (`near_path`)

The near path handles subtraction of nearly equal exponents, where massive
cancellation is possible. Alignment is only a 3-to-1 multiplexer. A
4-input carry-save step forms `S_hi + C_hi + r_Mul*ULP + ~c`. The compound
adder gives `X - Y - 1` and `X - Y`. If `X - Y` is negative, the magnitude
is `~(X - Y - 1) = Y - X`, so no comparator and no second adder are
needed. In parallel the leading-one predictor (`lop`) reads the two
carry-save vectors. Its estimate of the leading digit is exact or one
position high. The normalizing left shift uses the estimate and places it
two positions below the top. A 0 to 3 bit fine shift corrects the
remaining error, which includes the one-bit difference between `X - Y` and
`X - Y - 1`. With heavy cancellation the result is exact. With little
cancellation it is rounded like the far path.

### Result multiplexer (`result_mux`)

It selects the far, near, product (FMPY) or special result, checks the
exponent range and packs the IEEE word.

## Interface and timing (`snap_maf`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `in_valid`  | in  | 1  | start an operation this cycle |
| `op`        | in  | 2  | `0` FMPY `a*b`, `1` FADD `c+d`, `2` FMAF `a*b+c` (`snap_pkg::op_e`) |
| `sub`       | in  | 1  | subtract the addend: `c-d` (FADD), `a*b-c` (FMAF) |
| `rm`        | in  | 2  | `0` nearest-even, `1` toward zero, `2` toward +inf, `3` toward -inf |
| `a b c d`   | in  | 64 | IEEE doubles |
| `out_valid` | out | 1  | result valid |
| `result`    | out | 64 | IEEE double |
| `flags`     | out | 4  | `{invalid, overflow, underflow, inexact}` |
| `path_case` | out | 3  | alignment case 1..6 taken, 0 for FMPY or a special result |
| `near_used` | out | 1  | result came from the near path |

The datapath is a single combinational cone from the inputs to one output
register. Results appear one clock after `in_valid`, and a new operation
can start every clock. Pipelining the cone is left to the user.

Exceptions behave as the two separate IEEE operations would. For example,
a product that overflows to infinity and meets `-inf` is invalid. A product
that overflows to the largest finite number in a directed rounding mode is
then added as an ordinary operand. Flags are the union of the multiply's
and the add's flags.

## Where this design departs from the published organization

* **Rounding of the adder side.** The published design pre-computes up to
  five rounding outcomes, `S + C + (0..4)` at a carry point. Here each path
  adds exactly, normalizes, and then makes one 53-bit compound-adder
  selection (`round_select`). Results are identical. The delay balance is
  not that of the published design.
* **Widths.** The shifters span 112 bits rather than 106, so that shifted
  carry-save vectors lose nothing. The near path is 113 bits wide and has a
  sign bit. The published design labels these parts as 53-bit.
* **Case 1.** The published design feeds the rounded product from the
  multiplier's compound adder into the 4-2 CSA. This unit always uses the
  equivalent `S_hi + C_hi + r_Mul*ULP`. The value is the same, and the
  adder side has one less dependency.
* **Near-path sharing.** In the published organization the near path
  (cases 3 and 5) reuses the multiplier's carry-save adders and compound
  adder. Here `near_path` has its own carry-save step and a 113-bit
  compound adder, so the multiplier hardware is not shared. This costs
  area but keeps the multiplier's rounding independent of the addend.
* **Multiplier rounding.** The upper-part compound adder is selected by
  the low-part carry, and the increment is applied by `round_select`. The
  published design folds the increment into a pre-added rounding constant.
* **Not specified by the published design, chosen here:** denormal inputs
  are read as zero and results below the normal range flush to a signed
  zero (underflow and inexact are set). NaNs come out as the quiet NaN
  `0x7FF8000000000000`. The choices also cover the rounding-mode and
  opcode encodings, the flag set, and the single output register.
* The carry-propagate adders are written arithmetically (`a + b`), so
  synthesis chooses the adder architecture. The Wallace tree uses plain AND
  partial products (no Booth recoding). Its 53 rows reduce as
  53-36-24-16-11-8-6-4-3-2.
* The chained (non-overlapped) and the fully overlapped "greedy"
  organizations were only comparison points and are not included.

## Files

| file | contents |
|------|----------|
| `rtl/snap_pkg.sv` | widths, window constants, enums, flag struct, rounding helpers |
| `rtl/snap_maf.sv` | top level: operand selection, block wiring, output register |
| `rtl/wallace_tree.sv` | 53x53 partial products and 3-2 CSA tree to `S`, `C` |
| `rtl/csa32.sv`, `rtl/csa42.sv` | 3-2 and 4-2 carry-save adders |
| `rtl/compound_adder.sv` | `a+b` and `a+b+1` |
| `rtl/mul_round.sv` | multiplier-side addition, rounding, `r_Mul` |
| `rtl/round_select.sv` | IEEE rounding decision and selection |
| `rtl/exp_diff.sv` | exponent difference, case and path selection, shift amounts |
| `rtl/align_shifter.sv` | the two alignment shifters, rounding mask and constant |
| `rtl/far_path.sv` | 4-2 CSA, compound adder, 1-bit normalization, rounding |
| `rtl/near_path.sv` | 3-1 alignment, compound-adder magnitude, LOP, left shift, rounding |
| `rtl/lop.sv` | leading-one predictor |
| `rtl/special_case.sv` | NaN, infinity, zero and product over/underflow handling |
| `rtl/result_mux.sv` | final selection, exponent range, packing |

## Verification

Every module has a self-checking testbench `tb/<module>_tb.sv` that prints
`TB_RESULT checks=N failures=M`. `tb/fp_ref_pkg.sv` is an independent
reference. It forms each exact result as a 256-bit integer times a power of
two and rounds it once. It models a fused multiply-add as an IEEE add of
the IEEE-rounded product.

`snap_maf_tb` runs 200,000 random operations through the full-size unit, in
all four rounding modes. It mixes near and far exponent differences,
operands built to cancel almost completely, products that overflow or
underflow, and NaN, infinity, zero and denormal operands. It checks every
result and flag, and the one-clock latency. Round-to-nearest results in the
normal range are checked a second time against the simulator's native
double arithmetic. The test counts each alignment case, near-path use,
exact cancellation, product overflow, underflow, NaN and infinity results,
FADD and FMPY. If any of these never occurs, the test fails. All
testbenches pass.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/snap_pkg.sv tb/fp_ref_pkg.sv tb/snap_maf_tb.sv --top-module snap_maf_tb
./obj_dir/Vsnap_maf_tb
```

Substitute another `*_tb` for a block test. `-Irtl -Itb` lets Verilator
find the other modules by file name.

## Changing it

The format widths live in `snap_pkg`. `WIN_LSB`, `WIN_W` and `SH_LIM` are
coupled: operands enter the window at `WIN_LSB`, shifts below `SH_LIM` must
not push bits out, and there must be three bits of headroom above the
1.0 position. The near path's shift limits assume the LOP error of at most
one position. Re-run `lop_tb` and `near_path_tb` after touching either.
