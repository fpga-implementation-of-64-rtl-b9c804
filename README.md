# exp64 — a pipelined double-precision exp(x) for FPGAs

`exp64` computes the IEEE-754 double-precision exponential, one argument per
clock, with a latency of 27 cycles. It avoids both a high-degree polynomial
and one huge table. The reduced argument is cut into four bit-sections.
Three of them are looked up in small 512-entry tables. The last one is so
small that `exp(t) ≈ 1 + t` is already exact to double precision:

```
exp(x) = 2^xI · exp(x_M) · exp(x_D) · exp(x_L) · (1 + x_T)

xI  = floor(x · log2 e)                  integer part, becomes the exponent
xf  = x − xI · ln 2,  0 <= xf < 1        60-bit fraction = x_M & x_D & x_L & x_T
x_M = bits 2^-1  .. 2^-9                 table 1: exp(k·2^-9)
x_D = bits 2^-10 .. 2^-18                table 2: exp(k·2^-18) − 1
x_L = bits 2^-19 .. 2^-27                table 3: exp(k·2^-27) − 1
x_T = bits 2^-28 .. 2^-60                Taylor:  1 + x_T, error x_T²/2 < 2^-55
```

Nine-bit table addresses match one 512-deep FPGA block RAM per 32–36 bits
of table width, so the three tables fit in six block RAMs. The multipliers
dominate the area. Most of the design is therefore about keeping them
narrow: constant multipliers in canonic signed digits, factors of the form
`1 + small`, and products whose low columns are never built.

## Data flow

```
 x (double) ─► fp_unpack_shift ─► exp_eval ───────────────► exp_lut ×3 ─┬► opt_mult  M·(1+D) ───┐
              special classes,    q = ⌊|x|·log2e⌋ (CSD)      x_M,x_D,x_L │                       ├► opt_mult ─► fp_pack ─► y
              barrel shift to     r = |x| − q·ln2 (CSD)                  └► taylor_mult          │   P·(1+Q)    normalise,
              10.54 fixed point   sign migration                x_T ───►   (1+L)(1+x_T) ─────────┘              round, adjust
                                                                                                                exponent, pack
```

| cycles | module | work |
|---|---|---|
| 1 | `fp_unpack_shift` | classify NaN/±inf/out of range; barrel-shift the mantissa to a 64-bit fixed-point \|x\| (10 integer, 54 fraction bits) |
| 3 | `exp_eval` | integer estimate q; q·ln2; r = \|x\| − q·ln2; sign migration (`sign_logic`) |
| 1 | `exp_lut` ×3 | synchronous table reads; x_T registered alongside |
| 10 | `opt_mult` ∥ `taylor_mult` | exp(x_M)·exp(x_D) and exp(x_L)·(1+x_T) in parallel |
| 10 | `opt_mult` | the product of the two |
| 2 | `fp_pack` | normalise, round, add the integer part to the exponent, special values |

Total: 27 cycles (9 + `MUL_STAGES_1` + `MUL_STAGES_2`). The pipeline has no
stalls. `in_valid` marks an argument and `out_valid` marks its result 27
cycles later. There is no back-pressure. Reset is asynchronous and active
low. It clears every pipeline register except the table read registers,
whose contents are never used without a valid bit.

## Range reduction and the self-correcting integer estimate

The obvious way to get `xI` and `xf` is one wide multiplication
`x · log2 e`. Here it is split into two small constant multiplications:

1. `q = floor(|x| · log2 e)` is *estimated* with little precision: |x| with 8
   fraction bits times log2 e with 16 fraction bits, both rounded down. The
   estimate is the true floor or one below it (error < 0.03).
2. `r = |x| − q · ln 2` is computed exactly enough: q has only 11 bits, and
   ln 2 is used with 72 fraction bits. The result keeps 60 fraction bits.

Step 2 repairs step 1's error. If q is one low, r is simply larger than
ln 2 (up to about 0.714) and `exp(r)` lies between 2 and e. The output stage
then shifts the mantissa right by one. Any estimate error that keeps r below
1 would be repaired like this: up to (1 − ln 2)/ln 2 ≈ 0.44 in q. Since both
constants are rounded down, r can never be negative.

Both multipliers (`csd_const_mult`) recode their constant into canonic
signed digits at elaboration time. The product is then a short chain of
additions and subtractions of shifted copies of the input. The ln 2
multiplier is also reduced in width: it builds product columns only down to
2^-64, four below the kept 60 bits. Each positive term is rounded down and
each negative term up there, so the product can only be too small, which
keeps r non-negative.

## Sign migration

The tables are addressed only with non-negative fractions. A sign bit would
double them. A negative argument is therefore rewritten so that its whole
sign sits in the integer part (`sign_logic`). The integer counts powers of
two, i.e. units of ln 2 of the fraction:

```
x >= 0              : xI = +q       xf = r
x <  0, r = 0       : xI = −q       xf = 0
x <  0, 0 < r <= ln2: xI = −(q+1)   xf = ln2 − r
x <  0, r > ln2     : xI = −(q+2)   xf = 2·ln2 − r     (q was one low)
```

The fraction step is a two's-complement negation of r plus a constant. The
integer part travels as an 11-bit magnitude and a sign. Its largest value
is 1478, for |x| just under 1024.

## Tables

`exp_lut` is one 512×`DATA_W` ROM with a registered read, instantiated three
times. Entry k is `round(exp(k·2^-SHIFT) · 2^FW)`. For the two small
sections, 1 is subtracted (`MINUS_ONE`):

| table | SHIFT | value range | stored bits (FW = 57) |
|---|---|---|---|
| x_M | 9  | 1 .. e^(511/512) < 2.72 | 59 (2 integer + 57 fraction) |
| x_D | 18 | exp − 1 < 2^-9  | 48 |
| x_L | 27 | exp − 1 < 2^-18 | 39 |

The leading `1.000…0` of the small tables is known, so it is not stored and
never enters a multiplier. The contents are computed when the memory is
initialised, with the series `Σ x^n/n!` in 128-bit fixed point with 100
fraction bits (`exp_pkg::exp_fixed`). No data file is needed. Any
`GUARD_BITS` up to 15 gives a correct table.

## Multipliers: `1 + small` factors and truncated products

After the tables, every number is fixed point with `FW = 53 + GUARD_BITS`
fraction bits: 52 mantissa bits, one rounding bit and the guard bits.

* `opt_mult` computes `a · (1 + y) = a + a·y`. The factor `1 + y` has a long
  run of zeros after its leading one, so only an `A_W × Y_W` multiplier is
  built (Y_W = 48 or 40 instead of 58), plus one adder.
* `taylor_mult` computes `(1 + l)(1 + t) − 1 = l + t + l·t`. Only the
  39×30-bit `l·t` needs a multiplier, and only 12 bits of it are kept.
* `trunc_mult` is the reduced-width multiplier under both. Partial-product
  bits below column `DROP − EXTRA` are never generated. `EXTRA = clog2(B_W)+1`
  columns are kept below the output LSB, so the carries lost from the
  missing columns cost less than one output LSB. The result is the exact
  truncated product or one LSB below it. There is no error compensation.
  The guard bits are what absorbs these errors. The partial-product rows are
  spread evenly over `STAGES` pipeline stages.

## Output stage

`fp_pack` receives `P = exp(xf)` in [1, e):

* If P >= 2 (only when the integer estimate was one low), P is shifted right
  and the exponent raised by one.
* The 52-bit fraction is rounded to nearest, with ties away from zero. A
  carry out of the rounding (e.g. exp of the double nearest ln 2 gives
  exactly 2.0) raises the exponent again.
* The biased exponent is `1023 ± xI + adjustments`. A value >= 2047 gives
  +inf. A value <= 0 gives +0: results below 2^-1022 are flushed, and
  subnormal results are not produced.
* NaN in gives quiet NaN `0x7FF8000000000000`. +inf gives +inf. −inf gives
  +0. |x| >= 1024 is classified at the input: +inf for positive x, +0 for
  negative x.
* The sign bit is always 0.

## Accuracy

These figures were measured in simulation against the C library's
double-precision exp. The sweep used 20 000 random arguments, half in
[−700, 700] and half in [−1, 1]. The end-to-end test covers the whole range
and sees the same maximum of 1 ulp at the default:

| GUARD_BITS | FW | mean \|error\| | max \|error\| |
|---|---|---|---|
| 0 | 53 | 1.13 ulp | 3 ulp |
| 2 | 55 | 0.33 ulp | 1 ulp |
| 4 (default) | 57 | 0.11–0.13 ulp | 1 ulp |
| 8 | 61 | 0.07 ulp | 1 ulp |

These include the reference's own rounding. The published architecture
quotes a mean error of 0.58 ulp with no guard bits, falling to 0.47 ulp at 4.
Its count of guard bits and its rounding are not known in detail, so the two
scales are not directly comparable. The trend is the same, and 4 guard bits
is the default here as well.

## What follows the original architecture and what is this implementation's

Taken from the architecture: the base-2 split with an 11-bit integer part;
a 64-bit fixed-point image of |x| from a barrel shifter; the two constant
multipliers (low-precision log2 e, CSD recoding); the three 9-bit tables and
the first-order Taylor term for bits 2^-28..2^-60; sign migration into the
integer part; the `(a + x)(1 + y)` multiplier form; truncated multipliers
with guard bits and no compensation; 4 guard bits; the 27-cycle latency;
a positive output word.

Chosen here, where the description gives no detail:

* the 10.54 fixed-point split and the constant widths (8/16 bits for the
  estimate, 72 bits of ln 2);
* how the 27 cycles are distributed (`MUL_STAGES_1 = MUL_STAGES_2 = 9`);
* rounding (nearest, ties away), flush-to-zero of subnormal results, the NaN
  pattern, classifying |x| >= 1024 at the input;
* the valid-bit interface and the reset.

One deliberate departure: the sign-migration identity is usually written
`−x_i − x_f = −(x_i + 1) + (1 − x_f)`. With the integer counting powers of
two and the fraction in natural units, the correct replacement fraction is
`ln 2 − r`, not `1 − r`. The case where the low-precision estimate left
r > ln 2 needs the extra `−(q+2)` line shown above.

Not included: the host platform shell (memory interface and control) that
the unit was embedded in. `exp64` offers a plain valid/data stream for such
a shell to drive.

## Files

| file | content |
|---|---|
| `rtl/exp_pkg.sv` | widths, constants (ln 2, log2 e), special-value enum, CSD recoding and table-generation functions |
| `rtl/exp64.sv` | top level: the pipeline above |
| `rtl/fp_unpack_shift.sv` | input classification and barrel shifter |
| `rtl/exp_eval.sv` | range reduction (3 stages) |
| `rtl/csd_const_mult.sv` | constant multiplier in canonic signed digits |
| `rtl/sign_logic.sv` | sign migration |
| `rtl/exp_lut.sv` | 512-entry exp table |
| `rtl/trunc_mult.sv` | pipelined reduced-width multiplier |
| `rtl/opt_mult.sv` | `a·(1+y)` multiplier |
| `rtl/taylor_mult.sv` | `(1+l)(1+t)` with the Taylor term |
| `rtl/fp_pack.sv` | exponent adjust, rounding, IEEE-754 packing |
| `rtl/pipe_delay.sv` | side-band delay line |
| `tb/*_tb.sv` | one self-checking testbench per module; `exp64_tb` (end to end, default parameters) and `exp64_guard_tb` (accuracy for 0/2/4/8 guard bits) |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and ends. The
testbenches have no ports and find the design modules through the `rtl`
search path:

```
verilator --binary --timing --assert -Irtl rtl/exp_pkg.sv tb/exp64_tb.sv --top-module exp64_tb
./obj_dir/Vexp64_tb
```

Use the same command with any other `tb/<name>_tb.sv`. `exp64_tb` streams
30 000 arguments (directed corner cases, random values over the whole
range, tiny arguments and random bit patterns) with idle cycles in between.
It checks each result to within 2 ulp of the reference and checks the
27-cycle latency. It also counts how often each mechanism fired: sign
migration, its wrap case, the estimate correction, the normalisation shift,
a rounding carry, overflow, underflow and special inputs. It fails if any
of them never happened. The whole run takes well under a second.

## Changing it

* `GUARD_BITS` (0..15) sets the datapath width and hence accuracy and area.
  All table and multiplier widths follow from it.
* `MUL_STAGES_1` and `MUL_STAGES_2` set the pipeline depth of the two
  multiplier levels. The latency is `9 + MUL_STAGES_1 + MUL_STAGES_2`.
  Testbenches that check latency assume the defaults.
* The table contents and the CSD digits are computed at elaboration and
  initialisation, so changing a width needs no regenerated data.
