# Table-driven elementary function generator (1/x, sqrt, 2^x, log2)

This is synthesizable SystemVerilog for a fixed-latency hardware unit. It
evaluates the reciprocal, the square root, 2^x and log2(x) of a normalized
number with a 24-bit significand, which is the IEEE single-precision
significand. It rounds the result to 24 bits in any of the four IEEE 754
rounding modes. Directed rounding (toward +inf or -inf) is offered because
interval arithmetic needs it: an interval [a, b] maps to
[round_down f(a), round_up f(b)].

The method is a parallel polynomial evaluation with no division and no
iteration:

1. The operand is range-reduced to a fixed interval.
2. The reduced fraction is split into a high part `xm`, which picks one of
   256 equal subintervals, and a low part `xl`, which is the point inside
   that subinterval.
3. A table gives cubic coefficients a0..a3 for the subinterval.
   Meanwhile `xl^2` and `xl^3` are formed.
4. Three multipliers form the terms `a1*xl`, `a2*xl^2` and `a3*xl^3`
   at the same time.
5. A multi-operand adder sums them with a0.
6. An output transformation undoes the range reduction. The result is
   normalized and rounded.

The word lengths are those of the cubic single-precision design in the
publication this RTL follows: "Parallel Hardware Designs for Correctly
Rounded Elementary Functions". There, xl^3 is computed as xl * xl^2. The
publication reports this as the best single-precision design for
delay times area, at about 103 ns and 70 mm² in a 1.0 µm process.

## How far the results can be trusted

The publication gets correct rounding for *every* input in a particular
way. It first takes Chebyshev-interpolation coefficients. Then, at design
time, it adjusts each coefficient by an exhaustive search over all inputs
of the subinterval, until every result rounds correctly. The adjusted
coefficient values are not published, and that search is not reproduced
here. This RTL therefore holds:

* **the unadjusted Chebyshev coefficients.** They are computed when the
  design is elaborated (see *Coefficient table*). Their error before
  rounding is below about 2^-37.
* **with a0 set to f at the start of each subinterval.** This makes the
  result exact wherever the function's value there can be represented
  exactly: 1/1, sqrt(1), sqrt(4), 2^0, log2(1), 2^-k and similar cases.
  Directed rounding is therefore right on those points.

The consequence is that results are always within one unit in the last
place (ulp) of the correctly rounded value. Nearly all of them are
correctly rounded. A sweep over 528,424 operands per function (every
127th significand, two exponents or signs, all four rounding modes) finds
4 results of 1/x, 29 of sqrt, 9 of 2^x and none of log2 that round the
other way, all by one ulp. In the random end-to-end test it is about 1
result in 3,000. A result is
affected only when the exact value lies within about 2^-37 of a rounding
boundary. To reach the publication's guarantee, replace the table
contents with adjusted coefficients. Nothing else in the datapath needs to
change.

Other limits:

* **Operand encoding.** Operands are sign, signed *unbiased* exponent and
  significand with its leading one. The unit does not handle IEEE packing,
  zero, subnormals, infinities or NaN. A wrapper must map these.
* **2^x.** |x| is split into integer and 23-bit fraction parts by a
  shifter. Fraction bits below 2^-23 are dropped, so for an operand with
  E < 0 and such bits set, the result is that of the truncated operand.
  |x| >= 256 sets `out_err`.
* **log2.** For exponent 0 the cancellation near x = 1 is avoided (see
  below). For exponent -1 with x just below 1, log2(x) = log2(M) - 1
  loses precision by cancellation. The publication does not treat this
  case, and neither does this design. Inputs with M > 1.9 and exponent -1
  can be several ulps off.
* `out_ey` is the exact exponent of the result. Whether it fits an IEEE
  format (overflow, underflow) is left to the consumer.

## Range reduction

Write the operand as x = (-1)^s · M · 2^E with 1 <= M < 2. Each function
has its own table segments:

| function | segment(s) on M or F | result exponent before normalization |
|---|---|---|
| 1/x | 1/M | -E, sign kept |
| sqrt | sqrt(M) if E is even; sqrt(2M) if E is odd | floor(E/2); negative x is an error |
| 2^x, x >= 0 | 2^F, with x = I + F | I |
| 2^x, x < 0 | 2^-F | -I |
| log2, E != 0 | log2(M), then E is added | from the normalization |
| log2, E = 0 | g(M) = log2(M)/(M-1), times (M-1) | from the normalization |

The odd-exponent square root has its own segment for sqrt(2M). That way
xm and xl are always bits of M, and no shifted operand reaches the table.
All results fall in [0, 2). round_norm finds the leading one, so the
doubling steps of the reduction (for example, a reciprocal below 1 becomes
2·result with exponent -1) come out of the normalization.

### The log2 paths

For E != 0 the second stage forms E + log2(M) as a signed fixed-point
number with 40 fraction bits. Its magnitude and sign go to the rounder.
For E = 0, log2(M) is close to 0 near M = 1 and would lose leading bits.
So the table instead holds g(M) = log2(M)/(M-1), which lies between 1 and
1.45. In the second stage, g is multiplied by (M-1) shifted left until
its leading bit is one. The shift count goes into the exponent. The
product therefore always has full precision. log2(1) gives an exact zero
(`out_zero`).

## The polynomial evaluator (`efg_core`)

```
              +-- coef_rom ----------------- a0f ------------------------+
seg, xm ------+                              a1 --[tc_mult 35x15]-- t1 --+
              |                              a2 --[tc_mult 27x24]-- t2 --+-- multi_operand_adder -- sum (1.40)
xl --+--------+------------------------------------^                     |
     +-- square_unit (15 -> 24) -- xl^2 -----------^  a3 --[tc_mult 18x14]-- t3
     +-- cube_unit (xl * xl^2, 14 -> 14) -- xl^3 ---------------^
```

Word lengths, and the binary point chosen for each word:

| word | bits | fraction bits | note |
|---|---|---|---|
| a0 | 41 | 40 | unsigned; stored minus the adder constant |
| a1, a2, a3 | 35, 27, 18 | 41, 41, 40 | two's complement |
| xl, xl^2, xl^3 | 15, 24, 14 | same | unsigned fractions of the subinterval |
| t1, t2, t3 | 37, 29, 20 | 40 | products rounded to nearest at 2^-40 |
| sum | 41 | 40 | signed for the log2 segment, unsigned otherwise |

The bit counts come from the publication. The binary points are this
design's choice and are set in `efg_pkg`. They rest on magnitude bounds:
|a1| < 2^-7, |a2| < 2^-15 and |a3| < 2^-23 for 256 subintervals per unit
interval.

### Multipliers without sign extension (`tc_mult`)

Each term multiplies a signed coefficient by an unsigned power of xl. The
tc_mult multiplier works as follows:

* Each partial-product row is `a & b_j`, with its top (sign) bit inverted.
* A single constant row corrects the sum: it adds 2^(NA-1) - 2^(NA+NB-1).
  That is the "one in the N-th column", plus the bit at the top that
  completes the identity.
* The same constant row also carries the half-LSB used for rounding.
* A Wallace tree of 3:2 carry-save adders (`csa_reduce`) reduces the rows
  to two.
* A parallel-prefix carry look-ahead adder (`cla_adder`) adds them.

The same module, unsigned, forms xl^3 and the log2 ratio product.

### Adding terms of different widths (`multi_operand_adder`)

The three terms are narrower than the sum and may be negative. The adder
does not sign-extend them. Instead:

* Each term enters with its sign bit inverted and zeros above. This adds
  2^(w-1) for each term.
* The table stores a0 minus the sum of those constants
  (`efg_pkg::SIGN_FOLD`), so no extra hardware is needed.
* Four rows go through one carry-save level and the carry look-ahead
  adder.

### Squarer (`square_unit`)

In a squarer, the products x_i·x_j and x_j·x_i are equal. They merge into
a single bit one column higher, and x_i·x_i is x_i. This roughly halves
the partial-product bits. The result is rounded to 24 bits.

## Coefficient table (`coef_rom`)

The table has 8 segments × 256 words × 121 bits = 247,808 bits. Seven
segments are used: 1/x, sqrt even, sqrt odd, log2, log2(x)/(x-1), 2^x and
2^-x. For comparison, the publication's table for this configuration is
1,920 words of 121 bits. Each word is {a0f, a1, a2, a3}.

No data file is involved. A constant function builds the contents during
elaboration, using real arithmetic. For each subinterval [x0, x0 + h),
with h = 2^-8:

1. Take the four Chebyshev nodes t_i = cos((2i+1)π/8).
2. Map them to u_i = (t_i + 1)/2, in units of the subinterval.
3. Evaluate y_i = f(x0 + u_i·h).
4. Expand the Lagrange polynomial through (u_i, y_i) into powers of xl.
5. Set a0 = f(x0).
6. Round each coefficient to its word, ties to even.
7. Subtract the adder constant from a0.

Verilator takes a few seconds on this. To change the number of
subintervals, change `XM_W`/`XL_W` in `efg_pkg`, keeping their sum at 23.
Then re-check the coefficient bounds.

## Pipeline and interface (`efg_top`)

| stage | work | registered |
|---|---|---|
| 1 | `range_reduce_in`, `efg_core` | pre-rounded sum, side information (`side_t`) |
| 2 | `range_reduce_out` (log2 addition or ratio product), `round_norm` | result |

* One operation can start every cycle. There is no back-pressure.
* `out_valid` follows `in_valid` by two clock edges.
* Reset (`rst_n`, synchronous, active low) clears only the valid bits.
* `in_func`: 0 = 1/x, 1 = sqrt, 2 = 2^x, 3 = log2.
* `in_rmode`: 0 = nearest even, 1 = toward +inf, 2 = toward -inf,
  3 = toward zero.
* Exponents are 10-bit signed.
* `out_inexact` marks a rounded result. `out_err` marks an operand outside
  the domain; the value is then meaningless.

The publication gives the datapath and the range reductions. The split
into two stages, the handshake and the encoding are this design's own.

## Files

| file | content |
|---|---|
| `rtl/efg_pkg.sv` | types (function, rounding mode, segment), word lengths, side-information struct |
| `rtl/efg_top.sv` | two-stage generator |
| `rtl/range_reduce_in.sv`, `rtl/range_reduce_out.sv` | range reduction and its inverse |
| `rtl/efg_core.sv`, `rtl/coef_rom.sv` | polynomial evaluator and its table |
| `rtl/tc_mult.sv`, `rtl/square_unit.sv`, `rtl/cube_unit.sv` | multiplier, squarer, cube |
| `rtl/multi_operand_adder.sv`, `rtl/csa_reduce.sv`, `rtl/cla_adder.sv` | adders |
| `rtl/round_norm.sv` | normalization and rounding |
| `tb/tb_<module>.sv` | one self-checking testbench per module |
| `tb/tb_efg_sweep.sv` | accuracy sweep over the input interval of every function |

## Simulation

Every testbench prints `TB_RESULT checks=N failures=M` and ends by
itself. A watchdog stops it if it hangs. For example:

```
verilator --binary --timing --assert -Irtl rtl/efg_pkg.sv tb/tb_efg_top.sv \
          --top-module tb_efg_top -o sim && ./obj_dir/sim
```

Any other testbench builds the same way with its own name. `tb_efg_top`
runs the design at its default parameters:

* It sends directed operands plus 6,000 random ones, mostly back to back,
  with all functions and all rounding modes.
* A double-precision reference model, rounded in the requested mode,
  checks every result. It also checks the two-cycle latency.
* Results must be within one ulp, and at least 99% must be exactly right.
* It fails if any mechanism is never exercised: odd and even square-root
  exponents, both signs of 2^x, each log2 path and its exact zero, each
  rounding mode, a rounding carry into a new binade, exact results, and
  each domain error.

`tb_efg_sweep` steps the significand through [1, 2) with a stride of 127
for every function, rounding mode and two exponents or signs, about 2.1
million operations streamed back to back (some 20 s of simulation). Every
result must be within one ulp, fewer than 0.1% may differ from the
correctly rounded value, and the count per function is printed. Lower
`STRIDE` for a denser sweep; stride 1 is the exhaustive test of the
interval.

The unit testbenches check each arithmetic block against the plain
operators. Two are exhaustive or broad:

* the squarer is tested on all 2^15 inputs;
* the table and the evaluator are tested against the functions
  themselves, within 2^-37 and 2^-36.
