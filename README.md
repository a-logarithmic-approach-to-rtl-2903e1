# Logarithmic arithmetic unit with piecewise-linear converters

Multiplication, division, squaring and square roots dominate rendering
arithmetic, and they are expensive in ordinary binary. In a logarithmic number
system (LNS) a value is kept as its sign and the base-2 logarithm of its
magnitude, so a multiply becomes an add and a divide a subtract. Addition and
subtraction become harder, and values must be converted into and out of the
logarithmic form. This RTL implements such a unit for a low-power GPU datapath:

* a **binary-to-logarithm converter**,
* a **four-function LNS ALU** (add, subtract, multiply, divide),
* a **single-operand unit** for reciprocal, square root, square and power,
* a **logarithm-to-binary converter**.

Both converters approximate their function with eight straight lines and
compute the product with shift-and-add. The antilogarithm converter includes a
small table fix that narrows its worst-case error from about +0.082 % to about
+0.070 %.

## Number format

| item | format |
|---|---|
| logarithm | 32-bit two's complement, 6 whole bits and 26 fraction bits, range [-32, 32) |
| LNS number (`lns_num_t`) | `{sign, lg}`: 1 sign bit and a 32-bit logarithm of the magnitude |
| binary operands and results | 32-bit unsigned magnitude plus a separate sign bit; by default an integer (`IN_FRAC`, `OUT_FRAC` add fraction bits) |
| zero | no exact code; the most negative logarithm `0x80000000` (2^-32) stands in for it |

A 6.26 logarithm spans the same dynamic range as a 32-bit binary word.

## Logarithm converter (`log_converter`)

For an input `v = 2^e * (1 + x)` with x in [0,1):

1. `lzc32` counts leading zeros. A variable shifter moves the leading one to
   bit 31, and the 26 bits below it are `x`.
2. The integer unit forms `e = 31 - lzc - IN_FRAC`. This is the 6-bit whole
   part.
3. The fractional unit computes `log2(1+x) ~ a_i*x + b_i`. The interval
   `i = x[25:23]` picks one of eight equal intervals.

| interval | 128·a | 1024·b |
|---|---|---|
| [0, 1/8) | 175 | 0 |
| [1/8, 1/4) | 158 | 15 |
| [1/4, 3/8) | 142 | 46 |
| [3/8, 1/2) | 127 | 91 |
| [1/2, 5/8) | 119 | 123 |
| [5/8, 3/4) | 110 | 167 |
| [3/4, 7/8) | 102 | 215 |
| [7/8, 1) | 95 | 264 |

The fraction is computed modulo 1. Every line stays inside [0,1), so the
26-bit wrap-around is exact.

Measured error, using the definition `(approx - log2 v) / (1 + log2(1+x))`:

* worst negative: −0.190 % near x = 0.053;
* worst positive: +0.103 % at x = 3/8.

There is no correction near x = 0. Adding an offset there would make logarithms
of values just above a power of two visibly non-zero.

## Shift-and-add evaluation (`pwl_sum5`)

The slope of each line is stored as an integer number of 1/128 steps. The
multiply is done as a sum of shifted copies of x, using signed power-of-two
digits (canonical signed-digit form). For example, `175 = 256 - 64 - 16 - 1`.
Every slope in both converters needs at most four digits.

A piece therefore has five operands: four shifted copies of x (some negated)
and the intercept. Three levels of 3:2 carry-save adders reduce them to two
words, and one carry-propagate adder adds those:

```
level 1: t0 + t1 + t2        -> s1, c1
level 2: s1 + c1 + t3        -> s2, c2
level 3: s2 + c2 + intercept -> s3, c3
CPA    : s3 + c3
```

A negated term enters as its ones' complement. The +1 that completes each
two's-complement negation is folded into the intercept constant in the table.

The digit recoding is a constant function (`lns_pkg::csd4`) run at
elaboration. In hardware each interval only selects fixed shifts of x.

Bits shifted out at the bottom are truncated. This gives up to about 3 ulps of
error in the 26-bit result, far below the approximation error.

## Antilogarithm converter (`antilog_converter`)

The input logarithm `e + f` is split into:

* the signed whole part `e`;
* the 26-bit fraction `f`.

The mantissa is `2^f ~ c_i*f + d_i`, computed by the same five-operand
carry-save structure, 27 bits wide (1.26). The mantissa is then shifted by `e`
and rounded to nearest. Results that do not fit saturate to all ones and set
`sat`.

| interval | 128·c | 1024·d | 2048·d used |
|---|---|---|---|
| [0, 1/8) | 92 | 1024 | 2048 |
| [1/8, 1/4) | 101 | 1015 | 2030 |
| [1/4, 3/8) | 111 | 995 | 1990 |
| [3/8, 1/2) | 121 | 964 | 1928 |
| [1/2, 5/8) | 131 | 924 | **1847** |
| [5/8, 3/4) | 143 | 864 | **1727** |
| [3/4, 7/8) | 155 | 792 | 1584 |
| [7/8, 1) | 169 | 695 | 1390 |

**The half-ulp correction.** With intercepts in units of 1/1024, the intervals
[1/2, 5/8) and [5/8, 3/4) have the largest positive errors, +0.08 %. Everywhere
else the error stays within ±0.07 %. Lowering those two intercepts by a whole
1/1024 pushes them past the negative limit. The intercept table is therefore
one bit wider (units of 1/2048), and the two values are lowered by half a unit.

The slopes are untouched, so the shift-and-add wiring is the same. The parameter
`IMPROVED` (default 1) selects the corrected table. `IMPROVED = 0` gives the
original table for comparison.

| table | worst negative error | worst positive error |
|---|---|---|
| corrected | −0.0725 % (at f = 3/8) | +0.0696 % (near f = 0.93) |
| uncorrected | −0.0725 % | +0.0823 % (at f ≈ 0.69) |

## The LNS ALU (`lns_alu`, `lns_control`, `phi_rom`)

```
           +-- Lx > Ly ? --> control --> sub1, minus, mux, sub2, sign
 A (Lx) ---+-> [add/sub 1] --s1--+--> [ROM phi+/phi-] --> mux0 \
 B (Ly) ---+   (sub1)            +----------------------> mux1  > T
                                                                  [add/sub 2] --> Lz
 A ------------------------------------------------------> mux0 \ (sub2)
 Lm (scale factor) --------------------------------------> mux1  > U
```

| operation | minus | mux | sub1 | sub2 | result |
|---|---|---|---|---|---|
| add (same signs) | 0 | 0 | 1 | 0 | `A + phi+(A-B)` |
| subtract (same signs) | 1 | 0 | 1 | 0 | `A + phi-(A-B)` |
| multiply | 0 (don't care) | 1 | 0 | 1 | `Lx + Ly - Lm` |
| divide | 0 (don't care) | 1 | 1 | 0 | `Lx - Ly + Lm` |

For mixed signs, `minus = Sx xor Sy xor (op == subtract)`. Multiply and divide
take `Sx xor Sy` as the result sign. Add and subtract take the sign of the
larger operand.

**Why Lm appears in multiply and divide.** Numbers in (0,1) can be stored
scaled by a factor `m`, so the logarithm held is `log2(m*x) = Lx + Lm`.

* A sum of two scaled numbers is still scaled correctly.
* A product of two scaled numbers carries `m` twice, so one `Lm` is subtracted.
* A quotient carries no `m`, so one `Lm` is added.

**Operand swap.** For add and subtract, the comparator result makes the control
swap the operands whenever `Lx > Ly` is false. The first adder then always
produces `d = Lmax - Lmin >= 0`, and the A input of the lower mux is the larger
operand. An immediate assertion checks this.

**phi ROM.** `phi+(d) = log2(1 + 2^-d)` and `phi-(d) = log2(1 - 2^-d)`. The ROM
is addressed by `d` truncated to 5 whole and 6 fraction bits. That is 2048
words per function (`ROM_INT_BITS`, `ROM_FRAC_BITS`), and each word holds the
function at the middle of its address interval. The contents are computed at
elaboration from the formulas.

* For `d >= 32` the output is 0.
* `d = 0` with `phi-` (x − x) gives the zero code, as does any exact
  cancellation.
* The interpolation error is at most `slope/128`: 0.4 % of a unit in the
  logarithm for phi+, about 0.27 % in value. For phi- the error grows without
  bound as `d -> 0`, the usual weakness of LNS subtraction of nearly equal
  numbers.

**Saturation.** The adders are wide enough never to wrap. A result logarithm
outside [-32, 32) is clamped and `sat` is raised.

## Single-operand operations (`lns_unary`)

In the logarithmic domain these operations need no table:

| operation | rule on the logarithm |
|---|---|
| 1/x | `-Lx` |
| sqrt(x) | `Lx >>> 1` |
| x² | `Lx << 1` |
| x^y | `y * Lx` |

For x^y, `y` is an ordinary binary number: sign plus 32-bit magnitude with
`Y_FRAC` fraction bits. The product is truncated back to 26 fraction bits.

The unit removes the scale factor before applying the rule and adds it back
afterwards, so its results carry the same scale as the ALU's.

Sign rules:

* the reciprocal keeps the operand's sign;
* the square and the square root are positive (the sign of a negative root
  operand is dropped);
* x^y is negative when x is negative and the integer part of y is odd.

Results that leave the range saturate.

## Top level (`lns_unit`)

```
stage 1: log_converter x, y; + Lm (saturating)    -> regs
stage 2: lns_alu (op 0..3) or lns_unary (op 4..7) -> regs
stage 3: - Lm; antilog_converter                   -> out regs
```

`op` is `unit_op_e`:

| code | operation |
|---|---|
| 0 | add |
| 1 | subtract |
| 2 | multiply |
| 3 | divide |
| 4 | reciprocal |
| 5 | square root |
| 6 | square |
| 7 | x^y, with the binary `y` operand as the exponent |

The top takes one operation per clock and returns its result exactly three
clocks after `in_valid`. There is no back-pressure.

`rst_n` is synchronous and active low, and it clears only the valid bits.
`out_sat` reports saturation anywhere along the path. `out_lg` gives the result
logarithm with the scale factor removed.

A positive scale factor uses up headroom. Logarithms are held as `Lx + Lm`,
so a result near 2^32 can saturate even though it would fit the 32-bit output.

## Accuracy of the complete unit

The end-to-end test compares random integer operations with exact
floating-point results. It uses tolerances of:

* 0.5 % for multiply and divide;
* 0.8 % for effective additions;
* 1 % of the larger operand for effective subtractions;
* 0.5 % for reciprocal, square root and square;
* 0.3 % per unit of |y| for x^y;

plus one unit of output rounding. All these tolerances pass. Small integer
results can be off by one, because the conversion errors are relative.
Division results below 1 round to 0 or 1 unless `OUT_FRAC` adds fraction bits.

## Departures and own choices

Taken as published:

* the 6.26 format;
* the converter structure (leading-zeros counter, shifter, integer unit,
  three-level 26-bit carry-save fractional unit with a carry-propagate adder);
* both coefficient tables and the half-ulp intercept correction;
* the ALU datapath and its control table;
* the scale factor.

Choices made here, where the published description is silent:

* input and output fixed-point formats (integers by default), truncation of x
  below 26 bits, round-to-nearest output, saturation everywhere;
* the zero stand-in. Zero is not exact: the most negative code is not absorbing
  under multiplication, so multiplying by a zero input does not give exactly 0;
* the operand swap and the signed-operand control rules;
* phi ROM size, addressing and midpoint contents, with no interpolation;
* the three-stage pipeline and the valid-only handshake;
* the digit recoding of the slopes and the reuse of the carry-save evaluator in
  the antilog converter.

Also this design's own: the single-operand unit sits beside the
four-function ALU, and its scale-factor handling and sign rules are choices
made here.

Not built: energy figures, which are beyond RTL.

One discrepancy: the worst negative antilog error quoted for the source
coefficients is −0.070 %, but the listed coefficients give −0.0725 % at f = 3/8.
The RTL follows the coefficients.

## Files

| file | content |
|---|---|
| `rtl/lns_pkg.sv` | format constants, `lns_num_t`, `lns_op_e`, `lns_uop_e`, `unit_op_e`, `alu_ctrl_t`, coefficient tables, digit recoding |
| `rtl/lzc32.sv` | 32-bit leading-zeros counter |
| `rtl/pwl_sum5.sv` | shift-and-add line evaluator, 3 CSA levels + CPA |
| `rtl/log_converter.sv` | binary → logarithm |
| `rtl/antilog_converter.sv` | logarithm → binary |
| `rtl/phi_rom.sv` | phi+ / phi- ROM |
| `rtl/lns_control.sv` | ALU control decoder |
| `rtl/lns_alu.sv` | four-function LNS ALU |
| `rtl/lns_unary.sv` | reciprocal, square root, square, power |
| `rtl/lns_unit.sv` | top: converters, ALU and single-operand unit, 3-stage pipeline |
| `tb/tb_<module>.sv` | self-checking testbench per module; `tb_lns_unit` runs the top at default parameters |

Every testbench ends by printing `TB_RESULT checks=N failures=M`. To simulate,
for example, the top:

```
verilator --binary --timing --assert -Irtl -y rtl \
    rtl/lns_pkg.sv rtl/lns_unit.sv tb/tb_lns_unit.sv \
    --top-module tb_lns_unit -o sim
./obj_dir/sim
```

Replace the module and testbench names for the other blocks. The converter
testbenches print the measured error range of their sweeps.
