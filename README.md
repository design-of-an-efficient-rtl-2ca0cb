# Single precision floating point unit (Brent-Kung adder, radix-4 Booth multiplier)

This is a combinational IEEE 754 binary32 floating point unit. It adds, subtracts,
multiplies and divides two 32-bit operands and rounds the result in one of four rounding
modes. Its two arithmetic cores are the parts the design is built around:

- a **Brent-Kung parallel-prefix adder** for the significand addition and subtraction;
- a **radix-4 (modified) Booth multiplier** for the significand product.

Around them sit the usual floating point stages: pre-normalisation, a divider,
post-normalisation with rounding, and an exceptions unit. Subnormal operands and results,
signed zeros, infinities and NaNs are all handled.

The block structure follows a published FPU design that uses these two cores. That
description gives the block diagram, the Brent-Kung cell structure, the add/subtract
alignment scheme and the normalisation flow of the multiply path. It does not give the
divider, the rounding logic or the exception rules. Those parts are this implementation's
own choices, made to follow IEEE 754, and they are marked as such below and in each file's
header.

## Interface

`fpu_top` has no clock and no reset. The result is valid one combinational propagation
delay after the inputs change.

| port | dir | width | meaning |
|---|---|---|---|
| `opa`, `opb` | in | 32 | operands, binary32 |
| `fpu_op` | in | 2 | 0 add, 1 subtract (`opa - opb`), 2 multiply, 3 divide (`opa / opb`) |
| `mode` | in | 2 | rounding: 0 nearest-even, 1 toward zero, 2 toward +inf, 3 toward -inf |
| `result` | out | 32 | binary32 result |
| `zero` | out | 1 | result is +0 or -0 |
| `snan` | out | 1 | an operand is a signalling NaN |
| `qnan` | out | 1 | result is NaN (always the quiet NaN `7FC00000`) |
| `inf` | out | 1 | result is an infinity |
| `ine` | out | 1 | result is inexact |
| `overflow` | out | 1 | exponent overflow (result is infinity or the largest finite number) |
| `underflow` | out | 1 | result is tiny (before rounding) and inexact |
| `div_by_zero` | out | 1 | finite nonzero number divided by zero |

The operation order (add, subtract, multiply, divide for codes 0 to 3) matches the
reference design's simulation. The names `mode`, `fpu_op` and the flag names follow its
block diagram. The rounding-mode encoding is this implementation's choice.

## Data path

```
             +--> fpu_prenorm_addsub --> fpu_addsub (48-bit bk_adder) --+
opa, opb ----+                                                          |  raw result
             +--> fpu_prenorm_muldiv -+-> booth_mul (25 x 25) ----------+--> fpu_postnorm --> result
                                      +-> fpu_div (restoring) ----------+        ^     |
             +--> fpu_except (special cases) -----------------------------------+     v
                           ^----------------------- final result, rounding flags -----+--> flags
```

### The raw-result format

The hardest part to follow is the single format in which all three arithmetic paths hand
their result to post-normalisation. It is worth understanding before reading any of the
files. A raw result is:

- `sign`;
- `exp`, a signed 12-bit **unbiased** exponent;
- `man`, a 48-bit significand whose value is `man / 2^46`, so bit 46 has weight 1 and bit
  47 is head room for a value up to 4;
- `sticky`, set if nonzero bits were already dropped.

The value is `(-1)^sign * man/2^46 * 2^exp`. Each path fills this format in its own way:

| path | `man` | `exp` | `sticky` |
|---|---|---|---|
| add/sub | X +- Y, each 24-bit significand at bits 46..23 | exponent of the larger operand | 0 (folded into bit 0, see below) |
| multiply | the 48-bit product of two normalised significands (value in [1, 4)) | sum of exponents | 0 (product is exact) |
| divide | 26-bit quotient `floor(a*2^25/b)` at bits 46..21 | difference of exponents | remainder nonzero |

Twelve exponent bits are needed because the product of two subnormals reaches 2^-298 and
the quotient of extreme values reaches 2^+276.

### Add and subtract

`fpu_prenorm_addsub` unpacks the operands. A subnormal or zero operand uses exponent 1 and
a 0 hidden bit. A subtraction flips B's sign. Comparing the two signs gives the effective
operation `eff_sub`. Comparing the exponents, and then the significands when the exponents
are equal, names the larger magnitude X. A subtractor forms the exponent difference, and
Y's significand is shifted right by it inside the 48-bit field. Every bit shifted out
below bit 0 is ORed into bit 0 (a "sticky jam"). The 23 guard bits plus the jammed bit
make the rounding exact: when bits are lost the exponent gap is at least 24, so at most
one bit of left normalisation can follow.

`fpu_addsub` computes `X + Y` or `X + ~Y + 1` on a 48-bit Brent-Kung adder. Because X is
the larger magnitude, the difference is never negative, and the result takes X's sign.
An exact zero from a true subtraction is +0, or -0 when rounding toward -infinity.

### Multiply and divide

`fpu_prenorm_muldiv` shifts a subnormal significand left until its leading one reaches
bit 23, and lowers its exponent by the same amount. The multiplier and the divider
therefore always see significands in [1, 2). This stage also adds the exponents (multiply),
subtracts them (divide) and XORs the signs.

The multiplier is `booth_mul` at 25 bits: the unsigned 24-bit significands get a zero sign
bit. The divider `fpu_div` is a restoring array. Its first step takes the integer quotient
bit, each of the 25 further steps shifts the remainder left and subtracts the divisor when
it fits, and the final remainder gives the sticky bit. With significands in [1, 2) the
quotient lies in (1/2, 2), so 26 quotient bits always give 24 result bits plus a guard bit.

### Post-normalise and round

`fpu_postnorm` works in six steps:

1. A zero significand gives a signed zero.
2. A leading-zero count shifts `man` left until bit 47 is set, and the exponent is adjusted
   to match. A carry into bit 47 (add overflow, or a product of 2 or more) is the same
   operation with a count of 0: the exponent goes up by one.
3. If the exponent is now below -126, the significand is shifted right into the subnormal
   range, and the lost bits go into sticky.
4. Bits 47..24 are kept. Bit 23 is the guard bit and everything below it (plus `sticky`)
   is the sticky bit. The increment follows the mode. A carry out of rounding gives
   `1.000...` with the exponent plus one. A subnormal that rounds up to 2^-126 becomes
   normal on its own, because the exponent field is taken from whether bit 23 of the
   rounded significand is set.
5. A biased exponent of 255 or more is an overflow. The result is infinity, or the largest
   finite number when the mode rounds toward zero for that sign.
6. If the exceptions unit flagged a special case, its result replaces the rounded one.

### Exceptions unit

`fpu_except` classifies the operands and finds the results that bypass arithmetic:

- a NaN operand or an invalid operation gives `7FC00000`. The invalid operations are
  inf - inf as a true subtraction, 0 * inf, 0 / 0 and inf / inf;
- an infinite operand, or a finite nonzero number divided by 0, gives a signed infinity;
- 0 * x, 0 / x and x / inf give a signed zero.

It then forms the flags from the final result and from the post-normalisation's rounding
flags. Within the module the special-case decision and the flag logic are separate
processes, so the path from the unit through post-normalisation and back to the flags is
not a combinational loop.

## Brent-Kung adder (`bk_adder`)

The adder has a `WIDTH` parameter, 32 by default. Pre-computation forms `g = a & b` and
`p = a ^ b`, with the carry-in folded into bit 0's generate. The prefix tree combines
(G, P) pairs with two kinds of cell:

- a **black** cell computes `G = Gh | Ph & Gl` and `P = Ph & Pl`;
- a **gray** cell computes only G. It is used where the lower group already reaches bit 0.

The tree runs an up-sweep of log2(WIDTH) levels, which builds groups of 2, 4, 8, ... bits.
A down-sweep of log2(WIDTH) - 1 levels then completes the remaining positions. The sum is
`p ^ carry`. A 32-bit adder therefore has 9 cell levels and 57 cells. The code walks the
levels in one `always_comb`, and the conditions on the indices pick out exactly the
positions that hold a cell. Any width works. The FPU uses the adder at 48 bits.

## Radix-4 Booth multiplier (`booth_mul`)

The multiplier has a `WIDTH` parameter, 24 by default, and takes two's complement
operands. The multiplier operand is scanned in overlapping triplets
`(b[2j+1], b[2j], b[2j-1])`, with `b[-1] = 0`. Each triplet is recoded to a digit in
{-2, -1, 0, +1, +2}, so there are `ceil(WIDTH/2)` partial products instead of `WIDTH`.
A digit of 2 selects `a << 1`. A negative digit takes the one's complement and adds 1 at
that partial product's position. The partial products are summed with ordinary adders:
no Wallace or Dadda tree is specified.

The reference design shows its multiplier as the classic Booth flowchart: A, Q, Q-1
registers, add or subtract M on the pair (Q0, Q-1), then an arithmetic shift right. That
flowchart is the sequential radix-2 form of the algorithm. This implementation builds the
radix-4 recoded array that the design names instead. It does not build the sequential
multiplier.

## Where this departs from, or adds to, the reference design

- **Added because the reference design does not describe them:** the divider's insides,
  the rounding logic, support for subnormals, the exception rules, the `overflow` and
  `underflow` outputs, and the canonical NaN. The reference design says only that it
  adheres to IEEE 754.
- **Combinational:** no clocking is described, so nothing is registered. The critical
  path runs through pre-normalisation, the divider array and post-normalisation. Pipeline
  registers would be needed to reach a useful clock rate.
- **`div_by_zero`** is raised by the exceptions unit, which already classifies the
  operands. In the reference block diagram this output is drawn next to the divide unit.
- **Logical operations:** the reference design's goals mention "other logical operations"
  besides the four arithmetic ones, but it never defines them, so none are built.
- **NaN payloads** are not propagated: every NaN result is `7FC00000`.
- **Tininess** is detected before rounding. IEEE 754 allows either choice.
- **Cell counts and power** reported for the reference design's 45 nm synthesis (for
  example 72 cells for the 32-bit Brent-Kung adder and 2246 cells for the FPU) are not
  claims about this RTL.

## Files

`rtl/`:

| file | contents |
|---|---|
| `fpu_pkg.sv` | binary32 struct, operation and rounding-mode enums, operand classification |
| `fpu_top.sv` | the FPU |
| `fpu_prenorm_addsub.sv` | sign/exponent compare, exponent subtractor, alignment shifter |
| `fpu_addsub.sv` | significand add/subtract on the Brent-Kung adder |
| `fpu_prenorm_muldiv.sv` | subnormal normalisation, exponent add/subtract |
| `booth_mul.sv` | radix-4 Booth multiplier |
| `fpu_div.sv` | restoring significand divider |
| `fpu_postnorm.sv` | normalise, round, overflow/underflow, pack |
| `fpu_except.sv` | special cases and flags |
| `bk_adder.sv` | Brent-Kung adder |

`tb/`: one self-checking testbench per module (`tb_<module>.sv`), plus `fp32_ref_pkg.sv`.

## Verification

`fp32_ref_pkg` is a reference model that shares nothing with the RTL's datapath. It
writes every finite operand as an integer times a power of two, computes sums and
products exactly in 400-bit integers (quotients with 80 extra bits and a remainder flag),
and rounds the exact value once. The end-to-end test `tb_fpu_top` uses it as follows:

- it first checks the worked examples of the reference design's simulation, such as
  -1.5 + 7.0 = 5.5, 6.0 - 1.0 = 5.0, -3.0 * 2.5 = -7.5 and 6.0 / 2.0 = 3.0;
- it then runs 500,000 random vectors over all operations and modes, and compares the
  result and every flag;
- the operands are mixed from raw bits, nearby exponents (for cancellation), subnormals,
  values near overflow, zeros, infinities and NaNs;
- it counts how often each mechanism occurred, and fails if any never did. The mechanisms
  are: each operation and mode, add carry-out, cancellation, rounding increment, overflow,
  underflow, subnormal operands and results, divide by zero, NaN and signalling-NaN cases,
  infinite, zero and exact results.

Each sub-block's testbench checks that block alone against simulator arithmetic or
against the reference model.

To run one with Verilator (5.x):

```
verilator --binary --timing -Wno-fatal --top-module tb_fpu_top \
  rtl/fpu_pkg.sv tb/fp32_ref_pkg.sv rtl/*.sv tb/tb_fpu_top.sv
./obj_dir/Vtb_fpu_top
```

Each test ends by printing `TB_RESULT checks=N failures=M`.
