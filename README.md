# Sloppy addition and multiplication

Some applications can tolerate small numeric errors. Image filtering and JPEG
decoding are two examples. In those cases the arithmetic units can give up a
little accuracy for a shorter critical path, a smaller area and lower power.
This design does that in two places:

* **Sloppy adder.** No carry is computed in the K least-significant bits.
  Each low sum bit is the OR (or the XOR) of the two operand bits. The upper
  bits form an ordinary ripple-carry sum with a carry-in of 0, so the carry
  chain is K bits shorter.
* **Sloppy multiplier.** The multiplier is a radix-4 design. For its KS
  least-significant multiplier digits, the recoder and partial-product (PP)
  generator are replaced by a single OR gate and an AND row. Every nonzero
  digit is treated as 2.

The two ideas are then combined in a multiply-accumulate (MAC) unit for a
direct, sum-of-products IDCT (the inverse DCT used in JPEG decoding).

The RTL provides three units at their evaluated sizes:

| unit | module | default size |
|---|---|---|
| adder | `sloppy_adder` | 8 bits, K = 4 carry-free bits, OR-ed |
| multiplier | `sloppy_mult` | 8x8 two's complement, KS = 2 sloppy radix-4 digits |
| MAC | `sloppy_mac` | 12x12 multiplier with KM = 3 sloppy digits, 24-bit adder with KA = 8 carry-free bits |

`sloppy_arith_top` places the three units side by side, each with its own ports.

## The sloppy adder (`sloppy_adder`)

For bit i < K: `s[i] = a[i] | b[i]` (or `a[i] ^ b[i]` with `LOW_OR=0`), and no
carry is formed.
For bit i >= K: a full adder whose carry starts at 0 at bit K.

The error is always an under-estimate:

* The XOR version loses `2*(a_lo & b_lo)`.
* The OR version loses `a_lo & b_lo`, because `a+b = (a|b) + (a&b)`.

For N = 8, K = 4, the mean error over all operand pairs is therefore 7.5 (XOR)
or 3.75 (OR). The OR version is the default. The largest possible error is
2^K - 1 (OR) or 2^(K+1) - 2 (XOR).

Example: 103 + 70 gives 167 with OR, 161 with XOR and 173 exactly.

K = 0 gives an exact ripple-carry adder. The other blocks use this to build
their exact reference variants.

## The sloppy multiplier

The multiplier works in three steps:

1. **PP generation (`pp_array`).**
2. **Carry-free reduction to two operands (`csa_reducer`).**
3. **Final addition (`sloppy_adder`).**

### Partial-product generation

This is the hardest part to get right.

The multiplier operand y is split at bit 2*KS:

    y = y_hi * 4^KS + y_lo        y_hi signed, y_lo unsigned

**Low part (sloppy).** `y_lo` consists of KS plain radix-4 digits d in
{0, 1, 2, 3}. Each goes through `sloppy_r4_ppgen`, which outputs `2x` when
d != 0 and `0` otherwise.

| d | exact PP | sloppy PP | error |
|---|---|---|---|
| 0 | 0  | 0  | 0  |
| 1 | x  | 2x | +x |
| 2 | 2x | 2x | 0  |
| 3 | 3x | 2x | -x |

(Each row is multiplied by 4^k for digit k.)

A sloppy PP is never negative, so no negation hardware is needed. The recoder
is one OR gate.

**High part (exact).** `y_hi` is recoded by ordinary modified-Booth recoding
(`booth_r4_ppgen`). Each triplet `{y[2k+1], y[2k], y[2k-1]}` becomes a digit in
{-2..2}.

For the first exact digit, the bit below the triplet is forced to 0. This is
essential for correctness. The sloppy digits do not pass a Booth transfer
upward, and with this bit forced to 0 the exact part encodes exactly the signed
value of `y_hi`.

A negative digit selects the one's complement of x or 2x, and raises a `neg`
bit. All `neg` bits go into one extra row, at the weight of their digit.

The array therefore has N/2 + 1 rows. Each row is sign-extended to the full
width W and shifted by 2k. Their sum modulo 2^W is `x * y'`, where `y'` is y
with its low digits made sloppy.

For 8x8 with KS = 2, taken over all 2^16 operand pairs:

* **Mean |error|:** 144. That is the mean |x| of 64 times E|e0 + 4e1| = 2.25.
* **Largest |error|:** 640.

KS = 0 gives an exact radix-4 Booth multiplier.

### Reduction and final adder

`csa_reducer` is a linear array of 3:2 carry-save adders. It folds one row at
a time into a (sum, carry) pair, so no carry moves more than one bit. Its
delay depends on the number of rows, not on the width.

In `sloppy_mult`, the final adder is exact by default (`KA = 0`). The
multiplier's error is then due only to its sloppy digits. Setting `KA` makes
the final adder sloppy as well.

## The multiply-accumulate unit (`sloppy_mac`)

The MAC folds the accumulator into the product's carry-save array as one more
row. Per cycle:

    rows   = pp_array(x, y)  ++  (clr ? 0 : acc)     N/2 + 2 rows of W bits
    s, c   = csa_reducer(rows)
    acc   <= sloppy_adder(s, c)                      (K = KA)

A single W-bit adder does both the product's final addition and the
accumulation.

**Timing:**

* One operation is accepted per clock when `en` is high.
* The result appears on `acc` after the next rising edge, and `acc_valid` is
  high in that cycle.
* With `en` low, `acc` holds.
* `clr` starts a new sum: the old accumulator is replaced by 0 in the array.
* `rst_n` is asynchronous and active low.
* The accumulator wraps modulo 2^W. Since two's complement accumulation is
  exact modulo 2^W, intermediate overflow does no harm as long as the final
  sum fits.

**Error per operation.** Each operation adds the multiplier's sloppy-digit
error, `x * (y' - y)`. With the OR-ed adder, it can also lose between 0 and
2^KA - 1 (at most 255 for KA = 8).

**The four configurations.** Setting `KM = 0` and/or `KA = 0` gives the
regular/sloppy combinations:

| configuration | multiplier | adder |
|---|---|---|
| R-R | KM = 0 | KA = 0 |
| S-R | KM = 3 | KA = 0 |
| R-S | KM = 0 | KA = 8 |
| S-S (default) | KM = 3 | KA = 8 |

### Using it for an IDCT

Each output pixel of an 8x8 block is the sum of 64 products. Each product is
`F(u,v) * w(i,j,u,v)`, with

    w = C(u) C(v) / 4 * cos((2i+1) u pi/16) * cos((2j+1) v pi/16)

In the testbenches:

* The coefficient F drives `x`, so the sloppy digits act on the constant
  weight.
* The weight, scaled by 2^12 and rounded, drives `y`. Its magnitude is at most
  1024, so it fits 12 bits.
* The pixel is `(acc + 2048) >>> 12`.

This operand assignment and scaling are the testbench's choice. Sequencing the
IDCT (addressing the coefficients and the weight table) is left to the user of
the MAC.

## Measured accuracy

These figures come from the testbenches, at the default sizes.

**Adder and multiplier** (exhaustive over all 2^16 operand pairs):

| unit | mean error | largest error |
|---|---|---|
| adder, OR | 3.75 | 15 |
| adder, XOR | 7.5 | 30 |
| 8x8 multiplier | 144 (absolute) | 640 (absolute) |

**IDCT** (32 synthetic 8x8 blocks, error in pixel levels against a
floating-point IDCT of the same integer coefficients):

| configuration | mean | max |
|---|---|---|
| R-R | 0.21 | 0.52 |
| S-R | 0.61 | 1.63 |
| R-S | 0.74 | 1.38 |
| S-S | 0.75 | 2.17 |

The IDCT error depends strongly on the image content, because the
multiplier's error is proportional to the coefficient. Decoding real JPEG
images, with quantized coefficients and large DC terms, can give larger
errors; this RTL has not been run on such images.

## Where this RTL goes beyond what is specified

These parts were not given by the description the design follows. They are
this design's own choices:

* **`pp_array`:** sign extension to full width, and the separate +1 row for
  the Booth negation.
* **`csa_reducer`:** the linear shape of the carry-save array.
* **Sloppy-digit transfer bit:** the zero transfer bit into the first exact
  Booth digit.
* **`sloppy_mac` accumulator:** merging the accumulator into the carry-save
  array ahead of a single adder.
* **`sloppy_mac` control and reset:** the `en`/`clr`/`acc_valid` control and
  the asynchronous reset.
* **Adder defaults and ports:** OR as the default low-bit function, and the
  carry-out port.
* **Maximum multiplier error:** this design's maximum for the 8x8 multiplier
  is 640, against a quoted 657. The quoted mean, 145, matches this design's
  144.
* **Filters and IDCT sequencer:** the image filters (smoothing, sharpening,
  edge detection) that the adder was evaluated on are not included, because
  their masks are not specified. There is no IDCT sequencer either.

## Files

The `rtl/` files:

| file | contents |
|---|---|
| `sloppy_pkg.sv` | default sizes, the radix-4 select type, Booth and sloppy recoding functions |
| `sloppy_adder.sv` | adder |
| `booth_r4_ppgen.sv` | exact radix-4 recoder + PP generator, one digit |
| `sloppy_r4_ppgen.sv` | sloppy recoder + PP generator, one digit |
| `pp_array.sv` | all partial products of an N x N multiplier |
| `csa_reducer.sv` | carry-save reduction to two operands |
| `sloppy_mult.sv` | combinational multiplier |
| `sloppy_mac.sv` | registered multiply-accumulate |
| `sloppy_arith_top.sv` | the three units side by side |

The `tb/` files: each module `X` has a self-checking `tb_X.sv`. Each ends by
printing `TB_RESULT checks=N failures=M`.

* **Exhaustive:** the adder, multiplier and PP tests check all 2^16 operand
  pairs against integer reference models, and check the mean errors quoted
  above.
* **`tb_sloppy_mac`:** runs the exact, sloppy-multiplier and default
  configurations on random stimulus. It checks the latency and the 0..255 loss
  bound.
* **`tb_sloppy_arith_top`:** runs the top at its default sizes. It runs the
  exhaustive adder and multiplier tests, then a full 8x8 IDCT of 16 synthetic
  image blocks. It compares against a floating-point IDCT and counts that every
  mechanism occurs: dropped carries, both signs of sloppy-digit error, negative
  Booth digits, and MAC clear/accumulate/hold/adder loss.
* **`tb_idct_configs`:** runs the same IDCT through the four R/S
  configurations of the MAC and reports their pixel errors side by side.

Simulating with Verilator, for example:

    verilator --binary --timing --assert -Irtl rtl/sloppy_pkg.sv \
        tb/tb_sloppy_arith_top.sv --top-module tb_sloppy_arith_top
    ./obj_dir/Vtb_sloppy_arith_top

Every testbench finishes in well under a second.
