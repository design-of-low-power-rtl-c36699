# Combined Booth–Vedic 32x32 multiplier

This is a combinational 32x32-bit multiplier. It combines two classic ideas:

* **Vedic decomposition ("vertically and crosswise").** Each 32-bit operand is
  split into two 16-bit halves. The product is rebuilt from the four half
  products: the two "vertical" ones (low·low, high·high) and the two
  "crosswise" ones (high·low, low·high). All four are formed in parallel.
* **Mixed multiplier units.** Two of the four half products come from 16x16
  Vedic multipliers and two from 16x16 radix-4 Booth multipliers.

The 16x16 units are built the same way one level down, from four 8x8 units.
Carry select adders sum the partial products at the 32-bit level. Ripple carry
adders sum them at the 16-bit level.

The same core also computes the significand product of an IEEE 754
single-precision multiplier. The top level provides both functions: a signed
32x32 integer multiplier and a float32 multiplier.

Everything is combinational. There is no clock, no reset and no handshake:
outputs follow the inputs after the propagation delay. If you need a pipeline
or registered I/O, put flip-flops around `low_power_multiplier_top`.

## Block hierarchy

```
low_power_multiplier_top
├── signed_mult_32x32            signed a*b, four sign conditions
│   └── combined_mult_32x32      unsigned 32x32 -> 64 core
│       ├── z1 vedic_16x16       aL*bL   ── four vedic_8x8 + three ripple_carry_adder
│       ├── z2 booths_16x16      aH*bL   ── booth_multiplier #(16) (+ an 8x8-based copy, see below)
│       ├── z3 vedic_16x16       aL*bH
│       ├── z4 booths_16x16      aH*bH
│       ├── add_32    carry_select_adder #(32)
│       ├── add_48    carry_select_adder #(48)
│       └── add_48_v2 carry_select_adder #(48)
└── fp_multiplier                IEEE 754 single precision
    └── combined_mult_32x32      24x24 significand product (operands zero-extended)
```

`mult_pkg` holds the Booth recoding type and function, plus the float32 struct
and constants.

## How the four half products are recombined

This is the part most worth understanding. The same pattern appears at both
levels: 32 bits from 16-bit units, and 16 bits from 8-bit units. Let `h` be the
half width (16 in `combined_mult_32x32`, 8 in the 16x16 units). Write
`a = aH·2^h + aL` and `b = bH·2^h + bL`. The four units produce

```
q0 = aL*bL    q1 = aH*bL    q2 = aL*bH    q3 = aH*bH      (each 2h bits)
```

and the product is `q0 + (q1 + q2)·2^h + q3·2^(2h)`. Instead of one wide
four-input sum, the design uses three two-input adders, with the low `h` bits
of `q0` bypassing all of them:

```
q4 = {h zeros, q0[2h-1:h]} + q1          2h bits    (add_32  / add_16_bit)
q5 = {h zeros, q2} + {q3, h zeros}       3h bits    (add_48  / add_24_bit)
q6 = {h zeros, q4} + q5                  3h bits    (add_48_v2 / add_24_bit)
c  = {q6, q0[h-1:0]}                     4h bits
```

None of these sums can overflow its width. For `q4`:
`(2^h−1)^2 + (2^h−1) < 2^(2h)`. `q6` is the exact upper part of the full
product, which fits in `3h` bits. The adders' carry-outs are therefore always
0. They are left unconnected.

A worked example for `a = b = aaaaaaaa` (hex): all four `q` are `71c638e4`.
Then `q4 = 71c6aaaa`, `q5 = 71c6aaaa38e4`, `q6 = 71c71c70e38e`, and
`c = 71c71c70e38e38e4`. The testbench checks these intermediate values.

The half-to-unit assignment (`q1 = aH*bL` on a Booth unit, and so on) is this
design's choice. Any assignment gives the same product.

## The 16x16 units

**`vedic_16x16`** applies the recombination above with four `vedic_8x8`
blocks and three ripple carry adders (16, 24 and 24 bits).

**`booths_16x16`** has two outputs:

* `c` comes from one 16x16 radix-4 Booth multiplier (`p1`). This is the output
  `combined_mult_32x32` uses.
* `c1` is the same product, built like `vedic_16x16` but with four 8x8 Booth
  multipliers.

Both are kept because the reference schematic of this unit contains both
structures. Inside `combined_mult_32x32` only `c` is used, so a synthesis tool
removes the 8x8-based copy there. If you want the Booth half products built
from 8x8 Booth units instead, connect `c1`.

## The leaf multipliers

**`vedic_8x8`** is a direct circuit for the Urdhva Tiryakbhyam procedure.
Result column `k` adds every bit product `a[i]&b[j]` with `i+j = k`, plus the
carry left from column `k−1`. The LSB of that sum becomes result bit `k`; the
rest is carried into column `k+1`. The carry into column 0 is zero, and the
last carry becomes bit 15. In synthesis this becomes a column compressor. The
8x8 block is written this way directly, not built recursively from 4x4/2x2
Vedic blocks.

**`booth_multiplier #(WIDTH)`** is a radix-4 Booth multiplier. The multiplier
is scanned in overlapping three-bit groups `{y[2i+1], y[2i], y[2i−1]}`. Each
group selects 0, ±M or ±2M of the multiplicand M. Groups `000` and `111` add
nothing. The operands are **unsigned**: the multiplier is zero-extended by two
bits, which gives `WIDTH/2 + 1` partial products. These are sign-extended,
shifted and summed. `WIDTH` must be even. The default is 8; the 16x16 unit
uses 16.

## Adders

* **`ripple_carry_adder #(WIDTH)`** is a chain of full adders, with carry-in and
  carry-out. It is used at 16 and 24 bits inside the 16x16 units, and as the
  building block of the carry select adder.
* **`carry_select_adder #(WIDTH, BLOCK)`** splits the sum into `BLOCK`-bit
  blocks (default 4). Every block above the lowest is computed twice, once for
  carry-in 0 and once for carry-in 1. The real carry picks one of the two
  results. `WIDTH` must be a multiple of `BLOCK`. It is used at 32 and 48 bits.

## Signed multiplication

`combined_mult_32x32` is unsigned: `ffffffff * ffffffff = fffffffe00000001`.
`signed_mult_32x32` adds two's-complement operation by distinguishing the four
sign conditions:

| a | b | result |
|---|---|--------|
| ≥0 | ≥0 | \|a\|·\|b\| |
| <0 | ≥0 | −\|a\|·\|b\| |
| ≥0 | <0 | −\|a\|·\|b\| |
| <0 | <0 | \|a\|·\|b\| |

The magnitude of −2^31 is 2^31, which still fits the unsigned 32-bit core.
This costs two 32-bit negations at the input and one 64-bit negation at the
output.

## Floating-point multiplier

`fp_multiplier` multiplies two IEEE 754 single-precision numbers (`X`, `Y` →
`MULT`):

1. The result sign is `X.sign ^ Y.sign`.
2. Both 24-bit significands (hidden 1 restored) go through
   `combined_mult_32x32`, zero-extended to 32 bits. The product `m_XY` is 48
   bits, in [2^46, 2^48).
3. Normalisation: if bit 47 is set, the fraction is `m_XY[46:24]` and the
   exponent goes up by one. Otherwise the fraction is `m_XY[45:23]`.
4. The exponent is `e_X + e_Y − 127`, plus the normalisation bit.

Rounding and special values are this design's choices:

* The fraction is **truncated** (round toward zero). There is no
  round-to-nearest.
* A zero exponent is read as zero, so subnormal inputs flush to zero.
* A NaN input, or infinity × zero, gives the quiet NaN `7fc00000`.
* Infinity × a finite non-zero value gives a signed infinity.
* If the result exponent is 255 or more, the output is a signed infinity. If
  it is 0 or less, the output is a signed zero. Subnormal results are not
  produced.

Examples: `3f000000 × 3fa00000 = 3f200000` (0.5 × 1.25 = 0.625) and
`7e000000 × 3fa00000 = 7e200000`.

## Top-level interface

| port | dir | width | meaning |
|------|-----|-------|---------|
| `int_a`, `int_b` | in | 32 signed | integer operands |
| `int_p` | out | 64 signed | `int_a * int_b` |
| `fp_x`, `fp_y` | in | 32 | float32 operands |
| `fp_p` | out | 32 | float32 product (truncated) |

The top has no parameters. The two paths are independent, and each has its
own copy of the 32x32 core.

## How far to trust it, and where it departs from the original design

* All blocks are checked against independent reference models (see below).
  Published example values are checked where they exist, including the
  intermediate sums of the 32x32 core.
* The original design calls the 32x32 multiplier "signed", but its published
  results are unsigned products. Here the core is unsigned, and signedness
  comes from the separate `signed_mult_32x32` wrapper. The four sign conditions
  in that wrapper are a reconstruction.
* Adder widths: the original text mentions two 32-bit and one 64-bit adder,
  and its schematic shows one 32-bit and two 64-bit adders. Here the widths
  are 32, 48 and 48, which is what the recombination needs and what the
  published intermediate signals show.
* The carry select block size (4 bits) is this design's choice.
* The insides of the 8x8 Vedic and Booth leaves and of the direct 16x16 Booth
  unit are this design's choice. Only their function and ports are fixed.
* The original 16x16 unit symbols have a 1-bit input `v` whose purpose is not
  documented. It is not implemented.
* FPGA output buffers on the product buses are not modelled. Plain ports are
  used instead.
* The floating-point special-case logic and the choice of truncation
  rounding are this design's own. They follow IEEE 754 practice but are not
  fully IEEE-compliant: there is no round-to-nearest-even and no subnormal
  support.
* The original work reports FPGA delay and power figures. Nothing here
  reproduces or checks them.

## Verification

Each block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and is guarded by a watchdog:

| testbench | what it covers |
|-----------|----------------|
| `tb_ripple_carry_adder` | 16- and 24-bit, corners + 2000 random, both carry-ins |
| `tb_carry_select_adder` | 32- and 48-bit, carries across every block boundary + random |
| `tb_vedic_8x8` | exhaustive, 65 536 pairs |
| `tb_booth_multiplier` | 8-bit exhaustive, 16-bit corners + random |
| `tb_vedic_16x16`, `tb_booths_16x16` | published examples, intermediate sums, random |
| `tb_combined_mult_32x32` | published examples with every intermediate value, random |
| `tb_signed_mult_32x32` | all four sign conditions (each counted), −2^31 extremes, random |
| `tb_fp_multiplier` | published examples; exact products compared as real numbers; random against an integer model; zero, inf, NaN, overflow, underflow |
| `tb_low_power_multiplier_top` | both paths end to end at the default configuration; fails if any sign condition or floating-point outcome class never occurs |

`tb/fp_ref_pkg.sv` holds the floating-point reference model that the last two
testbenches share.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/mult_pkg.sv tb/fp_ref_pkg.sv tb/tb_low_power_multiplier_top.sv \
    --top-module tb_low_power_multiplier_top -Mdir obj_top
./obj_top/Vtb_low_power_multiplier_top
```

Replace the testbench name to run another one. Verilator finds the RTL modules
in `rtl/` by file name (one module per file). `fp_ref_pkg.sv` is needed only
by the two floating-point testbenches. To lint a module:

```
verilator --lint-only -Wall -Irtl rtl/mult_pkg.sv rtl/combined_mult_32x32.sv
```

Lint reports only unused-signal warnings. These are the adders' carry-outs
(always 0 by construction), the unused `c1` output of `booths_16x16` inside the
32x32 core, and the unused low product bits in the floating-point multiplier.
