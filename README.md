# Single/double precision floating-point multiplier

Multimedia and graphics code does most of its floating-point multiplication
in single precision. A plain double-precision multiplier wastes most of its
53x53 mantissa array on such operands, and it produces one product per
operation. This multiplier reuses the same array for either

* **one IEEE 754 double-precision product**, `z = x * y`, or
* **two independent single-precision products at once**, with two singles
  packed in each 64-bit register: `z[63:32] = x[63:32] * y[63:32]` and
  `z[31:0] = x[31:0] * y[31:0]`.

The key idea is small. Place both 24-bit single mantissas of each operand in
one 53-bit operand. The full partial-product matrix then contains the two
single products. It also contains cross products between the lanes, and
these would corrupt both results. A mode signal switches off only those
cross-lane partial products. The reduction tree, the final adder and most of
the rounding logic stay the same as in a double-only multiplier.

The design is purely combinational, with no clock and no pipeline registers.
It gives one result (one double or two singles) per evaluation of the inputs.

## Register layout

| mode   | bits 63 | 62..52 / 62..55 | 51..0 / 54..32 | 31 | 30..23 | 22..0 |
|--------|---------|-----------------|----------------|----|--------|-------|
| double | sign    | exponent (11)   | fraction (52)  |    |        |       |
| single | sign A  | exponent A (8)  | fraction A (23)| sign C | exponent C | fraction C |

In single mode `x` holds A (upper) and C (lower), and `y` holds B and D. The
result `z` holds H = A*B (upper) and J = C*D (lower).

The mode input `sw` has type `fpm_pkg::mode_e`. `MODE_DOUBLE` is 1 and
`MODE_SINGLE` is 0.

## How the two single products share the array

`subword_mant_mod` builds each packed 53-bit operand as

```
bit 52 ......... 29 | 28 .. 24 | 23 ......... 0
    1.fraction(upper) |  zeros   | 1.fraction(lower)
```

Think of the 53x53 array as partial products `p(i,j) = a(i) & b(j)` of
weight 2^(i+j). It splits into regions:

* the **lower square** (i, j < 24): lower single product, landing in product
  bits 47..0;
* the **upper square** (i, j >= 29): upper single product, landing in bits
  105..58;
* **everything else** (the two cross-lane rectangles and the border strip
  through the zero bits): in double mode these bits belong to the product. In
  single mode they would add A*D and C*B into the middle of the result.

`cs_multiplier` therefore generates `p(i,j) = a(i) & (s & b(j))` outside the
two squares and `a(i) & b(j)` inside them, with `s = 1` in double mode. In
single mode the carry-save output sums exactly to
`(A*B << 58) + C*D`. Bits 57..48 are then zero, so the lanes cannot interfere
in the later addition. That single gated AND term per off-square partial
product is the whole cost of the dual mode inside the array. It is also why
the area overhead is small. The array is reduced by a carry-save chain, one
3:2 row per partial product. Any reduction tree would do, and it can be
swapped freely.

Inside `subword_mant_mod`, two multiplexers (`mant_mux`) choose between
`{1, x[51:0]}` / `{1, y[51:0]}` and the packed operands.

## Adding, normalizing and rounding from carry-save form

The multiplier hands over two 106-bit vectors. The product bits below bit 22
are never added explicitly:

* `carry_net` gives the carry that the low 22 bits pass into bit 22.
* `sticky_cs` gives `T`, which is 1 when the low 22 bits of the sum are not
  all zero. It works directly on the two vectors, using the identity
  `c + s == 0 (mod 2^K)  <=>  (c ^ s) == ((c | s) << 1)`.
  It needs no carry chain.

`add_norm_round` adds bits 105..22 with that carry. This gives the exact
product bits P[105:22]. From them it rounds three candidates side by side:

| result      | product bits used | sticky                   |
|-------------|-------------------|--------------------------|
| double      | P[105:51]         | T or OR(P[50:22])        |
| upper single H | P[105:80]      | OR(P[79:58])             |
| lower single J | P[47:22]       | T                        |

Bit 22 is the lowest bit that the lower single lane needs in full. Each
candidate goes through `norm_rnd`:

1. If the top product bit is set (mantissa product in [2,4)), shift right by
   one.
2. Round to nearest, ties to even, from the guard and sticky bits.
3. If rounding carries out of the mantissa, renormalize.

Each candidate's exponent increment (0, 1 or 2) goes to its exponent updater.
The top level keeps the candidates that belong to the current mode.

## Exponents and signs

The exponent path has three adders. One 11-bit adder handles double
precision, giving a 12-bit sum. Two 8-bit adders handle the single lanes,
giving 9-bit sums. Three `exp_update` blocks subtract the extra bias (1023 or
127) and add the rounding increment. Each also flags an exponent that does
not fit a normal number. Three `sign_xor` instances give the signs. The
double sign and the upper-single sign come from the same bits (63), so two of
the three XORs compute the same value.

Out-of-range results are handled as follows:

* **overflow** (biased exponent >= all ones): the result is a signed infinity
  and `ovf` is set;
* **underflow** (biased exponent <= 0): the result is a signed zero and `unf`
  is set.

Flag bit 1 belongs to the double result or to H, and bit 0 to J. Bit 0 is
always 0 in double mode.

## What is specified and what is this implementation's choice

The following come from the published design:

* the two modes and the register layout;
* masking the off-lane partial products by the mode signal;
* the block structure (exponent adders and updaters, sign XORs, subword
  mantissa modifier, operand multiplexers, carry-save multiplier, carry
  network, sticky logic, add/normalize/round unit);
* the 11/12-bit and 8/9-bit exponent widths and the 53- and 106-bit mantissa
  widths.

The following are this implementation's own choices:

* **Mode encoding.** 1 selects double. The published description states both
  polarities in different places. This encoding matches its
  partial-product equation, where the mode bit gates the extra partial
  products on.
* **Exact lane offsets** inside the packed operand, and the 22-bit split
  between the summarized and the added part of the product.
* **Rounding.** Only round to nearest even is provided, with no other IEEE
  rounding modes.
* **Operands are assumed normal.** The hidden 1 is always inserted. Zero,
  subnormal, infinity and NaN inputs are not recognized, so for example
  `0.0 * y` gives a wrong result. Results are never subnormal; they flush to
  zero.
* **Exponent increment.** The exponent updaters take the normalization and
  rounding increment as an extra input.
* **Separate fraction outputs.** The rounding unit gives separate fraction
  outputs per candidate rather than one 106-bit mantissa bus.
* **Where the masking lives.** The partial-product masking is done inside
  the multiplier's partial-product generation, which receives the mode
  signal. The published description attributes the masking equation to the
  mantissa modifier, but its block diagram routes the mode signal into the
  multiplier. The result is the same either way.
* **No sign inputs on the modifier.** The published block diagram also feeds
  the two lane signs into the mantissa modifier without giving them a role.
  Packing needs no sign, so the modifier has no such inputs.
* **Simple internals.** The carry network and the exponent adders are plain
  behavioural adds, the simplest correct form. Synthesis chooses their
  structure.

The published evaluation is a gate-count and delay comparison in a 0.18 um
standard-cell library: about 10% more gates and about 34% more delay than a
double-only multiplier. It cannot be reproduced from RTL alone. Nothing here
claims those numbers.

## Files

`rtl/` holds one module or package per file:

| file | role |
|------|------|
| `fpm_pkg.sv` | widths, lane offsets, `mode_e` |
| `fp_sd_mul.sv` | top level: wiring, result packing, flags |
| `exp_adder.sv`, `exp_update.sv`, `sign_xor.sv` | exponent and sign path |
| `subword_mant_mod.sv`, `mant_mux.sv` | operand packing and selection (the muxes sit inside the modifier) |
| `cs_multiplier.sv` | 53x53 array with mode-gated partial products |
| `carry_net.sv`, `sticky_cs.sv` | carry and sticky of the low product bits |
| `add_norm_round.sv`, `norm_rnd.sv` | final add, normalization, rounding |

`tb/` has one self-checking testbench per block (`tb_<module>.sv`; `norm_rnd` is
covered through `tb_add_norm_round`) and a
reference package, `fpm_ref_pkg.sv`. The reference rounds from the exact
integer product by comparing the remainder with half an ulp. This is
deliberately a different method from the RTL's guard/sticky logic.
`tb_fp_sd_mul` runs the full design at its only size with these inputs:

* 4000 random and directed operations in alternating modes;
* products just below 2.0, so that rounding carries out of the mantissa;
* exponent overflow and underflow in both modes.

It checks doubles also against the simulator's native IEEE multiplication.
It fails if any of these never happened: each mode, a mode switch, a
normalization shift, round-up, rounding carry-out, overflow, underflow.

Each testbench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/fpm_pkg.sv tb/fpm_ref_pkg.sv tb/tb_fp_sd_mul.sv \
    --top-module tb_fp_sd_mul -o sim
./obj_dir/sim
```

Replace `tb_fp_sd_mul` with any other `tb_<module>` to test one block. The
top-level test takes well under a second.

## Changing it

* A different reduction tree (Wallace, Dadda, 4:2 compressors) can replace
  the carry-save chain in `cs_multiplier`. Keep the partial-product gating and
  the property that `c + s` equals the product modulo 2^106.
* For pipelining, the natural cut points are the carry-save vectors (after
  `cs_multiplier`) and the rounded fractions. Add matching registers in the
  exponent path.
* Other rounding modes only need a new `norm_rnd` decision, since the guard,
  sticky, sign and LSB are all available there.
* `LO` and `HI` in `cs_multiplier` and the constants in `fpm_pkg` define the
  lane placement. They must agree with `subword_mant_mod`.
