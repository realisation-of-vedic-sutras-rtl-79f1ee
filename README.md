# Adaptive Vedic 8x8 multiplier

Most products do not need the full partial-product array of a general
multiplier. The "sutras" of Vedic arithmetic are shortcuts that apply when
the operands have some special decimal shape: a multiplier of 9 or 99, or
two operands with the same leading digits. This design multiplies two 8-bit
unsigned numbers with four sutra units placed side by side. A control unit
looks at the operands as decimal numbers and routes them to the unit whose
shortcut applies. When no shortcut applies, a general Urdhva Tiryagbhyam
("vertically and crosswise") multiplier does the work. The 16-bit product
always equals `multiplicand * multiplier`, whichever unit produced it.

The whole design is combinational. There is no clock and no reset. The
product and the selected sutra settle one combinational delay after the
operands change.

```
 multiplicand ─┬──────────────► ┌──────────────┐
 multiplier  ──┤                │ control_unit │── sutra ──────────────┐
               └──────────────► └──┬──┬──┬──┬──┘                       │
                      operand pair │  │  │  │   (zero when not selected)│
        ┌──────────────────────────┘  │  │  └──────────────┐           │
        ▼                 ▼───────────┘  ▼                 ▼          ▼
   urdhva_8x8   ekanyunena_purvena   anurupyena   antyayor_dasakepi   4:1 mux ──► product
```

## Operands read as decimal numbers

Three of the sutras work on decimal digits, but the operands are binary.
Every 8-bit value `x` is split into a *leading part* `L = floor(x/10)`
(0..25) and a *last digit* `D = x mod 10` (0..9). For example, 153 splits
into 15 and 3. The split is `vedic_pkg::split_decimal`. It computes the
leading part as `(x * 205) >> 11`, which equals `floor(x/10)` for every
`x` up to 1028. The last digit is then `x - 10*L`. Multiplying by the
decimal bases uses shifts and adds:

- `x*10 = (x<<3) + (x<<1)`
- `x*100 = (x<<6) + (x<<5) + (x<<2)`

## How the control unit chooses

`control_unit` tests four rules, in this order:

| order | condition | unit | example |
|---|---|---|---|
| 1 | the multiplier is 9 or 99 | Ekanyunena Purvena | 170 × 99 = 16830 |
| 2 | same leading part, and the last digits sum to 10 | Antyayor Dasakepi | 153 × 157 = 24021 |
| 3 | same leading part | Anurupyena | 107 × 109 = 11663 |
| 4 | anything else | Urdhva Tiryagbhyam | 124 × 159 = 19716 |

Rule 2 is a special case of rule 3, so it must be tested first. This order
makes the four example pairs above reach the units shown. Only the second
operand (the multiplier) is tested for nines. An all-nines multiplicand
with an ordinary multiplier goes to another unit.

The selected unit receives the operand pair. The other three units receive
zeros, so they do not switch. A 4:1 multiplexer, steered by the same
selection, drives `product`. The `sutra` output reports which unit
produced it, using the `sutra_e` encoding: 0 Urdhva, 1 Ekanyunena,
2 Anurupyena, 3 Antyayor.

Over all 65536 operand pairs the selection works out as follows:

| unit | pairs |
|---|---|
| Urdhva Tiryagbhyam | 62509 |
| Anurupyena | 2293 |
| Ekanyunena Purvena | 513 |
| Antyayor Dasakepi | 225 |

## The four sutra units

### Urdhva Tiryagbhyam: `urdhva_2x2` → `urdhva_4x4` → `urdhva_8x8`

This is the general multiplier, built recursively.

**2x2 cell.** It uses four AND gates and two half adders:

- `p0 = a0·b0`.
- The crosswise terms `a1·b0` and `a0·b1` go into one half adder. It gives `p1` and a carry.
- `a1·b1` plus that carry goes into the second half adder. It gives `p2` and `p3`.

**NxN from four (N/2)x(N/2) units** (used for N = 4 and N = 8). Each
operand is split into halves. The four half-size products are:

- `q0 = aL·bL`
- `q1 = aH·bL`
- `q2 = aL·bH`
- `q3 = aH·bH`

Three N-bit ripple carry adders and one OR gate combine them:

```
t1 = q1 + q2                          carry c1   (crosswise terms)
t2 = t1 + (q0 >> N/2)                 carry c2
t3 = q3 + {c1 | c2, t2[N-1:N/2]}
p  = {t3, t2[N/2-1:0], q0[N/2-1:0]}
```

`c1` and `c2` have the same weight. They can never both be 1, because
`q1 + q2 + (2^(N/2) - 1) < 2^(N+1)`. That is why a single OR gate can merge
them instead of a third adder. The carry out of the last adder is always
zero and is left unconnected. `ripple_carry_adder` is a parameterised chain
of `full_adder` cells.

### Ekanyunena Purvena: multiplier 9 or 99

A multiplier made of n nines equals `10^n - 1`, so
`x * (10^n - 1) = x*10^n - x`. The unit does the following:

1. Checks whether the multiplier is 99. If not, it treats it as 9.
2. Selects the base, 100 or 10.
3. Shifts and adds to scale the multiplicand by the base.
4. Subtracts the multiplicand once.

It is the smallest of the units (a handful of adders).

### Anurupyena: same leading part, common working base

The working base `W` is the next multiple of ten above the multiplicand:

```
W = 10*(L+1)        e.g. 43 -> 50, 107 -> 110
```

Both operands lie 1..10 below `W`. Let `dx = W - x` and `dy = W - y`. Then:

```
x * y = W * (x - dy) + dx * dy
```

Example: `107 × 109 = 110 × 106 + 3 × 1 = 11663`.

The hardware has four parts:

- **Subtractor.** Forms `dx`, `dy` and the cross difference `s = x - dy`.
- **Deviation product.** A `urdhva_4x4` forms `dx·dy`. Both deviations are at most 10.
- **Scaling by `W`.** `W` is not a power of two, so scaling `s` by `W` is not a binary shift. A `urdhva_8x8` forms `(L+1)·|s|`, then a ×10 shift-and-add finishes it.
- **Final adder.** Joins the two parts.

When both operands are single digits and `x + y < 10`, `s` is negative.
For example, `3 × 4 = 10·(−3) + 7·6`. In that case the unit subtracts
`W·|s|` from `dx·dy`. This path occurs for 54 operand pairs.

The unit is only correct when the two leading parts are equal. The control
unit guarantees that.

### Antyayor Dasakepi: last digits add up to ten

For operands `A|B` and `A|C` with `B + C = 10`:

```
A|B × A|C = (A·(A+1))·100 + B·C          e.g. 153 × 157 = 240·100 + 21
```

`B·C` is at most 25, so it always fits in the last two decimal places.

The hardware has four parts:

- An adder forms `A+1`.
- A `urdhva_8x8` forms `A·(A+1)`.
- A `urdhva_4x4` forms `B·C`.
- The ×100 shift-and-add network and one adder join the two parts.

## Interfaces

| module | ports | notes |
|---|---|---|
| `adaptive_vedic_multiplier` (top) | in: `multiplicand[7:0]`, `multiplier[7:0]`; out: `product[15:0]`, `sutra` (`sutra_e`) | combinational |
| `control_unit` | in: `multiplicand`, `multiplier`; out: `sutra`, and `to_urdhva` / `to_ekanyunena` / `to_anurupyena` / `to_antyayor` (`operands_t` pairs) | the selected pair carries the operands, the others are zero |
| `ekanyunena_purvena`, `anurupyena`, `antyayor_dasakepi` | in: `multiplicand`, `multiplier`; out: `product` | each is valid only on the operands its rule admits |
| `urdhva_2x2` / `_4x4` / `_8x8` | in: `a`, `b`; out: `p` | valid for all operands |
| `ripple_carry_adder #(WIDTH=4)` | in: `a`, `b`, `cin`; out: `sum`, `cout` | |

Shared types (`operand_t`, `product_t`, `sutra_e`, `operands_t`,
`decimal_t`) and the decimal helpers are in `rtl/vedic_pkg.sv`. The
operand width is fixed at 8 bits. The sutra rules (9 and 99, a leading part
of at most 25) are written for that width.

## What follows the method and what is this implementation's own choice

These parts follow the method:

- The four sutras and their selection conditions.
- The base choices (10 and 100 for nines; the next multiple of ten for Anurupyena).
- The identities each unit uses.
- The structure of the Urdhva multipliers: four AND gates and two half adders at 2x2; four sub-multipliers, three ripple carry adders and one OR gate at 4x4 and 8x8.

These are choices made here:

- **Rule order.** Antyayor Dasakepi is tested before Anurupyena. Listing Anurupyena first would send 153 × 157 to the wrong unit.
- **Reading of "MSB" and "LSB".** They are taken as the decimal leading part and last digit, and the leading parts are compared with `floor(x/10)`.
- **Decimal arithmetic in binary.** The reciprocal divide-by-ten and the shift-and-add ×10 and ×100 networks are this implementation's.
- **Sub-products inside the sutra units.** The multiplications inside Anurupyena and Antyayor Dasakepi use the design's own Urdhva units. How to realise them was open.
- **Ekanyunena Purvena.** It computes `x·base − x`, which is valid for any multiplicand. The pencil-and-paper variant (`70 × 99`: 70−1 = 69, 99−69 = 30 → 6930) only works for a multiplicand no larger than the multiplier, so it is not used.
- **Antyayor Dasakepi.** It forms no separate working base, because the identity does not need one.
- **Top-level glue.** Zeroing the operands of idle units, the output multiplexer and the `sutra` output.
- **No registers.** The design is fully combinational.

The reference figures for this method (FPGA path delays of about 9–18 ns
per sutra unit on a Spartan-6, and 17.59 ns for the whole multiplier) come
from a vendor flow. They have not been reproduced for this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_urdhva_2x2`, `tb_urdhva_4x4`, `tb_urdhva_8x8` | exhaustive, against the simulator's multiplication |
| `tb_ripple_carry_adder` | exhaustive at 4 bits with carry-in; all operands at 8 bits with a random carry-in |
| `tb_ekanyunena_purvena` | every multiplicand × 9 and × 99 |
| `tb_anurupyena`, `tb_antyayor_dasakepi` | every operand pair inside the unit's rule |
| `tb_control_unit` | all 65536 pairs: the selected sutra against a reference model built with `/` and `%`, and that only the selected port carries the operands |
| `tb_adaptive_vedic_multiplier` | end to end at the design's only size; details below |

`tb_adaptive_vedic_multiplier` first applies the four example pairs from
the table above and checks both the product and the chosen sutra. It then
applies all 65536 pairs and checks every product and every selection. It
counts how often each sutra was used and how often Anurupyena took its
negative path. It fails if any of these never happened.

Each testbench was also run against a copy of its module with one fault
inserted, and each of them detected the fault.

## Simulating

The package must come first. `-y rtl` lets Verilator find the submodules.

```
verilator --binary --timing --assert rtl/vedic_pkg.sv -y rtl \
    tb/tb_adaptive_vedic_multiplier.sv --top-module tb_adaptive_vedic_multiplier
./obj_dir/Vtb_adaptive_vedic_multiplier
```

To test another unit, replace the testbench name. For lint only, use
`verilator --lint-only -Wall rtl/vedic_pkg.sv -y rtl rtl/<module>.sv`.
Every test finishes in well under a second.

## Changing it

- **A new sutra.** Add an enumerator to `sutra_e`, a rule to `control_unit` (mind the order: put narrower rules first), an `operands_t` output, the unit itself, and a multiplexer arm in the top. Extend the reference models `expected()` in `tb_control_unit` and `tb_adaptive_vedic_multiplier` to match.
- **Wider operands.** `urdhva_8x8` can be copied into a 16x16 unit with the same structure. The decimal split and the nine-detection would need new constants: 999 and 9999, and a different reciprocal for the divide-by-ten.
