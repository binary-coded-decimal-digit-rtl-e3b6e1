# Correction-free BCD digit adders and a direct BCD digit multiplier

Decimal hardware is built from digit units: wider decimal adders and
multipliers are assembled from circuits that add or multiply one binary-coded
decimal (BCD) digit at a time. The classic BCD digit adder does a 4-bit binary
add and then a +6 correction whenever the sum goes above 9. That correction
step lengthens the carry path. The classic digit multiplier forms a binary
product and converts it to two BCD digits.

The three units here skip those steps. Each output bit is written as a Boolean
function of the operand bits. The function is derived from the decimal truth
table, and every row with an invalid digit (a code from 10 to 15) is left as a
don't care. The units are:

| unit | module | inputs → outputs | idea |
|---|---|---|---|
| direct adder | `bcd_adder_direct` | a, b, cin (9 bits) → s, cout (5 bits) | one AND-OR expression per output bit |
| two-level adder | `bcd_adder_two_level` | same | splits into a 5-input level and a 6-input level, so every output fits one 6-input LUT |
| direct multiplier | `bcd_digit_multiplier` | a, b (8 bits) → p (two BCD digits) | one AND-OR expression per product bit |

All three are purely combinational. They have no clock, no reset and no
state. The top level, `bcd_digit_units`, places them side by side. Each unit
has its own operand and result ports.

## Digits and don't cares

A BCD digit is 4 bits holding 0–9 (`bcd_pkg::bcd_digit_t`). Nine input bits
give 512 combinations for an adder, but only 200 of them are valid: a ≤ 9,
b ≤ 9, and either value of cin. The multiplier has 100 valid combinations out
of 256. The invalid rows are don't cares. This is what makes the expressions
small: for example, the multiplier's units-digit parity bit is simply
`p[0] = a0 & b0`.

**For an invalid digit the outputs are unspecified.** They are whatever the
chosen expressions happen to give. There is no error flag. A system that can
present codes 10–15 must filter them upstream (`bcd_pkg::is_bcd` is provided
for that).

## Direct adder (`bcd_adder_direct`)

For valid inputs, `{cout, s}` is the BCD value of a + b + cin (0–19). For
example, 6 + 8 + 0 gives `1 0100` (14), and 9 + 9 + 1 gives `1 1001` (19).

`s[0]` is the three-input parity `cin ^ a0 ^ b0`. Adding 10 never changes
parity, so this bit needs no decimal correction. The other four outputs are
minimized sums of products of all nine inputs. The expressions are long, with
up to about 45 product terms for `s[1]`, because decimal sum bits are not
simple functions. They are correct for every valid input, and the testbench
checks all 200 valid cases.

## Two-level adder (`bcd_adder_two_level`)

This is the subtle one. A 6-input LUT can hold any function of six inputs, but
the adder has nine inputs. The design splits the inputs so that no function
needs more than six:

```
  a[1:0], b[1:0], cin ──► level 1 (bcd_add_level1) ──► s[0]
                                   │ x[1:0]
  a[3:2], b[3:2] ─────────► level 2 (bcd_add_level2) ──► s[3:1], cout
```

**Level 1** (5 inputs, 3 outputs) is a plain small addition,
`{x, s0} = a[1:0] + b[1:0] + cin`, which gives a value from 0 to 7. Its low
bit is already the final `s[0]`: the decimal result differs from the binary
sum only by a multiple of 10, which is even. The upper two bits `x` (0–3) go
on to level 2.

**Level 2** (6 inputs, 4 outputs) sees the high bit pairs of both operands
and `x`. With `s[0]` removed, the rest of the sum is

```
half = (a + b + cin - s0) / 2 = 2*(a[3:2] + b[3:2]) + x      (0..9 for valid digits)
cout   = half >= 5
s[3:1] = half mod 5
```

Level 2 computes this directly, as one AND-OR expression per output. No
binary sum is formed and then corrected.

Level 2 also has more don't cares than the obvious ones. A valid digit never
has `a[3:2] = 11`. A digit with `a[3:2] = 10` is 8 or 9, so `a[1] = 0`, and that
caps `x`. Every 6-bit level-2 input that no valid operand pair can produce
was treated as a don't care when its expressions were minimized (34 of the
64 codes).

Level 1 has three outputs and level 2 has four, so the adder uses seven
LUT-sized functions. A generic 6-input LUT mapping (yosys `synth -lut 6`)
of this module gives exactly 7 LUTs. With `synth_xilinx`, yosys puts level 1
on a carry chain instead.

## Direct multiplier (`bcd_digit_multiplier`)

For valid inputs, `p.tens = p[7:4]` and `p.units = p[3:0]` are the BCD
digits of a × b (00–81). Each product bit is a minimized sum of products of
the eight operand bits. There is no binary product and no operand recoding.
The don't cares make two outputs very narrow:

- `p[0] = a0 & b0`: a product is odd only when both operands are odd.
- `p[7] = a3 & a0 & b3 & b0`: only 9 × 9 = 81 has a tens digit of 8 or more.

Each of these fits one LUT. Bits such as `p[1]` depend on all eight inputs and
need more than one LUT. The testbench checks both narrow forms over all 256
input codes, because later edits to the expressions could silently widen
them.

## Top level (`bcd_digit_units`)

| ports | unit |
|---|---|
| `add1_a`, `add1_b`, `add1_cin` → `add1_s`, `add1_cout` | direct adder |
| `add2_a`, `add2_b`, `add2_cin` → `add2_s`, `add2_cout` | two-level adder |
| `mul_a`, `mul_b` → `mul_p` (`bcd_pair_t`: `tens`, `units`) | multiplier |

The units are independent. Building a multi-digit adder means chaining `cout`
into the next digit's `cin`. Building a multi-digit multiplier means summing
the digit products. Neither wider structure is part of this RTL.

## How the expressions were obtained

Each expression is a sum of products of a truth table, minimized with the
invalid (or unreachable) rows as don't cares:

- direct adder: `(a + b + cin) mod 10` and `a + b + cin >= 10`, for a, b ≤ 9
- level 2: the `half` function above, over reachable inputs
- multiplier: `(a*b) mod 10` and `(a*b) / 10`, for a, b ≤ 9

Prime implicants come from Quine–McCluskey merging. The cover takes the
essential primes first, then picks greedily. That means the cover is valid
but not guaranteed minimal. To change the don't-care policy (for example, to
force zero outputs for invalid digits), regenerate the expressions from the
formulas above with the new table.

## Where this departs from, or adds to, the original design

- The unit structure comes from the original design: the nine-input direct
  adder, the 5-input and 6-input two-level split with `x1 x0` and `s0` passed
  as described, the direct multiplier, and the don't-care treatment. The
  Boolean equations themselves were not published. They were derived here
  from the truth tables, so they are one valid cover among many.
- Reading `x1 x0` as the upper bits of `a[1:0] + b[1:0] + cin` is this
  design's interpretation, the only one consistent with `s0` leaving level 1.
- The original design reports no area for the direct adder. Here a generic
  Xilinx mapping gives about 62 LUTs (yosys `synth_xilinx`); a minimizer
  tuned for nine-input functions would likely do better. The multiplier maps
  to about 26 LUTs plus wide multiplexers.
- There is no pipelining or registering. All units are combinational, as
  originally described.

## Verification

Each unit has a self-checking testbench in `tb/`. The testbenches compare
against plain integer arithmetic and print
`TB_RESULT checks=N failures=M`:

- `bcd_adder_direct_tb` and `bcd_adder_two_level_tb` check all 200 valid
  additions and the two reference rows. The two-level testbench also checks
  the internal `x` bits.
- `bcd_digit_multiplier_tb` checks all 100 valid products, the 48 and 81
  reference rows, and the narrow `p[0]` and `p[7]` forms over all 256 codes.
- `bcd_digit_units_tb` drives all three units at once. It runs exhaustively
  and then with 2000 random valid operands, cross-checks the two adders, and
  requires that carry-in, carry-out, no-carry sums, two-digit products and the
  81 product each occur at least once.

To run a test with Verilator 5 (the package must come first):

```
verilator --binary --timing --assert rtl/bcd_pkg.sv rtl/bcd_add_level1.sv \
  rtl/bcd_add_level2.sv rtl/bcd_adder_direct.sv rtl/bcd_adder_two_level.sv \
  rtl/bcd_digit_multiplier.sv rtl/bcd_digit_units.sv tb/bcd_digit_units_tb.sv \
  --top-module bcd_digit_units_tb -o sim
./obj_dir/sim
```

Replace the testbench file and `--top-module` to run the others. Each test
finishes in well under a second.
