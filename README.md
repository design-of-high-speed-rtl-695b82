# Single-precision floating-point multiplier with a Vedic significand multiplier

This is a combinational IEEE 754 binary32 multiplier. Its 24×24-bit significand
product is built with the Urdhva-Tiryakbhyam ("vertically and crosswise") method
of Vedic mathematics. In this method every partial product of a column is formed
at the same moment, and each column sum takes in the carry of the column below
it. The multiplier is a tree of these cells: 3×3 → 6×6 → 12×12 → 24×24. At every
level, four half-size multipliers run in parallel and ripple-carry adders sum
their results. There is no clock. `fmresult = a * b` is valid one propagation
delay after the operands settle.

## How a product is formed

A binary32 word holds a sign (bit 31), an 8-bit exponent with a bias of 127
(bits 30:23) and a 23-bit fraction (bits 22:0). A normal number has the value
(−1)^S · 2^(E−127) · 1.M. The top module, `fp_multiplier`, splits both operands
into these fields and sends them to four units that work side by side:

| unit | module | what it computes |
|---|---|---|
| sign | `sign_unit` | S = S1 xor S2 |
| exponent | `exponent_unit` | E1 + E2 − 127, using ripple-carry adders |
| mantissa | `vedic_24x24` | (1.M1)·(1.M2), 48 bits |
| normaliser | `normaliser` | normalises, drops the hidden bit, rounds, and adjusts the exponent |

`exception_check` then checks the exponent range and packs the result.

### Exponent

Each operand exponent already carries the bias, so their sum carries it twice.
The unit removes one bias. A first 8-bit ripple-carry adder (RCA) forms the
9-bit sum E1 + E2. A second 10-bit RCA adds the two's complement of 127
(`10'h381`), so the subtraction becomes an addition. The result `eraw` is a
signed 10-bit number in the range −127..383. The 8-bit `eresult` port holds its
low byte.

### Significand: the Vedic multiplier tree

`vedic_3x3` is the base cell. Output column k is the sum of all products
a[i]·b[j] with i + j = k, plus the carry from column k−1:

```
col0 = a0b0
col1 = a1b0 + a0b1
col2 = a2b0 + a1b1 + a0b2 + carry1
col3 = a2b1 + a1b2        + carry2     (carry2 can be 2, so 2 bits)
col4 = a2b2               + carry3     -> p[5:4]
```

An operand of 2H bits is split into halves aH:aL and bH:bL, which gives four
sub-products:

- q0 = aL·bL
- q1 = aL·bH
- q2 = aH·bL
- q3 = aH·bH

The product is then q3·2^2H + (q1 + q2)·2^H + q0. The helper module
`vedic_combine` adds these with three RCAs:

1. t1 = q1 + q2, giving 2H bits plus a carry.
2. t2 = t1 + q0[2H−1:H], giving 2H+1 bits.
3. p[4H−1:2H] = q3 + t2[2H:H].

The low bits p[H−1:0] = q0[H−1:0] and p[2H−1:H] = t2[H−1:0] need no adder.
Adders 2 and 3 can never carry out, and an immediate assertion checks this.
`vedic_6x6`, `vedic_12x12` and `vedic_24x24` are each four instances of the
level below plus one `vedic_combine`. The full 24×24 tree holds 64 base cells.

### Normalisation and rounding

Both significands lie in [1, 2), so their product `n1` lies in [1, 4). Its
leading one is therefore at bit 46 or at bit 47:

- **bit 46:** the product is already normalised. The fraction is n1[45:23].
- **bit 47:** the product is shifted right by one and the exponent goes up
  by 1. The fraction is n1[46:24].

The bits below the fraction are dropped. The `rmode` input selects one of three
directed roundings:

| `rmode` | name | effect |
|---|---|---|
| 0 | `RND_ZERO` | truncate |
| 1 | `RND_POS_INF` | add one ulp when the result is positive and any dropped bit is 1 |
| 2 | `RND_NEG_INF` | add one ulp when the result is negative and any dropped bit is 1 |

If adding the ulp turns 1.111…1 into 10.000…0, the fraction becomes zero and the
exponent goes up by one more. Both exponent increments use ripple-carry adders.
Round-to-nearest is not provided.

### Range check

Let `e_final` be the exponent after normalisation and rounding.

- **1 ≤ e_final ≤ 254:** the result is {S, e_final[7:0], fraction}.
- **e_final > 254:** `overflow` is raised and the result is a signed infinity.
- **e_final < 1:** `underflow` is raised and the result is a signed zero. No
  subnormal results are produced.
- **an operand's exponent field is 0** (zero or subnormal): the operand counts
  as zero. The result is a signed zero and neither flag is raised.

## Interface of `fp_multiplier`

| port | dir | width | meaning |
|---|---|---|---|
| `a`, `b` | in | 32 | operands, IEEE 754 binary32 |
| `rmode` | in | 2 (`fp_mul_pkg::rnd_mode_e`) | rounding mode |
| `fmresult` | out | 32 | product |
| `overflow` | out | 1 | exponent above 254; `fmresult` = ±infinity |
| `underflow` | out | 1 | exponent below 1; `fmresult` = ±0 |

The design is purely combinational and has no registers, clock or reset. One
synthesis flattens it to about 3,500 word-level cells. Most of them are the
1,700 AND gates and the XOR/OR full-adder logic of the Vedic tree.

## What follows the published design and what is this implementation's own

These parts follow the published design:

- the split into sign, exponent, mantissa and normaliser units
- Urdhva-Tiryakbhyam multiplication with a 3×3 base cell and a 6×6 level
- a 24×24 multiplier built from four 12×12 multipliers
- ripple-carry adders for the partial-product sums and the exponent
- E1 + E2 − 127 computed by adding the two's complement of the bias
- normalisation on bit 47 with an exponent increment
- the three directed roundings
- overflow and underflow detection
- the port names `a`, `b`, `fmresult`, `ea`, `eb`, `eresult`, `n1` and `nout`

These are choices made here:

- **Rounding port:** the `rmode` port and its encoding.
- **Flags:** the `overflow` and `underflow` outputs.
- **Overflow and underflow results:** ±infinity and ±0, in every rounding
  mode. IEEE 754 would give the largest finite number for some directed
  roundings.
- **Zero operands:** a zero exponent field is treated as zero, and subnormals
  are flushed to zero.
- **Special operands:** infinity and NaN operands get no special treatment. An
  exponent field of 255 is used as an ordinary exponent, so infinity × x
  usually gives infinity with the overflow flag, and NaN is not propagated.
- **Adder arrangement:** the way the partial products are added inside each
  Vedic level (`vedic_combine`).
- **12×12 level:** it is built like the 6×6 and 24×24 levels.
- **Sign:** the sign is an XOR. One flow diagram of the published design
  writes "S1 Or S2", but an inclusive OR would make (−)·(−) negative.

The published double-precision format appears only as background and is not
built.

### The two published example products

| a | b | `fmresult` (truncation) |
|---|---|---|
| `0xC0C00000` (−6) | `0x3FB4FDF3` (1.414) | `0xC107BE76` (−8.484) |
| `0x43061000` (134.0625) | `0xC0100000` (−2.25) | `0xC396D200` (−301.640625) |

The second result matches the published value bit for bit. For the first, the
published bit pattern is `0xC087BE76`. It has the same fraction, but its
exponent is one lower and its value is −4.242. That disagrees with the
published decimal result of −8.484 and with the normalisation rule stated for
the design: 1.5 × 1.414 ≥ 2, so the exponent must be incremented. This RTL
follows the rule and gives −8.484.

## Files

- `rtl/fp_mul_pkg.sv`: widths, the bias, the `fp32_t` struct and the
  `rnd_mode_e` enum
- `rtl/rca.sv`: N-bit ripple-carry adder
- `rtl/vedic_3x3.sv`: base cell of the Vedic tree
- `rtl/vedic_combine.sv`: adds the four partial products of a level
- `rtl/vedic_6x6.sv`, `rtl/vedic_12x12.sv`, `rtl/vedic_24x24.sv`: the levels of
  the Vedic tree
- `rtl/sign_unit.sv`, `rtl/exponent_unit.sv`, `rtl/normaliser.sv`,
  `rtl/exception_check.sv`: the units described above
- `rtl/fp_multiplier.sv`: the top module
- `tb/tb_<module>.sv`: one self-checking testbench per module

## Verification

Each testbench compares the module with an independent reference and ends with
a line `TB_RESULT checks=N failures=M`. Each one also has a watchdog.

- `tb_rca` checks every input of the 8-bit adder.
- `tb_vedic_3x3` and `tb_vedic_6x6` check every operand pair.
- `tb_vedic_12x12` and `tb_vedic_24x24` check corner operands (0, 1, all ones
  and single bits) against each other, then 200,000 random pairs, all against
  the integer product.
- `tb_exponent_unit` checks all 65,536 exponent pairs.
- `tb_normaliser` compares against a division-based rounding model, including
  cases where rounding carries out of the fraction.
- `tb_exception_check` sweeps the exponent range from −200 to 400.
- `tb_fp_multiplier` is the end-to-end test and runs the top module at its
  defaults. Its reference widens both operands to double precision, where the
  product is exact, and then rounds the result back down. The test runs the
  two published examples, directed cases for rounding carry-out, overflow,
  underflow and zero, and 60,000 random products spread over the three
  rounding modes. It counts how often each mechanism occurred: shifted or
  unshifted product, round-up, rounding carry, overflow, underflow, zero
  operand and each mode. A mechanism that never occurs counts as a failure.

To simulate with Verilator:

```
verilator --binary --timing -Irtl -y rtl -y tb +libext+.sv \
    rtl/fp_mul_pkg.sv tb/tb_fp_multiplier.sv --top-module tb_fp_multiplier
./obj_dir/Vtb_fp_multiplier
```

To lint one module, for example `normaliser`:

```
verilator --lint-only -Wall -Irtl -y rtl +libext+.sv rtl/fp_mul_pkg.sv rtl/normaliser.sv
```

Lint reports only unused signals and unused package constants. Verilator
warns about the carry-outs of adders whose carry cannot occur, and about `eresult`, which the
top does not use because the range check needs the wider `eraw`.
