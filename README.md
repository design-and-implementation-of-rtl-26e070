# Radix-4 Booth multiplier (8 × 8 → 16 bits)

A multiplier spends most of its time adding partial products. A plain array
multiplier makes one partial product per multiplier bit. Radix-4 (modified
Booth) recoding writes the multiplier in base 4 with the signed digits
{−2, −1, 0, +1, +2}. Each digit selects 0, ±M or ±2M of the multiplicand M,
and all of these are cheap: a mux, a one-bit shift and an inversion. The
result is about half as many partial products. This repository holds a
synthesizable SystemVerilog version of such a multiplier. The default build
is 8 × 8 bits with a registered 16‑bit product, and the parameters allow
other widths and a signed mode.

```
 a[7:0] (multiplicand) ───────────────┐
                                      v
 b[7:0] (multiplier) ─> booth_recoder ─> pp_generator ─> pp_reduction ─> parallel_adder ─> [reg] ─> p[15:0]
                        (5 digits)       (5 rows + 1      (sum, carry)     (ripple carry)   clock
                                          correction row)
```

## Recoding the multiplier

The multiplier is first extended to an even width and a `0` is appended to
the right of its LSB. It is then cut into overlapping groups of three bits.
Group *i* is bits {2i+1, 2i, 2i−1}, and neighbouring groups share one bit.
Each group becomes one digit, d = −2·x[2i+1] + x[2i] + x[2i−1]:

| x[2i+1] x[2i] x[2i−1] | digit | partial product |
|---|---|---|
| 000 | 0  | 0   |
| 001 | +1 | +M  |
| 010 | +1 | +M  |
| 011 | +2 | +2M |
| 100 | −2 | −2M |
| 101 | −1 | −M  |
| 110 | −1 | −M  |
| 111 | 0  | 0   |

`booth_encoder` implements this table for one group. It outputs the digit as
three wires (`booth_digit_t` in `booth_pkg`):
- `one` selects M.
- `two` selects 2M.
- `neg` negates the selected value.

`111` is encoded as a plain zero, not as a negative zero. `booth_recoder`
builds the groups and instantiates one encoder per group. The digits satisfy
Σ dᵢ·4ⁱ = multiplier.

### Signed and unsigned operands (the `SIGNED` parameter)

Booth recoding reads the top group's leading bit as a sign. For a
two's-complement multiplier this is what you want. An N‑bit signed operand
is sign-extended to an even width, which gives N/2 digits for even N. For an
unsigned operand whose MSB is set, that reading would be wrong. So with
`SIGNED = 0` the recoder first adds a zero above the MSB and then pads to an
even width. For N = 8 this gives 10 bits and **5 digits instead of 4**. The
multiplicand is handled the same way: it is zero-extended (`SIGNED = 0`) or
sign-extended (`SIGNED = 1`).

The default is `SIGNED = 0`. The 8‑bit reference multiplier that this design
follows treats both operands as unsigned. For example, 11111100 × 00000011
gives 0000001011110100 (252 × 3 = 756), not −12. `SIGNED = 1` gives the
classic signed multiplier with N/2 partial products. For example, the 4‑bit
case 1100 × 1010 recodes the multiplier to the digits −2, −1. The partial
products are then 1000 and 0100 (4‑bit), and the product is −4 × −6 = 24.

## Partial products and their negation

`pp_generator` extends M by two bits so that 2M fits. For each digit it
selects 0, M or 2M. For a negative digit it inverts the selected value. This
one's complement is one short of the two's-complement negation. The missing
+1 for row *i* goes out as bit 2i of a separate `neg_row`, which is added
together with the rows. Each row is fully sign-extended to 2N bits and shifted
left by 2i. Bits above 2N are dropped. This is exact, because the product of
two N‑bit operands always fits in 2N bits, and all arithmetic is modulo 2^2N.

No sign-extension-prevention trick is used (the constant-'1' encoding that
shortens the rows). This keeps the rows easy to read, but costs some adder
cells in the upper bits.

## Reduction and final addition

The rows (5 partial products and the correction row, 6 in all at the
defaults) go to `pp_reduction`. It is a chain of carry-save stages. Each
stage is a row of `full_adder` cells (3:2 counters) and folds one more row
into a running sum/carry pair. Carries move up one bit per stage, and the
carry out of bit 2N−1 is dropped. `parallel_adder` is a ripple-carry adder
of full adders. It adds the final sum and carry rows into the product.

The chain is the simplest correct structure, not the fastest. A Wallace or
Dadda tree, or a faster final adder, can replace either module without
changing the interfaces. The testbenches check each module against plain
arithmetic.

## Interface and timing (`muulti`)

| port | dir | width | meaning |
|---|---|---|---|
| `clock` | in | 1 | rising-edge clock |
| `a` | in | WIDTH (8) | multiplicand |
| `b` | in | WIDTH (8) | multiplier |
| `p` | out | 2·WIDTH (16) | product, registered |

The whole datapath is combinational. Only the product is registered, so `p`
shows `a × b` one rising edge after the operands are applied, and a new
product is available every clock. There is no reset: `p` has no defined
value until the first edge. The 33 port bits match the I/O count of the
reference FPGA implementation. The top module's name, `muulti`, is kept from
that implementation's schematic.

| parameter | default | meaning |
|---|---|---|
| `WIDTH` | 8 | operand width (any width ≥ 2) |
| `SIGNED` | 0 | 0: unsigned operands; 1: two's-complement operands |

## Where this RTL makes its own choices

These points are not fixed by the method as published. They are this
design's decisions:
- The output register and its latency of one clock. The reference design has
  a clock input but does not say how the clock is used.
- Zero extension for unsigned operands, and `SIGNED = 0` as the default
  (see above). The published worked example is signed, while the published
  8‑bit results are unsigned products.
- Negation as one's complement plus a correction row, and full sign extension
  of every row.
- A linear carry-save chain for the reduction stage and a ripple-carry final
  adder. The source names only "partial product generation & reduction" and a
  "parallel adder".
- Port `a` as the multiplicand and `b` as the multiplier. The product does
  not depend on this choice.

Two things are not included. The radix-2 Booth recoding, which is only the
baseline this design improves on, and a radix-8 variant, which is mentioned
only as a possible extension. The published FPGA figures (169 four-input
LUTs, 86 slices) belong to a particular vendor flow. They were not
reproduced.

## Files

- `rtl/booth_pkg.sv` — digit type, width functions
- `rtl/booth_encoder.sv` — one group → one digit
- `rtl/booth_recoder.sv` — multiplier → digits
- `rtl/pp_generator.sv` — digits × multiplicand → aligned rows + correction row
- `rtl/full_adder.sv` — 1‑bit full adder cell
- `rtl/pp_reduction.sv` — carry-save reduction to two rows
- `rtl/parallel_adder.sv` — ripple-carry adder
- `rtl/muulti.sv` — top level

## Verification

Every testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_booth_encoder` | all 8 groups against the table; digits are well formed |
| `tb_booth_recoder` | Σ dᵢ·4ⁱ = y for every 8‑bit y, unsigned and signed; the 4‑bit example 1010 → (−2, −1) |
| `tb_pp_generator` | row i + correction = dᵢ·M·4ⁱ for every M and random digits, unsigned and signed; 4‑bit example rows 1000 and 0100 |
| `tb_pp_reduction` | sum + carry = Σ rows for 6, 3 and 2 rows |
| `tb_parallel_adder` | random and carry-through cases against `+` |
| `tb_muulti` | default parameters: the two reference products (100×100 = 10000, 252×3 = 756), then all 65,536 operand pairs. It checks that `p` changes only at the next rising edge. It also counts each digit value, negated rows and operands with the MSB set, and fails if any never occurs. |
| `tb_muulti_signed` | `SIGNED = 1`: all 65,536 signed 8‑bit pairs, and the 4‑bit example 1100 × 1010 = 24 |
| `tb_muulti_widths` | odd and small widths (5 and 7 bits in both modes, 4 bits unsigned), every operand pair; checks the digit count, (n+1)/2 for odd signed n |

To run one with Verilator (from the repository root):

```
verilator --binary --timing --assert -Irtl rtl/booth_pkg.sv tb/tb_muulti.sv \
          -y rtl --top-module tb_muulti -Mdir obj_tb_muulti
./obj_tb_muulti/Vtb_muulti
```

Every testbench runs in well under a second. For lint, use
`verilator --lint-only -Wall -Irtl rtl/booth_pkg.sv rtl/muulti.sv -y rtl`.

To change the width, override `WIDTH` on `muulti`. The number of digits, the
row widths and the reduction depth all follow from it and from `SIGNED`, via
`booth_ext_width` and `booth_num_pp` in `booth_pkg`.
