# 4-bit Vedic multiplier in Gate Diffusion Input logic

This is an unsigned 4 x 4-bit multiplier with an 8-bit product. It is purely
combinational. It follows the *Urdhva Tiryakbhyam* ("vertically and
crosswise") rule of Vedic arithmetic. Each partial product is formed at once,
then the columns are added. The multiplier is meant for a low-transistor-count
circuit style called Gate Diffusion Input (GDI). In GDI, a single pair of
transistors implements AND, OR, NOT or a 2:1 multiplexer. The RTL follows
that structure gate for gate: every AND, OR and XOR is an instance of one
modelled GDI cell. A synthesis flow, or a reader mapping the design back to
transistors, therefore sees the same hierarchy as the circuit it stands for.

The RTL is logic only. Transistor counts, FinFET devices, supply levels and
the weak output levels of pass-transistor logic are physical properties. No
logic model captures them, so none are claimed here.

## The vertically-and-crosswise rule

Write each operand as two digits: `a = aH·4 + aL` and `b = bH·4 + bL`, where
each digit is 2 bits. Then:

```
a·b = (aH·bH)·16  +  (aH·bL + aL·bH)·4  +  aL·bL
       vertical         crosswise         vertical
```

The same rule applies one level down. A 2 x 2-bit product is
`a1b1·4 + (a1b0 + a0b1)·2 + a0b0`. This gives the 2-bit block four AND gates
and two half adders:

```
p0        = a0b0
p1, k     = HA(a1b0, a0b1)      crosswise term and its carry
p2, p3    = HA(a1b1, k)         left vertical term plus that carry
```

Example: 1011 x 0110 (11 x 6) = 0100 0010 (66).

## The GDI cell and the gates built on it (`gdi_cell`, `gdi_and`, `gdi_or`, `gdi_xor`)

A GDI cell is one PMOS and one NMOS transistor with a common gate input `G`.
Unlike a CMOS inverter, both source terminals are inputs: `P` on the PMOS side
and `N` on the NMOS side. When `G` is low the PMOS conducts and the output is
`P`. When `G` is high the NMOS conducts and the output is `N`. Logically it is
the selector `y = g ? n : p`. Tying `P` and `N` to constants or signals gives
the following gates:

| N | P | G | output    |
|---|---|---|-----------|
| 0 | B | A | ~A & B    |
| B | 1 | A | ~A \| B   |
| 1 | B | A | A \| B    |
| B | 0 | A | A & B     |
| C | B | A | A ? C : B |
| 0 | 1 | A | ~A        |

- **AND** (`gdi_and`): one cell, with `N = b` and `P = 0`.
- **OR** (`gdi_or`): one cell, with `N = 1` and `P = b`.
- **XOR** (`gdi_xor`): two cells. The first is a GDI inverter that makes `~a`.
  The second is gated by `b` and passes `~a` when `b = 1` and `a` when
  `b = 0`. This is the four-transistor XOR.

## Adders (`half_adder`, `full_adder`, `rca`)

- **Half adder:** a GDI XOR gives the sum and a GDI AND gives the carry.
- **Full adder:** the sum is a three-input XOR, built as two chained XORs.
  The carry is the majority function, built as the OR of `ab`, `bc` and `ac`.
  The three-input OR is two chained ORs.
- **Ripple carry adder (`rca`):** `WIDTH` full adders in a carry chain, with
  default `WIDTH = 4`. The multiplier uses three of them, each with its carry
  in tied low.

## The 4-bit multiplier (`vedic_mul4_rca`): how the columns are added

This is the default structure of the top. Four `vedic_mul2` blocks make the
four 4-bit partial products:

| signal | product  | weight |
|--------|----------|--------|
| `q_ll` | aL·bL    | 1      |
| `q_hl` | aH·bL    | 4      |
| `q_lh` | aL·bH    | 4      |
| `q_hh` | aH·bH    | 16     |

Three 4-bit ripple carry adders and one OR gate then combine them:

```
RCA1 : mid, c1  = q_hl + q_lh                      crosswise sum
RCA2 : s2,  c2  = mid  + {00, q_ll[3:2]}           + overlap of the low product
OR   : c        = c1 | c2
RCA3 : p[7:4], s8 = q_hh + {0, c, s2[3:2]}         upper vertical term
p    = { p[7:4], s2[1:0], q_ll[1:0] }
```

The hard part is the carries. The crosswise column can reach
`9 + 9 + 2 = 20`, which is 5 bits. Its fifth bit can come out of RCA1 (`c1`)
or out of RCA2 (`c2`). Both have weight 2^6, and the sum stays below 32, so
at most one of them is ever set. An OR gate can therefore merge them in place
of a fourth adder. For the same reason the upper sum never overflows: the
carry out `s8` of RCA3 is always 0. It is kept as a port because the
structure has it.

Two worked cases:

- **11 x 6:** the partial products are `q_ll` = 6, `q_hl` = 4, `q_lh` = 3,
  `q_hh` = 2. Then `mid` = 7, `s2` = 8, `c` = 0, and `p[7:4]` = 2 + 2 = 4.
  The product is `0100_00_10` = 66.
- **15 x 15:** all four partial products are 9. `mid` = 18 mod 16 = 2 with
  `c1` = 1. Then `s2` = 4, `c` = 1, and `p[7:4]` = 9 + 0b0101 = 14. The
  product is `1110_00_01` = 225.

Gate count in this structure: 16 ANDs and 8 half adders in the 2-bit blocks,
12 full adders in the RCAs, and one OR. The longest path runs through one
2-bit block and then RCA1, RCA2 and RCA3 in series.

## The alternative array structure (`vedic_mul4_array`)

The same product can be drawn without the 2-bit blocks. It is then 16 AND
gates for the partial products `a[i]&b[j]`, reduced column by column in three
rows of adders:

- **Row 1:** one half adder and four full adders. The column-5 full adder
  takes the carry of the column-4 full adder.
- **Row 2:** two half adders, on columns 3 and 4.
- **Row 3:** one half adder and four full adders in a ripple chain. Its last
  full adder gives `p[6]` and `p[7]`.

That is 8 full adders and 4 half adders in all. The counts per row and the
output positions come from the published drawing of this variant. Which
partial product goes to which adder input is this design's own assignment,
and it was verified exhaustively.

## Top (`vedic_mul4`)

```
module vedic_mul4 #(parameter vedic_pkg::mul4_struct_e STRUCTURE = MUL4_VEDIC_RCA)
  (input [3:0] a, b, output [7:0] p, output s8);
```

| parameter value            | structure                                            |
|----------------------------|------------------------------------------------------|
| `MUL4_VEDIC_RCA` (default) | 2-bit blocks plus ripple carry adders                |
| `MUL4_FA_HA`               | the AND/full adder/half adder array; `s8` is tied to 0 |

The top has no clock and no reset. `p` is valid one combinational delay
after `a` and `b` settle. To pipeline the multiplier, register `a`, `b`
and/or `p` outside it.

`vedic_pkg` holds the operand and product widths (`OPW = 4`, `PW = 8`) and
the `mul4_struct_e` enum.

## Where this RTL departs from the circuit it models, and why

- **Function only.** Every cell is an ideal selector. GDI outputs in silicon
  can lose a threshold voltage, and cascaded stages need buffering. Neither
  effect appears here.
- **Full adder gates.** The full adder uses XOR for the sum, and AND/OR
  majority logic for the carry. A 10-transistor GDI full adder would instead
  form the carry with one multiplexer cell, `(a^b) ? c : a`. The function is
  the same and the gate count differs.
- **Merge gate.** The OR gate that merges `c1` and `c2` is part of the
  structure. The published 200-transistor total for the multiplier
  (4 x 20 + 3 x 40) does not include it.
- **Both structures.** Two 4-bit structures are described for the same
  method: the adder-tree one and the flat array. Both are provided. The
  adder-tree one is the default, because it is the one that was built and
  characterised.
- **Unsigned only.** Signed operands are not supported.

## Verification

Each module has a self-checking testbench in `tb/<module>_tb.sv`. Each one
compares outputs against integer arithmetic and prints
`TB_RESULT checks=N failures=M`.

- **Gates, adders and `vedic_mul2`:** exhaustive, sweeping every input
  transition.
- **`rca`:** all 512 combinations of `a`, `b` and `cin`. It also requires
  that a carry out occurs.
- **`vedic_mul4_rca` and `vedic_mul4_array`:** all 256 operand pairs in both
  orders, plus the 11 x 6 example.
- **`vedic_mul4_tb`:** builds the top in both structures side by side. It
  runs the worked example and a 20-step squaring sweep. In that sweep `a` and
  `b` carry the same pulse trains, with bit 3 the fastest and bit 0 the
  slowest. It then runs all 256 pairs and 2000 random pairs. It counts how
  often `c1`, `c2`, the merged carry and an internal carry of RCA3 occur, and
  fails if one never occurs, if `c1` and `c2` are ever set together, or if
  `s8` is ever set.
- **`vedic_mul4_full_tb`:** runs the top at its default parameters with no
  overrides.

Simulate any of them with Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/vedic_pkg.sv \
    tb/vedic_mul4_tb.sv --top-module vedic_mul4_tb -o sim
./obj_dir/sim
```

To lint a module: `verilator --lint-only -Wall -Irtl rtl/vedic_pkg.sv rtl/vedic_mul4.sv`.

## Files

| file                                            | content                                  |
|-------------------------------------------------|------------------------------------------|
| `rtl/vedic_pkg.sv`                              | widths and the structure enum            |
| `rtl/gdi_cell.sv`                               | GDI cell (selector)                      |
| `rtl/gdi_and.sv`, `rtl/gdi_or.sv`, `rtl/gdi_xor.sv` | gates made of GDI cells              |
| `rtl/half_adder.sv`, `rtl/full_adder.sv`        | 1-bit adders                             |
| `rtl/rca.sv`                                    | ripple carry adder, `WIDTH` = 4          |
| `rtl/vedic_mul2.sv`                             | 2 x 2 Vedic multiplier                   |
| `rtl/vedic_mul4_rca.sv`                         | 4 x 4 multiplier, 2-bit blocks + RCAs    |
| `rtl/vedic_mul4_array.sv`                       | 4 x 4 multiplier, AND/FA/HA array        |
| `rtl/vedic_mul4.sv`                             | top, selects the structure               |
| `tb/*_tb.sv`                                    | one self-checking testbench per module   |
