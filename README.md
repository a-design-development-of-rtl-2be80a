# Reversible-logic array multiplier (4 x 4 and N x N)

A binary multiplier built only from *reversible* gates. In these gates every
output pattern maps back to exactly one input pattern, so no information is
destroyed. That is the property that, in principle, lets a circuit avoid the
kT·ln2 energy cost of erasing a bit. The price is that each gate has as many
outputs as inputs. The extra inputs are tied to constants, and the outputs
nobody reads are *garbage*. The measures of quality are therefore gate count,
constant inputs and garbage outputs, not just area and delay.

The multiplier is an ordinary unsigned array multiplier with two stages:

1. **Partial products** are made by a grid of Toffoli gates (TG). The grid
   reuses each gate's copies of its inputs instead of discarding them.
2. **Final product.** The partial products are summed by ripple-carry chains.
   Peres gates (PG) serve as half adders and Haghparast-Navi gates (HNG) as
   full adders.

The design is purely combinational: there is no clock, reset or handshake,
and a product is valid one combinational delay after the operands settle.

## The three gates

| gate | inputs | outputs | use here |
|------|--------|---------|----------|
| TG  (`tg_gate`)  | A, B, C    | P = A, Q = B, R = A·B ⊕ C | C = 0 → R = A·B, one partial product |
| PG  (`pg_gate`)  | A, B, C    | P = A, Q = A·B ⊕ C, R = A ⊕ B | C = 0 → Q = carry, R = sum (half adder) |
| HNG (`hng_gate`) | A, B, C, D | P = A, Q = B, R = A⊕B⊕C, S = (A⊕B)·C ⊕ A·B ⊕ D | C = carry in, D = 0 → R = sum, S = carry (full adder) |

Every gate instance takes exactly one constant 0. The garbage is P for a PG
and P, Q for an HNG. Note on the Peres gate: the classic definition is
P = A, Q = A ⊕ B, R = A·B ⊕ C. This design names the outputs the other way
round (Q = carry, R = sum). The gate is the same bijection with two outputs
swapped.

## Stage 1: the Toffoli grid (`pp_tg_array`)

The grid is N rows (one per multiplier bit y[j]) by N columns (one per
multiplicand bit x[i]). Gate (j, i) gets A = y[j], B = x[i] and C = 0, and
outputs pp[j][i] = x[i]·y[j] on R. Its copies are passed on:

- Q (= x[i]) feeds the gate below it, in row j+1.
- P (= y[j]) feeds the next gate in the row, in column i+1.

The only copies left unused are the x bits leaving the bottom row and the
y bits leaving the last column. So the grid has N² constant inputs but only
2N garbage outputs: 16 and 8 at 4 x 4, where a grid of gates whose copies
are all discarded would leave 32.

## Stage 2a: the 4 x 4 adder network (`final_product_4x4`)

This is the hand-wired network of the reference 4 x 4 design. It has
12 gates in two rows:

```
column:           6        5        4        3        2       1     0
upper right chain (rows 0+1):       PG       HNG      HNG     PG     -
                                    x3y1     x3y0     x2y0    x1y0
                                             x2y1     x1y1    x0y1
upper left chain (rows 2+3):
                           HNG      HNG      PG
                           x3y2     x2y2     x1y2
                           x2y3     x1y3     x0y3
lower chain:      HNG      HNG      HNG      HNG      PG
                  x3y3     c5       s4/t4    s3/t3    s2/x0y2
                  +carry   +t5
outputs:          P7 P6    P5       P4       P3       P2      P1    P0
```

In the lower chain, s2..s4 are the sums of the upper right chain and c5 is
its carry out. t3..t5 are the sums of the upper left chain.

- The upper right chain adds partial-product rows 0 and 1 and yields P1.
- The upper left chain adds rows 2 and 3. Its carry out stays in column 6.
- The lower chain adds the two upper results, plus x0y2 in column 2 and
  x3y3 in column 6. Its last HNG yields P6 (sum) and P7 (carry).
- P0 is x0y0 itself.

The gate kinds per row, the x3y2/x2y3 and x2y2/x1y3 operands of the upper
left HNGs, and the x3y3 input of the last HNG come from the reference
circuit. The remaining links are this design's reading of it. They are
verified exhaustively: all 2¹⁶ input patterns give the weighted sum.

`rmul_4x4` joins the 4 x 4 grid to this network. Its cost is 28 gates
(16 TG, 4 PG, 8 HNG), 28 constant inputs and 28 garbage outputs (8 from the
grid, 20 from the adders). These are the reference design's published figures.

## Stage 2b: the N x N adder network (`final_product_array`)

For widths other than 4 only the gate kinds are specified, not the wiring.
This design uses a plain carry-ripple array:

- Row 0 of the partial products is the first running sum.
- Each further row j is added to the running sum shifted down one column.
  The adding chain has a PG half adder in the lowest cell and HNG full adders
  in the others. In row 1 the top cell is also a PG, because the running sum
  is only N bits wide there.
- The lowest sum bit of each chain is product bit j. After the last row, the
  running sum gives the upper N product bits.

Cost: N PG + N(N−2) HNG adders, N + 2N(N−2) garbage outputs. At N = 8 this is
8 PG + 48 HNG. The reference 8 x 8 design quotes 15 half adders and 47 full
adders. Its wiring was not published, so that split is not reproduced. (With
no carry discarded, reducing 64 partial-product bits to a 16-bit result takes
exactly 48 full adders.) At N = 4 the array uses the same 4 PG + 8 HNG as the
hand-wired network, grouped differently.

`rmul_nxn` joins an N x N grid to this network. With the default N = 8 it has
64 TG + 8 PG + 48 HNG = 120 gates, 120 constant inputs and 120 garbage
outputs. `rmul_pkg` holds these count formulas.

## Top level (`rev_multiplier_top`)

The top holds the 4 x 4 multiplier and the N x N multiplier (N = 8) side by
side, each with its own ports:

| port | width | meaning |
|------|-------|---------|
| `x4`, `y4` | 4 | 4 x 4 operands |
| `prod4` | 8 | `x4 * y4` |
| `garbage4` | 28 | garbage outputs: `[7:0]` = `{y4, x4}` copies from the grid, `[27:8]` = adder garbage |
| `x`, `y` | N | N x N operands |
| `prod` | 2N | `x * y` |
| `garbage` | 2N + N + 2N(N−2) | `[2N-1:0]` = `{y, x}` copies from the grid, then adder garbage |

The garbage is brought out so that every gate output stays accounted for. If
only the product is needed, leave the garbage ports unconnected and synthesis
removes that logic. Operands are unsigned.

## How far it can be trusted

- Every gate is checked exhaustively against written-out truth tables and for
  being a bijection. The TG is also checked for being its own inverse.
- The 4 x 4 multiplier is checked for all 256 operand pairs. The 8 x 8
  multiplier is checked for all 65,536 pairs, plus a 5 x 5 instance.
- The adder networks are checked on arbitrary partial-product patterns, not
  only on those a multiplier produces.
- The four 8 x 8 operand pairs of the reference simulation table are checked
  with their products worked out by hand: FF·FF = 65025, E1·C8 = 45000,
  C3·91 = 28275, 0F·0F = 225.

Departures from the reference design:

- the N x N adder wiring (see above);
- the output order of the Peres gate.

Nothing is timed: the reference design gives no delays or latencies.

## Files and simulation

`rtl/` holds one module or package per file:

- `rmul_pkg.sv`: count formulas and the default width
- the gates: `tg_gate.sv`, `pg_gate.sv`, `hng_gate.sv`
- `pp_tg_array.sv`, `final_product_4x4.sv`, `final_product_array.sv`
- `rmul_4x4.sv`, `rmul_nxn.sv`, `rev_multiplier_top.sv`

`tb/tb_<module>.sv` holds a self-checking testbench per module. Each prints
`TB_RESULT checks=<n> failures=<m>`. `tb_rev_multiplier_top` runs the whole
design at its default sizes. It also counts how often a carry reached the top
product bit, a carry rippled through a full chain (all-ones operands), and a
zero operand occurred, and it fails if any of these never happened.

Build and run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rmul_pkg.sv \
    tb/tb_rev_multiplier_top.sv --top-module tb_rev_multiplier_top
./obj_dir/Vtb_rev_multiplier_top
```

To change the width, set `N` on `rmul_nxn` or `rev_multiplier_top` (N ≥ 2).
The port widths and garbage counts follow from the formulas in `rmul_pkg`.
