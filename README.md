# 4x4 reversible multiplier

This is a 4-bit by 4-bit unsigned multiplier made only of *reversible* gates.
A reversible gate has as many outputs as inputs, and its input-to-output map is
one-to-one, so the inputs can always be recovered from the outputs. Reversible
logic is of interest for low-power, quantum and optical computing. Two rules
shape the circuit:

- **No fan-out.** A signal may drive only one gate input. Any value needed in
  more than one place has to be copied by a gate that passes it through.
- **Constant inputs and garbage outputs.** Making a function such as AND
  reversible needs extra inputs tied to a constant, and leaves extra outputs
  that nothing uses. These are the *garbage* outputs.

The multiplier works in two stages. A partial product generation (PPG) array
of 16 Toffoli gates forms all x_i·y_j terms. A multi-operand addition (MOA)
network of 4 Peres and 8 double Peres gates then adds them column by column.
In total the circuit has **28 gates, 28 constant-0 inputs and 28 garbage
outputs**. It is purely combinational: there is no clock and no reset.

## The three gates

| Gate | Module | Mapping | Role here (C = 0) |
|------|--------|---------|-------------------|
| Toffoli (TG), 3x3 | `toffoli_gate` | P=A, Q=B, R=AB⊕C | R = A·B is a partial product; P and Q pass A and B on |
| Peres (PG), 3x3 | `peres_gate` | P=A, Q=A⊕B, R=AB⊕C | half adder: Q is the sum, R the carry, P is garbage |
| Double Peres (DPG), 4x4 | `double_peres_gate` | P=A, Q=A⊕B, R=A⊕B⊕D, S=(A⊕B)D⊕AB⊕C | full adder of A, B, D: R is the sum, S the carry, P and Q are garbage |

When C = 0, (A⊕B)D ⊕ AB is the majority of A, B and D, so S is the carry.
Every gate in the multiplier gets exactly one constant 0, on its C input.

## Partial product generation (`rev_ppg`)

The 16 Toffoli gates sit in a 4x4 grid. The gate in row i and column j
computes P_ij = x_i·y_j. Since no signal may fan out, each operand bit travels
through the grid:

- x_i enters column 0 of its row and is passed on from gate to gate through the
  A→P path.
- y_j enters the row of x3 in its column and is passed downwards through the
  B→Q path, ending at the row of x0.

The copies that leave the end of each row and each column are the eight PPG
garbage outputs g0..g7: g0..g3 are the copies of x3..x0, and g4..g7 the
copies of y3..y0. These outputs therefore equal the inputs bit for bit. A
netlist check will report them as outputs wired straight to inputs, and that
is correct.

Partial products are numbered `pp[4*i + j] = x_i & y_j`. The bit weight of
`pp[4*i + j]` is 2^(i+j).

## Multi-operand addition (`rev_moa`)

This is the least obvious part of the design. Column k adds every partial
product of weight 2^k, plus the carries that column k-1 produced. The gates
are arranged in three rows. In each column, the last gate delivers product
bit Z_k, and its carries move one column to the left. DPG arguments are given
as (A, B, D) and PG arguments as (A, B). sN and cN name the sum and carry
outputs of earlier gates.

| Column | Inputs | Row 1 | Row 2 | Row 3 | Garbage |
|---|---|---|---|---|---|
| 0 | P00 | – | – | – | Z0 = P00 directly |
| 1 | P10 P01 | PG(P10,P01) → Z1, c1 | | | G1 |
| 2 | P20 P11 P02, c1 | DPG(P20,P11,P02) → s2, c2a | PG(c1,s2) → Z2, c2b | | G2 G3, G7 |
| 3 | P30 P21 P12 P03, c2a c2b | DPG(P30,P21,P12) → s3a, c3a | DPG(c2a,P03,s3a) → s3b, c3b | PG(c2b,s3b) → Z3, c3c | G4 G5, G8 G9, G14 |
| 4 | P31 P22 P13, c3a c3b c3c | PG(P31,P22) → s4a, c4a | DPG(c3a,P13,s4a) → s4b, c4b | DPG(c3c,c3b,s4b) → Z4, c4c | G6, G10 G11, G15 G16 |
| 5 | P32 P23, c4a c4b c4c | | DPG(c4a,P23,P32) → s5a, c5a | DPG(c4c,c4b,s5a) → Z5, c5b | G12 G13, G17 G18 |
| 6, 7 | P33, c5a c5b | | | DPG(c5b,c5a,P33) → Z6, carry Z7 | G19 G20 |

For each gate, the lower garbage number is its P output (a copy of A). For a
DPG, the higher number is its Q output (A⊕B). Every carry is used exactly
once, and the carry out of column 6 is the top product bit Z7. The network
works for any pattern of its 16 inputs: it returns Σ pp[4i+j]·2^(i+j), and
that sum is at most 225, so it always fits in 8 bits.

Which wire drives which gate input does not change the product, because a
full adder is symmetric in its three inputs. It does change the garbage bits.
The connections above were chosen so that the garbage word matches the
reference values of the original design for eight operand pairs (listed under
Verification).

## Top level (`rev_mult4x4`)

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `x` | in | 4 | multiplicand |
| `y` | in | 4 | multiplier |
| `op` | out | 8 | product x·y |
| `g` | out | 28 | garbage: `g[7:0]` = g0..g7 from the PPG, `g[27:8]` = G1..G20 from the MOA (Gk on `g[7+k]`) |
| `q` | out | `[15:1]` | partial products, `q[4i+j]` = x_i·y_j. `q[0]` is omitted because it equals `op[0]` |

`op` settles after the delay of the gate network. The longest path runs
through the PPG and then about six adder gates, from column 1 to the carry out
of column 6.

The shared sizes, types (`operand_t`, `product_t`, `pp_t`, `garbage_t`) and
cost totals are in `rev_mult_pkg`.

## Cost figures

| | Count | Where it comes from |
|---|---|---|
| Gates | 28 | 16 TG + 4 PG + 8 DPG |
| Constant inputs | 28 | one 0 per gate |
| Garbage outputs | 28 | 8 operand copies + 1 per PG + 2 per DPG |

These are the totals the design was published with. A design it was compared
against used 32 gates, 40 constant inputs and 40 garbage outputs; that design
is not part of this RTL.

## How far to trust it, and where it is this RTL's own choice

- The gate functions, the number and kind of gates, where each gate sits (row
  and column), and the garbage numbering come from the original design.
- The original design does not say exactly which carry goes into which gate
  input. The connections used here are the ones that reproduce its published
  garbage values. A few choices that those values leave open are fixed by
  convention: the row-1 carry of column 3 feeds the row-2 gate of column 4,
  and the carry is taken as input A.
- The names and widths of the top-level ports, the order of the bits in `g`
  and the meaning of `q` were inferred from the original design's simulation
  trace.
- The design is a column-wise array multiplier. Summing the partial products
  column by column resembles the vertical-and-crosswise method of Vedic
  multiplication. The design contains no 2x2-block Vedic decomposition.
- Feynman (P=A, Q=A⊕B) and Fredkin gates are standard reversible gates, but
  this multiplier does not use them, so they are not included.
- Quantum cost and delay are not modelled. Synthesised with ordinary logic,
  the circuit becomes 36 AND and 28 XOR cells. Reversibility is a property of
  the gate mapping, and the testbenches check it.

## Verification

Each module has an exhaustive, self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| Testbench | What it checks |
|---|---|
| `tb_toffoli_gate`, `tb_peres_gate`, `tb_double_peres_gate` | All input combinations against arithmetic forms of the mappings: sums mod 2, and S as C ⊕ majority. With C = 0 the PG must act as a half adder and the DPG as a full adder. Every gate must be one-to-one |
| `tb_rev_ppg` | All 256 operand pairs: every partial product bit and every garbage copy |
| `tb_rev_moa` | All 65536 input patterns against the weighted sum, plus the garbage word for the eight reference pairs |
| `tb_rev_mult4x4` | The eight reference pairs (14·15, 7·4, 11·1, 2·11, 12·14, 5·4, 15·1, 8·14) against their published op, g and q values; all 256 pairs for op, q and g[7:0]; that the 36 outputs {op, g} differ for all 256 pairs; and that a carry into op[7], a product with op[6:1] all ones, and each garbage bit at 1 all occur |

Published reference garbage values, in the same order as the pairs above:
109816823, 46, 6541, 263636, 134754419, 42, 8079, 8305.

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl rtl/rev_mult_pkg.sv tb/tb_rev_mult4x4.sv \
          --top-module tb_rev_mult4x4 -Mdir obj_top
./obj_top/Vtb_rev_mult4x4
```

Substitute any other testbench name the same way. Verilator finds the other
modules in `rtl/` through `-Irtl`. Every test finishes in well under a second.

## Changing it

- To change which signal feeds which adder input, edit the instance list in
  `rev_moa.sv`. The products stay correct as long as each column receives
  each of its inputs exactly once. The garbage check against the reference
  values in `tb_rev_moa` and `tb_rev_mult4x4` will then fail. That is
  expected, and those values must be updated.
- The PPG loops are written over `N` from `rev_mult_pkg`. The adder network,
  however, is the fixed 4x4 netlist above. A wider multiplier needs a new MOA.
