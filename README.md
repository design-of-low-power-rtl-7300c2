# 4x4 reversible multiplier built from Peres gates

A conventional AND or XOR gate throws information away: from its output you
cannot tell which input produced it. In a reversible circuit every gate maps
its inputs one-to-one onto its outputs, so nothing is erased. That is the
property that makes near-zero-dissipation logic possible in principle. The
price is two kinds of overhead:

- **constant inputs**: extra inputs tied to 0 to turn a reversible gate into
  the function you want;
- **garbage outputs**: extra outputs that carry no result but must exist to
  keep the mapping one-to-one.

This RTL describes an unsigned 4-bit × 4-bit multiplier made only of one
reversible primitive, the Peres gate. The goal is to keep both kinds of
overhead low. The product comes from two stages:

1. a 4×4 array of Peres gates forms all 16 partial products in parallel;
2. a summation network of 4 Peres half adders and 8 two-gate Peres full adders
   adds them into the 8-bit product.

The whole circuit has 28 constant inputs and 52 garbage outputs. Its primitive
count is 28 if each full adder counts as one gate, or 36 Peres gates if each
full adder counts as two.

The SystemVerilog models the *logic function and structure* of the reversible
circuit. It is ordinary combinational logic, so synthesis will map it to
standard gates. Reversibility is kept at the level of the netlist: every
garbage bit is brought out as a port, and the testbench shows that the
operands can be rebuilt from the outputs.

## The Peres gate (`peres_gate`)

| input | output |
|-------|--------|
| A     | P = A |
| B     | Q = A ⊕ B |
| C     | R = (A·B) ⊕ C |

The module is written as a Toffoli stage followed by a Feynman (CNOT) stage:
- Toffoli: C is flipped when A and B are both 1.
- Feynman: B is flipped when A is 1.

Each stage is its own inverse, so the gate is a bijection on three bits.
Holding C at 0 makes the gate useful in two ways:

- **AND gate**: R = A·B. P and Q are garbage. Used 16 times for the partial
  products.
- **Half adder** (`peres_half_adder`): Q = A ⊕ B is the sum and R = A·B is the
  carry. P = A is the only garbage bit.

The Peres gate does *not* preserve parity. For example, input 100 gives output
110. Nothing in this design relies on parity, and no parity checker is built.

## The Peres full adder (`pfag`)

Two Peres gates in cascade make a full adder:

```
         +--------+ P=A ------------------------------> g[0]  (garbage)
 A ----->|        | Q=A^B ------+
 B ----->|  PG 0  |             |   +--------+ P=A^B -> g[1]  (garbage)
 0 ----->|        | R=AB ---+   +-->| A      |
         +--------+         |  Cin->| B PG 1 | Q -----> sum  = A^B^Cin
                            +------>| C      | R -----> cout = (A^B)Cin ^ AB
                                    +--------+
```

The second gate's R output is `(A⊕B)·Cin ⊕ A·B`. This is the majority of A, B
and Cin, written with an XOR in place of an OR. The XOR is safe because the two
terms can never both be 1. The adder has one constant input (inside the
module) and two garbage outputs. The constant is tied inside every adder
module rather than brought out as a port.

## Partial product array (`partial_product_gen`)

The gate for bit pair (i, j) receives A = x[i], B = y[j] and C = 0. Its
outputs are numbered k = 4i + j:

| output | value | goes to |
|--------|-------|---------|
| R | x[i]·y[j] | `pp[i][j]` |
| P | x[i] | `g[2k+1]` (garbage) |
| Q | x[i] ⊕ y[j] | `g[2k]` (garbage) |

So gate x0y0 owns g1/g0 and gate x3y3 owns g31/g30. Row `pp[i]` is `y` if
x[i] is 1 and zero otherwise. The module is parameterised by `N` (default 4).
The summation network, however, is wired for N = 4 only.

## Summation network (`summation_network`)

This is the part that needs the most care. Partial product `pp[i][j]` has
weight 2^(i+j). Column c holds every product with i + j = c, so the seven
columns hold 1, 2, 3, 4, 3, 2, 1 bits. The network reduces them with three
ripple chains, shown below with the carry moving right to left:

```
column:            6            5            4             3             2             1          0
upper chain A:                              HA(x1y3,c) <- FA(x0y3,x3y0,c) <- FA(x0y2,x2y0,c) <- HA(x1y0,x0y1)  x0y0
                                            |sA4  |cA4    |sA3             |sA2             |
upper chain B:            FA(x2y3,x3y2,c) <- FA(x3y1,x2y2,c) <- HA(x1y2,x2y1)                 |
                          |sB5  |cB5        |sB4            |sB3                              |
lower chain:   FA(cB5,x3y3,c) <- FA(sB5,cA4,c) <- FA(sB4,sA4,c) <- FA(sB3,sA3,c) <- HA(sA2,x1y1)
               P7  P6            P5              P4              P3              P2            P1   P0
```

Putting it in words:

- **Chain A** starts in column 1. Its half adder produces P1 directly. It then
  adds two products per column up to column 3. It ends in a half adder in
  column 4 that adds x1y3 to the incoming carry. That half adder's carry
  (cA4) has the weight of column 5.
- **Chain B** starts in column 3 and adds the remaining two products of
  columns 3, 4 and 5. Its last carry (cB5) has the weight of column 6.
- **The lower chain** first adds chain A's column-2 sum to x1y1, giving P2.
  Each later adder combines the two upper-chain bits of its column with the
  carry from its right. The column-6 adder adds cB5, x3y3 and the carry; its
  carry out is P7.

Each column receives exactly the bits of its weight, so the network works for
any pattern on its 16 inputs, not only for real partial products. The largest
possible total is 1·1 + 2·2 + 3·4 + 4·8 + 3·16 + 2·32 + 1·64 = 225, which fits
in 8 bits. The testbench uses this to check all 2^16 input patterns.

### Garbage numbering of the network

| adder | garbage | adder | garbage |
|-------|---------|-------|---------|
| HA col 1 (chain A) | g0 | HA col 2 (lower) | g11 |
| FA col 2 (chain A) | g2, g1 | FA col 3 (lower) | g13, g12 |
| FA col 3 (chain A) | g4, g3 | FA col 4 (lower) | g15, g14 |
| HA col 4 (chain A) | g5 | FA col 5 (lower) | g17, g16 |
| HA col 3 (chain B) | g6 | FA col 6 (lower) | g19, g18 |
| FA col 4 (chain B) | g8, g7 | | |
| FA col 5 (chain B) | g10, g9 | | |

A half adder's garbage bit is its A input. In a full adder's pair, the lower
index is the adder's A input and the higher index is A ⊕ B. "A" means the
first operand listed in the diagram above.

### Critical path

In a PFAG, the carry input enters only the second gate, so carry-in to
carry-out costs one gate level. A or B to sum or carry-out costs two. The
longest path has 9 Peres gates in series:

1. the partial-product gate;
2. the first three adders of chain A, one level each;
3. two levels through the first gate of the column-3 lower adder and into its
   second gate;
4. one level each through the carries of columns 4, 5 and 6, ending at P7.

Chain B runs alongside chain A and is shorter.

## Top level (`top_multi`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `x` | in | 4 | multiplicand, unsigned |
| `y` | in | 4 | multiplier, unsigned |
| `p` | out | 8 | product x·y |
| `pp` | out | 4×4 | partial products, `pp[i][j] = x[i] & y[j]` |
| `g_ppg` | out | 32 | garbage of the partial product array |
| `g_sum` | out | 20 | garbage of the summation network |

Everything is combinational. There is no clock, no reset and no handshake.
`p` is valid one propagation delay after `x` and `y` settle; for a pipelined
system, register the inputs and outputs around it. The operands are always
read as unsigned. Shared widths and types (`operand_t`, `product_t`,
`pp_array_t`, garbage counts) live in `rev_mult_pkg`.

You can leave the garbage ports open if you only want the product. Synthesis
then removes the logic that drives only garbage. Many garbage bits are plain
copies of inputs (P = A), so a synthesis report shows them as outputs wired
straight to inputs.

## What follows the published design and what was chosen here

Taken from the published design:
- the Peres gate equations;
- the use of C = 0 for the AND gate and the half adder;
- the two-gate full adder and its equations;
- the 16-gate array;
- the split into 4 half adders and 8 full adders;
- the operands of the upper chains;
- the garbage numbering of both stages;
- the totals of 52 garbage outputs and 28 constant inputs.

The three operand pairs of the published simulation are reproduced exactly.
These are 1010×0101 = 00110010, 1010×1010 = 01100100 and
1111×1111 = 11100001, with the partial-product rows shown there.

Chosen here, because the published material does not fix them:
- **Links between the upper and lower chains.** They are not labelled. They
  are wired so that every adder sums bits of equal weight. The internal sums
  and carries this gives agree with the published simulation's values for all
  three pairs.
- **Garbage order.** Which of a gate's garbage outputs gets which index.
- **Gate inputs.** Which operand of a partial-product gate feeds A and which
  feeds B.
- **Constant inputs.** They are tied inside each module instead of being
  ports.
- **Timing and reset.** The design has no clock and no reset, and is purely
  combinational.

Points where the published description disagrees with itself, and the reading
used here:
- **Garbage count of the network.** It is given as 19 in one place, but the
  numbering g0–g19 and the total of 52 imply 20. This design has 20.
- **Constant inputs of the adders.** The half adder and the full adder are
  each said to need two constant inputs, but the gate diagrams show one. This
  design uses one, which is also what the stated total of 28 requires.
- **Parity.** The multiplier is described as parity preserving. The Peres gate
  is not, so the claim is not carried over.

The power figure quoted for the design belongs to a reversible implementation
technology. This RTL does not model it.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M` and has a watchdog:

| testbench | what it checks |
|-----------|----------------|
| `peres_gate_tb` | all 8 inputs against the equations; all outputs distinct; the inverse mapping restores the inputs |
| `peres_half_adder_tb` | all 4 inputs: `{carry,sum} = a+b`, garbage = a |
| `pfag_tb` | all 8 inputs: `{cout,sum} = a+b+cin`, garbage pair, outputs distinct |
| `partial_product_gen_tb` | all 256 operand pairs: every product bit and garbage bit |
| `summation_network_tb` | all 65536 input patterns: product equals the weighted sum of the inputs; all 20 garbage bits against a column-by-column integer model; every one of the 12 adders produces a carry at least once |
| `top_multi_tb` | the three published vectors; all 256 operand pairs against `x*y`; partial-product rows; operands rebuilt from the garbage alone; carry activity of each half and full adder; P7 set at least once |

`top_multi_tb` runs the top with its default parameters and covers the
whole input space.

To run a testbench with Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl rtl/rev_mult_pkg.sv tb/top_multi_tb.sv --top-module top_multi_tb
./obj_dir/Vtop_multi_tb
```

Replace `top_multi_tb` with any other testbench name. To lint one module:

```
verilator --lint-only -Wall -Irtl rtl/rev_mult_pkg.sv rtl/summation_network.sv --top-module summation_network
```

Lint reports the package's garbage-count constants as unused in the leaf
gate modules. This is expected.

## Files

| file | content |
|------|---------|
| `rtl/rev_mult_pkg.sv` | widths, types and garbage counts |
| `rtl/peres_gate.sv` | the 3×3 Peres gate |
| `rtl/peres_half_adder.sv` | Peres gate with C = 0 as a half adder |
| `rtl/pfag.sv` | two-gate Peres full adder |
| `rtl/partial_product_gen.sv` | N×N AND array of Peres gates |
| `rtl/summation_network.sv` | the 4×4 adder network |
| `rtl/top_multi.sv` | the complete multiplier |
| `tb/*_tb.sv` | one self-checking testbench per module |
