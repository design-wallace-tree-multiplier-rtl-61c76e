# 8x8 Wallace tree multiplier built from reversible gates

This is a combinational 8-bit × 8-bit unsigned multiplier. Every adding element in it is made of
reversible logic gates. These are gates with as many outputs as inputs, and the inputs can always be
recovered from the outputs. They are the Peres, BJK, CNOT (Feynman) and Toffoli gates. The
multiplier is a Wallace tree, which works in three steps:

1. An AND array forms eight partial-product rows.
2. Two reduction stages of 4:2 compressors, full adders and half adders cut the 15 columns of
   partial-product bits down to two rows.
3. A ripple-carry adder adds those two rows.

The result port is 17 bits wide: `y[16:0]` for operands `a[7:0]` and `b[7:0]`.

The most important thing to know before using this RTL: **the 4:2 compressor is approximate, so
the multiplier is approximate too.** It returns `a*b` exactly for 61 307 of the 65 536 operand
pairs. For the other 4 229 pairs it returns less than `a*b`. The section on the compressor below
explains why and what it costs.

## The three steps

```
 a[7:0] b[7:0]
    |     |
  pp_gen            pp[r][k] = a[k] & b[r]     (bit of weight 2^(r+k))
    |
  wallace_reduce    stage 1, stage 2  ->  row0[15:0], row1[14:3]
    |
  final_rca         columns 3..15 of row0 + row1, carry out -> y[16]
    |
 y[16:0] = { rca sum[13:0], row0[2:0] }
```

Columns 0–2 are down to one bit after the reduction, so they skip the adder. Bit 16 is the carry
out of the ripple-carry adder. It is always 0, because the result never exceeds 255 × 255.

There is no clock and there are no registers. The longest path runs through about 6 gate levels in
the tree (two compressors of 3 levels each), then 13 ripple positions.

## The reduction schedule

The 8×8 partial products form 15 columns, with heights 1, 2, …, 8, …, 2, 1 (column 0 on the
right, weight 2^0). Each stage places a fixed set of elements in each column. A sum stays in its
column, and a carry moves one column to the left (weight ×2). A bit that no element takes passes
down unchanged.

| column | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 12 | 13 | 14 | 15 |
|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| height in | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 7 | 6 | 5 | 4 | 3 | 2 | 1 | – |
| stage 1 | – | H | F | C | C+1 | C+H | C+F | C+C | C+F | C+H | C+1 | C | F | H | – | |
| height after 1 | 1 | 1 | 2 | 2 | 3 | 3 | 4 | 4 | 4 | 4 | 4 | 2 | 2 | 2 | 2 | 0 |
| stage 2 | – | – | H | H | F | F | C | C | C | C | C | H | H | H | H | |
| height after 2 | 1 | 1 | 1 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 2 | 1 |
| final adder | – | – | – | HA | FA | FA | FA | FA | FA | FA | FA | FA | FA | FA | FA | HA |

Key: C = 4:2 compressor, F = full adder, H = half adder, "+1" = one bit passed down, – = bits passed
down.

Stage 1 uses 10 compressors, 4 full adders and 4 half adders. Stage 2 uses 5 compressors, 2 full
adders and 6 half adders. The final adder uses 2 half adders and 11 full adders. This schedule is
the published one for this multiplier.

Which bits of a column go to which element is this design's own choice:

* In stage 1, elements take the column's bits in increasing partial-product row order.
  Compressors go first, so a compressor always gets the lowest four rows present in its column.
* In stage 2, a column holds, in order, the sums made in it, any bits that passed down, and the
  carries from the column to its right.

With exact adders this choice would not matter. With the approximate compressor it decides which
operand pairs come out wrong.

`wallace_reduce` spells every element out as a named instance, `u_st<stage>_c<column>_<kind><n>`.
That makes it easy to hold the RTL against the table above.

## The 4:2 compressor, and why the product is approximate

The compressor takes four bits of one column and returns two: `sum`, with the column's weight,
and `carry`, with twice that weight. Unlike the usual 4:2 compressor, it has **no carry-in from its
right-hand neighbour and no carry-out to its left-hand neighbour**. Two output bits can carry a
value of at most 3, so four input ones cannot be represented. The truth table it implements is:

```
sum   = a ^ b ^ c ^ d
carry = (a ^ b)(c ^ d) | ab | cd
```

This is exact for 0 to 3 ones. Four ones give sum 0 and carry 1, which is **2 instead of 4**. A
compressor in column c that sees four ones therefore loses 2^(c+1) from the product. The error is
never positive: `y <= a*b` always.

Measured over all 65 536 operand pairs:

| | |
|---|---|
| exact results | 61 307 |
| results below `a*b` | 4 229 |
| largest error | 8 432 |
| mean error over all pairs | 73.25 |
| examples | 15 × 15 → 209 (exact 225); 255 × 255 → 56 593 (exact 65 025); 200 × 100 → 20 000 (exact) |

A compressor only sees four ones when four partial-product bits of one column are all set. That
needs four set bits in each operand. So every product in which either operand has fewer than four
set bits is exact. This holds in particular whenever `a < 15` or `b < 15`.

To get an exact multiplier, the compressor needs the extra carry output of a standard 4:2
compressor (with a matching input in the next column), or the columns of height 4 need to be cut
with full and half adders instead. Either way the schedule above changes, and that is not
implemented here.

### Inside the compressor

The compressor is built from three Peres gates and one BJK gate. Here `PG(a, b, c)` is a Peres gate
with inputs a, b, c:

```
PG (a, b, 0)          -> q: x1 = a^b      r: g1 = a&b
PG (c, d, 0)          -> q: x2 = c^d      r: g2 = c&d
BJK(g1, g2, 0)        -> r: g  = g1|g2
PG (x1, x2, g)        -> q: sum = x1^x2   r: carry = (x1&x2) ^ g
```

The last gate's XOR acts as the OR of the carry equation, because `x1&x2` and `g` can never both be
1. When `x1` is 1, a and b differ, so a&b is 0. In the same way, `x2 = 1` rules out `c&d`. The
published compressor is described as a network of CNOT, BJK and Peres gates. This particular
arrangement is this design's own.

## The reversible gates and adders

| module | inputs → outputs |
|---|---|
| `rev_cnot` | (a, b) → p = a, q = a^b |
| `rev_toffoli` | (a, b, c) → p = a, q = b, r = ab ^ c |
| `rev_peres` | (a, b, c) → p = a, q = a^b, r = ab ^ c. Built as a Toffoli followed by a CNOT on lines a, b |
| `rev_bjk` | (a, b, c) → p = a, q = b, r = (a\|b) ^ c |
| `rev_half_adder` | one Peres gate fed (a, b, 0): sum = q, carry = r |
| `rev_full_adder` | Peres (a, b, 0), then Peres (cin, a^b, ab): sum = q, carry = r |

Outputs that carry no needed value are left unconnected (the "garbage" outputs of reversible
design, such as the p outputs of the Peres gates). Lint reports them as unused signals. That is
expected.

Only the gates' logic functions are modelled. The RTL is ordinary synthesizable logic, so a
synthesis tool will merge and optimise across gate boundaries like any other logic. Reversibility
is a property of how the netlist is drawn, not something the RTL keeps.

## Files

`rtl/`:

* `wallace_pkg.sv`: operand and result widths (8, 8, 17).
* `wallacetree.sv`: the top module, ports `a[7:0]`, `b[7:0]`, `y[16:0]`.
* `pp_gen.sv`: AND array, parameters `A_W`, `B_W`.
* `wallace_reduce.sv`: the two reduction stages. It is written for 8×8 only.
* `final_rca.sv`: ripple-carry adder, parameter `W` (default 13, for columns 3..15). The second
  operand is one bit shorter than the first.
* `rev_compressor42.sv`, `rev_full_adder.sv`, `rev_half_adder.sv`: the adding elements.
* `rev_peres.sv`, `rev_bjk.sv`, `rev_cnot.sv`, `rev_toffoli.sv`: the gates.

`tb/`:

* A self-checking testbench per module, `tb_<module>.sv`. Each prints
  `TB_RESULT checks=N failures=M`.
* The gate and compressor testbenches compare against the gates' truth tables, typed in as
  constants. The adder testbenches compare against integer addition.
* `wallace_ref_pkg.sv` is a reference model of the reduction. It works on columns of bits and is
  driven only by per-column element counts, not by the gate netlist.
* `tb_wallace_reduce` checks both output rows bit for bit against that model. It uses matrices
  made from random operands and matrices of random bits.
* `tb_wallacetree` runs all 65 536 operand pairs and checks three things: y matches the model;
  y never exceeds a*b; y equals a*b whenever no compressor saw four ones. It also counts
  four-ones events in each stage, long carry ripples in the final adder, and results with
  low-bit columns set. It fails if any of these never happens.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing -y rtl -y tb rtl/wallace_pkg.sv tb/wallace_ref_pkg.sv \
          tb/tb_wallacetree.sv --top-module tb_wallacetree
./obj_dir/Vtb_wallacetree
```

The whole 65 536-pair run takes a few seconds. For another testbench, change the file and the top
module name. Add `tb/wallace_ref_pkg.sv` only for `tb_wallace_reduce` and `tb_wallacetree`. Lint
reports unused garbage outputs. Add `-Wno-fatal` if your Verilator setup treats warnings as errors.

## What follows the published design and what does not

Taken from the published design:

* 8×8 operands, a 17-bit result, and the port names `a`, `b`, `y`.
* The three-step structure, with a ripple-carry final adder.
* The per-column placement of compressors, full adders and half adders in both stages and in the
  final adder.
* The compressor's truth table, including the four-ones case.
* The Peres-gate half adder and two-Peres full adder.
* The functions of the Peres, BJK, CNOT and Toffoli gates.

This design's own choices:

* The gate-level arrangement inside the compressor.
* Building the Peres gate as Toffoli + CNOT.
* The order in which a column's bits feed its elements.
* Using the reversible half and full adders inside the ripple-carry adder.
* Treating the operands as unsigned, and having no registers.

The published compressor equation for `sum` has a last term that reduces to zero. Read that way,
it would contradict the compressor's own truth table for inputs 1101 and 1110. This design follows
the truth table, which makes `sum` the XOR of all four inputs.

Not built:

* The Fredkin gate, and a full adder made of Feynman and Fredkin gates. They are presented as an
  alternative to the Peres full adder used here.
* The earlier multipliers discussed only for comparison: a counter-based Wallace multiplier and a
  multiplexer-based full adder and compressor.
* The FPGA results reported for the original (LUT count, 0.027 W power, 29.327 ns delay) belong
  to a particular device and tool flow. This RTL has not been measured against them.
