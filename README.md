# Reversible radix-2 Booth array multiplier

A reversible circuit maps every input pattern to a different output pattern,
so no information is erased. This matters because erasing a bit costs a minimum
energy of kT ln 2, so a reversible circuit has no such floor on its power. Two
rules follow from reversibility. A line may not fan out to two gates, and the
circuit may have no feedback loops. Outputs that are not needed
("garbage") must still be brought out.

This RTL builds an N x N multiplier from reversible gates under those rules.
It uses Booth's radix-2 algorithm as a purely combinational array. A column of
control cells recodes the multiplier. Each row of arithmetic cells then adds,
subtracts or skips the shifted multiplicand. The same hardware multiplies
signed (two's-complement) and unsigned operands. The default is the 4 x 4 case.

Every gate is written as its Boolean mapping in SystemVerilog. The result is
ordinary synthesizable combinational logic that has the structure of the
reversible circuit. It counts gates, garbage lines and quantum cost. It does not
model quantum hardware.

## The gates

| gate | size | mapping (inputs A, B, C, D) | quantum cost | module |
|---|---|---|---|---|
| Feynman (CNOT) | 2x2 | P=A, Q=A^B | 1 | `feynman_gate` |
| TS-3 | 3x3 | P=A, Q=B, R=A^B^C | 2 | `ts3_gate` |
| Fredkin | 3x3 | P=A, Q=A?C:B, R=A?B:C | 5 | `fredkin_gate` |
| Peres | 3x3 | P=A, Q=A^B, R=AB^C | 4 | `peres_gate` |
| MTSG | 4x4 | P=A, Q=A^B, R=A^B^C, S=(A^B)C^AB^D | 6 | `mtsg_gate` |

The quantum costs of TS-3, Fredkin, Peres and MTSG are the source design's
figures. The Fredkin, Peres, Feynman and MTSG mappings are the usual ones. The
source design does not give the TS-3 mapping. The one above is the simplest
3x3 gate of cost 2 (two CNOTs) that gives what the cells need: the XOR of two
inputs on the third output when C = 0.

## C cell: Booth recoding (`c_cell`)

Radix-2 Booth looks at each multiplier bit X_i together with the bit below it,
X_(i-1). Below X_0 there is an implicit 0.

| X_i X_(i-1) | row action | H | D |
|---|---|---|---|
| 00, 11 | skip | 0 | 0 |
| 01 | add Y * 2^i | 1 | 0 |
| 10 | subtract Y * 2^i | 1 | 1 |

So H = X_i ^ X_(i-1) and D = X_i & ~X_(i-1). The cell has two gates:

- TS-3(X_i, X_(i-1), 0) puts H on its third output and passes both bits on.
- Fredkin(X_(i-1), X_i, 0) then puts ~X_(i-1) & X_i = D on Q, X_(i-1) on P,
  and the garbage X_i & X_(i-1) on R.

The cell's quantum cost is 7.

The Fredkin hands X_(i-1) back out. In the array this line feeds the C cell
below as its X_i. The multiplier therefore enters the column from the top, and
each bit serves two cells without a fan-out.

## B cell: add, subtract or skip one bit (`b_cell`)

This is the core of the design. One cell takes:

- a: a partial-sum bit from the row above
- b: a multiplicand bit
- c: the carry or borrow from the cell to its right
- the row controls H and D

It computes

    Z    = H (b ^ c) ^ a
    Cout = (a ^ D)(b ^ c) ^ b c

- H = 0 (skip): Z = a, the partial sum passes unchanged.
- H = 1, D = 0 (add): Z = a^b^c and Cout = majority(a, b, c), a full adder.
- H = 1, D = 1 (subtract): Z is again a^b^c, the difference bit of a - b - c.
  Cout = ~a(b^c) ^ bc is the borrow of a - b - c. The borrow ripples along the
  row like a carry.

A skip row still produces nonzero Cout values. They are harmless because Cout
reaches the next cell's Z only through H, which is 0 across the whole row.

The gates are wired as follows:

    TS-3 (D, a, 0)        -> D (to next cell), a, a^D
    MTSG (b, c, a^D, 0)   -> b (to next row), b^c, G* (garbage), Cout
    Peres(H, b^c, a)      -> H (to next cell), G' (garbage), Z

With D = 0 the MTSG is a full adder. Feeding it a^D instead of a turns its
carry into a borrow when D = 1. The cell has seven lines in (a, b, c, H, D and
two constant 0s) and seven lines out. It regenerates b, H and D so the next
cells can use them without a fan-out. Its quantum cost is 12 and it has 2
garbage outputs. The gate names, the constant 0 into the MTSG, and the Z and
Cout equations follow the source design. The assignment of signals to gate
pins is this design's reading of it.

## The array (`booth_array`)

`booth_array` multiplies W = N+1 bit two's-complement numbers. In the source
design's notation these are X_N..X_0 and Y_N..Y_0. The product has 2W bits.

- **Control column.** It holds W C cells, one per row. Cell i drives row i.
- **Rows.** Row i has W+1 B cells, covering product weights i .. i+W.
  - Cell j gets multiplicand bit Y_j. Cell W gets Y_(W-1) again, as the sign
    extension.
  - Cell j gets partial-sum bit i+j of row i-1. Cell W gets that row's sign
    bit again. Row 0 starts from zeros.
  - The carry-in of cell 0 is 0. The carry-out of cell W is dropped to
    garbage, because the row's result always fits.
  - H and D pass along the row from cell to cell.
  - b passes down to the same cell of the next row.
- **Width.** After row i the partial sum is Y times an (i+1)-bit
  two's-complement number. It always fits in the row's W+1 bits, so there is
  no overflow.
- **Outputs.** The lowest bit of row i is final and becomes product bit i. The
  last row gives the top W+1 product bits.
- **Duplicated lines.** Each row's top cell needs two lines twice: Y's sign bit
  (row 0) and the partial-sum sign (the other rows). A Feynman gate with a 0
  target makes each copy. There are W such copies in all.

The source design draws the array as a trapezium. This version uses rows of
equal length, each shifted one place. The function is the same.

All unused outputs are gathered on the `garbage` port, so the circuit keeps as
many outputs as inputs. Its layout, for W = N+1 and widths counted from bit 0:

| field | width |
|---|---|
| for each row i in turn: G* of cells 0..W, then G' of cells 0..W | 2(W+1) per row |
| for each row i in turn: carry-out, H and D of cell W | 3 per row |
| multiplicand regenerated by the last row | W+1 |
| garbage line of each C cell | W |
| the regenerated implicit zero | 1 |

## Signed and unsigned operands (`rev_booth_multiplier`, the top)

The array is two's-complement only. The top widens each N-bit operand by one
bit:

- `is_signed = 1`: a copy of the operand's top bit.
- `is_signed = 0`: a 0.

An unsigned N-bit value is then a non-negative (N+1)-bit value, and the array
needs no mode of its own. The low 2N bits of the array's product are the
answer in both modes.

The widening is reversible too:

- A Feynman gate copies `is_signed` for the two operands.
- Per operand, Peres(is_signed, msb, 0) gives is_signed & msb.
- A Feynman gate then recovers msb from the Peres output is_signed ^ msb.

The two `is_signed` copies and the two unused top product bits are appended
to the array's garbage.

The source design states that the multiplier handles both signed and unsigned
numbers. The `is_signed` input and this widening scheme are this design's own
way of providing that.

### Ports

| port | dir | width | meaning |
|---|---|---|---|
| `x` | in | N | multiplier |
| `y` | in | N | multiplicand |
| `is_signed` | in | 1 | 1: both operands two's complement; 0: both unsigned |
| `p` | out | 2N | product (two's complement when signed) |
| `garbage` | out | 2W(W+1)+5W+6 | garbage lines: the array's, then the two `is_signed` copies, then array product bits 2N+1..2N |

Parameter: `N` (default 4).

### Timing

There is no clock, register or feedback. `p` is valid one combinational delay
after the inputs settle. The critical path runs down the C column, then
through the carry chain of each row in turn.

## Cost of the default 4 x 4 multiplier

These counts come from this RTL. The source design's own totals are not
reproduced here.

| item | count | quantum cost |
|---|---|---|
| B cells (5 rows x 6) | 30 (90 gates) | 360 |
| C cells | 5 (10 gates) | 35 |
| Feynman copies in the array | 5 | 5 |
| operand widening (3 Feynman, 2 Peres) | 5 | 11 |
| **total** | **110 gates** | **411** |

The design has 91 garbage outputs and 90 constant inputs. With the 9 real
inputs that makes 99 lines in and 99 out.

## Where this departs from, or adds to, the source design

- The TS-3 gate's mapping and the pin assignment inside both cells are chosen
  so that the cells give the stated H, D, Z and Cout.
- The row layout is a parallelogram of W+1 cells per row, not the drawn
  trapezium. Carry-in is 0 and the final carry is discarded.
- The Feynman gates that copy lines, the top-down multiplier chain through the
  C cells, and the signed/unsigned widening are this design's own.
- The source design compares delay, garbage and quantum-cost figures with
  earlier multipliers. No delay model is included here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=<n> failures=<n>` and has a watchdog.

- **Gates** (`*_gate_tb`): every input pattern is compared with the gate
  mapping. The tests also check that no two inputs give the same output,
  i.e. that the gate is reversible.
- **`c_cell_tb`**: all four bit pairs are checked against the Booth table.
- **`b_cell_tb`**: all 32 inputs are checked arithmetically: a+b+c = 2Cout+Z
  when adding, a-b-c = Z-2Cout when subtracting, Z = a when skipping. The test
  also checks that the cell's seven outputs are one-to-one.
- **`booth_array_tb`**: all 32 x 32 signed 5-bit products.
- **`rev_booth_multiplier_tb`**: runs at the default size with no parameter
  override. It covers all 256 operand pairs in signed mode and all 256 in
  unsigned mode. It counts the signed and unsigned runs, the add, subtract and
  skip rows, and the negative products, and fails if any of these never
  occurs.

- **`rev_booth_multiplier_sizes_tb`**: checks that the design generalises to
  other widths. At N = 8 it tests every operand pair in both modes. At N = 16 it
  tests 20000 random pairs per mode plus corner values.

For each module, a copy with one deliberate bug made its testbench fail.

To run a test with Verilator:

    verilator --binary --timing -Irtl -y rtl tb/rev_booth_multiplier_tb.sv \
      --top-module rev_booth_multiplier_tb
    ./obj_dir/Vrev_booth_multiplier_tb

For a different size, change `N` on the top. All widths and garbage fields
follow from it. `booth_array_tb` and `rev_booth_multiplier_tb` are exhaustive,
so their run time grows as 4^N.
