# Pyramidal adder, 16 bits

A pyramidal adder adds two N-bit numbers using nothing but half adders. It
has no full adders and no carry-lookahead logic. The half adders form a
triangle. Operand bit pairs enter one row at a time, most significant pair
first. Each row adds one carry into the result built up so far. The half
adders come in two variants, called the 2.1 and the 2.2 block. Each needs only
three or four simple gates, which gives a low gate count for adders and for
the multiplier arrays built from them. The main configuration here is
N = 16: two 16-bit operands in, 16 sum bits and one carry-out bit out, built
from 136 half-adder blocks.

Next to the adder, the top level also holds a full adder built from two XNOR
gates and a 2:1 multiplexer. It is a stand-alone cell and is not wired into
the pyramid.

Everything is combinational. There is no clock, reset or handshake: the
outputs follow the inputs after the gate delays.

## How the triangle adds

Number the rows k = 0 … N-1 from the top and the columns c = 0 … N-1 from the
least significant bit. Row k holds k+1 blocks, in columns N-1-k up to N-1.

```
 N = 4            col 3     col 2     col 1     col 0
                  a3,b3     a2,b2     a1,b1     a0,b0
 row 0           [2.2]       |         |         |
 row 1           [2.2] <-- [2.1]       |         |
 row 2           [2.2] <-- [2.1] <-- [2.1]       |
 row 3           [2.2] <-- [2.1] <-- [2.1] <-- [2.1]
                   |         |         |         |
 2.3: carry-out    S3        S2        S1        S0
```

- **Entry block.** The rightmost block of row k sits in column j = N-1-k. It
  half-adds the operand pair a[j], b[j]. Its sum bit stays in column j and
  goes down. Its carry goes to the block on its left.
- **Ripple blocks.** Every other block in the row half-adds two bits. One is
  the carry from the block on its right. The other is the sum bit coming down
  from the block above it in the same column. Its new sum goes down and its
  carry goes left.
- **Most significant column.** The leftmost block of each row is a 2.2
  block. Its carry cannot go further left, so it leaves as an active-low
  signal.
- **Carry-out.** The N active-low carries meet in the 2.3 block. That block
  inverts their combination into the carry-out, which is also sum bit N.

Why this gives a + b: after row k, the columns N-1-k … N-1 hold the sum of
the top k+1 bit pairs, except for any carries that left through the 2.2
column. Row k+1 appends the next lower pair. Its sum bit is the new low bit,
and its carry must be added to the bits above. A chain of half adders does
exactly that: it is an incrementer. The bottom row therefore holds the low N
bits of a + b.

The carry-out combination is exact for a simple reason. Each time a row
overflows column N-1, 2^N is added to the true total. The sum of two N-bit
numbers is below 2^(N+1), so at most one row can overflow for any pair of
operands. The 2.3 block can therefore OR the carries together (as the NAND of
their inverted forms) instead of adding them. The end-to-end testbench checks
this "at most one row" rule on every vector.

### Depth and size

Block (k, c) depends only on the block above it, (k-1, c), and the block on
its right, (k, c-1). So every path from an input to an output moves only down
or left. No path is longer than N blocks plus the 2.3 block. Two examples:

- a[N-1], b[N-1] entering at the top and going down the 2.2 column;
- a[0], b[0] entering at the bottom right and rippling along the last row.

The delay grows linearly with N, as in a ripple-carry adder, but each stage is
a half adder.

| N  | blocks N(N+1)/2 | 2.2 blocks | 2.1 blocks |
|----|-----------------|------------|------------|
| 4  | 10              | 4          | 6          |
| 16 | 136             | 16         | 120        |

## The blocks

**2.1 block (`adder_21`)** is a half adder with a true carry. The sum is formed
as s = (a·b)'·(a+b), which equals a XOR b without using an XOR gate. The
carry is p = a·b. The gates are an AND, an inverter on the AND term, an OR,
and a final AND. It is used in columns 0 … N-2.

**2.2 block (`adder_22`)** has the same sum, but its carry output is the
inverted AND term, p_n = (a·b)'. The block already has that signal as an
inner node. It is used in column N-1, one per row.

**2.3 block (`carry_inverter_23`)** computes s_n = ~(p_n[0] & … & p_n[ROWS-1]).
This is high when any row overflowed.

**XNOR/MUX full adder (`mod_full_adder`)** computes x = b XNOR c and
sum = x XNOR a. A 2:1 multiplexer controlled by x gives the carry:

- when b and c agree, they alone decide the carry, and the mux passes b;
- when they differ, the carry equals a.

This is the same function as ab + ac + bc.

**`pyramidal_adder`** generates the triangle for any N ≥ 1. **`pyramidal_adder_top`**
holds the pyramid and the full adder side by side, each with its own ports.

`pyramid_pkg` holds the default width `PYR_WIDTH = 16` and the block-count
function `pyr_block_count(n) = n(n+1)/2`.

### Top-level ports (`pyramidal_adder_top`, parameter `N = 16`)

| port       | dir | width | meaning                       |
|------------|-----|-------|-------------------------------|
| `a`, `b`   | in  | N     | operands, bit 0 least significant |
| `sum`      | out | N     | low N bits of a + b           |
| `cout`     | out | 1     | carry-out (bit N of a + b)    |
| `fa_a`, `fa_b`, `fa_c` | in | 1 | full adder inputs     |
| `fa_sum`, `fa_carry`   | out | 1 | full adder outputs   |

## What is interpretation

These points follow the source description:

- the triangle shape;
- the order in which bit pairs enter (most significant pair in the top row);
- the three block types and their roles;
- the half-adder and full-adder equations;
- the default width of 16.

These points are this design's own choices:

- **Carry direction inside a row.** Carries go from right to left, that is,
  toward more significant columns. This is the only direction under which the
  bottom row yields a + b.
- **The 2.3 block.** The line joining the 2.2 outputs is written as an
  explicit AND followed by the inversion.
- **Which mux input is selected when.** The mux passes b when b XNOR c is 1
  and a otherwise.
- **The full adder stands alone.** The triangle uses only half adders, so the
  full adder is not connected to it.
- **Bit numbering** starts at 0; the original drawings number bits 1 … 16.
- **No registers.** The adder is purely combinational.

The source also proposes using the pyramidal adder inside a Braun array
multiplier. It gives gate counts for a 4×4 case: 76 gates against 120 for a
conventional array. It does not say how partial products are routed into
the pyramids, so no multiplier is included here.

## Simulating

Every module has its own self-checking testbench in `tb/`. Each prints one
line, `TB_RESULT checks=<n> failures=<n>`, and stops. A watchdog ends the run
with a failure if it hangs. To run the end-to-end test with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    --top-module tb_pyramidal_adder_top rtl/pyramid_pkg.sv tb/tb_pyramidal_adder_top.sv
./obj_dir/Vtb_pyramidal_adder_top
```

Replace the top-module name to run another testbench. The package file must
come first on the command line.

| testbench                 | what it covers |
|---------------------------|----------------|
| `tb_adder_21`, `tb_adder_22` | all four input pairs |
| `tb_carry_inverter_23`    | no carry, a carry from each single row, random patterns |
| `tb_mod_full_adder`       | all eight inputs against parity and majority |
| `tb_pyramidal_adder`      | a 4-bit pyramid exhaustively (256 pairs); the 16-bit pyramid on corner cases and 20 000 random pairs |
| `tb_pyramidal_adder_top`  | the whole top at its defaults, 50 000 random pairs plus corner cases; counts each mechanism (below) and fails if any never occurs |

The end-to-end test counts these mechanisms:

- a carry-out produced by each of the 16 rows;
- additions with no carry-out;
- a carry rippling through all 16 columns of the bottom row;
- both multiplexer selections of the full adder.

It also reads the pyramid's internal active-low carry vector through a
hierarchical reference (`dut.u_pyr.carry_n`). Keep that name if you
restructure the pyramid.

## Changing it

- **Width.** Set `N` on `pyramidal_adder` or `pyramidal_adder_top`. It scales
  the triangle, the 2.2 column and the 2.3 block together. To change the
  default everywhere, change `PYR_WIDTH` in `pyramid_pkg`.
- **Block internals.** The block modules are separate files. You can replace
  a block's internals, for example with a library half-adder cell, without
  touching the triangle. The 2.2 block must keep its carry active-low, or the
  2.3 block must be changed to match.
