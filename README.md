# 16 x 16 multiplier with a 4:2-compressor reduction tree

This is an unsigned 16 x 16-bit parallel multiplier. Its partial products
are reduced with rows of **4:2 compressors** in place of the usual
Wallace or Dadda tree of full adders. A 4:2 compressor turns four bits of
one weight (plus one carry arriving sideways) into one bit of that weight
and two bits of the next weight up. A row of them therefore turns four
partial-product rows into two. Three stages take the 16 partial-product rows
down to 2 (16 → 8 → 4 → 2). A two-level carry-lookahead adder then adds the
last two rows.

Around the multiplier sits the logic of a pin-limited test chip:

- serial loaders bring both operands in on two pins;
- an 8-bit output multiplexer shows the 32-bit product one byte at a time.

```
 input_a ─► serial_to_parallel ─┐ A[15:0]
 input_b ─► serial_to_parallel ─┤ B[15:0]
 advance ────────┘ (both)       ▼
              ┌──────────── multiplier_core ────────────────┐
              │ pp_generator ─► pp_reduction_tree ─► cla_adder │─► product[31:0]
              │  (256 ANDs)      ppa[30:0], ppb[30:0]  (31-bit) │
              └──────────────────────────────────────────────┘
                                                   os[1:0] ─► output_select ─► out[7:0]
```

## The 4:2 compressor cell

`compressor_4to2` has inputs x1..x4 and cin, and outputs s, c and cout, with

    x1 + x2 + x3 + x4 + cin = s + 2·(c + cout)

It is built in XOR/multiplexer form, the logic of a 30-transistor
pass-logic cell:

    h1 = x1 ^ x2      h2 = x3 ^ x4      h3 = h1 ^ h2
    cout = h1 ? x3  : x1
    s    = h3 ^ cin
    c    = h3 ? cin : x4

What matters at the architecture level is that **cout does not depend on
cin**. A compressor passes cout sideways into the cin of its left-hand
(more significant) neighbour. Because cout ignores cin, a chain of
compressors does not ripple, and a whole row settles in one cell delay.

`full_adder` uses the same idea: an XOR first, then two multiplexers.
`half_adder` is a plain XOR and AND.

## Compressor rows and the layout plan

This is the part that takes the most care to follow.

### A compressor row

A compressor row (`compressor_row`) spans columns FIRST..LAST of the
dot matrix. Column j holds the bits of weight 2^j.

- The row has a half adder at FIRST, 4:2 compressors at every column
  strictly between FIRST and LAST, and a full adder at LAST.
- The half adder's carry enters the first compressor's cin.
- Each compressor's cout enters the next compressor's cin.
- The last cout enters the full adder as its third input.
- The half adder and the full adder read two matrix bits each; each
  compressor reads four.

The outputs form two new rows:

- **sum row**: one bit per column FIRST..LAST, plus the full adder's carry at
  LAST+1;
- **carry row**: the compressors' c outputs, at columns FIRST+2..LAST.

### Where the rows go

The matrix is 2N−1 = 31 columns wide. Let h be the height of the tallest
column entering a stage. The stage reduces h to E = 2^(⌈log2 h⌉−1), the
largest power of two below h. It needs ⌈(h−E)/2⌉ rows. Row i (counting
from 0) covers columns:

    first = E + 2i
    last  = (2N−1) − E − 2i

For N = 16 this gives:

| stage | row | first column | last column | 4:2 cells |
|-------|-----|--------------|-------------|-----------|
| 1 | 1 | 8  | 23 | 14 |
| 1 | 2 | 10 | 21 | 10 |
| 1 | 3 | 12 | 19 | 6  |
| 1 | 4 | 14 | 17 | 2  |
| 2 | 1 | 4  | 27 | 22 |
| 2 | 2 | 6  | 25 | 18 |
| 3 | 1 | 2  | 29 | 26 |

That makes 98 compressors, 7 half adders and 7 full adders. Each row is
four columns shorter than the one before it. The rows sit where the matrix
is taller than E. Columns near the two ends are already short enough, so
their bits pass to the next stage untouched.

### Which bit goes where

The layout plan fixes each row's column range. The wiring inside that plan
follows the original cell-level netlist of the 16-bit multiplier. That
netlist lists all 112 cells one by one; here it is written as a rule. The
matrix is kept **column-compacted**: column j holds its bits in positions
0, 1, 2, ... with no gaps.

- **Inputs.** Row i of a stage reads positions 4i..4i+3 of each column
  inside its range. At its two end columns it reads only positions 4i and
  4i+1. A position at or above the column's height reads as 0. (In the
  16-bit tree this happens, for example, at column 16 of stage 1, row 4,
  which has only three bits for four inputs.)
- **Repacking.** After the stage, each column is rebuilt in this order:
  1. row 0's sum bit, row 0's carry bit, row 1's sum bit, row 1's carry
     bit, and so on, skipping bits a row does not produce in that column;
  2. the bits no cell read, in their old order.

  A full adder's carry counts as a sum bit of the next column.

For example, row 2 of stage 2 reads these four bits at column 12:

- the sum of stage 1, row 3;
- the three untouched original bits at positions 10, 11 and 12.

The rule brings every column to at most E bits after each stage. That holds
for N = 16 and also for 8, 12 and 32. For N = 16, the rule gives the
original netlist's wiring. The netlist has one inconsistent entry, where
one stage-1 sum bit feeds two cells at column 14; the rule gives the
evidently intended bit.

The package `mult_pkg` computes the whole wiring at elaboration, using
constant functions: `row_first`, `row_last`, `col_height` and `pp_src`.
`pp_reduction_stage` turns that wiring into generate blocks. Nothing is
listed cell by cell, so `N` really is a parameter. The tree's testbench
checks the table above against these functions, and checks the count of
98 compressors.

At the end, position 0 of each column is `ppa` and position 1 is `ppb`.
Some columns hold a single bit, and there the `ppb` bit is constant 0: for
N = 16 these are columns 0 and 3.

## Partial products and the final adder

`pp_generator` forms the 256 AND terms a[r]·b[c]. It files each term in
column r+c, ordered by increasing r. The output is a fixed
(2N−1) × N array, and the positions above each column's height
(min(j+1, 2N−1−j)) are tied to 0.

`cla_adder` (WIDTH = 31) adds `ppa` and `ppb` into 32 bits. It has two
lookahead levels:

- **Level one:** for each 4-bit group, a `cla_lookahead4` forms the carries
  inside the group, in flat AND-OR form, from bit generate (x·y) and
  propagate (x⊕y) signals.
- **Level two:** a `cla_lookahead4` over each run of four groups forms the
  carry into every group.

31 bits make 8 groups and 2 level-two units. The carry between the two
level-two units is passed straight across (one step). This is the
structure of the original adder netlist.

`multiplier_core` joins the three parts. It also brings out `ppa` and `ppb`,
so the reduction tree can be observed apart from the adder. The core has
no registers.

## The chip wrapper: serial load and byte output

`multiplier_chip` is the top module. Its ports are the chip's logic pins
plus `rst_n`.

| port | dir | meaning |
|------|-----|---------|
| clk | in | shift and load clock |
| rst_n | in | asynchronous active-low reset (added by this design; clears both loaders) |
| input_a, input_b | in | serial operands A and B, least significant bit first |
| advance | in | raise with the operands' last bits; at that rising clk edge both held operands load |
| os[1:0] | in | byte select: 00 → bits 7..0, 01 → 15..8, 10 → 23..16, 11 → 31..24 |
| out[7:0] | out | selected byte of A·B |

Each `serial_to_parallel` is a 16-stage shift register that shifts in at
the MSB end, so the first bit sent lands in bit 0. Next to it is a 16-bit
holding register. At a clock edge where `advance` is high, the holding
register takes the shift register's new contents, including the bit
shifted in at that same edge. So `advance` goes with an operand's last bit,
and the next operand can start on the very next clock. The multiplier only
ever sees whole operands. The shift register
keeps shifting, so the next operands can stream in while the current
product is read out.

**Timing of one operation:**

1. Clock edges 1–15: present bit k of A and B at edge k+1, with
   advance = 0. Meanwhile `out` still shows the previous product.
2. Clock edge 16: present bits 15 with advance = 1. Just after this edge
   the held operands change. After the combinational delay of the core and
   the multiplexer, `out` shows the new product.
3. Change `os` to read the four bytes. `out` follows `os` combinationally.

The rate is one multiplication every 16 clocks. This is the phase used by
the chip's production test sequence. In that sequence, the serial bits
sent with and before the second advance make 201 and 179. The low byte
expected just after that advance is 0x8B, the low byte of
201 · 179 = 0x8C8B.

In this design the holding register runs on the shift clock and uses
`advance` as a load enable. A simpler arrangement would clock the holding
register directly from `advance`. The single-clock version was chosen so
the whole chip has one clock domain. Pads, power pins and the package are
not modelled.

## Departures and limits

- **Logic only.** The cells model only the logic of the transistor circuits
  (pass-transistor and transmission-gate styles). Voltage levels, sizing,
  power and delay have no counterpart here. A synthesis tool will map the
  cells to whatever its library offers.
- **Wiring as a rule.** The tree is generated from the layout formulas and
  the repacking rule, not from a cell list. For N = 16 it reproduces the
  original netlist, apart from one inconsistent entry (see above). Other
  values of N are this design's own extension.
- **Carry mux input.** The compressor's c multiplexer takes x4 on its 0
  input. The alternative, x1, gives wrong counts (for example,
  x1 = x2 = 1 with all other inputs 0).
- **Half adder.** The half-adder sum is x XOR y: 1 + 1 gives s = 0, c = 1.
- **Unsigned only.** Operands are unsigned. There is no signed (Booth or
  Baugh-Wooley) mode.
- **Reset.** `rst_n` is an addition.

## Files

| file | content |
|------|---------|
| `rtl/mult_pkg.sv` | operand width, layout formulas and wiring functions |
| `rtl/half_adder.sv`, `rtl/full_adder.sv`, `rtl/compressor_4to2.sv` | counter and compressor cells |
| `rtl/compressor_row.sv` | HA + 4:2 chain + FA row |
| `rtl/pp_reduction_stage.sv`, `rtl/pp_reduction_tree.sv` | one stage; all stages |
| `rtl/pp_generator.sv` | AND array into the compacted dot matrix |
| `rtl/cla_lookahead4.sv`, `rtl/cla_adder.sv` | two-level carry-lookahead adder |
| `rtl/multiplier_core.sv` | generator + tree + adder |
| `rtl/serial_to_parallel.sv`, `rtl/output_select.sv` | chip input and output logic |
| `rtl/multiplier_chip.sv` | top |
| `tb/tb_*.sv` | one self-checking testbench per block |

## Simulating

Every testbench checks the design against values it computes itself. Each
one prints `TB_RESULT checks=N failures=M` and ends with `$finish`. Each
also has a watchdog that ends the run with a failure if it hangs. For
example, with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/mult_pkg.sv tb/tb_multiplier_chip.sv --top-module tb_multiplier_chip
./obj_dir/Vtb_multiplier_chip
```

What the testbenches cover:

- **`tb_multiplier_chip`** runs the full-size chip. It sends 56 operand
  pairs through the serial pins: first a fixed set of 16 pairs chosen to
  switch the whole tree (65535·65535, 0·0, 34832·8465, …), then 40 random
  pairs. It checks:
  - all four bytes of every product;
  - that the output holds while the next operands shift in;
  - the 16-clock operation length.

  Before that, it replays the first 34 clocks of the production test
  sequence pin for pin, and checks the expected output byte on each.

  It counts advance loads, each select code, products with bit 31 set, and
  a zero product, and fails if any of them never happens.
- **`tb_multiplier_core`** checks `product` and `ppa + ppb` against a·b.
  It uses the same 16 pairs, walking ones, and 5000 random pairs. It also
  runs 2000 steps of a stepping sequence: a = 0, 7, 14, … and
  b = 1, 57, 113, …
- **`tb_cla_adder`** checks the adder on carry chains across every group
  boundary, on 2000 steps of x += 54857, y += 9546, and on random operands.
- **`tb_pp_reduction_tree`** checks the layout table, and checks
  `ppa + ppb` against the matrix value for random matrices at N = 16 and
  N = 8.
- **The cell testbenches** are exhaustive: 4, 8 and 32 input combinations.

## Changing the size

`multiplier_core`, `pp_generator` and `pp_reduction_tree` take `N`. The
default comes from `mult_pkg::OPERAND_W` (16). The layout functions handle
any N ≥ 4; N = 8, 12, 16 and 32 have been checked to reduce to two rows.
`multiplier_chip` and `output_select` are fixed at 16 bits: eight output
pins and four select codes cover exactly 32 product bits. To change N, use
`multiplier_core` directly, or change `OPERAND_W` and widen
`output_select`.
