# 16 × 16 signed multiplier with First Partial product Addition (FPA)

This is a combinational 16 × 16 two's-complement multiplier built for short delay.
It starts like most fast multipliers. Radix-4 Booth encoding makes eight partial products,
and a tree of parallel counters reduces them to two rows. It has two features of its own:

* **A 5:3 parallel counter as the tree's main cell.** It takes five bits of one column
  and gives a sum bit and two carries. Both carries go to the next column. The original
  article calls it a "new 4:2 compressor". The article reports 0.63 ns for it in its
  cell library, against 0.87 ns for a 4:2 compressor built from two full adders.
* **First Partial product Addition (FPA).** The low columns of the dot array are done
  after only a few counter stages. Once a column holds at most two bits, a small adder
  finishes it, while the upper columns are still in the tree. Four chained adders of 2,
  3, 4 and 6 bits give product bits 0–14. A 16-bit carry-lookahead adder (CLA) is then
  enough for bits 16–31. A plain tree would need a 32-bit final adder.

The article reports 5.14 ns for the 16 × 16 multiplier in a 0.25 µm CMOS cell library.
It gives about 0.89 ns to Booth encoding and partial products, 2.09 ns to the four
counter stages and 2.16 ns to the CLA. The FPA adders work alongside the counter stages.
This RTL copies the structure, not the timing: no timing claim is made for it.

## Top level: `fpa_mult16`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst` | in | 1 | clock, synchronous active-high reset of the output register |
| `x` | in | 16 | multiplier (the Booth-encoded operand), two's complement |
| `y` | in | 16 | multiplicand, two's complement |
| `z_comb` | out | 32 | `x*y`, combinational |
| `z` | out | 32 | `z_comb` registered: valid one rising edge after `x`, `y` |
| `digit_neg_o`, `digit_zero_o` | out | 8 | sign / zero of each Booth digit (observation only) |
| `fpa_carry_o` | out | 4 | carries out of the FPA adders S0..S3 (observation only) |
| `cla_sel_o` | out | 1 | carry that picked the upper sum (observation only) |

The multiplier is purely combinational. The single output register is this design's own
choice. The article shows a simulation with a clock and a reset, but it does not say where
registers sit. It mentions pipelining only as a future option, so none is built. Shared
sizes and the column boundaries are in `fpa_pkg`.

## Datapath, stage by stage

```
x,y ─► booth_pp_array ─► 8 rows ─► pc_stage1 ─► 5 rows ─► pc_stage2 ─► 3 rows ─┐
           │                          │                      │         + 1 sparse row
           ▼ cols 1..0                ▼ cols 4..2            ▼ cols 8..5        ▼
        S0 (2-bit) ──carry──► S1 (3-bit) ──carry──► S2 (4-bit) ──┐        pc_stage3 ─► 3 rows
                                                                 │           │
                                                  carry ◄── S3 (6-bit) ◄── cols 14..9
                                                    │                        ▼
                                                    └──► final_adder ◄── pc_stage4 ─► 2 rows
                                                          col 15 + 2×16-bit CLA (cols 31..16)
```

### 1. Booth encoding and the dot array (`booth_encoder`, `pp_row`, `booth_pp_array`)

Digit *i* is formed from the triplet `{x[2i+1], x[2i], x[2i-1]}`, with `x[-1] = 0`. Its
value is Q = −2·x[2i+1] + x[2i] + x[2i−1], one of −2…2. The encoder produces three lines:

| x[2i+1] x[2i] x[2i−1] | Q | one | neg | py |
|---|---|---|---|---|
| 000 | 0 | 0 | 0 | 0 |
| 001, 010 | +1 | 1 | 0 | 1 |
| 011 | +2 | 0 | 0 | 1 |
| 100 | −2 | 0 | 1 | 0 |
| 101, 110 | −1 | 1 | 1 | 0 |
| 111 | 0 | 0 | 0 | 0 |

`pp_row` selects `y` or `2y` as a 17-bit value. When `neg` is set it inverts the value,
which gives a one's complement. The "+1" that makes it a two's complement is a separate
dot, called the Neg bit.

Sign extension is removed the usual way. Each row's sign bit is inverted (bit 16 of the
row), and a constant corrects for it. That constant is −Σᵢ 2^(2i+16) mod 2³² = `0xAAAB0000`.
It is spread as single ones:

* row *i*, column 2i+17, for i = 0…6;
* row 7, column 31;
* one extra one at column 16.

Each Neg bit goes into the free slot of the next row: Neg of digit *i* sits at column 2i
of row i+1. Column 14 already holds eight bits, so two dots are held back and added after
stage 2: Neg of the last digit (column 14) and the constant one at column 16.

```
      col 31                      15            0
    ..............oooooooooooooooooo   row 0  (bits 0..16, 1 at 17)
    ............oooooooooooooooooo.o   row 1  (Neg0 at col 0)
    ..........oooooooooooooooooo.o..
    ........oooooooooooooooooo.o....
    ......oooooooooooooooooo.o......
    ....oooooooooooooooooo.o........
    ..oooooooooooooooooo.o..........
    oooooooooooooooooo.o............   row 7  (1 at 31)
```

### 2. The 5:3 counter (`compressor_53`)

```
g  = (a1 ^ a2) ^ (a3 ^ a4)        S  = a5 ^ g
h  = a1·a2 + a3·a4                C1 = g ? a5 : h
C2 = (a1 + a2)·(a3 + a4)          a1+a2+a3+a4+a5 = S + 2·(C1 + C2)
```

Both carries have weight 2. C2 needs only two gate levels and does not depend on a5. The
input a5 enters only the last XOR and the C1 multiplexer, so it is the place for the
latest bit. This asymmetry matters for the FPA, as the next section shows. `counter_32` is
an ordinary full adder. The rows of the tree are 32-bit vectors. `csa53_row` and
`csa32_row` put one counter in each column at or above a parameter `LO`.

### 3. The counter stages and why their wiring matters (`pc_stage1`…`pc_stage4`)

The FPA only works if, right after each stage, the next few low columns hold no more than
two bits. Which row goes to which counter input decides that. A 5:3 counter that gets
three bits on a1, a2, a3 can raise C2 as well as C1, which leaves three bits in the next
column. With the three bits on a1, a2 and a5, C2 is constant 0. So every 5:3 layer here
puts its third row on a5:

| stage | in → out rows | wiring | columns it works on | columns handed to FPA |
|---|---|---|---|---|
| 1 | 8 → 5 | 5:3 on rows 0,1,3,4,(2→a5); 3:2 on rows 5,6,7 | 2..31 | 4..2 → S1 (3-bit) |
| 2 | 5 → 3 (+1 held-back row) | 5:3 on rows 0,1,3,4,(2→a5) | 5..31 | 8..5 → S2 (4-bit) |
| 3 | 4 → 3 | 5:3 with a1,a2 = rows 0,1; a3 = 0; a4 = held-back row; a5 = row 2 | 9..31 | 14..9 → S3 (6-bit) |
| 4 | 3 → 2 | 3:2 | 15..31 | — (final adder) |

In stage 3, a3 is tied low, so C2 = (a1+a2)·a4. It can only be set where the held-back row
has a dot. The third output row therefore has just two possible bits, at columns 15 and 17.
Each stage ignores the columns an FPA adder has already taken. This is why a stage's output
sum equals its input sum only over columns ≥ `LO`. After each stage, the bits the FPA
adders read look like this (column 31 on the left; o = can be 1):

```
after stage 1                        after stage 2 (+ held-back row)
......oooooooooooooooooooooooo..     ooooooooooooooooooooooooooo.....
.......oooooooooooooooooooooo...     oooooooooooooooooooooooooo......
...........oooooooooooooo.o.....     .....oooooooooooooooo.o.........
oooooooooooooooooooooo.o........     ...............o.o..............
.oooooooooooooooooo.o...........

after stage 3                        after stage 4
ooooooooooooooooooooooo.........     ooooooooooooooooo...............
oooooooooooooooooooooo..........     oooooooooooooooo................
..............o.o...............
```

The row counts follow the article's dot diagram (5, 4, 2 + two dots, 2). So do the FPA
adder widths and the rows each one adds. This wiring is the design's own: the article
does not print which row feeds which counter input. It was found by checking every
permutation against the column-height rule above. `fpa_mult16` holds immediate assertions
that the rows the FPA adders do not read are zero in those columns.

### 4. The FPA chain and the final adder (`fpa_adder`, `cla`, `final_adder`)

| adder | width | adds | product bits |
|---|---|---|---|
| S0 | 2 | row 0 bits 1..0 + Neg0 | 1..0 |
| S1 | 3 | stage-1 rows 0 (cols 4..2) and 1 (cols 4..3), carry from S0 | 4..2 |
| S2 | 4 | stage-2 rows 0 (8..5) and 1 (8..6), carry from S1 | 8..5 |
| S3 | 6 | stage-3 rows 0 (14..9) and 1 (14..10), carry from S2 | 14..9 |

These are ripple-carry adders. Each has a whole counter stage of time. After stage 4,
column 15 holds one bit, so bit 15 is that bit XOR the S3 carry. Columns 31..16 are added
twice in advance by two 16-bit CLAs, one with carry-in 0 and one with carry-in 1. The
carry out of column 15 then picks one of them (carry-select). The article says the upper
sums are "calculated in advance by CLA, and then selected". The two-CLA form is this
design's reading of that sentence. The CLA uses 4-bit groups with a second lookahead level
over the groups.

## Where this RTL departs from, or adds to, the article

* The output register, its reset, and which operand is Booth-encoded: the multiplier is
  encoded, as in the article's encoder table.
* The input wiring of the counters (section 3), the CLA's inner structure, the ripple-carry
  FPA adders and the carry-select form of the final adder.
* Placement of the Neg bits: the article draws all of them in the last row. Here each sits
  in the next row's free slot, at the same column. The value is the same.
* The article's delay plot of partial products shows somewhat different row counts per
  stage for 16 × 16 (8, 6, 4, 3, 2) than its dot diagram. This design follows the dot
  diagram.
* Only the 16 × 16 size is built. The article also gives final-adder savings for
  N = 32 (42.8 %), 54 (41.1 %) and 64. It gives no dot diagram for those sizes, so
  `fpa_pkg` has no generic N.
* Not modelled: the pad ring and layout of the test chip, the delay and power figures, and
  the pipelined version that the article only suggests.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a watchdog.

* `tb_fpa_mult16` runs the top at its default size. It applies 200 000 operand pairs, one
  per clock: corner values, the article's reference vector `0FFF × 568C = 05686974`, and
  random pairs. It checks `z_comb` in the same cycle and `z` one edge later, plus a
  mid-run reset. It counts each Booth digit value −2…2, a carry out of each FPA adder,
  and both choices of the carry-select adder. A mechanism that never occurs counts as a
  failure. It then tries all 65 536 multipliers against four multiplicands: 8000, 7FFF,
  FFFF and 568C.
* `tb_pc_stage1..4` feed each stage with the dot array of random operands. That array
  comes from an arithmetic reference model (`tb/tb_dots_pkg.sv`), not from the RTL. The
  testbenches check that the value is kept over the stage's columns and that the FPA
  columns hold only the rows the adders read. They also check the value for fully random
  rows.
* The cell testbenches are exhaustive: `compressor_53`, `counter_32`, `booth_encoder`, and
  `fpa_adder` at widths 2, 3, 4 and 6. `cla` and `final_adder` get 50 000 random vectors
  plus carry-chain corners. `booth_pp_array` is compared row by row with the reference
  model, and so is the sum of its rows with x·y.

All testbenches pass with Verilator 5. Each one was also run against a copy of its module
with one deliberate fault, and each copy fails.

## Simulating

```
verilator --binary --timing --assert -Irtl -Itb rtl/fpa_pkg.sv tb/tb_fpa_mult16.sv \
          --top-module tb_fpa_mult16 -o sim && ./obj_dir/sim
```

For the stage and array testbenches, put `tb/tb_dots_pkg.sv` after `rtl/fpa_pkg.sv`. The
end-to-end run takes a few seconds.

## Files

| file | contents |
|---|---|
| `rtl/fpa_pkg.sv` | sizes, row type, FPA column boundaries |
| `rtl/booth_encoder.sv`, `rtl/pp_row.sv`, `rtl/booth_pp_array.sv` | Booth digits, partial products, dot array |
| `rtl/compressor_53.sv`, `rtl/counter_32.sv` | 5:3 and 3:2 counters |
| `rtl/csa53_row.sv`, `rtl/csa32_row.sv` | row-wide counter layers |
| `rtl/pc_stage1.sv` … `rtl/pc_stage4.sv` | the four counter stages |
| `rtl/fpa_adder.sv`, `rtl/cla.sv`, `rtl/final_adder.sv` | FPA adders, CLA, carry-select final adder |
| `rtl/fpa_mult16.sv` | top level |
| `tb/tb_*.sv` | one testbench per module, `tb_dots_pkg.sv` reference model |
