# A Brent-Kung parallel adder as an array of nMOS leaf cells

A ripple or Manchester-chain adder needs time proportional to n in the worst
case, because a carry may have to cross every bit position. A carry-lookahead
adder of the Brent-Kung kind needs only about 2·log2(n) − 1 levels of logic.
Its usual drawback is irregular wiring. This design keeps the Brent-Kung prefix
tree but lays it out as a rectangular array with only a handful of cell types.
All wiring runs at right angles, and every cell is a NOR/NAND-style gate, as suits
nMOS technology:

* no diagonal wires: a signal that has to move sideways goes along a row of
  pass-through cells;
* no AND/OR gates: every row of cells inverts what it sends north, and
  alternate rows use a "dual" combining cell, which takes complemented
  inputs and gives true outputs.

The RTL describes this array cell by cell. The array is a generic n-bit adder
(`bk_adder`, 16 bits by default). The 5-bit prototype chip (`ausmpc_adder5`)
is that array with a feedback loop added to test it dynamically.

## The array

From south to north an n-bit adder is:

1. **G row**: n G cells. Each forms g_i = a_i·b_i and p_i = a_i ⊕ b_i. It sends
   g up the *x* line and p up the *y* line, and sends a second copy of p up the *z*
   line to the sum row.
2. **k BW rows** of n cells each, with k = `bk_pkg::bw_rows(n)` (7 for 16 bits).
   Each position holds one of four cells:

   | cell | role | x_out | y_out | z_out | v_out / w_out |
   |------|------|-------|-------|-------|---------------|
   | WA | pass east→west | ¬x | ¬y | ¬z | v_in / w_in |
   | WB | turn south→west | ¬x | ¬y | ¬z | x_in / y_in |
   | BA | combine, true inputs | ¬(x ∨ y·v) | ¬(y·w) | ¬z | — |
   | BB | combine, complemented inputs | ¬(x·(y ∨ v)) | ¬(y ∨ w) | ¬z | — |

   *v* and *w* run from east (lower bits) to west. A black cell (BA/BB) gets
   its east operand (the generate and propagate of the adjacent lower group)
   from a WB cell, over zero or more WA cells.
3. **S row**: n − 1 S cells. The S cell between columns i and i−1 forms
   s_i = x(i−1) ⊕ z(i). x(i−1) is the final carry out of the lower column, and z(i)
   is this bit's own propagate. The lowest sum bit is z of column 0. The carry
   out is x of the top column. Both pass through an I cell (an inverter) when k
   is odd and through a plain wire when k is even.

There is no carry in. To get one, use an (n+1)-bit adder: feed the carry in to
both low-order inputs and discard the lowest sum bit.

### Polarity

This is the part that is easiest to get wrong when you change the array. Every
BW cell inverts all three vertical lines. So row r receives true-polarity
signals when r is odd and complemented signals when r is even. Hence:

* odd rows use **BA**. From (g, p) and (ĝ, p̂) it outputs the Brent-Kung
  operator complemented: x_out = ¬(g ∨ p·ĝ), y_out = ¬(p·p̂);
* even rows use **BB**. Its inputs are ¬g, ¬p, ¬ĝ, ¬p̂ and it outputs the operator in
  true polarity. By De Morgan, ¬(¬g·(¬p ∨ ¬ĝ)) = g ∨ p·ĝ.

A WB cell feeding a black cell sends its x and y west uninverted. The black
cell's east operand therefore always has the same polarity as its own inputs.
At the top both the carry line x and the propagate line z have been inverted
k times. The S cell's XOR of two equally inverted signals needs no
correction. Only the two single-signal outputs (lowest sum bit, carry out)
need the I cells, and only when k is odd.

### Where the black cells go

With 1-based bit positions i = column + 1 (column 0 is the least significant
bit, drawn on the east side):

* **up rows** l = 1 … U, U = ⌊log2 n⌋. There is a black cell at every i with i mod 2^l = 0. Its
  operand comes from i − 2^(l−1).
* **down rows** d = D … 1, D the largest d with 3·2^(d−1) ≤ n. There is a black cell at every
  i > 2^d with i mod 2^d = 2^(d−1). Its operand comes from i − 2^(d−1).

The operand column holds a WB. The columns strictly between the operand column and the black cell hold WA
cells. Every other position holds a WB whose westward outputs nobody reads.
So k = U + D. For the 16-bit adder the layout is (west = bit 16 on the left,
row 1 at the bottom):

```
row 7  WB BA WB BA WB BA WB BA WB BA WB BA WB BA WB WB
row 6  WB WB BB WA WB WB BB WA WB WB BB WA WB WB WB WB
row 5  WB WB WB WB BA WA WA WA WB WB WB WB WB WB WB WB
row 4  BB WA WA WA WA WA WA WA WB WB WB WB WB WB WB WB
row 3  BA WA WA WA WB WB WB WB BA WA WA WA WB WB WB WB
row 2  BB WA WB WB BB WA WB WB BB WA WB WB BB WA WB WB
row 1  BA WB BA WB BA WB BA WB BA WB BA WB BA WB BA WB
       G  G  G  ...                                 G
```

Row counts and the "regularity factor" (all cells of the array divided by the
number of distinct cell types) for the tabulated sizes:

| n | 4 | 5 | 8 | 12 | 16 | 24 | 32 | 48 | 64 | 128 | 256 |
|---|---|---|---|----|----|----|----|----|----|-----|-----|
| BW rows k | 3 | 3 | 5 | 6 | 7 | 8 | 9 | 10 | 11 | 13 | 15 |
| I cells | 2 | 2 | 2 | 0 | 2 | 0 | 2 | 0 | 2 | 2 | 2 |
| regularity | | | 8 | 16 | 21 | 40 | 50 | 96 | 119 | | |

With cells W = 31 λ wide, BW cells H = 39 λ high, and G plus S rows 88 λ high, the
array measures 31n λ by (39k + 88) λ. These are layout figures. The RTL does
not model them, but the row counts it generates reproduce them.

## The 5-bit prototype with its feedback loop

`ausmpc_adder5` is `bk_adder` with N = 5, with one change in column 0. The G cell
there is replaced by a **G2** cell, with x_in = mask c and y_in = the fed-back lowest
sum bit s0:

```
row 3  BA WB BA WB WB
row 2  WB BB WA WB WB
row 1  WB BA WB BA WB
       G  G  G  G  G2        inputs b4 a4 | b3 a3 | b2 a2 | b1 a1 | c, s0
```

The G2 cell is the G cell with one pull-down transistor removed. Its generate
output is still x·y, but its propagate output becomes x·¬y. So:

* **c = 0**: g0 = p0 = 0, s0 = 0, and the rest is a 4-bit adder,
  s[5:1] = a[4:1] + b[4:1];
* **c = 1**: g0 = s0 and p0 = ¬s0. The s0 loop passes through seven inverters:
  three in the G2 cell, one in each of the three BW cells of column 0, and the I cell.
  An odd ring oscillates, so the carry into bit 1 alternates. s[5:1] then
  alternates between a + b and a + b + 1. For example, 1001 + 1010 gives s5 = 1,
  s4 = 0 and s3 s2 s1 alternating between 011 and 100.

The chip's pads and its T cells are not modelled. The T cells are non-inverting
superbuffers that drive the output pads, and the input pads add TTL-compatible
double inversion. As logic they are wires, so the top's ports are the chip's
nine inputs and five outputs.

**Timing model.** All cells are zero-delay. The feedback wire carries the whole
loop delay, `LOOP_DELAY` time units (default 1). This sets the half period of
the oscillation and keeps an event-driven simulator from spinning at one time
step. Synthesis ignores the delay and reports the s0 → G2 path as a
combinational loop. That loop is intended: it is the ring oscillator.

## Reading of the cell equations

These are the choices made where a cell's specification has to be reconstructed:

* **BB**: x_out = ¬(x_in·(y_in ∨ v_in)). This follows the transistor
  network: x_in in series with the parallel pair y_in, v_in. Any other reading
  breaks the duality with BA.
* **G2**: y_out = z_out = x_in·¬y_in. This follows from the G cell's
  two-level NOR network with the y_in pull-down of its inner NOR removed. It is
  the only reading that gives both a 4-bit adder at c = 0 and an odd
  (seven-inverter) ring at c = 1.
* Positions without a black cell or a pass-through hold a WB cell, which
  is also how the printed layouts fill them.

## What is not here

* Electrical behaviour: pull-up/pull-down ratios, power (under 180 mW
  estimated for the prototype), and the delay estimates (about 300 τ worst case
  for the prototype; roughly (60·log2 n − 12) τ for the carry tree, compared with
  25 n τ for a Manchester chain). The RTL is logic only.
* Pipelining. Clock lines could be run east-west through each row to
  register it, but this was only suggested, never designed. The adder is
  combinational.
* Carry in. See the (n+1)-bit trick above.

## Files

| file | content |
|------|---------|
| `rtl/bk_pkg.sv` | cell-type enum and the placement functions (`bw_rows`, `cell_at`, `count_cells`) |
| `rtl/g_cell.sv`, `g2_cell.sv` | generate/propagate cells |
| `rtl/wa_cell.sv`, `wb_cell.sv` | white (routing) cells |
| `rtl/ba_cell.sv`, `bb_cell.sv` | black (combining) cells |
| `rtl/s_cell.sv`, `i_cell.sv` | sum cell, inverter |
| `rtl/bk_adder.sv` | the n-bit array, parameters `N` (16) and `LSB_FEEDBACK` (0) |
| `rtl/ausmpc_adder5.sv` | the 5-bit prototype with the feedback loop, parameter `LOOP_DELAY` (1) |
| `tb/tb_*_cell.sv` | exhaustive truth-table checks of each cell |
| `tb/tb_bk_adder.sv` | 16-bit (corners + 20 000 random), 5-bit exhaustive, 12-bit random, G2 column, carry in through a 17-bit adder, the generated layout against the 16- and 5-bit layouts above, and the 5-bit cell counts (WA 1, WB 9, BA 4, BB 1) |
| `tb/tb_bk_adder_sizes.sv` | n = 4, 8, 12, 16, 24, 32, 48, 64: random sums, full-length carries, row counts and regularity factors |
| `tb/tb_bk_adder_128.sv`, `tb_bk_adder_wide.sv` | 128 and 256 bits |
| `tb/tb_ausmpc_adder5.sv` | the prototype end to end at its defaults: all 256 operand pairs with c = 0 (steady sum) and c = 1 (oscillation between exactly a + b and a + b + 1), the 1001 + 1010 example, and the oscillation stopping again when c returns to 0 |

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself through
a watchdog if it hangs. All of them pass.

## Simulating

With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl -y rtl rtl/bk_pkg.sv \
    tb/tb_ausmpc_adder5.sv --top-module tb_ausmpc_adder5
./obj_dir/Vtb_ausmpc_adder5
```

Swap in any other testbench name. The package must come first on the command
line; `-y rtl` finds the rest. The 256-bit testbench takes about a minute to
build. Build large sizes in separate runs: one executable holding many wide
instances compiles much more slowly.

To use the adder at another width, set `N`. Everything else, including the
row count, the cell placement and the I cells, is derived from it. If you change the
placement rules in `bk_pkg`, keep the polarity rule (BA in odd rows, BB in even
rows). `tb_bk_adder` checks the generated layout row by row.
