# Loop-based defect-tolerant linear array for wafer-scale integration

A wafer carries a grid of identical cells (memory or processor blocks), and
some of them are defective. The aim is to string as many good cells as
possible into one linear array. The array should also keep the wire delay
between logically neighbouring cells the same, wherever the defects are.

The approach here is built from loops. Each cell sits inside a ring of its
own multiplexors: the cell output passes through all of them and returns to
the cell input. Two neighbouring cells are joined by a pair of multiplexors
that carry the same subscript. When both multiplexors of the pair select the
neighbour instead of their own ring, the two rings swap signals at that
point and become one larger ring. Repeating this merges a whole region of
cells into a single ring, and that ring is the linear array. Every
multiplexor passes its signal on to the next one in the fixed order
m_L, m_(L-1), ..., m_1. So between any cell and the next cell in the ring, a
word passes exactly L multiplexors, whatever the settings are.

This RTL contains:

* the loop interconnect of a COLS × ROWS wafer with four-neighbour loops,
  and as options three-neighbour loops, six-neighbour loops on a grid with
  skewed rows built from 3-to-1 multiplexors, and eight-neighbour loops
  built either from eight 2-to-1 multiplexors or from two 4-to-1 and two
  2-to-1 multiplexors per cell;
* a controller in every cell that sets the cell's multiplexors in three
  ways: all rings closed after reset, a spanning tree grown by the cells
  from the pad cell, or settings shifted in by an external tester;
* the boundary-scan test logic of every cell, connected for parallel,
  pipelined diagnosis: every cell runs the same test, one clock later than
  the cell before it, and flags itself if its output differs from the
  expected output.

The logic of the cells themselves is not part of the design. Its ports
are brought out.

## The loop of one cell (`loop_mux_chain`)

```
          core_out                                   core_in
 cell ───────────► m_L ──► m_(L-1) ──► ... ──► m_1 ───────────► cell
                    ▲         ▲                  ▲
              neighbour   neighbour          neighbour
              on side L   on side L-1        on side 1
```

Multiplexor m_i has K inputs. Input 0 is the cell's own ring, meaning the
signal coming from m_(i+1), or the cell output in the case of m_L. The
other inputs are the signals that arrive at the m_i of the neighbouring
cells. The module exports the own-ring signal at every level (`loop_o`) so
that the neighbours can select it.

K = 2 is used for the three-, four- and eight-neighbour loops. K = 3 is the
three-input multiplexor of a six-neighbour loop, where three cells meet at
each multiplexor position. K = 4 serves the corner junctions of the second
eight-neighbour layout.

## Merging loops: which side each multiplexor serves (`loop_pkg`, `loop_array`)

The two multiplexors of an interconnection must have the same subscript.
So the cells cannot all be identical copies: a cell's east multiplexor has
to match its east neighbour's west multiplexor. The subscripts are assigned
like this (x = column from 1, y = row from 1 at the top):

| side of cell (x, y) | subscript                         |
|---------------------|-----------------------------------|
| east                | m_2 if x is odd, else m_4         |
| west                | m_2 if x−1 is odd, else m_4       |
| south               | m_1 if x+y is odd, else m_3       |
| north               | m_1 if x+y−1 is odd, else m_3     |

Along a row, horizontal links alternate m_2 and m_4. Vertical links
alternate m_1 and m_3 in a checkerboard. Every cell gets exactly one
multiplexor per side. The three-neighbour variant is the same grid with all
m_4 multiplexors and their links removed.

The eight-neighbour variant (`NBR = 8`) adds a second set of four 2-to-1
multiplexors, m_5 to m_8, for the diagonals, in the same ring:

| diagonal of cell (x, y) | subscript                         |
|-------------------------|-----------------------------------|
| north-east              | m_6 if x is odd, else m_8         |
| south-west              | m_6 if x−1 is odd, else m_8       |
| south-east              | m_5 if x is odd, else m_7         |
| north-west              | m_5 if x−1 is odd, else m_7       |

A word then passes eight multiplexors between consecutive cells.

To make an interconnection active, both cells set `sel` for that subscript.
The two rings then cross over there. This is how the rings combine:

* if the active interconnections form a tree, all cells on the tree share
  one ring;
* if they form a simple cycle, they give two rings, one on each side of the
  cycle.

Inactive links and multiplexors on the wafer edge keep their cell's own
ring. A multiplexor on the edge is held on its own ring whatever its
control bit says.

**Pads.** The external pads stand in for the north interconnection (m_1) of
corner cell (1,1). `pad_in_i` enters as that multiplexor's neighbour input.
`pad_out_o` is the signal that arrives at that multiplexor from the ring.
Once the pad link is active, the array starts at cell (1,1), runs through
every cell on the ring, and ends at `pad_out_o`.

## Setting the multiplexors (`mux_ctrl`)

Each cell controls only its own multiplexors. Priority, highest first:

1. **Reset or `loop_clr_i`.** Every `sel` bit is 0, so every cell is a
   closed ring of its own and no cell counts as connected.
2. **`cfg_update_i`.** An L-bit shadow register is copied into `sel`. The
   shadow registers of all cells form one shift chain, in cell order
   c = (y−1)·COLS + (x−1), and shift while `cfg_shift_i` is high. Bit 0 of
   cell 0 is nearest `cfg_si_i`. To load the whole wafer, shift N·L bits,
   starting with bit L−1 of cell N−1, then pulse `cfg_update_i`. This is
   how a tester loads any setting it has computed. That includes settings
   that route through the multiplexors of faulty cells to reach cells that
   would otherwise be cut off.
3. **`grow_i`.** Tree growth works as follows:
   * The pads count as a neighbour that is already connected, so cell
     (1,1) joins first.
   * In every clock, an unconnected cell that may join (`ok`) and has at
     least one connected neighbour picks one such neighbour, the one on its
     lowest subscript. It sets its own multiplexor on that side, raises
     `join_o` on that side, and becomes connected.
   * In the same clock, the connected neighbour sets its multiplexor of the
     same subscript.

   A new cell only ever links to a cell that is already in the tree, so no
   cycle can form. After at most N clocks, the ring contains every cell
   that can be reached from the pad cell through cells allowed to join.

## Six-neighbour junctions (`hex_array`, `mux_ctrl3`)

In the six-neighbour wafer the even rows are shifted east by half a cell,
so every cell touches two cells in the row above, two in its own row and two
in the row below. The wafer is cut into junctions of three cells: a cell
T and the two cells below it, SW(T) and SE(T). A cell belongs to three
junctions: the one it tops (slot 0), the one of its north-east neighbour
(slot 1) and the one of its north-west neighbour (slot 2). The three members
of a junction must use the same subscript, so the junction topped by
(x, y) gets subscript (p mod 3) + 1 with p = 2x + 1 for even y and p = 2x
for odd y. This gives every cell its three subscripts exactly once.

Each member's 3-to-1 multiplexor has three inputs: its own ring (0) and the
signals arriving at the other two members (1 and 2, in slot order after its
own). The settings of a junction only make sense as a permutation of the
three arriving signals:

* all members on their own ring: three separate rings;
* two members swapped, the third on its own ring: two rings merged, as with
  a 2-to-1 pair;
* all three rotated: three rings merged into one.

Tree growth keeps the settings a permutation. A joining cell takes the
source its connected partner was selecting, and the partner selects the
joining cell. This inserts the new cell into the partner's cycle, so a swap
becomes a rotation when the third member joins. Only one cell may join a
junction per clock: if both unconnected members could join, the one in the
lower slot goes first. Apart from that, joins follow the same rules as in
`mux_ctrl`: lowest subscript first, one clock per join, the pads as an
already-connected partner. The pads sit in the empty top slot of the
junction above cell (1,1).

Each cell has 2 control bits per multiplexor, 6 in all. They use the same
kind of shift chain as above, with 6 bits per cell.

## Eight neighbours with corner junctions (`corner_array`, `mux_ctrl4`)

The eight 2-to-1 multiplexors of `NBR = 8` need eight control bits per
cell. A cheaper layout puts the multiplexors on the cell corners. A corner
point (px, py) is shared by up to four cells. A cell's slot there is the
corner the point is for that cell: south-east = 0, south-west = 1,
north-west = 2, north-east = 3.

* If px + py is even, the point is a four-way junction. All four cells
  have a 4-to-1 multiplexor there, which reaches the two orthogonal
  neighbours and the diagonal neighbour across the point. Its subscript is
  m_2 if px is even, else m_4.
* Otherwise the point holds two separate diagonal pairs of 2-to-1
  multiplexors (slots 0/2 and 1/3). Their subscript is m_1 if px is even,
  else m_3.

Every cell has each of m_1 to m_4 at exactly one corner, so a word still
crosses four multiplexors between consecutive cells. All eight neighbours
are reachable: each orthogonal neighbour shares one four-way corner with the
cell, and each diagonal neighbour is reached through a four-way junction or
a pair. The select lines come to 2 + 2 + 1 + 1 = 6 per cell. The
controller still stores 2 bits for every multiplexor (8 per cell), and a
2-to-1 position only uses the values 0 and 2.

A four-way junction is handled like a six-neighbour junction with one more
member. Its settings are a permutation of four signals. Joins insert the
new cell into the partner's cycle, and only one cell joins a junction per
clock. The pads fill the empty slot 0 of the junction north-west of cell
(1,1). `wafer_top` uses this array when `NBR = 8` and `MUX4 = 1`.

## Parallel diagnosis (`tap_ctrl`, `diag_cell`, `parallel_diag`)

```
TMS ──►[TAP 0]──►[TAP 1]──► ... ──►[TAP N-1]──►
 TV ──►[reg]─────►[reg]──── ... ──►[reg]──────►   TDI of each cell = its stage input
RES ──►[reg]─────►[reg]──── ... ──►[reg]──────►   expected TDO + compare enable
          │C        │C                 │C
        fail_0    fail_1             fail_N-1
```

Every cell has an IEEE 1149.1 TAP controller and the following registers:

* a 2-bit instruction register: SCAN = `01`, BYPASS = `11`, and all other
  codes act as BYPASS; the capture value is `01`;
* a one-bit bypass register;
* a `SCAN_LEN`-bit scan path to the cell logic. Capture-DR loads `resp_i`.
  Shift-DR shifts towards TDO, bit 0 first. Update-DR drives `stim_o`.

Three single-bit chains run past all cells, with one register per cell:

* TMS;
* the test vectors, which feed the cell's TDI;
* the results chain, which carries the expected TDO and a compare enable.

All three chains are delayed by the same amount. So cell k runs exactly the
test that cell 0 ran k clocks earlier, and it meets the expected bit meant
for it. When the compare enable is set, comparator C checks the cell's TDO
against the expected bit. A mismatch sets `fail_o`, which stays set until
the TAP passes through Test-Logic-Reset.

Timing: a test sequence of S clocks diagnoses all N cells in S + N clocks.
In the end-to-end test, diagnosing 256 cells takes 355 clocks.

The TAP runs everything on the rising edge of TCK. TDO comes straight from
the selected register and is not retimed to the falling edge. TRST
(`trst_n`) is asynchronous.

## The wafer (`wafer_top`)

`wafer_top` connects `loop_array` and `parallel_diag` for the same N cells,
and uses `clk` as TCK. The one link between the two parts is
`use_diag_i`: while it is high, a cell that failed diagnosis is not allowed
to join the tree. A typical sequence:

1. Reset. Every cell forms its own ring.
2. Diagnose all cells through `tms_i`, `tv_i`, `exp_en_i` and `exp_i`, then
   read `fail_o`.
3. Set up the array in one of two ways:
   * raise `use_diag_i` and `grow_i` for N+2 clocks, which links every good
     cell that is reachable through good cells; or
   * shift in the tester's own setting through the `cfg_*` pins.
4. Send data through `pad_in_i`. It passes every linked cell in ring order
   and returns on `pad_out_o`.

| parameter  | default | meaning                                   |
|------------|---------|-------------------------------------------|
| `COLS`     | 16      | cells per row                             |
| `ROWS`     | 16      | rows (16 × 16 = 256 cells)                |
| `W`        | 8       | width of the intercell bus                |
| `NBR`      | 4       | neighbours per cell: 3, 4, 6 or 8         |
| `MUX4`     | 0       | with `NBR = 8`: 4-to-1 corner junctions   |
| `SCAN_LEN` | 16      | length of each cell's scan path           |

At the defaults, the wafer has 1024 loop multiplexors with 1024 control
bits, and 256 TAPs. With `NBR = 6` it has 768 3-to-1 multiplexors with 1536
control bits. With `NBR = 8` it has 2048 multiplexors, or 1024 when
`MUX4 = 1`.

## What is taken from the loop design and what is chosen here

These parts follow the loop design:

* the ring of multiplexors around each cell;
* pairing multiplexors by subscript and crossing the rings when both
  select the neighbour;
* the fixed count of L multiplexors between consecutive cells;
* dropping m_4 to get three-neighbour loops;
* the three-input multiplexors of six-neighbour loops, three per cell,
  each shared with two neighbours;
* eight 2-to-1 multiplexors per cell as two four-neighbour patterns, or
  two 4-to-1 and two 2-to-1 multiplexors per cell with six select lines;
* pads that replace one interconnection of one cell;
* closed rings at power-up;
* growth towards unconnected neighbours only;
* controls shifted in from a tester;
* a TAP in every cell, with TMS, test vectors and results pipelined past
  all cells and a comparator per cell.

These are choices made in this implementation:

* the side each subscript serves (tables above), for all neighbourhoods;
* which rows are shifted in the six-neighbour wafer, placing the 4-to-1
  and 2-to-1 multiplexors at cell corners, the junction numbering, and
  treating junction settings as permutations;
* the bus width;
* placing the pads at cell (1,1) north;
* the join handshake and its lowest-subscript priority;
* the format and order of the control shift chain;
* instruction codes, scan length, and running on a single clock edge;
* carrying the expected TDO and an enable on the results chain;
* letting the diagnosis flags steer tree growth (`use_diag_i`).

Known differences from a complete wafer:

* **Test chains.** The TMS, vector and results chains are wired as fixed
  chains in cell order. On a real wafer, these chains should themselves be
  built from loops, so that a defect in one of them does not leave cells
  untestable.
* **Choosing the setting.** Finding the largest ring that also uses the
  multiplexors of faulty cells is a hard search problem. It is left to the
  tester, which loads its result through the control chain. On chip, only
  the good-cells-only tree is built.
* **Test coverage of the other neighbourhoods.** The end-to-end test of
  `wafer_top` runs with the default four-neighbour loops. The three-, six-
  and eight-neighbour arrays are simulated on their own at up to 6×5 cells.
* **Cell logic and pads.** Neither is modelled in the RTL. The testbenches
  stand in for the cell logic.

## Simulating

All sources are SystemVerilog 2017. Packages first:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/loop_pkg.sv tb/diag_seq_pkg.sv tb/tb_wafer_top.sv --top-module tb_wafer_top
obj_dir/Vtb_wafer_top
```

Each testbench ends by printing `TB_RESULT checks=<n> failures=<m>`:

| testbench           | what it checks                                                                 |
|---------------------|--------------------------------------------------------------------------------|
| `tb_loop_mux_chain` | random settings of a 4 × 2-to-1 chain and a 3 × 3-to-1 chain against a walk of the ring |
| `tb_mux_ctrl`       | reset, join priority, answering a join, edge sides, clear, shifted-in controls  |
| `tb_loop_array`     | 6×5 four-neighbour, 5×4 three-neighbour and 5×5 eight-neighbour wafers with random cells excluded; the grown tree is compared with a breadth-first search, and the data path is traced from the pads through every reached cell; controls shifted back in reproduce the ring; random link sets with cycles, shifted in, give the ring order of an independent signal-flow model |
| `tb_hex_array`      | 6×5 and 5×4 six-neighbour wafers with random cells excluded: grown tree against a breadth-first search, every junction a permutation, rotations seen, data path traced, controls shifted back in |
| `tb_corner_array`   | the same checks on 6×5 and 5×4 eight-neighbour wafers with corner junctions; a 2-to-1 pair may only swap |
| `tb_tap_ctrl`       | 3000 random TMS steps against the standard state table; five-ones reset; TRST   |
| `tb_diag_cell`      | one cell: good logic passes, stuck bit flagged, BYPASS, update to cell inputs, one-clock chains |
| `tb_parallel_diag`  | 12 cells: exactly the faulty ones flagged, k clocks of skew, N clocks of chain delay |
| `tb_wafer_top`      | full 16×16 default wafer: diagnosis with about 30 % faulty cells, growth excluding flagged and cut-off cells, clear, a tester tree shifted in |

The testbenches find each cell's predecessor on the ring by tracing the data
path twice: first every cell drives its own index, then its index plus one,
while the pad drives 0 both times. This works for any bus width with
N ≤ 2^W.

## Lint notes

Verilator reports `UNOPTFLAT` (circular logic) on the ring signals of
`loop_array`, `hex_array`, `corner_array` and `loop_mux_chain`. It tracks whole arrays: cell A's ring
array depends on cell B's, and B's on A's. At bit level, every path goes
from a neighbour's m_(i+1) output to this cell's m_i, so the subscript
strictly decreases and no setting can close a combinational loop. The
warning only costs simulation speed. `SYNCASYNCNET` comes from using the
asynchronous reset in an assertion's `disable iff`.
