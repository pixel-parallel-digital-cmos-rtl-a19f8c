# Pixel-parallel region-growing image segmentation

This design segments a grey-scale or colour image into coherent regions with
one small processing cell per pixel. All cells work at the same time, so a
region grows by a whole "ring" of pixels in every clock. The cells are not
connected to each other directly. Every link between two neighbouring pixels
has a weight that says how similar they are. These weights sit in small
register blocks between the cells, and each block serves four cells.

The default configuration is a 10 x 10 pixel network. It is complete from
pixel input to label output: weight calculation, leader-cell selection, the
cell network, label generation and label read-out.

## The algorithm

1. **Link weights.** Every pixel has links to its eight neighbours. A link
   gets the weight `W = 255 / (1 + |Ia - Ib|)`. For colour images the weight
   is worked out per channel and the smallest of the three is kept. Weights
   travel as 3-bit codes (see *Weight code*).
2. **Leader cells.** A pixel is a leader cell when the sum of its eight link
   weights is larger than `phi_p`. Only a leader cell can start a region. An
   isolated noise pixel has weak links, so it never becomes a leader.
3. **Search.** A token runs through all cells in serpentine order: row 0 left
   to right, row 1 right to left, and so on. It stops at the first leader cell
   that is not yet labelled. That cell excites itself and becomes the *seed*.
4. **Growth.** In every clock, each cell that is not excited and not
   labelled adds up the weights of its links to excited neighbours. If the sum
   is larger than `phi_z`, the cell becomes excited. All such cells are
   excited together.
5. **Inhibition.** In the first clock in which no cell can be excited, every
   excited cell is labelled with the current segment number and switched
   off. The search then resumes.
6. **End.** The frame is finished when the token leaves the last cell.
   Pixels that no region reached keep label 0.

## Architecture

```
 input image     +-------------------+   +--------------------+   +---------------+   +-------------+   segmentation
 memory  ------> | weight calculation|-->| leader cell        |-->| cell network  |-->| segmentation|-->  memory
 (column/2 clk)  | circuit           |   | selection          |   | N x M cells + |   | restore     |   (column/2 clk)
                 +-------------------+   +--------------------+   | (N+1)x(M+1)   |   +-------------+
                          \__________ weight chunks ____________->| register blks |<-- label_generator
                                                                  +---------------+
                                     seg_controller sequences all of them
```

| Module | Role |
|---|---|
| `seg_chip` | Top level: the blocks below and the ports to both external memories |
| `seg_controller` | Sequencer: PRE, LOAD, SEARCH, GROW, COPY, READ, DONE |
| `weight_calc_circuit` | Column pipeline; two `weight_calc_unit`s per block row |
| `weight_calc_unit` | Absolute difference, encoder and minimum over R, G, B |
| `leader_cell_selection` | One `leader_calc_unit` per row, plus registers and selectors |
| `leader_calc_unit` | Four decoders, adder tree, register, adder and comparator |
| `cell_network` | Cells (`seg_cell` or `seg_cell_serial`), weight-register blocks (`wr_block`) and the token chain |
| `label_generator` | Segment-number counter |
| `segmentation_restore` | Joins the read-out label halves and writes one column at a time |
| `seg_pkg` | Widths, the encoder and decoder functions, and the state type |

## Weight-register blocks: where each link lives

This is the least obvious part of the design. Block `WR(a,b)`, with
`a = 0..N` and `b = 0..M`, sits at the upper-left corner of cell `(a,b)`.
Cell `(a,b)` is column `a`, row `b`. The block touches four cells:
UL = `(a-1,b-1)`, UR = `(a,b-1)`, LL = `(a-1,b)` and LR = `(a,b)`.

Each block has four 3-bit registers:

| Register | Vertical block (`a+b` even) | Horizontal block (`a+b` odd) |
|---|---|---|
| w0 | UL–LR (diagonal) | UL–LR (diagonal) |
| w1 | UR–LL (diagonal) | UR–LL (diagonal) |
| w2 | UL–LL (left vertical) | UL–UR (top horizontal) |
| w3 | UR–LR (right vertical) | LL–LR (bottom horizontal) |

Vertical and horizontal blocks alternate like a checkerboard. Each cell
therefore finds all eight of its links in its four corner blocks, and no link
is stored twice. Blocks on the border hold code 0 for links that leave the
image.

A block's output selection sends each link to the cell at one end. The code
is forced to 0 unless the cell at the other end is excited. This gives
8 outputs per block. A cell adds the eight codes it receives, after decoding
them to 8-bit values, in a three-stage adder tree. The result is the 11-bit
sum `S`. The cell is excitable when `S > phi_z`.

## Loading: column pipeline, right to left

Every block row is a shift chain that is 6 bits wide and enters from the left
edge. Each block holds two 6-bit stages: `A = {w1,w0}` and `B = {w3,w2}`. The
first value shifted in ends up in the rightmost block, so the image is read
from the rightmost column to the leftmost.

Load step `k` (`k = 0..N`) takes two clocks and delivers block column
`a = N-k`:

* **Phase 0.** Pixel column `a-1` arrives from the memory. Column `a` is
  already held in a delay register. For every block row, two weight units
  compute `{w3,w2}`, and the chunk is shifted in.
* **Phase 1.** The two units compute `{w1,w0}` from the two registered
  columns, and the chunk is shifted in.

Step `N` has no new column. It only completes block column 0.

The leader selection circuit watches the same chunks. While block column `a`
arrives, it already holds block column `a+1`, so it can decide `p` for cell
column `a`:

* In phase 0 it adds the four right-hand links of each cell.
* In phase 1 it adds the four left-hand links.

Which register holds a cell's top, bottom, left or right link depends on the
parity of `a+y`. The selectors swap on that parity. The `p` bits enter each
cell row from the left through a one-bit chain, at phase 1 of steps 1..N.

Loading takes `1 + 2(N+1)` clocks. That is 23 clocks at the default size.

## Search, growth and their timing

The token chain is combinational through all cells:
`next = pre & ~n & (~p | l)`. A cell blocks the token only if it is an
unlabelled leader cell, or if it is the seed of the region that is growing
now. This is the "clock-asynchronous" search. Its delay grows with the number
of cells, but it needs no clocks.

Timing of one frame:

* **SEARCH: 1 clock.** `start` is applied. If the token leaves the last cell
  (`finish`), segmentation is over. Otherwise the cell holding the token
  self-excites at the end of this clock.
* **GROW: 1 clock per growth step.** All excitable cells are excited. In the
  first clock with none, `labelw` inhibits and labels the region, and
  the label counter advances.

A segment whose cells receive `E` distinct excitation numbers (the seed being
number 1) takes `E + 1` clocks. A frame takes `sum(E_s + 1) + 1` clocks for
search and growth, and this value is reported on `seg_cycles`.

The checker-board example of the original test chip has nine blocks and
excitation numbers 1..32. It takes 42 clocks here, which is 4.2 µs at
10 MHz. The fabricated chip was measured at 9.5 µs. Its clock-level overheads
are not published, and this schedule does not try to match them.

That count holds when the nine blocks are kept apart by their link weights.
The chip can also compute the weights itself from a 0/255 checker-board.
Blocks of equal value that touch only at a corner are then linked by a
full-weight diagonal. With 8-connected growth they merge, which gives 2
segments in 23 clocks.

## Weight-serial cells (`WEIGHT_SERIAL = 1`)

With `WEIGHT_SERIAL = 1`, `seg_chip` builds its network from
`seg_cell_serial` instead of `seg_cell`. A weight-serial cell trades speed for
area. It has one switch, one decoder, and one adder/subtractor with a
register, instead of eight decoders and an adder tree. It needs nine clocks
per sum.

The controller broadcasts a step number, `acc_step`, to all cells:

* At step 0 the register is loaded with `phi_z`.
* At steps 1..8 the register subtracts one decoded link weight each.
* After step 8 the sign bit shows `S > phi_z`.

The controller decides (`grow_en` or `labelw`) only at step 0 of `GROW`.
The seed clock counts as step 0 of the first round.

A growth step therefore takes nine clocks. A segment with `E` excitation
numbers takes `9E + 1` clocks. The labels are the same as with
weight-parallel cells.

`phi_z` enters the switch at its full 11 bits and bypasses the decoder. This
is one reading of a switch whose output is only 3 bits wide.

## Labels and read-out

`label_generator` starts every frame at label 1 and advances after each
inhibition. Label 0 therefore means "no segment".

When a region is inhibited, each of its cells stores the label in its
upper-left block. Each block has a separate 12-bit label register for this.
12 bits is the size of the block's four weight registers. The weight
registers cannot take the label this early, because they still hold links
between other cells that are not yet labelled.

After segmentation, `copy_label` loads every block's label into its weight
registers. The same 6-bit chains then shift the labels out at the right-hand
edge: two halves per block, high half first, rightmost block first.
`segmentation_restore` joins the halves. It writes one whole pixel column
(M labels) to the segmentation memory every two clocks, from column N-1 down
to 0. Read-out takes `1 + 2(N+1)` clocks.

## Weight code

The encoder is a table lookup on the 8-bit difference. Its contents are this
design's choice:

| code | weight (decoded) | range of `|d|` |
|---|---|---|
| 7 | 128 | 0 |
| 6 | 64 | 1–2 |
| 5 | 32 | 3–6 |
| 4 | 16 | 7–14 |
| 3 | 8 | 15–30 |
| 2 | 4 | 31–62 |
| 1 | 2 | 63–126 |
| 0 | 0 | 127–255, or a link leaving the image |

Code `k` is `floor(log2(255/(1+|d|)))`, and it decodes to `2^k`. In
`seg_pkg::encode_diff` the table is written as seven comparisons with the
limits `(255 >> k) - 1`. Because the encoder is monotonic, the minimum of the
three channel codes equals the code of the smallest channel weight. The
largest possible sum is 8 x 128 = 1024, which fits in 11 bits.

## Top-level interface (`seg_chip`)

| Port | Dir | Meaning |
|---|---|---|
| `go` | in | Start a frame. It is accepted when the chip is idle or done. |
| `grey_mode` | in | 1: use channel 0 only. 0: take the minimum over three channels. |
| `phi_z`, `phi_p` | in | 11-bit thresholds for excitation and for leader cells |
| `img_rd_en`, `img_rd_col` | out | Column read request. `img_col[M][CH]` must present the column on the next clock. |
| `seg_we`, `seg_col`, `seg_label[M]` | out | One column of 12-bit labels per write |
| `busy`, `done`, `finish` | out | Status. `finish` is the token leaving the last cell. |
| `row_x[M]` | out | OR of the excitation state over each row, like the test chip's row outputs |
| `seg_count`, `seg_cycles` | out | Number of segments found, and the number of search and growth clocks |

The parameters are `N` (columns), `M` (rows), `CH` (channels) and
`WEIGHT_SERIAL` (cell form). Their defaults are 10, 10, 3 and 0. A frame takes
`2 + 2(N+1) + seg_cycles + 1 + 2(N+1)` clocks, counted from the clock that
samples `go` to the first clock with `done`. The last column write arrives
one clock after `done` rises.

All state uses an active-low asynchronous reset, `rst_n`. Per-frame state is
cleared synchronously when `go` is accepted.

## What follows the original architecture and what does not

These parts follow the published architecture:

* the split into four functional parts
* the V/H weight-register blocks and their link assignment
* the 3-bit codes, 8-bit decoded weights and 11-bit sum
* the cell's x/p/n/l registers, adder tree and subtractor
* the serpentine token search
* the leader unit made of two groups of four weights
* the 6-bit load chains with labels leaving at the right-hand edge
* label storage in the cell network with an external label counter

These parts are this design's own choices:

* the encoder table
* the `>` tests for both thresholds
* a single clock equal to the fast weight-calculation clock, with one pixel
  column every two clocks
* the right-to-left column order
* the delay registers and selectors of both pipelines
* a separate label register in each block, where the original reuses the
  weight registers
* the controller and its clock schedule
* the memory interfaces
* the `grey_mode` input, where the original has two separate units
* the step schedule of the weight-serial cell, and `phi_z` bypassing its
  decoder
* label saturation at 4095

The original test chip held only the cell network, and its weights and
leader bits were generated off-chip. Here the weight calculation and leader
selection circuits are built as the architecture describes them.

These parts of the original are not built:

* the second read-out option, which streams excited cells to an external
  restore circuit after each segment
* processing of large images as overlapping tiles, and label merging across
  tiles
* putting cells to sleep for low power
* merging unlabelled pixels with a neighbouring region in a post-processing
  step

The full-custom circuit techniques (transmission-gate adders, a decoder
merged into the adder) have no counterpart in RTL.

## Fitting larger images

The defaults hold a 10 x 10 image. A QVGA (320 x 240) or 311 x 279 image
needs `N`, `M` raised to the image size. The cell network then grows to
N x M cells plus (N+1) x (M+1) blocks. The token chain becomes a
combinational path through every cell. A QVGA-size network has been estimated
at about 117 mm² in 90 nm.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench prints
`TB_RESULT checks=... failures=...` and has a watchdog.

* `tb_seg_chip` runs end to end at the default size. It plays both memories
  and runs four frames: a block checker-board, a noisy blocky colour image in
  colour mode and in grey mode, and a homogeneous image. It compares every
  label, the segment count, `seg_cycles` and the frame time with the
  reference model in `tb/seg_ref_pkg.sv`. The model is an independent integer
  implementation that computes weights with a real division. The testbench
  also checks that each mechanism occurred: seeding, growth, inhibition,
  finish, unlabelled pixels, the token skipping a labelled leader, a mode
  switch and the row outputs.
* `tb_seg_chip_serial` runs the same frames with `WEIGHT_SERIAL = 1`. It
  expects the same labels, and search and growth times of
  `sum(9E + 1) + 1` clocks.
* `tb_table2_images` runs five 10 x 10 grey test images: homogeneous,
  stripe, S-shape, triangle and checker-board. Only the checker-board's
  layout is known. The other four shapes are drawn from their names and are
  assumptions. The test checks every label and clock count against the
  reference model, and prints the segmentation time at 10 MHz. At the
  thresholds used, the times are 1.2, 3.7, 3.8, 2.7 and 2.3 µs. The measured
  chip took 1.7, 5.2, 4.6, 1.3 and 9.5 µs. Its clock-level overheads and the
  exact images are unknown, so these times are not compared.
* `tb_cell_network` loads the nine-block checker-board of the test-chip
  measurement, with weights and leader bits given directly. It checks the
  excitation number of all 100 cells against the published 1..32 table, the
  42-clock count, the row outputs and the labels read out.
* The unit testbenches (`tb_weight_calc_unit`, `tb_weight_calc_circuit`,
  `tb_leader_calc_unit`, `tb_leader_cell_selection`, `tb_wr_block`,
  `tb_seg_cell`, `tb_seg_cell_serial`, `tb_label_generator`, `tb_segmentation_restore` and
  `tb_seg_controller`) compare each block with values computed in the
  testbench.

To simulate with Verilator, for example the top-level test:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_seg_chip \
  -y rtl -y tb +libext+.sv rtl/seg_pkg.sv tb/seg_ref_pkg.sv tb/tb_seg_chip.sv
./obj_dir/Vtb_seg_chip
```

Lint with `verilator --lint-only -Wall -Wno-fatal -y rtl +libext+.sv rtl/seg_pkg.sv rtl/seg_chip.sv`.

The reference model handles images up to 16 x 16 (`MAXD`). Raise `MAXD` to
test larger networks.
