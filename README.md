# Spiral-type motion estimator for H.264/AVC, one candidate per clock

Integer motion estimation compares a 16x16 macroblock of the current frame
with every 16x16 candidate in a search window of the reference frame and
keeps the candidate with the smallest sum of absolute differences (SAD).
Good matches cluster around the search center, so visiting candidates in a
spiral outwards from the center finds the best one early and makes ties
resolve towards small motion vectors. The usual spiral orders jump between
candidates, which is awkward for hardware that keeps the candidate block in
registers.

This design walks a spiral in which every candidate is a one-pixel
neighbour of the previous one. The 16x16 reference block sits in a 16x16
array of processing elements that can shift its whole contents one pixel up,
down, left or right per clock; only the 16 pixels that enter at the leading
edge are read from memory. A two-SRAM placement of the search window makes
sure those 16 pixels can always be read in one cycle, even when they cross
a macroblock border. The result is one search point per clock, with the SADs
of all seven H.264 block sizes (41 sub-blocks) produced in parallel.

The architecture follows the article "A Novel Spiral-Type Motion Estimation
Architecture for H.264/AVC" (Hirai, Song, Liu, Shimamoto). The RTL here is an
independent implementation; where the article leaves something open the
choice made is listed under "Departures and own choices".

Default configuration: 16x16 macroblocks, 8-bit pixels, a 48x48 search
window (3x3 macroblocks), search range +-16, so 33 x 33 = 1089 candidates per
macroblock.

## The search order

Ring k (k = 1, 2, ...) of the spiral is walked as 1 step up, 2k-1 steps
right, 2k down, 2k left and 2k up. That visits the 8k points of the ring and
stops on its top-left corner, from where the next ring starts with its
single step up. For a +-3 range the visiting order is:

```
48 25 26 27 28 29 30
47 24  9 10 11 12 31
46 23  8  1  2 13 32
45 22  7  0  3 14 33
44 21  6  5  4 15 34
43 20 19 18 17 16 35
42 41 40 39 38 37 36
```

`spiral_order` generates it: it holds the ring number, the leg and the step
count within the leg, shows the next move on `dir`, and after
(2*RANGE+1)^2 - 1 moves raises `last`. dx grows to the right and dy
downwards.

## The shifting PE array

`pe` holds one current pixel (Cur) and one reference pixel (Ref) and outputs
|Cur - Ref|. Ref is written through a four-way multiplexer from the upper,
lower, left or right neighbour; Cur only ever comes from the upper neighbour
and otherwise holds. All PEs share one 3-bit `pe_mode`:

| pe_mode        | Ref takes        | Cur       | search point moves |
|----------------|------------------|-----------|--------------------|
| PE_HOLD        | itself           | holds     | -                  |
| PE_LOAD        | upper neighbour  | upper     | (initial load)     |
| PE_FROM_TOP    | upper neighbour  | holds     | up                 |
| PE_FROM_BOTTOM | lower neighbour  | holds     | down               |
| PE_FROM_LEFT   | left neighbour   | holds     | left               |
| PE_FROM_RIGHT  | right neighbour  | holds     | right              |

When the candidate moves up by one row, every PE needs the pixel its upper
neighbour held, so the window shifts down and a new top row enters from
memory. The other three directions work the same way.

`pe_array4x4` is a 4x4 tile of PEs. Each PE row's four differences are added
and registered (the 4x1 SAD), and the four registers are added into the 4x4
SAD. `pe_array16x16` tiles sixteen of these, joins them on all sides into a
single 16x16 grid, and wires the one 128-bit reference word to all four outer
edges; `pe_mode` decides which edge actually takes it (word pixel j goes to
column j on the top/bottom edge and to row j on the left/right edge). The
current word always enters the top row. The sixteen 4x4 SADs leave in z-order
(4x4 block i lies in 8x8 quadrant i/4 at position i%4: 0 top-left, 1
top-right, 2 bottom-left, 3 bottom-right).

## Feeding the leading edge: the double-SRAM window

The window is nine macroblocks, named A B C / D E F / G H I row by row
(index 0..8). A memory word is 16 pixels (128 bits): either one row of a
macroblock ("horizontal" copy) or one column ("vertical" copy). A 16-pixel
row of a candidate at x offset not divisible by 16 spans two horizontally
adjacent macroblocks, and a column spans two vertically adjacent ones. From
a single SRAM that takes two cycles.

Which lines does the spiral actually need? Moves up happen on the left edge
of a ring, moves down on the right edge, moves right on the top edge and
moves left on the bottom edge. Working that through for the +-16 range:

| move  | line read                | macroblock pairs read together |
|-------|--------------------------|--------------------------------|
| up    | new top row, x in 0..31  | A+B, D+E                       |
| down  | new bottom row, x 16..47 | E+F, H+I                       |
| right | new right column, y 0..31| B+E, C+F                       |
| left  | new left column, y 16..47| D+G, E+H                       |

So only seven horizontal copies (A B D E F H I) and seven vertical copies
(B C D E F G H) are ever read. They are split so that the two members of
every pair above live in different SRAMs:

| SRAM  | copies (h = rows, v = columns)          | words |
|-------|-----------------------------------------|-------|
| SRAM1 | A-h, B-v, C-v, D-h, F-h, G-v, H-v, I-h  | 128   |
| SRAM2 | B-h, D-v, E-h, E-v, F-v, H-h            | 96    |

Both SRAMs are read in the same cycle, one word each, and a byte shifter
over the two words picks the 16 pixels starting at the candidate's offset.
With the 16-word current-block SRAM the total is 15 x 2048 = 30,720 bits, the
memory size the article reports. `ref_mem` asserts that every straddling
read finds its two macroblocks in different SRAMs.

Loading: the load port takes one word per cycle with its macroblock,
orientation and row/column index; a word whose copy is not stored is
dropped. The source must supply vertical copies as columns, so a full window
load is 14 macroblock copies, 224 words (the testbench simply offers all 18
and lets the memory keep 14, 288 cycles).

## SADs of all block sizes

`sad_parallel` adds the sixteen 4x4 SADs into 8x4 (8 wide, 4 high) and 4x8
pairs, then 8x8 from two 4x8, then 16x8 (top/bottom half) and 8x16
(left/right half) from pairs of 8x8, and finally 16x16 from the two 8x16.
That is four adder levels; a register closes the tree. Outputs are a packed
struct `me_pkg::sad_set_t`; `me_pkg::part_sad` gives the flat numbering used
by the results: 0..15 4x4, 16..23 8x4, 24..31 4x8, 32..35 8x8, 36..37 16x8,
38..39 8x16, 40 16x16, each in z-order.

`mv_select` keeps, per sub-block, the smallest SAD and the vector that gave
it. A later candidate wins only if strictly smaller, so among equal SADs the
one earlier in the spiral, nearer the center, is kept.

## Control and timing

`me_ctrl` runs one macroblock per `start`:

1. LOAD, 16 cycles: current rows 15..0 and reference rows 31..16 from x=16
   (the zero-motion candidate, macroblock E) are shifted in from the top.
   The last load cycle makes candidate (0,0).
2. SEARCH, 1088 cycles: one spiral move per cycle. In the cycle of a move
   the controller reads the entering line; the next cycle the word arrives
   and `pe_mode` shifts the array.
3. DRAIN: waits for the last candidate to leave the pipeline and pulses
   `done`.

Pipeline of one candidate, counted from the cycle its line is read:

| cycle | stage                                         |
|-------|-----------------------------------------------|
| t     | SRAM read issued                              |
| t+1   | aligned word at the array, array shifts       |
| t+2   | new window in the PEs, 4x1 sums registered    |
| t+3   | 4x4 SADs, SAD tree, registered                |
| t+4   | mv_select compares and updates                |

`done` is high 16 + 1089 + 4 = 1109 cycles after the `start` cycle; the 1089
candidates are evaluated in 1089 consecutive cycles. Loading the next
window and current block (16 + 224 cycles) is not overlapped with a search,
so a macroblock costs 1350 cycles in all.

## Top-level interface (`spiral_me_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst_n | in | 1 | clock, active-low asynchronous reset |
| cur_ld_valid, cur_ld_idx, cur_ld_data | in | 1, 4, 128 | write current row idx (pixel j in bits 8j+7:8j) |
| ref_ld_valid, ref_ld_mb, ref_ld_vert, ref_ld_idx, ref_ld_data | in | 1, 4, 1, 4, 128 | write one reference word: macroblock 0..8, 0 = row / 1 = column, index, pixels |
| start | in | 1 | begin a search (while not busy) |
| busy, done | out | 1 | running; results valid (one-cycle pulse, results then stay until the next start) |
| best_sad, best_dx, best_dy | out | 41 x 16, 41 x 6, 41 x 6 | per sub-block best SAD and vector (signed, dx right, dy down) |

Loads are only allowed while idle (asserted). The search center is implied
by the window the caller loads: computing a predicted vector and fetching
the matching window from frame memory is outside this design.

## Files

- `rtl/me_pkg.sv` widths, `pe_mode_t`, `dir_t`, `sad_set_t`, `part_sad`
- `rtl/pe.sv`, `rtl/pe_array4x4.sv`, `rtl/pe_array16x16.sv` the array
- `rtl/sram_sp.sv` single-port synchronous SRAM (array model, 1-cycle read)
- `rtl/ref_mem.sv` the double-SRAM reference window and aligner
- `rtl/sad_parallel.sv` the SAD tree
- `rtl/spiral_order.sv`, `rtl/me_ctrl.sv` search order and control
- `rtl/mv_select.sv` best-vector selection
- `rtl/spiral_me_top.sv` the whole estimator
- `tb/tb_<module>.sv` one self-checking testbench per module
- `tb/tb_cif_workload.sv` a whole CIF frame through the estimator

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself
(each has a cycle watchdog). With Verilator 5, from the folder holding
`rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_spiral_me_top rtl/me_pkg.sv tb/tb_spiral_me_top.sv
./obj_dir/Vtb_spiral_me_top
```

`tb_spiral_me_top` runs the estimator at its default size on three
macroblocks (an exact copy of a window block, a noisy copy, and a two-level
picture full of ties), computes all 41 best SADs and vectors itself in
spiral order, and checks them together with the 1109-cycle latency and that
every shift direction, straddling reads and ties occurred. It takes a few
seconds. The block testbenches compare against independent models:
`tb_spiral_order` against the 7x7 order above and full coverage of +-16,
`tb_ref_mem` with random reads of all four kinds, `tb_pe_array16x16` against
a 16x16 shift-register model, `tb_sad_parallel` against sums over block
coordinates, `tb_me_ctrl` against the expected read address of every move.

`tb_cif_workload` estimates a whole CIF frame (352x288, 396 macroblocks):
a random-texture reference frame and a current frame moved by a different
planted vector in every macroblock, plus noise. Windows that reach past the
frame edge repeat the edge pixels. It loads only the 14 stored copies, checks
all 41 results of every macroblock against the full-search model and the
16x16 vector against the planted motion, and reports 1350 cycles per
macroblock with loads included: 534,600 cycles per frame, about 250 frames
per second at 134 MHz. It runs in well under a minute.

Synthesis (Yosys, coarse) of the top: about 5,900 flip-flops (4,096 of them
in the PE array) and 30,720 bits of SRAM plus small register arrays.

## Departures and own choices

- Loading both SRAMs "in the same cycle": the article says duplicated
  macroblocks are written to both SRAMs at once from one external read, but
  its own placement stores the two copies in different orientations, so one
  word cannot fill both. Here the source supplies row and column words
  separately; a transposer that would build column copies from rows is not
  included.
- The wiring from the four 8x8 SADs to 16x8 and 8x16 is taken from the
  H.264 partition geometry (16x8 = upper/lower half, 8x16 = left/right half)
  with z-ordered 8x8 blocks.
- Register placement: one register after the 4x1 row sums (as in the
  article) and one after the whole SAD tree; the article leaves the tree's
  registers to the application.
- A hold setting of the Ref multiplexer, the `pe_mode` encoding, the
  16-cycle load sequence, the pipeline depth, window addressing, widths and
  reset behaviour (PE and SRAM data are not reset) are this design's.
- Best-vector selection with a strict-less tie rule is added after the SAD
  tree; the article stops at the SADs. No rate term (RD cost) is included.
- The spiral rule is continued to ring 16; the article shows rings 1 to 3.
- The article's gate count (145k, without control and SRAM) and 134 MHz on a
  Virtex-5 have not been reproduced.
