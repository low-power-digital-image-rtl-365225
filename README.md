# Region-growing image segmentation for VGA frames on a gated-clock cell network

This design splits colour images into regions of similar pixels. It uses region growing on a
two-dimensional array of simple cells, with one cell per pixel. The array is 41 × 33 cells. A
640 × 480 frame is handled as 16 × 15 blocks of that size, which overlap by one pixel.

Each block is segmented like this:
- Connection weights are computed between neighbouring pixels. Similar pixels get a high weight.
- Seed cells, called *leaders*, are marked.
- Regions are grown one after another. A leader excites itself. On every clock, each free cell
  whose weights to already-excited neighbours are strong enough joins the region, and all such
  cells do this in parallel.
- An OR over all cells (the *global inhibitor*) reports when no cell can join any more. The region
  then receives a segment number and is frozen.

The main point of the design is power. In each growing step only the cells on the growing
region's boundary can change. Every other cell is placed in stand-by, and only rows that contain
boundary cells are clocked.

The output is one segment number per pixel for every block. Numbers start at 1 in each block. 0
means the pixel joined no region, which happens to isolated pixels that are not leaders. Joining
segments across block borders is left to later processing that is not part of this RTL, and which
can use the one-pixel overlap between blocks.

## Frame and block structure (`vga_seg_top`, `block_sequencer`)

`vga_seg_top` contains a `block_sequencer` and one `seg_core`.

The sequencer walks the blocks in raster order. Block (bx, by) starts at frame pixel
(40·bx, 32·by), so neighbouring blocks share one column or one row of pixels:
- 15·40 + 41 = 641 columns cover the 640-pixel width.
- 14·32 + 33 = 481 rows cover the 480-pixel height.
- At the right edge, the column address is clamped to 639, so the last column is repeated.
- Rows below the frame repeat row 479.

**Frame memory interface.** The frame memory itself is outside the design.
- The top asks for one pixel column at a time on `rd_x` / `rd_y0`. It expects the 33 × RGB pixels
  of that column on `rd_col` in the same cycle.
- A frame starts with a pulse on `start`. It ends with a pulse on `frame_done`.
- A block is fetched only after the previous one has been read out completely, so blocks do not
  overlap in time.

**Result interface.** Results leave on `out_*`:
- Each valid cycle carries one column of 33 segment numbers.
- The column index inside the block is `out_col`. The frame coordinates are `out_x` / `out_y0`,
  and the block indices are `out_bx` / `out_by`.
- `out_last` marks the block's last column.
- `seg_count` is the number of regions found in the block just finished.

## One block: the four stages (`seg_core`)

`seg_core` chains four stages. A controller drives them.

1. **`weight_calc`** receives a pixel column every cycle and produces two sets of weights:
   - the weights to the previous column (horizontal);
   - the weights between vertically adjacent pixels of the column.

   The weight is `W = max(0, 255 − SLOPE·d)`. Here d is the largest difference of the R, G and B
   values, and SLOPE = 8. Any pair differing by 32 or more gets weight 0.
2. **`leader_calc`** holds back one column, because a cell's right-hand weight only arrives with
   the next column. It then decides for each cell whether it is a leader: the sum of the weights
   to all neighbours that exist must exceed `PHI_P` = 800. An interior cell needs an average
   weight above 200 (d ≤ 6) to all four neighbours, so leaders lie inside smooth areas and not on
   edges. A flush cycle pushes out the last column.
3. **`cell_network`** stores the weights and leader flags and grows the regions (next section).
4. **`seg_output`** shifts the segment numbers out, one column per cycle, image column 0 first.

**Cycle budget for one block of 41 columns:**

| phase | cycles |
|---|---|
| load (one column per cycle, the first also clears the network) | 41 |
| flush of the leader stage | 1 |
| one region with g growing steps: self-excite, g × grow, one grow cycle that sees the OR = 0 and labels | g + 2 |
| final leader search that finds none | 1 |
| read-out | 41 |

The controller (`seg_controller`) issues these phases as commands to all cells: clear, shift,
self, grow, label and output. `seg_num` counts from 1 and increases by one with each label.

## The cell network (`cell_network`, `seg_cell`, `weight_reg`)

**Layout.**
- Cell (r, c) is a `seg_cell`.
- Each cell has a horizontal weight register `WRh` beside it and a vertical one `WRv` below it.
  Both are `weight_reg` instances.
- Each cell sees, for its four neighbours (up, down, left, right), whether the neighbour is
  excited and the weight to it.

**Loading and read-out, the part most easily misread.** The network is filled like a row of
shift registers:
- Every load cycle a new column bundle enters at network column 0, and the contents of each row
  move one column to the right.
- After 41 cycles, network column j holds image column 40 − j. The block is stored mirrored.
- `WRh` of network cell (r, j) therefore holds the weight between network columns j and j+1. In
  the last column it is 0, because that is the image border.
- For read-out, the labels shift right again, and the rightmost column leaves on the row outputs
  `ox[r]`. The store is first-in first-out, so the image columns come out in input order.
- Region growing is symmetric, so the mirroring changes nothing in the result. The one exception is
  the order in which leaders are taken: the selector takes the lowest row, and within it the
  highest network column, which is the lowest image column. Leaders are therefore picked in image
  raster order.

**Cell states.** A cell is free, excited or inhibited. It also holds a leader flag and a segment
number.
- *self*: the selected leader moves from free to excited.
- *grow*: a free cell with at least one excited neighbour is *active*. It becomes excited when the
  sum of its weights to excited neighbours exceeds `PHI_Z` = 120.
- *label*: excited cells take `seg_num` and become inhibited. An inhibited leader can no longer be
  chosen.

The excitation threshold is crossed by one strong link (W > 120, which means d ≤ 16). Several
weaker links together can cross it too. The steep weight slope keeps several weak links across a
real edge from adding up past the threshold.

**Stand-by (boundary-active-only) and clock gating.** While a region grows, a cell is in stand-by
in any of these cases:
- it has no excited neighbour;
- it is excited already;
- it already has a segment number.

A cell in stand-by is not clocked. It also drives 0 into the global OR, so it does not switch that
OR either.

Clocks are gated per row:
- During *grow*, a row is clocked only if its row OR (`ZOR_i`) is 1, that is, if it holds a cell
  that can become excited in this step.
- During *self*, only the leader's row is clocked.
- During *label*, only rows holding excited cells are clocked.
- During load, clear and read-out, all rows are clocked.

Inside a clocked row, a cell is enabled only when it is not in stand-by. The gated clocks are
written as clock enables (`row_en`, and `ce` per cell). A synthesis flow can turn them into
integrated clock-gating cells.

**How much is gated.** On the test frame, only 2.3 % of cell-cycles during segmentation had their
clock enabled.

## Global inhibitor and clock controller (`global_inhibitor`, `clock_controller`)

`global_inhibitor` produces three levels of OR from the per-cell excitable signals `z`:
- `zor_row[r]`, one per row;
- `zor_grp`, one per group of 4 rows (9 groups, the last one partly filled);
- the global `zor`.

The controller keeps issuing *grow* while `zor` is 1. The clock controller uses `zor_row` as the
row clock enables during growing. `zor_grp` is the point where a group-level gate could be
inserted. The network does not consume it; the block-level OR of a full-custom version would be
built from it.

This block is plain static OR logic. A dynamic (precharged) OR is the natural circuit form but is
outside the scope of RTL.

## Parameters

All defaults are in `rtl/seg_pkg.sv`.

| parameter | default | meaning |
|---|---|---|
| `COLS`, `ROWS` | 41, 33 | block and network size |
| `IMG_W`, `IMG_H` | 640, 480 | frame size |
| `NBX`, `NBY` | 16, 15 | blocks per frame |
| `NCH`, `PIX_W` | 3, 8 | colour channels and bits per channel |
| `W_W` | 8 | weight width |
| `SLOPE` | 8 | weight fall-off per unit of colour difference |
| `PHI_P` | 800 | leader threshold (sum of weights to all neighbours) |
| `PHI_Z` | 120 | excitation threshold (sum of weights to excited neighbours) |
| `GROUP` | 4 | rows per group in the global inhibitor |
| `LW` | 11 | segment-number width, ⌈log2(ROWS·COLS+1)⌉ |

## Departures and own choices

These points are choices of this implementation:
- **Weight, leader and excitation formulas.** The exact weight formula and the two thresholds are
  choices of this implementation. A linear weight (255 − d) let regions creep across edges and was
  replaced by the steep clamped form above.
- **Leader order.** Leaders are taken in image raster order, one region at a time.
- **Loading and read-out.** Loading through row shift chains, the mirrored store, and the one
  flush cycle are choices of this implementation.
- **Reset.** An asynchronous active-low reset `rst_n` clears everything.
- **Block scheduling.** Blocks run one after another: load, segment, read out. The load of the
  next block does not overlap the segmentation of the current one.
- **Per-block segment numbers.** No merging across block borders is done. Segment numbers are
  local to each block.
- **Clock gating.** The gated clocks are modelled as enables rather than as gated clock nets. A
  row's growing clock comes from that row's own OR of cells that are active and meet the
  excitation condition. These are exactly the cells that change in the next step. A plain "row
  holds an active cell" signal could not end the growth, because active cells that can never be
  excited stay active.

Timing at a 10 MHz clock, for comparison with a budget of roughly 7.5 ms per frame:
- The test frame takes about 40,700 cycles, which is about 4.1 ms.
- In/out costs 83 cycles per block.
- Segmentation costs 1 + Σ(g+2) cycles per block and depends on the image. The test frame averages
  about 85 cycles per block.
- An image with many small regions or long thin ones takes longer.

**Lint.** The remaining lint warnings are unused observation outputs (`zor_grp`, `clk_enable`, and
the per-cell `excited` / `active` / `ce` / `labels` buses, which the testbenches read). There is
also a note that `rst_n` is used both as an asynchronous reset and inside assertion `disable iff`
clauses.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog. `tb/seg_ref_pkg.sv` holds the reference
model:
- a synthetic colour test image: a disc, a rectangle, a fine checker texture, bands and noise;
- the weights and leaders;
- the region growing, run both as synchronous rounds (to get the cycle count) and as a flood fill
  (to get the region);
- a check that the two runs agree.

What each testbench covers:
- **Leaf blocks.** Each leaf-block testbench checks its block against an independent computation
  on random inputs.
- **`tb_cell_network` and `tb_seg_core`.** These compare every label of whole blocks and the
  segmentation cycle counts with the reference.
- **`tb_vga_seg_top`.** This runs a full 640 × 480 frame at the default parameters and checks:
  - every output pixel;
  - frame coordinates and block order;
  - the region count of each block;
  - the cycle count of each block.

  It also checks the rate budget at 10 MHz: at most 230 segmentation cycles per block on average
  and at most 74,900 cycles (7.49 ms) for the frame. It checks that fewer than a quarter of the
  cell-cycles are clocked during segmentation. Finally, it counts how often each mechanism occurred. A mechanism that never occurs counts as a
  failure. The mechanisms are: clear, shift, flush, self, grow, label, end of growth on OR = 0,
  row gating, stand-by cells, unlabelled cells, edge clamp in x, row repetition in y, and the
  move to a new block row.

Simulating with plain Verilator, for example the full frame (about 6 s of simulation):

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb rtl/seg_pkg.sv \
    tb/seg_ref_pkg.sv tb/tb_vga_seg_top.sv --top-module tb_vga_seg_top
./obj_dir/Vtb_vga_seg_top
```

To run any other testbench, replace `tb_vga_seg_top` with its name. The package files must come
first; the other modules are found through `-Irtl`. To try other thresholds or another weight slope, change the defaults in `seg_pkg.sv`. The
reference model takes `PHI_P` / `PHI_Z` as class parameters and would need the same change.
