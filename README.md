# Parallel-tree full-search motion estimation with early termination

This is synthesizable SystemVerilog for a block-matching motion estimator.
It finds, for every 16x16 macroblock of the current frame, the
displacement in -16..+15 (both axes) whose 16x16 block in the reference
frame has the smallest sum of absolute differences (SAD). That is
1024 candidates of 256 pixel differences each. Two ideas keep the cost low:

* **Parallel tree with shared window pixels.** A row of one candidate is
  handled by one *16x1 IPE*: 16 absolute-difference units, an adder tree
  and an accumulator. P of these IPEs (default 4) work on P horizontally
  adjacent candidates at once. Neighbouring candidates overlap in all but
  one column, so a single row fetch of 16+P-1 window pixels (19 for P = 4)
  feeds all of them.
* **Partial distortion elimination (PDE).** After every row, the smallest
  of the P running SADs is compared with the best complete SAD found so far.
  If even the smallest is already larger, none of the P candidates can win,
  and the group is abandoned on the spot. The search starts at the
  predicted motion vector and spirals outwards, so a good "best so far"
  turns up early and most groups die after a few rows. The cycles saved are
  cycles in which the tree, the buffers and the comparator are idle.

The structure is that of the architecture published as "Low-Power Parallel
Tree Architecture for Full Search Block-Matching Motion Estimation". Where
that description leaves details open, this RTL makes its own choices. They
are listed under "Choices of this implementation" below.

## Block diagram

```
 nb_mv_a/b/c --> mv_predictor --pred_mv--> addr_gen_ctrl <---- skip ----------+
                                           |   ^      |                       |
 in_valid/in_data (16 px/beat) ----------> |   |      +--> spiral_scan        |
                                           v   |                              |
                        cur_block_ram (16x16)   sw_ram (48 rows x 3 strips)   |
                                  |                 |                          |
                                  |             ram_mask (16+P-1 px)           |
                                  v                 v                          |
                               parallel_tree: P x ipe16x1 (abs_diff x16, +tree, ACC)
                                                 |  P next SADs                |
                                                 v                             |
                                           decision_unit: min tree, R, comp ---+
                                                 |
                                        best_mv, min_sad
```

| module | role |
|---|---|
| `me_engine` | top level; wires everything below |
| `addr_gen_ctrl` | takes in pixels, addresses both buffers, steps through groups and rows, reacts to `skip`, produces the enables |
| `spiral_scan` | order in which candidate groups are visited |
| `mv_predictor` | median of three neighbour vectors, used as the start position |
| `cur_block_ram` | 16x16 current block, one row per cycle |
| `sw_ram` | 48x48 search window in three 16-column strips of four 4-pixel banks; one row per cycle, only enabled banks read |
| `ram_mask` | selects the 16+P-1 window pixels of the current group from a row and enables only the banks that hold them |
| `parallel_tree` | P `ipe16x1` units sharing the window pixels |
| `ipe16x1` | 16 `abs_diff`, 4-level adder tree, accumulator with reload |
| `abs_diff` | \|a-b\| of two pixels |
| `decision_unit` | min tree, recent-minimum register R, comparator, best vector |
| `me_pkg` | sizes (8-bit pixels, N = 16, range 16, 48x48 window, 16-bit SAD) and types |

## How a search proceeds

Candidates are indexed by displacement (i, j), both in -16..+15. A
**group** is P candidates with the same j and i = 4g-16 .. 4g-16+P-1
(written here for P = 4). That gives an 8 x 32 grid of groups. A group
takes at most 16 cycles. In row cycle r (0..15) of group (g, j):

1. `cur_block_ram` returns current-block row r.
2. `sw_ram` returns window row j+16+r. Only the banks that `ram_mask`
   enables are read.
3. `ram_mask` passes logical columns 4g .. 4g+18.
4. IPE q adds |cur[k] - win[q+k]| over k = 0..15 to its accumulator.
   In row 0 it reloads the accumulator instead of adding.
5. `decision_unit` takes the P values the accumulators are *about to*
   hold, finds their minimum and compares it with R.

All five steps happen in the same cycle: the RAM reads are combinational.
So `skip` acts on the row just summed, and the next cycle already belongs
to the next group. Ending a group early costs no extra cycle.

* **Rows 0..14:** if the group minimum is larger than R and elimination is
  on, `skip` is raised. The group ends and the next group starts in the
  following cycle.
* **Row 15:** if the group minimum is below R, R and the best vector are
  loaded at the clock edge. The vector is (4g-16+q, j), where q is the IPE
  that produced the minimum.

R is set to 0xFFFF when a search starts. The first group therefore always
runs to the end, and its minimum becomes the starting bound.

Without elimination a search is exactly 32*32/P*16 cycles: 4096 at P = 4,
1024 at P = 16 and 16384 at P = 1. With elimination, a search takes the
number of rows actually processed, plus a few stall cycles (see below).

### Start position and spiral order

The search starts at the **group that holds the predicted vector**: the
component-wise median of three neighbour vectors. For a prediction of
(5, -4), the first group holds candidates (4..7, -4).

From there, `spiral_scan` walks rings of growing size around the start
group. Each ring is walked as: top row left to right, right column
downwards, bottom row right to left, left column upwards. Each leg is
clipped to the 8 x 32 grid. Legs that fall wholly outside are passed over
in one cycle, without emitting a position. Every group is emitted exactly
once.

The scanner holds one position ready in an output register. The
controller consumes it in the same edge that ends the previous group. If a
group is very short (skipped after one or two rows) and the scanner is
still passing over empty legs, the controller waits. Such a cycle is a
**stall**: nothing is enabled and it is counted in `stall_cnt`. With
16-cycle groups (no elimination) there is never a stall.

### Search window and strip reuse

The window for a 16x16 block and range -16..+15 spans 47x47 pixels. It is
stored as 48 rows of three 16-pixel **strips**. Together with the 16x16
current block this is 20480 bits of on-chip storage.

Horizontally adjacent macroblocks share 32 of the 48 columns. A `reuse`
start therefore loads only one new strip, 48 beats instead of 144. The
new strip overwrites the physically oldest strip. The register
`strip_base` (in `addr_gen_ctrl`) records which physical strip is
logically leftmost. `ram_mask` rotates each row by this amount before
selecting pixels.

## Interface of `me_engine`

| signal | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle pulse in idle: begin a macroblock |
| `reuse` | in | 1 | with `start`: shift the window one strip right, load one strip only |
| `pde_en` | in | 1 | with `start`: enable early termination |
| `nb_mv_a/b/c` | in | `mv_t` | neighbour vectors for the prediction (signed 5-bit x, y) |
| `in_valid`, `in_ready`, `in_data` | in/out/in | 1/1/16x8 | pixel stream, one beat moves on each edge where both are high |
| `busy`, `done` | out | 1 | engine not idle; one-cycle pulse when the result is final |
| `best_mv`, `min_sad` | out | `mv_t`, 16 | result; valid from `done` until the next `start` |
| `skip` | out | 1 | the group in progress is being abandoned this cycle |
| `rows_cnt`, `grp_cnt`, `skip_cnt`, `stall_cnt` | out | 16 each | statistics of the last search |

Stream order after `start`:

1. 16 beats of current-block rows 0..15.
2. The window:
   * full load (`reuse` = 0): rows 0..47, and within each row the strips
     left, middle, right (144 beats);
   * reuse load (`reuse` = 1): for rows 0..47, the new rightmost strip
     only (48 beats).

Window pixel (row y, column x) is the reference pixel at offset
(x-16, y-16) from the block's top-left corner. After the last beat the
search starts at once. `done` follows after the search cycles plus one.

Parameter: `P` (default 4), the number of IPEs. It must divide 32; 1, 4 and
16 are tested.

## Timing and cost at a glance (P = 4)

* Load: 16 + 144 beats for a full window, or 16 + 48 beats with reuse.
  Loading is not overlapped with searching.
* Search: 4096 cycles without elimination, and fewer with it. On the smooth
  synthetic texture of the testbench, 460 to 3087 cycles were needed.
* Critical path, all within one cycle: RAM read, mask multiplexer, absolute
  difference, 4-level adder tree, accumulator add, 2-level min tree,
  compare, next-group selection.
* Worst case for CIF at 30 frames/s: 396 * 30 * (4096 + 66) cycles per
  second, about 49.4 MHz.

## Choices of this implementation

These points are not fixed by the published architecture and were decided
here:

* 8-bit pixels and 16-bit SAD and accumulator registers; 5-bit signed
  vector components.
* Single-cycle row processing with combinational register-file reads, so
  that early termination costs no pipeline bubble.
* Skip when the group minimum is *strictly* larger than R. R is replaced
  only by a strictly smaller complete SAD. In the min tree, the lower IPE
  index wins a tie.
* A predicted x is mapped to its group by rounding (x+16) down to a multiple
  of P.
* The exact ring and leg order of the spiral, and how it is clipped at the
  edges of the search range.
* The 48x48, three-strip window layout and the reuse of one strip per
  macroblock step, which stands in for the data-reuse scheme the
  architecture refers to.
* The pixel stream format and the valid/ready handshake, and sequential
  (not overlapped) loading.
* Clock gating of idle units is expressed as enables (`tree_en`, `ram_re`,
  `dec_en`). The accumulators and R hold their values, and the RAM read
  ports drive zeros. A gating cell that turns these enables into gated
  clocks is left to the synthesis flow.
* `pde_en` (run without elimination, for reference) and the statistics
  counters are additions.
* The median predictor is a separate combinational block in front of the
  controller. The system chooses which three neighbours it feeds in.

Window RAM traffic: each strip is split into four 4-pixel banks.
`ram_mask` enables only the banks that hold the group's columns. At P = 4
that is 5 of the 12 banks, so 20 pixels (160 bits) are read per row. The
published design quotes 19 pixels (152 bits) of window I/O. The extra pixel
comes from the 4-pixel bank granularity.

What is not here: the external frame memory and the system that streams
pixels and collects vectors.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends by
printing `TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|---|---|
| `tb_abs_diff` | corner cases and 20000 random pairs |
| `tb_ipe16x1` | running SAD after every row, reload, hold with enable low, 16 cycles per SAD |
| `tb_parallel_tree` | each IPE's SAD equals the SAD of the candidate shifted by q columns |
| `tb_decision_unit` | skip, update, R and best vector against a model, including ties, elimination off and re-init |
| `tb_ram_mask` | all strip rotations and column offsets; bank enables equal exactly the banks holding output pixels |
| `tb_cur_block_ram`, `tb_sw_ram` | write/read, per-bank read enables and idle output |
| `tb_spiral_scan` | exact order against an independently built unclipped-then-filtered spiral; 25 start points |
| `tb_mv_predictor` | median against a reference |
| `tb_addr_gen_ctrl` | every write and read address, strip rotation over four macroblocks, enables, counters, first group (4..7, -4) for prediction (5, -4), 4096 cycles without elimination |
| `tb_me_engine` | whole engine at default parameters, five macroblocks (full load then four reuse loads), with and without elimination; minimum SAD equals an exhaustive reference; exactly 4096 search cycles without elimination; each mechanism (skip, full load, reuse load, stall, elimination off) observed |
| `tb_me_parallelism` | the same with P = 1 and P = 16 side by side: 16384 and 1024 rows without elimination, and the correct minimum |

The tests use synthetic texture: box-filtered random noise, with the
current block cut out at a known offset and lightly disturbed. They check
correctness and cycle counts. They do not reproduce skipping ratios
measured on real video sequences.

Running one test with Verilator 5:

```
verilator --binary --timing --assert -Irtl rtl/me_pkg.sv rtl/*.sv \
    tb/tb_me_engine.sv --top-module tb_me_engine -Mdir obj_me
./obj_me/Vtb_me_engine
```

Replace `tb_me_engine` with any other testbench name. The package must be
read first. Every testbench finishes in well under a second of wall time.
