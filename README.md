# In-place deblocking filter for H.264/AVC

H.264/AVC smooths the borders of every 4x4 block in a decoded picture. For
each macroblock (MB), the vertical edges are filtered first, left to right.
The horizontal edges follow, top to bottom. Built in that order, a hardware
filter must keep a whole filtered macroblock (plus its neighbours) while it
switches from the rows to the columns. It also reads every 4x4 block several
times.

This core filters the edges in a different order that gives the same result.
It walks the 4x4 blocks of the macroblock in raster order. For each block it
filters the block's left edge and then its top edge, as soon as the pixels on
both sides are final. A block that has been filtered horizontally is
transposed on the spot and filtered vertically straight away. As a result,
the only intermediate storage is:

| storage | size | holds |
|---|---|---|
| two-port SRAM | 16 x 32 bit | the four blocks above the current block row, column by column |
| shift buffer | 4 x 32 bit | the block to the left of the current vertical edge |
| transpose array | 4 x 4 x 8 bit | one block on its way between row order and column order |

One combinational 8-pixel edge filter handles one line across an edge per
cycle, so an edge of a 4x4 block takes four cycles. When macroblocks arrive
back to back, one 4:2:0 macroblock takes 300 cycles: 180 for luma and 60 for
each chroma component. That is 2048x1024 at 30 frames/s with a 73.73 MHz
clock. Samples are 8 bits.

## Block numbering and edge order

Each colour component is handled on its own. The macroblock's 4x4 blocks and
their neighbours form a grid. For luma (n = 4 blocks per side) the grid is:

```
        1   2   3   4        <- bottom blocks of the macroblock above
    5   6   7   8   9
   10  11  12  13  14        6..9, 11..14, 16..19, 21..24: this macroblock
   15  16  17  18  19        5, 10, 15, 20: right column of the left macroblock
   20  21  22  23  24
```

Chroma uses the same scheme with n = 2: top 1, 2; rows 3 4 5 and 6 7 8.
The grid index (`blk`) is what the core's ports use to name a block.

Within one block row the edges are filtered in this order, where Vj is the
left edge of the j-th block of the row and Hj is its top edge:

```
luma   V0 V1 H0 V2 H1 V3 H2 [S] H3        (edge numbers 8m .. 8m+7)
chroma V0 V1 H0 [S] H1
```

H0 can run right after V1 because the first block is then final
horizontally. Its left edge was filtered in V0 and its right edge in V1. The
block above it came from SRAM. Below, H0 of the next row runs over this
block again, and it is the only reason a block is kept in SRAM. [S] is a
phase with no filtering. It moves the last block of the row from the shift
buffer into the transpose array, so that its top edge can be filtered.

The testbenches check that this order gives exactly the pixels of the
standard order (all vertical edges, then all horizontal edges).

## Datapath

```
 in_data ──┬──────────────► R ┐              ┌─► L out ─► transpose array
           │                  ├─ edge filter ┤
 shift buffer ────────────► L ┘  (vertical)  └─► R out ─► shift buffer

 SRAM slot j (column) ────► L ┐              ┌─► L out ─► transpose array
                              ├─ edge filter ┤
 transpose array (column) ► R ┘ (horizontal) └─► R out ─► SRAM slot j (in place)

 transpose array ─► out_data,  ─► SRAM (upper blocks at the start),
                                 ◄─ SRAM (bottom blocks at the end)
```

* **Vertical edge Vj.** The left side of line c is row c of the block in the
  shift buffer. The right side is row c of the next block, arriving on the
  input port. The filtered right side goes back into the shift buffer,
  because the next vertical edge needs it. The filtered left side is final
  horizontally and goes into the transpose array.
* **Horizontal edge Hj.** The upper side of line c is column c of the block
  above, from SRAM slot j. The lower side is column c of the block in the
  transpose array. The filtered lower block overwrites SRAM slot j, word by
  word, in the cycle it was read. It stays there for the next block row. The
  filtered upper block is now final and goes into the transpose array, to
  leave in row order.

### The transpose array (the part that needs most care)

The 4x4 array is read and written through *slots*. In row direction, slot s
is row s. In column direction, slot s is column s. In cycle c of every phase
the core reads slot c and writes a new word into the same slot. So one block
streams out while the next streams in, with no second buffer. What comes out
in a phase is always the block written in the phase before:

* if the direction flipped between the two phases, the block comes out
  transposed;
* if the direction stayed the same, it comes out unchanged, one phase late.

The direction flips at the start of every phase except V1. The left
neighbour block written as rows in V0 must leave as rows in V1. Every other
block that enters the array must change orientation: rows after a vertical
edge, columns after a horizontal edge or from SRAM. The direction bit lives
in the controller and changes only between phases.

Because of this, every finished block leaves through the array, one phase
after it was produced. The output port is then never needed twice in one
cycle.

## Schedule and cycle count

Each component runs a fixed sequence of four-cycle phases:

| phase | input port | work |
|---|---|---|
| P0 .. P(n-1) | upper block k+1 | block enters the array as rows; the previous one leaves as columns into SRAM slot k-1 |
| L | first left block | it enters the shift buffer; the last upper block goes into SRAM |
| Vj | block j+1 of the row | vertical edge (above) |
| Hj | none | horizontal edge (above) |
| S | next row's left block (not after the last row) | last block of the row moves from the shift buffer to the array |
| F0 .. Fn | none | upper block of the last H edge, then the bottom blocks from SRAM, leave through the array |

Loading the next row's left block during S saves one phase per block row,
except the last. The final phase Fn only reads the array, and P0 only writes
it. So when another component or macroblock follows, the two share one
phase. Luma then takes 45 phases (180 cycles) and each chroma component takes
15 phases (60 cycles): 300 cycles per macroblock. A macroblock that starts
from idle has no phase to share with, and takes 304 cycles.

The SRAM has a synchronous read. The controller therefore issues each read
address one cycle early, from the control word of the next cycle.

## Edge filter

`dbf_edge_filter` takes one line across an edge: L3..L0 on the left or upper
side and R0..R3 on the right or lower side. It runs the strong (bS = 4) and
normal (bS 1..3) filters in parallel and selects the result:

* **Pass through unchanged** if bS = 0, or if any of these fails:
  |R0-L0| < alpha, |R0-R1| < beta, |L0-L1| < beta.
* **bS = 4, luma, per side:** full smoothing of X0..X2 when |X2-X0| < beta
  and |L0-R0| < alpha/4 + 2. Otherwise only X0 = (2X1+X0+Y1+2)/4.
* **bS = 4, chroma:** always the 3-tap X0 form.
* **bS 1..3:** the clipped delta on L0 and R0. For luma, L1 and R1 are also
  corrected when their side is flat. For chroma, tc = tc0 + 1.

These are the filtering equations of the H.264/AVC standard. The sums are
written as plain arithmetic and left to synthesis.

## Interfaces (`dbf_top`)

All data words are 32 bits: four pixels of one row of one 4x4 block. Pixel i
(leftmost first) is in bits `[8i+7:8i]`.

* **Control.** `start_i` requests a macroblock. One request can wait while
  `busy_o` is high, and it is then chained with no gap. `mb_start_o` and
  `mb_done_o` mark the first and last cycle of each macroblock.
* **Input.** `in_req_o` with `in_comp_o`, `in_blk_o` and `in_row_o` asks for
  a row. The word must be on `in_data_i` in the same cycle; there is no
  stall. Blocks are requested in grid order (1, 2, ..., 24, then chroma
  1..8 twice), each as rows 0..3.
* **Output.** `out_valid_o` with `out_comp_o`, `out_blk_o`, `out_row_o` and
  `out_data_o` returns each block of the grid once, neighbours included, in
  row order. Luma order: 5 1 2 3 4 10 6 7 8 9 15 11 12 13 14 20 16 17 18 19
  21 22 23 24. Chroma order: 3 1 2 6 4 5 7 8.
* **Edge parameters.** While a line is filtered, the core names it on
  `prm_req_o`, `prm_comp_o`, `prm_dir_o`, `prm_x_o`, `prm_y_o`, `prm_line_o`
  and `prm_edge_o`. Here (x, y) is the right/lower block of the edge inside
  the macroblock, and the line is a row for vertical edges and a column for
  horizontal ones. `prm_i` must return alpha, beta, tc0 and bS for that line
  in the same cycle.
* **Status.** `filt_*_o` report which filter path the current line took.
  They are for observation only.

The core does not include the boundary-strength decision or the
alpha/beta/tc0 tables. They depend on coding modes, motion vectors and
quantisers that the core never sees, so they must be supplied on `prm_i`.
Picture borders and disabled edges are bS = 0. The neighbour blocks that
fall outside the picture can then hold any data.

## How far it can be trusted

Every module has a self-checking testbench. The filter arithmetic is
compared with an independent integer model of the standard's equations. The
buffers are compared with behavioural models. The schedule is checked for
its block orders, edge order and cycle counts.

The end-to-end tests filter whole pictures through the core, using a
behavioural frame store. The result must equal, pixel for pixel, a reference
that filters the same picture in the standard edge order:

* `tb_dbf_top`: 3x2 macroblocks. Five are chained and one starts from idle.
  It checks the 300- and 304-cycle timings, and that every filter path and
  schedule mechanism occurs.
* `tb_dbf_frame_2k1k`: a full 2048x1024 picture (8192 macroblocks) streamed
  back to back. It takes 2,457,604 cycles, within the 2,457,666 that one
  frame may take at 73.73 MHz and 30 Hz. It simulates in a few seconds.

Parameters and pictures are random but bounded. The tests use 4:2:0 chroma,
8-bit samples and frame (not field/MBAFF) macroblocks only.

## Design choices and departures

* **Ports.** The block-tagged request/response ports, the per-line parameter
  port and the start/busy handshake are this design's own.
* **Cycle count.** The 300 cycles per macroblock hold only when macroblocks
  are chained. To reach them, the design overlaps the end of one component
  with the start of the next, in addition to the left-block overlap.
* **Bottom row.** The last block row leaves in five phases. The first of
  them is the phase hidden by that overlap.
* **SRAM.** It is a register array with a one-cycle synchronous read. For
  silicon it would be swapped for a two-port SRAM macro with the same ports.
* **Filter.** It is combinational, with no pipeline stage. The in-place
  writes to the transpose array and the SRAM rely on the result being ready
  in the same cycle.
* **Sample width.** It is fixed at 8 bits (`PIX_W` in `dbf_pkg`). Wider
  samples would also need wider words and buffers.

## Files and simulation

`rtl/`:

* `dbf_pkg.sv`: types, word packing, control word.
* `dbf_strong_filter.sv`, `dbf_normal_filter.sv`, `dbf_edge_filter.sv`: the
  filter.
* `dbf_shift_buffer.sv`, `dbf_transpose_buffer.sv`, `dbf_sram_2p.sv`: the
  storage.
* `dbf_controller.sv`: the phase sequencer.
* `dbf_top.sv`: the core.

`tb/` has one `tb_<module>.sv` per module, plus:

* `dbf_ref_pkg.sv`: the reference filter.
* `dbf_frame_test.sv`: the picture test body.
* `tb_dbf_frame_2k1k.sv`: the full-frame workload.

Run a test with plain Verilator:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dbf_top \
  -y rtl -y tb +libext+.sv rtl/dbf_pkg.sv tb/dbf_ref_pkg.sv tb/tb_dbf_top.sv
./obj_dir/Vtb_dbf_top
```

Each testbench ends with `TB_RESULT checks=N failures=0`. To try other
picture sizes, instantiate `dbf_frame_test` with different `MBW` and `MBH`.
