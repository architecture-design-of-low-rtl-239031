# Low-power integer motion estimation for H.264/AVC

Integer motion estimation (IME) looks for the block in a reference frame
that best matches each 16x16 macroblock of the frame being coded. Fast
search algorithms visit only a few candidate positions. That saves
arithmetic, but their irregular paths usually break data reuse, so every
candidate reloads 256 reference pixels from the search-window SRAM. SRAM
reads dominate the power of such an engine.

This engine runs a four-step square search (FSS) and keeps the data reuse
of a full search. Two ideas make that possible:

* **Ladder-shaped search window.** The window is spread over 16 SRAM banks
  so that any row *or* column of 16 pixels can be read in one cycle.
* **A reference array that shifts in four directions, plus one unbroken search path.** The
  16x16 reference register array can move its candidate one pixel up, down,
  left or right, and takes in just the one new row or column. The controller
  chains every step of the search into one path of single-pixel moves. The
  array is filled once per search centre, and after that every cycle
  evaluates a new candidate.

For each macroblock the engine reports the best SAD (sum of absolute
differences) and motion vector (MV) of all 41 H.264 partitions: 16x16, 16x8,
8x16, 8x8, 8x4, 4x8 and 4x4. The search range is ±32 pixels horizontally and
±16 vertically. All of this is synthesizable SystemVerilog. The top module is
`ime_top`.

## The search

The square interval is one pixel. Starting from a centre, the engine
evaluates the 3x3 square around it. The best 16x16 candidate becomes the
*min-point* (MP). If the MP is the centre, the search of that centre ends.
Otherwise the MP becomes the new centre, and only the candidates of the new
3x3 square that the previous square did not cover are new:

* 3 new candidates when the MP is an edge neighbour of the centre.
* 5 new candidates when the MP is a corner neighbour.

The search stops after four steps. It also stops when the next square would
leave the search range. Candidates steer the search by their 16x16 SAD only,
but all 41 partition SADs of every visited candidate go to the decision
unit.

The engine visits the candidates in one continuous path. The path of one step
starts where the previous step's path ended, the *end-point* (EP), which is
always a corner of the previous square. It visits every new candidate and
ends on a corner of the new square, which is the next EP. Passing over
candidates that were already evaluated costs one "bubble" cycle each. That
is far cheaper than refilling the array, which takes 16 cycles.

Per centre:

| phase | moves (line reads) | notes |
|---|---|---|
| fill | 16 | 16 downward moves; the last one completes the top-right candidate of the first square |
| step 1 | 8 | left, left, down, right, right, down, left, left; ends bottom-left |
| steps 2-4 | 3, 5, 6 or 8 each | from the moving-direction ROM |

Worked example: a search whose MPs are right, top-right, right takes
16 + 8 + 5 + 6 + 3 = **38 line reads** for 20 distinct candidates. These
20 candidates need at least 394 distinct pixels. The engine reads
38 x 16 = 608, so the SRAM reads 1.54 times the minimum. A 2-D adder-tree
engine with ordinary row-interleaved SRAM would read about 6.9 times the
minimum on this path. `ime_top_tb` and `square_search_fsm_tb` both run this
example and check the 38.

## Ladder-shaped search window (`sw_sram`)

The window is 80 x 48 pixels: the 16x16 block plus ±32 / ±16. It is stored in
16 banks of 240 bytes. Pixel (x, y) lives in

    bank = (x + y) mod 16,   word = y * 5 + floor(x / 16)

Each row is the plain column-interleaved layout, rotated right by its row
number. Any 16 consecutive pixels of a row fall in 16 different banks. So do
any 16 consecutive pixels of a column. Both are read in one cycle.

For a line whose first pixel is (x0, y0), `sw_addr_gen` gives each bank b the
word of the line pixel it holds, k = (b − x0 − y0) mod 16:

* row line: word = y0 * 5 + (x0 + k) / 16
* column line: word = (y0 + k) * 5 + x0 / 16

Bank b then outputs pixel k of the line. `sw_sram` puts the line back in
order with a rotation by (x0 + y0) mod 16. The banks are read
synchronously, so the ordered line appears one cycle after the read.

The write port writes one aligned 16-pixel row segment (row, column group)
per cycle. All 16 banks are written at the same word, with the data rotated
by the row number. The banks are single-port: a read and a write in the same
cycle are not allowed.

**Window reuse between macroblocks.** Neighbouring macroblocks in a row share
64 of their 80 window columns, so the window is circular in 16-pixel column
groups. Window group g (columns 16g..16g+15) is held in memory group
(g + `sw_col_base`) mod 5. In the formulae above, floor(x / 16) is replaced
by that memory group. To move one macroblock to the right:

1. Write the entering group into the memory group of the leaving one. That
   is 48 row-segment writes instead of 240.
2. Advance `sw_col_base`.

A pixel's bank does not depend on the base, because 16 is a multiple of the
bank count.

## Reference array and moving directions (`ref_systolic_array`, `sw_addr_gen`)

The array holds `refp[r][c] = SW(x + c, y + r)` for the current candidate
(x, y). A move in direction `dir` shifts the array the opposite way and loads
the line that enters:

| candidate moves | array shift | line read |
|---|---|---|
| `DIR_DOWN` | up-shift | row y+16, new bottom row |
| `DIR_UP` | down-shift | row y−1, new top row |
| `DIR_RIGHT` | left-shift | column x+16, new right column |
| `DIR_LEFT` | right-shift | column x−1, new left column |

`sw_addr_gen` keeps its own copy of the candidate position. From the moving
direction it computes the line's bank addresses and the rotation. An
assertion in `ime_top` checks that this position always agrees with the
controller's.

## Moving-direction ROM (`move_dir_rom`, `step_counter`)

The ROM is addressed by three values:

* EP: 4 corners of the previous square.
* MP: 8 neighbour positions of the previous centre.
* MN, the moved number: the count of moves already made in this step, kept
  by `step_counter`.

It returns the next direction, plus a `last` flag on the final move of the
step. Every string obeys four rules:

* It starts at the EP.
* It visits every new candidate.
* It never leaves the union of the old and new squares.
* It ends on a corner of the new square.

Among the strings that obey these rules, the ROM holds a shortest one. By
case:

| case | moves |
|---|---|
| edge MP on the EP's side (e.g. EP top-right, MP right: R D D) | 3 |
| edge MP on the far side (e.g. EP bottom-left, MP right: R R R U U) | 5 |
| corner MP, not opposite the EP | 6 |
| corner MP diagonally opposite the EP | 8 |

So the ROM is 4 x 8 x 8 words of 3 bits. A design that never needs the
8-move case would only need six MN values. With one-pixel moves, however, an
EP opposite a corner MP cannot be served in fewer than 8 moves.

## SAD datapath (`cur_pel_buffer`, `pe_array`, `vbs_adder_tree`)

* `cur_pel_buffer` holds the current macroblock, written one row per cycle.
* `pe_array` has 256 elements, each computing |cur − ref|.
* `vbs_adder_tree` reduces each 4x4 block with a 2-D adder tree: four row
  sums, then their sum. The other 25 partitions are built from the sixteen
  4x4 SADs only:
  * 8x4 and 4x8: pairs of 4x4
  * 8x8: four 4x4
  * 16x8 and 8x16: pairs of 8x8
  * 16x16: the four 8x8

  All 41 SADs of a candidate are produced in the same cycle.

Partition numbering, used by every port that carries 41 values:

| index | partition |
|---|---|
| 0 | 16x16 |
| 1–2 | 16x8 (top, bottom) |
| 3–4 | 8x16 (left, right) |
| 5–8 | 8x8, raster order |
| 9–16 | 8x4, two per 8x8: top, bottom |
| 17–24 | 4x8, two per 8x8: left, right |
| 25–40 | 4x4, raster order over the macroblock |

## Decision and results (`mode_decision`, `best_info_buffer`)

`mode_decision` keeps the best SAD and MV of each partition over every
candidate of the search. Candidates are ordered by SAD, then by smaller y,
then by smaller x. That is a total order, so results do not depend on the
order candidates are visited in, or on bubble revisits. No MV-rate term is
added: choosing between partition modes is left to the next stage. The unit
also returns the 16x16 SAD and MV of each candidate to the controller. The
controller keeps the best candidate of the current centre, and at the end of
each step that best candidate is the MP.

When a search ends, `best_info_buffer` copies the 41 results into one of
`NUM_REF` slots, one per reference frame, for the fractional-pel stage to
read.

## Timing

A move issued in cycle t goes through these stages:

| cycle | what happens |
|---|---|
| t | reads the SRAM |
| t+1 | the line shifts into the array (at the end of the cycle) |
| t+2 | the new candidate's SADs are compared and the decision registers update |
| t+3 | its 16x16 result reaches the controller |

So at the end of each step the controller waits 3 cycles, then spends 1 cycle
choosing the MP. From the clock edge that samples `start` to the edge that
raises `done`:

    cycles = 2 + 6 * centres + sw_reads + 4 * (steps − centres)

Here `steps` counts all steps, including each centre's step 1. One worst-case
centre (four steps of 8 moves) takes 30 + 3 x 12 = 66 cycles. Writing the
whole window takes 240 cycles; sliding it by one macroblock takes 48.

How that compares with CIF at 30 fps (11,880 macroblocks/s):

| use | cycles per macroblock | clock needed |
|---|---|---|
| one centre, one reference, window slides | 68 + 48 = 116 | 1.4 MHz |
| four centres, one reference, window slides | 266 + 48 = 314 | 3.7 MHz |
| four centres, two references | 2 x (266 + 240) = 1,012 | 12.0 MHz |

With two references the window memory holds only one reference's window at a
time, so each search rewrites the whole window. All three cases fit within
13.5 MHz.

`ime_cif_row_tb` measures this in simulation: a full CIF macroblock row
(22 macroblocks), counted from the first window or macroblock write to `done`.

| mode | setup | worst cycles per macroblock | budget at 30 fps |
|---|---|---|---|
| ultra low power | 1 centre, window slides | 322 | 1,136 (13.5 MHz) |
| low power | 3 centres, window slides | 440 | 1,136 (13.5 MHz) |
| high quality | 3 centres x 2 references, full rewrite | 879 | 2,272 (27 MHz) |

These counts are higher than the table above. The testbench writes one row
per cycle, it also loads the current macroblock, and the first macroblock of
the row writes the whole window.

## Using `ime_top`

1. Write the window: `sw_wr_en`, `sw_wr_row` (0–47), `sw_wr_blk` (memory
   column group 0–4), and 16 pixels in `sw_wr_data`. Set `sw_col_base` as
   described above. It must stay constant during a search; an assertion
   checks this.
2. Write the macroblock: `cur_wr_en`, `cur_wr_row`, `cur_wr_data`.
3. Pulse `start` for one cycle with `ref_idx`, `num_centers` (1–4) and
   `centers[]`.
   * A centre is an MV (x, y) relative to the co-located block.
   * A centre outside ±31 / ±15 is clamped there, so that its first square
     lies inside the range.
   * Centres are searched one after another, and the decision buffer keeps
     its contents across them.
4. `busy` stays high during the search. `done` pulses once when the results
   are in slot `ref_idx`. `sw_reads` and `steps` report that search.
5. Read a result combinationally: `fme_ref`, `fme_part` → `fme_sad`,
   `fme_mv`, `fme_valid`.

Do not write the window while `busy` is high; an assertion checks this.

Parameters (defaults): `SR_X` 32, `SR_Y` 16, `MAX_CENTERS` 4, `NUM_REF` 2,
`MAX_STEPS` 4. The window size follows from `SR_X` and `SR_Y`. Reset is
asynchronous and active-low.

## Clock gating while the engine sleeps (`clock_gate`)

Between searches the engine waits while the next window and macroblock are
written, and at the low-power operating points it sleeps most of the time
(the CIF row test below is busy for well under half of each macroblock's
budget). The two largest register banks of the datapath therefore run on a
gated clock: the 256 reference-array registers and the 41 best SAD/MV
registers of the mode decision.

`clock_gate` is a latch-based gate. A latch is open while `clk` is low and
holds the enable, and `gclk = clk & latched enable`. If the enable changes
while `clk` is high, it cannot cut a pulse short or start one late. The
enable is `start | busy`, so the gated registers get a clock edge in exactly
the start cycle and the busy cycles. While the engine sleeps they keep their
contents, which nothing reads at that time.

The window memory and the macroblock buffer are written while the engine is
idle, so they stay on the free clock. So do the controller, the address
generator, the pipeline tags and the result buffer. A synthesis flow would
normally replace `clock_gate` with the library's integrated clock-gating
cell.

## How far it follows the published architecture

These parts follow the architecture as published:
* the blocks and how they connect
* the one-pixel square search
* the ladder layout
* the four shift configurations
* a ROM addressed by end-point, min-point and moved number, including its
  right, right, right, up, up example
* step 1 ending bottom-left
* 4x4 SAD reuse for variable block sizes
* the search range
* the 38-cycle example

These are this design's own choices:
* the step-1 path
* the ROM strings other than the published example, and the ROM depth (8
  instead of 6, see above)
* the window size of 80 x 48 and 16 banks (the published figure draws 8
  banks for illustration)
* pipeline depth and step overhead
* the tie-break rule
* how windows of neighbouring macroblocks are reused: the circular column
  groups
* the stop rule at the range border
* per-reference result slots
* which registers are clock-gated, and the gating cell
* all port protocols

Not included:
* Generating initial centres from neighbouring MVs (the content-adaptive
  scheme) and the MV predictor: centres are inputs.
* Reuse of the window between macroblock rows, and for more than one
  reference frame at a time: each needs a full window write.
* Supply-voltage scaling at the 13.5 MHz operating points.
* The fractional-pel stage that reads the results.

## Simulating

Each testbench in `tb/` checks its results against its own model and ends by
printing `TB_RESULT checks=N failures=M`. To build and run one with Verilator
5:

    verilator --binary --timing --assert -Irtl -Itb rtl/ime_pkg.sv \
        tb/ime_top_tb.sv --top-module ime_top_tb -Mdir obj -o sim
    obj/sim

* `ime_top_tb` drives the whole engine at its default parameters through 49
  searches.
  * Windows: smooth generated windows and random noise.
  * Centres: 1–4 per search, some outside the range.
  * It checks all 41 results of both slots against a reference model. The
    model runs the square search and computes the SADs pixel by pixel.
  * It also checks the step count, the cycle formula and the 38-read example.
  * One sequence slides the window along a strip, seven macroblocks long,
    rewriting only the entering column group each time.
  * It counts every mechanism and fails if one never happens: array fills,
    each direction, bubbles, 8-move strings, the three stop reasons, clamping,
    multi-centre searches, both result slots and window slides.
  * It also checks that the gated clock ticks in exactly the cycles with
    `start` or `busy` high, and that sleeping cycles occur.
* Each block has its own testbench, named `<module>_tb`.
  * `clock_gate_tb` changes the enable during high and low clock phases and
    checks the gated clock every nanosecond.
  * `square_search_fsm_tb` checks the controller against a cost surface.
  * `move_dir_rom_tb` checks every ROM string geometrically.
  * `sw_sram_tb` and `sw_addr_gen_tb` check random row and column reads.
* `ime_cif_row_tb` runs one row of a generated CIF frame through the engine
  in each of the three operating modes.
  * Motion: three regions of the row move differently.
  * Frame edges: outside the frame, each pixel repeats the nearest edge pixel.
  * Centres: the left neighbour's motion vector, zero, and the vector from two
    macroblocks back.
  * It checks all 41 results of every search against the model.
  * It checks the worst cycles per macroblock against the real-time budget.
  * It reports how often the true motion was found: 11 of 22 macroblocks with
    one centre, 15 of 22 with three.

## Files

`rtl/ime_pkg.sv` holds the shared types: `mv_t`, `dir_t`, `ep_t` and the
candidate order. There is one module per file in `rtl/`, and one testbench
per module in `tb/`. `tb/ime_cif_row_tb.sv` is the extra testbench that runs
the CIF macroblock row.
