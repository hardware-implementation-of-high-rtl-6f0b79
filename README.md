# Variable block size motion estimation (H.264) — full search built from 4x4 SADs

H.264 lets an encoder split each 16x16 macroblock into smaller blocks, each with
its own motion vector: one 16x16 block, two 16x8, two 8x16, four 8x8, eight
8x4, eight 4x8 or sixteen 4x4. Counting every block of every shape gives 41
blocks, and a full-search encoder needs the best vector of each of them. Doing
41 separate searches would be wasteful. This design exploits the fact that
the sum of absolute differences (SAD) is additive: the SAD of any block is the
sum of the SADs of the 4x4 blocks that tile it. For every candidate
displacement the hardware computes only the sixteen 4x4 SADs. It then adds
them up into all 41 block SADs and keeps a running minimum per block. After
the last candidate it has all 41 motion vectors and, from them, the cheapest
partition of the macroblock.

The design follows a published FPGA architecture for this scheme. That
architecture has a four-pixel processing element (PE) and a "large"
processing element (LPE) of three PEs. It uses 32-bit pixel buffers and a
72x72 search range. The paper gives the PE in detail and the rest mostly as
function; what was filled in here is listed under
[Where this departs from the paper](#where-this-departs-from-the-paper).

## Data path at a glance

```
 data_input ─► cur_buffer ─┐ (row r of all sixteen 4x4 blocks)
                           ├─► 16 x lpe ─► sad_merge ─► min_select ─► mode_select
 ref_data_input ─► ref_buffer ┘ (row r of 3 candidates for each block)   │             │
                 ▲                                         41 SADs    41 min SADs   mode, cost
                 └── vbsme_ctrl (my, mx, r)                per clock  + vectors
```

| module        | role |
|---------------|------|
| `vbsme_pkg`   | pixel, SAD and vector types; the vector numbering; the partition modes |
| `subtractor`  | registered \|a−b\| of two 8-bit pixels |
| `adder`       | registered adder with carry (`IN_W`=8: 8+8→9 bit, `IN_W`=9: 9+9→10 bit) |
| `pe`          | SAD of one row of four pixel pairs: 4 subtractors, 3 adders in a tree |
| `lpe`         | three PEs, three accumulators; the three 4x4 SADs of one block, one per clock |
| `cur_buffer`  | the 16x16 current macroblock |
| `ref_buffer`  | the `SW_W` x `SW_H` reference search window |
| `vbsme_ctrl`  | walks the candidate positions |
| `sad_merge`   | 16 4x4 SADs → 41 block SADs |
| `min_select`  | running minimum SAD and vector for each of the 41 blocks |
| `mode_select` | best partition mode from the 41 minima |
| `vbsme_top`   | all of the above |

## The processing element

`pe` takes four current pixels and four reference pixels at a time. Each pair
goes through a `subtractor` that returns the absolute difference. Two 9-bit
`adder`s sum the differences in pairs, and a 10-bit `adder` adds the two
results. Every unit registers its output, so the PE accepts a row every clock
and returns that row's SAD (at most 1020) three clocks later. A 4x4 SAD is four
such rows added up, which the LPE does.

## The LPE: three candidates, one output, staggered by a clock

The hardest part of the design to follow is the LPE (`lpe`). Each of the
sixteen LPEs owns one 4x4 block of the macroblock. Its three PEs compare that
block with three reference candidates at once: the candidate at the current
offset (`y_in`), the one a pixel to the right (`y_2_in`) and the one two
pixels to the right (`y_3_in`). The current row `x_in` is shared by all three.

The three PEs are deliberately out of step. PE 1 sees the inputs as they
arrive. PE 2 sees them through one register stage (`x_in_1d`, `y_2_in_d`) and
PE 3 through two (`x_in_2d`, `y_3_in_d`). Each PE has an accumulator that
loads the PE result for row 0 and adds it for rows 1–3. `control`, the row
index, travels down a matching delay line. The accumulators therefore finish
on three consecutive clocks. A single 12-bit `sad_4x4` register takes them in
turn, with `sad_idx` saying which candidate it holds.

```
clock         t    t+1  t+2  t+3  t+4  t+5  t+6  t+7  t+8
input row     3    0'   1'   2'   3'                      (next group follows)
sad_4x4                                c0   c1   c2        (c0 = y_in candidate)
```

A candidate group takes four clocks (four rows) and produces three results, so
one output slot in four is idle. Rows of a group must come in order. Idle
clocks between rows are allowed: `valid` low pauses the accumulators. An
assertion checks that no two accumulators ever finish in the same clock.

All sixteen LPEs run in lock step. Each clock, each LPE therefore hands one 4x4
SAD to `sad_merge`: one complete set of sixteen, for one candidate, per clock.

## Buffers and the scan

Both buffers are written with 32-bit words of four pixels, in raster order,
with the leftmost pixel in bits [7:0]. Their write addresses count up by
themselves and wrap at the end, so the next macroblock or window is just
streamed in again. `cur_loaded` and `ref_loaded` pulse with the final word.
The arrays are not reset; only the write addresses are.

`vbsme_ctrl` scans the candidate offsets (`mx`, `my`) of the window, with
`my` from 0 to `SW_H`−16 in the outer loop. In the inner loop `mx` goes from
0 to `SW_W`−16 in steps of three (one step per LPE group). Each step takes
four clocks, one per block row `r`. Each clock:

* `cur_buffer` returns row `r` of all sixteen 4x4 blocks;
* `ref_buffer` returns, for block `k` at block column `bx` and block row `by`,
  window row `my+4·by+r`, pixels `mx+j+4·bx … +3`, for candidates `j` = 0, 1, 2.

The reference read picks four window rows and then an 18-pixel slice of each.
This is the widest multiplexer in the design, because the window is a
register array.

With the default 72x72 window there are 57x57 = 3249 candidate offsets. The
number of horizontal offsets must be a multiple of three (57 = 19·3); the
controller checks this when it is elaborated. A scan takes
57·19·4 = **4332 clocks**. `done` comes 11 clocks after the last read (buffer
read 1, LPE 7, merge 1, minimum 1, mode 1).

## From sixteen SADs to 41

Vectors are numbered 0–40 (the paper numbers them 1–41). 4x4 block `k` sits at
column `k%4`, row `k/4`.

| vectors | shape (paper's label) | blocks |
|---------|-----------------------|--------|
| 0–15    | 4x4                   | one 4x4 block each, raster order |
| 16–19 / 20–23 | "4X8": two 4x4 side by side | left / right half of 4x4-row `i` |
| 24–27 / 28–31 | "8X4": two 4x4 stacked | top / bottom half of 4x4-column `c` |
| 32–35   | 8x8                   | top-left, top-right, bottom-left, bottom-right |
| 36–37   | "8X16"                | left, right halves |
| 38–39   | "16X8"                | top, bottom halves |
| 40      | 16x16                 | whole macroblock |

The shape labels are the paper's. Its drawing shows the "4X8" blocks as wider
than tall, and this numbering follows the drawing. `sad_merge` builds the pair
sums first, then the 8x8 sums, then the halves and the whole block. It
registers all 41 results (16 bits each) in one stage.

`min_select` keeps, for each of the 41 blocks, the smallest SAD seen so far and
the vector it came from. The candidate position is not carried through the
pipeline: the candidates arrive in scan order, so `min_select` counts them.
Only a strictly smaller SAD replaces the stored one, so on a tie the first
candidate in scan order wins. Vectors are signed offsets from the window
centre: `mx − (SW_W−16)/2`, `my − (SW_H−16)/2`, or −28…+28 for the default
window.

`mode_select` costs each partition mode as the sum of its blocks' minimum
SADs, and picks the cheapest. On equal cost the mode with fewer, larger
blocks wins. With a pure SAD cost the sixteen independent 4x4 vectors can
never do worse than a coarser split. The selector therefore returns a coarser
mode only when it costs exactly the same. A real encoder would add a cost for
each extra vector. The paper selects on SAD alone, and so does this design.

## Using the top level

```
parameter SW_W = 72, SW_H = 72     // search window in pixels (SW_W multiple of 4,
                                   // SW_W-15 multiple of 3, both >= 18 / 16)
in : clk, reset_n (active-low, asynchronous)
     data_input[31:0], data_input_valid          64 words: the macroblock
     ref_data_input[31:0], ref_data_input_valid  SW_W*SW_H/4 words: the window
     start                                       pulse; ignored while busy
out: cur_loaded, ref_loaded, busy, done (pulse)
     min_sad[41] (16 bit), min_mv[41] ({x, y}, signed 8 bit each)
     mode (vbsme_pkg::mode_t), mode_cost[19:0]
```

Load both buffers (the two streams may run at the same time), pulse `start`,
and wait for `done`. The results hold until the next `start`. Do not write the
buffers while `busy` is high. At the defaults the synthesised top has about
8.2k flip-flops, plus 43.5 kbit of buffer storage.

## Simulating

Every testbench is self-checking. It prints `TB_RESULT checks=N failures=M`
and has a watchdog. For example, with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb +libext+.sv rtl/vbsme_pkg.sv tb/tb_vbsme_top.sv \
  --top-module tb_vbsme_top -o sim
./obj_dir/sim
```

| testbench | what it establishes |
|-----------|---------------------|
| `tb_subtractor`, `tb_adder`, `tb_pe` | arithmetic and latency against computed values |
| `tb_lpe` | 300 random blocks, with and without gaps; three SADs at t+5, t+6, t+7 |
| `tb_cur_buffer`, `tb_ref_buffer` | every returned pixel, address wrap, last-word flag (24x20 window) |
| `tb_vbsme_ctrl` | exact read sequence and scan length; start while busy ignored |
| `tb_sad_merge` | all 41 sums against a table of rectangles |
| `tb_min_select` | minima, vectors and tie rule against a reference; done timing |
| `tb_mode_select` | mode and cost, including ties for every mode |
| `tb_vbsme_top` | 24x20 window, three macroblocks (noisy match, exact copy, no match): all 41 SADs and vectors, mode, start-to-done clocks, against a full search done in the testbench |
| `tb_vbsme_full` | the same with every parameter at its default (72x72 window, 3249 candidates) |

The end-to-end testbenches also count the mechanisms they rely on. They
check that all three LPE candidate slots are used, that both buffers wrap,
that a start during a scan is ignored, and that more than one partition mode
is chosen. The full-size testbench builds in a few minutes, because the
72x72 read multiplexer produces a large model, but runs in under a second.

## Where this departs from the paper

* **Cycle count.** The paper reports all 41 vectors in 180 clocks. This design
  needs 4332 clocks of scanning for a 72x72 window, plus loading. 3249
  candidates times 256 pixel differences cannot be done by 46–48 four-pixel PEs
  in 180 clocks. The 180-clock figure is not reproduced.
* **PE count.** The paper reports 46 PEs. Here there are sixteen LPEs of three PEs
  (48), one LPE per 4x4 block. The paper does not say how 46 PEs are arranged.
* **Search range.** The paper's "72X72" is taken as the size of the reference
  window. It could also mean the displacement range.
* **Squared versus absolute difference.** One of the paper's quarter-block
  equations uses a squared difference, the others absolute differences. The
  absolute difference (SAD) is used throughout.
* **LPE details.** That the input delay registers stagger the three PEs, and
  that `control` is the row index, is a reading of a schematic with little
  text. `valid`, `sad_idx` and the selection order are additions.
* **Own choices** where the paper is silent: buffer word order and automatic
  write addresses; scan order; start/busy/done handshake; vector origin at the
  window centre; tie rules; the mode cost; asynchronous active-low reset
  (a `reset_n` pin appears on every unit of the paper's PE schematic).
* **Not reproduced:** the 486.62 MHz clock on a Stratix IV device. This RTL
  has not been timed, and the wide reference read multiplexer would be the
  first place to pipeline for speed.
* At the default window the design cannot keep up with 1080p at 30 frames/s.
  That needs about 245k macroblocks/s; it does about 86k even at the paper's
  clock.
