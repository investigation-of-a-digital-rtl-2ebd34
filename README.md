# Streaming Bayer median defect filter

Camera sensors have stuck pixels: some are always bright (hot), some always dark (cold).
This design finds them in a raw Bayer image and repairs them. It compares each pixel with its
8 nearest neighbours of the same colour. If the pixel is brighter than all of them or darker
than all of them, it is replaced by their median. Otherwise it is left alone.

The design does this on a stream. It reads the image from memory once, one pixel per clock
cycle, and writes each result back once, also at one pixel per cycle. A plain loop would read
25 pixels to produce each output of a 5x5 filter. Here all 25 pixels of the window are
available every cycle, from one read per cycle. Local registers and four 64-entry RAMs
re-use each pixel for every window that contains it. The only cost is a small, known
overhead in cycles, described under *Strips* below.

The method comes from work on mapping a digital-camera pipeline onto a coarse-grained
reconfigurable array. The RTL here is a fixed datapath that does the same computation. It is
not a configuration of such an array.

## The sliding window with one read per pixel

The window slides **down** a column of the image, then moves one column to the right and
slides down again (column-major order). Two observations make one read per pixel enough:

* **Inside a column**, each pixel sits in 5 consecutive windows: first in the bottom row,
  and last in the top row. A *column buffer* (`column_buffer`) is a chain of 5 registers.
  Pixels go in one per cycle and all 5 are read in parallel. It holds one column of the
  window.
* **Between columns**, a pixel that leaves the left end of column buffer *c* is needed again
  when the window has moved one column on. That is exactly one column height later. A RAM used
  as a shift register (`shift_ram`) holds it for that time. It then enters column buffer
  *c+1*.

`window_pipeline` chains N column buffers with N-1 shift RAMs:

```
din -> [cb0: 5 regs] -> shift_ram -> [cb1: 5 regs] -> shift_ram -> ... -> [cb4: 5 regs]
        east column                                                        west column
```

The delay from one column buffer to the next is `strip_rows` cycles: 5 registers plus a RAM
of `strip_rows - 5`. So `win[c][r]` holds the pixel that entered `r + c*strip_rows` cycles
before `win[0][0]`. In image terms, `win[0][0]` is the south-east corner of the window and
`win[2][2]` its centre. Every window position always lands in the same register, so the
filter logic simply reads fixed registers.

`shift_ram` reads and writes the same address each cycle, and its read data is registered.
The address wraps after `len-1` entries, and the output register supplies the last cycle of
delay. A 64-entry RAM thus gives delays of 2 to 65 cycles.

## Strips: why the image is cut, and what it costs

The shift RAM must be as long as the column being scanned. A full image column can be
thousands of pixels, so the image is cut into **horizontal strips** of `strip_rows` rows
(`strip_sequencer`). Each strip is scanned column-major as above. With 64-entry RAMs the
tallest strip is 64 + 5 = 69 rows.

A 5x5 window is incomplete in the top two and bottom two rows of a strip. Consecutive strips
therefore overlap by N-1 = 4 rows, so each interior row is fully covered in exactly one strip.
The write rule makes every image pixel be written exactly once:

| position | action |
|---|---|
| rows 2 .. strip_rows-3 of a strip, columns 2 .. cols-3 | filtered |
| top 2 rows of the first strip, bottom 2 rows of the last strip | copied unchanged (image border) |
| left 2 and right 2 columns of the image | copied unchanged (image border) |
| top 2 rows of later strips, bottom 2 rows of earlier strips | not written; another strip writes them |

The last strip may not line up with the image height. It is then moved up so that it ends on
the last image row, and rows that an earlier strip already wrote are not written again. So
any image height of at least `strip_rows` works.

After the last real column of a strip, the window still has to move two more columns, so
that the last two columns reach the centre. The sequencer adds `(N-1)/2 = 2` flush columns
per strip; nothing is read for them, and zeros enter the pipeline. The time for one image is
therefore

```
cycles = strips * strip_rows * (cols + 2)  +  2*strip_rows + 13
strips = 1 + ceil((rows - strip_rows) / (strip_rows - 4))
```

The second term fills and drains the pipeline once per image. It is not paid per strip:
strips follow each other without a gap. Cycles per pixel approach
`strip_rows/(strip_rows-4) * (1 + 2/cols)`. That is about 1.07 with strips of 64 rows, and
1.08 for a 2048 x 1536 image with strips of 69 rows (3.39 M cycles, 68 ms at 50 MHz). Small
strips cost more: strips of 8 rows on a 164 x 104 image take 1.99 cycles per pixel.

## Neighbours on the Bayer mosaic

In a Bayer mosaic, green covers a checkerboard, and red and blue each cover every other row
and column. `bayer_window_select` takes the 8 nearest same-colour pixels of the window centre
(offsets as row, column):

* **green centre**: the diamond (±1, ±1), (0, ±2), (±2, 0);
* **red or blue centre**: the square (±2, ±2), (0, ±2), (±2, 0).

Red and blue use the same pattern, so they are handled as one colour. The four samples at
(0, ±2) and (±2, 0) are used by both colours. The colour changes from one cycle to the next,
as the window moves down a column. `green_origin` says whether pixel (0, 0) is green. From it
the top level derives the colour of each centre: green where `row+col` is even if
`green_origin` is 1, and where it is odd otherwise.

## Max, min and median with a pruned insertion sort

The decision needs four order statistics of the 8 neighbours: the maximum, the minimum, and
the two middle values (ranks 4 and 5, rank 1 being the largest). With 8 values the median is
the mean of the middle pair.

`median_core` feeds the neighbours to a pipelined insertion sort, one neighbour per stage.
Stage *K* (`insertion_sort_stage`, K = 1..8) inserts neighbour K-1 into the list built so far.
Neighbour k is held k-1 cycles in skew registers, so that it reaches its stage together with
its list. Every stage works on a different centre pixel, so the sort finishes one centre per
cycle.

The list does not have to be kept whole. After K values, 8-K values are still to come. A
value now at rank *p* can end anywhere from rank *p* to rank *p + 8 - K*. It is worth keeping
only if that range includes rank 4 or 5. So stage K keeps only ranks `LO..HI`:

| stage K | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 |
|---|---|---|---|---|---|---|---|---|
| kept ranks | 1 | 1-2 | 1-3 | 1-4 | 1-5 | 2-5 | 3-5 | 4-5 |

The maximum and minimum have registers of their own. After stage 8 the list holds exactly
ranks 4 and 5. A rank is updated with two comparisons against the new value `v`:

```
new[r] = (v > old[r-1]) ? old[r-1]     // v goes above: rank r-1 moves down to r
       : (v > old[r])   ? v            // v lands exactly at r
       :                  old[r]       // v goes below
```

Ranks above the kept list count as +infinity, and ranks below it (or not yet filled) as
-infinity. Ties do not matter, because only values are reported, never positions.

`defect_replace` then decides:

```
hi  = center > max + thresh
lo  = center + thresh < min
out = (filter && (hi || lo)) ? (rank4 + rank5) >> 1 : center
```

`filter` is low for border positions, which are copied. The mean is truncated.

## Timing through the datapath

`median_filter_top` runs two copies of `strip_sequencer`:

* the **read sequencer** issues `rd_en/rd_row/rd_col`, and the pixel arrives on `rd_data`
  one cycle later;
* the **write sequencer** walks the same sequence `2*strip_rows + 4` cycles later. In that
  cycle the pixel it names sits at `win[2][2]`. It supplies the centre's colour and a tag
  (`median_pkg::tag_t`: row, column, write, filter, last).

The tag travels with the pixel through the 8 sort stages and the decision register
(`CORE_LAT` = 9 cycles). It comes out with the result, so `wr_en/wr_row/wr_col` come straight
from it. `done` pulses with the write of the last position. There are no stalls: the memory
must accept one read and one write every cycle while `busy` is high.

## Top-level interface (`median_filter_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `start` | in | 1 | start a run; ignored while `busy` |
| `img_rows`, `img_cols` | in | 12 | image size; `img_rows >= strip_rows`, `img_cols >= 1` |
| `strip_rows` | in | 7 | strip height, 7 .. `DEPTH+5` (69 at default) |
| `thresh` | in | 10 | detection margin; 0 = plain min/max rule |
| `green_origin` | in | 1 | pixel (0,0) is green |
| `busy`, `done` | out | 1 | run in progress; one-cycle pulse at the end |
| `rd_en`, `rd_row`, `rd_col` | out | 1, 12, 12 | read request |
| `rd_data` | in | 10 | read data, valid the cycle after `rd_en` |
| `wr_en`, `wr_row`, `wr_col`, `wr_data` | out | 1, 12, 12, 10 | write of one result pixel |
| `wr_hi`, `wr_lo` | out | 1 | this write replaced a hot / cold pixel |

The configuration inputs are sampled at `start` and may change during a run.

Parameter: `DEPTH` (64), the entries of each shift RAM; the tallest strip is `DEPTH+5`.
Fixed in `median_pkg`: 5x5 window, 8 neighbours, 10-bit samples, 12-bit coordinates.
At default size the design has four 64 x 10-bit RAMs and about 1,400 flip-flops.

## Files

| file | role |
|---|---|
| `rtl/median_pkg.sv` | shared constants, `pixel_t`, `coord_t`, `tag_t` |
| `rtl/median_filter_top.sv` | top: sequencers, memory ports, core |
| `rtl/strip_sequencer.sv` | strip walk and border/write policy |
| `rtl/median_core.sv` | window, neighbour choice, sort, decision |
| `rtl/window_pipeline.sv` | NxN input pipeline (any N) |
| `rtl/column_buffer.sv` | one window column |
| `rtl/shift_ram.sv` | RAM as a shift register |
| `rtl/bayer_window_select.sv` | diamond / square neighbour choice |
| `rtl/insertion_sort_stage.sv` | one pruned sort stage |
| `rtl/defect_replace.sv` | hot/cold test and replacement |
| `tb/tb_<module>.sv` | self-checking testbench of each module |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and finishes. Each has a watchdog. For
example, the end-to-end test:

```
verilator --binary --timing --assert -Wno-fatal rtl/median_pkg.sv rtl/*.sv \
    tb/tb_median_filter_top.sv --top-module tb_median_filter_top -Mdir obj -o sim
./obj/sim
```

`tb_median_filter_top` runs the top at its default parameters. The testbench holds the image
memory and compares every pixel with a software model of the filter. It checks that each
pixel is written exactly once, that the hot/cold flags are right, and that each run takes
exactly the cycle count given above. It covers these runs:

* 32 x 8 with strips of 8;
* 164 x 104 with strips of 8 and of 69;
* 50 x 21 with a moved last strip, starting with red/blue;
* 40 x 30 with a margin of 25.

It also counts each mechanism and fails if one never happens: hot and cold pixels on green and
on red/blue centres, multi-strip images, moved last strips, border copies, and pixels kept
only because of the margin. It takes well under a second.

`tb_median_frame` runs a 640 x 480 frame with strips of 69 rows through the same model.

The module testbenches check smaller claims. `tb_window_pipeline` checks the window register
mapping for N = 5 and N = 3, with random stalls. `tb_insertion_sort_stage` checks every kept
rank of every stage against a full sort. `tb_strip_sequencer` checks the walk and the
write-exactly-once coverage. The others check the remaining modules the same way.

## How far to trust it, and where it differs from the method as first described

Verified: all testbenches pass with Verilator 5. Every file lints with Verilator `-Wall` and
elaborates with the slang front end of Yosys. Each testbench was also run against a
deliberately broken copy of its module, and each detected the fault. Not verified: timing
closure, gate-level behaviour, and behaviour on inputs outside the stated ranges.

Differences from the original mapping, all deliberate:

* **Sharing of the sort.** The original datapath shares only those sort stages that fall in
  the same position for green and red/blue, which minimises bus wiring on the array. Here a
  multiplexer picks the colour's neighbours in front of one fully shared sort.
* **Neighbour timing.** The original takes each neighbour from the moving input pipe at the
  moment it reaches the right stage. Here all 8 are taken from the window at once and
  delayed by skew registers. The results are the same, with more registers.
* **Max/min** are tracked from the first stage, not merged in from the sixth. The results are
  the same.
* **Margin.** `thresh` is an addition. With `thresh = 0` the rule is the original strict
  comparison with the neighbours' max and min.
* **Last strip.** It is moved up instead of requiring the image height to fit the strip step.
* **Memory interface, handshake, reset and coordinate width** are this design's own choices.

Not part of this RTL are the stages around it in a camera pipeline: colour interpolation,
other image improvement, and compression. Neither are an on-chip tile memory or any
reconfigurable-array machinery. Vertical strips, an option for processing the image in tiles,
are not built either. Strips taller than `DEPTH+5` rows need a larger `DEPTH`.
