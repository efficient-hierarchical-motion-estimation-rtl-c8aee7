# HMEA: a three-level hierarchical motion estimator in SystemVerilog

A block-matching motion estimator has to find, for each 16x16 macroblock (MB)
of the current frame, the displacement into the previous frame with the lowest
sum of absolute differences (SAD). A full search over [-16,+15] needs 1024 SADs
of 256 pixels each per MB. This design instead searches a three-level image
pyramid:

| level | resolution | block | search | keeps |
|---|---|---|---|---|
| 0 | 1/4 x 1/4 | 4x4 | full search over [-4,+4] (81 positions) | the two best MVs |
| 1 | 1/2 x 1/2 | 8x8 | +-2 around twice each level-0 candidate | the better of the two |
| 2 | full | 16x16 | +-2 around twice the level-1 MV | the integer MV |
| half-pel | full, interpolated | 16x16 | the 8 half-pel points around the integer MV | the final MV |

The pyramid is built with a 2x2 averaging filter (`(a+b+c+d)>>2`). The
averaging keeps more of the image's structure than plain subsampling, so two
candidates at the coarsest level are enough. Integer MVs reach +-22 pixels,
which covers the usual [-16,+15] range. With half-pel refinement they reach
+-22.5.

Every SAD at every level is made by the same small engine. This engine is a
5x5 array of processing elements that matches one 4x4 block at all 25 offsets
of a +-2 window. Two such arrays work side by side. Larger blocks are split
into 4x4 tiles, and their SADs are added per offset.

One MB takes **780 clock cycles** from `start_i` to `done_o`:
- 452 cycles for the integer MV;
- 328 cycles for the half-pel step.

For CIF video (352x288, 396 MBs) at 30 frames/s, that is about 9.3 MHz. The
pyramid construction needs another 0.76 MHz (one cycle per four input pixels).

## Files

| file | contents |
|---|---|
| `rtl/hmea_pkg.sv` | widths, pixel/SAD/MV types, the current-block stream struct, the candidate struct |
| `rtl/hmea_top.sv` | top level: downsampler, controller, input network, two DAUs, accumulators, comparator, 8x8 mode, half-pel |
| `rtl/pe.sv` | processing element (absolute difference plus accumulator) |
| `rtl/dau.sv` | difference accumulation unit (DAU): 5x5 semisystolic array of PEs |
| `rtl/byte_delay.sv` | fixed delay line used in the input network |
| `rtl/sad_accum.sv` | 25-position SAD accumulator with circular read-out (levels 1 and 2) |
| `rtl/cand_cmp.sv` | comparator that keeps the least and second-least SAD |
| `rtl/adv_pred.sv` | per-8x8-subblock SADs and minima (8x8 prediction mode) |
| `rtl/hmea_ctrl.sv` | level sequencer and address generator |
| `rtl/downsampler.sv` | streaming 2x2 averaging filter, level 2 -> 1 -> 0 |
| `rtl/half_pel.sv` | half-pel refinement with its own interpolation |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## The difference accumulation unit (DAU)

This is the part that needs the most explanation. A DAU takes three byte
streams:
- **C**: the current 4x4 block, in raster order, one pixel per cycle.
- **Pl**: the left 4 columns of an 8-column reference window.
- **Pr**: the right 4 columns of the same window, starting 4 cycles after Pl.

The window is sent one row every 4 cycles. Pl carries columns 0..3 of a row
and Pr carries columns 4..7 of the same row, 4 cycles later. Either way,
window pixel (y, x) arrives at cycle `4y + x`.

PE(a, b) handles offset (a-2, b-2), for a, b in 0..4, and its index is
k = a + 5b. It must pair current pixel (r, c), which enters at cycle `4r + c`,
with window pixel (r+b, c+a), which arrives at cycle `4r + c + a + 5b`. So:

* C reaches PE(a, b) delayed by `a + 5b` cycles. Inside a row of five PEs it
  passes through one register per PE. Between rows it is delayed five cycles.
* Pl and Pr reach every PE of row b delayed by `b` cycles.
* PE(a, b) takes Pr when `c + a >= 4`, and Pl otherwise. The column c travels
  with the current pixel, so each multiplexer needs no controller of its own.
  PE(0, b) always uses Pl and PE(4, b) always uses Pr.

Each current pixel and each window pixel enters the array once. All 25 SADs of
a block come out without reloading anything. PE k finishes 16 + k cycles after
the block's first pixel, and drives `done_o[k]`, `sad_o[k]` and `tag_o[k]`
for one cycle.

Blocks can follow each other with no gap. Each pixel of the C stream carries
`first` and `last` flags. The `first` flag restarts a PE's sum and the `last`
flag ends it. Block j of a stream meets window rows 4j..4j+7. Two blocks
stacked vertically therefore share a 12-row window, and the 4-row overlap is
read once.

Each block also carries a 3-bit tag, {round, 4x4 row of the block}. The tag
tells the later stages which part of the MB or search a result belongs to.

## Input network and window parts

Each search window is read as three 4-column parts: left, middle and right.
The two DAUs are fed as follows:

| | C | Pl | Pr |
|---|---|---|---|
| DAU0 | current lane 0 | left | middle, delayed 4 |
| DAU1 | level 0: DAU0's C; otherwise current lane 1; delayed 4 | middle, delayed 4 | right, delayed 8 |

DAU1 runs four cycles behind DAU0, and its window starts four columns further
right. What this means depends on the level:

* **Level 0.** Both DAUs get the same 4x4 block, sent twice. The 12x12 window
  starts 4 pixels up and left of the block.
  - DAU0 covers horizontal offsets -4..0 and DAU1 covers 0..+4.
  - The first copy of the block meets window rows 0..7, giving vertical
    offsets -4..0. The second copy meets rows 4..11, giving 0..+4.
  - The 50 raw SADs of each copy go straight to the comparator. The MV of
    PE k of DAU d with tag t is `(k%5 + 4d - 4, k/5 + 4*t[0] - 4)`.
  - Offsets on the shared row and column are seen twice. The comparator does
    not let the same MV become both candidates.
* **Level 1.** DAU0 gets the left 4x4 column of the 8x8 block (upper tile,
  then lower). DAU1 gets the right column. Both are matched against the same
  offsets of a 12x12 window, so the four 4x4 SADs of each offset are added in
  the accumulator. There is one pass per level-0 candidate, centred on twice
  that candidate.
* **Level 2.** The 16x16 block is handled as four 4-column stripes, 4 tiles
  each, against a 20x20 window.
  - Round 1 sends stripes 0 and 1 with window parts 1-3.
  - Round 2 sends stripes 2 and 3 with window parts 3-5, by moving both
    addresses 8 columns right.
  - The accumulator adds all 16 tile SADs per offset.

## Selecting the MVs

* `sad_accum` holds 25 sums and clears them at the start of each level-1 pass
  and of level 2. In a cycle where PE k of either DAU finishes, its SAD is
  added to word k. The sums are then read out as a circular shift, one
  position per cycle for 25 cycles, into the comparator.
* `cand_cmp` keeps the least and the second-least SAD with their MVs. It
  takes 51 inputs per cycle: 50 direct DAU outputs at level 0, plus the
  accumulator's read-out.
  - A candidate replaces the best only if its SAD is strictly lower. Earlier
    inputs win ties, and within a cycle the lower input index wins.
  - An MV equal to the current best is never taken as second.
  - The comparator is cleared at the start of each level. Level 1 therefore
    keeps the best over both local searches.
* `adv_pred` (8x8 prediction mode) adds the level-2 tile SADs per 8x8
  quadrant of the MB. The quadrant is selected by the tag (round = left or
  right half, tile row bit 1 = top or bottom half). After the search it
  reports each quadrant's best offset: the lowest SAD, and the lowest index
  among equal SADs. The top converts these to MVs on `mv8_o`/`sad8_o`.
  Choosing between one MV and four is left to the encoder.

## Half-pel refinement

`half_pel` reads the 18x18 full-resolution reference region around the
integer match, in raster order, together with the current MB. Two 18-entry
line buffers and two column registers provide a 3x3 integer neighbourhood.
From it, all eight half-pel samples of each pixel are formed:
- horizontal neighbours: `(a+b)>>1`;
- vertical neighbours: `(a+b)>>1`;
- diagonal neighbours: `(a+b+c+d)>>2`.

Eight accumulators collect the SADs. At the end, the least of the eight and
the integer SAD wins. The integer position wins ties, then the lower position
index (row-major order). The result `hmv_o` is in half-pixel units. The step
takes 328 cycles: 324 reads, 2 pipeline cycles and the pick.

## Downsampler

The downsampler takes four level-2 pixels per cycle, in raster order. The
first word of a frame is marked with `ds_sof_i`. It produces level-1 and
level-0 images as four-pixel words with their coordinates.

* For even rows, it stores the two 9-bit horizontal pair sums of each word in
  a line buffer of W/4 entries.
* For odd rows, it adds its own pair sums to the stored ones and keeps bits
  9..2 (truncation). This gives two level-1 pixels per word. Every second
  such result is latched, so a four-pixel level-1 word leaves every other odd
  word, 3 cycles after it.
* The same structure, with a W/8-entry line buffer, turns level-1 words into
  level-0 words.

A CIF frame takes 25,344 cycles. Row and column counters are 10 bits wide,
which limits frames to 1023 lines.

## Frame-store interface and timing

The engine holds neither frames nor search windows. An external frame store
holds the level 0, 1 and 2 images of the current and previous frame. The
surrounding system writes the downsampler's output words into it.

While `rd_en_o` is high, the engine reads at level `rd_lvl_o`:
- two current-frame pixels at (`cur_x_o[i]`, `cur_y_o`);
- three previous-frame pixels at (`ref_x_o[i]`, `ref_y_o`).

The data must be on `cur_pix_i` and `ref_pix_i` one cycle later. The
coordinates are already clamped to the frame of that level, so pixels
outside the frame repeat the edge. During the half-pel step only lane 0 of
each frame is used, at level 2.

Protocol: pulse `start_i` with `mb_x_i`/`mb_y_i` (MB indices) while `busy_o`
is low. When `done_o` pulses, `hmv_o` and `hsad_o` are valid. These outputs
then stay valid until the next start:
- `mv_o`, `sad_o`: integer MV and SAD;
- `cand_o`: level-0 candidates;
- `mv1_o`: level-1 MV;
- `mv8_o`, `sad8_o`: 8x8 mode results.

Reset is asynchronous and active low (`rst_n`).

Cycle budget per MB:

| phase | cycles |
|---|---|
| level 0: 2 blocks x 16 + 16 window rows + 16 drain | 64 |
| level 1: 2 passes x (48 feed + 16 drain + 27 scan) | 182 |
| level 2: 2 rounds x 80 feed + 16 drain + 27 scan | 203 |
| level changes and hand-over | 3 |
| half-pel | 328 |
| **total** | **780** |

## Where this design departs from the published architecture

* **Memory.** The original keeps the downsampled images, the current MB and
  the search areas in about 1.4 KB of on-chip single-port SRAM, and reuses
  window data between neighbouring MBs. Its organisation is not described
  well enough to rebuild. This design reads an external frame store through
  five byte lanes instead. The downsampler's row memories for finished level-1
  and level-0 rows are likewise replaced by output streams.
* **Schedule.** The original overlaps the passes and quotes 56/162/201 cycles
  for levels 0/1/2, 76 cycles per MB of downsampling, and 404 for half-pel
  (899 per MB in all). This design runs the passes one after another with a
  fixed 16-cycle drain and a 27-cycle read-out (25 words, the scan start and the
  comparator register): 452 + 328 cycles. Its
  downsampler streams one word per cycle and needs less time per frame than
  the original (25,344 against 30,096 cycles for CIF).
* **Accumulator.** The original shows one adder in front of a 25-stage shift
  register. Here each of the 25 words has its own adder, because DAU results
  arrive per PE and the two DAUs finish in overlapping cycles. The read-out is
  still a circular shift.
* **DAU multiplexer control.** It comes from the column carried with each
  pixel, not from separate control waveforms. The last SAD of a single block
  is ready after 41 cycles; the original quotes 36.
* **Half-pel.** The original reuses the DAUs and the downsampling adders for
  the half-pel search. Here `half_pel` is a separate streaming block. Means
  are truncated.
* **Register count.** The original counts two comparators and 14 delay
  registers. Here the second comparator is the minimum search inside
  `adv_pred`. The delays are the three lines of the input network (4, 4 and
  8 stages) plus the registers inside the DAUs.
* **Matching timing.** The first SAD of a pass appears on the 17th cycle
  after the first pixel, as in the original. A level-2 round lasts 80 cycles
  here; the original starts its second round at cycle 89.
* **Edges, ties, reset, handshake.** These were not specified and are this
  design's choices, as described above.

## Verification

Each module has a self-checking testbench that compares it with an
independent model written in the testbench:

| testbench | what it checks |
|---|---|
| `tb_pe` | random pixel streams, back-to-back blocks |
| `tb_dau` | random 4-block streams; every SAD, tag and exact finishing cycle (16j + 16 + k) |
| `tb_byte_delay` | depths 4 and 8 |
| `tb_sad_accum` | random DAU results, two read-outs and a clear |
| `tb_cand_cmp` | random candidates, ties, duplicate MVs |
| `tb_adv_pred` | random tagged results; quadrant minima and 26-cycle latency |
| `tb_downsampler` | two 64x16 frames against a software pyramid; output latency |
| `tb_hmea_ctrl` | the full read schedule of three MBs, clamping, pulse counts, 452-cycle length |
| `tb_half_pel` | 16 MBs against a software half-pel search; 328-cycle length |
| `tb_hmea_top` | end to end at the default CIF size (see below) |

`tb_hmea_top` runs the full-size design with no parameter overrides:
1. It downsamples two synthetic CIF frames and checks every pyramid pixel.
2. It serves the resulting pyramid from a behavioural frame store.
3. It searches 71 MBs: corners and edges, a region moved by (-6,+9), a region
   moved by (+20,+20) beyond the level-0 range, and a sweep over the frame.
4. It checks every candidate, the level-1 and integer MVs, SADs, 8x8 results,
   the half-pel MV and SAD, and the 780-cycle latency, against a model of
   the algorithm written in the testbench.

It also counts each mechanism and fails if one never happens:
- clamped windows;
- rejected duplicate MVs;
- the second level-0 candidate winning level 1;
- a true motion being found;
- the 8x8 mode;
- half-pel moves;
- the last position read out of the accumulator, offset (+2,+2), winning.

For every module, a copy with one deliberate bug was confirmed to make its
testbench fail.

Not verified: real video sequences, gate-level timing, and frame sizes other
than CIF at the top level. The submodules were also run at 64x48.

## Simulating

With Verilator 5:

```
verilator --binary --timing --timescale 1ns/1ps -Irtl \
    rtl/hmea_pkg.sv $(ls rtl/*.sv | grep -v hmea_pkg) \
    tb/tb_hmea_top.sv --top-module tb_hmea_top
./obj_dir/Vtb_hmea_top
```

Each testbench ends with a line `TB_RESULT checks=<n> failures=<m>`. Replace
`tb_hmea_top` with any other `tb_<module>` to run one unit. Every testbench
has a cycle watchdog.

## Changing it

* **Frame size.** Change `W` and `H` on `hmea_top`. Both must be multiples of
  16, and `H` must be at most 1023 lines. The line buffers and address clamps
  follow the parameters.
* **Widths.** Change them in `hmea_pkg.sv`. `SAD_W` = 16 is exactly enough for
  a 16x16 SAD of 8-bit pixels.
* **Search range.** The structure is fixed at +-4 at level 0 and +-2 at
  levels 1 and 2. A wider level-0 search would need more rounds in
  `hmea_ctrl` and a matching MV formula in `hmea_top`.
