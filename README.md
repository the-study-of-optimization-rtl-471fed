# Hierarchical motion estimation in a programmable MPEG-4 co-processor

Motion estimation dominates the cost of a video encoder. For each 16x16
macroblock of the current picture it must find the displacement, within
±16 pixels, at which the previous picture matches best by sum of absolute
differences (SAD). An exhaustive search evaluates 1089 positions of 256
pixels each. This design makes that search cheap enough for a small, slow
co-processor (CIF at 30 frames/s from a ~21 MHz clock). It does so by
searching a **pyramid** of averaged pictures instead of the full picture:

* Both pictures are shrunk twice by 2x2 averaging. The macroblock becomes
  8x8 at level 1 and 4x4 at level 0.
* At level 0 the 4x4 block is searched exhaustively over ±4. This costs
  81 positions of 16 pixels. The **two** best positions are kept, not
  one, because the coarse level is often wrong about which of two similar
  matches is better.
* At level 1 each candidate is doubled and refined by a ±2 search of the
  8x8 block (2 x 25 positions). The best one is kept.
* At level 2 (full resolution) that vector is doubled and refined again by
  a ±2 search of the 16x16 block (25 positions). The same pass also
  yields the best vector of each 8x8 quadrant for the four-vector (4MV)
  prediction mode.

Every one of these searches is a "±2 search of some 4x4 blocks". So a
single small unit that does exactly that, the **difference accumulation
unit (DAU)**, serves all three levels. Larger blocks are handled by
summing the SADs of their 4x4 pieces position by position.

Around the motion engine sits the control half of a register-programmed
encoder co-processor. The host writes picture size, frame rates, clock
frequency and three memory addresses. The controller checks that the job
is possible, then codes each frame macroblock by macroblock in a
three-stage pipeline: motion unit → texture coder → bitstream generator.
It swaps the roles of the two frame memories from frame to frame and
sleeps with its clock gated between frames.

The motion side is complete and tested. The texture coder (DCT,
quantisation, AC/DC prediction) and the bitstream generator (variable
length coding) are **not** part of this RTL. The top level brings their
start/done handshakes out as ports. The search ends with a half-pel
refinement; motion compensation is not built (see "Departures").

## The difference accumulation unit (`hmea_dau`, `hmea_pe`)

A DAU computes all 25 SADs of one 4x4 current block against a 8x8
reference area, i.e. displacements (dy, dx) in -2..+2. It has 25 processing
elements arranged as 5 stages of 5. Stage k handles vertical offset
dy = k-2, and PE j in it handles dx = j-2.

One pass takes 13 cycles:

1. **4 cycles** write the four rows of the current block (`cur_we`,
   `cur_idx`, `cur_row`).
2. **8 cycles** present the 8 reference rows, one per cycle, as two 4-pixel
   halves `pl` / `pr`. The whole row goes to every stage at once. Stage k
   pairs reference row r with current row r-k, which is only meaningful for
   r = k..k+3. Each PE j takes reference pixels j..j+3 of the row, forms
   four absolute differences and adds them to its accumulator. A stage
   clears its accumulator on its first row (r = k). So after row 7 every
   PE holds the SAD of four rows of four pixels.
3. **1 cycle** later `sad_valid` pulses. `sad[k*5+j]` is the SAD for
   (dy, dx) = (k-2, j-2), and it holds until the next pass.

Reference rows are broadcast and current rows are selected per stage. So
each reference pixel is read once per pass, and the 25 SADs come out
together instead of being shifted out.

## The motion engine (`hmea_me`)

### Loading and the averaged levels

The engine is loaded through a single beat port of four pixels:

- `ld_win = 0`: 64 beats, the 16x16 current macroblock.
- `ld_win = 1`: 576 beats, a 48x48 reference window whose pixel (16,16) is
  the macroblock's own position. That covers every displacement in
  -16..+16.

The beats also stream through two downsamplers (`hmea_downsample`, built
from two `hmea_avg_stage`s). Each averaging stage keeps one line buffer of
horizontal pair sums. An even row writes its pair sums. The following odd
row adds its own pair sums and emits `(sum) >> 2`, the truncated 2x2 mean.
Level 1 appears one cycle after its input beat, and level 0 one cycle
later again. So by the time the last beat is in, the 24x24/12x12 windows
and the 8x8/4x4 current blocks are complete. For a 352-pixel row the
downsampler needs exactly 88 beats. It never stores a full picture, only
one row of pair sums per level.

### Search schedule

Two DAUs work side by side on different 4x4 sub-blocks. A
`hmea_sad_accum` with four banks of 25 words (one bank per 8x8 quadrant)
adds the two DAUs' SAD vectors position by position. The 25 totals are
then scanned, one per cycle, into comparators (`hmea_comparator`). The
level-0 comparator keeps the best and second-best vector.

| level | work | cycles |
|------|------|--------|
| 0 | ±4 search of the 4x4 block, as four ±2 tiles centred on (±2, ±2): 2 passes x (13 + 50 scanned) | 126 |
| 1 | per candidate: 4 sub-blocks = 2 passes, then 25 scanned | 2 x 51 = 102 |
| 2 | 16 sub-blocks = 8 passes, then 25 scanned (macroblock and four 8x8 quadrants in parallel) | 129 |
|   | start and settling | 4 |
| half | 8 half-pel neighbours x 8 cycles (two rows per cycle) | 64 |
| **total** | `done` after `start` | **425** |

The four level-0 tiles overlap, so some positions are offered twice. The
comparator's second-best slot ignores a vector equal to the best, so the
two candidates are always different vectors. Ties keep the earlier
candidate. A refinement centre is clamped so that its ±2 tile stays in the
window: ±6 at level 1 and ±14 at level 2. The final vector therefore
always lies in -16..+16.

### Half-pel refinement

After level 2 the engine tries the eight half-pel positions around the
integer vector. Each interpolated pixel is the rounded mean of the two or
four window pixels around it, `(a+b+c+d+2)>>2`. A small datapath of 32
interpolators and absolute differences handles two 16-pixel rows per
cycle, so one neighbour takes 8 cycles. A neighbour replaces the
current best only when its SAD is strictly smaller. The half-pel vector
(`mv_half`, in half-pel units) is limited to -32..+31, i.e.
-16.0..+15.5 pixels. Neighbours outside that are skipped.

The engine's full cost per macroblock, in this design, is 640 load beats
plus memory latency plus 425 search cycles. The measured figure in the
full-size test is about 1145 cycles per macroblock. That fits the
1200-cycle time slot that the co-processor's load check assumes.

## The co-processor (`rpimc_*`)

### Registers (`rpimc_regbank`, `rpimc_pkg`)

| addr | name | meaning |
|------|------|---------|
| 0 / 1 | W / H | picture width and height in pixels (multiples of 16; width a multiple of 4) |
| 2 | ISIZE | bytes of one input picture (the size of each memory region) |
| 3 | IFPS | input frame rate |
| 4 | BITRATE | output bit rate (stored for the bitstream side) |
| 5 | CLOCK | operating frequency in Hz |
| 6 / 7 | MEM1 / MEM2 | base addresses of the two frame memories |
| 8 | OFPS | output (coded) frame rate |
| 9 | OUT | base address of the output bitstream |
| A | CTRL | bit 0: enable |
| B | STATUS (ro) | [1:0] Idle / Enable / Sleep / Finish, [2] configuration refused |
| C | OSIZE (ro) | bytes of bitstream of the last frame |
| D | MODE (ro) | 1 = inter frame |

### Configuration check and frame loop (`rpimc_controller`)

Setting enable triggers two checks:

- **Overlap.** No base address (MEM1, MEM2, OUT) may fall inside another
  region `[base, base + ISIZE)`.
- **Load.** `C_BLOCK x (W/16) x (H/16) x IFPS` must not exceed CLOCK, with
  `C_BLOCK = 1200` cycles per macroblock.

If either check fails, the controller stays idle with STATUS[2] set.
Otherwise it sleeps. `clk_en` is low so an external clock gate can stop
the datapath. It wakes on each `frame_ready` pulse.

Input frames are thinned from IFPS to OFPS by a phase accumulator. A
skipped frame goes straight back to sleep. Every `GOP_LEN`-th coded frame
(default 30) is intra, and the rest are inter.

### Time-slot pipeline

A frame of N macroblocks is processed in time slots. In slot k the motion
unit works on macroblock k, the texture coder on k-1 and the bitstream
generator on k-2. Inter frames therefore take N+2 slots. Intra frames skip
the motion unit and take N+1. Each slot starts every stage that has work,
with a one-cycle `*_start` and the macroblock position. The slot ends when
every started stage has answered `*_done`, so the slot length follows the
slowest stage.

At the end of a frame:

- STATUS shows Finish for a cycle.
- `irq` pulses.
- OSIZE holds the sum of the byte counts the bitstream generator
  reported.

### Memory roles

The current and reference frames alternate between MEM1 and MEM2:

| frame | MEM1 | MEM2 |
|-------|------|------|
| intra | current | reference (reconstruction) |
| 1st inter | current | reference |
| 2nd inter | reference | current |
| 3rd inter | current | reference |
| … alternating until the next intra frame | | |

`cur_base`/`ref_base` give the current assignment.

### Fetch (`rpimc_mb_fetch`)

The motion unit's DMA reads the current macroblock and its 48x48 window
from the frame memory. It uses a simple request/grant read port with
in-order responses of 32-bit words (four pixels, leftmost in bits 7:0),
and keeps up to 8 reads in flight. Window rows above or below the picture
repeat the first or last row. Words left or right of it repeat the edge
pixel. So macroblocks on the border get a full window, and the search
still works there.

### Top (`rpimc_top`)

The top contains the register bank, the controller, the fetch unit and the
engine. It connects `mu_start → fetch → engine → mu_done` and brings out:

- the register port, `frame_ready`, `irq`, `clk_en`;
- the memory read port;
- the texture and bitstream handshakes;
- the macroblock, half-pel and 8x8 vectors with `mv_valid`.

A generic yosys synthesis of the top gives about 8.3k cells and 3.3k
flip-flop bits, plus 27.6k bits of arrays. Most of that is the on-chip
copies of the search window; the motion engine alone is about 7.9k
cells.

## Departures from the original description and their consequences

- **Window storage.** The engine keeps the whole ±16 window (and its
  averaged copies) on chip, about 3.4 KB in registers, and reloads it for
  every macroblock. The original keeps only the areas one level needs
  (about 1.4 KB of single-port SRAM) and reuses the overlap between
  horizontally adjacent macroblocks. Results are the same. Area and
  memory traffic are higher here.
- **Cycle schedule.** The 425-cycle search schedule above is this design's
  own. The original quotes 56 / 162 / 201 cycles for the three levels plus
  76 for downsampling, with loading overlapped, and 404 cycles for the
  half-pel search.
- **Half-pel datapath.** The original runs the half-pel search on the
  existing units with no extra logic. Here it has its own interpolators,
  which is faster (64 cycles) but larger.
- **Averaging filter.** A 2x2 mean truncated to 8 bits, i.e. three
  additions and a shift per output pixel.
- **Search range.** The integer search covers -16..+16; the half-pel
  result is kept in the original's -16.0..+15.5.
- **Not built.**
  - Motion compensation.
  - The texture coding engine and the bitstream generator.
  - The bus wrapper, DMA controller and processor platform of the
    original prototype.
  - A per-macroblock intra/inter decision inside inter frames: every
    macroblock of an inter frame goes through the motion unit.
- **Choices where the original is silent.**
  - Register addresses and widths, and the CTRL enable bit.
  - The half-open overlap intervals.
  - The frame-rate thinning rule.
  - The intra period (`GOP_LEN`).
  - The edge rule of the fetch unit.
  - All handshakes.

## Files

| file | contents |
|------|----------|
| `rtl/hmea_pkg.sv` | pixel, SAD and vector types; pyramid constants |
| `rtl/hmea_pe.sv`, `rtl/hmea_dau.sv` | processing element and the 25-PE DAU |
| `rtl/hmea_avg_stage.sv`, `rtl/hmea_downsample.sv` | 2x2 averaging stage and two-level downsampler |
| `rtl/hmea_comparator.sv` | best / second-best SAD tracker |
| `rtl/hmea_sad_accum.sv` | four-bank SAD accumulator |
| `rtl/hmea_me.sv` | three-level motion engine |
| `rtl/rpimc_pkg.sv` | register map, states, configuration struct |
| `rtl/rpimc_regbank.sv`, `rtl/rpimc_controller.sv`, `rtl/rpimc_mb_fetch.sv` | registers, controller, DMA |
| `rtl/rpimc_top.sv` | co-processor top |
| `tb/hmea_model_pkg.sv` | behavioural reference of the whole pyramid search (same candidate order and tie rules) |
| `tb/tb_*.sv` | one self-checking testbench per module (see below) |
| `tb/tb_rpimc_top_body.svh` | shared body of the two top-level testbenches |

## Simulation

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and has a watchdog. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb --top-module tb_rpimc_top_cif \
  rtl/hmea_pkg.sv rtl/rpimc_pkg.sv tb/hmea_model_pkg.sv tb/tb_rpimc_top_cif.sv rtl/*.sv \
  -Mdir obj_cif -o sim && obj_cif/sim
```

Replace `tb_rpimc_top_cif` by any other testbench name.

| testbench | what it checks |
|-----------|----------------|
| `tb_hmea_dau` | 25 SADs of random blocks against direct computation; 13-cycle pass timing |
| `tb_hmea_downsample` | every level-1/level-0 pixel of random CIF-width images; 88 beats per row, output latency |
| `tb_hmea_comparator` | best/second-best tracking, ties, repeated vectors |
| `tb_hmea_sad_accum` | bank sums and totals against a model |
| `tb_hmea_me` | vectors, SADs, both level-0 candidates, level-1 vector, 4MV vectors and half-pel vector and SAD against the reference model; planted motion recovered exactly; 425-cycle latency |
| `tb_rpimc_regbank` | read/write, read-only status |
| `tb_rpimc_controller` | overlap and load checks, frame thinning, intra period (shortened to 3), pipeline order, slot overlap, memory swap, sleep/clock gate, OSIZE, interrupt |
| `tb_rpimc_mb_fetch` | every fetched pixel including border replication, 640 beats, exact timing with an ideal memory, outstanding-read limit under random latency |
| `tb_rpimc_top` | 64x48 pictures over six coded frames: every vector (integer and half-pel) against the model, true motion on interior macroblocks, and a count of every mechanism (refusal, skipped frame, intra, inter, swap, memory stall, all four borders, sleep) |
| `tb_rpimc_top_cif` | the same at full CIF size (352x288, 396 macroblocks, three coded frames) with the top at its default parameters; also checks the time per frame against 1200 cycles per macroblock |

The full CIF test simulates in a few seconds. The pictures are synthetic:
a smooth textured pattern shifted by (3, -5) pixels per input frame. This
gives the search a known true motion. Note that a pyramid search is a fast
search, not an exhaustive one: on flat or strongly periodic content it can
pick a different vector than a full search. The testbenches therefore
compare with the reference model everywhere, and with the true motion only
where the content is well textured.
