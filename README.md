# Cylindrical full-search block-matching motion estimator

Full-search block matching finds, for each N x N block of the current
frame, the displacement inside a search range of the previous frame that
minimises the sum of absolute differences (SAD). This design evaluates one
candidate displacement per processing cycle and core. It keeps the
reference block fixed in an N x N array of processing elements (PEs) and
slides the search window past it.

The key idea is the shape of the array. In the classic "AB2" array, a
search window column is shifted down through the PE array, then up, then
down again (a zig-zag). That needs a block of idle shift registers above
the PEs and another below them. This design bends the array into a
cylinder. Every column of the search window is a closed ring of
L = 2p + N - 1 registers. The N registers that face the reference block are
the active PEs. The remaining 2p - 1 registers are passive and only store
pixels. Rotating the ring by one position presents the next candidate row.
Because the ring is closed, one passive block does the work of two. Every
register holds a useful pixel at all times.

The same ring can carry several active blocks (cores), spaced Q = floor(2p/C)
positions apart. Each core then scans 1/C of the candidate rows, and C SADs
come out per cycle.

The default configuration is N = 16, search range -15..+16 (p = 16), and
one core. That is a 16 x 47 ring array evaluating 32 x 32 = 1024
candidates per macroblock in 1024 processing cycles. A transparent
pre-fetch layer loads the start of the next search window while the current
one is processed, so not a single cycle is lost between macroblocks.

## Sizes

| symbol | meaning | default |
|---|---|---|
| `N` | block size (N x N reference block) | 16 |
| `P` | search range parameter; displacements -(P-1) .. +P | 16 |
| `C` | number of cores (active blocks) on the ring | 1 |
| `Q` = floor(2P/C) | candidate rows per core, ring spacing of the cores | 32 |
| `PHAT` = C*Q | candidates per row and per column actually searched | 32 |
| `L` = PHAT + N - 1 | ring length = search window side | 47 |
| `ALPHA` | read clocks per processing cycle, default ceil(C + (N+2)/Q) | 2 |
| `PREFETCH` | 1: build the pre-fetch layer; 0: fill the array through the normal column loads | 1 |

When C does not divide 2P, the searched range shrinks to -(P-1) .. PHAT-P.
The design requires Q >= N, so the cores never overlap on the ring.

## The ring and its zig-zag schedule

`pe_array` holds `s[r][j]`: ring position r (0 .. L-1) of array column j
(0 .. N-1). Core c owns ring positions c*Q .. c*Q+N-1. Those are active PEs,
each with one reference pixel. Every other position is a passive PE: Q-N
of them between neighbouring cores, and Q-1 after the last core. The last
N-1 of those connect the ring back to position 0.

Every processing cycle applies one operation to every search register:

- `SH_LEFT`: all columns move one step left, and column N-1 takes a fresh
  search column of L pixels from the input buffer.
- `SH_FWD`: every ring rotates so that position r takes the pixel of r+1.
- `SH_BWD`: every ring rotates the other way (r takes r-1).

A search window is processed as L column steps of Q cycles each: one
`SH_LEFT`, then Q-1 rotations. Say a column is loaded with the ring at
offset 0, so ring position k holds window row k. Then Q-1 forward rotations
take core c through window rows c*Q .. c*Q+Q-1. The ring ends at offset Q-1.
The next column is therefore loaded already rotated by Q-1, and its Q-1
rotations run backward, returning to offset 0. The direction alternates
from column to column. It carries on across macroblocks, so no cycle is
ever spent bringing the ring back to a home position.

Candidate (dx, dy) is compared while the array holds window columns
dx .. dx+N-1 and rows dy .. dy+N-1. Each of the PHAT column loads from
window column N-1 onwards yields Q candidates per core. The array first
needs window columns 0 .. N-2, and there are two ways to get them:

- With the pre-fetch layer (`PREFETCH = 1`, the default), they are already
  waiting next to the array (see below). A macroblock takes PHAT*Q
  processing cycles: (2p)^2 = 1024 for one core, and (2p)^2/C in general.
- Without it (`PREFETCH = 0`), they enter through N-1 ordinary column loads
  that only fill the array. A macroblock then takes L*Q cycles: 1504 at the
  defaults, of which 480 are the fill.

Each active PE computes |ref - search| and adds it to the partial sum
arriving from its right-hand neighbour. Column 0 of each active row
therefore delivers that row's sum combinationally. `adder_tree` adds the N
row sums of each core in ceil(log2 N) registered levels. A tag describing
the candidate (column dx, ring offset, first/last of the macroblock)
travels through the tree's registers alongside the sums.

## Loading a column into a rotated ring

A column must arrive already aligned to the ring's current rotation. When
the ring sits at offset 0, ring position k needs window row k. When it sits
at offset Q-1, position k needs row (k + Q-1) mod L.

`sa_input_buffer` is a serial-in, parallel-out register of L pixels, split
into two shift registers:

- A, holding positions 0 .. L-Q;
- B, holding positions L-Q+1 .. L-1, which is Q-1 registers.

Rows always arrive in order 0, 1, ..., L-1. Two multiplexers, set by the
alignment bit `dir`, choose how A and B are chained:

- `dir = 0`: input -> B -> A. This is one straight chain, and position k
  ends with row k.
- `dir = 1`: input -> A -> B. A fills first and passes its oldest rows on
  into B. In the end B holds rows 0 .. Q-2 and A holds the rest. That is
  exactly the Q-1 rotation.

So the buffer needs no extra cycles and no wide multiplexer. The control
asks `sa_input_ctrl` for each column one column ahead, together with the
alignment that column will need.

## The pre-fetch layer

`prefetch_layer` holds N-1 search columns of L pixels beside the array.
Its own input controller and split input buffer fill it with window
columns 0 .. N-2 of the next macroblock while the current macroblock is
processed. It has a separate read port on the search memory (`pf_rd_*`).
That way the main buffer's timing, and with it ALPHA, stays as it is.

All N-1 columns are loaded with the alignment that the array will have at
the first load of the next macroblock. That alignment is known in advance
because the direction simply alternates over the PHAT loads of a
macroblock. At that load, `pf_xfer` is raised and a single `SH_LEFT`
cycle moves everything at once:

- array columns 0 .. N-2 take the layer's columns;
- column N-1 takes window column N-1 from the main buffer.

The first candidate of the new macroblock is compared in that same cycle.

Throughput at the defaults: 704 x 576 video has 1584 macroblocks per
frame. At a 36.5 MHz processing rate (a 73 MHz read clock), the design
manages 36.5e6 / (1584 * 1024) = 22.5 frames/s. Without the layer it
manages 15.3 frames/s.

## Reference block: running and standing registers

Every active PE holds two reference registers:

- The standing register is what the PE compares against.
- The running register belongs to a chain that shifts one column left each
  time `ref_input_ctrl` has brought in a new N-pixel column, through the
  SIPO register `ref_input_buffer`.

The next macroblock's reference block is loaded into the running chain
while the current one is processed. At the first column load of the next
macroblock, `ref_xfer` copies all of it into the standing registers in one
cycle. All cores share the same reference pixels.

## Control and clocking

`ccu` is the central controller. It runs the column and cycle counters, the
rotation direction, the fill/produce phases and the bank bit of the
external buffers. It also issues the column, reference and pre-fetch
layer fetches, and builds the candidate tag.

The input buffer takes one pixel per read clock. A column of L pixels, plus
a few cycles of handshake, must arrive within the Q processing cycles of the
previous column. Hence the clock ratio ALPHA = ceil(C + (N+2)/Q).

The design runs from one clock, `clk`, which is the read clock.
`clock_gen` turns it into a processing enable that is high one clock in
ALPHA.

If a column, the reference block or the pre-fetch layer is not ready at a
load cycle, the control holds the whole array for a processing cycle and
raises `wait_data`. With
the default ALPHA this happens only while the first column of a run is
fetched. With a smaller ALPHA it can happen before every column. The results
stay correct but come more slowly.

Timing at the defaults:

- Back-to-back macroblocks are PHAT*Q*ALPHA = 2048 clocks apart (L*Q*ALPHA
  = 3008 without the pre-fetch layer).
- The last vector of a run appears ceil(log2 N) + 2 processing cycles
  after `done`.

## Interface of `me_top`

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | read clock; asynchronous active-low reset |
| `start`, `num_mb[15:0]` | in | start a run of `num_mb` macroblocks (sampled while idle) |
| `busy`, `done` | out | run in progress; one-clock pulse when the last column of the run is processed |
| `wait_data` | out | array held for missing data in this processing cycle |
| `sa_rd_en`, `sa_rd_row`, `sa_rd_col`, `sa_rd_bank` | out | read of pixel (row, col) of the L x L search window in bank `sa_rd_bank` |
| `sa_rd_data[7:0]` | in | that pixel, one clock after `sa_rd_en` |
| `pf_rd_en`, `pf_rd_row`, `pf_rd_col`, `pf_rd_bank` | out | second read port on the search window, used by the pre-fetch layer (idle when `PREFETCH = 0`) |
| `pf_rd_data[7:0]` | in | that pixel, one clock after `pf_rd_en` |
| `ref_rd_en`, `ref_rd_row`, `ref_rd_col`, `ref_rd_bank` | out | read of pixel (row, col) of the N x N reference block |
| `ref_rd_data[7:0]` | in | that pixel, one clock after `ref_rd_en` |
| `mv_valid` | out | one-clock strobe per macroblock |
| `mv_x`, `mv_y` (signed 8 bit) | out | best displacement; window column/row of the best candidate minus (P-1) |
| `mv_sad` | out | SAD of that candidate (8 + 2*log2 N bits) |

Window pixel (row, col) is the previous-frame pixel at offset
(col - (P-1), row - (P-1)) from the reference block's top-left corner.

The bank bits alternate from one macroblock to the next. The first
macroblock after reset uses bank 0, and the alternation continues across
runs. A host can therefore write the next window and block into the
other bank of its buffers while the current one is read.

Ties between equal SADs go to the candidate met first: lower dx, then
scan order within the column, then lower core index.

## Modules

| file | role |
|---|---|
| `rtl/me_pkg.sv` | pixel type, shift operations, candidate tag, size functions |
| `rtl/me_top.sv` | top level |
| `rtl/pe_array.sv` | cylindrical array of active and passive PEs |
| `rtl/active_pe.sv` | search register, running/standing reference registers, absolute difference and accumulation |
| `rtl/passive_pe.sv` | search register only |
| `rtl/adder_tree.sv` | pipelined SAD tree, one per core, carries the tag |
| `rtl/comparator.sv` | minimum SAD and motion vector |
| `rtl/sa_input_buffer.sv` | split SIPO search buffer with alignment multiplexers |
| `rtl/sa_input_ctrl.sv` | reads one window column into that buffer |
| `rtl/ref_input_buffer.sv` | SIPO register for one reference column |
| `rtl/ref_input_ctrl.sv` | reads the reference block and feeds the running registers |
| `rtl/ccu.sv` | central control unit |
| `rtl/clock_gen.sv` | processing-clock enable |
| `rtl/prefetch_layer.sv` | transparent layer for the next window's first N-1 columns |

Each file opens with a description of its function, timing, and what
follows the published architecture versus what is a local choice.

## What follows the architecture and what does not

These parts follow the published new-AB2 class of processors:

- the ring array with active and passive PEs and the connection back to the
  first core;
- C cores spaced floor(2p/C) apart, with the resulting PHAT, L and
  passive-block sizes;
- the zig-zag of load, forward rotations, load, backward rotations;
- the split input buffer and its two direction multiplexers;
- running and standing reference registers;
- the transparent pre-fetch layer, filled during processing and moved into
  the array when the next macroblock starts;
- one adder tree per core, and the comparator;
- the clock ratio between the read and processing clocks.

These are this design's own choices:

- 8-bit pixels;
- the memory ports with one clock of latency and a bank bit;
- the start/num_mb run interface;
- a register after every adder-tree level;
- a clock enable instead of a second clock;
- the pre-fetch layer's organisation: N-1 plain column registers fed
  through a second input controller, buffer and memory port;
- holding the array when data is late;
- the tie rule and the signed vector encoding.

Not built:

- **Active blocks smaller than the reference block** (h or l < N). These
  process the block in several fractions, using several standing
  registers per PE. `active_pe` already has a parameter for the number
  of standing registers (`NFRAC`). However, the array and the control
  support only h = l = N, so configurations with half-size cores are not
  available.
- **Any software that chooses C, h and l** from a target frame rate and
  area. The parameters here are set by hand.

## Verification

Every module has a self-checking testbench, `tb/tb_<module>.sv`. Each one
compares against values computed independently in the testbench and
prints `TB_RESULT checks=<n> failures=<n>`. The main ones:

- `tb_pe_array`: runs the full zig-zag for C = 1 and C = 2, and checks every
  row sum of every candidate against the window.
- `tb_sa_input_buffer`: checks both alignments.
- `tb_ccu`: checks the schedule, fetches, tags and holds cycle by cycle,
  with and without the pre-fetch layer.
- `tb_prefetch_layer`: checks the fill order, alignment and bank of the
  layer's fetches, its contents, and the `full`/`xfer` handshake.
- `tb_me_top`: five small processors (N = 4, p = 4) side by side:
  - one core, and two cores, without the pre-fetch layer;
  - one core with ALPHA = 1, which forces holds;
  - one core, and two cores, with the pre-fetch layer.

  Each runs 3 macroblocks back to back, stops, and runs 2 more. Every
  vector is checked against a brute-force full search. So are the SAD at
  the reported vector and the macroblock spacing. The test also counts that
  each of these happened: straight and rotated loads, forward and backward
  rotations, reference preloads, back-to-back macroblocks, holds, and the
  filling and transfer of the pre-fetch layer.
- `tb_me_top_full`: the default configuration (N = 16, p = 16, C = 1, with
  the pre-fetch layer) with no parameter overrides. It runs 3 macroblocks
  and checks the 2048-clock spacing.
- `tb_me_top_proc_b`: two 16 x 16 cores at p = 16 with the pre-fetch layer
  (512 cycles per macroblock, ALPHA = 4), running 3 macroblocks.

The memory models in `tb/me_top_check.svh` generate pixels from a hash, so
no data files are needed. Most reference blocks are copies of a window
region at a random offset, so the expected vector is known exactly. Every
third block is noise.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/me_pkg.sv tb/tb_me_top.sv --top-module tb_me_top -Mdir obj_me_top
./obj_me_top/Vtb_me_top
```

Replace `tb_me_top` with any other testbench name. The small end-to-end
test builds and runs in a few seconds. Each full-size test takes about
half a minute, most of it compile time.

To change the configuration, override `N`, `P`, `C` and, optionally,
`ALPHA` on `me_top`. `me_pkg::min_alpha(N, P, C)` gives the smallest ratio
that never holds. The array checks Q >= N at elaboration.
