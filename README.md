# Focal-plane motion vector detector (16 × 16 pixels)

At 100 to 1000 frames per second, an object moves by less than a pixel or
so between two frames. This design uses that fact to find motion vectors with
very little hardware, working right next to the image sensor. Each pixel turns
its brightness into two binary edges, one horizontal and one vertical. It keeps
these edge bits for the current frame and the previous frame. A small set of
processors then compares every 2×2 block of current edges with the nine 2×2
positions around it in the previous frame, a search range of ±1 pixel. The
comparison is a Hamming distance over 8 bits: 4 horizontal and 4 vertical edge
bits. The processor puts out the best of the nine candidate vectors. There is
no CPU, no DSP and no A/D conversion of the image. The whole comparison is
XORs, a thermometer-coded counter, an AND tree and a fixed priority.

The RTL models the digital behaviour of a 16 × 16 mixed-signal vision chip
with 4 block matching processors. The photodiodes and their analog buffers are
not modelled: their sampled values enter the design as 8-bit numbers.

## One frame, step by step

All controls come from `mv_sequencer`. Each control lasts one clock.

| clocks | what happens |
|---|---|
| 1 | **swap**: every pixel copies its current edge bits into its previous-frame bits |
| 1 | **t1**: every pixel stores its horizontal edge, \|f(r,c) − f(r,c+1)\| ≥ thr |
| 1 | **t2**: every pixel stores its vertical edge, \|f(r,c) − f(r+1,c)\| ≥ thr |
| 1 + 13×12 per window | for each enabled window position: 13 row steps of 12 clocks |

With all three window positions enabled, a frame takes **474 clocks**. At
1000 frames/s that needs a clock of at least 474 kHz. `mv_valid` pulses once
per row step, 12 clocks apart, and carries 4 vectors, one per processor. A
full frame gives 3 × 13 × 4 = 156 vectors.

A row step for row r (the top row of the 4 × 4 search areas) is:

| t | control | meaning |
|---|---|---|
| 0 | D-set0 | clear all accumulators |
| 1–4 | DIF-XOR-ck1..4, even phase | sample the 4 horizontal-edge XORs of each candidate |
| 5 | vertical register shift | row r moves from its even to its odd phase |
| 6–9 | DIF-XOR-ck1..4, odd phase | sample the 4 vertical-edge XORs |
| 10 | ACC-ck | turn each 8-sample queue into a thermometer code |
| 11 | Syn-Yi-reg | latch the decided vector; shift to row r+1, even phase |

## Pixel: time-multiplexed edge detector and 4-bit memory

Each pixel has one edge detector (`tmed_edge_detector`). The detector compares
the pixel with its right neighbour in slot t1 and with the pixel below in slot
t2. On the chip this is an analog absolute-value differentiator with a
threshold voltage. Here it is an exact compare on 8-bit samples. Pixels in the
right column and the bottom row have no neighbour in that direction and report
no edge.

The 4-bit memory (`tg_memory_cell`, type `edge_mem_t`) holds:

| bit | content |
|---|---|
| 3 | horizontal edge, current frame |
| 2 | vertical edge, current frame |
| 1 | horizontal edge, previous frame |
| 0 | vertical edge, previous frame |

On the chip each bit is charge on a transistor gate between two
transmission-gate switches, and holds for about 1–10 ms. Here each bit is a
flip-flop. `edge_memory_array` holds N × N of these pixels.

## Getting the edges to the processors

The 32-stage vertical shift register (`shift_register`, `STAGES = 2N`) holds
one token. Stage 2r is the **even phase** of row r, and stage 2r+1 is its
**odd phase**. While row r is active, the read-out tree (`memory_tree`) drives
six row lines for every column:

- `pre_rows[0..3]` (Pre_1st..Pre_4th): previous-frame bits of rows r..r+3.
- `cur_rows[0..1]` (Cur_1st, Cur_2nd): current-frame bits of rows r+1, r+2.

In the even phase these lines carry horizontal edge bits. In the odd phase
they carry vertical edge bits. The 2 × 2 current block therefore sits in the
middle of a 4 × 4 previous-frame area. The phase seen by the accumulators is
taken from the register itself. An assertion in `mv_chip_top` checks that it
agrees with the sequencer.

## Four processors, three window positions

Thirteen processors would be needed to cover all 16 columns at once. The chip
has 4, and moves them over the array (`shifting_window`). In window position
j = 0, 1, 2, processor k reads the previous-frame columns 4j+k .. 4j+k+3. Its
current block is in columns 4j+k+1, 4j+k+2. So the windows cover columns
0–6, 4–10 and 8–14. Inside a window, vectors come at full speed. Over the
whole array, vectors come at a third of that speed.

The current 2 × 2 blocks that get a vector have their top-left corner at rows
1..13 and columns 1..12. The input `win_en[2:0]` selects which window
positions a frame scans, so the processors can be kept on one region of
interest.

## The block matching processor (`lpgcp_processor`)

This is the core of the design. It works on one 2 × 2 current block `cur` and
one 4 × 4 previous area `pre`. The bit order is `cur[2a+b]` and `pre[4a+b]`,
with row a and column b, and row 0 is "1st".

**Candidates.** Candidate Yk, with k = 3·dy + dx, compares the current block
with previous rows dy..dy+1 and columns dx..dx+1. Y4 is the centre, meaning no
motion. Y0 is the block shifted one row up and one column left in the previous
frame, and so on in raster order.

**Accumulator (`acc`).** There are nine accumulators, one per candidate. Each
one gets the four (c, p) pairs of its candidate. On each DIF-XOR-ck_i it stores
c_i XOR p_i in a queue of 8 samples: slots 0–3 in the even phase, slots 4–7 in
the odd phase. On ACC-ck it writes the number of ones as a **thermometer code
packed at the MSB**. For example, 3 mismatches give `1110_0000`. The range is
0..8, and an 8-bit register holds every value.

**Minimum (`min_search`).** The bitwise AND of thermometer codes is the code of
the smallest of them. Each candidate is then XNORed bit by bit with that
minimum. A candidate whose 8 result bits are all 1 holds the minimum. No adders
and no comparators are needed.

**Tie break (`priority_arbiter`).** Several candidates can share the minimum.
The winner is the one closest to the centre. Among candidates at the same
distance, the smaller *vector order index* wins:

```
 vector order index          candidate names
   5   1   6                 Y0  Y1  Y2
   2   0   3                 Y3  Y4  Y5
   7   4   8                 Y6  Y7  Y8
```

Index 0 is the centre (distance 0). Indices 1–4 are the edge neighbours
(distance 1). Indices 5–8 are the corners (distance √2). For example, the
distance matrix {5 6 2 / 3 2 6 / 4 4 2} has the minimum 2 at Y2, Y4 and Y8,
and Y4 (index 0) is put out.

**Output.** On Syn-Yi-reg the one-hot `y` lines (Y0..Y8) and `index` are
registered. An assertion checks that the latched result is exactly one vector.

## Image and edge read-out

`start_img` reads the array out in raster order. The vertical register's
even-phase outputs select the row. A 16-stage horizontal register selects the
column. For each pixel the design puts out its value (`img_pix`) and its two
current edge bits (`img_edge_h`, `img_edge_v`). Each pixel takes one clock,
plus two clocks per row to move the vertical register on. A read-out takes 288
clocks. Read-out and block matching are separate operations. A start that
arrives while the design is busy is ignored.

## Top-level interface (`mv_chip_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, active-low synchronous reset |
| `pix[r][c]` | in | N·N·PIX_W | pixel samples, row 0 at the top |
| `thr` | in | PIX_W | edge threshold |
| `win_en` | in | 3 | window positions to scan |
| `start_mv` / `start_img` | in | 1 | start a frame / a read-out |
| `busy` | out | 1 | operation in progress |
| `mv_valid` | out | 1 | one row step of vectors |
| `mv_row` | out | 4 | top row of the 4 × 4 search areas |
| `mv_col[p]` | out | 4 each | left column of processor p's search area |
| `mv_y[p]` | out | 9 each | one-hot Y0..Y8 |
| `mv_index[p]` | out | 4 each | vector order index, 0 = no motion |
| `img_valid`, `img_row`, `img_col`, `img_pix`, `img_edge_h`, `img_edge_v` | out | | read-out stream |

The matched current block of processor p lies at rows `mv_row+1..+2` and
columns `mv_col[p]+1..+2`.

Parameters: `N = 16` (array size), `PIX_W = 8` (pixel sample width),
`N_PROC = 4` and `N_WIN = 3`. The window rule assumes 4 processors and a step
of 4 columns. Other values of `N` work for the array, the read-out and the
sequencer.

## What follows the source design and what is this design's own

These parts follow the source design:

- the 16 × 16 array
- the edge rule with a threshold, and time-multiplexing of one detector per pixel
- the 4-bit memory layout and the swap of current into previous
- the 2 × 2 block and the ±1 search
- horizontal and vertical edges summed into one 8-sample distance
- the thermometer accumulator, the AND minimum, the XNOR match and the priority order
- the 32-stage odd/even vertical register and the 16-stage horizontal register
- 4 processors moved over 3 window positions by the rule above

These are this design's own choices:

- **Clocking.** The original is driven by an external generator with
  multi-phase clocks. Here everything runs on one clock, every control is a
  one-cycle enable, and the sequencer is on chip. The 12-clock row step and the
  474-clock frame follow from this.
- **Analog parts.** The photodiodes, the pixel buffers and the analog output
  path are not modelled. The edge detector compares digital samples exactly.
  The dynamic memory is made of flip-flops and never loses its data.
- **Pixel width.** The sample width is 8 bits.
- **Border pixels.** A border pixel with no neighbour gives edge 0. Search
  columns beyond the array read as 0, although the default window rule never
  reaches them.
- **Window control.** `win_en` is one enable bit per position.
- **Edge read-out.** Edge bits come out through the same selection as the
  image.
- **Conversion speed.** The accumulator converts its queue in one clock, not
  serially.

## Files

```
rtl/mv_pkg.sv              types (edge_mem_t, acc_ctrl_t), vector order tables, thermometer function
rtl/tmed_edge_detector.sv  per-pixel edge detector, t1 horizontal / t2 vertical
rtl/tg_memory_cell.sv      per-pixel 4-bit edge memory
rtl/edge_memory_array.sv   N x N pixels
rtl/shift_register.sv      token shift register with even/odd outputs
rtl/memory_tree.sv         row read-out to Pre_1st..4th / Cur_1st..2nd lines
rtl/shifting_window.sv     columns to the 4 processors
rtl/acc.sv                 8-sample thermometer accumulator
rtl/min_search.sv          AND minimum and XNOR match
rtl/priority_arbiter.sv    distance-from-centre tie break
rtl/lpgcp_processor.sv     9 accumulators + minimum + arbiter + output register
rtl/mv_sequencer.sv        frame / row-step / read-out control
rtl/image_readout.sv       image and edge read-out multiplexer
rtl/mv_chip_top.sv         top level
```

## Simulation

Every testbench in `tb/` checks itself and ends with a line of the form
`TB_RESULT checks=N failures=M`. Build and run one with plain Verilator:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/mv_pkg.sv \
          tb/tb_mv_chip_top.sv --top-module tb_mv_chip_top -Mdir obj_top
./obj_top/Vtb_mv_chip_top
```

Each module has its own testbench, `tb/tb_<module>.sv`. The test of note is
`tb_mv_chip_top`. It runs at the default size, 16 × 16 with 4 processors and
3 windows, and works as follows:

- A random texture moves by up to one pixel per frame. Sometimes it is replaced
  by a new texture.
- A model in the testbench computes the edges and distances directly and
  chooses a vector for each block.
- The testbench checks every vector against that model, about 1800 per run.
- It also checks the frame time, partial window scans and image/edge
  read-outs.

It counts arbitrated ties, off-centre vectors, each window position and each
operation mode. A mechanism that never occurs counts as a failure.

`tb_lpgcp_stream_test` repeats the processor test the original chip was
measured with. The current block is held at a fixed value. Each previous-frame
line carries an 8-bit stream: odd bit positions are horizontal edges and even
positions are vertical edges, so {10010010} means horizontal {1001} and
vertical {0100}.

All testbenches finish in well under a second of simulation time.
