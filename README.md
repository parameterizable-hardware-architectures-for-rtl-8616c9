# New-AB2 full-search motion estimation processor (SystemVerilog)

This is a full-search block-matching (FSBM) motion estimator for video coding. For every
16×16 reference macroblock of the current frame, it tries every displacement from −15 to +16
pixels, in both directions, inside the previous frame. That is 32 × 32 = 1024 candidate
blocks. For each candidate it computes the sum of absolute differences (SAD) and reports the
displacement with the smallest SAD. The processor evaluates one candidate per clock cycle, so
1024 cycles are spent on candidates. With the search-area fill added, one macroblock takes
1385 cycles. At 36.5 MHz that is enough for 4CIF video (704×576) at 16.6 frames/s.

The default build is the single-core ("type I") configuration of the New-AB2 class of systolic
arrays. A parameter `C` adds more cores (the "type II" configuration, see below).
The main idea is that the processing array is closed into a **cylinder**. The array holds a
horizontal strip of the search area, N lines high and L = 2p + N − 1 pixels wide. Only the
leftmost N × N elements do arithmetic. The others just hold pixels. To move from one candidate
to the next, the whole strip is **rotated** by one column. Pixels that leave the left edge
reappear at the right edge, so no array element is ever idle or empty. Earlier AB2 arrays
instead had passive blocks on both sides of the active block, and half of them were always
empty.

```
            column  0 ............ N-1 | N ................. L-1
   row 0          +-------------------+------------------------+
     .            |   active block    |     passive block      |  <- rotates left
     .            |   N x N PEs       |     N x (2p-1) PEs     |     or right; the
   row N-1        +-------------------+------------------------+     ends are joined
                    ^ new search line enters here, whole strip moves up
          column sums (carry-save)  ->  adder tree  ->  comparator  ->  (mv_x, mv_y, SAD)
```

## The zig-zag schedule

Each candidate is written as (line v, position x), with 0 ≤ v, x < 2p. Here v is the vertical
offset and x the horizontal offset of the candidate inside the search area. At any moment,
array row i holds search line v + i. Array column j holds search column (j + rot) mod L, where
rot is the current rotation. The active block therefore compares the reference block with
candidate (v, x = rot).

For one reference macroblock, the controller (`me_controller`) runs as follows:

1. **Fill.** The first N search lines are moved up into the array one at a time, with
   rotation 0. The last fill move also copies the next reference block into the PEs' standing
   registers.
2. **Even line v.** Candidates x = 0, 1, …, 2p − 1 are evaluated. After each one except the
   last, every row is rotated left, so the rotation goes 0 → 2p − 1.
3. **Line change.** After the last candidate of a line, the strip moves up by one row. The top
   row is dropped and the bottom row takes the next search line, v + N, from the input buffer.
   This replaces a rotation step, so no cycle is lost.
4. **Odd line v + 1.** Candidates run backwards, x = 2p − 1 … 0, with rotations to the right.
   Then steps 3 and 2 repeat.

Because 2p is even, the last line ends at rotation 0. The array is then ready for the next fill.
For N = 4 and p = 2, the candidate vectors come out as (−1,−1) (−1,0) (−1,1) (−1,2), then
(0,2) (0,1) (0,0) (0,−1), and so on. Vectors are written (y, x) and equal (v, x) − (p − 1).

### Why the input buffer has two topologies

A line that enters during a move up must land in the columns where the rotated strip expects
it. After an odd line, the rotation is 0, so pixel k of the new line goes into column k. After
an even line, the rotation is 2p − 1, and pixel k must go into column (k + N) mod L instead.

`search_input_buffer` solves this without any arithmetic. Its L registers are split into two
shift registers:

- A, with N registers, feeding array columns 0..N−1;
- B, with 2p − 1 registers, feeding array columns N..L−1.

Two multiplexers decide the order in which the two registers are chained:

| `misalign` | serial chain | pixel k lands in column |
|---|---|---|
| 0 | input → B → A | k |
| 1 | input → A → B | (k + N) mod L |

The controller selects the topology of a line when loading starts. It is 1 for the line that
will be consumed at the end of an even line. During a line of 2p = 32 cycles, the buffer
receives the next 47-pixel line at two pixels per beat, which takes 24 beats. A beat may arrive
in the same cycle in which the array takes the previous line.

## The processing element arithmetic

Each active PE (`active_pe`) has four parts:

- **Search register.** A multiplexer chooses between holding the pixel and loading it from the
  right, left or lower neighbour. This is the whole of a passive PE (`passive_pe`).
- **Reference registers.**
  - A running-data register is part of a vertical chain. The *next* reference block is shifted
    up this chain while the current one is being processed.
  - A standing-data register copies the running register at the start of a macroblock.
- **`abs_diff`.** Computes s − r. When the result is negative, it outputs the one's complement
  and a correction bit `ad_carry`, so that |s − r| = `ad` + `ad_carry`. The +1 is not added
  here.
- **`csa_accumulator`.** One row of 8 full adders adds `ad`, the incoming sum vector, and the
  incoming carry vector, with `ad_carry` in the carry vector's empty bit 0. The carry out of the
  top bit goes into a 4-bit incrementer for the upper part. A column partial sum therefore
  travels up the array as (sum 8 bits, carry 7 bits, upper 4 bits), with value
  s + 2·cd + 256·cu. No operand grows as it passes row by row, and the delay per row is one full
  adder.

The column accumulation is combinational inside a cycle. At the top of each column, the
redundant sum is converted to a 12-bit number and registered. A 16-row column can reach
16 × 255 = 4080. `adder_tree` then adds the 16 column sums in log2 N = 4 levels of 16-bit
adders, 15 adders in all, and registers the result. `comparator` keeps the first candidate
with the smallest SAD.

## Interfaces and timing of `me_processor`

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `sa_valid`/`sa_ready`/`sa_pix` | in/out/in | 1/1/SA_PPB×8 | search area, line by line, left to right, `sa_pix[0]` first; a line is ⌈L/SA_PPB⌉ beats, and unused pixels of the last beat are ignored |
| `ref_valid`/`ref_ready`/`ref_pix` | in/out/in | 1/1/8 | reference block, row by row, one pixel per beat |
| `mv_valid` | out | 1 | one-cycle pulse per macroblock |
| `mv_x`, `mv_y` | out | $clog2(P)+2 (signed) | best displacement, −(P−1)..P |
| `mv_sad` | out | 16 | its SAD |
| `stall` | out | 1 | array waiting for the next search line |

A beat moves when valid and ready are both high. Each macroblock needs its whole
(2p + N − 1)² search area: 47 lines of 47 pixels, sent in order. Overlap between the search
areas of neighbouring macroblocks is not reused; the sender streams each area completely.
The reference block of macroblock k + 1 can be sent while macroblock k is processed. For the
first macroblock, it must have arrived before the 16th fill line.

Cycle counts at the defaults, with both streams at full rate:

| phase | cycles |
|---|---|
| fill: 16 line moves; the first line is preloaded during the previous block's last line | 1 + 15 × 24 = 361 |
| candidates | (2p)² = 1024 |
| **period per macroblock** | **1385** |
| last candidate → `mv_valid` | 3 |

If a search line is late, the array holds and `stall` is high. The held candidate is still
counted once.

## Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 16 | macroblock size; active block N×N, tree of ⌈log2 N⌉ levels |
| `P` | 16 | search range −(P−1)..P; array width L = 2P + N − 1 = 47 |
| `SA_PPB` | 2 | search pixels per input beat; needs ⌈L/SA_PPB⌉ ≤ ⌊2P/C⌋ for stall-free operation |
| `C` | 1 | number of active blocks (cores); needs ⌊2P/C⌋ ≥ N and C·⌊2P/C⌋ even |
| `PIX_W`, `COL_W`, `TREE_W` (package `me_pkg`) | 8, 12, 16 | pixel, column-sum and tree widths |

The defaults of N, P and the three widths are those of the original 0.25 µm chip. `SA_PPB`
is this design's choice. Two pixels per cycle reproduces the published 16.23 frames/s figure
for a 36 MHz clock: 1024 + 16 × 47 / 2 cycles per block. The design was simulated at
N = 4, P = 2, at the defaults, and with two cores at N = 4, P = 7 and at N = P = 16.
COL_W must hold N × 255.

### Several cores (`C` > 1)

With C cores, the cylinder keeps the same N rows. It is cut into C equal sections of
Q = ⌊2P/C⌋ columns. Each section starts with an N × N active block. Cores after the first
are followed by Q − N passive columns; the last core is followed by Q − N + N − 1 of them.
The total width is L = C·Q + N − 1. For N = P = 16 and C = 2, that is again 47 columns.

All cores see the same search data. Core c evaluates the candidate that lies c·Q columns to
the right of core 0's candidate. Each line therefore needs only Q rotations instead of 2P.
For one macroblock there are C·Q lines of Q candidates, so the time drops by a factor of
about C. Each core has its own adder tree. The comparator takes the smallest of the C
SADs of a cycle; on a tie the lower core wins.

The horizontal range stays −(P−1) up to −(P−1) + C·Q − 1, and the vertical range is the same.
When C does not divide 2P, both ranges are a little narrower than 2P. The input buffer's two
parts become C·Q − (Q − N) and Q − 1 registers. A line must now arrive within Q cycles, so
more pixels per beat are needed; two cores at N = P = 16 need `SA_PPB` = 3.

## How far it follows the original architecture

Taken from the original description:

- the cylindrical array with N×N active and N×(2p−1) passive PEs, and its C-core form;
- one candidate per cycle in a zig-zag order, (2p)² cycles of candidates;
- the PE structure: running and standing reference registers, absolute difference, and
  carry-save accumulation with an incrementer;
- the 8/12/16-bit growing operand widths;
- the log2 N adder tree feeding a minimum comparator;
- the line buffer split into N and 2p − 1 registers with two multiplexers for alignment.

This design's own choices:

- valid/ready handshakes, the input rate, and the pixel order on the ports;
- the two-state controller and the stall behaviour;
- where pipeline registers sit. Here the column sums are combinational over the 16 rows and
  registered at the top. The original drawings show a register in each PE's accumulator, but
  give no schedule that keeps such a registered column in step with search data that moves
  every cycle.
- the 4-bit upper part of the column sum. The original drawing labels it 3 bits, which cannot
  hold 4080.
- the reference chain running vertically, loaded from below;
- asynchronous reset; first-found on equal SADs;
- plain `+` in the adder tree and the column-sum conversion. The original used carry-save and
  Sklansky prefix adders for speed; here the adder architecture is left to synthesis.

Not built:

- **The transparent pre-fetch layer.** This is a second register layer that loads the next
  search area during processing and would remove the 361 fill cycles, giving (2p)² cycles per
  block. It is specified elsewhere and is not part of the chip configuration built here.
- **The reduced-core structures (types III and IV).** Their active blocks are smaller than the
  macroblock (h or ℓ < N), so each SAD is built from partial sums over several passes.
  The original description does not say where these partial sums are kept, so they are not
  built. The multi-core type II structure is built, through `C`.
- The software that chooses a configuration and generates HDL.
- The chip's physical implementation.

Timing closure at 36.5 MHz has not been checked.

## Files

`rtl/`: `me_pkg` (widths, shift enum), `abs_diff`, `csa_accumulator`, `passive_pe`, `active_pe`,
`pe_array`, `adder_tree`, `comparator`, `search_input_buffer`, `ref_input_buffer`,
`me_controller`, `me_processor` (top).

`tb/`: one self-checking testbench per module, `tb_<module>.sv`. Each prints
`TB_RESULT checks=… failures=…`.

- `tb_me_processor` runs four macroblocks at the default size. The expected results come from
  a software full search in the same zig-zag order. It checks vectors, SADs, the (2p)²
  candidate count, the 1385-cycle period against the 1440-cycle 4CIF budget, and that
  rotations in both directions, both buffer topologies, stalls and background reference
  loading all occurred.
- `tb_me_processor_small` runs the same test at N = 4, P = 2.
- `tb_me_processor_multi` runs it with two cores at N = 4, P = 7 and three pixels per beat. It
  also checks that the best match of one block is found by the second core.

To simulate one of them with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb rtl/me_pkg.sv tb/tb_me_processor.sv \
          --top-module tb_me_processor
./obj_dir/Vtb_me_processor
```

The full-size run takes about half a minute, most of it compilation. To change the size,
edit N and P in the testbench.
