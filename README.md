# HEXDS motion estimation block

Block-based motion estimation finds, for each 16x16 block of the current
video frame, the position in a reference frame where the same 16x16 patch
looks most alike, measured by the sum of absolute differences (SAD). The
offset from the block's own position to that best match is the motion vector.
Trying every position in a ±7 range costs 225 SADs per block. The
hexagon-diamond search (HEXDS) usually needs 11 to 20. It walks a large
hexagon across the SAD surface until the hexagon's centre is the best point.
It then checks the four nearest neighbours of that centre once.

This RTL is a small serial engine for that search. It has one
processing element, which gives one absolute difference per clock, and a
carry-chain comparator. A few gates turn a 3-bit counter into hexagon
offsets. A controller decides which positions to visit. It follows a
published VLSI architecture for HEXDS. Where that architecture says what a
unit does but not how it does it, the choice made here is named below.

## The search

Positions are (x, y) with x the column and y the row. Both are two's
complement, so the negative pattern offsets are added with plain adders. The
current block sits at the base position (W, W) of a (16+2W)-pixel square
search area, with W = 7. A candidate position p = (x, y) is compared with the
reference patch whose top-left pixel is p. The motion vector is
p_best − (W, W).

Large hexagon corners, numbered by a counter value `a = a2 a1 a0`:

| a | offset (x, y) |
|---|---------------|
| 0 | (−2, 0)  |
| 1 | (−1, +2) |
| 2 | (+1, +2) |
| 3 | (+2, 0)  |
| 4 | (+1, −2) |
| 5 | (−1, −2) |

1. **Initial hexagon.** The centre (W, W) is evaluated, then corners 0..5.
   A mod-6 counter steps through the corners.
2. **Hexagon steps.** Suppose corner k beat the centre. Corner k becomes the
   new centre. Three of the new hexagon's corners were already evaluated
   last step, so only corners k−1, k and k+1 (mod 6) are new. A decrementer
   and an incrementer on the stored count k produce these counts. Steps
   repeat while some corner wins.
3. **Small diamond.** A step can end with no corner better than the centre,
   and the initial hexagon can too. The search then evaluates the four
   points at (+1,0), (0,−1), (−1,0) and (0,+1) around that centre, which a
   2-bit counter numbers. The search then ends.

A search with n large hexagons (the initial one included) computes at most
3n + 8 SADs. A point wins only with a strictly smaller SAD. On a tie the
earlier point stays the minimum, so a flat image returns the vector (0, 0).
Each candidate's position is checked against the range |u|, |v| <= W. A
candidate outside it is skipped in one clock and can never win. The
architecture this follows does not say what happens at the range edge, so
this rule is this design's choice.

### Offsets from counter bits

Each offset is 3-bit two's complement, so it comes from a few gates on the
counter bits. Two adders then add it to the centre (`hex_addr_gen`):

    A = a2 | (a1 ^ a0)     B = a0 | (~a2 & ~a1)     C = ~a1 & B
    x offset = C B A       y offset = a2 A 0

The diamond (`sdsp_addr_gen`) uses the same two adders with other inputs:

    D = a1 & ~a0           E = ~a1 & a0
    x offset = D D ~a0     y offset = E E a0

In this design y grows downwards. That mirrors the pattern vertically and
changes nothing else.

## Datapath

- **Absolute difference** (`abs_diff_unit`, `cds_subtractor`). A conditional
  difference subtractor computes D = cur − ref and the borrow Bout. It is
  built like a conditional sum adder. Each bit cell computes its result for
  a borrow-in of 0 and for a borrow-in of 1. Groups of 1, 2, 4, … bits are
  then merged by multiplexers, which the lower group's borrow selects. The
  two's complement correction needs no incrementer. A chain
  `I_m = (D_m | I_{m-1}) & Bout`, `Y_m = D_m ^ I_{m-1}` with `I_{-1} = 0`
  keeps the bits up to the lowest 1 and inverts the bits above it. This
  happens only when there is a borrow.
- **Processing element** (`pe`). The absolute difference goes into a 16-bit
  carry look-ahead adder (`cla_adder`: 4-bit groups with group
  generate/propagate). That adder feeds the SAD register. A full-scale SAD
  is 256 × 255 = 65280, which fits in 16 bits.
- **Minimum SAD** (`min_sad_unit`). It only needs to know whether SAD < min.
  That is the inverse of the carry out of SAD + ~min + 1, so the comparator
  is that adder's carry chain and nothing else. Its output `en` loads the
  minimum register. The same signal tells the motion-vector register and the
  controller to record the candidate.
- **Motion vector** (`mv_gen`). This register stores the candidate position
  on `en`. Two subtractors give `mv = min_pos − base_pos`.
- **Pixel counters** (`pixel_counter`). Two mod-16 counters walk the block in
  raster order. Their concatenation {row, col} addresses the current-block
  RAM. The same bits, with the row spread to the reference RAM's 32-pixel
  row pitch, are added to the candidate's base address.
- **Memories** (`pixel_ram`, two instances). The current block is 256 × 8
  bits. The reference search area is 1024 × 8 bits, addressed as
  `{row[4:0], col[4:0]}`, of which 30 × 30 pixels are used. Both have a
  synchronous read with one clock of latency.

## Timing

The engine evaluates one candidate at a time, in 259 clocks:

| clocks | state | what happens |
|--------|-------|--------------|
| 1   | ADDR  | candidate address formed, range check, PE and pixel counters cleared |
| 256 | RUN   | one pixel address per clock to both RAMs |
| 1   | DRAIN | the last read reaches the PE |
| 1   | CMP   | `en` decides; minimum, position and stored count update |

A skipped candidate costs one clock. `start` is sampled in a clock edge. For
a search that computes P SADs and skips S candidates, `done` is high P·259 + S
clocks after that edge, for one clock. `mv_x`, `mv_y`, `min_sad` and
`search_points` are valid from then until the next `start`. A typical search
of 11 to 20 SADs takes 3,000 to 5,200 clocks. The published implementation
reports 200 MHz on a Virtex-4 FPGA. This RTL has not been through timing
analysis.

## Top-level interface (`me_hexds`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `cur_we`, `cur_waddr`, `cur_wdata` | in | 1, 8, 8 | load the current block, address {row, col} |
| `ref_we`, `ref_waddr`, `ref_wdata` | in | 1, 10, 8 | load the search area, address {row[4:0], col[4:0]}; area pixel (r, c) is frame pixel (by − W + r, bx − W + c) for a block at (bx, by) |
| `start` | in | 1 | one-clock pulse starts a search |
| `busy`, `done` | out | 1 | search running; one-clock end pulse |
| `mv_x`, `mv_y` | out | 6 | motion vector, two's complement, within ±W |
| `min_sad` | out | 16 | SAD at the motion vector |
| `search_points` | out | 8 | SADs computed in the search |

Parameter: `W` (default 7, from 1 to 8). The package `me_pkg` holds the pixel
width (8), the block size (16), the SAD width (16), the coordinate width (6)
and the reference RAM's row pitch (32). The coordinate width and the row
pitch limit W to 8.

The host loads the current block and its search area, then starts the
search. The memories can be rewritten while the engine is idle. For positions
outside the frame, the host must pad the search area. Frame buffering,
reference frame selection and any pipelining of loading against searching
are outside this block.

## What follows the source architecture and what does not

These parts follow it:
- the unit structure: the subtractor type, the correction chain, the PE
  built from an absolute difference unit, a CLA adder and a register, the
  carry-only comparator driving one enable, and the motion vector register
  with its subtractor;
- the counter-to-offset logic of both patterns;
- the mod-6 counter with its incrementer and decrementer;
- the two mod-16 pixel counters.

These parts are this design's own choices:
- **Correction chain start.** The published equations give the chain's
  initial term as the inverse of the borrow. Taken literally, that inverts
  the least significant bit whenever there is no borrow, which contradicts
  the stated behaviour. Here the chain starts at 0.
- **A single diamond step.** The search ends after it. The 3n + 8 bound
  implies this, but it is not stated outright.
- **Range check and skip** (see above).
- **The serial schedule**: one candidate at a time, 259 clocks per SAD, no
  overlap between candidates.
- **The memories**: their organisation, the 32-pixel row pitch and the load
  ports.
- **Widths**: 8-bit pixels, a 16-bit SAD and 6-bit coordinates.
- **The search range.** The evaluation uses a "7×7 search window". Here
  that is read as a search range of ±7, so W = 7. A literal 7×7 window
  would be W = 3, which the parameter also accepts.
- **The minimum register's start value.** It is loaded with all ones at the
  start of a search.

## Fit to typical sequences

One search handles one block against one reference frame. With the published
averages of 11 to 14 search points per block, a 720×480 frame (1350 blocks)
needs about 4.5 to 5 M clocks per reference frame. At 200 MHz that is about
25 ms. A 352×288 frame (396 blocks) needs about 1.1 M clocks, or 5.6 ms.
Searching ten reference frames per block multiplies these figures by ten.

## Verification

Every module has a self-checking testbench in `tb/`. Each one ends with
`TB_RESULT checks=N failures=M`:

- `tb_cds_subtractor`, `tb_abs_diff_unit`, `tb_cla_adder`: exhaustive for
  8-bit operands, plus random 13-bit and 16-bit cases;
- `tb_pe`: random blocks, clear/hold and one-clock latency, full scale;
- `tb_min_sad_unit`: a running minimum, with ties and init;
- `tb_mv_gen`, `tb_hex_addr_gen`, `tb_sdsp_addr_gen`, `tb_pixel_counter`,
  `tb_pixel_ram`: every offset and centre, raster order, read latency;
- `tb_hexds_controller`: the controller runs against a behavioural datapath
  over 120 random SAD surfaces. The test compares the visit order, the clock
  count, the SAD count and the final position with a reference model
  (`tb/hexds_ref_pkg.sv`). It also fails if no hexagon move, skip, diamond
  phase or immediate switch happens.
- `tb_me_hexds`: the whole block at its default size over 40 searches.
  These cover smooth textures at random displacements, noisy copies, noise
  and a flat image. The test computes every SAD itself and plays the search
  with the reference model. It checks the motion vector, the minimum SAD,
  the SAD count and the exact clock count. It also counts hexagon moves,
  range skips, diamond phases, immediate switches, negative vectors and
  ties, and fails if any of them never happens.
- `tb_frame_workload`: whole frames at 352×288 and 720×480, with 16×16
  blocks and a range of ±7. The frames are synthetic: a textured reference
  moved by a global motion, plus an object that moves differently. Edge
  pixels are repeated for positions outside the frame. Every block is
  checked against the reference model. For this content the run gives
  14.3 search points per block and 1.47 M search clocks for the 352×288
  frame, and 17.1 points per block and 5.98 M clocks for the 720×480 frame.
  Every block found the applied motion.

HEXDS is a fast search, so it can stop in a local minimum of the SAD
surface. The block testbench therefore checks the hardware against the
search algorithm, not against full search. It prints how often the two
agree.

Simulating with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/me_pkg.sv \
        tb/hexds_ref_pkg.sv tb/tb_me_hexds.sv --top-module tb_me_hexds
    ./obj_dir/Vtb_me_hexds

The other testbenches build the same way. Packages must come first on the
command line.
