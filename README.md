# Full-search block-matching motion estimator on a cylindrical PE array

Video coders predict each 16 x 16 block of the current frame (the
*reference macroblock*) from the best-matching block of the previous frame.
Full-search block matching (FSBM) finds that match exhaustively: for every
displacement (dx, dy) in a search range it computes the sum of absolute
differences

    SAD(dx, dy) = sum over u, v of | R(u, v) - S(u + dy, v + dx) |

and returns the displacement with the smallest SAD as the motion vector.

This RTL implements a two-dimensional systolic processor for that search. An
N x N block of *active* processing elements (PEs) holds the reference pixels;
the search-area pixels move past them so that each clock the active block
sees a new candidate block, and an adder tree produces one complete SAD per
clock per active block. What sets this design apart from the classic
"type I" arrays is how the search pixels are stored and moved:

* the storage array is closed into a **cylinder**, so only N + 2p - 1 columns
  of search registers are needed instead of the N + 2(2p - 1) of a planar
  array with spare (passive) columns on both sides;
* candidates are visited in a **zig-zag** order: rotate the cylinder one way
  along a search row, load the next search row, rotate back the other way.
  No clock is spent moving data without producing a SAD, so a full search of
  p_hat x p_hat candidates takes exactly p_hat^2 clocks;
* the processor can be split into **C cores** (active blocks) placed around
  the same cylinder, dividing the scan time by C;
* the active blocks can be made **shorter** than the macroblock (H < N rows):
  each PE then stores several reference pixels and every SAD is added up
  over several sweeps, trading scan time for search registers.

Default configuration (all parameter defaults): N = 16, displacements
-15 .. +16 in both directions (P = 16, p_hat = 32 candidates per direction,
1024 candidates), one core. This is a 16 x 47 array of search registers with
256 active PEs.

## Sizes

| symbol | meaning | formula | default |
|---|---|---|---|
| N | macroblock size, rows and columns of an active block | parameter | 16 |
| P | search range -(P-1) .. +P | parameter | 16 |
| C | number of cores (active blocks / adder trees) | parameter | 1 |
| W | search pixels accepted per clock | parameter | 2 |
| Q | candidate columns per core per search row | floor(2P / C) | 32 |
| p_hat | candidates per row and per column | C * Q | 32 |
| L | width and height of the search area | p_hat + N - 1 | 47 |
| m | passive columns after each active block | Q - N | 16 |
| H | rows of the array (rows of an active block) | parameter, divides N | 16 |
| F | reference fractions per PE | N / H | 1 |

The array is H rows by L columns. Active block b occupies columns
b*Q .. b*Q + N - 1; all other columns are passive (search registers only).
The N - 1 columns at the right end, which close the ring back to column 0,
act as the *connection block*. P must satisfy 2P / C >= N (m >= 0).

## The cylinder and the zig-zag scan

Take H = N first (the default). Think of the array as N rows, each a ring
of L registers. Array row r holds
search-area row j + r, where j is the current candidate row. Let the ring be
rotated by c: column i holds search column (i + c) mod L. Then active block b
(columns b*Q .. b*Q+N-1) sees the N x N window at search row j and search
column b*Q + c, which is candidate (row j, column b*Q + c) — as long as
c <= Q - 1, the window never straddles the ring's seam.

One macroblock is processed like this:

1. **Fill.** Search rows 0 .. N-1 are pushed into the array from below
   (each push moves all rows up by one). No rotation: c = 0.
2. **Row 0, to the left.** The clock after the fill computes candidates
   (0, b*Q + 0). Then the ring is rotated left Q - 1 times (column i takes
   column i+1), c = 1 .. Q-1: one candidate group per clock.
3. **Row change.** Instead of rotating, search row N is pushed in from
   below. The array now holds rows 1 .. N, still rotated by Q - 1, so the
   next clock computes candidates (1, b*Q + Q - 1) — no idle clock.
4. **Row 1, to the right.** Q - 1 right rotations bring c back to 0.
5. Repeat with alternate directions until candidate row p_hat - 1.

Scan length: p_hat rows x Q clocks = p_hat^2 / C clocks (1024 at the
defaults), each clock delivering C SADs.

The one catch is step 3: after a left sweep the ring is rotated by Q - 1, so
the new bottom row must arrive rotated by the same amount. That is the job of
the input buffer.

## Search-area input buffer and its alignment multiplexers

The search row is shifted serially into a chain of L registers, then copied
in parallel into the bottom row of the array. After a right sweep (c = 0)
pixel k must end in column k: the chain runs from the input at column L-1
down to column 0. After a left sweep (c = Q - 1) pixel k must end in
column (k - (Q - 1)) mod L.

Rather than rotating L outputs with a barrel shifter, the chain is cut into
two segments:

    left  segment: columns 0 .. L-Q       (C(l+m) - m registers)
    right segment: columns L-Q+1 .. L-1   (m + N - 1 registers)

and the order in which they are chained is switched:

    aligned   (misalign = 0): input -> right segment -> left segment
    misaligned(misalign = 1): input -> left segment  -> right segment

Serially loading L pixels through the second order leaves exactly the
rotation by Q - 1. Only the registers right behind the two joints need a
2:1 multiplexer; everywhere else both orders have the same predecessor.
With W > 1 pixels per clock the chain advances W positions per shift and W
registers behind each joint get a multiplexer. If W does not divide L, the
first word of every row starts with ceil(L/W)*W - L filler pixels, which fall
off the end of the chain.

Which order to use depends only on the index of the row being loaded: rows
0 .. H-1 (fill) are aligned; row H + y is loaded after the last sweep over
window y (see the next section), and it is misaligned if that sweep ran to
the left, i.e. if the number of sweeps so far is odd. With H = N there is
one sweep per window, so rows N, N+2, N+4, ... are misaligned. The input
controller keeps that parity in one register.

## Active blocks shorter than the macroblock (H < N)

With H = N / F rows the array holds only H search rows at a time, a
*window* y .. y+H-1. The reference block is cut into F fractions of H rows;
PE row r keeps F standing pixels, reference rows r, H + r, 2H + r, ...
While the array holds window y and uses fraction f, active block b compares
reference rows fH .. fH+H-1 with search rows y .. y+H-1, which is the part
of candidate row j = y - fH that belongs to fraction f.

The scan therefore sweeps each window once for every fraction that gives a
valid candidate row (0 <= y - fH < p_hat), in ascending f, alternating the
direction from sweep to sweep as before. Between two sweeps of one window
the array simply holds for one clock, which already computes the first
candidate of the next sweep, so again no clock is idle; after the last
sweep of a window the next search row is loaded. Every candidate row gets
exactly F sweeps, so the scan takes F * p_hat * Q clocks and the array
needs only H x L search registers. H = 8 with C = 2 (16 x 16 blocks, two
cores of 8 x 16 PEs) scans in 1024 clocks, the same as the single 16 x 16
core.

`fsbm_sad_accum` adds the partial SADs. Candidate row j receives fraction 0
in window j and its last fraction in window j + (F-1)H, so at most N
candidate rows are open at any time; the unit keeps a partial sum per open
row, core and column (slot j mod N). Fraction 0 writes, the others add, and
the last fraction passes the complete SAD to the comparator. The reference
block still enters as N rows of N pixels: the running registers of all F
slots of a block column form one chain of N stages.

## Reference pixels: running and standing registers

Each active PE has two reference registers. The *standing* register holds
the pixel of the macroblock being searched; the *running* registers of a
block column form a shift chain through which the next macroblock is loaded
from below, one row of N pixels at a time, while the current scan runs. When
a macroblock starts, all running values are copied into the standing
registers in one clock. With C cores every active block receives the same
reference rows.

## Several cores

With C > 1 the Q = floor(2P/C) candidate columns of a search row are shared
out: core b covers columns b*Q .. b*Q + Q - 1, all cores stepping together.
The number of candidates per direction becomes p_hat = C * Q, which can be
up to C - 1 smaller than 2P. Each core has its own adder tree; the comparator
picks the smallest of the C SADs of a clock (lowest core first on a tie) and
compares it with the best so far. A core needs a new search row every Q
clocks, so the input must deliver L pixels in Q clocks: choose W with
ceil(L/W) + 1 <= Q, otherwise the array stalls (see below).

## Control and timing

`fsbm_central_ctrl` runs three phases per macroblock:

| phase | clocks (full-rate input) | action |
|---|---|---|
| reference | 1 | copy running -> standing registers once the next block is complete |
| fill | about H x (ceil(L/W) + 1) | push rows 0 .. H-1 (each as soon as the buffer holds it) |
| scan | F * p_hat * Q | zig-zag; one candidate group per clock |

**Stall.** If at the end of a window's last sweep the next row is not yet complete in the
buffer, the array holds (the `stall` output is high) and the repeated
candidate group is not passed on. Stalls only lengthen the scan; results are
unaffected.

**Pipeline.** |R - S| is registered in each PE, the adder-tree sum is
registered and the accumulator output is registered, so the comparator sees
a candidate group three clocks after the array held it; `mv_valid` comes
four clocks after the last scan clock.

At the default size with W = 2 the measured period between results, with
inputs always available, is 1401 clocks (1 + 15 x 25 + 1 + 1024). A 4CIF
frame (704 x 576, 1584 macroblocks) then takes 2.22 M clocks, about 16.4
frames/s at 36.5 MHz.

## Interface of `fsbm_top`

| port | dir | width | meaning |
|---|---|---|---|
| clk, rst_n | in | 1 | clock; asynchronous active-low reset |
| r_valid / r_ready | in / out | 1 | reference pixel handshake |
| r_pix | in | 8 | reference pixels of the next macroblock, raster order |
| s_valid / s_ready | in / out | 1 | search word handshake |
| s_word | in | W x 8 | W pixels of a search row, element 0 first |
| mv_valid | out | 1 | one-clock result strobe |
| mv_x, mv_y | out | clog2(P)+2, signed | displacement of the best candidate |
| mv_sad | out | 8 + clog2(N^2) | its SAD |
| stall | out | 1 | array waiting for a search row |

Per macroblock send N^2 reference pixels and the L x L search area, as rows
0 .. L-1 of ceil(L/W) words each; candidate (row j, column x) corresponds to
mv_y = j - (P-1), mv_x = x - (P-1). The reference of the next macroblock may
be sent at any time after the previous one was accepted; it is held until the
current scan ends. The search stream may also run ahead by one row.

A transfer happens on a rising edge where valid and ready are both high.
Ready depends only on registers, not on valid.

## What this RTL does not contain

* **Active blocks narrower than the macroblock.** The architecture also
  allows active blocks of l < N columns (for example four cores of 8 x 8
  PEs). Only shorter blocks (H < N) are built; every active block has N
  columns.
* **Transparent (pre-fetched) search loading.** Between macroblocks the
  array spends the fill phase loading H search rows; a pre-fetch layer that
  would hide it is not included. The reference block is pre-loaded, so it
  costs no time.
* **Chip-level parts**: pads, clock generation and the configuration
  software that picks N, P and C for a target frame rate.

## Choices made in this implementation

Pixel width (8 bits), handshakes, the reset style, W = 2, the stall rule,
the three pipeline registers, the order of the fraction sweeps and the
storage of partial SADs, tie breaking (first candidate in scan order wins;
lowest core first within a clock) and the sign convention of the vector are
decisions of this RTL, not taken from the architecture description.

## Files

| file | content |
|---|---|
| rtl/fsbm_pkg.sv | pixel type, array-operation enum, size formulas |
| rtl/fsbm_passive_pe.sv | search register with left/right/up moves |
| rtl/fsbm_active_pe.sv | passive PE + running/standing reference + abs difference |
| rtl/fsbm_pe_array.sv | H x L cylinder with C active blocks |
| rtl/fsbm_adder_tree.sv | H x N-input SAD tree |
| rtl/fsbm_sad_accum.sv | adds the partial SADs of the F fractions |
| rtl/fsbm_comparator.sv | running minimum, motion vector |
| rtl/fsbm_search_buffer.sv | SIPO row buffer with alignment multiplexers |
| rtl/fsbm_search_input_ctrl.sv | word/row counting, chain order, row-full flag |
| rtl/fsbm_ref_input.sv | reference row buffer and its controller |
| rtl/fsbm_central_ctrl.sv | phases, zig-zag counters, array operation, stalls |
| rtl/fsbm_top.sv | the processor |
| tb/tb_fsbm_*.sv | one self-checking testbench per module |
| tb/tb_fsbm_full.sv | three macroblocks at the default size |
| tb/tb_fsbm_top_frac.sv | as tb_fsbm_top with H = N/2 |
| tb/tb_fsbm_hlc112.sv | N = 16, P = 16, two cores |
| tb/tb_fsbm_hlc212.sv | N = 16, P = 16, two cores of 8 rows |
| tb/tb_fsbm_4cif.sv | a whole 704 x 576 frame at the default size |

## Verification

Every module has a self-checking testbench that compares against a model
written independently in the testbench (register-level models for the PEs,
array and buffers; a plain full search for the processor). Each prints
`TB_RESULT checks=<n> failures=<n>` and stops on a watchdog if it hangs.

* `tb_fsbm_top`: N = 4, P = 4, C = 2, W = 4; six macroblocks, the last three
  with gaps in the search stream. Checks SAD and vector against a full
  search, p_hat*Q candidate groups per macroblock, scan length = p_hat*Q +
  stalls, no stall at full input rate, result latency; counts left and right
  rotations, aligned and misaligned row loads, stalls and reference
  transfers, each of which must occur.
* `tb_fsbm_top_frac`: the same with H = 2 (two reference fractions).
* `tb_fsbm_full`: the default size, three macroblocks; also checks the
  1401-clock macroblock period.
* `tb_fsbm_hlc112` / `tb_fsbm_hlc212`: N = P = 16 with two cores (W = 4),
  full-height and 8-row active blocks; scan lengths 512 and 1024 clocks,
  macroblock periods 709 and 1117 clocks.
* `tb_fsbm_4cif`: 1584 macroblocks of a frame with a known global motion;
  checks every vector and that the frame fits the 16 frames/s budget at
  36.5 MHz.

Ties between equal SADs are resolved in the order in which the candidates
are completed, so the testbench models walk the candidates in that order.

Running one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/fsbm_pkg.sv tb/tb_fsbm_full.sv --top-module tb_fsbm_full
    ./obj_dir/Vtb_fsbm_full

All testbenches finish within seconds.
Verilator's `-Wall` lint reports one style warning on `fsbm_top`: `rst_n`
is used both as asynchronous reset and in the `disable iff` of the
assertions.
