# Four-way data-reuse full-search motion estimator

Full-search block matching finds, for every N x N block of the current video
frame, the displacement within a search range whose block in the previous
(reference) frame differs least from it, measured as the sum of absolute
differences (SAD). It is simple and exact, but a straightforward engine
fetches the same reference pixels from external memory over and over: the
search areas of neighbouring blocks overlap almost completely. Those fetches
cost most of the power.

This estimator follows the four-way reuse architecture of B.-S. Kim and
J.-D. Cho, "Maximizing Memory Data Reuse for Lower Power Motion Estimation".
Four adjacent current blocks, a 2 x 2 *quad*, are searched together. Every
reference pixel fetched is compared in the same cycle with one pixel of each
of the four blocks, so one fetch serves four searches. Going down a column of
quads, the search window keeps the rows it shares with the next window. Each
reference pixel is then fetched once per column of quads, not once per block
and candidate.

The paper describes the reuse scheme and names its building blocks. It does
not specify the array's internal organisation, timing or interfaces, so those
are this design's own. See "Departures from the published architecture"
below.

## One search pixel, four candidates

Name the blocks of a quad A (top left), B (top right), C (bottom left) and
D (bottom right), and put the quad's top-left pixel at (qx, qy). Take the
reference pixel at offset (dx, dy) from where block A's pixel (i, k) sits.
That same pixel lines up with:

| block | its pixel | as the candidate with displacement |
|-------|-----------|------------------------------------|
| A     | (i, k)    | (dx, dy)                           |
| B     | (i, k)    | (dx - N, dy)                       |
| C     | (i, k)    | (dx, dy - N)                       |
| D     | (i, k)    | (dx - N, dy - N)                   |

So one *quad offset* (dx, dy) gives one candidate for each of the four blocks
from the same stream of reference pixels. Each block searches -L..R
horizontally and -U..D vertically. The quad therefore needs the offsets
dx = -L..R+N and dy = -U..D+N. That is (L+R+N+1) x (U+D+N+1) quad offsets,
and they cover 4 x (L+R+1) x (U+D+1) block candidates. The next section
shows how the left part of that range is covered ahead of time, from the
previous column's window.

A processing element (`me_pe4`) holds one quad offset. It has four
subtractors and four accumulators. Each cycle it takes one reference pixel
and the four current pixels at the same block position (i, k), and adds the
four absolute differences to the four sums.

## Partial solutions: searching ahead into the next column

Block A of a quad needs horizontal offsets -L..R, block B needs -L..R
relative to its own position, which is N further right. A window wide enough
for all of them, 2N+L+R columns, overlaps heavily with the window of the
column of quads to the left, which had the same pixels in its right part.

The estimator avoids fetching that left part a second time. While a column
of quads is processed, a second PE array, the *behind* array, also matches
blocks A and C of the quad one column to the right (at qx+2N) against the
search pixels already in the window, at the horizontal offsets -L..R-N,
those that fall into this window. Two extra comparators keep the best of
those candidates, the *partial solution*. It is stored in a shift register
with one entry per block row of the frame (FH/N entries, 36 for QCIF with
N = 4). When the next column reaches that quad, the partial solutions seed
the comparators of its blocks A and C, which then only need to see the
remaining offsets.

So the window only has to reach quad offsets S..R+N, with

    S = min(R-N+1, N-L)

S is the leftmost offset that block B (offset -L, i.e. N-L for the quad)
or block A (the first offset the partial solution did not cover, R-N+1)
still needs. The window is W = 2N+R-S columns wide. With the defaults
(N = 4, L = 4, R = 3) S = 0 and W = 11 instead of 15. The scheme needs
S <= 0 (R < N or L >= N) and L+R >= N; `me_ctrl` stops elaboration
otherwise. In the first column there is no partial solution, and none is
needed: offsets left of S <= 0 lie outside the frame there.

## Datapath

```
 reference   +---------------+   y: one pixel per cycle, broadcast
 memory ---->| search window |---------+----------------------+
             | H x W         |         |                      |
             +---------------+  +------v-------+       +------v-------+
 current  +-------------+ x[4]  | front array  |       | behind array |
 memory ->| quad buffer |------>| R+N-S+1 PEs  |       | L+R-N+1 PEs  |
    |     +-------------+       | dx = S..R+N  |       | lanes A, C   |
    |     +-------------+       +------+-------+       +--^---+-------+
    +---->| next buffer |--------------|------------------+   |
          +-------------+              | PE sums at end of pass|
                                +------v-----------------------v--+
                                |  result register (NPE entries)  |
                                +------+-----------------------+--+
                                       | one PE per cycle      |
             +-------+-------+-------+-v-----+         +-------v--------+
             | cmp A | cmp B | cmp C | cmp D |         | cmp A', cmp C' |
             +---^---+-------+---^---+-------+         | (next column)  |
                 |               |                     +-------+--------+
                 |  seed at quad |     partial-solution        | push at
                 +-------+-------+     shift register          | quad end
                         +-------------(FH/N entries)<---------+
```

- **Search window** (`me_search_sr`): H = 2N+U+D rows by W = 2N+R-S
  columns of 8-bit pixels, starting S columns right of the quad. Pixels
  arrive one per cycle into a staging row. Writing a row's last pixel shifts
  the whole window up one row and appends the staging row at the bottom.
- **Quad buffers** (`me_cur_buf`, twice): the 2N x 2N current pixels of this
  quad, and the left half (blocks A and C) of the quad one column to the
  right. Each is read four at a time, one pixel at the same position in each
  block.
- **PE arrays** (`me_pe_array`, twice): each is a chain of `me_pe4`. The
  current pixels enter PE 0 and step one PE per cycle, while the reference
  pixel is broadcast to all PEs. PE p of the front array meets window column
  q together with current column q - p, which makes it quad offset
  dx = p + S. The behind array gets the next quad's pixels OFF = 2N-L-S
  columns later, so its PE p works on offset p - L of that quad. Only its
  lanes A and C are used (`LANE_MASK`).
- **Result register** (`me_result_sr`): at the end of a pass it takes all
  PEs' sums in one cycle, front array first. It then shifts them out, one PE
  per cycle, while the arrays already work on the next pass.
- **Comparators** (`me_cmp`): four for the blocks of this quad and two for
  blocks A and C of the next column's quad. Each turns the offset into its
  block's displacement and drops candidates outside the block's range or
  outside the frame. It keeps the smallest SAD, starting from a loaded value:
  empty, or the partial solution.
- **Partial-solution register** (`me_partial_sr`): a FIFO of (A, C) pairs,
  pushed when a quad finishes (except in the last column), popped when a
  quad starts (except in the first column).
- **Address generator** (`me_addr_gen`) and **sequencer** (`me_ctrl`).

## The schedule of one quad

`me_ctrl` runs these phases one after another:

| phase  | cycles | what happens |
|--------|--------|--------------|
| CUR    | 4N²    | read the quad's current pixels in raster order; pop the partial solutions |
| CURN   | 2N²    | read blocks A and C of the next column's quad (not in the last column) |
| SRCH   | rows x W | read new reference rows: all H for the first quad of a column, 2N for the others |
| SETTLE | 1      | the last read lands |
| PASS + GAP | (U+D+N+1) x (N·W + 1) | one pass per quad offset dy = -U..D+N (see below) |
| DRAIN  | NPE+1  | the last pass's sums go through the comparators |
| OUT    | 1      | `res_valid`: the four results; push the next column's partial solutions |

NPE = (R+N-S+1) + (L+R-N+1) is the number of PEs in both arrays.

In a pass for offset dy, the window rows dy+U .. dy+U+N-1 are streamed, W
pixels each, one pixel per cycle. Together with each row, the matching
current row enters the front array during the first N columns, and the next
quad's row enters the behind array during columns OFF..OFF+N-1; outside
those the pixels are marked invalid. At the end of a pass, front PE p holds
the four SADs of quad offset (p + S, dy), and behind PE p those of the next
quad's blocks A and C at offset (p - L, dy).

The pipeline alignment is easy to get wrong, so here it is in full. The
sequencer addresses the window and the buffers in cycle t. The reference
pixel is registered, and the current pixels are registered by PE 0. Enable
and clear are registered as well, so the PEs accumulate in cycle t+1. The
last accumulation of a pass therefore happens one cycle after the last
address, in the gap cycle. The sums are loaded into the result register one
cycle after that, while the arrays are held (`en` = 0). The first cycle of
the next pass restarts the sums with `clr`.

Cycles per quad:

    4N² + 2N² + rows·W + 1 + (U+D+N+1)·(N·W+1) + NPE + 2      rows = H or 2N

without the 2N² term in the last column. From `start` to `done`, add 2
cycles. With the defaults a quad takes 816 cycles at the top of a column and
739 below it (784 and 707 in the last column). A 176 x 144 frame takes
293,764 cycles.

## Memory traffic

Moving down a column by 2N rows, the new window shares its top U+D rows with
the old one. Only 2N rows are fetched, and the rest stay in the shift
register. Reference pixels outside the frame are not fetched; the window
stores 0 for them, and no candidate that would use them is counted. Per
column of quads, every frame row is therefore read once, across the in-frame
part of the window width W. Neighbouring columns' windows overlap by
W - 2N = R-S columns, which are read again; thanks to the partial solutions
that is 3 columns with the defaults instead of L+R = 7.

For a 176 x 144 frame with the defaults there are 34,416 reference reads
(1.36 per pixel; 46,512 without the partial solutions, with a 15-column
window). The price is on the current frame: blocks A and C of every quad
outside the first column are read twice, once early for the behind array,
giving 37,440 current reads instead of 25,344. A plain full search reading
every candidate block afresh would make 64 x 16 = 1024 reference reads per
block, about 1.6 million.

## Results

`res[j]` for block j (0 = A, 1 = B, 2 = C, 3 = D) is an `mv_result_t`:

- `found`: at least one candidate lay inside the frame. This is always true
  when the range includes (0, 0).
- `sad`: the smallest SAD.
- `mv_x`: the horizontal displacement, negative meaning left.
- `mv_y`: the vertical displacement, negative meaning up.

Among equal SADs the smallest `mv_y`, then the smallest `mv_x` wins (the
first minimum in raster order). Because this does not depend on the order in
which candidates arrive, merging the partial solution gives the same result
as a plain full search.

## Interface of `me_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | pulse while idle: process one whole frame |
| `busy`, `done` | out | 1 | frame running; one-cycle pulse at the end |
| `cur_rd_en`, `cur_rd_addr` | out | 1, clog2(FW·FH) | current-frame read, address y·FW + x |
| `cur_rd_data` | in | 8 | the pixel, one cycle after `cur_rd_en` |
| `ref_rd_en`, `ref_rd_addr`, `ref_rd_data` | out/out/in | 1, clog2(FW·FH), 8 | the same for the reference frame |
| `res_valid` | out | 1 | one-cycle pulse per quad |
| `res_qx`, `res_qy` | out | 16 | the quad's top-left pixel |
| `res[4]` | out | `mv_result_t` | the four blocks' results |
| `stat_ref_reads`, `stat_cur_reads` | out | 32 | reads since `start` |

Quads are visited down the leftmost column first, then column by column to
the right.

## Parameters

| parameter | default | meaning |
|-----------|---------|---------|
| `N` | 4 | block size (N x N) |
| `L`, `R` | 4, 3 | search range left / right |
| `U`, `D` | 4, 3 | search range up / down |
| `FW`, `FH` | 176, 144 | frame size (QCIF); both must be multiples of 2N |

The ranges must satisfy R < N or L >= N, and L+R >= N (see "Partial
solutions").

These defaults are the paper's main case: 4 x 4 blocks with a -4..+3 range,
its configuration "R1". Sums are 16 bits, which is enough up to N = 16.
Motion vector components are 8-bit signed.

The paper also evaluates these configurations, and all except R3 run by
changing parameters:

- R2: N = 8, search left 7, right 7, up 8, down 7.
- Search ranges -8..+7 and -16..+15 with 4 x 4 blocks.
- R3: N = 16. It cannot be built for a 176-pixel-wide frame, because a quad
  would be 32 pixels wide and 176 is not a multiple of 32.

| configuration | PEs (front + behind) | window (rows x columns) | cycles per 176x144 frame | reference reads |
|---------------|-----|--------|--------------------------|-----------------|
| N=4, -4..+3 (default) | 8 + 4 | 15 x 11 | 293,764 | 34,416 |
| N=8, x -7..+7, y -8..+7 | 16 + 7 | 31 x 23 | 519,227 | 35,424 |
| N=4, -8..+7 | 16 + 12 | 23 x 19 | 726,020 | 58,608 |
| N=4, -16..+15 | 32 + 28 | 39 x 35 | 2,207,236 | 105,408 |

For the wide ranges S is negative (-4 and -12): the front array then also
covers offsets left of the quad that block B needs, and the partial
solutions save fewer columns.

## Departures from the published architecture

- **Latency.** The paper gives a latency of (N + right_search) x N clocks, for
  example 28 for 4 x 4 blocks with a -4..+3 range. The paper does not spell out
  an array organisation that reaches this. The engine here uses two one-dimensional PE
  arrays, processes one vertical offset per pass, and loads data and computes
  one after the other. It takes 707 to 816 cycles per quad of four blocks. The
  data reuse is as described; the speed is not.
- **Partial solutions.** The behind array, the partial solutions and their
  shift register of 144/N entries follow the paper. How the offsets are split
  between the arrays (S, the behind array's offsets -L..R-N), the second
  current buffer, the two extra comparators for the next column and the
  result register that serialises the PE sums are this design's.
- **Scaling with the search range.** The paper scales its hardware with the
  right-hand range: two subtractors per PE and two PE arrays when
  right_search = N, four and three at 2N, six and four at 3N. Here every PE
  always has four subtractors (two used in the behind array) and there are
  always two arrays. The range sets the number of PEs and the window size
  instead.
- **Frame edges, tie rule, memory timing, reset** are not specified by the
  paper and are this design's choices, as described above.
- The paper states its cost function as a mean absolute error. The SAD is used
  here: it has the same minimum and needs no division.

## Files

`rtl/`: `me_pkg` (types), `me_top`, `me_ctrl`, `me_addr_gen`,
`me_cur_buf`, `me_search_sr`, `me_pe4`, `me_pe_array`, `me_result_sr`,
`me_cmp`, `me_partial_sr`. Each file opens with a description of its timing.

`tb/`:

- One self-checking testbench per module, `tb_<module>.sv`.
- `tb_me_top`: a small 32 x 24 frame, end to end.
- `tb_me_full`: one full QCIF frame at the default parameters.
- `tb_me_workloads`: the three other configurations side by side, through
  `me_tb_env`.
- `tb_me_params`: unusual parameter sets, end to end. They cover L > N,
  R = 0, R > N, U = D = 0, N = 2 and N = 3.
- `me_tb_body.svh`: the shared end-to-end checker. It builds a random
  reference frame and current blocks copied from it at random displacements,
  some noisy and some pure noise. It runs a plain full search in SystemVerilog
  as the reference model. It also checks the cycle count and the read counts
  against the formulas above, and counts that quad processing, window-row
  reuse, edge clipping and results taken from a partial solution all occur.

## Simulating

From the repository root, with Verilator 5:

    verilator --binary --timing --assert -Irtl -I. -y rtl -y tb \
        --top-module tb_me_full rtl/me_pkg.sv tb/tb_me_full.sv -o sim
    ./obj_dir/sim

Every testbench ends with `TB_RESULT checks=<n> failures=<m>`. The full frame
runs in well under a second, and `tb_me_workloads` in about ten seconds.
