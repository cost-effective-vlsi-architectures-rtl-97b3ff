# Full-search block-matching motion estimation: systolic and semi-systolic engines

Block-matching motion estimation finds, for an N x N block of the current
picture (the *reference block*), the displacement (m, n) in a search range
[-P, P-1] x [-P, P-1] of the previous picture that minimises the sum of
absolute differences (SAD; called MAD below):

    MAD(m, n) = sum_{i,j} | R(i, j) - S(i + n + P, j + m + P) |

There are (2P)^2 candidates, and every one is evaluated. The two engines here
use N x N processing elements (PEs), one per reference pixel, and produce one
candidate MAD per clock. They read each search pixel only once, over two
8-bit input buses. At the default N = P = 16 that means 256 PEs and 1024
candidate cycles per motion vector.

The key idea is an *overlapped search-data flow*. Candidates are visited row
by row. Two horizontally adjacent candidates share N-1 of their N columns of
search data. So if a PE row sees the search row as a stream, one word per
cycle, it can form the row distortion of one candidate per cycle.

The search area is (2P+N-1) wide. It is split into two parts:
- **LS**, the left 2P columns. This is the "non-boundary" data.
- **RS**, the right N-1 columns. This is the "boundary" data.

These travel on separate streams. Near the end of a search row, PE column c
needs data from the next 2P-wide window of the row. Each column therefore
switches from LS to RS for a number of cycles that grows by one per column.
This is the *stair* control, made by a ring counter. Rows of PEs see
successive search rows. The search rows are delayed by buffers on chip (the
*stream memory*), so every pixel enters once and is reused by all N PE rows.

Two array organisations implement this flow:

| | semi-systolic (SSA) | systolic (SA) |
|---|---|---|
| module | `ssa_me_processor` | `sa_me_processor` |
| search data | broadcast on two buses per PE row | shifted right to left through LS/RS registers in every PE |
| partial MAD | moves right along a row (broadcast FIR) | moves up a column, one register per PE |
| buffer between PE rows | full row buffer, 2P+N-1 words (pointer-addressed RAM) | delay line of 2P-N+1 stages per stream (shift register) |
| storage at N=P=16 | 256 reference + 705 buffer bytes | 768 PE register bytes + 510 delay-line bytes |
| array latency (LAT0) | N-1 | 2N-1 |

The top, `fsbma_me_top`, places three independent units side by side, each
with its own ports:
- `ssa_*`: the semi-systolic engine.
- `sa_*`: the systolic engine.
- `wr_*`: an extended-range unit, `wide_range_me`. It is four semi-systolic
  processors that together search [-2P, 2P-1] in the time one processor
  needs for [-P, P-1].

## Processor interface (both engines)

| port | dir | width | meaning |
|---|---|---|---|
| `start` | in | 1 | start a search; may be given while busy (queued, back-to-back) |
| `mode` | in | `me_mode_e` | `MODE_STANDALONE`, `MODE_PARTIAL`, `MODE_LAST` (cascade, see below) |
| `ls_in`, `rs_in` | in | 8 | search-area streams |
| `ref_load`, `ref_in` | in | 1, 8 | reference block shift-in |
| `error_in` | in | ERR_W | partial MAD from an upstream processor |
| `ls_out`, `rs_out` | out | 8 | search streams as seen by the top PE row |
| `busy` | out | 1 | a search is running or results are pending |
| `mv_valid` | out | 1 | one-cycle pulse; `mv_x`, `mv_y`, `mad_out` valid and held |
| `mv_x`, `mv_y` | out | signed, log2(2P)+1 | motion vector, -P .. P-1 |
| `mad_out` | out | ERR_W | minimum MAD |
| `error_valid`, `error_out` | out | 1, ERR_W | per-candidate partial MAD (partial mode) or minimum MAD |

Parameters are `N` = 16, `P` = 16, `PIX_W` = 8 and
`ERR_W` = `PIX_W + 2*clog2(N) + 2` = 18. The PE word length is
`PIX_W + clog2(N)` = 12 bits. That is enough for one row (SSA) or one column
(SA) of N absolute differences.

### Search-area input format

The search area is (2P+N-1) x (2P+N-1) pixels. Candidate (x, y), with x and
y in 0..2P-1, is displacement (x-P, y-P). Its top-left pixel is S(y, x).

- Row y of the area is sent in one *row period* of 2P cycles. LS word p
  (column p) goes on `ls_in` in phase p.
- The RS words of row y (columns 2P .. 2P+N-2) go on `rs_in` in phases
  0 .. N-2 of the *next* period.
- Periods follow each other without gaps. Period 0 starts the cycle after the
  clock edge that samples `start`.
- After the last row's LS period, `rs_in` carries that row's RS words for
  N-1 more cycles. `rs_in` is ignored in the remaining phases.

The same format drives both engines. With `start` sampled at edge 0:

- **Preload (INIT).** N-1 row periods, 2P(N-1) cycles. Rows 0..N-2 fill the
  buffers.
- **EXEC.** 2P periods. In the SSA engine candidate (x, y) leaves the PE
  array in cycle 2P(N-1) + 2P*y + x + N - 1. In the SA engine it leaves N
  cycles later.
- **Adder tree and compare-select.** Two more register stages. `mv_valid` is
  high in the cycle after edge 2P(N-1) + (2P)^2 + N + 1 (SSA), or
  2P(N-1) + (2P)^2 + 2N + 1 (SA). At the defaults these are edges 1521 and
  1537.
- **Back to back.** A `start` given while busy makes the next search follow
  directly. There is then one motion vector every (2P)^2 + 2P(N-1) cycles:
  1504 at the defaults, of which 1024 produce candidates.

### Reference loading

N*N pixels are shifted into a chain through all PEs while `ref_load` is high.
They go in reverse raster order: R(N-1,N-1) first, R(0,0) last. The reference
must stay still while the array produces candidates. An assertion in each
processor checks this. It may be reloaded during the next search's preload,
once the previous candidates have left the array. The testbenches show the
timing (`load_ref` in `tb/ssa_tb_body.svh`).

## How the stair control works

A row period has phases p = 0 .. 2P-1.

In the **SSA engine** all PE rows see a row's words at the same time.
Column c must add the word N-1-c cycles before the right-most column does. At
the start of a period, column c still needs the last c words of the
*previous* row's window. Those are RS words, which arrive in phases 0..N-2
of the following period. So column c selects RS while p < c.

The `ring_counter` fills a MAX(2P, N)-bit register with ones, one more per
cycle, and clears it at the end of each period. Column c's control is the
inverse of tap c-1.

In the **SA engine** the search words move through the PEs. A word sent in
phase p reaches column c N-c cycles later, and the rows are skewed. So the
RS-select window of column c lies at the *end* of the period: p >= 2P - c,
tap 2P-1-c (`AT_END = 1`). The controls enter at the bottom row and climb one
row per cycle, with the partial sums. The controller restarts the ring
counter so that its period lines up with the array's phase (row phase N-2 of
the first preload period).

The controller (`me_controller`) counts:
- phases, with a binary pointer that addresses the SSA row buffers;
- periods, through the INIT → EXEC (→ DRAIN) states;
- candidates, with an emitter that tags each array output with
  valid/first/last and (x, y).

The emitter starts LAT0 cycles into EXEC and runs for (2P)^2 cycles. So the
tags stay right when the next search's preload already runs underneath.

## Stream memories

**SSA (`stream_memory_bank`).** This is a chain of N-1 `stream_memory_row`
buffers. Each holds 2P LS words and N-1 RS words, 2P+N-1 in total. Each is
addressed by the phase pointer, reading the old word and writing the new one
at the same address in the same cycle. That is exactly a one-period delay.
The bottom PE row takes the input buses directly. Buffer r feeds PE row r
from what PE row r+1 saw one period earlier.

**SA (`sa_stream_memory`).** A word leaving the left end of PE row r+1 has
spent N cycles in the row. Row r, one search row later and skewed by one
cycle, needs it 2P+1 cycles after it entered row r+1. Each link between rows
is therefore a 2P-N+1 stage shift register, one for LS and one for RS. This
requires N ≤ 2P+1, which an elaboration-time assertion checks.

## Cascading: larger reference blocks

Each engine has a `mode` input and an `error_in`/`error_out` pair, so that
several processors can share a larger reference block. Two processors
handle a 2N x N block, each taking half of the rows:

- The upstream processor runs in `MODE_PARTIAL`. It sends every candidate's
  MAD out on `error_out` with `error_valid`.
- The downstream processor runs in `MODE_LAST`. It is started one cycle
  later, and its search stream is offset by N rows. It adds `error_in` in
  the second adder-tree stage and reports the MV of the full block.

`MODE_STANDALONE` ignores `error_in`. Both top testbenches build exactly
this chain from the top plus a second pair of processors.
They check the combined MV against a software full search of the 2N-row
block.

## Extended search range: four processors and a merge chain

`wide_range_me` covers displacements in [-2P, 2P-1] x [-2P, 2P-1]. A single
processor would need (4P)^2 cycles for that. Instead, the (4P+N-1)-square
search area is cut into four (2P+N-1)-square sub-areas that overlap by N-1
rows and columns.

- Processor k (k = 0..3) takes the sub-area at column 2P*(k%2), row
  2P*(k/2). It gets that sub-area on its own `ls_in[k]`/`rs_in[k]` pair, in
  the usual input format.
- All four share the reference input and are started together.
- Their local results go up a chain of `mv_merge` stages. Processor 0 is at
  the bottom, fed with MV 0 and the largest possible MAD.
- Each stage adds its quadrant offset (-P or +P in each direction) to the
  local vector. It keeps the smaller MAD; on a tie it keeps the result from
  below.
- Each stage is one register. The result therefore appears 4 cycles after
  the processors' own `mv_valid`, and `mv_x`/`mv_y` are one bit wider.

## Departures from the source description and open points

- **Throughput.** The source counts 1024 cycles per MV at N=P=16. It says
  that the preload of 2P(N-1) cycles must then be hidden by double-buffering
  the PE registers and stream memory. That double buffering is not built, so
  a search costs 1504 cycles back to back. That is 59.8K MV/s at 90 MHz. The
  source's 87.9K MV/s assumes 1024 cycles.
- **Extended range details.** The unit uses the semi-systolic engine for
  all four processors. The chain order, the one-register merge stages and
  the tie rule between quadrants are this design's choices.
- **Larger-block split.** The larger-block cascade is exercised with the
  block split by rows (two N x N halves stacked). The source's drawing puts
  the two halves side by side. The processors do not care: each is fed its
  own search sub-area.
- **Reference input.** The reference block arrives on its own port. It is
  shifted through a chain in the PEs rather than over the search buses.
- **SSA buffer size.** The SSA stream memory is sized (N-1)(2P+N-1) words,
  per the architecture description. A total elsewhere in the source is twice
  that.
- **SA delay lines.** The SA engine buffers both LS and RS between rows,
  2(N-1)(2P-N+1) words, matching the source's storage total. One passage
  mentions only the LS part.
- **Ties and MV format.** Among equal MADs, the first candidate in scan
  order wins: y outer, x inner, using a strict `<`. The MV is reported as
  signed (x-P, y-P).
- **Cascade mode encoding.** The `mode` encoding (three values) and the
  one-cycle start offset between cascaded processors are this design's
  choices.
- **Fixed delay.** The adder tree plus compare-select take two register
  stages in total.

## Files

`rtl/` holds one module per file:

| file | contents |
|---|---|
| `me_pkg` | mode/state enums and `cnt_w` |
| `ssa_pe`, `ssa_pe_array` | SSA datapath |
| `stream_memory_row`, `stream_memory_bank` | SSA buffers |
| `sa_pe`, `sa_pe_array`, `sa_stream_memory` | SA datapath and buffers |
| `ring_counter`, `me_controller` | control |
| `adder_tree`, `compare_select` | result path |
| `ssa_me_processor`, `sa_me_processor` | the two engines |
| `mv_merge`, `wide_range_me` | extended-range chain stage and four-processor unit |
| `fsbma_me_top` | the three units side by side |

`tb/` holds one self-checking testbench per module, `tb_<module>.sv`. Each
prints `TB_RESULT checks=N failures=M` and has a watchdog. The processor
testbenches compare every MV and MAD with a software full search, and check
the cycle of `mv_valid` and the back-to-back spacing. They run at small
sizes (N=4, P=4..6), each with its own body include.

The top testbenches:
- **`tb_fsbma_me_top`** runs at N=4, P=6. It runs standalone and
  back-to-back searches and a two-processor cascade on both engines, plus
  one extended-range search with the best match planted outside [-P, P-1].
  It counts each mechanism: boundary (RS) selection, back-to-back start,
  partial mode, last mode and an extended-range result. A mechanism that
  never occurred counts as a failure.
- **`tb_fsbma_me_top_full`** does the same with the top at its defaults
  (N=P=16).

`tb_wide_range_me` also runs two extended-range searches back to back.
`tb_search_feeder.sv` is a helper that streams a search area in the input
format.

### Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb -Itb \
        rtl/me_pkg.sv tb/tb_fsbma_me_top.sv --top-module tb_fsbma_me_top -Mdir obj
    ./obj/Vtb_fsbma_me_top

Replace the testbench name to run another one; `-y` lets Verilator find
each module in its own file. The remaining warnings are expected:
- unused processor outputs inside `wide_range_me`;
- the controller's `adv`/`phase` outputs, left open in the SA engine;
- reset used both as an asynchronous reset and in assertion `disable iff`
  clauses.

The full-size top build takes a few minutes; the simulation itself takes
seconds.

To change the configuration, override `N`, `P` and `PIX_W` on a processor or
on the top. `ERR_W` follows them by default. The design needs
2 ≤ N ≤ 2P+1.
