# Edit distance on a chain of row workers

The edit distance between two strings S (length m) and T (length n) is the
smallest number of single-character inserts, deletes and substitutions that
turn S into T. The usual way to compute it fills an (m+1) x (n+1) cost matrix:

    M[i][0] = i,  M[0][j] = j
    M[i][j] = min( M[i-1][j-1] + (S[i] != T[j]),   match / substitute
                   M[i-1][j]   + 1,                 delete
                   M[i][j-1]   + 1 )                insert

and the answer is M[m][n]. Every cell needs its left, top and diagonal
neighbours. On a processor each of those is a memory access.

This design gives one row of the matrix to each hardware **row worker** and
links W workers in a chain:

- Worker k computes row i.
- Every score it produces is both the next column's *left* value inside the
  worker and the *top* value that worker k+1 needs for row i+1.
- Each character T[j] passes down the chain next to the scores.
- Each worker keeps S[i] from the start of its row.

Inside a group of W rows (a **strip**) no score and no character goes to
memory. Only the first worker reads the row above the strip, and only the last
worker writes the strip's bottom row. The workers run as a diagonal wavefront:
while worker k is on cell (i, j), worker k+1 is on (i+1, j-1). Only one row of
the matrix (n+1 words) has to be stored between strips. W, the scratchpad size
and the choice of schedule are all that limits how large a problem can be run.

The RTL is written in SystemVerilog (IEEE 1800-2017) and synthesizes. The top
module is `ed_accel`.

## The row worker (`ed_row_worker`)

A worker is made of two units joined by two internal channels.

**Match unit** (`ed_match_unit`):
- Receives a header and then the T[j] stream from the previous worker, and
  forwards both to the next worker.
- Compares S[i] with T[j].
- Adds the mismatch cost to the diagonal value M[i-1][j-1]. This gives the
  match/substitute candidate, which goes to the min unit.

**Min unit** (`ed_min_unit`):
- Receives the top value M[i-1][j] from the previous worker.
- Forms delete = top+1 and insert = left+1, and takes the minimum of those
  two and the match/substitute candidate.
- Sends the score down the chain and keeps it as the next left value.
- Sends top back to the match unit, where it becomes the next column's
  diagonal. So the diagonal is never fetched: it is the previous column's top.

Ties are broken in this order: match/substitute, then delete, then insert.
With this order the worker reproduces the worked example sort -> sport (last
row 4 3 3 3 2 1, distance 1).

**Rate.** The diagonal for column j+1 comes out of column j in the min unit.
It goes back to the match unit, and returns as a candidate one cycle later.
This loop sets the worker's pace to **one column every two cycles**, so W
workers reach at most W/2 cells per cycle. On 1024 x 1024 strings, with a
memory latency of 4 cycles and the cell outputs always drained, the measured
throughput is:

| Schedule | Workers | Cell outputs | Cells per cycle | Source's figure for its programmable fabric |
|---|---|---|---|---|
| strip through memory | 16 | on | 5.26 | 1.11 |
| strip through scratchpad | 14 | on | 6.75 | 1.53 |
| tiled, D = 512 | 10 | on | 4.70 | 1.12 |
| strip through memory | 16 | off | 5.26 | 2.14 |
| strip through memory | 14 | off | 4.55 | - |
| strip through scratchpad | 14 | off | 6.75 | 1.80 |
| tiled, D = 512 | 14 | off | 6.43 | 1.88 |

Over string lengths 16 to 4096, the two schedules that need no full row in
the scratchpad both speed up as strips get longer: per-strip synchronisation
is amortised over more columns.

| Length | 16 | 64 | 256 | 1024 | 4096 |
|---|---|---|---|---|---|
| strip through memory | 1.51 | 3.52 | 4.27 | 4.55 | 4.64 |
| tiled, D = min(1024, n/2) | 0.77 | 2.91 | 5.16 | 6.43 | 6.73 |

The cell outputs cost nothing here because they leave on their own ports. In
the source they are memory writes, which is why its path runs are slower.
Strip mining through memory falls short of W/2 because every strip shares
the one memory port for the row, T and the write-back.

All the channels use valid/ready handshakes. A `ready` never depends on the
same channel's `valid` further down the chain:
- The links between workers are two-entry FIFOs (`ed_fifo`) whose `ready`
  depends only on their fill level.
- The two internal channels count as free only when they are empty.

As a result no combinational path runs along the chain, whatever W is.

**Per-cell output.** When `path_en` is high, each worker reports every cell it
computes on its own output, `path_valid/ready/data[k]`. The token holds the
row, column, score and the edit chosen (`P_MATCH`, `P_SUB`, `P_INS`,
`P_DEL`). If a consumer stores this stream it gets the full score and path
matrices: this is the **naive** schedule, with O(mn) storage. The consumer
must keep the port drained; a worker stalls while its output is full.

## Headers, seeds and bypass rows

A worker does not fetch S[i] itself. Each row segment on the T channel is
opened by a **header** (`t_tok_t` with `hdr=1`) that carries:
- S[i], the row number and the first column;
- for tiling, the left seed M[i][c-1] and the diagonal seed M[i-1][c-1];
- a `bypass` flag.

A worker takes the first header that reaches it and passes the later ones on,
so the headers for workers 1..W are sent one after another ahead of the T
characters.

A row segment starts in one of three ways:

- **Strip mining** starts at column 0. The first top value is M[i-1][0], so
  M[i][0] = top + 1, and this also gives the left and diagonal for column 1.
  No seeds are needed.
- **Tiling** starts at column c > 0 with the seeds from the header. The
  worker also sends its last score (the tile's right edge) on its `edge`
  output.
- **Bypass** covers rows past m: in the last strip, when m is not a multiple
  of W. The worker passes each top value through unchanged, so the last real
  row reaches the sink as it is and S and T need no padding.

## Schedules (`mode`)

**`MODE_STRIP_MEM` (0): strip mining through memory.**
- Strips of W rows cover columns 0..n.
- The first worker reads the row above the strip from `row_base` in memory,
  together with T.
- The last worker's row is written back over it.
- Memory traffic is about 3·(m/W)·n words.

**`MODE_STRIP_SP` (1): strip mining with the row in the scratchpad.**
- Same order as mode 0.
- Only the first strip reads the row from memory, and only the last strip
  writes it back. Between strips the row lives in the scratchpad.
- T is still read from memory for every strip.
- Needs n+1 <= `SP_WORDS`.

**`MODE_TILED` (2): column strips of tiles W x D.**
- The matrix is cut into column strips of width D = `tile_d`. The design walks
  them left to right and, inside each, walks its strips top to bottom.
- The first strip of a column strip reads its T slice and row slice from
  memory. The last worker stores both in the scratchpad: T in the upper half,
  the row slice in the lower half. Later strips read them from there.
- Each worker starts its row at the column strip's first column, seeded from
  the *input column array*. It writes its last score to the *output column
  array*.
- The two column arrays (`col_base0`, `col_base1`, m+1 words each) swap roles
  after every column strip.
- The corner cell M[0][c_end] is the diagonal seed of row 1 in the next
  column strip. It is copied to word 0 of the output array while the first
  strip reads it.
- Needs 0 < D <= `SP_WORDS`/2. A good choice is D = min(SP_WORDS/2, n/2).
- Memory traffic is about 4·n·m/D + 3n words, which is less than strip mining
  once D > 4W.

**Measured memory traffic** (1024 x 1024, W = 14, D = 512; K = ceil(m/W) strips,
C = ceil(n/D) column strips). The full-size testbench checks these counts
exactly, and the small end-to-end testbench checks the same formulas on
every random shape:

| Schedule | Reads | Writes | Formula (reads + writes) |
|---|---|---|---|
| strip through memory | 152,650 | 75,850 | m + K(2n+1) + K(n+1) |
| strip through scratchpad | 77,825 | 1,025 | m + Kn + 2(n+1) |
| tiled | 8,192 | 3,074 | 3mC + 2n + mC + C + n |

**Synchronisation.** Every strip ends with a full synchronisation. The next
strip starts only when all three of these hold:
- the sink has stored the whole row;
- every worker is idle;
- every memory write has been accepted.

Draining the wavefront costs about W column times per strip. Over m/W strips
this adds a term of order m to the running time, which is of order mn/W + m.

**Refused configurations.** The controller raises `done` with `cfg_error` and
does nothing if:
- strip mining with the scratchpad has n+1 > `SP_WORDS`;
- tiling has D = 0 or D > `SP_WORDS`/2;
- m or n is 0.

## Feeding and draining the chain

- **`ed_controller`** runs the schedule. For every segment it sends
  `ed_feeder` a list of tagged read requests (`feed_req_t`): seeds, S[i] or
  bypass, T[j], top. It also tells `ed_sink` where the last worker's row goes.
- **`ed_feeder`** is the multiplexer at the head of the chain.
  - It sends each request to memory or to the scratchpad, and keeps the tags
    in an in-order queue.
  - Returned words wait in one queue per source and are consumed in request
    order, so the two sources can have different latencies.
  - At most `OUTSTANDING` requests are in flight. This is why the memory
    response path needs no `ready`.
- **`ed_sink`** is the demultiplexer at the tail.
  - It writes the last worker's scores to memory or to the scratchpad.
  - In tiled mode it also stores the passing T slice.
  - It reports `seg_done` and the final score.
- **`ed_scratchpad`** is one 1-read/1-write array of `SP_WORDS` 32-bit words
  with a one-cycle read.
- **`ed_mem_arbiter`** merges the design's memory requesters onto the single
  port, with fixed priority in this order: sink writes, the corner write, the
  W edge writes, feeder reads. Writes go first so that a strip's row is in
  memory before anything reads it again.

## Top-level interface (`ed_accel`)

| Signal | Dir | Meaning |
|---|---|---|
| `start` | in | pulse to start with the register values below |
| `mode` | in | `mode_e`: 0 strip/memory, 1 strip/scratchpad, 2 tiled |
| `path_en` | in | enable the per-cell outputs |
| `m`, `n`, `tile_d` | in | lengths of S and T (16 bits each), tile width |
| `s_base`, `t_base` | in | word addresses of S and T, one character per word (low 8 bits) |
| `row_base` | in | cost row, n+1 words, preloaded with M[0][j] = j |
| `col_base0`, `col_base1` | in | column arrays, m+1 words; for tiling, preload array 0 with M[i][0] = i |
| `busy`, `done`, `cfg_error` | out | status; `done` is a one-cycle pulse |
| `score` | out | M[m][n], valid at `done` |
| `mem_req_valid/ready/we/addr/wdata` | | memory requests, in order |
| `mem_rsp_valid/data` | in | read data in request order, always accepted |
| `path_valid/ready/data[W]` | | per-worker cell outputs |

After `done` the cost row holds the matrix's last row, so M[m][n] is also at
`row_base + n`. In tiled mode word `row_base + 0` is not rewritten.

The first row is read from memory, so any top boundary can be given. That
makes the design usable as the forward pass of the linear-space trace-back
methods (Hirschberg, Chowdhury), which solve sub-blocks with given
boundaries. Only tiling reads the left boundary from column array 0; strip
mining assumes M[i][0] = M[i-1][0] + 1 below the given corner.

## Parameters

| Parameter | Default | Where the number comes from |
|---|---|---|
| `W` | 14 | workers in one block of 32 processing elements with the two control elements of the scratchpad schedule; the source also runs 16 (memory strips) and 10 (tiling with paths) |
| `SP_WORDS` | 2048 | 8 KB scratchpad of 32-bit words |
| `LINK_DEPTH` | 2 | own choice |
| `OUTSTANDING` | 8 | own choice |

Scores are 32 bits wide and characters 8 bits. The costs are all 1 and are set
in `ed_pkg`. Row and column indices are 16 bits, so m, n <= 65535.

Synthesis at the defaults gives about 4,100 cells and 7,300 flip-flop bits,
plus 64 Kbit of scratchpad.

## How far it follows its source, and where it departs

The architecture comes from a study that maps edit distance onto a spatial
array of small programmable processing elements. These parts follow that
study:
- the row-worker split into a match/substitute part and a delete/insert/min
  part;
- the chaining of T and of scores between workers;
- the three schedules and their memory behaviour;
- the column arrays and the scratchpad use in tiling;
- the tile width limit;
- the default sizes.

The following are this design's own:

- **Fixed-function logic.** Each of a worker's two processing-element
  programs becomes a small state machine. The control elements of the source
  become `ed_feeder`, `ed_sink` and `ed_controller`.
- **No caches, DRAM, host or mesh network.** The cache hierarchy is replaced
  by one in-order word port. The host is replaced by input registers with
  `start`/`done`. The mesh links become point-to-point FIFOs.
- **Headers instead of padding.** S[i] and the seeds travel in headers, and
  rows past m are bypass rows. The source pads S (and T for tiling) to a
  multiple of the strip or tile size instead.
- **The corner copy.** The tiling schedule needs M[0][c_end] for the next
  column strip. The source does not say where it comes from, so here the
  feeder copies it to the output column array.
- **The path format.** Paths are not written to memory by the design. They
  leave on the per-cell ports with their scores, and the naive schedule is
  therefore "strip mining through memory with the cell stream stored".
- **Tie order and path codes.** Match and substitute get separate codes.
- **Throughput.** The dependency limit of the worker is the same as in the
  source, but the absolute numbers are not comparable: the source reports
  1.1 to 2.1 cells per cycle for programmable elements, and this logic does
  more per cycle.

## Simulation

Every block has a self-checking testbench in `tb/` that ends with a line
`TB_RESULT checks=<n> failures=<n>`. All testbenches have watchdogs.

| Testbench | What it runs |
|---|---|
| `tb_ed_accel` | W=4, 64-word scratchpad; the worked examples in all modes, 24 random problems cycling through the modes, one-character strings, m not a multiple of W, several strips and column strips, a refused configuration; random memory stalls and output back-pressure; counts every mechanism (bypass rows, seeds, corner and edge writes, scratchpad traffic, stalls, refusals) and fails if any never occurred |
| `tb_ed_accel_full` | default parameters (14 workers), 1024 x 1024 strings: scratchpad strip mining with and without cell outputs, memory strip mining and tiling without; checks every score, cell and memory count against a software model, and that throughput meets the source's cells per cycle |
| `tb_ed_accel_sweep` | default parameters, memory strip mining and tiling on strings of 16 to 4096 characters: scores, final rows, memory counts and the rate at each length |
| `tb_ed_accel_w16`, `tb_ed_accel_w10` | the same checks on 1024 x 1024 at the source's other worker counts: 16 workers for memory strip mining, 10 for tiling with cell outputs |
| `tb_ed_row_worker`, `tb_ed_worker_array` | one worker and a chain, with random handshakes; the worker test also checks the rate of 2 cycles per column |
| `tb_ed_match_unit`, `tb_ed_min_unit`, `tb_ed_feeder`, `tb_ed_sink`, `tb_ed_controller`, `tb_ed_fifo`, `tb_ed_scratchpad`, `tb_ed_mem_arbiter` | the blocks on their own |

`tb/ed_mem_model.sv` is the behavioural memory the top-level testbenches use.
It has fixed latency, in-order responses and optional random stalls.

With Verilator 5:

    RTL="rtl/ed_pkg.sv rtl/ed_chan_if.sv rtl/ed_fifo.sv rtl/ed_match_unit.sv \
         rtl/ed_min_unit.sv rtl/ed_row_worker.sv rtl/ed_worker_array.sv \
         rtl/ed_scratchpad.sv rtl/ed_mem_arbiter.sv rtl/ed_feeder.sv \
         rtl/ed_sink.sv rtl/ed_controller.sv rtl/ed_accel.sv"
    verilator --binary --timing -Wno-fatal $RTL tb/ed_mem_model.sv \
        tb/tb_ed_accel_full.sv --top-module tb_ed_accel_full -j 8
    ./obj_dir/Vtb_ed_accel_full

Each 1024 x 1024 run takes a few seconds. For a block testbench, list the package,
the interface (for the worker parts) and the block's files. Verilator prints a
few lint warnings:
- `SYNCASYNCNET` comes from the handshake assertions in `ed_chan_if`, which
  sample the asynchronous reset;
- `UNUSEDSIGNAL` and `UNUSEDPARAM` mark struct fields and package constants
  that a given block does not read.
