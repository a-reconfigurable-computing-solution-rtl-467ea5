# A branching engine for the parameterized vertex cover problem

Given an undirected graph G and a number k, the parameterized vertex cover
problem asks whether at most k vertices can be chosen so that every edge has at
least one chosen end. The problem is NP-complete, but it is fixed-parameter
tractable: a bounded search tree solves it in time exponential only in k. This
RTL is a hardware version of such a search tree for graphs of up to 256
vertices. It sits on a PCI-less FPGA board that plugs into a PC's SDRAM DIMM
slot, so the host talks to it with plain memory reads and writes.

The search rests on one fact. For any vertex v, every vertex cover contains
either v or all of v's neighbours. The engine therefore always takes the
**highest-degree vertex** of the current graph first. It dives greedily with
"v is in the cover" until the graph is edgeless or k vertices are used. It then
backtracks into the other branch, "all neighbours of v are in the cover", at
the deepest level where that branch is still open and still fits the budget.
The answer is a 256-bit cover vector, or all ones when no cover of size k
exists.

The design follows the FPGA engine of M. Dorai's thesis "A Reconfigurable
Computing Solution to the Parameterized Vertex Cover Problem" (the Pilchard
board, a Virtex XCV1000E). This RTL was written fresh from that description;
see "Departures from the original design" below for what differs.

## Block structure

```
pilchard_vc_top        DIMM command decode, I/O registers, data-bus enable
└── pcore              host memory map, start/clear, result write-out
    ├── dp_ram  u_in_ram    2100 x 32 input chunk RAM (host writes, core reads)
    ├── ram_load            chunks -> 256-bit rows
    ├── dp_ram  u_adj_ram   257 x 256 adjacency RAM (row 0 = header)
    ├── branch_ctrl         the search tree
    │   ├── dp_ram  u_stack      256 x 256 stack of cover vectors
    │   ├── select_vertex        highest-degree vertex of the current graph
    │   │   ├── stage_mix        row masking, select mode
    │   │   └── degree_adder_tree  16 x ones_count16 + 4-stage adder tree
    │   └── edgeless_check       are all edges covered?
    │       └── stage_mix        row masking, edgeless mode
    └── dp_ram  u_out_ram   16 x 64 output RAM (core writes, host reads)
vc_pkg                 shared enum and constants
```

## The search tree (branch_ctrl)

The engine never edits the stored graph. The "current graph" is always the
stored adjacency matrix seen through the current **cover vector**: an edge
disappears as soon as either of its ends is in the cover. Three pieces of state
describe the search:

- **Stack of cover vectors** (`u_stack`, block RAM, N words of N bits). It is
  indexed by *level*, which equals the number of vertices in the cover when the
  entry was pushed. Entry L holds the cover as it was before the level-L vertex
  was added.
- **Order vector** (`order_vec`): the vertex chosen at each level. Next to it
  sits `deg_vec`, that vertex's degree in the graph it was chosen from.
- **Stack indicator** (`stack_ind`): one bit per level. 0 means the level's
  "all neighbours" branch has not been tried yet.

The controller loop works as follows.

1. Read the header row: k, and the vertex count n, where 0 stands for 256.
2. **Edgeless check** on the current cover. If it passes, a cover has been
   found, and the search stops.
3. If the cover holds fewer than k vertices: **select** the highest-degree
   vertex v, then **push**:
   - write the cover to stack entry `level`;
   - record v and its degree;
   - clear `stack_ind[level]`;
   - set bit v of the cover;
   - increment the level.

   Go to step 2 (this is the greedy dive).
4. Otherwise **backtrack**. Scan from the deepest level towards level 0 for a
   level L with `stack_ind[L] = 0`, and mark it as used.
   - If `deg_vec[L] > k − L`, the neighbours do not fit in the budget. This is
     the **parameter check**. The branch is pruned and the scan goes on.
   - Otherwise, read stack entry L and OR in the adjacency row of
     `order_vec[L]`, so all of its neighbours join the cover. The new level is
     L + `deg_vec[L]`, which is exact because the degree counted only
     neighbours that were still uncovered. Go to step 2.
   - If the scan passes level 0 with nothing left, no cover of size ≤ k
     exists: found = 0 and the mask is all ones.

Levels above the one resumed in step 4 are simply overwritten by later pushes.
A level's indicator is cleared again only when a new vertex is pushed there.
Every branch of the bounded search tree is therefore tried at most once, and
the search is exhaustive. The testbenches compare the engine with a brute-force
minimum cover on many random graphs.

An assertion (`a_budget`) checks that the cover never grows past k.

## Masking rows: stage_mix

Every row read from the adjacency RAM passes through `stage_mix` together with
the cover vector and the cover bit of the row's own vertex.

| mode | output | use |
|---|---|---|
| `MIX_SELECT` | `adj & ~cover`, or 0 if the row's vertex is covered | popcount = current degree |
| `MIX_EDGELESS` | `~(adj & ~cover)`, or all ones if the row's vertex is covered | all ones ⇔ no uncovered edge at this vertex |

## Selecting the highest-degree vertex: select_vertex

The unit walks rows 1..n of the adjacency RAM. It masks each row in select
mode, counts its ones, and keeps the largest count seen. The comparison is a
strict greater-than, so on ties the lowest-numbered vertex wins.

Each vertex takes LEVELS + 2 cycles, where LEVELS is the number of adder stages:
- one wait state for the RAM read;
- LEVELS adder-pipeline states;
- one state that compares the degree and increments the address.

For N = 256 that is **6 cycles per vertex**. A call takes 6n + 1 cycles from
`start` to `done`.

### Counting ones: ones_count16 and degree_adder_tree

A 256-bit row is split into sixteen 16-bit slices. Each slice goes to a
combinational `ones_count16`. That is a small tree of adders:
- four sums of three bits each;
- two sums of those pairs, each with one more bit as carry-in;
- a final sum plus the last bit.

`degree_adder_tree` adds the sixteen 5-bit counts in a registered binary tree
of log2(N/16) levels, which is four levels for N = 256. The tree is not
stalled; the selection state machine simply waits out its latency.

## Edgeless check: edgeless_check

The unit walks rows 1..n and masks each in edgeless mode. It stops at the
first row that is not all ones, which means an uncovered edge. Each row takes
three states: counter check, vector check, and address increment.
- A full scan, which reports edgeless, takes 3n + 3 cycles.
- A scan that fails at vertex v takes 3v + 4 cycles.

During a dive the graph usually still has many edges, so this check usually
stops within a few rows. Selection therefore dominates the run time.

## Loading the matrix: input RAM and ram_load

A host write carries a 64-bit data word, but the engine wants a whole
256-bit row per access. The host therefore writes each row as eight 32-bit
chunks into the input RAM. Chunk c of row r goes to address `r*8 + c`, and
each write carries its own chunk address in the data word.

On start, `ram_load` does the following:
- reads the chunks back in order;
- places chunk c in bits 32c+31..32c;
- writes each completed row into the adjacency RAM;
- pulses `finish_load`, which starts the search.

The loader always moves all 257 rows. That is (N+1)(2N/32+1)+1 ≈ 4.4k core
cycles.

Adjacency RAM layout:

| row | contents |
|---|---|
| 0 | header: k in bits 7..0, vertex count n in bits 15..8 (0 means 256) |
| v + 1 | neighbours of vertex v, bit u set if edge (v,u); the matrix must be symmetric with a zero diagonal |

## Host protocol (pilchard_vc_top, pcore)

The top decodes the SDRAM command pins, all of which are active low:
- a **read** is `s=0, ras=1, cas=0, we=1`;
- a **write** is `s=0, ras=1, cas=0, we=0`.

Address and data are registered once, as the FPGA's I/O flip-flops would.
Read data is on `dimm_d_out`, with `dimm_d_oe` high, **three clk cycles
after the read command**.

| access | address (low byte) | data |
|---|---|---|
| write chunk | anything but 0xFF/0xFE | `d[11:0]` chunk address, `d[63:32]` chunk |
| start | 0xFF | ignored |
| clear result | 0xFE | ignored |
| read cover slice w (w = 1..4) | w | cover bits 64w−1 .. 64w−64 |
| read status | 5 (= N/64 + 1) | bit 0 done, bit 1 found, bits 24..16 cover size |

A complete run goes like this:
1. Write the 2056 chunks.
2. Write 0xFF to start.
3. Poll word 5 until bit 0 is set.
4. Read words 1..4.
5. Write 0xFE to clear.

A clear zeroes word 1 and the status word. Reset does the same, so a stale
"done" is never seen.

## Clocks

There are two clocks:
- `clk`, the slot clock, drives the interface, the host side of the input RAM
  and the host read port of the output RAM;
- `clk_div` (`clk_core` inside pcore) drives everything else. On the board
  this is the clock DLL's divided output, clk/2.

The data path crosses between the clocks only through the dual-port RAMs.

The start and clear commands are stretched to eight clk cycles. They then pass
a two-flop synchroniser into the core clock.

## Timing and performance

Per search step at N = 256:
- a selection costs 6n + 1 core cycles;
- an edgeless check costs at most 3n + 3;
- restoring a level during backtracking costs three cycles plus one per level
  scanned.

The full-size testbench measures a random 256-vertex graph, with about half of
all pairs joined and k = 248. The engine finds a 248-vertex cover in about
392,000 core cycles, which is about 0.016 s at a 25 MHz core clock. That is the
scale the original reports for its 256-vertex, k = 248 case.

`tb_workload_random256` takes the same kind of dense graph, one that has a
244-vertex cover, down to smaller k. Each step down means more backtracking:

| k | core cycles | at 25 MHz | original, its own random graph |
|---|---|---|---|
| 248 | ≈ 0.39 M | 0.016 s | 0.016 s |
| 247 | ≈ 0.62 M | 0.025 s | 0.023 s |
| 246 | ≈ 0.70 M | 0.028 s | 0.035 s |
| 245 | ≈ 17.1 M | 0.69 s | 0.19 s |

Run times on such instances depend strongly on the particular graph. Only the
orders of magnitude are comparable.

## Sizes and scaling

All sizes follow from `N` (default 256):
- the adjacency RAM is N+1 rows of N bits;
- the stack is N × N;
- the cover vector is read in N/64 slices;
- the header fields are log2(N) bits wide.

N must be a power of two, at least 32. Smaller graphs simply use a
smaller vertex count. The input RAM needs at
least (N+1)·N/32 words. Set `IN_DEPTH`/`IAW` to match when N changes: for
N = 512, use `IN_DEPTH = 8208` and `IAW = 14`. At N = 512 the adjacency RAM
and stack together need about 525 kbit of block RAM, more than the XCV1000E's
393 kbit, so that size needs a larger device.

## Departures from the original design

- **Parameter check.** The original text says two different things. One
  passage says that when the neighbours of the backtracked vertex exceed k,
  "no solution" can be declared at once. Its branching pseudo-code instead
  only decrements the backtracking level and continues. This design follows
  the pseudo-code: it prunes that branch and keeps scanning, so the search
  stays exhaustive. Giving up at once is only sound at level 0. At a deeper
  level, the overflow says nothing about branches still open above it.
- **Status word.** Output word N/64+1 is a status word: done, found and the
  cover size. This lets the host poll for completion.
- **Vertex count in the header.** The original reads k from the low byte of
  row 0. It also has a vertex-count signal limited to 1..255, but does not
  show where that signal is loaded. Storing the count in bits 15..8 of row 0,
  with 0 meaning 256, is this design's choice. It lets graphs smaller than N
  run on a full-size build, and it still reaches the 256-vertex graphs the
  original was measured on.
- **Stored degrees.** Each level's degree is stored beside the order vector,
  so the neighbour branch needs no recount.
- **Clock crossing.** A synchroniser is added on the start and clear
  commands.
- **Command writes.** Writes to 0xFF and 0xFE are not stored in the input RAM.
- **Chunk address width.** The chunk address in a data write is 12 bits,
  `d[11:0]`, as in the original's wiring of its input RAM. Its prose mentions a
  10-bit field, which cannot address the 2056 chunks of a 256-vertex matrix.
- **Output RAM.** The output RAM has 16 words, as its original name says; the
  original wires it with a 5-bit address.
- **Memories.** The dual-port memories are inferred arrays instead of vendor
  cores. Their port B is read-only, because no user writes through it.
- **Not modelled.** The clock DLL, the pad buffers and the unused DIMM pins
  (data masks, check bits, serial presence detect, expansion connector) are
  not modelled. The host program is replaced by the testbenches' host model.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…` and has a watchdog.

| testbench | what it checks |
|---|---|
| `tb_ones_count16` | all 65,536 inputs |
| `tb_stage_mix` | random rows and covers in all four mode codes against a bit-by-bit model |
| `tb_degree_adder_tree` | random and extreme vectors, 4-cycle latency |
| `tb_dp_ram` | random traffic on both ports with separate clocks, against a model |
| `tb_select_vertex` | random graphs up to 256 vertices; vertex, degree and tie rule against a model; 6n+1 cycles |
| `tb_edgeless_check` | random graphs with and without an uncovered edge; 3n+3 / 3v+4 cycles |
| `tb_branch_ctrl` | random graphs of up to 13 vertices on a 64-vertex engine against a brute-force minimum cover: found exactly when the minimum is ≤ k, a valid cover within k, all ones otherwise |
| `tb_ram_load` | chunk-to-row assembly, one write per row, finish_load pulse, (N+1)(2N/32+1)+1 cycles |
| `tb_pcore` | host strobes: chunk writes, start, status polling, cover readout against a brute-force reference, clear |
| `tb_pilchard_vc_top` | end to end through the DIMM pins at N = 64 (see below) |
| `tb_pilchard_vc_full` | end to end at the default N = 256 (see below) |
| `tb_workload_random256` | N = 256 instances like the original's measurements: dense random graphs at k = 248..245, a sparse graph, a "no" instance |

`tb_pilchard_vc_top` counts each mechanism and fails if one never occurs:
- chunk writes, loads and starts;
- edgeless checks and selections;
- greedy dives, neighbour branches and prunes;
- "found" and "no cover" answers;
- result write-outs and clears.

It also checks that the data bus is driven exactly at the read latency.

`tb_pilchard_vc_full` runs with no parameter overrides. It runs four cases:
- a planted 24-vertex cover;
- six disjoint edges with k = 5, which must answer "no cover";
- the same six edges with k = 6;
- the 256-vertex random graph above.

To simulate one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/vc_pkg.sv tb/tb_pilchard_vc_full.sv --top-module tb_pilchard_vc_full
./obj_dir/Vtb_pilchard_vc_full
```

Each testbench needs under a second on a desktop machine. Verilator's lint
reports unused bits and flags that the assertion's `disable iff` uses the
asynchronous reset; neither is a circuit problem.
