# Latin square completion array

A Latin square of order N is an N×N grid in which every row and every column
holds each of N colours exactly once. Completing a partly filled square is
the same as colouring a graph. Each cell is a vertex, and each vertex is
joined to every other vertex in its row and in its column. This RTL solves
that problem in hardware. It gives every cell a small processor. Each
processor keeps a short list of the colours the cell could still take. It
drops colours as its neighbours take them, and it commits to a colour as
soon as only one is left. The whole array runs in parallel. Only the choice
of the next cell to guess is serial, and so is undoing a guess that led to a
contradiction.

Given a partial square, the design either completes it or proves that no
completion exists. The result is a complete search: depth-first, with
backtracking, and with constraint propagation done in parallel by the array.

## The array

The design has three kinds of processor, all connected in a torus:

```
   master ──► C0 ──► C1 ──► ... ──► C(N-1) ──┐      column edge ring
     ▲ │     │      │               │        │
     │ ▼     ▼      ▼               ▼        │
     │ R0 ─► n00 ─► n01 ─► ... ─► n0,N-1 ─► (back to R0)
     │ │     │      │               │
     │ ▼     ▼      ▼               ▼
     │ R1 ─► n10 ─► ...                    ...
     │ ...
     └─ R(N-1) ◄─ (row edge ring closes at the master)
          (each column of nodes wraps back to its column edge)
```

* **Node processor** (`node_proc`), one per cell. It holds M colour *bins*,
  each with a valid bit, and a *complete* flag. The flag says whether the bins
  hold every colour still possible for the cell, or only part of them.
* **Edge controller** (`edge_ctrl`), one per row (the *row edges*, down the
  left side) and one per column (the *column edges*, along the top). It keeps
  the N-bit list of colours that no cell of its line has taken yet. It also
  keeps a stack of earlier lists, one per outstanding guess.
* **Graph master** (`graph_master`), one per array. It loads the initial
  conditions, chooses the cells to guess, orders backtracks, and collects the
  result.

Two kinds of bus connect them:

* **Node buses.** Each row forms a ring: its row edge, then the nodes of the
  row from left to right, then back to the edge. Each column does the same
  from top to bottom. A node has four ports: `right_in`/`right_out` on its
  row ring and `down_in`/`down_out` on its column ring. A node word is
  `{tag[3:0], idx[log2 N], data[log2 N]}`. `idx` names the addressed node
  (its row on a column bus, its column on a row bus). `data` is a colour or
  a small argument.
* **Edge bus.** This is two rings through the master. One runs through the
  row edges (master → R0 → … → R(N-1) → master). The other runs through the
  column edges. An edge word is `{tag[2:0], row, col, list[N-1:0]}`, where
  the list is one bit per colour.

### Bus focus: two cycles per node

Each node alternates between *column focus* and *row focus*, one clock cycle
each. In column focus it takes the word on `down_in`, acts on it, and writes
`down_out`. In row focus it does the same on the row bus. Every node and edge
keeps its own phase bit. All of them reset to column focus, so they stay in
step. A word therefore moves one node every two cycles. A message that goes
all the way round a ring of N nodes takes about 2N+2 cycles. The edge bus
also adds two cycles at each edge controller it passes.

A node puts its own message on a bus only when the word passing by is empty.
Otherwise it forwards the passing word. Whoever started a word removes it
when it comes back round the ring.

## Messages

| node-bus tag | sent by → to | meaning |
|---|---|---|
| `REMOVE c` | edge → all nodes of its line | colour c is now taken in this line |
| `FILL c` | column edge → node `idx` | one more colour for the node's bins |
| `FILLEND f` | column edge → node `idx` | end of a fill; `f`=1 means the list was complete |
| `QUERY` | column edge → node `idx` | master asks: is the cell set? |
| `GUESS` | column edge → node `idx` | take your lowest colour; this starts a new search level |
| `STEP` | column edge → all | a guess was made elsewhere; go one level deeper |
| `BTRK` | column edge → all | undo the last level |
| `ASSIGN c` | node → both its edges | I have taken colour c |
| `FILLREQ f` | node → row edge | my bins are empty; send colours ≥ f |
| `RSET c` / `RREADY` | node → row edge | answer to `QUERY`: already set to c / free |
| `BTREQ` | node → row edge | my complete list is empty: contradiction |

| edge-bus tag | meaning |
|---|---|
| `FILL row,col,list` | a colour list for node (row,col); row edge → master → column edge |
| `QUERY`, `GUESS`, `BT` | master orders; `GUESS` and `BT` also reach every edge's stack |
| `RSET`, `RREADY`, `BTREQ` | replies and contradictions for the master |

## Memory fills

A node has only M bins, with M ≤ N, so its colour list can be partial. The
list is refilled through the two edges of the node's line:

1. The node sends `FILLREQ` with a floor f to its row edge.
2. The row edge puts its own free list, masked to colours ≥ f, on the edge
   bus.
3. The master passes the word from the row ring onto the column ring.
4. The node's column edge intersects that list with its own free list.
5. The column edge sends the lowest M colours of the result as `FILL` words,
   then `FILLEND`. The flag is set when the intersection had at most M
   colours, which means the node now holds every colour it could take.

The master's presets use the same path:

* A preset cell gets a one-colour list.
* A free cell gets an all-ones list.

A one-colour complete list makes the node take that colour at once.

## Search

The master works through the cells in a fixed row-major order.

1. **Settle.** Wait until the array has been idle for `IDLE_WAIT` cycles.
   Idle means every edge's queues and outputs are empty, and no word is on
   the edge rings. Within that wait, all removals and implications caused by
   the last change have run their course.
2. **Select.** Send `QUERY` to the next cell. `RSET` means the cell already
   has a colour, so move on. `RREADY` means the cell is free.
3. **Guess.** Send `GUESS` on both edge rings. Every edge pushes its free
   list on its stack. The cell's column edge sends `GUESS` to the cell and
   `STEP` down every other column. Every node's depth counter goes up by one.
   The cell takes its lowest colour and reports `ASSIGN`. The master pushes
   the cell's address on its own stack.
4. **Propagate.** `ASSIGN c` makes both edges clear c and broadcast
   `REMOVE c`. A node that has lost colours reacts in one of three ways:
   * If the list is complete and one colour is left, it *implicates*: it
     takes that colour and reports `ASSIGN`.
   * If the list is complete and empty, it reports a contradiction
     (`BTREQ`).
   * If the list is partial and empty, it asks for a fill.

   An edge that is asked to clear a colour it has already cleared has found
   two equal colours in one line. That is a contradiction too.
5. **Backtrack.** On a contradiction the master sends one `BT` on both rings.
   Further requests that arrive before it goes out are merged into it.
   * Every edge pops its stack, so the edge is back to its state before the
     guess.
   * Every node clears an assignment made at the current depth or deeper.
   * A node whose *guess* is undone sets its floor to the guessed colour
     plus one, so the next attempt tries the next colour up.
   * Every other unassigned node clears its bins and refills from floor 0.
   * The master goes back to the cell it guessed last.

   If the cell's floor has passed N−1, it has no colours left to try. Its
   refill returns an empty complete list, which makes it request a backtrack
   one level further up.
6. A contradiction with no guess outstanding proves that the square cannot
   be completed. The master raises `done` with `solved`=0.
7. When the scan has passed the last cell, every cell has a colour. The
   master queries every cell once more into its result memory. Then it
   raises `done` with `solved`=1.

Each node tracks:

* its search depth: +1 on `GUESS`/`STEP`, −1 on `BTRK`;
* the depth at which it took its colour;
* its floor.

This is what lets a single `BTRK` word undo exactly one level across the
whole array.

## Modules

| module | role |
|---|---|
| `gc_pkg` | widths (`cw`, `nbw`, `ebw`), tag and state enums |
| `gc_top` | N×N nodes, N row and N column edges, master; host ports |
| `graph_master` | presets, settle/select/guess/backtrack FSM, result memory, counters |
| `edge_ctrl` | free list, fill intersection and serializer, order forwarding |
| `color_stack` | LIFO of N-bit lists inside each edge |
| `sync_fifo` | first-word-fall-through FIFO for the edge queues |
| `node_proc` | bins, complete flag, depth and floor, bus handling |
| `implicate_ctrl` | counts valid bins; decides implicate / backtrack / fill |

### Top-level interface (`gc_top`)

* Loading a problem:
  * Hold `rst_n` low, then release it.
  * Write each cell with `preset_we`, `preset_addr` (= row·N+col) and
    `preset_val`, where 0 means free and c+1 means colour c.
  * Pulse `start`.
* Reading the result:
  * Wait for `done`.
  * Then `solved` gives the verdict.
  * `res_color` shows the colour of cell `res_addr`.
* `n_guess`, `n_backtrack` and `n_cycles` count the work done.
* `err` reports an overflow of an internal FIFO or stack. It never rose in
  testing.
* A new problem needs a new reset.

### Parameters

| parameter | default | meaning |
|---|---|---|
| `N` | 6 | order of the square (≥ 2); the array has N² nodes and 2N edges |
| `M` | 4 | bins per node (1 ≤ M ≤ N); M = N makes every fill complete |
| `IDLE_WAIT` | 140 | idle cycles before the next guess; must exceed the longest propagation (about 2N+2 cycles per ring crossing, several crossings per implication chain) |
| `NBQ_DEPTH`, `EQ_DEPTH` (edge) | 64, 32 | queue depths |

The defaults N = 6 and `IDLE_WAIT` = 140 are the published figures for this
architecture. M = 4 is this design's choice.

## Departures from the original architecture and own choices

* Colour lists are combined by intersection when a fill passes from the row
  edge to the column edge. Only an intersection gives the colours still free
  in both lines.
* The bookkeeping for backtracks is this design's own:
  * the depth counter, assignment depth and floor in each node;
  * `STEP` words;
  * the master's guess stack;
  * the query/reply handshake for choosing a cell;
  * all message encodings.
* After a backtrack every free node empties its bins and refills. This is
  simpler than restoring partial lists, and it costs extra fill traffic.
* A double assignment seen by an edge is handled as a contradiction.
* Cells are guessed in row-major order, and each takes its lowest remaining
  colour. No smarter selection heuristic is implemented.
* Windowing is not implemented: one array instance for each cell. With
  windowing, a smaller array would be swapped over parts of a larger square.
  So N is fixed at build time.
* Host, board and off-chip preset memory are not modelled. The simple preset
  and result ports take their place.
* Speed: colouring the empty 6×6 square takes about 9,100 cycles here (23 guesses, 5 backtracks). That
  is roughly twice the 4,000 cycles reported for the original. Most of the
  time is the 140-cycle settle wait before each guess, plus the query
  handshake. Presetting a 6×6 square takes at most about 90 cycles, within the 140 published for the original, and the end-to-end bench checks that limit.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=… failures=…`.

| testbench | what it checks |
|---|---|
| `tb_sync_fifo` | random push/pop against a queue model, full/empty/overflow |
| `tb_color_stack` | random push/pop against a model, underflow/overflow |
| `tb_implicate_ctrl` | every valid/complete combination against a counting model |
| `tb_node_proc` | fills, removals, implication, refill, guess, backtrack with floor, depth rule, backtrack request, pass-through timing |
| `tb_edge_ctrl` | REMOVE broadcast, double assignment, fill intersection and serializer (including a list of exactly M), order forwarding, stack push/pop |
| `tb_graph_master` | preset order and lists, forwarding, idle wait, query order, merged backtracks, resume point, result memory, unsolvable case |
| `tb_gc_top` | the whole array at default parameters on 86 problems |

`tb_gc_top` runs the following problems:

* the empty square;
* a preset square with a conflict that only implication can find;
* 24 squares made by taking cells out of a known Latin square;
* 60 random partial squares, some of which cannot be completed.

Each answer is checked against a software backtracking solver in the
testbench, and a claimed solution is checked to be a Latin square that
keeps every preset.

The testbench also counts how often each mechanism fired: guesses,
backtracks, regressions past an exhausted cell, node and edge
contradictions, partial fills, fill requests, implications and
unsolvability proofs. It fails if any of them never happened. It also
checks that no new query follows a guess within `IDLE_WAIT` cycles. At
defaults it runs in about a second.

To simulate with Verilator (5.x):

```
verilator --binary --timing -Wno-fatal -Irtl \
  rtl/gc_pkg.sv rtl/sync_fifo.sv rtl/color_stack.sv rtl/implicate_ctrl.sv \
  rtl/node_proc.sv rtl/edge_ctrl.sv rtl/graph_master.sv rtl/gc_top.sv \
  tb/tb_gc_top.sv --top-module tb_gc_top
./obj_dir/Vtb_gc_top
```

Replace the testbench and top module to run any other bench.

At the defaults, `gc_top` synthesizes to about 12,400 generic cells,
4,100 flip-flop bits and 19,400 bits of memory. Most of the memory is the
edges' FIFOs and stacks.
