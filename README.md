# WIT-Greedy: a weighted iterative greedy decoder for the surface code

A surface-code quantum memory measures its ancilla qubits every code cycle
(about 1 µs). Each ancilla whose result is 1 marks an *active syndrome node*.
Errors show up as pairs of active nodes (or one node near a boundary). The
decoder has to guess which errors happened, which amounts to pairing up the
active nodes. It must keep up with the code cycle.

Real qubits do not all fail at the same rate. A good decoder therefore
weights each possible error by its probability. Unweighted greedy decoders
use the Manhattan distance between nodes instead, because it is cheap. This
decoder keeps the speed of a greedy decoder and still uses true weights.

- **Weight tables.** The lightest-path weight between every pair of node
  positions (and from each position to the boundary) is computed off-line
  from the measured error rates. It is stored in a memory. Decoding never
  searches for paths: it only looks weights up.
- **Parallel matching.** The weights of all pairs in a window of active
  nodes are loaded into a table of registers. Several copies of the weight
  memory are read per clock. A comparator tree then picks the lightest
  unmatched pair, one pair per clock.

The architecture follows the WIT-Greedy decoder of Liao, Suzuki, Tanimoto,
Ueno and Tokunaga (ASP-DAC 2023). This RTL is an independent
implementation. Where the published description gives no detail, the choices
are this design's own; they are listed under "Departures and own choices"
below.

## Data path

```
syn_layer ─► cycle_buffer ─► syndrome_merge ─► syndrome_queue ─┐
             (register,      (3-stage merge     (QDEPTH nodes,  │ first N_ACT nodes
              rows encoded    into {z,y,x}       oldest first)  ▼
              in parallel)    node list)          ▲       pairing_table ◄──► weight_table x NUM_TABLES
                                                  │             │
                                       pop matched│             ▼
                                                  │      greedy_comparator ◄── allow_weight_table
                                                  │             │
                                                  └──── matching_pair_table ──► pair_* (to the Pauli frame)
                                   greedy_ctrl sequences every round
```

| Stage | Module | What happens | Clocks |
|---|---|---|---|
| Cycle buffer | `cycle_buffer` | Registers a layer of `D x (D-1)` bits and gives it a layer number `z`. Every row is then compacted into a list of active columns, all rows at once. | 2 |
| Merge | `syndrome_merge` | Stage 1 takes a prefix sum of the row counts. Stage 2 scatters the rows into one list of `{z,y,x}` nodes. Stage 3 is the output register. | 3 |
| Queue | `syndrome_queue` | Appends a whole layer per clock. Removes matched nodes from anywhere in the window, then compacts. Counts overflows. | 1 |
| Round | `greedy_ctrl` and the rest | Pairs up the first `N_ACT` nodes (below). | see below |

A layer is in the queue 5 clocks after `syn_valid`. Layers may arrive on
every clock. Nodes keep arrival order: older layers come first, and within a
layer row-major order.

## The decoding round

This is the core of the design. A round starts when a layer has reached the
queue and the queue is not empty, or while a flush is pending.

1. **Snapshot (1 clock).** The first `N_ACT` queue nodes are copied into the
   pairing table. New layers may be appended behind them during the round.
   Nothing is removed from the queue until the round ends, so the window
   positions stay valid.
2. **Load (`ceil(P / NUM_TABLES) + 2` clocks).** The pairing table has
   `P = N_ACT (N_ACT + 1) / 2` entries:
   - entry `(i, j)` with `i < j` holds the pair of window nodes *i* and *j*;
   - entry `(i, i)` holds node *i* matched to the boundary.

   The entries are ordered `(0,0), (0,1), …, (0,N-1), (1,1), (1,2), …`.
   Each clock, `NUM_TABLES` entries are looked up, one in each copy of the
   weight table. An entry's *flag* is set when all of these hold:
   - both nodes exist;
   - their layers are less than `WIN` apart;
   - the stored weight is not 255, the "never" value.

   A boundary entry is flagged whenever its node exists.
3. **Match (one clock per pair or level step).** `greedy_comparator` looks at
   all `P` entries at once. It finds the least weight among the flagged
   entries, and then the *first* entry in table order that has that weight.
   That entry is taken only if its weight does not exceed the current
   *allowed weight*.
   - If it is taken, both of its nodes are recorded in
     `matching_pair_table` and sent out on `pair_*`. On the same clock, every
     entry that contains either node is unflagged.
   - If flagged entries remain but none is allowed, the allowed-weight
     ladder moves up one level.
   - Otherwise the round ends.
4. **Pop (1 clock).** The matched nodes are removed from the queue, and the
   unmatched ones move to the front.

**The allowed-weight ladder** (`allow_weight_table`) makes the greedy search
*iterative*. It holds `LEVELS` increasing thresholds, and each round starts at
the lowest. The last threshold (254) admits every weight. A round may climb
to the last level only if it is a **final round**. Otherwise it stops one
level short and leaves heavier pairs unmatched, because a partner for them
may still arrive in a later layer. A round is final when any of these holds:

- a flush is pending;
- the queue is full;
- the oldest node is `WIN - 1` layers older than the newest layer, the last
  moment before it would leave the decoding window.

In a final round every node in the window gets matched, at worst to the
boundary.

**Round length.**
`1 + (ceil(P/NUM_TABLES) + 2) + matches + steps + 1 + 1` clocks, that is
`ceil(P/NUM_TABLES) + matches + steps + 5`. At the defaults `P = 210`, so a
round takes at least 33 clocks, which is 330 ns at 100 MHz. In the full-size
test at a 2 % ancilla flip rate, rounds took 33 / 35 / 45 clocks
(min / average / max). The published figures for d = 11 are 33 / 37 / 103
clocks under error rates that are not given, so only the minimum can be
compared directly.

## Weight table contents

Node index `n = y * COLS + x`. Each copy of the table holds
`DEPTH = WIN * NPL^2 + NPL` words of `WW` bits, where `NPL = ROWS * COLS`:

| Address | Weight |
|---|---|
| `(dz * NPL + n_a) * NPL + n_b` | Lightest path from node `n_a` in some layer to node `n_b` `dz` layers later, `0 <= dz < WIN`. |
| `WIN * NPL^2 + n` | Lightest path from node `n` to either boundary. |

Weights are integers, 0 to 254, and 255 means "never pair". Edge weights
would normally be `round(-k * log p)` for the error probability `p` of:

- each data qubit: horizontal edges, including the edges to the left and
  right boundary;
- each data qubit between rows: vertical edges;
- each ancilla measurement: edges between layers.

Because the address depends only on the layer *difference*, the table
assumes the error rates do not change from one code cycle to the next. This
is also why its size grows as d^5.

The host writes the table through `wt_we/wt_waddr/wt_wdata`, which write all
copies at once. It must do so before decoding, because the memories are not
reset. The end-to-end testbench shows one way to compute the table:
repeated edge relaxation over a `WIN`-layer graph.

## Parameters

| Parameter (`wit_greedy`) | Default | Meaning |
|---|---|---|
| `D` | 11 | Code distance. Gives `ROWS = D`, `COLS = D - 1` ancillas per layer and a window of `WIN = D` layers. |
| `N_ACT` | 20 | Nodes in the pairing window. |
| `QDEPTH` | 39 | Syndrome queue entries. |
| `NUM_TABLES` | 8 | Weight-table copies, which is the number of lookups per clock. |
| `WW` | 8 | Weight width. |
| `LEVELS` | 6 | Levels of the allowed-weight ladder. |
| `ZW` | 6 | Width of the layer number. |

`D`, `N_ACT` and `QDEPTH` are the published d = 11 configuration. The
published table lists 9/15, 12/21 and 15/29 (window/queue) for d = 5, 7 and 9.
The other parameters are this design's choices. With 8-bit weights, 8 lookups
per clock come from 4 dual-port copies, about 118 block RAMs of 36 kbit. That
is close to the 126 reported for d = 11, but it is an estimate.

Reset values of the ladder are threshold `k = (k+1) * 255 / LEVELS` for
`k < LEVELS-1`, and 254 for the last level. They can be rewritten through
`awt_we/awt_idx/awt_val`.

## Interface summary (`wit_greedy`)

- **Syndrome input.**
  - `syn_valid` and `syn_layer[D*(D-1)]`, one layer per pulse. Bit
    `y*COLS+x` is the ancilla in row `y`, column `x`, and 1 means active. The
    bits must already be detection events: any difference with the previous
    round is taken outside.
  - `flush` runs final rounds until the queue is empty.
- **Output.** `pair_valid` pulses once per matched pair.
  - `pair_a` and `pair_b` are the two nodes as `{z, y, x}`.
  - For a boundary match, `pair_a == pair_b` and `pair_boundary = 1`.
  - `pair_w` is the pair's weight.
- **Status.**
  - `busy`;
  - `round_done` and `round_cycles`;
  - `q_count`;
  - `overflow` and `ovf_count`, which count layers that lost nodes because
    the queue was full;
  - the counters `n_rounds`, `n_final` and `n_steps`.

All registers use `clk` and the active-low asynchronous reset `rst_n`.

## Departures and own choices

- **Pauli frame generation is not included.** A weighted shortest path is
  not a Manhattan path. Turning a pair into data-qubit flips needs the path
  itself, and the weight tables do not store it. Matched pairs are output
  for an external Pauli-frame unit.
- **Layer geometry is one syndrome type.** Each layer is `D` rows of `D-1`
  ancillas, with the boundaries on the left and right. Decode the other
  type with a second instance.
- **Boundary matching is a table entry.** It is handled as the diagonal
  entry `(i, i)` of the pairing table.
- **The ladder semantics and the final-round rule are this design's own.**
  The published design shows an allowed-weight register and its table, but
  not how the levels are used.
- **Overflow drops nodes.** A layer that does not fit in the queue loses its
  newest nodes; the event is counted.
- **The layer number wraps.** The age of a node is computed modulo `2^ZW`.
  A node stuck behind the window for more than `2^ZW` layers could be aged
  wrongly. The final-round rule normally prevents this.
- **The table is loaded in full.** All `P` entries are loaded every round,
  even when the window is not full.

## Simulating

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb rtl/wit_pkg.sv \
  tb/tb_wit_greedy.sv --top tb_wit_greedy
./obj_dir/Vtb_wit_greedy
```

- **`tb_wit_greedy`** runs the decoder at distance 3, with a 5-node window,
  an 8-node queue, 3 table copies and 4 levels. `wit_greedy_harness` builds
  a random weighted graph, computes and loads the tables, and decodes 400
  layers one at a time. A reference model keeps its own queue and replays
  every round. The test checks:
  - every pair: its order, nodes and weight;
  - every round length;
  - the overflow count.

  It then flushes, and finally drives back-to-back dense layers. It requires
  every mechanism to occur: node-node and boundary matches, ladder steps,
  rounds that leave nodes, final rounds of all three kinds, and overflow.
- **`tb_wit_greedy_full`** runs the same checks with every parameter at its
  default. It loads the full 133,210-word tables and decodes 150 layers. It
  takes about 20 s.
- **`tb_wit_greedy_sweep`** runs distances 5, 7 and 9, each with its
  published window and queue size (9/15, 12/21, 15/29). Each decoder gets
  10,000 checked layers at a 1 % ancilla flip rate. Measured clocks per round
  (min / average / max) are below, next to the published figures. The
  published figures were taken at an unstated error rate, so the comparison
  only shows that the round lengths are of the same order.

  | d | This design | Published |
  |---|---|---|
  | 5 | 12 / 12 / 15 | 18 / 19 / 71 |
  | 7 | 16 / 16 / 19 | 19 / 22 / 97 |
  | 9 | 21 / 21 / 25 | 24 / 29 / 105 |
  | 11 (`tb_wit_greedy_full`, 2 %) | 33 / 35 / 45 | 33 / 37 / 103 |
- **Unit testbenches.** `tb_cycle_buffer`, `tb_syndrome_merge`,
  `tb_syndrome_queue`, `tb_weight_table`, `tb_pairing_table`,
  `tb_greedy_comparator`, `tb_allow_weight_table`, `tb_matching_pair_table`
  and `tb_greedy_ctrl` test one block each against independent models,
  including latencies.

## Files

- `rtl/wit_pkg.sv`: pair-index helper functions and the table layout.
- `rtl/*.sv`: one module per file, named after the module. `wit_greedy` is
  the top.
- `tb/*.sv`: testbenches, plus `wit_greedy_harness`, the shared stimulus and
  reference model.
