# M-tree range-query accelerator

A small hardware unit that answers range queries — "return every object
whose value lies within `r_q` of `q`" — over a data set that has been
organised in advance as an **M-tree**. An M-tree groups objects into nested
balls: every routing object has a centre value and a covering radius, and
all objects below it lie inside that ball. A search can skip a whole subtree
when the query ball and the routing object's ball cannot overlap, so it
touches only a small part of the data. In software that walk is recursive,
and it costs a lot of CPU time per visited entry. This design does the walk
in a dedicated state machine. It examines **one tree entry per clock
cycle** and needs no processor while a query runs.

The tree has **two entries per node**. The data are **one-dimensional
unsigned fixed-point values**, so the distance is `d(a,b) = |a − b|`. Values,
radii and distances are 8 bits wide. Each memory is 256 words deep.

## How a query walks the tree

Software searches recursively: for each matching entry of a non-leaf node it
calls itself on the child. Hardware has no call stack. Here the recursion is
replaced by **one node queue (FIFO)** and a fixed order of work per node:

1. **SEARCH1** examines entry 0 of the current node. If it is a routing
   object that passes the prune test, its child node is **pushed onto the
   queue**. If it is a matching object (in a leaf node), the object is sent to
   the output.
2. **SEARCH2** examines entry 1. If it is a routing object that passes, its
   child **becomes the current node at once**, without going through the
   queue, and the walk returns to SEARCH1. A matching object is sent to the
   output.
3. If SEARCH2 found no child to descend into, the branch is finished.
   **CHECK** pops the next node from the queue and returns to SEARCH1. If the
   queue is empty, the query ends: **DONE** pulses `done` for one cycle.

Each node is reached from exactly one parent, so it is queued at most once
per query. The queue is as deep as the node memory, so it cannot overflow.
The walk visits nodes depth-first along second entries and breadth-first
through the queue. Results therefore come out in that order, which is not
sorted by value.

**Timing.** `start` is sampled in the idle state. Let N be the number of
nodes visited and P the number of nodes taken from the queue. Then `done` is
high exactly

    2·N + P + 2  cycles

after the cycle in which `start` was seen. That is 2 cycles per node, 1 per
queue pop, 1 for the final CHECK and 1 for the start cycle. Each matching
object produces one cycle of `out`, the cycle after its entry was examined.
Every `out` comes before `done`.

## The prune test (`range_search`)

Consider an entry `Or` of a node whose parent routing object is `Op`. The
query is `Q` with radius `r(Q)`. Let `r(Or)` be the entry's covering radius;
it counts as 0 for an object in a leaf node. The entry survives if both of
these hold:

| stage | condition | cost |
|---|---|---|
| 1 | `|d(Op,Q) − d(Or,Op)| ≤ r(Q) + r(Or)` | no distance computation: `d(Or,Op)` is stored with the entry, `d(Op,Q)` was computed one level up |
| 2 | `d(Or,Q) ≤ r(Q) + r(Or)` | one distance computation |

Stage 1 follows from the triangle inequality. It rejects entries using only
stored distances. Stage 2 is the exact test. The root node has no parent,
so stage 1 passes there. In software the point of stage 1 is to avoid
computing distances. Here both stages are evaluated in parallel in the same
cycle. The sums are 9 bits wide, so `r(Q) + r(Or)` cannot wrap. When a
routing object survives, its `d(Or,Q)` travels with the child's address, as
the child's `d(Op,Q)`. It goes either into the queue entry or into the
current-node register.

For a consistent tree, stage 1 can only reject entries that stage 2 would
reject too. It therefore changes no results, only which check does the
rejecting. The end-to-end test counts both cases.

## How the tree is stored

There are three memories. Every pointer is an address in one of them.

| memory | word (`mtree_pkg`) | fields |
|---|---|---|
| node (`node_mem`) | `node_t`, 25 bits | `leaf`, `valid1`, `valid0`, `ro_addr1`, `ro_addr0` |
| routing object (`ro_mem`) | `ro_t`, 32 bits | `value`, `radius`, `dpar` = distance to the parent routing object, `ptr` |
| object (`obj_mem`) | `obj_t`, 8 bits | the object data returned as the result |

* In a **non-leaf** node, an entry's `ptr` is the child's node address.
* In a **leaf** node, an entry is an object. Its `value` is the object's
  value and its `ptr` is the object's address in the object memory (its
  identifier). Its `radius` is ignored.
* A node may hold just one entry. The `valid` bits mark which entries exist.
* The **root is node 0**.

The tree is built before it is loaded, outside the accelerator. The test
support package `tb/mtree_tb_pkg.sv` contains one such builder. It sorts the
values and splits them in halves recursively. The centre of each half is the
half's median element, and its radius is the largest distance from that
centre to a member. Any M-tree with two entries per node and correct
`radius`/`dpar` fields will work.

## Interface (`mtree_accel`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `wr_tree` | in | 1 | write mode |
| `n_data` / `ro_data` / `o_data` | in | 25 / 32 / 8 | words for the three memories |
| `start` | in | 1 | start a query with `q`, `r_q` (latched) |
| `q`, `r_q` | in | 8 | query value and radius; `r_q = 0` is an exact-match query |
| `out` | out | 1 | one cycle per matching object |
| `result` | out | 8 | that object's data |
| `done` | out | 1 | one-cycle pulse after the last result |
| `busy` | out | 1 | a query is running |

**Loading.** Hold `wr_tree` high for W cycles. In cycle k, the words on
`n_data`, `ro_data` and `o_data` are written to address k of the node,
routing-object and object memories respectively. The address counter
restarts at 0 each time the unit is idle with `wr_tree` low. So all three
memories are loaded in lock-step. W is the largest of the three word counts,
and the shorter lists are padded with anything.

**Querying.** When `busy` is low, present `q` and `r_q` and pulse `start` for
one cycle. Both values are latched, so they may change afterwards. Collect
`result` on every cycle where `out` is high, until `done`. A `start` during
write mode is ignored.

## Structure

```
mtree_accel
├── mtree_cu        control unit: IDLE / WRITE / SEARCH1 / SEARCH2 / CHECK / DONE
└── mtree_du        datapath unit
    ├── node_mem    node memory
    ├── ro_mem      routing-object memory
    ├── obj_mem     object memory
    ├── node_fifo   queue of nodes to visit {node, d(Op,Q), has_parent}
    └── range_search
```

The control unit sends the datapath a `du_ctrl_t` bundle: write enable and
clear, query load, entry select, push, descend, pop and output enable. It
gets back a `du_stat_t`: `node_hit`, `obj_hit` and `fifo_empty`. The push,
descend and output decisions are made in the same cycle as the datapath's
status (Mealy outputs).

Within one cycle, the path starts at the current-node register and runs
through the node memory, the entry-address mux, the routing-object memory,
the subtract/compare logic and the object memory, to the result register. All
memories have **asynchronous reads** for this reason; on an FPGA they map to
distributed (LUT) RAM. To move to synchronous block RAM, add a pipeline stage
per memory, which lowers the one-entry-per-cycle rate.

Widths and depths are set in `mtree_pkg` (`DATA_W`, `ADDR_W`, `OBJ_W`) and
in the `DEPTH` parameters of the memories and the FIFO. The two-entry node
is built into the record layout and into the two search states; it is not a
parameter.

## Performance against the reference figures

These are cycle counts from simulation at 100 MHz (10 ns per cycle). The
reference implementation reported the times in the last column. Its
tree-building was not published, so the trees here are the builder's
balanced trees and only the trend can be compared.

| case | this RTL | reference |
|---|---|---|
| 1 result, 5-level tree (32 objects) | 14 cycles = 140 ns | 185 ns |
| 4 results | 22 cycles = 220 ns | 245 ns |
| 8 results | 35 cycles = 350 ns | 315 ns |
| 16 results | 52 cycles = 520 ns | 465 ns |
| exact match, 3-level tree (8 objects) | 9 cycles = 90 ns | 85 ns |
| exact match, 4-level tree (16 objects) | 12 cycles = 120 ns | 125 ns |
| exact match, 5-level tree (32 objects) | 15 cycles = 150 ns | 185 ns |

On the 15-value example set {1…8, 21…27}, the query 5 ± 1 returns
{4, 5, 6} in 19 cycles. The exact-match query 22 returns {22} in 12 cycles.

Capacity at the default sizes: a full two-entry tree of 7 node levels (128
objects) uses 127 node words and 254 routing-object words, so it fits in
256-word memories. Larger or unbalanced trees fit as long as each memory's
word count stays within 256.

## Choices made in this design

The division into control unit, datapath, three memories, FIFO and range
search follows the reference design. So do the two search states per node,
the rule "queue the first child, descend into the second", and the four
prune conditions. The following were not specified there and are this
design's own choices:

* the 8-bit widths and 256-word depths;
* the exact record layouts, including the leaf flag and the per-entry valid
  bits;
* storing leaf objects in the routing-object memory with `ptr` as the object
  address;
* root at node 0;
* loading the three memories in lock-step from one address counter;
* queue entries carry `d(Op,Q)` alongside the node address (the stage-1
  test of the child's entries needs it);
* the separate CHECK and DONE cycles;
* the registered output, the `busy` port, and synchronous reset.

Cycle counts follow from these choices. They are close to the reference
figures but do not match them exactly.

Not included: building the tree in hardware, k-nearest-neighbour queries,
multi-dimensional distance functions, and nodes of more than two entries.

## Files

* `rtl/mtree_pkg.sv` — widths, record types, control/status bundles
* `rtl/mtree_accel.sv` — top level
* `rtl/mtree_cu.sv`, `rtl/mtree_du.sv` — control unit, datapath unit
* `rtl/range_search.sv`, `rtl/node_fifo.sv`, `rtl/node_mem.sv`,
  `rtl/ro_mem.sv`, `rtl/obj_mem.sv`
* `tb/mtree_tb_pkg.sv` — tree builder and two reference models: a
  linear scan and a software tree walk
* `tb/*_tb.sv` — one self-checking testbench per module

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>`, and each has a
watchdog.

* `range_search_tb`: boundary cases of both inequalities, the root, leaf
  entries (radius ignored), invalid entries and the widest operands. Then
  20 000 random cases against integer arithmetic.
* `node_mem_tb`, `ro_mem_tb`, `obj_mem_tb`: every address is written and read
  back; then random writes (some with `we` low) and reads against an array
  model.
* `node_fifo_tb`: fill to full and drain in order, then random push/pop
  traffic (including both in one cycle) against a queue model.
* `mtree_cu_tb`: the state sequence, cycle by cycle, through write mode,
  push, descend, output, pop, done and reset.
* `mtree_du_tb`: the testbench plays the control unit and checks every
  entry's hit flags and the result stream, on the example set and random
  trees.
* `mtree_accel_tb`: the end-to-end test at default sizes. It runs the example
  queries, the level and result-count cases above, and 320 random queries on
  40 random trees of 1–111 values. For each query it checks:
  * the results, as a set, against a linear scan;
  * the result order against the software walk;
  * the cycle count against `2N + P + 2`.

  It also counts how often each mechanism occurred: write mode, push, pop,
  direct descent, output, stage-1 prune, stage-2 prune, a missing entry and
  an empty result. A mechanism that never occurs counts as a failure.

Simulate with Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module mtree_accel_tb rtl/mtree_pkg.sv tb/mtree_tb_pkg.sv tb/mtree_accel_tb.sv
./obj_dir/Vmtree_accel_tb
```

Swap in another `*_tb` as the top module to run the unit tests. All of them
finish in well under a second.
