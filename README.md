# Systolic tree queue

A first-in first-out queue built from a binary tree of identical small
processors instead of a RAM with read and write pointers. Each node stores
one item. New items enter at the root and trickle down towards the leaves,
one level per clock. Deleted items leave from the root, and the remaining
items move up one level per clock to fill the gap. All connections are
local, between a node and its parent and children. The root answers every
instruction in one clock, so the queue takes one insert or one delete per
clock, however deep the tree is.

The default configuration is a 15-node tree (4 levels) of 8-bit items,
i.e. a 15-entry x 8-bit FIFO. Depth and width are parameters.

## How the tree keeps FIFO order

Each node has a data register **S** with an occupancy flag **LS**. S always
holds the oldest item of the node's subtree. A second register, **B**, holds
an item on its way down. Two one-bit pointers choose a child: **CI** for the
next insert and **CD** for the next refill. Both start at "left".

* **Insert into an empty node**: the item goes into S, and CI and CD are
  reset to left.
* **Insert into a full node**: the item is parked in B. On the next clock it
  is offered to the child that CI selects, with an insert command (IL or
  IR). CI then flips, so items passing a node go left, right, left, right, ...
* **Delete at a full node**: S leaves the node. The parent reads it directly;
  at the root it is the queue output. S is then refilled, in one of three ways:
  1. If the child that CD selects is occupied, S takes that child's S. The
     child gets a delete command (DL or DR) on the next clock and refills
     itself the same way. CD flips.
  2. If that child is empty but an item is in B on its way down (flag
     **LB**), S takes the item back from B. Its forward to the child is
     cancelled, and CD flips.
  3. Otherwise the subtree is empty and LS is cleared.

Inserts and deletes both alternate left/right, in the same order, starting
from the same side. So the k-th item sent into a child's subtree is also the
k-th one taken back out of it. By induction over the tree, S holds the oldest
item of its subtree, and the root holds the front of the queue.

The same alternation keeps each node's two subtrees within one item of each
other. A tree of L levels therefore fills completely before any leaf is asked
to hold a second item, and its capacity is exactly `2**L - 1` items.

After 15 inserts of the items 1..15 into the empty 15-node tree, the items sit
in these nodes:

```
                 1
         2               3
     4       6       5       7
   8  12  10  14   9  13  11  15
```

### Timing inside the tree

Commands to a child are registered (IL, IR, DL, DR, and B as data), so a child
acts one clock after its parent. A parent reads a child's S combinationally in
the clock of its own delete. The child's delete only arrives one clock later.
This works because CD flips on every refill: a parent reads the same child at
most every second clock, and by then the child has refilled.

A parent must decide whether the chosen child is empty. It looks only at the
LS of the child that CD selects. The LS of the other child may be one clock
out of date, if that child was read in the previous clock and has not yet
processed its delete. By the alternation, the selected child is empty only
when both children are empty. A test on "both children empty" would use the
stale flag, and it does break the queue under back-to-back deletes.

An insert into a full node puts the item in B for exactly one clock. A delete
in that clock, with the selected child empty, finds the in-flight item there
(case 2 above).

## Modules

| file | module | role |
|---|---|---|
| `rtl/stq_pkg.sv` | `stq_pkg` | default sizes, node count, heap-order index functions |
| `rtl/stq_node.sv` | `stq_node` | one tree node: S, B and the eight flags, the five update rules |
| `rtl/stq_tree.sv` | `stq_tree` | `2**LEVELS-1` nodes in heap order: node i has children 2i and 2i+1 |
| `rtl/systolic_tree_queue.sv` | `systolic_tree_queue` | top: the tree plus an occupancy counter with full/empty handling |

### `systolic_tree_queue` interface

Parameters: `WIDTH` (default 8) and `LEVELS` (default 4, i.e. 15 entries).

| port | dir | meaning |
|---|---|---|
| `clk`, `rst` | in | clock; synchronous active-high reset that empties the queue |
| `ins`, `din` | in | insert `din`; stored at the next rising edge |
| `del` | in | delete the front item |
| `dout`, `dout_valid` | out | front item during an accepted delete, in the same clock; `dout` is zero otherwise |
| `ins_ok`, `del_ok` | out | the request was accepted in this clock |
| `ovf`, `udf` | out | insert refused (full), delete refused (empty) |
| `full`, `empty`, `count` | out | occupancy |
| `node_s`, `node_ls` | out | S and LS of every node, indexed by heap number, for observation |

Rules:

* An insert is refused when the queue is full.
* A delete is refused when the queue is empty.
* If `ins` and `del` are both high, the delete is performed and the insert is
  refused.
* An item inserted in one clock can be deleted in the very next clock.

### `stq_tree` and `stq_node`

`stq_tree` has the bare root interface (`ins`, `del`, `topi`, `topd`,
`root_ls`) and no occupancy check. In the bare tree, an insert beyond capacity
lands in a leaf's B register and is lost, and a delete of an empty tree does
nothing. The ports of `stq_node` are described in its header. They are the
node's three links: one to the parent and one to each child.

Assertions check two rules: a node never receives an insert and a delete in
the same clock, and the root is occupied exactly when the counter is non-zero.

## Choices made in this implementation

The register set, the flags and the update rules follow the reference
behavioural model. Its left-first alternation matches the published examples:
the item placement above, and single-node and three-node traces. The following
points were left open and were decided here:

* **Selected-child emptiness test**, as explained above. The reference
  pseudo code tests both children.
* **LB** marks the in-flight B item for one clock.
* **B take-back** cancels the forward of the item, so it is not stored twice.
* **Occupancy guard**. The reference queue has no full or empty logic: items
  inserted beyond its capacity are lost in the leaves. `systolic_tree_queue`
  adds a counter that refuses such inserts, and also refuses deletes from an
  empty queue.
* **Reset** is synchronous and clears every register.
* **Output bus**: at the root, `dout` is S gated by the delete, and zero
  otherwise.

## Not in the RTL

The reference implementation is a 2 µm standard-cell chip, in which:

* the nodes are placed in a 4 x 4 array of tiles, with one tile spare for
  building bigger trees;
* the placement tool adds a scan path;
* the chip sits in a pad frame.

None of this is logic to be described in RTL. A bigger tree is just a larger
`LEVELS`. The reported 18 MHz clock belongs to that technology. It says
nothing about the speed of this RTL in another process. The longest
combinational path starts at a node's delete input and can pass into its
child's insert logic: that is where the forward is cancelled on a B
take-back.

## Verification

Each testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

* `tb/tb_stq_node.sv` tests a single node, with the testbench playing parent
  and children:
  * inserts 11, 22, 33, 44, 55, 66: 11 stays in S; 22, 44, 66 are offered left
    and 33, 55 right, one clock after they arrive;
  * refills from the left child, then the right child, with the delete passed
    down one clock later;
  * refill from B, with the forward cancelled;
  * emptying, restart of the alternation, and a delete to an empty node.
* `tb/tb_stq_tree.sv` has two parts:
  * A 3-node tree receives 11, 22, 33, 44, 55. 11, 22 and 33 land in the three
    S registers, and 44 and 55 are stranded in the leaves' B registers. Deletes
    on consecutive clocks then return 11, 22 and 33.
  * A 6-level (63-node) tree runs random traffic against a FIFO model. After
    each pause, the tree's occupancy is compared with the model.
* `tb/tb_systolic_tree_queue.sv` runs the default 15 x 8 queue with its
  parameters untouched:
  * 15 inserts on consecutive clocks, checked against the placement shown
    above, then a refused 16th insert;
  * 15 deletes on consecutive clocks, returning 1..15, then a refused delete;
  * about 9,000 clocks of random traffic, some biased towards inserts and some
    towards deletes, checked every clock against a SystemVerilog queue.

  It counts every node-level mechanism (insert into an empty node,
  park-and-forward, refill from a child, refill from B, emptying) and every
  queue-level event (full, empty, refused insert, refused delete, simultaneous
  request, delete right after insert). It fails if any of them never happens.

* `tb/tb_stq_larger_queues.sv` builds the queue as a 5-level (31-entry) and a
  6-level (63-entry) tree. Each runs random traffic through
  `tb/stq_queue_checker.sv`, which fills the queue and drains it many times
  and checks every output against a FIFO model.

The end-to-end testbench counts node mechanisms with `tb/stq_node_monitor.sv`,
which it binds into every `stq_node`.

To run one with Verilator:

```
verilator --binary --timing --assert -y rtl -y tb +libext+.sv rtl/stq_pkg.sv \
  tb/tb_systolic_tree_queue.sv --top-module tb_systolic_tree_queue
./obj_dir/Vtb_systolic_tree_queue
```

The testbenches run in well under a second each.

## Changing the design

* Deeper or wider queue: set `LEVELS` and `WIDTH` on `systolic_tree_queue`.
  Capacity is `2**LEVELS - 1`. Each level adds one clock before a new item
  reaches its final leaf, but throughput and output latency do not change.
* The node uses no global signal other than clock and reset, so the tree can
  be cut into subtrees at any level.
