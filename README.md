# Hierarchical FSMs in hardware: calls, returns and recursion for control units

An ordinary finite state machine is flat: every algorithm it runs is spelled
out as one graph of states. A *hierarchical* FSM (HFSM) lets one control
algorithm call another like a subroutine, return to where it came from, run
several algorithms at once, and even call itself. The trick is small: the
control unit keeps a **module stack** and a **state stack** that share one
stack pointer. The entry at the pointer says which algorithm (module) is
active and which state it is in. A call pushes a new level; a return pops
one and the caller resumes in the state it left behind.

This repository holds that HFSM core and the five demonstrators built on it,
all working on binary search trees of 5-bit integers:

| Demonstrator | Modules | What it does |
|---|---|---|
| `hfsm_minmax` | z0 calls z1, then z2 | minimum and maximum of a tree, one module after the other |
| `minmax_parallel` | z1 and z2 as two autonomous FSMs | the same, both walks at once, joined at the end |
| `hfsm_qstack_minmax` | z0 invokes {z1, z2} on two module/state stacks | the same, as one HFSM with parallel stacks |
| `hfsm_min_sort` | z0 calls z1, then z3 (recursive) | minimum of a tree, then the whole tree sorted |
| `hfsm_sorter` | z0 calls z4 and z3, both recursive | keeps a stream of integers permanently sorted |

`hfsm_top` places the five side by side. The design follows a published
Handel-C description of these HFSMs. Where it departs from that description,
or where the description is silent, this README says so.

## The HFSM core (`hfsm_stack`)

Two arrays, `m_stack` (module codes) and `fsm_stack` (state codes), share the
pointer `sp`. Both are read combinationally at `sp`: `cur_mod` and `cur_state`
are the active module and its state, valid during the whole cycle. Every cycle
the active module asks for one operation:

| `op` | effect at the clock edge |
|---|---|
| `STK_HOLD` | nothing |
| `STK_NEXT` | `fsm_stack[sp] <= ns` |
| `STK_CALL` | `fsm_stack[sp] <= ns` (where to resume), then `sp++`, new level = {`callee`, a0} |
| `STK_RET`  | `sp--`; at level 0 the top module has finished and `ends` is set |

A call writes the return state and opens the new level in the same cycle, so
calling costs no extra cycle. A call at a full stack is ignored (the published
design does the same). This version also raises a sticky `overflow` flag. `start`
restarts the stack with module `start_mod` in a0. With `RUN_AFTER_RESET = 1`
reset does the same with z0;
with `RUN_AFTER_RESET = 0` reset leaves the machine finished until the first
`start`.

**Timing rule used throughout:** one state of one module takes one clock cycle.
The published description gives no cycle timing. The cycle counts below follow
from this rule and the testbenches check them.

## Modules as combinational blocks (`hgs_*`)

Each module is a graph of states (a hierarchical graph-scheme). Here each one is
a small combinational block. Its inputs are the active state and a few logic
conditions. Its outputs are a `hfsm_ctl_t` (stack operation, next state,
callee) and a `uop_t` (micro-operations for the datapath). The types are in
`hfsm_pkg`. A controller selects the active module's outputs with
`case (cur_mod)` and applies the micro-operations to its registers. This is the
two-level "select module, then select state" structure of the original, written
as hardware. The same blocks are reused unchanged: `hgs_z1_min` and
`hgs_z2_max` drive the hierarchical, the parallel-FSM and the parallel-stack
min/max, and `hgs_z1_min` and `hgs_z3_sort` are shared by `hfsm_min_sort` and
the sorter.

| Module | States | Behaviour |
|---|---|---|
| z0 (min/max) `hgs_z0_minmax` | a0..a2 | reg = root, call z1; reg = root, call z2 (z3 if `SECOND = Z3`); end |
| z1 `hgs_z1_min` | a0..a2 | while a left sub-tree exists: reg = left; then result[0] = value, return |
| z2 `hgs_z2_max` | a0..a2 | same with the right sub-tree, result[1] |
| z3 `hgs_z3_sort` | a0..a4 | recursive in-order traversal into the output stack |
| z4 `hgs_z4_insert` | a0..a7 | recursive insertion of the incoming item |
| z0 (sorter) `hgs_z0_sort` | a0..a1 | per item: call z4; if a node was added, call z3 |
| z0 (parallel stacks) `hgs_z0_par` | a0..a2 | call z1 and fork z2 onto the second stack; wait for both; end |

## The tree memory (`tree_ram`)

32 rows. Row *i* is `{val, left, right, cnt}`: a 5-bit value, pointers to the
left sub-tree (smaller values) and the right sub-tree (larger values), and a
4-bit count of how often the value arrived. The pointer code **31 (NIL)** means
"no sub-tree". So rows 0..30 hold nodes and only values 0..30 can be stored.
Reads are asynchronous (two ports), so a state can test a node and act on it
in the same cycle. One write port writes any subset of the fields. Reset and
`clear` load either an empty tree or, with `INIT_FIG1 = 1`, this ten-node
example:

```
            5(0)
          /      \
       4(1)      9(2)               value(row)
       /        /    \
    3(3)      6(4)   10(9)
    /            \
  1(5)           8(8)
     \           /
     2(6)      7(7)
```

## Recursion: how the local stack carries node addresses

This is the least obvious part of the sorter. Three things must survive a
recursive call: the caller's module and state, which the HFSM stacks keep; the
caller's node, which the **local stack** keeps; and the callee's answer.

`local_stack` is an array with pointer `sp` and two read taps:
`top = mem[sp-1]` and `above = mem[sp+1]`.

* Before recursing, the caller pushes its node (`LS_PUSH`: `mem[sp] = reg`,
  `sp++`) and sets reg to the child.
* A finishing callee may leave a result in `mem[sp]` (`LS_PUT`). It then pops
  (`sp--`) and restores `reg = top`, which is the caller's node.
* After the pop, the caller's pointer is back where it was before its push. The
  callee's result therefore sits at `mem[sp+1]`, where the caller reads it
  through `above`.

z4 uses this to hang a new node into the tree on the way back up. At the bottom
(reg = NIL), a1 allocates the row `RAM_w+1` and leaves its address as the
result. Each level above links the returned address into its left (a4) or
right (a5) pointer and returns its own node, which is still in the slot at its
pointer. A repeated value (a6) increments the node's count and returns the node
itself, so the links above are rewritten unchanged. Whether a node was added is
recorded in the flag `added`, which z0 reads.

z3 visits the right sub-tree, pushes the node to the output stack, then visits
the left sub-tree. So the output stack fills from the largest value down. Entry
0 is the maximum and entry `so_count-1` (the top) is the minimum. Setting
`LEFT_FIRST = 1` swaps the two visits and with them the order.

Depth: the worst tree is a chain of 31 nodes (values sent in order). Then z0
plus 31 levels of z4 or z3 plus the call on the empty sub-tree need 33 stack
levels. So `DEPTH = 33` and the local stack has 36 slots. The testbench drives
exactly this case.

## The demonstrators

### Sequential min/max — `hfsm_minmax`

Pulse `start`. z0 calls z1, then z2, both from the root (row 0). `done` rises
with `result_min` and `result_max` valid. It takes 3 + (L+2) + (R+2) cycles,
where L and R are the numbers of left and right edges from the root to the
minimum and the maximum. On the example tree that is **12 cycles** (1 and 10).
The tree resets to the example and can be rewritten row by row through
`tree_we/tree_addr/tree_row` while `done` is high.

### Parallel min/max — `minmax_parallel`

z1 and z2 each get a state register and a node register of their own, and read
the tree through the two read ports. `start` launches both. `done` is the join:
it stays low until *both* have executed their return. That takes max(L+2, R+2)
cycles: **5 cycles** on the example tree.

### Parallel stacks — `hfsm_qstack_minmax`

This is the general HFSM form of parallelism. A node of a module may invoke a
*set* of modules, and the module may leave that node only when all of them
have finished. If at most q modules run at once, the control unit needs q
module stacks and q state stacks, and each branch gets its own copy of the
execution resources. Here q = 2. Each stack has its own `hfsm_stack`, its own
node register and its own tree read port, and selects its own active module.
In a0, z0 calls z1 on stack 0 and, in the same cycle, forks z2 onto stack 1
(`start` with `start_mod = Z2`). When z1 returns, z0 sits in a1 until stack 1
reports `ends`. A run takes 3 + max(L+2, R+2) cycles: **8 cycles** on the
example tree. The original's own demonstration used the autonomous-FSM form
above for this example. The parallel-stack form is the scheme it describes for
the general case. It is built here with the minimum needed: a fork and a join.
No further synchronisation between branches is built.

### Minimum then sort — `hfsm_min_sort`

This one shows what reuse buys. It is `hfsm_minmax` with one change: node a1
of z0 calls the recursive sorting module z3 where it called z2 (the z0 block
with parameter `SECOND = Z3`). z1 and z3 are the unchanged blocks. The
datapath grows by what z3 needs, a local stack and an output stack. `start`
empties the output stack and runs z0. When `done` rises, `result_min` holds
the minimum and the output stack holds every node of the tree, read through
`so_idx/so_entry/so_count` like the sorter's. With the default
`LEFT_FIRST = 0` the largest value is entry 0. A run takes
3 + (L+2) + 7n + 2 cycles for a tree of n nodes: **80 cycles** on the example
tree. The tree is loaded as in `hfsm_minmax`.

### Sorter — `hfsm_sorter`

Items arrive on a valid/ready stream (`in_valid`, `in_item`, `in_ready`). The
source must hold an item until it is taken. For each item z0 sets reg to the
root and calls z4. When z4 returns, z0 consumes the item. If a node was added,
z0 clears the output stack and calls z3 to rebuild it. The item code 31 is
consumed and dropped. `clear` empties the tree and the output stack and
restarts z0, even in the middle of a run. `idle` is high while z0 waits. The
output stack is then complete and can be read through `so_idx`, `so_entry`
(`{cnt, 000@value}`) and `so_count`.

Cost per item, for an item that ends at depth d (edges from the root):

* 1 + (4d + 3) + 1 cycles up to the handshake;
* plus 5n + 2(n+1) = 7n + 2 cycles of sorting, if a node was added to a tree
  that now has n nodes.

A repeated value does not trigger a sort. Its new count therefore becomes
visible in the output stack only after the next new value.

### Item sources and the top (`item_rom`, `hfsm_top`)

`item_rom` is the internal source. It holds 12 items (5 4 9 3 6 1 2 8 7 10 4 9)
and presents them on the stream. `hfsm_top` feeds the sorter from the ROM when
`src_sel = 0`. When `src_sel = 1` it uses the external stream
(`ext_valid/ext_item/ext_ready`). In the original system that stream carried a
pointing device's coordinate: one button added a value and another withdrew
everything. That is what `clear` does here, and it also rewinds the ROM.
`src_sel` should change only while `sort_idle` is high. The four
tree-walking designs share the loader port, and `so_idx` reads both output
stacks. `rst` is synchronous and active high.

## Where this design departs from the original or fills gaps

* **Walk direction of z1/z2.** The original's code listing for z1 follows the
  right pointer and for z2 the left one. Its prose and diagrams say the
  opposite: z1 tests for and selects the *left* sub-tree, z2 the *right*. The
  stored example tree (smaller values on the left) confirms the prose. Here z1
  goes left and finds the minimum; z2 goes right and finds the maximum.
* **Repeat counting.** The original's insertion code advances the input address
  when a value repeats. Its text says the node's counter is incremented. Here
  the count field is incremented, and z0 consumes every item. The count field
  (4 bits, saturating at 15) is this design's.
* **Sorter z0** is given in the original only in words. Its two-state form, the
  valid/ready stream, and dropping the item 31 are this design's.
* **Restoring reg at the outermost return.** When the local stack is empty, the
  original reads the slot below index 0. Here reg is left unchanged.
* **Minimum then sort.** The original only remarks that z3 can take z2's place
  in z0. Clearing the output stack on `start` is this design's.
* **Sizes** not given by the original: q = 2, stack depths (33 and 4), local stack
  (36), output stack (32 entries), ROM contents. The 32-row tree, 5-bit values,
  code 31 and the 8-bit `000@value` output words are the original's.
* **Reset behaviour and cycle timing** are this design's (see the core section).
* **Not built:** the pointing-device interface and the display of the
  demonstration board, which are not described. Their places are the
  external stream, `clear` and the output-stack read port.

## Files

`rtl/` holds one module or package per file:

* `hfsm_pkg` — types and codes
* `hfsm_stack` — the HFSM core
* `tree_ram`, `local_stack`, `output_stack`, `item_rom` — datapath parts
* `hgs_z0_minmax`, `hgs_z1_min`, `hgs_z2_max`, `hgs_z3_sort`, `hgs_z4_insert`,
  `hgs_z0_sort`, `hgs_z0_par` — the modules
* `hfsm_minmax`, `minmax_parallel`, `hfsm_qstack_minmax`, `hfsm_min_sort`,
  `hfsm_sorter` — the demonstrators
* `hfsm_top` — the top

`tb/` holds one self-checking testbench per module, `tb_<module>`. Each one
ends with a line `TB_RESULT checks=N failures=M` and has a watchdog. The
results are compared with models written in the testbench: a behavioural
binary search tree for the sorter, and tree builders for min/max. Cycle counts
are checked against the formulas above. `tb_hfsm_top` runs all five
demonstrators end to end with default parameters. It counts every mechanism
(hierarchical calls, recursive calls, join waits, forks onto the second stack,
waits for the branch stack, z3 called in place of z2, node allocation, repeat counts, dropped 31s, clear,
both sources, tree loading) and fails if one never
happens.

To simulate with Verilator 5:

```
verilator --binary --timing --assert -Wall -Wno-fatal --top-module tb_hfsm_top \
    -y rtl -y tb +libext+.sv -Irtl rtl/hfsm_pkg.sv tb/tb_hfsm_top.sv
./obj_dir/Vtb_hfsm_top
```

Replace `tb_hfsm_top` with any other testbench name. All files are
synthesizable SystemVerilog-2017 except the testbenches. The only Verilator
warnings are about unused signals: stack pointers and overflow flags that the
demonstrators do not bring out, and micro-operation fields that a given
controller does not use.
