# Recursive binary-tree sorter with a hardware call stack

This design sorts a small set of numbers in hardware. It runs a textbook
*recursive* algorithm directly, with no processor:

1. insert every item into a binary search tree;
2. walk the tree in order (left subtree, node, right subtree). The nodes come
   out sorted.

Both steps are recursive procedures. An HDL has no call stack, so the design
builds one. A **recursive hierarchical finite-state machine (RHFSM)** is the
control unit. It keeps the active "procedure" (module) and its state on two
hardware stacks, so a recursive call is a push and a return is a pop. An
**execution unit** holds the data and the tree. It carries out the control
unit's operation lines `y1..y9` and reports conditions `x1..x5`.

The default configuration sorts 12 words of 6 bits, with stacks 15 deep.
`N`, `DATA_W` and `STACK_DEPTH` are parameters. The sort takes about 250
clocks on average for 12 random words. It takes about 110 clocks for 6.

## The control unit: recursion as two stacks

```
             +-----------+     active module      +--------------------+
  op, state  | M_stack   |----------------------->|                    |---> y1..y9
 ----------->| FSM_stack |----------------------->|  combinational     |
             | (shared   |    state, caller       |  circuit (CC)      |<--- x1..x5
             |  pointer) |<-----------------------|                    |
             +-----------+  op / next / resume    +--------------------+
```

* `M_stack[sp]` is the module being executed (z0, z1 or z2).
  `FSM_stack[sp]` is its current state (a0..a7).
* The entries below `sp` belong to the callers. Each caller is frozen in the
  state that made its call. That saved state is the hardware's "return
  address".
* Both stacks share one pointer `sp` (`rhfsm_stacks`).

Every state lasts exactly one clock. `y` is a Moore output of the top
entry. At the clock edge the CC (`rhfsm_cc`) picks one of four actions:

| action | when | effect at the edge |
|---|---|---|
| step | ordinary state | `FSM_stack[sp] <= next state` (the top entry is overwritten) |
| call | state that invokes a module | `sp <= sp+1`, `M_stack[sp+1] <= callee`, `FSM_stack[sp+1] <= a0` |
| return | End state of z1 or z2 | `sp <= sp-1`, and the caller moves past its call state: `FSM_stack[sp-1] <= resume state` |
| halt | End state of z0 | nothing; `done` is high |

The return is the subtle part. The CC has a second input: the entry *below*
the top (`par_mod`, `par_state`). From that entry it computes where the caller
goes after its call. In the same clock as the callee's End state, it pops the
callee and advances the caller. So a return costs no extra cycle. For z0's
loop, that transition reads `x5` at this point.

A call with the stacks already full sets the sticky `error` flag. The control
unit then freezes and holds `y` at zero. The sorted result is not valid after
that.

## The three modules

The algorithm is split into three modules. States are named a0.., and a0 is
always *Begin*.

**z0 – main**

| state | y | next |
|---|---|---|
| a0 Begin | – | a1 |
| a1 | call z1 (insert one item) | after return: `x5` ? a2 : a1 |
| a2 | call z2 (in-order walk) | after return: a3 |
| a3 End | – | halt, `done` |

**z1 – insert the current item below the node in the Register (recursive)**

| state | y | next |
|---|---|---|
| a0 Begin | – | `x3` ? a1 : (`x2` ? (`x4` ? a3 : a2) : a6) |
| a1 | y8 place item as a new leaf | a7 |
| a6 | y9 item equals node: count a duplicate | a7 |
| a3 | y1, y2, call z1 (descend left) | after return: a5 |
| a5 | y6 link new leaf as left child | a7 |
| a2 | y1, y4, call z1 (descend right) | after return: a4 |
| a4 | y7 link new leaf as right child | a7 |
| a7 End | y5 restore Register | return |

**z2 – in-order walk from the node in the Register (recursive)**

| state | y | next |
|---|---|---|
| a0 Begin | – | `x1` ? a1 : a4 |
| a1 | y1, y2, call z2 (left subtree) | after return: a2 |
| a2 | y3 record node's data | a3 |
| a3 | y1, y4, call z2 (right subtree) | after return: a4 |
| a4 End | y5 restore Register | return |

## The execution unit

`execution_unit` contains:

* **`tree_ram`**: one word per item. Item *k*, once placed, is tree node *k*,
  and node 0 is the root. A word holds the data, a left and a right link, a
  duplicate count and a "placed" flag. The all-ones address `11..1` means "no
  child" (null). For this reason the address width is `clog2(N+1)`. The data
  words are loaded from `data_in` while `rst` is high.
* **Register**: the address of the node the current module works on.
* **`local_stack`**: it saves the Register across a recursive call. The caller
  pushes it (y1) in the same clock as it moves the Register to a child (y2 or
  y4). The callee's End state pops it back (y5). Popping an *empty* local stack
  loads the root address. z0 calls z1 and z2 without a push, so each top-level
  call starts at the root and leaves the Register there.
* **`output_stack`**: the in-order walk records each node here (y3), smallest
  first. A node that stands for *c* equal items writes *c* consecutive entries
  in one clock. The entries are the outputs `out_data[0..N-1]`.
* the item counter *k*, and a one-bit "pending" marker for the leaf just
  placed.

| line | meaning |
|---|---|
| y1 | push Register on the local stack |
| y2 / y4 | Register <= left / right link of its node |
| y3 | record node data (count copies) on the output stack |
| y5 | Register <= pop (root if the stack is empty) |
| y6 / y7 | if a leaf is pending: it becomes the left / right child of the Register's node; clear pending |
| y8 | place item *k* as a leaf (null links, count 1), mark it pending, *k*+1 |
| y9 | count of the Register's node +1, clear pending, *k*+1 |
| x1 | Register ≠ null |
| x2 | item *k*'s data ≠ node data |
| x3 | Register points at no placed node (null, or the root of an empty tree) |
| x4 | item *k*'s data < node data |
| x5 | *k* = N: every item is in the tree |

**How a new leaf gets linked to its parent.** z1 descends until it reaches a
null link, so the new leaf is placed in the call *below* its parent. The
parent learns of it only after the return, in a5 or a4. The "pending" marker
makes sure that only the first of those states to run (the parent's) writes
a link. Every ancestor above also passes through a5 or a4 on its way out,
but by then pending is clear and they change nothing.

## Timing

Every state is one clock, so the clock count follows from the tree shape.
From the fall of `rst` to `done`, for N items of which D are distinct:

    clocks = 4 + 4*N + 4*C + 7*D

Here C is the total number of nodes an item was compared against (and
passed) on its way down during insertion. Each insertion costs 4 clocks, plus
4 per level descended. The walk costs 5 clocks per node plus 2 per null link.

| data set | clocks (N = 12) |
|---|---|
| random (mean of 200) | ≈ 253 |
| already sorted or reverse sorted (deepest tree) | 400 |
| all equal | 59 |
| random, N = 6 (mean) | ≈ 108 |

For comparison, the original implementation reported averages of 230 clocks
for 12 items and 103 clocks for 6, with a 100 ns clock. The testbenches check
that the means here fall within 30 % of those figures. The exact clock count
of every run is checked against the formula.

**Stack sizing.** The deepest recursion comes from sorted input, where the
tree becomes a chain. With N = 12 the control stacks then hold 14 levels
(z0 plus 13 nested z2 calls) and the local stack holds 12 entries. With
`STACK_DEPTH = 15` this always fits, so `error` cannot rise at the default
size. In general, `STACK_DEPTH >= N + 2` is safe for any data.

## Interface (`recursive_sorter`)

| port | dir | width | |
|---|---|---|---|
| `clk` | in | 1 | one clock for both units |
| `rst` | in | 1 | synchronous, active high; loads `data_in` and clears everything |
| `data_in` | in | N × DATA_W | the unsorted words; must be valid while `rst` is high |
| `out_data` | out | N × DATA_W | sorted result, `out_data[0]` smallest, duplicates kept |
| `done` | out | 1 | high (and held) once the sort is finished |
| `error` | out | 1 | a stack overflowed; the result is invalid |

Usage: hold `rst` high for at least one clock with `data_in` applied, then
release it. Wait for `done`, then read `out_data`. To sort a new set, assert
`rst` again. The outputs fill in from entry 0 upward during the walk. Unused
entries read zero until written.

## Source files

| file | contents |
|---|---|
| `rtl/sort_pkg.sv` | module/state encodings, names of the y and x bits, the stack action type |
| `rtl/rhfsm_cc.sv` | the combinational circuit: the three flow charts |
| `rtl/rhfsm_stacks.sv` | M_stack and FSM_stack with their shared pointer |
| `rtl/rhfsm.sv` | control unit = CC + stacks |
| `rtl/tree_ram.sv` | node memory |
| `rtl/local_stack.sv` | Register save stack |
| `rtl/output_stack.sv` | sorted result collector |
| `rtl/execution_unit.sv` | datapath: RAM, Register, both stacks, item counter |
| `rtl/recursive_sorter.sv` | top level |

Assertions in `execution_unit` and `rhfsm_stacks` state the rules the
control unit keeps:

* the Register moves at most once per clock;
* a push always comes with a descent;
* a leaf is placed only at an empty place;
* z0 never returns.

## Simulating

Each `tb/tb_<block>.sv` is self-checking and ends by printing
`TB_RESULT checks=<n> failures=<m>`. For example, the full-size run:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/sort_pkg.sv tb/tb_recursive_sorter_full.sv \
        --top-module tb_recursive_sorter_full
    ./obj_dir/Vtb_recursive_sorter_full

Pass `rtl/sort_pkg.sv` first; `-y rtl` finds the rest.

* `tb_recursive_sorter_full` runs the default 12-word build on fixed and 200
  random sets. It checks every output word and the exact clock count of every
  run.
* `tb_recursive_sorter` runs a 6-word build. It also runs a 12-word build
  with 8-deep stacks, where sorted input must raise `error`. It counts each
  mechanism and fails if any of them never happened: calls and returns,
  recursive z1 and z2 calls, left and right links, duplicates, multi-copy
  records, root restores, and overflow.
* The block testbenches compare each unit with a model. `rhfsm_cc` is
  checked exhaustively over every state and `x` value. The stacks and the
  RAM get random operations against queue and array models. `rhfsm` is
  checked on exact state traces. `execution_unit` gets a hand-written `y`
  sequence that sorts 5, 3, 8, 5.

## What follows the original design and what is filled in

These parts follow the original description:

* the split into an RHFSM control unit and an execution unit;
* two stacks sharing one pointer, where a call pushes the module and its
  Begin state and each state change overwrites the top state;
* the three modules and their flow charts, including which `y` lines each
  state asserts and which `x` each decision tests;
* the execution blocks: RAM, Register, local stack with push y1 and pop y5,
  and output stack with record y3;
* y2 and y4 loading the left and right child address, and x1 as
  "address ≠ 11..1";
* 12 (and 6) items, 6-bit data, stacks 15 deep;
* an error output for stack overflow.

These choices are this design's own:

* **The meaning of x2–x5 and y6–y9.** The charts name these lines without
  defining them. The meanings in the table above make the z1 chart a correct
  insertion.
* **Equal values.** They share a node with a count (y9), and the walk records
  that many copies.
* **Return timing.** A return pops the stacks and advances the caller in one
  clock. Every state, Begin and End included, is one clock.
* **Memory layout.** Item *k* becomes node *k*. Popping an empty local stack
  restores the root.
* **Data entry.** Data is loaded through a `data_in` port during reset. The
  original top level shows only `clk`, `rst`, the outputs and `error`, so
  its data set was presumably built in.
* **Flags and reset.** `done` is added. `error` is the OR of all three
  stacks' overflow flags. Reset is synchronous and active high.
* **Where the outputs sit.** The result sits on the output stack inside the
  execution unit. The original top-level schematic draws the outputs on the
  control unit block.

The original targeted a Xilinx Spartan-2 (about 9,800 equivalent gates for
12 items). Nothing here is specific to an FPGA. The RAM and stacks are
register arrays with asynchronous reads, which is small at these sizes.
