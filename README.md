# APSA data-structure memory

A conventional memory only stores words; every list or vector operation is a
loop of loads and stores in the processor. The APSA memory instead gives every
word its own small piece of logic, so that whole data structures can be
searched, reshaped and indexed in a constant number of clock cycles, whatever
their length. Two kinds of wiring make this possible:

* **Neighbour paths.** Cell *i* is wired to cells *i-1* and *i+1*. In one cycle
  any subset of cells can take the word of a neighbour, which opens or closes a
  gap in the middle of a list without touching the rest of memory.
* **The sweep tree.** All cells are the leaves of one binary tree of
  combinational nodes. The controller port sits at the root. One sweep sends a
  summary up the tree and a context back down to every cell. This is how a cell
  learns global facts ("is a selected cell somewhere to my right?", "which
  element of a list am I?") and how the controller fetches a word.

A list is stored with its elements in consecutive cells. Each element except
the last has its *attached* flag set, meaning "the list continues in the next
cell". Each cell also has a *select* flag and a *mark* flag, which instructions
set and then use to steer later instructions.

This RTL implements that memory at its full size: 16,384 cells of 64 bits under
a tree of height 14. It also implements a small sequencer that turns list
commands into the primitive instruction sequences.

## Instructions

Every instruction is broadcast to all cells and completes at the next rising
clock edge. That includes the ones that need a full up-and-down sweep.

| opcode | effect in every cell |
|---|---|
| `OP_MATCH v` | select := the cell holds a value equal to `v` |
| `OP_MARK_SEL` | mark := some cell to the right is selected |
| `OP_INSERT v` | a marked cell takes its right neighbour's word; the selected cell takes value `v` |
| `OP_DELETE` | marked and selected cells take their left neighbour's word; cell 0 takes the operand word |
| `OP_INDEX n` | select := this cell is element `n` (the head is 0) of a list whose head is selected |
| `OP_LAST` | select := this cell is the last element of a list whose head is selected |
| `OP_READ` | no change; the word of the leftmost selected cell is returned on the next cycle |
| `OP_SHIFT_R` / `OP_SHIFT_L` | every cell takes its left / right neighbour's word; the end cell takes the operand word |

Flags never move. Only words (type, attached flag, value) travel along the
neighbour paths.

### Worked example: insertion in three cycles

The list `(a b d e)` sits in cells 1-4, and cell 0 is free. To insert `c`
after `b`:

1. `match b` selects cell 2.
2. `mark-to-select` marks cells 0 and 1, which are left of the selection.
3. `insert c`: cell 0 takes `a`, cell 1 takes `b`, and cell 2 takes `c`. Cells 3 and 4 keep
   `d` and `e`.

The list is now `(a b c d e)` in cells 0-4. The free cell at the left was used
up. Because the marks cover *every* cell to the left of the selection, all
data to the left moves one place down, and cell 0 must hold free space. After
`match a`, `index 3` selects `d` in a single cycle.

Two flag rules are this design's own reading of the operations:

* On insert, the cell that receives the selected cell's old word sets
  *attached*, because the new value now follows it. The selected cell keeps its
  own *attached* flag. Inserting after the last element therefore extends the
  list correctly.
* On delete, the selected cell takes its left neighbour's word. Its *attached*
  flag becomes the AND of both cells' flags. Deleting the last element
  therefore ends the list one earlier, and deleting a head leaves the preceding
  data intact.

`OP_INDEX` and `OP_LAST` work on every selected head at once, each list
counting from its own head, so one instruction indexes into many lists.
If several cells are selected, the instructions still do what the table says,
cell by cell. Insert and delete are only meaningful with one selected cell.

## How one sweep computes list positions

This is the least obvious part of the design (`apsa_pkg.sv`,
`apsa_tree_node.sv`). `OP_INDEX` needs, in every cell, its distance from a
selected head, counted only along unbroken *attached* chains. Each cell
describes what it does to a "position carry" coming from its left:

* If *attached* is clear, the chain ends here: the output is *none*, a constant.
* If the cell is selected and *attached* is set, a chain starts: the output is
  the constant 1.
* Otherwise the cell adds 1 to a valid carry.

These functions are either constants or "add k". Two of them compose into one of
the same kind (`pos_compose`), so a tree node can merge its children's
functions on the way up. On the way down it hands the left child the carry
arriving from the left. It hands the right child that carry pushed through the
left child's function (`pos_apply`). Each cell's position is then 0 if it is
selected, or else the carry it receives. `OP_LAST` uses the same carry. The same
two passes also carry a select-OR (so that `mark-to-select` sees "selected to
my right") and a leftmost-selected word (for `OP_READ`).

Up record per node: 83 bits (`up_t`). Down record: 18 bits (`dn_t`). The
longest combinational path is 2 × 14 node delays plus the cell logic.

## Modules

| module | role |
|---|---|
| `apsa_pkg` | word, instruction and sweep-record types; carry-function helpers |
| `apsa_cell` | one cell: its word and flags, and the next-state logic for every instruction |
| `apsa_tree_node` | one combinational tree node (merge up, split down) |
| `apsa_sweep_tree` | balanced tree of `2**LEVELS` leaves built from `apsa_tree_node` |
| `apsa_memory` | cells, neighbour paths, tree, controller port, registered read response |
| `apsa_list_ctrl` | command sequencer: insert-after, delete, nth, last, raw primitive |
| `apsa_system` | top: sequencer driving the memory |

Parameters: `LEVELS` (default 14) and `N_CELLS = 2**LEVELS` (default 16,384).
The package fixes the 64-bit word: a 2-bit type, the attached bit and a 61-bit
value. It also fixes the 16-bit position counter, which saturates, so memories
of up to 65,535 cells index exactly.

### Interfaces and timing

`apsa_memory`: present `ins` with `ins_valid` for one cycle per instruction. The
cells update at the next rising edge. After an `OP_READ`, `rsp_valid`,
`rsp_found` and `rsp_word` appear on the following cycle. `any_sel` reports,
every cycle, whether a cell was selected before the last instruction. Reset is
synchronous and active-low, and makes every cell free with clear flags.

`apsa_list_ctrl` / `apsa_system`: `cmd_valid`/`cmd_ready` handshake. The codes
are 0 = raw, 1 = insert after `cmd_key` the value `cmd_val`, 2 = delete
`cmd_key`, 3 = nth(`cmd_key`, `cmd_n`), and 4 = last(`cmd_key`). A command
accepted at one edge issues its first primitive in the next cycle. List
commands take 3 cycles and raw primitives 1. For nth and last, the read result
appears in the cycle after the read is issued, the same cycle in which
`cmd_ready` returns.

## What is not here

* **The interpreter and the rest of the memory controller** issue commands
  from outside. Their logic is not specified beyond the list sequences.
  Storage allocation, garbage collection, environments and continuations are
  not built.
* **Cell types.** Only the *value* type is given a meaning. The encoding (free,
  value, two reserved codes) is this design's choice.
* **Physical layout.** The tree is the logical tree. Its placement on a square
  die, as an H-tree or as a skewed H-tree in which each array position holds one
  cell and up to four nodes, is a layout question and is not modelled. So are
  the path-length recurrences and the bit-serial transfer schedules used to
  emulate the memory on a processor array.
* **Sweep width.** The source architecture expects sweeps of 3-4 bits, spread
  over several cycles, and a hardware cycle of roughly 10 µs. Here every sweep
  is wide and finishes in one cycle. A real implementation would pipeline the
  tree or serialise the records.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

* `tb_apsa_tree_node`: random summaries. The composed carry function is checked
  by evaluating it on sample carries.
* `tb_apsa_sweep_tree` (32 leaves): every leaf's carry and select-to-the-right
  bit is checked against direct list walks over the leaves.
* `tb_apsa_cell`: one cell through thousands of random states and instructions,
  against rules written out in the testbench.
* `tb_apsa_memory` (16 cells): the worked example, then 4,000 random
  instructions compared cycle by cycle with a sequential reference model
  (`apsa_ref_pkg`).
* `tb_apsa_list_ctrl`: primitive sequences, operands, cycle counts, and that
  the sequencer holds off a command while busy.
* `tb_apsa_system` (64 cells): end-to-end random list commands against the
  reference model. It counts that every mechanism occurred: both shifts,
  match, mark, insert, delete, index hits and misses, last, read, and a held-off
  command.
* `tb_apsa_system_large` (1,024 cells): the worked example with cycle counts,
  plus a list entering at the far end, so that index and last work across a
  tree of height 10.

To run one with Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/apsa_pkg.sv tb/apsa_ref_pkg.sv tb/tb_apsa_system.sv --top-module tb_apsa_system
./obj_dir/Vtb_apsa_system
```

### Simulating at full size

The RTL defaults to 16,384 cells, and both Verilator lint and the Slang front end
accept it; lint takes about 2.5 minutes. Simulating it is another matter. The
design is a flat array of 16,384 cells and 16,383 tree nodes, and Verilator's
generated C++ grows with it. The 1,024-cell system builds in about 1.5 minutes,
and the build time rises about six-fold for every four-fold increase in size.
A 16,384-cell build did not finish in 20 minutes. The largest size simulated
here is therefore 1,024 cells. The full-size run is the same test as
`tb_apsa_system_large` with `LEVELS` left at its default.
