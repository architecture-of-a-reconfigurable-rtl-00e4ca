# A search processor for exact covering over Boolean matrices

Many combinatorial problems can be stated over a Boolean (or ternary) matrix
and solved exactly by a depth-first search over a decision tree. Examples are
minimal column cover, Boolean satisfiability and graph colouring. The search
repeatedly simplifies the matrix with reduction rules. It then picks a row to
branch on, tries each of the row's columns in turn, and backtracks when a
branch cannot beat the best answer found so far.

A general-purpose CPU handles this badly. The same few wide bit-vector
operations run over and over on rows and columns, and every branching point
needs a snapshot of the search state. This design is a small special-purpose
processor for that pattern:

* the matrix is stored twice, as rows and as columns (its transpose), so any
  row or column is one read;
* the matrix is never modified: removing a row or column clears a bit in a
  row mask or column mask;
* five stacks snapshot the whole search state at a branching point and restore
  it on backtracking;
* a two-level controller separates the search algorithm (top level) from the
  vector operations it is built from (bottom level).

The RTL is configured for one problem, the **exact minimal column cover**: find
the smallest set of columns that has at least one 1 in every row. Default
capacity is 32 rows × 32 columns.

## The covering search

Three rules shrink the matrix (the "reduction rules"):

1. **Row subsumption.** If row *j* is contained in row *i*
   (`row_i & row_j == row_j`), any column that covers *j* also covers *i*.
   Row *i* is dropped. Of two equal rows, the higher-numbered one goes.
2. **Column subsumption.** If column *i* is contained in column *j*
   (`col_i & col_j == col_i`), column *j* is at least as good. Column *i* is
   dropped. Of two equal columns, the lower-numbered one goes.
3. **Dead row.** A row with no 1 left cannot be covered, so this branch fails.

Two rules then choose a component (the "selection rules"):

* A row with a single 1 forces its column into the answer (an essential
  column). No branching is needed.
* Otherwise the first row from the top with the fewest 1s is branched on. It
  gets one branch per 1, tried from the left.

Taking column *c* adds *c* to the partial result. It also removes *c* and every
row that *c* covers.

**Bound.** Let *best* be the size of the best covering recorded so far. A state
that still has rows left, and whose partial result has `size + 1 >= best`
columns, cannot improve on it and is abandoned. A state with no rows left is
recorded when `size < best`.

**Worked example.** On the 9 × 12 example in `tb/tb_cover_processor.sv`,
reduction leaves 6 rows × 6 columns. The first branching row has the columns
b, g and h. The b branch records the covering {b, c, l}, of size 3. The g
branch then records {c, g}, of size 2, and the rest of the tree is pruned.

### Keeping row weights without recounting

The selection rules need the number of 1s in every row, restricted to the
columns that are still active. Recounting every row after every change would
cost a full pass over the matrix. Instead, an **auxiliary register** holds one
counter field per row:

* it is filled once at the start, one row per cycle;
* removing column *c* decrements the field of every active row that has a 1 in
  *c*; the column memory delivers that set in one read;
* removing row *r* resets field *r* to 0.

From this register, `aux_unit` finds these in a single combinational step:

* a dead row (an active row whose field is 0);
* the first essential row (field 1);
* the first row with the fewest 1s.

### Branching points and backtracking

Opening a branching point pushes five words, one on each stack:

| stack | content |
|---|---|
| row masks | rows still in the matrix |
| column masks | columns still in the matrix |
| results | columns taken so far |
| auxiliary | the per-row 1 counts |
| branch masks | columns of the branching row **not yet tried** |

The first column is then taken.

On backtracking, the controller reads the top of the branch-mask stack:

* If more than one column remains, it restores the row mask, column mask,
  result and auxiliary register from the stack tops, leaving the stacks
  unchanged. It then clears the chosen column in the branch-mask top, in place.
* If only one column remains, this is the last branch of the point. All five
  stacks are popped.

In both cases the next column is taken. The search ends when a backtrack finds
the stacks empty. The general-purpose registers then hold the best covering
and its size.

The recursion of the search is unrolled onto these stacks, so both controllers
are flat FSMs.

## Block structure

```
cover_processor                top: wires everything below, host ports
├── ctrl_top                   algorithm level: which operation comes next
├── ctrl_ops                   operation level: sequences one operation;
│                              holds row mask, column mask, result, aux register
├── matrix_storage             row memory + column memory, 2 planes each
│   └── addr_counter ×2        row address counter, column address counter
├── func_unit ×2               vector unit, COLS wide (rows) and ROWS wide (columns)
├── aux_unit                   per-row 1-count bookkeeping and row selection
├── lifo_stack ×5              row masks, column masks, results, auxiliary, branch masks
└── gp_regfile                 general-purpose registers (0: best covering, 1: its size)
cover_pkg                      op_e command set, fu_op_e, status_t
```

### Two control levels

`ctrl_top` issues one command at a time: INIT, CHECK, ROWSUB, COLSUB, SELECT,
TAKE, BRANCH, RECORD or BACK. It waits for `op_done` and picks the next
command from the returned `status_t` flags:

```
INIT -> CHECK
CHECK : no rows left    -> RECORD (if better) or BACK
        dead row, bound -> BACK
        otherwise       -> ROWSUB
ROWSUB -> COLSUB -> (anything removed in this round ? ROWSUB : SELECT)
SELECT -> TAKE (essential row) | BRANCH
TAKE, BRANCH -> CHECK
RECORD -> BACK
BACK   -> CHECK, or finished if the stacks were empty
```

`ctrl_ops` carries out each command. It drives the two address counters, the
two vector units, the auxiliary-register unit, the stacks and the registers.
Each module's header comment describes its interface and timing.

### Matrix storage

The row memory holds one word of `COLS` bits per row. The column memory holds
the transpose: one word of `ROWS` bits per column. The read is asynchronous
from the address counter register, so the addressed row and column are both
valid in the cycle the counters hold their addresses.

A ternary matrix uses two planes:

* plane *ones* has a 1 where the value is 1;
* plane *zeros* has a 1 where the value is 0.

So 1 is coded as `10`, 0 as `01` and don't-care as `00`. The covering search
reads only the *ones* plane. Both planes are stored and readable.

## Interface and use

| port | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock, asynchronous active-low reset |
| `wr_en`, `wr_row`, `wr_ones`, `wr_zeros` | in | write one matrix row per cycle (only while not busy) |
| `n_rows`, `n_cols` | in | size of the matrix in use; rows and columns beyond it are ignored |
| `start` | in | one-cycle pulse: start a search |
| `busy` / `done` | out | search running / finished (`done` holds until the next `start`) |
| `found` | out | a covering exists |
| `best`, `best_size` | out | columns of the minimal covering (bit *c* = column *c*) and their number |

To use it:

1. Load the rows.
2. Set `n_rows` and `n_cols`.
3. Pulse `start`.
4. Wait for `done`.

A matrix with an all-zero row returns `found = 0`. Ties between coverings of
equal size go to the first one found in the search order above.

Parameters of `cover_processor`:

| parameter | default | meaning |
|---|---|---|
| `ROWS`, `COLS` | 32, 32 | capacity |
| `DEPTH` | `ROWS` | stack depth (each branching point removes at least one row, so `ROWS` always suffices) |
| `NGPR` | 4 | number of general-purpose registers |

### Timing

Each command costs its own cycles plus about 3 cycles of handshake between the
two control levels:

| command | cycles |
|---|---|
| INIT | `ROWS + 2` |
| CHECK, SELECT | 1 |
| TAKE, BRANCH, BACK, RECORD | 2 |
| ROWSUB | up to `ROWS + 3` per active row (it stops at the first row that subsumes it), 2 per inactive row |
| COLSUB | up to `COLS + 3` per active column, 2 per inactive column |

The 9 × 12 example completes in about 3,900 cycles at the default size. At
100 MHz that is about 39 µs.

## Verification

Every module has a self-checking testbench in `tb/`. Each testbench prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

* `tb_cover_processor` runs at the default 32 × 32 size. It runs:
  * the worked example, checking the sequence of recorded coverings and the
    final {c, g};
  * a matrix with no covering;
  * 40 random matrices of up to 14 × 14;
  * four sparse matrices that use all 32 rows.

  Every result is checked against a brute-force minimum computed in the
  testbench. The test also counts each search mechanism and fails if one never
  occurs: row subsumption, column subsumption, essential column, branching,
  stack pop, in-place branch-mask rewrite, pruning by the bound, dead row and
  record.
* `tb_ctrl_ops` places the bottom-level controller among the real datapath
  blocks. It drives whole searches command by command against a software
  model. After every command it compares the row mask, column mask, result,
  auxiliary register, stack depth and status. It also checks the cycle counts
  of INIT, CHECK and SELECT.
* `tb_ctrl_top` checks the command sequence against randomly answered status.
* The remaining testbenches compare their block with a reference model on
  random stimulus.

Simulating with plain Verilator, from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
    rtl/cover_pkg.sv tb/tb_cover_processor.sv --top-module tb_cover_processor
./obj_dir/Vtb_cover_processor
```

Any other testbench runs the same way with its own name. The end-to-end test
takes well under a second.

## How far this follows the architecture, and where it departs

These follow the architecture described for the processor:

* the storage organisation: matrix plus transpose, the two-plane ternary code,
  loadable address counters;
* the five stacks and what each holds;
* the general-purpose registers holding the best covering and its size;
* the two control levels;
* the auxiliary register of per-row counts with its decrement/reset update;
* the reduction, selection and bound rules;
* the example's search path.

These are this design's own choices:

* every width, depth, port and handshake;
* the command set between the control levels;
* the tie rule for equal rows;
* all cycle counts.

Departures and omissions:

* **Reconfigurability is not implemented.** The architecture calls for a
  reprogrammable control FSM and a reprogrammable functional unit, so that the
  same hardware can be re-targeted to other search problems. Here both are
  fixed and configured for covering. Other problems (for example Boolean
  satisfiability) would need a new `ctrl_ops` command set and new vector
  operations. Neither is specified well enough to build.
* **No ternary-vector operations.** The storage keeps ternary matrices, but
  the vector units implement only the Boolean operations that covering needs.
* **Column-subsumption direction.** One statement of the rule removes the
  containing column. The worked example, and correctness, require removing
  the contained column. The RTL removes the contained one.
* **Results stack.** The architecture updates the results stack top in place
  when moving to the next branch. Here the partial result is restored from the
  stack top and the next column is added, which gives the same value.
* **Flat FSMs instead of a hierarchical FSM.** The recursion lives on the
  stacks, not in a call/return mechanism of the controller.
* **Functional unit split.** The single functional unit is split into a
  row-width unit, a column-width unit and the auxiliary-register unit. This
  lets a row operation and a column operation run in the same cycle.
* **Host interface.** The load/start/done interface is an addition; no host
  interface is specified.
