// cover_pkg: types shared by the search processor.
// The top-level controller (algorithm level) talks to the bottom-level
// controller (operation level) through the op_e command set below; the
// vector functional unit is steered by fu_op_e. The split into two control
// levels follows the architecture; the command set itself is this design's
// own decomposition of the covering algorithm into operations.
package cover_pkg;

  // Operations executed by the bottom-level controller, one per command.
  typedef enum logic [3:0] {
    OP_NONE    = 4'd0,
    OP_INIT    = 4'd1,  // reset work registers, count ones of every row
    OP_CHECK   = 4'd2,  // evaluate status flags (solution, dead row, bound)
    OP_ROWSUB  = 4'd3,  // one pass of row subsumption
    OP_COLSUB  = 4'd4,  // one pass of column subsumption
    OP_SELECT  = 4'd5,  // pick essential row or branching row
    OP_TAKE    = 4'd6,  // include the single column of an essential row
    OP_BRANCH  = 4'd7,  // save branching point on the stacks, take first column
    OP_RECORD  = 4'd8,  // copy current covering into the general registers
    OP_BACK    = 4'd9   // restore last branching point, take next column
  } op_e;

  // Vector operation of the functional unit.
  typedef enum logic [1:0] {
    FU_AND  = 2'd0,   // y = a & b
    FU_ANDN = 2'd1,   // y = a & ~b
    FU_OR   = 2'd2,   // y = a | b
    FU_PASS = 2'd3    // y = a
  } fu_op_e;

  // Status returned by the bottom level after each command.
  typedef struct packed {
    logic no_rows;    // every row is covered: a solution is found
    logic dead_row;   // an active row has no active column: no covering here
    logic bound;      // current covering cannot beat the best one
    logic better;     // current covering is smaller than the best one
    logic changed;    // the last reduction pass removed something
    logic essential;  // selection found a row with a single one
    logic empty;      // no branching point left on the stacks
  } status_t;

  // General-purpose register numbers used by the covering algorithm.
  localparam int unsigned GPR_BEST      = 0;
  localparam int unsigned GPR_BEST_COST = 1;

endpackage
