// ctrl_top: top-level (algorithm) control of the search processor.
// It runs the recursive search of the covering algorithm as a sequence of
// commands to the bottom-level controller (ctrl_ops): initialise and count
// the ones of every row; then repeatedly check the state, apply the
// reduction rules (row and column subsumption) until a round changes
// nothing, select a component, and either take an essential column or open
// a branching point. A state with every row covered is recorded if it beats
// the best one; a state with an uncoverable row, or one that can no longer
// beat the best covering, backtracks to the last branching point. When no
// branching point is left the search is over.
// The recursion of the algorithm is unrolled onto the stacks handled by the
// bottom level, so this controller is a flat FSM. The flow follows the
// architecture's search algorithm and its reduce/select/branch/backtrack
// steps; the command set and this FSM are this design's.
//
// Handshake: a command is issued with a one-cycle cmd_start pulse and holds
// on cmd; the bottom level answers with a one-cycle op_done pulse, with
// status valid in that cycle. start is sampled in IDLE and DONE; done stays
// high from the end of a search until the next start.
module ctrl_top
  import cover_pkg::*;
(
  input  logic    clk,
  input  logic    rst_n,
  input  logic    start,
  output logic    busy,
  output logic    done,
  output op_e     cmd,
  output logic    cmd_start,
  input  logic    op_done,
  input  status_t status
);
  typedef enum logic [1:0] {T_IDLE, T_ISSUE, T_WAIT, T_DONE} tstate_e;

  tstate_e state;
  op_e     cur, nxt;
  logic    round_changed;   // a reduction pass of this round removed something
  logic    finish;

  // next command after the one that just completed
  always_comb begin
    nxt    = OP_NONE;
    finish = 1'b0;
    unique case (cur)
      OP_INIT:   nxt = OP_CHECK;
      OP_CHECK: begin
        if (status.no_rows)                     nxt = status.better ? OP_RECORD : OP_BACK;
        else if (status.dead_row || status.bound) nxt = OP_BACK;
        else                                    nxt = OP_ROWSUB;
      end
      OP_ROWSUB: nxt = OP_COLSUB;
      OP_COLSUB: nxt = (round_changed || status.changed) ? OP_ROWSUB : OP_SELECT;
      OP_SELECT: nxt = status.essential ? OP_TAKE : OP_BRANCH;
      OP_TAKE:   nxt = OP_CHECK;
      OP_BRANCH: nxt = OP_CHECK;
      OP_RECORD: nxt = OP_BACK;
      OP_BACK: begin
        if (status.empty) finish = 1'b1;
        else              nxt = OP_CHECK;
      end
      default:   finish = 1'b1;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state         <= T_IDLE;
      cur           <= OP_NONE;
      round_changed <= 1'b0;
    end else begin
      unique case (state)
        T_IDLE, T_DONE: if (start) begin
          cur   <= OP_INIT;
          state <= T_ISSUE;
        end
        T_ISSUE: state <= T_WAIT;
        T_WAIT: if (op_done) begin
          // a reduction round is a row pass then a column pass
          if (cur == OP_ROWSUB)      round_changed <= status.changed;
          if (finish) begin
            state <= T_DONE;
          end else begin
            cur   <= nxt;
            state <= T_ISSUE;
          end
        end
        default: state <= T_IDLE;
      endcase
    end
  end

  assign cmd       = cur;
  assign cmd_start = (state == T_ISSUE);
  assign busy      = (state == T_ISSUE) || (state == T_WAIT);
  assign done      = (state == T_DONE);

  a_done_only_waiting: assert property (@(posedge clk) disable iff (!rst_n) op_done |-> state == T_WAIT);
endmodule
