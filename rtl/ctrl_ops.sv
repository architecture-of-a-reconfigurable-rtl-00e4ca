// ctrl_ops: bottom-level (operation) control of the search processor.
// It holds the working registers of the search -- the row mask and column
// mask (rows and columns still in the matrix; the matrix itself is never
// changed), the partial result (columns taken so far) and the auxiliary
// register (number of ones of every row in the remaining columns) -- and
// executes one command of the top-level controller at a time by sequencing
// the matrix storage, the two functional units, the auxiliary-register
// unit, the five stacks and the general-purpose registers:
//   INIT    masks from row_valid/col_valid, result and stacks cleared, best
//           size set to all ones ("none yet"), then one cycle per row to
//           store its number of ones in the auxiliary register
//   CHECK   one cycle: no_rows, dead_row, better (size < best size) and
//           bound (size + 1 >= best size: no improvement possible)
//   ROWSUB  row i is removed if some other active row j is contained in it
//           (row_i & row_j == row_j); of two equal rows the higher-numbered
//           one goes. One cycle per (i, j) pair plus two per active row i
//   COLSUB  column i is removed if it is contained in some other active
//           column j; of two equal columns the lower-numbered one goes.
//           Removal decrements the auxiliary fields of the rows it covered
//   SELECT  one cycle: a row with a single one if there is one (essential),
//           otherwise the first row with the fewest ones
//   TAKE    the single column of the essential row is taken
//   BRANCH  the state is pushed on the stacks with the selected row's other
//           columns as branch mask, and its first column is taken
//   RECORD  two cycles: best covering and its size into the registers
//   BACK    the top branching point is restored and its next column taken;
//           for its last column all stacks are popped, otherwise only the
//           branch-mask stack top is rewritten in place
// Taking column c removes c and every active row with a 1 in c, and adds c
// to the result (one cycle after the column address is loaded).
// The masks, the stacked items, the row-count bookkeeping and the rules
// follow the architecture, and so does removing the contained column (the
// worked example removes it; one statement of the rule has the two columns
// swapped). Which of two equal columns goes also follows the worked example
// (e goes, g stays). Which of two equal rows goes, the command granularity
// and all cycle counts are this design's.
//
// Handshake: see ctrl_top; op_done is a registered one-cycle pulse and
// status is registered.
module ctrl_ops
  import cover_pkg::*;
#(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32,
  parameter int unsigned RAW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned CAW  = (COLS > 1) ? $clog2(COLS) : 1,
  parameter int unsigned CW   = $clog2(COLS + 1),
  parameter int unsigned GAW  = 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // command from the top level
  input  op_e                     cmd,
  input  logic                    cmd_start,
  output logic                    op_done,
  output status_t                 status,
  // matrix size
  input  logic [ROWS-1:0]         row_valid,
  input  logic [COLS-1:0]         col_valid,
  // matrix storage
  output logic                    row_clr,
  output logic                    row_ld,
  output logic [RAW-1:0]          row_ld_val,
  output logic                    row_inc,
  input  logic [RAW-1:0]          row_addr,
  input  logic                    row_last,
  output logic                    col_clr,
  output logic                    col_ld,
  output logic [CAW-1:0]          col_ld_val,
  output logic                    col_inc,
  input  logic [CAW-1:0]          col_addr,
  input  logic                    col_last,
  input  logic [COLS-1:0]         row_ones,
  input  logic [ROWS-1:0]         col_ones,
  // functional unit on row vectors (COLS bits)
  output fu_op_e                  fr_op,
  output logic [COLS-1:0]         fr_a,
  output logic [COLS-1:0]         fr_b,
  output logic [COLS-1:0]         fr_c,
  input  logic [COLS-1:0]         fr_y,
  input  logic                    fr_sub,
  input  logic                    fr_equal,
  input  logic [CW-1:0]           fr_ones,
  input  logic [CAW-1:0]          fr_first,
  input  logic [COLS-1:0]         fr_first_oh,
  // functional unit on column vectors (ROWS bits)
  output fu_op_e                  fc_op,
  output logic [ROWS-1:0]         fc_a,
  output logic [ROWS-1:0]         fc_b,
  output logic [ROWS-1:0]         fc_c,
  input  logic [ROWS-1:0]         fc_y,
  input  logic                    fc_sup,
  input  logic                    fc_equal,
  // auxiliary-register unit
  output logic [ROWS-1:0][CW-1:0] aux,
  output logic [ROWS-1:0]         row_mask,
  output logic [ROWS-1:0]         ax_dec,
  output logic [ROWS-1:0]         ax_clr,
  output logic                    ax_set,
  output logic [RAW-1:0]          ax_set_idx,
  output logic [CW-1:0]           ax_set_val,
  input  logic [ROWS-1:0][CW-1:0] ax_next,
  input  logic                    ax_dead,
  input  logic                    ax_ess,
  input  logic [RAW-1:0]          ax_ess_row,
  input  logic [RAW-1:0]          ax_min_row,
  // stacks (all five push, pop and clear together)
  output logic                    st_clr,
  output logic                    st_push,
  output logic                    st_pop,
  output logic [ROWS-1:0]         st_rmask_din,
  input  logic [ROWS-1:0]         st_rmask_top,
  output logic [COLS-1:0]         st_cmask_din,
  input  logic [COLS-1:0]         st_cmask_top,
  output logic [COLS-1:0]         st_res_din,
  input  logic [COLS-1:0]         st_res_top,
  output logic [ROWS*CW-1:0]      st_aux_din,
  input  logic [ROWS*CW-1:0]      st_aux_top,
  output logic [COLS-1:0]         st_br_din,
  input  logic [COLS-1:0]         st_br_top,
  output logic                    st_br_wr_top,
  output logic [COLS-1:0]         st_br_top_din,
  input  logic                    st_empty,
  // general-purpose registers
  output logic                    gp_we,
  output logic [GAW-1:0]          gp_waddr,
  output logic [COLS-1:0]         gp_wdata,
  input  logic [COLS-1:0]         gp_best_cost
);
  typedef enum logic [4:0] {
    S_IDLE, S_INIT0, S_INIT1, S_CNT, S_CHECK,
    S_RS_I, S_RS_LD, S_RS_J, S_RS_NXT,
    S_CS_I, S_CS_LD, S_CS_J, S_CS_NXT,
    S_SEL, S_TAKE, S_BRANCH, S_APPLY, S_REC0, S_REC1, S_BACK
  } ostate_e;

  ostate_e          state, state_n;
  logic [COLS-1:0]  col_mask, result;
  logic [RAW-1:0]   ri;           // row i of row subsumption, selected row
  logic [CAW-1:0]   ci;           // column i of column subsumption
  logic [COLS-1:0]  a_row;        // row i restricted to active columns
  logic [ROWS-1:0]  a_col;        // column i restricted to active rows
  logic             changed;
  logic             fin;          // operation ends this cycle
  status_t          st_n;         // status produced by the ending operation

  logic [COLS+1:0]  cost_x, best_x;
  assign cost_x = (COLS+2)'(fr_ones);
  assign best_x = (COLS+2)'(gp_best_cost);

  // row i removable by row j (row j contained in row i, equal: higher goes)
  logic rs_hit;
  assign rs_hit = row_mask[row_addr] && (row_addr != ri) && fr_sub &&
                  (!fr_equal || (row_addr < ri));
  // column i removable by column j (column i contained in column j, equal:
  // the lower-numbered one goes, as in the worked example where e goes, g stays)
  logic cs_hit;
  assign cs_hit = col_mask[col_addr] && (col_addr != ci) && fc_sup &&
                  (!fc_equal || (col_addr > ci));

  logic [COLS-1:0] col_oh;
  assign col_oh = COLS'(1) << col_addr;

  always_comb begin
    state_n       = state;
    fin           = 1'b0;
    st_n          = '0;
    row_clr       = 1'b0; row_ld = 1'b0; row_ld_val = ri; row_inc = 1'b0;
    col_clr       = 1'b0; col_ld = 1'b0; col_ld_val = ci; col_inc = 1'b0;
    fr_op         = FU_AND; fr_a = row_ones; fr_b = col_mask; fr_c = a_row;
    fc_op         = FU_AND; fc_a = col_ones; fc_b = row_mask; fc_c = a_col;
    ax_dec        = '0; ax_clr = '0; ax_set = 1'b0; ax_set_idx = row_addr; ax_set_val = fr_ones;
    st_clr        = 1'b0; st_push = 1'b0; st_pop = 1'b0; st_br_wr_top = 1'b0;
    st_rmask_din  = row_mask;
    st_cmask_din  = col_mask;
    st_res_din    = result;
    st_aux_din    = aux;
    st_br_din     = fr_y & ~fr_first_oh;
    st_br_top_din = st_br_top & ~fr_first_oh;
    gp_we         = 1'b0; gp_waddr = GAW'(GPR_BEST); gp_wdata = result;

    unique case (state)
      S_IDLE: if (cmd_start) begin
        unique case (cmd)
          OP_INIT:   state_n = S_INIT0;
          OP_CHECK:  state_n = S_CHECK;
          OP_ROWSUB: state_n = S_RS_I;
          OP_COLSUB: state_n = S_CS_I;
          OP_SELECT: state_n = S_SEL;
          OP_TAKE:   state_n = S_TAKE;
          OP_BRANCH: state_n = S_BRANCH;
          OP_RECORD: state_n = S_REC0;
          OP_BACK:   state_n = S_BACK;
          default:   fin = 1'b1;
        endcase
      end
      S_INIT0: begin
        st_clr   = 1'b1;
        gp_we    = 1'b1;
        gp_waddr = GAW'(GPR_BEST_COST);
        gp_wdata = '1;
        row_clr  = 1'b1;
        state_n  = S_INIT1;
      end
      S_INIT1: begin
        gp_we    = 1'b1;
        gp_waddr = GAW'(GPR_BEST);
        gp_wdata = '0;
        state_n  = S_CNT;
      end
      S_CNT: begin
        // fr: row & col_mask, its ones go to the row's auxiliary field
        ax_set  = 1'b1;
        row_inc = 1'b1;
        if (row_last) begin
          fin     = 1'b1;
          state_n = S_IDLE;
        end
      end
      S_CHECK: begin
        fr_op          = FU_PASS;
        fr_a           = result;
        st_n.no_rows   = (row_mask == '0);
        st_n.dead_row  = ax_dead;
        st_n.better    = cost_x < best_x;
        st_n.bound     = (cost_x + (COLS+2)'(1)) >= best_x;
        fin            = 1'b1;
        state_n        = S_IDLE;
      end
      // ---------------- row subsumption ----------------
      S_RS_I: begin
        if (row_mask[ri]) begin
          row_ld  = 1'b1;
          state_n = S_RS_LD;
        end else begin
          state_n = S_RS_NXT;
        end
      end
      S_RS_LD: begin
        row_clr = 1'b1;        // a_row latched from fr_y
        state_n = S_RS_J;
      end
      S_RS_J: begin
        // fr_y = row j & col_mask, compared against a_row
        if (rs_hit) begin
          ax_clr[ri] = 1'b1;
          state_n    = S_RS_NXT;
        end else if (row_last) begin
          state_n    = S_RS_NXT;
        end else begin
          row_inc    = 1'b1;
        end
      end
      S_RS_NXT: begin
        if (ri == RAW'(ROWS - 1)) begin
          st_n.changed = changed;
          fin          = 1'b1;
          state_n      = S_IDLE;
        end else begin
          state_n      = S_RS_I;
        end
      end
      // ---------------- column subsumption ----------------
      S_CS_I: begin
        if (col_mask[ci]) begin
          col_ld  = 1'b1;
          state_n = S_CS_LD;
        end else begin
          state_n = S_CS_NXT;
        end
      end
      S_CS_LD: begin
        col_clr = 1'b1;        // a_col latched from fc_y
        state_n = S_CS_J;
      end
      S_CS_J: begin
        if (cs_hit) begin
          ax_dec  = a_col;     // rows that lose a one
          state_n = S_CS_NXT;
        end else if (col_last) begin
          state_n = S_CS_NXT;
        end else begin
          col_inc = 1'b1;
        end
      end
      S_CS_NXT: begin
        if (ci == CAW'(COLS - 1)) begin
          st_n.changed = changed;
          fin          = 1'b1;
          state_n      = S_IDLE;
        end else begin
          state_n      = S_CS_I;
        end
      end
      // ---------------- selection ----------------
      S_SEL: begin
        row_ld         = 1'b1;
        row_ld_val     = ax_ess ? ax_ess_row : ax_min_row;
        st_n.essential = ax_ess;
        fin            = 1'b1;
        state_n        = S_IDLE;
      end
      S_TAKE: begin
        // fr_y = selected row & col_mask, a single one
        col_ld     = 1'b1;
        col_ld_val = fr_first;
        state_n    = S_APPLY;
      end
      S_BRANCH: begin
        // fr_y = selected row & col_mask: the branches of this point
        st_push    = 1'b1;
        col_ld     = 1'b1;
        col_ld_val = fr_first;
        state_n    = S_APPLY;
      end
      S_APPLY: begin
        // fc_y = rows covered by the column: removed with the column
        ax_dec  = fc_y;
        ax_clr  = fc_y;
        fin     = 1'b1;
        state_n = S_IDLE;
      end
      // ---------------- record / backtrack ----------------
      S_REC0: begin
        gp_we    = 1'b1;
        gp_waddr = GAW'(GPR_BEST);
        gp_wdata = result;
        state_n  = S_REC1;
      end
      S_REC1: begin
        fr_op    = FU_PASS;
        fr_a     = result;
        gp_we    = 1'b1;
        gp_waddr = GAW'(GPR_BEST_COST);
        gp_wdata = COLS'(fr_ones);
        fin      = 1'b1;
        state_n  = S_IDLE;
      end
      S_BACK: begin
        fr_op = FU_PASS;
        fr_a  = st_br_top;
        if (st_empty) begin
          st_n.empty = 1'b1;
          fin        = 1'b1;
          state_n    = S_IDLE;
        end else begin
          if (fr_ones == CW'(1)) st_pop       = 1'b1;   // last branch here
          else                   st_br_wr_top = 1'b1;   // drop this branch
          col_ld     = 1'b1;
          col_ld_val = fr_first;
          state_n    = S_APPLY;
        end
      end
      default: state_n = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      row_mask <= '0;
      col_mask <= '0;
      result   <= '0;
      aux      <= '0;
      ri       <= '0;
      ci       <= '0;
      a_row    <= '0;
      a_col    <= '0;
      changed  <= 1'b0;
      op_done  <= 1'b0;
      status   <= '0;
    end else begin
      state   <= state_n;
      op_done <= fin;
      if (fin) status <= st_n;
      unique case (state)
        S_IDLE: if (cmd_start) begin
          ri      <= '0;
          ci      <= '0;
          changed <= 1'b0;
        end
        S_INIT0: begin
          row_mask <= row_valid;
          col_mask <= col_valid;
          result   <= '0;
          aux      <= '0;
        end
        S_CNT:    aux <= ax_next;
        S_RS_LD:  a_row <= fr_y;
        S_RS_J: if (rs_hit) begin
          row_mask[ri] <= 1'b0;
          aux          <= ax_next;
          changed      <= 1'b1;
        end
        S_RS_NXT: ri <= ri + RAW'(1);
        S_CS_LD:  a_col <= fc_y;
        S_CS_J: if (cs_hit) begin
          col_mask[ci] <= 1'b0;
          aux          <= ax_next;
          changed      <= 1'b1;
        end
        S_CS_NXT: ci <= ci + CAW'(1);
        S_BACK: if (!st_empty) begin
          row_mask <= st_rmask_top;
          col_mask <= st_cmask_top;
          result   <= st_res_top;
          aux      <= st_aux_top;
        end
        S_APPLY: begin
          row_mask <= row_mask & ~fc_y;
          col_mask <= col_mask & ~col_oh;
          result   <= result | col_oh;
          aux      <= ax_next;
        end
        default: ;
      endcase
    end
  end

  a_take_active_col: assert property (@(posedge clk) disable iff (!rst_n)
                                    (state == S_APPLY) |-> $onehot(col_oh & col_mask));
endmodule
