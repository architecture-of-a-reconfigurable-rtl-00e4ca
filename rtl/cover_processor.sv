// cover_processor: search processor configured for the exact minimal column
// cover of a Boolean matrix.
// Given a matrix of up to ROWS x COLS, it finds a smallest set of columns
// with at least one 1 in every row. It does so by a depth-first search over a
// decision tree: reduction rules shrink the matrix (row and column
// subsumption), a row with a single one forces its column, otherwise the
// first row with the fewest ones is branched on, one branch per column in
// it. The matrix itself is never changed: rows and columns are removed by
// masks, and a branching point is saved on five stacks and restored from
// them on backtracking. The best covering found so far bounds the search.
//
// Blocks, as in the architecture: matrix storage (matrix and transpose, with
// row and column address counters), five stacks (row masks, column masks,
// results, auxiliary, branch masks), general-purpose registers, a
// functional unit (here one instance for row vectors and one for column
// vectors, plus the auxiliary-register unit) and a two-level control unit
// (ctrl_top: algorithm, ctrl_ops: operations).
//
// Interface: load the matrix while idle, one row per cycle (wr_en, wr_row,
// wr_ones, wr_zeros; for a Boolean matrix wr_zeros may be ~wr_ones, the
// covering search reads only the ones plane). Set n_rows/n_cols to the
// matrix size (rows and columns at or above them are ignored) and pulse
// start. busy is high during the search; done rises when it ends and stays
// high until the next start. found tells whether a covering exists; best
// holds its columns (bit c = column c) and best_size their number.
module cover_processor
  import cover_pkg::*;
#(
  parameter int unsigned ROWS  = 32,
  parameter int unsigned COLS  = 32,
  parameter int unsigned DEPTH = ROWS,   // stack depth: at most one branching point per row
  parameter int unsigned NGPR  = 4,
  parameter int unsigned RAW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned CAW   = (COLS > 1) ? $clog2(COLS) : 1,
  parameter int unsigned CW    = $clog2(COLS + 1),
  parameter int unsigned RNW   = $clog2(ROWS + 1)
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            wr_en,
  input  logic [RAW-1:0]  wr_row,
  input  logic [COLS-1:0] wr_ones,
  input  logic [COLS-1:0] wr_zeros,
  input  logic [RNW-1:0]  n_rows,
  input  logic [CW-1:0]   n_cols,
  input  logic            start,
  output logic            busy,
  output logic            done,
  output logic            found,
  output logic [COLS-1:0] best,
  output logic [CW-1:0]   best_size
);
  localparam int unsigned GAW = (NGPR > 1) ? $clog2(NGPR) : 1;

  // size masks
  logic [ROWS-1:0] row_valid;
  logic [COLS-1:0] col_valid;
  always_comb begin
    for (int r = 0; r < int'(ROWS); r++) row_valid[r] = (r < int'(n_rows));
    for (int c = 0; c < int'(COLS); c++) col_valid[c] = (c < int'(n_cols));
  end

  // control handshake
  op_e     cmd;
  logic    cmd_start, op_done;
  status_t status;

  // storage
  logic            row_clr, row_ld, row_inc, row_last;
  logic            col_clr, col_ld, col_inc, col_last;
  logic [RAW-1:0]  row_ld_val, row_addr;
  logic [CAW-1:0]  col_ld_val, col_addr;
  logic [COLS-1:0] row_ones, row_zeros;
  logic [ROWS-1:0] col_ones, col_zeros;

  // functional units
  fu_op_e          fr_op, fc_op;
  logic [COLS-1:0] fr_a, fr_b, fr_c, fr_y, fr_first_oh;
  logic            fr_sub, fr_sup, fr_equal, fr_zero;
  logic [CW-1:0]   fr_ones;
  logic [CAW-1:0]  fr_first;
  logic [ROWS-1:0] fc_a, fc_b, fc_c, fc_y, fc_first_oh;
  logic            fc_sub, fc_sup, fc_equal, fc_zero;
  logic [RNW-1:0]  fc_ones;
  logic [RAW-1:0]  fc_first;

  // auxiliary register unit
  logic [ROWS-1:0][CW-1:0] aux, ax_next;
  logic [ROWS-1:0]         row_mask, ax_dec, ax_clr;
  logic                    ax_set, ax_dead, ax_ess;
  logic [RAW-1:0]          ax_set_idx, ax_ess_row, ax_min_row;
  logic [CW-1:0]           ax_set_val, ax_min_cnt;

  // stacks
  logic                    st_clr, st_push, st_pop, st_br_wr_top;
  logic [ROWS-1:0]         st_rmask_din, st_rmask_top;
  logic [COLS-1:0]         st_cmask_din, st_cmask_top;
  logic [COLS-1:0]         st_res_din, st_res_top;
  logic [ROWS*CW-1:0]      st_aux_din, st_aux_top;
  logic [COLS-1:0]         st_br_din, st_br_top, st_br_top_din;
  logic [4:0]              st_empty, st_full;

  // general-purpose registers
  logic            gp_we;
  logic [GAW-1:0]  gp_waddr;
  logic [COLS-1:0] gp_wdata, gp_best_cost, gp_best;

  ctrl_top u_ctrl_top (
    .clk, .rst_n, .start, .busy, .done,
    .cmd, .cmd_start, .op_done, .status
  );

  ctrl_ops #(.ROWS(ROWS), .COLS(COLS), .GAW(GAW)) u_ctrl_ops (
    .clk, .rst_n, .cmd, .cmd_start, .op_done, .status,
    .row_valid, .col_valid,
    .row_clr, .row_ld, .row_ld_val, .row_inc, .row_addr, .row_last,
    .col_clr, .col_ld, .col_ld_val, .col_inc, .col_addr, .col_last,
    .row_ones, .col_ones,
    .fr_op, .fr_a, .fr_b, .fr_c, .fr_y, .fr_sub, .fr_equal,
    .fr_ones, .fr_first, .fr_first_oh,
    .fc_op, .fc_a, .fc_b, .fc_c, .fc_y, .fc_sup, .fc_equal,
    .aux, .row_mask, .ax_dec, .ax_clr, .ax_set, .ax_set_idx, .ax_set_val,
    .ax_next, .ax_dead, .ax_ess, .ax_ess_row, .ax_min_row,
    .st_clr, .st_push, .st_pop,
    .st_rmask_din, .st_rmask_top, .st_cmask_din, .st_cmask_top,
    .st_res_din, .st_res_top, .st_aux_din, .st_aux_top,
    .st_br_din, .st_br_top, .st_br_wr_top, .st_br_top_din,
    .st_empty(st_empty[4]),
    .gp_we, .gp_waddr, .gp_wdata, .gp_best_cost
  );

  matrix_storage #(.ROWS(ROWS), .COLS(COLS)) u_storage (
    .clk, .rst_n, .wr_en, .wr_row, .wr_ones, .wr_zeros,
    .row_clr, .row_ld, .row_ld_val, .row_inc, .row_addr, .row_last,
    .col_clr, .col_ld, .col_ld_val, .col_inc, .col_addr, .col_last,
    .row_ones, .row_zeros, .col_ones, .col_zeros
  );

  func_unit #(.W(COLS)) u_fu_row (
    .op(fr_op), .a(fr_a), .b(fr_b), .c(fr_c), .y(fr_y),
    .sub(fr_sub), .sup(fr_sup), .equal(fr_equal), .zero(fr_zero),
    .ones(fr_ones), .first(fr_first), .first_oh(fr_first_oh)
  );

  func_unit #(.W(ROWS)) u_fu_col (
    .op(fc_op), .a(fc_a), .b(fc_b), .c(fc_c), .y(fc_y),
    .sub(fc_sub), .sup(fc_sup), .equal(fc_equal), .zero(fc_zero),
    .ones(fc_ones), .first(fc_first), .first_oh(fc_first_oh)
  );

  aux_unit #(.ROWS(ROWS), .CW(CW)) u_aux (
    .aux, .row_mask, .dec_mask(ax_dec), .clr_mask(ax_clr),
    .set_en(ax_set), .set_idx(ax_set_idx), .set_val(ax_set_val),
    .aux_next(ax_next), .dead_row(ax_dead), .ess_found(ax_ess),
    .ess_row(ax_ess_row), .min_row(ax_min_row), .min_cnt(ax_min_cnt)
  );

  // the five stacks move together; only the branch-mask top is rewritten
  lifo_stack #(.WIDTH(ROWS), .DEPTH(DEPTH)) u_st_rmask (
    .clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop), .din(st_rmask_din),
    .wr_top(1'b0), .top_din('0), .top(st_rmask_top), .empty(st_empty[0]),
    .full(st_full[0]), .level()
  );
  lifo_stack #(.WIDTH(COLS), .DEPTH(DEPTH)) u_st_cmask (
    .clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop), .din(st_cmask_din),
    .wr_top(1'b0), .top_din('0), .top(st_cmask_top), .empty(st_empty[1]),
    .full(st_full[1]), .level()
  );
  lifo_stack #(.WIDTH(COLS), .DEPTH(DEPTH)) u_st_res (
    .clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop), .din(st_res_din),
    .wr_top(1'b0), .top_din('0), .top(st_res_top), .empty(st_empty[2]),
    .full(st_full[2]), .level()
  );
  lifo_stack #(.WIDTH(ROWS*CW), .DEPTH(DEPTH)) u_st_aux (
    .clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop), .din(st_aux_din),
    .wr_top(1'b0), .top_din('0), .top(st_aux_top), .empty(st_empty[3]),
    .full(st_full[3]), .level()
  );
  lifo_stack #(.WIDTH(COLS), .DEPTH(DEPTH)) u_st_br (
    .clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop), .din(st_br_din),
    .wr_top(st_br_wr_top), .top_din(st_br_top_din), .top(st_br_top), .empty(st_empty[4]),
    .full(st_full[4]), .level()
  );

  gp_regfile #(.NREG(NGPR), .WIDTH(COLS)) u_gpr (
    .clk, .rst_n, .we(gp_we), .waddr(gp_waddr), .wdata(gp_wdata),
    .raddr_a(GAW'(GPR_BEST_COST)), .rdata_a(gp_best_cost),
    .raddr_b(GAW'(GPR_BEST)), .rdata_b(gp_best)
  );

  assign found     = (gp_best_cost != '1);
  assign best      = gp_best;
  assign best_size = CW'(gp_best_cost);

  a_stacks_in_step: assert property (@(posedge clk) disable iff (!rst_n)
                                     (st_empty == '0) || (st_empty == '1));
  a_no_load_while_busy: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && busy));
endmodule
