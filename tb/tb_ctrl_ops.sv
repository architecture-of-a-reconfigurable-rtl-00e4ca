// tb_ctrl_ops: the bottom-level controller with the real storage, functional
// units, auxiliary-register unit, stacks and registers around it, driven
// command by command. A software model of every operation runs in lockstep;
// after each command the row mask, column mask, result, auxiliary register,
// stack level and the relevant status bits are compared with the model. The
// next command is chosen from the model's status, so whole searches run on
// the 9 x 12 example and on random 12 x 12 matrices. Cycle counts of the
// single-cycle operations (CHECK, SELECT: op_done one cycle after the command) and of INIT (ROWS + 2 cycles) are checked.
module tb_ctrl_ops;
  import cover_pkg::*;
  localparam int unsigned ROWS = 12, COLS = 12, RAW = 4, CAW = 4, CW = 4, GAW = 2;

  logic clk = 1'b0, rst_n;
  op_e cmd; logic cmd_start, op_done; status_t status;
  logic [ROWS-1:0] row_valid; logic [COLS-1:0] col_valid;
  logic row_clr, row_ld, row_inc, row_last, col_clr, col_ld, col_inc, col_last;
  logic [RAW-1:0] row_ld_val, row_addr; logic [CAW-1:0] col_ld_val, col_addr;
  logic [COLS-1:0] row_ones, row_zeros; logic [ROWS-1:0] col_ones, col_zeros;
  fu_op_e fr_op, fc_op;
  logic [COLS-1:0] fr_a, fr_b, fr_c, fr_y, fr_first_oh; logic fr_sub, fr_sup, fr_equal, fr_zero;
  logic [CW-1:0] fr_ones; logic [CAW-1:0] fr_first;
  logic [ROWS-1:0] fc_a, fc_b, fc_c, fc_y, fc_first_oh; logic fc_sub, fc_sup, fc_equal, fc_zero;
  logic [CW-1:0] fc_ones; logic [RAW-1:0] fc_first;
  logic [ROWS-1:0][CW-1:0] aux, ax_next;
  logic [ROWS-1:0] row_mask, ax_dec, ax_clr;
  logic ax_set, ax_dead, ax_ess; logic [RAW-1:0] ax_set_idx, ax_ess_row, ax_min_row;
  logic [CW-1:0] ax_set_val, ax_min_cnt;
  logic st_clr, st_push, st_pop, st_br_wr_top;
  logic [ROWS-1:0] st_rmask_din, st_rmask_top;
  logic [COLS-1:0] st_cmask_din, st_cmask_top, st_res_din, st_res_top, st_br_din, st_br_top, st_br_top_din;
  logic [ROWS*CW-1:0] st_aux_din, st_aux_top;
  logic [4:0] st_emp;
  logic gp_we; logic [GAW-1:0] gp_waddr; logic [COLS-1:0] gp_wdata, gp_best_cost, gp_best;
  logic wr_en; logic [RAW-1:0] wr_row; logic [COLS-1:0] wr_ones;

  ctrl_ops #(.ROWS(ROWS), .COLS(COLS), .GAW(GAW)) dut (.*, .st_empty(st_emp[4]));

  matrix_storage #(.ROWS(ROWS), .COLS(COLS)) u_mem (.clk, .rst_n, .wr_en, .wr_row, .wr_ones,
    .wr_zeros(~wr_ones), .row_clr, .row_ld, .row_ld_val, .row_inc, .row_addr, .row_last,
    .col_clr, .col_ld, .col_ld_val, .col_inc, .col_addr, .col_last,
    .row_ones, .row_zeros, .col_ones, .col_zeros);
  func_unit #(.W(COLS)) u_fr (.op(fr_op), .a(fr_a), .b(fr_b), .c(fr_c), .y(fr_y), .sub(fr_sub),
    .sup(fr_sup), .equal(fr_equal), .zero(fr_zero), .ones(fr_ones), .first(fr_first), .first_oh(fr_first_oh));
  func_unit #(.W(ROWS)) u_fc (.op(fc_op), .a(fc_a), .b(fc_b), .c(fc_c), .y(fc_y), .sub(fc_sub),
    .sup(fc_sup), .equal(fc_equal), .zero(fc_zero), .ones(fc_ones), .first(fc_first), .first_oh(fc_first_oh));
  aux_unit #(.ROWS(ROWS), .CW(CW)) u_aux (.aux, .row_mask, .dec_mask(ax_dec), .clr_mask(ax_clr),
    .set_en(ax_set), .set_idx(ax_set_idx), .set_val(ax_set_val), .aux_next(ax_next), .dead_row(ax_dead),
    .ess_found(ax_ess), .ess_row(ax_ess_row), .min_row(ax_min_row), .min_cnt(ax_min_cnt));
  lifo_stack #(.WIDTH(ROWS), .DEPTH(ROWS)) s0 (.clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop),
    .din(st_rmask_din), .wr_top(1'b0), .top_din('0), .top(st_rmask_top), .empty(st_emp[0]), .full(), .level());
  lifo_stack #(.WIDTH(COLS), .DEPTH(ROWS)) s1 (.clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop),
    .din(st_cmask_din), .wr_top(1'b0), .top_din('0), .top(st_cmask_top), .empty(st_emp[1]), .full(), .level());
  lifo_stack #(.WIDTH(COLS), .DEPTH(ROWS)) s2 (.clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop),
    .din(st_res_din), .wr_top(1'b0), .top_din('0), .top(st_res_top), .empty(st_emp[2]), .full(), .level());
  lifo_stack #(.WIDTH(ROWS*CW), .DEPTH(ROWS)) s3 (.clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop),
    .din(st_aux_din), .wr_top(1'b0), .top_din('0), .top(st_aux_top), .empty(st_emp[3]), .full(), .level());
  lifo_stack #(.WIDTH(COLS), .DEPTH(ROWS)) s4 (.clk, .rst_n, .clr(st_clr), .push(st_push), .pop(st_pop),
    .din(st_br_din), .wr_top(st_br_wr_top), .top_din(st_br_top_din), .top(st_br_top), .empty(st_emp[4]), .full(), .level());
  gp_regfile #(.NREG(4), .WIDTH(COLS)) u_gpr (.clk, .rst_n, .we(gp_we), .waddr(gp_waddr), .wdata(gp_wdata),
    .raddr_a(GAW'(GPR_BEST_COST)), .rdata_a(gp_best_cost), .raddr_b(GAW'(GPR_BEST)), .rdata_b(gp_best));

  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- software model ----------------
  typedef struct { logic [ROWS-1:0] rm; logic [COLS-1:0] cm, res, bm; int ax [ROWS]; } frame_t;
  logic [COLS-1:0] m [ROWS];
  logic [ROWS-1:0] rm; logic [COLS-1:0] cm, res, best; int ax [ROWS]; int bestc;
  frame_t stk [$];
  status_t ms;
  int sel;

  function automatic logic [ROWS-1:0] colv(int c);
    logic [ROWS-1:0] v;
    for (int r = 0; r < ROWS; r++) v[r] = m[r][c];
    return v;
  endfunction
  function automatic int first1(logic [COLS-1:0] v);
    for (int i = 0; i < COLS; i++) if (v[i]) return i;
    return -1;
  endfunction
  function automatic void apply(int c);
    logic [ROWS-1:0] cov = colv(c) & rm;
    for (int r = 0; r < ROWS; r++) if (cov[r]) ax[r] = 0;
    rm &= ~cov; cm[c] = 1'b0; res[c] = 1'b1;
  endfunction

  function automatic void model(op_e op);
    ms = '0;
    unique case (op)
      OP_INIT: begin
        rm = row_valid; cm = col_valid; res = '0; best = '0; bestc = (1 << COLS) - 1; stk.delete();
        for (int r = 0; r < ROWS; r++) ax[r] = $countones(m[r] & cm);
      end
      OP_CHECK: begin
        int cost = $countones(res);
        ms.no_rows = (rm == '0);
        for (int r = 0; r < ROWS; r++) if (rm[r] && ax[r] == 0) ms.dead_row = 1'b1;
        ms.better = cost < bestc;
        ms.bound  = cost + 1 >= bestc;
      end
      OP_ROWSUB: for (int i = 0; i < ROWS; i++) if (rm[i]) begin
        logic [COLS-1:0] a = m[i] & cm;
        for (int j = 0; j < ROWS; j++) begin
          logic [COLS-1:0] b = m[j] & cm;
          if (rm[j] && j != i && (b & ~a) == '0 && (b != a || j < i)) begin
            rm[i] = 1'b0; ax[i] = 0; ms.changed = 1'b1; break;
          end
        end
      end
      OP_COLSUB: for (int i = 0; i < COLS; i++) if (cm[i]) begin
        logic [ROWS-1:0] a = colv(i) & rm;
        for (int j = 0; j < COLS; j++) begin
          logic [ROWS-1:0] b = colv(j) & rm;
          if (cm[j] && j != i && (a & ~b) == '0 && (b != a || j > i)) begin
            cm[i] = 1'b0; ms.changed = 1'b1;
            for (int r = 0; r < ROWS; r++) if (a[r] && ax[r] > 0) ax[r]--;
            break;
          end
        end
      end
      OP_SELECT: begin
        int mn = 1 << 30;
        sel = -1;
        for (int r = 0; r < ROWS; r++) if (rm[r] && ax[r] == 1) begin sel = r; ms.essential = 1'b1; break; end
        if (sel < 0) for (int r = 0; r < ROWS; r++) if (rm[r] && ax[r] < mn) begin mn = ax[r]; sel = r; end
      end
      OP_TAKE: apply(first1(m[sel] & cm));
      OP_BRANCH: begin
        frame_t f;
        int c = first1(m[sel] & cm);
        f.rm = rm; f.cm = cm; f.res = res; f.ax = ax; f.bm = (m[sel] & cm) & ~(COLS'(1) << c);
        stk.push_back(f);
        apply(c);
      end
      OP_RECORD: begin best = res; bestc = $countones(res); end
      OP_BACK: if (stk.size() == 0) ms.empty = 1'b1;
      else begin
        int c = first1(stk[$].bm);
        rm = stk[$].rm; cm = stk[$].cm; res = stk[$].res; ax = stk[$].ax;
        if ($countones(stk[$].bm) == 1) void'(stk.pop_back());
        else stk[$].bm = stk[$].bm & ~(COLS'(1) << c);
        apply(c);
      end
      default: ;
    endcase
  endfunction

  function automatic op_e next_op(op_e op, ref bit rc, ref bit fin);
    fin = 0;
    unique case (op)
      OP_INIT: return OP_CHECK;
      OP_CHECK: return ms.no_rows ? (ms.better ? OP_RECORD : OP_BACK) : (ms.dead_row || ms.bound) ? OP_BACK : OP_ROWSUB;
      OP_ROWSUB: begin rc = ms.changed; return OP_COLSUB; end
      OP_COLSUB: return (rc || ms.changed) ? OP_ROWSUB : OP_SELECT;
      OP_SELECT: return ms.essential ? OP_TAKE : OP_BRANCH;
      OP_RECORD: return OP_BACK;
      OP_BACK: begin fin = ms.empty; return OP_CHECK; end
      default: return OP_CHECK;
    endcase
  endfunction

  task automatic issue(op_e op);
    int n = 0;
    @(negedge clk); cmd = op; cmd_start = 1;
    @(negedge clk); cmd_start = 0;
    while (!op_done) begin @(negedge clk); n++; end
    model(op);
    checks++;
    if (row_mask != rm || dut.col_mask != cm || dut.result != res || s4.level != 4'(stk.size())) begin
      failures++;
      $display("FAIL %s: rm %h/%h cm %h/%h res %h/%h depth %0d/%0d", op.name(), row_mask, rm,
               dut.col_mask, cm, dut.result, res, s4.level, stk.size());
    end
    for (int r = 0; r < ROWS; r++) begin
      checks++;
      if (int'(aux[r]) != ax[r]) begin failures++; $display("FAIL %s: aux[%0d] %0d/%0d", op.name(), r, aux[r], ax[r]); end
    end
    checks++;
    if (status != ms) begin failures++; $display("FAIL %s: status %b/%b", op.name(), status, ms); end
    if (op == OP_CHECK || op == OP_SELECT || op == OP_INIT) begin
      checks++;
      if (n != ((op == OP_INIT) ? ROWS + 2 : 1)) begin failures++; $display("FAIL %s took %0d cycles", op.name(), n); end
    end
  endtask

  localparam string EX [9] = '{
    "001110101011", "010011110100", "001100010001", "101011100100", "100010110111",
    "111100001010", "001011101001", "101111111111", "111111111111"};

  task automatic search(int nr);
    op_e op = OP_INIT;
    bit rc = 0, fin = 0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); wr_en = 1; wr_row = RAW'(r); wr_ones = m[r];
    end
    @(negedge clk); wr_en = 0;
    row_valid = ROWS'((1 << nr) - 1); col_valid = '1;
    forever begin
      issue(op);
      op = next_op(op, rc, fin);
      if (fin) break;
    end
    checks++;
    if (gp_best != best || gp_best_cost != COLS'(bestc)) begin
      failures++; $display("FAIL best %h/%h", gp_best, best);
    end
    $display("search over %0d rows: best %h (%0d columns)", nr, best, bestc);
  endtask

  initial begin
    rst_n = 0; cmd = OP_NONE; cmd_start = 0; wr_en = 0; wr_row = '0; wr_ones = '0;
    row_valid = '0; col_valid = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int r = 0; r < ROWS; r++) begin
      m[r] = '0;
      if (r < 9) for (int c = 0; c < COLS; c++) m[r][c] = (EX[r][c] == "1");
    end
    search(9);
    for (int t = 0; t < 30; t++) begin
      for (int r = 0; r < ROWS; r++) m[r] = COLS'($urandom) & COLS'($urandom) | ((t % 2 == 1) ? COLS'($urandom) & COLS'($urandom) : '0);
      search(ROWS);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
