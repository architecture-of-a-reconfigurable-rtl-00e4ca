// tb_cover_processor: end-to-end test of the covering processor at its
// default size (32 x 32).
// It solves the 9 x 12 example matrix, where the search must first record
// the covering {b, c, l} and then the minimal one {c, g}; a matrix with an
// all-zero row (no covering); pseudo-random matrices of up to 14 x 14; and
// four sparse matrices that use all 32 rows with 16 to 19 columns. Each
// answer is checked against a brute-force search done here: the reported columns must cover every row
// and their number must equal the true minimum. The test also counts how
// often each mechanism of the search happens (row and column subsumption,
// essential column, branching, backtrack with pop and with in-place rewrite
// of the branch-mask stack, pruning by the bound, dead row, recording of a
// better covering) and fails if any of them never happens.
module tb_cover_processor;
  import cover_pkg::*;
  localparam int unsigned ROWS = 32;
  localparam int unsigned COLS = 32;
  localparam int unsigned RAW  = $clog2(ROWS);
  localparam int unsigned CW   = $clog2(COLS + 1);
  localparam int unsigned RNW  = $clog2(ROWS + 1);

  logic            clk = 1'b0;
  logic            rst_n;
  logic            wr_en;
  logic [RAW-1:0]  wr_row;
  logic [COLS-1:0] wr_ones, wr_zeros;
  logic [RNW-1:0]  n_rows;
  logic [CW-1:0]   n_cols;
  logic            start, busy, done, found;
  logic [COLS-1:0] best;
  logic [CW-1:0]   best_size;

  int checks = 0, failures = 0;
  longint cycles = 0;

  cover_processor dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles <= cycles + 1;

  // watchdog
  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- mechanism counters ----------------
  int n_rowsub = 0, n_colsub = 0, n_take = 0, n_branch = 0, n_pop = 0,
      n_rewrite = 0, n_bound = 0, n_dead = 0, n_record = 0;
  logic [COLS-1:0] recorded [$];
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl_ops.state == dut.u_ctrl_ops.S_REC0) recorded.push_back(dut.u_ctrl_ops.result);
    if (dut.u_ctrl_ops.state == dut.u_ctrl_ops.S_RS_J && dut.u_ctrl_ops.rs_hit) n_rowsub++;
    if (dut.u_ctrl_ops.state == dut.u_ctrl_ops.S_CS_J && dut.u_ctrl_ops.cs_hit) n_colsub++;
    if (dut.u_ctrl_ops.state == dut.u_ctrl_ops.S_TAKE)   n_take++;
    if (dut.u_ctrl_ops.state == dut.u_ctrl_ops.S_BRANCH) n_branch++;
    if (dut.st_pop)       n_pop++;
    if (dut.st_br_wr_top) n_rewrite++;
    if (dut.u_ctrl_ops.state == dut.u_ctrl_ops.S_REC0)   n_record++;
    if (dut.op_done && dut.cmd == OP_CHECK && !dut.status.no_rows && !dut.status.dead_row && dut.status.bound) n_bound++;
    if (dut.op_done && dut.cmd == OP_CHECK && !dut.status.no_rows && dut.status.dead_row) n_dead++;
  end

  logic [COLS-1:0] m [ROWS];
  int nr, nc;

  // smallest covering by exhaustive search; -1 when none exists
  function automatic int brute_min();
    int bestn = -1;
    for (int s = 0; s < (1 << nc); s++) begin
      logic ok = 1'b1;
      int k = $countones(s);
      if (bestn >= 0 && k >= bestn) continue;
      for (int r = 0; r < nr; r++) if ((m[r] & COLS'(s)) == '0) ok = 1'b0;
      if (ok) bestn = k;
    end
    return bestn;
  endfunction

  task automatic run_case(string name);
    int exp_min;
    longint t0;
    bit cover_ok;
    recorded.delete();
    // load
    for (int r = 0; r < nr; r++) begin
      @(negedge clk);
      wr_en = 1'b1; wr_row = RAW'(r); wr_ones = m[r]; wr_zeros = ~m[r];
    end
    @(negedge clk);
    wr_en  = 1'b0;
    n_rows = RNW'(nr);
    n_cols = CW'(nc);
    start  = 1'b1;
    t0 = cycles;
    @(negedge clk);
    start = 1'b0;
    while (!done) @(negedge clk);
    exp_min = brute_min();
    checks++;
    if ((exp_min < 0) != !found) begin
      failures++;
      $display("FAIL %s: found=%0b expected %0d", name, found, exp_min);
    end else if (found) begin
      cover_ok = 1'b1;
      for (int r = 0; r < nr; r++) if ((m[r] & best) == '0) cover_ok = 1'b0;
      if ((best >> nc) != '0) cover_ok = 1'b0;
      checks += 2;
      if (!cover_ok) begin
        failures++;
        $display("FAIL %s: columns %h do not cover the matrix", name, best);
      end
      if (int'(best_size) != exp_min || $countones(best) != exp_min) begin
        failures++;
        $display("FAIL %s: size %0d (%0d columns), minimum %0d", name, best_size, $countones(best), exp_min);
      end
    end
    $display("%s: %0dx%0d found=%0b size=%0d cover=%h cycles=%0d", name, nr, nc, found,
             best_size, best, cycles - t0);
  endtask

  // the 9 x 12 example, columns a..l are bits 0..11
  localparam string EX [9] = '{
    "001110101011", "010011110100", "001100010001", "101011100100", "100010110111",
    "111100001010", "001011101001", "101111111111", "111111111111"};

  initial begin
    rst_n = 1'b0; wr_en = 1'b0; wr_row = '0; wr_ones = '0; wr_zeros = '0;
    n_rows = '0; n_cols = '0; start = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // example matrix
    nr = 9; nc = 12;
    for (int r = 0; r < nr; r++) begin
      m[r] = '0;
      for (int c = 0; c < nc; c++) m[r][c] = (EX[r][c] == "1");
    end
    run_case("example");
    // the worked example ends with columns c and g (bits 2 and 6)
    checks++;
    if (best != COLS'('h44)) begin
      failures++;
      $display("FAIL example: cover %h, expected {c, g}", best);
    end
    checks++;
    if (recorded.size() != 2 || recorded[0] != COLS'('h806) || recorded[1] != COLS'('h44)) begin
      failures++;
      $display("FAIL example: recorded %p, expected {b, c, l} then {c, g}", recorded);
    end

    // a row without ones: no covering
    nr = 5; nc = 6;
    m[0] = 'h03; m[1] = 'h0c; m[2] = 'h00; m[3] = 'h30; m[4] = 'h21;
    run_case("zero_row");

    // pseudo-random matrices
    for (int t = 0; t < 40; t++) begin
      int dens;
      nr = 4 + int'($urandom_range(0, 10));
      nc = 4 + int'($urandom_range(0, 10));
      dens = int'($urandom_range(20, 55));
      for (int r = 0; r < nr; r++) begin
        m[r] = '0;
        for (int c = 0; c < nc; c++) m[r][c] = (int'($urandom_range(0, 99)) < dens);
      end
      run_case($sformatf("random%0d", t));
    end

    // full-height matrices: all 32 rows in use
    for (int t = 0; t < 4; t++) begin
      nr = ROWS;
      nc = 16 + t;
      for (int r = 0; r < nr; r++) begin
        m[r] = '0;
        for (int c = 0; c < nc; c++) m[r][c] = (int'($urandom_range(0, 99)) < 15);
        if (m[r] == '0) m[r][$urandom_range(0, nc - 1)] = 1'b1;
      end
      run_case($sformatf("full%0d", t));
    end

    // every mechanism must have been exercised
    $display("mechanisms: rowsub=%0d colsub=%0d essential=%0d branch=%0d pop=%0d rewrite=%0d bound=%0d dead=%0d record=%0d",
             n_rowsub, n_colsub, n_take, n_branch, n_pop, n_rewrite, n_bound, n_dead, n_record);
    checks += 9;
    if (n_rowsub == 0)  begin failures++; $display("FAIL: no row subsumption"); end
    if (n_colsub == 0)  begin failures++; $display("FAIL: no column subsumption"); end
    if (n_take == 0)    begin failures++; $display("FAIL: no essential column"); end
    if (n_branch == 0)  begin failures++; $display("FAIL: no branching"); end
    if (n_pop == 0)     begin failures++; $display("FAIL: no stack pop"); end
    if (n_rewrite == 0) begin failures++; $display("FAIL: no branch-mask rewrite"); end
    if (n_bound == 0)   begin failures++; $display("FAIL: no bound pruning"); end
    if (n_dead == 0)    begin failures++; $display("FAIL: no dead row"); end
    if (n_record == 0)  begin failures++; $display("FAIL: no record"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
