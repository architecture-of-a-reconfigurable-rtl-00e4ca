// tb_matrix_storage: loads a random ternary matrix row by row, then reads
// every row and every column through the address counters and compares both
// planes with the written values; a read must be valid in the cycle after
// the counter is loaded.
module tb_matrix_storage;
  localparam int unsigned ROWS = 10;
  localparam int unsigned COLS = 13;
  localparam int unsigned RAW  = $clog2(ROWS);
  localparam int unsigned CAW  = $clog2(COLS);
  logic clk = 1'b0, rst_n;
  logic wr_en; logic [RAW-1:0] wr_row; logic [COLS-1:0] wr_ones, wr_zeros;
  logic row_clr, row_ld, row_inc, row_last; logic [RAW-1:0] row_ld_val, row_addr;
  logic col_clr, col_ld, col_inc, col_last; logic [CAW-1:0] col_ld_val, col_addr;
  logic [COLS-1:0] row_ones, row_zeros; logic [ROWS-1:0] col_ones, col_zeros;
  logic [1:0] mval [ROWS][COLS];   // {one, zero}: 10 = 1, 01 = 0, 00 = don't care
  int checks = 0, failures = 0;

  matrix_storage #(.ROWS(ROWS), .COLS(COLS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; wr_en = 0; wr_row = '0; wr_ones = '0; wr_zeros = '0;
    row_clr = 0; row_ld = 0; row_inc = 0; row_ld_val = '0;
    col_clr = 0; col_ld = 0; col_inc = 0; col_ld_val = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        automatic int v = int'($urandom_range(0, 2));
        mval[r][c] = (v == 0) ? 2'b01 : (v == 1) ? 2'b10 : 2'b00;
      end
    @(negedge clk); rst_n = 1;
    for (int r = ROWS - 1; r >= 0; r--) begin
      wr_en = 1; wr_row = RAW'(r);
      for (int c = 0; c < COLS; c++) begin
        wr_ones[c] = mval[r][c][1]; wr_zeros[c] = mval[r][c][0];
      end
      @(negedge clk);
    end
    wr_en = 0;
    // rows in order through the counter, columns by parallel load
    row_clr = 1; @(negedge clk); row_clr = 0;
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if ({row_ones[c], row_zeros[c]} != mval[r][c]) begin
          failures++; $display("FAIL row %0d col %0d", r, c);
        end
      end
      checks++;
      if (row_last != (r == ROWS - 1)) begin failures++; $display("FAIL row_last"); end
      row_inc = 1; @(negedge clk); row_inc = 0;
    end
    for (int c = COLS - 1; c >= 0; c--) begin
      col_ld = 1; col_ld_val = CAW'(c); @(negedge clk); col_ld = 0;
      for (int r = 0; r < ROWS; r++) begin
        checks++;
        if ({col_ones[r], col_zeros[r]} != mval[r][c]) begin
          failures++; $display("FAIL col %0d row %0d", c, r);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
