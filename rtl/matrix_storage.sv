// matrix_storage: storage for a Boolean or ternary matrix of ROWS x COLS.
// The matrix is held twice: a row memory (one word per row, COLS bits) and a
// column memory holding the transpose (one word per column, ROWS bits), so
// that any row and any column can be read in the same clock cycle. A ternary
// matrix is kept as two Boolean planes: plane "ones" has 1 where the value is
// 1, plane "zeros" has 1 where the value is 0; a don't-care is 00 (01 codes
// a 0 and 10 codes a 1 when the pair is read as {ones,zeros}). 11 is stored
// like any other pair. Both memories and the two-plane code follow the
// architecture.
//
// The row and the column address come from two loadable address counters
// held inside this block (row_* and col_* controls, see addr_counter). The
// read is asynchronous from the addressed word: the word is valid in the
// cycle the counter holds its address. Loading writes one whole row per cycle
// through wr_* into both memories (the column memory gets bit wr_row of every
// column word); the write takes effect at the next clock edge. Whole-row
// loading and the asynchronous read are this design's choices.
module matrix_storage #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned COLS = 32,
  parameter int unsigned RAW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  parameter int unsigned CAW  = (COLS > 1) ? $clog2(COLS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  // matrix load, one row per cycle
  input  logic            wr_en,
  input  logic [RAW-1:0]  wr_row,
  input  logic [COLS-1:0] wr_ones,
  input  logic [COLS-1:0] wr_zeros,
  // row address counter
  input  logic            row_clr,
  input  logic            row_ld,
  input  logic [RAW-1:0]  row_ld_val,
  input  logic            row_inc,
  output logic [RAW-1:0]  row_addr,
  output logic            row_last,
  // column address counter
  input  logic            col_clr,
  input  logic            col_ld,
  input  logic [CAW-1:0]  col_ld_val,
  input  logic            col_inc,
  output logic [CAW-1:0]  col_addr,
  output logic            col_last,
  // read data
  output logic [COLS-1:0] row_ones,
  output logic [COLS-1:0] row_zeros,
  output logic [ROWS-1:0] col_ones,
  output logic [ROWS-1:0] col_zeros
);
  logic [COLS-1:0] rmem_ones  [ROWS];
  logic [COLS-1:0] rmem_zeros [ROWS];
  logic [ROWS-1:0] cmem_ones  [COLS];
  logic [ROWS-1:0] cmem_zeros [COLS];

  addr_counter #(.N(ROWS), .AW(RAW)) u_row_cnt (
    .clk, .rst_n, .clr(row_clr), .ld(row_ld), .ld_val(row_ld_val),
    .inc(row_inc), .addr(row_addr), .last(row_last)
  );

  addr_counter #(.N(COLS), .AW(CAW)) u_col_cnt (
    .clk, .rst_n, .clr(col_clr), .ld(col_ld), .ld_val(col_ld_val),
    .inc(col_inc), .addr(col_addr), .last(col_last)
  );

  // row memory: one word per row
  always_ff @(posedge clk) begin
    if (wr_en) begin
      rmem_ones[wr_row]  <= wr_ones;
      rmem_zeros[wr_row] <= wr_zeros;
    end
  end

  // column memory: the transpose, bit wr_row of every column word
  always_ff @(posedge clk) begin
    if (wr_en) begin
      for (int c = 0; c < int'(COLS); c++) begin
        cmem_ones[c][wr_row]  <= wr_ones[c];
        cmem_zeros[c][wr_row] <= wr_zeros[c];
      end
    end
  end

  assign row_ones  = rmem_ones[row_addr];
  assign row_zeros = rmem_zeros[row_addr];
  assign col_ones  = cmem_ones[col_addr];
  assign col_zeros = cmem_zeros[col_addr];

`ifndef SYNTHESIS
  initial begin
    assert (ROWS >= 2 && COLS >= 2) else $error("matrix_storage: ROWS and COLS must be at least 2");
  end
`endif
endmodule
