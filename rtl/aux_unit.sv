// aux_unit: operations on the auxiliary register.
// The auxiliary register holds, for every row, the number of 1s the row has
// in the columns that are still in the matrix (a CW-bit field per row). It
// is computed once at the start and then kept up to date instead of being
// recounted: removing a column decrements the field of every row that has a
// 1 in that column (dec_mask), and removing a row resets its field to 0
// (clr_mask). A field can also be written directly (set_en/set_idx/set_val),
// which is how the initial counts are stored. This update scheme is the
// architecture's; the block is purely combinational and the register itself
// sits with the bottom-level controller.
// From the current register and row mask it also reports, for selection:
//   dead_row  : an active row has count 0 (no covering exists here),
//   ess_found : an active row has count 1, ess_row the first such row,
//   min_row   : the first active row (from row 0) with the fewest 1s,
//   min_cnt   : that number.
module aux_unit #(
  parameter int unsigned ROWS = 32,
  parameter int unsigned CW   = 6,
  parameter int unsigned RAW  = (ROWS > 1) ? $clog2(ROWS) : 1
) (
  input  logic [ROWS-1:0][CW-1:0] aux,
  input  logic [ROWS-1:0]         row_mask,
  input  logic [ROWS-1:0]         dec_mask,
  input  logic [ROWS-1:0]         clr_mask,
  input  logic                    set_en,
  input  logic [RAW-1:0]          set_idx,
  input  logic [CW-1:0]           set_val,
  output logic [ROWS-1:0][CW-1:0] aux_next,
  output logic                    dead_row,
  output logic                    ess_found,
  output logic [RAW-1:0]          ess_row,
  output logic [RAW-1:0]          min_row,
  output logic [CW-1:0]           min_cnt
);
  always_comb begin
    for (int r = 0; r < int'(ROWS); r++) begin
      if (clr_mask[r])                     aux_next[r] = '0;
      else if (set_en && set_idx == RAW'(r)) aux_next[r] = set_val;
      else if (dec_mask[r] && aux[r] != '0) aux_next[r] = aux[r] - CW'(1);
      else                                  aux_next[r] = aux[r];
    end
  end

  always_comb begin
    dead_row  = 1'b0;
    ess_found = 1'b0;
    ess_row   = '0;
    min_row   = '0;
    min_cnt   = '1;
    for (int r = int'(ROWS) - 1; r >= 0; r--) begin
      if (row_mask[r]) begin
        if (aux[r] == '0) dead_row = 1'b1;
        if (aux[r] == CW'(1)) begin
          ess_found = 1'b1;
          ess_row   = RAW'(r);
        end
        // scanning downwards with <= keeps the lowest index among equals
        if (aux[r] <= min_cnt) begin
          min_cnt = aux[r];
          min_row = RAW'(r);
        end
      end
    end
  end
endmodule
