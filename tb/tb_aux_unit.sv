// tb_aux_unit: random auxiliary registers, row masks and update masks; the
// updated fields (reset, direct write, decrement) and the selection outputs
// (dead row, first row with one 1, first row with fewest 1s) are compared
// with a field-by-field model.
module tb_aux_unit;
  localparam int unsigned ROWS = 12, CW = 4, RAW = 4;
  logic [ROWS-1:0][CW-1:0] aux, aux_next;
  logic [ROWS-1:0] row_mask, dec_mask, clr_mask;
  logic set_en, dead_row, ess_found;
  logic [RAW-1:0] set_idx, ess_row, min_row;
  logic [CW-1:0] set_val, min_cnt;
  int checks = 0, failures = 0;

  aux_unit #(.ROWS(ROWS), .CW(CW)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      int e_min, e_minr, e_ess;
      bit e_dead;
      for (int r = 0; r < ROWS; r++) aux[r] = CW'($urandom_range(0, (t % 3 == 0) ? 3 : 15));
      row_mask = ROWS'($urandom); dec_mask = ROWS'($urandom); clr_mask = ROWS'($urandom) & ROWS'($urandom);
      set_en = $urandom_range(0, 1) == 1; set_idx = RAW'($urandom_range(0, ROWS - 1)); set_val = CW'($urandom);
      #1;
      e_dead = 0; e_ess = -1; e_min = 1 << CW; e_minr = 0;
      for (int r = 0; r < ROWS; r++) begin
        logic [CW-1:0] ev;
        if (clr_mask[r]) ev = '0;
        else if (set_en && int'(set_idx) == r) ev = set_val;
        else if (dec_mask[r] && aux[r] > 0) ev = aux[r] - 1;
        else ev = aux[r];
        checks++;
        if (aux_next[r] != ev) begin failures++; $display("FAIL field %0d", r); end
        if (row_mask[r]) begin
          if (aux[r] == 0) e_dead = 1;
          if (aux[r] == 1 && e_ess < 0) e_ess = r;
          if (int'(aux[r]) < e_min) begin e_min = int'(aux[r]); e_minr = r; end
        end
      end
      checks++;
      if (dead_row != e_dead || ess_found != (e_ess >= 0) || (e_ess >= 0 && int'(ess_row) != e_ess) ||
          (row_mask != 0 && (int'(min_row) != e_minr || int'(min_cnt) != e_min))) begin
        failures++;
        $display("FAIL select dead=%0b ess=%0b/%0d min=%0d/%0d exp %0b %0d %0d/%0d",
                 dead_row, ess_found, ess_row, min_row, min_cnt, e_dead, e_ess, e_minr, e_min);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
