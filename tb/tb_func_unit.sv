// tb_func_unit: random operands for every operation; y, the containment and
// equality flags, zero, number of ones and first one are compared with
// values computed bit by bit here.
module tb_func_unit;
  import cover_pkg::*;
  localparam int unsigned W = 20, IW = 5, NW = 5;
  fu_op_e op;
  logic [W-1:0] a, b, c, y, first_oh;
  logic sub, sup, equal, zero;
  logic [NW-1:0] ones;
  logic [IW-1:0] first;
  int checks = 0, failures = 0;

  func_unit #(.W(W)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      logic [W-1:0] ey;
      int n, f;
      bit es, ep;
      op = fu_op_e'($urandom_range(0, 3));
      a = W'($urandom); b = W'($urandom);
      if (t % 5 == 0) a = a & b;
      unique case (op)
        FU_AND:  ey = a & b;
        FU_ANDN: ey = a & ~b;
        FU_OR:   ey = a | b;
        default: ey = a;
      endcase
      case (t % 4)
        0: c = ey;
        1: c = ey | W'($urandom);
        2: c = ey & W'($urandom);
        default: c = W'($urandom);
      endcase
      if (t % 50 == 0) begin a = '0; b = '0; end
      if (t % 50 == 0) ey = (op == FU_ANDN || op == FU_AND || op == FU_OR) ? '0 : '0;
      n = 0; f = -1; es = 1; ep = 1;
      for (int i = 0; i < W; i++) begin
        if (ey[i]) begin n++; if (f < 0) f = i; end
        if (ey[i] && !c[i]) es = 0;
        if (c[i] && !ey[i]) ep = 0;
      end
      #1;
      checks++;
      if (y != ey || sub != es || sup != ep || equal != (ey == c) || zero != (ey == '0) ||
          int'(ones) != n || (n > 0 && int'(first) != f) ||
          first_oh != ((n > 0) ? W'(1) << f : '0)) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h c=%h y=%h ones=%0d first=%0d", op, a, b, c, y, ones, first);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
