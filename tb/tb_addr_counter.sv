// tb_addr_counter: checks clear, parallel load, increment, wrap-around and
// the priority clr > ld > inc of the address counter against a model.
module tb_addr_counter;
  localparam int unsigned N  = 12;
  localparam int unsigned AW = $clog2(N);
  logic clk = 1'b0, rst_n, clr, ld, inc, last;
  logic [AW-1:0] ld_val, addr;
  int checks = 0, failures = 0;
  int model;

  addr_counter #(.N(N)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; clr = 0; ld = 0; inc = 0; ld_val = '0; model = 0;
    @(negedge clk); rst_n = 1'b1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (int'(addr) != model || last != (model == N - 1)) begin
        failures++;
        $display("FAIL t=%0d addr=%0d model=%0d last=%0b", t, addr, model, last);
      end
      clr = ($urandom_range(0, 19) == 0);
      ld  = ($urandom_range(0, 6) == 0);
      inc = ($urandom_range(0, 2) != 0);
      ld_val = AW'($urandom_range(0, N - 1));
      if (clr)      model = 0;
      else if (ld)  model = int'(ld_val);
      else if (inc) model = (model == N - 1) ? 0 : model + 1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
