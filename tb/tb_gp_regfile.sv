// tb_gp_regfile: random writes and reads of the register file against a
// model, including the reset value.
module tb_gp_regfile;
  localparam int unsigned NREG = 4, WIDTH = 12, AW = 2;
  logic clk = 1'b0, rst_n, we;
  logic [AW-1:0] waddr, raddr_a, raddr_b;
  logic [WIDTH-1:0] wdata, rdata_a, rdata_b;
  logic [WIDTH-1:0] model [NREG];
  int checks = 0, failures = 0;

  gp_regfile #(.NREG(NREG), .WIDTH(WIDTH), .RST_VAL(12'h5a5)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 0; we = 0; waddr = '0; wdata = '0; raddr_a = '0; raddr_b = '0;
    for (int i = 0; i < NREG; i++) model[i] = 12'h5a5;
    @(negedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      raddr_a = AW'($urandom); raddr_b = AW'($urandom);
      #1;
      checks++;
      if (rdata_a != model[raddr_a] || rdata_b != model[raddr_b]) begin
        failures++; $display("FAIL read %0d %0d", raddr_a, raddr_b);
      end
      we = $urandom_range(0, 1) == 1; waddr = AW'($urandom); wdata = WIDTH'($urandom);
      @(negedge clk);
      if (we) model[waddr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
