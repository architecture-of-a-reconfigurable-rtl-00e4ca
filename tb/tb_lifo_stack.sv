// tb_lifo_stack: random push, pop and top rewrite against a queue model;
// checks top, empty, full and level every cycle and that pushing the stack
// to full and popping it to empty returns the words in reverse order.
module tb_lifo_stack;
  localparam int unsigned WIDTH = 16;
  localparam int unsigned DEPTH = 8;
  localparam int unsigned PW    = $clog2(DEPTH + 1);
  logic clk = 1'b0, rst_n, clr, push, pop, wr_top, empty, full;
  logic [WIDTH-1:0] din, top_din, top;
  logic [PW-1:0] level;
  logic [WIDTH-1:0] q [$];
  int checks = 0, failures = 0;

  lifo_stack #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare();
    checks++;
    if (level != PW'(q.size()) || empty != (q.size() == 0) || full != (q.size() == DEPTH) ||
        (q.size() > 0 && top != q[$])) begin
      failures++;
      $display("FAIL level=%0d model=%0d top=%h", level, q.size(), top);
    end
  endtask

  initial begin
    rst_n = 0; clr = 0; push = 0; pop = 0; wr_top = 0; din = '0; top_din = '0;
    @(negedge clk); rst_n = 1;
    // fill and drain
    for (int i = 0; i < DEPTH; i++) begin
      push = 1; din = WIDTH'(i * 3 + 1); @(negedge clk); q.push_back(din); compare();
    end
    push = 0;
    for (int i = 0; i < DEPTH; i++) begin
      checks++;
      if (top != WIDTH'((DEPTH - 1 - i) * 3 + 1)) begin failures++; $display("FAIL drain %0d", i); end
      pop = 1; @(negedge clk); void'(q.pop_back()); compare();
    end
    pop = 0;
    // random traffic
    for (int t = 0; t < 3000; t++) begin
      automatic int k = int'($urandom_range(0, 9));
      push = 0; pop = 0; wr_top = 0; clr = 0;
      din = WIDTH'($urandom); top_din = WIDTH'($urandom);
      if (k < 4 && q.size() < DEPTH)      push = 1;
      else if (k < 7 && q.size() > 0)     pop = 1;
      else if (k < 9 && q.size() > 0)     wr_top = 1;
      else if (k == 9 && t % 7 == 0)      clr = 1;
      @(negedge clk);
      if (clr)         q.delete();
      else if (push)   q.push_back(din);
      else if (pop)    void'(q.pop_back());
      else if (wr_top) q[$] = top_din;
      compare();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
