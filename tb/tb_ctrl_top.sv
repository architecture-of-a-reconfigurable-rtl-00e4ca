// tb_ctrl_top: the bottom level is replaced by a responder that answers each
// command after a random delay with random status. The sequence of commands
// is checked against the search flow: INIT first, CHECK after INIT, TAKE,
// BRANCH and a non-final BACK; RECORD after a better solution, BACK after a
// solution that is not better, a dead row or the bound; row and column
// passes alternate until a round changes nothing, then SELECT; TAKE or
// BRANCH after SELECT; done after BACK with an empty stack.
module tb_ctrl_top;
  import cover_pkg::*;
  logic clk = 1'b0, rst_n, start, busy, done, cmd_start, op_done;
  op_e cmd;
  status_t status;
  int checks = 0, failures = 0, searches = 0;

  ctrl_top dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  op_e exp_cmd;
  bit  exp_done, rc;
  int  seen [op_e];

  initial begin
    rst_n = 0; start = 0; op_done = 0; status = '0;
    repeat (2) @(negedge clk); rst_n = 1;
    for (int s = 0; s < 30; s++) begin
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      exp_cmd = OP_INIT; exp_done = 0; rc = 0;
      forever begin
        while (!cmd_start && !done) @(negedge clk);
        if (done) begin
          checks++;
          if (!exp_done) begin failures++; $display("FAIL early done"); end
          break;
        end
        checks++;
        if (exp_done || cmd != exp_cmd || !busy) begin
          failures++; $display("FAIL got %s expected %s (done expected %0b)", cmd.name(), exp_cmd.name(), exp_done);
        end
        seen[cmd] = seen.exists(cmd) ? seen[cmd] + 1 : 1;
        repeat ($urandom_range(1, 4)) @(negedge clk);
        status = status_t'($urandom);
        // keep searches finite: the stack empties now and then
        status.empty = ($urandom_range(0, 15) == 0);
        op_done = 1;
        // expected next
        unique case (cmd)
          OP_INIT: exp_cmd = OP_CHECK;
          OP_CHECK: exp_cmd = status.no_rows ? (status.better ? OP_RECORD : OP_BACK)
                              : (status.dead_row || status.bound) ? OP_BACK : OP_ROWSUB;
          OP_ROWSUB: begin rc = status.changed; exp_cmd = OP_COLSUB; end
          OP_COLSUB: exp_cmd = (rc || status.changed) ? OP_ROWSUB : OP_SELECT;
          OP_SELECT: exp_cmd = status.essential ? OP_TAKE : OP_BRANCH;
          OP_TAKE, OP_BRANCH: exp_cmd = OP_CHECK;
          OP_RECORD: exp_cmd = OP_BACK;
          OP_BACK: if (status.empty) exp_done = 1; else exp_cmd = OP_CHECK;
          default: ;
        endcase
        @(negedge clk); op_done = 0;
      end
      searches++;
      checks++;
      if (busy) begin failures++; $display("FAIL busy after done"); end
    end
    foreach (seen[k]) $display("%s issued %0d times", k.name(), seen[k]);
    checks++;
    if (seen.size() != 9) begin failures++; $display("FAIL not every command issued"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
