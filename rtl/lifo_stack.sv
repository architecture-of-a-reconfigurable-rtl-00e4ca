// lifo_stack: last-in first-out stack of WIDTH-bit words, DEPTH deep.
// The processor uses five of them to save a branching point (row mask,
// column mask, partial result, auxiliary register, branch mask) and to
// restore it when the search backtracks. The word on top is always visible
// on "top"; it can also be overwritten in place with wr_top, which is how
// the branch-mask and result stacks are updated at a branching point
// without a pop. push and pop take one cycle each; push stores din, pop
// drops the top word. A push on a full stack or a pop on an empty one is
// ignored and flagged by an assertion. clr empties the stack. Five stacks,
// their contents and the direct change of the top follow the architecture;
// the handshake and the depth are this design's.
module lifo_stack #(
  parameter int unsigned WIDTH = 32,
  parameter int unsigned DEPTH = 32,
  parameter int unsigned PW    = $clog2(DEPTH + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clr,
  input  logic             push,
  input  logic             pop,
  input  logic [WIDTH-1:0] din,
  input  logic             wr_top,
  input  logic [WIDTH-1:0] top_din,
  output logic [WIDTH-1:0] top,
  output logic             empty,
  output logic             full,
  output logic [PW-1:0]    level
);
  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    sp;     // number of words held
  logic [PW-1:0]    tidx;

  assign empty = (sp == '0);
  assign full  = (sp == PW'(DEPTH));
  assign level = sp;
  assign tidx  = empty ? '0 : sp - PW'(1);
  assign top   = mem[tidx[$clog2(DEPTH)-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 sp <= '0;
    else if (clr)               sp <= '0;
    else if (push && !full)     sp <= sp + PW'(1);
    else if (pop && !empty)     sp <= sp - PW'(1);
  end

  always_ff @(posedge clk) begin
    if (!clr) begin
      if (push && !full)          mem[sp[$clog2(DEPTH)-1:0]]   <= din;
      else if (wr_top && !empty)  mem[tidx[$clog2(DEPTH)-1:0]] <= top_din;
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(push && full && !clr));
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(pop && empty && !clr && !push));
  a_one_op:       assert property (@(posedge clk) disable iff (!rst_n) !(push && pop));
endmodule
