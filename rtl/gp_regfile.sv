// gp_regfile: general-purpose registers, NREG words of WIDTH bits.
// For the covering algorithm they keep the best covering found so far
// (a column set) and its size, which bounds the rest of the search. One
// synchronous write port, two asynchronous read ports. Reset sets every
// register to RST_VAL. The registers and their use for the best result and
// its size follow the architecture; the count, width and ports are this
// design's.
module gp_regfile #(
  parameter int unsigned NREG  = 4,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned AW    = (NREG > 1) ? $clog2(NREG) : 1,
  parameter logic [WIDTH-1:0] RST_VAL = '0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr_a,
  output logic [WIDTH-1:0] rdata_a,
  input  logic [AW-1:0]    raddr_b,
  output logic [WIDTH-1:0] rdata_b
);
  logic [WIDTH-1:0] regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(NREG); i++) regs[i] <= RST_VAL;
    end else if (we) begin
      regs[waddr] <= wdata;
    end
  end

  assign rdata_a = regs[raddr_a];
  assign rdata_b = regs[raddr_b];
endmodule
