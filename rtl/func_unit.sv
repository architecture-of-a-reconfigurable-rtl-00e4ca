// func_unit: functional unit for operations over Boolean vectors of W bits.
// Purely combinational. The vector result y is a & b, a & ~b, a | b or a,
// selected by op (used to mask a row or column with the row/column masks
// and to clear bits). Alongside, for any op, it compares y with a third
// operand c for the subsumption tests of the reduction rules:
//   sub     : y is contained in c, (y & c) == y,
//   sup     : c is contained in y, (y & c) == c,
//   equal   : y == c,
// and it reports
//   zero    : y has no 1,
//   ones    : the number of 1s in y (row weight for selection),
//   first   : index of the lowest-numbered 1 in y, and first_oh the same
//             as a one-hot vector (zero when y is zero).
// The kinds of operation follow the reduction and selection rules of the
// covering algorithm; the op set, encoding and output form are this design's.
module func_unit
  import cover_pkg::*;
#(
  parameter int unsigned W  = 32,
  parameter int unsigned IW = (W > 1) ? $clog2(W) : 1,
  parameter int unsigned NW = $clog2(W + 1)
) (
  input  fu_op_e         op,
  input  logic [W-1:0]   a,
  input  logic [W-1:0]   b,
  input  logic [W-1:0]   c,
  output logic [W-1:0]   y,
  output logic           sub,
  output logic           sup,
  output logic           equal,
  output logic           zero,
  output logic [NW-1:0]  ones,
  output logic [IW-1:0]  first,
  output logic [W-1:0]   first_oh
);
  always_comb begin
    unique case (op)
      FU_AND:  y = a & b;
      FU_ANDN: y = a & ~b;
      FU_OR:   y = a | b;
      default: y = a;
    endcase
  end

  assign sub    = ((y & c) == y);
  assign sup    = ((y & c) == c);
  assign equal  = (y == c);
  assign zero   = (y == '0);

  always_comb begin
    ones = '0;
    for (int i = 0; i < int'(W); i++) ones = ones + NW'(y[i]);
  end

  always_comb begin
    first = '0;
    for (int i = int'(W) - 1; i >= 0; i--) if (y[i]) first = IW'(i);
  end

  assign first_oh = y & (~y + W'(1));
endmodule
