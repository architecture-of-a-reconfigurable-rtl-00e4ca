// addr_counter: address counter with parallel load.
// Drives the row or the column address of the matrix storage. It can be
// cleared, loaded with an arbitrary address or incremented; the address is
// a register, so a change made in one cycle addresses the memory from the
// next cycle on. Priority: clr, then ld, then inc. The counter wraps from
// N-1 to 0. The parallel load is the architecture's; wrap and priority are
// this design's choice.
module addr_counter #(
  parameter int unsigned N = 32,                       // number of addresses
  parameter int unsigned AW = (N > 1) ? $clog2(N) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clr,
  input  logic          ld,
  input  logic [AW-1:0] ld_val,
  input  logic          inc,
  output logic [AW-1:0] addr,
  output logic          last     // addr == N-1
);
  localparam logic [AW-1:0] LAST = AW'(N - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        addr <= '0;
    else if (clr)      addr <= '0;
    else if (ld)       addr <= ld_val;
    else if (inc)      addr <= (addr == LAST) ? '0 : addr + AW'(1);
  end

  assign last = (addr == LAST);
endmodule
