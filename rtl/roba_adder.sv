// roba_adder: adder of the ROBA multiplier.
//
// Forms P = Ar*B + Br*A from the outputs of the two operand shifters. The sum
// is W bits wide and wraps modulo 2^W; the multipliers size W = 2N+1 so that
// it never wraps. Purely combinational. The adder architecture is left to
// synthesis (this design's choice; the source paper only names the block).
module roba_adder #(
  parameter int unsigned W = 2 * roba_pkg::ROBA_N + 1
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  output logic [W-1:0] s
);

  always_comb s = x + y;

endmodule
