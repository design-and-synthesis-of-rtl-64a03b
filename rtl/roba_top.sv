// roba_top: the three rounding-based approximate multipliers side by side.
//
// Both operands drive, at the same time, the unsigned multiplier (U-ROBA,
// operands read as unsigned), the signed multiplier with exact negation
// (S-ROBA) and the signed multiplier with approximate negation (AS-ROBA),
// operands read as two's complement. Each brings out its own 2N-bit
// product, so the three can be compared on the same inputs or used
// separately. Each multiplier approximates A*B by Ar*B + Br*A - Ar*Br, with
// Ar and Br the operands rounded to the nearest power of two, using only
// shifts, one adder and a carry-free subtractor.
//
// Interface: a, b (N bits) in; p_u (unsigned), p_s and p_as (two's
// complement), each 2N bits, out. Purely combinational, no clock or reset.
// The three architectures are the source paper's; putting them in one top level
// is this design's choice. AS-ROBA is built without the optional -1 bypass.
module roba_top #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p_u,
  output logic [2*N-1:0] p_s,
  output logic [2*N-1:0] p_as
);

  u_roba  #(.N(N)) u_u  (.a(a), .b(b), .p(p_u));
  s_roba  #(.N(N)) u_s  (.a(a), .b(b), .p(p_s));
  as_roba #(.N(N)) u_as (.a(a), .b(b), .p(p_as));

endmodule
