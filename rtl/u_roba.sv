// u_roba: unsigned rounding-based approximate (U-ROBA) multiplier.
//
// Multiplies two unsigned N-bit operands approximately as
// Ar*B + Br*A - Ar*Br, Ar and Br being the operands rounded to the nearest
// power of two (see roba_core). With operands known to be non-negative, the
// sign detector and sign set stages of the signed versions are omitted, which
// shortens the path; the rounding blocks instead produce N+1 bits so that an
// operand of the form 11x..x can round up to 2^N.
//
// Interface: a, b (N bits, unsigned) in; p (2N bits, unsigned) out.
// Purely combinational, no clock. Structure follows the source paper; the
// operand width default (8) is this design's reading of it.
module u_roba #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  roba_core #(.N(N), .EXT(1'b1)) u_core (.a(a), .b(b), .p(p));

endmodule
