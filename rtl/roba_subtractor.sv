// roba_subtractor: carry-free subtractor of the ROBA multiplier.
//
// Computes D = P - Z, where P = Ar*B + Br*A and Z = Ar*Br. Because Ar and Br
// are powers of two, Z is one-hot (bit k) or zero, and the operands only
// ever meet in three patterns (shown on the bits around the leading ones):
//   P = 0..011..xxx  Z = 0..010..000  ->  D = 0..001..xxx
//   P = 0..011..xxx  Z = 0..001..000  ->  D = 0..010..xxx
//   P = 0..010..xxx  Z = 0..001..000  ->  D = 0..001..xxx
// In the first two P has a 1 at bit k, which is simply cleared (XOR with
// Z). In the third P has 0 at bit k and 1 at bit k+1: the borrow moves one
// place only, so bit k is set (again XOR with Z) and bit k+1 is cleared:
//   D = (P ^ Z) & ~((Z & ~P) << 1)
// This needs two gate levels and no carry chain. The three patterns come
// from the source paper; this closed form for them is this design's own.
// The result equals P - Z only for the P, Z pairs a ROBA multiplier
// produces; it is not a general subtractor.
//
// Purely combinational; all ports W bits wide.
module roba_subtractor #(
  parameter int unsigned W = 2 * roba_pkg::ROBA_N + 1
) (
  input  logic [W-1:0] p,
  input  logic [W-1:0] z,
  output logic [W-1:0] d
);

  logic [W-1:0] borrow;

  always_comb begin
    borrow = (z & ~p) << 1;
    d      = (p ^ z) & ~borrow;
  end

endmodule
