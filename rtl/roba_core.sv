// roba_core: unsigned datapath shared by the three ROBA multipliers.
//
// The exact product can be written A*B = (Ar-A)*(Br-B) + Ar*B + Br*A - Ar*Br,
// where Ar and Br are A and B rounded to the nearest power of two. The first
// term is small and costly, so it is dropped and the product is approximated
// by Ar*B + Br*A - Ar*Br. Since Ar and Br are powers of two, all three
// remaining products are shifts. The datapath is:
//   two rounding blocks   a -> ar, b -> br (one-hot)
//   three shifters        b*ar, a*br, br*ar
//   an adder              P = b*ar + a*br
//   a subtractor          D = P - ar*br (carry-free, see roba_subtractor)
// The result is exact whenever either operand is a power of two or zero. Its
// relative error is at most 1/9, reached when both operands are 3*2^k.
//
// With EXT = 1 (unsigned use) the rounded values are N+1 bits, since an
// operand 11x..x rounds to 2^N; with EXT = 0 (signed use, operands are
// magnitudes of at most 2^(N-1)) they are N bits. Internally P and Ar*Br are
// carried at 2N+1 bits: with EXT = 1, Ar*Br reaches 2^(2N) and P nearly
// 2^(2N+1), although the final difference always fits in 2N bits, the width
// of p. (The source paper sizes the shifters at 2N bits; the extra bit is this
// design's correction.)
//
// Purely combinational: a and b in, p out after the combinational delay.
module roba_core #(
  parameter int unsigned N   = roba_pkg::ROBA_N,
  parameter bit          EXT = 1'b1
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  localparam int unsigned WR = N + int'(EXT);  // rounded-value width
  localparam int unsigned W  = 2 * N + 1;      // internal product width

  logic [WR-1:0] ar, br;
  logic [W-1:0]  ar_b, br_a, ar_br, sum_p, diff;

  roba_round #(.N(N), .EXT(EXT)) u_round_a (.a(a), .ar(ar));
  roba_round #(.N(N), .EXT(EXT)) u_round_b (.a(b), .ar(br));

  roba_shifter #(.WD(N),  .WS(WR), .WO(W)) u_shift_arb  (.d(b),  .s(ar), .y(ar_b));
  roba_shifter #(.WD(N),  .WS(WR), .WO(W)) u_shift_bra  (.d(a),  .s(br), .y(br_a));
  roba_shifter #(.WD(WR), .WS(WR), .WO(W)) u_shift_arbr (.d(br), .s(ar), .y(ar_br));

  roba_adder #(.W(W)) u_add (.x(ar_b), .y(br_a), .s(sum_p));

  roba_subtractor #(.W(W)) u_sub (.p(sum_p), .z(ar_br), .d(diff));

  // The approximate product always fits in 2N bits, so the top bit of the
  // difference is zero; the check runs after the inputs have settled.
  assign p = diff[2*N-1:0];

  always_comb begin
    assert final (diff[W-1] == 1'b0)
      else $error("roba_core: product of %0d and %0d overflows 2N bits", a, b);
  end

endmodule
