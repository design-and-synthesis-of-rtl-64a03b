// roba_sign_detect: sign detector and absolute-value unit of a signed ROBA
// multiplier.
//
// The operand is two's complement. The sign output is its top bit. The
// magnitude output is the operand itself when it is positive, otherwise its
// negation. With APPROX = 0 the negation is exact (~a + 1), as in the S-ROBA
// multiplier; with APPROX = 1 the increment is dropped and the magnitude is
// ~a, one less than the true value, as in the AS-ROBA multiplier, which trades
// that error for a shorter path. The magnitude is N bits wide and unsigned, so
// -2^(N-1) gives 2^(N-1) with exact negation.
//
// Purely combinational. The mux-and-negate structure is this design's own
// choice: the function (sign, then absolute value) and the two negation
// variants follow the ROBA scheme.
module roba_sign_detect #(
  parameter int unsigned N      = roba_pkg::ROBA_N,
  parameter bit          APPROX = 1'b0
) (
  input  logic [N-1:0] a,
  output logic         sign,
  output logic [N-1:0] mag
);

  logic [N-1:0] neg_a;

  always_comb begin
    sign  = a[N-1];
    neg_a = APPROX ? ~a : (~a + N'(1));
    mag   = sign ? neg_a : a;
  end

endmodule
