// roba_sign_set: sign set block of a signed ROBA multiplier.
//
// Gives the W-bit unsigned result of the datapath the sign of the product.
// When neg is 1 the result is negated: exactly (~mag + 1, S-ROBA) with
// APPROX = 0, or approximately (~mag, one less than the exact value,
// AS-ROBA) with APPROX = 1, which removes the incrementer from the critical
// path. When neg is 0 the magnitude passes unchanged.
//
// Purely combinational. Both negation variants follow the ROBA scheme; the
// mux structure is this design's own.
module roba_sign_set #(
  parameter int unsigned W      = 2 * roba_pkg::ROBA_N,
  parameter bit          APPROX = 1'b0
) (
  input  logic [W-1:0] mag,
  input  logic         neg,
  output logic [W-1:0] y
);

  always_comb begin
    if (!neg)        y = mag;
    else if (APPROX) y = ~mag;
    else             y = ~mag + W'(1);
  end

endmodule
