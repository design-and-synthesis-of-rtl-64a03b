// roba_shifter: multiplies a value by a power of two given in one-hot form.
//
// In the ROBA multiplier every product that remains after the approximation
// has at least one operand that is a rounded value, i.e. a power of two, so
// each product is a left shift. Here the shift is controlled directly by the
// one-hot rounded word s: the output is the OR, over every set bit k of s, of
// d shifted left by k. A one-hot s gives d * s exactly; an all-zero s (zero
// operand) gives zero without a separate test. No encoder to a binary shift
// count is needed.
//
// Widths: d is WD bits, s is WS bits, y is WO bits and is truncated to WO
// bits. Purely combinational. The AND-OR structure is this design's own
// choice; the source paper only names the block a shifter.
module roba_shifter #(
  parameter int unsigned WD = roba_pkg::ROBA_N,
  parameter int unsigned WS = roba_pkg::ROBA_N + 1,
  parameter int unsigned WO = 2 * roba_pkg::ROBA_N + 1
) (
  input  logic [WD-1:0] d,
  input  logic [WS-1:0] s,
  output logic [WO-1:0] y
);

  always_comb begin
    y = '0;
    for (int k = 0; k < WS; k++) begin
      if (s[k]) begin
        y = y | (WO'(d) << k);
      end
    end
  end

endmodule
