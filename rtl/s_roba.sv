// s_roba: signed rounding-based approximate (S-ROBA) multiplier.
//
// Rounding to a power of two only helps for positive numbers, so the signed
// multiplier works on magnitudes: the sign detectors take the exact absolute
// value of each two's-complement operand, the unsigned ROBA datapath
// (roba_core, N-bit rounding) multiplies the magnitudes, and the sign set
// block negates the result exactly (~x + 1) when the operand signs differ.
// Its error is therefore the same as that of the unsigned multiplier: at
// most 1/9 of the exact product.
//
// Interface: a, b (N bits, two's complement) in; p (2N bits, two's
// complement) out. Purely combinational. Structure follows the source paper.
module s_roba #(
  parameter int unsigned N = roba_pkg::ROBA_N
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic           sa, sb;
  logic [N-1:0]   ma, mb;
  logic [2*N-1:0] mp;

  roba_sign_detect #(.N(N), .APPROX(1'b0)) u_sd_a (.a(a), .sign(sa), .mag(ma));
  roba_sign_detect #(.N(N), .APPROX(1'b0)) u_sd_b (.a(b), .sign(sb), .mag(mb));

  roba_core #(.N(N), .EXT(1'b0)) u_core (.a(ma), .b(mb), .p(mp));

  roba_sign_set #(.W(2*N), .APPROX(1'b0)) u_ss (.mag(mp), .neg(sa ^ sb), .y(p));

endmodule
