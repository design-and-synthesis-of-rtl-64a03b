// as_roba: approximate signed rounding-based (AS-ROBA) multiplier.
//
// Same structure as s_roba, but every negation skips its increment: the
// magnitude of a negative operand is taken as ~a (one less than |a|) and a
// negative result is formed as ~x (one less than -x in magnitude terms). This
// removes both incrementers from the path at the cost of extra error, which
// shrinks relative to the product as N grows. The worst case is an operand of
// -1, whose magnitude becomes 0, so the result is 0 (100 % error).
//
// With MINUS_ONE_BYPASS = 1, a detector recognises an operand of -1 and
// bypasses the datapath, returning the exact negation of the other operand
// (sign-extended to 2N bits; +1 when both are -1). The source paper offers this
// detector as an option that costs delay and power, so it is off by default.
//
// Interface: a, b (N bits, two's complement) in; p (2N bits, two's
// complement) out. Purely combinational. Structure follows the source paper; the
// bypass output (exact negation) is this design's reading of it.
module as_roba #(
  parameter int unsigned N                = roba_pkg::ROBA_N,
  parameter bit          MINUS_ONE_BYPASS = 1'b0
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);

  logic           sa, sb;
  logic [N-1:0]   ma, mb;
  logic [2*N-1:0] mp, p_roba;

  roba_sign_detect #(.N(N), .APPROX(1'b1)) u_sd_a (.a(a), .sign(sa), .mag(ma));
  roba_sign_detect #(.N(N), .APPROX(1'b1)) u_sd_b (.a(b), .sign(sb), .mag(mb));

  roba_core #(.N(N), .EXT(1'b0)) u_core (.a(ma), .b(mb), .p(mp));

  roba_sign_set #(.W(2*N), .APPROX(1'b1)) u_ss (.mag(mp), .neg(sa ^ sb), .y(p_roba));

  if (MINUS_ONE_BYPASS) begin : g_bypass
    logic a_m1, b_m1;
    always_comb begin
      a_m1 = &a;
      b_m1 = &b;
      if (a_m1)      p = -(2*N)'(signed'(b));
      else if (b_m1) p = -(2*N)'(signed'(a));
      else           p = p_roba;
    end
  end else begin : g_no_bypass
    assign p = p_roba;
  end

endmodule
