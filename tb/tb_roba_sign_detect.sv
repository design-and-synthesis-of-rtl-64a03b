// tb_roba_sign_detect: exhaustive test of the sign detector at N = 8, in
// both negation modes. Expected values come from integer arithmetic: the
// magnitude is |a| (exact) or |a| - 1 for negative a (approximate).
module tb_roba_sign_detect;
  import tb_roba_ref_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0] a, mag_e, mag_a;
  logic         sign_e, sign_a;

  roba_sign_detect #(.N(N), .APPROX(1'b0)) dut_e (.a(a), .sign(sign_e), .mag(mag_e));
  roba_sign_detect #(.N(N), .APPROX(1'b1)) dut_a (.a(a), .sign(sign_a), .mag(mag_a));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint v;
    longint unsigned exp_e, exp_a;
    for (int i = 0; i < (1 << N); i++) begin
      a = N'(i);
      #1;
      v = sx(longint'(i), N);
      exp_e = (v < 0) ? longint'(-v) : longint'(v);
      exp_a = (v < 0) ? longint'(-v - 1) : longint'(v);
      checks += 4;
      if (sign_e !== (v < 0)) begin failures++; $display("FAIL sign exact a=%0d", v); end
      if (sign_a !== (v < 0)) begin failures++; $display("FAIL sign approx a=%0d", v); end
      if (64'(mag_e) != exp_e) begin failures++; $display("FAIL mag exact a=%0d got %0d", v, mag_e); end
      if (64'(mag_a) != exp_a) begin failures++; $display("FAIL mag approx a=%0d got %0d", v, mag_a); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
