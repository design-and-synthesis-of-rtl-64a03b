// tb_roba_sign_set: random and corner-case test of the sign set block
// (16 bits) in exact and approximate mode. Expected: mag, -mag or -mag - 1
// modulo 2^16.
module tb_roba_sign_set;
  int checks = 0, failures = 0;
  logic [15:0] mag, ye, ya;
  logic        neg;

  roba_sign_set #(.W(16), .APPROX(1'b0)) dut_e (.mag(mag), .neg(neg), .y(ye));
  roba_sign_set #(.W(16), .APPROX(1'b1)) dut_a (.mag(mag), .neg(neg), .y(ya));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint m, exp_e, exp_a;
    for (int i = 0; i < 4000; i++) begin
      mag = (i < 4) ? 16'(i) : 16'($urandom);
      neg = (i < 8) ? i[2] : 1'($urandom);
      #1;
      m = longint'(mag);
      exp_e = neg ? ((-m) & 64'hFFFF) : m;
      exp_a = neg ? ((-m - 1) & 64'hFFFF) : m;
      checks += 2;
      if (longint'(ye) != exp_e) begin failures++; $display("FAIL exact mag=%0d neg=%0d got %0d", mag, neg, ye); end
      if (longint'(ya) != exp_a) begin failures++; $display("FAIL approx mag=%0d neg=%0d got %0d", mag, neg, ya); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
