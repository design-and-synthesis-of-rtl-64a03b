// tb_roba_subtractor: checks the carry-free subtractor on every (P, Z) pair
// that an 8-bit ROBA multiplier produces: P = Ar*B + Br*A and Z = Ar*Br for
// all unsigned operand pairs (0..255), which include every magnitude pair of
// the signed versions (0..128). Expected value: the integer difference P - Z.
// It also counts how often each of the three input patterns occurs.
module tb_roba_subtractor;
  import tb_roba_ref_pkg::*;
  int checks = 0, failures = 0;
  int pat_hi = 0, pat_lo = 0, pat_borrow = 0;
  logic [16:0] p, z, d;

  roba_subtractor #(.W(17)) dut (.p(p), .z(z), .d(d));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned ar, br, pv, zv;
    for (int a = 0; a < 256; a++) begin
      for (int b = 0; b < 256; b++) begin
        ar = ref_round(longint'(a));
        br = ref_round(longint'(b));
        pv = ar * longint'(b) + br * longint'(a);
        zv = ar * br;
        p = 17'(pv);
        z = 17'(zv);
        #1;
        checks++;
        if (64'(d) != pv - zv) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d P=%0d Z=%0d got %0d", a, b, pv, zv, d);
        end
        if (zv != 0) begin
          if ((pv & zv) == 0)               pat_borrow++;
          else if ((pv & (zv << 1)) != 0)   pat_hi++;
          else                              pat_lo++;
        end
      end
    end
    $display("patterns: P=..011 Z=..010 %0d, P=..011 Z=..001 %0d, P=..010 Z=..001 %0d",
             pat_lo, pat_hi, pat_borrow);
    checks++;
    if (pat_hi == 0 || pat_lo == 0 || pat_borrow == 0) begin
      failures++; $display("FAIL a borrow pattern was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
