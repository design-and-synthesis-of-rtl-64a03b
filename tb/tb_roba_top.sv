// tb_roba_top: end-to-end test of the three multipliers in roba_top at the
// default width (N = 8, no parameter override). Every one of the 65536
// operand pairs is applied; each of the three products is compared with the
// integer reference model. The test also counts how often each mechanism of
// the design is exercised, and fails if one never is:
//   operand rounded down / rounded up / already a power of two
//   the 3 -> 2 rounding exception, and rounding up to 2^N (unsigned only)
//   subtractor borrow (bit k of P clear) and no-borrow cases
//   negative operand (sign detector) and negative result (sign set)
//   approximate result above / below / equal to the exact product
//   AS-ROBA operand of -1 (result collapses to zero)
module tb_roba_top;
  import tb_roba_ref_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] p_u, p_s, p_as;

  typedef enum int {
    M_ROUND_DOWN, M_ROUND_UP, M_POW2, M_THREE, M_ROUND_2N, M_BORROW, M_NO_BORROW,
    M_NEG_OPERAND, M_NEG_RESULT, M_OVER, M_UNDER, M_EXACT, M_AS_MINUS_ONE, M_COUNT
  } mech_e;
  int mech [M_COUNT];

  roba_top dut (.a(a), .b(b), .p_u(p_u), .p_s(p_s), .p_as(p_as));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic note_operand(longint unsigned v);
    longint unsigned r;
    r = ref_round(v);
    if (v != 0) begin
      if (r == v)     mech[M_POW2]++;
      else if (r > v) mech[M_ROUND_UP]++;
      else            mech[M_ROUND_DOWN]++;
    end
    if (v == 3) mech[M_THREE]++;
    if (r == (64'd1 << N)) mech[M_ROUND_2N]++;
  endtask

  initial begin
    longint unsigned eu, es, eas, ar, br, pv, zv;
    longint va, vb, vs, x;
    foreach (mech[m]) mech[m] = 0;
    for (int i = 0; i < (1 << N); i++) begin
      for (int j = 0; j < (1 << N); j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        eu  = ref_u(longint'(i), longint'(j), N);
        es  = ref_s(longint'(i), longint'(j), N);
        eas = ref_as(longint'(i), longint'(j), N, 1'b0);
        checks += 3;
        if (64'(p_u) != eu) begin
          failures++; if (failures < 10) $display("FAIL U a=%0d b=%0d got %0h exp %0h", i, j, p_u, eu);
        end
        if (64'(p_s) != es) begin
          failures++; if (failures < 10) $display("FAIL S a=%0d b=%0d got %0h exp %0h", i, j, p_s, es);
        end
        if (64'(p_as) != eas) begin
          failures++; if (failures < 10) $display("FAIL AS a=%0d b=%0d got %0h exp %0h", i, j, p_as, eas);
        end
        // mechanism coverage
        if (j == 0) note_operand(longint'(i));
        ar = ref_round(longint'(i));
        br = ref_round(longint'(j));
        pv = ar * longint'(j) + br * longint'(i);
        zv = ar * br;
        if (zv != 0) begin
          if ((pv & zv) == 0) mech[M_BORROW]++;
          else                mech[M_NO_BORROW]++;
        end
        va = sx(longint'(i), N);
        vb = sx(longint'(j), N);
        if (va < 0) mech[M_NEG_OPERAND]++;
        if ((va < 0) != (vb < 0) && p_s[2*N-1]) mech[M_NEG_RESULT]++;
        x  = va * vb;
        vs = sx(64'(p_s), 2 * N);
        if (vs > x)      mech[M_OVER]++;
        else if (vs < x) mech[M_UNDER]++;
        else             mech[M_EXACT]++;
        if ((va == -1 || vb == -1) && p_as == '0) mech[M_AS_MINUS_ONE]++;
      end
    end
    for (int m = 0; m < M_COUNT; m++) begin
      mech_e me;
      me = mech_e'(m);
      $display("mechanism %-16s %0d", me.name(), mech[m]);
      checks++;
      if (mech[m] == 0) begin
        failures++; $display("FAIL mechanism %s never exercised", me.name());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
