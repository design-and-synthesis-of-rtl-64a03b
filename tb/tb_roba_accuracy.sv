// tb_roba_accuracy: error analysis of the three multipliers over every
// operand pair, at N = 8 and N = 6. For each width it measures the largest
// relative error, how many operand pairs reach it and how many products
// are exact, and checks them against the closed forms of the ROBA error
// analysis:
//   U-ROBA  max error 1/9, reached (n-1)^2 times; 2(n+1)2^n - (n+1)^2 exact
//   S-ROBA  max error 1/9, reached (2(n-2))^2 times; n*2^(n+2) - 4n^2 exact
//   AS-ROBA max error 100 % (an operand of -1), reached 2*2^(n-1) - 1 times;
//           at least n*2^n - n^2 exact products
// Relative errors are compared in integers (9*|p - x| against |x|).
module tb_roba_accuracy;
  import tb_roba_ref_pkg::*;
  int checks = 0, failures = 0;
  // Per-width tallies of exact products, pairs at the maximum error and
  // pairs beyond it.
  int u_max, s_max, as_max, u_exact, s_exact, as_exact, u_over, s_over, as_over;

  logic [7:0]  a8, b8;
  logic [15:0] pu8, ps8, pas8;
  logic [5:0]  a6, b6;
  logic [11:0] pu6, ps6, pas6;

  roba_top #(.N(8)) dut8 (.a(a8), .b(b8), .p_u(pu8), .p_s(ps8), .p_as(pas8));
  roba_top #(.N(6)) dut6 (.a(a6), .b(b6), .p_u(pu6), .p_s(ps6), .p_as(pas6));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic void expect_eq(string what, int n, int got, int want);
    checks++;
    $display("n=%0d %-28s %0d (expected %0d)", n, what, got, want);
    if (got != want) begin
      failures++; $display("FAIL n=%0d %s", n, what);
    end
  endfunction

  function automatic void report(int n);
    expect_eq("U-ROBA pairs at 1/9 error", n, u_max, (n - 1) * (n - 1));
    expect_eq("U-ROBA pairs above 1/9", n, u_over, 0);
    expect_eq("U-ROBA exact products", n, u_exact, 2 * (n + 1) * (1 << n) - (n + 1) * (n + 1));
    expect_eq("S-ROBA pairs at 1/9 error", n, s_max, (2 * (n - 2)) * (2 * (n - 2)));
    expect_eq("S-ROBA pairs above 1/9", n, s_over, 0);
    expect_eq("S-ROBA exact products", n, s_exact, n * (1 << (n + 2)) - 4 * n * n);
    expect_eq("AS-ROBA pairs at 100% error", n, as_max, 2 * (1 << (n - 1)) - 1);
    expect_eq("AS-ROBA pairs above 100%", n, as_over, 0);
    checks++;
    $display("n=%0d AS-ROBA exact products       %0d (bound %0d)", n, as_exact, n * (1 << n) - n * n);
    if (as_exact < n * (1 << n) - n * n) begin
      failures++; $display("FAIL n=%0d AS-ROBA exact products below bound", n);
    end
  endfunction

  initial begin
    longint x, e, vu, vs, vas;
    int n;
    for (int w = 0; w < 2; w++) begin
      n = (w == 0) ? 8 : 6;
      u_max = 0; s_max = 0; as_max = 0; u_exact = 0; s_exact = 0; as_exact = 0;
      u_over = 0; s_over = 0; as_over = 0;
      for (int i = 0; i < (1 << n); i++) begin
        for (int j = 0; j < (1 << n); j++) begin
          if (n == 8) begin a8 = 8'(i); b8 = 8'(j); end
          else        begin a6 = 6'(i); b6 = 6'(j); end
          #1;
          vu  = (n == 8) ? longint'(pu8) : longint'(pu6);
          vs  = (n == 8) ? sx(64'(ps8), 16) : sx(64'(ps6), 12);
          vas = (n == 8) ? sx(64'(pas8), 16) : sx(64'(pas6), 12);
          // unsigned
          x = longint'(i) * longint'(j);
          if (vu == x) u_exact++;
          if (x != 0) begin
            e = (vu > x) ? vu - x : x - vu;
            if (9 * e == x) u_max++;
            if (9 * e > x)  u_over++;
          end
          // signed
          x = sx(longint'(i), n) * sx(longint'(j), n);
          if (vs == x)  s_exact++;
          if (vas == x) as_exact++;
          if (x != 0) begin
            e = (vs > x) ? vs - x : x - vs;
            if (9 * e == ((x < 0) ? -x : x)) s_max++;
            if (9 * e > ((x < 0) ? -x : x))  s_over++;
            e = (vas > x) ? vas - x : x - vas;
            if (e == ((x < 0) ? -x : x)) as_max++;
            if (e > ((x < 0) ? -x : x))  as_over++;
          end
        end
      end
      report(n);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
