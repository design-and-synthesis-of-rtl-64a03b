// tb_u_roba: exhaustive test of the U-ROBA multiplier at N = 8 (all
// 65536 operand pairs) and random pairs at N = 12, against the integer
// reference model. It also counts results that are exact, above and below
// the exact product, and fails if any of the three never occurs.
module tb_u_roba;
  import tb_roba_ref_pkg::*;
  int checks = 0, failures = 0;
  int n_exact = 0, n_over = 0, n_under = 0;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [11:0] a12, b12;
  logic [23:0] p12;
  u_roba #(.N(8))  dut   (.a(a), .b(b), .p(p));
  u_roba #(.N(12)) dut12 (.a(a12), .b(b12), .p(p12));
  function automatic longint unsigned expect_fn(longint unsigned x, longint unsigned y, int n);
    return ref_u(x, y, n);
  endfunction
  function automatic longint exact_fn(longint unsigned x, longint unsigned y, int n);
    return longint'(x) * longint'(y);
  endfunction
  function automatic longint val_fn(longint unsigned r, int n);
    return longint'(r);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e;
    longint v, x;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = 8'(i);
        b = 8'(j);
        #1;
        e = expect_fn(longint'(i), longint'(j), 8);
        checks++;
        if (64'(p) != e) begin
          failures++;
          if (failures < 10) $display("FAIL a=%0d b=%0d got %0h exp %0h", i, j, p, e);
        end
        v = val_fn(64'(p), 8);
        x = exact_fn(longint'(i), longint'(j), 8);
        if (v == x) n_exact++;
        else if (v > x) n_over++;
        else n_under++;
      end
    end
    for (int k = 0; k < 20000; k++) begin
      a12 = 12'($urandom);
      b12 = 12'($urandom);
      #1;
      e = expect_fn(64'(a12), 64'(b12), 12);
      checks++;
      if (64'(p12) != e) begin
        failures++;
        if (failures < 20) $display("FAIL N=12 a=%0d b=%0d got %0h exp %0h", a12, b12, p12, e);
      end
    end
    $display("exact %0d over %0d under %0d", n_exact, n_over, n_under);
    checks++;
    if (n_exact == 0 || n_over == 0 || n_under == 0) begin
      failures++; $display("FAIL a result class never occurred");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
