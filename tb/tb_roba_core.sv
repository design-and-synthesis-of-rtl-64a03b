// tb_roba_core: exhaustive test of the unsigned ROBA datapath at N = 8:
// EXT = 1 on all 65536 operand pairs and EXT = 0 on every pair of
// magnitudes up to 128. Expected: Ar*B + Br*A - Ar*Br from integer
// arithmetic.
module tb_roba_core;
  import tb_roba_ref_pkg::*;
  localparam int N = 8;
  int checks = 0, failures = 0;
  logic [N-1:0]   a, b;
  logic [2*N-1:0] pu, ps;

  roba_core #(.N(N), .EXT(1'b1)) dut_u (.a(a), .b(b), .p(pu));
  roba_core #(.N(N), .EXT(1'b0)) dut_s (.a(a), .b(b), .p(ps));

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned e;
    for (int i = 0; i < 256; i++) begin
      for (int j = 0; j < 256; j++) begin
        a = N'(i);
        b = N'(j);
        #1;
        e = ref_u(longint'(i), longint'(j), N);
        checks++;
        if (64'(pu) != e) begin
          failures++;
          if (failures < 10) $display("FAIL EXT=1 %0d*%0d got %0d exp %0d", i, j, pu, e);
        end
        if (i <= 128 && j <= 128) begin
          checks++;
          if (64'(ps) != e) begin
            failures++;
            if (failures < 10) $display("FAIL EXT=0 %0d*%0d got %0d exp %0d", i, j, ps, e);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
