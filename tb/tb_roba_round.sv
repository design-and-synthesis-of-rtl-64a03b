// tb_roba_round: exhaustive test of the rounding block at N = 8 (EXT = 1,
// all 256 inputs) and N = 8 (EXT = 0, every magnitude up to 128), plus
// N = 5 with EXT = 1. The expected value is the nearest power of two found
// by integer search, ties rounding up and 3 rounding to 2.
module tb_roba_round;
  import tb_roba_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] a8;
  logic [8:0] ar8u;
  logic [7:0] ar8s;
  logic [4:0] a5;
  logic [5:0] ar5u;

  roba_round #(.N(8), .EXT(1'b1)) dut_u8 (.a(a8), .ar(ar8u));
  roba_round #(.N(8), .EXT(1'b0)) dut_s8 (.a(a8), .ar(ar8s));
  roba_round #(.N(5), .EXT(1'b1)) dut_u5 (.a(a5), .ar(ar5u));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      a8 = 8'(i);
      a5 = 5'(i);
      #1;
      checks++;
      if (64'(ar8u) != ref_round(longint'(i))) begin
        failures++; $display("FAIL N=8 EXT=1 a=%0d got %0d", i, ar8u);
      end
      if (i <= 128) begin
        checks++;
        if (64'(ar8s) != ref_round(longint'(i))) begin
          failures++; $display("FAIL N=8 EXT=0 a=%0d got %0d", i, ar8s);
        end
      end
      if (i < 32) begin
        checks++;
        if (64'(ar5u) != ref_round(longint'(i))) begin
          failures++; $display("FAIL N=5 EXT=1 a=%0d got %0d", i, ar5u);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
