// tb_roba_shifter: checks the one-hot shifter (8-bit data, 9-bit shift word,
// 17-bit output) for every data value against every one-hot shift word and
// the zero word; the expected value is the integer product d * s.
module tb_roba_shifter;
  int checks = 0, failures = 0;
  logic [7:0]  d;
  logic [8:0]  s;
  logic [16:0] y;

  roba_shifter #(.WD(8), .WS(9), .WO(17)) dut (.d(d), .s(s), .y(y));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned sv, expv;
    for (int i = 0; i < 256; i++) begin
      for (int k = -1; k < 9; k++) begin
        d = 8'(i);
        sv = (k < 0) ? 0 : (64'd1 << k);
        s = 9'(sv);
        #1;
        expv = longint'(i) * sv;
        checks++;
        if (64'(y) != expv) begin
          failures++; $display("FAIL d=%0d s=%0d got %0d exp %0d", i, sv, y, expv);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
