// tb_roba_adder: random and corner-case test of the 17-bit adder against
// integer addition modulo 2^17.
module tb_roba_adder;
  int checks = 0, failures = 0;
  logic [16:0] x, y, s;

  roba_adder #(.W(17)) dut (.x(x), .y(y), .s(s));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint unsigned expv;
    for (int i = 0; i < 5000; i++) begin
      case (i)
        0: begin x = '0; y = '0; end
        1: begin x = '1; y = 17'd1; end
        2: begin x = '1; y = '1; end
        default: begin x = 17'($urandom); y = 17'($urandom); end
      endcase
      #1;
      expv = (64'(x) + 64'(y)) % (64'd1 << 17);
      checks++;
      if (64'(s) != expv) begin
        failures++; $display("FAIL %0d + %0d got %0d", x, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
