// Test of the 4-bit ALU of the SIMT processor: all 16 x 16 operand pairs for
// addition and subtraction, checking the modulo-16 result and the sign flag
// (most significant result bit), against arithmetic done here.
module tb_sfqp_alu;
  logic [3:0] a, b, y;
  logic sub, sign;
  int checks = 0, failures = 0;
  sfqp_alu dut (.*);
  initial begin
    for (int s = 0; s < 2; s++)
      for (int i = 0; i < 16; i++)
        for (int j = 0; j < 16; j++) begin
          int e;
          a = 4'(i); b = 4'(j); sub = s[0];
          #1;
          e = (s != 0) ? (i - j) & 15 : (i + j) & 15;
          checks += 2;
          if (int'(y) != e) begin failures++; $display("FAIL %0d %s %0d = %0d", i, s ? "-" : "+", j, y); end
          if (sign != e[3]) begin failures++; $display("FAIL sign %0d %0d", i, j); end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    #100000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
