// tb_vedic_mul_2x2: exhaustive self-check of the 2x2 Vedic multiplier.
// All 16 operand pairs are compared with the integer product a * b.
// A watchdog ends the run with a failure.
module tb_vedic_mul_2x2;
  logic [1:0] a, b;
  logic [3:0] s;
  int checks = 0, failures = 0;

  vedic_mul_2x2 dut (.a(a), .b(b), .s(s));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (s != 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> s=%0d", a, b, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
