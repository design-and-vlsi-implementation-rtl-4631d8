// tb_vedic_mul_4x4: end-to-end self-check of the 4x4 Vedic multiplier at its
// only size. All 256 operand pairs are applied, one per time step, and the
// 8-bit product is compared with the integer product a * b; ca3 must stay 0.
// It also counts, from the operands, how often each carry path of the adder
// tree is taken and fails if one never is:
//   - the crosswise half-adder carry inside the upper 2x2 multiplier,
//   - the carry out of the first ripple carry adder (ca1),
//   - the carry out of the second ripple carry adder (ca2),
//   - the merged carry entering the upper adder (half adder sum).
// A watchdog ends the run with a failure if it does not finish.
module tb_vedic_mul_4x4;
  logic [3:0] a, b;
  logic [7:0] s;
  logic       ca3;
  int checks = 0, failures = 0;
  int n_cross = 0, n_ca1 = 0, n_ca2 = 0, n_merge = 0;

  vedic_mul_4x4 dut (.a(a), .b(b), .s(s), .ca3(ca3));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if ({ca3, s} != 9'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL a=%0d b=%0d -> ca3=%0d s=%0d (expected %0d)", a, b, ca3, s, int'(a) * int'(b));
      end
      // carry events of the adder tree, worked out from the operands
      begin
        int q0, q1, q2, mid, low;
        q0  = int'(a[1:0]) * int'(b[1:0]);
        q1  = int'(a[1:0]) * int'(b[3:2]);
        q2  = int'(a[3:2]) * int'(b[1:0]);
        mid = q1 + q2;
        low = (mid % 16) + q0 / 4;
        if (a[3] & b[2] & a[2] & b[3]) n_cross++;
        if (mid >= 16) n_ca1++;
        if (low >= 16) n_ca2++;
        if ((mid >= 16) != (low >= 16)) n_merge++;
      end
    end
    $display("crosswise carries=%0d ca1=%0d ca2=%0d merged carries=%0d",
             n_cross, n_ca1, n_ca2, n_merge);
    if (n_cross == 0) begin failures++; $display("FAIL crosswise carry never taken"); end
    if (n_ca1 == 0)   begin failures++; $display("FAIL ca1 never set"); end
    if (n_ca2 == 0)   begin failures++; $display("FAIL ca2 never set"); end
    if (n_merge == 0) begin failures++; $display("FAIL merged carry never set"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
