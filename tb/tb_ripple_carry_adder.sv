// tb_ripple_carry_adder: exhaustive self-check of the 4-bit ripple carry
// adder. Every x, y and cin (512 cases) is compared with the integer sum
// x + y + cin. It also counts how often a carry ripples through all four
// stages (x + y = 15 with cin = 1), the longest path, and fails if that never
// happened. A watchdog ends the run with a failure.
module tb_ripple_carry_adder;
  localparam int W = 4;
  logic [W-1:0] x, y, sum;
  logic         cin, cout;
  int checks = 0, failures = 0, full_ripples = 0;

  ripple_carry_adder #(.WIDTH(W)) dut (
    .x(x), .y(y), .cin(cin), .sum(sum), .cout(cout)
  );

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << (2 * W + 1)); i++) begin
      {x, y, cin} = (2 * W + 1)'(i);
      #1;
      checks++;
      if ({cout, sum} != (W + 1)'(int'(x) + int'(y) + int'(cin))) begin
        failures++;
        $display("FAIL x=%0d y=%0d cin=%0d -> cout=%0d sum=%0d", x, y, cin, cout, sum);
      end
      if (int'(x) + int'(y) == (1 << W) - 1 && cin) full_ripples++;
    end
    if (full_ripples == 0) begin
      failures++;
      $display("FAIL full-length carry ripple never exercised");
    end
    $display("full-length carry ripples: %0d", full_ripples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
