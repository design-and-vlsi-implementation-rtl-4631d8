// ripple_carry_adder: WIDTH-bit adder built as a chain of full adders.
// Stage i adds x[i], y[i] and the carry of stage i-1; stage 0 takes cin and
// the carry of the top stage is cout. The carry ripples through all WIDTH
// stages, so the delay grows linearly with WIDTH. Purely combinational.
// The multiplier uses it at 4 bits; building it from full adders is this
// design's choice, as is the carry input, which the multiplier ties to 0.
// Interface: x, y (WIDTH bits), cin in; sum (WIDTH bits), cout out.
module ripple_carry_adder #(
  parameter int WIDTH = 4
) (
  input  logic [WIDTH-1:0] x,
  input  logic [WIDTH-1:0] y,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  logic [WIDTH:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < WIDTH; i++) begin : g_stage
    full_adder u_fa (
      .a   (x[i]),
      .b   (y[i]),
      .cin (c[i]),
      .s   (sum[i]),
      .cout(c[i+1])
    );
  end

  assign cout = c[WIDTH];
endmodule
