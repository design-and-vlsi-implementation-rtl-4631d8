// full_adder: adds two bits and a carry input.
// S is the exclusive OR of all three inputs; Cout is high when at least two
// inputs are high, written as the sum of products AB + B.Cin + A.Cin.
// Purely combinational.
// Interface: a, b, cin in; s, cout out.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic s,
  output logic cout
);
  assign s    = a ^ b ^ cin;
  assign cout = (a & b) | (b & cin) | (a & cin);
endmodule
