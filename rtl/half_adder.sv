// half_adder: adds two bits with no carry input.
// SUM is the exclusive OR of the inputs and CARRY their AND, the two-gate
// structure the design uses for every half adder. Purely combinational; the
// outputs settle one gate delay after an input changes.
// Interface: a, b in; sum, carry out.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  assign sum   = a ^ b;
  assign carry = a & b;
endmodule
