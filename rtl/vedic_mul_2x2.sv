// vedic_mul_2x2: 2x2-bit unsigned multiplier after the Urdhva-Tiryagbhyam
// ("vertically and crosswise") rule.
// Four 2-input AND gates form the partial products a0b0, a1b0, a0b1, a1b1.
//   s0         = a0b0                       (vertical, right column)
//   {c1, s1}   = a0b1 + a1b0  (half adder)  (crosswise)
//   {s3, s2}   = a1b1 + c1    (half adder)  (vertical, left column)
// Purely combinational: the longest path is one AND gate and two half adders.
// Interface: a (a1a0), b (b1b0) in; s (s3..s0) out.
module vedic_mul_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] s
);
  logic p00, p01, p10, p11;
  logic c1;

  // partial products; pij = a[i] & b[j]
  assign p00 = a[0] & b[0];
  assign p10 = a[1] & b[0];
  assign p01 = a[0] & b[1];
  assign p11 = a[1] & b[1];

  assign s[0] = p00;

  half_adder u_ha_cross (
    .a    (p01),
    .b    (p10),
    .sum  (s[1]),
    .carry(c1)
  );

  half_adder u_ha_high (
    .a    (p11),
    .b    (c1),
    .sum  (s[2]),
    .carry(s[3])
  );
endmodule
