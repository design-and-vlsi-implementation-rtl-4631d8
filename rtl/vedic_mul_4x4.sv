// vedic_mul_4x4: 4x4-bit unsigned multiplier built from four 2x2 Vedic
// multipliers, three 4-bit ripple carry adders and one half adder.
//
// With A = {ah, al} and B = {bh, bl} split into 2-bit halves,
//   A*B = (ah*bh)<<4 + (ah*bl + al*bh)<<2 + al*bl.
// The four 2x2 multipliers compute q3 = ah*bh, q2 = ah*bl, q1 = al*bh and
// q0 = al*bl in parallel. Then:
//   RCA1: {ca1, t} = q2 + q1                       middle (crosswise) terms
//   RCA2: {ca2, u} = t + {2'b00, q0[3:2]}          add the upper half of q0
//   s[1:0] = q0[1:0],  s[3:2] = u[1:0]
//   HA  : {hc, hs} = ca1 + ca2                     both carries weigh 2^6
//   RCA3: {ca3, s[7:4]} = q3 + {hc, hs, u[3:2]}    upper product bits
// The adder structure, the 0 inputs and the signal names ca1, ca2, ca3 follow
// the block diagram of the design. Merging the two intermediate carries with
// one half adder into the second operand of RCA3 is how this implementation
// places them; the arithmetic above shows both carry weight 2^6. ca3 is kept
// as an output because the diagram brings it out; since 15*15 = 225 < 256 it
// is always 0, and likewise hc is always 0 (ca1 and ca2 are never both set).
// All carry inputs of the ripple carry adders are tied to 0.
// Purely combinational, no clock: the result is valid one propagation delay
// after a and b change.
// Interface: a (a3..a0), b (b3..b0) in; s (s7..s0), ca3 out.
module vedic_mul_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] s,
  output logic       ca3
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] t, u;
  logic       ca1, ca2;
  logic       hs, hc;

  vedic_mul_2x2 u_vm_ll (.a(a[1:0]), .b(b[1:0]), .s(q0));
  vedic_mul_2x2 u_vm_lh (.a(a[1:0]), .b(b[3:2]), .s(q1));
  vedic_mul_2x2 u_vm_hl (.a(a[3:2]), .b(b[1:0]), .s(q2));
  vedic_mul_2x2 u_vm_hh (.a(a[3:2]), .b(b[3:2]), .s(q3));

  ripple_carry_adder #(.WIDTH(4)) u_rca1 (
    .x   (q2),
    .y   (q1),
    .cin (1'b0),
    .sum (t),
    .cout(ca1)
  );

  ripple_carry_adder #(.WIDTH(4)) u_rca2 (
    .x   (t),
    .y   ({2'b00, q0[3:2]}),
    .cin (1'b0),
    .sum (u),
    .cout(ca2)
  );

  half_adder u_ha_carry (
    .a    (ca1),
    .b    (ca2),
    .sum  (hs),
    .carry(hc)
  );

  ripple_carry_adder #(.WIDTH(4)) u_rca3 (
    .x   (q3),
    .y   ({hc, hs, u[3:2]}),
    .cin (1'b0),
    .sum (s[7:4]),
    .cout(ca3)
  );

  assign s[1:0] = q0[1:0];
  assign s[3:2] = u[1:0];
endmodule
