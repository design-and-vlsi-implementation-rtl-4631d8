# 4x4 Vedic multiplier (Urdhva-Tiryagbhyam)

This is an unsigned 4-bit by 4-bit multiplier. It is built on the
Urdhva-Tiryagbhyam ("vertically and crosswise") rule of Vedic arithmetic. The
product is not formed as a row of shifted partial products added one after
another. The operands are instead split into digits, all digit products are
formed in parallel, and short adders combine the vertical and crosswise terms.
Here the digits are 2 bits wide. A 2x2 multiplier made of AND gates and two
half adders is the basic cell, and four of these cells make the 4x4 multiplier.

The whole design is combinational. It has no clock, no register and no reset.
The 8-bit product is valid one propagation delay after the operands change.

## The 2x2 cell (`vedic_mul_2x2`)

For `a = a1a0` and `b = b1b0`:

| product bit | how it is formed | rule |
|---|---|---|
| `s0` | `a0 & b0` | vertical, right column |
| `s1` | sum of half adder (`a0 & b1`, `a1 & b0`) | crosswise |
| `s2` | sum of half adder (`a1 & b1`, carry of `s1`) | vertical, left column |
| `s3` | carry of that half adder | |

The four AND gates are the partial-product generator. Its critical path is one
AND gate and two half adders.

## From 2x2 to 4x4 (`vedic_mul_4x4`)

Split the operands into `A = {ah, al}` and `B = {bh, bl}`, with 2-bit halves.
Then

    A*B = (ah*bh) << 4  +  (ah*bl + al*bh) << 2  +  al*bl

The four 2x2 cells produce `q3 = ah*bh`, `q2 = ah*bl`, `q1 = al*bh` and
`q0 = al*bl`, all at once. Three 4-bit ripple carry adders and one half adder
then combine them:

    RCA1:  {ca1, t}      = q2 + q1                    crosswise terms, weight 2^2
    RCA2:  {ca2, u}      = t + {00, q0[3:2]}          add the upper half of q0
    HA:    {hc, hs}      = ca1 + ca2                  both carries weigh 2^6
    RCA3:  {ca3, s[7:4]} = q3 + {hc, hs, u[3:2]}      upper four product bits
    s[3:2] = u[1:0]
    s[1:0] = q0[1:0]

The carry handling is the least obvious part. RCA1 and RCA2 can each produce a
carry out, and both carries have weight 2^6. The half adder adds them, and the
result enters the third adder at bit 2 (sum) and bit 3 (carry). The two carries
can never both be 1. `ca1` needs `q1 + q2 >= 16`, which happens only for
`A = B = 15`, and then RCA2 produces no carry. So `hc` is always 0. Likewise
`ca3` is always 0, because `15 * 15 = 225` fits in 8 bits. `ca3` is still a
port because the block diagram this design follows brings it out. All carry
inputs of the three adders are tied to 0.

The longest path runs through a 2x2 cell, RCA1, RCA2, the half adder and RCA3.

## Adders

* `half_adder`: `sum = a ^ b`, `carry = a & b`.
* `full_adder`: `s = a ^ b ^ cin`, `cout = ab + b.cin + a.cin`.
* `ripple_carry_adder #(WIDTH = 4)`: `WIDTH` full adders in a carry chain,
  with a carry input and a carry output.

In the reference transistor-level 45 nm implementation, a half adder settles in
about 25 ps and a full adder in about 45 ps. The RTL does not model these
delays.

## Where this RTL follows its source and where it chooses

These parts follow the published architecture:
* the 2x2 cell;
* the use of four 2x2 cells;
* the three 4-bit ripple carry adders, their operand split, their 0 inputs, and
  the names `ca1`, `ca2` and `ca3`;
* the half-adder and full-adder equations.

These are choices of this implementation:
* **Carry merge.** The source names a half adder that "handles the carry" but
  does not show where it connects. Here it adds `ca1` and `ca2`, and its outputs
  go into bits 3:2 of the third adder's second operand. This is the placement
  that gives the correct product.
* **Ripple carry adder.** It is built from full adders. The source names the
  adder but does not show what is inside it.
* **Operand format.** Operands are unsigned, and the datapath is purely
  combinational.

Not included:
* **Accumulate stage.** The source mentions an adder that "adds the product to
  the previous state". It never describes this stage, so it is left out.
* **Process-specific implementation.** The full-custom 45 nm transistor design
  (gate sizing, pass-transistor cells) is not part of this RTL.

## Files and simulation

| file | content |
|---|---|
| `rtl/half_adder.sv` | half adder |
| `rtl/full_adder.sv` | full adder |
| `rtl/ripple_carry_adder.sv` | WIDTH-bit ripple carry adder |
| `rtl/vedic_mul_2x2.sv` | 2x2 Vedic cell |
| `rtl/vedic_mul_4x4.sv` | top: 4x4 Vedic multiplier |
| `tb/tb_<module>.sv` | self-checking testbench for each module |

Each testbench applies every input combination and compares the result with
integer arithmetic. `tb_vedic_mul_4x4` covers all 256 operand pairs. It also
counts how often each carry path occurs: the crosswise carry in a 2x2 cell,
`ca1`, `ca2`, and the merged carry. It fails if any of them never occurs. Each
testbench prints `TB_RESULT checks=N failures=M` and has a watchdog.

To simulate the top, for example:

    verilator --binary --timing --top-module tb_vedic_mul_4x4 -y rtl +libext+.sv \
        tb/tb_vedic_mul_4x4.sv && ./obj_dir/Vtb_vedic_mul_4x4

To widen the ripple carry adder, set its `WIDTH` parameter. The multiplier
itself is fixed at 4x4. A larger multiplier would repeat the same split one
level up: four 4x4 multipliers and wider adders would make an 8x8 multiplier.
That larger multiplier is not included here.
