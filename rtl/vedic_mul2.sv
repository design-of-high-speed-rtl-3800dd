// vedic_mul2 - 2x2 bit multiplier, the leaf of the Vedic square hierarchy.
//
// Applies the "vertically and crosswise" rule to two 2-bit numbers:
//   vertical   (bit 0): q0 = a0*b0
//   crosswise  (bit 1): q1 = a1*b0 + a0*b1, its carry goes to bit 2
//   vertical   (bit 2): q2,q3 = a1*b1 + carry from bit 1
// Each one-bit addition is a half adder, so the block is four partial-product
// ANDs and two half adders, with no carry chain longer than two bits.
//
// Interface: a[1:0], b[1:0] in, q[3:0] = a*b out (unsigned).
// Timing: purely combinational, no clock or reset.
//
// The port and signal names (a, b, q, a0..b1, q0..q3) and the split into four
// partial products follow the published 2x2 block; the bit equations are the
// ones unsigned 2x2 multiplication requires.
module vedic_mul2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] q
);
  logic p00, p10, p01, p11;  // partial products a_i*b_j
  logic c1;                  // carry out of the crosswise column

  always_comb begin
    p00  = a[0] & b[0];
    p10  = a[1] & b[0];
    p01  = a[0] & b[1];
    p11  = a[1] & b[1];
    c1   = p10 & p01;
    q[0] = p00;
    q[1] = p10 ^ p01;
    q[2] = p11 ^ c1;
    q[3] = p11 & c1;
  end
endmodule
