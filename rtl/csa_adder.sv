// csa_adder - three-operand adder built from a carry-save row.
//
// The three W-bit operands are first reduced to a sum vector and a carry
// vector by W independent full adders (a 3:2 carry-save row: no carry moves
// between bit positions). A single carry-propagate addition of the sum vector
// and the carry vector shifted left by one then gives the result. Three
// operands thus cost one full-adder delay plus one adder, instead of two
// adders in series.
//
// Interface: x, y, z [W-1:0] in; s [W+1:0] = x + y + z out (unsigned, never
// overflows: three W-bit numbers fit in W+2 bits).
// Timing: purely combinational.
//
// The use of carry-save adders to add the partial products follows the
// published design; the row-plus-final-adder structure and the W+2 bit result
// are this design's choice.
module csa_adder #(
  parameter int unsigned W = 32
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic [W-1:0] z,
  output logic [W+1:0] s
);
  logic [W-1:0] sum_v;  // bitwise sum of the carry-save row
  logic [W-1:0] cry_v;  // bitwise carry of the carry-save row (weight 2)

  always_comb begin
    sum_v = x ^ y ^ z;
    cry_v = (x & y) | (x & z) | (y & z);
    s     = {2'b00, sum_v} + {1'b0, cry_v, 1'b0};
  end
endmodule
