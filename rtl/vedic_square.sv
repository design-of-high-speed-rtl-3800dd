// vedic_square - Vedic squarer, top of the design.
//
// Squares a WIDTH-bit unsigned number with the hierarchical Urdhva
// Tiryakbhyam ("vertically and crosswise") multiplier: 2x2 leaf blocks are
// combined four at a time, with carry-save adders, into 4x4, 8x8, 16x16 and
// 32x32 blocks. WIDTH selects which level is the top: 8, 16 or 32 (default).
//
// Interface: a, b [WIDTH-1:0] in; c [2*WIDTH-1:0] = a*b out. The squarer is
// used with b = a, which gives c = a^2; both operand ports are kept so that
// the unit can be driven exactly like the published 8-, 16- and 32-bit
// squares (inputs a and b, output c), and it then also serves as a general
// unsigned multiplier.
// Timing: purely combinational, no clock or reset. The result is valid one
// propagation delay after the operands change.
//
// The hierarchy, the three supported widths and the port names follow the
// published design. Keeping b as a separate port rather than tying it to a is
// this design's reading of the published simulation, which drives both.
module vedic_square #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0]   a,
  input  logic [WIDTH-1:0]   b,
  output logic [2*WIDTH-1:0] c
);
  generate
    if (WIDTH == 32) begin : g_w32
      vedic_mul32 u_mul (.a(a), .b(b), .q(c));
    end else if (WIDTH == 16) begin : g_w16
      vedic_mul16 u_mul (.a(a), .b(b), .q(c));
    end else if (WIDTH == 8) begin : g_w8
      vedic_mul8 u_mul (.a(a), .b(b), .q(c));
    end else begin : g_bad
      $error("vedic_square: WIDTH must be 8, 16 or 32");
    end
  endgenerate
endmodule
