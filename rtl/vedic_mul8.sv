// vedic_mul8 - 8x8 bit unsigned multiplier, one level of the Vedic
// square hierarchy, built from four 4x4 blocks (vedic_mul4).
//
// The operands are split into halves, a = aH:aL and b = bH:bL, and
//   a*b = 2^8*(aH*bH) + 2^4*(aH*bL + aL*bH) + aL*bL.
// The four 4x4 products are formed in parallel. The low 4 bits of aL*bL
// are result bits 3:0 directly. A carry-save adder sums the two cross
// products and the upper half of aL*bL; its low 4 bits are result bits
// 7:4. A second carry-save adder adds the rest of that sum (its upper
// bits, carries included) to aH*bH, giving result bits 15:8.
//
// Interface: a, b [7:0] in; q [15:0] = a*b out.
// A deferred assertion checks that the upper sum never carries past bit
// 2N-1, which holds because an N x N product always fits in 2N bits.
// Timing: purely combinational.
//
// The four-block split, which product feeds which adder, and the three result
// fields follow the published 32x32 structure, applied in the same way at
// every level. Passing the carries of the middle sum (bits 9:8) on to the
// upper adder is required for a correct product and is made explicit here.
module vedic_mul8 (
  input  logic [7:0] a,
  input  logic [7:0] b,
  output logic [15:0] q
);
  localparam int unsigned N = 8;
  localparam int unsigned H = N / 2;

  logic [N-1:0] p_hh, p_hl, p_lh, p_ll;  // the four half-size products
  logic [N+1:0] mid;                     // aH*bL + aL*bH + (aL*bL >> H)
  logic [N+1:0] top;                     // aH*bH + (mid >> H); bits N+1:N stay 0
  logic [N-1:0] mid_hi;                  // upper part of mid, zero-extended

  vedic_mul4 u_hh (.a(a[N-1:H]), .b(b[N-1:H]), .q(p_hh));
  vedic_mul4 u_hl (.a(a[N-1:H]), .b(b[H-1:0]), .q(p_hl));
  vedic_mul4 u_lh (.a(a[H-1:0]), .b(b[N-1:H]), .q(p_lh));
  vedic_mul4 u_ll (.a(a[H-1:0]), .b(b[H-1:0]), .q(p_ll));

  csa_adder #(.W(N)) u_csa_mid (
    .x(p_hl),
    .y(p_lh),
    .z({{H{1'b0}}, p_ll[N-1:H]}),
    .s(mid)
  );

  assign mid_hi = N'(mid[N+1:H]);

  csa_adder #(.W(N)) u_csa_top (
    .x(p_hh),
    .y(mid_hi),
    .z('0),
    .s(top)
  );

  assign q = {top[N-1:0], mid[H-1:0], p_ll[H-1:0]};

  // The full product fits in 2N bits, so the upper sum never carries out.
  always_comb begin
    assert final (top[N+1:N] == 2'b00)
      else $error("vedic_mul%0d: upper sum overflowed", N);
  end
endmodule
