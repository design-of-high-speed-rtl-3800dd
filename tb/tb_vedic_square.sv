// tb_vedic_square - end-to-end test of the Vedic squarer at its default
// 32-bit width.
//
// Applies one operand pair per clock and compares c with the integer product:
//   - the published 32-bit example, 0x22222222 squared = 0x048d159e1d950c84,
//     checked against that printed value;
//   - corner squares (0, 1, all ones, alternating bits);
//   - 20000 random squares (b = a) and 5000 random general products (b != a).
// It counts how often each mechanism of the hierarchy was exercised: a square,
// a general product, a carry out of the 32-bit level's middle sum into its
// upper adder, and a carry out of that upper adder's 32-bit field (which must
// never happen), and counts a failure for a mechanism that never occurred.
module tb_vedic_square;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [31:0] a, b;
  logic [63:0] c;
  int checks = 0, failures = 0;
  int n_square = 0, n_product = 0, n_mid_carry = 0;

  vedic_square dut (.a(a), .b(b), .c(c));

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [31:0] ai, bi);
    logic [63:0] exp;
    logic [33:0] mid;
    a = ai;
    b = bi;
    @(posedge clk);
    exp = 64'(ai) * 64'(bi);
    mid = 34'(ai[31:16]) * 34'(bi[15:0]) + 34'(ai[15:0]) * 34'(bi[31:16])
        + 34'((32'(ai[15:0]) * 32'(bi[15:0])) >> 16);
    if (mid[33:32] != 2'b00) n_mid_carry++;
    if (ai == bi) n_square++; else n_product++;
    checks++;
    if (c !== exp) begin
      failures++;
      $display("FAIL %h*%h: got %h want %h", ai, bi, c, exp);
    end
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("%s: %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL: %s never happened", what);
    end
  endtask

  initial begin
    logic [31:0] r;
    a = 32'h2222_2222;
    b = 32'h2222_2222;
    @(posedge clk);
    checks++;
    if (c !== 64'h048d_159e_1d95_0c84) begin
      failures++;
      $display("FAIL published example: got %h", c);
    end
    apply('0, '0);
    apply(32'd1, 32'd1);
    apply('1, '1);
    apply(32'hAAAA_AAAA, 32'hAAAA_AAAA);
    apply(32'h5555_5555, 32'h5555_5555);
    apply(32'hFFFF_0000, 32'hFFFF_0000);
    apply(32'h0000_FFFF, 32'h0000_FFFF);
    for (int i = 0; i < 20000; i++) begin
      r = $urandom;
      apply(r, r);
    end
    for (int i = 0; i < 5000; i++) apply($urandom, $urandom);
    need("squares", n_square);
    need("general products", n_product);
    need("carries from middle sum into upper adder", n_mid_carry);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
