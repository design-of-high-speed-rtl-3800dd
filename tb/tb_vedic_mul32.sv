// tb_vedic_mul32 - self-checking test of the 32x32 Vedic multiplier.
// Corner operands (0, 1, all ones, alternating bits, the 0x22.. pattern) and
// 20000 random operand pairs are applied, one per clock, and the
// output is compared with the integer product. The test also counts how
// often the middle sum (aH*bL + aL*bH + upper half of aL*bL) carries past
// bit 31, so that the carry path into the upper adder is exercised.
module tb_vedic_mul32;
  localparam int N = 32;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [N-1:0]   a, b;
  logic [2*N-1:0] q;
  int checks = 0, failures = 0, mid_carries = 0;

  vedic_mul32 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [N-1:0] ai, bi);
    logic [63:0] exp, mid;
    a = ai;
    b = bi;
    @(posedge clk);
    exp = 64'(ai) * 64'(bi);
    mid = 64'(ai[N-1:N/2]) * 64'(bi[N/2-1:0]) + 64'(ai[N/2-1:0]) * 64'(bi[N-1:N/2])
        + ((64'(ai[N/2-1:0]) * 64'(bi[N/2-1:0])) >> (N/2));
    if (mid >= (64'd1 << N)) mid_carries++;
    checks++;
    if (64'(q) !== exp) begin
      failures++;
      $display("FAIL %h*%h: got %h want %h", ai, bi, q, exp);
    end
  endtask

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, N'(1));
    check({(N/2){2'b10}}, {(N/2){2'b01}});
    check({(N/2){2'b10}}, {(N/2){2'b10}});
    check({(N/8){8'h22}}, {(N/8){8'h22}});
    for (int i = 0; i < 20000; i++) check(N'({$urandom, $urandom}), N'({$urandom, $urandom}));
    checks++;
    if (mid_carries == 0) begin
      failures++;
      $display("FAIL: no case carried out of the middle sum");
    end
    $display("middle-sum carries into upper half: %0d", mid_carries);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
