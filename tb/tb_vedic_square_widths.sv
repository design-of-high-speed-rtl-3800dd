// tb_vedic_square_widths - runs the three published squarer sizes.
//
// Three instances of the squarer, 8, 16 and 32 bits wide, are driven with the
// published example inputs 0x22, 0x2222 and 0x22222222 (on both operands) and
// their outputs compared with the printed results 0x0484, 0x048d0c84 and
// 0x048d159e1d950c84. Then every 8-bit and every 16-bit number is squared and
// 20000 random 32-bit numbers, each compared with the integer square.
module tb_vedic_square_widths;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [7:0]  a8;
  logic [15:0] c8;
  logic [15:0] a16;
  logic [31:0] c16;
  logic [31:0] a32;
  logic [63:0] c32;
  int checks = 0, failures = 0;

  vedic_square #(.WIDTH(8))  dut8  (.a(a8),  .b(a8),  .c(c8));
  vedic_square #(.WIDTH(16)) dut16 (.a(a16), .b(a16), .c(c16));
  vedic_square #(.WIDTH(32)) dut32 (.a(a32), .b(a32), .c(c32));

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect64(input string what, input logic [63:0] got, want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: got %h want %h", what, got, want);
    end
  endtask

  initial begin
    a8 = 8'h22; a16 = 16'h2222; a32 = 32'h2222_2222;
    @(posedge clk);
    expect64("8-bit example", 64'(c8), 64'h0484);
    expect64("16-bit example", 64'(c16), 64'h048d_0c84);
    expect64("32-bit example", c32, 64'h048d_159e_1d95_0c84);
    for (int i = 0; i < 65536; i++) begin
      a16 = 16'(i);
      a8  = 8'(i);
      a32 = $urandom;
      @(posedge clk);
      if (i < 256) expect64("8-bit square", 64'(c8), 64'(i * i));
      expect64("16-bit square", 64'(c16), 64'(i) * 64'(i));
      if (i < 20000) expect64("32-bit square", c32, 64'(a32) * 64'(a32));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
