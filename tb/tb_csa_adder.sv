// tb_csa_adder - self-checking test of the three-operand carry-save adder.
// A 4-bit instance is tested exhaustively (4096 cases); a 32-bit instance
// (the default width) is tested with all-ones operands and random operands.
// Each result is compared with the plain sum x + y + z.
module tb_csa_adder;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [3:0]  x4, y4, z4;
  logic [5:0]  s4;
  logic [31:0] x, y, z;
  logic [33:0] s;
  int checks = 0, failures = 0;

  csa_adder #(.W(4)) dut4 (.x(x4), .y(y4), .z(z4), .s(s4));
  csa_adder          dut  (.x(x), .y(y), .z(z), .s(s));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] xi, yi, zi);
    logic [33:0] exp;
    x = xi; y = yi; z = zi;
    @(posedge clk);
    exp = 34'(xi) + 34'(yi) + 34'(zi);
    checks++;
    if (s !== exp) begin
      failures++;
      $display("FAIL W=32 %h+%h+%h: got %h want %h", xi, yi, zi, s, exp);
    end
  endtask

  initial begin
    x = '0; y = '0; z = '0;
    for (int i = 0; i < 4096; i++) begin
      {x4, y4, z4} = 12'(i);
      @(posedge clk);
      checks++;
      if (int'(s4) != int'(x4) + int'(y4) + int'(z4)) begin
        failures++;
        $display("FAIL W=4 %0d+%0d+%0d: got %0d", x4, y4, z4, s4);
      end
    end
    check32('1, '1, '1);
    check32('1, '1, '0);
    check32(32'h8000_0000, 32'h8000_0000, 32'h8000_0000);
    for (int i = 0; i < 2000; i++) check32($urandom, $urandom, $urandom);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
