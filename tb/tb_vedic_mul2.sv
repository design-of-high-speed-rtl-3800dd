// tb_vedic_mul2 - exhaustive self-checking test of the 2x2 leaf multiplier.
// All 16 operand pairs are applied, one per clock, and the output is compared
// with the integer product. A watchdog ends the run if it stalls.
module tb_vedic_mul2;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] a, b;
  logic [3:0] q;
  int checks = 0, failures = 0;

  vedic_mul2 dut (.a(a), .b(b), .q(q));

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      for (int j = 0; j < 4; j++) begin
        a = 2'(i);
        b = 2'(j);
        @(posedge clk);
        checks++;
        if (q !== 4'(i * j)) begin
          failures++;
          $display("FAIL %0d*%0d: got %0d", i, j, q);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
