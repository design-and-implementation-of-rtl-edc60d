// tb_vedic_8x8: exhaustive self-check of the 8x8 Vedic multiplier: all 65536 operand
// pairs, the 16-bit product compared with the integer product. Watchdog: 1,000,000
// clock periods.
module tb_vedic_8x8;
  logic [7:0]  a, b;
  logic [15:0] p;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  vedic_8x8 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 65536; i++) begin
      {a, b} = 16'(i);
      #1;
      checks++;
      if (p != 16'(int'(a) * int'(b))) begin
        failures++;
        if (failures < 10) $display("FAIL %0d * %0d gave %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
