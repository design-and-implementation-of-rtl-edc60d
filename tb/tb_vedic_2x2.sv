// tb_vedic_2x2: exhaustive self-check of the 2x2 Vedic multiplier: all 16 operand pairs,
// product compared with the integer product a * b. Watchdog: 1000 clock periods.
module tb_vedic_2x2;
  logic [1:0] a, b;
  logic [3:0] p;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  vedic_2x2 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b} = 4'(i);
      #1;
      checks++;
      if (p != 4'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d gave %0d", a, b, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
