// tb_vedic_4x4: exhaustive self-check of the 4x4 Vedic multiplier: all 256 operand pairs,
// the 8-bit product compared with the integer product. Includes 1111 x 1111 = 225, the
// worked example of the vertically-and-crosswise method. Watchdog: 10000 clock periods.
module tb_vedic_4x4;
  logic [3:0] a, b;
  logic [7:0] p;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  vedic_4x4 dut (.a(a), .b(b), .p(p));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 256; i++) begin
      {a, b} = 8'(i);
      #1;
      checks++;
      if (p != 8'(int'(a) * int'(b))) begin
        failures++;
        $display("FAIL %0d * %0d gave %0d", a, b, p);
      end
    end
    a = 4'b1111; b = 4'b1111;
    #1;
    checks++;
    if (p != 8'd225) begin
      failures++;
      $display("FAIL 1111 x 1111 gave %0d", p);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
