// tb_half_adder: exhaustive self-check of half_adder. All four input pairs are applied
// and {carry, sum} is compared with the arithmetic sum a + b. A watchdog ends the run
// with a failure if it has not finished after 1000 clock periods.
module tb_half_adder;
  logic a, b, sum, carry;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  half_adder dut (.a(a), .b(b), .sum(sum), .carry(carry));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      checks++;
      if ({carry, sum} != 2'(a + b)) begin
        failures++;
        $display("FAIL a=%0d b=%0d got carry=%0d sum=%0d", a, b, carry, sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
