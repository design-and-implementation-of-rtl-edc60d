// tb_rc_adder: self-check of the ripple-carry adder at the two widths the multipliers
// use. W = 4 is checked exhaustively (all a, b and carry-in); W = 8 is checked
// exhaustively too (131072 cases). {cout, s} is compared with a + b + cin.
// Watchdog: 1,000,000 clock periods.
module tb_rc_adder;
  logic [3:0] a4, b4, s4;
  logic [7:0] a8, b8, s8;
  logic       ci4, co4, ci8, co8;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  rc_adder #(.W(4)) dut4 (.a(a4), .b(b4), .cin(ci4), .s(s4), .cout(co4));
  rc_adder #(.W(8)) dut8 (.a(a8), .b(b8), .cin(ci8), .s(s8), .cout(co8));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a8 = '0; b8 = '0; ci8 = 1'b0;
    for (int i = 0; i < 512; i++) begin
      {ci4, a4, b4} = 9'(i);
      #1;
      checks++;
      if ({co4, s4} != 5'(int'(a4) + int'(b4) + int'(ci4))) begin
        failures++;
        $display("FAIL W=4 %0d + %0d + %0d gave %0d", a4, b4, ci4, {co4, s4});
      end
    end
    for (int i = 0; i < 131072; i++) begin
      {ci8, a8, b8} = 17'(i);
      #1;
      checks++;
      if ({co8, s8} != 9'(int'(a8) + int'(b8) + int'(ci8))) begin
        failures++;
        if (failures < 10) $display("FAIL W=8 %0d + %0d + %0d gave %0d", a8, b8, ci8, {co8, s8});
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
