// tb_vedic_nxn: self-check of the generalised Vedic multiplier at its default width
// (N = 16) and at N = 32 and N = 2. Corner operands (0, 1, all ones, single bits) and
// random operands are applied and the product compared with the integer product
// computed in 64-bit arithmetic. N = 2 is checked exhaustively.
// Watchdog: 1,000,000 clock periods.
module tb_vedic_nxn;
  logic [15:0] a16, b16;
  logic [31:0] p16, a32, b32;
  logic [63:0] p32;
  logic [1:0]  a2, b2;
  logic [3:0]  p2;
  int   checks = 0, failures = 0;
  logic clk = 1'b0;

  vedic_nxn              dut16 (.a(a16), .b(b16), .p(p16));
  vedic_nxn #(.N(32))    dut32 (.a(a32), .b(b32), .p(p32));
  vedic_nxn #(.N(2))     dut2  (.a(a2),  .b(b2),  .p(p2));

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(input logic [15:0] x, input logic [15:0] y);
    a16 = x; b16 = y;
    #1;
    checks++;
    if (p16 != 32'(longint'(x) * longint'(y))) begin
      failures++;
      if (failures < 10) $display("FAIL N=16 %0d * %0d gave %0d", x, y, p16);
    end
  endtask

  task automatic check32(input logic [31:0] x, input logic [31:0] y);
    a32 = x; b32 = y;
    #1;
    checks++;
    if (p32 != 64'(x) * 64'(y)) begin
      failures++;
      if (failures < 10) $display("FAIL N=32 %0d * %0d gave %0d", x, y, p32);
    end
  endtask

  initial begin
    logic [15:0] corner16 [6] = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'h00ff, 16'hff00};
    a32 = '0; b32 = '0; a2 = '0; b2 = '0;
    foreach (corner16[i]) foreach (corner16[j]) check16(corner16[i], corner16[j]);
    for (int k = 0; k < 20000; k++) check16(16'($urandom), 16'($urandom));
    check32(32'hffff_ffff, 32'hffff_ffff);
    check32(32'h8000_0000, 32'h0000_0002);
    check32(32'h0000_0000, 32'h1234_5678);
    for (int k = 0; k < 20000; k++) check32($urandom, $urandom);
    for (int i = 0; i < 16; i++) begin
      {a2, b2} = 4'(i);
      #1;
      checks++;
      if (p2 != 4'(int'(a2) * int'(b2))) begin
        failures++;
        $display("FAIL N=2 %0d * %0d gave %0d", a2, b2, p2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
