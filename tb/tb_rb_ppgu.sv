// tb_rb_ppgu: self-check of one partial-product generation unit (n = 163). Random a_bit,
// b_form and pp_in are applied; one clock later pp_out must be pp_in ^ (b_form & a_bit).
// Hold when en is low, synchronous clear and reset are checked too.
// Watchdog: 100000 clock cycles.
module tb_rb_ppgu;
  localparam int unsigned N = 163;

  logic         clk = 1'b0, rst_n = 1'b0, clr = 1'b0, en = 1'b0, a_bit = 1'b0;
  logic [N-1:0] b_form = '0, pp_in = '0, pp_out, exp, last;
  int   checks = 0, failures = 0;

  rb_ppgu dut (.clk(clk), .rst_n(rst_n), .clr(clr), .en(en), .a_bit(a_bit),
               .b_form(b_form), .pp_in(pp_in), .pp_out(pp_out));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] rnd();
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = 1'($urandom);
    return r;
  endfunction

  task automatic expect_out(input logic [N-1:0] e, input string what);
    checks++;
    if (pp_out !== e) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, pp_out, e);
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    #1 expect_out('0, "reset");
    rst_n = 1'b1;
    for (int k = 0; k < 500; k++) begin
      @(negedge clk);
      a_bit = 1'($urandom); b_form = rnd(); pp_in = rnd(); en = 1'b1;
      exp = pp_in ^ (a_bit ? b_form : '0);
      @(negedge clk);
      expect_out(exp, "accumulate");
      last = pp_out;
      en = 1'b0; pp_in = rnd(); b_form = rnd(); a_bit = 1'b1;
      @(negedge clk);
      expect_out(last, "hold");
      if (k % 50 == 0) begin
        clr = 1'b1; en = 1'b1;
        @(negedge clk);
        expect_out('0, "clear");
        clr = 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
