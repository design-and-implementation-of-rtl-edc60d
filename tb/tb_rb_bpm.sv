// tb_rb_bpm: self-check of the B permutation module (n = 163). After a load, each
// shift must give the next shifted form B_t (coefficient i = b_((i-t) mod n)); the
// reference rotates the loaded value by t here. Hold (no load, no shift), load priority
// and reset are checked too. Watchdog: 100000 clock cycles.
module tb_rb_bpm;
  localparam int unsigned N = 163;

  logic         clk = 1'b0, rst_n = 1'b0, load = 1'b0, shift = 1'b0;
  logic [N-1:0] b_in, b_out;
  int   checks = 0, failures = 0;

  rb_bpm dut (.clk(clk), .rst_n(rst_n), .load(load), .shift(shift), .b_in(b_in), .b_out(b_out));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [N-1:0] form(input logic [N-1:0] b, input int t);
    logic [N-1:0] r;
    for (int i = 0; i < N; i++) r[i] = b[((i - t) % int'(N) + int'(N)) % int'(N)];
    return r;
  endfunction

  task automatic expect_out(input logic [N-1:0] exp, input string what);
    checks++;
    if (b_out !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, b_out, exp);
    end
  endtask

  initial begin
    logic [N-1:0] b;
    for (int i = 0; i < N; i++) b_in[i] = 1'($urandom);
    repeat (2) @(posedge clk);
    #1 expect_out('0, "reset");
    rst_n = 1'b1;
    for (int rep = 0; rep < 5; rep++) begin
      for (int i = 0; i < N; i++) b[i] = 1'($urandom);
      @(negedge clk) begin b_in = b; load = 1'b1; shift = 1'b1; end   // load wins
      @(negedge clk) begin load = 1'b0; shift = 1'b0; end
      expect_out(b, "load");
      @(negedge clk) expect_out(b, "hold");
      for (int t = 1; t <= 2 * N + 3; t++) begin
        shift = 1'b1;
        @(negedge clk);
        expect_out(form(b, t), $sformatf("shift %0d", t));
      end
      shift = 1'b0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
