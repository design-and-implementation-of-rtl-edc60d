// tb_rb_ppgm: self-check of the partial-product generation module at its default size
// (n = 163, Q = 8, P = 21) and at n = 11, Q = 4, P = 3. The testbench plays the part of
// the B permutation module and the A register: at clock t it drives B rotated by t and
// digit t of A (zeros after the Q digits). At clock t the output must equal the digit
// product C_(t-P) = XOR_v a_(t-P+vQ) B_(t-P+vQ), computed here bit by bit; before the
// pipeline has filled and after it has drained it must be zero.
// Watchdog: 100000 clock cycles.
module tb_rb_ppgm;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // One instance plus its stimulus, for any size.
  int done_count = 0;

  generate
    for (genvar cfg = 0; cfg < 2; cfg++) begin : g_cfg
      localparam int unsigned N = (cfg == 0) ? 163 : 11;
      localparam int unsigned Q = (cfg == 0) ? 8 : 4;
      localparam int unsigned P = (N + Q - 1) / Q;

      logic         clr = 1'b0, en = 1'b0;
      logic [P-1:0] digit = '0;
      logic [N-1:0] b_cur = '0, pp_out;

      rb_ppgm #(.N(N), .Q(Q), .P(P)) dut (
        .clk(clk), .rst_n(rst_n), .clr(clr), .en(en),
        .digit_in(digit), .b_cur(b_cur), .pp_out(pp_out)
      );

      function automatic logic [N-1:0] form(input logic [N-1:0] b, input int t);
        logic [N-1:0] r;
        for (int i = 0; i < N; i++) r[i] = b[((i - t) % int'(N) + int'(N)) % int'(N)];
        return r;
      endfunction

      function automatic logic [N-1:0] digit_product(input logic [N-1:0] a, input logic [N-1:0] b, input int u);
        logic [N-1:0] r = '0;
        if (u < 0 || u >= int'(Q)) return r;
        for (int v = 0; v < int'(P); v++)
          if (u + v * int'(Q) < int'(N) && a[u + v * Q]) r ^= form(b, u + v * int'(Q));
        return r;
      endfunction

      initial begin
        logic [N-1:0] a, b, exp;
        wait (rst_n);
        for (int rep = 0; rep < 20; rep++) begin
          for (int i = 0; i < N; i++) begin a[i] = 1'($urandom); b[i] = 1'($urandom); end
          @(negedge clk) begin clr = 1'b1; en = 1'b0; end
          @(negedge clk) clr = 1'b0;
          for (int t = 0; t < int'(P + Q + 3); t++) begin
            // drive clock t
            en = 1'b1;
            b_cur = form(b, t);
            for (int v = 0; v < int'(P); v++)
              digit[v] = (t < int'(Q) && t + v * int'(Q) < int'(N)) ? a[t + v * Q] : 1'b0;
            #1;
            exp = digit_product(a, b, t - int'(P));
            checks++;
            if (pp_out !== exp) begin
              failures++;
              if (failures < 10) $display("FAIL n=%0d t=%0d got %h exp %h", N, t, pp_out, exp);
            end
            @(negedge clk);
          end
          en = 1'b0;
        end
        done_count++;
      end
    end
  endgenerate

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (done_count == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
