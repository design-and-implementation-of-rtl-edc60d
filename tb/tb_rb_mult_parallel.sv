// tb_rb_mult_parallel: self-check of the bit-parallel RB multiplier at its default size
// (m = 162, Q = 8) and at m = 10, Q = 4, where Q does not divide n = 11. The reference is
// the cyclic convolution c_i = XOR_j a_j b_((i-j) mod n) computed bit by bit here.
// Also checked: 1 (only bit 0 set) is the unit, and multiplying by x^k rotates by k.
// Watchdog: 100000 clock periods.
module tb_rb_mult_parallel;
  int   checks = 0, failures = 0;
  int   done_count = 0;
  logic clk = 1'b0;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  generate
    for (genvar cfg = 0; cfg < 2; cfg++) begin : g_cfg
      localparam int unsigned M = (cfg == 0) ? 162 : 10;
      localparam int unsigned Q = (cfg == 0) ? 8 : 4;
      localparam int unsigned N = M + 1;

      logic [N-1:0] a = '0, b = '0, c;

      rb_mult_parallel #(.M(M), .Q(Q)) dut (.a(a), .b(b), .c(c));

      function automatic logic [N-1:0] ref_mul(input logic [N-1:0] x, input logic [N-1:0] y);
        logic [N-1:0] r = '0;
        for (int i = 0; i < int'(N); i++)
          for (int j = 0; j < int'(N); j++)
            r[i] ^= x[j] & y[(i - j + int'(N)) % int'(N)];
        return r;
      endfunction

      task automatic apply(input logic [N-1:0] x, input logic [N-1:0] y, input logic [N-1:0] exp);
        a = x; b = y;
        #1;
        checks++;
        if (c !== exp) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d a=%h b=%h got %h exp %h", N, x, y, c, exp);
        end
      endtask

      initial begin
        logic [N-1:0] x, y, one, xk;
        one = '0; one[0] = 1'b1;
        #2;
        for (int rep = 0; rep < 300; rep++) begin
          for (int i = 0; i < int'(N); i++) begin x[i] = 1'($urandom); y[i] = 1'($urandom); end
          apply(x, y, ref_mul(x, y));
        end
        for (int k = 0; k < int'(N); k += 3) begin
          for (int i = 0; i < int'(N); i++) x[i] = 1'($urandom);
          apply(x, one, x);                           // 1 is the unit element
          xk = '0; xk[k] = 1'b1;                      // multiplying by x^k rotates up by k
          y = '0;
          for (int i = 0; i < int'(N); i++) y[(i + k) % int'(N)] = x[i];
          apply(x, xk, y);
        end
        x = '1;
        apply(x, x, ref_mul(x, x));
        done_count++;
      end
    end
  endgenerate

  initial begin
    wait (done_count == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
