// tb_rb_mult_ds: self-check of the digit-serial RB multiplier at its default size
// (m = 162, Q = 8, P = 21) and at m = 10, Q = 4 (n = 11, A padded to 12 bits).
// Each run starts a multiplication with random operands, counts the clock edges until
// done and compares c with the cyclic convolution c_i = XOR_j a_j b_((i-j) mod n)
// computed here. Checked: the product; the latency, done on the (P + Q)-th edge after
// the start edge; busy for the whole run; done high for one clock; a start while busy is
// ignored; c holds after done; the unit element and back-to-back starts.
// Watchdog: 200000 clock cycles.
module tb_rb_mult_ds;
  logic clk = 1'b0, rst_n = 1'b0;
  int   checks = 0, failures = 0;
  int   done_count = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
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
      localparam int unsigned P = (N + Q - 1) / Q;

      logic         start = 1'b0, busy, done;
      logic [N-1:0] a = '0, b = '0, c;

      rb_mult_ds #(.M(M), .Q(Q)) dut (
        .clk(clk), .rst_n(rst_n), .start(start), .a(a), .b(b),
        .busy(busy), .done(done), .c(c)
      );

      function automatic logic [N-1:0] ref_mul(input logic [N-1:0] x, input logic [N-1:0] y);
        logic [N-1:0] r = '0;
        for (int i = 0; i < int'(N); i++)
          for (int j = 0; j < int'(N); j++)
            r[i] ^= x[j] & y[(i - j + N) % N];
        return r;
      endfunction

      task automatic check(input bit ok, input string what);
        checks++;
        if (!ok) begin
          failures++;
          if (failures < 20) $display("FAIL n=%0d %s", N, what);
        end
      endtask

      // Start one multiplication (start is seen on the next rising edge) and wait for done.
      task automatic run(input logic [N-1:0] x, input logic [N-1:0] y, input bit poke);
        int edges = 0;
        logic [N-1:0] exp = ref_mul(x, y);
        @(negedge clk) begin a = x; b = y; start = 1'b1; end
        @(negedge clk) begin start = 1'b0; end
        edges = 0;                                // edges counted after the start edge
        if (poke) begin                           // a start while busy must be ignored
          a = ~x; b = ~y; start = 1'b1;
        end
        while (!done && edges < int'(P + Q) + 10) begin
          check(busy === 1'b1, "busy low during run");
          @(negedge clk);
          start = 1'b0;
          edges++;
        end
        check(done === 1'b1, "no done");
        check(edges == int'(P + Q), $sformatf("latency %0d, expected %0d", edges, P + Q));
        check(c === exp, $sformatf("product %h expected %h", c, exp));
        @(negedge clk);
        check(done === 1'b0, "done longer than one clock");
        check(c === exp, "product not held after done");
      endtask

      initial begin
        logic [N-1:0] x, y, one;
        wait (rst_n);
        one = '0; one[0] = 1'b1;
        for (int rep = 0; rep < 40; rep++) begin
          for (int i = 0; i < int'(N); i++) begin x[i] = 1'($urandom); y[i] = 1'($urandom); end
          run(x, y, rep % 4 == 1);
        end
        for (int i = 0; i < int'(N); i++) x[i] = 1'($urandom);
        run(x, one, 1'b0);
        run(one, x, 1'b0);
        run('1, '1, 1'b0);
        done_count++;
      end
    end
  endgenerate

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (done_count == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
