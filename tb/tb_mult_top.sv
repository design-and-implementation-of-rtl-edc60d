// tb_mult_top: end-to-end self-check of mult_top with every parameter at its default
// (N = 16, m = 162, Q = 8). All parts are driven at once:
//  - the four 4x4 lanes, exhaustively (each lane gets every operand pair, lanes skewed),
//  - the 8x8 multiplier, exhaustively,
//  - the 16x16 multiplier, with random and corner operands,
//  - the digit-serial RB multiplier, a series of multiplications through its start /
//    busy / done handshake, each product compared with the bit-parallel multiplier's
//    output and with a cyclic-convolution reference computed here, its latency with
//    P + Q = 29 clock edges.
// Events counted, each of which must happen at least once: the two carries of the
// crosswise adders in the 8x8 block (ca1 from adder 1, ca2 from adder 2), a start while
// the RB multiplier is busy (must be ignored) and a completed RB multiplication.
// Watchdog: 1,000,000 clock cycles.
module tb_mult_top;
  localparam int unsigned N  = 16;
  localparam int unsigned NB = 163;
  localparam int unsigned P  = 21;
  localparam int unsigned Q  = 8;

  logic            clk = 1'b0, rst_n = 1'b0;
  logic [3:0]      a0, a1, a2, a3, b0, b1, b2, b3;
  logic [7:0]      c0, c1, c2, c3;
  logic [7:0]      m8_a, m8_b;
  logic [15:0]     m8_p;
  logic [N-1:0]    mn_a, mn_b;
  logic [2*N-1:0]  mn_p;
  logic            rb_start = 1'b0, rb_busy, rb_done;
  logic [NB-1:0]   rb_a = '0, rb_b = '0, rb_c, rb_c_par;

  int checks = 0, failures = 0;
  int n_ca1 = 0, n_ca2 = 0, n_ignored = 0, n_rb_ops = 0;
  bit vedic_done = 1'b0, rb_all_done = 1'b0;

  mult_top dut (
    .clk(clk), .rst_n(rst_n),
    .a0(a0), .a1(a1), .a2(a2), .a3(a3), .b0(b0), .b1(b1), .b2(b2), .b3(b3),
    .c0(c0), .c1(c1), .c2(c2), .c3(c3),
    .m8_a(m8_a), .m8_b(m8_b), .m8_p(m8_p),
    .mn_a(mn_a), .mn_b(mn_b), .mn_p(mn_p),
    .rb_start(rb_start), .rb_a(rb_a), .rb_b(rb_b),
    .rb_busy(rb_busy), .rb_done(rb_done), .rb_c(rb_c), .rb_c_par(rb_c_par)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (1000000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [NB-1:0] ref_mul(input logic [NB-1:0] x, input logic [NB-1:0] y);
    logic [NB-1:0] r = '0;
    for (int i = 0; i < int'(NB); i++)
      for (int j = 0; j < int'(NB); j++)
        r[i] ^= x[j] & y[(i - j + int'(NB)) % int'(NB)];
    return r;
  endfunction

  // Vedic part: combinational, checked between clock edges.
  initial begin
    logic [15:0] corner [5] = '{16'h0000, 16'h0001, 16'hffff, 16'h8000, 16'h00ff};
    for (int i = 0; i < 65536; i++) begin
      {m8_a, m8_b} = 16'(i);
      {a0, b0} = 8'(i);
      {a1, b1} = 8'(i + 85);
      {a2, b2} = 8'(i + 170);
      {a3, b3} = 8'(255 - i);
      mn_a = 16'($urandom);
      mn_b = 16'($urandom);
      if (i < 25) begin mn_a = corner[i % 5]; mn_b = corner[i / 5]; end
      #1;
      if (dut.u_m8.ca1) n_ca1++;
      if (dut.u_m8.ca2) n_ca2++;
      check(m8_p == 16'(int'(m8_a) * int'(m8_b)), $sformatf("8x8 %0d*%0d=%0d", m8_a, m8_b, m8_p));
      check(mn_p == 32'(longint'(mn_a) * longint'(mn_b)), $sformatf("16x16 %0d*%0d=%0d", mn_a, mn_b, mn_p));
      if (i < 256) begin
        check(c0 == 8'(int'(a0) * int'(b0)), "lane 0");
        check(c1 == 8'(int'(a1) * int'(b1)), "lane 1");
        check(c2 == 8'(int'(a2) * int'(b2)), "lane 2");
        check(c3 == 8'(int'(a3) * int'(b3)), "lane 3");
      end
    end
    vedic_done = 1'b1;
  end

  // RB part: clocked handshake.
  initial begin
    logic [NB-1:0] x, y, exp;
    int edges;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int rep = 0; rep < 30; rep++) begin
      for (int i = 0; i < int'(NB); i++) begin x[i] = 1'($urandom); y[i] = 1'($urandom); end
      exp = ref_mul(x, y);
      @(negedge clk) begin rb_a = x; rb_b = y; rb_start = 1'b1; end
      @(negedge clk) rb_start = 1'b0;
      edges = 0;
      if (rep % 3 == 0) begin         // a start request while busy: must be ignored
        rb_start = 1'b1;
        n_ignored++;
      end
      while (!rb_done && edges < int'(P + Q) + 10) begin
        check(rb_busy === 1'b1, "RB busy low during run");
        check(rb_c_par === exp, "RB bit-parallel product");
        @(negedge clk);
        rb_start = 1'b0;
        edges++;
      end
      check(rb_done === 1'b1, "RB no done");
      check(edges == int'(P + Q), $sformatf("RB latency %0d expected %0d", edges, P + Q));
      check(rb_c === exp, "RB digit-serial product");
      check(rb_c === rb_c_par, "RB digit-serial and bit-parallel differ");
      if (rb_done) n_rb_ops++;
      @(negedge clk);
      check(rb_done === 1'b0 && rb_busy === 1'b0, "RB did not return to idle");
    end
    rb_all_done = 1'b1;
  end

  initial begin
    wait (vedic_done && rb_all_done);
    $display("events: ca1=%0d ca2=%0d ignored_starts=%0d rb_products=%0d", n_ca1, n_ca2, n_ignored, n_rb_ops);
    check(n_ca1 > 0, "carry ca1 never happened");
    check(n_ca2 > 0, "carry ca2 never happened");
    check(n_ignored > 0, "no start while busy");
    check(n_rb_ops > 0, "no RB product");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
