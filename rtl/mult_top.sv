// mult_top: the multiplier library as one design, two independent parts side by side.
//
// Vedic (integer) part, purely combinational:
//  - four 4x4 Vedic multipliers, c<k> = a<k> * b<k> for k = 0..3 (the 4-bit a0..a3,
//    b0..b3 and 8-bit c0..c3 ports of the top-level schematic of the design description);
//  - one 8x8 Vedic multiplier, m8_p = m8_a * m8_b;
//  - one generalised N x N Vedic multiplier, mn_p = mn_a * mn_b (default N = 16).
// All operands and products are unsigned.
//
// Redundant-basis GF(2^m) part, n = m + 1 bits per element:
//  - rb_mult_ds, the digit-serial multiplier (Q digits of P = ceil(n/Q) bits), with a
//    start / busy / done handshake; rb_c is valid while rb_done is high and stays until
//    the next start;
//  - rb_mult_parallel, the bit-parallel multiplier of the same field, which multiplies
//    the same rb_a and rb_b combinationally into rb_c_par.
// With rb_a and rb_b held from start to done, rb_c equals rb_c_par when rb_done is high.
// clk and rst_n (asynchronous, active low) serve only the digit-serial multiplier.
// Which blocks sit in the top, and that the schematic's four lanes are independent 4x4
// multipliers, is this design's reading; the blocks themselves follow the description.
module mult_top #(
  parameter int unsigned N = 16,   // generalised Vedic multiplier width (power of two)
  parameter int unsigned M = 162,  // GF(2^m) degree of the RB multipliers; n = M + 1
  parameter int unsigned Q = 8     // digits per RB multiplication
) (
  input  logic             clk,
  input  logic             rst_n,
  // four 4x4 Vedic lanes
  input  logic [3:0]       a0, a1, a2, a3,
  input  logic [3:0]       b0, b1, b2, b3,
  output logic [7:0]       c0, c1, c2, c3,
  // 8x8 Vedic multiplier
  input  logic [7:0]       m8_a, m8_b,
  output logic [15:0]      m8_p,
  // N x N Vedic multiplier
  input  logic [N-1:0]     mn_a, mn_b,
  output logic [2*N-1:0]   mn_p,
  // RB multipliers over GF(2^M)
  input  logic             rb_start,
  input  logic [M:0]       rb_a, rb_b,
  output logic             rb_busy,
  output logic             rb_done,
  output logic [M:0]       rb_c,
  output logic [M:0]       rb_c_par
);
  vedic_4x4 u_lane0 (.a(a0), .b(b0), .p(c0));
  vedic_4x4 u_lane1 (.a(a1), .b(b1), .p(c1));
  vedic_4x4 u_lane2 (.a(a2), .b(b2), .p(c2));
  vedic_4x4 u_lane3 (.a(a3), .b(b3), .p(c3));

  vedic_8x8 u_m8 (.a(m8_a), .b(m8_b), .p(m8_p));

  vedic_nxn #(.N(N)) u_mn (.a(mn_a), .b(mn_b), .p(mn_p));

  rb_mult_ds #(.M(M), .Q(Q)) u_rb_ds (
    .clk   (clk),
    .rst_n (rst_n),
    .start (rb_start),
    .a     (rb_a),
    .b     (rb_b),
    .busy  (rb_busy),
    .done  (rb_done),
    .c     (rb_c)
  );

  rb_mult_parallel #(.M(M), .Q(Q)) u_rb_par (.a(rb_a), .b(rb_b), .c(rb_c_par));
endmodule
