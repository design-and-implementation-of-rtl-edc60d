// vedic_4x4: 4x4-bit unsigned multiplier built from four 2x2 Vedic multipliers and three
// 4-bit ripple-carry adders.
// With A = {AH, AL} and B = {BH, BL} split into 2-bit halves:
//   q0 = AL*BL (vertical, right)   q1 = AL*BH, q2 = AH*BL (crosswise)   q3 = AH*BH (vertical, left)
//   adder 1: q1 + q2                        -> sum1, carry ca1
//   adder 2: sum1 + {00, q0[3:2]}           -> sum2, carry ca2
//   adder 3: q3 + {0, ca1|ca2, sum2[3:2]}   -> p[7:4], carry ca3
//   p[1:0] = q0[1:0], p[3:2] = sum2[1:0]
// The block split, the adder count and the bit fields routed between them follow the
// design description. How ca1 and ca2 enter adder 3 is this design's choice: both carry
// weight 2^6, and they are never 1 together (if q1 + q2 overflows, sum1 <= 2 and adder 2
// cannot carry), so an OR adds them exactly. ca3 is always 0 for a 4x4 product; an
// assertion checks that. Purely combinational.
module vedic_4x4 (
  input  logic [3:0] a,
  input  logic [3:0] b,
  output logic [7:0] p
);
  logic [3:0] q0, q1, q2, q3;
  logic [3:0] sum1, sum2, sum3;
  logic       ca1, ca2, ca3;

  vedic_2x2 u_m0 (.a(a[1:0]), .b(b[1:0]), .p(q0));
  vedic_2x2 u_m1 (.a(a[1:0]), .b(b[3:2]), .p(q1));
  vedic_2x2 u_m2 (.a(a[3:2]), .b(b[1:0]), .p(q2));
  vedic_2x2 u_m3 (.a(a[3:2]), .b(b[3:2]), .p(q3));

  rc_adder #(.W(4)) u_add1 (.a(q1), .b(q2),                         .cin(1'b0), .s(sum1), .cout(ca1));
  rc_adder #(.W(4)) u_add2 (.a(sum1), .b({2'b00, q0[3:2]}),         .cin(1'b0), .s(sum2), .cout(ca2));
  rc_adder #(.W(4)) u_add3 (.a(q3), .b({1'b0, ca1 | ca2, sum2[3:2]}), .cin(1'b0), .s(sum3), .cout(ca3));

  assign p = {sum3, sum2[1:0], q0[1:0]};

  always_comb begin
    assert (ca3 == 1'b0) else $error("vedic_4x4: final adder carried out");
  end
endmodule
