// vedic_8x8: 8x8-bit unsigned multiplier built from four 4x4 Vedic multipliers and three
// 8-bit ripple-carry adders; the same vertical-and-crosswise arrangement as the 4x4
// block, one level up.
// With A = {AH, AL} and B = {BH, BL} split into 4-bit halves:
//   q0 = AL*BL   q1 = AL*BH   q2 = AH*BL   q3 = AH*BH        (8-bit sub-products)
//   adder 1: q1 + q2                          -> sum1, ca1
//   adder 2: sum1 + {0000, q0[7:4]}           -> sum2, ca2
//   adder 3: q3 + {000, ca1|ca2, sum2[7:4]}   -> p[15:8], ca3
//   p[3:0] = q0[3:0], p[7:4] = sum2[3:0]
// Block split, adder widths and the bit fields between them follow the design
// description; merging the two mutually exclusive carries ca1 and ca2 with an OR is this
// design's choice (see vedic_4x4). ca3 is always 0 and is asserted so. Combinational.
module vedic_8x8 (
  input  logic [7:0]  a,
  input  logic [7:0]  b,
  output logic [15:0] p
);
  logic [7:0] q0, q1, q2, q3;
  logic [7:0] sum1, sum2, sum3;
  logic       ca1, ca2, ca3;

  vedic_4x4 u_m0 (.a(a[3:0]), .b(b[3:0]), .p(q0));
  vedic_4x4 u_m1 (.a(a[3:0]), .b(b[7:4]), .p(q1));
  vedic_4x4 u_m2 (.a(a[7:4]), .b(b[3:0]), .p(q2));
  vedic_4x4 u_m3 (.a(a[7:4]), .b(b[7:4]), .p(q3));

  rc_adder #(.W(8)) u_add1 (.a(q1),   .b(q2),                           .cin(1'b0), .s(sum1), .cout(ca1));
  rc_adder #(.W(8)) u_add2 (.a(sum1), .b({4'b0000, q0[7:4]}),           .cin(1'b0), .s(sum2), .cout(ca2));
  rc_adder #(.W(8)) u_add3 (.a(q3),   .b({3'b000, ca1 | ca2, sum2[7:4]}), .cin(1'b0), .s(sum3), .cout(ca3));

  assign p = {sum3, sum2[3:0], q0[3:0]};

  always_comb begin
    assert (ca3 == 1'b0) else $error("vedic_8x8: final adder carried out");
  end
endmodule
