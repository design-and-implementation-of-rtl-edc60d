// vedic_2x2: 2x2-bit unsigned multiplier in the Urdhva-Tiryagbhyam ("vertically and
// crosswise") form, the leaf of every larger Vedic multiplier in this library.
//   vertical:   s0 = a0 b0
//   crosswise:  a0 b1 + a1 b0 in a half adder -> s1 and carry c1
//   vertical:   a1 b1 + c1 in a second half adder -> s2 and c2 (= s3)
// Four two-input AND gates form the bit products and two half adders add them, as in
// the design description. Purely combinational; the critical path is one AND and two
// half adders.
module vedic_2x2 (
  input  logic [1:0] a,
  input  logic [1:0] b,
  output logic [3:0] p
);
  logic a0b0, a0b1, a1b0, a1b1;  // the four bit products
  logic s1, c1, s2, c2;

  always_comb begin
    a0b0 = a[0] & b[0];
    a0b1 = a[0] & b[1];
    a1b0 = a[1] & b[0];
    a1b1 = a[1] & b[1];
  end

  half_adder u_ha_cross (.a(a0b1), .b(a1b0), .sum(s1), .carry(c1));
  half_adder u_ha_vert  (.a(a1b1), .b(c1),   .sum(s2), .carry(c2));

  assign p = {c2, s2, s1, a0b0};
endmodule
