// half_adder: one-bit half adder, the adding cell of the 2x2 Urdhva-Tiryagbhyam
// ("vertically and crosswise") multiplier.
//   sum   = a XOR b  (the bit of weight 1)
//   carry = a AND b  (the bit of weight 2)
// Purely combinational. Only the name of the cell comes from the design description;
// the two equations are the textbook definition of a half adder.
module half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);
  always_comb begin
    sum   = a ^ b;
    carry = a & b;
  end
endmodule
