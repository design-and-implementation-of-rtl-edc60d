// rb_ppgu: partial-product generation unit of the digit-serial RB multiplier. It ANDs
// one bit of operand A with an n-bit shifted form of B (the product of a GF(2) scalar and
// a field element) and XORs that into the partial sum handed down from the unit before:
//   pp_out <= pp_in ^ (b_form & {n{a_bit}})
// The result is registered (the R of each unit), so a chain of units forms a systolic
// pipeline with one register per stage. The first unit of a chain gets pp_in = 0.
// clr (synchronous) empties the register and has priority over en. rst_n is an
// asynchronous active-low reset; the reset style is this design's choice.
module rb_ppgu #(
  parameter int unsigned N = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic         a_bit,
  input  logic [N-1:0] b_form,
  input  logic [N-1:0] pp_in,
  output logic [N-1:0] pp_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)   pp_out <= '0;
    else if (clr) pp_out <= '0;
    else if (en)  pp_out <= pp_in ^ (b_form & {N{a_bit}});
  end
endmodule
