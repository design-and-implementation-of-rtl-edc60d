// rb_bpm: B permutation module of the digit-serial RB multiplier. It holds operand B and
// rotates it by one place per enabled clock, so that after t rotations it holds
//   B_t = b_(n-t) + b_(n-t+1) x + ... + b_(n-t-1) x^(n-1)   (coefficient i = b_((i-t) mod n)),
// the t-th shifted form of B of the design description (B_(t+1) from B_t:
// b_0 <- b_(n-1), b_j <- b_(j-1)). In GF(2^m) in the redundant basis, rotating by one
// place is multiplication by x.
// Interface: load has priority and stores b_in (B_0); shift rotates; both act on the
// rising clock edge. rst_n is an asynchronous active-low reset to zero (this design's
// choice; the design description gives no reset).
module rb_bpm #(
  parameter int unsigned N = 163
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] b_in,
  output logic [N-1:0] b_out
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     b_out <= '0;
    else if (load)  b_out <= b_in;
    else if (shift) b_out <= {b_out[N-2:0], b_out[N-1]};
  end
endmodule
