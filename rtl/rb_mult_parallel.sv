// rb_mult_parallel: bit-parallel multiplier over GF(2^m) in the redundant basis (RB)
// {1, x, ..., x^(n-1)}, n = m + 1, where x is a primitive n-th root of unity. In this
// basis multiplication is a cyclic convolution over GF(2):
//   c_i = XOR_{j=0..n-1} b_((i-j) mod n) & a_j,      i.e. C = XOR_j a_j * B_j,
// where B_j is B rotated up by j places (coefficient i of B_j is b_((i-j) mod n)).
// The sum is laid out as the signal-flow graph of the design description: Q arrays, array
// u holding the P = ceil(n/Q) terms a_(u+vQ) * B_(u+vQ), v = 0..P-1. Inside an array the
// B forms step by Q places, from array to array by one place; M nodes are AND gates, A
// nodes XOR gates. Array sums C_u are XORed into C. When Q does not divide n the
// missing terms (u + vQ >= n) are left out, which equals padding A with zeros.
// Purely combinational; no reduction step is needed, the output stays in the RB.
// The SFG, the decomposition and the cyclic convolution follow the design description;
// the default field, m = 162 (n = 163, a prime with 2 as a primitive root, so a type-I
// optimal normal basis exists) and Q = 8 are this design's choices.
module rb_mult_parallel #(
  parameter int unsigned M = 162,
  parameter int unsigned Q = 8
) (
  input  logic [M:0] a,
  input  logic [M:0] b,
  output logic [M:0] c
);
  localparam int unsigned N = M + 1;
  localparam int unsigned P = (N + Q - 1) / Q;

  logic [Q-1:0][N-1:0] c_arr;  // C_u, one inner product per array

  // B rotated up by j places: coefficient i of the result is b_((i-j) mod n).
  function automatic logic [N-1:0] rot_up(input logic [N-1:0] x, input int unsigned j);
    return (j == 0) ? x : ((x << j) | (x >> (N - j)));
  endfunction

  // Array u: M nodes a_(u+vQ) AND B_(u+vQ), A nodes XOR them together.
  always_comb begin
    for (int unsigned u = 0; u < Q; u++) begin
      c_arr[u] = '0;
      for (int unsigned v = 0; v < P; v++) begin
        if (u + v * Q < N)
          c_arr[u] ^= rot_up(b, u + v * Q) & {N{a[u + v * Q]}};
      end
    end
  end

  // Final A nodes: C = XOR_u C_u.
  always_comb begin
    c = '0;
    for (int unsigned u = 0; u < Q; u++) c ^= c_arr[u];
  end
endmodule
