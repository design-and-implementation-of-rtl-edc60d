// rb_ppgm: partial-product generation module of the digit-serial RB multiplier: the bit
// distribution cell and a chain of P partial-product generation units (PPGUs).
// Per clock t the module receives one digit of A, digit_in[v] = a_(t+vQ) (zero once all
// Q digits have been sent), and the form B_t of operand B from the B permutation module.
//  - Bit distribution: unit v gets B_t rotated up by v(Q-1) places, i.e. B_(t+v(Q-1)),
//    pure wiring. For n = PQ the forms start with b_0, b_(n-Q+1), ..., b_(Q+P-1).
//  - Input skew: unit v gets the digit bit v delayed by v clocks through a register chain
//    that is cleared at start, so it first sees v zeros.
// Unit v thus works at clock t on digit u = t - v: a_(u+vQ) * B_(u+vQ). Its result is
// handed to unit v+1 one clock later, still for digit u, so pp_out holds, at clock t,
// C_u = XOR_v a_(u+vQ) B_(u+vQ) for u = t - P (latency P clocks, one digit per clock).
// The unit chain, the bit distribution cell and the zero-padded skewed A inputs are
// those of the design description's figure; the exact register placement is this
// design's own reading of it. clr clears all registers synchronously; en advances them.
module rb_ppgm #(
  parameter int unsigned N = 163,
  parameter int unsigned Q = 8,
  parameter int unsigned P = (N + Q - 1) / Q
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clr,
  input  logic         en,
  input  logic [P-1:0] digit_in,
  input  logic [N-1:0] b_cur,
  output logic [N-1:0] pp_out
);
  logic [P-1:0][N-1:0] b_dist;   // bit distribution cell outputs
  logic [P-1:0]        a_skew;   // digit bit v, delayed v clocks
  logic [P:0][N-1:0]   chain;    // partial sums between units

  // Bit distribution cell: unit v gets B rotated up by v(Q-1) places.
  for (genvar v = 0; v < P; v++) begin : g_dist
    localparam int unsigned ROT = (v * (Q - 1)) % N;
    if (ROT == 0) begin : g_id
      assign b_dist[v] = b_cur;
    end else begin : g_rot
      assign b_dist[v] = (b_cur << ROT) | (b_cur >> (N - ROT));
    end
  end

  // Input skew registers: bit v of the digit passes through v registers.
  assign a_skew[0] = digit_in[0];
  for (genvar v = 1; v < P; v++) begin : g_skew
    logic [v:0] sr;  // sr[k] = digit bit v delayed k clocks
    assign sr[0] = digit_in[v];
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)   sr[v:1] <= '0;
      else if (clr) sr[v:1] <= '0;
      else if (en)  sr[v:1] <= sr[v-1:0];
    end
    assign a_skew[v] = sr[v];
  end

  assign chain[0] = '0;
  for (genvar v = 0; v < P; v++) begin : g_ppgu
    rb_ppgu #(.N(N)) u_ppgu (
      .clk    (clk),
      .rst_n  (rst_n),
      .clr    (clr),
      .en     (en),
      .a_bit  (a_skew[v]),
      .b_form (b_dist[v]),
      .pp_in  (chain[v]),
      .pp_out (chain[v+1])
    );
  end

  assign pp_out = chain[P];
endmodule
