// rb_mult_ds: digit-serial multiplier over GF(2^m) in the redundant basis (RB), n = m + 1.
// The product C = XOR_j a_j B_j (B_j = B rotated up j places) is split into Q inner
// products C_u = XOR_v a_(u+vQ) B_(u+vQ), u = 0..Q-1, v = 0..P-1, P = ceil(n/Q), and the
// C_u are accumulated over Q clock cycles, one digit of A (P bits) per cycle.
//   - A register: A, zero-padded to PQ bits, stored as Q digits of P bits that shift out
//     one per clock (digit u = a_u, a_(u+Q), ..., a_(u+(P-1)Q)); zeros follow.
//   - rb_bpm: B register rotating one place per clock, so it holds B_t at clock t.
//   - rb_ppgm: bit distribution cell and the chain of P PPGUs; C_u leaves it P clocks
//     after digit u entered.
//   - accumulator: XORs the Q values C_0 .. C_(Q-1) into c.
// Interface: pulse start for one clock while idle (busy low) with a and b valid; a and b
// are captured on that edge. busy is high from the next clock until the result is ready.
// done rises on the (P + Q)-th rising clock edge after the start edge, stays high one clock, and c
// then holds the product until the next start. A start while busy is ignored. Results
// are in the RB; no conversion to another basis is done.
// The decomposition into Q digit products and the unit structure follow the design
// description; the handshake, the reset (asynchronous, active low), the zero padding of A
// when Q does not divide n and the default size m = 162, Q = 8 (P = 21) are this design's
// choices. One multiplication at a time; a new one can start the clock after done.
module rb_mult_ds
  import rb_pkg::*;
#(
  parameter int unsigned M = 162,
  parameter int unsigned Q = 8
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       start,
  input  logic [M:0] a,
  input  logic [M:0] b,
  output logic       busy,
  output logic       done,
  output logic [M:0] c
);
  localparam int unsigned N    = M + 1;
  localparam int unsigned P    = (N + Q - 1) / Q;
  localparam int unsigned LAST = P + Q - 1;            // last RUN cycle index
  localparam int unsigned CW   = $clog2(LAST + 1) + 1;

  rb_state_e           state;
  logic [CW-1:0]       cnt;          // clock index t within RUN
  logic [Q-1:0][P-1:0] a_digits;     // digit u in a_digits[u]; a_digits[0] is sent next
  logic [P-1:0]        digit_cur;
  logic [N-1:0]        b_cur, pp;
  logic                accept, running, acc_en;

  assign accept  = (state == RB_IDLE) && start;
  assign running = (state == RB_RUN);
  assign busy    = running;
  assign done    = (state == RB_DONE);
  assign acc_en  = running && (cnt >= CW'(P));
  assign digit_cur = running ? a_digits[0] : '0;

  // Sequencer.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= RB_IDLE;
      cnt   <= '0;
    end else begin
      unique case (state)
        RB_IDLE: if (start) begin
          state <= RB_RUN;
          cnt   <= '0;
        end
        RB_RUN: begin
          if (cnt == CW'(LAST)) state <= RB_DONE;
          cnt <= cnt + 1'b1;
        end
        RB_DONE: state <= RB_IDLE;
        default: state <= RB_IDLE;
      endcase
    end
  end

  // A register: digit-major layout, shifts one digit per clock while running.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_digits <= '0;
    end else if (accept) begin
      for (int unsigned u = 0; u < Q; u++)
        for (int unsigned v = 0; v < P; v++)
          a_digits[u][v] <= (u + v * Q < N) ? a[u + v * Q] : 1'b0;
    end else if (running) begin
      for (int unsigned u = 0; u + 1 < Q; u++) a_digits[u] <= a_digits[u + 1];
      a_digits[Q-1] <= '0;
    end
  end

  rb_bpm #(.N(N)) u_bpm (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (accept),
    .shift (running),
    .b_in  (b),
    .b_out (b_cur)
  );

  rb_ppgm #(.N(N), .Q(Q), .P(P)) u_ppgm (
    .clk      (clk),
    .rst_n    (rst_n),
    .clr      (accept),
    .en       (running),
    .digit_in (digit_cur),
    .b_cur    (b_cur),
    .pp_out   (pp)
  );

  // Accumulator of the Q digit products.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      c <= '0;
    else if (accept) c <= '0;
    else if (acc_en) c <= c ^ pp;
  end

  // The sequencer never leaves RB_RUN early and done lasts one clock.
  assert property (@(posedge clk) disable iff (!rst_n) done |=> !done);
  assert property (@(posedge clk) disable iff (!rst_n) accept |=> busy);
endmodule
