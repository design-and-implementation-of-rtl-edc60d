// vedic_nxn: generalised N x N-bit unsigned Vedic multiplier, N a power of two (N >= 2).
// Each operand is split into an upper half (AM, BM) and a lower half (AL, BL) of H = N/2
// bits. Four H x H multipliers form AL*BL, AL*BM, AM*BL and AM*BM (vertically and
// crosswise), and three N-bit ripple-carry adders combine them exactly as in the 4x4 and
// 8x8 blocks:
//   adder 1: AL*BM + AM*BL                    -> sum1, ca1
//   adder 2: sum1 + (AL*BL >> H)              -> sum2, ca2
//   adder 3: AM*BM + {ca1|ca2, sum2[N-1:H]}   -> p[2N-1:N]
//   p[H-1:0] = (AL*BL)[H-1:0], p[N-1:H] = sum2[H-1:0]
// The recursion is unrolled into levels: level 0 is a K x K grid of leaf multipliers
// (vedic_8x8, or vedic_2x2 / vedic_4x4 when N < 8) on the BASE-bit slices of A and B,
// and each higher level combines four neighbouring products of the level below into one
// product of twice the width, until one 2N-bit product is left. The generated hardware
// is that of the recursive split.
// The split rule comes from the design description; the default N = 16 (one level past
// the largest size it draws) and the carry merge by OR (ca1 and ca2 are never both 1)
// are this design's choices. Purely combinational; each level adds three ripple-carry
// adder delays.
module vedic_nxn #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  output logic [2*N-1:0] p
);
  localparam int unsigned BASE = (N < 8) ? N : 8;   // leaf width
  localparam int unsigned K    = N / BASE;          // leaf slices per operand
  localparam int unsigned LV   = $clog2(K);         // levels above the leaves

  initial begin
    assert (N >= 2 && (N & (N - 1)) == 0) else $fatal(1, "vedic_nxn: N must be a power of two >= 2");
  end

  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    localparam int unsigned W  = BASE << l;   // operand width at this level
    localparam int unsigned KL = K >> l;      // slices per operand at this level
    // pr[i][j] = (A slice i) * (B slice j), slices of W bits
    logic [2*W-1:0] pr [KL][KL];

    for (genvar i = 0; i < KL; i++) begin : g_i
      for (genvar j = 0; j < KL; j++) begin : g_j
        if (l == 0) begin : g_leaf
          if (BASE == 2) begin : g_2
            vedic_2x2 u_m (.a(a[i*W +: W]), .b(b[j*W +: W]), .p(pr[i][j]));
          end else if (BASE == 4) begin : g_4
            vedic_4x4 u_m (.a(a[i*W +: W]), .b(b[j*W +: W]), .p(pr[i][j]));
          end else begin : g_8
            vedic_8x8 u_m (.a(a[i*W +: W]), .b(b[j*W +: W]), .p(pr[i][j]));
          end
        end else begin : g_split
          localparam int unsigned H = W / 2;
          logic [W-1:0] q0, q1, q2, q3;
          logic [W-1:0] sum1, sum2, sum3;
          logic         ca1, ca2, ca3;

          // Four half-width products from the level below (slices 2i, 2i+1 of A and
          // 2j, 2j+1 of B): AL*BL, AL*BM, AM*BL, AM*BM.
          assign q0 = g_lvl[l-1].pr[2*i][2*j];
          assign q1 = g_lvl[l-1].pr[2*i][2*j+1];
          assign q2 = g_lvl[l-1].pr[2*i+1][2*j];
          assign q3 = g_lvl[l-1].pr[2*i+1][2*j+1];

          rc_adder #(.W(W)) u_add1 (.a(q1),   .b(q2),                                      .cin(1'b0), .s(sum1), .cout(ca1));
          rc_adder #(.W(W)) u_add2 (.a(sum1), .b({{H{1'b0}}, q0[W-1:H]}),                  .cin(1'b0), .s(sum2), .cout(ca2));
          rc_adder #(.W(W)) u_add3 (.a(q3),   .b({{(H-1){1'b0}}, ca1 | ca2, sum2[W-1:H]}), .cin(1'b0), .s(sum3), .cout(ca3));

          assign pr[i][j] = {sum3, sum2[H-1:0], q0[H-1:0]};

          always_comb begin
            assert (ca3 == 1'b0) else $error("vedic_nxn: final adder carried out");
          end
        end
      end
    end
  end

  assign p = g_lvl[LV].pr[0][0];
endmodule
