// rc_adder: W-bit ripple-carry adder, used three times in every 4x4, 8x8 and NxN
// Vedic multiplier to combine the four sub-products.
// Each bit is a full adder: s[i] = a[i] ^ b[i] ^ c[i], c[i+1] = majority(a[i], b[i], c[i]),
// with c[0] = cin and cout = c[W]. The carry ripples from bit 0 to bit W-1, so the delay
// grows linearly with W. Purely combinational. The design description names the adder
// type and its widths (4 and 8 bits); the full-adder cell is the standard one.
module rc_adder #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);
  logic [W:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    assign s[i]   = a[i] ^ b[i] ^ c[i];
    assign c[i+1] = (a[i] & b[i]) | (a[i] & c[i]) | (b[i] & c[i]);
  end

  assign cout = c[W];
endmodule
