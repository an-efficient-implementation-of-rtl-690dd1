// ripple_carry_adder: W-bit ripple-carry adder, the final adder of the multiplier.
//
// A chain of W full adders adds the two rows left by the Wallace tree; the carry ripples from
// bit 0 to bit W-1 and the carry out of the top bit is dropped, so s = (a + b) mod 2^W.
// Interface: a, b (W bits) in, s (W bits) out. Purely combinational; the delay grows linearly
// with W.
// Follows the document: ripple-carry addition of the last two rows.
module ripple_carry_adder #(
  parameter int W = 17
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  logic [W:0] c;
  assign c[0] = 1'b0;
  for (genvar i = 0; i < W; i++) begin : g_bit
    fa u_fa (.p(a[i]), .q(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
  // c[W] is the carry out of the top bit; the result is taken modulo 2^W.
endmodule
