// fam_unit: fused add-multiply operator, Z = X * (A + B), with a sum-to-Modified-Booth recoder.
//
// The sum A + B is never formed in binary. A sum-to-MB recoder (S-MB1, S-MB2 or S-MB3, chosen
// by SCHEME) turns A and B straight into the ND = N/2+1 radix-4 Booth digits of A + B; each digit
// is encoded into S / ONE / TWO, a Booth decoder forms the row digit*X, a Wallace tree of 4:2
// compressors and full adders reduces the ND rows plus one row of negation corrections to two
// rows, and a ripple-carry adder produces Z.
//   A, B, X : N-bit two's complement;  Z : 2N+1-bit two's complement, always exact
//   (|X*(A+B)| <= 2^(N-1) * 2^N).
// Row j is digit j times X, sign-extended to 2N+1 bits and shifted left by 2j; the correction row
// holds the decoder's input carry cin(j) at bit 2j, the +1 that completes the two's complement
// of a negative row.
// Purely combinational: Z is valid one propagation delay after A, B, X change.
// Follows the document's fused datapath (recoder, encoder, decoder, Wallace tree with exact
// compressors, ripple-carry adder). Output width, sign extension and the correction row are this
// design's choices.
module fam_unit
  import fam_pkg::*;
#(
  parameter  int N      = 8,   // operand width: 8 (even case) or 9 (odd case) in the evaluation
  parameter  int SCHEME = 1,   // 1 = S-MB1, 2 = S-MB2, 3 = S-MB3
  localparam int ND     = N / 2 + 1,
  localparam int W      = 2 * N + 1
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] x,
  output logic [W-1:0] z
);

  smb_triplet_t [ND-1:0] digit;
  mb_digit_t    [ND-1:0] enc;
  logic         [N:0]    pp   [ND];
  logic         [ND-1:0] corr;        // +1 corrections of the negative rows
  logic         [W-1:0]  rows [ND+1];
  logic         [W-1:0]  t_sum, t_carry;

  // Sum-to-MB recoder.
  if (SCHEME == 1) begin : g_smb1
    smb1_recoder #(.N(N)) u_rec (.a(a), .b(b), .digit(digit));
  end else if (SCHEME == 2) begin : g_smb2
    smb2_recoder #(.N(N)) u_rec (.a(a), .b(b), .digit(digit));
  end else begin : g_smb3
    smb3_recoder #(.N(N)) u_rec (.a(a), .b(b), .digit(digit));
  end

  // Encode each digit and form its partial-product row.
  for (genvar j = 0; j < ND; j++) begin : g_pp
    mb_encoder u_enc (.trip(digit[j]), .enc(enc[j]));
    booth_decoder #(.N(N)) u_dec (.x(x), .enc(enc[j]), .pp(pp[j]), .cin(corr[j]));
    // Sign-extend the (N+1)-bit row to W bits and move it to weight 4^j.
    logic [W-1:0] row_ext;
    assign row_ext = W'({{(W-N-1){pp[j][N]}}, pp[j]});
    assign rows[j] = row_ext << (2 * j);
  end

  // Row of +1 corrections for negative digits: cin(j) at bit 2j.
  always_comb begin
    rows[ND] = '0;
    for (int j = 0; j < ND; j++) rows[ND][2*j] = corr[j];
  end

  wallace_tree #(.W(W), .ROWS(ND + 1)) u_tree (
    .rows (rows),
    .sum  (t_sum),
    .carry(t_carry)
  );

  ripple_carry_adder #(.W(W)) u_rca (.a(t_sum), .b(t_carry), .s(z));

  initial begin
    assert (SCHEME >= 1 && SCHEME <= 3) else $error("fam_unit: SCHEME must be 1, 2 or 3");
    assert (N >= 3) else $error("fam_unit: N must be at least 3");
  end
endmodule
