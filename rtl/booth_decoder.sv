// booth_decoder: Modified Booth partial-product generator for one digit.
//
// For each bit i of the (N+1)-bit row it selects x(i) when ONE is set, x(i-1) when TWO is set
// (x shifted left once), and inverts the selection when the digit is negative and non-zero:
//   cin    = S & (ONE | TWO)                      (the "input carry" column of the Booth table)
//   pp(i)  = ((ONE & x(i)) | (TWO & x(i-1))) ^ cin,   x(-1) = 0, x(N) = x(N-1) (sign extension).
// The row is the one's complement of |digit|*X for negative digits; the missing +1 is cin, which
// the multiplier adds at the row's LSB weight. So  pp + cin = digit * X  exactly, as an
// (N+1)-bit two's-complement value (|digit*X| <= 2^N). The negative-zero code (S = 1, ONE = TWO
// = 0) gives an all-zero row and cin = 0.
// Interface: x (N bits, two's complement) and the encoded digit in; pp (N+1 bits) and the
// correction bit cin out. Purely combinational.
// Follows the document's Booth decoder and the input-carry column of its encoding table; the
// gate form of the selector is this design's choice.
module booth_decoder
  import fam_pkg::*;
#(
  parameter int N = 8
) (
  input  logic [N-1:0] x,
  input  mb_digit_t    enc,
  output logic [N:0]   pp,
  output logic         cin
);
  logic [N:0] x_ext;    // x sign-extended to N+1 bits
  logic [N:0] x_dbl;    // 2*x in N+1 bits
  assign x_ext = {x[N-1], x};
  assign x_dbl = {x, 1'b0};

  assign cin = enc.neg & (enc.one | enc.two);

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      pp[i] = ((enc.one & x_ext[i]) | (enc.two & x_dbl[i])) ^ cin;
    end
  end
endmodule
