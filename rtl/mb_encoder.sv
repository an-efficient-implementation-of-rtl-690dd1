// mb_encoder: Modified Booth encoding of one digit (the gate-level S / ONE / TWO generator).
//
// The recoder delivers each digit as three bits {n2, p1, q1} of value -2*n2 + p1 + q1, which
// play the roles of y(2j+1), y(2j), y(2j-1) in the classic radix-4 Booth table:
//   n2 p1 q1 : 000  001  010  011  100  101  110  111
//   digit    :   0   +1   +1   +2   -2   -1   -1    0
//   S ONE TWO: 000  010  010  001  101  110  110  100
// S = n2, ONE = p1 ^ q1, TWO = (n2 & ~p1 & ~q1) | (~n2 & p1 & q1). The code 111 gives S = 1 with
// a zero magnitude; the Booth decoder's input carry S & (ONE | TWO) is then 0 and its row is 0.
// Interface: triplet in, encoded digit out. Purely combinational.
// Follows the document's encoding table and its three encoded signals.
module mb_encoder
  import fam_pkg::*;
(
  input  smb_triplet_t trip,
  output mb_digit_t    enc
);
  assign enc.neg = trip.n2;
  assign enc.one = trip.p1 ^ trip.q1;
  assign enc.two = (trip.n2 & ~trip.p1 & ~trip.q1) | (~trip.n2 & trip.p1 & trip.q1);
endmodule
