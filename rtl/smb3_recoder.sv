// smb3_recoder: S-MB3 sum-to-Modified-Booth recoder. Turns two N-bit two's-complement
// numbers A and B directly into the N/2+1 radix-4 MB digits of Y = A + B.
//
// How it works: as in S-MB1, B is read in its own MB form and a conventional full adder (FA)
// compresses the weight-1 bits a(2j), b(2j), b(2j-1) of slice j into s0 and a carry c1. The
// weight-2 position is then resolved with two different half adders: a conventional HA adds
// a(2j+1) and c1 (carry g, sum p), and a signed HA** (2*c - s = q - p) subtracts b(2j+1) from p
// (carry t2, negative bit x). g = 1 forces p = 0 and so t2 = 0: the carries are exclusive and
// their OR is the one carry t(j+1) into the next slice. Slice j emits -2*x + s0 + t(j).
// Odd N adds one FA** slice on the two sign bits; even N adds a top digit that corrects for
// the sign bit of A.
//
// Interface: a, b in, digit[ND] out as {n2, p1, q1} triplets (value -2*n2 + p1 + q1).
// Purely combinational, no clock.
//
// Follows the document: FA, conventional HA and the signed HA** per slice, FA** at the top for
// odd widths. This design's own choices: the exact wiring, the OR that merges the two
// exclusive carries (it stands where the document lists an HA* cell, whose carry output
// p | q is that OR), and the even-width top digit.
module smb3_recoder
  import fam_pkg::*;
#(
  parameter  int N  = 8,            // width of A and B (8 = even case, 9 = odd case)
  localparam int K  = N / 2,        // number of regular digit slices
  localparam int ND = N / 2 + 1     // digits of the (N+1)-bit sum
) (
  input  logic [N-1:0]              a,
  input  logic [N-1:0]              b,
  output smb_triplet_t [ND-1:0]     digit
);

  // Carry passed from digit slice j-1 to slice j (weight 4^j, positive).
  logic [K:0] t;
  assign t[0] = 1'b0;

  for (genvar j = 0; j < K; j++) begin : g_slice
    logic bm;          // b(2j-1): the MB overlap bit of operand B (0 below the LSB)
    logic c1, s0, x;   // low-position carry and sum; negatively weighted high-position bit
    if (j == 0) begin : g_lsb
      assign bm = 1'b0;
    end else begin : g_mid
      assign bm = b[2*j-1];
    end
    // Weight-1 position: a(2j) + b(2j) + b(2j-1) = 2*c1 + s0
    fa u_fa (.p(a[2*j]), .q(b[2*j]), .ci(bm), .s(s0), .co(c1));
    logic g, p, t2;
    // Weight-2 position, step 1: a(2j+1) + c1 = 2*g + p                (HA)
    ha u_ha (.p(a[2*j+1]), .q(c1), .s(p), .c(g));
    // Weight-2 position, step 2: p - b(2j+1) = 2*t2 - x               (HA**)
    ha_dstar u_ha_dstar (.p(b[2*j+1]), .q(p), .s(x), .c(t2));
    assign t[j+1] = g | t2;    // mutually exclusive carries
    assign digit[j] = '{n2: x, p1: s0, q1: t[j]};
  end

  if (N % 2 == 0) begin : g_even_top
    // Even N: the slices treated a(N-1) as +2^(N-1); its true weight is -2^(N-1), which leaves
    // -a(N-1) at weight 4^K. The top digit t[K] - a(N-1) is written as -2*a + a + t.
    assign digit[K] = '{n2: a[N-1], p1: a[N-1], q1: t[K]};
  end else begin : g_odd_top
    // Odd N: both sign bits a(N-1), b(N-1) are negative; with the overlap bit b(N-2):
    // -a(N-1) - b(N-1) + b(N-2) = -2*co + s  (FA**)
    logic s_top, c_top;
    fa_dstar u_fa_dstar (.p(a[N-1]), .q(b[N-1]), .ci(b[N-2]), .s(s_top), .co(c_top));
    assign digit[K] = '{n2: c_top, p1: s_top, q1: t[K]};
  end

endmodule
