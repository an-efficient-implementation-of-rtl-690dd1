// fam_pkg: types and sizing functions shared by the fused add-multiply (FAM) datapath.
//
// A Modified Booth (MB) digit of the sum Y = A + B is carried between blocks in two forms:
//   smb_triplet_t - three bits {n2, p1, q1} whose value is -2*n2 + p1 + q1, the form a sum-to-MB
//                   recoder delivers (same role as the bit triple y(2j+1), y(2j), y(2j-1) of the
//                   classic Booth table);
//   mb_digit_t    - the encoded digit {neg, one, two} that drives a Booth decoder, value
//                   (-1)^neg * (one + 2*two).
// For an N-bit A and B the sum needs N+1 bits; both even and odd N then give N/2+1 digits.
package fam_pkg;

  typedef struct packed {
    logic n2;  // weight -2
    logic p1;  // weight +1
    logic q1;  // weight +1
  } smb_triplet_t;

  typedef struct packed {
    logic neg;  // S    : digit is negative
    logic one;  // ONE  : |digit| == 1
    logic two;  // TWO  : |digit| == 2
  } mb_digit_t;

  // Number of MB digits of the (N+1)-bit sum of two N-bit operands.
  function automatic int num_digits(input int n);
    return n / 2 + 1;
  endfunction

  // Rows left after one Wallace level: every 4 rows go through a 4:2 compressor row,
  // 3 leftover rows through a full-adder (3:2) row, 1 or 2 leftover rows pass unchanged.
  function automatic int rows_after(input int r);
    int rem;
    rem = r % 4;
    return 2 * (r / 4) + ((rem == 3) ? 2 : rem);
  endfunction

  // Number of Wallace levels needed to bring r rows down to two.
  function automatic int tree_levels(input int r);
    int l;
    l = 0;
    while (r > 2) begin
      r = rows_after(r);
      l++;
    end
    return l;
  endfunction

  // Row count at the input of level l (level 0 is the tree input).
  function automatic int rows_at(input int r, input int l);
    for (int i = 0; i < l; i++) r = rows_after(r);
    return r;
  endfunction

endpackage
