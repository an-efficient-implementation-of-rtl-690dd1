// compressor_4_2: exact 4:2 compressor, built from two full adders in series.
//
// Five inputs (x1..x4 and the lateral carry cin from the next lower bit) and three outputs:
//   x1 + x2 + x3 + x4 + cin = sum + 2*(carry + cout).
// The first full adder adds x1, x2, x3 and sends its carry out sideways as cout; the second adds
// its sum, x4 and cin. cout does not depend on cin, so a row of these cells has no carry ripple.
// Interface: single-bit ports as above. Purely combinational.
// Follows the document: five inputs, three outputs, two full adders in series.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;
  fa u_fa0 (.p(x1), .q(x2), .ci(x3),  .s(s1),  .co(cout));
  fa u_fa1 (.p(s1), .q(x4), .ci(cin), .s(sum), .co(carry));
endmodule
