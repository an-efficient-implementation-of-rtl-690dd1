// fa_star: signed full adder FA*, 2*co - s = p - q + ci.
// Input q and output s are negatively weighted; p, ci and co positively. The value p - q + ci
// lies in [-1, 2], exactly the range of 2*co - s, so the cell is exact. In gates it is a full
// adder on (p, ~q, ci) whose carry is co and whose sum is s: p + (1-q) + ci = 2*co + (1-s).
// Purely combinational.
module fa_star (
  input  logic p,
  input  logic q,
  input  logic ci,
  output logic s,
  output logic co
);
  logic qn;
  assign qn = ~q;
  assign s  = p ^ qn ^ ci ^ 1'b1;
  assign co = (p & qn) | (p & ci) | (qn & ci);
endmodule
