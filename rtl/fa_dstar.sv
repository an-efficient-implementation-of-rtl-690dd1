// fa_dstar: signed full adder FA**, -2*co + s = -p - q + ci.
// Inputs p, q and output co are negatively weighted; ci and s positively. The range [-2, 1]
// of both sides matches, so the cell is exact. In gates it is a full adder on (p, q, ~ci) with
// its sum inverted: p + q + (1-ci) = 2*co + (1-s). Used on the two sign bits at the top of an
// odd-width sum-to-MB recoder. Purely combinational.
module fa_dstar (
  input  logic p,
  input  logic q,
  input  logic ci,
  output logic s,
  output logic co
);
  logic cin_n;
  assign cin_n = ~ci;
  assign s  = ~(p ^ q ^ cin_n);
  assign co = (p & q) | (p & cin_n) | (q & cin_n);
endmodule
