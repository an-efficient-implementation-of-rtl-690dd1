// fa: conventional full adder, 2*co + s = p + q + ci (all bits positively weighted).
// Purely combinational. Used in the sum-to-MB recoders, the 4:2 compressor, the 3:2 rows of the
// Wallace tree and the final ripple-carry adder.
module fa (
  input  logic p,
  input  logic q,
  input  logic ci,
  output logic s,
  output logic co
);
  assign s  = p ^ q ^ ci;
  assign co = (p & q) | (p & ci) | (q & ci);
endmodule
