// ha: conventional half adder, 2*c + s = p + q. Purely combinational.
module ha (
  input  logic p,
  input  logic q,
  output logic s,
  output logic c
);
  assign s = p ^ q;
  assign c = p & q;
endmodule
