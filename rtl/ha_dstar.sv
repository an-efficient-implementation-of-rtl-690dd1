// ha_dstar: signed half adder HA**, 2*c - s = -p + q.
// Input p and output s are negatively weighted; q and c positively. q - p lies in [-1, 1],
// inside the range [-1, 2] of 2*c - s, so the cell is exact: s = p ^ q, c = q & ~p.
// Purely combinational.
module ha_dstar (
  input  logic p,
  input  logic q,
  output logic s,
  output logic c
);
  assign s = p ^ q;
  assign c = q & ~p;
endmodule
