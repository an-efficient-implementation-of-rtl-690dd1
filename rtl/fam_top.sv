// fam_top: the six fused add-multiply configurations of the evaluation, side by side.
//
// Each instance computes Z = X * (A + B) with its own operands and result: the three recoding
// schemes S-MB1, S-MB2 and S-MB3, each at an even operand width (N_EVEN = 8) and an odd one
// (N_ODD = 9). Index s of every port array selects scheme S-MB(s+1). The instances share
// nothing; they stand together so that all six can be built, compared and simulated at once.
// Purely combinational.
// Follows the document: three schemes, even and odd widths, 8 and 9 bits.
module fam_top #(
  parameter  int N_EVEN = 8,
  parameter  int N_ODD  = 9,
  localparam int W_EVEN = 2 * N_EVEN + 1,
  localparam int W_ODD  = 2 * N_ODD + 1
) (
  input  logic [N_EVEN-1:0] a_even [3],
  input  logic [N_EVEN-1:0] b_even [3],
  input  logic [N_EVEN-1:0] x_even [3],
  output logic [W_EVEN-1:0] z_even [3],
  input  logic [N_ODD-1:0]  a_odd  [3],
  input  logic [N_ODD-1:0]  b_odd  [3],
  input  logic [N_ODD-1:0]  x_odd  [3],
  output logic [W_ODD-1:0]  z_odd  [3]
);
  for (genvar s = 0; s < 3; s++) begin : g_scheme
    fam_unit #(.N(N_EVEN), .SCHEME(s + 1)) u_even (
      .a(a_even[s]), .b(b_even[s]), .x(x_even[s]), .z(z_even[s])
    );
    fam_unit #(.N(N_ODD), .SCHEME(s + 1)) u_odd (
      .a(a_odd[s]), .b(b_odd[s]), .x(x_odd[s]), .z(z_odd[s])
    );
  end
endmodule
