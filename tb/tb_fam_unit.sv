// tb_fam_unit: checks the fused add-multiply operator Z = X*(A+B) against integer arithmetic.
// The default instance (8-bit, S-MB1) gets every A, B pair for a set of X values that includes
// 0, +-1, the extremes and random values; a 9-bit S-MB2 instance and a 9-bit S-MB3 instance get
// corner cases and random vectors; 4-bit S-MB3 and 5-bit S-MB2 instances are checked
// exhaustively over A, B and X. The result must equal X*(A+B) as a (2N+1)-bit two's-complement
// number. Combinational; a time-based watchdog stops a hung run.
module tb_fam_unit;
  int checks = 0;
  int failures = 0;

  logic [7:0] a8, b8, x8;    logic [16:0] z8;
  logic [8:0] a9, b9, x9;    logic [18:0] z9a, z9b;
  logic [4:0] a5, b5, x5;    logic [10:0] z5;
  logic [3:0] a4, b4, x4;    logic [8:0]  z4;

  fam_unit                          dut8  (.a(a8), .b(b8), .x(x8), .z(z8));
  fam_unit #(.N(9), .SCHEME(2))     dut9a (.a(a9), .b(b9), .x(x9), .z(z9a));
  fam_unit #(.N(9), .SCHEME(3))     dut9b (.a(a9), .b(b9), .x(x9), .z(z9b));
  fam_unit #(.N(5), .SCHEME(2))     dut5  (.a(a5), .b(b5), .x(x5), .z(z5));
  fam_unit #(.N(4), .SCHEME(3))     dut4  (.a(a4), .b(b4), .x(x4), .z(z4));

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run9(input int a, input int b, input int x);
    a9 = a[8:0]; b9 = b[8:0]; x9 = x[8:0]; #1;
    check($sformatf("N=9 S-MB2 %0d*(%0d+%0d)", x, a, b), int'($signed(z9a)), x * (a + b));
    check($sformatf("N=9 S-MB3 %0d*(%0d+%0d)", x, a, b), int'($signed(z9b)), x * (a + b));
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int xs [8];
    xs = '{0, 1, -1, 127, -128, 85, -86, 0};
    xs[7] = int'($signed(8'($urandom)));
    foreach (xs[i])
      for (int a = -128; a < 128; a++)
        for (int b = -128; b < 128; b++) begin
          a8 = a[7:0]; b8 = b[7:0]; x8 = xs[i][7:0]; #1;
          check($sformatf("N=8 S-MB1 %0d*(%0d+%0d)", xs[i], a, b), int'($signed(z8)), xs[i] * (a + b));
        end

    run9(-256, -256, -256);
    run9(255, 255, 255);
    run9(255, 255, -256);
    run9(-256, -256, 255);
    for (int i = 0; i < 50000; i++)
      run9(int'($signed(9'($urandom))), int'($signed(9'($urandom))), int'($signed(9'($urandom))));

    for (int a = -16; a < 16; a++)
      for (int b = -16; b < 16; b++)
        for (int x = -16; x < 16; x++) begin
          a5 = a[4:0]; b5 = b[4:0]; x5 = x[4:0]; #1;
          check($sformatf("N=5 S-MB2 %0d*(%0d+%0d)", x, a, b), int'($signed(z5)), x * (a + b));
        end
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++)
        for (int x = -8; x < 8; x++) begin
          a4 = a[3:0]; b4 = b[3:0]; x4 = x[3:0]; #1;
          check($sformatf("N=4 S-MB3 %0d*(%0d+%0d)", x, a, b), int'($signed(z4)), x * (a + b));
        end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
