// tb_smb1_recoder: exhaustive self-check of the S-MB1 sum-to-Modified-Booth recoder.
//
// For every pair of operands at widths 8 (even) and 9 (odd), and at the smallest widths 3 and
// 4, the testbench rebuilds the value of the digit vector, sum over j of (-2*n2 + p1 + q1)*4^j,
// and compares it with the signed sum A + B computed directly. The digit form guarantees each
// digit lies in [-2, 2], so a matching value means a valid Booth recoding of A + B.
// The design is combinational; a time-based watchdog stops a hung run.
module tb_smb1_recoder;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] a8, b8;   smb_triplet_t [4:0] d8;
  logic [8:0] a9, b9;   smb_triplet_t [4:0] d9;
  logic [3:0] a4, b4;   smb_triplet_t [2:0] d4;
  logic [2:0] a3, b3;   smb_triplet_t [1:0] d3;

  smb1_recoder #(.N(8)) dut8 (.a(a8), .b(b8), .digit(d8));
  smb1_recoder #(.N(9)) dut9 (.a(a9), .b(b9), .digit(d9));
  smb1_recoder #(.N(4)) dut4 (.a(a4), .b(b4), .digit(d4));
  smb1_recoder #(.N(3)) dut3 (.a(a3), .b(b3), .digit(d3));

  function automatic int digits_value(input smb_triplet_t [4:0] d, input int nd);
    int v = 0;
    for (int j = nd - 1; j >= 0; j--) v = 4 * v + (-2 * int'(d[j].n2) + int'(d[j].p1) + int'(d[j].q1));
    return v;
  endfunction

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #50_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = -128; a < 128; a++)
      for (int b = -128; b < 128; b++) begin
        a8 = a[7:0]; b8 = b[7:0]; #1;
        check(digits_value(d8, 5), a + b, $sformatf("N=8 a=%0d b=%0d", a, b));
      end
    for (int a = -256; a < 256; a++)
      for (int b = -256; b < 256; b++) begin
        a9 = a[8:0]; b9 = b[8:0]; #1;
        check(digits_value(d9, 5), a + b, $sformatf("N=9 a=%0d b=%0d", a, b));
      end
    for (int a = -8; a < 8; a++)
      for (int b = -8; b < 8; b++) begin
        a4 = a[3:0]; b4 = b[3:0]; #1;
        check(digits_value(15'(d4), 3), a + b, $sformatf("N=4 a=%0d b=%0d", a, b));
      end
    for (int a = -4; a < 4; a++)
      for (int b = -4; b < 4; b++) begin
        a3 = a[2:0]; b3 = b[2:0]; #1;
        check(digits_value(15'(d3), 2), a + b, $sformatf("N=3 a=%0d b=%0d", a, b));
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
