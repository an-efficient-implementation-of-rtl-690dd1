// tb_fam_top: end-to-end test of all six fused add-multiply configurations at full size
// (S-MB1, S-MB2, S-MB3, each with 8-bit and 9-bit operands; the top keeps its default widths).
//
// Every configuration gets the same directed corner cases followed by 100000 random operand
// triples, and each result is compared with X*(A+B) computed in integer arithmetic. The test
// also counts, per configuration, how often each mechanism of the datapath was exercised, and
// counts a failure for any that never occurred:
//   - every Booth digit value -2, -1, +1, +2 and the negative zero code (S=1, |digit|=0),
//     observed on the encoded digits inside each operator;
//   - a sum A+B that does not fit in N bits (only the extra top digit can carry it);
//   - the largest-magnitude product, X = A = B = most negative value.
module tb_fam_top;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0]  a_even [3], b_even [3], x_even [3];
  logic [16:0] z_even [3];
  logic [8:0]  a_odd  [3], b_odd  [3], x_odd  [3];
  logic [18:0] z_odd  [3];

  fam_top dut (.*);

  // Encoded digits observed inside each operator.
  mb_digit_t [4:0] enc_even [3];
  mb_digit_t [4:0] enc_odd  [3];
  for (genvar s = 0; s < 3; s++) begin : g_probe
    assign enc_even[s] = dut.g_scheme[s].u_even.enc;
    assign enc_odd[s]  = dut.g_scheme[s].u_odd.enc;
  end

  // Mechanism counters, index [config][kind]; config 0..2 even, 3..5 odd.
  // kind 0: digit -2, 1: digit -1, 2: digit +1, 3: digit +2, 4: negative zero,
  //      5: N-bit sum overflow, 6: extreme product
  localparam int NKIND = 7;
  localparam string KIND_NAME [NKIND] = '{"digit -2", "digit -1", "digit +1", "digit +2",
                                          "negative zero", "sum overflow", "extreme product"};
  int seen [6][NKIND];

  task automatic count_digits(input int cfg, input mb_digit_t [4:0] e);
    for (int j = 0; j < 5; j++) begin
      if (e[j].two &  e[j].neg) seen[cfg][0]++;
      if (e[j].one &  e[j].neg) seen[cfg][1]++;
      if (e[j].one & ~e[j].neg) seen[cfg][2]++;
      if (e[j].two & ~e[j].neg) seen[cfg][3]++;
      if (~e[j].one & ~e[j].two & e[j].neg) seen[cfg][4]++;
    end
  endtask

  task automatic check(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Apply one operand triple to every configuration and check all six results.
  task automatic apply(input int ae, input int be, input int xe,
                       input int ao, input int bo, input int xo);
    for (int s = 0; s < 3; s++) begin
      a_even[s] = ae[7:0]; b_even[s] = be[7:0]; x_even[s] = xe[7:0];
      a_odd[s]  = ao[8:0]; b_odd[s]  = bo[8:0]; x_odd[s]  = xo[8:0];
    end
    #1;
    for (int s = 0; s < 3; s++) begin
      check($sformatf("even S-MB%0d %0d*(%0d+%0d)", s + 1, xe, ae, be),
            int'($signed(z_even[s])), xe * (ae + be));
      check($sformatf("odd S-MB%0d %0d*(%0d+%0d)", s + 1, xo, ao, bo),
            int'($signed(z_odd[s])), xo * (ao + bo));
      count_digits(s, enc_even[s]);
      count_digits(s + 3, enc_odd[s]);
      if (ae + be > 127 || ae + be < -128) seen[s][5]++;
      if (ao + bo > 255 || ao + bo < -256) seen[s + 3][5]++;
      if (xe == -128 && ae == -128 && be == -128) seen[s][6]++;
      if (xo == -256 && ao == -256 && bo == -256) seen[s + 3][6]++;
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (seen[c, k]) seen[c][k] = 0;

    apply(0, 0, 0, 0, 0, 0);
    apply(-128, -128, -128, -256, -256, -256);   // extreme products
    apply(127, 127, 127, 255, 255, 255);
    apply(127, 127, -128, 255, 255, -256);
    apply(-1, 1, 99, -1, 1, 199);
    apply(-128, 127, 1, -256, 255, 1);
    for (int i = 0; i < 100000; i++)
      apply(int'($signed(8'($urandom))), int'($signed(8'($urandom))), int'($signed(8'($urandom))),
            int'($signed(9'($urandom))), int'($signed(9'($urandom))), int'($signed(9'($urandom))));

    for (int c = 0; c < 6; c++) begin
      string line;
      line = $sformatf("%s S-MB%0d:", (c < 3) ? "even" : "odd ", c % 3 + 1);
      for (int k = 0; k < NKIND; k++) begin
        line = {line, $sformatf(" %s=%0d", KIND_NAME[k], seen[c][k])};
        checks++;
        if (seen[c][k] == 0) begin
          failures++;
          $display("FAIL configuration %0d never exercised %s", c, KIND_NAME[k]);
        end
      end
      $display("%s", line);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
