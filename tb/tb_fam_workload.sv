// tb_fam_workload: the evaluation workload of the fused add-multiply operators, at full size.
//
// The three 8-bit operators (S-MB1, S-MB2, S-MB3) of the top are run over every one of the
// 2^24 operand triples (A, B, X); the three 9-bit operators get 2 million random triples plus
// their extreme corners. Each result is compared with X*(A+B) in integer arithmetic. The top
// keeps its default widths.
module tb_fam_workload;
  longint checks = 0;
  longint failures = 0;

  logic [7:0]  a_even [3], b_even [3], x_even [3];
  logic [16:0] z_even [3];
  logic [8:0]  a_odd  [3], b_odd  [3], x_odd  [3];
  logic [18:0] z_odd  [3];

  fam_top dut (.*);

  task automatic report(input int w, input int s, input int x, input int a, input int b,
                        input int got);
    checks++;
    if (got != x * (a + b)) begin
      failures++;
      if (failures <= 10)
        $display("FAIL %0d-bit S-MB%0d %0d*(%0d+%0d): got %0d expected %0d",
                 w, s + 1, x, a, b, got, x * (a + b));
    end
  endtask

  initial begin
    #100_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int x = -128; x < 128; x++)
      for (int a = -128; a < 128; a++)
        for (int b = -128; b < 128; b++) begin
          for (int s = 0; s < 3; s++) begin
            a_even[s] = a[7:0]; b_even[s] = b[7:0]; x_even[s] = x[7:0];
          end
          #1;
          for (int s = 0; s < 3; s++)
            report(8, s, x, a, b, int'($signed(z_even[s])));
        end
    for (int i = 0; i < 2_000_016; i++) begin
      int a, b, x;
      if (i < 16) begin
        a = i[0] ? 255 : -256; b = i[1] ? 255 : -256; x = i[2] ? 255 : -256;
        if (i[3]) x = 0;
      end else begin
        a = int'($signed(9'($urandom))); b = int'($signed(9'($urandom)));
        x = int'($signed(9'($urandom)));
      end
      for (int s = 0; s < 3; s++) begin
        a_odd[s] = a[8:0]; b_odd[s] = b[8:0]; x_odd[s] = x[8:0];
      end
      #1;
      for (int s = 0; s < 3; s++)
        report(9, s, x, a, b, int'($signed(z_odd[s])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
