// tb_compressor_4_2: exhaustive check of the exact 4:2 compressor.
// For all 32 input combinations: x1+x2+x3+x4+cin == sum + 2*(carry+cout), and cout must not
// depend on cin (checked by comparing cout for cin = 0 and cin = 1).
module tb_compressor_4_2;
  int checks = 0;
  int failures = 0;

  logic x1, x2, x3, x4, cin, sum, carry, cout;

  compressor_4_2 dut (.*);

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic cout0;
      for (int c = 0; c < 2; c++) begin
        {x1, x2, x3, x4} = v[3:0];
        cin = c[0];
        #1;
        checks++;
        if (int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin)
            != int'(sum) + 2 * (int'(carry) + int'(cout))) begin
          failures++;
          $display("FAIL in=%b cin=%b: sum=%b carry=%b cout=%b", v[3:0], cin, sum, carry, cout);
        end
        if (c == 0) cout0 = cout;
        else begin
          checks++;
          if (cout !== cout0) begin
            failures++;
            $display("FAIL in=%b: cout depends on cin", v[3:0]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
