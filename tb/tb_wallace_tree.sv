// tb_wallace_tree: checks the carry-save reduction tree.
// Instances with 6 rows (the 8/9-bit multiplier), 3, 7, 9 and 12 rows, each 17 bits wide, get
// all-ones rows and 5000 random row sets; sum + carry must equal the sum of the rows mod 2^17.
// The row counts exercise 4:2 compressor rows, full-adder rows and pass-through rows.
module tb_wallace_tree;
  localparam int W = 17;
  int checks = 0;
  int failures = 0;

  logic [W-1:0] r6 [6],  s6,  c6;
  logic [W-1:0] r3 [3],  s3,  c3;
  logic [W-1:0] r7 [7],  s7,  c7;
  logic [W-1:0] r9 [9],  s9,  c9;
  logic [W-1:0] r12 [12], s12, c12;

  wallace_tree #(.W(W), .ROWS(6))  dut6  (.rows(r6),  .sum(s6),  .carry(c6));
  wallace_tree #(.W(W), .ROWS(3))  dut3  (.rows(r3),  .sum(s3),  .carry(c3));
  wallace_tree #(.W(W), .ROWS(7))  dut7  (.rows(r7),  .sum(s7),  .carry(c7));
  wallace_tree #(.W(W), .ROWS(9))  dut9  (.rows(r9),  .sum(s9),  .carry(c9));
  wallace_tree #(.W(W), .ROWS(12)) dut12 (.rows(r12), .sum(s12), .carry(c12));

  task automatic compare(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 5001; it++) begin
      logic [W-1:0] e6, e3, e7, e9, e12;
      e6 = '0; e3 = '0; e7 = '0; e9 = '0; e12 = '0;
      for (int r = 0; r < 12; r++) begin
        logic [W-1:0] v;
        v = (it == 0) ? '1 : W'($urandom);
        if (r < 6) begin r6[r] = v; e6 += v; end
        if (r < 3) begin r3[r] = v; e3 += v; end
        if (r < 7) begin r7[r] = v; e7 += v; end
        if (r < 9) begin r9[r] = v; e9 += v; end
        r12[r] = v; e12 += v;
      end
      #1;
      compare("ROWS=6",  s6 + c6,   e6);
      compare("ROWS=3",  s3 + c3,   e3);
      compare("ROWS=7",  s7 + c7,   e7);
      compare("ROWS=9",  s9 + c9,   e9);
      compare("ROWS=12", s12 + c12, e12);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
