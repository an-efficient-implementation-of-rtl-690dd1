// tb_ripple_carry_adder: checks the ripple-carry adder.
// A 17-bit instance (the final adder of the 8-bit multiplier) gets corner values and 20000
// random pairs; a 4-bit instance is checked exhaustively. Expected: (a + b) mod 2^W.
module tb_ripple_carry_adder;
  int checks = 0;
  int failures = 0;

  logic [16:0] a17, b17, s17;
  logic [3:0]  a4, b4, s4;

  ripple_carry_adder #(.W(17)) dut17 (.a(a17), .b(b17), .s(s17));
  ripple_carry_adder #(.W(4))  dut4  (.a(a4),  .b(b4),  .s(s4));

  task automatic check17(input logic [16:0] a, input logic [16:0] b);
    logic [16:0] exp;
    a17 = a; b17 = b; #1;
    exp = a + b;
    checks++;
    if (s17 !== exp) begin
      failures++;
      if (failures <= 10) $display("FAIL W=17 %h + %h: got %h expected %h", a, b, s17, exp);
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
    check17('0, '0);
    check17('1, 17'd1);       // carry through every bit
    check17('1, '1);
    check17(17'h0ffff, 17'h00001);
    check17(17'h15555, 17'h0aaaa);
    for (int i = 0; i < 20000; i++) check17(17'($urandom), 17'($urandom));
    for (int a = 0; a < 16; a++)
      for (int b = 0; b < 16; b++) begin
        logic [3:0] exp;
        a4 = a[3:0]; b4 = b[3:0]; #1;
        exp = a4 + b4;
        checks++;
        if (s4 !== exp) begin
          failures++;
          if (failures <= 10) $display("FAIL W=4 %0d + %0d: got %0d", a, b, s4);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
