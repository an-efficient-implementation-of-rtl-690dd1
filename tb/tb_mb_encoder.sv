// tb_mb_encoder: checks the Modified Booth encoder against the radix-4 Booth table.
// All eight input triplets are applied; for each, the expected S / ONE / TWO are taken from a
// constant copy of the table, and the encoded digit's value (-1)^S*(ONE + 2*TWO) is also
// compared with -2*n2 + p1 + q1. Combinational; a time-based watchdog stops a hung run.
module tb_mb_encoder;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  smb_triplet_t trip;
  mb_digit_t    enc;

  mb_encoder dut (.trip(trip), .enc(enc));

  // Table rows indexed by {n2, p1, q1}: {S, ONE, TWO}
  localparam logic [2:0] TABLE [8] = '{3'b000, 3'b010, 3'b010, 3'b001,
                                       3'b101, 3'b110, 3'b110, 3'b100};

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      int dv, ev;
      trip = smb_triplet_t'(i[2:0]);
      #1;
      checks++;
      if (enc !== mb_digit_t'(TABLE[i])) begin
        failures++;
        $display("FAIL triplet %b: got %b expected %b", i[2:0], enc, TABLE[i]);
      end
      dv = -2 * int'(trip.n2) + int'(trip.p1) + int'(trip.q1);
      ev = (enc.neg ? -1 : 1) * (int'(enc.one) + 2 * int'(enc.two));
      checks++;
      if (dv != ev) begin
        failures++;
        $display("FAIL triplet %b: digit %0d encoded as %0d", i[2:0], dv, ev);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
