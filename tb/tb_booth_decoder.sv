// tb_booth_decoder: checks the Booth partial-product generator.
// For every 8-bit X and every legal encoded digit (0, +-1, +-2, and the negative zero S=1 with
// ONE=TWO=0), the 9-bit row as a two's-complement number plus the correction bit cin must
// equal digit*X, and cin must be 1 exactly for the digits -1 and -2. A 5-bit instance is checked the same way. Illegal codes (ONE and TWO
// both set) are never produced by the encoder and are not applied.
module tb_booth_decoder;
  import fam_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [7:0] x8;  mb_digit_t e8;  logic [8:0] pp8;  logic c8;
  logic [4:0] x5;  mb_digit_t e5;  logic [5:0] pp5;  logic c5;

  booth_decoder #(.N(8)) dut8 (.x(x8), .enc(e8), .pp(pp8), .cin(c8));
  booth_decoder #(.N(5)) dut5 (.x(x5), .enc(e5), .pp(pp5), .cin(c5));

  // Legal encodings {S, ONE, TWO} and their digit values.
  localparam logic [2:0] CODE  [6] = '{3'b000, 3'b010, 3'b001, 3'b110, 3'b101, 3'b100};
  localparam int         VALUE [6] = '{0, 1, 2, -1, -2, 0};

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int c = 0; c < 6; c++) begin
      for (int x = -128; x < 128; x++) begin
        int got;
        x8 = x[7:0]; e8 = mb_digit_t'(CODE[c]); #1;
        got = int'($signed(pp8)) + int'(c8);
        checks++;
        if (c8 != (VALUE[c] < 0)) begin
          failures++;
          if (failures <= 10) $display("FAIL N=8 digit=%0d: cin=%b", VALUE[c], c8);
        end
        checks++;
        if (got != VALUE[c] * x) begin
          failures++;
          if (failures <= 10) $display("FAIL N=8 x=%0d digit=%0d: got %0d", x, VALUE[c], got);
        end
      end
      for (int x = -16; x < 16; x++) begin
        int got;
        x5 = x[4:0]; e5 = mb_digit_t'(CODE[c]); #1;
        got = int'($signed(pp5)) + int'(c5);
        checks++;
        if (got != VALUE[c] * x) begin
          failures++;
          if (failures <= 10) $display("FAIL N=5 x=%0d digit=%0d: got %0d", x, VALUE[c], got);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
