// tb_booth_encoder: exhaustive check of the radix-4 Booth encoder.
// All eight 3-bit groups are applied; the expected digit comes from the
// radix-4 encoding table, written out here as a literal list, and the
// one-hot rule (never `one` and `two` together, never a negative zero) is
// checked as well.
module tb_booth_encoder;
  import booth_pkg::*;

  logic [2:0]   grp;
  booth_digit_t digit;
  int checks = 0, failures = 0;

  // Expected digit per group value 3'b000 .. 3'b111.
  localparam int EXPECTED [8] = '{0, 1, 1, 2, -2, -1, -1, 0};

  booth_encoder dut (.grp(grp), .digit(digit));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int g = 0; g < 8; g++) begin
      grp = 3'(g);
      #1;
      checks++;
      if (booth_digit_value(digit) != EXPECTED[g]) begin
        failures++;
        $display("FAIL grp=%b got %0d expected %0d", grp, booth_digit_value(digit), EXPECTED[g]);
      end
      checks++;
      if ((digit.one && digit.two) || (digit.neg && !digit.one && !digit.two)) begin
        failures++;
        $display("FAIL grp=%b malformed digit %b", grp, digit);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
