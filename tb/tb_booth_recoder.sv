// tb_booth_recoder: checks that the Booth digits of a multiplier add up to
// the multiplier, sum(d_i * 4^i) == y. Three instances are checked
// exhaustively: the default 8-bit unsigned recoder (5 digits), an 8-bit
// signed one (4 digits) and a 4-bit signed one, for which the multiplier
// 1010 must give the digits -2 and -1 of the method's worked example.
module tb_booth_recoder;
  import booth_pkg::*;

  logic [7:0] y8;
  logic [3:0] y4;
  booth_digit_t [4:0] d_u8;
  booth_digit_t [3:0] d_s8;
  booth_digit_t [1:0] d_s4;
  int checks = 0, failures = 0;

  booth_recoder                               dut_u8 (.y(y8), .digits(d_u8));
  booth_recoder #(.WIDTH(8), .SIGNED(1'b1))   dut_s8 (.y(y8), .digits(d_s8));
  booth_recoder #(.WIDTH(4), .SIGNED(1'b1))   dut_s4 (.y(y4), .digits(d_s4));

  function automatic int weigh(input int n, input int vals [5]);
    int acc = 0;
    for (int i = n - 1; i >= 0; i--) acc = acc * 4 + vals[i];
    return acc;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int v [5];
    for (int y = 0; y < 256; y++) begin
      y8 = 8'(y);
      #1;
      for (int i = 0; i < 5; i++) v[i] = booth_digit_value(d_u8[i]);
      checks++;
      if (weigh(5, v) != y) begin
        failures++;
        $display("FAIL unsigned y=%0d digits sum to %0d", y, weigh(5, v));
      end
      v = '{default: 0};
      for (int i = 0; i < 4; i++) v[i] = booth_digit_value(d_s8[i]);
      checks++;
      if (weigh(4, v) != int'($signed(y8))) begin
        failures++;
        $display("FAIL signed y=%0d digits sum to %0d", $signed(y8), weigh(4, v));
      end
    end
    for (int y = 0; y < 16; y++) begin
      y4 = 4'(y);
      #1;
      v = '{default: 0};
      for (int i = 0; i < 2; i++) v[i] = booth_digit_value(d_s4[i]);
      checks++;
      if (weigh(2, v) != int'($signed(y4))) begin
        failures++;
        $display("FAIL 4-bit y=%0d digits sum to %0d", $signed(y4), weigh(2, v));
      end
    end
    // Worked example: multiplier 1010 recodes to -2 (weight 1), -1 (weight 4).
    y4 = 4'b1010;
    #1;
    checks++;
    if (booth_digit_value(d_s4[0]) != -2 || booth_digit_value(d_s4[1]) != -1) begin
      failures++;
      $display("FAIL example 1010: digits %0d %0d", booth_digit_value(d_s4[0]),
               booth_digit_value(d_s4[1]));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
