// tb_pp_generator: checks each partial product row. For every multiplicand
// and random Booth digits, row i plus its correction bit (bit 2i of
// neg_row) must equal d_i * M * 4^i modulo 2^16, with M read as unsigned
// (default instance) or signed (second instance). A 4-bit signed instance
// reproduces the method's worked example: multiplicand 1100 with digits -2
// and -1 gives the partial products 1000 and 0100.
module tb_pp_generator;
  import booth_pkg::*;

  logic [7:0]          m8;
  booth_digit_t [4:0]  d_u;
  booth_digit_t [3:0]  d_s;
  logic [4:0][15:0]    rows_u;
  logic [3:0][15:0]    rows_s;
  logic [15:0]         neg_u, neg_s;
  logic [3:0]          m4;
  booth_digit_t [1:0]  d_4;
  logic [1:0][7:0]     rows_4;
  logic [7:0]          neg_4;
  int checks = 0, failures = 0;

  pp_generator                             dut_u (.m(m8), .digits(d_u), .rows(rows_u), .neg_row(neg_u));
  pp_generator #(.WIDTH(8), .SIGNED(1'b1)) dut_s (.m(m8), .digits(d_s), .rows(rows_s), .neg_row(neg_s));
  pp_generator #(.WIDTH(4), .SIGNED(1'b1)) dut_4 (.m(m4), .digits(d_4), .rows(rows_4), .neg_row(neg_4));

  // A legal digit from a value in -2..2.
  function automatic booth_digit_t mk(input int v);
    booth_digit_t d;
    d.neg = v < 0;
    d.one = (v == 1) || (v == -1);
    d.two = (v == 2) || (v == -2);
    return d;
  endfunction

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dv [5];
    logic [15:0] got, exp;
    for (int m = 0; m < 256; m++) begin
      for (int r = 0; r < 20; r++) begin
        m8 = 8'(m);
        for (int i = 0; i < 5; i++) begin
          dv[i] = int'($urandom_range(4)) - 2;
          d_u[i] = mk(dv[i]);
          if (i < 4) d_s[i] = mk(dv[i]);
        end
        #1;
        for (int i = 0; i < 5; i++) begin
          got = rows_u[i] + (16'(neg_u[2*i]) << (2*i));
          exp = 16'(dv[i] * m * (4 ** i));
          checks++;
          if (got !== exp) begin
            failures++;
            $display("FAIL unsigned m=%0d d%0d=%0d row=%h exp=%h", m, i, dv[i], got, exp);
          end
          if (i < 4) begin
            got = rows_s[i] + (16'(neg_s[2*i]) << (2*i));
            exp = 16'(dv[i] * int'($signed(m8)) * (4 ** i));
            checks++;
            if (got !== exp) begin
              failures++;
              $display("FAIL signed m=%0d d%0d=%0d row=%h exp=%h", $signed(m8), i, dv[i], got, exp);
            end
          end
        end
        // Correction bits only at even positions.
        checks++;
        if ((neg_u & 16'haaaa) != 0) begin
          failures++;
          $display("FAIL neg_row has odd bits %h", neg_u);
        end
      end
    end
    // Worked example: 1100 x 1010, digits -2 and -1.
    m4 = 4'b1100;
    d_4[0] = mk(-2);
    d_4[1] = mk(-1);
    #1;
    checks++;
    if (4'(rows_4[0] + 8'(neg_4[0])) != 4'b1000) begin
      failures++;
      $display("FAIL example PP0 = %b", 4'(rows_4[0] + 8'(neg_4[0])));
    end
    checks++;
    if (4'((rows_4[1] >> 2) + 8'(neg_4[2])) != 4'b0100) begin
      failures++;
      $display("FAIL example PP1 = %b", 4'((rows_4[1] >> 2) + 8'(neg_4[2])));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
