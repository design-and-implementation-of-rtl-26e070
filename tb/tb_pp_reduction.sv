// tb_pp_reduction: random rows (plus all-ones and all-zeros cases) go into
// the default 6-row, 16-bit reduction; sum + carry must equal the sum of
// the rows modulo 2^16. A 2-row instance (no stage at all) and a 3-row one
// are checked too.
module tb_pp_reduction;
  logic [5:0][15:0] rows6;
  logic [15:0]      s6, c6;
  logic [2:0][15:0] rows3;
  logic [15:0]      s3, c3;
  logic [1:0][15:0] rows2;
  logic [15:0]      s2, c2;
  int checks = 0, failures = 0;

  pp_reduction                      dut6 (.rows(rows6), .sum(s6), .carry(c6));
  pp_reduction #(.ROWS(3), .W(16))  dut3 (.rows(rows3), .sum(s3), .carry(c3));
  pp_reduction #(.ROWS(2), .W(16))  dut2 (.rows(rows2), .sum(s2), .carry(c2));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] exp;
    for (int t = 0; t < 5000; t++) begin
      for (int r = 0; r < 6; r++) begin
        case (t)
          0:       rows6[r] = '1;
          1:       rows6[r] = '0;
          default: rows6[r] = 16'($urandom);
        endcase
      end
      rows3 = rows6[2:0];
      rows2 = rows6[1:0];
      #1;
      exp = '0;
      for (int r = 0; r < 6; r++) exp += rows6[r];
      checks++;
      if (16'(s6 + c6) !== exp) begin
        failures++;
        $display("FAIL 6 rows: sum+carry=%h exp=%h", 16'(s6 + c6), exp);
      end
      checks++;
      if (16'(s3 + c3) !== 16'(rows6[0] + rows6[1] + rows6[2])) begin
        failures++;
        $display("FAIL 3 rows");
      end
      checks++;
      if (16'(s2 + c2) !== 16'(rows6[0] + rows6[1])) begin
        failures++;
        $display("FAIL 2 rows");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
