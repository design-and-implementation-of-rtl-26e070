// tb_muulti_signed: the multiplier with SIGNED = 1, which multiplies two's
// complement operands with one partial product fewer. An 8-bit instance is
// checked over all 65536 operand pairs, -128..127 squared, one clock after
// the operands are applied. A 4-bit instance repeats the method's worked
// example, 1100 x 1010 (-4 x -6 = 24).
module tb_muulti_signed;
  logic        clock;
  logic [7:0]  a, b;
  logic [15:0] p;
  logic [3:0]  a4, b4;
  logic [7:0]  p4;
  int checks = 0, failures = 0;

  muulti #(.WIDTH(8), .SIGNED(1'b1)) dut   (.clock(clock), .a(a),  .b(b),  .p(p));
  muulti #(.WIDTH(4), .SIGNED(1'b1)) dut4  (.clock(clock), .a(a4), .b(b4), .p(p4));

  initial begin
    clock = 1'b0;
    forever #5 clock = ~clock;
  end

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic signed [15:0] exp;
    a = '0; b = '0;
    a4 = 4'b1100; b4 = 4'b1010;
    @(posedge clock);
    #1;
    checks++;
    if (p4 !== 8'd24) begin
      failures++;
      $display("FAIL 4-bit example: %0d", $signed(p4));
    end
    for (int x = -128; x < 128; x++) begin
      for (int y = -128; y < 128; y++) begin
        a = 8'(x);
        b = 8'(y);
        exp = 16'(x * y);
        @(posedge clock);
        #1;
        checks++;
        if (p !== exp) begin
          failures++;
          $display("FAIL %0d * %0d: p=%0d expected %0d", x, y, $signed(p), exp);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
