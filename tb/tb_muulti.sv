// tb_muulti: end-to-end test of the 8 x 8 multiplier at its default
// parameters. It first applies the two operand pairs of the reference
// simulations (100 x 100 = 10000 and 11111100 x 00000011 = 756), then all
// 65536 operand pairs. New operands are applied after each rising edge; the
// product must appear at the next rising edge and not before (latency of
// one clock, one product per clock). The test counts how often each Booth
// digit value (0, +1, +2, -1, -2) and each operand with its MSB set occur,
// and fails if any never does.
module tb_muulti;
  import booth_pkg::*;

  logic        clock;
  logic [7:0]  a, b;
  logic [15:0] p;
  int checks = 0, failures = 0;
  int digit_count [5];       // index: digit value + 2
  int msb_a = 0, msb_b = 0, negated_rows = 0;

  muulti dut (.clock(clock), .a(a), .b(b), .p(p));

  initial begin
    clock = 1'b0;
    forever #5 clock = ~clock;
  end

  initial begin
    repeat (200000) @(posedge clock);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Applies one pair, checks the product one clock later.
  task automatic apply(input logic [7:0] x, input logic [7:0] y);
    logic [15:0] exp, p_prev;
    exp = 16'(x) * 16'(y);
    a = x;
    b = y;
    #1;
    p_prev = p;
    for (int i = 0; i < 5; i++) begin
      digit_count[booth_digit_value(dut.digits[i]) + 2]++;
      if (dut.digits[i].neg) negated_rows++;
    end
    if (x[7]) msb_a++;
    if (y[7]) msb_b++;
    @(negedge clock);
    // Not yet through the output register.
    checks++;
    if (p !== p_prev) begin
      failures++;
      $display("FAIL p changed before the clock edge");
    end
    @(posedge clock);
    #1;
    checks++;
    if (p !== exp) begin
      failures++;
      $display("FAIL %0d * %0d: p=%0d expected %0d", x, y, p, exp);
    end
  endtask

  initial begin
    a = '0;
    b = '0;
    @(posedge clock);
    #1;
    // Pairs shown by the reference simulations.
    apply(8'b01100100, 8'b01100100);
    checks++;
    if (p !== 16'b0010011100010000) begin
      failures++;
      $display("FAIL reference pair 1: %b", p);
    end
    apply(8'b11111100, 8'b00000011);
    checks++;
    if (p !== 16'b0000001011110100) begin
      failures++;
      $display("FAIL reference pair 2: %b", p);
    end
    for (int x = 0; x < 256; x++)
      for (int y = 0; y < 256; y++)
        apply(8'(x), 8'(y));
    for (int v = 0; v < 5; v++) begin
      checks++;
      if (digit_count[v] == 0) begin
        failures++;
        $display("FAIL Booth digit %0d never occurred", v - 2);
      end
    end
    checks++;
    if (msb_a == 0 || msb_b == 0 || negated_rows == 0) begin
      failures++;
      $display("FAIL operand MSB or negated row never exercised");
    end
    $display("digits -2:%0d -1:%0d 0:%0d +1:%0d +2:%0d, negated rows %0d, MSB set a:%0d b:%0d",
             digit_count[0], digit_count[1], digit_count[2], digit_count[3], digit_count[4],
             negated_rows, msb_a, msb_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
