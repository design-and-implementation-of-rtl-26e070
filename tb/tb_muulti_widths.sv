// tb_muulti_widths: the multiplier at odd and small operand widths, where
// the multiplier must be extended to an even width before recoding: 5-bit
// and 7-bit operands, unsigned and signed, plus 4-bit unsigned. Every
// operand pair is checked one clock after it is applied, and the number of
// Booth digits is checked against (n+1)/2 for odd signed widths.
module tb_muulti_widths;
  import booth_pkg::*;

  logic        clock;
  logic [6:0]  a, b;
  logic [9:0]  p5u, p5s;
  logic [13:0] p7u, p7s;
  logic [7:0]  p4u;
  int checks = 0, failures = 0;

  muulti #(.WIDTH(5), .SIGNED(1'b0)) u5u (.clock(clock), .a(a[4:0]), .b(b[4:0]), .p(p5u));
  muulti #(.WIDTH(5), .SIGNED(1'b1)) u5s (.clock(clock), .a(a[4:0]), .b(b[4:0]), .p(p5s));
  muulti #(.WIDTH(7), .SIGNED(1'b0)) u7u (.clock(clock), .a(a),      .b(b),      .p(p7u));
  muulti #(.WIDTH(7), .SIGNED(1'b1)) u7s (.clock(clock), .a(a),      .b(b),      .p(p7s));
  muulti #(.WIDTH(4), .SIGNED(1'b0)) u4u (.clock(clock), .a(a[3:0]), .b(b[3:0]), .p(p4u));

  initial begin
    clock = 1'b0;
    forever #5 clock = ~clock;
  end

  initial begin
    repeat (100000) @(posedge clock);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input string what, input longint got, input longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: a=%0d b=%0d got %0d expected %0d", what, a, b, got, exp);
    end
  endtask

  initial begin
    // (n+1)/2 digits for odd signed n; unsigned adds one bit first.
    expect_eq("digits 5s", longint'(booth_num_pp(5, 1'b1)), 3);
    expect_eq("digits 7s", longint'(booth_num_pp(7, 1'b1)), 4);
    expect_eq("digits 5u", longint'(booth_num_pp(5, 1'b0)), 3);
    expect_eq("digits 8s", longint'(booth_num_pp(8, 1'b1)), 4);
    expect_eq("digits 8u", longint'(booth_num_pp(8, 1'b0)), 5);
    for (int x = 0; x < 128; x++) begin
      for (int y = 0; y < 128; y++) begin
        a = 7'(x);
        b = 7'(y);
        @(posedge clock);
        #1;
        expect_eq("7u", longint'(p7u), longint'(x * y));
        expect_eq("7s", longint'($signed(p7s)), longint'($signed(a)) * longint'($signed(b)));
        expect_eq("5u", longint'(p5u), longint'(a[4:0]) * longint'(b[4:0]));
        expect_eq("5s", longint'($signed(p5s)), longint'($signed(a[4:0])) * longint'($signed(b[4:0])));
        expect_eq("4u", longint'(p4u), longint'(a[3:0]) * longint'(b[3:0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
