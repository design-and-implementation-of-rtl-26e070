// tb_parallel_adder: the 16-bit ripple-carry adder against the built-in
// addition, for random operands, both carry-in values and the corner cases
// that carry through every bit.
module tb_parallel_adder;
  logic [15:0] a, b, s;
  logic        cin, cout;
  int checks = 0, failures = 0;

  parallel_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  task automatic check();
    logic [16:0] exp;
    #1;
    exp = {1'b0, a} + {1'b0, b} + 17'(cin);
    checks++;
    if ({cout, s} !== exp) begin
      failures++;
      $display("FAIL %h + %h + %b = %h, expected %h", a, b, cin, {cout, s}, exp);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 16'hffff; b = 16'h0000; cin = 1'b1; check();
    a = 16'hffff; b = 16'hffff; cin = 1'b1; check();
    a = 16'h8000; b = 16'h8000; cin = 1'b0; check();
    a = 16'h0000; b = 16'h0000; cin = 1'b0; check();
    for (int t = 0; t < 20000; t++) begin
      a = 16'($urandom);
      b = 16'($urandom);
      cin = 1'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
