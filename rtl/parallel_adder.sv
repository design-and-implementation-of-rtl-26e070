// parallel_adder: W-bit ripple-carry adder built from full adders.
//
// Adds the two rows left by the partial-product reduction into the final
// product: {cout, s} = a + b + cin. The carry ripples from bit 0 upwards;
// the ripple-carry form is this design's choice for the final adder.
// Combinational.
module parallel_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         cin,
  output logic [W-1:0] s,
  output logic         cout
);

  logic [W:0] c;
  assign c[0] = cin;

  for (genvar i = 0; i < W; i++) begin : g_bit
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[W];

endmodule
