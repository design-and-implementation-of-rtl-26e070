// pp_reduction: reduces ROWS partial-product rows to two rows.
//
// A chain of carry-save stages, each a row of full adders (3:2 counters),
// folds one more row into a running sum/carry pair; the carries move one
// bit up at every stage and the carry out of the top bit is dropped, so
// sum + carry equals the sum of all rows modulo 2^W. A linear chain is the
// simplest reduction structure; the reference design does not say which
// structure it uses. Combinational.
module pp_reduction #(
  parameter int unsigned ROWS = 6,   // 5 partial products + the correction row
  parameter int unsigned W    = 16
) (
  input  logic [ROWS-1:0][W-1:0] rows,
  output logic [W-1:0]           sum,
  output logic [W-1:0]           carry
);

  if (ROWS < 2) begin : g_bad
    $error("pp_reduction needs at least two rows");
  end

  // Running pair after each stage; stage k folds in rows[k+2].
  logic [ROWS-2:0][W-1:0] s_chain;
  logic [ROWS-2:0][W-1:0] c_chain;

  assign s_chain[0] = rows[0];
  assign c_chain[0] = rows[1];

  for (genvar k = 0; k < ROWS - 2; k++) begin : g_stage
    logic [W-1:0] co;
    for (genvar b = 0; b < W; b++) begin : g_bit
      full_adder u_fa (
        .a (s_chain[k][b]),
        .b (c_chain[k][b]),
        .ci(rows[k+2][b]),
        .s (s_chain[k+1][b]),
        .co(co[b])
      );
    end
    // The carry out of the top bit has weight 2^W and is dropped.
    logic unused_top_co;
    assign unused_top_co = co[W-1];
    assign c_chain[k+1]  = {co[W-2:0], 1'b0};
  end

  assign sum   = s_chain[ROWS-2];
  assign carry = c_chain[ROWS-2];

endmodule
