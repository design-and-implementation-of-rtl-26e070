// pp_generator: forms the radix-4 Booth partial products.
//
// For each Booth digit d_i the partial product d_i * M is selected from
// 0, +M, -M, +2M, -2M. The multiplicand M is first extended by two bits
// (sign or zero, per SIGNED) so that 2M fits. A negative partial product is
// formed as the one's complement of the selected value; the missing +1 is
// not added here but returned as bit 2i of `neg_row`, to be summed with the
// rows by the reduction stage. Each row is sign-extended to the full
// product width 2*WIDTH and shifted left by 2i (its weight 4^i); bits above
// the product width are dropped, since the product is exact modulo 2^(2N).
// This plain sign-extension scheme (no sign-extension-prevention bits) is
// this design's choice. Combinational.
module pp_generator
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH    = 8,
  parameter bit          SIGNED   = 1'b0,
  localparam int unsigned NUM_PP  = booth_num_pp(WIDTH, SIGNED),
  localparam int unsigned PW      = 2 * WIDTH
) (
  input  logic [WIDTH-1:0]            m,        // multiplicand
  input  booth_digit_t [NUM_PP-1:0]   digits,   // from booth_recoder
  output logic [NUM_PP-1:0][PW-1:0]   rows,     // aligned partial products
  output logic [PW-1:0]               neg_row   // +1 corrections of negative rows
);

  localparam int unsigned MW = WIDTH + 2;

  logic [MW-1:0] m_ext;
  assign m_ext = {{2{SIGNED ? m[WIDTH-1] : 1'b0}}, m};

  for (genvar i = 0; i < NUM_PP; i++) begin : g_pp
    logic [MW-1:0] sel;
    logic [MW-1:0] pp;
    logic [PW-1:0] pp_ext;

    always_comb begin
      unique case (1'b1)
        digits[i].one: sel = m_ext;
        digits[i].two: sel = {m_ext[MW-2:0], 1'b0};
        default:       sel = '0;
      endcase
      pp     = sel ^ {MW{digits[i].neg}};
      pp_ext = {{(PW-MW){pp[MW-1]}}, pp};
      rows[i] = pp_ext << (2 * i);
    end
  end

  always_comb begin
    neg_row = '0;
    for (int i = 0; i < NUM_PP; i++) begin
      if (2 * i < PW) neg_row[2*i] = digits[i].neg;
    end
  end

endmodule
