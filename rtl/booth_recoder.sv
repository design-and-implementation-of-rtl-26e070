// booth_recoder: recodes a whole multiplier into radix-4 Booth digits.
//
// Following the method's recoding steps, the multiplier is extended to an
// even width (sign extension for signed operands; for unsigned operands a
// zero bit is added first, see booth_pkg), a 0 is appended right of the
// LSB, and the result is cut into NUM_PP overlapping 3-bit groups, group i
// being bits {2i+1, 2i, 2i-1}. Each group goes through a booth_encoder.
// The weighted digits sum to the multiplier: sum(d_i * 4^i) == y.
// Combinational.
module booth_recoder
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH     = 8,
  parameter bit          SIGNED    = 1'b0,
  localparam int unsigned EXT_W    = booth_ext_width(WIDTH, SIGNED),
  localparam int unsigned NUM_PP   = booth_num_pp(WIDTH, SIGNED)
) (
  input  logic [WIDTH-1:0]                y,       // multiplier
  output booth_digit_t [NUM_PP-1:0]       digits   // digit i has weight 4^i
);

  logic [EXT_W-1:0] y_ext;
  logic [EXT_W:0]   y_pad;   // extended multiplier with the appended 0

  always_comb begin
    y_ext = {{(EXT_W-WIDTH){SIGNED ? y[WIDTH-1] : 1'b0}}, y};
    y_pad = {y_ext, 1'b0};
  end

  for (genvar i = 0; i < NUM_PP; i++) begin : g_enc
    booth_encoder u_enc (
      .grp  (y_pad[2*i +: 3]),
      .digit(digits[i])
    );
  end

endmodule
