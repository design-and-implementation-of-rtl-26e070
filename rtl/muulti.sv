// muulti: radix-4 (modified Booth) multiplier, 8 x 8 -> 16 bits by default.
//
// Data flow, in three stages:
//   1. booth_recoder recodes the multiplier b into NUM_PP radix-4 digits
//      in {0, +-1, +-2}, halving the number of partial products;
//   2. pp_generator forms the partial products d_i * a * 4^i and
//      pp_reduction compresses them (plus the row of +1 corrections for
//      negated products) to a sum row and a carry row;
//   3. parallel_adder adds those two rows into the product.
// The product is registered on the rising edge of `clock`: p shows
// a * b one clock after a and b are applied (latency 1, one result per
// clock). There is no reset; p holds an undefined value until the first
// edge.
//
// The top name, the port names and widths (a, b: 8 bits, clock, p: 16
// bits) follow the reference schematic. a is taken as the multiplicand and
// b as the multiplier. With the default SIGNED = 0 both operands are
// unsigned (e.g. 252 * 3 = 756), matching the products the reference
// design shows; SIGNED = 1 multiplies two's-complement operands instead.
// The output register and the choice of reduction and adder structure are
// this design's own.
module muulti
  import booth_pkg::*;
#(
  parameter int unsigned WIDTH  = 8,
  parameter bit          SIGNED = 1'b0
) (
  input  logic               clock,
  input  logic [WIDTH-1:0]   a,       // multiplicand
  input  logic [WIDTH-1:0]   b,       // multiplier
  output logic [2*WIDTH-1:0] p        // product, registered
);

  localparam int unsigned NUM_PP = booth_num_pp(WIDTH, SIGNED);
  localparam int unsigned PW     = 2 * WIDTH;
  localparam int unsigned ROWS   = NUM_PP + 1;

  booth_digit_t [NUM_PP-1:0] digits;
  logic [NUM_PP-1:0][PW-1:0] pp_rows;
  logic [PW-1:0]             neg_row;
  logic [ROWS-1:0][PW-1:0]   all_rows;
  logic [PW-1:0]             red_sum;
  logic [PW-1:0]             red_carry;
  logic [PW-1:0]             product;
  logic                      unused_cout;

  booth_recoder #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_rec (
    .y     (b),
    .digits(digits)
  );

  pp_generator #(.WIDTH(WIDTH), .SIGNED(SIGNED)) u_ppg (
    .m      (a),
    .digits (digits),
    .rows   (pp_rows),
    .neg_row(neg_row)
  );

  assign all_rows = {neg_row, pp_rows};

  pp_reduction #(.ROWS(ROWS), .W(PW)) u_red (
    .rows (all_rows),
    .sum  (red_sum),
    .carry(red_carry)
  );

  parallel_adder #(.W(PW)) u_add (
    .a   (red_sum),
    .b   (red_carry),
    .cin (1'b0),
    .s   (product),
    .cout(unused_cout)
  );

  always_ff @(posedge clock) begin
    p <= product;
  end

endmodule
