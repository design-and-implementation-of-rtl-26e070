// booth_encoder: radix-4 Booth encoder for one group of multiplier bits.
//
// The group is three overlapping multiplier bits {x[2i+1], x[2i], x[2i-1]}.
// Its recoded digit is -2*x[2i+1] + x[2i] + x[2i-1], following the radix-4
// encoding table of the method:
//   000 -> 0   001 -> +1  010 -> +1  011 -> +2
//   100 -> -2  101 -> -1  110 -> -1  111 -> 0
// The digit leaves as one-hot magnitude selects (`one`, `two`) plus a sign
// (`neg`). Purely combinational, no clock.
module booth_encoder
  import booth_pkg::*;
(
  input  logic [2:0]   grp,    // {x[2i+1], x[2i], x[2i-1]}
  output booth_digit_t digit
);

  always_comb begin
    digit.one = grp[1] ^ grp[0];
    digit.two = (grp[2] & ~grp[1] & ~grp[0]) | (~grp[2] & grp[1] & grp[0]);
    // 111 encodes zero, so it is not flagged as negative.
    digit.neg = grp[2] & ~(grp[1] & grp[0]);
  end

endmodule
