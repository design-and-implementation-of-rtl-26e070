// booth_pkg: types and size functions shared by the radix-4 Booth multiplier.
//
// A radix-4 Booth digit takes one of the values 0, +1, +2, -1, -2. It is
// carried as three wires: `one` selects the multiplicand M, `two` selects 2M,
// and `neg` negates the selection. At most one of `one` and `two` is set;
// `neg` is never set together with a zero selection.
//
// The multiplier is extended before it is split into overlapping 3-bit
// groups. For signed operands it is sign-extended to an even width (the
// recoding steps of the method say to extend the sign bit by one position
// when the width is odd). For unsigned operands this design first adds a zero
// above the MSB, so that an operand with its MSB set is read as a positive
// number, and then pads to an even width; this costs one extra partial
// product and is this design's choice, made to match the unsigned products
// the reference 8x8 multiplier shows.
package booth_pkg;

  typedef struct packed {
    logic neg;  // digit is negative
    logic two;  // magnitude 2
    logic one;  // magnitude 1
  } booth_digit_t;

  // Width of the extended multiplier (always even).
  function automatic int unsigned booth_ext_width(int unsigned width, bit is_signed);
    int unsigned w;
    w = is_signed ? width : width + 1;
    return w + (w % 2);
  endfunction

  // Number of partial products (one per Booth digit).
  function automatic int unsigned booth_num_pp(int unsigned width, bit is_signed);
    return booth_ext_width(width, is_signed) / 2;
  endfunction

  // Signed value of a digit, for checks and assertions.
  function automatic int booth_digit_value(booth_digit_t d);
    int v;
    v = d.two ? 2 : (d.one ? 1 : 0);
    return d.neg ? -v : v;
  endfunction

endpackage
