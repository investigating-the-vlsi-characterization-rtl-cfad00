// mbe_pkg: types shared by the radix-4 Modified Booth (MBE) multiplier.
//
// A radix-4 Booth digit takes one of the values {-2,-1,0,+1,+2}. The encoder
// does not pass the digit on as a number but as three select lines, the form
// in which the partial-product generator consumes it:
//   one : the row is the multiplicand A (|digit| = 1)
//   two : the row is the multiplicand shifted left once, 2A (|digit| = 2)
//   neg : the row is inverted and a +1 is added in its lowest column
// At most one of `one` and `two` is set; with neither set the row is zero.
package mbe_pkg;

  typedef struct packed {
    logic neg;
    logic two;
    logic one;
  } mbe_sel_t;

  // Digit value of a select word, for checks and debugging.
  function automatic int mbe_digit(mbe_sel_t s);
    int mag;
    mag = s.two ? 2 : (s.one ? 1 : 0);
    return s.neg ? -mag : mag;
  endfunction

endpackage
