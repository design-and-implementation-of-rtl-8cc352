// Shared types for the radix-16 Booth multiplier.
//
// A radix-16 Booth digit lies in -8..+8. It is carried between the encoder
// and the partial-product generator as a sign flag and a 4-bit magnitude,
// so that the generator selects a multiple 0..8 of the multiplicand and
// then decides whether to negate it. A zero digit always has neg = 0.
package booth16_pkg;

  typedef struct packed {
    logic       neg;  // digit is negative
    logic [3:0] mag;  // |digit|, 0..8
  } booth_digit_t;

  // Number of 4-bit Booth groups for an n-bit multiplier.
  function automatic int unsigned num_groups(int unsigned n);
    return n / 4;
  endfunction

endpackage
