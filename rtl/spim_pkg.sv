// spim_pkg: types and constants shared by the iterative 4-2 multiplier.
//
// A radix-4 (modified 2-bit) Booth digit is carried as three wires, as the
// select lines that drive across the array: `one` picks the multiplicand,
// `two` picks it shifted left by one, and `neg` inverts the picked value.
// A digit of zero has all three low. The rounding mode follows the four
// modes of IEEE 754; the encoding is this design's own choice.
// Document: the digit select lines. Own choice: the enum encoding.
package spim_pkg;

  typedef struct packed {
    logic neg;   // digit is negative
    logic two;   // |digit| == 2
    logic one;   // |digit| == 1
  } booth_digit_t;

  typedef enum logic [1:0] {
    RND_NEAREST = 2'd0,  // round to nearest, ties to even
    RND_ZERO    = 2'd1,  // round toward zero (truncate)
    RND_POS_INF = 2'd2,  // round toward +infinity
    RND_NEG_INF = 2'd3   // round toward -infinity
  } round_mode_t;

endpackage
