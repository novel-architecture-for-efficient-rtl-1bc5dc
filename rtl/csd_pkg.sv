// csd_pkg: types and helper functions shared by the compact signed-digit
// (CSD) modular multiplier, the binary-to-CSD converter and the two
// exponentiators.
//
// A CSD multiplier operand is a list of digits, least significant first.
// Each digit has two fields: typ (the sign of its nonzero digit, 0 = +1,
// 1 = -1) and len (the number of zero bits below that nonzero digit, 0..2).
// The code len = 3 is a pure run of three zero bits with no nonzero digit.
// A digit with len = L < 3 therefore stands for d * 2^L and covers L + 1 bit
// positions; a digit with len = 3 covers three positions. The digits of one
// operand together cover exactly NBITS + 2 positions, so one Montgomery
// multiplication divides by R = 2^(NBITS+2).
package csd_pkg;

  typedef struct packed {
    logic       typ;   // 0: add the multiplicand, 1: subtract it
    logic [1:0] len;   // zero bits below the nonzero digit; 3 = zero group
  } csd_digit_t;

  localparam logic [1:0] LEN_ZERO_GROUP = 2'd3;

  // Largest number of digits an operand below 2^(nbits+1) can need:
  // at most two positions per digit, plus the first digit and the two extra
  // digits that the top-of-operand adjustment in the converter may add.
  function automatic int unsigned max_digits(int unsigned nbits);
    return (nbits + 2) / 2 + 4;
  endfunction

  // Width of the signed partial result inside the multiplier.
  function automatic int unsigned acc_width(int unsigned nbits);
    return nbits + 6;
  endfunction

endpackage
