// roba_pkg: constants shared by the rounding-based approximate (ROBA)
// multipliers.
//
// ROBA_N is the default operand width. The 8-bit default matches an
// implementation with 32 I/O pins (two 8-bit operands, one 16-bit product);
// every module takes the width as a parameter, so any N >= 4 can be built.
package roba_pkg;

  // Default operand width in bits (the product is 2*ROBA_N bits).
  localparam int unsigned ROBA_N = 8;

  // Smallest width for which the rounding equations are defined: the generic
  // bit equation reaches two bits below the bit it produces, and bits 0..2
  // have their own special terms.
  localparam int unsigned ROBA_MIN_N = 4;

endpackage
