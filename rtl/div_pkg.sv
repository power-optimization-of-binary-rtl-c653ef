// div_pkg: constants shared by the six 16-by-16-bit signed dividers.
//
// All dividers take a signed N-bit dividend and divisor, divide their
// magnitudes and negate the quotient when the operand signs differ. The
// quotient has 2N bits: N integer bits and N fraction bits (16.16 fixed
// point for the default N = 16), so -10 / 3 gives -3.333 (0xFFFC_AAAB for
// the 2N-bit results). The default width of 16 bits is the width used
// throughout the design; the 16.16 result format follows the Q16.16 result
// register of the block-diagram versions.
package div_pkg;

  // Default operand width of every divider.
  localparam int unsigned DIV_N = 16;

endpackage
