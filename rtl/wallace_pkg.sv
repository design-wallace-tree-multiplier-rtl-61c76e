// wallace_pkg: sizes shared by the 8x8 Wallace tree multiplier.
//
// The multiplier takes an 8-bit multiplicand and an 8-bit multiplier and
// returns a 17-bit result: 15 columns of partial products (weights 2^0 to
// 2^14), one column that only a carry reaches (2^15) and the carry out of
// the final ripple-carry adder (2^16). The 8x8 size and the 17-bit result
// port follow the published design; the package itself is only a container.
package wallace_pkg;

  // Operand widths of the published design.
  localparam int unsigned A_W = 8;  // multiplicand
  localparam int unsigned B_W = 8;  // multiplier

  // Columns left after the two reduction stages (one more, reached by a carry).
  localparam int unsigned RED_COLS = A_W + B_W;

  // Result width: the final adder's carry out adds one bit above A_W+B_W.
  localparam int unsigned Y_W = A_W + B_W + 1;

endpackage
