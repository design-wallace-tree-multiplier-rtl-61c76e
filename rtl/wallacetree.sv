// wallacetree: 8x8 Wallace tree multiplier built from reversible gates.
//
// y = a * b, computed in three steps:
//   1. pp_gen         an AND array forms the 8 partial-product rows
//   2. wallace_reduce two stages of 4:2 compressors, full adders and half
//                     adders cut the 15 columns to two rows
//   3. final_rca      a ripple-carry adder adds those rows
// Columns 0-2 of the result need no adder and come straight from the
// reduction. Columns 3-15 and the carry out (bit 16) come from the adder.
//
// The compressors follow the published truth table, which maps four ones to 2
// instead of 4. The result is therefore exact for most operand pairs but
// lower than a * b for some (4229 of the 65536; 255 * 255 gives 56593). See
// README. For the exact product, a compressor that counts four ones
// correctly needs a carry out to the next column, which the published one
// does not have.
//
// Interface: a[7:0] multiplicand, b[7:0] multiplier, y[16:0] result. These are
// the published port names and widths. y[16] is the final carry out. It is
// never 1, because the result never exceeds 255 * 255.
// Timing: purely combinational, no clock.
module wallacetree
  import wallace_pkg::*;
(
  input  logic [A_W-1:0] a,
  input  logic [B_W-1:0] b,
  output logic [Y_W-1:0] y
);

  logic [B_W-1:0][A_W-1:0] pp;
  logic [RED_COLS-1:0]     row0;
  logic [14:3]             row1;
  logic [13:0]             sum_hi;  // columns 3..16

  pp_gen #(.A_W(A_W), .B_W(B_W)) u_pp (
    .a(a), .b(b), .pp(pp)
  );

  wallace_reduce u_red (
    .pp(pp), .row0(row0), .row1(row1)
  );

  final_rca #(.W(13)) u_rca (
    .x(row0[15:3]), .y(row1), .s(sum_hi)
  );

  assign y = {sum_hi, row0[2:0]};

endmodule
