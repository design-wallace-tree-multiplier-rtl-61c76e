// rev_compressor42: 4:2 compressor built from reversible gates.
//
// Four bits of one column (a, b, c, d) go in. Two bits come out: sum, with the
// weight of the column, and carry, with twice that weight. There is no carry
// in and no carry out to a neighbouring compressor. The function is the
// published truth table:
//   sum   = a ^ b ^ c ^ d
//   carry = (a ^ b)(c ^ d) + ab + cd
// The output is exact for zero to three ones. Four ones give sum = 0 and
// carry = 1, which is 2 instead of 4. The compressor is therefore approximate,
// and so is the multiplier built on it (see README).
//
// The gate arrangement is this design's own. It uses Peres and BJK gates, the
// CNOT being inside each Peres gate:
//   PG1 (a, b, 0)        -> x1 = a ^ b,  g1 = a & b
//   PG2 (c, d, 0)        -> x2 = c ^ d,  g2 = c & d
//   BJK (g1, g2, 0)      -> g  = g1 | g2
//   PG3 (x1, x2, g)      -> sum = x1 ^ x2,  carry = (x1 & x2) ^ g
// x1 & x2 and g are never 1 together (x1 = 1 means a != b, so a & b = 0), so
// the XOR in PG3 acts as the OR of the carry equation. Purely combinational,
// three gates deep.
module rev_compressor42 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic sum,
  output logic carry
);

  logic x1, x2, g1, g2, g;
  logic unused_p1, unused_p2, unused_p3, unused_q4, unused_p4;

  rev_peres u_pg1 (
    .a(a), .b(b), .c(1'b0),
    .p(unused_p1), .q(x1), .r(g1)
  );

  rev_peres u_pg2 (
    .a(c), .b(d), .c(1'b0),
    .p(unused_p2), .q(x2), .r(g2)
  );

  rev_bjk u_bjk (
    .a(g1), .b(g2), .c(1'b0),
    .p(unused_p4), .q(unused_q4), .r(g)
  );

  rev_peres u_pg3 (
    .a(x1), .b(x2), .c(g),
    .p(unused_p3), .q(sum), .r(carry)
  );

endmodule
