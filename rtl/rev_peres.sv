// rev_peres: 3x3 reversible Peres gate.
//
// Inputs a, b, c; outputs p = a, q = a ^ b and r = (a & b) ^ c. It is the
// workhorse of this multiplier: with c = 0 it is a half adder (q = sum,
// r = carry), two of them make a full adder, and the 4:2 compressor uses
// three. The function is the published one. The insides are this design's
// choice: the textbook decomposition into a Toffoli gate followed by a CNOT
// on the first two lines, which gives exactly that function.
// Purely combinational.
module rev_peres (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  logic t_p, t_q;

  // Toffoli: r = a&b ^ c, lines a and b pass through.
  rev_toffoli u_tof (
    .a(a), .b(b), .c(c),
    .p(t_p), .q(t_q), .r(r)
  );

  // CNOT controlled by line a flips line b: q = a ^ b.
  rev_cnot u_cnot (
    .a(t_p), .b(t_q),
    .p(p),   .q(q)
  );

endmodule
