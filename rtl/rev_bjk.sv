// rev_bjk: 3x3 reversible BJK gate (printed "BJN" in some schematics).
//
// Inputs a, b, c; outputs p = a, q = b and r = (a | b) ^ c. With c = 0 the
// third line carries the OR of the first two; the 4:2 compressor uses it to
// merge the AND terms of its two input pairs. The function is the published
// one. Purely combinational.
module rev_bjk (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = b;
  assign r = (a | b) ^ c;

endmodule
