// rev_cnot: 2x2 reversible CNOT (Feynman) gate.
//
// Inputs a, b; outputs p = a and q = a ^ b. With b tied to 0 the gate copies
// a onto q, which is how reversible circuits fan a signal out. The function is
// the one given for the gate (Table 1 of its truth table); the gate is purely
// combinational with no timing of its own.
module rev_cnot (
  input  logic a,
  input  logic b,
  output logic p,
  output logic q
);

  assign p = a;
  assign q = a ^ b;

endmodule
