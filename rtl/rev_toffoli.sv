// rev_toffoli: 3x3 reversible Toffoli gate.
//
// Inputs a, b, c; outputs p = a, q = b and r = (a & b) ^ c. With c tied to 0
// the gate computes an AND without losing its inputs. The function follows the
// gate's truth table. Here it is the first half of the Peres gate
// (rev_peres), which follows it with a CNOT. Purely combinational.
module rev_toffoli (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);

  assign p = a;
  assign q = b;
  assign r = (a & b) ^ c;

endmodule
