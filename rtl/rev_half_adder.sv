// rev_half_adder: half adder made of one reversible Peres gate.
//
// The Peres gate is fed (a, b, 0): its q output is sum = a ^ b and its r
// output is carry = a & b. Its p output (a copy of a) is a garbage line and
// is left unused. This is the published construction. Purely combinational,
// one gate deep.
module rev_half_adder (
  input  logic a,
  input  logic b,
  output logic sum,
  output logic carry
);

  logic garbage;

  rev_peres u_pg (
    .a(a), .b(b), .c(1'b0),
    .p(garbage), .q(sum), .r(carry)
  );

endmodule
