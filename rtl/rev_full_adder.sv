// rev_full_adder: full adder made of two reversible Peres gates.
//
// The first Peres gate, fed (a, b, 0), gives a ^ b and a & b. The second is
// fed (cin, a ^ b, a & b): its q output is sum = a ^ b ^ cin and its r output
// is carry = cin & (a ^ b) ^ (a & b), which is the majority of the three
// inputs. The two p outputs are garbage lines (g1 = a, g2 = cin) and are left
// unused. This is the published two-Peres construction. Purely combinational,
// two gates deep.
module rev_full_adder (
  input  logic a,
  input  logic b,
  input  logic cin,
  output logic sum,
  output logic carry
);

  logic g1, g2;
  logic ab_x, ab_a;

  rev_peres u_pg1 (
    .a(a), .b(b), .c(1'b0),
    .p(g1), .q(ab_x), .r(ab_a)
  );

  rev_peres u_pg2 (
    .a(cin), .b(ab_x), .c(ab_a),
    .p(g2),  .q(sum),  .r(carry)
  );

endmodule
