// final_rca: ripple-carry adder for the last two rows of the Wallace tree.
//
// It adds x[W-1:0] and y[W-2:0]. The top position has only x, because in a
// multiplier the second of the two final rows stops one column short. Position
// 0 is a half adder, positions 1..W-2 are full adders fed by the carry of the
// position below, and position W-1 is a half adder on x[W-1] and the
// incoming carry. s[W] is the carry out. The adders are the reversible
// half and full adders.
// Adding the last two rows with a ripple-carry adder is the published scheme.
// The HA/FA/.../HA arrangement is as the reduction diagram draws it (half adder
// at column 3, full adders at 4..14, half adder at 15). The default W = 13
// covers columns 3..15 of the 8x8 multiplier.
// Purely combinational; the carry ripples through W positions.
module final_rca #(
  parameter int unsigned W = 13  // positions, at least 3
) (
  input  logic [W-1:0] x,
  input  logic [W-2:0] y,
  output logic [W:0]   s
);

  logic [W-1:0] c;  // c[i]: carry out of position i

  rev_half_adder u_ha_lo (
    .a(x[0]), .b(y[0]), .sum(s[0]), .carry(c[0])
  );

  for (genvar i = 1; i < W - 1; i++) begin : g_fa
    rev_full_adder u_fa (
      .a(x[i]), .b(y[i]), .cin(c[i-1]), .sum(s[i]), .carry(c[i])
    );
  end

  rev_half_adder u_ha_hi (
    .a(x[W-1]), .b(c[W-2]), .sum(s[W-1]), .carry(c[W-1])
  );

  assign s[W] = c[W-1];

endmodule
