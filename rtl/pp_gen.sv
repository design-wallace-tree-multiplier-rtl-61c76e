// pp_gen: partial-product generator, an array of AND gates.
//
// Row r of the output is the multiplicand a if multiplier bit b[r] is 1, and
// all zeros otherwise: pp[r][k] = a[k] & b[r]. That bit has weight 2^(r+k).
// The AND array is the published first step. The widths default to the
// published 8x8 size. Purely combinational, one gate deep.
module pp_gen #(
  parameter int unsigned A_W = wallace_pkg::A_W,  // multiplicand width
  parameter int unsigned B_W = wallace_pkg::B_W   // multiplier width
) (
  input  logic [A_W-1:0]          a,
  input  logic [B_W-1:0]          b,
  output logic [B_W-1:0][A_W-1:0] pp
);

  always_comb begin
    for (int r = 0; r < B_W; r++) begin
      pp[r] = a & {A_W{b[r]}};
    end
  end

endmodule
