// wallace_ref_pkg: reference model of the 8x8 reduction for the testbenches.
//
// The model works on columns of bits, not on gates. Each reduction stage is
// described only by how many compressors (C), full adders (F) and half
// adders (H) it places in each column; the rest of a column passes down
// unchanged. Elements take a column's bits in order: compressors first, then
// full adders, then half adders, then the untouched bits. The new column
// holds, in order, the sums made in it, the untouched bits, and the carries
// from the column to its right. A full or half adder outputs the binary count
// of its ones. A compressor outputs sum = count & 1, carry = (count >= 2).
// This is the published table, which turns four ones into 2. The
// final two rows are added exactly. The model also counts those four-ones
// events per stage.
package wallace_ref_pkg;

  localparam int NCOL = 16;

  // Element counts per column 0..15, stage 1 and stage 2.
  localparam int S1_C [NCOL] = '{0,0,0,1,1,1,1,2,1,1,1,1,0,0,0,0};
  localparam int S1_F [NCOL] = '{0,0,1,0,0,0,1,0,1,0,0,0,1,0,0,0};
  localparam int S1_H [NCOL] = '{0,1,0,0,0,1,0,0,0,1,0,0,0,1,0,0};
  localparam int S2_C [NCOL] = '{0,0,0,0,0,0,1,1,1,1,1,0,0,0,0,0};
  localparam int S2_F [NCOL] = '{0,0,0,0,1,1,0,0,0,0,0,0,0,0,0,0};
  localparam int S2_H [NCOL] = '{0,0,1,1,0,0,0,0,0,0,0,1,1,1,1,0};

  typedef struct {
    int unsigned value;      // weighted sum of the two final rows
    int          sat [2];    // compressors that saw four ones, per stage
    int          max_height; // tallest column after stage 2 (must be <= 2)
    logic [15:0] row0;       // first bit of each final column
    logic [15:0] row1;       // second bit (0 where the column has one bit)
  } ref_result_t;

  typedef bit col_t [$];

  function automatic void reduce_stage(input col_t cin [NCOL], input int nc [NCOL],
                                       input int nf [NCOL], input int nh [NCOL],
                                       output col_t cout [NCOL], output int sat);
    col_t sums [NCOL];
    col_t keep [NCOL];
    col_t cys  [NCOL];
    sat = 0;
    for (int c = 0; c < NCOL; c++) begin
      int k = 0;
      int n;
      for (int e = 0; e < nc[c] + nf[c] + nh[c]; e++) begin
        int ones = 0;
        n = (e < nc[c]) ? 4 : (e < nc[c] + nf[c]) ? 3 : 2;
        for (int j = 0; j < n; j++) ones += int'(cin[c][k+j]);
        k += n;
        if (n == 4) begin
          if (ones == 4) sat++;
          sums[c].push_back(bit'(ones & 1));
          cys[c+1].push_back(ones >= 2);
        end else begin
          sums[c].push_back(bit'(ones & 1));
          cys[c+1].push_back(bit'(ones >> 1));
        end
      end
      while (k < cin[c].size()) begin
        keep[c].push_back(cin[c][k]);
        k++;
      end
    end
    for (int c = 0; c < NCOL; c++) cout[c] = {sums[c], keep[c], cys[c]};
  endfunction

  // pp[r][k] sits in column r + k.
  function automatic ref_result_t reduce(input logic [7:0][7:0] pp);
    ref_result_t res;
    col_t c0 [NCOL];
    col_t c1 [NCOL];
    col_t c2 [NCOL];
    for (int r = 0; r < 8; r++)
      for (int k = 0; k < 8; k++) c0[r+k].push_back(pp[r][k]);
    reduce_stage(c0, S1_C, S1_F, S1_H, c1, res.sat[0]);
    reduce_stage(c1, S2_C, S2_F, S2_H, c2, res.sat[1]);
    res.value = 0;
    res.max_height = 0;
    res.row0 = '0;
    res.row1 = '0;
    for (int c = 0; c < NCOL; c++) begin
      if (c2[c].size() > res.max_height) res.max_height = c2[c].size();
      if (c2[c].size() > 0) res.row0[c] = c2[c][0];
      if (c2[c].size() > 1) res.row1[c] = c2[c][1];
      foreach (c2[c][j]) res.value += int'(c2[c][j]) << c;
    end
    return res;
  endfunction

  function automatic logic [7:0][7:0] partial_products(input logic [7:0] a, input logic [7:0] b);
    logic [7:0][7:0] pp;
    for (int r = 0; r < 8; r++) pp[r] = b[r] ? a : 8'h00;
    return pp;
  endfunction

endpackage
