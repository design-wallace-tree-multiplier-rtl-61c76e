// wallace_reduce: two-stage Wallace reduction of an 8x8 partial-product matrix.
//
// Input pp[r][k] is bit k of partial-product row r (a[k] & b[r]). It sits in
// column r+k. The 15 columns are 1,2,..,8,..,2,1 bits high. Two stages
// of 4:2 compressors, full adders and half adders cut them to at most two bits
// per column. The output is two rows:
//   row0[15:0]  one bit in every column 0..15
//   row1[14:3]  the second bit of columns 3..14 (columns 0-2 and 15 have one)
// The final ripple-carry adder (final_rca) adds them.
//
// The placement of every compressor, full adder, half adder and untouched bit
// is the published reduction diagram for the 8x8 case:
//   stage 1: 10 compressors, 4 full adders, 4 half adders; columns become
//            1,1,2,2,3,3,4,4,4,4,4,2,2,2,2 bits high
//   stage 2:  5 compressors (columns 6-10), 2 full adders (4,5), 6 half
//            adders (2,3,11-14); columns become 1,1,1,2,...,2,1
// Every sum stays in its column and every carry moves one column to the left.
// The diagram does not say which bits of a column feed which element. This
// design's choice: an element takes the column's next bits in order. In stage
// 1 that is in increasing row order, so a compressor gets the lowest rows. In
// stage 2 the column's sums come first, then untouched bits, then incoming
// carries. With exact adders the choice would not matter. With the
// approximate compressor it decides which operand pairs come out wrong.
//
// Purely combinational. Longest path: compressor (3 gates) + compressor (3).
module wallace_reduce (
  input  logic [7:0][7:0] pp,
  output logic [15:0]     row0,
  output logic [14:3]     row1
);

  // internal nets
  logic st1_c1_ha0_sum;
  logic st1_c1_ha0_cy;
  logic st1_c2_fa0_sum;
  logic st1_c2_fa0_cy;
  logic st1_c3_cmp0_sum;
  logic st1_c3_cmp0_cy;
  logic st1_c4_cmp0_sum;
  logic st1_c4_cmp0_cy;
  logic st1_c5_cmp0_sum;
  logic st1_c5_cmp0_cy;
  logic st1_c5_ha0_sum;
  logic st1_c5_ha0_cy;
  logic st1_c6_cmp0_sum;
  logic st1_c6_cmp0_cy;
  logic st1_c6_fa0_sum;
  logic st1_c6_fa0_cy;
  logic st1_c7_cmp0_sum;
  logic st1_c7_cmp0_cy;
  logic st1_c7_cmp1_sum;
  logic st1_c7_cmp1_cy;
  logic st1_c8_cmp0_sum;
  logic st1_c8_cmp0_cy;
  logic st1_c8_fa0_sum;
  logic st1_c8_fa0_cy;
  logic st1_c9_cmp0_sum;
  logic st1_c9_cmp0_cy;
  logic st1_c9_ha0_sum;
  logic st1_c9_ha0_cy;
  logic st1_c10_cmp0_sum;
  logic st1_c10_cmp0_cy;
  logic st1_c11_cmp0_sum;
  logic st1_c11_cmp0_cy;
  logic st1_c12_fa0_sum;
  logic st1_c12_fa0_cy;
  logic st1_c13_ha0_sum;
  logic st1_c13_ha0_cy;
  logic [0:0] s1_c0;
  logic [0:0] s1_c1;
  logic [1:0] s1_c2;
  logic [1:0] s1_c3;
  logic [2:0] s1_c4;
  logic [2:0] s1_c5;
  logic [3:0] s1_c6;
  logic [3:0] s1_c7;
  logic [3:0] s1_c8;
  logic [3:0] s1_c9;
  logic [3:0] s1_c10;
  logic [1:0] s1_c11;
  logic [1:0] s1_c12;
  logic [1:0] s1_c13;
  logic [1:0] s1_c14;
  logic st2_c2_ha0_sum;
  logic st2_c2_ha0_cy;
  logic st2_c3_ha0_sum;
  logic st2_c3_ha0_cy;
  logic st2_c4_fa0_sum;
  logic st2_c4_fa0_cy;
  logic st2_c5_fa0_sum;
  logic st2_c5_fa0_cy;
  logic st2_c6_cmp0_sum;
  logic st2_c6_cmp0_cy;
  logic st2_c7_cmp0_sum;
  logic st2_c7_cmp0_cy;
  logic st2_c8_cmp0_sum;
  logic st2_c8_cmp0_cy;
  logic st2_c9_cmp0_sum;
  logic st2_c9_cmp0_cy;
  logic st2_c10_cmp0_sum;
  logic st2_c10_cmp0_cy;
  logic st2_c11_ha0_sum;
  logic st2_c11_ha0_cy;
  logic st2_c12_ha0_sum;
  logic st2_c12_ha0_cy;
  logic st2_c13_ha0_sum;
  logic st2_c13_ha0_cy;
  logic st2_c14_ha0_sum;
  logic st2_c14_ha0_cy;
  logic [0:0] s2_c0;
  logic [0:0] s2_c1;
  logic [0:0] s2_c2;
  logic [1:0] s2_c3;
  logic [1:0] s2_c4;
  logic [1:0] s2_c5;
  logic [1:0] s2_c6;
  logic [1:0] s2_c7;
  logic [1:0] s2_c8;
  logic [1:0] s2_c9;
  logic [1:0] s2_c10;
  logic [1:0] s2_c11;
  logic [1:0] s2_c12;
  logic [1:0] s2_c13;
  logic [1:0] s2_c14;
  logic [0:0] s2_c15;

  // ---- stage 1 ----
  rev_half_adder u_st1_c1_ha0 (.a(pp[0][1]), .b(pp[1][0]), .sum(st1_c1_ha0_sum), .carry(st1_c1_ha0_cy));
  rev_full_adder u_st1_c2_fa0 (.a(pp[0][2]), .b(pp[1][1]), .cin(pp[2][0]), .sum(st1_c2_fa0_sum), .carry(st1_c2_fa0_cy));
  rev_compressor42 u_st1_c3_cmp0 (.a(pp[0][3]), .b(pp[1][2]), .c(pp[2][1]), .d(pp[3][0]), .sum(st1_c3_cmp0_sum), .carry(st1_c3_cmp0_cy));
  rev_compressor42 u_st1_c4_cmp0 (.a(pp[0][4]), .b(pp[1][3]), .c(pp[2][2]), .d(pp[3][1]), .sum(st1_c4_cmp0_sum), .carry(st1_c4_cmp0_cy));
  rev_compressor42 u_st1_c5_cmp0 (.a(pp[0][5]), .b(pp[1][4]), .c(pp[2][3]), .d(pp[3][2]), .sum(st1_c5_cmp0_sum), .carry(st1_c5_cmp0_cy));
  rev_half_adder u_st1_c5_ha0 (.a(pp[4][1]), .b(pp[5][0]), .sum(st1_c5_ha0_sum), .carry(st1_c5_ha0_cy));
  rev_compressor42 u_st1_c6_cmp0 (.a(pp[0][6]), .b(pp[1][5]), .c(pp[2][4]), .d(pp[3][3]), .sum(st1_c6_cmp0_sum), .carry(st1_c6_cmp0_cy));
  rev_full_adder u_st1_c6_fa0 (.a(pp[4][2]), .b(pp[5][1]), .cin(pp[6][0]), .sum(st1_c6_fa0_sum), .carry(st1_c6_fa0_cy));
  rev_compressor42 u_st1_c7_cmp0 (.a(pp[0][7]), .b(pp[1][6]), .c(pp[2][5]), .d(pp[3][4]), .sum(st1_c7_cmp0_sum), .carry(st1_c7_cmp0_cy));
  rev_compressor42 u_st1_c7_cmp1 (.a(pp[4][3]), .b(pp[5][2]), .c(pp[6][1]), .d(pp[7][0]), .sum(st1_c7_cmp1_sum), .carry(st1_c7_cmp1_cy));
  rev_compressor42 u_st1_c8_cmp0 (.a(pp[1][7]), .b(pp[2][6]), .c(pp[3][5]), .d(pp[4][4]), .sum(st1_c8_cmp0_sum), .carry(st1_c8_cmp0_cy));
  rev_full_adder u_st1_c8_fa0 (.a(pp[5][3]), .b(pp[6][2]), .cin(pp[7][1]), .sum(st1_c8_fa0_sum), .carry(st1_c8_fa0_cy));
  rev_compressor42 u_st1_c9_cmp0 (.a(pp[2][7]), .b(pp[3][6]), .c(pp[4][5]), .d(pp[5][4]), .sum(st1_c9_cmp0_sum), .carry(st1_c9_cmp0_cy));
  rev_half_adder u_st1_c9_ha0 (.a(pp[6][3]), .b(pp[7][2]), .sum(st1_c9_ha0_sum), .carry(st1_c9_ha0_cy));
  rev_compressor42 u_st1_c10_cmp0 (.a(pp[3][7]), .b(pp[4][6]), .c(pp[5][5]), .d(pp[6][4]), .sum(st1_c10_cmp0_sum), .carry(st1_c10_cmp0_cy));
  rev_compressor42 u_st1_c11_cmp0 (.a(pp[4][7]), .b(pp[5][6]), .c(pp[6][5]), .d(pp[7][4]), .sum(st1_c11_cmp0_sum), .carry(st1_c11_cmp0_cy));
  rev_full_adder u_st1_c12_fa0 (.a(pp[5][7]), .b(pp[6][6]), .cin(pp[7][5]), .sum(st1_c12_fa0_sum), .carry(st1_c12_fa0_cy));
  rev_half_adder u_st1_c13_ha0 (.a(pp[6][7]), .b(pp[7][6]), .sum(st1_c13_ha0_sum), .carry(st1_c13_ha0_cy));
  assign s1_c0 = {pp[0][0]};
  assign s1_c1 = {st1_c1_ha0_sum};
  assign s1_c2 = {st1_c1_ha0_cy, st1_c2_fa0_sum};
  assign s1_c3 = {st1_c2_fa0_cy, st1_c3_cmp0_sum};
  assign s1_c4 = {st1_c3_cmp0_cy, pp[4][0], st1_c4_cmp0_sum};
  assign s1_c5 = {st1_c4_cmp0_cy, st1_c5_ha0_sum, st1_c5_cmp0_sum};
  assign s1_c6 = {st1_c5_ha0_cy, st1_c5_cmp0_cy, st1_c6_fa0_sum, st1_c6_cmp0_sum};
  assign s1_c7 = {st1_c6_fa0_cy, st1_c6_cmp0_cy, st1_c7_cmp1_sum, st1_c7_cmp0_sum};
  assign s1_c8 = {st1_c7_cmp1_cy, st1_c7_cmp0_cy, st1_c8_fa0_sum, st1_c8_cmp0_sum};
  assign s1_c9 = {st1_c8_fa0_cy, st1_c8_cmp0_cy, st1_c9_ha0_sum, st1_c9_cmp0_sum};
  assign s1_c10 = {st1_c9_ha0_cy, st1_c9_cmp0_cy, pp[7][3], st1_c10_cmp0_sum};
  assign s1_c11 = {st1_c10_cmp0_cy, st1_c11_cmp0_sum};
  assign s1_c12 = {st1_c11_cmp0_cy, st1_c12_fa0_sum};
  assign s1_c13 = {st1_c12_fa0_cy, st1_c13_ha0_sum};
  assign s1_c14 = {st1_c13_ha0_cy, pp[7][7]};

  // ---- stage 2 ----
  rev_half_adder u_st2_c2_ha0 (.a(s1_c2[0]), .b(s1_c2[1]), .sum(st2_c2_ha0_sum), .carry(st2_c2_ha0_cy));
  rev_half_adder u_st2_c3_ha0 (.a(s1_c3[0]), .b(s1_c3[1]), .sum(st2_c3_ha0_sum), .carry(st2_c3_ha0_cy));
  rev_full_adder u_st2_c4_fa0 (.a(s1_c4[0]), .b(s1_c4[1]), .cin(s1_c4[2]), .sum(st2_c4_fa0_sum), .carry(st2_c4_fa0_cy));
  rev_full_adder u_st2_c5_fa0 (.a(s1_c5[0]), .b(s1_c5[1]), .cin(s1_c5[2]), .sum(st2_c5_fa0_sum), .carry(st2_c5_fa0_cy));
  rev_compressor42 u_st2_c6_cmp0 (.a(s1_c6[0]), .b(s1_c6[1]), .c(s1_c6[2]), .d(s1_c6[3]), .sum(st2_c6_cmp0_sum), .carry(st2_c6_cmp0_cy));
  rev_compressor42 u_st2_c7_cmp0 (.a(s1_c7[0]), .b(s1_c7[1]), .c(s1_c7[2]), .d(s1_c7[3]), .sum(st2_c7_cmp0_sum), .carry(st2_c7_cmp0_cy));
  rev_compressor42 u_st2_c8_cmp0 (.a(s1_c8[0]), .b(s1_c8[1]), .c(s1_c8[2]), .d(s1_c8[3]), .sum(st2_c8_cmp0_sum), .carry(st2_c8_cmp0_cy));
  rev_compressor42 u_st2_c9_cmp0 (.a(s1_c9[0]), .b(s1_c9[1]), .c(s1_c9[2]), .d(s1_c9[3]), .sum(st2_c9_cmp0_sum), .carry(st2_c9_cmp0_cy));
  rev_compressor42 u_st2_c10_cmp0 (.a(s1_c10[0]), .b(s1_c10[1]), .c(s1_c10[2]), .d(s1_c10[3]), .sum(st2_c10_cmp0_sum), .carry(st2_c10_cmp0_cy));
  rev_half_adder u_st2_c11_ha0 (.a(s1_c11[0]), .b(s1_c11[1]), .sum(st2_c11_ha0_sum), .carry(st2_c11_ha0_cy));
  rev_half_adder u_st2_c12_ha0 (.a(s1_c12[0]), .b(s1_c12[1]), .sum(st2_c12_ha0_sum), .carry(st2_c12_ha0_cy));
  rev_half_adder u_st2_c13_ha0 (.a(s1_c13[0]), .b(s1_c13[1]), .sum(st2_c13_ha0_sum), .carry(st2_c13_ha0_cy));
  rev_half_adder u_st2_c14_ha0 (.a(s1_c14[0]), .b(s1_c14[1]), .sum(st2_c14_ha0_sum), .carry(st2_c14_ha0_cy));
  assign s2_c0 = {s1_c0[0]};
  assign s2_c1 = {s1_c1[0]};
  assign s2_c2 = {st2_c2_ha0_sum};
  assign s2_c3 = {st2_c2_ha0_cy, st2_c3_ha0_sum};
  assign s2_c4 = {st2_c3_ha0_cy, st2_c4_fa0_sum};
  assign s2_c5 = {st2_c4_fa0_cy, st2_c5_fa0_sum};
  assign s2_c6 = {st2_c5_fa0_cy, st2_c6_cmp0_sum};
  assign s2_c7 = {st2_c6_cmp0_cy, st2_c7_cmp0_sum};
  assign s2_c8 = {st2_c7_cmp0_cy, st2_c8_cmp0_sum};
  assign s2_c9 = {st2_c8_cmp0_cy, st2_c9_cmp0_sum};
  assign s2_c10 = {st2_c9_cmp0_cy, st2_c10_cmp0_sum};
  assign s2_c11 = {st2_c10_cmp0_cy, st2_c11_ha0_sum};
  assign s2_c12 = {st2_c11_ha0_cy, st2_c12_ha0_sum};
  assign s2_c13 = {st2_c12_ha0_cy, st2_c13_ha0_sum};
  assign s2_c14 = {st2_c13_ha0_cy, st2_c14_ha0_sum};
  assign s2_c15 = {st2_c14_ha0_cy};

  // ---- two output rows ----
  assign row0 = {s2_c15[0], s2_c14[0], s2_c13[0], s2_c12[0], s2_c11[0], s2_c10[0],
                 s2_c9[0], s2_c8[0], s2_c7[0], s2_c6[0], s2_c5[0], s2_c4[0],
                 s2_c3[0], s2_c2[0], s2_c1[0], s2_c0[0]};
  assign row1 = {s2_c14[1], s2_c13[1], s2_c12[1], s2_c11[1], s2_c10[1], s2_c9[1],
                 s2_c8[1], s2_c7[1], s2_c6[1], s2_c5[1], s2_c4[1], s2_c3[1]};

endmodule
