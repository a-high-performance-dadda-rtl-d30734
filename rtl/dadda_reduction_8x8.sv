// dadda_reduction_8x8: partial product reduction of the 8x8 multiplier.
//
// Input is the 8x8 AND array, pp[i][j] of weight 2^(i+j). Column c
// (c = 0..14) holds 1,2,3,4,5,6,7,8,7,6,5,4,3,2,1 bits. Output is two 16-bit
// rows, row_a + row_b = sum of all partial products. Purely combinational.
//
// Two reduction stages replace the four a half/full-adder Dadda tree needs
// for eight rows (8 -> 6 -> 4 -> 3 -> 2):
//
// Stage 1, Dadda style (as few adders as possible, carries counted into the
// next column), brings the matrix to the column heights the compressor stage
// takes in, columns 0..15:
//     1 2 3 4 5 5 5 5 5 5 5 5 1 2 1 1
// with 9 full adders (columns 6,7,7,8,8,9,9,10,12) and 6 half adders
// (columns 5,6,7,8,13,14).
//
// Stage 2, the compressor stage, leaves at most two bits in every column:
//   col 0, 1   : unchanged (1 and 2 bits)
//   col 2      : half adder on two of its three bits; its carry is the Cin
//                of the 4:2 compressor in column 3
//   col 3      : 4:2 compressor (four bits plus that carry) -> one bit;
//                Carry goes to column 4, Cout to Cin1 of column 4's 5:2
//   col 4..11  : a row of eight 5:2 compressors, each taking its column's
//                five bits; Cout1/Cout2 feed Cin1/Cin2 of the next column
//                (column 4's Cin2 is 0), Sum stays, Carry moves up one column
//   col 12     : full adder on its one bit and column 11's Cout1, Cout2
//   col 13     : half adder on its two bits
//   col 14, 15 : unchanged
// Row A collects the sums (and the bits left alone), row B the carries.
// row_b bits 0, 3 and 15 are always 0, and row_a[1:0] and row_b[2:1] are
// partial product bits passed straight through; they stay in the rows so that
// both are plain 16-bit words for the final adder.
//
// The compressor stage follows the column-by-column steps of the design
// (half adder, then 4:2, then 5:2 compressors, then a full adder and a half
// adder at the top end). Stage 1, which is needed because eight-high
// columns do not fit five-input compressors, and the exact bit-to-adder
// assignment are this design's own.
module dadda_reduction_8x8
  import dadda_pkg::*;
(
  input  pp_matrix_t pp,
  output product_t   row_a,
  output product_t   row_b
);

  // ------------------------------------------------------------------
  // Partial products regrouped by column: p[c][k] is the k-th bit of
  // column c, taken from rows max(0, c-7) upwards. Unused slots are 0.
  // ------------------------------------------------------------------
  logic [N-1:0] p [PW];

  always_comb begin
    for (int c = 0; c < PW; c++) begin
      p[c] = '0;
      for (int i = 0; i < N; i++) begin
        if (c - i >= 0 && c - i < N) begin
          p[c][(c < N) ? i : i - (c - (N - 1))] = pp[i][c-i];
        end
      end
    end
  end

  // ------------------------------------------------------------------
  // Stage 1: Dadda half/full adder stage to heights
  // 1 2 3 4 5 5 5 5 5 5 5 5 1 2 1 1
  // ------------------------------------------------------------------
  logic [4:0] s1 [PW];   // stage-1 result, column c, bit k

  // column 5: 6 bits -> 5
  logic ha5_s, ha5_c;
  half_adder u_ha5 (.a(p[5][0]), .b(p[5][1]), .s(ha5_s), .c(ha5_c));

  // column 6: 7 bits + 1 carry -> 5
  logic fa6_s, fa6_c, ha6_s, ha6_c;
  full_adder u_fa6 (.a(p[6][0]), .b(p[6][1]), .ci(p[6][2]), .s(fa6_s), .co(fa6_c));
  half_adder u_ha6 (.a(p[6][3]), .b(p[6][4]), .s(ha6_s), .c(ha6_c));

  // column 7: 8 bits + 2 carries -> 5
  logic fa7a_s, fa7a_c, fa7b_s, fa7b_c, ha7_s, ha7_c;
  full_adder u_fa7a (.a(p[7][0]), .b(p[7][1]), .ci(p[7][2]), .s(fa7a_s), .co(fa7a_c));
  full_adder u_fa7b (.a(p[7][3]), .b(p[7][4]), .ci(p[7][5]), .s(fa7b_s), .co(fa7b_c));
  half_adder u_ha7  (.a(p[7][6]), .b(p[7][7]), .s(ha7_s), .c(ha7_c));

  // column 8: 7 bits + 3 carries -> 5
  logic fa8a_s, fa8a_c, fa8b_s, fa8b_c, ha8_s, ha8_c;
  full_adder u_fa8a (.a(p[8][0]), .b(p[8][1]), .ci(p[8][2]), .s(fa8a_s), .co(fa8a_c));
  full_adder u_fa8b (.a(p[8][3]), .b(p[8][4]), .ci(p[8][5]), .s(fa8b_s), .co(fa8b_c));
  half_adder u_ha8  (.a(p[8][6]), .b(fa7a_c),  .s(ha8_s), .c(ha8_c));

  // column 9: 6 bits + 3 carries -> 5
  logic fa9a_s, fa9a_c, fa9b_s, fa9b_c;
  full_adder u_fa9a (.a(p[9][0]), .b(p[9][1]), .ci(p[9][2]), .s(fa9a_s), .co(fa9a_c));
  full_adder u_fa9b (.a(p[9][3]), .b(p[9][4]), .ci(p[9][5]), .s(fa9b_s), .co(fa9b_c));

  // column 10: 5 bits + 2 carries -> 5
  logic fa10_s, fa10_c;
  full_adder u_fa10 (.a(p[10][0]), .b(p[10][1]), .ci(p[10][2]), .s(fa10_s), .co(fa10_c));

  // column 12: 3 bits -> 1
  logic fa12_s, fa12_c;
  full_adder u_fa12 (.a(p[12][0]), .b(p[12][1]), .ci(p[12][2]), .s(fa12_s), .co(fa12_c));

  // column 13: 2 bits + 1 carry -> 2
  logic ha13_s, ha13_c;
  half_adder u_ha13 (.a(p[13][0]), .b(p[13][1]), .s(ha13_s), .c(ha13_c));

  // column 14: 1 bit + 1 carry -> 1
  logic ha14_s, ha14_c;
  half_adder u_ha14 (.a(p[14][0]), .b(ha13_c), .s(ha14_s), .c(ha14_c));

  always_comb begin
    for (int c = 0; c < 5; c++) s1[c] = p[c][4:0];   // columns 0..4 unchanged
    s1[5]  = {p[5][5],  p[5][4],  p[5][3],  p[5][2],  ha5_s};
    s1[6]  = {ha5_c,    p[6][6],  p[6][5],  ha6_s,    fa6_s};
    s1[7]  = {ha6_c,    fa6_c,    ha7_s,    fa7b_s,   fa7a_s};
    s1[8]  = {ha7_c,    fa7b_c,   ha8_s,    fa8b_s,   fa8a_s};
    s1[9]  = {ha8_c,    fa8b_c,   fa8a_c,   fa9b_s,   fa9a_s};
    s1[10] = {fa9b_c,   fa9a_c,   p[10][4], p[10][3], fa10_s};
    s1[11] = {fa10_c,   p[11][3], p[11][2], p[11][1], p[11][0]};
    s1[12] = {4'b0, fa12_s};
    s1[13] = {3'b0, fa12_c, ha13_s};
    s1[14] = {4'b0, ha14_s};
    s1[15] = {4'b0, ha14_c};
  end

  // ------------------------------------------------------------------
  // Stage 2: compressor stage to two rows
  // ------------------------------------------------------------------
  // column 2: half adder; carry is the 4:2 compressor's Cin
  logic ha2_s, ha2_c;
  half_adder u_ha2 (.a(s1[2][0]), .b(s1[2][1]), .s(ha2_s), .c(ha2_c));

  // column 3: 4:2 compressor
  logic c42_sum, c42_carry, c42_cout;
  compressor_4_2 u_c42 (
    .x    (s1[3][3:0]),
    .cin  (ha2_c),
    .sum  (c42_sum),
    .carry(c42_carry),
    .cout (c42_cout)
  );

  // columns 4..11: row of 5:2 compressors, Cout1/Cout2 chained to Cin1/Cin2
  localparam int unsigned C52_LO = 4;
  localparam int unsigned C52_HI = 11;

  logic [C52_HI:C52_LO] c52_cin1, c52_cin2;
  logic [C52_HI:C52_LO] c52_sum, c52_carry, c52_cout1, c52_cout2;

  always_comb begin
    c52_cin1[C52_LO] = c42_cout;
    c52_cin2[C52_LO] = 1'b0;
    for (int c = C52_LO + 1; c <= C52_HI; c++) begin
      c52_cin1[c] = c52_cout1[c-1];
      c52_cin2[c] = c52_cout2[c-1];
    end
  end

  for (genvar c = C52_LO; c <= C52_HI; c++) begin : g_c52
    compressor_5_2 u_c52 (
      .x    (s1[c]),
      .cin1 (c52_cin1[c]),
      .cin2 (c52_cin2[c]),
      .sum  (c52_sum[c]),
      .carry(c52_carry[c]),
      .cout1(c52_cout1[c]),
      .cout2(c52_cout2[c])
    );
  end

  // column 12: full adder on its bit and the chain's last Cout1, Cout2
  logic fa12f_s, fa12f_c;
  full_adder u_fa12f (.a(s1[12][0]), .b(c52_cout1[C52_HI]), .ci(c52_cout2[C52_HI]),
                      .s(fa12f_s), .co(fa12f_c));

  // column 13: half adder on its two bits
  logic ha13f_s, ha13f_c;
  half_adder u_ha13f (.a(s1[13][0]), .b(s1[13][1]), .s(ha13f_s), .c(ha13f_c));

  // ------------------------------------------------------------------
  // The two output rows
  // ------------------------------------------------------------------
  always_comb begin
    row_a = '0;
    row_b = '0;
    row_a[0]  = s1[0][0];
    row_a[1]  = s1[1][0];
    row_b[1]  = s1[1][1];
    row_a[2]  = ha2_s;
    row_b[2]  = s1[2][2];
    row_a[3]  = c42_sum;
    row_b[4]  = c42_carry;
    for (int c = C52_LO; c <= C52_HI; c++) begin
      row_a[c]   = c52_sum[c];
      row_b[c+1] = c52_carry[c];
    end
    row_a[12] = fa12f_s;
    row_a[13] = ha13f_s;
    row_b[13] = fa12f_c;
    row_a[14] = s1[14][0];
    row_b[14] = ha13f_c;
    row_a[15] = s1[15][0];
  end

endmodule
