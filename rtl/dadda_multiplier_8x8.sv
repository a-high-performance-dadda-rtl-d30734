// dadda_multiplier_8x8: 8-bit by 8-bit unsigned Dadda multiplier built
// around a row of exact 5:2 compressors.
//
// p = a * b, fully combinational (no clock, no registers): the product is
// valid one combinational delay after the operands change. Three parts in a
// line:
//   partial_product_gen  - 64 AND gates, pp[i][j] = a[j] & b[i]
//   dadda_reduction_8x8  - a Dadda half/full adder stage, then a compressor
//                          stage (half adder, 4:2 compressor, eight chained
//                          5:2 compressors, full adder, half adder) that
//                          leaves two 16-bit rows
//   final_adder          - adds the two rows
// Unsigned operands and the 8x8 size are those of the design; the absence of
// pipeline registers and the plain '+' final adder are this design's choices.
module dadda_multiplier_8x8
  import dadda_pkg::*;
(
  input  operand_t a,
  input  operand_t b,
  output product_t p
);
  pp_matrix_t pp;
  product_t   row_a, row_b;

  partial_product_gen #(.N(N)) u_ppg (.a(a), .b(b), .pp(pp));

  dadda_reduction_8x8 u_red (.pp(pp), .row_a(row_a), .row_b(row_b));

  final_adder #(.W(PW)) u_cpa (.a(row_a), .b(row_b), .s(p));
endmodule
