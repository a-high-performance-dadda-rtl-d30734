// dadda_pkg: sizes and types shared by the 8x8 Dadda multiplier.
//
// The multiplier works on unsigned N-bit operands (N = 8) and produces a
// 2N-bit product. The partial product matrix is kept as an N x N array whose
// element [i][j] = a[j] & b[i] has weight 2^(i+j); the reduction tree returns
// two 2N-bit rows whose sum is the product. The operand width is the one the
// design is built for; the reduction tree is wired by hand for it.
package dadda_pkg;

  localparam int unsigned N  = 8;      // operand width
  localparam int unsigned PW = 2 * N;  // product width

  typedef logic [N-1:0]          operand_t;
  typedef logic [PW-1:0]         product_t;
  typedef logic [N-1:0][N-1:0]   pp_matrix_t;  // [i][j]: a[j] & b[i]

endpackage
