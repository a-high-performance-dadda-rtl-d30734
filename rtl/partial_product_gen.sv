// partial_product_gen: AND array of an unsigned N x N multiplier.
//
// pp[i][j] = a[j] & b[i], of weight 2^(i+j): row i is the multiplicand gated by
// multiplier bit i. Purely combinational. Unsigned operands as in the design;
// the AND-array form is the usual one for unsigned multipliers.
module partial_product_gen #(
  parameter int unsigned N = 8
) (
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  output logic [N-1:0][N-1:0] pp
);
  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = a & {N{b[i]}};
    end
  end
endmodule
