// compressor_5_2: exact 5:2 compressor made of three full adders in series.
//
// Seven inputs of weight 1: the primary inputs X1..X5 (x[0] = X1) and the two
// carry inputs Cin1, Cin2 coming from the next less significant compressor.
// Four outputs: Sum (weight 1) and Carry, Cout1, Cout2 (weight 2):
//
//   FA1: X1 + X2 + X3          -> s1, Cout1
//   FA2: s1 + X4 + X5          -> s2, Cout2
//   FA3: s2 + Cin1 + Cin2      -> Sum, Carry
//
//   X1 + .. + X5 + Cin1 + Cin2 = Sum + 2*(Carry + Cout1 + Cout2)
//
// Cout1 and Cout2 depend on X1..X5 only, so a row of these compressors,
// each one's Cout1/Cout2 wired to the next one's Cin1/Cin2, has no carry
// ripple: the row turns five rows of bits into two (Sum and Carry). Purely
// combinational; the critical path is three full adders. The three-adder
// series structure and the port set follow the design; the order in which
// the X inputs meet the adders is this design's choice.
module compressor_5_2 (
  input  logic [4:0] x,
  input  logic       cin1,
  input  logic       cin2,
  output logic       sum,
  output logic       carry,
  output logic       cout1,
  output logic       cout2
);
  logic s1, s2;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),  .co(cout1));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .ci(x[4]), .s(s2),  .co(cout2));
  full_adder u_fa3 (.a(s2),   .b(cin1), .ci(cin2), .s(sum), .co(carry));
endmodule
