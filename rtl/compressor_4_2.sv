// compressor_4_2: exact 4:2 compressor made of two full adders in series.
//
// Inputs X1..X4 (x[0] = X1) and Cin all carry weight 1. The first full adder
// adds X1, X2, X3; its sum goes with X4 and Cin into the second full adder:
//
//   X1 + X2 + X3 + X4 + Cin = Sum + 2*(Carry + Cout)
//
// Cout is the first adder's carry and depends on X1..X3 only, so in a row of
// these compressors Cout feeds the Cin of the next more significant one
// without a carry ripple. Purely combinational. The structure (two full adders
// in series, Cin from the lower compressor, Cout to the higher one) is the
// conventional one; which input goes to which adder is this design's choice.
module compressor_4_2 (
  input  logic [3:0] x,
  input  logic       cin,
  output logic       sum,
  output logic       carry,
  output logic       cout
);
  logic s1;

  full_adder u_fa1 (.a(x[0]), .b(x[1]), .ci(x[2]), .s(s1),  .co(cout));
  full_adder u_fa2 (.a(s1),   .b(x[3]), .ci(cin),  .s(sum), .co(carry));
endmodule
