// final_adder: carry-propagate adder for the two rows left by the reduction.
//
// s = (a + b) mod 2^W. Purely combinational. The reduction tree hands over
// two rows whose true sum is the product, which always fits in W = 2N bits,
// so the carry out of the top bit is always zero and is not brought out.
// The adder is written as a plain '+' so that synthesis picks the adder
// structure (on an FPGA, the dedicated carry chain).
module final_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  output logic [W-1:0] s
);
  always_comb s = a + b;
endmodule
