// half_adder: adds two bits of equal weight.
//
// s = a ^ b carries weight 1, c = a & b weight 2, so a + b = s + 2c.
// Purely combinational. Used in both reduction stages of the multiplier
// wherever a column needs to lose exactly one bit.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic c
);
  always_comb begin
    s = a ^ b;
    c = a & b;
  end
endmodule
