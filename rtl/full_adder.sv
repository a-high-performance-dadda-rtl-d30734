// full_adder: adds three bits of equal weight (a 3:2 counter).
//
// s = a ^ b ^ ci carries weight 1 and co = majority(a, b, ci) weight 2, so
// a + b + ci = s + 2*co. Purely combinational. It is the cell from which both
// exact compressors are chained, and it also serves as a plain 3:2 counter in
// the reduction tree.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
