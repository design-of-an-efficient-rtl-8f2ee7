// One-bit half adder: adds two bits of equal weight and returns a sum bit
// (weight 1) and a carry bit (weight 2).
//
// Used in the partial-product reduction tree where a column needs to lose a
// single bit. The source design names half adders among the tree's cells; the
// gates (XOR for the sum, AND for the carry) are the standard ones.
// Purely combinational, no clock.
module half_adder (
  input  logic a,
  input  logic b,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b;
    co = a & b;
  end
endmodule
