// One-bit full adder: adds three bits of equal weight and returns a sum bit
// (weight 1) and a carry bit (weight 2).
//
// The full adder is the basic cell of every compressor in this multiplier:
// the 15-4 compressor's first stage, the 4-2 compressor and the reduction
// tree. The source design only names it; the gate form below (sum = XOR of
// the three inputs, carry = majority) is the textbook one.
// Purely combinational, no clock.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (ci & (a ^ b));
  end
endmodule
