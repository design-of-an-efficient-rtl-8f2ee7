// Exact 4-2 compressor: five bits of weight 1 (x1..x4 and cin) become a sum
// (weight 1) and two bits of weight 2 (carry and cout).
//
// As in the source design it is two chained full adders: the first adds x1,
// x2, x3 and produces cout; its sum, x4 and cin go to the second, which gives
// sum and carry. cout does not depend on cin, so in a row of compressors the
// cout of one column feeds the cin of the next without a ripple.
// Invariant: x1+x2+x3+x4+cin == sum + 2*(carry+cout).
// Purely combinational, no clock.
module compressor_4_2 (
  input  logic x1,
  input  logic x2,
  input  logic x3,
  input  logic x4,
  input  logic cin,
  output logic sum,
  output logic carry,
  output logic cout
);
  logic s1;

  full_adder u_fa1 (.a(x1), .b(x2), .ci(x3),  .s(s1),  .co(cout));
  full_adder u_fa2 (.a(s1), .b(x4), .ci(cin), .s(sum), .co(carry));
endmodule
