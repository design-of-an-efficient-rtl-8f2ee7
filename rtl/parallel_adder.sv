// WIDTH-bit parallel (ripple-carry) adder built from full adders.
//
// Two places in the multiplier use it: inside each 15-4 compressor, a 4-bit
// adder merges the two 5-3 compressor results, and after the reduction tree a
// 32-bit adder turns the last two rows into the product. The source design
// calls both "parallel adders" without giving their insides; the ripple-carry
// chain is the simplest adder that does the job and is this design's choice.
// The carry out of the top bit is brought out; both users leave it unused, so
// results wrap modulo 2**WIDTH.
// Purely combinational, no clock.
module parallel_adder #(
  parameter int unsigned WIDTH = 4
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             ci,
  output logic [WIDTH-1:0] s,
  output logic             co
);
  logic [WIDTH:0] c;

  assign c[0] = ci;
  assign co   = c[WIDTH];

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(c[i+1]));
  end
endmodule
