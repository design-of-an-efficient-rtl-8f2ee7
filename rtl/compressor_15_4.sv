// 15-4 compressor: counts the ones among fifteen bits of equal weight and
// returns the count as a 4-bit number o = {O3, O2, O1, O0}.
//
// Structure (as in the source design): five full adders each add three inputs
// (x[2:0], x[5:3], ..., x[14:12]). The five sum bits (weight 1) go to one 5-3
// compressor, giving A = {A2, A1, A0}; the five carry bits (weight 2) go to a
// second 5-3 compressor, giving {B3, B2, B1}. A 4-bit parallel adder adds
// {0, A2, A1, A0} and {B3, B2, B1, 0} (A3 and B0 are tied to 0) and gives o.
//
// DESIGN selects the 5-3 compressors: ACCURATE and APPROX1..3 use that 5-3
// design for both; APPROX4 uses 5-3 design 1 for the carries (they weigh
// more, and design 1 is right more often) and 5-3 design 4 for the sums.
// Full adders and the parallel adder are always exact. With approximate 5-3
// compressors A + 2B can exceed 15; the 4-bit adder then wraps, since the
// source design shows no fifth output bit.
//
// Which full adder drives which 5-3 input is not legible in the source; here
// full adder k (inputs x[3k+2:3k]) drives input k of both 5-3 compressors.
// Purely combinational, no clock.
module compressor_15_4
  import mult_pkg::*;
#(
  parameter design_e DESIGN = ACCURATE
) (
  input  logic [14:0] x,
  output logic [3:0]  o
);
  localparam design_e SUM_DESIGN   = (DESIGN == APPROX4) ? APPROX4 : DESIGN;
  localparam design_e CARRY_DESIGN = (DESIGN == APPROX4) ? APPROX1 : DESIGN;

  logic [4:0] fa_sum, fa_carry;
  logic [2:0] a_cnt, b_cnt;
  logic       unused_co;

  for (genvar k = 0; k < 5; k++) begin : g_fa
    full_adder u_fa (
      .a (x[3*k]),
      .b (x[3*k+1]),
      .ci(x[3*k+2]),
      .s (fa_sum[k]),
      .co(fa_carry[k])
    );
  end

  compressor_5_3 #(.DESIGN(SUM_DESIGN))   u_sum_cmp   (.x(fa_sum),   .o(a_cnt));
  compressor_5_3 #(.DESIGN(CARRY_DESIGN)) u_carry_cmp (.x(fa_carry), .o(b_cnt));

  parallel_adder #(.WIDTH(4)) u_add (
    .a ({1'b0, a_cnt}),
    .b ({b_cnt, 1'b0}),
    .ci(1'b0),
    .s (o),
    .co(unused_co)
  );
endmodule
