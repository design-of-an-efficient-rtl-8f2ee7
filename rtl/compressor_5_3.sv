// 5-3 compressor (5-bit counter): reports how many of its five inputs are 1 as
// a 3-bit number {o2, o1, o0}, either exactly or approximately.
//
// The accurate counter is two chained full adders, drawn with multiplexers:
//   c1 = (x0 ^ x1) ? x2 : x0          carry of x0 + x1 + x2
//   p  = x0 ^ x1 ^ x2 ^ x3
//   c2 = p ? x4 : x3                  carry of (x0^x1^x2) + x3 + x4
//   o0 = p ^ x4,  o1 = c1 ^ c2,  o2 = c1 & c2
// The four approximate designs of the source replace some of these outputs
// with cheaper logic:
//   APPROX1: o2' = x3 & x2; o0' = ~(x3 & x2) when
//            (x3 x2 ~x1 ~x0) | (~x4 x3 x2 (x1^x0)) | (x4 x1 x0 (x2^x3)),
//            else the exact o0; o1 exact. Wrong for 6 of 32 inputs, error
//            +4 for input 12 (x3=x2=1, others 0) and +-3 for the other five.
//   APPROX2: o2' = x4 & c1, o1' = x4 ^ c1, o0 exact. Wrong for 8 inputs, +-2.
//   APPROX3: o1' = x4 ^ c1, o2 and o0 exact. Wrong for 8 inputs, +-2.
//   APPROX4: o1' = x2 ^ x3, o2 and o0 exact. Wrong for 12 inputs, +-2.
// All equations are the source design's; the selection by parameter is this
// design's way of building every variant from one module.
// Purely combinational, no clock.
module compressor_5_3
  import mult_pkg::*;
#(
  parameter design_e DESIGN = ACCURATE
) (
  input  logic [4:0] x,
  output logic [2:0] o
);
  logic c1, p, c2;
  logic o0_exact, o1_exact, o2_exact;
  logic fix0;

  always_comb begin
    c1       = (x[0] ^ x[1]) ? x[2] : x[0];
    p        = x[0] ^ x[1] ^ x[2] ^ x[3];
    c2       = p ? x[4] : x[3];
    o0_exact = p ^ x[4];
    o1_exact = c1 ^ c2;
    o2_exact = c1 & c2;
    fix0     = (x[3] & x[2] & ~x[1] & ~x[0])
             | (~x[4] & x[3] & x[2] & (x[1] ^ x[0]))
             | (x[4] & x[1] & x[0] & (x[2] ^ x[3]));

    o = {o2_exact, o1_exact, o0_exact};
    case (DESIGN)
      APPROX1: begin
        o[2] = x[3] & x[2];
        o[0] = fix0 ? ~(x[3] & x[2]) : o0_exact;
      end
      APPROX2: begin
        o[2] = x[4] & c1;
        o[1] = x[4] ^ c1;
      end
      APPROX3: o[1] = x[4] ^ c1;
      APPROX4: o[1] = x[2] ^ x[3];
      default: ;
    endcase
  end
endmodule
