// Top level: the accurate and the four approximate 16x16 multipliers built
// from 15-4 compressors, side by side on the same operands.
//
// p[d] is the product computed by the multiplier whose low 15-4 compressors
// use design d: p[0] is the accurate product a * b, p[1]..p[4] are the
// approximate products of designs 1 to 4. The source design presents these
// five multipliers together and compares them; giving them common operands
// in one top, so that the error of each design can be read directly against
// p[0], is this implementation's arrangement.
// Interface: a, b in; p out. Purely combinational, no clock or reset.
module mult15_4_top
  import mult_pkg::*;
(
  input  logic [N-1:0]        a,
  input  logic [N-1:0]        b,
  output logic [4:0][W-1:0]   p
);
  for (genvar d = 0; d < 5; d++) begin : g_mult
    multiplier_16x16 #(.DESIGN(design_e'(d))) u_mult (
      .a(a),
      .b(b),
      .p(p[d])
    );
  end
endmodule
