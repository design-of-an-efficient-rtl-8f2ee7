// 16x16 unsigned multiplier with a 15-4 compressor partial-product tree.
//
// Three parts in a row, all combinational:
//  1. pp_generator forms the 256 partial products a[j] & b[i] and groups them
//     by column (weight).
//  2. reduction_tree compresses the columns to two 32-bit rows. Its first
//     stage holds six 15-4 compressors on columns 12..17 (counted from 0);
//     the lowest three use the 15-4 design chosen by DESIGN, the others are
//     accurate. Exact 4-2 compressors, full and half adders do the rest.
//  3. A 32-bit parallel adder adds the two rows into the product p.
// With DESIGN = ACCURATE, p == a * b. With APPROX1..4, p differs from a * b
// by the errors of the three approximate compressors, each weighted by the
// column it sits in (2**12 to 2**14); p wraps modulo 2**32.
//
// The structure and the choice of columns follow the source design;
// CMP_LSB_COL lets the compressors move (a simulation trace of the source
// design is consistent with columns 11..16 instead of 12..17).
// Interface: a, b in, p out; no clock, the product settles after the
// combinational delay.
module multiplier_16x16
  import mult_pkg::*;
#(
  parameter design_e     DESIGN      = ACCURATE,
  parameter int unsigned CMP_LSB_COL = mult_pkg::CMP_LSB_DEFAULT
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [W-1:0] p
);
  logic [W-1:0][HMAX-1:0] col;
  logic [W-1:0]           row0, row1;
  logic                   unused_co;

  pp_generator #(.N(N)) u_pp (.a(a), .b(b), .col(col));

  reduction_tree #(
    .DESIGN     (DESIGN),
    .CMP_LSB_COL(CMP_LSB_COL)
  ) u_tree (
    .col (col),
    .row0(row0),
    .row1(row1)
  );

  parallel_adder #(.WIDTH(W)) u_final (
    .a (row0),
    .b (row1),
    .ci(1'b0),
    .s (p),
    .co(unused_co)
  );
endmodule
