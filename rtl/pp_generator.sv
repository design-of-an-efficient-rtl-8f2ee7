// Partial-product generator of an N x N unsigned multiplier.
//
// Partial product (i, j) is a[j] & b[i] and has weight 2**(i+j). The products
// are delivered grouped by column, the form the compressor tree consumes:
// col[c] holds the products of weight 2**c in its low bits, ordered by the
// multiplier bit index i (lowest first); unused bits are 0. Column c holds
// c+1 products for c < N and 2N-1-c above that, one dot of the source
// design's dot diagram each. The AND array is the standard one; the ordering
// within a column is this design's choice.
// Purely combinational, no clock.
module pp_generator #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0]                 a,
  input  logic [N-1:0]                 b,
  output logic [2*N-1:0][N-1:0]        col
);
  always_comb begin
    col = '0;
    for (int c = 0; c < 2 * N - 1; c++) begin
      for (int i = 0; i < N; i++) begin
        if (c - i >= 0 && c - i < N) begin
          // position inside the column: i, less the rows that cannot reach c
          col[c][(c < N) ? i : i - (c - N + 1)] = a[c-i] & b[i];
        end
      end
    end
  end
endmodule
