// Shared types and constants of the 16x16 compressor-tree multiplier.
//
// design_e picks which 5-3 compressor (and therefore which 15-4 compressor and
// which multiplier) is built: the accurate counter or one of the four
// approximate designs. The numbering 1..4 follows the source design; the
// encoding of the enum itself is this implementation's choice.
//
// The package also holds the reduction-tree schedule as constant functions.
// The schedule decides, for every stage and every column of the partial
// product tree, how many 15-4 compressors, 4-2 compressors, full adders and
// half adders are placed. Only the placement of the 15-4 compressors (six of
// them, on the six columns from CMP_LSB_COL upwards, in the first stage) comes
// from the source design; the rest is a Dadda-style column schedule chosen
// here. The stage targets are 8, 4, 2, 2 bits per column: the source design
// names two stages of 4-2 compressors and adders after the 15-4 stage, and a
// fourth, small clean-up stage is needed because each 4-2 compressor sends two
// bits (carry and cout) into the next column.
package mult_pkg;

  typedef enum logic [2:0] {
    ACCURATE = 3'd0,
    APPROX1  = 3'd1,
    APPROX2  = 3'd2,
    APPROX3  = 3'd3,
    APPROX4  = 3'd4
  } design_e;

  // Operand width of the multiplier and derived sizes.
  localparam int N       = 16;
  localparam int W       = 2 * N;   // product width and number of columns
  localparam int HMAX    = N;       // tallest partial-product column
  localparam int NST     = 4;       // reduction stages before the final adder
  localparam int NCMP    = 6;       // number of 15-4 compressors
  localparam int NAPPROX = 3;       // the lowest three of them may be approximate
  localparam int CMP_LSB_DEFAULT = 12;  // column (from 0) of the lowest 15-4 compressor

  // What sched() reports.
  localparam int S_H    = 0;  // column height at the input of the stage
  localparam int S_N154 = 1;  // 15-4 compressors in the column (0 or 1)
  localparam int S_N42  = 2;  // 4-2 compressors
  localparam int S_NFA  = 3;  // full adders
  localparam int S_NHA  = 4;  // half adders
  localparam int S_HOUT = 5;  // column height at the output of the stage

  // The schedule of one stage: entry [kind][column].
  typedef logic [5:0][W-1:0][7:0] stage_sched_t;

  function automatic int stage_target(input int s);
    case (s)
      0:       return 8;
      1:       return 4;
      default: return 2;
    endcase
  endfunction

  // Height of column c of the partial-product array of an n x n multiplier.
  function automatic int pp_height(input int n, input int c);
    if (c < 0 || c >= 2 * n) return 0;
    if (c < n) return c + 1;
    return 2 * n - 1 - c;
  endfunction

  // Reduction-tree schedule of stage s, every quantity for every column.
  // Columns are processed from the least significant one up; each column is
  // reduced until its next-stage height, carries from the column below
  // included, meets the stage target: first with 4-2 compressors (which also
  // absorb the cout of the column below as their cin), then full adders, then
  // half adders.
  function automatic stage_sched_t sched_stage(input int s, input int cmp_lsb);
    int h   [W];
    int nh  [W];
    int n42 [W];
    int nfa [W];
    int nha [W];
    int n154[W];
    int inc, avail, sums, cins, ex, t;
    stage_sched_t r;
    r = '0;
    for (int k = 0; k < W; k++) h[k] = pp_height(N, k);
    for (int st = 0; st <= s; st++) begin
      t = stage_target(st);
      for (int k = 0; k < W; k++) begin
        n42[k] = 0; nfa[k] = 0; nha[k] = 0; n154[k] = 0;
      end
      for (int k = 0; k < W; k++) begin
        inc = 0;
        cins = 0;
        if (k > 0) begin
          inc  = 2 * n42[k-1] + nfa[k-1] + nha[k-1];
          cins = n42[k-1];
        end
        if (st == 0)
          for (int d = 1; d < 4; d++)
            if (k - d >= 0 && n154[k-d] != 0) inc++;
        avail = h[k];
        sums  = 0;
        if (st == 0 && k >= cmp_lsb && k < cmp_lsb + NCMP) begin
          n154[k] = 1;
          avail   = (h[k] > 15) ? h[k] - 15 : 0;
          sums    = 1;
        end
        while (avail + sums + inc > t) begin
          ex = avail + sums + inc - t;
          if (ex >= 3 && avail >= 4) begin
            n42[k]++;
            avail -= 4;
            sums++;
            if (n42[k] <= cins) inc--;
          end else if (ex >= 2 && avail >= 3) begin
            nfa[k]++;
            avail -= 3;
            sums++;
          end else if (avail >= 2) begin
            nha[k]++;
            avail -= 2;
            sums++;
          end else begin
            break;
          end
        end
        nh[k] = avail + sums + inc;
      end
      if (st == s) begin
        for (int k = 0; k < W; k++) begin
          r[S_H][k]    = 8'(h[k]);
          r[S_N154][k] = 8'(n154[k]);
          r[S_N42][k]  = 8'(n42[k]);
          r[S_NFA][k]  = 8'(nfa[k]);
          r[S_NHA][k]  = 8'(nha[k]);
          r[S_HOUT][k] = 8'(nh[k]);
        end
      end
      for (int k = 0; k < W; k++) h[k] = nh[k];
    end
    return r;
  endfunction

  // One entry of a stage schedule; 0 outside the columns.
  function automatic int sched_get(input stage_sched_t ss, input int kind, input int c);
    if (c < 0 || c >= W) return 0;
    return int'(ss[kind][c]);
  endfunction

endpackage
