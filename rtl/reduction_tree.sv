// Partial-product reduction tree of the 16x16 multiplier: it turns the 256
// partial products, given column by column, into two 32-bit rows whose sum is
// the product (exactly, or approximately when DESIGN selects an approximate
// 15-4 compressor).
//
// How it works.
//  * Stage 0 places six 15-4 compressors on the six columns CMP_LSB_COL ..
//    CMP_LSB_COL+5 (columns counted from 0). Each takes the first 15 bits of
//    its column; where a column holds fewer, the missing inputs are 0 (column
//    12 gets two zeros, column 13 and column 17 one each); column 15 holds 16
//    bits and its last one passes on. Output bit O_k of the compressor on
//    column c lands in column c+k. The three lowest compressors are of type
//    DESIGN, the three upper ones are always accurate, so that the
//    approximation stays away from the most significant columns.
//  * In every stage, all other columns are reduced with exact 4-2
//    compressors, full adders and half adders until each column, including
//    the carries arriving from the column below, is no taller than the
//    stage's target (8, 4, 2, 2). The cout of the k-th 4-2 compressor of a
//    column feeds the cin of the k-th 4-2 compressor of the next column up in
//    the same stage; a cout that finds no compressor there passes on as an
//    ordinary bit. The counts per column and stage come from mult_pkg::sched_stage.
//  * After the last stage every column holds at most two bits: row0 takes bit
//    0 of every column, row1 bit 1.
// Inside a column the next stage's bits are ordered: 15-4 outputs, sums of
// 4-2 compressors, full adders and half adders, bits passed on, carries of
// the column below, couts of the column below that were not used as cin.
// Bits that would leave column 31 are dropped, so the result is modulo 2**32;
// a lint tool therefore reports the carry signals of column 31, and the
// always-empty input column 31, as unused.
//
// From the source design: the 15-4 compressors in the first stage from the
// thirteenth column on, the zero padding, approximation only in the
// thirteenth to fifteenth columns, and exact 4-2 compressors, full and half
// adders in the later stages. The exact placement of those later cells, the
// stage targets and the fourth stage are this design's own.
//
// Interface: col[c][k] is the k-th partial product of column c; bits above
// the column's height are ignored. Purely combinational, no clock.
module reduction_tree
  import mult_pkg::*;
#(
  parameter design_e     DESIGN      = ACCURATE,
  parameter int unsigned CMP_LSB_COL = mult_pkg::CMP_LSB_DEFAULT
) (
  input  logic [W-1:0][HMAX-1:0] col,
  output logic [W-1:0]           row0,
  output logic [W-1:0]           row1
);
  localparam int CL = int'(CMP_LSB_COL);

  // Number of 15-4 compressor outputs that land in column c.
  function automatic int n154_land(input int c);
    int n = 0;
    for (int d = 0; d < 4; d++)
      if (c - d >= CL && c - d < CL + NCMP) n++;
    return n;
  endfunction

  // ---------------------------------------------------------------- stage 0
  // Column contents with everything above each column's height forced to 0.
  logic [W-1:0][HMAX-1:0] col_m;
  for (genvar c = 0; c < W; c++) begin : g_mask
    for (genvar k = 0; k < HMAX; k++) begin : g_bit
      if (k < pp_height(N, c)) begin : g_keep
        assign col_m[c][k] = col[c][k];
      end else begin : g_zero
        assign col_m[c][k] = 1'b0;
      end
    end
  end

  // The six 15-4 compressors.
  logic [3:0] cmp_o [NCMP];
  for (genvar j = 0; j < NCMP; j++) begin : g_cmp
    localparam design_e D = (j < NAPPROX) ? DESIGN : ACCURATE;
    compressor_15_4 #(.DESIGN(D)) u_cmp (
      .x(col_m[CL+j][14:0]),
      .o(cmp_o[j])
    );
  end

  // ---------------------------------------------------------- all stages
  for (genvar s = 0; s < NST; s++) begin : g_st
    localparam stage_sched_t SS = sched_stage(s, CL);
    logic [W-1:0][HMAX-1:0] cur, nxt;

    if (s == 0) begin : g_in0
      assign cur = col_m;
    end else begin : g_in
      assign cur = g_st[s-1].nxt;
    end

    for (genvar c = 0; c < W; c++) begin : g_col
      localparam int H    = sched_get(SS, S_H, c);
      localparam int N154 = sched_get(SS, S_N154, c);
      localparam int N42  = sched_get(SS, S_N42, c);
      localparam int NFA  = sched_get(SS, S_NFA, c);
      localparam int NHA  = sched_get(SS, S_NHA, c);
      localparam int N42P = sched_get(SS, S_N42, c - 1);
      localparam int NFAP = sched_get(SS, S_NFA, c - 1);
      localparam int NHAP = sched_get(SS, S_NHA, c - 1);
      localparam int HN   = sched_get(SS, S_HOUT, c);
      localparam int NL   = (s == 0) ? n154_land(c) : 0;
      localparam int B42  = (N154 != 0) ? ((H < 15) ? H : 15) : 0;
      localparam int BFA  = B42 + 4 * N42;
      localparam int BHA  = BFA + 3 * NFA;
      localparam int BP   = BHA + 2 * NHA;
      localparam int NP   = H - BP;
      localparam int NCO  = (N42P > N42) ? N42P - N42 : 0;
      localparam int TOTAL = NL + N42 + NFA + NHA + NP + N42P + NFAP + NHAP + NCO;
      localparam int W42 = (N42 > 0) ? N42 : 1;
      localparam int WFA = (NFA > 0) ? NFA : 1;
      localparam int WHA = (NHA > 0) ? NHA : 1;

      if (TOTAL != HN || NP < 0 || HN > HMAX) begin : g_bad_schedule
        $error("reduction_tree: inconsistent schedule at stage %0d column %0d", s, c);
      end

      logic [W42-1:0] s42, c42, co42;
      logic [WFA-1:0] sfa, cfa;
      logic [WHA-1:0] sha, cha;
      // carries of the column below, widened
      logic [HMAX-1:0] p_c42, p_co42, p_cfa, p_cha;

      if (c > 0) begin : g_prev
        assign p_c42  = HMAX'(g_col[c-1].c42);
        assign p_co42 = HMAX'(g_col[c-1].co42);
        assign p_cfa  = HMAX'(g_col[c-1].cfa);
        assign p_cha  = HMAX'(g_col[c-1].cha);
      end else begin : g_noprev
        assign p_c42  = '0;
        assign p_co42 = '0;
        assign p_cfa  = '0;
        assign p_cha  = '0;
      end

      if (N42 == 0) begin : g_no42
        assign s42  = '0;
        assign c42  = '0;
        assign co42 = '0;
      end else begin : g_42
        logic [N42-1:0] ci42;
        for (genvar k = 0; k < N42; k++) begin : g_k
          if (k < N42P) begin : g_cin
            assign ci42[k] = p_co42[k];
          end else begin : g_nocin
            assign ci42[k] = 1'b0;
          end
          compressor_4_2 u_c42 (
            .x1   (cur[c][B42+4*k]),
            .x2   (cur[c][B42+4*k+1]),
            .x3   (cur[c][B42+4*k+2]),
            .x4   (cur[c][B42+4*k+3]),
            .cin  (ci42[k]),
            .sum  (s42[k]),
            .carry(c42[k]),
            .cout (co42[k])
          );
        end
      end

      if (NFA == 0) begin : g_nofa
        assign sfa = '0;
        assign cfa = '0;
      end else begin : g_fa
        for (genvar k = 0; k < NFA; k++) begin : g_k
          full_adder u_fa (
            .a (cur[c][BFA+3*k]),
            .b (cur[c][BFA+3*k+1]),
            .ci(cur[c][BFA+3*k+2]),
            .s (sfa[k]),
            .co(cfa[k])
          );
        end
      end

      if (NHA == 0) begin : g_noha
        assign sha = '0;
        assign cha = '0;
      end else begin : g_ha
        for (genvar k = 0; k < NHA; k++) begin : g_k
          half_adder u_ha (
            .a (cur[c][BHA+2*k]),
            .b (cur[c][BHA+2*k+1]),
            .s (sha[k]),
            .co(cha[k])
          );
        end
      end

      // Gather the bits of this column for the next stage.
      logic [HMAX-1:0] v;
      always_comb begin
        int idx;
        v   = '0;
        idx = 0;
        if (s == 0) begin
          for (int d = 0; d < 4; d++) begin
            if (c - d >= CL && c - d < CL + NCMP) begin
              v[idx] = cmp_o[c-d-CL][d];
              idx++;
            end
          end
        end
        for (int k = 0; k < N42; k++) begin v[idx] = s42[k]; idx++; end
        for (int k = 0; k < NFA; k++) begin v[idx] = sfa[k]; idx++; end
        for (int k = 0; k < NHA; k++) begin v[idx] = sha[k]; idx++; end
        for (int k = 0; k < NP;  k++) begin v[idx] = cur[c][BP+k]; idx++; end
        for (int k = 0; k < N42P; k++) begin v[idx] = p_c42[k]; idx++; end
        for (int k = 0; k < NFAP; k++) begin v[idx] = p_cfa[k]; idx++; end
        for (int k = 0; k < NHAP; k++) begin v[idx] = p_cha[k]; idx++; end
        for (int k = N42; k < N42P; k++) begin v[idx] = p_co42[k]; idx++; end
      end
      assign nxt[c] = v;
    end
  end

  // ------------------------------------------------------- two output rows
  localparam stage_sched_t SS_LAST = sched_stage(NST - 1, CL);
  for (genvar c = 0; c < W; c++) begin : g_row
    localparam int HF = sched_get(SS_LAST, S_HOUT, c);
    if (HF > 2) begin : g_bad_final
      $error("reduction_tree: column %0d still holds %0d bits", c, HF);
    end
    assign row0[c] = (HF >= 1) ? g_st[NST-1].nxt[c][0] : 1'b0;
    assign row1[c] = (HF >= 2) ? g_st[NST-1].nxt[c][1] : 1'b0;
  end
endmodule
