// Exhaustive test of compressor_5_3 in all five designs. For every 5-bit input
// each instance's output must equal the number of ones plus the design's
// tabulated error (zero for the accurate design). The testbench also counts,
// per design, how many inputs are wrong and the largest error, and compares
// them with the design's known figures: 6 wrong inputs for design 1 with a
// largest error of 4 (input 12 only), 8 / 8 / 12 wrong inputs of +-2 for
// designs 2 / 3 / 4.
module tb_compressor_5_3;
  import mult_pkg::*;
  import tb_ref_pkg::popcount;
  import tb_ref_pkg::err53;
  logic [4:0] x;
  logic [2:0] o [5];
  int checks = 0, failures = 0;
  int n_wrong [5];
  int max_ed  [5];
  int n_ed4   [5];
  localparam int WANT_WRONG [5] = '{0, 6, 8, 8, 12};
  localparam int WANT_MAX   [5] = '{0, 4, 2, 2, 2};

  for (genvar d = 0; d < 5; d++) begin : g_dut
    compressor_5_3 #(.DESIGN(design_e'(d))) dut (.x(x), .o(o[d]));
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ed;
    for (int d = 0; d < 5; d++) begin n_wrong[d] = 0; max_ed[d] = 0; n_ed4[d] = 0; end
    for (int v = 0; v < 32; v++) begin
      x = 5'(v);
      #1;
      for (int d = 0; d < 5; d++) begin
        ed = int'(o[d]) - popcount(32'(x));
        checks++;
        if (ed != err53(d, x)) begin
          failures++;
          $display("FAIL design %0d input %0d: out %0d, count %0d", d, v, o[d], popcount(32'(x)));
        end
        if (ed != 0) n_wrong[d]++;
        if (ed < 0) ed = -ed;
        if (ed > max_ed[d]) max_ed[d] = ed;
        if (ed == 4) n_ed4[d]++;
      end
    end
    for (int d = 0; d < 5; d++) begin
      $display("design %0d: %0d of 32 inputs wrong, largest error %0d", d, n_wrong[d], max_ed[d]);
      checks++;
      if (n_wrong[d] != WANT_WRONG[d] || max_ed[d] != WANT_MAX[d]) failures++;
    end
    checks++;
    if (n_ed4[1] != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
