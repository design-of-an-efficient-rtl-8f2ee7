// Exhaustive test of compressor_15_4 in all five designs: all 32768 input
// patterns. The accurate design must return the number of ones; each
// approximate design must match the reference model (full adders as plain
// arithmetic, 5-3 counts with tabulated errors, A + 2B modulo 16). The number
// of wrong patterns per design and the cases where A + 2B passes 15 (the
// 4-bit adder wraps) are counted and reported; every approximate design must
// be wrong somewhere, and some design must wrap.
module tb_compressor_15_4;
  import mult_pkg::*;
  import tb_ref_pkg::*;
  logic [14:0] x;
  logic [3:0]  o [5];
  int checks = 0, failures = 0;
  int n_wrong [5];
  longint sum_ed [5];
  int n_wrap [5];

  for (genvar d = 0; d < 5; d++) begin : g_dut
    compressor_15_4 #(.DESIGN(design_e'(d))) dut (.x(x), .o(o[d]));
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int want, ed;
    for (int d = 0; d < 5; d++) begin n_wrong[d] = 0; sum_ed[d] = 0; n_wrap[d] = 0; end
    for (int v = 0; v < 32768; v++) begin
      x = 15'(v);
      #1;
      for (int d = 0; d < 5; d++) begin
        want = (d == 0) ? popcount(32'(x)) : cnt154(d, x);
        checks++;
        if (int'(o[d]) != want) begin
          failures++;
          if (failures < 10)
            $display("FAIL design %0d x=%h: out %0d, want %0d", d, x, o[d], want);
        end
        ed = int'(o[d]) - popcount(32'(x));
        if (ed != 0) n_wrong[d]++;
        if (wraps154(d, x)) n_wrap[d]++;
        sum_ed[d] += (ed < 0) ? -ed : ed;
      end
    end
    for (int d = 0; d < 5; d++) begin
      $display("15-4 design %0d: %0d of 32768 patterns wrong, mean error distance %f, %0d wrap",
               d, n_wrong[d], real'(sum_ed[d]) / 32768.0, n_wrap[d]);
      checks++;
      if ((d == 0) != (n_wrong[d] == 0)) failures++;
    end
    // the wrap of the 4-bit adder must have been exercised by some design
    checks++;
    if (n_wrap[1] + n_wrap[2] + n_wrap[3] + n_wrap[4] == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
