// End-to-end test of mult15_4_top at its default sizes.
//
// The operands of the reference simulation are applied first, then corner
// cases, operands whose low columns are dense (where the approximate
// compressors are busy) and uniformly random operands. Every output is
// compared with the reference model. Along the way the testbench counts how
// often each mechanism of the design was exercised and fails if one never
// was:
//  * per approximate design, products that differ from a * b (the
//    approximation acted) and products that are exact;
//  * a 15-4 compressor whose 4-bit adder wrapped (A + 2B > 15);
//  * a padded compressor column (column 12, 13 or 17) holding only ones.
// At the end it prints, per design, the error rate and the mean relative
// error distance over the random operands.
module tb_mult15_4_top;
  import tb_ref_pkg::*;
  logic [15:0]      a, b;
  logic [4:0][31:0] p;
  int checks = 0, failures = 0;
  int n_diff [5];
  int n_same [5];
  int n_wrap, n_pad_full, n_rand;
  real red_sum [5];

  mult15_4_top dut (.a(a), .b(b), .p(p));

  initial begin : watchdog
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [15:0] x, input logic [15:0] y, input bit is_random);
    logic [31:0] want, exact;
    logic [14:0] col_bits;
    a = x; b = y;
    #1;
    exact = 32'(x) * 32'(y);
    for (int d = 0; d < 5; d++) begin
      want = mult_ref(d, x, y, 12);
      checks++;
      if (p[d] !== want) begin
        failures++;
        if (failures < 10) $display("FAIL design %0d %0d*%0d: %0d, want %0d", d, x, y, p[d], want);
      end
      if (p[d] != exact) n_diff[d]++; else n_same[d]++;
      if (is_random && exact != 0)
        red_sum[d] += (real'(p[d]) > real'(exact) ? real'(p[d]) - real'(exact)
                                                  : real'(exact) - real'(p[d])) / real'(exact);
      for (int j = 0; j < 3; j++)
        if (d > 0 && wraps154(d, column_bits(x, y, 12 + j))) n_wrap++;
    end
    for (int c = 12; c < 18; c++) begin
      col_bits = column_bits(x, y, c);
      if ((c == 12 && col_bits == 15'h1FFF) || (c == 13 && col_bits == 15'h3FFF) ||
          (c == 17 && col_bits == 15'h3FFF)) n_pad_full++;
    end
    if (is_random) n_rand++;
  endtask

  initial begin
    for (int d = 0; d < 5; d++) begin n_diff[d] = 0; n_same[d] = 0; red_sum[d] = 0.0; end
    n_wrap = 0; n_pad_full = 0; n_rand = 0;
    run(16'd65535, 16'd65535, 0);
    run(16'd5, 16'd5, 0);
    run(16'd273, 16'd337, 0);
    run(16'd10, 16'd500, 0);
    run(16'h0000, 16'h0000, 0);
    run(16'h8000, 16'h0001, 0);
    for (int i = 0; i < 2000; i++)
      run(16'($urandom) | 16'h3FFF, 16'($urandom) | 16'h3FFF, 0);
    for (int i = 0; i < 200000; i++)
      run(16'($urandom), 16'($urandom), 1);

    for (int d = 0; d < 5; d++) begin
      $display("design %0d: %0d products differ from a*b, %0d exact, mean relative error %e",
               d, n_diff[d], n_same[d], red_sum[d] / real'(n_rand));
      checks++;
      if (d == 0 && n_diff[d] != 0) failures++;
      if (d > 0 && (n_diff[d] == 0 || n_same[d] == 0)) begin
        failures++;
        $display("FAIL design %0d: approximation never acted or never silent", d);
      end
    end
    $display("15-4 adder wraps: %0d, full padded columns: %0d", n_wrap, n_pad_full);
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL: no wrap seen"); end
    checks++;
    if (n_pad_full == 0) begin failures++; $display("FAIL: no full padded column seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
