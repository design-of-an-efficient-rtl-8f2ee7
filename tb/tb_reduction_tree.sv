// Test of reduction_tree in all five designs: columns are filled with the
// partial products of random and corner operands (formed here, not by
// pp_generator), and row0 + row1 must equal the reference product modulo
// 2**32 (a * b for the accurate design). Bits above each column's height
// are driven with ones to show that the tree ignores them.
module tb_reduction_tree;
  import mult_pkg::design_e;
  import tb_ref_pkg::*;
  logic [W-1:0][N-1:0] col;
  logic [W-1:0]        row0 [5];
  logic [W-1:0]        row1 [5];
  int checks = 0, failures = 0;

  for (genvar d = 0; d < 5; d++) begin : g_dut
    reduction_tree #(.DESIGN(design_e'(d))) dut (.col(col), .row0(row0[d]), .row1(row1[d]));
  end

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] a, input logic [N-1:0] b);
    int k;
    logic [W-1:0] want;
    col = '1;
    for (int c = 0; c < W; c++) begin
      k = 0;
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N) begin
          col[c][k] = a[c-i] & b[i];
          k++;
        end
    end
    #1;
    for (int d = 0; d < 5; d++) begin
      want = mult_ref(d, a, b, 12);
      checks++;
      if (row0[d] + row1[d] != want) begin
        failures++;
        if (failures < 10)
          $display("FAIL design %0d a=%0d b=%0d: %0d, want %0d", d, a, b, row0[d] + row1[d], want);
      end
    end
  endtask

  initial begin
    run('1, '1);
    run('0, '0);
    run(16'h8000, 16'hFFFF);
    for (int i = 0; i < 5000; i++) run(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
