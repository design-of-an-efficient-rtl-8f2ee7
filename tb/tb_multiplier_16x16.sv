// Test of multiplier_16x16 in all five designs, plus the accurate and the
// design-1 multiplier with the compressors moved one column down
// (CMP_LSB_COL = 11).
//  * The four operand pairs of the reference simulation (65535 x 65535,
//    5 x 5, 273 x 337, 10 x 500) must give 4294836225, 25, 92001 and 5000 on
//    the accurate multiplier.
//  * The same trace shows the six 4-bit 15-4 compressor outputs as one 24-bit
//    value j (1052704 for 273 x 337, 1 for 10 x 500, 0 for 5 x 5, and
//    16776924 for 65535 x 65535). Those values are what the compressors give
//    when they sit on columns 11..16, so the CMP_LSB_COL = 11 instance must
//    reproduce them (read from inside the tree).
//  * For corner and random operands every design must match the reference
//    model: a * b plus the weighted errors of its three low 15-4 compressors.
module tb_multiplier_16x16;
  import mult_pkg::*;
  import tb_ref_pkg::mult_ref;
  logic [15:0] a, b;
  logic [31:0] p [5];
  logic [31:0] p11_acc, p11_d1;
  int checks = 0, failures = 0;

  for (genvar d = 0; d < 5; d++) begin : g_dut
    multiplier_16x16 #(.DESIGN(design_e'(d))) dut (.a(a), .b(b), .p(p[d]));
  end
  multiplier_16x16 #(.DESIGN(ACCURATE), .CMP_LSB_COL(11)) dut11_acc (.a(a), .b(b), .p(p11_acc));
  multiplier_16x16 #(.DESIGN(APPROX1),  .CMP_LSB_COL(11)) dut11_d1  (.a(a), .b(b), .p(p11_d1));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [23:0] j11();
    return {dut11_acc.u_tree.cmp_o[5], dut11_acc.u_tree.cmp_o[4], dut11_acc.u_tree.cmp_o[3],
            dut11_acc.u_tree.cmp_o[2], dut11_acc.u_tree.cmp_o[1], dut11_acc.u_tree.cmp_o[0]};
  endfunction

  task automatic expect_eq(input string what, input logic [31:0] got, input logic [31:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d: %0d, want %0d", what, a, b, got, want);
    end
  endtask

  task automatic run(input logic [15:0] x, input logic [15:0] y);
    a = x; b = y;
    #1;
    for (int d = 0; d < 5; d++) expect_eq($sformatf("design %0d", d), p[d], mult_ref(d, x, y, 12));
    expect_eq("accurate col 11", p11_acc, 32'(x) * 32'(y));
    expect_eq("design 1 col 11", p11_d1, mult_ref(1, x, y, 11));
  endtask

  initial begin
    // operand pairs of the reference simulation
    a = 16'd65535; b = 16'd65535; #1 expect_eq("fig", p[0], 32'd4294836225);
    expect_eq("j", 32'(j11()), 32'd16776924);
    a = 16'd5;     b = 16'd5;     #1 expect_eq("fig", p[0], 32'd25);
    expect_eq("j", 32'(j11()), 32'd0);
    a = 16'd273;   b = 16'd337;   #1 expect_eq("fig", p[0], 32'd92001);
    expect_eq("j", 32'(j11()), 32'd1052704);
    a = 16'd10;    b = 16'd500;   #1 expect_eq("fig", p[0], 32'd5000);
    expect_eq("j", 32'(j11()), 32'd1);
    run('1, '1);
    run('0, '1);
    run(16'h8000, 16'h8000);
    run(16'h0FFF, 16'h0FFF);
    for (int i = 0; i < 20000; i++) run(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
