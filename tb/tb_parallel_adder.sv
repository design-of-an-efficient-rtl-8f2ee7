// Test of parallel_adder at the 4-bit width used inside the 15-4 compressor
// (exhaustive, 512 cases) and at the 32-bit width of the multiplier's final
// adder (random operands and carry-propagation corner cases).
module tb_parallel_adder;
  logic [3:0]  a4, b4, s4;
  logic        ci4, co4;
  logic [31:0] a32, b32, s32;
  logic        ci32, co32;
  int checks = 0, failures = 0;

  parallel_adder #(.WIDTH(4))  dut4  (.a(a4),  .b(b4),  .ci(ci4),  .s(s4),  .co(co4));
  parallel_adder #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .ci(ci32), .s(s32), .co(co32));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check32(input logic [31:0] x, input logic [31:0] y, input logic c);
    logic [32:0] expect_sum;
    a32 = x; b32 = y; ci32 = c;
    #1;
    expect_sum = 33'(x) + 33'(y) + 33'(c);
    checks++;
    if ({co32, s32} != expect_sum) begin
      failures++;
      $display("FAIL 32: %h + %h + %0b = %h, got %0b%h", x, y, c, expect_sum, co32, s32);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      {ci4, b4, a4} = 9'(v);
      #1;
      checks++;
      if ({co4, s4} != 5'(a4) + 5'(b4) + 5'(ci4)) begin
        failures++;
        $display("FAIL 4: %0d + %0d + %0d -> %0d", a4, b4, ci4, {co4, s4});
      end
    end
    check32(32'hFFFF_FFFF, 32'h0000_0000, 1'b1);
    check32(32'hFFFF_FFFF, 32'hFFFF_FFFF, 1'b1);
    check32(32'h0000_0000, 32'h0000_0000, 1'b0);
    check32(32'h7FFF_FFFF, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 2000; i++) check32($urandom, $urandom, 1'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
