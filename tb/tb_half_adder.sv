// Exhaustive test of half_adder: all four input patterns, sum and carry
// compared with the arithmetic sum a + b.
module tb_half_adder;
  logic a, b, s, co;
  int checks = 0, failures = 0;

  half_adder dut (.a(a), .b(b), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      {b, a} = 2'(v);
      #1;
      checks++;
      if (2 * int'(co) + int'(s) != int'(a) + int'(b)) begin
        failures++;
        $display("FAIL a=%0b b=%0b -> co=%0b s=%0b", a, b, co, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
