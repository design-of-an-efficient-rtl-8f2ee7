// Exhaustive test of compressor_4_2: for all 32 input patterns the outputs
// must satisfy x1+x2+x3+x4+cin == sum + 2*(carry+cout), and cout must equal
// the majority of x1, x2, x3, so that it never depends on cin (the property
// that lets a row of these compressors avoid a carry ripple).
module tb_compressor_4_2;
  logic x1, x2, x3, x4, cin, sum, carry, cout;
  int checks = 0, failures = 0;

  compressor_4_2 dut (.x1(x1), .x2(x2), .x3(x3), .x4(x4), .cin(cin),
                      .sum(sum), .carry(carry), .cout(cout));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int total;
    for (int v = 0; v < 32; v++) begin
      {cin, x4, x3, x2, x1} = 5'(v);
      #1;
      total = int'(x1) + int'(x2) + int'(x3) + int'(x4) + int'(cin);
      checks++;
      if (int'(sum) + 2 * (int'(carry) + int'(cout)) != total) begin
        failures++;
        $display("FAIL value: in=%05b sum=%0b carry=%0b cout=%0b", v[4:0], sum, carry, cout);
      end
      checks++;
      if (cout != ((x1 & x2) | (x1 & x3) | (x2 & x3))) begin
        failures++;
        $display("FAIL cout: in=%05b cout=%0b", v[4:0], cout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
