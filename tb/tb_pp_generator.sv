// Test of pp_generator: for random and corner operands, every column must hold
// exactly the partial products of its weight (a[j] & b[i], i + j = c, in order
// of rising i), zeros above its height, and the weighted sum of all bits must
// be a * b.
module tb_pp_generator;
  import tb_ref_pkg::*;
  logic [N-1:0]          a, b;
  logic [2*N-1:0][N-1:0] col;
  int checks = 0, failures = 0;

  pp_generator #(.N(N)) dut (.a(a), .b(b), .col(col));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [N-1:0] x, input logic [N-1:0] y);
    longint total;
    logic [N-1:0] want;
    int k;
    a = x; b = y;
    #1;
    total = 0;
    for (int c = 0; c < 2 * N; c++) begin
      want = '0;
      k = 0;
      for (int i = 0; i < N; i++)
        if (c - i >= 0 && c - i < N) begin
          want[k] = x[c-i] & y[i];
          k++;
        end
      checks++;
      if (col[c] != want) begin
        failures++;
        $display("FAIL col %0d a=%h b=%h: %h, want %h", c, x, y, col[c], want);
      end
      total += longint'(popcount(32'(col[c]))) << c;
    end
    checks++;
    if (total != longint'(x) * longint'(y)) begin
      failures++;
      $display("FAIL sum a=%h b=%h: %0d", x, y, total);
    end
  endtask

  initial begin
    run('1, '1);
    run('0, '1);
    run(16'h8001, 16'h8001);
    for (int i = 0; i < 300; i++) run(16'($urandom), 16'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
