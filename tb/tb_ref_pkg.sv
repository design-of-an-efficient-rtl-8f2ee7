// Reference models for the multiplier testbenches, written without the RTL's
// gate equations.
//
// An approximate 5-3 compressor is modelled as "true count plus an error that
// depends on the input pattern". The error tables list, for each design, every
// 5-bit input (x4..x0 read as a number, x0 least significant) whose result is
// wrong and by how much: design 1 is wrong for 6 inputs (+4 for input 12,
// +-3 otherwise), designs 2 and 3 for 8 inputs each (+-2) and design 4 for 12
// inputs (+-2). A 15-4 compressor is then modelled from its dataflow (five
// full adders as plain arithmetic, two 5-3 counts, A + 2B modulo 16) and the
// multiplier as a * b plus the weighted errors of its three low compressors.
package tb_ref_pkg;

  localparam int N = 16;
  localparam int W = 32;

  function automatic int popcount(input logic [31:0] v);
    int n = 0;
    for (int i = 0; i < 32; i++) n += int'(v[i]);
    return n;
  endfunction

  // Error of the 5-3 compressor of design d for input pattern x.
  function automatic int err53(input int d, input logic [4:0] x);
    case (d)
      1: case (x)
           5'd12: return 4;
           5'd13, 5'd14, 5'd28: return 3;
           5'd23, 5'd27: return -3;
           default: return 0;
         endcase
      2: case (x)
           5'd9, 5'd10, 5'd12, 5'd15: return -2;
           5'd16, 5'd19, 5'd21, 5'd22: return 2;
           default: return 0;
         endcase
      3: case (x)
           5'd9, 5'd10, 5'd12, 5'd19, 5'd21, 5'd22: return -2;
           5'd15, 5'd16: return 2;
           default: return 0;
         endcase
      4: case (x)
           5'd4, 5'd8, 5'd23, 5'd27: return 2;
           5'd3, 5'd12, 5'd13, 5'd14, 5'd17, 5'd18, 5'd19, 5'd28: return -2;
           default: return 0;
         endcase
      default: return 0;
    endcase
  endfunction

  function automatic int cnt53(input int d, input logic [4:0] x);
    return popcount(32'(x)) + err53(d, x);
  endfunction

  // 15-4 compressor of design d: returns the 4-bit output.
  function automatic int cnt154(input int d, input logic [14:0] x);
    logic [4:0] s, c;
    int tot, a_cnt, b_cnt;
    for (int k = 0; k < 5; k++) begin
      tot  = int'(x[3*k]) + int'(x[3*k+1]) + int'(x[3*k+2]);
      s[k] = tot[0];
      c[k] = tot[1];
    end
    a_cnt = cnt53((d == 4) ? 4 : d, s);
    b_cnt = cnt53((d == 4) ? 1 : d, c);
    return (a_cnt + 2 * b_cnt) % 16;
  endfunction

  // 1 when the two 5-3 results of a 15-4 compressor of design d add up to more
  // than 15, so that its 4-bit output wraps.
  function automatic bit wraps154(input int d, input logic [14:0] x);
    logic [4:0] s, c;
    int tot;
    for (int k = 0; k < 5; k++) begin
      tot  = int'(x[3*k]) + int'(x[3*k+1]) + int'(x[3*k+2]);
      s[k] = tot[0];
      c[k] = tot[1];
    end
    return cnt53((d == 4) ? 4 : d, s) + 2 * cnt53((d == 4) ? 1 : d, c) > 15;
  endfunction

  // The 15 compressor inputs taken from column c of a * b: partial products
  // a[c-i] & b[i] in order of rising i, zeros above the column's height.
  function automatic logic [14:0] column_bits(input logic [N-1:0] a, input logic [N-1:0] b,
                                              input int c);
    logic [14:0] x = '0;
    int k = 0;
    for (int i = 0; i < N; i++) begin
      if (c - i >= 0 && c - i < N) begin
        if (k < 15) x[k] = a[c-i] & b[i];
        k++;
      end
    end
    return x;
  endfunction

  // Product of the multiplier of design d with its lowest 15-4 compressor on
  // column cmp_lsb; the three lowest compressors are approximate.
  function automatic logic [W-1:0] mult_ref(input int d, input logic [N-1:0] a,
                                            input logic [N-1:0] b, input int cmp_lsb);
    longint p;
    logic [14:0] x;
    p = longint'(a) * longint'(b);
    for (int j = 0; j < 3; j++) begin
      x = column_bits(a, b, cmp_lsb + j);
      p += longint'(cnt154(d, x) - popcount(32'(x))) <<< (cmp_lsb + j);
    end
    return W'(p);
  endfunction

endpackage
