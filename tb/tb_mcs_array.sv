// tb_mcs_array: checks the modified carry-save array at n = 4 and n = 16.
// With the edge inputs at 0 the array's outputs must add up to a * b:
//   p_low + sum_{j>=1} x_last[j] 2^(n-1+j) + sum_j y_last[j] 2^(n+j) = a * b
// (exhaustive at n = 4, random at n = 16).  Under each of the 16 test
// patterns, p_low and the ripple sum of the bottom row must match the
// cell-by-cell reference model.
module tb_mcs_array;
  import mcs_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [3:0]  a4, b4, c04, d04, cl4, pl4, xl4, yl4;
  logic [15:0] a16, b16, c016, d016, cl16, pl16, xl16, yl16;

  mcs_array #(.N(4))  dut4  (.a(a4), .b(b4), .c0(c04), .d0(d04), .cl(cl4),
                             .p_low(pl4), .x_last(xl4), .y_last(yl4));
  mcs_array #(.N(16)) dut16 (.a(a16), .b(b16), .c0(c016), .d0(d016), .cl(cl16),
                             .p_low(pl16), .x_last(xl16), .y_last(yl16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint unsigned weigh(int n, logic [15:0] pl, logic [15:0] xl,
                                            logic [15:0] yl);
    longint unsigned s = 0;
    for (int i = 0; i < n; i++) s += longint'(pl[i]) << i;
    for (int j = 1; j < n; j++) s += longint'(xl[j]) << (n - 1 + j);  // x_last[0] is p_low[n-1]
    for (int j = 0; j < n; j++) s += longint'(yl[j]) << (n + j);
    return s;
  endfunction

  initial begin
    mcs_cov_t cov;
    c04 = '0; d04 = '0; cl4 = '0; c016 = '0; d016 = '0; cl16 = '0;
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = i[3:0]; b4 = j[3:0];
        #1;
        checks++;
        if (weigh(4, 16'(pl4), 16'(xl4), 16'(yl4)) != longint'(i * j)) begin
          failures++;
          $display("FAIL n=4 %0d*%0d", i, j);
        end
      end
    for (int t = 0; t < 2000; t++) begin
      a16 = 16'($urandom); b16 = 16'($urandom);
      #1;
      checks++;
      if (weigh(16, pl16, xl16, yl16) != longint'(a16) * longint'(b16)) begin
        failures++;
        $display("FAIL n=16 %0d*%0d", a16, b16);
      end
    end
    for (int t = 0; t < 16; t++) begin
      mcs_pat_t p4, p16;
      logic [2*MAXN:0] e4, e16;
      logic [4:0]  hi4;
      logic [16:0] hi16;
      p4 = mcs_pattern(t, 4);
      p16 = mcs_pattern(t, 16);
      e4 = mcs_eval(p4, 4, no_fault(), cov);
      e16 = mcs_eval(p16, 16, no_fault(), cov);
      {a4, b4, c04, d04, cl4} = {p4.a[3:0], p4.b[3:0], p4.c0[3:0], p4.d0[3:0], p4.cl[3:0]};
      {a16, b16, c016, d016, cl16} = {p16.a[15:0], p16.b[15:0], p16.c0[15:0], p16.d0[15:0],
                                      p16.cl[15:0]};
      #1;
      hi4  = {1'b0, 1'b0, xl4[3:1]} + {1'b0, yl4} + 5'(p4.cin);
      hi16 = {1'b0, 1'b0, xl16[15:1]} + {1'b0, yl16} + 17'(p16.cin);
      checks += 2;
      if ({hi4, pl4} !== e4[8:0]) begin
        failures++;
        $display("FAIL n=4 pattern %s: %h exp %h", mcs_pattern_name(t), {hi4, pl4}, e4[8:0]);
      end
      if ({hi16, pl16} !== e16[32:0]) begin
        failures++;
        $display("FAIL n=16 pattern %s: %h exp %h", mcs_pattern_name(t), {hi16, pl16}, e16[32:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
