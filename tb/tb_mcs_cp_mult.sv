// tb_mcs_cp_mult: checks the MCS/CP multiplier at the default n = 16 and at
// n = 4 and n = 5 (an odd size, where the reading of the alternating test
// fields matters).
//  * Multiplication (all test inputs 0): p = a * b, exhaustive at n = 4 and
//    n = 5, random plus corner operands at n = 16.
//  * The 16 test patterns: the 2n+1 outputs match the cell-by-cell reference
//    model.
//  * The reference model itself is checked against the claims the design
//    rests on, at n = 3, 4, 5, 7 and 16: the 16 patterns give every array cell all
//    16 input vectors and every carry-propagate adder all its vectors, and
//    any single faulty cell output reaches the product.
module tb_mcs_cp_mult;
  import mcs_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [15:0] a, b, c0, d0, cl;
  logic        cin;
  logic [32:0] p;
  logic [3:0]  a4, b4, c04, d04, cl4;
  logic        cin4;
  logic [8:0]  p4;
  logic [4:0]  a5, b5, c05, d05, cl5;
  logic        cin5;
  logic [10:0] p5;

  mcs_cp_mult dut (.a(a), .b(b), .c0(c0), .d0(d0), .cl(cl), .cin(cin), .p(p));
  mcs_cp_mult #(.N(4)) dut4 (.a(a4), .b(b4), .c0(c04), .d0(d04), .cl(cl4), .cin(cin4), .p(p4));
  mcs_cp_mult #(.N(5)) dut5 (.a(a5), .b(b5), .c0(c05), .d0(d05), .cl(cl5), .cin(cin5), .p(p5));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check16(logic [15:0] x, logic [15:0] y);
    a = x; b = y;
    #1;
    checks++;
    if (p !== 33'(x) * 33'(y)) begin
      failures++;
      $display("FAIL %0d*%0d = %0d", x, y, p);
    end
  endtask

  initial begin
    mcs_cov_t cov;
    int bad;
    {c0, d0, cl, cin} = '0;
    {c04, d04, cl4, cin4} = '0;
    {c05, d05, cl5, cin5} = '0;
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        a5 = i[4:0]; b5 = j[4:0];
        #1;
        checks++;
        if (p5 !== 11'(i * j)) begin failures++; $display("FAIL n=5 %0d*%0d = %0d", i, j, p5); end
      end
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        a4 = i[3:0]; b4 = j[3:0];
        #1;
        checks++;
        if (p4 !== 9'(i * j)) begin failures++; $display("FAIL n=4 %0d*%0d = %0d", i, j, p4); end
      end
    check16(16'hFFFF, 16'hFFFF);
    check16(16'hFFFF, 16'h0001);
    check16(16'h8000, 16'h8000);
    check16(16'h0000, 16'hFFFF);
    check16(16'hAAAA, 16'h5555);
    for (int t = 0; t < 5000; t++) check16(16'($urandom), 16'($urandom));

    for (int t = 0; t < 16; t++) begin
      mcs_pat_t pt, pt4, pt5;
      logic [2*MAXN:0] e, e4, e5;
      pt = mcs_pattern(t, 16);
      pt4 = mcs_pattern(t, 4);
      pt5 = mcs_pattern(t, 5);
      e = mcs_eval(pt, 16, no_fault(), cov);
      e4 = mcs_eval(pt4, 4, no_fault(), cov);
      e5 = mcs_eval(pt5, 5, no_fault(), cov);
      {a, b, c0, d0, cl, cin} = {pt.a[15:0], pt.b[15:0], pt.c0[15:0], pt.d0[15:0], pt.cl[15:0], pt.cin};
      {a4, b4, c04, d04, cl4, cin4} = {pt4.a[3:0], pt4.b[3:0], pt4.c0[3:0], pt4.d0[3:0], pt4.cl[3:0], pt4.cin};
      {a5, b5, c05, d05, cl5, cin5} = {pt5.a[4:0], pt5.b[4:0], pt5.c0[4:0], pt5.d0[4:0], pt5.cl[4:0], pt5.cin};
      #1;
      checks += 3;
      if (p !== e[32:0]) begin
        failures++;
        $display("FAIL pattern %s: p=%h exp %h", mcs_pattern_name(t), p, e[32:0]);
      end
      if (p4 !== e4[8:0]) begin
        failures++;
        $display("FAIL n=4 pattern %s: p=%h exp %h", mcs_pattern_name(t), p4, e4[8:0]);
      end
      if (p5 !== e5[10:0]) begin
        failures++;
        $display("FAIL n=5 pattern %s: p=%h exp %h", mcs_pattern_name(t), p5, e5[10:0]);
      end
    end

    bad = mcs_model_selfcheck(3, checks);
    failures += bad;
    bad = mcs_model_selfcheck(4, checks);
    failures += bad;
    bad = mcs_model_selfcheck(5, checks);
    failures += bad;
    bad = mcs_model_selfcheck(7, checks);
    failures += bad;
    bad = mcs_model_selfcheck(16, checks);
    failures += bad;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
