// tb_bw_array_mult: checks the modified Baugh-Wooley multiplier at the default
// n = 5 and at n = 3 and n = 8.
//  * Multiplication (d = 0, e = 0): p equals the two's complement product,
//    for every operand pair.
//  * The 55 test patterns (n = 5 and 8): p matches the cell-by-cell reference
//    model, including the two patterns with e = 1.
//  * For information, the reference model reports which cells the 55 patterns
//    do not exercise exhaustively and which single-cell faults they miss; this
//    report does not count as a check.
module tb_bw_array_mult;
  import bw_ref_pkg::*;
  int checks = 0, failures = 0;

  logic [4:0] a5, b5;  logic [3:0] d5;  logic e5;  logic [9:0]  p5;
  logic [2:0] a3, b3;  logic [1:0] d3;  logic e3;  logic [5:0]  p3;
  logic [7:0] a8, b8;  logic [6:0] d8;  logic e8;  logic [15:0] p8;

  bw_array_mult dut5 (.a(a5), .b(b5), .d(d5), .e(e5), .p(p5));
  bw_array_mult #(.N(3)) dut3 (.a(a3), .b(b3), .d(d3), .e(e3), .p(p3));
  bw_array_mult #(.N(8)) dut8 (.a(a8), .b(b8), .d(d8), .e(e8), .p(p8));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bw_cov_t cov;
    int bad, info;
    {d5, e5, d3, e3, d8, e8} = '0;
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        a8 = i[7:0]; b8 = j[7:0];
        a5 = i[4:0]; b5 = j[4:0];
        a3 = i[2:0]; b3 = j[2:0];
        #1;
        checks++;
        if ($signed(p8) !== 16'($signed(a8) * $signed(b8))) begin
          failures++;
          $display("FAIL n=8 %0d*%0d = %0d", $signed(a8), $signed(b8), $signed(p8));
        end
        if (i < 32 && j < 32) begin
          checks++;
          if ($signed(p5) !== 10'($signed(a5) * $signed(b5))) begin
            failures++;
            $display("FAIL n=5 %0d*%0d = %0d", $signed(a5), $signed(b5), $signed(p5));
          end
        end
        if (i < 8 && j < 8) begin
          checks++;
          if ($signed(p3) !== 6'($signed(a3) * $signed(b3))) begin
            failures++;
            $display("FAIL n=3 %0d*%0d = %0d", $signed(a3), $signed(b3), $signed(p3));
          end
        end
      end

    for (int t = 0; t < 55; t++) begin
      bw_pat_t q5, q8;
      logic [2*MAXN-1:0] x5, x8;
      q5 = bw_pattern(t, 5);
      q8 = bw_pattern(t, 8);
      x5 = bw_eval(q5, 5, bw_no_fault(), cov);
      x8 = bw_eval(q8, 8, bw_no_fault(), cov);
      {a5, b5, d5, e5} = {q5.a[4:0], q5.b[4:0], q5.d[3:0], q5.e};
      {a8, b8, d8, e8} = {q8.a[7:0], q8.b[7:0], q8.d[6:0], q8.e};
      #1;
      checks += 2;
      if (p5 !== x5[9:0]) begin
        failures++;
        $display("FAIL n=5 test t%0d: p=%b exp %b", t, p5, x5[9:0]);
      end
      if (p8 !== x8[15:0]) begin
        failures++;
        $display("FAIL n=8 test t%0d: p=%b exp %b", t, p8, x8[15:0]);
      end
    end

    info = 0;
    bad = bw_model_selfcheck(5, info);
    $display("INFO n=5: %0d of %0d cell/vector/fault items not met by the 55 patterns", bad, info);
    info = 0;
    bad = bw_model_selfcheck(8, info);
    $display("INFO n=8: %0d of %0d cell/vector/fault items not met by the 55 patterns", bad, info);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
