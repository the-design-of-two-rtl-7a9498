// tb_easytest_mult_top: end-to-end test of both multipliers at their default
// sizes (16 x 16 chip, 5 x 5 Baugh-Wooley array), with no parameter override.
//  * Chip: multiplications through the shared pins, then the complete
//    16-pattern test set through the test-control pins, each compared with
//    the product or with the reference model, with the two-clock latency
//    checked.  Starts issued while busy must be ignored.
//  * Baugh-Wooley array: every 5-bit signed operand pair, then the complete
//    55-pattern test set compared with the reference model.
// Each mechanism is counted: chip multiplications, chip test patterns, pin
// turnarounds (pins switching to output), ignored starts, BW products, BW
// tests with d != 0, and BW tests with e = 1 (test XOR gates inverting).  A
// mechanism that never happened counts as a failure.
module tb_easytest_mult_top;
  import mult_pkg::*;
  import mcs_ref_pkg::*;
  import bw_ref_pkg::*;
  int checks = 0, failures = 0;
  int cycle = 0;
  int n_mult = 0, n_test = 0, n_turn = 0, n_ignored = 0, n_bw_mult = 0, n_bw_d = 0, n_bw_e = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] pins_in = '0, pins_out;
  mcs_test_pins_t tpins = '0;
  logic pins_oe, carry_out, busy, done;
  logic [4:0] bw_a = '0, bw_b = '0;
  logic [3:0] bw_d = '0;
  logic bw_e = 1'b0;
  logic [9:0] bw_p;

  easytest_mult_top dut (
    .clk(clk), .rst_n(rst_n), .mcs_start(start), .mcs_pins_in(pins_in),
    .mcs_test(tpins), .mcs_pins_out(pins_out), .mcs_pins_oe(pins_oe),
    .mcs_carry_out(carry_out), .mcs_busy(busy), .mcs_done(done),
    .bw_a(bw_a), .bw_b(bw_b), .bw_d(bw_d), .bw_e(bw_e), .bw_p(bw_p)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  logic oe_q = 1'b0;
  always @(posedge clk) begin
    if (pins_oe && !oe_q) n_turn++;
    oe_q <= pins_oe;
  end

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [15:0] a, input logic [15:0] b, input mcs_test_pins_t tp,
                     input bit poke, output logic [32:0] res);
    int t0;
    @(negedge clk);
    pins_in = {b, a};
    tpins = tp;
    start = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start = poke;
    if (poke && busy) n_ignored++;
    pins_in = $urandom;
    while (!done && cycle - t0 < 10) @(negedge clk);
    start = 1'b0;
    checks++;
    if (cycle - t0 != 2) begin
      failures++;
      $display("FAIL chip latency %0d clocks", cycle - t0);
    end
    res = {carry_out, pins_out};
  endtask

  initial begin
    mcs_cov_t mcov;
    bw_cov_t bcov;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    for (int t = 0; t < 200; t++) begin
      logic [15:0] a, b;
      logic [32:0] r;
      a = 16'($urandom);
      b = 16'($urandom);
      run(a, b, '0, t[0], r);
      n_mult++;
      checks++;
      if (r !== 33'(a) * 33'(b)) begin
        failures++;
        $display("FAIL chip %0d*%0d = %0d", a, b, r);
      end
    end
    for (int t = 0; t < 16; t++) begin
      mcs_pat_t pt;
      mcs_test_pins_t tp;
      logic [32:0] r;
      logic [2*mcs_ref_pkg::MAXN:0] e;
      pt = mcs_pattern(t, 16);
      e = mcs_eval(pt, 16, mcs_ref_pkg::no_fault(), mcov);
      tp = '{c0_even: pt.c0[0], c0_odd: pt.c0[1], d0_even: pt.d0[0], d0_odd: pt.d0[1],
             cl_even: pt.cl[0], cl_odd: pt.cl[1], cin: pt.cin};
      run(pt.a[15:0], pt.b[15:0], tp, 0, r);
      n_test++;
      checks++;
      if (r !== e[32:0]) begin
        failures++;
        $display("FAIL chip pattern %s: %h exp %h", mcs_pattern_name(t), r, e[32:0]);
      end
    end

    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        bw_a = i[4:0]; bw_b = j[4:0]; bw_d = '0; bw_e = 1'b0;
        #1;
        n_bw_mult++;
        checks++;
        if ($signed(bw_p) !== 10'($signed(bw_a) * $signed(bw_b))) begin
          failures++;
          $display("FAIL bw %0d*%0d = %0d", $signed(bw_a), $signed(bw_b), $signed(bw_p));
        end
      end
    for (int t = 0; t < 55; t++) begin
      bw_pat_t q;
      logic [2*bw_ref_pkg::MAXN-1:0] x;
      q = bw_pattern(t, 5);
      x = bw_eval(q, 5, bw_no_fault(), bcov);
      {bw_a, bw_b, bw_d, bw_e} = {q.a[4:0], q.b[4:0], q.d[3:0], q.e};
      #1;
      if (bw_d != 0) n_bw_d++;
      if (bw_e) n_bw_e++;
      checks++;
      if (bw_p !== x[9:0]) begin
        failures++;
        $display("FAIL bw test t%0d: %b exp %b", t, bw_p, x[9:0]);
      end
    end

    $display("mechanisms: chip multiplications=%0d chip test patterns=%0d pin turnarounds=%0d ignored starts=%0d bw products=%0d bw tests d!=0=%0d bw tests e=1=%0d",
             n_mult, n_test, n_turn, n_ignored, n_bw_mult, n_bw_d, n_bw_e);
    if (n_mult == 0 || n_test == 0 || n_turn == 0 || n_ignored == 0 ||
        n_bw_mult == 0 || n_bw_d == 0 || n_bw_e == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    checks++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
