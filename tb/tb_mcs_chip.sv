// tb_mcs_chip: checks the 16 x 16 multiplier chip through its pins.
//  * Each operation: start with the operands on the pins; done must come
//    exactly two clocks later, with pins_oe = 1 and the product on the pins;
//    pins_oe must be 0 in every other cycle.
//  * Multiplication: corner and random operands, p = a * b, carry_out = 0.
//  * The 16 test patterns through the seven test-control pins: the 33 output
//    bits match the cell-by-cell reference model.
//  * A start pulse while the chip is busy must be ignored.
module tb_mcs_chip;
  import mult_pkg::*;
  import mcs_ref_pkg::*;
  int checks = 0, failures = 0;
  int cycle = 0;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [31:0] pins_in = '0, pins_out;
  mcs_test_pins_t test_pins = '0;
  logic pins_oe, carry_out, busy, done;

  mcs_chip dut (.clk(clk), .rst_n(rst_n), .start(start), .pins_in(pins_in),
                .test_pins(test_pins), .pins_out(pins_out), .pins_oe(pins_oe),
                .carry_out(carry_out), .busy(busy), .done(done));

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Output enable only while the product is presented.
  always @(negedge clk) if (rst_n && pins_oe && !done) begin
    failures++;
    $display("FAIL pins_oe without done at cycle %0d", cycle);
  end

  // Run one operation; returns the 33-bit result and checks the latency.
  task automatic run(input logic [15:0] a, input logic [15:0] b, input mcs_test_pins_t tp,
                     input bit poke_busy, output logic [32:0] res);
    int t0;
    @(negedge clk);
    pins_in = {b, a};
    test_pins = tp;
    start = 1'b1;
    @(posedge clk);
    t0 = cycle;
    @(negedge clk);
    start = poke_busy;       // a start while busy must be ignored
    pins_in = ~pins_in;
    test_pins = ~tp;
    while (!done) begin
      @(negedge clk);
      start = 1'b0;
      if (cycle - t0 > 10) break;
    end
    checks++;
    if (cycle - t0 != 2 || !pins_oe) begin
      failures++;
      $display("FAIL latency %0d clocks, pins_oe=%b", cycle - t0, pins_oe);
    end
    res = {carry_out, pins_out};
    @(negedge clk);
    checks++;
    if (busy || pins_oe) begin
      failures++;
      $display("FAIL chip not idle after the product cycle");
    end
  endtask

  function automatic mcs_test_pins_t pins_of(mcs_pat_t p);
    mcs_test_pins_t tp;
    tp.c0_even = p.c0[0];  tp.c0_odd = p.c0[1];
    tp.d0_even = p.d0[0];  tp.d0_odd = p.d0[1];
    tp.cl_even = p.cl[0];  tp.cl_odd = p.cl[1];
    tp.cin     = p.cin;
    return tp;
  endfunction

  task automatic mult(logic [15:0] a, logic [15:0] b, bit poke);
    logic [32:0] r;
    run(a, b, '0, poke, r);
    checks++;
    if (r !== 33'(a) * 33'(b)) begin
      failures++;
      $display("FAIL %0d*%0d = %0d", a, b, r);
    end
  endtask

  initial begin
    mcs_cov_t cov;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    mult(16'hFFFF, 16'hFFFF, 0);
    mult(16'h0000, 16'h1234, 0);
    mult(16'h8001, 16'h7FFF, 1);
    for (int t = 0; t < 300; t++) mult(16'($urandom), 16'($urandom), t[0]);
    for (int t = 0; t < 16; t++) begin
      mcs_pat_t pt;
      logic [32:0] r;
      logic [2*MAXN:0] e;
      pt = mcs_pattern(t, 16);
      e = mcs_eval(pt, 16, no_fault(), cov);
      run(pt.a[15:0], pt.b[15:0], pins_of(pt), 0, r);
      checks++;
      if (r !== e[32:0]) begin
        failures++;
        $display("FAIL pattern %s: %h exp %h", mcs_pattern_name(t), r, e[32:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
