// tb_mcs_cell: exhaustive check of the modified basic cell.
// For all 16 vectors <a,b,c,d>: x must be the parity of a.b, c, d; y must be
// the full-adder carry, except that <0001> and <0101> give y = 1.
module tb_mcs_cell;
  logic a, b, c, d, x, y;
  int checks = 0, failures = 0;

  mcs_cell dut (.a(a), .b(b), .c(c), .d(d), .x(x), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int ones;
      logic exp_x, exp_y;
      {a, b, c, d} = v[3:0];
      #1;
      ones  = int'(1'(a & b)) + int'(c) + int'(d);
      exp_x = ones[0];
      exp_y = (ones >= 2) || (v == 1) || (v == 5);
      checks += 2;
      if (x !== exp_x) begin failures++; $display("FAIL v%0d x=%b exp %b", v, x, exp_x); end
      if (y !== exp_y) begin failures++; $display("FAIL v%0d y=%b exp %b", v, y, exp_y); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
