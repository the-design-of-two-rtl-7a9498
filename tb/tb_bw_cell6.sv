// tb_bw_cell6: exhaustive check of Baugh-Wooley cell type 6.
// Expected <x,y> is the full-adder sum and carry of ~a + b + c.d (no rows changed)
// (vectors written <abcd>, outputs <xy>).
module tb_bw_cell6;
  logic a, b, c, d, x, y;
  int checks = 0, failures = 0;

  bw_cell6 dut (.a(a), .b(b), .c(c), .d(d), .x(x), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      logic s0, s1, s2;
      int tot;
      logic [1:0] exp;
      {a, b, c, d} = v[3:0];
      #1;
      s0 = ~a;
      s1 = b;
      s2 = c & d;
      tot = int'(s0) + int'(s1) + int'(s2);
      exp = {tot[0], tot[1]};
      checks++;
      if ({x, y} !== exp) begin
        failures++;
        $display("FAIL <%b> got <%b%b> exp <%b>", v[3:0], x, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
