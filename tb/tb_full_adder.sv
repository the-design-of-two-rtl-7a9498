// tb_full_adder: exhaustive check of the full adder: {y,x} = a + b + c.
module tb_full_adder;
  logic a, b, c, x, y;
  int checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .c(c), .x(x), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      int tot;
      {a, b, c} = v[2:0];
      #1;
      tot = int'(a) + int'(b) + int'(c);
      checks++;
      if ({y, x} !== tot[1:0]) begin
        failures++;
        $display("FAIL abc=%b got %b%b", v[2:0], y, x);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
