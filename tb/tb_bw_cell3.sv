// tb_bw_cell3: exhaustive check of Baugh-Wooley cell type 3.
// Expected <x,y> is the full-adder sum and carry of a + b + c.d;
// rows changed for testability: 0100 -> 11, 0110 -> 11
// (vectors written <abcd>, outputs <xy>).
module tb_bw_cell3;
  logic a, b, c, d, x, y;
  int checks = 0, failures = 0;

  bw_cell3 dut (.a(a), .b(b), .c(c), .d(d), .x(x), .y(y));

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
      s0 = a;
      s1 = b;
      s2 = c & d;
      tot = int'(s0) + int'(s1) + int'(s2);
      exp = {tot[0], tot[1]};
      unique case (v[3:0])
        4'b0100: exp = 2'b11;
        4'b0110: exp = 2'b11;
        default: ;
      endcase
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
