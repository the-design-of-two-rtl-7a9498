// tb_bw_cell1: exhaustive check of Baugh-Wooley cell type 1.
// Expected <x,y> is the full-adder sum and carry of a.b + c + d.e;
// rows changed for testability: 10101 -> 01, 01111 -> 11, 00100 -> 11, 01100 -> 01, 01110 -> 11, 00110 -> 01
// (vectors written <abcde>, outputs <xy>).
module tb_bw_cell1;
  logic a, b, c, d, e, x, y;
  int checks = 0, failures = 0;

  bw_cell1 dut (.a(a), .b(b), .c(c), .d(d), .e(e), .x(x), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic s0, s1, s2;
      int tot;
      logic [1:0] exp;
      {a, b, c, d, e} = v[4:0];
      #1;
      s0 = a & b;
      s1 = c;
      s2 = d & e;
      tot = int'(s0) + int'(s1) + int'(s2);
      exp = {tot[0], tot[1]};
      unique case (v[4:0])
        5'b10101: exp = 2'b01;
        5'b01111: exp = 2'b11;
        5'b00100: exp = 2'b11;
        5'b01100: exp = 2'b01;
        5'b01110: exp = 2'b11;
        5'b00110: exp = 2'b01;
        default: ;
      endcase
      checks++;
      if ({x, y} !== exp) begin
        failures++;
        $display("FAIL <%b> got <%b%b> exp <%b>", v[4:0], x, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
