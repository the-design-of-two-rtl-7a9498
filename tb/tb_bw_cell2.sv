// tb_bw_cell2: exhaustive check of both forms of Baugh-Wooley cell type 2.
// Expected <x,y> is the full-adder sum and carry of a.~b + c + d.e, with these
// rows changed (<abcde> -> <xy>):
//   both forms: 00110 -> 01, 01100 -> 01, 00101 -> 01, 01101 -> 01, 11100 -> 11
//   form A:     10100 -> 11, 00100 -> 01, 01110 -> 01, 11110 -> 11
//   form B:     00100 -> 11, 01110 -> 11, 11110 -> 01
module tb_bw_cell2;
  import mult_pkg::*;
  logic a, b, c, d, e, xa, ya, xb, yb;
  int checks = 0, failures = 0;

  bw_cell2 #(.VARIANT(BW2_A)) dut_a (.a(a), .b(b), .c(c), .d(d), .e(e), .x(xa), .y(ya));
  bw_cell2 #(.VARIANT(BW2_B)) dut_b (.a(a), .b(b), .c(c), .d(d), .e(e), .x(xb), .y(yb));

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
      logic [1:0] ea, eb;
      {a, b, c, d, e} = v[4:0];
      #1;
      s0 = a & ~b;
      s1 = c;
      s2 = d & e;
      tot = int'(s0) + int'(s1) + int'(s2);
      ea = {tot[0], tot[1]};
      unique case (v[4:0])
        5'b00110, 5'b01100, 5'b00101, 5'b01101: ea = 2'b01;
        5'b11100: ea = 2'b11;
        default: ;
      endcase
      eb = ea;
      unique case (v[4:0])
        5'b10100: ea = 2'b11;
        5'b00100: begin ea = 2'b01; eb = 2'b11; end
        5'b01110: begin ea = 2'b01; eb = 2'b11; end
        5'b11110: begin ea = 2'b11; eb = 2'b01; end
        default: ;
      endcase
      checks += 2;
      if ({xa, ya} !== ea) begin failures++; $display("FAIL A <%b> got <%b%b> exp <%b>", v[4:0], xa, ya, ea); end
      if ({xb, yb} !== eb) begin failures++; $display("FAIL B <%b> got <%b%b> exp <%b>", v[4:0], xb, yb, eb); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
