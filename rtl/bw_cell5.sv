// bw_cell5: Baugh-Wooley type 5 cell (where the sign row meets the leftmost
// diagonal), modified for testability.
//
// A full adder of a.~b, c and ~d.e.  In the array a = a(n-1), b = b(n-2)
// through the test XOR gate, c = carry of the last type 2 cell, d = a(n-2) and
// e = b(n-1), so both product terms are complemented sign terms.  Rows
// <abcde> = 00100 and 01110 give <xy> = 11 instead of 10, which lets a test
// pattern set the carry into the type 7 row.  Combinational.
module bw_cell5 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  input  logic e,
  output logic x,
  output logic y
);
  logic p1, p2;

  always_comb begin
    p1 = a & ~b;
    p2 = ~d & e;
    x  = p1 ^ c ^ p2;
    y  = (p1 & c) | (p1 & p2) | (c & p2);
    unique case ({a, b, c, d, e})
      5'b00100, 5'b01110: {x, y} = 2'b11;
      default: ;
    endcase
  end
endmodule
