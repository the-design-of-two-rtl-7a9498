// bw_cell2: Baugh-Wooley type 2 cell (leftmost diagonal), modified, in form A
// or B.
//
// Standard function: a full adder of a.~b, c and d.e.  In the array a = a(n-1),
// b = b(r) (through the test XOR gate for r >= 1), so a.~b is the complemented
// sign-row partial product; d = b(r+1) (not through the XOR gate) and
// e = a(n-2); c is the carry of the
// type 2 cell above (a test input for the top one).  Truth-table rows changed
// for testability, as <abcde> -> <xy>:
//   both forms: 00110 -> 01, 01100 -> 01, 00101 -> 01, 01101 -> 01, 11100 -> 11
//   form A:     10100 -> 11, 00100 -> 01, 01110 -> 01, 11110 -> 11
//   form B:     00100 -> 11, 01110 -> 11, 11110 -> 01
// The array alternates A and B down the diagonal, starting with A at the top.
// Combinational.
module bw_cell2
  import mult_pkg::*;
#(
  parameter bw_cell2_variant_t VARIANT = BW2_A
) (
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
    p2 = d & e;
    x  = p1 ^ c ^ p2;
    y  = (p1 & c) | (p1 & p2) | (c & p2);
    unique case ({a, b, c, d, e})
      5'b00110, 5'b01100, 5'b00101, 5'b01101: {x, y} = 2'b01;
      5'b11100: {x, y} = 2'b11;
      5'b10100: if (VARIANT == BW2_A) {x, y} = 2'b11;
      5'b00100: {x, y} = (VARIANT == BW2_A) ? 2'b01 : 2'b11;
      5'b01110: {x, y} = (VARIANT == BW2_A) ? 2'b01 : 2'b11;
      5'b11110: {x, y} = (VARIANT == BW2_A) ? 2'b11 : 2'b01;
      default: ;
    endcase
  end
endmodule
