// bw_cell1: Baugh-Wooley type 1 cell (top row), modified for testability.
//
// Standard function: a full adder of the two partial-product bits a.b and d.e
// and of c, x = sum, y = carry.  In the array a = a(k), b = b(0), d = b(1),
// e = a(k-1), and c is a test input held at 0 during multiplication.  Because
// c = 1 never occurs in multiplication, six c = 1 rows of the truth table are
// changed to make the type 3 cells below fully controllable:
//   <abcde> 10101 -> <xy> 01,  01111 -> 11,  00100 -> 11,
//           01100 -> 01,       01110 -> 11,  00110 -> 01.
// All other rows are the plain full adder.  Combinational.
module bw_cell1 (
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
    p1 = a & b;
    p2 = d & e;
    x  = p1 ^ c ^ p2;
    y  = (p1 & c) | (p1 & p2) | (c & p2);
    unique case ({a, b, c, d, e})
      5'b10101: {x, y} = 2'b01;
      5'b01111: {x, y} = 2'b11;
      5'b00100: {x, y} = 2'b11;
      5'b01100: {x, y} = 2'b01;
      5'b01110: {x, y} = 2'b11;
      5'b00110: {x, y} = 2'b01;
      default: ;
    endcase
  end
endmodule
