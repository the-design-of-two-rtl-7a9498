// mcs_cell: modified basic cell of the C-testable carry-save array.
//
// A full adder whose first operand is the AND of a and b (the partial-product
// bit); c is the sum from the cell above, d the carry from the cell up the same
// diagonal.  x is the sum (a.b ^ c ^ d), y the carry.  The only change from the
// standard cell is that y is also 1 for <a,b,c,d> = <0,0,0,1> and <0,1,0,1>,
// i.e. when a = 0, c = 0 and d = 1.  During multiplication a carry never enters
// a diagonal whose multiplicand bit is 0, so these vectors cannot occur and the
// product is unaffected; in test mode they let one test pattern apply the same
// vector to every cell of a diagonal.  The sum output is untouched, so an
// inverted c or d input always inverts x, which is what carries a fault effect
// to the array outputs.  Purely combinational.
module mcs_cell (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic x,
  output logic y
);
  logic pp;

  always_comb begin
    pp = a & b;
    x  = pp ^ c ^ d;
    y  = (pp & c) | (pp & d) | (c & d) | (~a & ~c & d);
  end
endmodule
