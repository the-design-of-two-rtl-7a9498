// full_adder: one-bit full adder, x = a ^ b ^ c, y = majority(a, b, c).
//
// Used for the carry-propagate row below the modified carry-save array and for
// the unmodified type 7 cells of the Baugh-Wooley array (a = sum from above,
// b = carry from the diagonal, c = carry from the right).  Combinational.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic x,
  output logic y
);
  always_comb begin
    x = a ^ b ^ c;
    y = (a & b) | (a & c) | (b & c);
  end
endmodule
