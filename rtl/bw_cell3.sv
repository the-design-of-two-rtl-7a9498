// bw_cell3: Baugh-Wooley type 3 cell (inner array), modified for testability.
//
// A full adder of a (sum from the cell above), b (carry from up the diagonal)
// and the partial product c.d, with c = b(r+1) and d = a(i).  As in the
// modified carry-save cell, the carry is forced to 1 when no carry can arrive
// in multiplication: <abcd> = 0100 and 0110 give <xy> = 11 instead of 10.
// All other rows are the plain full adder.  Combinational.
module bw_cell3 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic x,
  output logic y
);
  logic pp;

  always_comb begin
    pp = c & d;
    x  = a ^ b ^ pp;
    y  = (a & b) | (a & pp) | (b & pp) | (~a & b & ~d);
  end
endmodule
