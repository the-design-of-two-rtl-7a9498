// bw_cell4: Baugh-Wooley type 4 cell (sign row), unmodified.
//
// A full adder of a (sum from above), b (carry from up the diagonal) and the
// complemented partial product c.~d, with c = b(n-1) and d = a(i), i < n-1.
// Combinational.
module bw_cell4 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic x,
  output logic y
);
  logic pp;

  always_comb begin
    pp = c & ~d;
    x  = a ^ b ^ pp;
    y  = (a & b) | (a & pp) | (b & pp);
  end
endmodule
