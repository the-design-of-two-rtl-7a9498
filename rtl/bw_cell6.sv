// bw_cell6: Baugh-Wooley type 6 cell (sign-by-sign corner), unmodified.
//
// A full adder of ~a, b and c.d.  In the array a = a(n-1), b = ~b(n-1) and
// c.d = b(n-1).a(n-1), so the cell adds the column 2n-2 terms
// ~a(n-1) + ~b(n-1) + a(n-1).b(n-1) of the Baugh-Wooley product.
// Combinational.
module bw_cell6 (
  input  logic a,
  input  logic b,
  input  logic c,
  input  logic d,
  output logic x,
  output logic y
);
  logic na, pp;

  always_comb begin
    na = ~a;
    pp = c & d;
    x  = na ^ b ^ pp;
    y  = (na & b) | (na & pp) | (b & pp);
  end
endmodule
