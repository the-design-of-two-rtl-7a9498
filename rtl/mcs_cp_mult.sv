// mcs_cp_mult: C-testable n x n unsigned multiplier, MCS array plus a final
// row of carry-propagate adders (MCS/CP).
//
// The mcs_array leaves the upper product bits as a sum vector x(n-1,1..n-1)
// and a carry vector y(n-1,0..n-1).  A ripple row of n full adders resolves
// them: the adder in column k (k = n .. 2n-1) adds x(n-1,k-n+1) (0 for the
// leftmost), y(n-1,k-n) and the carry from the right.  The rightmost adder's
// carry-in, cin, is a primary input so that a tester can control it; with
// cin = c0 = d0 = cl = 0 the output is p = a * b.  p[2n] is the last carry,
// always 0 in multiplication and observable in test.  The same 16 test
// patterns that exercise every array cell exhaustively also apply all eight
// vectors to every adder of the row.  Combinational.
module mcs_cp_mult #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c0,
  input  logic [N-1:0] d0,
  input  logic [N-1:0] cl,
  input  logic         cin,
  output logic [2*N:0] p
);
  logic [N-1:0] x_last, y_last;
  logic [N:0]   carry;
  logic [N-1:0] sum_in;

  mcs_array #(.N(N)) u_array (
    .a(a), .b(b), .c0(c0), .d0(d0), .cl(cl),
    .p_low(p[N-1:0]), .x_last(x_last), .y_last(y_last)
  );

  // Column n+m adds the bottom-row sum of diagonal m+1 (none for m = n-1).
  assign sum_in = {1'b0, x_last[N-1:1]};
  assign carry[0] = cin;

  for (genvar m = 0; m < N; m++) begin : g_cp
    full_adder u_fa (
      .a(sum_in[m]), .b(y_last[m]), .c(carry[m]),
      .x(p[N+m]), .y(carry[m+1])
    );
  end

  assign p[2*N] = carry[N];

  logic unused_x0;
  assign unused_x0 = x_last[0];  // already p[N-1]
endmodule
