// mcs_array: n x n modified carry-save (MCS) multiplier array.
//
// n rows of n mcs_cell instances in a shifted cascade.  Cell (i,j) sits in row i
// (top = 0) and diagonal j (right = 0); its sum has weight 2^(i+j).  The
// multiplicand bit a(j) feeds every cell of diagonal j and the multiplier bit
// b(i) every cell of row i.  Inside the array:
//   d(i,j) = y(i-1,j)     carry passes down the diagonal       (i >= 1)
//   c(i,j) = x(i-1,j+1)   sum passes straight down its column  (i >= 1, j <= n-2)
// The edge inputs are primary inputs so that a tester can control them; all are
// 0 during multiplication:
//   c0[j] = c(0,j), d0[j] = d(0,j), cl[i] = c(i,n-1) for i >= 1.
// cl[0] is not used: cell (0,n-1) takes c0[n-1], which every test pattern sets
// to the same value as the cl[0] position would be.
// Outputs: p_low[i] = x(i,0) (product bits 0..n-1), and the sums and carries
// of the bottom row, which the carry-propagate row adds.  Combinational.
module mcs_array #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c0,
  input  logic [N-1:0] d0,
  input  logic [N-1:0] cl,
  output logic [N-1:0] p_low,
  output logic [N-1:0] x_last,
  output logic [N-1:0] y_last
);
  logic [N-1:0] x [N];
  logic [N-1:0] y [N];

  for (genvar i = 0; i < N; i++) begin : g_row
    for (genvar j = 0; j < N; j++) begin : g_diag
      logic c_in, d_in;
      if (i == 0) begin : g_top
        assign c_in = c0[j];
        assign d_in = d0[j];
      end else begin : g_inner
        if (j == N - 1) begin : g_left
          assign c_in = cl[i];
        end else begin : g_col
          assign c_in = x[i-1][j+1];
        end
        assign d_in = y[i-1][j];
      end
      mcs_cell u_cell (
        .a(a[j]), .b(b[i]), .c(c_in), .d(d_in),
        .x(x[i][j]), .y(y[i][j])
      );
    end
    assign p_low[i] = x[i][0];
  end

  assign x_last = x[N-1];
  assign y_last = y[N-1];

  // cl[0] duplicates c0[N-1] (same cell); it is accepted only for a uniform port.
  logic unused_cl0;
  assign unused_cl0 = cl[0];
endmodule
