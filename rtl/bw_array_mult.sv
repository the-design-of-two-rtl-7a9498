// bw_array_mult: C-testable n x n Baugh-Wooley two's complement array
// multiplier.
//
// The Baugh-Wooley form rewrites the negative partial products of a signed
// product as complemented bits plus constants:
//   A*B = sum(i,j<n-1) a(i)b(j)2^(i+j) + a(n-1)b(n-1)2^(2n-2)
//       + sum(i<n-1) [a(n-1)~b(i) + ~a(i)b(n-1)] 2^(i+n-1)
//       + [a(n-1) + b(n-1)] 2^(n-1) + [~a(n-1) + ~b(n-1)] 2^(2n-2) + 2^(2n-1)
// (mod 2^2n).  The array adds these terms with seven cell kinds, laid out in
// rows r = 0 .. n-2 and a final ripple row; the cell in row r, column k adds
// into weight 2^k:
//   row 0, columns 1..n-2   type 1: a(k)b(0) + a(k-1)b(1) + test input d(k-1)
//   rows 1..n-3             type 3: sum from above + carry from column k-1
//                           of the row above + a(k-r-1)b(r+1)
//   rows 0..n-3, column r+n-1  type 2 (A and B alternating, A at the top):
//                           a(n-1)~b(r) + a(n-2)b(r+1) + carry of the type 2
//                           above (test input d(n-2) for the top one)
//   row n-2, columns n-1..2n-4  type 4: sum + carry + ~a(k-n+1)b(n-1)
//   row n-2, column 2n-3    type 5: a(n-1)~b(n-2) + ~a(n-2)b(n-1) + carry of
//                           the last type 2
//   row n-2, column 2n-2    type 6: ~a(n-1) + ~b(n-1) + a(n-1)b(n-1)
//   ripple row, columns n-1..2n-1  type 7 full adders; the rightmost adds
//                           a(n-1) and b(n-1), the leftmost the constant 1.
// p(0) = a(0)b(0) is a single AND gate; p(1..n-2) leave the right edge of
// rows 0..n-3; p(n-1..2n-1) leave the ripple row.
//
// Test support: the n-1 inputs d (0 in multiplication) enter the c inputs of
// the top row, and the input e is XORed into b(1..n-2) (n-2 gates) on their
// way to the complemented b input of the type 2 cells in rows 1..n-3 and of
// the type 5 cell.  The d input of the type 2 cell in row r carries the same
// operand bit b(r+1), but taken before its XOR gate; this split is this
// design's reading, and it is what lets test patterns t50 and t51 reach the
// type 2 vectors <10111> and <11001>.  Cell types 1, 2, 3 and 5 have modified
// truth tables (see their modules) that change only input rows that cannot
// occur when d = 0 and e = 0, so with d = 0, e = 0 the output is the 2n-bit
// two's complement product.  55 test patterns are documented for this array.
// Requires N >= 3.  Combinational.
module bw_array_mult
  import mult_pkg::*;
#(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0]   a,
  input  logic [N-1:0]   b,
  input  logic [N-2:0]   d,
  input  logic           e,
  output logic [2*N-1:0] p
);
  localparam int unsigned R = N - 2;  // index of the type 4/5/6 row

  // bx: b after the test XOR gates (only bits 1..n-2 have one); used only on
  // the complemented b inputs of the type 2 and type 5 cells.
  logic [N-1:0] bx;
  always_comb begin
    bx = b;
    for (int i = 1; i <= N - 2; i++) bx[i] = b[i] ^ e;
  end

  // Sum and carry of every cell position; positions without a cell are 0.
  logic [2*N-1:0] xs [R+1];
  logic [2*N-1:0] ys [R+1];
  logic [2*N-1:0] x7;
  logic [2*N-1:0] y7;

  for (genvar r = 0; r <= R; r++) begin : g_row
    for (genvar k = 0; k < 2 * N; k++) begin : g_col
      if (r < R && k == r + N - 1) begin : g_t2
        localparam bw_cell2_variant_t V = (r % 2 == 0) ? BW2_A : BW2_B;
        bw_cell2 #(.VARIANT(V)) u_cell (
          .a(a[N-1]), .b(bx[r]), .c((r == 0) ? d[N-2] : ys[r-1][k-1]),
          .d(b[r+1]), .e(a[N-2]), .x(xs[r][k]), .y(ys[r][k])
        );
      end else if (r == 0 && k >= 1 && k <= N - 2) begin : g_t1
        bw_cell1 u_cell (
          .a(a[k]), .b(b[0]), .c(d[k-1]), .d(b[1]), .e(a[k-1]),
          .x(xs[r][k]), .y(ys[r][k])
        );
      end else if (r > 0 && r < R && k >= r + 1 && k <= r + N - 2) begin : g_t3
        bw_cell3 u_cell (
          .a(xs[r-1][k]), .b(ys[r-1][k-1]), .c(b[r+1]), .d(a[k-r-1]),
          .x(xs[r][k]), .y(ys[r][k])
        );
      end else if (r == R && k >= N - 1 && k <= 2 * N - 4) begin : g_t4
        bw_cell4 u_cell (
          .a(xs[r-1][k]), .b(ys[r-1][k-1]), .c(b[N-1]), .d(a[k-N+1]),
          .x(xs[r][k]), .y(ys[r][k])
        );
      end else if (r == R && k == 2 * N - 3) begin : g_t5
        bw_cell5 u_cell (
          .a(a[N-1]), .b(bx[N-2]), .c(ys[r-1][k-1]), .d(a[N-2]), .e(b[N-1]),
          .x(xs[r][k]), .y(ys[r][k])
        );
      end else if (r == R && k == 2 * N - 2) begin : g_t6
        bw_cell6 u_cell (
          .a(a[N-1]), .b(~b[N-1]), .c(b[N-1]), .d(a[N-1]),
          .x(xs[r][k]), .y(ys[r][k])
        );
      end else begin : g_none
        assign xs[r][k] = 1'b0;
        assign ys[r][k] = 1'b0;
      end
    end
  end

  // Type 7 ripple row, columns n-1 .. 2n-1.
  for (genvar k = 0; k < 2 * N; k++) begin : g_t7
    if (k == N - 1) begin : g_first
      full_adder u_cell (
        .a(xs[R][k]), .b(a[N-1]), .c(b[N-1]), .x(x7[k]), .y(y7[k])
      );
    end else if (k >= N && k <= 2 * N - 2) begin : g_mid
      full_adder u_cell (
        .a(xs[R][k]), .b(ys[R][k-1]), .c(y7[k-1]), .x(x7[k]), .y(y7[k])
      );
    end else if (k == 2 * N - 1) begin : g_last
      full_adder u_cell (
        .a(1'b1), .b(ys[R][k-1]), .c(y7[k-1]), .x(x7[k]), .y(y7[k])
      );
    end else begin : g_none
      assign x7[k] = 1'b0;
      assign y7[k] = 1'b0;
    end
  end

  always_comb begin
    p[0] = a[0] & b[0];
    for (int r = 0; r < int'(R); r++) p[r+1] = xs[r][r+1];
    for (int k = N - 1; k < 2 * N; k++) p[k] = x7[k];
  end

  // The final carry of the ripple row is the discarded 2^2n term.
  logic unused_carry;
  assign unused_carry = y7[2*N-1];
endmodule
