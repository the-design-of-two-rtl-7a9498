// mcs_ref_pkg: reference model of the modified carry-save multiplier with a
// carry-propagate row, for testbenches.
//
// mcs_eval() evaluates the array cell by cell from truth tables (the modified
// cell's carry map is the constant Y_TAB; the sum is the parity of a.b, c and
// d).  It can invert the x and/or y output of one chosen cell or adder to model
// a single faulty cell, and it records which input vector every cell and
// every carry-propagate adder received, so a testbench can confirm that a test
// set exercises each cell exhaustively.
//
// mcs_pattern() returns the 16 test patterns.  Each vector field is coded as
// 0 = all zeros, 1 = all ones, 2 = 01...01 and 3 = 10...10.  For b and c(n-1)
// (indexed by row) 01...01 means ones on the even bit positions; for c0 and d0
// (indexed by diagonal) the field is read from bit n-1 down, starting with 0.
// For even n both give ones on even positions; for odd n only this mixed
// reading gives every cell all 16 vectors (mcs_model_selfcheck confirms it
// for n = 3 to 9).  The carry-in value of each pattern
// is this design's choice (it only has to be controllable); d0 of T9,14 is all
// ones, which is what gives row 0 the vector <1001>.
package mcs_ref_pkg;

  localparam int MAXN = 32;

  // Carry of the modified cell indexed by {a,b,c,d}: the full-adder carry
  // (vectors 3,7,11,13,14,15) plus the modified minterms 0001 and 0101.
  localparam logic [15:0] Y_TAB = 16'hE8AA;

  typedef struct {
    logic [MAXN-1:0] a, b, c0, d0, cl;
    logic            cin;
  } mcs_pat_t;

  typedef struct {
    int fi, fj;          // faulty array cell (row, diagonal); fi < 0: none
    int fcp;             // faulty carry-propagate adder; < 0: none
    logic [1:0] flip;    // bit 1: invert x, bit 0: invert y
  } mcs_fault_t;

  // Coverage: one bit per input vector of each cell.
  typedef struct {
    logic [15:0] cells[MAXN][MAXN];
    logic [7:0]  cp   [MAXN];
  } mcs_cov_t;

  // from_top = 1 reads the alternation from bit n-1 down (01...01 starts with
  // a 0 in bit n-1); otherwise it is by absolute bit index.  The two differ
  // only for odd n.
  function automatic logic [MAXN-1:0] fill(int code, int n, bit from_top = 1'b0);
    logic [MAXN-1:0] v = '0;
    int sh;
    sh = from_top ? n % 2 : 0;
    for (int k = 0; k < n; k++)
      case (code)
        1: v[k] = 1'b1;
        2: v[k] = ((k + sh) % 2 == 0);
        3: v[k] = ((k + sh) % 2 == 1);
        default: v[k] = 1'b0;
      endcase
    return v;
  endfunction

  // Name of pattern t, in publication order.
  function automatic string mcs_pattern_name(int t);
    string names [16] = '{"T0", "T2", "T4", "T6", "T10", "T15",
                          "T1,3", "T3,1", "T5,7", "T7,5", "T9,14", "T14,9",
                          "T8,11,12,13", "T11,12,13,8", "T12,13,8,11", "T13,8,11,12"};
    return names[t];
  endfunction

  function automatic mcs_pat_t mcs_pattern(int t, int n);
    // {a, b, c0, d0, c(n-1)} codes, then carry-in.
    int tab [16][6] = '{
      '{0, 0, 0, 0, 0, 0}, '{0, 0, 1, 0, 1, 1}, '{0, 1, 0, 0, 0, 0},
      '{0, 1, 1, 0, 1, 0}, '{1, 0, 1, 0, 1, 1}, '{1, 1, 1, 1, 1, 1},
      '{0, 0, 1, 1, 2, 0}, '{0, 0, 0, 1, 3, 1}, '{0, 1, 0, 1, 3, 0},
      '{0, 1, 1, 1, 2, 1}, '{1, 3, 0, 1, 3, 0}, '{1, 2, 1, 0, 2, 1},
      '{1, 2, 0, 2, 0, 0}, '{1, 3, 2, 2, 0, 1}, '{1, 2, 0, 3, 3, 1},
      '{1, 3, 3, 3, 2, 0}};
    mcs_pat_t p;
    p.a   = fill(tab[t][0], n);
    p.b   = fill(tab[t][1], n);
    p.c0  = fill(tab[t][2], n, 1'b1);
    p.d0  = fill(tab[t][3], n, 1'b1);
    p.cl  = fill(tab[t][4], n);
    p.cin = tab[t][5][0];
    return p;
  endfunction

  function automatic logic [2*MAXN:0] mcs_eval(input mcs_pat_t pt, input int n,
                                               input mcs_fault_t f, ref mcs_cov_t cov);
    logic x [MAXN][MAXN];
    logic y [MAXN][MAXN];
    logic [2*MAXN:0] p = '0;
    logic carry;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        logic ai, bi, ci, di;
        int v;
        ai = pt.a[j];
        bi = pt.b[i];
        ci = (i == 0) ? pt.c0[j] : (j == n - 1) ? pt.cl[i] : x[i-1][j+1];
        di = (i == 0) ? pt.d0[j] : y[i-1][j];
        v = int'({ai, bi, ci, di});
        cov.cells[i][j][v] = 1'b1;
        x[i][j] = (ai & bi) ^ ci ^ di;
        y[i][j] = Y_TAB[v];
        if (f.fi == i && f.fj == j) begin
          x[i][j] ^= f.flip[1];
          y[i][j] ^= f.flip[0];
        end
      end
    for (int i = 0; i < n; i++) p[i] = x[i][0];
    carry = pt.cin;
    for (int m = 0; m < n; m++) begin
      logic s, cy;
      int v, tot;
      s  = (m < n - 1) ? x[n-1][m+1] : 1'b0;
      cy = y[n-1][m];
      v  = int'({s, cy, carry});
      cov.cp[m][v] = 1'b1;
      tot = int'(s) + int'(cy) + int'(carry);
      p[n+m] = tot[0] ^ (f.fcp == m && f.flip[1]);
      carry  = tot[1] ^ (f.fcp == m && f.flip[0]);
    end
    p[2*n] = carry;
    return p;
  endfunction

  function automatic mcs_fault_t no_fault();
    mcs_fault_t f;
    f.fi = -1; f.fj = -1; f.fcp = -1; f.flip = 2'b00;
    return f;
  endfunction

  // Checks the published claims on the model for an n x n array: the 16
  // patterns apply all 16 vectors to every cell and all 8 to every
  // carry-propagate adder (four for the leftmost, whose sum input is 0), and
  // every single-cell fault that shows at a cell's
  // outputs under some pattern reaches the product outputs.  Returns the
  // number of violations; counts the individual checks in nchecks.
  function automatic int mcs_model_selfcheck(int n, ref int nchecks);
    mcs_cov_t cov, scratch;
    int bad = 0;
    logic [2*MAXN:0] good [16];
    foreach (cov.cells[i, j]) cov.cells[i][j] = '0;
    foreach (cov.cp[m]) cov.cp[m] = '0;
    for (int t = 0; t < 16; t++) good[t] = mcs_eval(mcs_pattern(t, n), n, no_fault(), cov);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) begin
        nchecks++;
        if (cov.cells[i][j] != 16'hFFFF) begin
          bad++;
          $display("MODEL: cell (%0d,%0d) receives vectors %h only", i, j, cov.cells[i][j]);
        end
      end
    for (int m = 0; m < n; m++) begin
      // The leftmost adder has no sum input (tied to 0): four vectors only.
      nchecks++;
      if (cov.cp[m] != ((m == n - 1) ? 8'h0F : 8'hFF)) begin
        bad++;
        $display("MODEL: carry-propagate adder %0d receives vectors %h only", m, cov.cp[m]);
      end
    end
    for (int t = 0; t < 16; t++)
      for (int i = 0; i < n; i++)
        for (int j = 0; j <= n; j++)
          for (int fl = 1; fl < 4; fl++) begin
            mcs_fault_t f;
            f = no_fault();
            f.flip = fl[1:0];
            if (j < n) begin f.fi = i; f.fj = j; end
            else if (i < n) f.fcp = i;
            nchecks++;
            if (mcs_eval(mcs_pattern(t, n), n, f, scratch) == good[t]) begin
              bad++;
              if (bad < 10)
                $display("MODEL: fault flip=%0d at %s %0d,%0d under %s not seen",
                         fl, (j < n) ? "cell" : "adder", i, j, mcs_pattern_name(t));
            end
          end
    return bad;
  endfunction

endpackage
