// bw_ref_pkg: reference model of the modified Baugh-Wooley array multiplier,
// and its 55 test patterns, for testbenches.
//
// bw_eval() evaluates the array cell by cell from the cell truth tables
// (full-adder sum and carry of each cell's three terms, then the rows changed
// for testability), records which input vector each cell received, and can
// invert the x and/or y output of one cell for one input vector to model a
// single faulty cell.  Cells are wired as in the array module: the test XOR
// gates act on the complemented b inputs of type 2 (rows 1..n-3) and type 5
// only.  bw_pattern() expands the test table: a field written
// <a(n-1), a(n-2), rest> gives the two top bits and a pattern for the rest;
// b is written <rest, b(1), b(0)> except in the last three tests, where it is
// <b(n-1), b(n-2), rest>; d is <d(n-2), rest>.  A pattern code is 0 = all
// zeros, 1 = all ones, 2 = 01...01, 3 = 10...10.  At even n, 2 sets the even
// bit positions and 3 the odd ones.  At odd n the rest of a and of d is read
// from its top bit down, and the rest of b by absolute bit index; of the
// possible readings this one exercises the most cells (at odd n it leaves
// the same gaps as at even n, plus one vector of the second-leftmost type 7
// cell).
package bw_ref_pkg;

  localparam int MAXN = 16;

  typedef enum int {T_NONE, T1, T2A, T2B, T3, T4, T5, T6, T7} bw_type_t;

  typedef struct {
    logic [MAXN-1:0] a, b;
    logic [MAXN-2:0] d;
    logic            e;
  } bw_pat_t;

  typedef struct {
    int r, k;            // faulty cell: row (n-1 = type 7 row) and column; r < 0: none
    int vec;             // input vector under which it is faulty; < 0: all
    logic [1:0] flip;    // bit 1: invert x, bit 0: invert y
  } bw_fault_t;

  typedef struct {
    logic [31:0] vecs [MAXN][2*MAXN];   // rows 0..n-2, then the type 7 row at n-1
  } bw_cov_t;

  function automatic bw_type_t bw_type(int r, int k, int n);
    if (r == n - 1) return (k >= n - 1 && k <= 2 * n - 1) ? T7 : T_NONE;
    if (r < n - 2 && k == r + n - 1) return (r % 2 == 0) ? T2A : T2B;
    if (r == 0 && k >= 1 && k <= n - 2) return T1;
    if (r > 0 && r < n - 2 && k >= r + 1 && k <= r + n - 2) return T3;
    if (r == n - 2 && k >= n - 1 && k <= 2 * n - 4) return T4;
    if (r == n - 2 && k == 2 * n - 3) return T5;
    if (r == n - 2 && k == 2 * n - 2) return T6;
    return T_NONE;
  endfunction

  function automatic int bw_width(bw_type_t t);
    case (t)
      T1, T2A, T2B, T5: return 5;
      T3, T4, T6:       return 4;
      T7:               return 3;
      default:          return 0;
    endcase
  endfunction

  // Cell function: {x, y} for input vector v (first input in the top bit).
  function automatic logic [1:0] bw_cell(bw_type_t t, int v);
    logic a, b, c, d, e;
    logic s0, s1, s2;
    int tot;
    logic [1:0] r;
    case (bw_width(t))
      5: {a, b, c, d, e} = v[4:0];
      4: begin {a, b, c, d} = v[3:0]; e = 1'b0; end
      default: begin {a, b, c} = v[2:0]; d = 1'b0; e = 1'b0; end
    endcase
    case (t)
      T1:       begin s0 = a & b; s1 = c; s2 = d & e; end
      T2A, T2B: begin s0 = a & ~b; s1 = c; s2 = d & e; end
      T3:       begin s0 = a; s1 = b; s2 = c & d; end
      T4:       begin s0 = a; s1 = b; s2 = c & ~d; end
      T5:       begin s0 = a & ~b; s1 = c; s2 = ~d & e; end
      T6:       begin s0 = ~a; s1 = b; s2 = c & d; end
      default:  begin s0 = a; s1 = b; s2 = c; end
    endcase
    tot = int'(s0) + int'(s1) + int'(s2);
    r = {tot[0], tot[1]};
    case (t)
      T1: case (v)
            'b10101: r = 2'b01;  'b01111: r = 2'b11;  'b00100: r = 2'b11;
            'b01100: r = 2'b01;  'b01110: r = 2'b11;  'b00110: r = 2'b01;
            default: ;
          endcase
      T2A, T2B: begin
          case (v)
            'b00110, 'b01100, 'b00101, 'b01101: r = 2'b01;
            'b11100: r = 2'b11;
            default: ;
          endcase
          if (t == T2A)
            case (v)
              'b10100: r = 2'b11;  'b00100: r = 2'b01;
              'b01110: r = 2'b01;  'b11110: r = 2'b11;
              default: ;
            endcase
          else
            case (v)
              'b00100: r = 2'b11;  'b01110: r = 2'b11;  'b11110: r = 2'b01;
              default: ;
            endcase
        end
      T3: if (v == 'b0100 || v == 'b0110) r = 2'b11;
      T5: if (v == 'b00100 || v == 'b01110) r = 2'b11;
      default: ;
    endcase
    return r;
  endfunction

  // Fills bits lo..hi.  from_top = 1 reads the alternation from bit hi down
  // (01...01 has a 0 in bit hi); otherwise it is by absolute bit index.  The
  // two differ only when the field has odd width.
  function automatic logic [MAXN-1:0] fill(int code, int lo, int hi, bit from_top = 1'b0);
    logic [MAXN-1:0] v = '0;
    int sh;
    sh = from_top ? (hi + 1) % 2 : 0;
    for (int k = lo; k <= hi; k++)
      case (code)
        1: v[k] = 1'b1;
        2: v[k] = ((k + sh) % 2 == 0);
        3: v[k] = ((k + sh) % 2 == 1);
        default: v[k] = 1'b0;
      endcase
    return v;
  endfunction

  function automatic bw_pat_t bw_pattern(int t, int n);
    // a(n-1), a(n-2), a rest; b form, b fields x3; d(n-2), d rest; e
    int tab [55][10] = '{
      '{0, 0, 0, 0, 0, 0, 0, 0, 0, 0},
      '{0, 0, 0, 0, 1, 1, 1, 0, 0, 0},
      '{0, 1, 1, 0, 3, 1, 0, 0, 3, 0},
      '{0, 0, 1, 0, 3, 1, 0, 0, 2, 0},
      '{0, 0, 1, 0, 2, 0, 0, 0, 2, 0},
      '{0, 1, 1, 0, 2, 0, 0, 0, 3, 0},
      '{1, 0, 0, 0, 0, 0, 0, 1, 1, 0},
      '{0, 0, 0, 0, 0, 0, 1, 1, 1, 0},
      '{1, 1, 1, 0, 3, 1, 0, 0, 1, 0},
      '{1, 1, 1, 0, 2, 0, 1, 1, 0, 0},
      '{1, 0, 0, 0, 1, 1, 1, 1, 1, 0},
      '{0, 0, 0, 0, 1, 1, 0, 1, 1, 0},
      '{1, 0, 3, 0, 0, 0, 0, 0, 1, 0},
      '{1, 1, 2, 0, 0, 0, 0, 0, 1, 0},
      '{1, 1, 2, 0, 1, 1, 1, 0, 2, 0},
      '{1, 1, 3, 0, 1, 1, 1, 0, 3, 0},
      '{1, 0, 3, 0, 0, 0, 0, 0, 0, 0},
      '{0, 1, 2, 0, 0, 0, 0, 0, 0, 0},
      '{0, 0, 3, 0, 1, 1, 0, 0, 0, 0},
      '{1, 0, 2, 0, 1, 1, 0, 0, 0, 0},
      '{1, 0, 3, 0, 0, 1, 0, 1, 1, 0},
      '{0, 1, 2, 0, 0, 1, 0, 1, 1, 0},
      '{0, 0, 0, 0, 0, 0, 1, 0, 0, 0},
      '{0, 1, 2, 0, 0, 0, 1, 0, 0, 0},
      '{1, 0, 3, 0, 0, 0, 1, 0, 0, 0},
      '{0, 1, 2, 0, 1, 1, 1, 0, 0, 0},
      '{1, 0, 3, 0, 1, 1, 1, 0, 0, 0},
      '{0, 1, 2, 0, 0, 0, 1, 1, 1, 0},
      '{1, 0, 3, 0, 0, 0, 1, 0, 1, 0},
      '{1, 0, 3, 0, 1, 1, 1, 1, 1, 0},
      '{0, 1, 2, 0, 1, 1, 1, 1, 1, 0},
      '{1, 1, 1, 0, 0, 0, 0, 0, 0, 0},
      '{1, 1, 1, 0, 1, 1, 0, 0, 0, 0},
      '{1, 1, 1, 0, 1, 1, 1, 0, 0, 0},
      '{1, 1, 1, 0, 1, 0, 1, 1, 1, 0},
      '{1, 1, 1, 0, 1, 1, 1, 1, 1, 0},
      '{0, 1, 1, 0, 2, 0, 1, 0, 0, 0},
      '{0, 1, 1, 0, 3, 1, 0, 0, 0, 0},
      '{0, 0, 1, 0, 0, 0, 0, 1, 0, 0},
      '{0, 1, 1, 0, 0, 0, 0, 1, 1, 0},
      '{0, 0, 0, 0, 3, 1, 0, 1, 1, 0},
      '{0, 0, 0, 0, 2, 0, 1, 1, 1, 0},
      '{0, 1, 1, 0, 2, 0, 1, 1, 1, 0},
      '{0, 1, 1, 0, 3, 1, 0, 1, 1, 0},
      '{0, 0, 0, 0, 1, 1, 1, 1, 1, 0},
      '{1, 0, 0, 0, 3, 1, 0, 0, 0, 0},
      '{1, 0, 0, 0, 2, 0, 1, 0, 0, 0},
      '{1, 1, 1, 0, 0, 0, 0, 1, 1, 0},
      '{1, 0, 0, 0, 2, 0, 1, 1, 1, 0},
      '{1, 0, 0, 0, 3, 1, 0, 1, 1, 0},
      '{1, 1, 1, 0, 1, 1, 0, 1, 1, 1},
      '{1, 1, 1, 0, 0, 0, 1, 0, 0, 1},
      '{1, 0, 0, 1, 1, 0, 0, 1, 0, 0},
      '{1, 0, 0, 1, 1, 0, 0, 0, 0, 0},
      '{0, 0, 1, 1, 0, 1, 1, 1, 1, 0}};
    bw_pat_t p;
    p.a = fill(tab[t][2], 0, n - 3, 1'b1);
    p.a[n-1] = tab[t][0][0];
    p.a[n-2] = tab[t][1][0];
    if (tab[t][3] == 0) begin
      p.b = fill(tab[t][4], 2, n - 1);
      p.b[1] = tab[t][5][0];
      p.b[0] = tab[t][6][0];
    end else begin
      p.b = fill(tab[t][6], 0, n - 3);
      p.b[n-1] = tab[t][4][0];
      p.b[n-2] = tab[t][5][0];
    end
    p.d = fill(tab[t][8], 0, n - 3, 1'b1)[MAXN-2:0];
    p.d[n-2] = tab[t][7][0];
    p.e = tab[t][9][0];
    return p;
  endfunction

  function automatic bw_fault_t bw_no_fault();
    bw_fault_t f;
    f.r = -1; f.k = -1; f.vec = -1; f.flip = 2'b00;
    return f;
  endfunction

  function automatic logic [2*MAXN-1:0] bw_eval(input bw_pat_t pt, input int n,
                                               input bw_fault_t f, ref bw_cov_t cov);
    logic xs [MAXN][2*MAXN];
    logic ys [MAXN][2*MAXN];
    logic [MAXN-1:0] bx;
    logic [2*MAXN-1:0] p = '0;
    bx = pt.b;
    for (int i = 1; i <= n - 2; i++) bx[i] = pt.b[i] ^ pt.e;
    foreach (xs[r, k]) begin xs[r][k] = 1'b0; ys[r][k] = 1'b0; end
    for (int r = 0; r < n; r++)
      for (int k = 0; k < 2 * n; k++) begin
        bw_type_t t;
        int v;
        logic [1:0] o;
        t = bw_type(r, k, n);
        case (t)
          T1:       v = 32'({pt.a[k], pt.b[0], pt.d[k-1], pt.b[1], pt.a[k-1]});
          T2A, T2B: v = 32'({pt.a[n-1], bx[r], (r == 0) ? pt.d[n-2] : ys[r-1][k-1], pt.b[r+1], pt.a[n-2]});
          T3:       v = 32'({xs[r-1][k], ys[r-1][k-1], pt.b[r+1], pt.a[k-r-1]});
          T4:       v = 32'({xs[r-1][k], ys[r-1][k-1], pt.b[n-1], pt.a[k-n+1]});
          T5:       v = 32'({pt.a[n-1], bx[n-2], ys[r-1][k-1], pt.a[n-2], pt.b[n-1]});
          T6:       v = 32'({pt.a[n-1], ~pt.b[n-1], pt.b[n-1], pt.a[n-1]});
          T7:       v = (k == n - 1)     ? 32'({xs[n-2][k], pt.a[n-1], pt.b[n-1]}) :
                        (k == 2 * n - 1) ? 32'({1'b1, ys[n-2][k-1], ys[r][k-1]}) :
                                           32'({xs[n-2][k], ys[n-2][k-1], ys[r][k-1]});
          default:  v = -1;
        endcase
        if (v >= 0) begin
          cov.vecs[r][k][v] = 1'b1;
          o = bw_cell(t, v);
          if (f.r == r && f.k == k && (f.vec < 0 || f.vec == v)) o ^= f.flip;
          {xs[r][k], ys[r][k]} = o;
        end
      end
    p[0] = pt.a[0] & pt.b[0];
    for (int r = 0; r < n - 2; r++) p[r+1] = xs[r][r+1];
    for (int k = n - 1; k < 2 * n; k++) p[k] = xs[n-1][k];
    return p;
  endfunction

  function automatic void bw_cov_clear(ref bw_cov_t cov);
    foreach (cov.vecs[r, k]) cov.vecs[r][k] = '0;
  endfunction

  // Checks the published claims on the model for an n x n array: the 55
  // patterns apply every input vector to every cell, and for every cell,
  // input vector and faulty output (x, y or both) some pattern that applies
  // that vector to that cell shows the fault at the product outputs.  Returns
  // the number of violations; counts the individual checks in nchecks.
  function automatic int bw_model_selfcheck(int n, ref int nchecks);
    bw_cov_t cov, per [55];
    logic [2*MAXN-1:0] good [55];
    int bad = 0;
    bw_cov_clear(cov);
    for (int t = 0; t < 55; t++) begin
      bw_cov_clear(per[t]);
      good[t] = bw_eval(bw_pattern(t, n), n, bw_no_fault(), per[t]);
      void'(bw_eval(bw_pattern(t, n), n, bw_no_fault(), cov));
    end
    for (int r = 0; r < n; r++)
      for (int k = 0; k < 2 * n; k++) begin
        bw_type_t ty;
        int nv;
        ty = bw_type(r, k, n);
        nv = 1 << bw_width(ty);
        if (ty == T_NONE) continue;
        nchecks++;
        if (cov.vecs[r][k] != 32'((64'd1 << nv) - 1)) begin
          bad++;
          $display("MODEL: %s cell row %0d column %0d receives vectors %h only",
                   ty.name(), r, k, cov.vecs[r][k]);
        end
        for (int v = 0; v < nv; v++)
          for (int fl = 1; fl < 4; fl++) begin
            bit seen = 0;
            for (int t = 0; t < 55 && !seen; t++)
              if (per[t].vecs[r][k][v]) begin
                bw_cov_t scratch;
                bw_fault_t f;
                f.r = r; f.k = k; f.vec = v; f.flip = fl[1:0];
                if (bw_eval(bw_pattern(t, n), n, f, scratch) != good[t]) seen = 1;
              end
            nchecks++;
            if (!seen) begin
              bad++;
              if (bad < 20)
                $display("MODEL: %s cell row %0d column %0d, vector %0d, flip %0d not observable",
                         ty.name(), r, k, v, fl);
            end
          end
      end
    return bad;
  endfunction

endpackage
