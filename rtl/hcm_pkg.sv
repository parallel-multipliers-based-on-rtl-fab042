// hcm_pkg: shared constants and elaboration-time functions for the
// horizontal-compressor multipliers.
//
// An n x n product is split into two halves: the "upper" half holds the
// partial products q[i][j] with j >= i, the "lower" half those with j < i.
// Each half is reduced by its own array of cells and a final adder sums the
// two results.  The functions below list, for a given half and weight, which
// bits enter that half, so that the array modules can wire their cells at
// elaboration time.  A bit is named by a code: a value >= 0 is the index
// i*n+j of partial product q[i][j]; the negative codes name a constant zero,
// a constant one and the "special" bit of a half (the AND or XOR of the two
// sign bits in the two's complement arrays).
//
// Following the paper: q[0][0] is p0 and q[0][1], q[1][0] meet in a
// half adder outside both halves; q[n-1][n-1] is printed on the lower side of
// the arrays of Fig. 1 and Fig. 2, so it is fed to the lower half here.
// For signed operands the paper's correction (a[n-1]+b[n-1])*2^(n-1) is
// split into an AND bit of weight n (upper half) and an XOR bit of weight
// n-1 (lower half), and the constant 3*2^(2n-2) becomes a one of weight 2n-2
// (upper half) and a one of weight 2n-1 (lower half).  The order of the bits
// inside a weight (by row for the upper half, by column for the lower half,
// specials last) is this design's own choice.
package hcm_pkg;

  localparam int CODE_ZERO = -1;
  localparam int CODE_ONE  = -2;
  localparam int CODE_SPEC = -3;

  typedef enum int {HALF_UPPER = 0, HALF_LOWER = 1} half_e;

  // Number of bits, or the code of bit number idx, at weight w of a half.
  // With idx < 0 the function returns the count.
  function automatic int half_bit(int n, bit sgn, int kind, int w, int idx);
    int cnt;
    int code;
    cnt  = 0;
    code = CODE_ZERO;
    if (kind == HALF_UPPER) begin
      for (int i = 0; i <= w; i++) begin
        int j;
        j = w - i;
        if (i < n && j >= 0 && j < n && j >= i &&
            !(i == n-1 && j == n-1) && !(i == 0 && j == 0) &&
            !(i == 0 && j == 1)) begin
          if (cnt == idx) code = i*n + j;
          cnt++;
        end
      end
      if (sgn && (w == n || w == 2*n-2)) begin
        if (cnt == idx) code = (w == n) ? CODE_SPEC : CODE_ONE;
        cnt++;
      end
    end else begin
      for (int j = 0; j <= w; j++) begin
        int i;
        i = w - j;
        if (i < n && i >= 0 && ((i > j && !(i == 1 && j == 0)) ||
                                (i == n-1 && j == n-1))) begin
          if (cnt == idx) code = i*n + j;
          cnt++;
        end
      end
      if (sgn && (w == n-1 || w == 2*n-1)) begin
        if (cnt == idx) code = (w == n-1) ? CODE_SPEC : CODE_ONE;
        cnt++;
      end
    end
    return (idx < 0) ? cnt : code;
  endfunction

  // ---------------------------------------------------------------------
  // 2FA column arrays (first multiplier).  Digit column d of a half covers
  // weights 2d+off and 2d+1+off (off = 0 upper, 1 lower).  Column d holds
  // fa2_cells(d) cells stacked from the top.
  // ---------------------------------------------------------------------
  function automatic int fa2_off(int kind);
    return (kind == HALF_UPPER) ? 0 : 1;
  endfunction

  function automatic int fa2_cells(int n, bit sgn, int kind, int d);
    int c;
    int l;
    int h;
    int t;
    c = 0;
    for (int dd = 1; dd <= d; dd++) begin
      l = half_bit(n, sgn, kind, 2*dd + fa2_off(kind), -1);
      h = half_bit(n, sgn, kind, 2*dd + 1 + fa2_off(kind), -1);
      if (dd == n-1 && kind == HALF_LOWER) h = 0;  // weight 2n is dropped
      if (l + c <= 1 && h <= 1) begin
        c = 0;
      end else begin
        t = (l + c) / 2;          // ceil((l + c - 1) / 2)
        if (t < h - 1) t = h - 1;
        if (t < 1) t = 1;
        c = t;
      end
    end
    return c;
  endfunction

  // Cells of column d are aligned at the bottom, next to the final adder:
  // cell k of column d (k = 0 at the top) sits at the same level as cell
  // k + fa2_delta of column d-1 and takes that cell's carry.
  function automatic int fa2_delta(int n, bit sgn, int kind, int d);
    return ((d <= 1) ? 0 : fa2_cells(n, sgn, kind, d-1)) - fa2_cells(n, sgn, kind, d);
  endfunction

  // Index in column d-1 of the cell whose carry enters cell k, or -1 when no
  // carry arrives at that level (the carry input then takes a data bit).
  function automatic int fa2_cin_src(int n, bit sgn, int kind, int d, int k);
    int src;
    int cp;
    src = k + fa2_delta(n, sgn, kind, d);
    cp  = (d <= 1) ? 0 : fa2_cells(n, sgn, kind, d-1);
    return (src >= 0 && src < cp) ? src : -1;
  endfunction

  // Number of carries of column d-1 that find no cell at their level in
  // column d; they are the topmost ones and join the low-weight data bits.
  function automatic int fa2_extra(int n, bit sgn, int kind, int d);
    int dl;
    dl = fa2_delta(n, sgn, kind, d);
    return (dl > 0) ? dl : 0;
  endfunction

  // Position in the low-weight input list of column d of the first slot of
  // cell k: cell 0 takes two bits (a0, b0), every other cell one (b0), and a
  // carry input with no incoming carry takes one more.
  function automatic int fa2_base(int n, bit sgn, int kind, int d, int k);
    int fr;
    int dl;
    dl = fa2_delta(n, sgn, kind, d);
    fr = (dl < 0) ? ((k < -dl) ? k : -dl) : 0;
    return (k == 0) ? 0 : k + 1 + fr;
  endfunction

  // Delay model, in 2FA cells, of the wiring above: the time at which the
  // two result bits of digit column dout of a half are ready, with every
  // input bit ready at time 0.  Used to check the delay the paper states.
  function automatic int fa2_half_depth(int n, bit sgn, int kind, int dout);
    int t    [64][64];
    int lt   [160];
    int c;
    int cp;
    int l;
    int res;
    int dl;
    int b;
    int x;
    res = 0;
    cp  = 0;
    for (int d = 1; d <= dout; d++) begin
      c  = fa2_cells(n, sgn, kind, d);
      l  = half_bit(n, sgn, kind, 2*d + fa2_off(kind), -1);
      dl = cp - c;
      for (int i = 0; i < 160; i++) lt[i] = 0;
      for (int i = 0; i < fa2_extra(n, sgn, kind, d); i++) lt[l + i] = t[d-1][i];
      for (int k = 0; k < c; k++) begin
        b = fa2_base(n, sgn, kind, d, k);
        if (k == 0) x = (lt[0] > lt[1]) ? lt[0] : lt[1];
        else        x = (t[d][k-1] > lt[b]) ? t[d][k-1] : lt[b];
        if (fa2_cin_src(n, sgn, kind, d, k) >= 0) begin
          if (t[d-1][fa2_cin_src(n, sgn, kind, d, k)] > x) x = t[d-1][fa2_cin_src(n, sgn, kind, d, k)];
        end else begin
          if (lt[b + ((k == 0) ? 2 : 1)] > x) x = lt[b + ((k == 0) ? 2 : 1)];
        end
        t[d][k] = x + 1;
      end
      res = (c > 0) ? t[d][c-1] : lt[0];
      cp  = c;
    end
    return res;
  endfunction

  // Delay, in 2FA cells, of the whole first multiplier: the two halves and
  // the central row of n-1 final-adder cells.
  function automatic int mult1_depth(int n, bit sgn);
    int tc;
    int x;
    tc = 0;
    for (int k = 1; k < n; k++) begin
      x = tc;
      if (fa2_half_depth(n, sgn, HALF_UPPER, k) > x) x = fa2_half_depth(n, sgn, HALF_UPPER, k);
      if (fa2_half_depth(n, sgn, HALF_LOWER, k - 1) > x) x = fa2_half_depth(n, sgn, HALF_LOWER, k - 1);
      if (fa2_half_depth(n, sgn, HALF_LOWER, k) > x) x = fa2_half_depth(n, sgn, HALF_LOWER, k);
      tc = x + 1;
    end
    return tc;
  endfunction

  // Total 2FA cells of one half.
  function automatic int fa2_half_cells(int n, bit sgn, int kind);
    int s;
    s = 0;
    for (int d = 1; d < n; d++) s += fa2_cells(n, sgn, kind, d);
    return s;
  endfunction

  // ---------------------------------------------------------------------
  // 1FA carry-save column arrays (second multiplier).  Column w holds
  // fa1_cells(w) full adders in a chain; its inputs are the bits of weight w
  // followed by the carries of all full adders of column w-1.
  // ---------------------------------------------------------------------
  function automatic int fa1_cells(int n, bit sgn, int kind, int w);
    int f;
    int m;
    f = 0;
    for (int ww = 0; ww <= w; ww++) begin
      m = half_bit(n, sgn, kind, ww, -1) + f;
      f = (m <= 2) ? 0 : (m - 1) / 2;  // ceil((m - 2) / 2)
    end
    return f;
  endfunction

  function automatic int fa1_half_cells(int n, bit sgn, int kind);
    int s;
    s = 0;
    for (int w = 0; w < 2*n; w++) s += fa1_cells(n, sgn, kind, w);
    return s;
  endfunction

endpackage
