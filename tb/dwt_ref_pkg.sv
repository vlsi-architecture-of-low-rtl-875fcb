// dwt_ref_pkg: golden model of the reversible 5/3 DWT for the testbenches.
//
// Written straight from the JPEG2000 lifting equations with plain integer
// arithmetic (floor division done with / and a sign correction, not with
// shifts), whole-array at a time: first every row, then every column of the
// row results. Symmetric extension: x(N) = x(N-2), d(-1) = d(0).
package dwt_ref_pkg;

  localparam int MAXN = 128;
  typedef int line_t  [MAXN];
  typedef int plane_t [MAXN][MAXN];

  function automatic int fdiv(input int x, input int d);
    if (x >= 0) return x / d;
    return -((-x + d - 1) / d);
  endfunction

  // 1-D lifting of x[0..n-1] into lo[0..n/2-1] and hi[0..n/2-1].
  function automatic void lift(input int n, input line_t x, output line_t lo, output line_t hi);
    int right;
    lo = '{default: 0};
    hi = '{default: 0};
    for (int i = 0; i < n / 2; i++) begin
      right = (2 * i + 2 < n) ? x[2 * i + 2] : x[n - 2];
      hi[i] = x[2 * i + 1] - fdiv(x[2 * i] + right, 2);
    end
    for (int i = 0; i < n / 2; i++)
      lo[i] = x[2 * i] + fdiv(((i == 0) ? hi[0] : hi[i - 1]) + hi[i] + 2, 4);
  endfunction

  // One 2-D level. Subband naming: first letter row filter, second column.
  function automatic void dwt2d(input int n, input plane_t img,
                                output plane_t hh, output plane_t hl,
                                output plane_t lh, output plane_t ll);
    plane_t rl, rh;
    line_t  x, lo, hi;
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < n; c++) x[c] = img[r][c];
      lift(n, x, lo, hi);
      for (int k = 0; k < n / 2; k++) begin
        rl[r][k] = lo[k];
        rh[r][k] = hi[k];
      end
    end
    for (int k = 0; k < n / 2; k++) begin
      for (int r = 0; r < n; r++) x[r] = rh[r][k];
      lift(n, x, lo, hi);
      for (int m = 0; m < n / 2; m++) begin
        hh[m][k] = hi[m];
        hl[m][k] = lo[m];
      end
      for (int r = 0; r < n; r++) x[r] = rl[r][k];
      lift(n, x, lo, hi);
      for (int m = 0; m < n / 2; m++) begin
        lh[m][k] = hi[m];
        ll[m][k] = lo[m];
      end
    end
  endfunction

endpackage
