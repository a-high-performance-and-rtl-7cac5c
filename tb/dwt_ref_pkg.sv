// dwt_ref_pkg: reference models of the forward wavelet transforms, used by
// the testbenches to compute expected outputs independently of the RTL.
//
// 1-D transforms return the interleaved order s_0, d_0, s_1, d_1, ... that the
// hardware produces. Boundaries use whole-sample symmetric extension.
//   lift53_1d: JPEG2000 reversible 5/3, integer lifting with floor division.
//   lift97_1d: JPEG2000 irreversible 9/7 in double precision with the
//              standard lifting constants; low-pass scaled by 1/K, high-pass
//              by K.
//   ilift53_1d, ilift97_1d: the matching inverse transforms, taking the
//              interleaved order and returning the signal.
// idwt53_2d, idwt97_2d undo them, rows first and then columns.
// 2-D transforms work on a row-major N x M array (flat index r*M + c): first
// every column, then every row; result y[r*M + c] where r is the column
// transform's output index (even = low, odd = high) and c the row
// transform's.
package dwt_ref_pkg;

  localparam real ALPHA = -1.586134342059924;
  localparam real BETA  = -0.052980118572961;
  localparam real GAMMA =  0.882911075530934;
  localparam real DELTA =  0.443506852043971;
  localparam real KAPPA =  1.230174104914001;

  function automatic int floordiv(int a, int b);
    int q = a / b;
    if ((a % b != 0) && ((a < 0) != (b < 0))) q = q - 1;
    return q;
  endfunction

  function automatic void lift53_1d(input int x[], output int y[]);
    int k = x.size() / 2;
    int d[];
    d = new[k];
    y = new[2*k];
    for (int j = 0; j < k; j++) begin
      int sn = (j + 1 < k) ? x[2*j+2] : x[2*j];
      d[j] = x[2*j+1] - floordiv(x[2*j] + sn, 2);
    end
    for (int j = 0; j < k; j++) begin
      int dp = (j > 0) ? d[j-1] : d[0];
      y[2*j]   = x[2*j] + floordiv(dp + d[j] + 2, 4);
      y[2*j+1] = d[j];
    end
  endfunction

  // One lifting step: d += a*(s_j + s_{j+1}); s += b*(d_{j-1} + d_j).
  function automatic void lift_step(inout real s[], inout real d[], input real a, input real b);
    int k = s.size();
    for (int j = 0; j < k; j++)
      d[j] = d[j] + a * (s[j] + ((j + 1 < k) ? s[j+1] : s[j]));
    for (int j = 0; j < k; j++)
      s[j] = s[j] + b * (((j > 0) ? d[j-1] : d[0]) + d[j]);
  endfunction

  function automatic void lift97_1d(input real x[], output real y[]);
    int k = x.size() / 2;
    real s[], d[];
    s = new[k];
    d = new[k];
    y = new[2*k];
    for (int j = 0; j < k; j++) begin
      s[j] = x[2*j];
      d[j] = x[2*j+1];
    end
    lift_step(s, d, ALPHA, BETA);
    lift_step(s, d, GAMMA, DELTA);
    for (int j = 0; j < k; j++) begin
      y[2*j]   = s[j] / KAPPA;
      y[2*j+1] = d[j] * KAPPA;
    end
  endfunction

  function automatic void ilift53_1d(input int y[], output int x[]);
    int k = y.size() / 2;
    int s[];
    s = new[k];
    x = new[2*k];
    for (int j = 0; j < k; j++) begin
      int dp = (j > 0) ? y[2*j-1] : y[1];
      s[j] = y[2*j] - floordiv(dp + y[2*j+1] + 2, 4);
    end
    for (int j = 0; j < k; j++) begin
      int sn = (j + 1 < k) ? s[j+1] : s[j];
      x[2*j]   = s[j];
      x[2*j+1] = y[2*j+1] + floordiv(s[j] + sn, 2);
    end
  endfunction

  // Inverse lifting step: s -= b*(d_{j-1} + d_j); d -= a*(s_j + s_{j+1}).
  function automatic void ilift_step(inout real s[], inout real d[], input real a, input real b);
    int k = s.size();
    for (int j = 0; j < k; j++)
      s[j] = s[j] - b * (((j > 0) ? d[j-1] : d[0]) + d[j]);
    for (int j = 0; j < k; j++)
      d[j] = d[j] - a * (s[j] + ((j + 1 < k) ? s[j+1] : s[j]));
  endfunction

  function automatic void ilift97_1d(input real y[], output real x[]);
    int k = y.size() / 2;
    real s[], d[];
    s = new[k];
    d = new[k];
    x = new[2*k];
    for (int j = 0; j < k; j++) begin
      s[j] = y[2*j] * KAPPA;
      d[j] = y[2*j+1] / KAPPA;
    end
    ilift_step(s, d, GAMMA, DELTA);
    ilift_step(s, d, ALPHA, BETA);
    for (int j = 0; j < k; j++) begin
      x[2*j]   = s[j];
      x[2*j+1] = d[j];
    end
  endfunction

  function automatic void dwt53_2d(input int x[], input int n, input int m, output int y[]);
    int col[], row[], t[];
    y = new[n*m];
    col = new[n];
    row = new[m];
    for (int c = 0; c < m; c++) begin
      for (int r = 0; r < n; r++) col[r] = x[r*m + c];
      lift53_1d(col, t);
      for (int r = 0; r < n; r++) y[r*m + c] = t[r];
    end
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < m; c++) row[c] = y[r*m + c];
      lift53_1d(row, t);
      for (int c = 0; c < m; c++) y[r*m + c] = t[c];
    end
  endfunction

  function automatic void dwt97_2d(input real x[], input int n, input int m, output real y[]);
    real col[], row[], t[];
    y = new[n*m];
    col = new[n];
    row = new[m];
    for (int c = 0; c < m; c++) begin
      for (int r = 0; r < n; r++) col[r] = x[r*m + c];
      lift97_1d(col, t);
      for (int r = 0; r < n; r++) y[r*m + c] = t[r];
    end
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < m; c++) row[c] = y[r*m + c];
      lift97_1d(row, t);
      for (int c = 0; c < m; c++) y[r*m + c] = t[c];
    end
  endfunction

  // Inverse 2-D transforms: every row first, then every column (the reverse
  // of the forward order, so that the 5/3 integer version is exact).
  function automatic void idwt53_2d(input int y[], input int n, input int m, output int x[]);
    int col[], row[], t[];
    x = new[n*m];
    col = new[n];
    row = new[m];
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < m; c++) row[c] = y[r*m + c];
      ilift53_1d(row, t);
      for (int c = 0; c < m; c++) x[r*m + c] = t[c];
    end
    for (int c = 0; c < m; c++) begin
      for (int r = 0; r < n; r++) col[r] = x[r*m + c];
      ilift53_1d(col, t);
      for (int r = 0; r < n; r++) x[r*m + c] = t[r];
    end
  endfunction

  function automatic void idwt97_2d(input real y[], input int n, input int m, output real x[]);
    real col[], row[], t[];
    x = new[n*m];
    col = new[n];
    row = new[m];
    for (int r = 0; r < n; r++) begin
      for (int c = 0; c < m; c++) row[c] = y[r*m + c];
      ilift97_1d(row, t);
      for (int c = 0; c < m; c++) x[r*m + c] = t[c];
    end
    for (int c = 0; c < m; c++) begin
      for (int r = 0; r < n; r++) col[r] = x[r*m + c];
      ilift97_1d(col, t);
      for (int r = 0; r < n; r++) x[r*m + c] = t[r];
    end
  endfunction

endpackage
