// Double-precision reference models used by the testbenches: the TEQ normal
// equations, a linear solver, a direct DFT and Q3.13 conversions. They are
// written from the mathematics, independently of the fixed-point RTL.
package teq_ref_pkg;
  import teq_pkg::*;

  function automatic real to_r(input fx_t v);
    return real'(v) / 8192.0;
  endfunction

  function automatic fx_t to_fx(input real v);
    real s;
    s = v * 8192.0;
    if (s > 32767.0) s = 32767.0;
    if (s < -32768.0) s = -32768.0;
    return fx_t'($rtoi(s >= 0.0 ? s + 0.5 : s - 0.5));
  endfunction

  function automatic real absr(input real v);
    return v < 0.0 ? -v : v;
  endfunction

  // A = Hre^T Hre + g I for channel h (m+1 samples), order p, prefix ng.
  // Element (i,j) = sum over kept rows r of H[r][i]*H[r][j], H[r][c] = h[r-c].
  function automatic real ref_a(input real h[], input int p, input int ng,
                                input real g, input int i, input int j);
    real s;
    int  m;
    m = h.size() - 1;
    s = (i == j) ? g : 0.0;
    for (int r = 0; r <= m + p; r++) begin
      real x, y;
      if (r >= 1 && r <= ng) continue;
      x = (r - i >= 0 && r - i <= m) ? h[r-i] : 0.0;
      y = (r - j >= 0 && r - j <= m) ? h[r-j] : 0.0;
      s += x * y;
    end
    return s;
  endfunction

  // Solve A x = b by Gaussian elimination with partial pivoting.
  function automatic void lin_solve(input int n, ref real a[8][8], ref real b[8], ref real x[8]);
    real mm[8][9];
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) mm[i][j] = a[i][j];
      mm[i][n] = b[i];
    end
    for (int c = 0; c < n; c++) begin
      int pr;
      pr = c;
      for (int r = c + 1; r < n; r++) if (absr(mm[r][c]) > absr(mm[pr][c])) pr = r;
      for (int j = 0; j <= n; j++) begin
        real t;
        t = mm[c][j]; mm[c][j] = mm[pr][j]; mm[pr][j] = t;
      end
      for (int r = c + 1; r < n; r++) begin
        real f;
        f = mm[r][c] / mm[c][c];
        for (int j = c; j <= n; j++) mm[r][j] -= f * mm[c][j];
      end
    end
    for (int i = n - 1; i >= 0; i--) begin
      real s;
      s = mm[i][n];
      for (int j = i + 1; j < n; j++) s -= mm[i][j] * x[j];
      x[i] = s / mm[i][i];
    end
  endfunction

  // Solve the n x n system a x = b (a stored row-major in a flat array) by
  // Gaussian elimination with partial pivoting; any size.
  function automatic void lin_solve_n(input int n, input real a[], input real b[], output real x[]);
    real mm[];
    int  c1;
    c1 = n + 1;
    mm = new[n * c1];
    x  = new[n];
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) mm[i*c1+j] = a[i*n+j];
      mm[i*c1+n] = b[i];
    end
    for (int c = 0; c < n; c++) begin
      int pr;
      pr = c;
      for (int r = c + 1; r < n; r++) if (absr(mm[r*c1+c]) > absr(mm[pr*c1+c])) pr = r;
      for (int j = 0; j <= n; j++) begin
        real t;
        t = mm[c*c1+j]; mm[c*c1+j] = mm[pr*c1+j]; mm[pr*c1+j] = t;
      end
      for (int r = c + 1; r < n; r++) begin
        real f;
        f = mm[r*c1+c] / mm[c*c1+c];
        for (int j = c; j <= n; j++) mm[r*c1+j] -= f * mm[c*c1+j];
      end
    end
    for (int i = n - 1; i >= 0; i--) begin
      real s;
      s = mm[i*c1+n];
      for (int j = i + 1; j < n; j++) s -= mm[i*c1+j] * x[j];
      x[i] = s / mm[i*c1+i];
    end
  endfunction

  // Bin k of the 64-point DFT of x (zero padded), real and imaginary parts.
  function automatic void dft64(input real xr[64], input real xi[64], input int k,
                                output real yr, output real yi);
    yr = 0.0; yi = 0.0;
    for (int n = 0; n < 64; n++) begin
      real ang;
      ang = -2.0 * 3.14159265358979323846 * real'(n * k) / 64.0;
      yr += xr[n] * $cos(ang) - xi[n] * $sin(ang);
      yi += xr[n] * $sin(ang) + xi[n] * $cos(ang);
    end
  endfunction
endpackage
