// toep_ref_pkg: reference model for the Toeplitz testbenches.
//
// Evaluates the recurrences of the factorization YR = X row by row, in the
// same fixed-point arithmetic as the arrays (mra_pkg), with no reference to
// how the arrays schedule them. Also makes well-conditioned random test
// matrices: t(0) in [4, 12), the other t(k) in (-1, 1).
package toep_ref_pkg;
  import mra_pkg::*;

  localparam int NMAX = 16;
  typedef fx_t mat_t [NMAX][NMAX];

  // X and z from t (1-based in the recurrences, 0-based in the arrays)
  function automatic void ref_upper(input int n, input fx_t t [NMAX],
                                    output mat_t xm, output fx_t z [NMAX+1]);
    fx_t x [NMAX+1][NMAX+1];
    fx_t w [NMAX+1][NMAX+1];
    for (int i = 0; i <= NMAX; i++)
      for (int j = 0; j <= NMAX; j++) begin x[i][j] = '0; w[i][j] = '0; end
    for (int i = 0; i <= NMAX; i++) z[i] = '0;
    for (int j = 1; j <= n; j++) begin x[1][j] = t[j-1]; w[1][j] = t[j-1]; end
    for (int i = 2; i <= n; i++) begin
      z[i] = fx_div(-w[i-1][i], x[i-1][i-1]);
      for (int j = i; j <= n; j++) x[i][j] = x[i-1][j-1] + fx_mul(z[i], w[i-1][j]);
      for (int j = i + 1; j <= n; j++) w[i][j] = w[i-1][j] + fx_mul(z[i], x[i-1][j-1]);
    end
    for (int r = 0; r < NMAX; r++)
      for (int c = 0; c < NMAX; c++)
        xm[r][c] = (r < n && c < n && c >= r) ? x[r+1][c+1] : '0;
  endfunction

  // Y from z: y(i,j) = y(i-1,j-1) + z(i) y(i-1,i-j)
  function automatic void ref_lower(input int n, input fx_t z [NMAX+1], output mat_t ym);
    fx_t y [NMAX+1][NMAX+1];
    for (int i = 0; i <= NMAX; i++)
      for (int j = 0; j <= NMAX; j++) y[i][j] = '0;
    y[1][1] = FX_ONE;
    for (int i = 2; i <= n; i++)
      for (int j = 1; j <= i; j++)
        y[i][j] = y[i-1][j-1] + fx_mul(z[i], y[i-1][i-j]);
    for (int r = 0; r < NMAX; r++)
      for (int c = 0; c < NMAX; c++)
        ym[r][c] = (r < n && c < n && c <= r) ? y[r+1][c+1] : '0;
  endfunction

  function automatic void rand_t(input int n, output fx_t t [NMAX]);
    for (int k = 0; k < NMAX; k++) t[k] = '0;
    t[0] = fx_t'($urandom_range(4*65536, 12*65536 - 1));
    for (int k = 1; k < n; k++) t[k] = fx_t'(int'($urandom_range(0, 2*65536 - 2)) - 65535);
  endfunction

  function automatic real to_real(input fx_t v);
    return real'(v) / real'(FX_ONE);
  endfunction

endpackage
