// tb_qp_pkg: reference quadratic program solver for the testbenches, in
// double precision, and a generator of random strictly convex QPs.
//
// The reference is an infeasible primal-dual interior point method that
// solves the full Newton system
//   [ Q  J'                ] [du  ]   [ -Qu - J'lam - c        ]
//   [ J  -diag(t ./ lam)   ] [dlam] = [ g - Ju - sigma*mu./lam ]
// of size n + mc by Gaussian elimination with partial pivoting (not the
// reduced system used by the hardware) and iterates until mu < eps.
package tb_qp_pkg;
  import tb_fp_pkg::*;

  localparam int MAXN = 48;
  localparam int MAXM = 128;

  typedef struct {
    int  n, mc;
    real Q [MAXN][MAXN];
    real c [MAXN];
    real J [MAXM][MAXN];
    real g [MAXM];
  } qp_t;

  // values representable in the format (ew, mw), so that the hardware and
  // the reference see the same problem
  function automatic real q(real v, int ew, int mw);
    return fp_to_real(real_to_fp(v, ew, mw), ew, mw);
  endfunction

  function automatic real urand(real lo, real hi);
    return lo + (hi - lo) * real'($urandom_range(0, 1000000)) / 1000000.0;
  endfunction

  // random QP: Q = H'H + 0.5 I, c in [-cs, cs], J in [-1, 1], g in [0.2, 1]
  function automatic void make_qp(ref qp_t p, input int n, input int mc, input real cs,
                                  input int ew, input int mw);
    real H [MAXN][MAXN];
    p.n = n; p.mc = mc;
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++) H[i][j] = urand(-1.0, 1.0);
    for (int i = 0; i < n; i++)
      for (int j = 0; j <= i; j++) begin
        real s;
        s = (i == j) ? 0.5 : 0.0;
        for (int k = 0; k < n; k++) s += H[k][i] * H[k][j];
        p.Q[i][j] = q(s, ew, mw);
        p.Q[j][i] = p.Q[i][j];
      end
    for (int i = 0; i < n; i++) p.c[i] = q(urand(-cs, cs), ew, mw);
    for (int r = 0; r < mc; r++) begin
      for (int j = 0; j < n; j++) p.J[r][j] = q(urand(-1.0, 1.0), ew, mw);
      p.g[r] = q(urand(0.2, 1.0), ew, mw);
    end
  endfunction

  // solve A x = b in place (size m) with partial pivoting
  function automatic void gauss(ref real A [MAXN+MAXM][MAXN+MAXM+1], input int m);
    for (int col = 0; col < m; col++) begin
      int  piv;
      real best, f;
      piv = col; best = 0.0;
      for (int r = col; r < m; r++) begin
        real v;
        v = A[r][col] < 0.0 ? -A[r][col] : A[r][col];
        if (v > best) begin best = v; piv = r; end
      end
      if (piv != col)
        for (int j = 0; j <= m; j++) begin
          real tt;
          tt = A[col][j]; A[col][j] = A[piv][j]; A[piv][j] = tt;
        end
      for (int r = 0; r < m; r++)
        if (r != col && A[r][col] != 0.0) begin
          f = A[r][col] / A[col][col];
          for (int j = col; j <= m; j++) A[r][j] -= f * A[col][j];
        end
    end
    for (int r = 0; r < m; r++) A[r][m] = A[r][m] / A[r][r];
  endfunction

  // reference solution; returns the number of constraints active at it
  function automatic int solve_ref(ref qp_t p, ref real u [MAXN], input real eps);
    real lam [MAXM], t [MAXM], dl [MAXM], dt [MAXM], du [MAXN];
    real A [MAXN+MAXM][MAXN+MAXM+1];
    real mu, smu, alpha, amax;
    int  n, mc, act;
    n = p.n; mc = p.mc;
    for (int i = 0; i < n; i++) u[i] = 0.0;
    for (int i = 0; i < mc; i++) begin lam[i] = 1.0; t[i] = 1.0; end
    for (int it = 0; it < 200; it++) begin
      mu = 0.0;
      for (int i = 0; i < mc; i++) mu += lam[i] * t[i];
      mu = mu / real'(mc);
      if (mu < eps) break;
      smu = 0.1 * mu;
      for (int r = 0; r < n + mc; r++)
        for (int j = 0; j <= n + mc; j++) A[r][j] = 0.0;
      for (int i = 0; i < n; i++) begin
        real s;
        s = -p.c[i];
        for (int j = 0; j < n; j++) begin A[i][j] = p.Q[i][j]; s -= p.Q[i][j] * u[j]; end
        for (int r = 0; r < mc; r++) begin A[i][n+r] = p.J[r][i]; s -= p.J[r][i] * lam[r]; end
        A[i][n+mc] = s;
      end
      for (int r = 0; r < mc; r++) begin
        real s;
        s = p.g[r] - smu / lam[r];
        for (int j = 0; j < n; j++) begin A[n+r][j] = p.J[r][j]; s -= p.J[r][j] * u[j]; end
        A[n+r][n+r] = -t[r] / lam[r];
        A[n+r][n+mc] = s;
      end
      gauss(A, n + mc);
      for (int i = 0; i < n; i++) du[i] = A[i][n+mc];
      for (int r = 0; r < mc; r++) begin
        dl[r] = A[n+r][n+mc];
        dt[r] = -t[r] + (smu - t[r] * dl[r]) / lam[r];
      end
      amax = 2.0;
      for (int r = 0; r < mc; r++) begin
        if (dl[r] < 0.0 && -lam[r] / dl[r] < amax) amax = -lam[r] / dl[r];
        if (dt[r] < 0.0 && -t[r] / dt[r] < amax) amax = -t[r] / dt[r];
      end
      alpha = 0.995 * amax;
      if (alpha > 1.0) alpha = 1.0;
      for (int i = 0; i < n; i++) u[i] += alpha * du[i];
      for (int r = 0; r < mc; r++) begin lam[r] += alpha * dl[r]; t[r] += alpha * dt[r]; end
    end
    act = 0;
    for (int r = 0; r < mc; r++) if (t[r] < 1e-4) act++;
    return act;
  endfunction

endpackage
