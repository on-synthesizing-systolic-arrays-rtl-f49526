// tb_lu_ref_pkg: reference model for the band LU-decomposition testbenches.
//
// band_lu_model holds an N x N band matrix (lower bandwidth P, upper bandwidth Q)
// and factors it by the textbook elimination loop: for k = 1..N, u(k,j) = a(k,j),
// l(i,k) = a(i,k)/a(k,k), a(i,j) -= l(i,k)*u(k,j). It uses its own fixed-point
// helpers (same format and rounding rules as the hardware: 16 fraction bits,
// product truncated toward minus infinity, quotient truncated toward zero, x/0 = 0)
// on 64-bit integers, so it shares no code with the design. It also reports
// the schedule time t = i+j+k of every point, which the testbenches compare
// with the cycles the hardware produces its results in.
package tb_lu_ref_pkg;

  localparam int FRAC = 16;
  localparam longint ONE = 64'sd1 <<< FRAC;

  function automatic longint wrap32(longint v);
    return longint'(int'(v));
  endfunction

  function automatic longint rmul(longint a, longint b);
    return wrap32((a * b) >>> FRAC);
  endfunction

  function automatic longint rdiv(longint a, longint b);
    if (b == 0) return 0;
    return wrap32((a <<< FRAC) / b);
  endfunction

  class band_lu_model;
    int n, p, q;
    longint a0 [][];  // input matrix, 1-based (index 0 unused)
    longint l  [][];
    longint u  [][];

    function new(int n_, int p_, int q_);
      n = n_; p = p_; q = q_;
      a0 = new[n+1]; l = new[n+1]; u = new[n+1];
      foreach (a0[i]) begin
        a0[i] = new[n+1]; l[i] = new[n+1]; u[i] = new[n+1];
      end
    endfunction

    function bit in_band(int i, int j);
      return (i - j < p) && (j - i < q);
    endfunction

    // diagonally dominant random band matrix: diagonal in [6,10], others in [-2,2)
    function void random_fill();
      for (int i = 1; i <= n; i++)
        for (int j = 1; j <= n; j++) begin
          if (!in_band(i, j)) a0[i][j] = 0;
          else if (i == j) a0[i][j] = 6 * ONE + longint'($urandom_range(0, 4 * 65536));
          else a0[i][j] = longint'($urandom_range(0, 4 * 65536)) - 2 * ONE;
        end
    endfunction

    function void factor();
      longint a [][];
      a = new[n+1];
      foreach (a[i]) begin
        a[i] = new[n+1];
        for (int j = 0; j <= n; j++) a[i][j] = a0[i][j];
      end
      for (int i = 1; i <= n; i++)
        for (int j = 1; j <= n; j++) begin
          l[i][j] = (i == j) ? ONE : 0;
          u[i][j] = 0;
        end
      for (int k = 1; k <= n; k++) begin
        for (int j = k; j <= n; j++) u[k][j] = a[k][j];
        for (int i = k + 1; i <= n; i++) l[i][k] = rdiv(a[i][k], a[k][k]);
        for (int i = k + 1; i <= n; i++)
          for (int j = k + 1; j <= n; j++)
            a[i][j] = wrap32(a[i][j] - rmul(l[i][k], u[k][j]));
      end
    endfunction

    // largest |(L*U - A)(i,j)| in units of the last fraction bit
    function longint max_residual();
      longint worst = 0;
      for (int i = 1; i <= n; i++)
        for (int j = 1; j <= n; j++) begin
          longint s = 0;
          longint e;
          for (int k = 1; k <= n; k++) s += (l[i][k] * u[k][j]) >>> FRAC;
          e = s - a0[i][j];
          if (e < 0) e = -e;
          if (e > worst) worst = e;
        end
      return worst;
    endfunction
  endclass

endpackage
