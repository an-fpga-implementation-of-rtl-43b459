// ntru_tb_pkg: reference arithmetic for the engine testbenches, written
// independently of the RTL: ternary polynomial sampling, schoolbook
// convolution in R_q, NTRU key generation (inversion of f in R_2 by the
// almost-inverse algorithm, then Newton lifting to R_q), encryption,
// decryption, and the T_conv(s) clock-count formula.
package ntru_tb_pkg;

  localparam int MAXN = 512;

  typedef int poly_t [MAXN];          // coefficients as plain integers
  typedef int list_t [MAXN];          // sorted non-zero locations

  // Random ternary polynomial with npos +1s and nneg -1s.
  function automatic void rand_ternary(int n, int npos, int nneg, output poly_t t);
    int j;
    for (int i = 0; i < MAXN; i++) t[i] = 0;
    for (int i = 0; i < npos + nneg; i++) begin
      do j = $urandom_range(n - 1, 0); while (t[j] != 0);
      t[j] = (i < npos) ? 1 : -1;
    end
  endfunction

  // Convolution in Z[x]/(x^n - 1), no reduction of the coefficients.
  function automatic void conv(int n, input poly_t a, input poly_t b, output poly_t c);
    for (int k = 0; k < MAXN; k++) c[k] = 0;
    for (int i = 0; i < n; i++)
      if (a[i] != 0)
        for (int k = 0; k < n; k++) c[(i + k) % n] += a[i] * b[k];
  endfunction

  function automatic int modq(int v, int q);
    int r = v % q;
    return (r < 0) ? r + q : r;
  endfunction

  // Inverse of f in (Z/2^logq Z)[x]/(x^n - 1); returns 0 when f is not
  // invertible mod 2.
  function automatic bit invert_q(int n, int logq, input poly_t f, output poly_t fq);
    bit   ff [MAXN+1], gg [MAXN+1], bb [MAXN+1], cc [MAXN+1];
    bit   tb;
    int   k, degf, degg, q, guard;
    poly_t tmp, tmp2, two_minus;
    q = 1 << logq;
    for (int i = 0; i <= MAXN; i++) begin ff[i] = 0; gg[i] = 0; bb[i] = 0; cc[i] = 0; end
    for (int i = 0; i < n; i++) ff[i] = bit'(f[i] & 1);
    gg[0] = 1; gg[n] = 1;              // x^n - 1 = x^n + 1 over GF(2)
    bb[0] = 1;
    k = 0; guard = 0;
    forever begin
      guard++;
      if (guard > 100000) return 0;
      while (ff[0] == 0) begin
        bit allz = 1;
        for (int i = 0; i <= n; i++) if (ff[i]) allz = 0;
        if (allz) return 0;
        for (int i = 0; i < n; i++) ff[i] = ff[i+1];
        ff[n] = 0;
        // c = c * x mod (x^n - 1)
        tb = cc[n-1];
        for (int i = n - 1; i > 0; i--) cc[i] = cc[i-1];
        cc[0] = tb;
        k++;
      end
      degf = 0; degg = 0;
      for (int i = 0; i <= n; i++) begin if (ff[i]) degf = i; if (gg[i]) degg = i; end
      if (degf == 0) break;
      if (degf < degg) begin
        for (int i = 0; i <= n; i++) begin
          tb = ff[i]; ff[i] = gg[i]; gg[i] = tb;
          tb = bb[i]; bb[i] = cc[i]; cc[i] = tb;
        end
      end
      for (int i = 0; i <= n; i++) begin ff[i] ^= gg[i]; bb[i] ^= cc[i]; end
    end
    // inverse mod 2 is x^(-k) * b
    for (int i = 0; i < MAXN; i++) fq[i] = 0;
    for (int i = 0; i < n; i++) fq[modq(i - k, n)] = int'(bb[i]);
    // Newton: fq = fq * (2 - f * fq), doubling the precision each round
    for (int prec = 2; prec < 2 * q; prec *= prec) begin
      conv(n, f, fq, tmp);
      for (int i = 0; i < n; i++) two_minus[i] = modq(((i == 0) ? 2 : 0) - tmp[i], q);
      conv(n, fq, two_minus, tmp2);
      for (int i = 0; i < n; i++) fq[i] = modq(tmp2[i], q);
    end
    return 1;
  endfunction

  // Sorted locations and signs of a ternary polynomial.
  function automatic int to_list(int n, input poly_t t, output list_t loc, output list_t sgn);
    int cnt = 0;
    for (int i = 0; i < n; i++)
      if (t[i] != 0) begin loc[cnt] = i; sgn[cnt] = t[i]; cnt++; end
    return cnt;
  endfunction

  // Clocks the sparse convolution takes: sum of ceil(gap/s), d_0 = 0, and one
  // clock for a location 0.
  function automatic int t_conv(int cnt, input list_t loc, int s);
    int tot = 0, prev = 0, gap;
    for (int i = 0; i < cnt; i++) begin
      gap = loc[i] - prev;
      tot += (gap == 0) ? 1 : (gap + s - 1) / s;
      prev = loc[i];
    end
    return tot;
  endfunction

  // Residue of the centre-lifted value of a (0 <= a < q) mod p.
  function automatic int lift_modp(int a, int q, int p);
    int v = (a > q / 2) ? a - q : a;
    v = v % p;
    return (v < 0) ? v + p : v;
  endfunction

endpackage
