// interp_ref_pkg: reference model for the interpolation-processor testbenches.
//
// GF(2^8) arithmetic from exponent/logarithm tables generated by repeated
// multiplication by the primitive element (polynomial 0x11D), and a direct
// software version of Koetter's interpolation: discrepancies are computed
// from the Hasse-derivative formula
//   D_(r,s) Q(alpha,beta) = sum C(a,r) C(b,s) q_(a,b) alpha^(a-r) beta^(b-s),
// and the updates use the same normalisation as the hardware
// (Q_j += Delta_j / Delta_jstar * Q_jstar, Q_jstar *= (x + alpha)), so the
// hardware's coefficients can be compared one for one.
package interp_ref_pkg;

  int unsigned gexp [510];
  int unsigned glog [256];

  function automatic void gf_tables();
    int unsigned e;
    e = 1;
    for (int i = 0; i < 255; i++) begin
      gexp[i]       = e;
      gexp[i + 255] = e;
      glog[e]       = i;
      e = e << 1;
      if ((e & 'h100) != 0) e = e ^ 'h11D;
    end
    glog[0] = 0;
  endfunction

  function automatic int unsigned mul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return gexp[glog[a] + glog[b]];
  endfunction

  function automatic int unsigned inv(int unsigned a);
    return gexp[(255 - glog[a]) % 255];
  endfunction

  function automatic int unsigned pow(int unsigned a, int unsigned e);
    if (e == 0) return 1;
    if (a == 0) return 0;
    return gexp[(glog[a] * e) % 255];
  endfunction

  function automatic bit bodd(int unsigned n, int unsigned k);
    return (k <= n) && ((n & k) == k);
  endfunction

  class koetter_ref;
    int unsigned k, np, nx;
    int unsigned q[];
    int unsigned wdeg[];
    bit          ovf;
    int unsigned n_upd, n_skip;

    function new(int unsigned k_, int unsigned np_, int unsigned nx_);
      k  = k_;
      np = np_;
      nx = nx_;
      q    = new[np * np * nx];
      wdeg = new[np];
      init();
    endfunction

    function void init();
      foreach (q[i]) q[i] = 0;
      for (int unsigned j = 0; j < np; j++) begin
        q[idx(j, j, 0)] = 1;
        wdeg[j] = j * (k - 1);
      end
      ovf    = 0;
      n_upd  = 0;
      n_skip = 0;
    endfunction

    function int unsigned idx(int unsigned j, int unsigned b, int unsigned a);
      return (j * np + b) * nx + a;
    endfunction

    function int unsigned coef(int unsigned j, int unsigned b, int unsigned a);
      return q[idx(j, b, a)];
    endfunction

    // D_(r,s) Q_j evaluated at (al, be)
    function int unsigned hasse(int unsigned j, int unsigned r, int unsigned s,
                                int unsigned al, int unsigned be);
      int unsigned acc, row, c;
      acc = 0;
      for (int unsigned b = s; b < np; b++) begin
        if (!bodd(b, s)) continue;
        row = 0;
        for (int unsigned a = r; a < nx; a++) begin
          c = q[idx(j, b, a)];
          if (c != 0 && bodd(a, r)) row ^= mul(c, pow(al, a - r));
        end
        acc ^= mul(row, pow(be, b - s));
      end
      return acc;
    endfunction

    // one constraint; returns 1 when an update took place
    function bit iterate(int unsigned al, int unsigned be, int unsigned r, int unsigned s);
      int unsigned d[];
      int          js;
      int unsigned f, hi;
      d  = new[np];
      js = -1;
      for (int unsigned j = 0; j < np; j++) begin
        d[j] = hasse(j, r, s, al, be);
        if (d[j] != 0 && (js < 0 || wdeg[j] < wdeg[js])) js = j;
      end
      if (js < 0) begin
        n_skip++;
        return 0;
      end
      for (int unsigned j = 0; j < np; j++) begin
        if (j == js || d[j] == 0) continue;
        f = mul(d[j], inv(d[js]));
        for (int unsigned i = 0; i < np * nx; i++)
          q[j * np * nx + i] ^= mul(f, q[js * np * nx + i]);
      end
      for (int unsigned b = 0; b < np; b++) begin
        hi = q[idx(js, b, nx - 1)];
        if (hi != 0) ovf = 1;
        for (int a = int'(nx) - 1; a >= 0; a--)
          q[idx(js, b, a)] = mul(al, q[idx(js, b, a)]) ^ ((a > 0) ? q[idx(js, b, a - 1)] : 0);
      end
      wdeg[js]++;
      n_upd++;
      return 1;
    endfunction

    // all constraints of one point, in the hardware's order
    function void point(int unsigned al, int unsigned be, int unsigned m);
      for (int unsigned r = 0; r < m; r++)
        for (int unsigned s = 0; s + r < m; s++)
          void'(iterate(al, be, r, s));
    endfunction

    function int unsigned best();
      int unsigned bj;
      bj = 0;
      for (int unsigned j = 1; j < np; j++) if (wdeg[j] < wdeg[bj]) bj = j;
      return bj;
    endfunction
  endclass

endpackage
