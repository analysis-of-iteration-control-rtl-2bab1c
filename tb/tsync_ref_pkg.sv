// tsync_ref_pkg: reference models used by the testbenches.
//
// Written independently of the RTL: the component encoder is expressed by
// its feedback sequence a(k) = u(k) ^ a(k-2) ^ a(k-3) and parity
// p(k) = a(k) ^ a(k-1) ^ a(k-3) (polynomials 13/15 octal), and the
// Max-Log-MAP model runs plain integer forward and backward recursions over
// the whole block without normalisation, with -infinity start metrics.
package tsync_ref_pkg;

  typedef int int_da[];

  // parity sequence of one component encoder started in the all-zero state
  function automatic int_da ref_encode(input int_da u);
    int_da p;
    int a1, a2, a3, a;
    p = new[u.size()];
    a1 = 0; a2 = 0; a3 = 0;
    foreach (u[k]) begin
      a    = u[k] ^ a2 ^ a3;
      p[k] = a ^ a1 ^ a3;
      a3 = a2; a2 = a1; a1 = a;
    end
    return p;
  endfunction

  function automatic int ref_sat(input int v, input int lim);
    return (v > lim) ? lim : (v < -lim) ? -lim : v;
  endfunction

  // trellis as seen by the model: state = {a(k-1), a(k-2), a(k-3)}
  function automatic int nxt(input int s, input int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return (a << 2) | (s >> 1);
  endfunction
  function automatic int par(input int s, input int u);
    int a;
    a = u ^ ((s >> 1) & 1) ^ (s & 1);
    return a ^ ((s >> 2) & 1) ^ (s & 1);
  endfunction

  // Max-Log-MAP over a whole block; LLR = ln P0/P1
  task automatic ref_maxlog(input int_da sy, input int_da pa, input int_da ap,
                            output int_da app_s, output int_da app_p, output int_da ext);
    int K, NEG;
    int alpha[][8], beta[][8];
    K = sy.size();
    NEG = -1000000;
    alpha = new[K + 1];
    beta  = new[K + 1];
    app_s = new[K]; app_p = new[K]; ext = new[K];
    for (int s = 0; s < 8; s++) begin
      alpha[0][s] = (s == 0) ? 0 : NEG;
      beta[K][s]  = 0;
    end
    for (int k = 0; k < K; k++) begin
      for (int s = 0; s < 8; s++) alpha[k+1][s] = NEG * 4;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int g, m;
          g = (u == 0 ? sy[k] + ap[k] : 0) + (par(s, u) == 0 ? pa[k] : 0);
          m = alpha[k][s] + g;
          if (m > alpha[k+1][nxt(s, u)]) alpha[k+1][nxt(s, u)] = m;
        end
    end
    for (int k = K - 1; k >= 0; k--) begin
      for (int s = 0; s < 8; s++) begin
        beta[k][s] = NEG * 4;
        for (int u = 0; u < 2; u++) begin
          int g, m;
          g = (u == 0 ? sy[k] + ap[k] : 0) + (par(s, u) == 0 ? pa[k] : 0);
          m = g + beta[k+1][nxt(s, u)];
          if (m > beta[k][s]) beta[k][s] = m;
        end
      end
    end
    for (int k = 0; k < K; k++) begin
      int mu0, mu1, mp0, mp1, d;
      mu0 = NEG * 4; mu1 = NEG * 4; mp0 = NEG * 4; mp1 = NEG * 4;
      for (int s = 0; s < 8; s++)
        for (int u = 0; u < 2; u++) begin
          int g, m;
          g = (u == 0 ? sy[k] + ap[k] : 0) + (par(s, u) == 0 ? pa[k] : 0);
          m = alpha[k][s] + g + beta[k+1][nxt(s, u)];
          if (u == 0) begin if (m > mu0) mu0 = m; end
          else        begin if (m > mu1) mu1 = m; end
          if (par(s, u) == 0) begin if (m > mp0) mp0 = m; end
          else                begin if (m > mp1) mp1 = m; end
        end
      app_s[k] = ref_sat(mu0 - mu1, 511);
      app_p[k] = ref_sat(mp0 - mp1, 511);
      d        = (mu0 - mu1) - sy[k] - ap[k];
      ext[k]   = ref_sat((d * 3) >>> 2, 127);
    end
  endtask

  // random permutation of 0..K-1
  function automatic int_da ref_perm(input int K);
    int_da p;
    p = new[K];
    foreach (p[i]) p[i] = i;
    for (int i = K - 1; i > 0; i--) begin
      int j, t;
      j = int'($urandom_range(i, 0));
      t = p[i]; p[i] = p[j]; p[j] = t;
    end
    return p;
  endfunction

endpackage
