// tb_ref_pkg: reference model of the graph-theoretic parameters, written
// independently of the RTL in plain integer arithmetic, for the testbenches.
// A matrix is an n x n array of Q1.7 weights (0..128); sizes up to MAXN.
package tb_ref_pkg;
  localparam int MAXN = 19;
  localparam int INF  = 1 << 30;
  typedef int mat_t [MAXN][MAXN];
  typedef int vec_t [MAXN];

  function automatic int ref_recip(input int d);
    return ((1 << 16) + d / 2) / d;
  endfunction

  function automatic mat_t ref_rand_matrix(input int n, input int zero_pct);
    mat_t m;
    for (int i = 0; i < MAXN; i++) for (int j = 0; j < MAXN; j++) m[i][j] = 0;
    for (int i = 0; i < n; i++)
      for (int j = i + 1; j < n; j++) begin
        int v;
        v = (($urandom % 100) < zero_pct) ? 0 : int'($urandom % 129);
        m[i][j] = v; m[j][i] = v;
      end
    return m;
  endfunction

  function automatic int ref_degree(input mat_t m, input int n, input int i);
    int k = 0;
    for (int j = 0; j < n; j++) if (j != i && m[i][j] > 0) k++;
    return k;
  endfunction

  function automatic int ref_wdegree(input mat_t m, input int n, input int i);
    int k = 0;
    for (int j = 0; j < n; j++) if (j != i) k += m[i][j];
    return k;
  endfunction

  function automatic longint ref_tri(input mat_t m, input int n, input int i);
    longint t = 0;
    for (int j = 0; j < n; j++)
      for (int k = j + 1; k < n; k++)
        if (j != i && k != i) t += longint'(m[i][j]) * m[i][k] * m[j][k];
    return t;
  endfunction

  function automatic longint ref_cc_node(input mat_t m, input int n, input int i);
    longint kk;
    int k;
    k = ref_degree(m, n, i);
    kk = longint'(k) * (k - 1);
    if (k < 2) return 0;
    return ((2 * ref_tri(m, n, i)) / kk) >> 5;
  endfunction

  function automatic longint ref_cc_mean(input mat_t m, input int n);
    longint s = 0;
    for (int i = 0; i < n; i++) s += ref_cc_node(m, n, i);
    return (s * ref_recip(n)) >> 16;
  endfunction

  function automatic longint ref_density(input mat_t m, input int n);
    longint s = 0;
    for (int i = 0; i < n; i++) s += ref_degree(m, n, i);
    return s * ref_recip(n * n - n);
  endfunction

  function automatic longint ref_transitivity(input mat_t m, input int n);
    longint num = 0, den = 0;
    for (int i = 0; i < n; i++) begin
      int k;
      k = ref_degree(m, n, i);
      num += 2 * ref_tri(m, n, i);
      den += longint'(k) * ((k > 0) ? k - 1 : 0);
    end
    if (den == 0) return 0;
    return (num / den) >> 5;
  endfunction

  // all-pairs shortest distances on edge length 128 - w (w = 0: no edge)
  function automatic mat_t ref_distances(input mat_t m, input int n);
    mat_t d;
    for (int i = 0; i < MAXN; i++)
      for (int j = 0; j < MAXN; j++)
        d[i][j] = (i == j) ? 0 : ((i < n && j < n && m[i][j] > 0) ? 128 - m[i][j] : INF);
    for (int k = 0; k < n; k++)
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++)
          if (d[i][k] < INF && d[k][j] < INF && d[i][k] + d[k][j] < d[i][j])
            d[i][j] = d[i][k] + d[k][j];
    return d;
  endfunction

  function automatic longint ref_cpl(input mat_t m, input int n);
    mat_t d;
    longint s = 0;
    d = ref_distances(m, n);
    for (int i = 0; i < n; i++)
      for (int j = 0; j < n; j++)
        if (i != j && d[i][j] < INF) s += d[i][j];
    return (s * ref_recip(n * n - n)) >> 7;
  endfunction

  function automatic int ref_ecc(input mat_t m, input int n, input int i);
    mat_t d;
    int e = 0;
    d = ref_distances(m, n);
    for (int j = 0; j < n; j++)
      if (j != i && d[i][j] < INF && d[i][j] > e) e = d[i][j];
    return e;
  endfunction
endpackage
