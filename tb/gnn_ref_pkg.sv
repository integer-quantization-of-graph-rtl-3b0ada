// gnn_ref_pkg: reference model of the integer GraphSAGE arithmetic, used by
// the testbenches to compute expected results independently of the RTL.
//
// Values are held as plain ints in fixed-size arrays (up to 8 nodes and 24
// features) with the live sizes passed explicitly.  The requantisation is
// written as a floor division rather than an arithmetic shift, so it checks
// the RTL's shift-and-round arithmetic instead of repeating it.  Counters
// record how often each rescaling mechanism (round half-way case, ReLU
// clamp, saturation high and low) occurred, for coverage checks.
package gnn_ref_pkg;

  localparam int MAXN = 8;
  localparam int MAXF = 24;

  typedef int feat_t [MAXN][MAXF];
  typedef int adjm_t [MAXN][MAXN];
  typedef int wmat_t [MAXF][MAXF];
  typedef int bvec_t [MAXF];

  int n_sat_hi = 0;
  int n_sat_lo = 0;
  int n_relu   = 0;
  int n_tie    = 0;

  // sat8(rho(round(x / 2^s))), half-way values rounded towards +inf.
  function automatic int requant(longint x, int s, bit relu);
    longint d, num, q, rem;
    d   = longint'(1) << s;
    num = (s > 0) ? x + d / 2 : x;
    q   = num / d;
    if ((num % d) != 0 && num < 0) q = q - 1;
    rem = ((x % d) + d) % d;
    if (s > 0 && rem == d / 2) n_tie++;
    if (relu && q < 0) begin
      q = 0;
      n_relu++;
    end
    if (q > 127) begin
      n_sat_hi++;
      return 127;
    end
    if (q < -128) begin
      n_sat_lo++;
      return -128;
    end
    return int'(q);
  endfunction

  // Fixed-point row-normalised adjacency: round(4096 / deg(i)) per edge.
  // mask[i][j] = 1 means an edge from node j into node i; the diagonal is
  // ignored (no self-loops).  Returns the number of isolated nodes.
  function automatic int make_adj(input bit mask [MAXN][MAXN], input int n, output adjm_t a);
    int iso;
    iso = 0;
    for (int i = 0; i < MAXN; i++)
      for (int j = 0; j < MAXN; j++) a[i][j] = 0;
    for (int i = 0; i < n; i++) begin
      int deg;
      deg = 0;
      for (int j = 0; j < n; j++) if (j != i && mask[i][j]) deg++;
      if (deg == 0) iso++;
      for (int j = 0; j < n; j++)
        if (j != i && mask[i][j]) a[i][j] = (2 * 4096 + deg) / (2 * deg);
    end
    return iso;
  endfunction

  function automatic void aggregate(input feat_t h, input adjm_t a, input int n, input int f,
                                    input int s, output feat_t hh);
    for (int i = 0; i < MAXN; i++)
      for (int k = 0; k < MAXF; k++) hh[i][k] = 0;
    for (int i = 0; i < n; i++)
      for (int k = 0; k < f; k++) begin
        longint t;
        t = 0;
        for (int j = 0; j < n; j++) t += longint'(a[i][j]) * longint'(h[j][k]);
        hh[i][k] = requant(t, s, 1'b0);
      end
  endfunction

  function automatic void linear(input feat_t hh, input wmat_t w, input bvec_t b, input int n,
                                 input int fi, input int fo, input int s, input bit relu,
                                 output feat_t y);
    for (int i = 0; i < MAXN; i++)
      for (int k = 0; k < MAXF; k++) y[i][k] = 0;
    for (int i = 0; i < n; i++)
      for (int o = 0; o < fo; o++) begin
        longint acc;
        acc = longint'(b[o]);
        for (int k = 0; k < fi; k++) acc += longint'(hh[i][k]) * longint'(w[o][k]);
        y[i][o] = requant(acc, s, relu);
      end
  endfunction

  function automatic int argmax(input feat_t y, input int node, input int nc);
    int best;
    best = 0;
    for (int c = 1; c < nc; c++) if (y[node][c] > y[node][best]) best = c;
    return best;
  endfunction

  function automatic int rand_s8();
    return int'($signed(8'($urandom)));
  endfunction

  // Uniform in [-m, m].
  function automatic int rand_pm(int m);
    return int'($urandom_range(2 * m)) - m;
  endfunction

endpackage
