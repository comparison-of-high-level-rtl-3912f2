// rs_ref_pkg: reference model for the Reed-Solomon testbenches, written independently of the
// RTL. GF(2^8) products use log/antilog tables (the RTL uses a shift-and-add XOR network),
// and the encoder builds the generator polynomial g(x) = prod_{j=1..2t} (x + alpha^j) and
// forms systematic codewords by polynomial division. Call ref_init() once before use.
// Blocks are arrays indexed by power: blk[i] is the coefficient of x^i, so blk[n-1] is sent first.
package rs_ref_pkg;

  typedef logic [7:0] sym_t;
  typedef sym_t blk_t [255];

  int unsigned exp_t [510];
  int unsigned log_t [256];

  function automatic void ref_init(input int unsigned pp = 'h11D);
    int unsigned v;
    v = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i]       = v;
      exp_t[i + 255] = v;
      log_t[v]       = i;
      v = v << 1;
      if (v & 'h100) v = v ^ pp;
    end
    log_t[0] = 0;
  endfunction

  function automatic sym_t rmul(input sym_t a, input sym_t b);
    if (a == 0 || b == 0) return 8'h00;
    return sym_t'(exp_t[log_t[a] + log_t[b]]);
  endfunction

  function automatic sym_t rinv(input sym_t a);
    return sym_t'(exp_t[(255 - log_t[a]) % 255]);
  endfunction

  function automatic sym_t ralpha(input int e);   // alpha^e, any sign
    int m;
    m = e % 255;
    if (m < 0) m += 255;
    return sym_t'(exp_t[m]);
  endfunction

  // evaluate sum_k p[k] x^k
  function automatic sym_t reval(input sym_t p [], input sym_t x);
    sym_t acc;
    acc = 0;
    for (int k = p.size() - 1; k >= 0; k--) acc = rmul(acc, x) ^ p[k];
    return acc;
  endfunction

  // systematic codeword: msg[0..k-1] are the data symbols, msg[0] sent first (power n-1)
  function automatic blk_t encode(input sym_t msg [], input int n, input int t);
    blk_t cw;
    sym_t g [];
    sym_t rem [];
    sym_t fb;
    int np;
    np = 2 * t;
    g = new[np + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int j = 1; j <= np; j++) begin       // g *= (x + alpha^j)
      for (int i = np; i >= 1; i--) g[i] = g[i - 1] ^ rmul(g[i], ralpha(j));
      g[0] = rmul(g[0], ralpha(j));
    end
    rem = new[np];
    foreach (rem[i]) rem[i] = 0;
    for (int m = 0; m < n - np; m++) begin    // LFSR division of msg(x) x^2t by g(x)
      fb = msg[m] ^ rem[np - 1];
      for (int i = np - 1; i >= 1; i--) rem[i] = rem[i - 1] ^ rmul(fb, g[i]);
      rem[0] = rmul(fb, g[0]);
    end
    foreach (cw[i]) cw[i] = 0;
    for (int m = 0; m < n - np; m++) cw[n - 1 - m] = msg[m];
    for (int i = 0; i < np; i++) cw[i] = rem[i];
    return cw;
  endfunction

  // S_j = R(alpha^j), j = 1..2t; result[j-1] = S_j
  function automatic void syndromes(input blk_t r, input int n, input int t, output sym_t s []);
    s = new[2 * t];
    for (int j = 1; j <= 2 * t; j++) begin
      sym_t acc;
      acc = 0;
      for (int i = n - 1; i >= 0; i--) acc = rmul(acc, ralpha(j)) ^ r[i];
      s[j - 1] = acc;
    end
  endfunction

  // Lambda(x) = prod (1 + alpha^loc x) for the given error positions
  function automatic void locator(input int locs [], output sym_t lam []);
    lam = new[locs.size() + 1];
    foreach (lam[i]) lam[i] = 0;
    lam[0] = 1;
    foreach (locs[q]) begin
      for (int i = q + 1; i >= 1; i--) lam[i] = lam[i] ^ rmul(lam[i - 1], ralpha(locs[q]));
    end
  endfunction

  // Omega(x) = S(x) Lambda(x) mod x^2t, S(x) = S_1 + S_2 x + ...
  function automatic void evaluator(input sym_t s [], input sym_t lam [], input int t,
                                    output sym_t om []);
    om = new[2 * t];
    foreach (om[i]) om[i] = 0;
    for (int i = 0; i < 2 * t; i++)
      for (int k = 0; k <= i && k < lam.size(); k++) om[i] = om[i] ^ rmul(lam[k], s[i - k]);
  endfunction

  // nerr distinct positions in [lo, hi]
  function automatic void pick_positions(input int nerr, input int lo, input int hi,
                                         output int locs []);
    int cand;
    bit dup;
    locs = new[nerr];
    for (int q = 0; q < nerr; q++) begin
      do begin
        cand = lo + int'($urandom % (hi - lo + 1));
        dup = 0;
        for (int p = 0; p < q; p++) if (locs[p] == cand) dup = 1;
      end while (dup);
      locs[q] = cand;
    end
  endfunction

endpackage
