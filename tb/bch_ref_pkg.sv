// bch_ref_pkg: reference BCH arithmetic for the testbenches, written independently of the RTL.
//
// It builds GF(2^13) exponent/log tables at run time, derives the generator polynomial from
// the minimal polynomials of alpha^1..alpha^(2t-1), computes parity by bitwise long division
// and evaluates codeword syndromes. Codewords are held as bit queues, index 0 being the first
// bit sent (coefficient of x^(n-1)).
package bch_ref_pkg;

  localparam int M  = 13;
  localparam int NF = 8191;
  localparam int PRIM = 'h201B;   // x^13+x^4+x^3+x+1
  localparam int T  = 22;
  localparam int NP = 286;

  int exp_t [0:2*NF];
  int log_t [0:NF];
  bit gen   [0:NP];            // gen[k] = coefficient of x^k
  bit built = 0;

  function automatic int mul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[(log_t[a] + log_t[b]) % NF];
  endfunction

  function automatic void build();
    int x;
    bit g   [0:NP];
    int deg;
    bit seen [int];
    if (built) return;
    x = 1;
    for (int i = 0; i < NF; i++) begin
      exp_t[i] = x;
      log_t[x] = i;
      x = x << 1;
      if (x & (1 << M)) x = x ^ PRIM;
    end
    for (int i = NF; i <= 2 * NF; i++) exp_t[i] = exp_t[i - NF];
    foreach (g[k]) g[k] = 0;
    g[0] = 1;
    deg  = 0;
    for (int i = 1; i < 2 * T; i += 2) begin
      int conj[$];
      int c;
      int p[$];
      int key;
      c = i;
      do begin conj.push_back(c); c = (c * 2) % NF; end while (c != i);
      key = conj.min()[0];
      if (seen.exists(key)) continue;
      seen[key] = 1;
      // minimal polynomial: prod (x + alpha^c)
      p = '{1};
      foreach (conj[q]) begin
        int np[$];
        np = '{};
        for (int k = 0; k <= p.size(); k++) np.push_back(0);
        for (int k = 0; k < p.size(); k++) begin
          np[k + 1] ^= p[k];
          np[k]     ^= mul(p[k], exp_t[conj[q]]);
        end
        p = np;
      end
      // multiply g by p (coefficients of p are 0/1 in GF(2))
      begin
        bit ng [0:NP];
        foreach (ng[k]) ng[k] = 0;
        for (int a = 0; a <= deg; a++)
          if (g[a]) for (int b = 0; b < p.size(); b++) if (p[b] != 0) ng[a + b] ^= 1;
        g = ng;
        deg += p.size() - 1;
      end
    end
    gen = g;
    built = 1;
  endfunction

  // Parity (NP bits, first-sent first) of a data bit queue.
  function automatic void ref_parity(input bit data[$], output bit par[$]);
    bit r [0:NP-1];      // r[k] = coefficient of x^k of the running remainder
    bit fb;
    build();
    foreach (r[k]) r[k] = 0;
    foreach (data[i]) begin
      fb = data[i] ^ r[NP-1];
      for (int k = NP - 1; k > 0; k--) r[k] = r[k-1] ^ (fb & gen[k]);
      r[0] = fb & gen[0];
    end
    par = '{};
    for (int k = NP - 1; k >= 0; k--) par.push_back(r[k]);
  endfunction

  // Syndrome S_j of a codeword bit queue (first bit = highest degree).
  function automatic int syndrome(bit cw[$], int j);
    int s;
    int n;
    build();
    s = 0;
    n = cw.size();
    foreach (cw[i]) if (cw[i]) s ^= exp_t[(j * (n - 1 - i)) % NF];
    return s;
  endfunction

endpackage
