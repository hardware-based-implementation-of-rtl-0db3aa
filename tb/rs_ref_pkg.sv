// rs_ref_pkg: reference model for the testbenches.
//
// Independent software model of the arithmetic the RTL implements: GF(2^m)
// through exponent/logarithm tables, a systematic Reed-Solomon encoder by
// polynomial long division, syndromes by direct evaluation, the monic error
// locator prod(1 - X_l x) for chosen error positions, and the CCSDS
// pseudo-random bit sequence from its standard recurrence. Codeword arrays
// are in transmission order: element 0 is the highest-degree coefficient.
package rs_ref_pkg;
  int m_q;
  int exp_t [512];
  int log_t [256];
  int step_g;
  int fcr_g;

  function automatic void gf_init(int m, int poly, int fcr, int step);
    int v;
    m_q    = (1 << m) - 1;
    fcr_g  = fcr;
    step_g = step;
    v = 1;
    for (int i = 0; i < 512; i++) begin
      exp_t[i] = v;
      if (i < m_q) log_t[v] = i;
      v = v << 1;
      if (v > m_q) v = v ^ poly;
    end
    log_t[0] = 0;
  endfunction

  function automatic int gmul(int a, int b);
    if (a == 0 || b == 0) return 0;
    return exp_t[(log_t[a] + log_t[b]) % m_q];
  endfunction

  function automatic int alpha_pow(int e);
    int ee;
    ee = e % m_q;
    if (ee < 0) ee += m_q;
    return exp_t[ee];
  endfunction

  function automatic int ginv(int a);
    return exp_t[(m_q - log_t[a]) % m_q];
  endfunction

  // beta^e, beta = alpha^step
  function automatic int beta_pow(int e);
    return alpha_pow(e * step_g);
  endfunction

  // generator coefficients, index = degree
  function automatic void gen_poly(int two_t, ref int g[]);
    int root;
    g = new[two_t + 1];
    foreach (g[i]) g[i] = 0;
    g[0] = 1;
    for (int j = 0; j < two_t; j++) begin
      root = beta_pow(fcr_g + j);
      for (int i = two_t; i >= 1; i--) g[i] = g[i-1] ^ gmul(g[i], root);
      g[0] = gmul(g[0], root);
    end
  endfunction

  // systematic encoding: msg (k symbols) -> cw (n symbols), transmission order
  function automatic void encode(int n, int k, const ref int msg[], ref int cw[]);
    int g[];
    int rem[];
    int fb;
    int two_t;
    two_t = n - k;
    gen_poly(two_t, g);
    rem = new[two_t];
    foreach (rem[i]) rem[i] = 0;
    for (int i = 0; i < k; i++) begin
      fb = msg[i] ^ rem[two_t-1];
      for (int j = two_t - 1; j >= 1; j--) rem[j] = rem[j-1] ^ gmul(fb, g[j]);
      rem[0] = gmul(fb, g[0]);
    end
    cw = new[n];
    for (int i = 0; i < k; i++) cw[i] = msg[i];
    for (int j = 0; j < two_t; j++) cw[k + j] = rem[two_t - 1 - j];
  endfunction

  // S_j = r(beta^(fcr+j)), r in transmission order
  function automatic int syndrome(int n, const ref int r[], int j);
    int s;
    s = 0;
    for (int i = 0; i < n; i++)
      s ^= gmul(r[i], beta_pow((fcr_g + j) * (n - 1 - i)));
    return s;
  endfunction

  // monic locator prod (1 - X_l x), X_l = beta^(degree of position)
  function automatic void locator(int n, const ref int pos[], ref int sig[]);
    int xl;
    sig = new[pos.size() + 1];
    foreach (sig[i]) sig[i] = 0;
    sig[0] = 1;
    foreach (pos[l]) begin
      xl = beta_pow(n - 1 - pos[l]);
      for (int i = pos.size(); i >= 1; i--) sig[i] = sig[i] ^ gmul(sig[i-1], xl);
    end
  endfunction

  // CCSDS pseudo-random sequence, bit i (starting from all ones)
  function automatic void prbs_bits(int nbits, ref bit seq[]);
    bit [7:0] x;  // x[7] = X8 ... x[0] = X1
    seq = new[nbits];
    x = 8'hFF;
    for (int i = 0; i < nbits; i++) begin
      seq[i] = x[0];
      x = {x[7] ^ x[5] ^ x[3] ^ x[0], x[7:1]};
    end
  endfunction
endpackage
