// ccsds_pkg: constants and Galois-field helpers shared by the CCSDS
// transmit and receive chains.
//
// Symbols are held in 8-bit vectors; a field GF(2^m) with m <= 8 uses the
// low m bits. Element alpha is the polynomial x (value 2). gf_mul is a
// shift-and-add multiply reduced by the field polynomial, gf_pow raises an
// element to an integer power, pow_table lists constant powers
// for multiplier sets, gf_inv uses a^(2^m - 2). rs_gen_poly builds
// the generator polynomial g(x) = prod_{j=0}^{2t-1} (x - beta^(fcr+j)),
// beta = alpha^step, at elaboration time.
//
// The 32-bit attached sync marker 1ACFFC1D and the 29-of-32 correlator
// threshold follow the document; the field polynomial x^8+x^7+x^2+x+1, first
// root 112 and root step 11 are the CCSDS RS(255,223) conventional-basis
// code, which the document names but does not spell out.
package ccsds_pkg;

  localparam logic [31:0] ASM_WORD      = 32'h1ACF_FC1D;
  localparam int          ASM_BITS      = 32;
  localparam int          ASM_THRESHOLD = 29;

  // CCSDS RS(255,223) defaults
  localparam int          RS_M     = 8;
  localparam int          RS_N     = 255;
  localparam int          RS_K     = 223;
  localparam logic [8:0]  RS_POLY  = 9'h187;   // x^8+x^7+x^2+x+1
  localparam int          RS_FCR   = 112;
  localparam int          RS_STEP  = 11;
  localparam int          MAX_2T   = 32;

  typedef logic [7:0] sym_t;

  function automatic sym_t gf_mul(sym_t a, sym_t b, int m, logic [8:0] poly);
    logic [8:0] acc;
    logic [8:0] aa;
    acc = '0;
    aa  = {1'b0, a};
    for (int i = 0; i < 8; i++) begin
      if (i < m) begin
        if (b[i]) acc = acc ^ aa;
        aa = aa << 1;
        if (aa[m]) aa = aa ^ poly;
      end
    end
    return acc[7:0];
  endfunction

  // a^e by square-and-multiply over the bits of e mod (2^m - 1)
  function automatic sym_t gf_pow(sym_t a, int e, int m, logic [8:0] poly);
    sym_t r;
    sym_t sq;
    int   q;
    int   ee;
    q  = (1 << m) - 1;
    ee = e % q;
    if (ee < 0) ee = ee + q;
    r  = 8'd1;
    sq = a;
    for (int i = 0; i < 8; i++) begin
      if (ee[i]) r = gf_mul(r, sq, m, poly);
      sq = gf_mul(sq, sq, m, poly);
    end
    return r;
  endfunction

  // Table of (MAX_2T+1) powers: entry k = base^(start + k*stride), packed
  // 8 bits per entry at [8*k +: 8]. Used for constant multiplier sets.
  function automatic logic [8*(MAX_2T+1)-1:0] pow_table(sym_t base, int start, int stride,
                                                        int m, logic [8:0] poly);
    logic [8*(MAX_2T+1)-1:0] t;
    for (int k = 0; k <= MAX_2T; k++)
      t[8*k +: 8] = gf_pow(base, start + k * stride, m, poly);
    return t;
  endfunction

  // a^(2^m - 2) by repeated squaring: a^2 * a^4 * ... * a^(2^(m-1))
  function automatic sym_t gf_inv(sym_t a, int m, logic [8:0] poly);
    sym_t sq;
    sym_t r;
    r  = 8'd1;
    sq = a;
    for (int i = 1; i < 8; i++) begin
      if (i < m) begin
        sq = gf_mul(sq, sq, m, poly);
        r  = gf_mul(r, sq, m, poly);
      end
    end
    return r;
  endfunction

  // Generator coefficients g_0..g_{2t} packed 8 bits each, g_i at [8*i +: 8]
  function automatic logic [8*(MAX_2T+1)-1:0] rs_gen_poly(int two_t, int fcr, int step,
                                                          int m, logic [8:0] poly);
    logic [8*(MAX_2T+1)-1:0] g;
    sym_t beta;
    sym_t root;
    beta = gf_pow(8'd2, step, m, poly);
    g = '0;
    g[7:0] = 8'd1;
    for (int j = 0; j < MAX_2T; j++) begin
      if (j < two_t) begin
        root = gf_pow(beta, fcr + j, m, poly);
        // g(x) <- g(x) * (x + root)
        for (int i = MAX_2T; i >= 1; i--)
          g[8*i +: 8] = g[8*(i-1) +: 8] ^ gf_mul(g[8*i +: 8], root, m, poly);
        g[7:0] = gf_mul(g[7:0], root, m, poly);
      end
    end
    return g;
  endfunction

endpackage
