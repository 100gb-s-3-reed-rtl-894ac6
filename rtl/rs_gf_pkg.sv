// rs_gf_pkg: shared types, code constants and GF(2^8) arithmetic for the
// three-parallel RS(255,239) FEC.
//
// The code is RS(255,239) with t = 8 and generator g(x) = (x - a^0)...(x - a^15),
// as the published architecture specifies. The field polynomial x^8+x^4+x^3+x^2+1 (0x11D) is the one
// of the ITU-T G.709 RS(255,239) code; the design takes it from that standard.
// All functions are pure combinational helpers: called with constant arguments
// they fold to constants (multiplier coefficients, ROM contents), called with
// variable arguments they describe XOR networks.
package rs_gf_pkg;

  typedef logic [7:0] gf_t;          // one GF(2^8) symbol
  typedef gf_t [2:0]  sym3_t;        // three symbols per clock: [2]=lane A (highest degree), [1]=B, [0]=C

  localparam int unsigned RS_N     = 255;  // codeword symbols
  localparam int unsigned RS_K     = 239;  // message symbols
  localparam int unsigned RS_T     = 8;    // correctable symbol errors
  localparam int unsigned RS_2T    = 16;   // parity symbols / syndromes
  localparam int unsigned RS_CYC   = 85;   // clocks per codeword at three symbols per clock
  localparam int unsigned ENC_CYC  = 80;   // clocks per message at three symbols per clock (one pad symbol)
  localparam logic [7:0]  GF_PRIM  = 8'h1D; // low byte of x^8+x^4+x^3+x^2+1

  // a * b in GF(2^8), shift-and-add
  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t p  = '0;
    gf_t aa = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= aa;
      aa = {aa[6:0], 1'b0} ^ (aa[7] ? GF_PRIM : 8'h00);
    end
    return p;
  endfunction

  // alpha^e, alpha = 0x02
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t p = 8'h01;
    for (int unsigned i = 0; i < (e % 255); i++)
      p = gf_mul(p, 8'h02);
    return p;
  endfunction

  // multiplicative inverse table: inv[alpha^e] = alpha^(255-e), inv[0] = 0
  typedef gf_t inv_table_t [256];
  function automatic inv_table_t gf_inv_table();
    inv_table_t tab;
    gf_t        pe = 8'h01;   // alpha^e
    gf_t        pn = 8'h01;   // alpha^(-e)
    gf_t        ainv;
    ainv = gf_alpha_pow(254);
    tab[0] = 8'h00;
    for (int e = 0; e < 255; e++) begin
      tab[pe] = pn;
      pe = gf_mul(pe, 8'h02);
      pn = gf_mul(pn, ainv);
    end
    return tab;
  endfunction

  // x^n mod g(x) for g(x) = prod_{i=0}^{15} (x - alpha^i); returns the 16 coefficients
  typedef gf_t poly16_t [16];
  function automatic poly16_t gf_xn_mod_g(int unsigned n);
    gf_t     g [17];
    poly16_t r;
    gf_t     top;
    // build g(x), g[16] = 1
    for (int i = 0; i < 17; i++) g[i] = (i == 0) ? 8'h01 : 8'h00;
    for (int i = 0; i < 16; i++) begin
      gf_t root = gf_alpha_pow(i);
      for (int j = 16; j > 0; j--) g[j] = g[j-1] ^ gf_mul(g[j], root);
      g[0] = gf_mul(g[0], root);
    end
    // r = x^n mod g by repeated multiplication by x
    for (int i = 0; i < 16; i++) r[i] = (i == 0) ? 8'h01 : 8'h00;
    for (int unsigned s = 0; s < n; s++) begin
      top = r[15];
      for (int j = 15; j > 0; j--) r[j] = r[j-1] ^ gf_mul(top, g[j]);
      r[0] = gf_mul(top, g[0]);
    end
    return r;
  endfunction

endpackage
