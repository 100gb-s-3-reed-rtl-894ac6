// rs_tb_pkg: reference arithmetic for the testbenches.
//
// GF(2^8) (field polynomial 0x11D) through exponent/logarithm tables, built by
// init(), and plain-loop reference models of RS(255,239) encoding, syndromes and
// polynomial evaluation. These are written independently of the RTL, which
// multiplies by shift-and-add.
package rs_tb_pkg;
  typedef logic [7:0] byte_t;
  typedef byte_t cw_t [255];          // cw[i] = coefficient of x^i

  byte_t exp_t [512];
  int    log_t [256];
  byte_t gpoly [17];

  function automatic byte_t mul(byte_t a, byte_t b);
    if (a == 0 || b == 0) return 8'h00;
    return exp_t[log_t[a] + log_t[b]];
  endfunction

  function automatic byte_t inv(byte_t a);
    if (a == 0) return 8'h00;
    return exp_t[255 - log_t[a]];
  endfunction

  function automatic byte_t apow(int e);
    e = e % 255;
    if (e < 0) e += 255;
    return exp_t[e];
  endfunction

  function automatic void init();
    int v = 1;
    for (int i = 0; i < 255; i++) begin
      exp_t[i]       = byte_t'(v);
      exp_t[i + 255] = byte_t'(v);
      log_t[v]       = i;
      v = v << 1;
      if ((v & 'h100) != 0) v ^= 'h11D;
    end
    exp_t[510] = exp_t[0];
    exp_t[511] = exp_t[1];
    log_t[0]   = 0;
    // g(x) = prod (x - a^i), i = 0..15
    for (int i = 0; i < 17; i++) gpoly[i] = (i == 0) ? 8'h01 : 8'h00;
    for (int i = 0; i < 16; i++)
      for (int j = 16; j >= 0; j--)
        gpoly[j] = ((j > 0) ? gpoly[j-1] : 8'h00) ^ mul(gpoly[j], apow(i));
  endfunction

  // systematic encoding: msg[i] = m_i (i = 0..238) -> codeword
  function automatic void encode(input byte_t msg [239], output cw_t cw);
    byte_t rem [16];
    byte_t fb;
    for (int i = 0; i < 16; i++) rem[i] = 0;
    for (int i = 238; i >= 0; i--) begin
      fb = msg[i] ^ rem[15];
      for (int j = 15; j > 0; j--) rem[j] = rem[j-1] ^ mul(fb, gpoly[j]);
      rem[0] = mul(fb, gpoly[0]);
    end
    for (int i = 0; i < 239; i++) cw[i + 16] = msg[i];
    for (int i = 0; i < 16; i++)  cw[i] = rem[i];
  endfunction

  // S_i = R(alpha^i) by Horner
  function automatic byte_t syndrome(cw_t r, int i);
    byte_t s = 0;
    for (int k = 254; k >= 0; k--) s = mul(s, apow(i)) ^ r[k];
    return s;
  endfunction

  function automatic byte_t rnd_byte();
    return byte_t'($urandom);
  endfunction

  // random message and codeword
  function automatic void random_codeword(output cw_t cw);
    byte_t msg [239];
    for (int i = 0; i < 239; i++) msg[i] = rnd_byte();
    encode(msg, cw);
  endfunction

  // add nerr errors at distinct random positions; returns the error pattern too
  function automatic void add_errors(inout cw_t cw, input int nerr, output cw_t err);
    int pos;
    for (int i = 0; i < 255; i++) err[i] = 0;
    for (int e = 0; e < nerr; e++) begin
      do pos = $urandom_range(254, 0); while (err[pos] != 0);
      do err[pos] = rnd_byte(); while (err[pos] == 0);
      cw[pos] ^= err[pos];
    end
  endfunction
endpackage
