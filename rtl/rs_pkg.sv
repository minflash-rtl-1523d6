// rs_pkg: GF(2^8) arithmetic for the RS(255,243) code of the flash controller.
//
// The field is generated by x^8 + x^4 + x^3 + x^2 + 1 (0x11D) with primitive element
// alpha = 0x02. The generator polynomial has the 12 consecutive roots alpha^0 .. alpha^11, so
// the code corrects up to 6 byte errors per codeword. Field polynomial and root offset are this
// design's choices; the code parameters (255,243) are the prototype's.
package rs_pkg;

  localparam int unsigned NPAR = 12;
  localparam int unsigned T    = NPAR / 2;

  typedef logic [7:0] gf_t;

  function automatic gf_t gf_mul(gf_t a, gf_t b);
    gf_t p = '0;
    gf_t x = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) p ^= x;
      x = x[7] ? ((x << 1) ^ 8'h1D) : (x << 1);
    end
    return p;
  endfunction

  // alpha^e for e in 0..254 (e is reduced mod 255).
  function automatic gf_t gf_alpha_pow(int unsigned e);
    gf_t r = 8'h01;
    gf_t s = 8'h02;
    int unsigned k = e % 255;
    for (int i = 0; i < 8; i++) begin
      if (k[i]) r = gf_mul(r, s);
      s = gf_mul(s, s);
    end
    return r;
  endfunction

  // Multiplicative inverse: a^254 (returns 0 for 0).
  function automatic gf_t gf_inv(gf_t a);
    gf_t r = 8'h01;
    gf_t s = a;
    for (int i = 1; i < 8; i++) begin
      s = gf_mul(s, s);      // a^(2^i)
      r = gf_mul(r, s);
    end
    return r;
  endfunction

  // Generator polynomial g(x) = prod_{i=0}^{11} (x - alpha^i), coefficients g[0..11];
  // the leading coefficient g[12] is 1.
  typedef gf_t gen_t [NPAR];
  function automatic gen_t rs_gen_poly();
    gf_t g [NPAR+1];
    gen_t r;
    for (int i = 0; i <= NPAR; i++) g[i] = (i == 0) ? 8'h01 : 8'h00;
    for (int k = 0; k < NPAR; k++) begin
      gf_t root = gf_alpha_pow(k);
      for (int i = NPAR; i > 0; i--) g[i] = g[i-1] ^ gf_mul(g[i], root);
      g[0] = gf_mul(g[0], root);
    end
    for (int i = 0; i < NPAR; i++) r[i] = g[i];
    return r;
  endfunction

endpackage
