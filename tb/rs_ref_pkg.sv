// rs_ref_pkg: reference RS(255,243) encoding for testbenches, by plain polynomial long
// division of m(x)*x^12 by the generator polynomial (independent of the encoder's register).
//
// The code RS(255,243) is the document's; field and generator are this design's choices.
package rs_ref_pkg;
  import rs_pkg::*;
  typedef byte unsigned bq_t [$];

  // Returns the 12 parity bytes of msg, highest degree first.
  function automatic bq_t rs_parity(bq_t msg);
    gf_t g [NPAR+1];
    gf_t r [$];
    bq_t p;
    gen_t gl = rs_gen_poly();
    for (int i = 0; i < NPAR; i++) g[i] = gl[i];
    g[NPAR] = 8'h01;
    foreach (msg[i]) r.push_back(gf_t'(msg[i]));
    for (int i = 0; i < NPAR; i++) r.push_back(8'h00);
    // r[0] is the highest degree coefficient; g in descending order is g[NPAR..0]
    for (int i = 0; i < msg.size(); i++) begin
      gf_t c = r[i];
      if (c != 0)
        for (int k = 0; k <= NPAR; k++) r[i + k] = r[i + k] ^ gf_mul(c, g[NPAR - k]);
    end
    for (int i = 0; i < NPAR; i++) p.push_back(byte'(r[msg.size() + i]));
    return p;
  endfunction
endpackage
