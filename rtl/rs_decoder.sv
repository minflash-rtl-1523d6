// rs_decoder: RS(255,243) decoder for the flash read path, correcting up to 6 byte errors.
//
// A codeword (data bytes then 12 parity bytes, in_last on the final parity byte; shortened
// codewords are accepted) is written into a 255-byte buffer while the 12 syndromes are
// accumulated by Horner's rule. If all syndromes are zero the data bytes are sent out at once.
// Otherwise the error locator is found by Berlekamp-Massey (one iteration per cycle, 12
// cycles), the evaluator Omega = S*Lambda mod x^12 is formed (1 cycle), and a Chien search
// visits every byte position (one per cycle) and corrects each root it finds with Forney's
// formula. If the number of roots differs from the locator degree the codeword is flagged
// uncorrectable (out_err with out_last). Latency therefore varies with the error count, as the
// document notes for its Reed-Solomon decoder: n cycles in, plus 13+n cycles only when the
// codeword has errors, then k cycles out. Only the data bytes are output; out_last marks the
// last of them. One codeword is processed at a time (input held off until output is done).
// The code is the document's; the algorithm and its schedule are this design's.
module rs_decoder
  import rs_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  output logic       in_ready,
  input  logic [7:0] in_data,
  input  logic       in_last,
  output logic       out_valid,
  input  logic       out_ready,
  output logic [7:0] out_data,
  output logic       out_last,
  output logic       out_err,       // with out_last: codeword was uncorrectable
  output logic [2:0] out_nerr       // with out_last: number of corrected bytes
);
  typedef enum logic [2:0] {D_IN, D_BM, D_OMEGA, D_CHIEN, D_OUT} dstate_e;
  dstate_e state;

  gf_t        buffer [256];
  logic [7:0] n_len;            // codeword length, bytes
  logic [7:0] pos;              // byte counter in the current phase
  gf_t        syn   [NPAR];
  gf_t        lam   [NPAR+1];   // error locator Lambda
  gf_t        bpoly [NPAR+1];   // Berlekamp-Massey correction polynomial B
  gf_t        omega [NPAR];
  gf_t        bm_b;
  logic [3:0] bm_l;
  logic [3:0] bm_m;
  logic [3:0] bm_r;
  gf_t        xinv;             // alpha^{-(n-1-pos)} during the Chien search
  logic [3:0] roots;
  logic       uncorr;

  assign in_ready  = (state == D_IN);
  assign out_valid = (state == D_OUT);
  assign out_data  = buffer[pos];
  assign out_last  = (state == D_OUT) && (pos == n_len - 8'(NPAR) - 8'd1);
  assign out_err   = uncorr;
  assign out_nerr  = uncorr ? 3'd0 : roots[2:0];

  // ---- Berlekamp-Massey step, combinational ----
  gf_t  delta;
  gf_t  lam_next [NPAR+1];
  gf_t  coef;
  always_comb begin
    delta = '0;
    for (int i = 0; i <= NPAR; i++)
      if (i <= int'(bm_r)) delta ^= gf_mul(lam[i], syn[int'(bm_r) - i]);
    coef = gf_mul(delta, gf_inv(bm_b));
    for (int i = 0; i <= NPAR; i++) begin
      lam_next[i] = lam[i];
      if (i >= int'(bm_m)) lam_next[i] = lam[i] ^ gf_mul(coef, bpoly[i - int'(bm_m)]);
    end
  end

  // ---- Chien search and Forney evaluation at xinv, combinational ----
  gf_t lam_val, omega_val, dlam_val, xpow, err_mag;
  always_comb begin
    lam_val   = '0;
    omega_val = '0;
    dlam_val  = '0;
    xpow      = 8'h01;
    for (int i = 0; i <= NPAR; i++) begin
      lam_val ^= gf_mul(lam[i], xpow);
      if (i < NPAR) omega_val ^= gf_mul(omega[i], xpow);
      // formal derivative: odd terms lam[i] x^(i-1); xpow here is x^i, so use lam[i+1]
      if (i < NPAR && (i % 2) == 0) dlam_val ^= gf_mul(lam[i+1], xpow);
      xpow = gf_mul(xpow, xinv);
    end
    // e = X * Omega(X^-1) / Lambda'(X^-1), with X = 1/xinv
    err_mag = gf_mul(gf_mul(gf_inv(xinv), omega_val), gf_inv(dlam_val));
  end

  // ---- Omega(x) = S(x) * Lambda(x) mod x^12 ----
  gf_t omega_next [NPAR];
  always_comb begin
    for (int k = 0; k < NPAR; k++) begin
      omega_next[k] = '0;
      for (int i = 0; i <= k; i++) omega_next[k] ^= gf_mul(syn[k - i], lam[i]);
    end
  end

  logic syn_zero;
  always_comb begin
    syn_zero = 1'b1;
    for (int j = 0; j < NPAR; j++) if (syn[j] != '0) syn_zero = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (state == D_IN && in_valid) buffer[pos] <= in_data;
    else if (state == D_CHIEN && lam_val == '0) buffer[pos] <= buffer[pos] ^ err_mag;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= D_IN;
      pos    <= '0;
      n_len  <= '0;
      for (int j = 0; j < NPAR; j++) syn[j] <= '0;
      for (int i = 0; i <= NPAR; i++) begin
        lam[i]   <= '0;
        bpoly[i] <= '0;
      end
      for (int i = 0; i < NPAR; i++) omega[i] <= '0;
      bm_b   <= 8'h01;
      bm_l   <= '0;
      bm_m   <= 4'd1;
      bm_r   <= '0;
      xinv   <= 8'h01;
      roots  <= '0;
      uncorr <= 1'b0;
    end else begin
      unique case (state)
        D_IN: if (in_valid) begin
          for (int j = 0; j < NPAR; j++)
            syn[j] <= gf_mul(syn[j], gf_alpha_pow(j)) ^ in_data;
          pos <= pos + 1'b1;
          if (in_last) begin
            n_len <= pos + 1'b1;
            pos   <= '0;
            state <= D_BM;
            roots <= '0;
            uncorr <= 1'b0;
            for (int i = 0; i <= NPAR; i++) begin
              lam[i]   <= (i == 0) ? 8'h01 : 8'h00;
              bpoly[i] <= (i == 0) ? 8'h01 : 8'h00;
            end
            bm_b <= 8'h01;
            bm_l <= '0;
            bm_m <= 4'd1;
            bm_r <= '0;
          end
        end
        D_BM: begin
          if (syn_zero) begin
            state <= D_OUT;
          end else begin
            if (delta != '0) begin
              for (int i = 0; i <= NPAR; i++) lam[i] <= lam_next[i];
              if (2 * int'(bm_l) <= int'(bm_r)) begin
                for (int i = 0; i <= NPAR; i++) bpoly[i] <= lam[i];
                bm_l <= bm_r + 4'd1 - bm_l;
                bm_b <= delta;
                bm_m <= 4'd1;
              end else begin
                bm_m <= bm_m + 4'd1;
              end
            end else begin
              bm_m <= bm_m + 4'd1;
            end
            bm_r <= bm_r + 4'd1;
            if (bm_r == 4'(NPAR - 1)) state <= D_OMEGA;
          end
        end
        D_OMEGA: begin
          for (int k = 0; k < NPAR; k++) omega[k] <= omega_next[k];
          // first position holds degree n-1: xinv = alpha^{-(n-1)} = alpha^{255-(n-1)}
          xinv  <= gf_alpha_pow(256 - int'(n_len));
          pos   <= '0;
          state <= D_CHIEN;
        end
        D_CHIEN: begin
          if (lam_val == '0) roots <= roots + 1'b1;
          xinv <= gf_mul(xinv, 8'h02);
          pos  <= pos + 1'b1;
          if (pos == n_len - 8'd1) begin
            pos   <= '0;
            state <= D_OUT;
            if ((roots + ((lam_val == '0) ? 4'd1 : 4'd0)) != bm_l || bm_l > 4'(T))
              uncorr <= 1'b1;
          end
        end
        D_OUT: if (out_ready) begin
          pos <= pos + 1'b1;
          if (out_last) begin
            pos   <= '0;
            state <= D_IN;
            for (int j = 0; j < NPAR; j++) syn[j] <= '0;
          end
        end
        default: state <= D_IN;
      endcase
    end
  end

endmodule
