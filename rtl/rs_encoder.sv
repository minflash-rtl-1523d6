// rs_encoder: systematic RS(255,243) encoder for the flash write path.
//
// Data bytes stream through unchanged while a 12-stage GF(2^8) division register accumulates
// the remainder of m(x)*x^12 by the generator polynomial. in_last marks the last data byte of
// a codeword (243 bytes, or fewer for the shortened last codeword of a page); after it the 12
// parity bytes are emitted, highest-degree first, and out_last marks the last parity byte.
// Both sides use valid/ready handshakes; data bytes pass combinationally (zero latency), and
// the input is held off while parity is being sent. Throughput is one byte per cycle plus 12
// parity cycles per codeword. The code is the document's RS(255,243); framing and handshakes
// are this design's choices.
module rs_encoder
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
  output logic       out_last
);
  localparam gen_t G = rs_gen_poly();

  gf_t  rem [NPAR];
  logic parity_phase;
  logic [3:0] par_cnt;

  wire  take = in_valid && in_ready;
  gf_t  fb;
  assign fb = in_data ^ rem[NPAR-1];

  always_comb begin
    if (parity_phase) begin
      in_ready  = 1'b0;
      out_valid = 1'b1;
      out_data  = rem[NPAR-1];
      out_last  = (par_cnt == 4'(NPAR - 1));
    end else begin
      in_ready  = out_ready;
      out_valid = in_valid;
      out_data  = in_data;
      out_last  = 1'b0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPAR; i++) rem[i] <= '0;
      parity_phase <= 1'b0;
      par_cnt      <= '0;
    end else if (parity_phase) begin
      if (out_ready) begin
        for (int i = NPAR - 1; i > 0; i--) rem[i] <= rem[i-1];
        rem[0] <= '0;
        par_cnt <= par_cnt + 1'b1;
        if (par_cnt == 4'(NPAR - 1)) begin
          parity_phase <= 1'b0;
          par_cnt      <= '0;
        end
      end
    end else if (take) begin
      for (int i = NPAR - 1; i > 0; i--) rem[i] <= rem[i-1] ^ gf_mul(fb, G[i]);
      rem[0] <= gf_mul(fb, G[0]);
      if (in_last) parity_phase <= 1'b1;
    end
  end

endmodule
