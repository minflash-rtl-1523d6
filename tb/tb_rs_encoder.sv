// tb_rs_encoder: checks the RS(255,243) encoder.
//
// Random messages of full (243) and shortened lengths are pushed through the encoder with
// random stalls on both sides. The testbench checks that data bytes pass unchanged and that
// the complete codeword evaluates to zero at each of the 12 generator roots alpha^0..alpha^11
// (computed here by direct polynomial evaluation, not by the encoder's division register).
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_rs_encoder;
  import rs_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last;
  logic [7:0] in_data, out_data;
  int checks = 0, failures = 0;

  rs_encoder dut (.*);

  byte unsigned msg [$];
  byte unsigned cw  [$];

  function automatic gf_t eval_at(byte unsigned c [$], gf_t x);
    gf_t acc = 0;
    foreach (c[i]) acc = gf_mul(acc, x) ^ gf_t'(c[i]);
    return acc;
  endfunction

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // collector
  always @(posedge clk) if (rst_n && out_valid && out_ready) cw.push_back(out_data);

  initial begin
    static int lens [4] = '{243, 10, 173, 1};
    in_valid = 0; in_last = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (lens[t]) begin
      msg.delete(); cw.delete();
      for (int i = 0; i < lens[t]; i++) msg.push_back(byte'($urandom));
      fork
        begin
          automatic int i = 0;
          while (i < lens[t]) begin
            in_valid <= ($urandom % 4) != 0;
            in_data  <= msg[i];
            in_last  <= (i == lens[t] - 1);
            @(posedge clk);
            if (in_valid && in_ready) i++;
          end
          in_valid <= 0; in_last <= 0;
        end
        begin
          while (cw.size() < lens[t] + 12) begin
            out_ready <= ($urandom % 3) != 0;
            @(posedge clk);
          end
          out_ready <= 1;
        end
      join
      checks++;
      if (cw.size() != lens[t] + 12) begin failures++; $display("length mismatch"); end
      for (int i = 0; i < lens[t]; i++) begin
        checks++;
        if (cw[i] != msg[i]) failures++;
      end
      for (int j = 0; j < 12; j++) begin
        checks++;
        if (eval_at(cw, gf_alpha_pow(j)) != 0) begin
          failures++;
          $display("syndrome %0d nonzero for length %0d", j, lens[t]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
