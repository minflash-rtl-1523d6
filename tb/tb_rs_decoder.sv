// tb_rs_decoder: checks the RS(255,243) decoder.
//
// Codewords are built with the long-division reference encoder, corrupted with 0..7 byte
// errors at random distinct positions (data or parity), and decoded. For up to 6 errors the
// output must equal the original message, out_err must be low and out_nerr must equal the
// error count; for 7 errors out_err must be set. The latency of a clean codeword (output
// starts within 2 cycles of the last input byte) is checked, and output stalls are exercised.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_rs_decoder;
  import rs_pkg::*;
  import rs_ref_pkg::*;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, in_last, out_valid, out_ready, out_last, out_err;
  logic [7:0] in_data, out_data;
  logic [2:0] out_nerr;
  int checks = 0, failures = 0;

  rs_decoder dut (.*);

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_cw(int len, int nerr);
    bq_t msg, par, cw, got;
    int  errpos [$];
    logic err_flag; int nflag;
    int  t_last_in, t_first_out, cyc;
    for (int i = 0; i < len; i++) msg.push_back(byte'($urandom));
    par = rs_parity(msg);
    cw = msg; foreach (par[i]) cw.push_back(par[i]);
    while (errpos.size() < nerr) begin
      int p = $urandom % cw.size();
      if (!(p inside {errpos})) errpos.push_back(p);
    end
    foreach (errpos[i]) cw[errpos[i]] ^= byte'(1 + ($urandom % 255));
    // feed
    cyc = 0;
    for (int i = 0; i < cw.size(); i++) begin
      in_valid <= 1; in_data <= cw[i]; in_last <= (i == cw.size() - 1);
      @(posedge clk); cyc++;
      while (!in_ready) begin @(posedge clk); cyc++; end
    end
    in_valid <= 0; in_last <= 0;
    t_last_in = cyc;
    t_first_out = -1;
    while (1) begin
      out_ready <= (nerr != 0) ? (($urandom % 4) != 0) : 1'b1;
      @(posedge clk); cyc++;
      if (out_valid && t_first_out < 0) t_first_out = cyc;
      if (out_valid && out_ready) begin
        got.push_back(out_data);
        if (out_last) begin err_flag = out_err; nflag = out_nerr; break; end
      end
    end
    out_ready <= 1;
    checks++;
    if (got.size() != len) begin failures++; $display("len %0d got %0d", len, got.size()); end
    if (nerr <= 6) begin
      checks++;
      if (got != msg) begin failures++; $display("data mismatch len=%0d nerr=%0d", len, nerr); end
      checks++;
      if (err_flag || nflag != nerr) begin
        failures++; $display("flags err=%0d nerr=%0d expected %0d", err_flag, nflag, nerr);
      end
    end else begin
      checks++;
      if (!err_flag) begin failures++; $display("7 errors not flagged"); end
    end
    if (nerr == 0) begin
      checks++;
      if (t_first_out - t_last_in > 2) begin
        failures++; $display("clean latency %0d", t_first_out - t_last_in);
      end
    end
  endtask

  initial begin
    in_valid = 0; in_last = 0; in_data = 0; out_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int e = 0; e <= 7; e++) begin
      run_cw(243, e);
      run_cw(173, e);
      run_cw(20, e % 7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
