// tb_sync_fifo: checks the FIFO against a queue model with random pushes and pops, at a depth
// that is not a power of two. Checks order, data, occupancy count, full and empty flags.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_sync_fifo;
  localparam int W = 12, D = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic in_valid, in_ready, out_valid, out_ready;
  logic [W-1:0] in_data, out_data;
  logic [2:0] count;
  int checks = 0, failures = 0;
  logic [W-1:0] model [$];
  int pushes = 0, fulls = 0;

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4000; t++) begin
      @(negedge clk);
      in_valid  = ($urandom % 3) != 0;
      out_ready = (t % 1000 < 500) ? (($urandom % 3) == 0) : (($urandom % 3) != 0);
      in_data   = W'($urandom);
      #1;
      checks++;
      if (count != 3'(model.size()) || in_ready != (model.size() < D) ||
          out_valid != (model.size() > 0) || (model.size() > 0 && out_data != model[0])) begin
        failures++; $display("t=%0d count=%0d model=%0d", t, count, model.size());
      end
      if (!in_ready) fulls++;
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) begin model.push_back(in_data); pushes++; end
    end
    checks++;
    if (fulls == 0) begin failures++; $display("never full"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
