// tb_rr_arbiter: checks the rotating-priority arbiter against a reference model.
//
// Random request patterns and random advance: the grant must be the first requester at or
// after the pointer, and the pointer must move past the granted requester only when the
// grant is taken. With all requesters active the grants must rotate 0,1,2,...
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_rr_arbiter;
  localparam int N = 5;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic [N-1:0] req, grant;
  logic advance;
  logic [2:0] grant_idx;
  int checks = 0, failures = 0;
  int ptr = 0;
  int prev = 0;

  rr_arbiter #(.N(N)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    req = '0; advance = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int exp;
      @(negedge clk);
      req = (t < 2000) ? N'($urandom) : '1;
      advance = (t < 2000) ? ($urandom % 2) : 1'b1;
      #1;
      exp = -1;
      for (int i = 0; i < N; i++) if (exp < 0 && req[(ptr + i) % N]) exp = (ptr + i) % N;
      checks++;
      if (exp < 0 ? (grant != 0) : (grant != (N'(1) << exp) || grant_idx != 3'(exp))) begin
        failures++; $display("t=%0d req=%b ptr=%0d grant=%b", t, req, ptr, grant);
      end
      if (t >= 2000) begin   // all requesting, always taken: strict rotation
        checks++;
        if (t > 2000 && exp != (prev + 1) % N) begin failures++; $display("no rotation"); end
        prev = exp;
      end
      @(posedge clk);
      if (advance && exp >= 0) ptr = (exp + 1) % N;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
