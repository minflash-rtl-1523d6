// tb_tag_table: checks controller-tag renaming.
//
// After initialisation all NTAG tags can be allocated, each exactly once, and allocation
// then stalls; each ctag's lookup returns the host tag and source stored with it; freed tags
// are handed out again in the order they were freed; free_count tracks the free tags.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_tag_table;
  import minflash_pkg::*;
  localparam int NTAG = 8;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic alloc_valid, alloc_ready, free_valid;
  logic [TAG_W-1:0] alloc_htag, alloc_ctag, free_ctag;
  logic [DEV_W-1:0] alloc_src;
  logic [TAG_W-1:0] look_ctag [3];
  logic [TAG_W-1:0] look_htag [3];
  logic [DEV_W-1:0] look_src [3];
  logic [3:0] free_count;
  int checks = 0, failures = 0;
  int htag_of [int], src_of [int];
  bit used [int];

  tag_table #(.NTAG(NTAG), .NLOOK(3)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic alloc(int h, int s, output int ct);
    @(negedge clk);
    alloc_valid = 1; alloc_htag = TAG_W'(h); alloc_src = DEV_W'(s);
    @(posedge clk); while (!alloc_ready) @(posedge clk);
    ct = alloc_ctag;
    @(negedge clk); alloc_valid = 0;
  endtask

  initial begin
    int ct; int order [$];
    alloc_valid = 0; free_valid = 0; alloc_htag = 0; alloc_src = 0; free_ctag = 0;
    foreach (look_ctag[i]) look_ctag[i] = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < NTAG; i++) begin
      alloc(100 + i, i % 3, ct);
      checks++;
      if (used.exists(ct)) begin failures++; $display("ctag %0d given twice", ct); end
      used[ct] = 1; htag_of[ct] = 100 + i; src_of[ct] = i % 3;
    end
    @(negedge clk);
    checks++; if (alloc_ready || free_count != 0) begin failures++; $display("not exhausted"); end
    for (int c = 0; c < NTAG; c++) begin
      look_ctag[c % 3] = TAG_W'(c); #1;
      checks++;
      if (look_htag[c % 3] != TAG_W'(htag_of[c]) || look_src[c % 3] != DEV_W'(src_of[c])) begin
        failures++; $display("lookup %0d wrong", c);
      end
    end
    // free 5, 2, 7 and reallocate: same order
    order = '{5, 2, 7};
    foreach (order[i]) begin
      @(negedge clk); free_valid = 1; free_ctag = TAG_W'(order[i]);
      @(negedge clk); free_valid = 0;
    end
    checks++; if (free_count != 3) begin failures++; $display("free_count %0d", free_count); end
    foreach (order[i]) begin
      alloc(50 + i, 1, ct);
      checks++; if (ct != order[i]) begin failures++; $display("realloc %0d got %0d", order[i], ct); end
      look_ctag[0] = TAG_W'(ct); #1;
      checks++; if (look_htag[0] != TAG_W'(50 + i)) begin failures++; $display("relookup"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
