// tb_bus_controller: end-to-end test of one flash bus with four chip models.
//
// Erases, writes and reads pages on several chips at once and checks: read data equals the
// written data (with 2 injected byte errors per codeword, corrected by the ECC), a read with 7
// errors per codeword is acknowledged ST_UNCORR, an erase and a write of the bad block are
// acknowledged ST_BAD_BLOCK, every request gets exactly one ack, and the four reads issued
// together overlap on the chips (finish in well under four times one read's time).
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_bus_controller;
  import minflash_pkg::*;
  localparam int NCHIP = 4, PAGE = 300, STORED = stored_bytes(PAGE);
  localparam int TR = 3000;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic req_valid, req_ready, wreq_valid, wreq_ready, wdata_valid, wdata_ready;
  logic rdata_valid, rdata_ready, ack_valid, ack_ready;
  flash_req_t req;
  logic [TAG_W-1:0] wreq_tag;
  logic [7:0] wdata;
  rdata_t rdata;
  ack_t ack;
  nand_out_t nand_o;
  logic [7:0] nand_dq_i;
  logic [7:0] chip_dq [NCHIP];
  int err_per_cw = 0;
  int checks = 0, failures = 0;

  bus_controller #(.NCHIP(NCHIP), .PAGE_BYTES(PAGE), .POLL_INTERVAL(16)) dut (.*);

  for (genvar c = 0; c < NCHIP; c++) begin : g_chip
    nand_chip_model #(.STORED(STORED), .T_R(TR), .T_PROG(600), .T_BERS(800), .BAD_BLOCK(7)) u_chip (
      .clk, .ce_n(nand_o.ce_n[c]), .cle(nand_o.cle), .ale(nand_o.ale), .we_n(nand_o.we_n),
      .re_n(nand_o.re_n), .dq_in(nand_o.dq_o), .dq_out(chip_dq[c]), .err_per_cw(err_per_cw));
  end
  always_comb begin
    nand_dq_i = 8'h00;
    for (int c = 0; c < NCHIP; c++) if (!nand_o.ce_n[c]) nand_dq_i = chip_dq[c];
  end

  byte unsigned wbuf [int][$];
  byte unsigned rbuf [int][$];
  int           acks [int];
  ack_status_e  ast  [int];

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // host write-data server
  initial begin
    wreq_ready = 0; wdata_valid = 0; wdata = 0;
    forever begin
      @(negedge clk);
      if (rst_n && wreq_valid) begin
        automatic int t = wreq_tag;
        wreq_ready = 1; @(negedge clk); wreq_ready = 0;
        foreach (wbuf[t][i]) begin
          wdata_valid = 1; wdata = wbuf[t][i];
          @(posedge clk); while (!wdata_ready) @(posedge clk);
          @(negedge clk);
        end
        wdata_valid = 0;
      end
    end
  end

  // collectors
  always @(posedge clk) begin
    rdata_ready <= ($urandom % 8) != 0;
    if (rst_n && rdata_valid && rdata_ready) rbuf[int'(rdata.tag)].push_back(rdata.data);
    if (rst_n && ack_valid && ack_ready) begin
      acks[int'(ack.tag)] = acks.exists(int'(ack.tag)) ? acks[int'(ack.tag)] + 1 : 1;
      ast[int'(ack.tag)]  = ack.status;
    end
  end
  assign ack_ready = 1'b1;

  task automatic send(flash_op_e op, int tag, int chip, int blk, int pg);
    @(negedge clk);
    req = '0; req.op = op; req.tag = TAG_W'(tag); req.chip = CHIP_W'(chip);
    req.block = BLOCK_W'(blk); req.page = PAGE_W'(pg);
    req_valid = 1;
    @(posedge clk); while (!req_ready) @(posedge clk);
    @(negedge clk); req_valid = 0;
  endtask

  task automatic wait_ack(int tag);
    while (!acks.exists(tag)) @(posedge clk);
  endtask

  task automatic expect_ack(int tag, ack_status_e st);
    wait_ack(tag);
    checks++;
    if (acks[tag] != 1 || ast[tag] != st) begin
      failures++; $display("tag %0d: acks=%0d status=%0d expected %0d", tag, acks[tag], ast[tag], st);
    end
  endtask

  initial begin
    int t0, t1;
    req_valid = 0; req = '0;
    repeat (4) @(posedge clk);
    rst_n = 1;
    // erase block 1 on all chips
    for (int c = 0; c < NCHIP; c++) send(OP_ERASE, c, c, 1, 0);
    for (int c = 0; c < NCHIP; c++) expect_ack(c, ST_OK);
    // write page 0 of block 1 on all chips
    for (int c = 0; c < NCHIP; c++) begin
      for (int i = 0; i < PAGE; i++) wbuf[10 + c].push_back(byte'($urandom));
      send(OP_WRITE, 10 + c, c, 1, 0);
    end
    for (int c = 0; c < NCHIP; c++) expect_ack(10 + c, ST_OK);
    // single read for reference time
    @(negedge clk); t0 = $time;
    send(OP_READ, 20, 0, 1, 0);
    expect_ack(20, ST_OK);
    t1 = $time - t0;
    checks++; if (rbuf[20] != wbuf[10]) begin failures++; $display("read 20 mismatch"); end
    // four parallel reads
    @(negedge clk); t0 = $time;
    for (int c = 0; c < NCHIP; c++) send(OP_READ, 30 + c, c, 1, 0);
    for (int c = 0; c < NCHIP; c++) expect_ack(30 + c, ST_OK);
    checks++;
    if (($time - t0) > 3 * t1) begin failures++; $display("no chip parallelism: %0d vs %0d", $time - t0, t1); end
    for (int c = 0; c < NCHIP; c++) begin
      checks++;
      if (rbuf[30 + c] != wbuf[10 + c]) begin failures++; $display("read %0d mismatch", 30 + c); end
    end
    // corrected read: 2 byte errors per codeword
    err_per_cw = 2;
    send(OP_READ, 35, 1, 1, 0);
    expect_ack(35, ST_OK);
    checks++; if (rbuf[35] != wbuf[11]) begin failures++; $display("corrected read mismatch"); end
    // uncorrectable read
    err_per_cw = 7;
    send(OP_READ, 40, 2, 1, 0);
    expect_ack(40, ST_UNCORR);
    checks++; if (rbuf[40].size() != PAGE) begin failures++; $display("uncorr read length"); end
    err_per_cw = 0;
    // bad block
    send(OP_ERASE, 50, 3, 7, 0);
    expect_ack(50, ST_BAD_BLOCK);
    for (int i = 0; i < PAGE; i++) wbuf[51].push_back(byte'(i));
    send(OP_WRITE, 51, 1, 7, 0);
    expect_ack(51, ST_BAD_BLOCK);
    repeat (50) @(posedge clk);
    checks++; if (acks.size() != 17) begin failures++; $display("ack count %0d", acks.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
