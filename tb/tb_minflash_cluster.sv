// tb_minflash_cluster: end-to-end test of a 4-device minFlash array at reduced size
// (2 buses x 2 chips per device, 300-byte pages, short chip times).
//
// Four hosts, one per device, erase, write and read pages on their own device and on remote
// devices 1, 2 and 3 hops away. Checked: read data equals what was written (including pages
// written by another host), every request gets exactly one ack with the expected status, and
// the read latency grows by only a few cycles per hop. Mechanisms counted, each must occur:
// local access, remote access, remote write-data fetch, tag collision (two hosts using the
// same host tag on one device at once), ECC correction, uncorrectable read, bad block, status
// polls that found a chip busy, and chip-level parallelism on a bus.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_minflash_cluster;
  import minflash_pkg::*;
  localparam int NDEV = 4, NBUS = 2, NCHIP = 2, PAGE = 300, STORED = stored_bytes(PAGE);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [NDEV-1:0] h_req_valid, h_req_ready, h_rdata_valid, h_rdata_ready, h_ack_valid, h_ack_ready;
  logic [NDEV-1:0] h_wreq_valid, h_wreq_ready, h_wdata_valid, h_wdata_ready;
  flash_req_t h_req [NDEV];
  rdata_t h_rdata [NDEV];
  ack_t h_ack [NDEV];
  logic [TAG_W-1:0] h_wreq_tag [NDEV];
  wdata_t h_wdata [NDEV];
  nand_out_t nand_o [NDEV][NBUS];
  logic [7:0] nand_dq_i [NDEV][NBUS];
  int err_per_cw = 0;
  int checks = 0, failures = 0;

  minflash_cluster #(.NDEV(NDEV), .NBUS(NBUS), .NCHIP(NCHIP), .PAGE_BYTES(PAGE),
                     .POLL_INTERVAL(32), .NTAG(16), .LOCQ_DEPTH(8), .REMQ_DEPTH(8)) dut (.*);

  int polls_busy = 0, cmd_while_busy = 0;
  for (genvar d = 0; d < NDEV; d++) begin : g_d
    host_bfm u_host (
      .clk, .rst_n,
      .req_valid(h_req_valid[d]), .req_ready(h_req_ready[d]), .req(h_req[d]),
      .rdata_valid(h_rdata_valid[d]), .rdata_ready(h_rdata_ready[d]), .rdata(h_rdata[d]),
      .ack_valid(h_ack_valid[d]), .ack_ready(h_ack_ready[d]), .ack(h_ack[d]),
      .wreq_valid(h_wreq_valid[d]), .wreq_ready(h_wreq_ready[d]), .wreq_tag(h_wreq_tag[d]),
      .wdata_valid(h_wdata_valid[d]), .wdata_ready(h_wdata_ready[d]), .wdata(h_wdata[d])
    );
    for (genvar b = 0; b < NBUS; b++) begin : g_b
      logic [7:0] dq [NCHIP];
      for (genvar c = 0; c < NCHIP; c++) begin : g_c
        nand_chip_model #(.STORED(STORED), .T_R(600), .T_PROG(1500), .T_BERS(2000), .BAD_BLOCK(9)) u_chip (
          .clk, .ce_n(nand_o[d][b].ce_n[c]), .cle(nand_o[d][b].cle), .ale(nand_o[d][b].ale),
          .we_n(nand_o[d][b].we_n), .re_n(nand_o[d][b].re_n), .dq_in(nand_o[d][b].dq_o),
          .dq_out(dq[c]), .err_per_cw(err_per_cw));
        // bus monitor: a command to another chip of the bus while this one is busy, and a
        // status read of this chip that finds it busy
        always @(posedge clk) begin
          if (nand_o[d][b].cle && !nand_o[d][b].we_n && nand_o[d][b].ce_n[c] &&
              nand_o[d][b].dq_o inside {8'h30, 8'h10, 8'hD0} && u_chip.busy > 0)
            cmd_while_busy++;
          if (!nand_o[d][b].re_n && !nand_o[d][b].ce_n[c] && u_chip.status_mode && u_chip.busy > 0)
            polls_busy++;
        end
      end
      always_comb begin
        nand_dq_i[d][b] = 8'h00;
        for (int c = 0; c < NCHIP; c++) if (!nand_o[d][b].ce_n[c]) nand_dq_i[d][b] = dq[c];
      end
    end
  end

  // progress watchdog: the test ends as failed if no host sees an ack for 30000 cycles
  int idle = 0;
  always @(posedge clk) begin
    if (|(h_ack_valid & h_ack_ready)) idle <= 0;
    else idle <= idle + 1;
    if (idle > 30000) begin
      $display("no ack for 30000 cycles");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
      $finish;
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_local = 0, n_remote = 0, n_remote_write = 0, n_collision = 0, n_corrected = 0;
  int n_uncorr = 0, n_badblock = 0;

  task automatic expect_ack(int h, int tag, ack_status_e st);
    case (h)
      0: g_d[0].u_host.wait_ack(tag);
      1: g_d[1].u_host.wait_ack(tag);
      2: g_d[2].u_host.wait_ack(tag);
      default: g_d[3].u_host.wait_ack(tag);
    endcase
    checks++;
    begin
      int n; ack_status_e s;
      case (h)
        0: begin n = g_d[0].u_host.acks[tag]; s = g_d[0].u_host.ast[tag]; end
        1: begin n = g_d[1].u_host.acks[tag]; s = g_d[1].u_host.ast[tag]; end
        2: begin n = g_d[2].u_host.acks[tag]; s = g_d[2].u_host.ast[tag]; end
        default: begin n = g_d[3].u_host.acks[tag]; s = g_d[3].u_host.ast[tag]; end
      endcase
      if (n != 1 || s != st) begin
        failures++; $display("host %0d tag %0d: acks=%0d status=%0d expected %0d", h, tag, n, s, st);
      end
    end
  endtask

  // compares host h's read buffer of tag with host w's write buffer of wtag
  task automatic check_data(int h, int tag, int w, int wtag);
    byte unsigned got [$], exp [$];
    case (h)
      0: got = g_d[0].u_host.rbuf[tag];
      1: got = g_d[1].u_host.rbuf[tag];
      2: got = g_d[2].u_host.rbuf[tag];
      default: got = g_d[3].u_host.rbuf[tag];
    endcase
    case (w)
      0: exp = g_d[0].u_host.wbuf[wtag];
      1: exp = g_d[1].u_host.wbuf[wtag];
      2: exp = g_d[2].u_host.wbuf[wtag];
      default: exp = g_d[3].u_host.wbuf[wtag];
    endcase
    checks++;
    if (got != exp) begin
      failures++; $display("host %0d tag %0d: data mismatch (%0d bytes)", h, tag, got.size());
    end
  endtask

  initial begin
    int lat [4];
    h_wreq_ready = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);   // tag tables initialise

    // host 0 erases block 1 on chip (0,0) of every device
    for (int d = 0; d < NDEV; d++) g_d[0].u_host.send(OP_ERASE, d, d, 0, 0, 1, 0);
    for (int d = 0; d < NDEV; d++) begin
      expect_ack(0, d, ST_OK);
      if (d == 0) n_local++; else n_remote++;
    end
    // host 0 erases block 3 on all chips of its own device at once (chips work in parallel)
    for (int b = 0; b < NBUS; b++)
      for (int c = 0; c < NCHIP; c++) g_d[0].u_host.send(OP_ERASE, 40 + 2 * b + c, 0, b, c, 3, 0);
    for (int i = 0; i < NBUS * NCHIP; i++) expect_ack(0, 40 + i, ST_OK);
    // host 0 writes page 0 of block 1 on every device (remote devices fetch its data)
    for (int d = 0; d < NDEV; d++) begin
      g_d[0].u_host.fill(10 + d, PAGE, d + 1);
      g_d[0].u_host.send(OP_WRITE, 10 + d, d, 0, 0, 1, 0);
    end
    for (int d = 0; d < NDEV; d++) begin
      expect_ack(0, 10 + d, ST_OK);
      if (d != 0) n_remote_write++;
    end
    // host 0 reads back each page alone: latency per hop count
    for (int d = 0; d < NDEV; d++) begin
      g_d[0].u_host.send(OP_READ, 20 + d, d, 0, 0, 1, 0);
      expect_ack(0, 20 + d, ST_OK);
      check_data(0, 20 + d, 0, 10 + d);
      lat[d] = g_d[0].u_host.t_ack[20 + d] - g_d[0].u_host.t_sent[20 + d];
      $display("read latency, %0d hops: %0d cycles", d, lat[d]);
    end
    for (int d = 1; d < NDEV; d++) begin
      checks++;
      if (lat[d] - lat[0] > 40 * d) begin failures++; $display("hop latency too large"); end
    end
    // tag collision: hosts 1, 2 and 3 read device 1's page with the same host tag 5 at once
    fork
      g_d[1].u_host.send(OP_READ, 5, 1, 0, 0, 1, 0);
      g_d[2].u_host.send(OP_READ, 5, 1, 0, 0, 1, 0);
      g_d[3].u_host.send(OP_READ, 5, 1, 0, 0, 1, 0);
    join
    for (int h = 1; h < 4; h++) begin
      expect_ack(h, 5, ST_OK);
      check_data(h, 5, 0, 11);
    end
    n_collision++;
    // host 3 writes on device 2 (chip (1,1)) and host 1 reads it, with 3 byte errors/codeword
    g_d[3].u_host.send(OP_ERASE, 30, 2, 1, 1, 2, 0);
    expect_ack(3, 30, ST_OK);
    g_d[3].u_host.fill(31, PAGE, 77);
    g_d[3].u_host.send(OP_WRITE, 31, 2, 1, 1, 2, 0);
    expect_ack(3, 31, ST_OK);
    err_per_cw = 3;
    g_d[1].u_host.send(OP_READ, 32, 2, 1, 1, 2, 0);
    expect_ack(1, 32, ST_OK);
    check_data(1, 32, 3, 31);
    n_corrected++;
    // uncorrectable: 7 byte errors per codeword
    err_per_cw = 7;
    g_d[2].u_host.send(OP_READ, 33, 3, 0, 0, 1, 0);
    expect_ack(2, 33, ST_UNCORR);
    n_uncorr++;
    err_per_cw = 0;
    // bad block, erased from a remote host
    g_d[2].u_host.send(OP_ERASE, 34, 0, 1, 0, 9, 0);
    expect_ack(2, 34, ST_BAD_BLOCK);
    n_badblock++;

    repeat (100) @(posedge clk);
    checks++; if (n_local == 0) begin failures++; $display("no local access"); end
    checks++; if (n_remote == 0) begin failures++; $display("no remote access"); end
    checks++; if (n_remote_write == 0) begin failures++; $display("no remote write"); end
    checks++; if (n_collision == 0) begin failures++; $display("no tag collision"); end
    checks++; if (n_corrected == 0) begin failures++; $display("no correction"); end
    checks++; if (n_uncorr == 0) begin failures++; $display("no uncorrectable read"); end
    checks++; if (n_badblock == 0) begin failures++; $display("no bad block"); end
    checks++; if (polls_busy == 0) begin failures++; $display("no busy status poll"); end
    checks++; if (cmd_while_busy == 0) begin failures++; $display("no chip parallelism"); end
    $display("mechanisms: local=%0d remote=%0d remote_write=%0d collision=%0d corrected=%0d uncorr=%0d bad_block=%0d polls_busy=%0d cmd_while_busy=%0d",
             n_local, n_remote, n_remote_write, n_collision, n_corrected, n_uncorr, n_badblock,
             polls_busy, cmd_while_busy);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
