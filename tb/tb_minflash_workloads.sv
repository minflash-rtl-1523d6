// tb_minflash_workloads: scaled-down versions of the array's bandwidth measurements, on a
// 2-device array with 4 buses x 2 chips per device and 300-byte pages.
//
//  * Bandwidth against transfer size: host 0 reads transfers of 1, 2, 4 and 8 pages from its
//    own device, striped over buses first and then chips, all pages of a transfer in flight
//    together. The achieved bytes per cycle must grow with the transfer size (bus and chip
//    parallelism) and the data must be correct.
//  * Several hosts on one device: hosts 0 and 1 each read 8 pages of device 0 at the same
//    time. Both must get all their data, and neither may finish much later than the other
//    (the rotating-priority arbiters share the device fairly).
//  * One host on several devices: host 0 reads 8 pages from device 0 and 8 from device 1
//    together; the aggregate rate must exceed that of 8 pages from one device.
// Rates are printed in bytes per cycle; at one bus byte per cycle, 1.0 is one bus's rate.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_minflash_workloads;
  import minflash_pkg::*;
  localparam int NDEV = 2, NBUS = 4, NCHIP = 2, PAGE = 300, STORED = stored_bytes(PAGE);
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
  int checks = 0, failures = 0;

  minflash_cluster #(.NDEV(NDEV), .NBUS(NBUS), .NCHIP(NCHIP), .PAGE_BYTES(PAGE),
                     .POLL_INTERVAL(32), .NTAG(32), .LOCQ_DEPTH(16), .REMQ_DEPTH(16)) dut (.*);

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
        nand_chip_model #(.STORED(STORED), .T_R(500), .T_PROG(800), .T_BERS(800)) u_chip (
          .clk, .ce_n(nand_o[d][b].ce_n[c]), .cle(nand_o[d][b].cle), .ale(nand_o[d][b].ale),
          .we_n(nand_o[d][b].we_n), .re_n(nand_o[d][b].re_n), .dq_in(nand_o[d][b].dq_o),
          .dq_out(dq[c]), .err_per_cw(0));
      end
      always_comb begin
        nand_dq_i[d][b] = 8'h00;
        for (int c = 0; c < NCHIP; c++) if (!nand_o[d][b].ce_n[c]) nand_dq_i[d][b] = dq[c];
      end
    end
  end

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc++;

  // page i of a striped transfer: bus i % NBUS, chip (i / NBUS) % NCHIP, block 1, page 0
  function automatic int bus_of(int i);  return i % NBUS; endfunction
  function automatic int chip_of(int i); return (i / NBUS) % NCHIP; endfunction

  task automatic h_send(int h, flash_op_e op, int tag, int dev, int bus, int chip);
    if (h == 0) g_d[0].u_host.send(op, tag, dev, bus, chip, 1, 0);
    else        g_d[1].u_host.send(op, tag, dev, bus, chip, 1, 0);
  endtask
  task automatic h_wait(int h, int tag);
    if (h == 0) g_d[0].u_host.wait_ack(tag); else g_d[1].u_host.wait_ack(tag);
  endtask
  function automatic bit h_data_ok(int h, int tag, int wtag);
    if (h == 0) return g_d[0].u_host.rbuf[tag] == g_d[0].u_host.wbuf[wtag];
    return g_d[1].u_host.rbuf[tag] == g_d[0].u_host.wbuf[wtag];
  endfunction

  // host h reads n striped pages of device dev with tags base..base+n-1; returns the cycle
  // count from first send to last ack
  task automatic read_stripe(int h, int dev, int n, int base, output longint took);
    longint t0 = cyc;
    for (int i = 0; i < n; i++) h_send(h, OP_READ, base + i, dev, bus_of(i), chip_of(i));
    for (int i = 0; i < n; i++) h_wait(h, base + i);
    took = cyc - t0;
    for (int i = 0; i < n; i++) begin
      checks++;
      if (!h_data_ok(h, base + i, 100 * dev + i)) begin failures++; $display("host %0d tag %0d data", h, base + i); end
    end
  endtask

  initial begin
    longint took, t1, t8, ta, tb, t16;
    real bw [4];
    h_wreq_ready = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (40) @(posedge clk);
    // prepare: erase and write all 8 pages of both devices (write buffers at tags 100*dev+i)
    for (int d = 0; d < NDEV; d++) begin
      for (int i = 0; i < NBUS * NCHIP; i++) g_d[0].u_host.send(OP_ERASE, i, d, bus_of(i), chip_of(i), 1, 0);
      for (int i = 0; i < NBUS * NCHIP; i++) g_d[0].u_host.wait_ack(i);
      for (int i = 0; i < NBUS * NCHIP; i++) begin
        g_d[0].u_host.fill(100 * d + i, PAGE, 10 * d + i + 1);
        g_d[0].u_host.send(OP_WRITE, 100 * d + i, d, bus_of(i), chip_of(i), 1, 0);
      end
      for (int i = 0; i < NBUS * NCHIP; i++) g_d[0].u_host.wait_ack(100 * d + i);
    end
    // bandwidth against transfer size
    for (int k = 0; k < 4; k++) begin
      automatic int n = 1 << k;
      read_stripe(0, 0, n, 10 + 10 * k, took);
      bw[k] = real'(n * PAGE) / real'(took);
      $display("transfer of %0d pages: %0d cycles, %0.3f bytes/cycle", n, took, bw[k]);
      if (k == 0) t1 = took;
      if (k == 3) t8 = took;
    end
    checks++;
    if (!(bw[3] > 2.0 * bw[0] && bw[1] > bw[0] && bw[2] > bw[1])) begin
      failures++; $display("bandwidth does not grow with transfer size");
    end
    // two hosts on device 0
    fork
      read_stripe(0, 0, 8, 60, ta);
      read_stripe(1, 0, 8, 60, tb);
    join
    $display("two hosts on one device: %0d and %0d cycles for 8 pages each", ta, tb);
    checks++;
    if (ta > tb * 3 / 2 || tb > ta * 3 / 2) begin failures++; $display("unfair sharing"); end
    // one host on two devices
    t16 = cyc;
    for (int i = 0; i < 8; i++) begin
      g_d[0].u_host.send(OP_READ, 80 + i, 0, bus_of(i), chip_of(i), 1, 0);
      g_d[0].u_host.send(OP_READ, 90 + i, 1, bus_of(i), chip_of(i), 1, 0);
    end
    for (int i = 0; i < 8; i++) begin
      g_d[0].u_host.wait_ack(80 + i);
      g_d[0].u_host.wait_ack(90 + i);
      checks++;
      if (!h_data_ok(0, 80 + i, i) || !h_data_ok(0, 90 + i, 100 + i)) begin
        failures++; $display("two-device read %0d data", i);
      end
    end
    t16 = cyc - t16;
    $display("one host, 8 pages from each of 2 devices: %0d cycles, %0.3f bytes/cycle (one device: %0.3f)",
             t16, real'(16 * PAGE) / real'(t16), bw[3]);
    checks++;
    if (real'(16 * PAGE) / real'(t16) <= bw[3]) begin failures++; $display("no gain from a second device"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
