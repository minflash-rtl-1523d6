// tb_minflash_full: the minFlash array at its default size (4 devices, each 8 buses x 8
// chips, 8 KB pages, 128 tags per device) with a chip model on every chip select.
//
// A short smoke test at full size: host 0 erases, writes and reads back a page on the last
// chip of the last bus of its own device and of device 3 (three hops away, write data fetched
// across the network), host 3 reads the page on device 0, and hosts 1 and 2 read device 3's
// page with the same host tag at once. Every request must get one OK ack and the data read
// must equal the data written. The chip models use short array times to keep the run short.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_minflash_full;
  import minflash_pkg::*;
  localparam int NDEV = 4, NBUS = 8, NCHIP = 8, PAGE = DEFAULT_PAGE_BYTES;
  localparam int STORED = stored_bytes(PAGE);
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

  minflash_cluster dut (.*);

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
        nand_chip_model #(.STORED(STORED), .T_R(200), .T_PROG(400), .T_BERS(400)) u_chip (
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
    repeat (2000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic ok(int h, int tag);
    int n; ack_status_e s;
    case (h)
      0: begin g_d[0].u_host.wait_ack(tag); n = g_d[0].u_host.acks[tag]; s = g_d[0].u_host.ast[tag]; end
      1: begin g_d[1].u_host.wait_ack(tag); n = g_d[1].u_host.acks[tag]; s = g_d[1].u_host.ast[tag]; end
      2: begin g_d[2].u_host.wait_ack(tag); n = g_d[2].u_host.acks[tag]; s = g_d[2].u_host.ast[tag]; end
      default: begin g_d[3].u_host.wait_ack(tag); n = g_d[3].u_host.acks[tag]; s = g_d[3].u_host.ast[tag]; end
    endcase
    checks++;
    if (n != 1 || s != ST_OK) begin failures++; $display("host %0d tag %0d: acks %0d status %0d", h, tag, n, s); end
  endtask

  initial begin
    h_wreq_ready = '0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (200) @(posedge clk);   // tag tables initialise
    g_d[0].u_host.send(OP_ERASE, 1, 0, 7, 7, 100, 0);
    g_d[0].u_host.send(OP_ERASE, 2, 3, 7, 7, 100, 0);
    ok(0, 1); ok(0, 2);
    g_d[0].u_host.fill(3, PAGE, 5);
    g_d[0].u_host.fill(4, PAGE, 6);
    g_d[0].u_host.send(OP_WRITE, 3, 0, 7, 7, 100, 3);
    g_d[0].u_host.send(OP_WRITE, 4, 3, 7, 7, 100, 3);
    ok(0, 3); ok(0, 4);
    g_d[0].u_host.send(OP_READ, 5, 0, 7, 7, 100, 3);
    g_d[0].u_host.send(OP_READ, 6, 3, 7, 7, 100, 3);
    g_d[3].u_host.send(OP_READ, 7, 0, 7, 7, 100, 3);
    fork
      g_d[1].u_host.send(OP_READ, 9, 3, 7, 7, 100, 3);
      g_d[2].u_host.send(OP_READ, 9, 3, 7, 7, 100, 3);
    join
    ok(0, 5); ok(0, 6); ok(3, 7); ok(1, 9); ok(2, 9);
    checks++; if (g_d[0].u_host.rbuf[5] != g_d[0].u_host.wbuf[3]) begin failures++; $display("local read"); end
    checks++; if (g_d[0].u_host.rbuf[6] != g_d[0].u_host.wbuf[4]) begin failures++; $display("remote read"); end
    checks++; if (g_d[3].u_host.rbuf[7] != g_d[0].u_host.wbuf[3]) begin failures++; $display("host 3 read"); end
    checks++; if (g_d[1].u_host.rbuf[9] != g_d[0].u_host.wbuf[4]) begin failures++; $display("host 1 read"); end
    checks++; if (g_d[2].u_host.rbuf[9] != g_d[0].u_host.wbuf[4]) begin failures++; $display("host 2 read"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
