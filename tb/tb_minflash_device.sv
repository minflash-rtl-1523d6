// tb_minflash_device: one minFlash device (id 2) at reduced size (2 buses x 2 chips, 300-byte
// pages) with chip models on its buses and its two network links left unconnected.
//
// Checked through the host port: erase, write and read-back of pages on every chip, reads
// on two buses at the same time, a bad block reported on erase, one ack per request. The
// network side is checked by sending requests for devices 3 and 0: the first must leave on
// the up link and the second on the down link, as request flits naming the right
// destination and this device as source.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_minflash_device;
  import minflash_pkg::*;
  localparam int NBUS = 2, NCHIP = 2, PAGE = 300, STORED = stored_bytes(PAGE);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic h_req_valid, h_req_ready, h_rdata_valid, h_rdata_ready, h_ack_valid, h_ack_ready;
  logic h_wreq_valid, h_wreq_ready, h_wdata_valid, h_wdata_ready;
  flash_req_t h_req; rdata_t h_rdata; ack_t h_ack; logic [TAG_W-1:0] h_wreq_tag; wdata_t h_wdata;
  nand_out_t  nand_o [NBUS];
  logic [7:0] nand_dq_i [NBUS];
  link_flit_t up_tx, down_tx;
  logic [NVC-1:0] up_rx_credit, down_rx_credit;

  minflash_device #(.NBUS(NBUS), .NCHIP(NCHIP), .PAGE_BYTES(PAGE), .POLL_INTERVAL(32),
                    .NTAG(8), .LOCQ_DEPTH(4), .REMQ_DEPTH(4)) dut (
    .clk, .rst_n, .my_id(DEV_W'(2)),
    .h_req_valid, .h_req_ready, .h_req, .h_rdata_valid, .h_rdata_ready, .h_rdata,
    .h_ack_valid, .h_ack_ready, .h_ack, .h_wreq_valid, .h_wreq_ready, .h_wreq_tag,
    .h_wdata_valid, .h_wdata_ready, .h_wdata,
    .nand_o, .nand_dq_i,
    .up_tx, .up_tx_credit('0), .up_rx('0), .up_rx_credit,
    .down_tx, .down_tx_credit('0), .down_rx('0), .down_rx_credit);

  host_bfm u_host (
    .clk, .rst_n, .req_valid(h_req_valid), .req_ready(h_req_ready), .req(h_req),
    .rdata_valid(h_rdata_valid), .rdata_ready(h_rdata_ready), .rdata(h_rdata),
    .ack_valid(h_ack_valid), .ack_ready(h_ack_ready), .ack(h_ack),
    .wreq_valid(h_wreq_valid), .wreq_ready(h_wreq_ready), .wreq_tag(h_wreq_tag),
    .wdata_valid(h_wdata_valid), .wdata_ready(h_wdata_ready), .wdata(h_wdata));

  for (genvar b = 0; b < NBUS; b++) begin : g_b
    logic [7:0] dq [NCHIP];
    for (genvar c = 0; c < NCHIP; c++) begin : g_c
      nand_chip_model #(.STORED(STORED), .T_R(600), .T_PROG(1500), .T_BERS(2000), .BAD_BLOCK(9)) u_chip (
        .clk, .ce_n(nand_o[b].ce_n[c]), .cle(nand_o[b].cle), .ale(nand_o[b].ale),
        .we_n(nand_o[b].we_n), .re_n(nand_o[b].re_n), .dq_in(nand_o[b].dq_o),
        .dq_out(dq[c]), .err_per_cw(0));
    end
    always_comb begin
      nand_dq_i[b] = 8'h00;
      for (int c = 0; c < NCHIP; c++) if (!nand_o[b].ce_n[c]) nand_dq_i[b] = dq[c];
    end
  end

  // flits leaving on the links
  int up_req = 0, down_req = 0, bad_flit = 0;
  always @(posedge clk) begin
    if (rst_n && up_tx.valid) begin
      if (up_tx.vc == VC_REQ && up_tx.flit.dst == 3 && up_tx.flit.src == 2) up_req++; else bad_flit++;
    end
    if (rst_n && down_tx.valid) begin
      if (down_tx.vc == VC_REQ && down_tx.flit.dst == 0 && down_tx.flit.src == 2) down_req++; else bad_flit++;
    end
  end

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_ack(int tag, ack_status_e st);
    u_host.wait_ack(tag);
    checks++;
    if (u_host.acks[tag] != 1 || u_host.ast[tag] != st) begin
      failures++; $display("tag %0d: acks=%0d status=%0d", tag, u_host.acks[tag], u_host.ast[tag]);
    end
  endtask

  initial begin
    h_wreq_ready = 0;
    repeat (5) @(posedge clk);
    rst_n = 1;
    repeat (20) @(posedge clk);
    for (int i = 0; i < NBUS * NCHIP; i++) u_host.send(OP_ERASE, i, 2, i / NCHIP, i % NCHIP, 4, 0);
    for (int i = 0; i < NBUS * NCHIP; i++) expect_ack(i, ST_OK);
    for (int i = 0; i < NBUS * NCHIP; i++) begin
      u_host.fill(10 + i, PAGE, 3 * i + 1);
      u_host.send(OP_WRITE, 10 + i, 2, i / NCHIP, i % NCHIP, 4, 1);
    end
    for (int i = 0; i < NBUS * NCHIP; i++) expect_ack(10 + i, ST_OK);
    // reads on both buses at once
    for (int i = 0; i < NBUS * NCHIP; i++) u_host.send(OP_READ, 20 + i, 2, i / NCHIP, i % NCHIP, 4, 1);
    for (int i = 0; i < NBUS * NCHIP; i++) begin
      expect_ack(20 + i, ST_OK);
      checks++;
      if (u_host.rbuf[20 + i] != u_host.wbuf[10 + i]) begin failures++; $display("read %0d data", i); end
    end
    u_host.send(OP_ERASE, 30, 2, 1, 0, 9, 0);
    expect_ack(30, ST_BAD_BLOCK);
    // requests for other devices leave on the links
    u_host.send(OP_READ, 31, 3, 0, 0, 4, 1);
    u_host.send(OP_READ, 32, 0, 0, 0, 4, 1);
    repeat (200) @(posedge clk);
    checks++;
    if (up_req != 1 || down_req != 1 || bad_flit != 0) begin
      failures++; $display("link flits: up %0d down %0d bad %0d", up_req, down_req, bad_flit);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
