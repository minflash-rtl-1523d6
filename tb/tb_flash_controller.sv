// tb_flash_controller: checks request distribution, stream merging and write-data fetching
// of the flash controller with 2 buses x 2 chips of chip models.
//
// Erases and writes one page on every chip with all requests in flight together (so write
// data for several buses is fetched one page at a time), then reads all four pages together
// (read data of both buses interleaves on the merged stream) and compares the data per tag,
// the status of every ack, and that each bus's NAND pins were used only for its own chips.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_flash_controller;
  import minflash_pkg::*;
  localparam int NBUS = 2, NCHIP = 2, PAGE = 300, STORED = stored_bytes(PAGE);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, wreq_valid, wreq_ready, wdata_valid, wdata_ready;
  logic rdata_valid, rdata_ready, ack_valid, ack_ready;
  flash_req_t req;
  logic [TAG_W-1:0] wreq_tag;
  wdata_t wd;
  rdata_t rdata;
  ack_t ack;
  nand_out_t nand_o [NBUS];
  logic [7:0] nand_dq_i [NBUS];
  int checks = 0, failures = 0;
  int interleave = 0;

  flash_controller #(.NBUS(NBUS), .NCHIP(NCHIP), .PAGE_BYTES(PAGE), .POLL_INTERVAL(16)) dut (
    .clk, .rst_n, .req_valid, .req_ready, .req, .wreq_valid, .wreq_ready, .wreq_tag,
    .wdata_valid, .wdata_ready, .wdata(wd.data), .rdata_valid, .rdata_ready, .rdata,
    .ack_valid, .ack_ready, .ack, .nand_o, .nand_dq_i);

  host_bfm u_host (
    .clk, .rst_n, .req_valid, .req_ready, .req, .rdata_valid, .rdata_ready, .rdata,
    .ack_valid, .ack_ready, .ack, .wreq_valid, .wreq_ready, .wreq_tag,
    .wdata_valid, .wdata_ready, .wdata(wd));

  for (genvar b = 0; b < NBUS; b++) begin : g_b
    logic [7:0] dq [NCHIP];
    for (genvar c = 0; c < NCHIP; c++) begin : g_c
      nand_chip_model #(.STORED(STORED), .T_R(300), .T_PROG(500), .T_BERS(500)) u_chip (
        .clk, .ce_n(nand_o[b].ce_n[c]), .cle(nand_o[b].cle), .ale(nand_o[b].ale),
        .we_n(nand_o[b].we_n), .re_n(nand_o[b].re_n), .dq_in(nand_o[b].dq_o), .dq_out(dq[c]),
        .err_per_cw(0));
    end
    always_comb begin
      nand_dq_i[b] = 8'h00;
      for (int c = 0; c < NCHIP; c++) if (!nand_o[b].ce_n[c]) nand_dq_i[b] = dq[c];
    end
    always @(posedge clk)
      if (rst_n && nand_o[b].ce_n[MAX_CHIPS-1:NCHIP] != '1) begin
        checks++; failures++; $display("bus %0d selects a chip that does not exist", b);
      end
  end

  // interleaving of read data from different tags on the merged stream
  int last_tag = -1;
  always @(posedge clk)
    if (rdata_valid && rdata_ready) begin
      if (last_tag >= 0 && last_tag != int'(rdata.tag)) interleave++;
      last_tag = rdata.tag;
    end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 4; i++) u_host.send(OP_ERASE, i, 0, i / 2, i % 2, 4, 0);
    for (int i = 0; i < 4; i++) begin
      u_host.wait_ack(i);
      checks++; if (u_host.ast[i] != ST_OK) begin failures++; $display("erase %0d", i); end
    end
    for (int i = 0; i < 4; i++) begin
      u_host.fill(10 + i, PAGE, 3 * i + 1);
      u_host.send(OP_WRITE, 10 + i, 0, i / 2, i % 2, 4, 1);
    end
    for (int i = 0; i < 4; i++) begin
      u_host.wait_ack(10 + i);
      checks++; if (u_host.ast[10 + i] != ST_OK) begin failures++; $display("write %0d", i); end
    end
    for (int i = 0; i < 4; i++) u_host.send(OP_READ, 20 + i, 0, i / 2, i % 2, 4, 1);
    for (int i = 0; i < 4; i++) begin
      u_host.wait_ack(20 + i);
      checks++;
      if (u_host.ast[20 + i] != ST_OK || u_host.rbuf[20 + i] != u_host.wbuf[10 + i]) begin
        failures++; $display("read %0d mismatch", i);
      end
      checks++; if (u_host.acks[20 + i] != 1) begin failures++; $display("ack count"); end
    end
    checks++; if (interleave == 0) begin failures++; $display("read streams never interleaved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
