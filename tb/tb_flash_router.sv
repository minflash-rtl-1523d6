// tb_flash_router: two flash interface routers (devices 0 and 1) with their network virtual
// channels joined through small FIFOs, a host model and a controller stand-in on each.
//
// Checked: a local read; a remote write (the remote controller fetches the data from the
// requesting host across the network) and its read-back; a read by the other host of the
// same page; two hosts using the same host tag on one controller at the same time (tag
// renaming keeps them apart: each gets its own data and one ack, and the controller never
// sees a controller tag reused while outstanding); and a stream of requests larger than the
// number of controller tags, which must stall and then complete.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_flash_router;
  import minflash_pkg::*;
  localparam int NB = 16;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [NVC-1:0] tx_valid [2];
  logic [NVC-1:0] tx_ready [2];
  flit_t          tx_flit  [2][NVC];
  logic [NVC-1:0] rx_valid [2];
  logic [NVC-1:0] rx_ready [2];
  flit_t          rx_flit  [2][NVC];

  // a small FIFO per channel and direction stands in for the network between the routers
  for (genvar d = 0; d < 2; d++) begin : g_link
    for (genvar v = 0; v < NVC; v++) begin : g_vc
      sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(2)) u_q (
        .clk, .rst_n, .in_valid(tx_valid[d][v]), .in_ready(tx_ready[d][v]), .in_data(tx_flit[d][v]),
        .out_valid(rx_valid[1-d][v]), .out_ready(rx_ready[1-d][v]), .out_data(rx_flit[1-d][v]),
        .count());
    end
  end

  for (genvar d = 0; d < 2; d++) begin : g_d
    logic h_req_valid, h_req_ready, h_rdata_valid, h_rdata_ready, h_ack_valid, h_ack_ready;
    logic h_wreq_valid, h_wreq_ready, h_wdata_valid, h_wdata_ready;
    flash_req_t h_req; rdata_t h_rdata; ack_t h_ack; logic [TAG_W-1:0] h_wreq_tag; wdata_t h_wdata;
    logic c_req_valid, c_req_ready, c_rdata_valid, c_rdata_ready, c_ack_valid, c_ack_ready;
    logic c_wreq_valid, c_wreq_ready, c_wdata_valid, c_wdata_ready;
    flash_req_t c_req; rdata_t c_rdata; ack_t c_ack; logic [TAG_W-1:0] c_wreq_tag;
    logic [7:0] c_wdata;

    flash_router #(.NTAG(4), .LOCQ_DEPTH(4), .REMQ_DEPTH(4)) u_router (
      .clk, .rst_n, .my_id(DEV_W'(d)),
      .h_req_valid, .h_req_ready, .h_req, .h_rdata_valid, .h_rdata_ready, .h_rdata,
      .h_ack_valid, .h_ack_ready, .h_ack, .h_wreq_valid, .h_wreq_ready, .h_wreq_tag,
      .h_wdata_valid, .h_wdata_ready, .h_wdata,
      .c_req_valid, .c_req_ready, .c_req, .c_rdata_valid, .c_rdata_ready, .c_rdata,
      .c_ack_valid, .c_ack_ready, .c_ack, .c_wreq_valid, .c_wreq_ready, .c_wreq_tag,
      .c_wdata_valid, .c_wdata_ready, .c_wdata,
      .net_tx_valid(tx_valid[d]), .net_tx_ready(tx_ready[d]), .net_tx_flit(tx_flit[d]),
      .net_rx_valid(rx_valid[d]), .net_rx_ready(rx_ready[d]), .net_rx_flit(rx_flit[d])
    );

    host_bfm u_host (
      .clk, .rst_n, .req_valid(h_req_valid), .req_ready(h_req_ready), .req(h_req),
      .rdata_valid(h_rdata_valid), .rdata_ready(h_rdata_ready), .rdata(h_rdata),
      .ack_valid(h_ack_valid), .ack_ready(h_ack_ready), .ack(h_ack),
      .wreq_valid(h_wreq_valid), .wreq_ready(h_wreq_ready), .wreq_tag(h_wreq_tag),
      .wdata_valid(h_wdata_valid), .wdata_ready(h_wdata_ready), .wdata(h_wdata));

    ctrl_model #(.NBYTES(NB)) u_ctrl (
      .clk, .rst_n, .req_valid(c_req_valid), .req_ready(c_req_ready), .req(c_req),
      .rdata_valid(c_rdata_valid), .rdata_ready(c_rdata_ready), .rdata(c_rdata),
      .ack_valid(c_ack_valid), .ack_ready(c_ack_ready), .ack(c_ack),
      .wreq_valid(c_wreq_valid), .wreq_ready(c_wreq_ready), .wreq_tag(c_wreq_tag),
      .wdata_valid(c_wdata_valid), .wdata_ready(c_wdata_ready), .wdata(c_wdata));
  end

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit same(byte unsigned a [$], byte unsigned b [$]); return a == b; endfunction

  initial begin
    byte unsigned exp [$];
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (10) @(posedge clk);
    // local read on device 0 (never written: pattern)
    g_d[0].u_host.send(OP_READ, 1, 0, 0, 0, 0, 2);
    g_d[0].u_host.wait_ack(1);
    exp.delete(); for (int i = 0; i < NB; i++) exp.push_back(byte'(2 + i));
    checks++; if (!same(g_d[0].u_host.rbuf[1], exp)) begin failures++; $display("local read"); end
    // remote write from host 0 to device 1, then read back by host 0 and by host 1
    g_d[0].u_host.fill(2, NB, 9);
    g_d[0].u_host.send(OP_WRITE, 2, 1, 0, 0, 0, 7);
    g_d[0].u_host.wait_ack(2);
    g_d[0].u_host.send(OP_READ, 3, 1, 0, 0, 0, 7);
    g_d[0].u_host.wait_ack(3);
    checks++;
    if (!same(g_d[0].u_host.rbuf[3], g_d[0].u_host.wbuf[2])) begin failures++; $display("remote read-back"); end
    // same host tag 5 from both hosts to device 1 at once
    fork
      g_d[0].u_host.send(OP_READ, 5, 1, 0, 0, 0, 7);
      g_d[1].u_host.send(OP_READ, 5, 1, 0, 0, 0, 9);
    join
    g_d[0].u_host.wait_ack(5);
    g_d[1].u_host.wait_ack(5);
    exp.delete(); for (int i = 0; i < NB; i++) exp.push_back(byte'(9 + i));
    checks++;
    if (!same(g_d[0].u_host.rbuf[5], g_d[0].u_host.wbuf[2]) || !same(g_d[1].u_host.rbuf[5], exp) ||
        g_d[0].u_host.acks[5] != 1 || g_d[1].u_host.acks[5] != 1) begin
      failures++; $display("tag collision not resolved");
    end
    // more requests than controller tags: host 1 sends 10 reads to device 0
    for (int t = 20; t < 30; t++) g_d[1].u_host.send(OP_READ, t, 0, 0, 0, 0, t);
    for (int t = 20; t < 30; t++) begin
      g_d[1].u_host.wait_ack(t);
      exp.delete(); for (int i = 0; i < NB; i++) exp.push_back(byte'(t + i));
      checks++; if (!same(g_d[1].u_host.rbuf[t], exp)) begin failures++; $display("burst read %0d", t); end
    end
    checks++;
    if (g_d[0].u_ctrl.tag_reuse != 0 || g_d[1].u_ctrl.tag_reuse != 0) begin
      failures++; $display("controller tag reused while outstanding");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
