// minflash_device: one minFlash board: flash interface router, flash controller and
// inter-controller network router.
//
// The host (through its PCIe/DMA engine, outside this module) issues tagged ReadPage,
// WritePage and EraseBlock requests naming any device of the array; the router renames tags,
// sends local requests to the flash controller and remote ones onto the network, and returns
// read data, write-data requests and acks to whichever host issued the request. The
// controller drives NBUS NAND buses, each with NCHIP chips. up_*/down_* are the two
// inter-controller links of the linear array; my_id is this device's position in it.
// Host interface (all valid/ready): h_req (request, tag = host tag, dev = target device),
// h_rdata (read bytes of a page, in order, tagged with the host tag), h_wreq (the device asks
// for the 8 KiB of write data of a host tag), h_wdata (write bytes, with the target device),
// h_ack (completion and status). The composition is the document's (Fig. 1b).
module minflash_device
  import minflash_pkg::*;
#(
  parameter int unsigned NBUS          = 8,
  parameter int unsigned NCHIP         = 8,
  parameter int unsigned PAGE_BYTES    = DEFAULT_PAGE_BYTES,
  parameter int unsigned POLL_INTERVAL = 64,
  parameter int unsigned NTAG          = 128,
  parameter int unsigned LOCQ_DEPTH    = 128,
  parameter int unsigned REMQ_DEPTH    = 128,
  parameter int unsigned VC_DEPTH      = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DEV_W-1:0] my_id,
  // host interface
  input  logic             h_req_valid,
  output logic             h_req_ready,
  input  flash_req_t       h_req,
  output logic             h_rdata_valid,
  input  logic             h_rdata_ready,
  output rdata_t           h_rdata,
  output logic             h_ack_valid,
  input  logic             h_ack_ready,
  output ack_t             h_ack,
  output logic             h_wreq_valid,
  input  logic             h_wreq_ready,
  output logic [TAG_W-1:0] h_wreq_tag,
  input  logic             h_wdata_valid,
  output logic             h_wdata_ready,
  input  wdata_t           h_wdata,
  // NAND buses
  output nand_out_t        nand_o    [NBUS],
  input  logic [7:0]       nand_dq_i [NBUS],
  // inter-controller links
  output link_flit_t       up_tx,
  input  logic [NVC-1:0]   up_tx_credit,
  input  link_flit_t       up_rx,
  output logic [NVC-1:0]   up_rx_credit,
  output link_flit_t       down_tx,
  input  logic [NVC-1:0]   down_tx_credit,
  input  link_flit_t       down_rx,
  output logic [NVC-1:0]   down_rx_credit
);
  logic             c_req_valid, c_req_ready;
  flash_req_t       c_req;
  logic             c_rdata_valid, c_rdata_ready, c_ack_valid, c_ack_ready;
  rdata_t           c_rdata;
  ack_t             c_ack;
  logic             c_wreq_valid, c_wreq_ready, c_wdata_valid, c_wdata_ready;
  logic [TAG_W-1:0] c_wreq_tag;
  logic [7:0]       c_wdata;
  logic [NVC-1:0]   tx_valid, tx_ready, rx_valid, rx_ready;
  flit_t            tx_flit [NVC];
  flit_t            rx_flit [NVC];

  flash_router #(.NTAG(NTAG), .LOCQ_DEPTH(LOCQ_DEPTH), .REMQ_DEPTH(REMQ_DEPTH)) u_router (
    .clk, .rst_n, .my_id,
    .h_req_valid, .h_req_ready, .h_req,
    .h_rdata_valid, .h_rdata_ready, .h_rdata,
    .h_ack_valid, .h_ack_ready, .h_ack,
    .h_wreq_valid, .h_wreq_ready, .h_wreq_tag,
    .h_wdata_valid, .h_wdata_ready, .h_wdata,
    .c_req_valid, .c_req_ready, .c_req,
    .c_rdata_valid, .c_rdata_ready, .c_rdata,
    .c_ack_valid, .c_ack_ready, .c_ack,
    .c_wreq_valid, .c_wreq_ready, .c_wreq_tag,
    .c_wdata_valid, .c_wdata_ready, .c_wdata,
    .net_tx_valid(tx_valid), .net_tx_ready(tx_ready), .net_tx_flit(tx_flit),
    .net_rx_valid(rx_valid), .net_rx_ready(rx_ready), .net_rx_flit(rx_flit)
  );

  flash_controller #(.NBUS(NBUS), .NCHIP(NCHIP), .PAGE_BYTES(PAGE_BYTES),
                     .POLL_INTERVAL(POLL_INTERVAL)) u_ctrl (
    .clk, .rst_n,
    .req_valid(c_req_valid), .req_ready(c_req_ready), .req(c_req),
    .wreq_valid(c_wreq_valid), .wreq_ready(c_wreq_ready), .wreq_tag(c_wreq_tag),
    .wdata_valid(c_wdata_valid), .wdata_ready(c_wdata_ready), .wdata(c_wdata),
    .rdata_valid(c_rdata_valid), .rdata_ready(c_rdata_ready), .rdata(c_rdata),
    .ack_valid(c_ack_valid), .ack_ready(c_ack_ready), .ack(c_ack),
    .nand_o, .nand_dq_i
  );

  net_node #(.VC_DEPTH(VC_DEPTH)) u_net (
    .clk, .rst_n, .my_id,
    .inj_valid(tx_valid), .inj_ready(tx_ready), .inj_flit(tx_flit),
    .ej_valid(rx_valid), .ej_ready(rx_ready), .ej_flit(rx_flit),
    .up_tx, .up_tx_credit, .up_rx, .up_rx_credit,
    .down_tx, .down_tx_credit, .down_rx, .down_rx_credit
  );

endmodule
