// minflash_cluster: a minFlash clustered flash array of NDEV devices in a linear array.
//
// Each device is a minflash_device with its own host interface and NAND buses; device i's up
// link is wired to device i+1's down link, so any host can reach any device's flash through
// the inter-controller network, which the hosts see as one more address field (the device
// ID). The serial transceivers of the real links are modelled here as lossless direct
// connections; the open link ends of the first and last device are tied off. Device IDs are
// the positions 0..NDEV-1. Ports are arrays indexed by device (and by bus for the NAND
// buses). Defaults: 4 devices of 8 buses x 8 chips with 8 KiB pages, the evaluated setup.
//
// The linear array and the per-datapath virtual channels follow the document; link wiring,
// tie-offs and port layout are this design's.
module minflash_cluster
  import minflash_pkg::*;
#(
  parameter int unsigned NDEV          = 4,
  parameter int unsigned NBUS          = 8,
  parameter int unsigned NCHIP         = 8,
  parameter int unsigned PAGE_BYTES    = DEFAULT_PAGE_BYTES,
  parameter int unsigned POLL_INTERVAL = 64,
  parameter int unsigned NTAG          = 128,
  parameter int unsigned LOCQ_DEPTH    = 128,
  parameter int unsigned REMQ_DEPTH    = 128,
  parameter int unsigned VC_DEPTH      = 8
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [NDEV-1:0]       h_req_valid,
  output logic [NDEV-1:0]       h_req_ready,
  input  flash_req_t            h_req         [NDEV],
  output logic [NDEV-1:0]       h_rdata_valid,
  input  logic [NDEV-1:0]       h_rdata_ready,
  output rdata_t                h_rdata       [NDEV],
  output logic [NDEV-1:0]       h_ack_valid,
  input  logic [NDEV-1:0]       h_ack_ready,
  output ack_t                  h_ack         [NDEV],
  output logic [NDEV-1:0]       h_wreq_valid,
  input  logic [NDEV-1:0]       h_wreq_ready,
  output logic [TAG_W-1:0]      h_wreq_tag    [NDEV],
  input  logic [NDEV-1:0]       h_wdata_valid,
  output logic [NDEV-1:0]       h_wdata_ready,
  input  wdata_t                h_wdata       [NDEV],
  output nand_out_t             nand_o        [NDEV][NBUS],
  input  logic [7:0]            nand_dq_i     [NDEV][NBUS]
);
  link_flit_t     up_tx [NDEV];
  link_flit_t     up_rx [NDEV];
  link_flit_t     down_tx [NDEV];
  link_flit_t     down_rx [NDEV];
  logic [NVC-1:0] up_tx_credit [NDEV];
  logic [NVC-1:0] up_rx_credit [NDEV];
  logic [NVC-1:0] down_tx_credit [NDEV];
  logic [NVC-1:0] down_rx_credit [NDEV];

  for (genvar d = 0; d < NDEV; d++) begin : g_dev
    minflash_device #(
      .NBUS(NBUS), .NCHIP(NCHIP), .PAGE_BYTES(PAGE_BYTES), .POLL_INTERVAL(POLL_INTERVAL),
      .NTAG(NTAG), .LOCQ_DEPTH(LOCQ_DEPTH), .REMQ_DEPTH(REMQ_DEPTH), .VC_DEPTH(VC_DEPTH)
    ) u_dev (
      .clk, .rst_n, .my_id(DEV_W'(d)),
      .h_req_valid(h_req_valid[d]), .h_req_ready(h_req_ready[d]), .h_req(h_req[d]),
      .h_rdata_valid(h_rdata_valid[d]), .h_rdata_ready(h_rdata_ready[d]), .h_rdata(h_rdata[d]),
      .h_ack_valid(h_ack_valid[d]), .h_ack_ready(h_ack_ready[d]), .h_ack(h_ack[d]),
      .h_wreq_valid(h_wreq_valid[d]), .h_wreq_ready(h_wreq_ready[d]), .h_wreq_tag(h_wreq_tag[d]),
      .h_wdata_valid(h_wdata_valid[d]), .h_wdata_ready(h_wdata_ready[d]), .h_wdata(h_wdata[d]),
      .nand_o(nand_o[d]), .nand_dq_i(nand_dq_i[d]),
      .up_tx(up_tx[d]), .up_tx_credit(up_tx_credit[d]), .up_rx(up_rx[d]),
      .up_rx_credit(up_rx_credit[d]),
      .down_tx(down_tx[d]), .down_tx_credit(down_tx_credit[d]), .down_rx(down_rx[d]),
      .down_rx_credit(down_rx_credit[d])
    );

    // links: up side of device d to down side of device d+1
    if (d + 1 < NDEV) begin : g_up
      assign up_rx[d]        = down_tx[d+1];
      assign up_tx_credit[d] = down_rx_credit[d+1];
    end else begin : g_up_end
      assign up_rx[d]        = '0;
      assign up_tx_credit[d] = '0;
    end
    if (d > 0) begin : g_down
      assign down_rx[d]        = up_tx[d-1];
      assign down_tx_credit[d] = up_rx_credit[d-1];
    end else begin : g_down_end
      assign down_rx[d]        = '0;
      assign down_tx_credit[d] = '0;
    end
  end

endmodule
