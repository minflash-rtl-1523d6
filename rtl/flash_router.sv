// flash_router: flash interface router of one minFlash device.
//
// Sits between the host interface (PCIe/DMA), the flash controller and the network, and lets
// any host reach any device by the device field of the address.
//  * Requests: a host request for another device goes to the remote queue (RemQ) and out on
//    the request virtual channel; a request for this device is merged, by a rotating-priority
//    arbiter, with requests arriving from other devices into the local queue (LocQ). At the
//    head of LocQ the request takes a free controller tag; its host tag and source device
//    are stored in the tag table, and it enters the controller under the controller tag.
//  * Read data, acks and write-data requests come from the controller under controller tags;
//    the tag table gives back the host tag and source device, and each stream is merged with
//    the same stream arriving from the network and split by destination: to the local host or
//    onto the network (vc_merge_split). An ack also returns its controller tag to the free
//    queue.
//  * Write data from the local host is split by target device: to the local controller
//    (merged with write data arriving from the network) or onto the write-data channel.
// Network traffic uses one virtual channel per datapath (net_tx_*/net_rx_* indexed by vc_e).
// Structure and tag renaming follow the document's Fig. 3; queue depths follow its rule
// (request queue depth = number of tags in flight) with tag counts chosen by this design.
module flash_router
  import minflash_pkg::*;
#(
  parameter int unsigned NTAG       = 128,  // controller tags
  parameter int unsigned LOCQ_DEPTH = 128,
  parameter int unsigned REMQ_DEPTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DEV_W-1:0] my_id,
  // host side
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
  // flash controller side
  output logic             c_req_valid,
  input  logic             c_req_ready,
  output flash_req_t       c_req,
  input  logic             c_rdata_valid,
  output logic             c_rdata_ready,
  input  rdata_t           c_rdata,
  input  logic             c_ack_valid,
  output logic             c_ack_ready,
  input  ack_t             c_ack,
  input  logic             c_wreq_valid,
  output logic             c_wreq_ready,
  input  logic [TAG_W-1:0] c_wreq_tag,
  output logic             c_wdata_valid,
  input  logic             c_wdata_ready,
  output logic [7:0]       c_wdata,
  // network virtual channel endpoints
  output logic [NVC-1:0]   net_tx_valid,
  input  logic [NVC-1:0]   net_tx_ready,
  output flit_t            net_tx_flit [NVC],
  input  logic [NVC-1:0]   net_rx_valid,
  output logic [NVC-1:0]   net_rx_ready,
  input  flit_t            net_rx_flit [NVC]
);
  typedef struct packed {
    flash_req_t       req;
    logic [DEV_W-1:0] src;
  } locq_t;

  // ================= request path =================
  wire h_local = (h_req.dev == my_id);

  // RemQ: requests for other devices
  flit_t remq_in;
  logic  remq_in_ready;
  always_comb begin
    remq_in.dst     = h_req.dev;
    remq_in.src     = my_id;
    remq_in.tag     = h_req.tag;
    remq_in.payload = req_payload(h_req);
  end
  sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(REMQ_DEPTH)) u_remq (
    .clk, .rst_n,
    .in_valid(h_req_valid && !h_local), .in_ready(remq_in_ready), .in_data(remq_in),
    .out_valid(net_tx_valid[VC_REQ]), .out_ready(net_tx_ready[VC_REQ]),
    .out_data(net_tx_flit[VC_REQ]), .count()
  );

  // merge of local host requests and requests from the network into LocQ
  logic [1:0] rq_gnt;
  logic       rq_idx;
  logic       locq_in_ready;
  locq_t      locq_in, locq_out;
  logic       locq_out_valid, locq_out_ready;
  rr_arbiter #(.N(2)) u_req_arb (
    .clk, .rst_n, .req({net_rx_valid[VC_REQ], h_req_valid && h_local}), .advance(locq_in_ready),
    .grant(rq_gnt), .grant_idx(rq_idx)
  );
  always_comb begin
    if (rq_idx) begin
      locq_in.req = payload_req(net_rx_flit[VC_REQ].payload, net_rx_flit[VC_REQ].tag, my_id);
      locq_in.src = net_rx_flit[VC_REQ].src;
    end else begin
      locq_in.req = h_req;
      locq_in.src = my_id;
    end
  end
  assign h_req_ready          = h_local ? (rq_gnt[0] && locq_in_ready) : remq_in_ready;
  assign net_rx_ready[VC_REQ] = rq_gnt[1] && locq_in_ready;

  sync_fifo #(.WIDTH($bits(locq_t)), .DEPTH(LOCQ_DEPTH)) u_locq (
    .clk, .rst_n,
    .in_valid(|rq_gnt), .in_ready(locq_in_ready), .in_data(locq_in),
    .out_valid(locq_out_valid), .out_ready(locq_out_ready), .out_data(locq_out), .count()
  );

  // tag renaming
  localparam int unsigned L_RD = 0, L_ACK = 1, L_WREQ = 2;
  logic             alloc_ready;
  logic [TAG_W-1:0] alloc_ctag;
  logic [TAG_W-1:0] look_ctag [3];
  logic [TAG_W-1:0] look_htag [3];
  logic [DEV_W-1:0] look_src  [3];
  assign look_ctag[L_RD]   = c_rdata.tag;
  assign look_ctag[L_ACK]  = c_ack.tag;
  assign look_ctag[L_WREQ] = c_wreq_tag;

  tag_table #(.NTAG(NTAG), .NLOOK(3)) u_tags (
    .clk, .rst_n,
    .alloc_valid(c_req_valid && c_req_ready), .alloc_ready, .alloc_htag(locq_out.req.tag),
    .alloc_src(locq_out.src), .alloc_ctag,
    .look_ctag, .look_htag, .look_src,
    .free_valid(c_ack_valid && c_ack_ready), .free_ctag(c_ack.tag), .free_count()
  );

  assign c_req_valid    = locq_out_valid && alloc_ready;
  assign locq_out_ready = alloc_ready && c_req_ready;
  always_comb begin
    c_req     = locq_out.req;
    c_req.tag = alloc_ctag;
  end

  // ================= response paths =================
  flit_t rd_loc, ack_loc, wq_loc, wd_loc;
  flit_t rd_host, ack_host, wq_host, wd_host;
  always_comb begin
    rd_loc  = '{dst: look_src[L_RD],   src: my_id, tag: look_htag[L_RD],   payload: PAYLOAD_W'(c_rdata.data)};
    ack_loc = '{dst: look_src[L_ACK],  src: my_id, tag: look_htag[L_ACK],  payload: PAYLOAD_W'(c_ack.status)};
    wq_loc  = '{dst: look_src[L_WREQ], src: my_id, tag: look_htag[L_WREQ], payload: '0};
    wd_loc  = '{dst: h_wdata.dev,      src: my_id, tag: '0,                payload: PAYLOAD_W'(h_wdata.data)};
  end

  vc_merge_split u_rd (
    .clk, .rst_n, .my_id,
    .loc_valid(c_rdata_valid), .loc_ready(c_rdata_ready), .loc_flit(rd_loc),
    .net_valid(net_rx_valid[VC_RDATA]), .net_ready(net_rx_ready[VC_RDATA]), .net_flit(net_rx_flit[VC_RDATA]),
    .host_valid(h_rdata_valid), .host_ready(h_rdata_ready), .host_flit(rd_host),
    .tx_valid(net_tx_valid[VC_RDATA]), .tx_ready(net_tx_ready[VC_RDATA]), .tx_flit(net_tx_flit[VC_RDATA])
  );
  assign h_rdata.tag  = rd_host.tag;
  assign h_rdata.data = rd_host.payload[7:0];

  vc_merge_split u_ack (
    .clk, .rst_n, .my_id,
    .loc_valid(c_ack_valid), .loc_ready(c_ack_ready), .loc_flit(ack_loc),
    .net_valid(net_rx_valid[VC_ACK]), .net_ready(net_rx_ready[VC_ACK]), .net_flit(net_rx_flit[VC_ACK]),
    .host_valid(h_ack_valid), .host_ready(h_ack_ready), .host_flit(ack_host),
    .tx_valid(net_tx_valid[VC_ACK]), .tx_ready(net_tx_ready[VC_ACK]), .tx_flit(net_tx_flit[VC_ACK])
  );
  assign h_ack.tag    = ack_host.tag;
  assign h_ack.status = ack_status_e'(ack_host.payload[1:0]);

  vc_merge_split u_wreq (
    .clk, .rst_n, .my_id,
    .loc_valid(c_wreq_valid), .loc_ready(c_wreq_ready), .loc_flit(wq_loc),
    .net_valid(net_rx_valid[VC_WREQ]), .net_ready(net_rx_ready[VC_WREQ]), .net_flit(net_rx_flit[VC_WREQ]),
    .host_valid(h_wreq_valid), .host_ready(h_wreq_ready), .host_flit(wq_host),
    .tx_valid(net_tx_valid[VC_WREQ]), .tx_ready(net_tx_ready[VC_WREQ]), .tx_flit(net_tx_flit[VC_WREQ])
  );
  assign h_wreq_tag = wq_host.tag;

  // write data: host bytes for this device merge with bytes from the network; the local
  // output of the split feeds the controller
  vc_merge_split u_wdata (
    .clk, .rst_n, .my_id,
    .loc_valid(h_wdata_valid), .loc_ready(h_wdata_ready), .loc_flit(wd_loc),
    .net_valid(net_rx_valid[VC_WDATA]), .net_ready(net_rx_ready[VC_WDATA]), .net_flit(net_rx_flit[VC_WDATA]),
    .host_valid(c_wdata_valid), .host_ready(c_wdata_ready), .host_flit(wd_host),
    .tx_valid(net_tx_valid[VC_WDATA]), .tx_ready(net_tx_ready[VC_WDATA]), .tx_flit(net_tx_flit[VC_WDATA])
  );
  assign c_wdata = wd_host.payload[7:0];

endmodule
