// flash_controller: the flash controller of one minFlash device (NBUS buses of NCHIP chips).
//
// The controller interface distributes incoming requests to the bus controllers by the bus
// field of the address, and merges what the buses return: read data bytes and acks are each
// combined with a rotating-priority arbiter (every item carries its controller tag, so the
// streams of different buses may interleave byte by byte). Write data is fetched one page at a
// time: a bus asking for the data of a write is granted by a rotating-priority arbiter, its
// request {ctag} is passed out on wreq_*, and the next PAGE_BYTES bytes arriving on wdata_*
// are steered to that bus. Requests to a bus whose chip is occupied wait at the input. The
// per-bus structure is the document's; the merge and fetch policies are this design's.
module flash_controller
  import minflash_pkg::*;
#(
  parameter int unsigned NBUS          = 8,
  parameter int unsigned NCHIP         = 8,
  parameter int unsigned PAGE_BYTES    = DEFAULT_PAGE_BYTES,
  parameter int unsigned POLL_INTERVAL = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  flash_req_t       req,
  output logic             wreq_valid,
  input  logic             wreq_ready,
  output logic [TAG_W-1:0] wreq_tag,
  input  logic             wdata_valid,
  output logic             wdata_ready,
  input  logic [7:0]       wdata,
  output logic             rdata_valid,
  input  logic             rdata_ready,
  output rdata_t           rdata,
  output logic             ack_valid,
  input  logic             ack_ready,
  output ack_t             ack,
  output nand_out_t        nand_o    [NBUS],
  input  logic [7:0]       nand_dq_i [NBUS]
);
  localparam int unsigned BI = $clog2(NBUS > 1 ? NBUS : 2);
  localparam int unsigned PW = $clog2(PAGE_BYTES + 1);

  logic [NBUS-1:0] b_req_valid, b_req_ready;
  logic [NBUS-1:0] b_wreq_valid, b_wreq_ready, b_wdata_valid, b_wdata_ready;
  logic [NBUS-1:0] b_rdata_valid, b_rdata_ready, b_ack_valid, b_ack_ready;
  logic [TAG_W-1:0] b_wreq_tag [NBUS];
  rdata_t          b_rdata [NBUS];
  ack_t            b_ack   [NBUS];

  for (genvar b = 0; b < NBUS; b++) begin : g_bus
    bus_controller #(.NCHIP(NCHIP), .PAGE_BYTES(PAGE_BYTES), .POLL_INTERVAL(POLL_INTERVAL)) u_bus (
      .clk, .rst_n,
      .req_valid(b_req_valid[b]), .req_ready(b_req_ready[b]), .req,
      .wreq_valid(b_wreq_valid[b]), .wreq_ready(b_wreq_ready[b]), .wreq_tag(b_wreq_tag[b]),
      .wdata_valid(b_wdata_valid[b]), .wdata_ready(b_wdata_ready[b]), .wdata,
      .rdata_valid(b_rdata_valid[b]), .rdata_ready(b_rdata_ready[b]), .rdata(b_rdata[b]),
      .ack_valid(b_ack_valid[b]), .ack_ready(b_ack_ready[b]), .ack(b_ack[b]),
      .nand_o(nand_o[b]), .nand_dq_i(nand_dq_i[b])
    );
  end

  // ---- request distribution by bus address ----
  wire [BI-1:0] req_bus = BI'(req.bus);
  always_comb begin
    b_req_valid = '0;
    b_req_valid[req_bus] = req_valid;
  end
  assign req_ready = b_req_ready[req_bus];

  // ---- read data merge ----
  logic [NBUS-1:0] rd_gnt;
  logic [BI-1:0]   rd_idx;
  rr_arbiter #(.N(NBUS)) u_rd_arb (
    .clk, .rst_n, .req(b_rdata_valid), .advance(rdata_ready), .grant(rd_gnt), .grant_idx(rd_idx)
  );
  assign rdata_valid   = |b_rdata_valid;
  assign rdata         = b_rdata[rd_idx];
  assign b_rdata_ready = rd_gnt & {NBUS{rdata_ready}};

  // ---- ack merge ----
  logic [NBUS-1:0] ack_gnt;
  logic [BI-1:0]   ack_idx;
  rr_arbiter #(.N(NBUS)) u_ack_arb (
    .clk, .rst_n, .req(b_ack_valid), .advance(ack_ready), .grant(ack_gnt), .grant_idx(ack_idx)
  );
  assign ack_valid   = |b_ack_valid;
  assign ack         = b_ack[ack_idx];
  assign b_ack_ready = ack_gnt & {NBUS{ack_ready}};

  // ---- write data fetch, one page at a time ----
  logic            wr_busy;       // a page of write data is being steered
  logic [BI-1:0]   wr_bus;
  logic [PW-1:0]   wr_cnt;
  logic [NBUS-1:0] wq_gnt;
  logic [BI-1:0]   wq_idx;
  rr_arbiter #(.N(NBUS)) u_wreq_arb (
    .clk, .rst_n, .req(b_wreq_valid & {NBUS{!wr_busy}}), .advance(wreq_ready),
    .grant(wq_gnt), .grant_idx(wq_idx)
  );
  assign wreq_valid   = !wr_busy && (|b_wreq_valid);
  assign wreq_tag     = b_wreq_tag[wq_idx];
  assign b_wreq_ready = wq_gnt & {NBUS{wreq_ready && !wr_busy}};

  always_comb begin
    b_wdata_valid = '0;
    b_wdata_valid[wr_bus] = wdata_valid && wr_busy;
  end
  assign wdata_ready = wr_busy && b_wdata_ready[wr_bus];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_busy <= 1'b0;
      wr_bus  <= '0;
      wr_cnt  <= '0;
    end else begin
      if (wreq_valid && wreq_ready) begin
        wr_busy <= 1'b1;
        wr_bus  <= wq_idx;
        wr_cnt  <= '0;
      end
      if (wdata_valid && wdata_ready) begin
        wr_cnt <= wr_cnt + 1'b1;
        if (wr_cnt == PW'(PAGE_BYTES - 1)) wr_busy <= 1'b0;
      end
    end
  end

endmodule
