// bus_controller: controller of one flash bus (channel) and the NCHIP chips (ways) on it.
//
// Requests for this bus enter the scoreboard, which keeps one operation per chip and decides
// which chip uses the bus next. The chosen bus operation is executed by the NAND I/O
// primitives. The page data path carries the ECC: write data fetched from the host (wreq_*
// names the controller tag whose data is wanted, the bytes then arrive on wdata_*) is encoded
// into RS(255,243) codewords on its way to the bus, and page data read from a chip is decoded
// and corrected before it leaves on rdata_*, tagged with the request's controller tag. A page
// of PAGE_BYTES data bytes is cut into codewords of 243 data bytes, the last one shortened.
// A read's bus operation ends only when the decoder has delivered the whole page; its ack
// then carries ST_UNCORR if any codeword could not be corrected. Write and erase acks carry
// ST_BAD_BLOCK if the chip reported a failure. The block structure (scoreboard, ECC, I/O
// primitives per bus) is the document's; framing, handshakes and bus timing are this design's.
module bus_controller
  import minflash_pkg::*;
#(
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
  output nand_out_t        nand_o,
  input  logic [7:0]       nand_dq_i
);
  localparam int unsigned PW = $clog2(PAGE_BYTES + 1);

  // ---- scoreboard ----
  logic               issue_valid, issue_ready;
  io_kind_e           issue_kind;
  logic [CHIP_W-1:0]  issue_chip;
  logic [BLOCK_W-1:0] issue_block;
  logic [PAGE_W-1:0]  issue_page;
  logic [TAG_W-1:0]   issue_tag;
  logic               sb_done, sb_uncorr;
  logic               io_done;
  logic [7:0]         io_status;

  scoreboard #(.NCHIP(NCHIP), .POLL_INTERVAL(POLL_INTERVAL)) u_sb (
    .clk, .rst_n,
    .req_valid, .req_ready, .req,
    .issue_valid, .issue_ready, .issue_kind, .issue_chip, .issue_block, .issue_page, .issue_tag,
    .io_done(sb_done), .io_status, .io_uncorr(sb_uncorr),
    .ack_valid, .ack_ready, .ack
  );

  // ---- current bus operation ----
  io_kind_e         cur_kind;
  logic [TAG_W-1:0] cur_tag;
  logic             wreq_pending;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur_kind     <= IO_CMD_READ;
      cur_tag      <= '0;
      wreq_pending <= 1'b0;
    end else begin
      if (issue_valid && issue_ready) begin
        cur_kind <= issue_kind;
        cur_tag  <= issue_tag;
        if (issue_kind == IO_WRITE) wreq_pending <= 1'b1;
      end
      if (wreq_valid && wreq_ready) wreq_pending <= 1'b0;
    end
  end
  assign wreq_valid = wreq_pending;
  assign wreq_tag   = cur_tag;

  // ---- write path: host bytes -> encoder -> bus ----
  logic [PW-1:0] wr_pg_cnt;
  logic [7:0]    wr_cw_cnt;
  logic          enc_in_ready, enc_out_valid, enc_out_ready, enc_out_last;
  logic [7:0]    enc_out_data;
  wire           enc_in_last = (wr_cw_cnt == 8'(RS_K - 1)) || (wr_pg_cnt == PW'(PAGE_BYTES - 1));

  assign wdata_ready = enc_in_ready;

  rs_encoder u_enc (
    .clk, .rst_n,
    .in_valid(wdata_valid), .in_ready(enc_in_ready), .in_data(wdata), .in_last(enc_in_last),
    .out_valid(enc_out_valid), .out_ready(enc_out_ready), .out_data(enc_out_data),
    .out_last(enc_out_last)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_pg_cnt <= '0;
      wr_cw_cnt <= '0;
    end else if (wdata_valid && enc_in_ready) begin
      wr_cw_cnt <= enc_in_last ? '0 : wr_cw_cnt + 1'b1;
      wr_pg_cnt <= (wr_pg_cnt == PW'(PAGE_BYTES - 1)) ? '0 : wr_pg_cnt + 1'b1;
    end
  end

  // ---- NAND I/O primitives ----
  logic       io_rd_valid, io_rd_ready;
  logic [7:0] io_rd_data;

  nand_io #(.NCHIP(NCHIP), .PAGE_BYTES(PAGE_BYTES)) u_io (
    .clk, .rst_n,
    .op_valid(issue_valid), .op_ready(issue_ready), .op_kind(issue_kind), .op_chip(issue_chip),
    .op_block(issue_block), .op_page(issue_page),
    .done(io_done), .status(io_status),
    .wr_valid(enc_out_valid), .wr_ready(enc_out_ready), .wr_data(enc_out_data),
    .rd_valid(io_rd_valid), .rd_ready(io_rd_ready), .rd_data(io_rd_data),
    .nand_o, .nand_dq_i
  );

  // ---- read path: bus -> decoder -> host ----
  logic [PW-1:0] rd_left;     // data bytes of the page not yet framed into codewords
  logic [7:0]    rd_cw_pos;
  wire  [PW-1:0] rd_cw_data = (rd_left > PW'(RS_K)) ? PW'(RS_K) : rd_left;
  wire           dec_in_last = (PW'(rd_cw_pos) == rd_cw_data + PW'(RS_NPAR - 1));
  logic          dec_out_valid, dec_out_last, dec_out_err;
  logic [7:0]    dec_out_data;
  logic [2:0]    dec_out_nerr;
  logic [PW-1:0] out_cnt;
  logic          page_err;

  rs_decoder u_dec (
    .clk, .rst_n,
    .in_valid(io_rd_valid), .in_ready(io_rd_ready), .in_data(io_rd_data), .in_last(dec_in_last),
    .out_valid(dec_out_valid), .out_ready(rdata_ready), .out_data(dec_out_data),
    .out_last(dec_out_last), .out_err(dec_out_err), .out_nerr(dec_out_nerr)
  );

  assign rdata_valid = dec_out_valid;
  assign rdata.tag   = cur_tag;
  assign rdata.data  = dec_out_data;

  wire page_out_done = dec_out_valid && rdata_ready && (out_cnt == PW'(PAGE_BYTES - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_left   <= PW'(PAGE_BYTES);
      rd_cw_pos <= '0;
      out_cnt   <= '0;
      page_err  <= 1'b0;
    end else begin
      if (io_rd_valid && io_rd_ready) begin
        rd_cw_pos <= dec_in_last ? '0 : rd_cw_pos + 1'b1;
        if (dec_in_last)
          rd_left <= (rd_left == rd_cw_data) ? PW'(PAGE_BYTES) : rd_left - rd_cw_data;
      end
      if (dec_out_valid && rdata_ready) begin
        out_cnt <= page_out_done ? '0 : out_cnt + 1'b1;
        if (dec_out_last && dec_out_err) page_err <= 1'b1;
        if (page_out_done) page_err <= 1'b0;
      end
    end
  end

  // The readout's own completion is replaced by the end of decoded data.
  assign sb_done   = (io_done && cur_kind != IO_READOUT) || page_out_done;
  assign sb_uncorr = page_err || (dec_out_last && dec_out_err);

endmodule
