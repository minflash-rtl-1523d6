// host_bfm: behavioural model of one host server and its PCIe/DMA engine, for testbenches.
//
// Not synthesizable. It keeps a page buffer per host tag, like the minFlash driver: send()
// issues a request; when the device asks for a tag's write data (wreq) the buffer is streamed
// out with the target device; read bytes are appended to the tag's read buffer; acks are
// recorded with their count and status. rdata_ready is randomly withheld to create
// back-pressure when stall_rdata is set.
//
// The request/ack API it drives is the document's; the handshakes and buffers are this
// design's.
module host_bfm
  import minflash_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  output logic             req_valid,
  input  logic             req_ready,
  output flash_req_t       req,
  input  logic             rdata_valid,
  output logic             rdata_ready,
  input  rdata_t           rdata,
  input  logic             ack_valid,
  output logic             ack_ready,
  input  ack_t             ack,
  input  logic             wreq_valid,
  output logic             wreq_ready,
  input  logic [TAG_W-1:0] wreq_tag,
  output logic             wdata_valid,
  input  logic             wdata_ready,
  output wdata_t           wdata
);
  byte unsigned wbuf [int][$];
  byte unsigned rbuf [int][$];
  int           acks [int];
  ack_status_e  ast  [int];
  int           tdev [int];
  int           t_sent [int];
  int           t_ack [int];
  bit           stall_rdata = 0;
  int           cycle = 0;

  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    req_valid = 0; req = '0; wreq_ready = 0; wdata_valid = 0; wdata = '0;
    ack_ready = 1;
  end

  always @(posedge clk) begin
    rdata_ready <= stall_rdata ? (($urandom % 4) != 0) : 1'b1;
    if (rst_n && rdata_valid && rdata_ready) rbuf[int'(rdata.tag)].push_back(rdata.data);
    if (rst_n && ack_valid && ack_ready) begin
      if (acks.exists(int'(ack.tag))) acks[int'(ack.tag)] += 1;
      else                            acks[int'(ack.tag)] = 1;
      ast[int'(ack.tag)]   = ack.status;
      t_ack[int'(ack.tag)] = cycle;
    end
  end

  // write data server: one page at a time, in request order
  initial begin
    forever begin
      @(negedge clk);
      if (rst_n && wreq_valid) begin
        automatic int t = wreq_tag;
        wreq_ready = 1; @(negedge clk); wreq_ready = 0;
        foreach (wbuf[t][i]) begin
          wdata_valid = 1; wdata.dev = DEV_W'(tdev[t]); wdata.data = wbuf[t][i];
          @(posedge clk); while (!wdata_ready) @(posedge clk);
          @(negedge clk);
        end
        wdata_valid = 0;
      end
    end
  end

  task automatic fill(int tag, int n, int seed);
    wbuf[tag].delete();
    for (int i = 0; i < n; i++) wbuf[tag].push_back(byte'((i * 7 + seed * 13 + (i >> 8)) ^ seed));
  endtask

  task automatic send(flash_op_e op, int tag, int dev, int bus, int chip, int blk, int pg);
    rbuf.delete(tag); acks.delete(tag); ast.delete(tag);
    tdev[tag] = dev;
    @(negedge clk);
    req = '0; req.op = op; req.tag = TAG_W'(tag); req.dev = DEV_W'(dev); req.bus = BUS_W'(bus);
    req.chip = CHIP_W'(chip); req.block = BLOCK_W'(blk); req.page = PAGE_W'(pg);
    req_valid = 1;
    @(posedge clk); while (!req_ready) @(posedge clk);
    t_sent[tag] = cycle;
    @(negedge clk); req_valid = 0;
  endtask

  task automatic wait_ack(int tag);
    while (!acks.exists(tag)) @(posedge clk);
  endtask
endmodule
