// ctrl_model: behavioural stand-in for a flash controller, for router testbenches.
//
// Not synthesizable. Accepts requests under controller tags (checking that no tag is reused
// while outstanding), serves them one at a time after a short delay: a write asks for its
// NBYTES bytes of write data and stores them per (block, page); a read returns the stored
// bytes (or a pattern if never written) tagged with the controller tag, then acks; an erase
// just acks.
//
// Simulation only; its behaviour is this testbench's own, not the document's.
module ctrl_model
  import minflash_pkg::*;
#(
  parameter int NBYTES = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req_valid,
  output logic             req_ready,
  input  flash_req_t       req,
  output logic             rdata_valid,
  input  logic             rdata_ready,
  output rdata_t           rdata,
  output logic             ack_valid,
  input  logic             ack_ready,
  output ack_t             ack,
  output logic             wreq_valid,
  input  logic             wreq_ready,
  output logic [TAG_W-1:0] wreq_tag,
  input  logic             wdata_valid,
  output logic             wdata_ready,
  input  logic [7:0]       wdata
);
  flash_req_t   pending [$];
  bit           outstanding [int];
  byte unsigned store [int][$];
  int           tag_reuse = 0;
  int           served = 0;

  initial begin
    req_ready = 0; rdata_valid = 0; rdata = '0; ack_valid = 0; ack = '0;
    wreq_valid = 0; wreq_tag = '0; wdata_ready = 0;
  end

  always @(posedge clk) begin
    req_ready <= ($urandom % 2);
    if (rst_n && req_valid && req_ready) begin
      if (outstanding.exists(int'(req.tag))) tag_reuse++;
      outstanding[int'(req.tag)] = 1;
      pending.push_back(req);
    end
  end

  initial begin
    forever begin
      @(negedge clk);
      if (pending.size() > 0) begin
        automatic flash_req_t r = pending.pop_front();
        automatic int key = {r.block, r.page};
        repeat (5) @(negedge clk);
        if (r.op == OP_WRITE) begin
          wreq_valid = 1; wreq_tag = r.tag;
          @(posedge clk); while (!wreq_ready) @(posedge clk);
          @(negedge clk); wreq_valid = 0;
          store[key].delete();
          wdata_ready = 1;
          while (store[key].size() < NBYTES) begin
            @(posedge clk);
            if (wdata_valid) store[key].push_back(wdata);
          end
          @(negedge clk); wdata_ready = 0;
        end else if (r.op == OP_READ) begin
          for (int i = 0; i < NBYTES; i++) begin
            rdata_valid = 1; rdata.tag = r.tag;
            rdata.data = store.exists(key) ? store[key][i] : 8'(key + i);
            @(posedge clk); while (!rdata_ready) @(posedge clk);
            @(negedge clk);
          end
          rdata_valid = 0;
        end
        ack_valid = 1; ack.tag = r.tag; ack.status = ST_OK;
        @(posedge clk); while (!ack_ready) @(posedge clk);
        outstanding.delete(int'(r.tag));
        served++;
        @(negedge clk); ack_valid = 0;
      end
    end
  end
endmodule
