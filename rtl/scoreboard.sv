// scoreboard: per-chip operation table and bus scheduler of one flash bus.
//
// Each chip on the bus holds at most one flash operation. An operation moves through phases:
// a read is a command burst, the chip's busy time, status polls, and a page data transfer; a
// write is a data transfer (command, address, page data, confirm), busy time and status polls;
// an erase is a command burst, busy time and status polls. While a chip is busy it is polled
// every POLL_INTERVAL cycles. Whenever the bus is free the scheduler picks the next bus
// operation among all chips in priority round-robin order: starting from the chip after the
// last one served, it takes the first chip with the highest priority, where short
// command/address bursts and status polls rank above long data transfers and, within a class,
// the older request (longer in the table) ranks higher. Finished operations wait in the
// table until their acknowledgement {tag, status} is taken; acks are sent in round-robin order.
// Interfaces: req_* (valid/ready; a request is accepted when its chip's entry is free),
// issue_* (valid/ready, one operation at a time; io_done closes it with the polled status
// byte or the read's uncorrectable flag), ack_* (valid/ready). The scheduling rule is the
// document's; the phase breakdown, polling interval and age measure are this design's.
module scoreboard
  import minflash_pkg::*;
#(
  parameter int unsigned NCHIP         = 8,
  parameter int unsigned POLL_INTERVAL = 64,  // cycles between status polls of a busy chip
  parameter int unsigned AGE_W         = 12
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               req_valid,
  output logic               req_ready,
  input  flash_req_t         req,
  output logic               issue_valid,
  input  logic               issue_ready,
  output io_kind_e           issue_kind,
  output logic [CHIP_W-1:0]  issue_chip,
  output logic [BLOCK_W-1:0] issue_block,
  output logic [PAGE_W-1:0]  issue_page,
  output logic [TAG_W-1:0]   issue_tag,
  input  logic               io_done,
  input  logic [7:0]         io_status,
  input  logic               io_uncorr,
  output logic               ack_valid,
  input  logic               ack_ready,
  output ack_t               ack
);
  localparam int unsigned TW = $clog2(POLL_INTERVAL + 1);
  localparam int unsigned CI = $clog2(NCHIP > 1 ? NCHIP : 2);

  typedef enum logic [2:0] {E_IDLE, E_CMD, E_WDATA, E_BUSY, E_POLL, E_RDATA, E_ACTIVE, E_ACK}
    phase_e;

  typedef struct packed {
    phase_e             phase;
    flash_op_e          op;
    logic [TAG_W-1:0]   tag;
    logic [BLOCK_W-1:0] block;
    logic [PAGE_W-1:0]  page;
    logic [AGE_W-1:0]   age;
    logic [TW-1:0]      timer;
    ack_status_e        status;
  } entry_t;

  entry_t        ent [NCHIP];
  logic          active;
  logic [CI-1:0] active_chip;
  io_kind_e      active_kind;
  logic [CI-1:0] rr_ptr;

  // ---- scheduler ----
  logic          sel_valid;
  logic [CI-1:0] sel;
  always_comb begin
    logic [AGE_W:0] best_key, key;
    sel_valid = 1'b0;
    sel       = '0;
    best_key  = '0;
    for (int unsigned i = 0; i < NCHIP; i++) begin
      int unsigned idx;
      logic elig, short_op;
      idx      = (int'(rr_ptr) + i) % NCHIP;
      elig     = ent[idx].phase inside {E_CMD, E_WDATA, E_POLL, E_RDATA};
      short_op = ent[idx].phase inside {E_CMD, E_POLL};
      key      = {short_op, ent[idx].age};
      if (elig && (!sel_valid || key > best_key)) begin
        sel_valid = 1'b1;
        sel       = CI'(idx);
        best_key  = key;
      end
    end
  end

  always_comb begin
    unique case (ent[sel].phase)
      E_CMD:   issue_kind = (ent[sel].op == OP_READ) ? IO_CMD_READ : IO_CMD_ERASE;
      E_WDATA: issue_kind = IO_WRITE;
      E_POLL:  issue_kind = IO_POLL;
      default: issue_kind = IO_READOUT;
    endcase
  end

  assign issue_valid = sel_valid && !active;
  assign issue_chip  = CHIP_W'(sel);
  assign issue_block = ent[sel].block;
  assign issue_page  = ent[sel].page;
  assign issue_tag   = ent[sel].tag;

  assign req_ready = (ent[req.chip].phase == E_IDLE);

  // ---- acknowledgements ----
  logic [NCHIP-1:0] ack_req, ack_gnt;
  logic [CI-1:0]    ack_idx;
  always_comb for (int i = 0; i < NCHIP; i++) ack_req[i] = (ent[i].phase == E_ACK);
  rr_arbiter #(.N(NCHIP)) u_ack_arb (
    .clk, .rst_n, .req(ack_req), .advance(ack_ready), .grant(ack_gnt), .grant_idx(ack_idx)
  );
  assign ack_valid  = |ack_req;
  assign ack.tag    = ent[ack_idx].tag;
  assign ack.status = ent[ack_idx].status;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NCHIP; i++) ent[i] <= '0;
      active      <= 1'b0;
      active_chip <= '0;
      active_kind <= IO_CMD_READ;
      rr_ptr      <= '0;
    end else begin
      // ageing and poll timers
      for (int i = 0; i < NCHIP; i++) begin
        if (ent[i].phase != E_IDLE && ent[i].age != '1) ent[i].age <= ent[i].age + 1'b1;
        if (ent[i].phase == E_BUSY) begin
          if (ent[i].timer == '0) ent[i].phase <= E_POLL;
          else                    ent[i].timer <= ent[i].timer - 1'b1;
        end
      end
      // new request
      if (req_valid && req_ready) begin
        ent[req.chip].phase  <= (req.op == OP_WRITE) ? E_WDATA : E_CMD;
        ent[req.chip].op     <= req.op;
        ent[req.chip].tag    <= req.tag;
        ent[req.chip].block  <= req.block;
        ent[req.chip].page   <= req.page;
        ent[req.chip].age    <= '0;
        ent[req.chip].status <= ST_OK;
      end
      // issue
      if (issue_valid && issue_ready) begin
        ent[sel].phase <= E_ACTIVE;
        active         <= 1'b1;
        active_chip    <= sel;
        active_kind    <= issue_kind;
        rr_ptr         <= (sel == CI'(NCHIP - 1)) ? '0 : sel + 1'b1;
      end
      // completion of the bus operation
      if (active && io_done) begin
        active <= 1'b0;
        unique case (active_kind)
          IO_CMD_READ, IO_CMD_ERASE, IO_WRITE: begin
            ent[active_chip].phase <= E_BUSY;
            ent[active_chip].timer <= TW'(POLL_INTERVAL);
          end
          IO_POLL: begin
            if (!io_status[NAND_SR_RDY]) begin
              ent[active_chip].phase <= E_BUSY;
              ent[active_chip].timer <= TW'(POLL_INTERVAL);
            end else if (ent[active_chip].op == OP_READ) begin
              ent[active_chip].phase <= E_RDATA;
            end else begin
              ent[active_chip].phase  <= E_ACK;
              ent[active_chip].status <= io_status[NAND_SR_FAIL] ? ST_BAD_BLOCK : ST_OK;
            end
          end
          default: begin  // IO_READOUT
            ent[active_chip].phase  <= E_ACK;
            ent[active_chip].status <= io_uncorr ? ST_UNCORR : ST_OK;
          end
        endcase
      end
      // acknowledgement taken
      if (ack_valid && ack_ready) ent[ack_idx].phase <= E_IDLE;
    end
  end

  // One bus operation at a time.
  assert property (@(posedge clk) disable iff (!rst_n) io_done |-> active);

endmodule
