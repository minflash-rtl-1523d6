// nand_io: NAND I/O primitives of one flash bus.
//
// Executes one bus operation at a time, as a burst of byte cycles on the shared 8-bit NAND
// bus with a chip enable per chip. One byte moves per clock: a command (cle) or address (ale)
// byte is latched by the selected chip in a cycle with we_n low; a data byte is read by holding
// re_n low for a cycle, and the chip's byte is captured from dq_i in the next cycle.
//   IO_CMD_READ : 00h, 5 address bytes, 30h            (starts the array read, tR)
//   IO_CMD_ERASE: 60h, 3 row address bytes, D0h        (starts the block erase)
//   IO_WRITE    : 80h, 5 address bytes, data, 10h      (loads and programs a page)
//   IO_POLL     : 70h, then one status byte read        (status polling)
//   IO_READOUT  : 00h, then the page bytes read out     (after tR, data to the ECC decoder)
// Address bytes are column 0, 0, then row {page}, {block[7:0]}, {4'b0, block[11:8]}.
// Write data comes from wr_* (the ECC encoder), read data leaves on rd_* through a 4-entry
// queue; re_n is only pulsed while the queue has room, so the consumer can stall the bus.
// done pulses when an operation ends, with the polled status byte. The list of primitives
// follows the document's bus controller; the byte sequences are the ONFI-style conventions
// chosen by this design (the document does not give them).
module nand_io
  import minflash_pkg::*;
#(
  parameter int unsigned NCHIP      = 8,
  parameter int unsigned PAGE_BYTES = DEFAULT_PAGE_BYTES
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // operation
  input  logic                 op_valid,
  output logic                 op_ready,
  input  io_kind_e             op_kind,
  input  logic [CHIP_W-1:0]    op_chip,
  input  logic [BLOCK_W-1:0]   op_block,
  input  logic [PAGE_W-1:0]    op_page,
  output logic                 done,
  output logic [7:0]           status,
  // write data stream
  input  logic                 wr_valid,
  output logic                 wr_ready,
  input  logic [7:0]           wr_data,
  // read data stream
  output logic                 rd_valid,
  input  logic                 rd_ready,
  output logic [7:0]           rd_data,
  // NAND bus
  output nand_out_t            nand_o,
  input  logic [7:0]           nand_dq_i
);
  localparam int unsigned STORED = stored_bytes(PAGE_BYTES);
  localparam int unsigned CNT_W  = $clog2(STORED + 1);

  typedef enum logic [2:0] {S_IDLE, S_CMD1, S_ADDR, S_WDATA, S_CMD2, S_RDATA, S_POLL, S_POLLWAIT}
    io_state_e;

  io_state_e          state;
  io_kind_e           kind;
  logic [CHIP_W-1:0]  chip;
  logic [BLOCK_W-1:0] block;
  logic [PAGE_W-1:0]  page;
  logic [CNT_W-1:0]   cnt;        // address bytes / data bytes issued
  logic [CNT_W-1:0]   captured;   // read bytes captured
  logic               rd_pending; // a re_n cycle was issued last cycle

  // read queue
  logic       q_in_ready;
  logic [2:0] q_count;
  sync_fifo #(.WIDTH(8), .DEPTH(4)) u_rdq (
    .clk, .rst_n,
    .in_valid (rd_pending && state == S_RDATA),
    .in_ready (q_in_ready),
    .in_data  (nand_dq_i),
    .out_valid(rd_valid),
    .out_ready(rd_ready),
    .out_data (rd_data),
    .count    (q_count)
  );

  logic [7:0] addr_byte;
  always_comb begin
    unique case (cnt[2:0])
      3'd0, 3'd1: addr_byte = (kind == IO_CMD_ERASE) ? (cnt[0] ? block[7:0] : page) : 8'h00;
      3'd2:       addr_byte = (kind == IO_CMD_ERASE) ? {4'b0, block[11:8]} : page;
      3'd3:       addr_byte = block[7:0];
      default:    addr_byte = {4'b0, block[11:8]};
    endcase
  end
  wire [2:0] n_addr = (kind == IO_CMD_ERASE) ? 3'd3 : 3'd5;

  // room for one more read byte: queue entries plus the one in flight stay within 4
  wire rd_room = (32'(q_count) + (rd_pending ? 32'd1 : 32'd0)) < 32'd3;

  assign op_ready = (state == S_IDLE);
  assign wr_ready = (state == S_WDATA);

  always_comb begin
    nand_o       = '0;
    nand_o.ce_n  = '1;
    nand_o.we_n  = 1'b1;
    nand_o.re_n  = 1'b1;
    if (state != S_IDLE) nand_o.ce_n[chip] = 1'b0;
    unique case (state)
      S_CMD1: begin
        nand_o.cle   = 1'b1;
        nand_o.we_n  = 1'b0;
        nand_o.dq_oe = 1'b1;
        unique case (kind)
          IO_CMD_ERASE: nand_o.dq_o = NAND_ERASE1;
          IO_WRITE:     nand_o.dq_o = NAND_PROG1;
          IO_POLL:      nand_o.dq_o = NAND_STATUS;
          default:      nand_o.dq_o = NAND_READ1;
        endcase
      end
      S_ADDR: begin
        nand_o.ale   = 1'b1;
        nand_o.we_n  = 1'b0;
        nand_o.dq_oe = 1'b1;
        nand_o.dq_o  = addr_byte;
      end
      S_WDATA: begin
        nand_o.we_n  = !wr_valid;
        nand_o.dq_oe = 1'b1;
        nand_o.dq_o  = wr_data;
      end
      S_CMD2: begin
        nand_o.cle   = 1'b1;
        nand_o.we_n  = 1'b0;
        nand_o.dq_oe = 1'b1;
        unique case (kind)
          IO_CMD_ERASE: nand_o.dq_o = NAND_ERASE2;
          IO_WRITE:     nand_o.dq_o = NAND_PROG2;
          default:      nand_o.dq_o = NAND_READ2;
        endcase
      end
      S_RDATA: nand_o.re_n = !(rd_room && cnt != CNT_W'(STORED));
      S_POLL:  nand_o.re_n = 1'b0;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      kind       <= IO_CMD_READ;
      chip       <= '0;
      block      <= '0;
      page       <= '0;
      cnt        <= '0;
      captured   <= '0;
      rd_pending <= 1'b0;
      done       <= 1'b0;
      status     <= '0;
    end else begin
      done       <= 1'b0;
      rd_pending <= !nand_o.re_n;
      unique case (state)
        S_IDLE: if (op_valid) begin
          kind  <= op_kind;
          chip  <= op_chip;
          block <= op_block;
          page  <= op_page;
          cnt   <= '0;
          captured <= '0;
          state <= S_CMD1;
        end
        S_CMD1: begin
          unique case (kind)
            IO_POLL:    state <= S_POLL;
            IO_READOUT: state <= S_RDATA;
            default:    state <= S_ADDR;
          endcase
        end
        S_ADDR: begin
          cnt <= cnt + 1'b1;
          if (cnt[2:0] == n_addr - 3'd1) begin
            cnt   <= '0;
            state <= (kind == IO_WRITE) ? S_WDATA : S_CMD2;
          end
        end
        S_WDATA: if (wr_valid) begin
          cnt <= cnt + 1'b1;
          if (cnt == CNT_W'(STORED - 1)) state <= S_CMD2;
        end
        S_CMD2: begin
          state <= S_IDLE;
          done  <= 1'b1;
        end
        S_RDATA: begin
          if (!nand_o.re_n) cnt <= cnt + 1'b1;
          if (rd_pending) captured <= captured + 1'b1;
          if (rd_pending && captured == CNT_W'(STORED - 1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end
        end
        S_POLL: state <= S_POLLWAIT;
        S_POLLWAIT: begin
          status <= nand_dq_i;
          state  <= S_IDLE;
          done   <= 1'b1;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The read queue never overflows: re_n is only issued while it has room.
  assert property (@(posedge clk) disable iff (!rst_n)
                   (rd_pending && state == S_RDATA) |-> q_in_ready);

endmodule
