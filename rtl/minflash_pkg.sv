// minflash_pkg: types and constants shared by the minFlash cluster RTL.
//
// The host interface of minFlash is a raw, tagged flash interface: ReadPage, WritePage and
// EraseBlock name a device, bus, chip, block and page directly, and every request is answered
// by one Ack(tag, status). Read data and write data travel as tagged byte streams. The field
// widths below are sized for the prototype board (8 buses x 8 chips, 4096 blocks of 256 pages
// of 8 KiB per chip) and for up to 16 devices in one linear array; 7-bit tags give 128
// requests in flight per host and per controller. Tag counts, the 16-device limit and the
// encodings are this design's choices; the address dimensions follow the prototype.
package minflash_pkg;

  // Address field widths.
  localparam int unsigned DEV_W   = 4;   // up to 16 devices in the array
  localparam int unsigned BUS_W   = 3;   // 8 buses (channels) per device
  localparam int unsigned CHIP_W  = 3;   // 8 chips (ways) per bus
  localparam int unsigned BLOCK_W = 12;  // 4096 blocks per chip
  localparam int unsigned PAGE_W  = 8;   // 256 pages per block
  localparam int unsigned TAG_W   = 7;   // 128 host tags / controller tags

  localparam int unsigned MAX_CHIPS = 1 << CHIP_W;

  // Page and ECC framing: RS(255,243) over bytes, last codeword of a page shortened.
  localparam int unsigned DEFAULT_PAGE_BYTES = 8192;  // 8 KiB flash page
  localparam int unsigned RS_N       = 255;
  localparam int unsigned RS_K       = 243;
  localparam int unsigned RS_NPAR    = RS_N - RS_K;  // 12 parity bytes, corrects 6

  // Number of bytes a page occupies on the NAND chip: data plus 12 parity bytes per codeword.
  function automatic int unsigned stored_bytes(int unsigned page_bytes);
    return page_bytes + RS_NPAR * ((page_bytes + RS_K - 1) / RS_K);
  endfunction

  typedef enum logic [1:0] {
    OP_READ  = 2'd0,
    OP_WRITE = 2'd1,
    OP_ERASE = 2'd2
  } flash_op_e;

  typedef enum logic [1:0] {
    ST_OK        = 2'd0,  // completed
    ST_BAD_BLOCK = 2'd1,  // erase (or program) reported failure by the chip
    ST_UNCORR    = 2'd2   // read data had an uncorrectable codeword
  } ack_status_e;

  // A flash request. At the host side tag is the host tag, at the controller side the
  // controller tag.
  typedef struct packed {
    flash_op_e           op;
    logic [TAG_W-1:0]    tag;
    logic [DEV_W-1:0]    dev;
    logic [BUS_W-1:0]    bus;
    logic [CHIP_W-1:0]   chip;
    logic [BLOCK_W-1:0]  block;
    logic [PAGE_W-1:0]   page;
  } flash_req_t;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    logic [7:0]       data;
  } rdata_t;

  typedef struct packed {
    logic [TAG_W-1:0] tag;
    ack_status_e      status;
  } ack_t;

  // Write data sent by a host: the device it is for and one byte.
  typedef struct packed {
    logic [DEV_W-1:0] dev;
    logic [7:0]       data;
  } wdata_t;

  // Bus operations executed by the NAND I/O primitives.
  typedef enum logic [2:0] {
    IO_CMD_READ  = 3'd0,  // read command and address; the chip then reads the array
    IO_CMD_ERASE = 3'd1,  // erase command and row address
    IO_WRITE     = 3'd2,  // program command, address, page data, confirm
    IO_POLL      = 3'd3,  // status read
    IO_READOUT   = 3'd4   // transfer of the page register to the controller
  } io_kind_e;

  // Inter-controller network: one virtual channel per flash datapath.
  typedef enum logic [2:0] {
    VC_REQ   = 3'd0,
    VC_RDATA = 3'd1,
    VC_ACK   = 3'd2,
    VC_WREQ  = 3'd3,
    VC_WDATA = 3'd4
  } vc_e;
  localparam int unsigned NVC = 5;

  // Payload holds a request's {op, bus, chip, block, page}, a data byte or an ack status.
  localparam int unsigned PAYLOAD_W = 2 + BUS_W + CHIP_W + BLOCK_W + PAGE_W;

  typedef struct packed {
    logic [DEV_W-1:0]     dst;
    logic [DEV_W-1:0]     src;
    logic [TAG_W-1:0]     tag;
    logic [PAYLOAD_W-1:0] payload;
  } flit_t;

  // What travels on one inter-controller link in one cycle.
  typedef struct packed {
    logic  valid;
    vc_e   vc;
    flit_t flit;
  } link_flit_t;

  // Signals the controller drives on one NAND bus (ONFI-style asynchronous interface,
  // one bus cycle per clock).
  typedef struct packed {
    logic [MAX_CHIPS-1:0] ce_n;
    logic                 cle;
    logic                 ale;
    logic                 we_n;
    logic                 re_n;
    logic                 dq_oe;
    logic [7:0]           dq_o;
  } nand_out_t;

  // NAND commands used by the I/O primitives.
  localparam logic [7:0] NAND_READ1   = 8'h00;
  localparam logic [7:0] NAND_READ2   = 8'h30;
  localparam logic [7:0] NAND_PROG1   = 8'h80;
  localparam logic [7:0] NAND_PROG2   = 8'h10;
  localparam logic [7:0] NAND_ERASE1  = 8'h60;
  localparam logic [7:0] NAND_ERASE2  = 8'hD0;
  localparam logic [7:0] NAND_STATUS  = 8'h70;
  localparam int unsigned NAND_SR_FAIL = 0;  // status register bit: last operation failed
  localparam int unsigned NAND_SR_RDY  = 6;  // status register bit: chip ready

  // Request to the request payload and back.
  function automatic logic [PAYLOAD_W-1:0] req_payload(flash_req_t r);
    return {r.op, r.bus, r.chip, r.block, r.page};
  endfunction

  function automatic flash_req_t payload_req(logic [PAYLOAD_W-1:0] p, logic [TAG_W-1:0] tag,
                                             logic [DEV_W-1:0] dev);
    flash_req_t r;
    {r.op, r.bus, r.chip, r.block, r.page} = p;
    r.tag = tag;
    r.dev = dev;
    return r;
  endfunction

endpackage
