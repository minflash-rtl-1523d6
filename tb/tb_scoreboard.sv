// tb_scoreboard: checks the per-chip table and the bus scheduler of one bus.
//
// The testbench plays the I/O primitives: it takes each issued operation, records it, and
// reports completion two cycles later with a status byte (the first poll of chip 3 reports
// busy, erase polls of chip 2 report failure). The bus is held while four chips become
// eligible at once: chip 0 waiting for its page transfer (oldest, long), then new requests to
// chips 1, 3 and 2 in that order (short command bursts). The expected issue order is chip 1,
// chip 3, chip 2 (short before long, older before newer even against the rotating pointer),
// then chip 0's transfer. Acks must arrive once per tag with the right status, and a busy
// chip must be polled again.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_scoreboard;
  import minflash_pkg::*;
  localparam int NCHIP = 4, PI = 20;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic req_valid, req_ready, issue_valid, issue_ready, io_done, io_uncorr, ack_valid, ack_ready;
  flash_req_t req;
  io_kind_e issue_kind;
  logic [CHIP_W-1:0] issue_chip;
  logic [BLOCK_W-1:0] issue_block;
  logic [PAGE_W-1:0] issue_page;
  logic [TAG_W-1:0] issue_tag;
  logic [7:0] io_status;
  ack_t ack;
  int checks = 0, failures = 0;

  scoreboard #(.NCHIP(NCHIP), .POLL_INTERVAL(PI)) dut (.*);

  typedef struct { io_kind_e k; int chip; } iss_t;
  iss_t issued [$];
  int polls3 = 0;
  int acks [int];
  ack_status_e ast [int];
  bit hold = 0;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // I/O primitive model
  initial begin
    io_done = 0; io_status = 0; io_uncorr = 0; issue_ready = 0;
    forever begin
      @(negedge clk);
      issue_ready = !hold;
      if (issue_valid && issue_ready) begin
        automatic iss_t it = '{issue_kind, int'(issue_chip)};
        issued.push_back(it);
        @(negedge clk); issue_ready = 0;
        @(negedge clk);
        io_done = 1;
        io_status = 8'h40;
        if (it.k == IO_POLL && it.chip == 3) begin
          polls3++;
          if (polls3 == 1) io_status = 8'h00;
        end
        if (it.k == IO_POLL && it.chip == 2) io_status = 8'h41;
        io_uncorr = (it.k == IO_READOUT && it.chip == 0);
        if (it.k == IO_POLL && it.chip == 0) hold = 1;
        @(negedge clk); io_done = 0;
      end
    end
  end

  always @(posedge clk)
    if (rst_n && ack_valid && ack_ready) begin
      if (acks.exists(int'(ack.tag))) acks[int'(ack.tag)] += 1; else acks[int'(ack.tag)] = 1;
      ast[int'(ack.tag)] = ack.status;
    end
  assign ack_ready = 1'b1;

  task automatic send(flash_op_e op, int tag, int chip);
    @(negedge clk);
    req = '0; req.op = op; req.tag = TAG_W'(tag); req.chip = CHIP_W'(chip); req.block = 12'd5;
    req_valid = 1;
    @(posedge clk); while (!req_ready) @(posedge clk);
    @(negedge clk); req_valid = 0;
  endtask

  function automatic string s(iss_t i); return $sformatf("%s/%0d", i.k.name(), i.chip); endfunction

  initial begin
    req_valid = 0; req = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    send(OP_READ, 10, 0);
    wait (hold);                    // chip 0 polled ready: its transfer is now pending
    send(OP_READ, 11, 1);
    repeat (5) @(posedge clk);
    send(OP_ERASE, 13, 3);
    repeat (5) @(posedge clk);
    send(OP_ERASE, 12, 2);
    repeat (3) @(posedge clk);
    hold = 0;
    while (acks.size() < 4) @(posedge clk);
    repeat (5) @(posedge clk);
    checks++;
    if (issued.size() < 6 || s(issued[0]) != "IO_CMD_READ/0" || s(issued[1]) != "IO_POLL/0" ||
        s(issued[2]) != "IO_CMD_READ/1" || s(issued[3]) != "IO_CMD_ERASE/3" ||
        s(issued[4]) != "IO_CMD_ERASE/2" || s(issued[5]) != "IO_READOUT/0") begin
      failures++;
      foreach (issued[i]) $display("issue %0d: %s", i, s(issued[i]));
    end
    checks++; if (polls3 < 2) begin failures++; $display("busy chip not polled again"); end
    checks++;
    if (acks[10] != 1 || ast[10] != ST_UNCORR || acks[11] != 1 || ast[11] != ST_OK ||
        acks[12] != 1 || ast[12] != ST_BAD_BLOCK || acks[13] != 1 || ast[13] != ST_OK) begin
      failures++; $display("ack mismatch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
