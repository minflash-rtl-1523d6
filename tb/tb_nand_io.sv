// tb_nand_io: checks the byte sequences of the NAND I/O primitives on the bus.
//
// A bus monitor records every latched command/address/data byte and the selected chip. For
// each primitive the recorded sequence is compared with the expected one (commands, the five
// or three address bytes, write data), the readout must deliver the bytes the testbench's
// chip stand-in drives (with the consumer stalling), and a poll must return the status byte.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_nand_io;
  import minflash_pkg::*;
  localparam int PAGE = 20, STORED = stored_bytes(PAGE);
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic op_valid, op_ready, done, wr_valid, wr_ready, rd_valid, rd_ready;
  io_kind_e op_kind;
  logic [CHIP_W-1:0] op_chip;
  logic [BLOCK_W-1:0] op_block;
  logic [PAGE_W-1:0] op_page;
  logic [7:0] status, wr_data, rd_data, nand_dq_i;
  nand_out_t nand_o;
  int checks = 0, failures = 0;

  nand_io #(.NCHIP(4), .PAGE_BYTES(PAGE)) dut (.*);

  typedef struct { bit cle; bit ale; logic [7:0] d; } cyc_t;
  cyc_t seq [$];
  int   sel_chip;
  int   rcnt = 0;
  byte unsigned got [$];

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!nand_o.we_n) begin
      seq.push_back('{nand_o.cle, nand_o.ale, nand_o.dq_o});
      for (int c = 0; c < 4; c++) if (!nand_o.ce_n[c]) sel_chip = c;
    end
    // chip stand-in: data out = 3*n+1, or status 0x41 after a 70h command
    if (!nand_o.re_n) begin
      nand_dq_i <= (seq.size() > 0 && seq[$].d == 8'h70 && seq[$].cle) ? 8'h41 : 8'(3 * rcnt + 1);
      rcnt <= rcnt + 1;
    end
    rd_ready <= ($urandom % 3) != 0;
    if (rd_valid && rd_ready) got.push_back(rd_data);
  end

  task automatic run(io_kind_e k, int chip, int blk, int pg);
    seq.delete();
    @(negedge clk);
    op_valid = 1; op_kind = k; op_chip = CHIP_W'(chip); op_block = BLOCK_W'(blk);
    op_page = PAGE_W'(pg);
    @(posedge clk); while (!op_ready) @(posedge clk);
    @(negedge clk); op_valid = 0;
    while (!done) @(posedge clk);
  endtask

  task automatic expect_seq(string name, cyc_t e [$]);
    checks++;
    if (seq.size() != e.size()) begin
      failures++; $display("%s: %0d cycles, expected %0d", name, seq.size(), e.size());
    end else
      foreach (e[i])
        if (seq[i] != e[i]) begin
          failures++; $display("%s: cycle %0d got %h expected %h", name, i, seq[i].d, e[i].d);
          break;
        end
  endtask

  initial begin
    cyc_t e [$];
    op_valid = 0; op_kind = IO_CMD_READ; op_chip = 0; op_block = 0; op_page = 0;
    wr_valid = 0; wr_data = 0; nand_dq_i = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // array read command
    run(IO_CMD_READ, 2, 12'hABC, 8'h5D);
    e = '{'{1,0,8'h00}, '{0,1,8'h00}, '{0,1,8'h00}, '{0,1,8'h5D}, '{0,1,8'hBC}, '{0,1,8'h0A}, '{1,0,8'h30}};
    expect_seq("read", e);
    checks++; if (sel_chip != 2) begin failures++; $display("chip select"); end
    // erase
    run(IO_CMD_ERASE, 1, 12'h123, 8'h00);
    e = '{'{1,0,8'h60}, '{0,1,8'h00}, '{0,1,8'h23}, '{0,1,8'h01}, '{1,0,8'hD0}};
    expect_seq("erase", e);
    // program with data
    fork
      run(IO_WRITE, 3, 12'h001, 8'h02);
      for (int i = 0; i < STORED; i++) begin
        @(negedge clk); wr_valid = ($urandom % 2); wr_data = 8'(i * 5);
        while (!wr_valid) begin @(negedge clk); wr_valid = ($urandom % 2); end
        @(posedge clk); while (!wr_ready) @(posedge clk);
        @(negedge clk); wr_valid = 0;
      end
    join
    e = '{'{1,0,8'h80}, '{0,1,8'h00}, '{0,1,8'h00}, '{0,1,8'h02}, '{0,1,8'h01}, '{0,1,8'h00}};
    for (int i = 0; i < STORED; i++) e.push_back('{0, 0, 8'(i * 5)});
    e.push_back('{1, 0, 8'h10});
    expect_seq("program", e);
    // status poll
    run(IO_POLL, 0, 0, 0);
    checks++; if (status != 8'h41) begin failures++; $display("status %h", status); end
    // readout with stalls
    rcnt = 0; got.delete();
    run(IO_READOUT, 1, 0, 0);
    while (got.size() < STORED) @(posedge clk);
    repeat (10) @(posedge clk);
    checks++;
    if (got.size() != STORED) begin failures++; $display("readout %0d bytes", got.size()); end
    foreach (got[i]) if (got[i] != 8'(3 * i + 1)) begin
      checks++; failures++; $display("readout byte %0d = %h", i, got[i]); break;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
