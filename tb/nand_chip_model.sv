// nand_chip_model: behavioural model of one NAND flash chip (die) for testbenches.
//
// Not synthesizable logic: a simulation model of a bought-in part. It follows the byte-wide,
// one-cycle-per-byte bus of nand_io. Commands: 00h [+5 address bytes +30h] (array read taking
// T_R cycles; 00h alone returns to data output after a status read), 80h + 5 address bytes +
// data + 10h (program, T_PROG cycles), 60h + 3 row bytes + D0h (erase, T_BERS cycles), 70h
// (status read: bit 6 ready, bit 0 fail). Data is kept sparsely per written page; an unwritten
// page reads as FFh. Programming or erasing block BAD_BLOCK fails. On readout, the first
// err_per_cw bytes of every 255-byte codeword slot are corrupted to exercise the ECC.
//
// The chip is bought in and not described by the document; this model's command set and
// timing are this design's assumptions (ONFI-style).
module nand_chip_model #(
  parameter int unsigned STORED    = 8600,
  parameter int unsigned T_R       = 50,
  parameter int unsigned T_PROG    = 200,
  parameter int unsigned T_BERS    = 300,
  parameter int unsigned BAD_BLOCK = 4095
) (
  input  logic       clk,
  input  logic       ce_n,
  input  logic       cle,
  input  logic       ale,
  input  logic       we_n,
  input  logic       re_n,
  input  logic [7:0] dq_in,
  output logic [7:0] dq_out,
  input  int         err_per_cw
);
  byte unsigned mem [longint];
  bit           written [int];
  byte unsigned page_reg [];
  byte unsigned addr [5];
  int           n_addr = 0;
  int           col = 0;
  int           busy = 0;
  bit           fail = 0;
  bit           status_mode = 0;
  bit           loading = 0;
  logic [7:0]   last_cmd = 8'h00;
  int           reads = 0, programs = 0, erases = 0;

  initial begin
    page_reg = new[STORED];
    dq_out = 8'h00;
  end

  function automatic int row_of();
    if (last_cmd == 8'h60) return {8'h00, addr[2], addr[1], addr[0]};
    return {8'h00, addr[4], addr[3], addr[2]};
  endfunction

  always @(posedge clk) begin
    if (busy > 0) busy <= busy - 1;
    if (!ce_n && !we_n) begin
      if (cle) begin
        unique case (dq_in)
          8'h00: begin last_cmd <= dq_in; n_addr <= 0; status_mode <= 0; col <= 0; end
          8'h80: begin last_cmd <= dq_in; n_addr <= 0; status_mode <= 0; col <= 0; loading <= 1;
                       foreach (page_reg[i]) page_reg[i] = 8'hFF; end
          8'h60: begin last_cmd <= dq_in; n_addr <= 0; status_mode <= 0; end
          8'h70: status_mode <= 1;
          8'h30: begin
            automatic int row = row_of();
            for (int i = 0; i < STORED; i++)
              page_reg[i] = written.exists(row) ? mem[longint'(row) * 16384 + i] : 8'hFF;
            busy <= T_R; col <= 0; reads <= reads + 1;
          end
          8'h10: begin
            automatic int row = row_of();
            loading <= 0;
            fail <= ((row >> 8) == BAD_BLOCK);
            if ((row >> 8) != BAD_BLOCK) begin
              for (int i = 0; i < STORED; i++) mem[longint'(row) * 16384 + i] = page_reg[i];
              written[row] = 1;
            end
            busy <= T_PROG; programs <= programs + 1;
          end
          8'hD0: begin
            automatic int row = row_of();
            fail <= ((row >> 8) == BAD_BLOCK);
            for (int p = 0; p < 256; p++) written.delete((row & ~255) | p);
            busy <= T_BERS; erases <= erases + 1;
          end
          default: ;
        endcase
      end else if (ale) begin
        if (n_addr < 5) addr[n_addr] <= dq_in;
        n_addr <= n_addr + 1;
      end else if (loading) begin
        if (col < STORED) page_reg[col] = dq_in;
        col <= col + 1;
      end
    end
    if (!ce_n && !re_n) begin
      if (status_mode) dq_out <= {1'b0, busy == 0, busy == 0, 4'b0, fail};
      else begin
        automatic byte unsigned b = (col < STORED) ? page_reg[col] : 8'hFF;
        if ((col % 255) < err_per_cw) b = b ^ 8'h5A;
        dq_out <= b;
        col <= col + 1;
      end
    end
  end
endmodule
