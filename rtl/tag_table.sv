// tag_table: controller-tag renaming table of the flash interface router.
//
// Hosts tag their requests with their own host tags, so two hosts may use the same tag on one
// controller. Each request entering the controller is therefore given a free controller tag
// (ctag) taken from a free queue, and the original host tag and the requesting host (source
// device ID) are stored in a table indexed by the ctag. Responses from the controller carry
// the ctag and look the table up (NLOOK lookup ports, combinational reads: one each for read
// data, acks and write-data requests). The final response of a request, its ack,
// returns the ctag to the free queue (free_valid). After reset the queue holds all NTAG tags.
// alloc_* is a valid/ready handshake: alloc_ready is low while no tag is free. The mechanism
// is the document's (Fig. 3); the table size is this design's choice.
module tag_table
  import minflash_pkg::*;
#(
  parameter int unsigned NTAG  = 128,
  parameter int unsigned NLOOK = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  // allocation
  input  logic             alloc_valid,
  output logic             alloc_ready,
  input  logic [TAG_W-1:0] alloc_htag,
  input  logic [DEV_W-1:0] alloc_src,
  output logic [TAG_W-1:0] alloc_ctag,
  // lookups
  input  logic [TAG_W-1:0] look_ctag [NLOOK],
  output logic [TAG_W-1:0] look_htag [NLOOK],
  output logic [DEV_W-1:0] look_src  [NLOOK],
  // release
  input  logic             free_valid,
  input  logic [TAG_W-1:0] free_ctag,
  output logic [$clog2(NTAG+1)-1:0] free_count
);
  localparam int unsigned AW = $clog2(NTAG > 1 ? NTAG : 2);
  localparam int unsigned CW = $clog2(NTAG + 1);

  logic [TAG_W-1:0] htag_mem [NTAG];
  logic [DEV_W-1:0] src_mem  [NTAG];
  logic [TAG_W-1:0] freeq    [NTAG];
  logic [AW-1:0]    rd_ptr, wr_ptr;
  logic             init_done;
  logic [AW-1:0]    init_cnt;

  wire do_alloc = alloc_valid && alloc_ready;

  assign alloc_ready = init_done && (free_count != '0);
  assign alloc_ctag  = freeq[rd_ptr];
  always_comb begin
    for (int i = 0; i < NLOOK; i++) begin
      look_htag[i] = htag_mem[AW'(look_ctag[i])];
      look_src[i]  = src_mem[AW'(look_ctag[i])];
    end
  end

  always_ff @(posedge clk) begin
    if (do_alloc) begin
      htag_mem[AW'(alloc_ctag)] <= alloc_htag;
      src_mem[AW'(alloc_ctag)]  <= alloc_src;
    end
    if (!init_done)      freeq[init_cnt] <= TAG_W'(init_cnt);
    else if (free_valid) freeq[wr_ptr]   <= free_ctag;
  end

  // After reset the free queue is filled with tags 0..NTAG-1, one per cycle.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      init_done  <= 1'b0;
      init_cnt   <= '0;
      rd_ptr     <= '0;
      wr_ptr     <= '0;
      free_count <= '0;
    end else if (!init_done) begin
      init_cnt <= init_cnt + 1'b1;
      if (init_cnt == AW'(NTAG - 1)) begin
        init_done  <= 1'b1;
        free_count <= CW'(NTAG);
      end
    end else begin
      if (do_alloc)   rd_ptr <= (rd_ptr == AW'(NTAG - 1)) ? '0 : rd_ptr + 1'b1;
      if (free_valid) wr_ptr <= (wr_ptr == AW'(NTAG - 1)) ? '0 : wr_ptr + 1'b1;
      case ({do_alloc, free_valid})
        2'b10:   free_count <= free_count - 1'b1;
        2'b01:   free_count <= free_count + 1'b1;
        default: free_count <= free_count;
      endcase
    end
  end

  // A tag can only be returned while some tag is out.
  assert property (@(posedge clk) disable iff (!rst_n || !init_done)
                   free_valid |-> (free_count != CW'(NTAG) || do_alloc));

endmodule
