// vc_merge_split: one response datapath of the flash interface router (Fig. 3 pattern).
//
// Items produced on this device (loc_*, e.g. read data after the tag lookup, already carrying
// their destination device in dst) and items arriving from the network virtual channel
// (net_*) are merged by a rotating-priority arbiter, then split by destination: items for
// this device (dst == my_id) go to the local host side (host_*), all others to the network
// virtual channel (tx_*), stamped with this device as source. All ports are valid/ready; an
// item is taken when the selected output is ready. Combinational, apart from the arbiter's
// priority pointer.
//
// The merge-then-split structure follows the document's figure of the read datapath; using it
// for acks and write traffic too is this design's choice.
module vc_merge_split
  import minflash_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DEV_W-1:0] my_id,
  input  logic             loc_valid,
  output logic             loc_ready,
  input  flit_t            loc_flit,
  input  logic             net_valid,
  output logic             net_ready,
  input  flit_t            net_flit,
  output logic             host_valid,
  input  logic             host_ready,
  output flit_t            host_flit,
  output logic             tx_valid,
  input  logic             tx_ready,
  output flit_t            tx_flit
);
  logic [1:0] gnt;
  logic       gidx;
  flit_t      m;
  logic       m_valid, m_local, m_ready;

  rr_arbiter #(.N(2)) u_arb (
    .clk, .rst_n, .req({net_valid, loc_valid}), .advance(m_ready), .grant(gnt), .grant_idx(gidx)
  );

  assign m_valid = loc_valid || net_valid;
  assign m       = gidx ? net_flit : loc_flit;
  assign m_local = (m.dst == my_id);
  assign m_ready = m_local ? host_ready : tx_ready;

  assign loc_ready = gnt[0] && m_ready;
  assign net_ready = gnt[1] && m_ready;

  assign host_valid = m_valid && m_local;
  assign host_flit  = m;
  assign tx_valid   = m_valid && !m_local;
  always_comb begin
    tx_flit     = m;
    tx_flit.src = my_id;
  end

endmodule
