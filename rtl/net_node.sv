// net_node: inter-controller network router of one minFlash device (linear array).
//
// Devices are chained in a line, each linked to the next device "up" and the previous one
// "down". Routing is deterministic: a flit whose destination is this device is ejected to the
// flash interface router, a higher destination goes up, a lower one goes down. Every flash
// datapath (request, read data, ack, write-data request, write data) has its own virtual
// channel with its own input buffer of VC_DEPTH flits per link, so a blocked datapath never
// blocks another. Flow control is credit based per link and per virtual channel: a sender
// holds one credit per free buffer slot at the receiver, spends one per flit and gets it back
// (rx_credit pulse) when the receiver forwards the flit. Each output (up link, down link, and
// the ejection port of each channel) is shared by a rotating-priority arbiter. The link itself
// (the multi-gigabit transceiver) is outside this module: a link is one flit per cycle with
// a valid bit and its channel number. Linear topology, per-datapath virtual channels and
// rotating arbitration are the document's; the credit scheme here is hop-by-hop and the
// buffer depth is this design's choice.
module net_node
  import minflash_pkg::*;
#(
  parameter int unsigned VC_DEPTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DEV_W-1:0] my_id,
  // local injection and ejection, one port per virtual channel
  input  logic [NVC-1:0]   inj_valid,
  output logic [NVC-1:0]   inj_ready,
  input  flit_t            inj_flit [NVC],
  output logic [NVC-1:0]   ej_valid,
  input  logic [NVC-1:0]   ej_ready,
  output flit_t            ej_flit [NVC],
  // link to the next device up
  output link_flit_t       up_tx,
  input  logic [NVC-1:0]   up_tx_credit,
  input  link_flit_t       up_rx,
  output logic [NVC-1:0]   up_rx_credit,
  // link to the next device down
  output link_flit_t       down_tx,
  input  logic [NVC-1:0]   down_tx_credit,
  input  link_flit_t       down_rx,
  output logic [NVC-1:0]   down_rx_credit
);
  localparam int unsigned NP  = 3;          // sources: 0 local, 1 up link, 2 down link
  localparam int unsigned NS  = NP * NVC;   // source queues
  localparam int unsigned CRW = $clog2(VC_DEPTH + 1);
  localparam int unsigned SI  = $clog2(NS);

  typedef enum logic [1:0] {R_EJECT, R_UP, R_DOWN} route_e;

  // Heads of the link input buffers (index (p-1)*NVC + v for link p = 1 up, 2 down) are kept
  // apart from the local injection ports, so ejection depends on link traffic only.
  localparam int unsigned NL = 2 * NVC;
  logic [NL-1:0] lhead_valid;
  flit_t         lhead [NL];
  route_e        lroute [NL];
  logic [NL-1:0] lpop;
  route_e        iroute [NVC];

  logic [NS-1:0] head_valid;
  flit_t         head [NS];
  route_e        route [NS];
  logic [NS-1:0] pop;

  // ---- input buffers of the two links ----
  for (genvar v = 0; v < NVC; v++) begin : g_vc
    logic up_in_ready, down_in_ready;
    sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(VC_DEPTH)) u_up_buf (
      .clk, .rst_n,
      .in_valid(up_rx.valid && up_rx.vc == vc_e'(v)), .in_ready(up_in_ready), .in_data(up_rx.flit),
      .out_valid(lhead_valid[v]), .out_ready(lpop[v]), .out_data(lhead[v]), .count()
    );
    sync_fifo #(.WIDTH($bits(flit_t)), .DEPTH(VC_DEPTH)) u_down_buf (
      .clk, .rst_n,
      .in_valid(down_rx.valid && down_rx.vc == vc_e'(v)), .in_ready(down_in_ready),
      .in_data(down_rx.flit),
      .out_valid(lhead_valid[NVC + v]), .out_ready(lpop[NVC + v]), .out_data(lhead[NVC + v]),
      .count()
    );
    assign up_rx_credit[v]   = lpop[v];
    assign down_rx_credit[v] = lpop[NVC + v];

    // Credits guarantee that a flit always finds room.
    assert property (@(posedge clk) disable iff (!rst_n)
                     (up_rx.valid && up_rx.vc == vc_e'(v)) |-> up_in_ready);
    assert property (@(posedge clk) disable iff (!rst_n)
                     (down_rx.valid && down_rx.vc == vc_e'(v)) |-> down_in_ready);
  end

  function automatic route_e route_of(logic [DEV_W-1:0] dst, logic [DEV_W-1:0] me);
    if (dst == me)     return R_EJECT;
    else if (dst > me) return R_UP;
    else               return R_DOWN;
  endfunction

  always_comb for (int v = 0; v < NVC; v++) iroute[v] = route_of(inj_flit[v].dst, my_id);
  always_comb for (int l = 0; l < NL; l++)  lroute[l] = route_of(lhead[l].dst, my_id);
  always_comb begin
    for (int v = 0; v < NVC; v++) begin
      head_valid[v] = inj_valid[v];
      head[v]       = inj_flit[v];
      route[v]      = iroute[v];
    end
    for (int l = 0; l < NL; l++) begin
      head_valid[NVC + l] = lhead_valid[l];
      head[NVC + l]       = lhead[l];
      route[NVC + l]      = lroute[l];
    end
  end
  always_comb for (int v = 0; v < NVC; v++) inj_ready[v] = pop[v];
  always_comb for (int l = 0; l < NL; l++)  lpop[l]      = pop[NVC + l];

  // ---- link outputs ----
  logic [CRW-1:0] up_cred [NVC];
  logic [CRW-1:0] down_cred [NVC];
  logic [NS-1:0]  up_req, down_req, up_gnt, down_gnt;
  logic [SI-1:0]  up_idx, down_idx;

  always_comb begin
    for (int s = 0; s < NS; s++) begin
      up_req[s]   = head_valid[s] && route[s] == R_UP   && up_cred[s % NVC]   != '0;
      down_req[s] = head_valid[s] && route[s] == R_DOWN && down_cred[s % NVC] != '0;
    end
  end

  rr_arbiter #(.N(NS)) u_up_arb (
    .clk, .rst_n, .req(up_req), .advance(1'b1), .grant(up_gnt), .grant_idx(up_idx)
  );
  rr_arbiter #(.N(NS)) u_down_arb (
    .clk, .rst_n, .req(down_req), .advance(1'b1), .grant(down_gnt), .grant_idx(down_idx)
  );

  assign up_tx.valid   = |up_req;
  assign up_tx.vc      = vc_e'(32'(up_idx) % NVC);
  assign up_tx.flit    = head[up_idx];
  assign down_tx.valid = |down_req;
  assign down_tx.vc    = vc_e'(32'(down_idx) % NVC);
  assign down_tx.flit  = head[down_idx];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int v = 0; v < NVC; v++) begin
        up_cred[v]   <= CRW'(VC_DEPTH);
        down_cred[v] <= CRW'(VC_DEPTH);
      end
    end else begin
      for (int v = 0; v < NVC; v++) begin
        up_cred[v] <= up_cred[v] + CRW'(up_tx_credit[v])
                      - CRW'(up_tx.valid && up_tx.vc == vc_e'(v));
        down_cred[v] <= down_cred[v] + CRW'(down_tx_credit[v])
                        - CRW'(down_tx.valid && down_tx.vc == vc_e'(v));
      end
    end
  end

  // ---- ejection, one arbiter per virtual channel ----
  // Only flits from the links are ejected: the flash interface router delivers its own
  // device's traffic locally and never injects a flit addressed to this device.
  logic [1:0] ej_req [NVC];   // [0] from the up link, [1] from the down link
  logic [1:0] ej_gnt [NVC];
  logic       ej_idx [NVC];
  for (genvar v = 0; v < NVC; v++) begin : g_ej
    always_comb
      for (int p = 0; p < 2; p++)
        ej_req[v][p] = lhead_valid[p*NVC + v] && lroute[p*NVC + v] == R_EJECT;
    rr_arbiter #(.N(2)) u_ej_arb (
      .clk, .rst_n, .req(ej_req[v]), .advance(ej_ready[v]), .grant(ej_gnt[v]), .grant_idx(ej_idx[v])
    );
    assign ej_valid[v] = |ej_req[v];
    assign ej_flit[v]  = ej_idx[v] ? lhead[NVC + v] : lhead[v];
  end

  always_comb begin
    for (int s = 0; s < NS; s++)
      pop[s] = up_gnt[s] || down_gnt[s] ||
               (s >= NVC && ej_gnt[s % NVC][(s / NVC) - 1] && ej_ready[s % NVC]);
  end

endmodule
