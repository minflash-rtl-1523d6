// tb_net_node: three network nodes (ids 0, 1, 2) chained in a line with credit-based links.
//
// Every node injects 60 flits on each of the five virtual channels to random other nodes,
// while every ejection port stalls at random. Each ejected flit must arrive at the node
// named by its destination, on the channel it was injected on, and in order among the flits
// of the same source, channel and destination (the checker keeps one queue per triple).
// Flits from node 0 to node 2 pass through node 1, so forwarding and credits between two
// links are exercised; all flits must be delivered.
//
// The expected behaviour comes from the document's description of minFlash; the stimulus,
// sizes and checks are this testbench's own.
module tb_net_node;
  import minflash_pkg::*;
  localparam int NN = 3, PER_VC = 60;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, delivered = 0;

  logic [NVC-1:0] inj_valid [NN], inj_ready [NN], ej_valid [NN], ej_ready [NN];
  flit_t          inj_flit [NN][NVC], ej_flit [NN][NVC];
  link_flit_t     up_tx [NN], up_rx [NN], down_tx [NN], down_rx [NN];
  logic [NVC-1:0] up_tx_credit [NN], up_rx_credit [NN], down_tx_credit [NN], down_rx_credit [NN];

  for (genvar n = 0; n < NN; n++) begin : g_n
    net_node u_node (
      .clk, .rst_n, .my_id(DEV_W'(n)),
      .inj_valid(inj_valid[n]), .inj_ready(inj_ready[n]), .inj_flit(inj_flit[n]),
      .ej_valid(ej_valid[n]), .ej_ready(ej_ready[n]), .ej_flit(ej_flit[n]),
      .up_tx(up_tx[n]), .up_tx_credit(up_tx_credit[n]), .up_rx(up_rx[n]),
      .up_rx_credit(up_rx_credit[n]),
      .down_tx(down_tx[n]), .down_tx_credit(down_tx_credit[n]), .down_rx(down_rx[n]),
      .down_rx_credit(down_rx_credit[n]));
    if (n < NN - 1) begin : g_up
      assign up_rx[n] = down_tx[n+1];
      assign up_tx_credit[n] = down_rx_credit[n+1];
    end else begin : g_up_end
      assign up_rx[n] = '0;
      assign up_tx_credit[n] = '0;
    end
    if (n > 0) begin : g_down
      assign down_rx[n] = up_tx[n-1];
      assign down_tx_credit[n] = up_rx_credit[n-1];
    end else begin : g_down_end
      assign down_rx[n] = '0;
      assign down_tx_credit[n] = '0;
    end
  end

  // expected flits per (source, channel, destination)
  flit_t expq [NN][NVC][NN][$];
  int    sent [NN][NVC];

  initial begin : watchdog
    repeat (40000) @(posedge clk);
    $display("watchdog: delivered %0d", delivered);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // injection: a new random flit whenever the previous one was taken
  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      for (int v = 0; v < NVC; v++) begin
        if (rst_n && inj_valid[n][v] && inj_ready[n][v]) begin
          expq[n][v][inj_flit[n][v].dst].push_back(inj_flit[n][v]);
          sent[n][v]++;
          inj_valid[n][v] <= 1'b0;
        end else if (rst_n && !inj_valid[n][v] && sent[n][v] < PER_VC && ($urandom % 3 == 0)) begin
          automatic int d = (n + 1 + $urandom % (NN - 1)) % NN;
          inj_valid[n][v] <= 1'b1;
          inj_flit[n][v].dst <= DEV_W'(d);
          inj_flit[n][v].src <= DEV_W'(n);
          inj_flit[n][v].tag <= TAG_W'(sent[n][v]);
          inj_flit[n][v].payload <= PAYLOAD_W'($urandom);
        end
      end
    end
  end

  // ejection with random stalls, checked against the expected queues
  always @(posedge clk) begin
    for (int n = 0; n < NN; n++) begin
      for (int v = 0; v < NVC; v++) begin
        if (rst_n && ej_valid[n][v] && ej_ready[n][v]) begin
          automatic flit_t f = ej_flit[n][v];
          checks++;
          delivered++;
          if (f.dst != DEV_W'(n) || f.src >= NN || expq[f.src][v][n].size() == 0) begin
            failures++;
            $display("node %0d vc %0d: unexpected flit src %0d dst %0d", n, v, f.src, f.dst);
          end else begin
            automatic flit_t e = expq[f.src][v][n].pop_front();
            if (e != f) begin
              failures++;
              $display("node %0d vc %0d: flit from %0d out of order or corrupted", n, v, f.src);
            end
          end
        end
        ej_ready[n][v] <= ($urandom % 4 != 0);
      end
    end
  end

  initial begin
    for (int n = 0; n < NN; n++) begin
      inj_valid[n] = '0;
      ej_ready[n] = '0;
      for (int v = 0; v < NVC; v++) begin inj_flit[n][v] = '0; sent[n][v] = 0; end
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (delivered == NN * NVC * PER_VC);
    repeat (50) @(posedge clk);
    checks++;
    for (int s = 0; s < NN; s++)
      for (int v = 0; v < NVC; v++)
        for (int d = 0; d < NN; d++)
          if (expq[s][v][d].size() != 0) begin
            failures++; $display("flits lost from %0d to %0d on vc %0d", s, d, v);
          end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
