// rr_arbiter: rotating-priority (round-robin) arbiter.
//
// All shared datapaths of the minFlash router, controller and network use this arbiter so
// that no requester can starve another. The requester after the last granted one has the
// highest priority in the next arbitration. grant is combinational from req (one-hot or zero);
// the priority pointer only moves when the grant is taken (advance = 1 in that cycle), so a
// grant that is held back by the consumer does not lose its turn.
//
// The document asks for rotating-priority arbiters on all datapaths; the pointer update rule
// is this design's.
module rr_arbiter #(
  parameter int unsigned N = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,   // the current grant was used this cycle
  output logic [N-1:0] grant,
  output logic [$clog2(N > 1 ? N : 2)-1:0] grant_idx
);
  localparam int unsigned IW = $clog2(N > 1 ? N : 2);

  logic [IW-1:0] ptr;  // highest-priority requester

  always_comb begin
    grant     = '0;
    grant_idx = '0;
    for (int unsigned i = 0; i < N; i++) begin
      int unsigned idx;
      idx = (int'(ptr) + i) % N;
      if (req[idx] && grant == '0) begin
        grant[idx] = 1'b1;
        grant_idx  = IW'(idx);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ptr <= '0;
    else if (advance && grant != '0) ptr <= (grant_idx == IW'(N - 1)) ? '0 : grant_idx + 1'b1;
  end

endmodule
