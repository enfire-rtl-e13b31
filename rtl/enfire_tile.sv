// enfire_tile: one ENFIRE tile, the top of the fabric.
//
// Sixteen MLBs in four clusters. Each cluster drives a 16-bit share of the
// inter-cluster bus (4 bits per MLB, from the MLBs' inter-cluster lane
// registers). The tile holds that 64-bit bus for one more cycle in a
// register and broadcasts it to every MLB of every cluster, so data sent
// with an inter-cluster MOVE in cycle t is received in cycle t+2, against
// t+1 inside a cluster.
//
// Host side: cfg writes schedule-table slots, memory-bank rows or a whole
// register file of the MLB cfg.mlb = {cluster, mlb}; rd_mlb selects the
// register file shown on rd_regs (primary inputs go in and outputs come out
// through the register files). A start pulse starts all MLBs at schedule
// entry 0; busy shows which still run and done is high when none does.
// The cluster/tile hierarchy, bus widths and the extra inter-cluster cycle
// follow the published interconnect; the host port is this design's own.
module enfire_tile
  import enfire_pkg::*;
#(
  parameter int unsigned N_CLUSTERS = N_CLUSTER
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  cfg_req_t                      cfg,
  input  logic [3:0]                    rd_mlb,
  output logic [N_REGS-1:0]             rd_regs,
  output logic [N_CLUSTERS*N_MLB-1:0]   busy,
  output logic                          done
);
  logic [N_CLUSTER-1:0][INTER_BUS_W-1:0]  inter_lanes;
  logic [N_CLUSTER-1:0][INTER_BUS_W-1:0]  inter_bus_q;
  logic [N_CLUSTERS*N_MLB-1:0][N_REGS-1:0] regs;

  logic [N_CLUSTERS-1:0][INTER_BUS_W-1:0]  inter_lanes_c;

  // Clusters not built (N_CLUSTERS < 4) drive zeros.
  always_comb begin
    inter_lanes = '0;
    for (int c = 0; c < N_CLUSTERS; c++) inter_lanes[c] = inter_lanes_c[c];
  end

  for (genvar c = 0; c < N_CLUSTERS; c++) begin : g_cl
    mlb_cluster #(.CLUSTER_ID(c)) u_cluster (
      .clk          (clk),
      .rst_n        (rst_n),
      .start        (start),
      .cfg          (cfg),
      .inter_bus_i  (inter_bus_q),
      .inter_lanes_o(inter_lanes_c[c]),
      .regs_o       (regs[N_MLB*c +: N_MLB]),
      .busy_o       (busy[N_MLB*c +: N_MLB])
    );
  end

  // Hold stage of the inter-cluster bus.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) inter_bus_q <= '0;
    else        inter_bus_q <= inter_lanes;
  end

  assign rd_regs = regs[rd_mlb[$clog2(N_CLUSTERS*N_MLB)-1:0]];
  assign done    = (busy == '0);

  initial assert (N_CLUSTERS >= 1 && N_CLUSTERS <= N_CLUSTER)
    else $error("enfire_tile: N_CLUSTERS must be 1..%0d", N_CLUSTER);
endmodule
