// mlb_cluster: four MLBs on a fully connected intra-cluster bus.
//
// Every MLB owns one 8-bit lane of the intra-cluster bus and every MLB sees
// all four lanes, so any MLB can read what any other sent in the previous
// cycle, either with a MOVE receive or through its virtual register rows.
// The cluster also gathers its MLBs' 4-bit inter-cluster lanes into its
// 16-bit share of the inter-cluster bus (MLB m on bits 4m+3..4m) and hands
// the tile's held inter-cluster bus to all four MLBs. No logic of its own:
// the lanes are registers inside the MLBs. Four MLBs per cluster and the
// 8-bit full connection follow the published interconnect.
module mlb_cluster
  import enfire_pkg::*;
#(
  parameter int unsigned CLUSTER_ID = 0
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  input  cfg_req_t                               cfg,
  input  logic [N_CLUSTER-1:0][INTER_BUS_W-1:0]  inter_bus_i,
  output logic [INTER_BUS_W-1:0]                 inter_lanes_o,
  output logic [N_MLB-1:0][N_REGS-1:0]           regs_o,
  output logic [N_MLB-1:0]                       busy_o
);
  logic [N_MLB-1:0][INTRA_LANE_W-1:0] intra_bus;

  for (genvar m = 0; m < N_MLB; m++) begin : g_mlb
    mlb #(.MLB_ID(m), .CLUSTER_ID(CLUSTER_ID)) u_mlb (
      .clk         (clk),
      .rst_n       (rst_n),
      .start       (start),
      .cfg         (cfg),
      .intra_bus_i (intra_bus),
      .intra_lane_o(intra_bus[m]),
      .inter_bus_i (inter_bus_i),
      .inter_lane_o(inter_lanes_o[INTER_LANE_W*m +: INTER_LANE_W]),
      .regs_o      (regs_o[m]),
      .busy_o      (busy_o[m])
    );
  end
endmodule
