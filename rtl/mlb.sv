// mlb: memory logic block, the processing element of the fabric.
//
// An MLB evaluates a mapped logic network temporally. Its LUT/data memory
// holds up to 32 eight-input LUTs (eight each of 8x1, 8x2, 8x4 and 8x8),
// its 64 one-bit registers hold the network's signals, and its schedule
// table holds one VLIW-2 entry per cycle. In each cycle while busy, both
// slots of the entry at the PC are decoded; a LUT slot reads eight register
// bits, uses them as the row address of its LUT, and writes the 1..8-bit
// response back to the register file (and, optionally, 4 bits onto the
// intra-cluster lane); a MOVE slot sends register bits onto this MLB's bus
// lanes or writes bus bits into the register file. Fetch, decode, register
// read, memory read and register write all complete in the same cycle.
//
// Bus timing: the 8-bit intra-cluster lane (intra_lane_o) and the 4-bit
// inter-cluster lane (inter_lane_o) are registers that keep their value
// until overwritten, so data sent in cycle t is readable by the other MLBs
// of the cluster in cycle t+1. intra_bus_i carries the four lanes of the
// cluster (this MLB's own included); inter_bus_i the inter-cluster bus of
// the tile as held by the tile.
//
// Configuration (cfg, when cfg.mlb matches {CLUSTER_ID, MLB_ID}) writes
// schedule-table slots, bank rows or the whole register file. start
// restarts the schedule at entry 0; busy_o is high while it runs.
// Component list, sizes and single-cycle operation follow the published
// MLB; encoding, configuration and run control are this design's choices.
module mlb
  import enfire_pkg::*;
#(
  parameter int unsigned MLB_ID     = 0,
  parameter int unsigned CLUSTER_ID = 0
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   start,
  input  cfg_req_t                               cfg,
  input  logic [N_MLB-1:0][INTRA_LANE_W-1:0]     intra_bus_i,
  output logic [INTRA_LANE_W-1:0]                intra_lane_o,
  input  logic [N_CLUSTER-1:0][INTER_BUS_W-1:0]  inter_bus_i,
  output logic [INTER_LANE_W-1:0]                inter_lane_o,
  output logic [N_REGS-1:0]                      regs_o,
  output logic                                   busy_o
);
  logic                                  cfg_hit;
  logic [PC_W-1:0]                       pc;
  logic                                  busy;
  logic [N_SLOTS-1:0][SLOT_W-1:0]        instr;
  dec_t [N_SLOTS-1:0]                    dec;
  logic                                  halt;
  logic [N_SLOTS-1:0][LUT_IN-1:0][REG_AW-1:0] raddr;
  logic [N_SLOTS-1:0]                    vreg;
  logic [N_SLOTS-1:0][LUT_IN-1:0]        rbit;
  logic [N_SLOTS-1:0][2:0]               rrow_addr;
  logic [N_SLOTS-1:0][REG_ROW_W-1:0]     rrow;
  logic [N_SLOTS-1:0]                    we;
  logic [N_SLOTS-1:0][2:0]               wrow;
  logic [N_SLOTS-1:0][REG_ROW_W-1:0]     wmask, wdata;
  mem_req_t [N_SLOTS-1:0]                req;
  logic [N_SLOTS-1:0][N_BANKS-1:0]       bank_en;
  logic [N_SLOTS-1:0][MEM_COLS-1:0]      seg_sel;
  logic [N_SLOTS-1:0][7:0]               mrow;
  logic [N_SLOTS-1:0][MEM_COLS-1:0]      mem_rdata;
  logic [INTRA_LANE_W-1:0]               intra_we, intra_wd, intra_q;
  logic                                  inter_we;
  logic [INTER_LANE_W-1:0]               inter_wd, inter_q;

  assign cfg_hit = cfg.we && (cfg.mlb == {2'(CLUSTER_ID), 2'(MLB_ID)});

  mlb_ctrl u_ctrl (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .halt  (halt),
    .pc_o  (pc),
    .busy_o(busy)
  );

  sched_table u_sched (
    .clk   (clk),
    .raddr (pc),
    .rdata (instr),
    .we    (cfg_hit && (cfg.sel == CFG_SCHED0 || cfg.sel == CFG_SCHED1)),
    .wslot (cfg.sel == CFG_SCHED1),
    .waddr (cfg.addr[PC_W-1:0]),
    .wdata (cfg.wdata)
  );

  for (genvar s = 0; s < N_SLOTS; s++) begin : g_slot
    mlb_decoder u_dec (
      .en   (busy),
      .instr(instr[s]),
      .dec  (dec[s])
    );
    assign raddr[s] = dec[s].in_addr;
    assign vreg[s]  = dec[s].vreg;

    addr_gen u_agen (
      .valid   (dec[s].is_lut),
      .lut_in  (rbit[s]),
      .lut_size(dec[s].size),
      .lut_idx (dec[s].lut_idx),
      .req     (req[s])
    );

    mem_ctrl u_mctl (
      .req    (req[s]),
      .bank_en(bank_en[s]),
      .seg_sel(seg_sel[s])
    );
    assign mrow[s] = req[s].row;
  end

  assign halt = dec[0].is_halt || dec[1].is_halt;

  mlb_regfile #(.MLB_ID(MLB_ID)) u_rf (
    .clk        (clk),
    .rst_n      (rst_n),
    .cfg_we     (cfg_hit && cfg.sel == CFG_REGS),
    .cfg_wdata  (cfg.wdata),
    .raddr      (raddr),
    .vreg       (vreg),
    .rbit       (rbit),
    .rrow_addr  (rrow_addr),
    .rrow       (rrow),
    .we         (we),
    .wrow       (wrow),
    .wmask      (wmask),
    .wdata      (wdata),
    .intra_bus_i(intra_bus_i),
    .regs_o     (regs_o)
  );

  lut_data_mem u_mem (
    .clk      (clk),
    .rst_n    (rst_n),
    .bank_en  (bank_en),
    .row      (mrow),
    .seg_sel  (seg_sel),
    .rdata    (mem_rdata),
    .cfg_we   ({cfg_hit && cfg.sel == CFG_BANK1, cfg_hit && cfg.sel == CFG_BANK0}),
    .cfg_addr (cfg.addr),
    .cfg_wdata(cfg.wdata)
  );

  mlb_datapath u_dp (
    .clk        (clk),
    .rst_n      (rst_n),
    .dec        (dec),
    .mem_rdata  (mem_rdata),
    .rrow_addr  (rrow_addr),
    .rrow       (rrow),
    .intra_bus_i(intra_bus_i),
    .inter_bus_i(inter_bus_i),
    .we         (we),
    .wrow       (wrow),
    .wmask      (wmask),
    .wdata      (wdata),
    .intra_we   (intra_we),
    .intra_wd   (intra_wd),
    .inter_we   (inter_we),
    .inter_wd   (inter_wd)
  );

  // Bus lane registers: hold the last value sent until overwritten.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      intra_q <= '0;
      inter_q <= '0;
    end else begin
      for (int b = 0; b < INTRA_LANE_W; b++) begin
        if (intra_we[b]) intra_q[b] <= intra_wd[b];
      end
      if (inter_we) inter_q <= inter_wd;
    end
  end

  assign intra_lane_o = intra_q;
  assign inter_lane_o = inter_q;
  assign busy_o       = busy;
endmodule
