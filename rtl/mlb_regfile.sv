// mlb_regfile: the MLB's 64 one-bit registers.
//
// The registers sit in eight rows of eight bits; register a is bit a%8 of
// row a/8. Each of the two execution slots has eight single-bit read ports
// (the eight LUT inputs, 16 ports in all), one 8-bit row read port (the
// source of a MOVE send) and one 8-bit row write port with a write enable
// per bit, so a 1-, 2- or 4-bit LUT response only touches its own bits.
// Reads are combinational; writes and the whole-file configuration write
// (cfg_we, cfg_wdata) happen at the clock edge. When both slots write the
// same bit, slot 1 wins; a correct schedule never does this and an
// assertion reports it.
//
// Virtual register ports: when a slot's vreg flag is set, bit reads of
// rows 5, 6 and 7 (addresses 40..63) return the intra-cluster lanes of the
// other three MLBs of the cluster, in ascending MLB order, instead of the
// stored bits. The 64 x 1-bit size, the 16 read / two 8-bit write ports with
// bit enables and the mapping of the top 3 x 8 bits onto the bus follow the
// published MLB; the per-instruction vreg flag and the row read ports are
// this design's choices. Reset clears all registers.
module mlb_regfile
  import enfire_pkg::*;
#(
  parameter int unsigned MLB_ID = 0
) (
  input  logic                                        clk,
  input  logic                                        rst_n,
  input  logic                                        cfg_we,
  input  logic [N_REGS-1:0]                           cfg_wdata,
  input  logic [N_SLOTS-1:0][LUT_IN-1:0][REG_AW-1:0]  raddr,
  input  logic [N_SLOTS-1:0]                          vreg,
  output logic [N_SLOTS-1:0][LUT_IN-1:0]              rbit,
  input  logic [N_SLOTS-1:0][2:0]                     rrow_addr,
  output logic [N_SLOTS-1:0][REG_ROW_W-1:0]           rrow,
  input  logic [N_SLOTS-1:0]                          we,
  input  logic [N_SLOTS-1:0][2:0]                     wrow,
  input  logic [N_SLOTS-1:0][REG_ROW_W-1:0]           wmask,
  input  logic [N_SLOTS-1:0][REG_ROW_W-1:0]           wdata,
  input  logic [N_MLB-1:0][INTRA_LANE_W-1:0]          intra_bus_i,
  output logic [N_REGS-1:0]                           regs_o
);
  logic [N_REG_ROWS-1:0][REG_ROW_W-1:0] regs_q;

  // Lane seen through virtual row 5 + k.
  function automatic logic [1:0] other_mlb(logic [1:0] k);
    return (32'(k) < MLB_ID) ? k : k + 2'd1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      regs_q <= '0;
    end else if (cfg_we) begin
      regs_q <= cfg_wdata;
    end else begin
      for (int s = 0; s < N_SLOTS; s++) begin
        if (we[s]) begin
          for (int b = 0; b < REG_ROW_W; b++) begin
            if (wmask[s][b]) regs_q[wrow[s]][b] <= wdata[s][b];
          end
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < N_SLOTS; s++) begin
      for (int i = 0; i < LUT_IN; i++) begin
        logic [REG_AW-1:0] a;
        a = raddr[s][i];
        if (vreg[s] && a >= REG_AW'(VREG_BASE)) begin
          rbit[s][i] = intra_bus_i[other_mlb(2'(a[5:3] - 3'd5))][a[2:0]];
        end else begin
          rbit[s][i] = regs_q[a[5:3]][a[2:0]];
        end
      end
      rrow[s] = regs_q[rrow_addr[s]];
    end
  end

  assign regs_o = regs_q;

  // Two slots must not write the same register bit in one cycle.
  a_no_double_write: assert property (@(posedge clk) disable iff (!rst_n || cfg_we)
    !(we[0] && we[1] && wrow[0] == wrow[1] && (wmask[0] & wmask[1]) != '0))
    else $error("mlb_regfile: both slots write the same register bit");
endmodule
