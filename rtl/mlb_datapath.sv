// mlb_datapath: result handling of the two execution slots of an MLB.
//
// For a LUT operation it takes the bank data of the addressed segment,
// shifts it down to bit 0 and keeps the LUT width (1, 2, 4 or 8 bits).
// The response is then aligned to the write address: row waddr[5:3], bits
// starting at waddr[2:0], with a write enable on exactly those bits (bits
// that would pass bit 7 are dropped). With the bus-out flag set, response
// bits 3:0 of slot s are also placed on nibble s of this MLB's 8-bit
// intra-cluster lane.
// For a MOVE send it reads a register row and puts 8 bits, or one chosen
// nibble, on the intra-cluster lane, or one nibble on the 4-bit
// inter-cluster lane. For a MOVE receive it picks 8 or 4 bits from another
// MLB's intra-cluster lane, or 4 bits from the inter-cluster bus, and
// writes them at the write address like a LUT response.
// The register row addresses (write row, and source row of a send) are
// the decoded fields passed on to the register file.
// Purely combinational; the lane registers that hold sent data until the
// next cycle live in mlb. If both slots drive the same lane bits, slot 1
// wins and an assertion reports it. The alignment and bus behaviour follow
// the published MLB; field meanings, nibble choices and priorities are
// this design's.
module mlb_datapath
  import enfire_pkg::*;
(
  input  logic                                     clk,
  input  logic                                     rst_n,   // gates the check only
  input  dec_t        [N_SLOTS-1:0]                dec,
  input  logic        [N_SLOTS-1:0][MEM_COLS-1:0]  mem_rdata,
  output logic        [N_SLOTS-1:0][2:0]           rrow_addr,
  input  logic        [N_SLOTS-1:0][REG_ROW_W-1:0] rrow,
  input  logic        [N_MLB-1:0][INTRA_LANE_W-1:0] intra_bus_i,
  input  logic        [N_CLUSTER-1:0][INTER_BUS_W-1:0] inter_bus_i,
  // register file write ports
  output logic        [N_SLOTS-1:0]                we,
  output logic        [N_SLOTS-1:0][2:0]           wrow,
  output logic        [N_SLOTS-1:0][REG_ROW_W-1:0] wmask,
  output logic        [N_SLOTS-1:0][REG_ROW_W-1:0] wdata,
  // lane register updates (bit enables and data)
  output logic        [INTRA_LANE_W-1:0]           intra_we,
  output logic        [INTRA_LANE_W-1:0]           intra_wd,
  output logic                                     inter_we,
  output logic        [INTER_LANE_W-1:0]           inter_wd
);
  logic [N_SLOTS-1:0][INTRA_LANE_W-1:0] s_intra_we;
  logic [N_SLOTS-1:0]                   s_inter_we;

  always_comb begin
    intra_we   = '0;
    intra_wd   = '0;
    inter_we   = 1'b0;
    inter_wd   = '0;
    s_intra_we = '0;
    s_inter_we = '0;
    for (int s = 0; s < N_SLOTS; s++) begin
      logic [REG_ROW_W-1:0]    resp;
      logic [REG_ROW_W-1:0]    val;
      logic [REG_ROW_W-1:0]    vmask;
      logic [3:0]              nib;
      logic [INTRA_LANE_W-1:0] lane;
      logic [2:0]              off;

      off  = dec[s].waddr[2:0];
      resp = REG_ROW_W'(mem_rdata[s] >> seg_lsb(dec[s].size, dec[s].lut_idx[1:0]))
             & width_mask(dec[s].size);
      rrow_addr[s] = dec[s].mv_src_row;
      nib  = dec[s].mv_src_nib ? rrow[s][7:4] : rrow[s][3:0];
      lane = intra_bus_i[dec[s].mv_rx_mlb];

      // value written to the register file and its mask before alignment
      val   = resp;
      vmask = width_mask(dec[s].size);
      if (dec[s].is_move) begin
        if (dec[s].mv_inter) begin
          val   = REG_ROW_W'(inter_bus_i[dec[s].mv_rx_cluster][4*dec[s].mv_rx_mlb +: 4]);
          vmask = 8'h0f;
        end else if (dec[s].mv_wide) begin
          val   = lane;
          vmask = 8'hff;
        end else begin
          val   = REG_ROW_W'(dec[s].mv_rx_nib ? lane[7:4] : lane[3:0]);
          vmask = 8'h0f;
        end
      end
      we[s]    = (dec[s].is_lut && dec[s].reg_we) || (dec[s].is_move && dec[s].mv_recv);
      wrow[s]  = dec[s].waddr[5:3];
      wmask[s] = vmask << off;
      wdata[s] = val << off;

      // lane updates
      if (dec[s].is_lut && dec[s].bus_out) begin
        s_intra_we[s][4*s +: 4] = 4'hf;
        intra_wd[4*s +: 4]      = resp[3:0];
      end
      if (dec[s].is_move && !dec[s].mv_recv) begin
        if (dec[s].mv_inter) begin
          s_inter_we[s] = 1'b1;
          inter_wd      = nib;
        end else if (dec[s].mv_wide) begin
          s_intra_we[s] = 8'hff;
          intra_wd      = rrow[s];
        end else begin
          s_intra_we[s][4*dec[s].mv_dst_nib +: 4] = 4'hf;
          intra_wd[4*dec[s].mv_dst_nib +: 4]      = nib;
        end
      end
      intra_we = intra_we | s_intra_we[s];
      inter_we = inter_we | s_inter_we[s];
    end
  end

  a_one_driver_per_lane_bit: assert property (@(posedge clk) disable iff (!rst_n)
    (s_intra_we[0] & s_intra_we[1]) == '0 && !(s_inter_we[0] && s_inter_we[1]))
    else $error("mlb_datapath: both slots drive the same bus lane bits");
endmodule
