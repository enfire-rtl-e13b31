// lut_data_mem: the MLB's 4 kB LUT/data memory, two 256 x 64-bit banks.
//
// Each execution slot presents a one-hot bank enable, a row and a segment
// select (from its mem_ctrl). Each bank has one read port and serves the
// slot that addresses it, so the two slots read in parallel when their
// LUTs sit in different banks. Both slots addressing the same bank in one
// cycle is a scheduling error: slot 0 is served, slot 1 reads zeros and an
// assertion reports it. The read is combinational; rdata[s] holds the
// selected segment bits in their stored column positions, zeros elsewhere.
// Configuration writes load one whole row of one bank at the clock edge.
// Two banks of 2 kB, one per engine per cycle, follow the published MLB;
// the conflict rule is this design's choice.
module lut_data_mem
  import enfire_pkg::*;
(
  input  logic                                clk,
  input  logic                                rst_n,      // gates the check only
  input  logic [N_SLOTS-1:0][N_BANKS-1:0]     bank_en,
  input  logic [N_SLOTS-1:0][7:0]             row,
  input  logic [N_SLOTS-1:0][MEM_COLS-1:0]    seg_sel,
  output logic [N_SLOTS-1:0][MEM_COLS-1:0]    rdata,
  input  logic [N_BANKS-1:0]                  cfg_we,
  input  logic [7:0]                          cfg_addr,
  input  logic [MEM_COLS-1:0]                 cfg_wdata
);
  logic [N_BANKS-1:0]               grant1;   // bank b serves slot 1
  logic [N_BANKS-1:0][7:0]          b_row;
  logic [N_BANKS-1:0][MEM_COLS-1:0] b_sel;
  logic [N_BANKS-1:0][MEM_COLS-1:0] b_data;

  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      grant1[b] = !bank_en[0][b] && bank_en[1][b];
      b_row[b]  = grant1[b] ? row[1] : row[0];
      b_sel[b]  = bank_en[0][b] ? seg_sel[0] : (bank_en[1][b] ? seg_sel[1] : '0);
    end
    for (int s = 0; s < N_SLOTS; s++) begin
      rdata[s] = '0;
      for (int b = 0; b < N_BANKS; b++) begin
        if (bank_en[s][b] && (s == 0 ? !grant1[b] : grant1[b])) rdata[s] = b_data[b];
      end
    end
  end

  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    lut_mem_bank u_bank (
      .clk   (clk),
      .raddr (b_row[b]),
      .seg_sel(b_sel[b]),
      .rdata (b_data[b]),
      .we    (cfg_we[b]),
      .waddr (cfg_addr),
      .wdata (cfg_wdata)
    );
  end

  a_one_slot_per_bank: assert property (@(posedge clk) disable iff (!rst_n)
    (bank_en[0] & bank_en[1]) == '0)
    else $error("lut_data_mem: both slots read the same bank in one cycle");
endmodule
