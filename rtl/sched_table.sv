// sched_table: the MLB's instruction store.
//
// DEPTH entries, each holding N_SLOTS independent instructions of SLOT_W
// bits (64 x 2 x 64 = 64 x 128 bits by default), one entry per cycle for the
// two execution engines. The read is combinational, as for a latch array,
// so the entry at raddr is available in the same cycle. Entries are loaded
// one 64-bit slot at a time through the configuration write port (we,
// wslot, waddr, wdata), which takes effect at the clock edge.
// Size and two-instruction entries follow the published MLB; the
// slot-at-a-time write port is this design's choice.
module sched_table #(
  parameter int unsigned DEPTH   = enfire_pkg::SCHED_DEPTH,
  parameter int unsigned N_SLOTS = enfire_pkg::N_SLOTS,
  parameter int unsigned SLOT_W  = enfire_pkg::SLOT_W
) (
  input  logic                              clk,
  input  logic [$clog2(DEPTH)-1:0]          raddr,
  output logic [N_SLOTS-1:0][SLOT_W-1:0]    rdata,
  input  logic                              we,
  input  logic [$clog2(N_SLOTS)-1:0]        wslot,
  input  logic [$clog2(DEPTH)-1:0]          waddr,
  input  logic [SLOT_W-1:0]                 wdata
);
  logic [N_SLOTS-1:0][SLOT_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr][wslot] <= wdata;
  end

  assign rdata = mem[raddr];
endmodule
