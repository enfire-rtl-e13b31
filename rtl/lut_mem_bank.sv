// lut_mem_bank: one 2 kB bank of the MLB's LUT/data memory.
//
// ROWS x COLS bits (256 x 64). A LUT of width w occupies w adjacent columns
// over all rows, so its 256 responses are addressed by the LUT inputs as
// the row. The read is combinational and segmented: only the columns whose
// wordline segment is selected (seg_sel) return their stored bits, all
// other columns read as zero, mirroring the gated wordline segments that
// keep unused cells from being energized. Rows are loaded whole through the
// configuration port at the clock edge. The size and the segmentation
// follow the published design; the array stands in for the SRAM macro and
// models only its logic function.
module lut_mem_bank #(
  parameter int unsigned ROWS = enfire_pkg::MEM_ROWS,
  parameter int unsigned COLS = enfire_pkg::MEM_COLS
) (
  input  logic                    clk,
  input  logic [$clog2(ROWS)-1:0] raddr,
  input  logic [COLS-1:0]         seg_sel,
  output logic [COLS-1:0]         rdata,
  input  logic                    we,
  input  logic [$clog2(ROWS)-1:0] waddr,
  input  logic [COLS-1:0]         wdata
);
  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr] & seg_sel;
endmodule
