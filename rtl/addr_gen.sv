// addr_gen: LUT read address of one execution slot.
//
// The eight input bits of a LUT, read from the register file, are the row
// address of the memory bank directly (input 0 is the row LSB), because
// every LUT occupies its own columns over all 256 rows. Bit 2 of the
// 3-bit LUT index picks the bank and bits 1:0 pick one of the four
// segments of the requested width in the segmented wordline, whose lowest
// column comes from enfire_pkg::seg_lsb. Purely combinational. Apart from
// the segment column, the request fields are the inputs themselves: the
// direct mapping leaves no address arithmetic to do.
// The direct row mapping, eight LUTs of each width (four per bank) and the
// segment columns follow the published MLB; which index bit is the bank
// and the input-to-row-bit order are this design's choices.
module addr_gen
  import enfire_pkg::*;
(
  input  logic              valid,
  input  logic [LUT_IN-1:0] lut_in,
  input  lut_size_e         lut_size,
  input  logic [2:0]        lut_idx,
  output mem_req_t          req
);
  always_comb begin
    req.valid   = valid;
    req.bank    = lut_idx[2];
    req.row     = lut_in;
    req.seg_lsb = seg_lsb(lut_size, lut_idx[1:0]);
    req.size    = lut_size;
  end
endmodule
