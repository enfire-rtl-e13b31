// mem_ctrl: memory read control of one execution slot.
//
// Turns the slot's read request into a bank enable (one-hot over the two
// banks) and the segment select of the segmented wordline: a 64-bit mask
// with ones only over the columns of the addressed LUT, so that only those
// cells are driven during the read. With no valid request every select is
// low and nothing is read. Purely combinational.
// Wordline segmentation follows the published bank design; expressing the
// per-segment gating as a column mask is this design's modelling choice.
module mem_ctrl
  import enfire_pkg::*;
(
  input  mem_req_t               req,
  output logic [N_BANKS-1:0]     bank_en,
  output logic [MEM_COLS-1:0]    seg_sel
);
  always_comb begin
    bank_en = '0;
    seg_sel = '0;
    if (req.valid) begin
      bank_en[req.bank] = 1'b1;
      seg_sel = MEM_COLS'(width_mask(req.size)) << req.seg_lsb;
    end
  end
endmodule
