// mlb_decoder: decodes one 64-bit instruction slot of the schedule table.
//
// Purely combinational. The opcode in bits 63:62 selects NOP, LUT, MOVE or
// HALT; the remaining fields are unpacked into the dec_t struct of
// enfire_pkg (bit layout documented there). A LUT instruction names eight
// 6-bit register addresses for the eight LUT inputs, the LUT (size and
// index), one write address, and flags for bus output and virtual register
// reads. A MOVE either puts register bits on this MLB's bus lane (send) or
// writes bus bits into the register file (receive). The content of an
// instruction follows the published MLB; the bit positions are this
// design's own. When en is low (MLB idle) every operation is suppressed,
// and the fields of operations not issued are zero.
module mlb_decoder
  import enfire_pkg::*;
(
  input  logic              en,
  input  logic [SLOT_W-1:0] instr,
  output dec_t              dec
);
  opcode_e op;

  logic lut, move;

  always_comb begin
    op   = opcode_e'(instr[63:62]);
    lut  = en && (op == OP_LUT);
    move = en && (op == OP_MOVE);
    dec  = '0;
    dec.is_lut  = lut;
    dec.is_move = move;
    dec.is_halt = en && (op == OP_HALT);
    // Fields of an operation that is not issued stay zero, so no LUT,
    // memory or bus control toggles for NOP, HALT or an idle MLB.
    if (lut) begin
      dec.size    = lut_size_e'(instr[61:60]);
      dec.lut_idx = instr[59:57];
      dec.bus_out = instr[56];
      dec.vreg    = instr[55];
      dec.reg_we  = instr[54];
      for (int i = 0; i < LUT_IN; i++) dec.in_addr[i] = instr[6*i +: 6];
    end
    if (lut || (move && instr[61])) dec.waddr = instr[53:48];
    if (move) begin
      dec.mv_recv       = instr[61];
      dec.mv_inter      = instr[60];
      dec.mv_wide       = instr[59];
      dec.mv_src_row    = instr[47:45];
      dec.mv_src_nib    = instr[44];
      dec.mv_dst_nib    = instr[43];
      dec.mv_rx_nib     = instr[42];
      dec.mv_rx_mlb     = instr[41:40];
      dec.mv_rx_cluster = instr[39:38];
    end
  end
endmodule
