// tb_mlb_decoder: feeds random instruction words (and the encoders' output)
// to the decoder and compares each field with the documented bit positions; fields of an
// operation that is not issued must read zero.
module tb_mlb_decoder;
  import enfire_pkg::*;
  int checks = 0, failures = 0;
  logic en;
  logic [63:0] instr;
  dec_t dec;
  logic clk = 0;

  mlb_decoder dut (.en, .instr, .dec);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s instr=%h", what, instr); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      instr = {$urandom, $urandom};
      en = (i % 7) != 0;
      #1;
      chk(dec.is_lut  == (en && instr[63:62] == 2'b01), "is_lut");
      chk(dec.is_move == (en && instr[63:62] == 2'b10), "is_move");
      chk(dec.is_halt == (en && instr[63:62] == 2'b11), "is_halt");
      begin
        bit l, m;
        l = en && instr[63:62] == 2'b01;
        m = en && instr[63:62] == 2'b10;
        chk(dec.size == (l ? instr[61:60] : 2'b0) && dec.lut_idx == (l ? instr[59:57] : 3'b0), "lut select");
        chk({dec.bus_out, dec.vreg, dec.reg_we} == (l ? instr[56:54] : 3'b0), "flags");
        chk(dec.waddr == ((l || (m && instr[61])) ? instr[53:48] : 6'd0), "waddr");
        for (int k = 0; k < 8; k++) chk(dec.in_addr[k] == (l ? instr[6*k +: 6] : 6'd0), "in_addr");
        chk({dec.mv_recv, dec.mv_inter, dec.mv_wide} == (m ? instr[61:59] : 3'b0), "move kind");
        chk({dec.mv_src_row, dec.mv_src_nib, dec.mv_dst_nib} == (m ? instr[47:43] : 5'b0), "send fields");
        chk({dec.mv_rx_nib, dec.mv_rx_mlb, dec.mv_rx_cluster} == (m ? instr[42:38] : 5'b0), "recv fields");
      end
    end
    // encoder round trips
    en = 1;
    instr = enc_lut(LUT_8X4, 3'd5, 1'b1, 1'b0, 1'b1, 6'd27, {6'd7, 6'd6, 6'd5, 6'd4, 6'd3, 6'd2, 6'd1, 6'd63});
    #1;
    chk(dec.is_lut && dec.size == LUT_8X4 && dec.lut_idx == 5 && dec.bus_out && !dec.vreg && dec.reg_we
        && dec.waddr == 27 && dec.in_addr[0] == 63 && dec.in_addr[7] == 7, "enc_lut");
    instr = enc_recv(1'b1, 1'b0, 6'd44, 1'b1, 2'd2, 2'd3);
    #1;
    chk(dec.is_move && dec.mv_recv && dec.mv_inter && !dec.mv_wide && dec.waddr == 44
        && dec.mv_rx_nib && dec.mv_rx_mlb == 2 && dec.mv_rx_cluster == 3, "enc_recv");
    instr = enc_send(1'b0, 1'b1, 3'd6, 1'b1, 1'b0);
    #1;
    chk(dec.is_move && !dec.mv_recv && !dec.mv_inter && dec.mv_wide && dec.mv_src_row == 6
        && dec.mv_src_nib && !dec.mv_dst_nib, "enc_send");
    instr = INSTR_HALT; #1;
    chk(dec.is_halt && !dec.is_lut && !dec.is_move, "halt");
    instr = INSTR_NOP; #1;
    chk(!dec.is_halt && !dec.is_lut && !dec.is_move, "nop");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
