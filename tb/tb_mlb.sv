// tb_mlb: runs a five-entry program on one MLB (MLB 1 of cluster 2) with the
// cluster and inter-cluster buses driven by the testbench. The program uses
// all four LUT widths, both slots, a bus-out LUT, a virtual-register read,
// intra and inter receives, narrow and inter sends and HALT. Expected
// registers and lanes are computed here by evaluating the LUT functions in
// program order. Also checks that the run takes exactly five cycles.
module tb_mlb;
  import enfire_pkg::*;
  import tb_enfire_pkg::*;
  localparam int ID = 9;   // cluster 2, MLB 1
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  cfg_req_t cfg;
  logic [3:0][7:0] intra_bus;
  logic [7:0] own_lane;
  logic [3:0][15:0] inter_bus;
  logic [3:0] inter_lane;
  logic [63:0] regs;
  logic busy;

  always_comb begin
    intra_bus = ext_intra;
    intra_bus[1] = own_lane;
  end
  logic [3:0][7:0] ext_intra;

  mlb #(.MLB_ID(1), .CLUSTER_ID(2)) dut (
    .clk, .rst_n, .start, .cfg, .intra_bus_i(intra_bus), .intra_lane_o(own_lane),
    .inter_bus_i(inter_bus), .inter_lane_o(inter_lane), .regs_o(regs), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg_write(cfg_sel_e sel, int addr, logic [63:0] data, int mlb = ID);
    @(negedge clk);
    cfg.we = 1; cfg.mlb = 4'(mlb); cfg.sel = sel; cfg.addr = 8'(addr); cfg.wdata = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  function automatic logic [7:0] bits8(logic [63:0] r, int a0);
    logic [7:0] x;
    for (int i = 0; i < 8; i++) x[i] = r[a0 + i];
    return x;
  endfunction

  typedef logic [7:0][5:0] in_t;
  function automatic in_t ins(int a0);
    in_t v;
    for (int i = 0; i < 8; i++) v[i] = 6'(a0 + i);
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r, r0;
    logic [7:0] t, lane_exp;
    logic [3:0] inter_exp;
    int cyc;
    cfg = '0;
    ext_intra = {8'h5a, 8'hc3, 8'h00, 8'h96};
    inter_bus = {16'h1234, 16'h9abc, 16'hdef0, 16'h2468};
    repeat (2) @(negedge clk);
    rst_n = 1;
    // memory images and a decoy write to another MLB
    for (int b = 0; b < 2; b++)
      for (int row = 0; row < 256; row++) cfg_write(b ? CFG_BANK1 : CFG_BANK0, row, bank_row(ID, b, 8'(row)));
    cfg_write(CFG_BANK0, 0, 64'hdead_beef, 3);
    r0 = {$urandom, $urandom};
    cfg_write(CFG_REGS, 0, r0);
    chk(regs == r0, "register load");
    // program
    cfg_write(CFG_SCHED0, 0, enc_lut(LUT_8X1, 3'd0, 0, 0, 1, 6'd19, ins(0)));
    cfg_write(CFG_SCHED1, 0, enc_lut(LUT_8X8, 3'd7, 1, 0, 1, 6'd24, ins(8)));
    cfg_write(CFG_SCHED0, 1, enc_lut(LUT_8X2, 3'd2, 0, 0, 1, 6'd38, ins(16)));
    cfg_write(CFG_SCHED1, 1, enc_lut(LUT_8X4, 3'd5, 0, 1, 1, 6'd12, ins(40)));
    cfg_write(CFG_SCHED0, 2, enc_recv(0, 1, 6'd48, 0, 2'd3, 2'd0));
    cfg_write(CFG_SCHED1, 2, enc_recv(1, 0, 6'd58, 0, 2'd2, 2'd1));
    cfg_write(CFG_SCHED0, 3, enc_send(0, 0, 3'd3, 1, 0));
    cfg_write(CFG_SCHED1, 3, enc_send(1, 0, 3'd4, 1, 0));
    cfg_write(CFG_SCHED0, 4, enc_lut(LUT_8X8, 3'd3, 0, 0, 1, 6'd0, ins(48)));
    cfg_write(CFG_SCHED1, 4, INSTR_HALT);

    // expected results, in program order
    r = r0;
    t = lut_fn(ID, 0, 0, bits8(r0, 0));   r[19] = t[0];
    t = lut_fn(ID, 3, 7, bits8(r0, 8));   r[31:24] = t;
    lane_exp = {t[3:0], 4'h0};
    t = lut_fn(ID, 1, 2, bits8(r, 16));   r[39:38] = t[1:0];
    t = lut_fn(ID, 2, 5, ext_intra[0]);    r[15:12] = t[3:0];
    r[55:48] = ext_intra[3];
    r[61:58] = inter_bus[1][11:8];
    lane_exp[3:0] = r[31:28];
    inter_exp = r[39:36];
    t = lut_fn(ID, 3, 3, r[55:48]);        r[7:0] = t;

    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    chk(busy, "running");
    @(negedge clk); cyc++;
    chk(own_lane == {lut_fn(ID, 3, 7, bits8(r0, 8))[3:0], 4'h0}, "bus-out lane visible next cycle");
    while (busy && cyc < 100) begin @(negedge clk); cyc++; end
    chk(cyc == 5, $sformatf("five entries take five cycles, got %0d", cyc));
    chk(regs == r, $sformatf("registers %h expected %h", regs, r));
    chk(own_lane == lane_exp, $sformatf("intra lane %h expected %h", own_lane, lane_exp));
    chk(inter_lane == inter_exp, "inter lane");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
