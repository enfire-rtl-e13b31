// tb_mlb_cluster: one cluster (cluster 3) with a directed two-cycle
// exchange. Cycle 0: MLB 0 evaluates an 8x4 LUT with bus-out, MLB 2 sends
// register row 1 (8 bits), MLB 3 sends a nibble on its inter-cluster lane.
// Cycle 1: MLB 1 reads MLB 0's lane through its virtual registers as LUT
// inputs, MLB 3 receives MLB 2's byte, MLB 0 receives a nibble of the
// inter-cluster bus. The resulting registers and the cluster's 16-bit
// inter-cluster output are checked against values computed here.
module tb_mlb_cluster;
  import enfire_pkg::*;
  import tb_enfire_pkg::*;
  localparam int CL = 3;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  cfg_req_t cfg;
  logic [3:0][15:0] inter_bus;
  logic [15:0] inter_lanes;
  logic [3:0][63:0] regs;
  logic [3:0] busy;

  mlb_cluster #(.CLUSTER_ID(CL)) dut (.clk, .rst_n, .start, .cfg, .inter_bus_i(inter_bus),
    .inter_lanes_o(inter_lanes), .regs_o(regs), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic cfg_write(int mlb, cfg_sel_e sel, int addr, logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.mlb = 4'(mlb); cfg.sel = sel; cfg.addr = 8'(addr); cfg.wdata = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  typedef logic [7:0][5:0] in_t;
  function automatic in_t ins(int a0);
    in_t v;
    for (int i = 0; i < 8; i++) v[i] = 6'(a0 + i);
    return v;
  endfunction

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] r0 [4], e [4];
    logic [7:0] t0, t1;
    int id [4];
    cfg = '0;
    inter_bus = {16'h0f1e, 16'h2d3c, 16'h4b5a, 16'h6978};
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int m = 0; m < 4; m++) begin
      id[m] = 4 * CL + m;
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 256; r++) cfg_write(id[m], b ? CFG_BANK1 : CFG_BANK0, r, bank_row(id[m], b, 8'(r)));
      r0[m] = {$urandom, $urandom};
      cfg_write(id[m], CFG_REGS, 0, r0[m]);
    end
    // MLB 0: 8x4 LUT idx 1 on regs 0..7 -> regs 8..11, bus-out nibble 0
    cfg_write(id[0], CFG_SCHED0, 0, enc_lut(LUT_8X4, 3'd1, 1, 0, 1, 6'd8, ins(0)));
    // MLB 0 cycle 1: receive cluster 2 MLB 1 inter nibble -> regs 20..23
    cfg_write(id[0], CFG_SCHED1, 1, enc_recv(1, 0, 6'd20, 0, 2'd1, 2'd2));
    cfg_write(id[0], CFG_SCHED0, 2, INSTR_HALT);
    // MLB 1 cycle 1: 8x8 LUT idx 6, inputs regs 40..43 (virtual: MLB 0 lane bits 0..3) and regs 4..7
    cfg_write(id[1], CFG_SCHED0, 0, INSTR_NOP);
    cfg_write(id[1], CFG_SCHED1, 0, INSTR_NOP);
    cfg_write(id[1], CFG_SCHED1, 1, enc_lut(LUT_8X8, 3'd6, 0, 1, 1, 6'd16,
                                         {6'd7, 6'd6, 6'd5, 6'd4, 6'd43, 6'd42, 6'd41, 6'd40}));
    cfg_write(id[1], CFG_SCHED0, 1, INSTR_NOP);
    cfg_write(id[1], CFG_SCHED0, 2, INSTR_HALT);
    // MLB 2 cycle 0: wide send of row 1
    cfg_write(id[2], CFG_SCHED0, 0, enc_send(0, 1, 3'd1, 0, 0));
    cfg_write(id[2], CFG_SCHED1, 0, INSTR_HALT);
    // MLB 3 cycle 0: inter send of row 6 upper nibble; cycle 1: receive MLB 2 byte -> row 7
    cfg_write(id[3], CFG_SCHED0, 0, INSTR_NOP);
    cfg_write(id[3], CFG_SCHED1, 0, enc_send(1, 0, 3'd6, 1, 0));
    cfg_write(id[3], CFG_SCHED0, 1, enc_recv(0, 1, 6'd56, 0, 2'd2, 2'd0));
    cfg_write(id[3], CFG_SCHED1, 1, INSTR_HALT);
    cfg_write(id[0], CFG_SCHED1, 0, INSTR_NOP);
    cfg_write(id[0], CFG_SCHED0, 1, INSTR_NOP);

    e = r0;
    t0 = lut_fn(id[0], 2, 1, r0[0][7:0]);
    e[0][11:8] = t0[3:0];
    e[0][23:20] = inter_bus[2][7:4];
    t1 = lut_fn(id[1], 3, 6, {r0[1][7:4], t0[3:0]});
    e[1][23:16] = t1;
    e[3][63:56] = r0[2][15:8];

    @(negedge clk); start = 1; @(negedge clk); start = 0;
    chk(busy == 4'hf, "all four running");
    repeat (3) @(negedge clk);
    chk(busy == 4'h0, "all halted after three entries");
    for (int m = 0; m < 4; m++)
      chk(regs[m] == e[m], $sformatf("MLB %0d registers %h expected %h", m, regs[m], e[m]));
    chk(inter_lanes[15:12] == r0[3][55:52], "MLB 3 inter-cluster lane");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
