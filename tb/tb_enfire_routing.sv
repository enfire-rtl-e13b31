// tb_enfire_routing: the inter-MLB communication patterns of the static
// schedule, run on a full tile at its default size.
//
// The mapping flow of the fabric routes every value from a producing LUT to
// a consuming LUT with one of a fixed set of patterns, chosen by cost. This
// test builds each pattern by hand, runs it, and checks the consumer's result
// and the number of cycles the run takes. In every pattern MLB 0 of cluster 0
// produces a value A with an 8x8 LUT (index 0, bank 0) in entry 0, and the
// consumer evaluates an 8x8 LUT (index 4, bank 1) of its own on it:
//
//   same MLB        A is kept in MLB 0's registers and read two cycles later
//   direct          A[3:0] goes out with the LUT (bus-out) and MLB 1 reads it
//                   through its virtual registers in the next cycle
//   1-MOVE ALAP     MLB 0 sends A (8 bits) in cycle 1, MLB 1 reads it
//                   through its virtual registers in cycle 2
//   1-MOVE ASAP     bus-out in cycle 0, MLB 1 receives it with a MOVE in
//                   cycle 1 and uses it from its own registers in cycle 2
//   2-MOVE direct   send in cycle 1, receive in cycle 2, use in cycle 3
//   2-MOVE bypass   bus-out in cycle 0, MLB 2 receives it in cycle 1 and
//                   sends it on in cycle 2, MLB 1 reads it virtually in cycle 3
//   inter direct    MLB 0 sends a register nibble on the inter-cluster bus in
//                   cycle 0; MLB 0 of cluster 1 receives it in cycle 2
//   inter ALAP      A is kept until cycle 4, sent then, received in cycle 6
//   inter ASAP      A is sent in cycle 1, received in cycle 3 and kept in the
//                   consumer until cycle 6
//
// The expected values come from the reference LUT contents in tb_enfire_pkg.
// A one-MOVE bypass, where a third MLB forwards a lane value in the same
// cycle it receives it, has no instruction here and is not run.
module tb_enfire_routing;
  import enfire_pkg::*;
  import tb_enfire_pkg::*;
  localparam int NM = 16;
  localparam int DST_IN = 4;     // consumer LUT index (bank 1)
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  cfg_req_t cfg;
  logic [3:0] rd_mlb = 0;
  logic [63:0] rd_regs;
  logic [NM-1:0] busy;
  logic done;

  enfire_tile dut (.clk, .rst_n, .start, .cfg, .rd_mlb, .rd_regs, .busy, .done);

  always #5 clk = ~clk;

  logic [63:0] p_regs [NM];
  for (genvar c = 0; c < 4; c++) begin : g_probe_c
    for (genvar m = 0; m < 4; m++) begin : g_probe_m
      assign p_regs[4*c+m] = dut.g_cl[c].u_cluster.g_mlb[m].u_mlb.regs_o;
    end
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic cfg_write(int mlb, cfg_sel_e sel, int addr, logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.mlb = 4'(mlb); cfg.sel = sel; cfg.addr = 8'(addr); cfg.wdata = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  // Program of the current pattern, entries 0..7 of every MLB.
  logic [63:0] prog [NM][8][2];
  logic [63:0] regs0 [NM];

  function automatic logic [7:0][5:0] addrs(int a0, int a1, int a2, int a3,
                                            int a4, int a5, int a6, int a7);
    return {6'(a7), 6'(a6), 6'(a5), 6'(a4), 6'(a3), 6'(a2), 6'(a1), 6'(a0)};
  endfunction

  // Producer: 8x8 LUT 0 of MLB 0 on register row 0, result to row 1.
  function automatic logic [63:0] producer(bit bus_out);
    return enc_lut(LUT_8X8, 3'd0, bus_out, 0, 1, 6'd8, addrs(0, 1, 2, 3, 4, 5, 6, 7));
  endfunction

  // Consumer: 8x8 LUT DST_IN, result to row 3.
  function automatic logic [63:0] consumer(bit vreg, logic [7:0][5:0] in_a);
    return enc_lut(LUT_8X8, 3'(DST_IN), 0, vreg, 1, 6'd24, in_a);
  endfunction

  task automatic clear();
    for (int i = 0; i < NM; i++)
      for (int e = 0; e < 8; e++) prog[i][e] = '{INSTR_NOP, INSTR_NOP};
  endtask

  // Put HALT in the free slot of entry e of MLB i.
  task automatic halt_at(int i, int e);
    if (prog[i][e][1] == INSTR_NOP) prog[i][e][1] = INSTR_HALT;
    else prog[i][e][0] = INSTR_HALT;
  endtask

  // Load the program and fresh random registers, run it, and check its length.
  task automatic run(string name, int exp_cycles);
    int cyc;
    for (int i = 0; i < NM; i++) begin
      bit has_halt;
      has_halt = 0;
      for (int e = 0; e < 8; e++)
        has_halt |= (prog[i][e][0] == INSTR_HALT) || (prog[i][e][1] == INSTR_HALT);
      if (!has_halt) prog[i][0][0] = INSTR_HALT;
      for (int e = 0; e < 8; e++) begin
        cfg_write(i, CFG_SCHED0, e, prog[i][e][0]);
        cfg_write(i, CFG_SCHED1, e, prog[i][e][1]);
      end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    cyc = 0;
    while (!done && cyc < 100) begin
      cyc++;
      @(negedge clk);
    end
    chk(cyc == exp_cycles, $sformatf("%s: %0d cycles, expected %0d", name, cyc, exp_cycles));
  endtask

  task automatic new_regs();
    for (int i = 0; i < NM; i++) begin
      regs0[i] = {$urandom, $urandom};
      cfg_write(i, CFG_REGS, 0, regs0[i]);
    end
  endtask

  function automatic logic [7:0] a_val();
    return lut_fn(0, 3, 0, regs0[0][7:0]);
  endfunction

  task automatic expect_row3(string name, int i, logic [7:0] x);
    logic [7:0] exp;
    exp = lut_fn(i, 3, DST_IN, x);
    chk(p_regs[i][31:24] == exp, $sformatf("%s: consumer result %h, expected %h", name,
                                           p_regs[i][31:24], exp));
  endtask

  initial begin
    repeat (500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // LUT images of the MLBs taking part
    foreach (regs0[i]) if (i < 3 || i == 4)
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 256; r++) cfg_write(i, (b != 0) ? CFG_BANK1 : CFG_BANK0, r, bank_row(i, b, 8'(r)));

    for (int rep = 0; rep < 4; rep++) begin
      // same MLB
      clear(); new_regs();
      prog[0][0][0] = producer(0);
      prog[0][2][0] = enc_lut(LUT_8X8, 3'(DST_IN), 0, 0, 1, 6'd24, addrs(8, 9, 10, 11, 12, 13, 14, 15));
      halt_at(0, 2);
      run("same MLB", 3);
      expect_row3("same MLB", 0, a_val());

      // direct: bus-out, then virtual read in the next cycle
      clear(); new_regs();
      prog[0][0][0] = producer(1); halt_at(0, 0);
      prog[1][1][0] = consumer(1, addrs(40, 41, 42, 43, 4, 5, 6, 7)); halt_at(1, 1);
      run("direct", 2);
      expect_row3("direct", 1, {regs0[1][7:4], a_val()[3:0]});

      // 1-MOVE ALAP: send late, virtual read
      clear(); new_regs();
      prog[0][0][0] = producer(0);
      prog[0][1][0] = enc_send(0, 1, 3'd1, 0, 0); halt_at(0, 1);
      prog[1][2][0] = consumer(1, addrs(40, 41, 42, 43, 44, 45, 46, 47)); halt_at(1, 2);
      run("1-MOVE ALAP", 3);
      expect_row3("1-MOVE ALAP", 1, a_val());

      // 1-MOVE ASAP: bus-out, receive at once, use later
      clear(); new_regs();
      prog[0][0][0] = producer(1); halt_at(0, 0);
      prog[1][1][0] = enc_recv(0, 0, 6'd16, 0, 2'd0, 2'd0);
      prog[1][2][0] = consumer(0, addrs(16, 17, 18, 19, 4, 5, 6, 7)); halt_at(1, 2);
      run("1-MOVE ASAP", 3);
      chk(p_regs[1][19:16] == a_val()[3:0], "1-MOVE ASAP: received nibble");
      expect_row3("1-MOVE ASAP", 1, {regs0[1][7:4], a_val()[3:0]});

      // 2-MOVE direct: send, receive, use
      clear(); new_regs();
      prog[0][0][0] = producer(0);
      prog[0][1][0] = enc_send(0, 1, 3'd1, 0, 0); halt_at(0, 1);
      prog[1][2][0] = enc_recv(0, 1, 6'd16, 0, 2'd0, 2'd0);
      prog[1][3][0] = consumer(0, addrs(16, 17, 18, 19, 20, 21, 22, 23)); halt_at(1, 3);
      run("2-MOVE direct", 4);
      chk(p_regs[1][23:16] == a_val(), "2-MOVE direct: received byte");
      expect_row3("2-MOVE direct", 1, a_val());

      // 2-MOVE bypass through MLB 2
      clear(); new_regs();
      prog[0][0][0] = producer(1); halt_at(0, 0);
      prog[2][1][0] = enc_recv(0, 0, 6'd8, 0, 2'd0, 2'd0);
      prog[2][2][0] = enc_send(0, 0, 3'd1, 0, 0); halt_at(2, 2);
      // MLB 1 sees MLB 2's lane at virtual row 6 (addresses 48..55)
      prog[1][3][0] = consumer(1, addrs(48, 49, 50, 51, 4, 5, 6, 7)); halt_at(1, 3);
      run("2-MOVE bypass", 4);
      expect_row3("2-MOVE bypass", 1, {regs0[1][7:4], a_val()[3:0]});

      // inter-cluster direct: send in cycle 0, receive in cycle 2
      clear(); new_regs();
      prog[0][0][0] = enc_send(1, 0, 3'd0, 0, 0); halt_at(0, 0);
      prog[4][2][0] = enc_recv(1, 0, 6'd16, 0, 2'd0, 2'd0);
      prog[4][3][0] = consumer(0, addrs(16, 17, 18, 19, 4, 5, 6, 7)); halt_at(4, 3);
      run("inter direct", 4);
      chk(p_regs[4][19:16] == regs0[0][3:0], "inter direct: received nibble");
      expect_row3("inter direct", 4, {regs0[4][7:4], regs0[0][3:0]});

      // inter-cluster ALAP: keep A, send in cycle 4, receive in cycle 6
      clear(); new_regs();
      prog[0][0][0] = producer(0);
      prog[0][4][0] = enc_send(1, 0, 3'd1, 1, 0); halt_at(0, 4);
      prog[4][6][0] = enc_recv(1, 0, 6'd16, 0, 2'd0, 2'd0);
      prog[4][7][0] = consumer(0, addrs(16, 17, 18, 19, 4, 5, 6, 7)); halt_at(4, 7);
      run("inter ALAP", 8);
      expect_row3("inter ALAP", 4, {regs0[4][7:4], a_val()[7:4]});

      // inter-cluster ASAP: send in cycle 1, receive in cycle 3, use in cycle 6
      clear(); new_regs();
      prog[0][0][0] = producer(0);
      prog[0][1][0] = enc_send(1, 0, 3'd1, 0, 0); halt_at(0, 1);
      prog[4][3][0] = enc_recv(1, 0, 6'd16, 0, 2'd0, 2'd0);
      prog[4][6][0] = consumer(0, addrs(16, 17, 18, 19, 4, 5, 6, 7)); halt_at(4, 6);
      run("inter ASAP", 7);
      expect_row3("inter ASAP", 4, {regs0[4][7:4], a_val()[3:0]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
