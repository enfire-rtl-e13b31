// tb_enfire_tile: end-to-end test of a full tile at its default size
// (4 clusters x 4 MLBs, 64 x 128-bit schedule tables, 4 kB per MLB).
//
// All 32 LUTs of every MLB are loaded with the reference contents, then
// ROUNDS random programs are run. Each program gives every MLB a random
// schedule of 8..40 entries ending in HALT, with random LUT operations of
// all widths, bus-out LUTs, virtual-register reads, intra-cluster MOVEs
// (4 and 8 bits) and inter-cluster MOVEs. The generator obeys the
// scheduling rules of the fabric: the two slots of an entry use different
// banks, write different register rows and drive different lane bits.
// An instruction-level model of the tile written here (per cycle: read the
// old state, then update registers, lanes and the held inter-cluster bus)
// is stepped alongside, and every cycle all 16 register files are compared.
// The run length (cycles from start to done) is checked against the model.
// Each mechanism (each LUT width, dual issue, bus-out, virtual read, each
// kind of MOVE, halt) is counted from the design's decoded instructions and
// must occur at least once. A directed program first checks that
// intra-cluster data is usable one cycle and inter-cluster data two cycles
// after the send.
module tb_enfire_tile;
  import enfire_pkg::*;
  import tb_enfire_pkg::*;
  localparam int NM = 16;
  localparam int ROUNDS = 40;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  cfg_req_t cfg;
  logic [3:0] rd_mlb = 0;
  logic [63:0] rd_regs;
  logic [NM-1:0] busy;
  logic done;

  enfire_tile dut (.clk, .rst_n, .start, .cfg, .rd_mlb, .rd_regs, .busy, .done);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- mechanism counters, from the design's decoders
  typedef enum int {
    EV_L1, EV_L2, EV_L4, EV_L8, EV_DUAL, EV_BUSOUT, EV_VREG, EV_SEND4, EV_SEND8,
    EV_RECV4, EV_RECV8, EV_ISEND, EV_IRECV, EV_HALT, EV_N
  } ev_e;
  int ev [EV_N];
  string ev_name [EV_N] = '{"lut8x1", "lut8x2", "lut8x4", "lut8x8", "dual-issue", "lut-bus-out",
    "virtual-register-read", "intra-move-4b-send", "intra-move-8b-send", "intra-move-4b-recv",
    "intra-move-8b-recv", "inter-move-send", "inter-move-recv", "halt"};

  logic [63:0] p_regs [NM];
  logic [7:0] p_intra [NM];
  logic [3:0] p_inter [NM];

  for (genvar c = 0; c < 4; c++) begin : g_probe_c
    for (genvar m = 0; m < 4; m++) begin : g_probe_m
      assign p_regs[4*c+m]  = dut.g_cl[c].u_cluster.g_mlb[m].u_mlb.regs_o;
      assign p_intra[4*c+m] = dut.g_cl[c].u_cluster.g_mlb[m].u_mlb.intra_lane_o;
      assign p_inter[4*c+m] = dut.g_cl[c].u_cluster.g_mlb[m].u_mlb.inter_lane_o;
      always @(posedge clk) begin
        dec_t d0, d1;
        d0 = dut.g_cl[c].u_cluster.g_mlb[m].u_mlb.dec[0];
        d1 = dut.g_cl[c].u_cluster.g_mlb[m].u_mlb.dec[1];
        if ((d0.is_lut || d0.is_move) && (d1.is_lut || d1.is_move)) ev[EV_DUAL]++;
        if (d0.is_halt || d1.is_halt) ev[EV_HALT]++;
        count(d0);
        count(d1);
      end
    end
  end

  function automatic void count(dec_t d);
    if (d.is_lut) begin
      ev[EV_L1 + int'(d.size)]++;
      if (d.bus_out) ev[EV_BUSOUT]++;
      if (d.vreg) ev[EV_VREG]++;
    end
    if (d.is_move) begin
      if (d.mv_inter) ev[d.mv_recv ? EV_IRECV : EV_ISEND]++;
      else if (d.mv_recv) ev[d.mv_wide ? EV_RECV8 : EV_RECV4]++;
      else ev[d.mv_wide ? EV_SEND8 : EV_SEND4]++;
    end
  endfunction

  // ---------------- reference model of the tile
  logic [63:0] prog [NM][64][2];
  logic [63:0] m_regs [NM];
  logic [7:0]  m_intra [NM];
  logic [3:0]  m_inter [NM];
  logic [15:0] m_busq [4];
  int          m_pc [NM];
  bit          m_run [NM];

  function automatic logic [7:0] lane_bits(logic [7:0] lane, bit nib_hi);
    return nib_hi ? {4'h0, lane[7:4]} : {4'h0, lane[3:0]};
  endfunction

  function automatic void model_step();
    logic [63:0] n_regs [NM];
    logic [7:0]  n_intra [NM];
    logic [3:0]  n_inter [NM];
    n_regs = m_regs; n_intra = m_intra; n_inter = m_inter;
    for (int i = 0; i < NM; i++) begin
      int c, me;
      bit halt;
      if (!m_run[i]) continue;
      c = i / 4; me = i % 4;
      halt = 0;
      for (int s = 0; s < 2; s++) begin
        logic [63:0] w;
        logic [7:0] val, msk, x;
        int off, row;
        w = prog[i][m_pc[i]][s];
        off = int'(w[50:48]); row = int'(w[53:51]);
        val = 0; msk = 0;
        case (w[63:62])
          2'b01: begin   // LUT
            int sz;
            sz = int'(w[61:60]);
            for (int k = 0; k < 8; k++) begin
              int a;
              a = int'(w[6*k +: 6]);
              if (w[55] && a >= 40) begin
                int o;
                o = (a - 40) / 8;
                if (o >= me) o++;
                x[k] = m_intra[4*c + o][a % 8];
              end else x[k] = m_regs[i][a];
            end
            val = lut_fn(i, sz, int'(w[59:57]), x);
            if (w[54]) msk = 8'((1 << (1 << sz)) - 1);
            if (w[56]) n_intra[i][4*s +: 4] = val[3:0];
          end
          2'b10: begin   // MOVE
            logic [7:0] srow;
            srow = m_regs[i][8*int'(w[47:45]) +: 8];
            if (!w[61]) begin
              if (w[60]) n_inter[i] = w[44] ? srow[7:4] : srow[3:0];
              else if (w[59]) n_intra[i] = srow;
              else n_intra[i][4*int'(w[43]) +: 4] = w[44] ? srow[7:4] : srow[3:0];
            end else begin
              if (w[60]) begin
                val = {4'h0, m_busq[int'(w[39:38])][4*int'(w[41:40]) +: 4]}; msk = 8'h0f;
              end else if (w[59]) begin
                val = m_intra[4*c + int'(w[41:40])]; msk = 8'hff;
              end else begin
                val = lane_bits(m_intra[4*c + int'(w[41:40])], w[42]); msk = 8'h0f;
              end
            end
          end
          2'b11: halt = 1;
          default: ;
        endcase
        for (int b = 0; b < 8; b++)
          if (b >= off && msk[b - off]) n_regs[i][8*row + b] = val[b - off];
      end
      if (halt || m_pc[i] == 63) m_run[i] = 0;
      else m_pc[i]++;
    end
    for (int c = 0; c < 4; c++)
      m_busq[c] = {m_inter[4*c+3], m_inter[4*c+2], m_inter[4*c+1], m_inter[4*c]};
    m_regs = n_regs; m_intra = n_intra; m_inter = n_inter;
  endfunction

  // ---------------- program generator (conflict-free schedules)
  function automatic logic [63:0] gen_slot(int s, int bank, ref bit intra_used[2], ref bit wide_used,
                                           ref bit inter_used);
    logic [63:0] w;
    int kind;
    logic [5:0] wa;
    wa = {s ? 3'(4 + $urandom % 4) : 3'($urandom % 4), 3'($urandom)};
    w = '0;
    kind = $urandom % 10;
    if (kind < 5) begin
      logic [7:0][5:0] in_a;
      bit bo;
      for (int k = 0; k < 8; k++) in_a[k] = 6'($urandom);
      bo = ($urandom % 3 == 0) && !wide_used && !intra_used[s];
      if (bo) intra_used[s] = 1;
      w = enc_lut(lut_size_e'($urandom % 4), {1'(bank), 2'($urandom)}, bo, 1'($urandom % 3 == 0),
                  1'($urandom % 8 != 0), wa, in_a);
    end else if (kind < 7) begin
      int t;
      t = $urandom % 3;
      if (t == 0 && !inter_used) begin
        inter_used = 1;
        w = enc_send(1, 0, 3'($urandom), 1'($urandom), 0);
      end else if (t == 1 && s == 0 && !intra_used[0] && !intra_used[1]) begin
        wide_used = 1; intra_used[0] = 1; intra_used[1] = 1;
        w = enc_send(0, 1, 3'($urandom), 1'($urandom), 0);
      end else if (!wide_used && !intra_used[s]) begin
        intra_used[s] = 1;
        w = enc_send(0, 0, 3'($urandom), 1'($urandom), 1'(s));
      end
    end else if (kind < 9) begin
      w = enc_recv(1'($urandom % 3 == 0), 1'($urandom), wa, 1'($urandom), 2'($urandom), 2'($urandom));
    end
    return w;
  endfunction

  task automatic cfg_write(int mlb, cfg_sel_e sel, int addr, logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.mlb = 4'(mlb); cfg.sel = sel; cfg.addr = 8'(addr); cfg.wdata = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cfg = '0;
    foreach (ev[i]) ev[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(done && busy == '0, "idle after reset");
    // LUT images
    for (int i = 0; i < NM; i++)
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 256; r++) cfg_write(i, b ? CFG_BANK1 : CFG_BANK0, r, bank_row(i, b, 8'(r)));
    // Directed bus latency check. MLB 0 of cluster 0 sends in entry 0 a
    // nibble on its intra lane and another on its inter lane. MLB 1 of the
    // same cluster receives the intra lane in entries 0 and 1, MLB 0 of
    // cluster 1 receives the inter lane in entries 1 and 2. Lanes are zero
    // after reset, so only the reads one cycle (intra) and two cycles
    // (inter) after the send see the new data.
    begin
      logic [63:0] r0;
      r0 = {$urandom, $urandom};
      r0[3:0] = 4'ha; r0[7:4] = 4'h6;
      for (int i = 0; i < NM; i++) begin
        cfg_write(i, CFG_SCHED0, 0, INSTR_HALT);
        cfg_write(i, CFG_SCHED1, 0, INSTR_NOP);
      end
      cfg_write(0, CFG_REGS, 0, r0);
      cfg_write(0, CFG_SCHED0, 0, enc_send(0, 0, 3'd0, 1, 0));   // intra: regs 7:4 -> lane nibble 0
      cfg_write(0, CFG_SCHED1, 0, enc_send(1, 0, 3'd0, 0, 0));   // inter: regs 3:0
      cfg_write(0, CFG_SCHED0, 1, INSTR_HALT);
      cfg_write(1, CFG_SCHED0, 0, enc_recv(0, 0, 6'd8, 0, 2'd0, 2'd0));
      cfg_write(1, CFG_SCHED0, 1, enc_recv(0, 0, 6'd12, 0, 2'd0, 2'd0));
      cfg_write(1, CFG_SCHED1, 1, INSTR_HALT);
      cfg_write(4, CFG_REGS, 0, 64'h0);
      cfg_write(1, CFG_REGS, 0, 64'h0);
      cfg_write(4, CFG_SCHED0, 0, INSTR_NOP);
      cfg_write(4, CFG_SCHED0, 1, enc_recv(1, 0, 6'd8, 0, 2'd0, 2'd0));
      cfg_write(4, CFG_SCHED1, 1, INSTR_NOP);
      cfg_write(4, CFG_SCHED0, 2, enc_recv(1, 0, 6'd12, 0, 2'd0, 2'd0));
      cfg_write(4, CFG_SCHED1, 2, INSTR_HALT);
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      repeat (3) @(negedge clk);
      chk(done, "directed program finished in three cycles");
      chk(p_regs[1][11:8] == 4'h0 && p_regs[1][15:12] == 4'h6,
          $sformatf("intra-cluster data usable one cycle after the send (%h)", p_regs[1][15:8]));
      chk(p_regs[4][11:8] == 4'h0 && p_regs[4][15:12] == 4'ha,
          $sformatf("inter-cluster data usable two cycles after the send (%h)", p_regs[4][15:8]));
    end
    for (int rnd = 0; rnd < ROUNDS; rnd++) begin
      int cyc, exp_cyc, len;
      for (int i = 0; i < NM; i++) begin
        len = 8 + $urandom % 33;
        for (int e = 0; e < 64; e++) begin
          bit intra_used[2], wide_used, inter_used;
          int b0;
          intra_used = '{0, 0}; wide_used = 0; inter_used = 0;
          b0 = $urandom % 2;
          prog[i][e][0] = gen_slot(0, b0, intra_used, wide_used, inter_used);
          prog[i][e][1] = gen_slot(1, 1 - b0, intra_used, wide_used, inter_used);
          if (e == len) prog[i][e][$urandom % 2] = INSTR_HALT;
          cfg_write(i, CFG_SCHED0, e, prog[i][e][0]);
          cfg_write(i, CFG_SCHED1, e, prog[i][e][1]);
        end
        m_regs[i] = {$urandom, $urandom};
        cfg_write(i, CFG_REGS, 0, m_regs[i]);
      end
      // model state at start: lanes and held bus keep their values
      for (int i = 0; i < NM; i++) begin
        m_intra[i] = p_intra[i];
        m_inter[i] = p_inter[i];
        m_pc[i] = 0; m_run[i] = 1;
      end
      for (int c = 0; c < 4; c++) m_busq[c] = dut.inter_bus_q[c];
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 0; exp_cyc = 0;
      while (!done && cyc < 200) begin
        model_step();
        cyc++;
        rd_mlb = 4'(cyc + rnd);
        @(negedge clk);
        for (int i = 0; i < NM; i++)
          chk(p_regs[i] == m_regs[i], $sformatf("round %0d cycle %0d MLB %0d: %h expected %h",
                                              rnd, cyc, i, p_regs[i], m_regs[i]));
        chk(rd_regs == m_regs[rd_mlb], "read-back port");
      end
      begin
        bit any;
        any = 0;
        foreach (m_run[i]) any |= m_run[i];
        chk(!any, $sformatf("round %0d: model still running when the tile reports done", rnd));
      end
      for (int i = 0; i < NM; i++) begin
        int l;
        l = 0;
        for (int e = 0; e < 64; e++) if (prog[i][e][0] == INSTR_HALT || prog[i][e][1] == INSTR_HALT) begin l = e + 1; break; end
        if (l > exp_cyc) exp_cyc = l;
      end
      chk(cyc == exp_cyc, $sformatf("round %0d: %0d cycles, expected %0d", rnd, cyc, exp_cyc));
    end
    foreach (ev[i]) begin
      $display("mechanism %-22s %0d", ev_name[i], ev[i]);
      chk(ev[i] > 0, {"mechanism never exercised: ", ev_name[i]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
