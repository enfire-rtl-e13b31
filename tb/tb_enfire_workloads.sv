// tb_enfire_workloads: replays the operation mix of the published
// ISCAS/MCNC benchmark mappings on a full tile at its default size.
//
// The benchmarks' netlists are not part of this repository, so each run
// uses the published per-benchmark numbers (LUTs of each width, MOVE
// operations, total cycles, MLBs) with random LUT contents and random
// connections. The LUTs are packed onto MLBs (at most four of each width
// per bank, bank 0 LUTs in slot 0 and bank 1 LUTs in slot 1) starting
// from the published MLB count and adding MLBs only where the per-width or
// per-cycle capacity requires it; MOVEs fill free slots; every used MLB
// ends with HALT in the last cycle. The tile is then run and checked every
// cycle against the instruction-level model, and the run length must equal
// the published cycle count. Where a tile has no free segment of a LUT's
// own width left (des, misex3 and seq have more than 128 8x1 LUTs), the LUT
// is placed in a free segment of the next wider width and issued at that
// width: its function sits in the low column(s) and the surplus output bits
// land in a scratch register bit chosen by the mapping.
module tb_enfire_workloads;
  import enfire_pkg::*;
  import tb_enfire_pkg::*;
  localparam int NM = 16;
  localparam int NB = 19;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  cfg_req_t cfg;
  logic [3:0] rd_mlb = 0;
  logic [63:0] rd_regs;
  logic [NM-1:0] busy;
  logic done;

  // name, 8x1, 8x2, 8x4, 8x8, MOVEs, cycles, MLBs
  typedef struct {
    string name;
    int n [4];
    int moves;
    int cycles;
    int mlbs;
  } bench_t;
  bench_t bench [NB] = '{
    '{"c432",   '{10, 3, 8, 1},     5,   11, 2},
    '{"c880",   '{27, 9, 7, 0},     2,   6,  5},
    '{"c1355",  '{12, 21, 1, 0},    4,   5,  5},
    '{"c1908",  '{1, 4, 15, 10},    13,  13, 3},
    '{"c2670",  '{24, 16, 13, 14},  10,  6,  16},
    '{"c3540",  '{99, 33, 5, 4},    48,  14, 16},
    '{"c5315",  '{81, 42, 18, 11},  46,  10, 16},
    '{"c6288",  '{0, 3, 85, 50},    42,  43, 5},
    '{"c7552",  '{96, 26, 31, 21},  59,  11, 16},
    '{"alu4",   '{40, 8, 3, 5},     15,  10, 7},
    '{"apex2",  '{75, 56, 24, 18},  106, 22, 16},
    '{"apex4",  '{0, 2, 8, 3},      4,   3,  4},
    '{"des",    '{170, 88, 6, 2},   27,  12, 16},
    '{"e64",    '{0, 0, 0, 10},     0,   10, 1},
    '{"ex5p",   '{0, 0, 0, 8},      0,   1,  4},
    '{"misex3", '{134, 5, 7, 17},   57,  10, 16},
    '{"pdc",    '{82, 69, 42, 30},  154, 25, 16},
    '{"seq",    '{270, 14, 5, 29},  139, 21, 16},
    '{"spla",   '{83, 88, 54, 37},  166, 26, 16}};

  enfire_tile dut (.clk, .rst_n, .start, .cfg, .rd_mlb, .rd_regs, .busy, .done);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  logic [63:0] p_regs [NM];
  logic [7:0] p_intra [NM];
  logic [3:0] p_inter [NM];
  for (genvar c = 0; c < 4; c++) begin : g_probe_c
    for (genvar m = 0; m < 4; m++) begin : g_probe_m
      assign p_regs[4*c+m]  = dut.g_cl[c].u_cluster.g_mlb[m].u_mlb.regs_o;
      assign p_intra[4*c+m] = dut.g_cl[c].u_cluster.g_mlb[m].u_mlb.intra_lane_o;
      assign p_inter[4*c+m] = dut.g_cl[c].u_cluster.g_mlb[m].u_mlb.inter_lane_o;
    end
  end

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

  task automatic cfg_write(int mlb, cfg_sel_e sel, int addr, logic [63:0] data);
    @(negedge clk);
    cfg.we = 1; cfg.mlb = 4'(mlb); cfg.sel = sel; cfg.addr = 8'(addr); cfg.wdata = data;
    @(negedge clk);
    cfg.we = 0;
  endtask

  function automatic logic [63:0] rand_lut(int sz, int idx, int s);
    logic [7:0][5:0] in_a;
    logic [5:0] wa;
    for (int k = 0; k < 8; k++) in_a[k] = 6'($urandom);
    wa = {s ? 3'(4 + $urandom % 4) : 3'($urandom % 4), 3'($urandom)};
    return enc_lut(lut_size_e'(sz), 3'(idx), 0, 1'($urandom % 3 == 0), 1, wa, in_a);
  endfunction

  function automatic logic [63:0] rand_move(int s);
    logic [5:0] wa;
    wa = {s ? 3'(4 + $urandom % 4) : 3'($urandom % 4), 3'($urandom)};
    case ($urandom % 4)
      0: return enc_send(0, 0, 3'($urandom), 1'($urandom), 1'(s));
      1: return enc_recv(0, 1'($urandom), wa, 1'($urandom), 2'($urandom), 2'($urandom));
      2: return (s == 1) ? enc_send(1, 0, 3'($urandom), 1'($urandom), 0)
                         : enc_send(0, 0, 3'($urandom), 1'($urandom), 1'(s));
      default: return enc_recv(1, 0, wa, 1'($urandom), 2'($urandom), 2'($urandom));
    endcase
  endfunction

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ran;
    cfg = '0;
    ran = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NM; i++)
      for (int b = 0; b < 2; b++)
        for (int r = 0; r < 256; r++) cfg_write(i, (b != 0) ? CFG_BANK1 : CFG_BANK0, r, bank_row(i, b, 8'(r)));
    for (int bi = 0; bi < NB; bi++) begin
      int lutcnt [NM][4][2];
      int used [NM][2];       // slots used per MLB and slot column
      int nm, C, cyc, hosted;
      C = bench[bi].cycles;
      hosted = 0;
      nm = bench[bi].mlbs;
      foreach (lutcnt[i, w, b]) lutcnt[i][w][b] = 0;
      foreach (used[i, s]) used[i][s] = 0;
      for (int i = 0; i < NM; i++)
        for (int e = 0; e < 64; e++) prog[i][e] = '{INSTR_NOP, INSTR_NOP};
      // pack LUTs, widest first; slot 1 of the last entry is kept for HALT.
      // When every segment of the LUT's own width in the tile is taken, it
      // goes into a free segment of the next wider width.
      for (int w = 3; w >= 0; w--)
        for (int j = 0; j < bench[bi].n[w]; j++) begin
          bit placed;
          int ww;
          placed = 0;
          ww = w;
          while (!placed && ww < 4) begin
            for (int i = 0; i < nm && !placed; i++)
              for (int b = 0; b < 2 && !placed; b++)
                if (lutcnt[i][ww][b] < 4 && used[i][b] < C - b) begin
                  prog[i][used[i][b]][b] = rand_lut(ww, 4 * b + lutcnt[i][ww][b], b);
                  lutcnt[i][ww][b]++;
                  used[i][b]++;
                  placed = 1;
                end
            if (!placed) begin
              if (nm < NM) nm++;
              else ww++;
            end
          end
          if (!placed) nm = NM + 1;
          if (ww != w) hosted++;
        end
      for (int j = 0; j < bench[bi].moves; j++) begin
        bit placed;
        placed = 0;
        while (!placed) begin
          for (int i = 0; i < nm && !placed; i++)
            for (int s = 0; s < 2 && !placed; s++)
              if (used[i][s] < C - s) begin
                prog[i][used[i][s]][s] = rand_move(s);
                used[i][s]++;
                placed = 1;
              end
          if (!placed) nm++;
        end
      end
      chk(nm <= NM, $sformatf("%s packs into one tile (%0d MLBs)", bench[bi].name, nm));
      for (int i = 0; i < NM; i++) begin
        // an inter-cluster send may sit in slot 1 only; a slot-0 nibble send
        // never collides with it. Used MLBs halt in the last entry.
        prog[i][(i < nm) ? C - 1 : 0][1] = INSTR_HALT;
        for (int e = 0; e < 64; e++) begin
          cfg_write(i, CFG_SCHED0, e, prog[i][e][0]);
          cfg_write(i, CFG_SCHED1, e, prog[i][e][1]);
        end
        m_regs[i] = {$urandom, $urandom};
        cfg_write(i, CFG_REGS, 0, m_regs[i]);
      end
      for (int i = 0; i < NM; i++) begin
        m_intra[i] = p_intra[i];
        m_inter[i] = p_inter[i];
        m_pc[i] = 0; m_run[i] = 1;
      end
      for (int c = 0; c < 4; c++) m_busq[c] = dut.inter_bus_q[c];
      @(negedge clk); start = 1; @(negedge clk); start = 0;
      cyc = 0;
      while (!done && cyc < 100) begin
        model_step();
        cyc++;
        @(negedge clk);
        for (int i = 0; i < NM; i++)
          chk(p_regs[i] == m_regs[i], $sformatf("%s cycle %0d MLB %0d", bench[bi].name, cyc, i));
      end
      chk(cyc == C, $sformatf("%s: %0d cycles, published %0d", bench[bi].name, cyc, C));
      $display("workload %-7s %3d LUTs (%0d in wider segments) %3d MOVEs on %2d MLBs (published %2d): %2d cycles (published %2d)",
               bench[bi].name, bench[bi].n[0] + bench[bi].n[1] + bench[bi].n[2] + bench[bi].n[3],
               hosted, bench[bi].moves, nm, bench[bi].mlbs, cyc, C);
      ran++;
    end
    chk(ran == NB, "every workload run");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
