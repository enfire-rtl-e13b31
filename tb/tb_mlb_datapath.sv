// tb_mlb_datapath: drives decoded LUT and MOVE operations into one slot at
// a time (the other idle) with random bank data, register rows and bus
// contents, and checks the register write port (row, bit enables, aligned
// data) and the lane updates against values computed here.
module tb_mlb_datapath;
  import enfire_pkg::*;
  import tb_enfire_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  dec_t [1:0] dec;
  logic [1:0][63:0] mem_rdata;
  logic [1:0][2:0] rrow_addr;
  logic [1:0][7:0] rrow;
  logic [3:0][7:0] intra_bus;
  logic [3:0][15:0] inter_bus;
  logic [1:0] we;
  logic [1:0][2:0] wrow;
  logic [1:0][7:0] wmask, wdata;
  logic [7:0] intra_we, intra_wd;
  logic inter_we;
  logic [3:0] inter_wd;

  mlb_datapath dut (.clk, .rst_n(1'b1), .dec, .mem_rdata, .rrow_addr, .rrow, .intra_bus_i(intra_bus),
    .inter_bus_i(inter_bus), .we, .wrow, .wmask, .wdata, .intra_we, .intra_wd, .inter_we, .inter_wd);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 600; it++) begin
      int s, sz, k, off, kind;
      logic [7:0] resp, val, vm;
      s = it % 2;
      dec = '0;
      mem_rdata = {$urandom, $urandom, $urandom, $urandom};
      rrow = 16'($urandom);
      intra_bus = $urandom;
      inter_bus = {$urandom, $urandom};
      kind = $urandom % 3;   // 0 LUT, 1 send, 2 receive
      sz = $urandom % 4; k = $urandom % 4;
      dec[s].waddr = 6'($urandom);
      off = int'(dec[s].waddr[2:0]);
      if (kind == 0) begin
        dec[s].is_lut = 1; dec[s].size = lut_size_e'(sz); dec[s].lut_idx = 3'($urandom);
        dec[s].lut_idx[1:0] = 2'(k);
        dec[s].reg_we = 1'($urandom); dec[s].bus_out = 1'($urandom);
        resp = 0;
        for (int j = 0; j < (1 << sz); j++) resp[j] = mem_rdata[s][seg_col(sz, k) + j];
        #1;
        chk(we[s] == dec[s].reg_we && we[1-s] == 0, "lut write enable");
        chk(wrow[s] == dec[s].waddr[5:3], "lut write row");
        vm = 8'((16'((1 << (1 << sz)) - 1)) << off);
        chk(wmask[s] == vm, $sformatf("lut mask sz=%0d off=%0d", sz, off));
        chk(wdata[s] == 8'(16'(resp) << off), "lut data");
        chk(intra_we == (dec[s].bus_out ? (8'h0f << (4 * s)) : 8'h00), "bus out enable");
        if (dec[s].bus_out) chk(intra_wd[4*s +: 4] == resp[3:0], "bus out data");
        chk(!inter_we, "no inter write");
      end else begin
        dec[s].is_move = 1;
        dec[s].mv_recv = (kind == 2);
        dec[s].mv_inter = 1'($urandom); dec[s].mv_wide = 1'($urandom);
        dec[s].mv_src_row = 3'($urandom); dec[s].mv_src_nib = 1'($urandom);
        dec[s].mv_dst_nib = 1'($urandom); dec[s].mv_rx_nib = 1'($urandom);
        dec[s].mv_rx_mlb = 2'($urandom); dec[s].mv_rx_cluster = 2'($urandom);
        #1;
        chk(rrow_addr[s] == dec[s].mv_src_row, "row read address");
        if (kind == 1) begin
          logic [3:0] nib;
          nib = dec[s].mv_src_nib ? rrow[s][7:4] : rrow[s][3:0];
          chk(we == 0, "send writes no register");
          if (dec[s].mv_inter) chk(inter_we && inter_wd == nib && intra_we == 0, "inter send");
          else if (dec[s].mv_wide) chk(intra_we == 8'hff && intra_wd == rrow[s] && !inter_we, "wide send");
          else chk(intra_we == (8'h0f << (4 * dec[s].mv_dst_nib)) && intra_wd[4*dec[s].mv_dst_nib +: 4] == nib,
                   "narrow send");
        end else begin
          logic [7:0] lane;
          lane = intra_bus[dec[s].mv_rx_mlb];
          if (dec[s].mv_inter) begin
            val = 8'(inter_bus[dec[s].mv_rx_cluster][4*dec[s].mv_rx_mlb +: 4]); vm = 8'h0f;
          end else if (dec[s].mv_wide) begin
            val = lane; vm = 8'hff;
          end else begin
            val = 8'(dec[s].mv_rx_nib ? lane[7:4] : lane[3:0]); vm = 8'h0f;
          end
          chk(we[s] && !we[1-s] && wrow[s] == dec[s].waddr[5:3], "receive write");
          chk(wmask[s] == 8'(16'(vm) << off) && wdata[s] == 8'(16'(val) << off), "receive data");
          chk(intra_we == 0 && !inter_we, "receive drives no lane");
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
