// tb_mlb_regfile: register file of MLB 2 against a bit-array model: random
// masked writes from both slots, whole-file configuration writes, the 16
// bit read ports, the row read ports, and virtual-register reads of rows
// 5..7, which must return the lanes of MLBs 0, 1 and 3.
module tb_mlb_regfile;
  import enfire_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic cfg_we = 0;
  logic [63:0] cfg_wdata = 0;
  logic [1:0][7:0][5:0] raddr;
  logic [1:0] vreg;
  logic [1:0][7:0] rbit;
  logic [1:0][2:0] rrow_addr;
  logic [1:0][7:0] rrow;
  logic [1:0] we;
  logic [1:0][2:0] wrow;
  logic [1:0][7:0] wmask, wdata;
  logic [3:0][7:0] intra_bus;
  logic [63:0] regs;
  logic [63:0] model;

  mlb_regfile #(.MLB_ID(2)) dut (
    .clk, .rst_n, .cfg_we, .cfg_wdata, .raddr, .vreg, .rbit, .rrow_addr, .rrow,
    .we, .wrow, .wmask, .wdata, .intra_bus_i(intra_bus), .regs_o(regs));

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
    we = 0; vreg = 0; raddr = '0; rrow_addr = '0; wrow = '0; wmask = '0; wdata = '0;
    intra_bus = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    chk(regs == 64'h0, "reset clears");
    model = 0;
    // configuration write
    @(negedge clk); cfg_we = 1; cfg_wdata = 64'h0123_4567_89ab_cdef; model = cfg_wdata;
    @(negedge clk); cfg_we = 0;
    chk(regs == model, "config write");
    for (int it = 0; it < 400; it++) begin
      // random reads of the current state
      for (int s = 0; s < 2; s++) begin
        vreg[s] = 1'($urandom);
        for (int i = 0; i < 8; i++) raddr[s][i] = 6'($urandom);
        rrow_addr[s] = 3'($urandom);
      end
      intra_bus = {$urandom};
      #1;
      for (int s = 0; s < 2; s++) begin
        for (int i = 0; i < 8; i++) begin
          logic exp;
          int a;
          a = int'(raddr[s][i]);
          if (vreg[s] && a >= 40) begin
            int others[3] = '{0, 1, 3};
            exp = intra_bus[others[(a - 40) / 8]][a % 8];
          end else exp = model[a];
          chk(rbit[s][i] == exp, $sformatf("read slot %0d port %0d addr %0d vreg %0b", s, i, a, vreg[s]));
        end
        chk(rrow[s] == model[8*rrow_addr[s] +: 8], "row read");
      end
      // random writes, slots on different rows
      for (int s = 0; s < 2; s++) begin
        we[s] = 1'($urandom);
        wmask[s] = 8'($urandom);
        wdata[s] = 8'($urandom);
      end
      wrow[0] = 3'($urandom);
      wrow[1] = wrow[0] + 3'(1 + $urandom % 7);
      for (int s = 0; s < 2; s++)
        if (we[s])
          for (int b = 0; b < 8; b++)
            if (wmask[s][b]) model[8*wrow[s] + b] = wdata[s][b];
      @(negedge clk);
      we = 0;
      chk(regs == model, $sformatf("state after write %0d", it));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
