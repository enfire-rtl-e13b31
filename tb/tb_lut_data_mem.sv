// tb_lut_data_mem: fills both banks with LUT images, then issues two
// parallel reads per cycle (one per bank, in either slot order) and checks
// each slot's segment data; an idle slot must read zeros.
module tb_lut_data_mem;
  import tb_enfire_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic [1:0][1:0] bank_en;
  logic [1:0][7:0] row;
  logic [1:0][63:0] seg_sel, rdata;
  logic [1:0] cfg_we = 0;
  logic [7:0] cfg_addr = 0;
  logic [63:0] cfg_wdata = 0;

  lut_data_mem dut (.clk, .rst_n(1'b1), .bank_en, .row, .seg_sel, .rdata, .cfg_we, .cfg_addr, .cfg_wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bank_en = '0; row = '0; seg_sel = '0;
    for (int b = 0; b < 2; b++)
      for (int r = 0; r < 256; r++) begin
        @(negedge clk);
        cfg_we = 2'b01 << b; cfg_addr = 8'(r); cfg_wdata = bank_row(5, b, 8'(r));
      end
    @(negedge clk); cfg_we = 0;
    for (int i = 0; i < 400; i++) begin
      int sz[2], k[2], bk[2];
      logic [63:0] exp[2];
      bk[0] = $urandom % 2; bk[1] = 1 - bk[0];
      for (int s = 0; s < 2; s++) begin
        sz[s] = $urandom % 4; k[s] = $urandom % 4;
        row[s] = 8'($urandom);
        seg_sel[s] = '0;
        for (int j = 0; j < (1 << sz[s]); j++) seg_sel[s][seg_col(sz[s], k[s]) + j] = 1'b1;
        bank_en[s] = 2'b01 << bk[s];
        exp[s] = '0;
        for (int j = 0; j < (1 << sz[s]); j++)
          exp[s][seg_col(sz[s], k[s]) + j] = lut_fn(5, sz[s], 4 * bk[s] + k[s], row[s])[j];
      end
      if (i % 9 == 0) begin bank_en[1] = 0; exp[1] = '0; end
      @(negedge clk);
      for (int s = 0; s < 2; s++) begin
        checks++;
        if (rdata[s] !== exp[s]) begin
          failures++; $display("FAIL slot %0d bank %0d row %h: %h exp %h", s, bk[s], row[s], rdata[s], exp[s]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
