// tb_mem_ctrl: checks the one-hot bank enable and the wordline segment
// select for every width and segment, and that an idle slot selects
// nothing. The 16 LUT segments of a row must also be disjoint and leave
// exactly columns 31..28 unselected.
module tb_mem_ctrl;
  import enfire_pkg::*;
  import tb_enfire_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  mem_req_t req;
  logic [1:0] bank_en;
  logic [63:0] seg_sel, all_sel;

  mem_ctrl dut (.req, .bank_en, .seg_sel);

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    all_sel = '0;
    for (int sz = 0; sz < 4; sz++)
      for (int k = 0; k < 4; k++)
        for (int b = 0; b < 2; b++) begin
          logic [63:0] exp;
          req.valid = 1; req.bank = b[0]; req.row = 8'($urandom);
          req.seg_lsb = 6'(seg_col(sz, k)); req.size = lut_size_e'(sz);
          #1;
          exp = '0;
          for (int j = 0; j < (1 << sz); j++) exp[seg_col(sz, k) + j] = 1'b1;
          chk(seg_sel == exp, $sformatf("select sz=%0d k=%0d", sz, k));
          chk(bank_en == (b == 0 ? 2'b01 : 2'b10), "bank enable");
        end
    // union of the 16 segments of a row
    for (int sz = 0; sz < 4; sz++)
      for (int k = 0; k < 4; k++) begin
        req.valid = 1; req.bank = 0;
        req.seg_lsb = 6'(seg_col(sz, k)); req.size = lut_size_e'(sz);
        #1;
        chk((all_sel & seg_sel) == '0, "segments disjoint");
        all_sel = all_sel | seg_sel;
      end
    #1;
    chk(all_sel == 64'hffff_ffff_0fff_ffff, $sformatf("only 31..28 left as data: %h", all_sel));
    req.valid = 0; #1;
    chk(bank_en == 0 && seg_sel == 0, "idle selects nothing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
