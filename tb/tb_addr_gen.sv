// tb_addr_gen: for every LUT width and index and random inputs, checks the
// bank, the row (the eight input bits) and the segment's lowest column
// against an independent copy of the segment layout.
module tb_addr_gen;
  import enfire_pkg::*;
  import tb_enfire_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0;
  logic valid;
  logic [7:0] lut_in;
  lut_size_e lut_size;
  logic [2:0] lut_idx;
  mem_req_t req;

  addr_gen dut (.valid, .lut_in, .lut_size, .lut_idx, .req);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int sz = 0; sz < 4; sz++)
      for (int idx = 0; idx < 8; idx++)
        for (int r = 0; r < 8; r++) begin
          valid = 1'($urandom); lut_in = 8'($urandom);
          lut_size = lut_size_e'(sz); lut_idx = 3'(idx);
          #1;
          checks++;
          if (req.valid != valid || req.bank != (idx >= 4) || req.row != lut_in
              || int'(req.seg_lsb) != seg_col(sz, idx % 4) || req.size != lut_size) begin
            failures++;
            $display("FAIL sz=%0d idx=%0d in=%h: bank %0d row %h lsb %0d", sz, idx, lut_in,
                     req.bank, req.row, req.seg_lsb);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
