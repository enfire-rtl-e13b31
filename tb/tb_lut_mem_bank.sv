// tb_lut_mem_bank: loads all 256 rows with random data, then reads random
// rows with random segment selects: selected columns must return the
// stored bits and all others zero.
module tb_lut_mem_bank;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0;
  logic [7:0] raddr = 0, waddr = 0;
  logic [63:0] seg_sel = 0, rdata, wdata = 0;
  logic [63:0] shadow [256];

  lut_mem_bank dut (.clk, .raddr, .seg_sel, .rdata, .we, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 256; r++) begin
      @(negedge clk); we = 1; waddr = 8'(r); wdata = {$urandom, $urandom}; shadow[r] = wdata;
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < 1000; i++) begin
      raddr = 8'($urandom);
      seg_sel = (i % 5 == 0) ? '1 : {$urandom, $urandom};
      #1;
      checks++;
      if (rdata !== (shadow[raddr] & seg_sel)) begin
        failures++; $display("FAIL row %0d sel %h: %h", raddr, seg_sel, rdata);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
