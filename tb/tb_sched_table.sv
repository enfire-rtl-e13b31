// tb_sched_table: writes random instructions into random slots of the
// schedule table and reads every entry back against a shadow copy.
module tb_sched_table;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, wslot = 0;
  logic [5:0] raddr = 0, waddr = 0;
  logic [1:0][63:0] rdata;
  logic [63:0] wdata = 0;
  logic [1:0][63:0] shadow [64];

  sched_table dut (.clk, .raddr, .rdata, .we, .wslot, .waddr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill everything once
    for (int e = 0; e < 64; e++)
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        we = 1; waddr = 6'(e); wslot = s[0]; wdata = {$urandom, $urandom};
        shadow[e][s] = wdata;
      end
    // random overwrites
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      we = 1; waddr = 6'($urandom); wslot = 1'($urandom); wdata = {$urandom, $urandom};
      shadow[waddr][wslot] = wdata;
    end
    @(negedge clk); we = 0;
    for (int e = 0; e < 64; e++) begin
      raddr = 6'(e); #1;
      checks++;
      if (rdata !== shadow[e]) begin
        failures++; $display("FAIL entry %0d: %h expected %h", e, rdata, shadow[e]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
