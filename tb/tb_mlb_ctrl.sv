// tb_mlb_ctrl: checks the MLB program counter: reset state, start from
// entry 0, one step per cycle, stop after a HALT entry, stop after the last
// entry, and restart by start while running.
module tb_mlb_ctrl;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, halt = 0;
  logic [5:0] pc;
  logic busy;

  mlb_ctrl dut (.clk, .rst_n, .start, .halt, .pc_o(pc), .busy_o(busy));

  always #5 clk = ~clk;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (pc=%0d busy=%0b)", what, pc, busy); end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    chk(!busy && pc == 0, "idle after reset");
    // run and halt at entry 10
    start = 1; @(negedge clk); start = 0;
    for (int i = 0; i < 10; i++) begin
      chk(busy && pc == 6'(i), $sformatf("step %0d", i));
      @(negedge clk);
    end
    halt = 1;
    chk(busy && pc == 10, "at halt entry");
    @(negedge clk); halt = 0;
    chk(!busy, "stopped after halt");
    repeat (3) @(negedge clk);
    chk(!busy && pc == 10, "stays stopped");
    // run to the end of the table: 64 busy cycles
    start = 1; @(negedge clk); start = 0;
    begin
      int n = 0;
      while (busy && n < 100) begin n++; @(negedge clk); end
      chk(n == 64, $sformatf("64 entries executed, got %0d", n));
    end
    // restart while running
    start = 1; @(negedge clk); start = 0;
    repeat (5) @(negedge clk);
    start = 1; @(negedge clk); start = 0;
    chk(busy && pc == 0, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
