// mlb_ctrl: program counter and run state of one MLB.
//
// The schedule is static and branch-free, so the controller only steps the
// program counter one schedule-table entry per clock while the MLB runs.
// A start pulse sets PC to 0 and starts the run. The run ends after the
// entry that holds a HALT instruction (the other slot of that entry still
// executes) or after the last entry of the table, whichever comes first.
// start has priority over halt. busy_o is high during every cycle whose
// entry executes; the entry at pc_o is executed in the same cycle.
// The step-by-one sequencing follows the published MLB; HALT and the
// stop at the last entry are this design's choices.
module mlb_ctrl #(
  parameter int unsigned DEPTH = enfire_pkg::SCHED_DEPTH
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     halt,     // current entry holds HALT
  output logic [$clog2(DEPTH)-1:0] pc_o,
  output logic                     busy_o
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [AW-1:0] pc_q;
  logic          run_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc_q  <= '0;
      run_q <= 1'b0;
    end else if (start) begin
      pc_q  <= '0;
      run_q <= 1'b1;
    end else if (run_q) begin
      if (halt || pc_q == AW'(DEPTH - 1)) begin
        run_q <= 1'b0;
      end else begin
        pc_q <= pc_q + 1'b1;
      end
    end
  end

  assign pc_o   = pc_q;
  assign busy_o = run_q;
endmodule
