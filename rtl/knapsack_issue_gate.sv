// knapsack_issue_gate: spaces the blocks entering a stage cascade.
//
// Stages of a cascade take a new block only when idle and have no input
// buffer.  If consecutive blocks enter the cascade at least INTERVAL clock
// cycles apart, with INTERVAL at least the latency of the slowest stage, each
// block reaches every stage after the previous block has left it, so the
// stages can all be busy with different blocks at once (pipelining) without
// ever colliding.  This gate is this design's own way of guaranteeing that;
// the source only says the stages can be pipelined.
//
// Interface and timing: can_start is high when a block may enter.  A req in
// a cycle where can_start is high is passed on as start (same cycle,
// combinational) and closes the gate for INTERVAL cycles; a req while the gate
// is closed is not passed on, and the requester must hold it.
module knapsack_issue_gate #(
  parameter int unsigned INTERVAL = 20,
  localparam int unsigned CW      = $clog2(INTERVAL + 1)
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  output logic can_start,
  output logic start
);

  logic [CW-1:0] wait_q;   // cycles until the gate opens again

  assign can_start = (wait_q == '0);
  assign start     = req & can_start;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)          wait_q <= '0;
    else if (start)      wait_q <= CW'(INTERVAL - 1);
    else if (!can_start) wait_q <= wait_q - 1'b1;
  end

endmodule
