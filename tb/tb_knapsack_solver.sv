// tb_knapsack_solver: checks the greedy superincreasing-knapsack solver of
// the three stages.
//
// For a plaintext block x the testbench forms gamma = sum of alpha_i over
// the set bits (the secret vectors of the published example, written out
// here for stage 0) and expects x back.  One-hot blocks make gamma equal to a
// single alpha_i, the case where "greater or equal" and "greater" differ.
// Every operation must take N + 1 clock edges (11, 16, 20).
module tb_knapsack_solver;
  import knapsack_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  longint unsigned SEC0 [10] = '{3, 5, 11, 25, 52, 105, 212, 430, 871, 1750};

  logic        start [3];
  logic        ready [3];
  logic        busy  [3];
  logic [11:0] g0;
  logic [15:0] g1;
  logic [19:0] g2;
  logic [9:0]  x0;
  logic [14:0] x1;
  logic [18:0] x2;

  knapsack_solver #(.STAGE(0)) u0 (.clk, .rst_n, .start(start[0]), .gamma(g0), .x(x0), .ready(ready[0]), .busy(busy[0]));
  knapsack_solver #(.STAGE(1)) u1 (.clk, .rst_n, .start(start[1]), .gamma(g1), .x(x1), .ready(ready[1]), .busy(busy[1]));
  knapsack_solver #(.STAGE(2)) u2 (.clk, .rst_n, .start(start[2]), .gamma(g2), .x(x2), .ready(ready[2]), .busy(busy[2]));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint unsigned alpha(int s, int i);
    return (s == 0) ? SEC0[i] : longint'(STAGE_ALPHA[s][i]);
  endfunction

  function automatic longint unsigned x_of(int s);
    case (s)
      0: return longint'(x0);
      1: return longint'(x1);
      default: return longint'(x2);
    endcase
  endfunction

  task automatic solve_blk(int s, longint unsigned x);
    longint unsigned g = 0;
    int cyc;
    for (int i = 0; i < int'(STAGE_N[s]); i++) if (x[i]) g += alpha(s, i);
    @(negedge clk);
    case (s)
      0: g0 = 12'(g);
      1: g1 = 16'(g);
      default: g2 = 20'(g);
    endcase
    start[s] = 1'b1;
    @(negedge clk);
    start[s] = 1'b0;
    cyc = 1;
    while (!ready[s] && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("stage %0d gamma=%0d x", s, g), x_of(s), x);
    check($sformatf("stage %0d gamma=%0d cycles", s, g), cyc, STAGE_N[s] + 1);
  endtask

  initial begin
    for (int s = 0; s < 3; s++) start[s] = 1'b0;
    g0 = '0; g1 = '0; g2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Published stage-0 example: gamma 93 -> 30 and 2866 -> 843.
    solve_blk(0, 30);   check("published gamma", g0, 93);
    solve_blk(0, 843);  check("published gamma", g0, 2866);
    for (int s = 0; s < 3; s++) begin
      solve_blk(s, 0);
      solve_blk(s, (64'd1 << STAGE_N[s]) - 1);
      for (int i = 0; i < int'(STAGE_N[s]); i++) solve_blk(s, 64'd1 << i);
      for (int n = 0; n < 50; n++)
        solve_blk(s, longint'($urandom) & ((64'd1 << STAGE_N[s]) - 1));
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
