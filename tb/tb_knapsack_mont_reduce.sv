// tb_knapsack_mont_reduce: checks gamma = y * w^-1 mod m for the three
// stages.
//
// The reference uses the published inverses w^-1 = 1367, 3395, 5938 and a
// plain multiplication and modulo, which shares nothing with the
// add-and-halve hardware.  Inputs are the published intermediate
// ciphertexts, the edge values 0 and the largest ciphertext, and random
// values over the whole ciphertext range.  The testbench counts how many
// results needed the final subtraction of m (the raw add-and-halve value
// was m or more) and requires that case to occur.  Every operation must
// take k + 1 clock edges (10, 14, 15).
module tb_knapsack_mont_reduce;
  import knapsack_pkg::*;

  int checks = 0;
  int failures = 0;
  int corrections = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  longint unsigned WINV [3] = '{1367, 3395, 5938};
  longint unsigned MOD [3]  = '{4093, 44357, 680337};
  int unsigned     KEXP [3] = '{9, 13, 14};
  longint unsigned YMAX [3] = '{21764, 291319, 8221789};  // sum of public key

  logic        start [3];
  logic        ready [3];
  logic        busy  [3];
  logic [14:0] y0;
  logic [18:0] y1;
  logic [22:0] y2;
  logic [11:0] g0;
  logic [15:0] g1;
  logic [19:0] g2;

  knapsack_mont_reduce #(.STAGE(0)) u0 (.clk, .rst_n, .start(start[0]), .y(y0), .gamma(g0), .ready(ready[0]), .busy(busy[0]));
  knapsack_mont_reduce #(.STAGE(1)) u1 (.clk, .rst_n, .start(start[1]), .y(y1), .gamma(g1), .ready(ready[1]), .busy(busy[1]));
  knapsack_mont_reduce #(.STAGE(2)) u2 (.clk, .rst_n, .start(start[2]), .y(y2), .gamma(g2), .ready(ready[2]), .busy(busy[2]));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Does the raw k-step add-and-halve result reach m (needs the correction)?
  function automatic bit needs_correction(int s, longint unsigned y);
    longint unsigned g = y;
    for (int i = 0; i < int'(KEXP[s]); i++) g = g[0] ? (g + MOD[s]) >> 1 : g >> 1;
    return g >= MOD[s];
  endfunction

  function automatic longint unsigned g_of(int s);
    case (s)
      0: return longint'(g0);
      1: return longint'(g1);
      default: return longint'(g2);
    endcase
  endfunction

  task automatic reduce(int s, longint unsigned y);
    int cyc = 0;
    @(negedge clk);
    case (s)
      0: y0 = 15'(y);
      1: y1 = 19'(y);
      default: y2 = 23'(y);
    endcase
    start[s] = 1'b1;
    @(negedge clk);
    start[s] = 1'b0;
    cyc = 1;
    while (!ready[s] && cyc < 100) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("stage %0d y=%0d gamma", s, y), g_of(s), y * WINV[s] % MOD[s]);
    check($sformatf("stage %0d y=%0d cycles", s, y), cyc, KEXP[s] + 1);
    if (needs_correction(s, y)) corrections++;
  endtask

  initial begin
    for (int s = 0; s < 3; s++) start[s] = 1'b0;
    y0 = '0; y1 = '0; y2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Published ciphertexts of each stage.
    reduce(0, 6686);    check("published gamma 6686", g0, 93);
    reduce(0, 14377);
    reduce(1, 156918);
    reduce(1, 32029);
    reduce(2, 4204879);
    reduce(2, 4287230);
    for (int s = 0; s < 3; s++) begin
      reduce(s, 0);
      reduce(s, YMAX[s]);
      reduce(s, MOD[s] - 1);
      for (int n = 0; n < 60; n++)
        reduce(s, longint'($urandom) % (YMAX[s] + 1));
    end
    // Large y congruent to t * w (so gamma = t is small): the raw
    // add-and-halve value then lands in [m, 2m) and needs the correction.
    for (int s = 0; s < 3; s++)
      for (longint unsigned t = 0; t < 10; t++) begin
        longint unsigned base = t * (64'd1 << KEXP[s]) % MOD[s];
        reduce(s, base + (YMAX[s] - base) / MOD[s] * MOD[s]);
      end

    checks++;
    if (corrections == 0) begin
      failures++;
      $display("FAIL final correction never exercised");
    end
    $display("final corrections exercised: %0d", corrections);
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
