// tb_knapsack_enc_stage: checks the three encryption stages (key lengths 10,
// 15, 19) against the published example and against a reference sum.
//
// The reference ciphertext is computed here from the secret vectors with the
// public element alpha_i * w mod m, w written out as a number.  Every
// operation's length is measured: ready must come N + 1 clock edges after
// the edge that samples start (11, 16, 20).  Each stage is also restarted in
// the very cycle its ready pulses, which the cascade relies on for
// pipelining.
module tb_knapsack_enc_stage;
  import knapsack_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  longint unsigned W [3]   = '{512, 8192, 16384};
  longint unsigned MOD [3] = '{4093, 44357, 680337};

  logic        start [3];
  logic        ready [3];
  logic        busy  [3];
  logic [9:0]  x0;
  logic [14:0] x1;
  logic [18:0] x2;
  logic [14:0] y0;
  logic [18:0] y1;
  logic [22:0] y2;

  knapsack_enc_stage #(.STAGE(0)) u0 (.clk, .rst_n, .start(start[0]), .x(x0), .y(y0), .ready(ready[0]), .busy(busy[0]));
  knapsack_enc_stage #(.STAGE(1)) u1 (.clk, .rst_n, .start(start[1]), .x(x1), .y(y1), .ready(ready[1]), .busy(busy[1]));
  knapsack_enc_stage #(.STAGE(2)) u2 (.clk, .rst_n, .start(start[2]), .x(x2), .y(y2), .ready(ready[2]), .busy(busy[2]));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint unsigned model(int s, longint unsigned x);
    longint unsigned sum = 0;
    for (int i = 0; i < int'(STAGE_N[s]); i++)
      if (x[i]) sum += longint'(STAGE_ALPHA[s][i]) * W[s] % MOD[s];
    return sum;
  endfunction

  function automatic longint unsigned y_of(int s);
    case (s)
      0: return longint'(y0);
      1: return longint'(y1);
      default: return longint'(y2);
    endcase
  endfunction

  // Runs nblk blocks back to back through all three stages at once; block b
  // of stage s is xs[s][b].  Each next block starts in the cycle of ready.
  task automatic run(input longint unsigned xs [3][], input int nblk);
    int blk [3];
    int cyc [3];
    int done;
    for (int s = 0; s < 3; s++) begin blk[s] = 0; cyc[s] = 0; end
    @(negedge clk);
    x0 = 10'(xs[0][0]); x1 = 15'(xs[1][0]); x2 = 19'(xs[2][0]);
    for (int s = 0; s < 3; s++) start[s] = 1'b1;
    done = 0;
    while (done < 3) begin
      @(negedge clk);
      for (int s = 0; s < 3; s++) begin
        start[s] = 1'b0;
        if (blk[s] < nblk) begin
          cyc[s]++;
          if (ready[s]) begin
            check($sformatf("stage %0d block %0d y", s, blk[s]), y_of(s),
                  model(s, xs[s][blk[s]]));
            check($sformatf("stage %0d block %0d cycles", s, blk[s]),
                  cyc[s], STAGE_N[s] + 1);
            blk[s]++;
            cyc[s] = 0;
            if (blk[s] < nblk) begin
              start[s] = 1'b1;
              case (s)
                0: x0 = 10'(xs[0][blk[0]]);
                1: x1 = 15'(xs[1][blk[1]]);
                default: x2 = 19'(xs[2][blk[2]]);
              endcase
            end else done++;
          end else if (cyc[s] > 100) begin
            check($sformatf("stage %0d block %0d no ready", s, blk[s]), 0, 1);
            blk[s] = nblk;
            done++;
          end
        end
      end
    end
  endtask

  initial begin
    longint unsigned xs [3][];
    for (int s = 0; s < 3; s++) start[s] = 1'b0;
    x0 = '0; x1 = '0; x2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Published example: message {30, 843} and its intermediate ciphertexts.
    xs[0] = '{30, 843};
    xs[1] = '{6686, 14377};
    xs[2] = '{156918, 32029};
    run(xs, 2);
    // Direct comparison with the published stage outputs (last block).
    check("stage 0 published 843", y0, 14377);
    check("stage 1 published 14377", y1, 32029);
    check("stage 2 published 32029", y2, 4287230);

    // All-zero, all-one and random blocks.
    for (int s = 0; s < 3; s++) begin
      xs[s] = new[40];
      xs[s][0] = 0;
      xs[s][1] = (64'd1 << STAGE_N[s]) - 1;
      for (int b = 2; b < 40; b++)
        xs[s][b] = longint'($urandom) & ((64'd1 << STAGE_N[s]) - 1);
    end
    run(xs, 40);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
