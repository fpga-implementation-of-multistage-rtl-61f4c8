// tb_knapsack_enc_chain: checks the three-stage encryption cascade.
//
// First the published message {30, 843} is encrypted block by block and
// every stage output is compared with the published intermediate values
// ({6686, 14377}, {156918, 32029}, {4204879, 4287230}); the whole cascade
// must take 11 + 16 + 20 = 47 clock edges.  Then blocks are entered every
// 20 cycles (the slowest stage's latency), so that three blocks are in the
// cascade at once, and the results are checked in order against a
// reference encryption.  The number of cycles with more than one block in
// flight is counted and must be above zero.
module tb_knapsack_enc_chain;
  import knapsack_pkg::*;

  localparam int NB = 30;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  longint unsigned W [3]   = '{512, 8192, 16384};
  longint unsigned MOD [3] = '{4093, 44357, 680337};

  logic        start;
  logic [9:0]  x;
  logic [22:0] y;
  logic        ready, busy;
  logic [22:0] stage_y     [3];
  logic        stage_ready [3];

  knapsack_enc_chain u_dut (
    .clk, .rst_n, .start, .x, .y, .ready, .busy, .stage_y, .stage_ready
  );

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint unsigned enc1(int s, longint unsigned v);
    longint unsigned sum = 0;
    for (int i = 0; i < int'(STAGE_N[s]); i++)
      if (v[i]) sum += longint'(STAGE_ALPHA[s][i]) * W[s] % MOD[s];
    return sum;
  endfunction

  function automatic longint unsigned enc3(longint unsigned v);
    return enc1(2, enc1(1, enc1(0, v)));
  endfunction

  longint unsigned PUB_Y [3][2] = '{'{6686, 14377}, '{156918, 32029},
                                    '{4204879, 4287230}};
  longint unsigned MSG [2] = '{30, 843};

  // Stage outputs are checked as their ready pulses arrive.
  int stage_seen [3];
  int overlap_cycles = 0;
  int in_flight = 0;
  int out_count = 0;
  longint unsigned sent [$];
  bit phase_pub = 1'b1;

  always @(negedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < 3; s++)
        if (stage_ready[s]) begin
          if (phase_pub)
            check($sformatf("published stage %0d block %0d", s + 1, stage_seen[s]),
                  stage_y[s], PUB_Y[s][stage_seen[s]]);
          stage_seen[s]++;
        end
      if (ready) begin
        if (!phase_pub) begin
          check($sformatf("pipelined block %0d", out_count), y, enc3(sent.pop_front()));
          out_count++;
        end
        in_flight--;
      end
      if (in_flight > 1) overlap_cycles++;
    end
  end

  initial begin
    int cyc;
    start = 1'b0;
    x = '0;
    for (int s = 0; s < 3; s++) stage_seen[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Published message, one block at a time, with the total latency.
    for (int b = 0; b < 2; b++) begin
      @(negedge clk);
      x = 10'(MSG[b]);
      start = 1'b1;
      in_flight++;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!ready && cyc < 200) begin
        @(negedge clk);
        cyc++;
      end
      check($sformatf("cascade latency block %0d", b), cyc, 47);
      check($sformatf("published ciphertext block %0d", b), y, PUB_Y[2][b]);
    end
    @(negedge clk);
    phase_pub = 1'b0;

    // Pipelined stream: a block every 20 cycles.
    for (int b = 0; b < NB; b++) begin
      longint unsigned v = (b == 0) ? 1023 : longint'($urandom) & 10'h3ff;
      x = 10'(v);
      sent.push_back(v);
      start = 1'b1;
      in_flight++;
      @(negedge clk);
      start = 1'b0;
      repeat (19) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    check("pipelined blocks out", out_count, NB);
    checks++;
    if (overlap_cycles == 0) begin
      failures++;
      $display("FAIL pipelining never overlapped blocks");
    end
    $display("cycles with several blocks in flight: %0d", overlap_cycles);
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
