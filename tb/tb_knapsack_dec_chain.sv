// tb_knapsack_dec_chain: checks the three-stage decryption cascade.
//
// The published ciphertexts {4204879, 4287230} are decrypted one at a time;
// every stage output must match the published intermediate values
// ({156918, 32029} after the third-stage decryptor, {6686, 14377} after the
// second, {30, 843} after the first), and the cascade must take
// 35 + 30 + 21 = 86 clock edges.  Then ciphertexts of random blocks (made
// by a reference encryption in the testbench) are entered every 35 cycles,
// the slowest stage's latency, so blocks overlap in the cascade, and the
// recovered blocks are checked in order.
module tb_knapsack_dec_chain;
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
  logic [22:0] y;
  logic [9:0]  x;
  logic        ready, busy;
  logic [22:0] stage_x     [3];
  logic        stage_ready [3];

  knapsack_dec_chain u_dut (
    .clk, .rst_n, .start, .y, .x, .ready, .busy, .stage_x, .stage_ready
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

  // Published values: PUB_X[s] is the output of decryption stage s.
  longint unsigned PUB_X [3][2] = '{'{30, 843}, '{6686, 14377}, '{156918, 32029}};
  longint unsigned CIPH [2] = '{4204879, 4287230};

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
            check($sformatf("published decryption stage %0d block %0d", s + 1,
                            stage_seen[s]), stage_x[s], PUB_X[s][stage_seen[s]]);
          stage_seen[s]++;
        end
      if (ready) begin
        if (!phase_pub) begin
          check($sformatf("pipelined block %0d", out_count), x, sent.pop_front());
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
    y = '0;
    for (int s = 0; s < 3; s++) stage_seen[s] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    for (int b = 0; b < 2; b++) begin
      @(negedge clk);
      y = 23'(CIPH[b]);
      start = 1'b1;
      in_flight++;
      @(negedge clk);
      start = 1'b0;
      cyc = 1;
      while (!ready && cyc < 300) begin
        @(negedge clk);
        cyc++;
      end
      check($sformatf("cascade latency block %0d", b), cyc, 86);
      check($sformatf("recovered message block %0d", b), x, PUB_X[0][b]);
    end
    @(negedge clk);
    phase_pub = 1'b0;

    for (int b = 0; b < NB; b++) begin
      longint unsigned v = (b == 0) ? 1023 : longint'($urandom) & 10'h3ff;
      y = 23'(enc3(v));
      sent.push_back(v);
      start = 1'b1;
      in_flight++;
      @(negedge clk);
      start = 1'b0;
      repeat (34) @(negedge clk);
    end
    repeat (150) @(negedge clk);
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
