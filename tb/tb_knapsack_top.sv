// tb_knapsack_top: end-to-end test of the three-stage cryptosystem at its
// default configuration.
//
// A stream of plaintext blocks (the published message {30, 843} first, then
// every one of the 1024 possible 10-bit blocks in a shuffled order) is offered to the encryption part
// with enc_req held high, so the issue gate has to hold requests back.  Every
// ciphertext is checked against a reference encryption computed here
// (published values for the first two) and looped into a queue that feeds
// the decryption part the same way; every recovered block must equal the
// plaintext it came from.  Latency from acceptance to ready is checked for
// both parts (47 and 86 cycles).
//
// Mechanisms counted, each of which must occur at least once: issue-gate
// hold-off on either part, blocks overlapping in either cascade (pipelining),
// and the start/ready hand-off into every stage of both cascades.
module tb_knapsack_top;
  import knapsack_pkg::*;

  localparam int NB = 2 + 1024;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  longint unsigned W [3]   = '{512, 8192, 16384};
  longint unsigned MOD [3] = '{4093, 44357, 680337};

  logic        enc_req, enc_can_start, enc_ready, enc_busy;
  logic [9:0]  enc_x;
  logic [22:0] enc_y;
  logic [22:0] enc_stage_y [3];
  logic        enc_stage_ready [3];
  logic        dec_req, dec_can_start, dec_ready, dec_busy;
  logic [22:0] dec_y;
  logic [9:0]  dec_x;
  logic [22:0] dec_stage_x [3];
  logic        dec_stage_ready [3];

  knapsack_top u_dut (
    .clk, .rst_n,
    .enc_req, .enc_x, .enc_can_start, .enc_y, .enc_ready, .enc_busy,
    .enc_stage_y, .enc_stage_ready,
    .dec_req, .dec_y, .dec_can_start, .dec_x, .dec_ready, .dec_busy,
    .dec_stage_x, .dec_stage_ready
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

  typedef struct {
    longint unsigned plain;
    longint unsigned cipher;
    int              t_accept;
  } blk_t;

  longint unsigned plain_q [$];     // waiting for the encryption part
  blk_t            enc_fly [$];     // inside the encryption part
  blk_t            dec_wait [$];    // waiting for the decryption part
  blk_t            dec_fly [$];     // inside the decryption part

  int cycle = 0;
  int enc_done = 0, dec_done = 0;
  int n_enc_hold = 0, n_dec_hold = 0, n_enc_overlap = 0, n_dec_overlap = 0;
  int n_enc_hand [3], n_dec_hand [3];

  // All driving and checking on the falling edge.
  always @(negedge clk) begin
    if (rst_n) begin
      cycle++;
      // Outputs produced by the last rising edge.
      for (int s = 0; s < 3; s++) begin
        if (enc_stage_ready[s]) n_enc_hand[s]++;
        if (dec_stage_ready[s]) n_dec_hand[s]++;
      end
      if (enc_ready) begin
        automatic blk_t b = enc_fly.pop_front();
        check($sformatf("ciphertext of %0d", b.plain), enc_y, enc3(b.plain));
        if (enc_done == 0) check("published ciphertext 30", enc_y, 4204879);
        if (enc_done == 1) check("published ciphertext 843", enc_y, 4287230);
        check("encryption latency", cycle - b.t_accept, 47);
        b.cipher = longint'(enc_y);
        dec_wait.push_back(b);
        enc_done++;
      end
      if (dec_ready) begin
        automatic blk_t b = dec_fly.pop_front();
        check($sformatf("round trip of %0d", b.plain), dec_x, b.plain);
        check("decryption latency", cycle - b.t_accept, 86);
        dec_done++;
      end
      if (enc_fly.size() > 1) n_enc_overlap++;
      if (dec_fly.size() > 1) n_dec_overlap++;

      // Requests for the coming rising edge.
      enc_req = (plain_q.size() != 0);
      if (enc_req) enc_x = 10'(plain_q[0]);
      dec_req = (dec_wait.size() != 0);
      if (dec_req) dec_y = 23'(dec_wait[0].cipher);
      #1;
      if (enc_req && !enc_can_start) n_enc_hold++;
      if (dec_req && !dec_can_start) n_dec_hold++;
      if (enc_req && enc_can_start) begin
        automatic blk_t b;
        b.plain = plain_q.pop_front();
        b.cipher = 0;
        b.t_accept = cycle;
        enc_fly.push_back(b);
      end
      if (dec_req && dec_can_start) begin
        automatic blk_t b = dec_wait.pop_front();
        b.t_accept = cycle;
        dec_fly.push_back(b);
      end
    end
  end

  task automatic need(string what, int n);
    checks++;
    $display("%s: %0d", what, n);
    if (n == 0) begin
      failures++;
      $display("FAIL %s never happened", what);
    end
  endtask

  initial begin
    enc_req = 1'b0; enc_x = '0;
    dec_req = 1'b0; dec_y = '0;
    for (int s = 0; s < 3; s++) begin n_enc_hand[s] = 0; n_dec_hand[s] = 0; end
    plain_q.push_back(30);
    plain_q.push_back(843);
    for (int b = 0; b < 1024; b++) plain_q.push_back(longint'(b));
    // Fisher-Yates shuffle of the 1024 exhaustive blocks (after the first two).
    for (int i = NB - 1; i > 2; i--) begin
      int j = 2 + int'($urandom % (i - 1));
      longint unsigned t = plain_q[i];
      plain_q[i] = plain_q[j];
      plain_q[j] = t;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;

    while (dec_done < NB && cycle < 150000) @(posedge clk);
    repeat (5) @(posedge clk);

    check("blocks encrypted", enc_done, NB);
    check("blocks decrypted", dec_done, NB);
    need("encryption issue-gate hold-off cycles", n_enc_hold);
    need("decryption issue-gate hold-off cycles", n_dec_hold);
    need("cycles with overlapping blocks in encryption part", n_enc_overlap);
    need("cycles with overlapping blocks in decryption part", n_dec_overlap);
    for (int s = 0; s < 3; s++) begin
      need($sformatf("hand-offs out of encryption stage %0d", s + 1), n_enc_hand[s]);
      need($sformatf("hand-offs out of decryption stage %0d", s + 1), n_dec_hand[s]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
