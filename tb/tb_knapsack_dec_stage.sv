// tb_knapsack_dec_stage: checks that each of the three decryption stages
// inverts its encryption stage.
//
// For a plaintext block x the testbench encrypts with its own reference
// (sum of alpha_i * w mod m over the set bits, w written out as a number),
// feeds the ciphertext to the decryption stage and expects x back.  The
// published ciphertexts are decrypted first.  Every operation must take
// k + N + 2 clock edges (21, 30, 35).
module tb_knapsack_dec_stage;
  import knapsack_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  longint unsigned W [3]   = '{512, 8192, 16384};
  longint unsigned MOD [3] = '{4093, 44357, 680337};
  int unsigned     LAT [3] = '{21, 30, 35};

  logic        start [3];
  logic        ready [3];
  logic        busy  [3];
  logic [14:0] y0;
  logic [18:0] y1;
  logic [22:0] y2;
  logic [9:0]  x0;
  logic [14:0] x1;
  logic [18:0] x2;

  knapsack_dec_stage #(.STAGE(0)) u0 (.clk, .rst_n, .start(start[0]), .y(y0), .x(x0), .ready(ready[0]), .busy(busy[0]));
  knapsack_dec_stage #(.STAGE(1)) u1 (.clk, .rst_n, .start(start[1]), .y(y1), .x(x1), .ready(ready[1]), .busy(busy[1]));
  knapsack_dec_stage #(.STAGE(2)) u2 (.clk, .rst_n, .start(start[2]), .y(y2), .x(x2), .ready(ready[2]), .busy(busy[2]));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint unsigned encrypt(int s, longint unsigned x);
    longint unsigned sum = 0;
    for (int i = 0; i < int'(STAGE_N[s]); i++)
      if (x[i]) sum += longint'(STAGE_ALPHA[s][i]) * W[s] % MOD[s];
    return sum;
  endfunction

  function automatic longint unsigned x_of(int s);
    case (s)
      0: return longint'(x0);
      1: return longint'(x1);
      default: return longint'(x2);
    endcase
  endfunction

  task automatic decrypt(int s, longint unsigned y, longint unsigned x_exp);
    int cyc;
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
    while (!ready[s] && cyc < 200) begin
      @(negedge clk);
      cyc++;
    end
    check($sformatf("stage %0d y=%0d x", s, y), x_of(s), x_exp);
    check($sformatf("stage %0d y=%0d cycles", s, y), cyc, LAT[s]);
    check($sformatf("stage %0d idle after ready", s), busy[s], 0);
  endtask

  initial begin
    for (int s = 0; s < 3; s++) start[s] = 1'b0;
    y0 = '0; y1 = '0; y2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;

    // Published decryption chain: 4204879 -> 156918 -> 6686 -> 30, and the
    // second block 4287230 -> 32029 -> 14377 -> 843.
    decrypt(2, 4204879, 156918);
    decrypt(1, 156918, 6686);
    decrypt(0, 6686, 30);
    decrypt(2, 4287230, 32029);
    decrypt(1, 32029, 14377);
    decrypt(0, 14377, 843);

    for (int s = 0; s < 3; s++) begin
      longint unsigned all = (64'd1 << STAGE_N[s]) - 1;
      decrypt(s, 0, 0);
      decrypt(s, encrypt(s, all), all);
      for (int n = 0; n < 40; n++) begin
        longint unsigned x = longint'($urandom) & all;
        decrypt(s, encrypt(s, x), x);
      end
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
