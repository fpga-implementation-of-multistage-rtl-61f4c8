// tb_knapsack_key_rom: checks the six key tables (public and secret vector of
// each of the three stages) element by element.
//
// Expected public elements are worked out here as alpha_i * w mod m with the
// multiplier w written out as a number (512, 8192, 16384), and the stage-0
// tables are also compared with the key lists of the published example.
// Addresses past the end of a table must read zero.  The tables are
// combinational, so no clock is needed except for the watchdog.
module tb_knapsack_key_rom;
  import knapsack_pkg::*;

  int checks = 0;
  int failures = 0;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  // Published stage-0 keys.
  longint unsigned PUB0 [10] = '{1536, 2560, 1539, 521, 2066, 551, 2126, 3231,
                                 3908, 3726};
  longint unsigned SEC0 [10] = '{3, 5, 11, 25, 52, 105, 212, 430, 871, 1750};
  longint unsigned W [3]     = '{512, 8192, 16384};
  longint unsigned MOD [3]   = '{4093, 44357, 680337};

  logic [4:0]  addr0_p, addr0_s, addr1_p, addr1_s, addr2_p, addr2_s;
  logic [11:0] d0_p;
  logic [10:0] d0_s;
  logic [15:0] d1_p;
  logic [14:0] d1_s;
  logic [19:0] d2_p;
  logic [18:0] d2_s;

  knapsack_key_rom #(.STAGE(0), .KIND(KEY_PUBLIC)) u0p (.addr(addr0_p[3:0]), .data(d0_p));
  knapsack_key_rom #(.STAGE(0), .KIND(KEY_SECRET)) u0s (.addr(addr0_s[3:0]), .data(d0_s));
  knapsack_key_rom #(.STAGE(1), .KIND(KEY_PUBLIC)) u1p (.addr(addr1_p[3:0]), .data(d1_p));
  knapsack_key_rom #(.STAGE(1), .KIND(KEY_SECRET)) u1s (.addr(addr1_s[3:0]), .data(d1_s));
  knapsack_key_rom #(.STAGE(2), .KIND(KEY_PUBLIC)) u2p (.addr(addr2_p), .data(d2_p));
  knapsack_key_rom #(.STAGE(2), .KIND(KEY_SECRET)) u2s (.addr(addr2_s), .data(d2_s));

  task automatic check(string what, longint unsigned got, longint unsigned exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  function automatic longint unsigned alpha(int s, int i);
    return (i < int'(STAGE_N[s])) ? longint'(STAGE_ALPHA[s][i]) : 0;
  endfunction

  initial begin
    for (int i = 0; i < 16; i++) begin
      addr0_p = 5'(i); addr0_s = 5'(i);
      addr1_p = 5'(i); addr1_s = 5'(i);
      #1;
      check($sformatf("stage0 public[%0d]", i), d0_p, (i < 10) ? PUB0[i] : 0);
      check($sformatf("stage0 secret[%0d]", i), d0_s, (i < 10) ? SEC0[i] : 0);
      check($sformatf("stage1 public[%0d]", i), d1_p, alpha(1, i) * W[1] % MOD[1]);
      check($sformatf("stage1 secret[%0d]", i), d1_s, alpha(1, i));
    end
    for (int i = 0; i < 32; i++) begin
      addr2_p = 5'(i); addr2_s = 5'(i);
      #1;
      check($sformatf("stage2 public[%0d]", i), d2_p, alpha(2, i) * W[2] % MOD[2]);
      check($sformatf("stage2 secret[%0d]", i), d2_s, alpha(2, i));
    end
    // Spot checks against published stage-1 and stage-2 public elements.
    addr1_p = 5'd3; addr2_p = 5'd6; #1;
    check("stage1 public[3] published", d1_p, 1398);
    check("stage2 public[6] published", d2_p, 613999);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
