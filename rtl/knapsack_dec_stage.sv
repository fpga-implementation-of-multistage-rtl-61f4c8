// knapsack_dec_stage: one decryption stage of the multistage knapsack.
//
// Undoes encryption stage STAGE: the ciphertext y is first reduced to
// gamma = y * w^-1 mod m by knapsack_mont_reduce (k add-and-halve steps,
// w = 2^k), then knapsack_solver recovers the N plaintext bits from gamma with
// the secret superincreasing key.  The ready of the reduction starts the
// solver, the same start/ready chaining the stages use between themselves.
//
// Interface and timing: start (one-cycle pulse while idle) samples y; ready
// pulses once, k + N + 2 clock edges later (21, 30 and 35 edges for the
// three stages), and x holds the plaintext until the solver is started again.
// busy is high while either half is working; a start while busy is a protocol
// error.  The two halves are not overlapped, so a stage takes one block at a
// time; the published design quotes about twice the key length per stage
// (20, 30, 38), which this split matches closely but not exactly.
module knapsack_dec_stage
  import knapsack_pkg::*;
#(
  parameter int unsigned STAGE = 0,
  localparam int unsigned N    = STAGE_N[STAGE],
  localparam int unsigned CW   = cipher_w(STAGE),
  localparam int unsigned MW   = mod_w(STAGE)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [CW-1:0] y,
  output logic [N-1:0]  x,
  output logic          ready,
  output logic          busy
);

  logic [MW-1:0] gamma_w;
  logic          red_ready_w, red_busy_w, sol_busy_w;

  knapsack_mont_reduce #(.STAGE(STAGE)) u_reduce (
    .clk   (clk),
    .rst_n (rst_n),
    .start (start),
    .y     (y),
    .gamma (gamma_w),
    .ready (red_ready_w),
    .busy  (red_busy_w)
  );

  knapsack_solver #(.STAGE(STAGE)) u_solver (
    .clk   (clk),
    .rst_n (rst_n),
    .start (red_ready_w),
    .gamma (gamma_w),
    .x     (x),
    .ready (ready),
    .busy  (sol_busy_w)
  );

  // The cycle between the two halves (reduction ready, solver not yet
  // started) counts as busy too.
  assign busy = red_busy_w | red_ready_w | sol_busy_w;

endmodule
