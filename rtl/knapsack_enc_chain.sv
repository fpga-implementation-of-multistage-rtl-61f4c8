// knapsack_enc_chain: the encryption part, NUM_STAGES encryption stages in
// cascade.
//
// The ciphertext of stage j is the plaintext block of stage j+1, and the
// ready pulse of stage j is the start of stage j+1, so a block walks through
// the cascade with no other control.  Stage j's ciphertext is never wider
// than stage j+1's block (15 <= 15, 19 <= 19 bits for the built-in keys); it
// is zero-extended onto the next block.
//
// Interface and timing: start samples x (the N1-bit plaintext block of stage
// 0); ready pulses when the last stage finishes, sum of (N_j + 1) clock edges
// later (11 + 16 + 20 = 47 for three stages), with y the final ciphertext.
// stage_y / stage_ready expose every stage's output for observation.  Stages
// work independently, so several blocks can be in flight (pipelining); the
// caller must space starts by at least the slowest stage's latency, which
// knapsack_top enforces.
module knapsack_enc_chain
  import knapsack_pkg::*;
#(
  parameter int unsigned NUM_STAGES = 3,
  localparam int unsigned IW        = STAGE_N[0],
  localparam int unsigned OW        = chain_out_w(NUM_STAGES),
  localparam int unsigned DW        = max_data_w(NUM_STAGES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] x,
  output logic [OW-1:0] y,
  output logic          ready,
  output logic          busy,
  output logic [DW-1:0] stage_y     [NUM_STAGES],
  output logic          stage_ready [NUM_STAGES]
);

  // link_data[j] / link_start[j] feed stage j; index NUM_STAGES is the output.
  logic [DW-1:0]       link_data  [NUM_STAGES+1];
  logic                link_start [NUM_STAGES+1];
  logic [NUM_STAGES-1:0] stage_busy;

  assign link_data[0]  = DW'(x);
  assign link_start[0] = start;

  for (genvar j = 0; j < NUM_STAGES; j++) begin : g_stage
    localparam int unsigned NJ = STAGE_N[j];
    localparam int unsigned CJ = cipher_w(j);
    logic [CJ-1:0] y_w;

    knapsack_enc_stage #(.STAGE(j)) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .start (link_start[j]),
      .x     (link_data[j][NJ-1:0]),
      .y     (y_w),
      .ready (link_start[j+1]),
      .busy  (stage_busy[j])
    );

    assign link_data[j+1]  = DW'(y_w);
    assign stage_y[j]      = link_data[j+1];
    assign stage_ready[j]  = link_start[j+1];
  end

  assign y     = link_data[NUM_STAGES][OW-1:0];
  assign ready = link_start[NUM_STAGES];
  assign busy  = |stage_busy;

endmodule
