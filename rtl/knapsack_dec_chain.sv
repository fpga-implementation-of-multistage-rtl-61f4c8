// knapsack_dec_chain: the decryption part, NUM_STAGES decryption stages in
// cascade in the reverse order of the encryption stages.
//
// The ciphertext of the whole encryption part enters the decryption stage of
// the last encryption stage; its recovered block is the ciphertext of the
// stage before, and so on down to stage 0, whose block is the original
// plaintext.  As in the encryption part, the ready pulse of one stage is the
// start of the next.  A recovered block is wider than the ciphertext of the
// stage before it; the surplus top bits are zero for any genuine ciphertext
// and are dropped.
//
// Interface and timing: start samples y; ready pulses when decryption stage 0
// finishes, sum of (k_j + N_j + 2) clock edges later (35 + 30 + 21 = 86 for
// three stages), with x the plaintext block.  stage_x / stage_ready expose
// each stage's output, indexed by encryption stage number.  Starts must be
// spaced by at least the slowest stage's latency (knapsack_top enforces it).
module knapsack_dec_chain
  import knapsack_pkg::*;
#(
  parameter int unsigned NUM_STAGES = 3,
  localparam int unsigned IW        = chain_out_w(NUM_STAGES),
  localparam int unsigned OW        = STAGE_N[0],
  localparam int unsigned DW        = max_data_w(NUM_STAGES)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [IW-1:0] y,
  output logic [OW-1:0] x,
  output logic          ready,
  output logic          busy,
  output logic [DW-1:0] stage_x     [NUM_STAGES],
  output logic          stage_ready [NUM_STAGES]
);

  // link_data[j] / link_start[j] feed decryption stage j; data flows from
  // index NUM_STAGES-1 down to 0, and link_*[NUM_STAGES] is the input.
  logic [DW-1:0]         link_data  [NUM_STAGES+1];
  logic                  link_start [NUM_STAGES+1];
  logic [NUM_STAGES-1:0] stage_busy;
  logic [DW-1:0]         out_data   [NUM_STAGES];
  logic                  out_ready  [NUM_STAGES];

  assign link_data[NUM_STAGES]  = DW'(y);
  assign link_start[NUM_STAGES] = start;

  for (genvar j = 0; j < NUM_STAGES; j++) begin : g_stage
    localparam int unsigned NJ = STAGE_N[j];
    localparam int unsigned CJ = cipher_w(j);
    logic [NJ-1:0] x_w;

    knapsack_dec_stage #(.STAGE(j)) u_stage (
      .clk   (clk),
      .rst_n (rst_n),
      .start (link_start[j+1]),
      .y     (link_data[j+1][CJ-1:0]),
      .x     (x_w),
      .ready (out_ready[j]),
      .busy  (stage_busy[j])
    );

    assign out_data[j]    = DW'(x_w);
    assign link_data[j]   = out_data[j];
    assign link_start[j]  = out_ready[j];
    assign stage_x[j]     = out_data[j];
    assign stage_ready[j] = out_ready[j];
  end

  assign x     = link_data[0][OW-1:0];
  assign ready = link_start[0];
  assign busy  = |stage_busy;

endmodule
