// knapsack_top: three-stage knapsack public-key cryptosystem, encryption
// part and decryption part side by side.
//
// The encryption part (knapsack_enc_chain) turns a 10-bit plaintext block
// into a 23-bit ciphertext through three cascaded knapsack stages of block
// length 10, 15 and 19.  The decryption part (knapsack_dec_chain) runs the
// matching secret-key stages in reverse order and returns the 10-bit block.
// The two parts share only the clock and reset; a system would place them at
// the two ends of a channel, and a testbench can loop one into the other.
//
// Each part sits behind a knapsack_issue_gate that admits a new block only
// when the slowest stage of that part is certain to be free by the time the
// block reaches it: every 20 cycles for encryption (latency of the 19-element
// stage) and every 35 cycles for decryption.  Blocks therefore overlap in the
// cascades, one per stage.  The gate is this design's addition; the source
// describes stages chained only by start and ready.
//
// Ports per part: *_req asks to enter a block (hold it until *_can_start is
// high in the same cycle: the block is taken then); *_ready pulses with the
// result on *_y / *_x, which holds until that output stage starts again.
// *_stage_* expose every stage's output.
module knapsack_top
  import knapsack_pkg::*;
#(
  parameter int unsigned NUM_STAGES = 3,
  localparam int unsigned PW        = STAGE_N[0],
  localparam int unsigned CW        = chain_out_w(NUM_STAGES),
  localparam int unsigned DW        = max_data_w(NUM_STAGES)
) (
  input  logic          clk,
  input  logic          rst_n,

  // encryption part
  input  logic          enc_req,
  input  logic [PW-1:0] enc_x,
  output logic          enc_can_start,
  output logic [CW-1:0] enc_y,
  output logic          enc_ready,
  output logic          enc_busy,
  output logic [DW-1:0] enc_stage_y     [NUM_STAGES],
  output logic          enc_stage_ready [NUM_STAGES],

  // decryption part
  input  logic          dec_req,
  input  logic [CW-1:0] dec_y,
  output logic          dec_can_start,
  output logic [PW-1:0] dec_x,
  output logic          dec_ready,
  output logic          dec_busy,
  output logic [DW-1:0] dec_stage_x     [NUM_STAGES],
  output logic          dec_stage_ready [NUM_STAGES]
);

  logic enc_start_w, dec_start_w;

  knapsack_issue_gate #(.INTERVAL(max_enc_latency(NUM_STAGES))) u_enc_gate (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (enc_req),
    .can_start (enc_can_start),
    .start     (enc_start_w)
  );

  knapsack_enc_chain #(.NUM_STAGES(NUM_STAGES)) u_enc (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (enc_start_w),
    .x           (enc_x),
    .y           (enc_y),
    .ready       (enc_ready),
    .busy        (enc_busy),
    .stage_y     (enc_stage_y),
    .stage_ready (enc_stage_ready)
  );

  knapsack_issue_gate #(.INTERVAL(max_dec_latency(NUM_STAGES))) u_dec_gate (
    .clk       (clk),
    .rst_n     (rst_n),
    .req       (dec_req),
    .can_start (dec_can_start),
    .start     (dec_start_w)
  );

  knapsack_dec_chain #(.NUM_STAGES(NUM_STAGES)) u_dec (
    .clk         (clk),
    .rst_n       (rst_n),
    .start       (dec_start_w),
    .y           (dec_y),
    .x           (dec_x),
    .ready       (dec_ready),
    .busy        (dec_busy),
    .stage_x     (dec_stage_x),
    .stage_ready (dec_stage_ready)
  );

endmodule
