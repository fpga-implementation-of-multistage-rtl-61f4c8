// knapsack_enc_stage: one encryption stage of the multistage knapsack.
//
// Computes the ciphertext y = sum over i of x_i * a_i, where x is an N-bit
// plaintext block and a is the stage's public knapsack.  The datapath is the
// one of the published design: a shift register that presents the plaintext
// bits one at a time (bit 0 first), an up counter that addresses the key ROM
// in step with it, and an adder with an accumulator register.  A two-state
// controller (IDLE, RUN) sequences it.
//
// Interface and timing:
//   start  one-cycle pulse in IDLE; x is sampled on that clock edge and the
//          accumulator cleared.  A start while busy is a protocol error
//          (asserted below) and is ignored.
//   RUN    N further edges, one key element each; accumulator += a_i when
//          x_i is set.
//   ready  one-cycle pulse set by the last of those edges, so an operation
//          takes N + 1 clock edges (11, 16, 20 for the three stages), as in
//          the published design.  y holds the result from then until the
//          next start, so ready can drive the start of the next stage.
// Reset (rst_n, asynchronous, active low) and the one-cycle ready pulse are
// choices of this design; the source only names start and ready.
module knapsack_enc_stage
  import knapsack_pkg::*;
#(
  parameter int unsigned STAGE = 0,
  localparam int unsigned N    = STAGE_N[STAGE],
  localparam int unsigned CW   = cipher_w(STAGE),
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned KW   = key_w(STAGE, KEY_PUBLIC)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [N-1:0]  x,
  output logic [CW-1:0] y,
  output logic          ready,
  output logic          busy
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e        state_q;
  logic [N-1:0]  bits_q;   // plaintext shift register
  logic [AW-1:0] idx_q;    // element index (up counter)
  logic [CW-1:0] acc_q;    // running sum
  logic [KW-1:0] key_elem_w;

  knapsack_key_rom #(.STAGE(STAGE), .KIND(KEY_PUBLIC)) u_rom (
    .addr (idx_q),
    .data (key_elem_w)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      bits_q  <= '0;
      idx_q   <= '0;
      acc_q   <= '0;
      ready   <= 1'b0;
    end else begin
      ready <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            bits_q  <= x;
            idx_q   <= '0;
            acc_q   <= '0;
            state_q <= S_RUN;
          end
        end
        S_RUN: begin
          if (bits_q[0]) acc_q <= acc_q + CW'(key_elem_w);
          bits_q <= bits_q >> 1;
          idx_q  <= idx_q + 1'b1;
          if (32'(idx_q) == N - 1) begin
            state_q <= S_IDLE;
            ready   <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign y    = acc_q;
  assign busy = (state_q == S_RUN);

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(start && busy))
        else $error("knapsack_enc_stage %0d: start while busy", STAGE);
    end
  end

endmodule
