// knapsack_mont_reduce: gamma = y * w^-1 mod m for w = 2^k.
//
// First half of a decryption stage.  Because the stage multiplier w is a
// power of two, y * w^-1 mod m is a Montgomery reduction by 2^k and needs no
// multiplier: k times, if the working value is odd add m (odd, so the sum is
// even), then halve.  Each step keeps the value congruent to y * 2^-i mod m.
// The datapath is a shift register for the working value, an adder for
// "+ m", a multiplexer choosing between the sum and the value itself, and a
// step counter, sequenced by a two-state controller.
//
// After k steps the value is below y / 2^k + m, i.e. below 2m whenever
// y < m * 2^k, which holds for every ciphertext the matching encryption stage
// can produce.  One conditional subtraction of m, folded into the last step,
// then gives the fully reduced gamma in [0, m).  The published add-and-halve
// loop leaves that subtraction out; this design adds it because the solver
// that follows needs gamma < m.
//
// Interface and timing: start (one-cycle pulse while idle) samples y; k more
// edges do the k steps; ready pulses for one cycle after the last one, so an
// operation takes k + 1 clock edges.  gamma is held until the next start.
module knapsack_mont_reduce
  import knapsack_pkg::*;
#(
  parameter int unsigned STAGE = 0,
  localparam int unsigned YW   = cipher_w(STAGE),
  localparam int unsigned MW   = mod_w(STAGE),
  localparam int unsigned K    = STAGE_KEXP[STAGE],
  localparam logic [MW-1:0] M  = MW'(STAGE_M[STAGE]),
  localparam int unsigned GW   = ((YW > MW) ? YW : MW) + 1,
  localparam int unsigned CNTW = (K > 1) ? $clog2(K) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [YW-1:0] y,
  output logic [MW-1:0] gamma,
  output logic          ready,
  output logic          busy
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e          state_q;
  logic [GW-1:0]   g_q;      // working value (shift register)
  logic [CNTW-1:0] step_q;   // step counter
  logic [GW:0]     sum_w;    // g + m or g, before halving
  logic [GW-1:0]   half_w;   // (g + m*g[0]) / 2
  logic [GW:0]     diff_w;   // half - m, for the final correction
  logic [GW-1:0]   last_w;   // reduced value written by the last step

  always_comb begin
    sum_w  = g_q[0] ? ({1'b0, g_q} + (GW+1)'(M)) : {1'b0, g_q};
    half_w = sum_w[GW:1];
    diff_w = {1'b0, half_w} - (GW+1)'(M);
    last_w = diff_w[GW] ? half_w : diff_w[GW-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      g_q     <= '0;
      step_q  <= '0;
      ready   <= 1'b0;
    end else begin
      ready <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            g_q     <= GW'(y);
            step_q  <= '0;
            state_q <= S_RUN;
          end
        end
        S_RUN: begin
          step_q <= step_q + 1'b1;
          if (32'(step_q) == K - 1) begin
            g_q     <= last_w;
            state_q <= S_IDLE;
            ready   <= 1'b1;
          end else begin
            g_q <= half_w;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign gamma = g_q[MW-1:0];
  assign busy  = (state_q == S_RUN);

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(start && busy))
        else $error("knapsack_mont_reduce %0d: start while busy", STAGE);
      assert (!(start && !busy && (64'(y) >= (64'(M) << K))))
        else $error("knapsack_mont_reduce %0d: y not below m * 2^k", STAGE);
    end
  end

endmodule
