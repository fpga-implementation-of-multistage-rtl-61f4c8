// knapsack_solver: recovers the plaintext bits from gamma by solving the
// stage's superincreasing (easy) knapsack.
//
// Second half of a decryption stage.  Because each secret element alpha_i is
// larger than the sum of all smaller ones, the plaintext is found greedily
// from the largest element down: if gamma >= alpha_i then bit i is 1 and
// alpha_i is subtracted, otherwise bit i is 0.  The datapath follows the
// published one: a down counter indexing the secret-key ROM, a remainder
// register, one subtractor whose borrow is the comparison, a multiplexer
// that keeps either the difference or the old remainder, and a shift register
// collecting the bits (bit N-1 first, so it ends up at the top).  A
// two-state controller sequences it.
//
// The comparison is "greater or equal", the form of the algorithm listing;
// the prose description of decryption says "greater than", which fails when
// the remainder equals alpha_i exactly.
//
// Interface and timing: start (one-cycle pulse while idle) samples gamma; N
// more edges test one element each; ready pulses for one cycle after the
// last, so an operation takes N + 1 clock edges.  x is held until the next
// start.
module knapsack_solver
  import knapsack_pkg::*;
#(
  parameter int unsigned STAGE = 0,
  localparam int unsigned N    = STAGE_N[STAGE],
  localparam int unsigned MW   = mod_w(STAGE),
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned KW   = key_w(STAGE, KEY_SECRET)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [MW-1:0] gamma,
  output logic [N-1:0]  x,
  output logic          ready,
  output logic          busy
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e        state_q;
  logic [MW-1:0] rem_q;     // remainder of gamma
  logic [AW-1:0] idx_q;     // element index (down counter)
  logic [N-1:0]  bits_q;    // recovered plaintext (shift register)
  logic [KW-1:0] alpha_w;
  logic [MW:0]   diff_w;
  logic          take_w;

  knapsack_key_rom #(.STAGE(STAGE), .KIND(KEY_SECRET)) u_rom (
    .addr (idx_q),
    .data (alpha_w)
  );

  always_comb begin
    diff_w = {1'b0, rem_q} - (MW+1)'(alpha_w);
    take_w = ~diff_w[MW];   // no borrow: rem >= alpha_i
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_IDLE;
      rem_q   <= '0;
      idx_q   <= '0;
      bits_q  <= '0;
      ready   <= 1'b0;
    end else begin
      ready <= 1'b0;
      unique case (state_q)
        S_IDLE: begin
          if (start) begin
            rem_q   <= gamma;
            idx_q   <= AW'(N - 1);
            state_q <= S_RUN;
          end
        end
        S_RUN: begin
          if (take_w) rem_q <= diff_w[MW-1:0];
          bits_q <= {bits_q[N-2:0], take_w};
          idx_q  <= idx_q - 1'b1;
          if (idx_q == '0) begin
            state_q <= S_IDLE;
            ready   <= 1'b1;
          end
        end
        default: state_q <= S_IDLE;
      endcase
    end
  end

  assign x    = bits_q;
  assign busy = (state_q == S_RUN);

  always_ff @(posedge clk) begin
    if (rst_n) begin
      assert (!(start && busy))
        else $error("knapsack_solver %0d: start while busy", STAGE);
    end
  end

endmodule
