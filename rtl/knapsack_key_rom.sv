// knapsack_key_rom: read-only key table of one knapsack stage.
//
// Holds either the public (hard) knapsack a_i of stage STAGE, used by an
// encryption stage, or the secret superincreasing vector alpha_i, used by a
// decryption stage (KIND).  The contents come from knapsack_pkg: the secret
// vectors are constants there and the public elements are computed at
// elaboration time as alpha_i * 2^k mod m, so no table file is read.
//
// Interface: addr selects element 0 .. N-1; data is the element, zero for an
// address at or above N.  The read is asynchronous (combinational), which is
// what lets an encryption stage consume one element per clock and finish in
// N + 1 cycles; a small table like this maps to LUTs.
module knapsack_key_rom
  import knapsack_pkg::*;
#(
  parameter int unsigned STAGE = 0,
  parameter key_kind_e   KIND  = KEY_PUBLIC,
  localparam int unsigned N    = STAGE_N[STAGE],
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned DW   = key_w(STAGE, KIND)
) (
  input  logic [AW-1:0] addr,
  output logic [DW-1:0] data
);

  logic [DW-1:0] table_q [N];

  for (genvar i = 0; i < N; i++) begin : g_elem
    assign table_q[i] = DW'(key_elem(STAGE, KIND, i));
  end

  always_comb begin
    data = '0;
    if (32'(addr) < N) data = table_q[addr];
  end

endmodule
