// keccak_round_const - round-constant generator of Keccak-f[1600] (combinational).
//
// Maps the round number (0..23, from the round counter of a permutation core) to the
// 64-bit constant that iota XORs into lane (0, 0). The 24 constants are computed at
// elaboration time from the defining LFSR (keccak_pkg::round_constant) and selected by
// a multiplexer, so no table is typed in. A round number above 23 gives zero.
// Interface: round (5 bits), rc (64 bits). Timing: combinational.
module keccak_round_const
  import keccak_pkg::*;
(
  input  round_t round,
  output lane_t  rc
);

  lane_t rc_table [NROUNDS];

  for (genvar gr = 0; gr < NROUNDS; gr++) begin : g_rc
    localparam lane_t RC = round_constant(gr);
    assign rc_table[gr] = RC;
  end

  assign rc = (round < round_t'(NROUNDS)) ? rc_table[round] : '0;

endmodule
