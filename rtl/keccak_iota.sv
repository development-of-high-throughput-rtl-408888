// keccak_iota - the iota step of a Keccak-f[1600] round (combinational).
//
// XORs the round constant rc into lane (0, 0) and passes the other 24 lanes through.
// Interface: a (state in), rc (64-bit round constant from keccak_round_const),
// b (state out). Timing: combinational.
module keccak_iota
  import keccak_pkg::*;
(
  input  state_t a,
  input  lane_t  rc,
  output state_t b
);

  assign b[LANE_W-1:0]       = a[LANE_W-1:0] ^ rc;
  assign b[STATE_W-1:LANE_W] = a[STATE_W-1:LANE_W];

endmodule
