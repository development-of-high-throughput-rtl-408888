// keccak_round - one complete, unregistered Keccak-f[1600] round.
//
// Chains theta -> rho/pi -> chi -> iota. The iterative permutation core instantiates
// this block (ROUNDS_PER_CYCLE times in series) behind its 1600-bit state register.
// Interface: a (state in), rc (round constant of this round), b (state out).
// Timing: combinational.
module keccak_round
  import keccak_pkg::*;
(
  input  state_t a,
  input  lane_t  rc,
  output state_t b
);

  state_t t_theta, t_rho_pi, t_chi;

  keccak_theta  u_theta  (.a(a),        .b(t_theta));
  keccak_rho_pi u_rho_pi (.a(t_theta),  .b(t_rho_pi));
  keccak_chi    u_chi    (.a(t_rho_pi), .b(t_chi));
  keccak_iota   u_iota   (.a(t_chi), .rc(rc), .b(b));

endmodule
