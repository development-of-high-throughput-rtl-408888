// keccak_rho_pi - the rho and pi steps of a Keccak-f[1600] round (combinational).
//
// rho rotates each lane (x, y) left by a fixed offset; pi then moves it to position
// (y, 2x + 3y mod 5):  B[y, 2x+3y] = rotl(A[x,y], rho(x,y)).
// Both steps are pure wiring: the offsets come from keccak_pkg::rho_offset at
// elaboration time, so the module has no gates at all, only a bit permutation.
// Interface: a (state in), b (state out). Timing: combinational.
// Rho and pi form one block here, as in the block diagram of the pipelined round.
module keccak_rho_pi
  import keccak_pkg::*;
(
  input  state_t a,
  output state_t b
);

  for (genvar gx = 0; gx < 5; gx++) begin : g_x
    for (genvar gy = 0; gy < 5; gy++) begin : g_y
      localparam int unsigned ROT = rho_offset(gx, gy);
      localparam int unsigned NX  = gy;
      localparam int unsigned NY  = (2 * gx + 3 * gy) % 5;
      assign b[lane_lsb(NX, NY) +: LANE_W] = rotl(a[lane_lsb(gx, gy) +: LANE_W], ROT);
    end
  end

endmodule
