// keccak_theta - the theta step of a Keccak-f[1600] round (combinational).
//
// Every lane (x, y) is XORed with the parity of two neighbouring columns:
//   C[x] = A[x,0] ^ A[x,1] ^ A[x,2] ^ A[x,3] ^ A[x,4]
//   D[x] = C[x-1] ^ rotl(C[x+1], 1)          (indices mod 5)
//   B[x,y] = A[x,y] ^ D[x]
// Interface: a (state in), b (state out), both in the lane order of keccak_pkg.
// Timing: purely combinational. The step is the standard Keccak one; the split into
// one module per step follows the block diagram of the pipelined round.
module keccak_theta
  import keccak_pkg::*;
(
  input  state_t a,
  output state_t b
);

  lane_t c [5];
  lane_t d [5];

  always_comb begin
    for (int x = 0; x < 5; x++)
      c[x] = a[lane_lsb(x, 0) +: LANE_W] ^ a[lane_lsb(x, 1) +: LANE_W] ^
             a[lane_lsb(x, 2) +: LANE_W] ^ a[lane_lsb(x, 3) +: LANE_W] ^
             a[lane_lsb(x, 4) +: LANE_W];
    for (int x = 0; x < 5; x++)
      d[x] = c[(x + 4) % 5] ^ rotl(c[(x + 1) % 5], 1);
  end

  for (genvar gx = 0; gx < 5; gx++) begin : g_x
    for (genvar gy = 0; gy < 5; gy++) begin : g_y
      assign b[lane_lsb(gx, gy) +: LANE_W] = a[lane_lsb(gx, gy) +: LANE_W] ^ d[gx];
    end
  end

endmodule
