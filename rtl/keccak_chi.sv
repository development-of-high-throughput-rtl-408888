// keccak_chi - the chi step of a Keccak-f[1600] round (combinational).
//
// The only non-linear step: along each row,
//   B[x,y] = A[x,y] ^ (~A[x+1,y] & A[x+2,y])      (indices mod 5).
// Interface: a (state in), b (state out). Timing: combinational.
module keccak_chi
  import keccak_pkg::*;
(
  input  state_t a,
  output state_t b
);

  for (genvar gx = 0; gx < 5; gx++) begin : g_x
    for (genvar gy = 0; gy < 5; gy++) begin : g_y
      assign b[lane_lsb(gx, gy) +: LANE_W] =
          a[lane_lsb(gx, gy) +: LANE_W] ^
          (~a[lane_lsb((gx + 1) % 5, gy) +: LANE_W] & a[lane_lsb((gx + 2) % 5, gy) +: LANE_W]);
    end
  end

endmodule
