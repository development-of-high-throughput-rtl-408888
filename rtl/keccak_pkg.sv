// keccak_pkg - sizes, types and constant generators shared by the Keccak-512 core.
//
// The core implements the Keccak sponge with the 1600-bit permutation Keccak-f[1600],
// a bit rate r = 576 and a capacity c = 1024 (r + c = 1600), giving a 512-bit digest.
// The state is a flat 1600-bit vector holding 25 lanes of 64 bits; lane (x, y) sits at
// bits [64*(5*y + x) +: 64], the usual Keccak ordering. The round constants and the
// rho rotation offsets are not stored as tables: the functions below compute them from
// their defining formulas (an LFSR and the (t+1)(t+2)/2 walk) at elaboration time.
package keccak_pkg;

  localparam int unsigned LANE_W    = 64;
  localparam int unsigned STATE_W   = 1600;
  localparam int unsigned RATE      = 576;
  localparam int unsigned CAPACITY  = STATE_W - RATE;      // 1024
  localparam int unsigned RATE_LANES = RATE / LANE_W;      // 9 words per block
  localparam int unsigned NROUNDS   = 24;
  localparam int unsigned DIGEST_W  = 512;

  typedef logic [LANE_W-1:0]  lane_t;
  typedef logic [STATE_W-1:0] state_t;
  typedef logic [RATE-1:0]    block_t;
  typedef logic [DIGEST_W-1:0] digest_t;
  typedef logic [4:0]         round_t;

  // Bit offset of lane (x, y) in a state_t.
  function automatic int unsigned lane_lsb(int unsigned x, int unsigned y);
    return LANE_W * (5 * y + x);
  endfunction

  // Rotate a lane left by a constant amount.
  function automatic lane_t rotl(lane_t v, int unsigned n);
    int unsigned k;
    k = n % LANE_W;
    return (k == 0) ? v : ((v << k) | (v >> (LANE_W - k)));
  endfunction

  // Bit t of the round-constant LFSR x^8 + x^6 + x^5 + x^4 + 1.
  function automatic logic rc_bit(int unsigned t);
    logic [8:0] r;
    r = 9'h001;
    for (int unsigned i = 0; i < t % 255; i++) begin
      r = r << 1;
      if (r[8]) r = r ^ 9'h171;
    end
    return r[0];
  endfunction

  // Round constant of round ir: bit 2^j - 1 is rc_bit(j + 7*ir), j = 0..6.
  function automatic lane_t round_constant(int unsigned ir);
    lane_t c;
    c = '0;
    for (int unsigned j = 0; j < 7; j++)
      c[(1 << j) - 1] = rc_bit(j + 7 * ir);
    return c;
  endfunction

  // Rho rotation of lane (x, y): walk (x, y) <- (y, 2x + 3y) from (1, 0);
  // the lane reached at step t rotates by (t + 1)(t + 2) / 2 mod 64.
  function automatic int unsigned rho_offset(int unsigned x, int unsigned y);
    int unsigned cx, cy, nx;
    cx = 1;
    cy = 0;
    if (x == 0 && y == 0) return 0;
    for (int unsigned t = 0; t < 24; t++) begin
      if (cx == x && cy == y) return (((t + 1) * (t + 2)) / 2) % LANE_W;
      nx = cy;
      cy = (2 * cx + 3 * cy) % 5;
      cx = nx;
    end
    return 0;
  endfunction

endpackage
