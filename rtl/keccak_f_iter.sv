// keccak_f_iter - iterative (non-pipelined) Keccak-f[1600] sponge core.
//
// Holds the 1600-bit sponge state in one register. When a padded 576-bit block is
// offered (in_ready) and the core is idle, the block is XORed into the first nine lanes
// of the state (of a zero state for the first block of a message), the multiplexer
// selects this absorbed state as the round input (first_round), and the core starts.
// Every cycle ROUNDS_PER_CYCLE rounds are applied in series and written back; a
// counter selects the round constants. After 24 rounds the block is done. If it was
// the final block of a message (in_last when accepted), out holds the full 1600-bit
// state for one cycle with out_ready high, and the next block starts from zero again.
//
// Interface: in/in_ready/in_last come from the padder; ack is high in the cycle a
// block is taken (first_round). out/out_ready give the permuted state of a finished
// message; the 512-bit digest is out[511:0] (lanes 0..7, lane 0 in bits [63:0]).
// Mapping of a block: word i (bits [575-64i -: 64]) is XORed into lane i.
// Timing: 24 / ROUNDS_PER_CYCLE cycles per block (12 at the default of two rounds
// per cycle); the absorbing XOR and the first rounds share the first cycle, and a
// new block can be taken the cycle after the last rounds. Reset is synchronous.
//
// The structure (XOR, first-round multiplexer, state register, counter, round
// constant, round logic) and the two rounds per cycle follow the specification of the
// non-pipelined version; the handshake, the zero-state flag for a new message and the
// one-cycle out_ready strobe are this design's own choices.
module keccak_f_iter
  import keccak_pkg::*;
#(
  parameter int unsigned ROUNDS_PER_CYCLE = 2
)(
  input  logic   clk,
  input  logic   rst,
  input  block_t in,
  input  logic   in_ready,
  input  logic   in_last,
  output logic   ack,
  output state_t out,
  output logic   out_ready
);

  localparam int unsigned CYCLES = NROUNDS / ROUNDS_PER_CYCLE;

  state_t st_q;
  round_t round_q;     // first round of the current cycle
  logic   busy_q, last_q, fresh_q, done_q;

  state_t absorbed, round_in;
  state_t chain [ROUNDS_PER_CYCLE + 1];
  round_t base;
  logic   first_round;

  initial assert (NROUNDS % ROUNDS_PER_CYCLE == 0)
    else $error("ROUNDS_PER_CYCLE must divide 24");

  // XOR of the block into lanes 0..8 of the (possibly zero) state.
  always_comb begin
    absorbed = fresh_q ? '0 : st_q;
    for (int i = 0; i < RATE_LANES; i++)
      absorbed[LANE_W*i +: LANE_W] = absorbed[LANE_W*i +: LANE_W] ^ in[RATE-1-LANE_W*i -: LANE_W];
  end

  assign first_round = !busy_q && in_ready;
  assign ack         = first_round;
  assign round_in    = first_round ? absorbed : st_q;
  assign base        = first_round ? '0 : round_q;
  assign chain[0]    = round_in;

  for (genvar g = 0; g < ROUNDS_PER_CYCLE; g++) begin : g_round
    lane_t rc;
    keccak_round_const u_rc (.round(base + round_t'(g)), .rc(rc));
    keccak_round       u_round (.a(chain[g]), .rc(rc), .b(chain[g+1]));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      st_q    <= '0;
      round_q <= '0;
      busy_q  <= 1'b0;
      last_q  <= 1'b0;
      fresh_q <= 1'b1;
      done_q  <= 1'b0;
    end else begin
      done_q <= 1'b0;
      if (first_round || busy_q)
        st_q <= chain[ROUNDS_PER_CYCLE];
      if (first_round) begin
        round_q <= round_t'(ROUNDS_PER_CYCLE);
        busy_q  <= (CYCLES > 1);
        last_q  <= in_last;
        fresh_q <= 1'b0;
        if (CYCLES == 1) begin
          done_q  <= in_last;
          fresh_q <= in_last;
        end
      end else if (busy_q) begin
        round_q <= round_q + round_t'(ROUNDS_PER_CYCLE);
        if (round_q == round_t'(NROUNDS - ROUNDS_PER_CYCLE)) begin
          busy_q  <= 1'b0;
          done_q  <= last_q;
          fresh_q <= last_q;
        end
      end
    end
  end

  assign out       = st_q;
  assign out_ready = done_q;

endmodule
