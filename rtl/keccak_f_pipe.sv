// keccak_f_pipe - pipelined Keccak-f[1600] sponge core.
//
// The round is cut by pipeline registers. With STAGES = 2 (default) there are two
// 1600-bit registers: one after theta and rho/pi, one at the end of the round, after
// chi and iota. With STAGES = 4 each of the four steps theta, rho/pi, chi and iota
// ends in a register of its own. Each register is a pipeline slot, so STAGES
// independent sponge states ("tokens") are in flight at once and take turns through
// the steps; a token needs STAGES cycles per round and 24 * STAGES cycles for the 24
// rounds, while all slots keep every step busy each cycle.
//
// Each slot carries a tag (token_t): valid, round number and whether the block was the
// final block of its message. The round number of the token entering iota selects the
// round constant. When the token in the last register has done round 23:
//   - final block: out/out_ready present its state for that cycle and the slot frees;
//   - more blocks to come: the next padded block is XORed into it and it starts
//     again at round 0; if that block is not yet offered, all registers hold
//     (a stall) until it is.
// A free slot reaching the last register takes the first block of a new message
// (XORed into a zero state), but only when no message is still being absorbed: a
// block for the open message must wait for that message's token. So the last block
// of one message and the first blocks of the following messages are processed side
// by side.
//
// The two-register cut is the one the design is specified with; the four-stage
// option reproduces the four-stage, four-block schedule also given for it. The tags,
// the stall and the in-order sharing between messages are this design's own choices.
//
// Interface: the same as keccak_f_iter (in/in_ready/in_last/ack from and to the padder,
// out/out_ready for each finished message; digest = out[511:0]).
// Timing: a block is absorbed in the cycle ack is high; its permuted state is in the
// last register 24 * STAGES cycles later (48 at the default). Reset is synchronous.
module keccak_f_pipe
  import keccak_pkg::*;
#(
  parameter int unsigned STAGES = 2
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

  typedef struct packed {
    logic   valid;
    round_t round;   // round being computed; in the last register, round completed
    logic   last;
  } token_t;

  state_t st_q  [STAGES];
  token_t tag_q [STAGES];
  state_t nxt   [STAGES];
  logic   open_q;        // a message has blocks still to absorb

  state_t s_q;
  token_t s_tag;
  state_t a_in, theta_out, rho_pi_in, rho_pi_out, chi_in, chi_out, iota_in, iota_out;
  token_t a_tag;
  lane_t  rc;
  logic   s_done, s_cont, s_fin, s_need, stall;

  initial assert (STAGES == 2 || STAGES == 4) else $error("STAGES must be 2 or 4");

  assign s_q    = st_q[STAGES-1];
  assign s_tag  = tag_q[STAGES-1];
  assign s_done = s_tag.valid && (s_tag.round == round_t'(NROUNDS - 1));
  assign s_cont = s_tag.valid && !s_done;
  assign s_fin  = s_done && s_tag.last;
  assign s_need = s_done && !s_tag.last;

  // XOR of a block into lanes 0..8 of a base state.
  function automatic state_t absorb(state_t base, block_t blk);
    state_t r;
    r = base;
    for (int i = 0; i < RATE_LANES; i++)
      r[LANE_W*i +: LANE_W] = r[LANE_W*i +: LANE_W] ^ blk[RATE-1-LANE_W*i -: LANE_W];
    return r;
  endfunction

  // Input of the first step: the token coming round again, or a newly absorbed block.
  always_comb begin
    a_in  = s_q;
    a_tag = '0;
    ack   = 1'b0;
    stall = 1'b0;
    if (s_cont) begin
      a_tag = '{valid: 1'b1, round: s_tag.round + round_t'(1), last: s_tag.last};
    end else if (s_need) begin
      if (in_ready) begin
        a_in  = absorb(s_q, in);
        a_tag = '{valid: 1'b1, round: '0, last: in_last};
        ack   = 1'b1;
      end else begin
        stall = 1'b1;
      end
    end else if (in_ready && !open_q) begin
      a_in  = absorb('0, in);
      a_tag = '{valid: 1'b1, round: '0, last: in_last};
      ack   = 1'b1;
    end
  end

  // Step wiring: which register feeds each step, and what each register loads.
  if (STAGES == 4) begin : g_four
    assign rho_pi_in = st_q[0];
    assign chi_in    = st_q[1];
    assign iota_in   = st_q[2];
    assign nxt[0]    = theta_out;
    assign nxt[1]    = rho_pi_out;
    assign nxt[2]    = chi_out;
    assign nxt[3]    = iota_out;
  end else begin : g_two
    assign rho_pi_in = theta_out;
    assign chi_in    = st_q[0];
    assign iota_in   = chi_out;
    assign nxt[0]    = rho_pi_out;
    assign nxt[1]    = iota_out;
  end

  keccak_theta       u_theta  (.a(a_in),      .b(theta_out));
  keccak_rho_pi      u_rho_pi (.a(rho_pi_in), .b(rho_pi_out));
  keccak_chi         u_chi    (.a(chi_in),    .b(chi_out));
  keccak_round_const u_rc     (.round(tag_q[STAGES-2].round), .rc(rc));
  keccak_iota        u_iota   (.a(iota_in), .rc(rc), .b(iota_out));

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < STAGES; i++) begin
        st_q[i]  <= '0;
        tag_q[i] <= '0;
      end
      open_q <= 1'b0;
    end else if (!stall) begin
      for (int i = 0; i < STAGES; i++) st_q[i] <= nxt[i];
      tag_q[0] <= a_tag;
      for (int i = 1; i < STAGES; i++) tag_q[i] <= tag_q[i-1];
      if (ack) open_q <= !in_last;
    end
  end

  assign out       = s_q;
  assign out_ready = s_fin;

  // A block is only taken when one is offered, and a finished token never stalls.
  a_ack_needs_block : assert property (@(posedge clk) disable iff (rst) ack |-> in_ready);
  a_no_stall_on_fin : assert property (@(posedge clk) disable iff (rst) stall |-> !s_fin);

endmodule
