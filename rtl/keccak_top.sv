// keccak_top - Keccak-512 hash engine: padder followed by a permutation core.
//
// The message enters as 64-bit words (in, in_ready, is_last, byte_num; see
// keccak_padder for byte order and how a message ends). The padder builds padded
// 576-bit blocks; the permutation core XORs each into the 1600-bit sponge state and
// applies the 24 rounds of Keccak-f[1600]. When the final block of a message has been
// permuted, the state is truncated to its first 512 bits (lanes 0..7, lane 0 in
// out[511:448], each lane little-endian) and out_ready is high for one cycle.
//
// PIPELINED selects the core: 1 (default) the pipelined round of keccak_f_pipe with
// PIPE_STAGES registers (2 by default: 48 cycles per block, two messages in flight;
// 4: 96 cycles per block, four in flight); 0 the iterative core keccak_f_iter with
// ROUNDS_PER_CYCLE rounds per cycle (24 / ROUNDS_PER_CYCLE cycles per block).
// The sender may present a word only while buffer_full is low. Only the first 512
// bits of the core's state leave the engine; the other 1088 bits (the rest of the
// rate and the capacity) are deliberately unused after truncation.
// The padder-to-permutation structure, the 576-bit rate, the 1600-bit state and the
// 512-bit output follow the specification; the word interface, the digest bit order
// and keeping both cores selectable are this design's own choices.
// Reset is synchronous and active high.
module keccak_top
  import keccak_pkg::*;
#(
  parameter bit          PIPELINED        = 1'b1,
  parameter int unsigned PIPE_STAGES      = 2,
  parameter int unsigned ROUNDS_PER_CYCLE = 2
)(
  input  logic       clk,
  input  logic       rst,
  input  lane_t      in,
  input  logic       in_ready,
  input  logic       is_last,
  input  logic [2:0] byte_num,
  output logic       buffer_full,
  output digest_t    out,
  output logic       out_ready
);

  block_t pad_out;
  logic   pad_ready, pad_last, f_ack;
  state_t f_out;

  keccak_padder u_padder (
    .clk, .rst, .in, .in_ready, .is_last, .byte_num, .buffer_full,
    .out(pad_out), .out_ready(pad_ready), .out_last(pad_last), .f_ack
  );

  if (PIPELINED) begin : g_pipe
    keccak_f_pipe #(.STAGES(PIPE_STAGES)) u_core (
      .clk, .rst, .in(pad_out), .in_ready(pad_ready), .in_last(pad_last),
      .ack(f_ack), .out(f_out), .out_ready
    );
  end else begin : g_iter
    keccak_f_iter #(.ROUNDS_PER_CYCLE(ROUNDS_PER_CYCLE)) u_core (
      .clk, .rst, .in(pad_out), .in_ready(pad_ready), .in_last(pad_last),
      .ack(f_ack), .out(f_out), .out_ready
    );
  end

  // Truncation: lanes 0..7, lane 0 first.
  for (genvar i = 0; i < DIGEST_W / LANE_W; i++) begin : g_trunc
    assign out[DIGEST_W-1-LANE_W*i -: LANE_W] = f_out[LANE_W*i +: LANE_W];
  end

endmodule
