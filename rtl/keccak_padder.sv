// keccak_padder - assembles 64-bit message words into padded 576-bit rate blocks.
//
// The message arrives one 64-bit word per cycle. Each accepted word is shifted into a
// 576-bit buffer from the right (the buffer moves left by 64 bits), so after nine words
// the first word of the block sits in bits [575:512]. When nine words are held the
// block is offered to the permutation core (out_ready) and stays there until the core
// answers with f_ack, which empties the buffer.
//
// Padding is Keccak's multi-rate pad10*1 on bytes: after the last message byte the
// byte 0x01 is appended, then zero bytes, and the last byte of the block gets 0x80
// (the two merge into 0x81 when they fall on the same byte). The final word of a
// message is marked with is_last and carries byte_num valid bytes (0..7); a message
// whose length is a multiple of 8 ends with an extra is_last word with byte_num = 0.
// After the final word the padder adds the zero words and the closing 0x80 itself,
// one word per cycle, and flags the block with out_last.
//
// The shift buffer, the 64-bit words, the byte_num input, the 576-bit block and the
// acknowledge from the permutation follow the specification. This design's own
// choices: the is_last flag marking the end of a message, padding at byte level, and
// the byte order, with message byte k of a word in bits [8k+7:8k], so that a word is
// directly a little-endian Keccak lane.
//
// Interface: in/in_ready/is_last/byte_num from the sender, which may present a word only
// while buffer_full is low (buffer_full is also high while the padder fills in padding
// words, and until f_ack has emptied the buffer). out/out_ready/out_last/f_ack face the
// permutation core. Reset is synchronous and active high.
// Timing: one word per cycle; a full block is offered the cycle after its ninth word.
module keccak_padder
  import keccak_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  lane_t      in,
  input  logic       in_ready,
  input  logic       is_last,
  input  logic [2:0] byte_num,
  output logic       buffer_full,
  output block_t     out,
  output logic       out_ready,
  output logic       out_last,
  input  logic       f_ack
);

  block_t     buf_q;
  logic [3:0] cnt_q;    // words held, 0..9
  logic       last_q;   // the final word of the message is in the buffer

  logic  full, fill, take;
  lane_t word;

  // Final word: keep byte_num bytes, append 0x01, and 0x80 when it closes the block.
  function automatic lane_t pad_word(lane_t w, logic [2:0] nbytes, logic closes);
    lane_t p;
    for (int k = 0; k < 8; k++)
      p[8*k +: 8] = (k < int'(nbytes)) ? w[8*k +: 8] : ((k == int'(nbytes)) ? 8'h01 : 8'h00);
    if (closes) p[63:56] = p[63:56] | 8'h80;
    return p;
  endfunction

  assign full = (cnt_q == 4'(RATE_LANES));
  assign fill = !full && last_q;                 // padder supplies the word itself
  assign take = !full && !last_q && in_ready;    // a message word is accepted

  always_comb begin
    if (fill)
      word = (cnt_q == 4'(RATE_LANES - 1)) ? {8'h80, 56'h0} : '0;
    else if (is_last)
      word = pad_word(in, byte_num, cnt_q == 4'(RATE_LANES - 1));
    else
      word = in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      buf_q  <= '0;
      cnt_q  <= '0;
      last_q <= 1'b0;
    end else if (full) begin
      if (f_ack) begin
        cnt_q  <= '0;
        last_q <= 1'b0;
      end
    end else if (fill || take) begin
      buf_q <= {buf_q[RATE-LANE_W-1:0], word};
      cnt_q <= cnt_q + 4'd1;
      if (take && is_last) last_q <= 1'b1;
    end
  end

  assign buffer_full = full || last_q;
  assign out         = buf_q;
  assign out_ready   = full;
  assign out_last    = full && last_q;

  // The core may only acknowledge a block that is on offer.
  a_ack_only_when_full : assert property (@(posedge clk) disable iff (rst) f_ack |-> full);

endmodule
