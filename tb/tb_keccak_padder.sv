// tb_keccak_padder - self-checking test of the padder.
//
// Sends messages of many lengths (block boundaries, word boundaries, the case where
// 0x01 and 0x80 share a byte) and random messages, with random pauses in the input
// and random delays before f_ack. Every block offered is compared with the padded
// blocks of the reference model, together with out_last. The bytes of the final word
// beyond byte_num are random, so the masking is checked too. Timing check: with no
// pauses a block is on offer exactly 9 cycles after its first word was presented.
module tb_keccak_padder;
  import keccak_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  u64         in;
  logic       in_ready, is_last;
  logic [2:0] byte_num;
  logic       buffer_full;
  blk_t       out;
  logic       out_ready, out_last, f_ack;

  int   checks = 0, failures = 0;
  int   cyc = 0;
  bit   gaps;
  int   ack_delay_max;
  blk_t exp_q [$];
  bit   exp_last_q [$];
  int   offer_cyc;

  keccak_padder dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic send_msg(msg_t m);
    blk_t bl [$];
    int n  = m.size();
    int nw = n / 8 + 1;
    pad_blocks(m, bl);
    foreach (bl[k]) begin
      exp_q.push_back(bl[k]);
      exp_last_q.push_back(k == bl.size() - 1);
    end
    for (int w = 0; w < nw; w++) begin
      u64 word;
      bit last;
      last = (w == nw - 1);
      for (int j = 0; j < 8; j++)
        word[8*j +: 8] = (8*w + j < n) ? m[8*w + j] : 8'($urandom);
      if (gaps && $urandom_range(3) == 0) repeat ($urandom_range(3)) @(negedge clk);
      in       = word;
      in_ready = 1'b1;
      is_last  = last;
      byte_num = last ? 3'(n % 8) : 3'($urandom);
      while (buffer_full) @(negedge clk);
      @(negedge clk);
      in_ready = 1'b0;
      in       = {$urandom, $urandom};
      is_last  = 1'($urandom);
    end
  endtask

  // Block receiver: compare, then acknowledge after a random delay.
  initial begin
    blk_t e;
    bit   l;
    f_ack = 1'b0;
    forever begin
      @(negedge clk);
      f_ack = 1'b0;
      if (out_ready) begin
        offer_cyc = cyc;
        repeat ($urandom_range(ack_delay_max)) @(negedge clk);
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected block");
        end else begin
          e = exp_q.pop_front();
          l = exp_last_q.pop_front();
          if (out !== e || out_last !== l) begin
            failures++;
            if (failures < 5) $display("block mismatch at %0d: got %h exp %h last %b/%b",
                                       cyc, out[575:448], e[575:448], out_last, l);
          end
        end
        f_ack = 1'b1;
      end
    end
  end

  task automatic wait_drained();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (3) @(negedge clk);
  endtask

  initial begin
    int lens [15];
    int t0;
    lens = '{0, 1, 7, 8, 9, 63, 64, 65, 70, 71, 72, 73, 143, 144, 200};
    rst = 1'b1; in = '0; in_ready = 1'b0; is_last = 1'b0; byte_num = '0;
    gaps = 0; ack_delay_max = 0; offer_cyc = -1;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    // Timing: 64-byte message (8 words + closing word) and the empty message.
    foreach (lens[i]) if (lens[i] == 64 || lens[i] == 0) begin
      t0 = cyc;
      send_msg(counting_msg(lens[i]));
      wait_drained();
      checks++;
      if (offer_cyc != t0 + 9) begin
        failures++;
        $display("len %0d: block offered after %0d cycles, expected 9", lens[i], offer_cyc - t0);
      end
    end
    // All lengths, back to back, then with pauses and slow acknowledges.
    foreach (lens[i]) send_msg(counting_msg(lens[i]));
    wait_drained();
    gaps = 1; ack_delay_max = 5;
    foreach (lens[i]) send_msg(random_msg(lens[i]));
    for (int k = 0; k < 20; k++) send_msg(random_msg($urandom_range(300)));
    wait_drained();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
