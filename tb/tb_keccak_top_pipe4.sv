// tb_keccak_top_pipe4 - end-to-end test of the Keccak-512 engine with the four-stage pipelined core (PIPE_STAGES = 4).
//
// Hashes the known-answer messages (bytes 0, 1, 2, ... of lengths 0 to 200) and
// compares with published Keccak-512 digests, then hashes random messages of random
// length back to back, with random pauses in the input, against the reference model.
// Latency check: a 64-byte message (one block) sent to the idle engine gives its
// digest 105 cycles after its first word is presented (9 cycles to fill the block
// plus 96 in the core).
// Mechanisms counted, each of which must occur at least once: padding words inserted
// by the padder, 0x01 and 0x80 sharing a byte, a closing word with byte_num = 0,
// multi-block messages (one of them with a 120-cycle pause before its second
// block), input held off by buffer_full,
// several messages in the pipeline together (up to 4), and a pipeline stall.
module tb_keccak_top_pipe4;
  import keccak_ref_pkg::*;

  logic       clk = 1'b0;
  logic       rst;
  u64         in;
  logic       in_ready, is_last;
  logic [2:0] byte_num;
  logic       buffer_full;
  dig_t       out;
  logic       out_ready;

  int   checks = 0, failures = 0;
  int   cyc = 0;
  bit   gaps;
  bit   slow;
  dig_t exp_q [$];
  int   out_cyc;
  int   n_fill = 0, n_merge = 0, n_close = 0, n_multi = 0, n_hold = 0, n_overlap = 0, n_stall = 0, max_tokens = 0, tokens;

  keccak_top #(.PIPE_STAGES(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic send_msg(msg_t m, dig_t expected);
    int n  = m.size();
    int nw = n / 8 + 1;
    exp_q.push_back(expected);
    if (n % 72 == 71) n_merge++;
    if (n % 8 == 0) n_close++;
    if (n >= 72) n_multi++;
    for (int w = 0; w < nw; w++) begin
      u64 word;
      bit last;
      last = (w == nw - 1);
      for (int j = 0; j < 8; j++)
        word[8*j +: 8] = (8*w + j < n) ? m[8*w + j] : 8'($urandom);
      if (slow && w == 9) repeat (120) @(negedge clk);
      if (gaps && $urandom_range(7) == 0) repeat ($urandom_range(30)) @(negedge clk);
      in       = word;
      in_ready = 1'b1;
      is_last  = last;
      byte_num = last ? 3'(n % 8) : 3'($urandom);
      while (buffer_full) @(negedge clk);
      @(negedge clk);
      in_ready = 1'b0;
    end
  endtask

  initial begin
    dig_t e;
    forever begin
      @(negedge clk);
      if (dut.u_padder.fill) n_fill++;
      if (in_ready && buffer_full) n_hold++;
      tokens = 0;
      tokens += int'(dut.g_pipe.u_core.tag_q[0].valid);
      tokens += int'(dut.g_pipe.u_core.tag_q[1].valid);
      tokens += int'(dut.g_pipe.u_core.tag_q[2].valid);
      tokens += int'(dut.g_pipe.u_core.tag_q[3].valid);
      if (tokens > max_tokens) max_tokens = tokens;
      if (tokens >= 2) n_overlap++;
      if (dut.g_pipe.u_core.stall) n_stall++;
      if (out_ready) begin
        out_cyc = cyc;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected digest at %0d", cyc);
        end else begin
          e = exp_q.pop_front();
          if (out !== e) begin
            failures++;
            if (failures < 5) $display("digest mismatch at %0d: got %h exp %h", cyc, out, e);
          end
        end
      end
    end
  end

  task automatic wait_drained();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  task automatic need(int count, string what);
    checks++;
    if (count == 0) begin
      failures++;
      $display("never happened: %s", what);
    end
  endtask

  initial begin
    msg_t m;
    int   t0;
    rst = 1'b1; in = '0; in_ready = 1'b0; is_last = 1'b0; byte_num = '0; gaps = 0; slow = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    // Latency of one 64-byte (512-bit) message.
    m = counting_msg(64);
    t0 = cyc;
    send_msg(m, hash(m));
    wait_drained();
    checks++;
    if (out_cyc - t0 != 105) begin
      failures++;
      $display("latency %0d, expected 105", out_cyc - t0);
    end
    // Known answers, against the published digests and the reference model.
    for (int k = 0; k < KAT_N; k++) begin
      m = counting_msg(KAT_LEN[k]);
      checks++;
      if (hash(m) !== KAT_DIG[k]) begin
        failures++;
        $display("reference model disagrees with known answer %0d", k);
      end
      send_msg(m, KAT_DIG[k]);
    end
    wait_drained();
    // A two-block message whose second block arrives late.
    slow = 1;
    m = random_msg(150);
    send_msg(m, hash(m));
    slow = 0;
    // Random messages, back to back and then with pauses.
    for (int k = 0; k < 15; k++) begin
      m = random_msg($urandom_range(160));
      send_msg(m, hash(m));
    end
    gaps = 1;
    for (int k = 0; k < 15; k++) begin
      m = random_msg($urandom_range(160));
      send_msg(m, hash(m));
    end
    wait_drained();
    need(n_fill, "padding words"); need(n_merge, "0x81 closing byte");
    need(n_close, "closing word with byte_num 0"); need(n_multi, "multi-block message");
    need(n_hold, "input held by buffer_full");
    need(n_overlap, "two messages in the pipeline"); need(n_stall, "pipeline stall");
    $display("fill %0d merge %0d close %0d multi %0d hold %0d overlap %0d most tokens %0d stall %0d", n_fill, n_merge, n_close, n_multi, n_hold, n_overlap, max_tokens, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
