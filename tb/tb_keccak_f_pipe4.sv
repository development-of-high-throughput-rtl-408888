// tb_keccak_f_pipe4 - self-checking test of the pipelined permutation core (4 pipeline registers).
//
// Feeds messages made of random padded blocks (1 to 4 blocks each) straight into the
// core, with random pauses between blocks, and compares the state given with every
// out_ready against the reference sponge (absorb + Keccak-f[1600]). Phase 1 sends one
// single-block message at a time and checks the latency: out_ready comes 96
// cycles after the cycle in which ack was high. Then six single-block
// messages are sent back to back. Back-to-back
// messages make the last block of one message and the first blocks of the next ones
// share the pipeline (up to 4 tokens at once), and late blocks make the core stall;
// the test counts both and fails if the pipeline never held 4 tokens or never stalled.
module tb_keccak_f_pipe4;
  import keccak_ref_pkg::*;

  logic  clk = 1'b0;
  logic  rst;
  blk_t  in;
  logic  in_ready, in_last, ack;
  flat_t out;
  logic  out_ready;

  int    checks = 0, failures = 0;
  int    cyc = 0;
  bit    gaps;
  flat_t exp_q [$];
  int    last_ack_cyc, out_cyc;
  int    n_overlap = 0, n_stall = 0, max_tokens = 0, tokens;

  keccak_f_pipe #(.STAGES(4)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  task automatic send_msg(int nblocks);
    flat_t s;
    blk_t  b;
    s = '0;
    for (int k = 0; k < nblocks; k++) begin
      for (int i = 0; i < 18; i++) b[32*i +: 32] = $urandom;
      s = permute(absorb(s, b));
      if (gaps && $urandom_range(1) == 0) repeat ($urandom_range(200)) @(negedge clk);
      in       = b;
      in_last  = (k == nblocks - 1);
      in_ready = 1'b1;
      #1;
      while (!ack) begin
        @(negedge clk);
        #1;
      end
      last_ack_cyc = cyc;
      @(negedge clk);
      in_ready = 1'b0;
      in       = '0;
      in_last  = 1'($urandom);
    end
    exp_q.push_back(s);
  endtask

  initial begin
    flat_t e;
    forever begin
      @(negedge clk);
      tokens = 0;
      tokens += int'(dut.tag_q[0].valid);
      tokens += int'(dut.tag_q[1].valid);
      tokens += int'(dut.tag_q[2].valid);
      tokens += int'(dut.tag_q[3].valid);
      if (tokens > max_tokens) max_tokens = tokens;
      if (tokens >= 2) n_overlap++;
      if (dut.stall) n_stall++;
      if (out_ready) begin
        out_cyc = cyc;
        checks++;
        if (exp_q.size() == 0) begin
          failures++;
          $display("unexpected result at %0d", cyc);
        end else begin
          e = exp_q.pop_front();
          if (out !== e) begin
            failures++;
            if (failures < 5) $display("state mismatch at %0d: got %h exp %h", cyc, out[63:0], e[63:0]);
          end
        end
      end
    end
  end

  task automatic wait_drained();
    while (exp_q.size() != 0) @(negedge clk);
    repeat (2) @(negedge clk);
  endtask

  initial begin
    rst = 1'b1; in = '0; in_ready = 1'b0; in_last = 1'b0; gaps = 0;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    @(negedge clk);
    for (int m = 0; m < 3; m++) begin
      send_msg(1);
      wait_drained();
      checks++;
      if (out_cyc - last_ack_cyc != 96) begin
        failures++;
        $display("latency %0d, expected 96", out_cyc - last_ack_cyc);
      end
    end
    for (int m = 0; m < 6; m++) send_msg(1);
    for (int m = 0; m < 12; m++) send_msg($urandom_range(1, 4));
    gaps = 1;
    for (int m = 0; m < 12; m++) send_msg($urandom_range(1, 4));
    wait_drained();
    checks += 2;
    if (max_tokens != 4) begin failures++; $display("at most %0d tokens in flight", max_tokens); end
    if (n_stall == 0) begin failures++; $display("stall never happened"); end
    $display("cycles with two or more tokens: %0d, most tokens: %0d, stall cycles: %0d", n_overlap, max_tokens, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (80000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
