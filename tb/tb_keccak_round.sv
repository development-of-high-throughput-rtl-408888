// tb_keccak_round - self-checking test of one complete round.
//
// Compares random states and round numbers with the reference model, then chains
// the block through all 24 rounds starting from the zero state and checks lane 0 of
// the result against the published value of Keccak-f[1600](0).
module tb_keccak_round;
  import keccak_ref_pkg::*;

  flat_t a, b;
  u64    rc;
  int checks = 0, failures = 0;

  keccak_round dut (.a(a), .rc(rc), .b(b));

  initial begin
    flat_t s;
    int r;
    for (int i = 0; i < 200; i++) begin
      r = $urandom_range(23);
      a  = random_state();
      rc = RC_REF[r];
      #1;
      checks++;
      if (b !== round_fn(a, r)) failures++;
    end
    s = '0;
    for (int k = 0; k < 24; k++) begin
      a  = s;
      rc = RC_REF[k];
      #1;
      s = b;
    end
    checks++;
    if (s[63:0] !== ZERO_PERM_LANE0) begin
      failures++;
      $display("Keccak-f(0) lane 0 = %h", s[63:0]);
    end
    checks++;
    if (s !== permute('0)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
