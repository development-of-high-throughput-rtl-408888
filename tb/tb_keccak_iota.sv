// tb_keccak_iota - self-checking test of the iota step.
//
// Drives random states with each of the 24 published round constants and with random
// constants, and compares with the reference model (only lane (0,0) may change).
module tb_keccak_iota;
  import keccak_ref_pkg::*;

  flat_t a, b;
  u64    rc;
  int checks = 0, failures = 0;

  keccak_iota dut (.a(a), .rc(rc), .b(b));

  task automatic check(flat_t v, u64 c);
    a  = v;
    rc = c;
    #1;
    checks++;
    if (b !== iota(v, c)) failures++;
  endtask

  initial begin
    for (int r = 0; r < 24; r++) check(random_state(), RC_REF[r]);
    for (int i = 0; i < 100; i++) check(random_state(), {$urandom, $urandom});
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
