// tb_keccak_rho_pi - self-checking test of the rho_pi step.
//
// Applies the all-zero state, every single-bit state of lanes (0,0) and (4,4), and
// 300 random states, and compares the output with the behavioural model in
// keccak_ref_pkg. A watchdog ends the run with a failure if it hangs.
module tb_keccak_rho_pi;
  import keccak_ref_pkg::*;

  flat_t a, b;
  int checks = 0, failures = 0;

  keccak_rho_pi dut (.a(a), .b(b));

  task automatic check(flat_t v);
    flat_t exp;
    a = v;
    #1;
    exp = rho_pi(v);
    checks++;
    if (b !== exp) begin
      failures++;
      if (failures < 5) $display("mismatch: in %h", v[63:0]);
    end
  endtask

  initial begin
    check('0);
    for (int i = 0; i < 64; i++) check(flat_t'(1) << i);
    for (int i = 0; i < 64; i++) check(flat_t'(1) << (1536 + i));
    for (int i = 0; i < 300; i++) check(random_state());
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
