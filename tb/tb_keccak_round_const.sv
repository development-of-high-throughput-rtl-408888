// tb_keccak_round_const - checks all 24 round constants against the published table,
// and that round numbers 24..31 give zero.
module tb_keccak_round_const;
  import keccak_ref_pkg::*;

  logic [4:0] round;
  u64         rc;
  int checks = 0, failures = 0;

  keccak_round_const dut (.round(round), .rc(rc));

  initial begin
    for (int r = 0; r < 32; r++) begin
      round = 5'(r);
      #1;
      checks++;
      if (rc !== ((r < 24) ? RC_REF[r] : 64'h0)) begin
        failures++;
        $display("round %0d: got %h", r, rc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
