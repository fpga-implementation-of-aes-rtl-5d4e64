// tb_aes_add_round_key: self-checking testbench for aes_add_round_key.
//
// Drives random states and keys and the standard's round-1 key addition through the XOR.
// Expected values come from the independent software model in
// aes_ref_pkg and from the worked example of the AES standard (FIPS-197,
// Appendix B, first round). A watchdog ends the run with a failure if it
// ever hangs.
module tb_aes_add_round_key;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] din, dout, rk;

  aes_add_round_key dut (.state_in(din), .round_key(rk), .state_out(dout));

  task automatic check(logic [127:0] exp, string what);
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL %s: in=%h got=%h exp=%h", what, din, dout, exp);
    end
  endtask

  initial begin
    #1ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    din = 128'h046681e5e0cb199a48f8d37a2806264c; rk = 128'ha0fafe1788542cb123a339392a6c7605;
    #1;
    check(128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 example");
    for (int n = 0; n < 2000; n++) begin
      din = rand128();
      rk = rand128();
      #1;
      check(din ^ rk, "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
