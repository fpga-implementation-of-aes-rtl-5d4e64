// tb_aes_mix_columns: self-checking testbench for aes_mix_columns.
//
// Drives random states, the standard's example and the single-column test vectors db135345 -> 8e4da1bc, f20a225c -> 9fdc589d through the column mixing.
// Expected values come from the independent software model in
// aes_ref_pkg and from the worked example of the AES standard (FIPS-197,
// Appendix B, first round). A watchdog ends the run with a failure if it
// ever hangs.
module tb_aes_mix_columns;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] din, dout;

  aes_mix_columns dut (.state_in(din), .state_out(dout));

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
    din = 128'hd4bf5d30e0b452aeb84111f11e2798e5;
    #1;
    check(128'h046681e5e0cb199a48f8d37a2806264c, "FIPS-197 example");
    din = 128'hdb135345f20a225c01010101d4d4d4d5;
    #1;
    check(128'h8e4da1bc9fdc589d01010101d5d5d7d6, "FIPS-197 example");
    for (int n = 0; n < 2000; n++) begin
      din = rand128();
      #1;
      check(mix_columns(din, 0), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
