// tb_aes_inv_shift_rows: self-checking testbench for aes_inv_shift_rows.
//
// Drives random states and the standard's example (in reverse) through the inverse row rotation.
// Expected values come from the independent software model in
// aes_ref_pkg and from the worked example of the AES standard (FIPS-197,
// Appendix B, first round). A watchdog ends the run with a failure if it
// ever hangs.
module tb_aes_inv_shift_rows;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [127:0] din, dout;

  aes_inv_shift_rows dut (.state_in(din), .state_out(dout));

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
    check(128'hd42711aee0bf98f1b8b45de51e415230, "FIPS-197 example");
    for (int n = 0; n < 2000; n++) begin
      din = rand128();
      #1;
      check(shift_rows(din, 1), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
