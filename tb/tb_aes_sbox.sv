// tb_aes_sbox: self-checking testbench for aes_sbox.
//
// Instantiates the forward (INVERSE = 0) and inverse (INVERSE = 1) S-box
// and sweeps all 256 inputs of each. Expected values come from the
// reference model in aes_ref_pkg, which finds each inverse by search, plus
// a few entries printed in the AES standard (S(00)=63, S(01)=7c, S(53)=ed,
// S(ff)=16). A watchdog ends a hung run with a failure.
module tb_aes_sbox;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic [7:0] din, fwd, inv;

  aes_sbox #(.INVERSE(1'b0)) dut_fwd (.in_byte(din), .out_byte(fwd));
  aes_sbox #(.INVERSE(1'b1)) dut_inv (.in_byte(din), .out_byte(inv));

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: in=%h got=%h exp=%h", what, din, got, exp);
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
    din = 8'h00; #1; check(fwd, 8'h63, "S(00)"); check(inv, 8'h52, "InvS(00)");
    din = 8'h01; #1; check(fwd, 8'h7c, "S(01)");
    din = 8'h53; #1; check(fwd, 8'hed, "S(53)");
    din = 8'hff; #1; check(fwd, 8'h16, "S(ff)");
    din = 8'h63; #1; check(inv, 8'h00, "InvS(63)");
    for (int i = 0; i < 256; i++) begin
      din = 8'(i);
      #1;
      check(fwd, SB[i], "forward");
      check(inv, ISB[i], "inverse");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
