// tb_aes_key_expansion: self-checking testbench for aes_key_expansion.
//
// Three instances cover the three key sizes (256, the default, and 128 and
// 192). Each is loaded with the key of the AES standard's expansion example
// and then with random keys; after ready, every round key is read back and
// compared with the reference schedule of aes_ref_pkg, and the last round
// key of the standard's examples is checked against its printed value.
// The time from load to ready must be 4*(Nr+1) - Nk clocks (40, 46, 52).
// A reload in the middle of an expansion must restart it. A watchdog ends
// a hung run with a failure.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         load   [3];
  logic [255:0] key    [3];
  logic         ready  [3];
  logic [3:0]   rd     [3];
  logic [127:0] rk     [3];

  aes_key_expansion #(.KEY_BITS(128)) dut128 (.clk, .rst_n, .load(load[0]), .key(key[0][255:128]),
    .ready(ready[0]), .rd_round(rd[0]), .round_key(rk[0]));
  aes_key_expansion #(.KEY_BITS(192)) dut192 (.clk, .rst_n, .load(load[1]), .key(key[1][255:64]),
    .ready(ready[1]), .rd_round(rd[1]), .round_key(rk[1]));
  aes_key_expansion                   dut256 (.clk, .rst_n, .load(load[2]), .key(key[2]),
    .ready(ready[2]), .rd_round(rd[2]), .round_key(rk[2]));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got=%h exp=%h", what, got, exp);
    end
  endtask

  // Load key k into instance s, time the expansion and read all round keys.
  task automatic run(int s, logic [255:0] k);
    int nk = 4 + 2*s, cyc = 0;
    load[s] = 1; key[s] = k;
    @(posedge clk); #1;
    load[s] = 0;
    checks++;
    if (ready[s]) begin failures++; $display("FAIL ready not cleared by load"); end
    while (!ready[s]) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 4*(nk+7) - nk) begin
      failures++;
      $display("FAIL expansion of %0d-bit key took %0d clocks, expected %0d", 32*nk, cyc, 4*(nk+7) - nk);
    end
    for (int j = 0; j <= nk + 6; j++) begin
      rd[s] = 4'(j);
      #1;
      check(rk[s], round_key(k, nk, j), $sformatf("%0d-bit round key %0d", 32*nk, j));
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    build();
    for (int s = 0; s < 3; s++) begin load[s] = 0; key[s] = '0; rd[s] = '0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    // Key expansion examples of the standard (Appendix A.1 and A.3).
    run(0, {128'h2b7e151628aed2a6abf7158809cf4f3c, 128'h0});
    rd[0] = 4'd10; #1;
    check(rk[0], 128'hd014f9a8c9ee2589e13f0cc8b6630ca6, "FIPS-197 A.1 round key 10");
    run(2, 256'h603deb1015ca71be2b73aef0857d77811f352c073b6108d72d9810a30914dff4);
    rd[2] = 4'd14; #1;
    check(rk[2], 128'hfe4890d1e6188d0b046df344706c631e, "FIPS-197 A.3 round key 14");
    run(1, {192'h8e73b0f7da0e6452c810f32b809079e562f8ead2522c6b7b, 64'h0});
    for (int n = 0; n < 10; n++)
      for (int s = 0; s < 3; s++) run(s, rand256() & ~(256'h0) << (128 - 64*s));
    // Reload in the middle of an expansion: the second key must win.
    load[2] = 1; key[2] = rand256();
    @(posedge clk); #1 load[2] = 0;
    repeat (20) @(posedge clk);
    run(2, rand256());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
