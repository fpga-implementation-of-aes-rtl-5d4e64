// tb_aes_encrypt: self-checking testbench for aes_encrypt.
//
// Instances with 128-, 192- and 256-bit keys (256 is the default). Each
// first encrypts the known-answer vector of the AES standard (Appendix C)
// and then random blocks under random keys, compared with the reference
// model in aes_ref_pkg. It checks the timing: key_ready comes
// 4*(Nr+1) - Nk clocks after key_load, done exactly Nr clocks after the
// clock that takes start, and a new start is taken in the clock after
// done. It also checks that a start before the key is ready, a start while
// busy and a key_load while busy are all ignored. A watchdog ends a hung
// run with a failure.
module tb_aes_encrypt;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         key_load [3], key_ready [3], start [3], busy [3], done [3];
  logic [255:0] key [3];
  logic [127:0] din [3], dout [3];

  aes_encrypt #(.KEY_BITS(128)) dut128 (.clk, .rst_n, .key_load(key_load[0]), .key(key[0][255:128]),
    .key_ready(key_ready[0]), .start(start[0]), .plaintext(din[0]), .busy(busy[0]), .done(done[0]), .ciphertext(dout[0]));
  aes_encrypt #(.KEY_BITS(192)) dut192 (.clk, .rst_n, .key_load(key_load[1]), .key(key[1][255:64]),
    .key_ready(key_ready[1]), .start(start[1]), .plaintext(din[1]), .busy(busy[1]), .done(done[1]), .ciphertext(dout[1]));
  aes_encrypt                   dut256 (.clk, .rst_n, .key_load(key_load[2]), .key(key[2]),
    .key_ready(key_ready[2]), .start(start[2]), .plaintext(din[2]), .busy(busy[2]), .done(done[2]), .ciphertext(dout[2]));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic check_int(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got=%0d exp=%0d", what, got, exp);
    end
  endtask

  task automatic load_key(int s, logic [255:0] k);
    int nk = 4 + 2*s, cyc = 0;
    key_load[s] = 1; key[s] = k;
    @(posedge clk); #1;
    key_load[s] = 0;
    // A start before the schedule is complete must be ignored.
    start[s] = 1; din[s] = rand128();
    @(posedge clk); #1;
    start[s] = 0; cyc = 1;
    check_int(int'(busy[s]), 0, "start ignored without key");
    while (!key_ready[s]) begin @(posedge clk); #1; cyc++; end
    check_int(cyc, 4*(nk+7) - nk, "key expansion clocks");
  endtask

  // Run one block; returns the result. Optionally disturbs the core while busy.
  task automatic run_block(int s, logic [127:0] x, bit disturb, output logic [127:0] y);
    int nr = 10 + 2*s, cyc = 0;
    start[s] = 1; din[s] = x;
    @(posedge clk); #1;
    start[s] = 0;
    check_int(int'(busy[s]), 1, "busy after start");
    if (disturb) begin
      din[s] = ~x; start[s] = 1; key_load[s] = 1; key[s] = ~key[s];
    end
    cyc = 0;                              // clocks counted after the start clock
    while (!done[s] && cyc < 100) begin
      @(posedge clk); #1; cyc++;
      start[s] = 0; key_load[s] = 0;
    end
    check_int(cyc, nr, "clocks from start to done");
    check_int(int'(busy[s]), 0, "idle at done");
    y = dout[s];
    if (disturb) key[s] = ~key[s];
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] y;
  logic [255:0] k;
  logic [127:0] x;
  // Appendix C vectors: key 00 01 02 ..., plaintext 00 11 22 ... ff.
  localparam logic [255:0] KEY_C = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
  localparam logic [127:0] PT_C  = 128'h00112233445566778899aabbccddeeff;
  localparam logic [127:0] CT_C [3] = '{128'h69c4e0d86a7b0430d8cdb78070b4c55a,
                                        128'hdda97ca4864cdfe06eaf70a0ec0d7191,
                                        128'h8ea2b7ca516745bfeafc49904b496089};

  initial begin
    build();
    for (int s = 0; s < 3; s++) begin
      key_load[s] = 0; start[s] = 0; key[s] = '0; din[s] = '0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int s = 0; s < 3; s++) begin
      automatic int nk = 4 + 2*s;
      k = KEY_C & (~256'h0 << (128 - 64*s));
      load_key(s, k);
      run_block(s, PT_C, 0, y);
      check(y, CT_C[s], $sformatf("FIPS-197 C vector, %0d-bit key", 32*nk));
      for (int n = 0; n < 20; n++) begin
        if (n % 5 == 0) begin
          k = rand256() & (~256'h0 << (128 - 64*s));
          load_key(s, k);
        end
        x = rand128();
        run_block(s, x, n % 3 == 1, y);
        check(y, encrypt(x, k, nk), $sformatf("random block, %0d-bit key", 32*nk));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
