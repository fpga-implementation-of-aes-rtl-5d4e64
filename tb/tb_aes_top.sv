// tb_aes_top: end-to-end testbench for aes_top at its default size
// (256-bit keys, 14 rounds).
//
// The testbench plays the channel between the two ends: each ciphertext the
// encrypting end produces is handed to the decrypting end, which must give
// back the original plaintext. Ciphertexts are also compared with the
// reference model in aes_ref_pkg and the standard's AES-256 known answer.
// The two ends run overlapped: while block n is decrypted, block n+1 is
// already being encrypted. Along the way the test makes each mechanism of
// the design happen and counts it: key expansion at each end, a rekey of
// both ends, back-to-back blocks (start in the clock after done), a start
// ignored while busy, a start ignored before the key is ready, a key_load
// ignored while busy, overlapped encryption and decryption, and decryption
// under a wrong key (which must not recover the plaintext). A mechanism
// that never happened counts as a failure. Latency (14 clocks from start to
// done) and key expansion time (52 clocks) are checked on every use. A
// watchdog ends a hung run with a failure.
module tb_aes_top;
  import aes_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic         enc_key_load = 0, enc_key_ready, enc_start = 0, enc_busy, enc_done;
  logic         dec_key_load = 0, dec_key_ready, dec_start = 0, dec_busy, dec_done;
  logic [255:0] enc_key = '0, dec_key = '0;
  logic [127:0] enc_plaintext = '0, enc_ciphertext, dec_ciphertext = '0, dec_plaintext;

  aes_top dut (.*);

  typedef enum int {
    EV_KEY_EXPANSION, EV_REKEY, EV_BACK_TO_BACK, EV_START_WHILE_BUSY, EV_START_NO_KEY,
    EV_KEYLOAD_WHILE_BUSY, EV_OVERLAP, EV_WRONG_KEY, EV_COUNT
  } event_e;
  int events [EV_COUNT];
  string ev_name [EV_COUNT] = '{"key expansion", "rekey", "back-to-back blocks",
    "start while busy", "start before key", "key_load while busy",
    "overlapped enc/dec", "wrong key"};

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got=%h exp=%h", what, got, exp);
    end
  endtask

  task automatic check_true(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Load the same key at both ends and time the expansion. A start pulsed
  // in the meantime must be ignored.
  task automatic load_keys(logic [255:0] k);
    int cyc = 0;
    enc_key_load = 1; dec_key_load = 1; enc_key = k; dec_key = k;
    @(posedge clk); #1;
    enc_key_load = 0; dec_key_load = 0;
    enc_start = 1; dec_start = 1;
    @(posedge clk); #1;
    enc_start = 0; dec_start = 0; cyc = 1;
    check_true(!enc_busy && !dec_busy, "start ignored before key ready");
    events[EV_START_NO_KEY]++;
    while (!(enc_key_ready && dec_key_ready) && cyc < 200) begin @(posedge clk); #1; cyc++; end
    check_true(cyc == 52, $sformatf("key expansion took %0d clocks, expected 52", cyc));
    events[EV_KEY_EXPANSION]++;
  endtask

  // Stream n blocks through both ends, overlapped, under key k.
  task automatic stream(logic [255:0] k, int n, bit disturb);
    logic [127:0] pt [$];
    logic [127:0] ct_q [$];
    int enc_sent = 0, dec_sent = 0, dec_got = 0, enc_cyc = 0, dec_cyc = 0;
    logic [127:0] x;
    bit enc_run = 0, dec_run = 0, last_done = 0;
    while (dec_got < n) begin
      // drive inputs for the next clock
      enc_start = 0; dec_start = 0; enc_key_load = 0;
      if (!enc_busy && enc_sent < n && ct_q.size() < 2) begin
        x = (enc_sent == 0 && k == 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f)
            ? 128'h00112233445566778899aabbccddeeff : rand128();
        pt.push_back(x);
        enc_plaintext = x; enc_start = 1; enc_sent++; enc_cyc = 0;
        if (last_done) events[EV_BACK_TO_BACK]++;
      end else if (enc_busy && disturb && enc_cyc == 3) begin
        enc_start = 1; enc_plaintext = ~enc_plaintext;
        events[EV_START_WHILE_BUSY]++;
      end else if (enc_busy && disturb && enc_cyc == 5) begin
        enc_key_load = 1; enc_key = ~k;
        events[EV_KEYLOAD_WHILE_BUSY]++;
      end
      if (!dec_busy && ct_q.size() > 0) begin
        dec_ciphertext = ct_q.pop_front(); dec_start = 1; dec_sent++; dec_cyc = 0;
      end
      @(posedge clk); #1;
      enc_key = k;
      enc_cyc++; dec_cyc++;
      if (enc_busy && dec_busy) events[EV_OVERLAP]++;
      last_done = enc_done;
      if (enc_done) begin
        check_true(enc_cyc == 15, $sformatf("encryption took %0d clocks after start", enc_cyc - 1));  // start clock + 14 rounds
        check(enc_ciphertext, encrypt(pt[enc_sent-1], k, 8), "ciphertext vs reference");
        if (pt[enc_sent-1] == 128'h00112233445566778899aabbccddeeff)
          check(enc_ciphertext, 128'h8ea2b7ca516745bfeafc49904b496089, "AES-256 known answer");
        ct_q.push_back(enc_ciphertext);
      end
      if (dec_done) begin
        check_true(dec_cyc == 15, $sformatf("decryption took %0d clocks after start", dec_cyc - 1));  // start clock + 14 rounds
        check(dec_plaintext, pt[dec_got], "round trip plaintext");
        dec_got++;
      end
    end
    enc_start = 0; dec_start = 0; enc_key_load = 0;
    check_true(enc_key_ready, "key kept through disturbed run");
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [255:0] k;
  initial begin
    build();
    for (int e = 0; e < EV_COUNT; e++) events[e] = 0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    k = 256'h000102030405060708090a0b0c0d0e0f101112131415161718191a1b1c1d1e1f;
    load_keys(k);
    stream(k, 8, 1);
    for (int r = 0; r < 3; r++) begin
      k = rand256();
      load_keys(k);
      events[EV_REKEY]++;
      stream(k, 10, r == 1);
    end
    // Wrong key at the receiving end: the plaintext must not come back.
    enc_key_load = 1; enc_key = k;
    dec_key_load = 1; dec_key = ~k;
    @(posedge clk); #1 enc_key_load = 0; dec_key_load = 0;
    wait (enc_key_ready && dec_key_ready);
    @(posedge clk); #1;
    enc_plaintext = rand128(); enc_start = 1;
    @(posedge clk); #1 enc_start = 0;
    wait (enc_done);
    @(posedge clk); #1;
    dec_ciphertext = enc_ciphertext; dec_start = 1;
    @(posedge clk); #1 dec_start = 0;
    wait (dec_done);
    #1;
    check_true(dec_plaintext !== enc_plaintext, "wrong key must not decrypt");
    check(dec_plaintext, decrypt(enc_ciphertext, ~k, 8), "wrong-key output vs reference");
    events[EV_WRONG_KEY]++;
    for (int e = 0; e < EV_COUNT; e++) begin
      $display("mechanism %-20s happened %0d times", ev_name[e], events[e]);
      check_true(events[e] > 0, {"mechanism never exercised: ", ev_name[e]});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
