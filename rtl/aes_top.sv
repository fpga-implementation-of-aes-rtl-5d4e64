// aes_top: AES-256 sender and receiver ends side by side.
//
// The encrypting end turns plaintext into ciphertext under its private key;
// the decrypting end turns ciphertext back into plaintext under its own
// private key. Whatever carries the ciphertext between them (a link, a
// memory, a loopback wire) is outside this module, so both ends have their
// own complete set of ports. Each end is an iterative core that runs one
// full 128-bit round per clock and has its own key expansion: after a
// key_load pulse, *_key_ready rises 52 clocks later (for KEY_BITS = 256);
// a *_start pulse is then answered by a one-clock *_done pulse 14 clocks
// later with the result held on the output. KEY_BITS may be set to 128 or
// 192 for the shorter AES variants (10 and 12 rounds).
module aes_top #(
  parameter int KEY_BITS = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  // encrypting end
  input  logic                enc_key_load,
  input  logic [KEY_BITS-1:0] enc_key,
  output logic                enc_key_ready,
  input  logic                enc_start,
  input  logic [127:0]        enc_plaintext,
  output logic                enc_busy,
  output logic                enc_done,
  output logic [127:0]        enc_ciphertext,
  // decrypting end
  input  logic                dec_key_load,
  input  logic [KEY_BITS-1:0] dec_key,
  output logic                dec_key_ready,
  input  logic                dec_start,
  input  logic [127:0]        dec_ciphertext,
  output logic                dec_busy,
  output logic                dec_done,
  output logic [127:0]        dec_plaintext
);

  aes_encrypt #(.KEY_BITS(KEY_BITS)) u_enc (
    .clk, .rst_n,
    .key_load(enc_key_load), .key(enc_key), .key_ready(enc_key_ready),
    .start(enc_start), .plaintext(enc_plaintext),
    .busy(enc_busy), .done(enc_done), .ciphertext(enc_ciphertext)
  );

  aes_decrypt #(.KEY_BITS(KEY_BITS)) u_dec (
    .clk, .rst_n,
    .key_load(dec_key_load), .key(dec_key), .key_ready(dec_key_ready),
    .start(dec_start), .ciphertext(dec_ciphertext),
    .busy(dec_busy), .done(dec_done), .plaintext(dec_plaintext)
  );

endmodule
