// aes_add_round_key: the AddRoundKey transformation of AES.
//
// The 128-bit state is XORed bit for bit with the 128-bit round key taken
// from the expanded key. The same block serves encryption and decryption,
// since XOR is its own inverse. Combinational.
//
// This is exactly the standard's step; there is nothing to choose.
module aes_add_round_key (
  input  aes_pkg::state_t state_in,
  input  aes_pkg::state_t round_key,
  output aes_pkg::state_t state_out
);
  assign state_out = state_in ^ round_key;
endmodule
