// aes_shift_rows: the ShiftRows transformation of AES.
//
// Row r of the 4x4 state is rotated left by r byte positions (offsets
// 0, 1, 2, 3 for the 128-bit block): the byte in row r, column c moves to
// column (c - r) mod 4. Only wiring, no logic; combinational. Byte 4*c + r
// of the flat state is row r, column c (FIPS-197 order).
//
// The offsets follow the AES standard for a 128-bit block.
module aes_shift_rows (
  input  aes_pkg::state_t state_in,
  output aes_pkg::state_t state_out
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(4*c + r) -: 8] = state_in[127 - 8*(4*((c + r) % 4) + r) -: 8];
  end
endmodule
