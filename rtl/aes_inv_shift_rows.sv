// aes_inv_shift_rows: the InvShiftRows transformation of AES.
//
// Row r of the 4x4 state is rotated right by r byte positions, undoing
// aes_shift_rows: the byte in row r, column c moves to column (c + r) mod 4.
// Only wiring; combinational; FIPS-197 byte order.
//
// The offsets follow the AES standard for a 128-bit block.
module aes_inv_shift_rows (
  input  aes_pkg::state_t state_in,
  output aes_pkg::state_t state_out
);
  always_comb begin
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++)
        state_out[127 - 8*(4*((c + r) % 4) + r) -: 8] = state_in[127 - 8*(4*c + r) -: 8];
  end
endmodule
