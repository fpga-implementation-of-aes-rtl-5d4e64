// aes_mix_columns: the MixColumns transformation of AES.
//
// Each 4-byte column is multiplied, over GF(2^8), by the fixed circulant
// matrix with first row {02 03 01 01}. Multiplication by {02} is xtime (a
// shift and a conditional XOR with 0x1b), by {03} is xtime plus the byte
// itself, so the block is XOR gates only. Four columns in parallel;
// combinational; FIPS-197 byte order.
//
// The matrix is the standard's; the xtime/XOR form is this design's choice.
module aes_mix_columns (
  input  aes_pkg::state_t state_in,
  output aes_pkg::state_t state_out
);
  import aes_pkg::*;

  always_comb begin
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = state_in[127 - 32*c      -: 8];
      a1 = state_in[127 - 32*c - 8  -: 8];
      a2 = state_in[127 - 32*c - 16 -: 8];
      a3 = state_in[127 - 32*c - 24 -: 8];
      state_out[127 - 32*c      -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
      state_out[127 - 32*c - 8  -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
      state_out[127 - 32*c - 16 -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
      state_out[127 - 32*c - 24 -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
    end
  end
endmodule
