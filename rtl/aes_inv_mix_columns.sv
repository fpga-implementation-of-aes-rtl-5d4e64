// aes_inv_mix_columns: the InvMixColumns transformation of AES.
//
// Each column is multiplied by the circulant matrix with first row
// {0e 0b 0d 09}, the inverse of the MixColumns matrix. The products are
// built from repeated xtime: with x2 = 2a, x4 = 4a, x8 = 8a,
// 9a = x8^a, 11a = x8^x2^a, 13a = x8^x4^a, 14a = x8^x4^x2.
// Four columns in parallel; combinational; FIPS-197 byte order.
//
// The matrix is the standard's; the xtime/XOR form is this design's choice.
module aes_inv_mix_columns (
  input  aes_pkg::state_t state_in,
  output aes_pkg::state_t state_out
);
  import aes_pkg::*;

  function automatic logic [7:0] mul9 (logic [7:0] a); return xtime(xtime(xtime(a))) ^ a; endfunction
  function automatic logic [7:0] mul11(logic [7:0] a); return xtime(xtime(xtime(a))) ^ xtime(a) ^ a; endfunction
  function automatic logic [7:0] mul13(logic [7:0] a); return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ a; endfunction
  function automatic logic [7:0] mul14(logic [7:0] a); return xtime(xtime(xtime(a))) ^ xtime(xtime(a)) ^ xtime(a); endfunction

  always_comb begin
    logic [7:0] a0, a1, a2, a3;
    for (int c = 0; c < 4; c++) begin
      a0 = state_in[127 - 32*c      -: 8];
      a1 = state_in[127 - 32*c - 8  -: 8];
      a2 = state_in[127 - 32*c - 16 -: 8];
      a3 = state_in[127 - 32*c - 24 -: 8];
      state_out[127 - 32*c      -: 8] = mul14(a0) ^ mul11(a1) ^ mul13(a2) ^ mul9(a3);
      state_out[127 - 32*c - 8  -: 8] = mul9(a0)  ^ mul14(a1) ^ mul11(a2) ^ mul13(a3);
      state_out[127 - 32*c - 16 -: 8] = mul13(a0) ^ mul9(a1)  ^ mul14(a2) ^ mul11(a3);
      state_out[127 - 32*c - 24 -: 8] = mul11(a0) ^ mul13(a1) ^ mul9(a2)  ^ mul14(a3);
    end
  end
endmodule
