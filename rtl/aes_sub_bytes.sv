// aes_sub_bytes: the SubBytes transformation of AES.
//
// All sixteen bytes of the 128-bit state pass through their own forward
// S-box at once, which keeps the whole round on a 128-bit parallel datapath.
// Combinational; state bytes in FIPS-197 order (byte 0 in bits [127:120]).
//
// The transformation is the standard's; one S-box per byte is this design's
// choice for a full-width datapath.
module aes_sub_bytes (
  input  aes_pkg::state_t state_in,
  output aes_pkg::state_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox #(.INVERSE(1'b0)) u_sbox (
      .in_byte (state_in [8*i +: 8]),
      .out_byte(state_out[8*i +: 8])
    );
  end
endmodule
