// aes_inv_sub_bytes: the InvSubBytes transformation of AES.
//
// All sixteen state bytes pass through their own inverse S-box in parallel,
// undoing aes_sub_bytes. Combinational; FIPS-197 byte order.
//
// The transformation is the standard's; one S-box per byte is this design's
// choice for a full-width datapath.
module aes_inv_sub_bytes (
  input  aes_pkg::state_t state_in,
  output aes_pkg::state_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox #(.INVERSE(1'b1)) u_sbox (
      .in_byte (state_in [8*i +: 8]),
      .out_byte(state_out[8*i +: 8])
    );
  end
endmodule
