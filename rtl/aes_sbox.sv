// aes_sbox: one AES byte substitution.
//
// INVERSE = 0 gives the SubBytes S-box, INVERSE = 1 its inverse. The
// 256-entry table is a constant computed at elaboration by aes_pkg from the
// algebraic definition (field inverse followed by the affine map), so the
// block is a combinational 8-bit-in, 8-bit-out ROM; synthesis maps it to
// LUTs. Purely combinational, no clock.
//
// The substitution itself is the one the AES standard defines; holding it
// as a ROM computed at elaboration is this design's choice.
module aes_sbox #(
  parameter bit INVERSE = 1'b0
) (
  input  logic [7:0] in_byte,
  output logic [7:0] out_byte
);
  import aes_pkg::*;

  localparam sbox_table_t TABLE = INVERSE ? gen_inv_sbox() : gen_sbox();

  assign out_byte = TABLE[in_byte];

endmodule
