// aes_pkg: types, constants and GF(2^8) helpers shared by the AES blocks.
//
// The 128-bit state is kept as a flat vector in the FIPS-197 byte order:
// byte 0 is bits [127:120] and bytes run column by column, so byte
// 4*c + r sits in row r, column c of the 4x4 state. The S-box tables are
// not stored as literals; gen_sbox() derives them at elaboration from the
// definition (multiplicative inverse modulo x^8+x^4+x^3+x+1, then the affine
// map with constant 0x63), walking the field with generator 3 and its
// inverse so that one loop of 255 steps fills the whole table.
//
// The definitions are the AES standard's; the generation method is this
// design's choice, made so that no table has to be written out.
package aes_pkg;

  typedef logic [127:0]     state_t;
  typedef logic [31:0]      word_t;
  typedef logic [255:0][7:0] sbox_table_t;

  // Rounds for a key of key_bits bits: 10, 12 or 14.
  function automatic int num_rounds(int key_bits);
    return key_bits / 32 + 6;
  endfunction

  // Multiplication by x ({02}) in GF(2^8).
  function automatic logic [7:0] xtime(logic [7:0] b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  function automatic logic [7:0] rotl8(logic [7:0] b, int n);
    return 8'((b << n) | (b >> (8 - n)));
  endfunction

  // Forward S-box table. p runs through all non-zero field elements as
  // powers of 3 while q runs through the matching inverses (powers of 3^-1).
  function automatic sbox_table_t gen_sbox();
    sbox_table_t t;
    logic [7:0] p, q, x;
    t = '0;
    p = 8'h01;
    q = 8'h01;
    for (int i = 0; i < 255; i++) begin
      p = p ^ xtime(p);                         // p *= 3
      q = q ^ {q[6:0], 1'b0};                   // q /= 3
      q = q ^ {q[5:0], 2'b00};
      q = q ^ {q[3:0], 4'b0000};
      if (q[7]) q = q ^ 8'h09;
      x = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4);
      t[p] = x ^ 8'h63;
    end
    t[0] = 8'h63;                               // 0 has no inverse
    return t;
  endfunction

  function automatic sbox_table_t gen_inv_sbox();
    sbox_table_t f, t;
    f = gen_sbox();
    t = '0;
    for (int i = 0; i < 256; i++) t[f[i]] = 8'(i);
    return t;
  endfunction

  // Round constant Rcon[j] = x^(j-1), j >= 1, in the top byte of a word.
  function automatic word_t rcon(int j);
    logic [7:0] r;
    r = 8'h01;
    for (int k = 1; k < j; k++) r = xtime(r);
    return {r, 24'h0};
  endfunction

endpackage
