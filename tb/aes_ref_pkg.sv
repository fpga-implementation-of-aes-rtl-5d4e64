// aes_ref_pkg: software reference model of AES used by the testbenches.
//
// Written independently of the RTL: field products use shift-and-add
// multiplication, the S-box is built by searching for each byte's
// multiplicative inverse, and the transformations work on a byte array in
// the FIPS-197 order (byte i is bits [127-8i -: 8] of a 128-bit block;
// byte 4c+r is row r, column c). Call build() once before use.
package aes_ref_pkg;

  typedef logic [7:0] bytes16_t [16];

  logic [7:0] SB  [256];
  logic [7:0] ISB [256];

  function automatic logic [7:0] gmul(logic [7:0] a, logic [7:0] b);
    logic [7:0] p = 0;
    for (int i = 0; i < 8; i++) begin
      if (b[0]) p ^= a;
      a = a[7] ? ((a << 1) ^ 8'h1b) : (a << 1);
      b >>= 1;
    end
    return p;
  endfunction

  function automatic void build();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv = 0, s;
      for (int y = 1; y < 256; y++) if (gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      s = 8'h63;
      for (int i = 0; i < 8; i++)
        s[i] ^= inv[i] ^ inv[(i+4)%8] ^ inv[(i+5)%8] ^ inv[(i+6)%8] ^ inv[(i+7)%8];
      SB[x] = s;
    end
    for (int x = 0; x < 256; x++) ISB[SB[x]] = 8'(x);
  endfunction

  function automatic bytes16_t to_bytes(logic [127:0] v);
    bytes16_t b;
    for (int i = 0; i < 16; i++) b[i] = v[127-8*i -: 8];
    return b;
  endfunction

  function automatic logic [127:0] from_bytes(bytes16_t b);
    logic [127:0] v;
    for (int i = 0; i < 16; i++) v[127-8*i -: 8] = b[i];
    return v;
  endfunction

  function automatic logic [127:0] sub_bytes(logic [127:0] v, bit inverse);
    bytes16_t b = to_bytes(v);
    for (int i = 0; i < 16; i++) b[i] = inverse ? ISB[b[i]] : SB[b[i]];
    return from_bytes(b);
  endfunction

  function automatic logic [127:0] shift_rows(logic [127:0] v, bit inverse);
    bytes16_t a = to_bytes(v), b;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inverse) b[4*((c+r)%4)+r] = a[4*c+r];
        else         b[4*c+r] = a[4*((c+r)%4)+r];
    return from_bytes(b);
  endfunction

  function automatic logic [127:0] mix_columns(logic [127:0] v, bit inverse);
    bytes16_t a = to_bytes(v), b;
    logic [7:0] m [4];
    m = inverse ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        b[4*c+r] = 0;
        for (int k = 0; k < 4; k++) b[4*c+r] ^= gmul(m[(k - r + 4) % 4], a[4*c+k]);
      end
    return from_bytes(b);
  endfunction

  // Round key j (0 .. nk+6) of a key of nk words held in the top of key.
  function automatic logic [127:0] round_key(logic [255:0] key, int nk, int j);
    logic [31:0] w [60];
    logic [31:0] t;
    logic [7:0]  rc = 8'h01;
    for (int i = 0; i < nk; i++) w[i] = key[255-32*i -: 32];
    for (int i = nk; i < 4*(nk+7); i++) begin
      t = w[i-1];
      if (i % nk == 0) begin
        t = {t[23:0], t[31:24]};
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]} ^ {rc, 24'h0};
        rc = gmul(rc, 8'h02);
      end else if (nk > 6 && i % nk == 4) begin
        t = {SB[t[31:24]], SB[t[23:16]], SB[t[15:8]], SB[t[7:0]]};
      end
      w[i] = w[i-nk] ^ t;
    end
    return {w[4*j], w[4*j+1], w[4*j+2], w[4*j+3]};
  endfunction

  function automatic logic [127:0] encrypt(logic [127:0] pt, logic [255:0] key, int nk);
    logic [127:0] s = pt ^ round_key(key, nk, 0);
    for (int r = 1; r <= nk + 6; r++) begin
      s = shift_rows(sub_bytes(s, 0), 0);
      if (r != nk + 6) s = mix_columns(s, 0);
      s ^= round_key(key, nk, r);
    end
    return s;
  endfunction

  function automatic logic [127:0] decrypt(logic [127:0] ct, logic [255:0] key, int nk);
    logic [127:0] s = ct ^ round_key(key, nk, nk + 6);
    for (int r = nk + 5; r >= 0; r--) begin
      s = sub_bytes(shift_rows(s, 1), 1) ^ round_key(key, nk, r);
      if (r != 0) s = mix_columns(s, 1);
    end
    return s;
  endfunction

  function automatic logic [127:0] rand128();
    return {$urandom, $urandom, $urandom, $urandom};
  endfunction

  function automatic logic [255:0] rand256();
    return {rand128(), rand128()};
  endfunction

endpackage
