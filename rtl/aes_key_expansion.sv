// aes_key_expansion: AES key schedule with round-key storage.
//
// A pulse on load copies the KEY_BITS-bit private key into the first
// Nk = KEY_BITS/32 words of a register array and clears ready. Then one new
// 32-bit word is produced per clock, following the standard schedule:
//   w[i] = w[i-Nk] ^ temp, where temp = w[i-1], replaced by
//   SubWord(RotWord(w[i-1])) ^ Rcon            when i mod Nk = 0,
//   SubWord(w[i-1])                            when Nk = 8 and i mod Nk = 4.
// A single word of four S-boxes is shared by every step, and Rcon is kept in
// a register that is doubled in GF(2^8) each time it is used. After
// 4*(Nr+1) - Nk steps (52 clocks for a 256-bit key) ready rises and stays
// high until the next load. The round key of round rd_round, words
// 4*rd_round .. 4*rd_round+3, is read combinationally on round_key. A load
// during expansion restarts it. The word-serial schedule and the register
// array are this design's choices; the schedule itself is the AES standard.
module aes_key_expansion #(
  parameter int KEY_BITS = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                load,
  input  logic [KEY_BITS-1:0] key,
  output logic                ready,
  input  logic [3:0]          rd_round,
  output aes_pkg::state_t     round_key
);
  import aes_pkg::*;

  localparam int NK = KEY_BITS / 32;
  localparam int NR = NK + 6;
  localparam int NW = 4 * (NR + 1);

  initial assert (KEY_BITS == 128 || KEY_BITS == 192 || KEY_BITS == 256)
    else $error("KEY_BITS must be 128, 192 or 256");

  word_t      w [NW];
  logic [5:0] idx;          // index of the word being produced
  logic [2:0] pos;          // idx mod NK
  logic [7:0] rc;           // current round constant byte
  logic       running;

  word_t prev, sub_in, sub_out, temp;

  assign prev   = w[idx - 6'd1];
  assign sub_in = (pos == 3'd0) ? {prev[23:0], prev[31:24]} : prev;   // RotWord

  for (genvar b = 0; b < 4; b++) begin : g_subword
    aes_sbox #(.INVERSE(1'b0)) u_sbox (.in_byte(sub_in[8*b +: 8]), .out_byte(sub_out[8*b +: 8]));
  end

  always_comb begin
    if (pos == 3'd0)                 temp = sub_out ^ {rc, 24'h0};
    else if (NK == 8 && pos == 3'd4) temp = sub_out;
    else                             temp = prev;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx     <= '0;
      pos     <= '0;
      rc      <= 8'h01;
      running <= 1'b0;
      ready   <= 1'b0;
      for (int i = 0; i < NW; i++) w[i] <= '0;
    end else if (load) begin
      for (int i = 0; i < NK; i++) w[i] <= key[KEY_BITS - 1 - 32*i -: 32];
      idx     <= 6'(NK);
      pos     <= '0;
      rc      <= 8'h01;
      running <= 1'b1;
      ready   <= 1'b0;
    end else if (running) begin
      w[idx] <= w[idx - 6'(NK)] ^ temp;
      if (pos == 3'd0) rc <= xtime(rc);
      pos <= (pos == 3'(NK - 1)) ? 3'd0 : pos + 3'd1;
      idx <= idx + 6'd1;
      if (idx == 6'(NW - 1)) begin
        running <= 1'b0;
        ready   <= 1'b1;
      end
    end
  end

  assign round_key = {w[4*rd_round], w[4*rd_round + 1], w[4*rd_round + 2], w[4*rd_round + 3]};

endmodule
