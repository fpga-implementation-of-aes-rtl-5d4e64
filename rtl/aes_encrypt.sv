// aes_encrypt: iterative AES encryption core, one round per clock.
//
// The datapath is 128 bits wide: SubBytes (16 S-boxes), ShiftRows,
// MixColumns and AddRoundKey all act on the whole state in the same clock.
// A multiplexer in front of the single AddRoundKey selects the plaintext
// (initial key addition), the MixColumns output (rounds 1 .. Nr-1) or the
// ShiftRows output (final round, which has no MixColumns). Round keys come
// from the core's own aes_key_expansion.
//
// Interface: pulse key_load with key to expand a new key; key_ready rises
// when the schedule is complete (52 clocks for AES-256). With key_ready
// high and busy low, a start pulse takes plaintext; busy is then high for
// Nr clocks (14 for AES-256) and done pulses for one clock with the result
// on ciphertext, which holds until the next start. start is ignored while
// busy or without a key, and key_load is ignored while busy. The one-round-
// per-clock schedule and this handshake are this design's choices; the
// round structure is the AES standard.
module aes_encrypt #(
  parameter int KEY_BITS = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                key_load,
  input  logic [KEY_BITS-1:0] key,
  output logic                key_ready,
  input  logic                start,
  input  aes_pkg::state_t     plaintext,
  output logic                busy,
  output logic                done,
  output aes_pkg::state_t     ciphertext
);
  import aes_pkg::*;

  localparam int NR = num_rounds(KEY_BITS);

  state_t     state, sb, sr, mc, ark_in, ark_out, rk;
  logic [3:0] round, rd_round;
  logic       accept;

  assign accept   = start && !busy && key_ready;
  assign rd_round = busy ? round : 4'd0;

  aes_key_expansion #(.KEY_BITS(KEY_BITS)) u_keys (
    .clk, .rst_n, .load(key_load && !busy), .key, .ready(key_ready),
    .rd_round, .round_key(rk)
  );

  aes_sub_bytes     u_sb  (.state_in(state), .state_out(sb));
  aes_shift_rows    u_sr  (.state_in(sb),    .state_out(sr));
  aes_mix_columns   u_mc  (.state_in(sr),    .state_out(mc));

  always_comb begin
    if (!busy)                    ark_in = plaintext;
    else if (round == 4'(NR))     ark_in = sr;
    else                          ark_in = mc;
  end

  aes_add_round_key u_ark (.state_in(ark_in), .round_key(rk), .state_out(ark_out));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= '0;
      round <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
    end else begin
      done <= 1'b0;
      if (accept) begin
        state <= ark_out;
        round <= 4'd1;
        busy  <= 1'b1;
      end else if (busy) begin
        state <= ark_out;
        if (round == 4'(NR)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          round <= round + 4'd1;
        end
      end
    end
  end

  assign ciphertext = state;

  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_round_range:   assert property (@(posedge clk) disable iff (!rst_n) busy |-> (round >= 4'd1 && round <= 4'(NR)));

endmodule
