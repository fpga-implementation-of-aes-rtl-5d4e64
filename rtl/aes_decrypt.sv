// aes_decrypt: iterative AES decryption core (inverse cipher), one round
// per clock.
//
// A start pulse adds the last round key (round Nr) to the ciphertext. Each
// following clock applies InvShiftRows, InvSubBytes, AddRoundKey with the
// round key of the current round (Nr-1 down to 0) and InvMixColumns; a
// multiplexer skips InvMixColumns in the last step (round key 0). The round
// keys come from the core's own aes_key_expansion and are read in reverse
// order, so a new key costs the full expansion (52 clocks for AES-256)
// before the first block.
//
// Interface and timing match aes_encrypt: key_load/key_ready for the key,
// start accepted when idle with a key ready, busy for Nr clocks, done
// pulses for one clock with the result on plaintext, held until the next
// start. The schedule and handshake are this design's choices; the round
// structure is the AES standard.
module aes_decrypt #(
  parameter int KEY_BITS = 256
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                key_load,
  input  logic [KEY_BITS-1:0] key,
  output logic                key_ready,
  input  logic                start,
  input  aes_pkg::state_t     ciphertext,
  output logic                busy,
  output logic                done,
  output aes_pkg::state_t     plaintext
);
  import aes_pkg::*;

  localparam int NR = num_rounds(KEY_BITS);

  state_t     state, isr, isb, ark_in, ark_out, imc, rk;
  logic [3:0] round, rd_round;
  logic       accept;

  assign accept   = start && !busy && key_ready;
  assign rd_round = busy ? round : 4'(NR);

  aes_key_expansion #(.KEY_BITS(KEY_BITS)) u_keys (
    .clk, .rst_n, .load(key_load && !busy), .key, .ready(key_ready),
    .rd_round, .round_key(rk)
  );

  aes_inv_shift_rows  u_isr (.state_in(state), .state_out(isr));
  aes_inv_sub_bytes   u_isb (.state_in(isr),   .state_out(isb));

  assign ark_in = busy ? isb : ciphertext;

  aes_add_round_key   u_ark (.state_in(ark_in), .round_key(rk), .state_out(ark_out));
  aes_inv_mix_columns u_imc (.state_in(ark_out), .state_out(imc));

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
        round <= 4'(NR - 1);
        busy  <= 1'b1;
      end else if (busy) begin
        if (round == 4'd0) begin
          state <= ark_out;
          busy  <= 1'b0;
          done  <= 1'b1;
        end else begin
          state <= imc;
          round <= round - 4'd1;
        end
      end
    end
  end

  assign plaintext = state;

  a_done_not_busy: assert property (@(posedge clk) disable iff (!rst_n) done |-> !busy);
  a_round_range:   assert property (@(posedge clk) disable iff (!rst_n) busy |-> round < 4'(NR));

endmodule
