// aes_encrypter - AES-128 block encryption, fully unrolled and combinational.
//
// The key schedule produces round keys k_sch[0..10]. The plaintext is XORed
// with k_sch[0], then passes nine full rounds (SubBytes, ShiftRows, MixColumns,
// AddRoundKey) and a final round without MixColumns. The ten rounds are ten
// aes_enc_round instances in a chain, so ciphertext follows plaintext and key
// after combinational delay only; there is no clock, no handshake and no state.
// Interface: plaintext, key in; ciphertext out; byte 0 of each is bits [127:120].
// The algorithm, the 128-bit key with 10 rounds and the port names follow the
// described design; building it as one unrolled combinational chain is how that
// design's signal list (all nets, one per round) reads.
module aes_encrypter
  import aes_pkg::*;
(
  input  aes_block_t plaintext,
  input  aes_block_t key,
  output aes_block_t ciphertext
);
  aes_round_keys_t k_sch;
  aes_block_t      state [NR+1];   // state[r] = state after round r

  aes_key_expansion u_keys (.key(key), .round_keys(k_sch));

  assign state[0] = plaintext ^ k_sch[0];

  for (genvar r = 1; r <= NR; r++) begin : g_round
    aes_enc_round #(.FINAL(r == NR)) u_round (
      .state_in (state[r-1]),
      .round_key(k_sch[r]),
      .state_out(state[r])
    );
  end

  assign ciphertext = state[NR];
endmodule
