// aes_decrypter - AES-128 block decryption, fully unrolled and combinational.
//
// The same forward key schedule as the encrypter is computed here and used
// in reverse: the ciphertext is XORed with round key 10, then rounds use round
// keys 9 down to 1 (InvShiftRows, InvSubBytes, AddRoundKey, InvMixColumns) and
// the final round (InvShiftRows, InvSubBytes, AddRoundKey) uses round key 0.
// Interface: ciphertext, key in; plaintext out; no clock, no state.
// The key must be the one used for encryption.
module aes_decrypter
  import aes_pkg::*;
(
  input  aes_block_t ciphertext,
  input  aes_block_t key,
  output aes_block_t plaintext
);
  aes_round_keys_t ik_sch;
  aes_block_t      state [NR+1];   // state[i] = state after i decryption rounds

  aes_key_expansion u_keys (.key(key), .round_keys(ik_sch));

  assign state[0] = ciphertext ^ ik_sch[NR];

  for (genvar i = 1; i <= NR; i++) begin : g_round
    aes_dec_round #(.FINAL(i == NR)) u_round (
      .state_in (state[i-1]),
      .round_key(ik_sch[NR-i]),
      .state_out(state[i])
    );
  end

  assign plaintext = state[NR];
endmodule
