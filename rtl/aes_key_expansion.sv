// aes_key_expansion - AES-128 key schedule, all eleven round keys at once.
//
// Words w[0..3] are the key (w[0] = key[127:96]). For i >= 4,
//   w[i] = w[i-4] ^ SubWord(RotWord(w[i-1])) ^ {Rcon(i/4), 24'h0}   if i mod 4 = 0
//   w[i] = w[i-4] ^ w[i-1]                                           otherwise
// RotWord turns [a0 a1 a2 a3] into [a1 a2 a3 a0]; SubWord applies the S-box
// ROM of aes_pkg to each byte (four S-boxes per round, forty in all);
// Rcon(j) = {02}^(j-1) in GF(2^8). round_keys[j] = {w[4j] .. w[4j+3]}, so
// round_keys[0] is the key itself. This is the FIPS-197 schedule, unrolled and
// combinational, no clock. It is written as one procedural loop rather than a
// chain of continuous assignments: the chained form makes Verilator duplicate
// the shared XOR terms of later rounds into an exponentially large C++ model.
module aes_key_expansion
  import aes_pkg::*;
(
  input  aes_block_t      key,
  output aes_round_keys_t round_keys
);
  always_comb begin
    aes_word_t w [NK];
    aes_word_t t;
    for (int k = 0; k < NK; k++) w[k] = key[127-32*k -: 32];
    round_keys[0] = key;
    for (int j = 1; j <= NR; j++) begin
      t = {w[NK-1][23:0], w[NK-1][31:24]};                       // RotWord
      t = {SBOX[t[31:24]], SBOX[t[23:16]], SBOX[t[15:8]], SBOX[t[7:0]]};  // SubWord
      w[0] = w[0] ^ t ^ {rcon(j), 24'h000000};
      w[1] = w[1] ^ w[0];
      w[2] = w[2] ^ w[1];
      w[3] = w[3] ^ w[2];
      round_keys[j] = {w[0], w[1], w[2], w[3]};
    end
  end
endmodule
