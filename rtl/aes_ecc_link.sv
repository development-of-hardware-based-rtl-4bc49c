// aes_ecc_link - AES-128 encryption with a Hamming(136,128) error-correcting
// layer: the transmit and receive ends of one protected link.
//
// Transmit side: tx_plaintext is encrypted with tx_key (aes_encrypter) and the
// 128-bit ciphertext is encoded with 8 even-parity check bits
// (hamming_encoder) into the 136-bit tx_codeword that goes onto the channel.
// Receive side: the 136-bit rx_codeword from the channel is checked and a
// single flipped bit corrected (hamming_decoder), and the corrected ciphertext
// is decrypted with rx_key (aes_decrypter) into rx_plaintext.
// The channel itself is outside: connect tx_codeword to rx_codeword through
// whatever medium is used. Both keys must hold the same value.
// Everything is combinational: outputs follow inputs after logic delay, with
// no clock, reset, handshake or state.
// The chain of four blocks, the sizes (128-bit block and key, 10 rounds,
// 136-bit codeword) and single-bit correction follow the described design;
// separate keys per side and the error flags are this design's choices.
module aes_ecc_link
  import aes_pkg::*;
(
  // transmit side
  input  aes_block_t   tx_plaintext,
  input  aes_block_t   tx_key,
  output aes_block_t   tx_ciphertext,
  output logic [135:0] tx_codeword,
  // receive side
  input  logic [135:0] rx_codeword,
  input  aes_block_t   rx_key,
  output aes_block_t   rx_ciphertext,
  output aes_block_t   rx_plaintext,
  output logic [7:0]   rx_syndrome,
  output logic         rx_err_detected,
  output logic         rx_err_corrected,
  output logic         rx_err_uncorrectable
);
  aes_encrypter u_enc (
    .plaintext (tx_plaintext),
    .key       (tx_key),
    .ciphertext(tx_ciphertext)
  );

  hamming_encoder #(.K(128), .R(8)) u_hamm_enc (
    .data_in (tx_ciphertext),
    .code_out(tx_codeword)
  );

  hamming_decoder #(.K(128), .R(8)) u_hamm_dec (
    .code_in          (rx_codeword),
    .data_out         (rx_ciphertext),
    .syndrome         (rx_syndrome),
    .err_detected     (rx_err_detected),
    .err_corrected    (rx_err_corrected),
    .err_uncorrectable(rx_err_uncorrectable)
  );

  aes_decrypter u_dec (
    .ciphertext(rx_ciphertext),
    .key       (rx_key),
    .plaintext (rx_plaintext)
  );
endmodule
