// aes_inv_sbox - AES inverse byte substitution (InvSubBytes S-box) for one byte.
//
// Inverse of aes_sbox: the inverse affine map followed by the GF(2^8) inverse.
// Held as a 256-entry ROM whose contents aes_pkg::gen_inv_sbox() derives at
// elaboration by inverting the forward table.
// Interface: in_byte -> out_byte, purely combinational, no clock.
module aes_inv_sbox
  import aes_pkg::*;
(
  input  aes_byte_t in_byte,
  output aes_byte_t out_byte
);
  assign out_byte = INV_SBOX[in_byte];
endmodule
