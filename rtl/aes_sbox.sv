// aes_sbox - AES byte substitution (SubBytes S-box) for one byte.
//
// The S-box is the multiplicative inverse in GF(2^8) (0 maps to 0) followed by
// the FIPS-197 affine map. It is a 256-entry ROM read combinationally; the ROM
// contents are computed at elaboration by aes_pkg::gen_sbox(), not pasted in.
// Interface: in_byte -> out_byte, purely combinational, no clock.
// The substitution itself is standard AES; holding it as a computed ROM is a
// choice of this design.
module aes_sbox
  import aes_pkg::*;
(
  input  aes_byte_t in_byte,
  output aes_byte_t out_byte
);
  assign out_byte = SBOX[in_byte];
endmodule
