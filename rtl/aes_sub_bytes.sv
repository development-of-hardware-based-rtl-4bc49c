// aes_sub_bytes - SubBytes: the S-box applied to each of the 16 state bytes.
//
// Sixteen aes_sbox instances side by side. Byte i of the output is S(byte i of
// the input); byte 0 is bits [127:120]. Combinational, no clock.
module aes_sub_bytes
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  output aes_block_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_sbox u_sbox (
      .in_byte (state_in [127-8*i -: 8]),
      .out_byte(state_out[127-8*i -: 8])
    );
  end
endmodule
