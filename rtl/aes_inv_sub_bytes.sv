// aes_inv_sub_bytes - InvSubBytes: the inverse S-box applied to each state byte.
//
// Sixteen aes_inv_sbox instances side by side; byte 0 is bits [127:120].
// Combinational, no clock.
module aes_inv_sub_bytes
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  output aes_block_t state_out
);
  for (genvar i = 0; i < 16; i++) begin : g_byte
    aes_inv_sbox u_inv_sbox (
      .in_byte (state_in [127-8*i -: 8]),
      .out_byte(state_out[127-8*i -: 8])
    );
  end
endmodule
