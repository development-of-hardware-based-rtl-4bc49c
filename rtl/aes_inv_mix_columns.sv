// aes_inv_mix_columns - InvMixColumns: each column times the inverse matrix.
//
// Each column (a0..a3) becomes
//   b0 = e.a0 ^ b.a1 ^ d.a2 ^ 9.a3    b1 = 9.a0 ^ e.a1 ^ b.a2 ^ d.a3
//   b2 = d.a0 ^ 9.a1 ^ e.a2 ^ b.a3    b3 = b.a0 ^ d.a1 ^ 9.a2 ^ e.a3
// (hex coefficients {0e},{0b},{0d},{09}, FIPS-197), built from the doubled
// values 2a, 4a, 8a so each product is a few XORs. Combinational, no clock.
module aes_inv_mix_columns
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  output aes_block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_byte_t a   [4];
    aes_byte_t x2  [4];
    aes_byte_t x4  [4];
    aes_byte_t x8  [4];
    aes_byte_t m9  [4];
    aes_byte_t m11 [4];
    aes_byte_t m13 [4];
    aes_byte_t m14 [4];
    for (genvar r = 0; r < 4; r++) begin : g_mul
      assign a[r]   = state_in[127-32*c-8*r -: 8];
      assign x2[r]  = xtime(a[r]);
      assign x4[r]  = xtime(x2[r]);
      assign x8[r]  = xtime(x4[r]);
      assign m9[r]  = x8[r] ^ a[r];
      assign m11[r] = x8[r] ^ x2[r] ^ a[r];
      assign m13[r] = x8[r] ^ x4[r] ^ a[r];
      assign m14[r] = x8[r] ^ x4[r] ^ x2[r];
    end
    for (genvar r = 0; r < 4; r++) begin : g_out
      assign state_out[127-32*c-8*r -: 8] =
        m14[r] ^ m11[(r+1)%4] ^ m13[(r+2)%4] ^ m9[(r+3)%4];
    end
  end
endmodule
