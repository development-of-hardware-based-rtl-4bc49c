// aes_mix_columns - MixColumns: each state column times a fixed GF(2^8) matrix.
//
// Each column (a0..a3, a0 in the top row) becomes
//   b0 = 2a0 ^ 3a1 ^  a2 ^  a3      b1 =  a0 ^ 2a1 ^ 3a2 ^  a3
//   b2 =  a0 ^  a1 ^ 2a2 ^ 3a3      b3 = 3a0 ^  a1 ^  a2 ^ 2a3
// with 2x = xtime(x) and 3x = xtime(x) ^ x (FIPS-197 coefficients).
// Column c is bytes 4c..4c+3, byte 0 in bits [127:120]. Combinational, no clock.
module aes_mix_columns
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  output aes_block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    aes_byte_t a0, a1, a2, a3;
    assign a0 = state_in[127-32*c      -: 8];
    assign a1 = state_in[127-32*c-8    -: 8];
    assign a2 = state_in[127-32*c-16   -: 8];
    assign a3 = state_in[127-32*c-24   -: 8];
    assign state_out[127-32*c    -: 8] = xtime(a0) ^ (xtime(a1) ^ a1) ^ a2 ^ a3;
    assign state_out[127-32*c-8  -: 8] = a0 ^ xtime(a1) ^ (xtime(a2) ^ a2) ^ a3;
    assign state_out[127-32*c-16 -: 8] = a0 ^ a1 ^ xtime(a2) ^ (xtime(a3) ^ a3);
    assign state_out[127-32*c-24 -: 8] = (xtime(a0) ^ a0) ^ a1 ^ a2 ^ xtime(a3);
  end
endmodule
