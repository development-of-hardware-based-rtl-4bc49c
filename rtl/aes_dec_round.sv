// aes_dec_round - one AES decryption round (straight inverse cipher).
//
// state_out = InvMixColumns(AddRoundKey(InvSubBytes(InvShiftRows(state_in)), round_key)),
// with InvMixColumns left out when FINAL = 1, so the last round is InvShiftRows,
// InvSubBytes, AddRoundKey. The order follows the FIPS-197 inverse cipher; the
// FINAL parameter is this design's choice. Combinational, no clock.
module aes_dec_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  aes_block_t state_in,
  input  aes_block_t round_key,
  output aes_block_t state_out
);
  aes_block_t s_row, is_box, ark;

  aes_inv_shift_rows u_shf (.state_in(state_in), .state_out(s_row));
  aes_inv_sub_bytes  u_sub (.state_in(s_row),    .state_out(is_box));

  assign ark = is_box ^ round_key;

  if (FINAL) begin : g_final
    assign state_out = ark;
  end else begin : g_mix
    aes_inv_mix_columns u_mix (.state_in(ark), .state_out(state_out));
  end
endmodule
