// aes_enc_round - one AES encryption round.
//
// state_out = AddRoundKey(MixColumns(ShiftRows(SubBytes(state_in))), round_key),
// with MixColumns left out when FINAL = 1 (the tenth round). AddRoundKey is
// the XOR with the round key. The order of the four steps and the missing
// MixColumns in the last round are standard AES; the FINAL parameter that
// selects it is this design's way of sharing one module for both kinds of round.
// Combinational, no clock.
module aes_enc_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  aes_block_t state_in,
  input  aes_block_t round_key,
  output aes_block_t state_out
);
  aes_block_t s_box, s_row, m_col;

  aes_sub_bytes  u_sub (.state_in(state_in), .state_out(s_box));
  aes_shift_rows u_shf (.state_in(s_box),    .state_out(s_row));

  if (FINAL) begin : g_final
    assign m_col = s_row;
  end else begin : g_mix
    aes_mix_columns u_mix (.state_in(s_row), .state_out(m_col));
  end

  assign state_out = m_col ^ round_key;
endmodule
