// aes_shift_rows - ShiftRows: row r of the 4x4 state is rotated left by r bytes.
//
// The state is column-major (row r, column c is byte 4*c + r, byte 0 in bits
// [127:120]), so output byte 4*c + r takes input byte 4*((c + r) mod 4) + r.
// Row 0 is unchanged. The permutation is pure wiring; combinational, no clock.
module aes_shift_rows
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  output aes_block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c+r)%4)+r) -: 8];
    end
  end
endmodule
