// aes_inv_shift_rows - InvShiftRows: row r of the state is rotated right by r bytes.
//
// Column-major state as in aes_shift_rows: output byte 4*c + r takes input
// byte 4*((c - r) mod 4) + r. Pure wiring; combinational, no clock.
module aes_inv_shift_rows
  import aes_pkg::*;
(
  input  aes_block_t state_in,
  output aes_block_t state_out
);
  for (genvar c = 0; c < 4; c++) begin : g_col
    for (genvar r = 0; r < 4; r++) begin : g_row
      assign state_out[127-8*(4*c+r) -: 8] = state_in[127-8*(4*((c-r+4)%4)+r) -: 8];
    end
  end
endmodule
