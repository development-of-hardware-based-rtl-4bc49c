// hamming_decoder - Hamming single-error-correcting decoder, 136 -> 128 bits.
//
// The syndrome is the XOR of the position numbers (1..N) of all set bits of
// code_in; for the layout of hamming_encoder it is zero for a valid codeword
// and equals the position of the flipped bit after a single error. A syndrome
// in 1..N flips that bit back (XOR with a one-hot mask); the data bits are
// then gathered from the non-power-of-two positions. A syndrome above N names
// no position: the word is passed on uncorrected and err_uncorrectable is set.
// Flags: err_detected (syndrome non-zero), err_corrected (a bit was flipped),
// err_uncorrectable (syndrome above N). A double error always sets
// err_detected but, unless its syndrome exceeds N, is mistaken for a single
// error and miscorrected - the plain Hamming code has no overall parity bit.
// Combinational, no clock. Correction by XOR follows the described design; the
// three flags and the syndrome output are this design's additions.
module hamming_decoder
  import hamming_pkg::*;
#(
  parameter int unsigned K = 128,
  parameter int unsigned R = parity_bits(K),
  localparam int unsigned N = K + R
) (
  input  logic [N-1:0] code_in,
  output logic [K-1:0] data_out,
  output logic [R-1:0] syndrome,
  output logic         err_detected,
  output logic         err_corrected,
  output logic         err_uncorrectable
);
  always_comb begin
    logic [R-1:0] syn;
    logic [N:1]   cw;
    int unsigned  j;
    syn = '0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (code_in[p-1]) syn ^= R'(p);
    end
    cw = code_in;
    if (syn != '0 && int'(syn) <= N) cw[syn] = ~cw[syn];
    data_out = '0;
    j = 0;
    for (int unsigned p = 1; p <= N; p++) begin
      if (!is_pow2(p)) begin
        data_out[j] = cw[p];
        j++;
      end
    end
    syndrome          = syn;
    err_detected      = (syn != '0);
    err_corrected     = (syn != '0) && (int'(syn) <= N);
    err_uncorrectable = (int'(syn) > N);
  end
endmodule
