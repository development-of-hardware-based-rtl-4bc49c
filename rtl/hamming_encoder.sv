// hamming_encoder - Hamming single-error-correcting encoder, 128 -> 136 bits.
//
// Codeword positions are numbered 1..N (N = K + R); position p is bit p-1 of
// code_out. The R check bits sit at the power-of-two positions 1, 2, 4, ...,
// 2^(R-1); the K data bits fill the remaining positions in order, data bit 0 at
// position 3. Check bit 2^k is the even parity of every other position whose
// number has bit k set, so the XOR of the numbers of all set positions of a
// valid codeword is zero. With K = 128, R = 8 the data bits end in positions
// 129..136, so the codeword's top byte equals the data's top byte.
// R is the smallest value with 2^R >= K + R + 1. Combinational, no clock.
// Code size, even parity and bit placement follow the described design (they
// reproduce its worked example); the port names are this design's.
module hamming_encoder
  import hamming_pkg::*;
#(
  parameter int unsigned K = 128,
  parameter int unsigned R = parity_bits(K),
  localparam int unsigned N = K + R
) (
  input  logic [K-1:0] data_in,
  output logic [N-1:0] code_out
);
  always_comb begin
    logic [N:1] cw;
    int unsigned j;
    cw = '0;
    j  = 0;
    // scatter the data bits over the non-power-of-two positions
    for (int unsigned p = 1; p <= N; p++) begin
      if (!is_pow2(p)) begin
        cw[p] = data_in[j];
        j++;
      end
    end
    // check bit at position 2^k covers every position with bit k set
    for (int unsigned k = 0; k < R; k++) begin
      logic par;
      par = 1'b0;
      for (int unsigned p = 1; p <= N; p++) begin
        if (((p >> k) & 1) == 1) par ^= cw[p];
      end
      cw[1 << k] = par;
    end
    code_out = cw;
  end
endmodule
