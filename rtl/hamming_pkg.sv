// hamming_pkg - sizing helpers for the Hamming single-error-correcting code.
//
// For K data bits the code needs R check bits, the smallest R with
// 2^R >= K + R + 1: R check bits must name K + R error positions plus the
// "no error" case. K = 128 gives R = 8 and a 136-bit codeword.
// Codeword positions are numbered 1..N (N = K + R); position p is bit p-1 of the
// codeword vector. Check bits sit at positions 1, 2, 4, ..., 2^(R-1).
package hamming_pkg;

  function automatic int unsigned parity_bits(int unsigned k);
    int unsigned r = 1;
    while ((2 ** r) < (k + r + 1)) r++;
    return r;
  endfunction

  function automatic bit is_pow2(int unsigned p);
    return (p != 0) && ((p & (p - 1)) == 0);
  endfunction

endpackage
