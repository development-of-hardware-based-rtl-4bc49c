// aes_ref_pkg - behavioural reference model used by the testbenches.
//
// An independent, deliberately plain description of AES-128 and of the
// Hamming(136,128) code, written differently from the RTL so the two can be
// compared: the S-box is found by brute-force search for the GF(2^8) inverse
// plus the bitwise affine formula, MixColumns uses a general matrix product,
// the state is a 4x4 byte array, and the Hamming code walks explicit position
// lists. Not synthesizable in spirit; simulation only.
package aes_ref_pkg;

  typedef logic [7:0] b8_t;
  typedef b8_t st_t [4][4];  // [row][col]

  function automatic b8_t ref_mul(b8_t a, b8_t b);
    logic [15:0] p = '0;
    for (int i = 0; i < 8; i++) if (b[i]) p ^= 16'(a) << i;
    for (int i = 15; i >= 8; i--) if (p[i]) p ^= 16'h11b << (i - 8);
    return p[7:0];
  endfunction

  function automatic b8_t ref_inv(b8_t a);
    if (a == 0) return 8'h00;
    for (int b = 1; b < 256; b++) if (ref_mul(a, b8_t'(b)) == 8'h01) return b8_t'(b);
    return 8'h00;
  endfunction

  function automatic b8_t ref_sbox(b8_t a);
    b8_t x = ref_inv(a);
    b8_t c = 8'h63;
    b8_t s;
    for (int i = 0; i < 8; i++)
      s[i] = x[i] ^ x[(i+4)%8] ^ x[(i+5)%8] ^ x[(i+6)%8] ^ x[(i+7)%8] ^ c[i];
    return s;
  endfunction

  function automatic b8_t ref_inv_sbox(b8_t a);
    for (int x = 0; x < 256; x++) if (ref_sbox(b8_t'(x)) == a) return b8_t'(x);
    return 8'h00;
  endfunction

  function automatic st_t to_st(logic [127:0] v);
    st_t s;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) s[r][c] = v[127 - 8*(4*c + r) -: 8];
    return s;
  endfunction

  function automatic logic [127:0] from_st(st_t s);
    logic [127:0] v;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) v[127 - 8*(4*c + r) -: 8] = s[r][c];
    return v;
  endfunction

  function automatic logic [127:0] ref_sub_bytes(logic [127:0] v, bit inv);
    st_t s = to_st(v);
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++) s[r][c] = inv ? ref_inv_sbox(s[r][c]) : ref_sbox(s[r][c]);
    return from_st(s);
  endfunction

  function automatic logic [127:0] ref_shift_rows(logic [127:0] v, bit inv);
    st_t s = to_st(v);
    st_t t;
    for (int r = 0; r < 4; r++)
      for (int c = 0; c < 4; c++)
        if (inv) t[r][(c + r) % 4] = s[r][c];
        else     t[r][c] = s[r][(c + r) % 4];
    return from_st(t);
  endfunction

  function automatic logic [127:0] ref_mix_columns(logic [127:0] v, bit inv);
    b8_t m [4] = inv ? '{8'h0e, 8'h0b, 8'h0d, 8'h09} : '{8'h02, 8'h03, 8'h01, 8'h01};
    st_t s = to_st(v);
    st_t t;
    for (int c = 0; c < 4; c++)
      for (int r = 0; r < 4; r++) begin
        t[r][c] = 8'h00;
        for (int k = 0; k < 4; k++) t[r][c] ^= ref_mul(m[(k - r + 4) % 4], s[k][c]);
      end
    return from_st(t);
  endfunction

  function automatic logic [127:0] ref_round_key(logic [127:0] key, int round);
    logic [31:0] w [44];
    b8_t rc = 8'h01;
    for (int i = 0; i < 4; i++) w[i] = key[127 - 32*i -: 32];
    for (int i = 4; i < 44; i++) begin
      logic [31:0] t = w[i-1];
      if (i % 4 == 0) begin
        t = {t[23:0], t[31:24]};
        t = {ref_sbox(t[31:24]), ref_sbox(t[23:16]), ref_sbox(t[15:8]), ref_sbox(t[7:0])};
        t[31:24] ^= rc;
        rc = ref_mul(rc, 8'h02);
      end
      w[i] = w[i-4] ^ t;
    end
    return {w[4*round], w[4*round+1], w[4*round+2], w[4*round+3]};
  endfunction

  function automatic logic [127:0] ref_enc_round(logic [127:0] s, logic [127:0] rk, bit final_round);
    s = ref_shift_rows(ref_sub_bytes(s, 0), 0);
    if (!final_round) s = ref_mix_columns(s, 0);
    return s ^ rk;
  endfunction

  function automatic logic [127:0] ref_dec_round(logic [127:0] s, logic [127:0] rk, bit final_round);
    s = ref_sub_bytes(ref_shift_rows(s, 1), 1) ^ rk;
    if (!final_round) s = ref_mix_columns(s, 1);
    return s;
  endfunction

  function automatic logic [127:0] ref_encrypt(logic [127:0] pt, logic [127:0] key);
    logic [127:0] s = pt ^ ref_round_key(key, 0);
    for (int r = 1; r <= 10; r++) s = ref_enc_round(s, ref_round_key(key, r), r == 10);
    return s;
  endfunction

  function automatic logic [127:0] ref_decrypt(logic [127:0] ct, logic [127:0] key);
    logic [127:0] s = ct ^ ref_round_key(key, 10);
    for (int r = 9; r >= 0; r--) s = ref_dec_round(s, ref_round_key(key, r), r == 0);
    return s;
  endfunction

  // Hamming(136,128): positions 1..136, check bits at powers of two, even parity.
  function automatic logic [135:0] ref_hamming_encode(logic [127:0] d);
    logic [135:0] cw = '0;
    int j = 0;
    for (int p = 1; p <= 136; p++)
      if (p != 1 && p != 2 && p != 4 && p != 8 && p != 16 && p != 32 && p != 64 && p != 128) begin
        cw[p-1] = d[j];
        j++;
      end
    for (int k = 0; k < 8; k++) begin
      logic par = 1'b0;
      for (int p = 1; p <= 136; p++) if (p[k]) par ^= cw[p-1];
      cw[(1 << k) - 1] = par;
    end
    return cw;
  endfunction

endpackage
