// aes_pkg - shared types, constants and GF(2^8) helpers for the AES-128 datapath.
//
// The cipher is AES with a 128-bit key (Nk = 4 words) and 10 rounds, as in FIPS-197.
// A 128-bit block is held MSB-first: byte 0 is bits [127:120], byte 15 is bits [7:0].
// The state is filled column by column, so state row r, column c is byte 4*c + r.
//
// The S-box and its inverse are not pasted in as tables. gen_sbox() builds the
// forward table at elaboration time by walking the multiplicative group of
// GF(2^8) with the generator {03}: p runs over {03}^i while q runs over the
// inverse {03}^-i, so q = p^-1 at every step, and the affine map
//   s = q ^ rotl(q,1) ^ rotl(q,2) ^ rotl(q,3) ^ rotl(q,4) ^ 8'h63
// gives S(p). Entry 0 (which has no inverse) is 8'h63. gen_inv_sbox() inverts
// that table. Both are constants, so a synthesizer turns each lookup into a ROM.
package aes_pkg;

  localparam int unsigned NK = 4;   // 32-bit words in the key (128-bit key)
  localparam int unsigned NR = 10;  // rounds for a 128-bit key

  typedef logic [7:0]   aes_byte_t;
  typedef logic [31:0]  aes_word_t;
  typedef logic [127:0] aes_block_t;
  typedef aes_block_t [NR:0] aes_round_keys_t;  // index = round number
  typedef aes_byte_t [255:0] aes_table_t;

  // Byte i (0 = leftmost) of a block.
  function automatic aes_byte_t get_byte(aes_block_t b, int unsigned i);
    return b[127-8*i -: 8];
  endfunction

  // Multiply by {02} modulo x^8 + x^4 + x^3 + x + 1.
  function automatic aes_byte_t xtime(aes_byte_t b);
    return {b[6:0], 1'b0} ^ (b[7] ? 8'h1b : 8'h00);
  endfunction

  // General GF(2^8) product by shift-and-add.
  function automatic aes_byte_t gf_mul(aes_byte_t a, aes_byte_t b);
    aes_byte_t acc = 8'h00;
    aes_byte_t x   = a;
    for (int i = 0; i < 8; i++) begin
      if (b[i]) acc ^= x;
      x = xtime(x);
    end
    return acc;
  endfunction

  function automatic aes_byte_t rotl8(aes_byte_t b, int unsigned n);
    return aes_byte_t'((b << n) | (b >> (8 - n)));
  endfunction

  function automatic aes_table_t gen_sbox();
    aes_table_t t;
    aes_byte_t  p = 8'h01;
    aes_byte_t  q = 8'h01;
    t = '0;
    for (int i = 0; i < 255; i++) begin
      p = p ^ xtime(p);                         // p *= {03}
      q = q ^ aes_byte_t'(q << 1);              // q /= {03}
      q = q ^ aes_byte_t'(q << 2);
      q = q ^ aes_byte_t'(q << 4);
      if (q[7]) q = q ^ 8'h09;
      t[p] = q ^ rotl8(q, 1) ^ rotl8(q, 2) ^ rotl8(q, 3) ^ rotl8(q, 4) ^ 8'h63;
    end
    t[0] = 8'h63;
    return t;
  endfunction

  function automatic aes_table_t gen_inv_sbox();
    aes_table_t f = gen_sbox();
    aes_table_t t;
    t = '0;
    for (int i = 0; i < 256; i++) t[f[i]] = aes_byte_t'(i);
    return t;
  endfunction

  localparam aes_table_t SBOX     = gen_sbox();
  localparam aes_table_t INV_SBOX = gen_inv_sbox();

  // Round constant byte for round i (1..10): {02}^(i-1).
  function automatic aes_byte_t rcon(int unsigned i);
    aes_byte_t r = 8'h01;
    for (int unsigned j = 1; j < i; j++) r = xtime(r);
    return r;
  endfunction

endpackage
