# AES-128 with a Hamming error-correcting layer

AES protects a message from being read. It does nothing against a noisy
channel: one flipped ciphertext bit corrupts the whole decrypted 128-bit block.
This design adds a Hamming single-error-correcting code around the cipher.
The transmitter encrypts a 128-bit block with AES-128 and then appends 8 check
bits to the 128-bit ciphertext, giving a 136-bit codeword. The receiver finds
and flips back any single wrong bit of those 136. It then decrypts the repaired
ciphertext.

```
 tx_plaintext ─► aes_encrypter ─► hamming_encoder ─► tx_codeword ══ channel ══► rx_codeword
 tx_key ───────►   (10 rounds)     (128 → 136 bits)                                 │
                                                                                     ▼
 rx_plaintext ◄─ aes_decrypter ◄─ hamming_decoder ◄──────────────────────────────────┘
 rx_key ───────►   (10 rounds)     (136 → 128 bits, corrects 1 bit, flags errors)
```

The top module, `aes_ecc_link`, contains both ends of the link. The channel
between `tx_codeword` and `rx_codeword` is left outside the design: connect the
two ports through the real medium, or through a model of it as the testbench
does.

The whole design is **combinational**. It has no clock, reset, handshake or
register. Each output follows its inputs after logic delay only. Both AES
blocks are fully unrolled: ten round instances in a chain. The encrypter and
the decrypter each hold their own copy of the key schedule. This gives one block per evaluation at the cost of a
lot of logic. To run it at a clock rate, register the ports or cut the chain
into pipeline stages; see "Changing it" below.

## The error-correcting code

This is the part that needs the most care, because the bit positions must
match between the two ends.

With K data bits, a Hamming code needs R check bits, where R is the smallest
value with 2^R ≥ K + R + 1. The R-bit syndrome must be able to name any of the
K + R bit positions, and also "no error". For K = 128 this gives R = 8 and a
136-bit codeword.

**Bit layout.** Number the codeword positions 1 to 136. Position p is bit
`p-1` of the 136-bit vector, so position 1 is the least significant bit.

- The check bits sit at the power-of-two positions 1, 2, 4, 8, 16, 32, 64
  and 128.
- The 128 data bits fill the remaining positions in order, from the bottom.
  Data bit 0 goes to position 3, data bit 1 to position 5, and so on.
- The highest data bits, 120 to 127, land in positions 129 to 136. The top
  byte of the codeword is therefore the top byte of the ciphertext.

**Parity.** The check bit at position 2^k is the even parity of every other
position whose number has bit k set. This makes the XOR of the position
numbers of all 1-bits in a valid codeword equal to zero.

**Decoding.** The decoder XORs together the position numbers of all 1-bits it
receives. The result is the syndrome.

- If one bit has flipped, the syndrome is that bit's position. The decoder
  inverts the bit (XOR with a one-hot mask) and then gathers the data bits.
- If the syndrome is 137 to 255, it names no position. The word is passed on
  unchanged.

| outcome | `syndrome` | `err_detected` | `err_corrected` | `err_uncorrectable` |
|---|---|---|---|---|
| no error | 0 | 0 | 0 | 0 |
| one bit flipped (data or check bit) | its position, 1..136 | 1 | 1 | 0 |
| two bits flipped, positions a and b | a XOR b | 1 | 1 if a XOR b ≤ 136 | 1 if a XOR b > 136 |

Two flipped bits always give a non-zero syndrome, so they are always noticed.
But this is a plain Hamming code with no overall parity bit, so the decoder
cannot tell two errors from one. Most double errors are "corrected" at a third
position, which leaves the ciphertext wrong in three bits. To tell single from
double errors reliably, you would need one more overall parity bit (a 137-bit
SECDED code); this design does not have it.

Worked example:

| ciphertext (128 bits) | codeword (136 bits) |
|---|---|
| `69c4e0d86a7b0430d8cdb78070b4c55a` | `6962706c353d82186cb36de01c9698d5db` |

## The AES datapath

The AES blocks are standard AES-128 as defined in FIPS-197: a 128-bit block,
a 128-bit key and 10 rounds.

**Byte order.** Byte 0 of every 128-bit value is bits [127:120], the leftmost
two hex digits. The state is filled column by column: row r, column c is
byte 4c + r. `aes_pkg` holds the types and the GF(2^8) helpers.

**Encryption** (`aes_encrypter`):

1. XOR the plaintext with round key 0, which is the key itself.
2. Run nine rounds of SubBytes, ShiftRows, MixColumns and AddRoundKey.
3. Run a final round without MixColumns.

`aes_enc_round` is one round. Its `FINAL` parameter drops MixColumns.

**Decryption** (`aes_decrypter`) uses the straight inverse cipher:

1. XOR the ciphertext with round key 10.
2. Run nine rounds of InvShiftRows, InvSubBytes, AddRoundKey and
   InvMixColumns, using round keys 9 down to 1.
3. Run a final round of InvShiftRows, InvSubBytes and AddRoundKey with round
   key 0.

`aes_dec_round` is one round. Its `FINAL` parameter drops InvMixColumns.

**Key schedule.** `aes_key_expansion` produces all eleven round keys at once
from RotWord, SubWord and Rcon. It has four S-boxes per round. The round
constant is computed by repeated doubling in GF(2^8), not looked up in a table.

**S-boxes.** `aes_sbox` and `aes_inv_sbox` are 256-entry ROMs. `aes_pkg`
computes their contents at elaboration time; no table is typed into the
source. The computation steps through GF(2^8) with generator {03}. It keeps
p = {03}^i and q = {03}^-i in step, so q is always the inverse of p. The affine
map S(p) = q ⊕ rotl(q,1) ⊕ rotl(q,2) ⊕ rotl(q,3) ⊕ rotl(q,4) ⊕ 63h then gives
each entry, and S(0) = 63h. The inverse table is the forward table turned
around.

**MixColumns.** It uses multiplication by {02} (`xtime`) and {03}. The inverse
builds its {09}, {0b}, {0d} and {0e} multiples from the doubled values 2a, 4a
and 8a.

**Worked example.** Plaintext `00112233445566778899aabbccddeeff` with key
`000102030405060708090a0b0c0d0e0f` encrypts to
`69c4e0d86a7b0430d8cdb78070b4c55a`. Decrypting that ciphertext with the same
key gives the plaintext back.

## Module list

| module | role |
|---|---|
| `aes_ecc_link` | top: encrypter → Hamming encoder on the transmit side; Hamming decoder → decrypter on the receive side |
| `aes_encrypter`, `aes_decrypter` | AES-128 cipher and inverse cipher, unrolled |
| `aes_enc_round`, `aes_dec_round` | one round each, with a `FINAL` parameter |
| `aes_key_expansion` | eleven round keys |
| `aes_sub_bytes`, `aes_inv_sub_bytes` | 16 S-boxes / inverse S-boxes |
| `aes_sbox`, `aes_inv_sbox` | one-byte S-box ROMs |
| `aes_shift_rows`, `aes_inv_shift_rows` | row rotations (wiring) |
| `aes_mix_columns`, `aes_inv_mix_columns` | column mixing in GF(2^8) |
| `hamming_encoder`, `hamming_decoder` | Hamming SEC code; parameters `K` (data bits, default 128) and `R` (check bits, derived from `K`) |
| `aes_pkg`, `hamming_pkg` | shared types, constants and functions |

The Hamming blocks work for any `K`. For example, `K = 4` gives the classic
(7,4) code, which the encoder testbench also checks.

**Top-level ports** (all of them combinational):

- Transmit side:
  - inputs `tx_plaintext[127:0]`, `tx_key[127:0]`
  - outputs `tx_ciphertext[127:0]`, `tx_codeword[135:0]`
- Receive side:
  - inputs `rx_codeword[135:0]`, `rx_key[127:0]`
  - outputs `rx_ciphertext[127:0]` (after correction), `rx_plaintext[127:0]`,
    `rx_syndrome[7:0]`, `rx_err_detected`, `rx_err_corrected`,
    `rx_err_uncorrectable`

Both sides share one secret, so `tx_key` and `rx_key` must carry the same
value. They are separate ports because the two ends of a link are normally
separate chips.

## Where this design makes its own choices

The published design fixes these points:

- the chain of the four blocks
- AES-128 with 10 rounds, and the round steps
- the omission of MixColumns from the last round
- the 136-bit codeword with 8 even-parity check bits
- correction of one bit by inverting it
- the worked examples above

The bit placement of the Hamming code was worked out from the published
encoder example, which it reproduces exactly.

These are this design's own choices:

- **Purely combinational structure.** No clock or register is described.
  The published signal list shows every internal value as a net, one per
  round.
- **The S-box and key schedule internals** are taken from FIPS-197.
- **The error flags.** `syndrome`, `err_detected`, `err_corrected` and
  `err_uncorrectable` are additions. Only "detects and corrects" is described.
- **No reset input on the Hamming blocks.** The published blocks show an
  unused `reset` input. These blocks hold no state, so it is left out.
- **Separate `tx_key` and `rx_key` ports.**

Not built:

- AES-192 and AES-256 (12 and 14 rounds). They are mentioned only as options
  and future work.
- Multi-bit error correction.
- The transmitter and receiver, which are just the message source and sink.
- The channel.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. Each one
compares the module with a reference model and prints
`TB_RESULT checks=N failures=M`. The reference model is `tb/aes_ref_pkg.sv`,
a separate behavioural AES and Hamming model written in a different way from
the RTL:

- its S-box comes from a brute-force search for the GF(2^8) inverse;
- MixColumns is a general matrix product;
- the Hamming code walks explicit position lists.

The testbenches also check known values:

- the FIPS-197 Appendix B and C.1 vectors, including intermediate round
  states;
- the worked examples above.

To run one testbench with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/aes_pkg.sv rtl/hamming_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_ecc_link.sv \
    --top-module tb_aes_ecc_link -Mdir obj_link
./obj_link/Vtb_aes_ecc_link
```

Verilator finds the other modules through `-Irtl` (each file is named after
its module).

`tb_aes_ecc_link` is the end-to-end test. It runs at the design's full size,
since the top has no parameters. It passes 64 blocks through the link and a
modelled channel, which flips:

- no bit;
- one data bit;
- one check bit;
- two bits;
- two bits whose syndrome lies outside the codeword.

It checks the ciphertext, the codeword, the flags and the recovered plaintext
for each block. It fails if any of these five cases never occurred.
`tb_hamming_decoder` flips every one of the 136 positions in turn.

The unrolled AES produces a large C++ model. Expect the C++ compile of the
encrypter, decrypter and top testbenches to take a minute or more.

## Changing it

- **Throughput and timing.** Ten rounds and a key schedule in one
  combinational path are slow in silicon. To pipeline, put registers between
  the `g_round` instances in `aes_encrypter` and `aes_decrypter`, and delay the
  round keys to match. To save area instead, build a one-round iterative core
  that reuses a single `aes_enc_round` for ten cycles. Either way the error
  layer is unaffected.
- **Shared key schedule.** Both AES blocks compute the schedule themselves. If
  one chip holds both ends, the round keys could be computed once.
- **A different code size.** Set `K` on the Hamming blocks. `R` follows
  automatically.
- **SECDED.** Add one overall parity bit to the codeword. Then tell a single
  error (syndrome ≠ 0, overall parity wrong) from a double error
  (syndrome ≠ 0, overall parity right), and suppress correction in the second
  case.
