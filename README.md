# Hybrid AES-256 / SHA3-512 core with shared resources

This core does two jobs on one datapath. It encrypts or decrypts data with
AES-256, and it hashes data with SHA3-512 (Keccak-f[1600]). It does not use
two separate engines. Both algorithms share:

- one 1600-bit state register;
- one *unified XOR section* made of two XOR banks, N1 and N2;
- one integrated look-up table design, which serves both cipher directions
  and also the key schedule.

In AES mode the core processes four 128-bit blocks in parallel under one
256-bit key, giving 512 bits of output. In SHA-3 mode it absorbs one 576-bit
(72-byte) rate block per operation. After the final block it outputs the
512-bit digest. The result can also be shown on 16 LEDs, one 16-bit page at a
time.

## The three shared mechanisms

### Integrated LUT (`aes_itable`)

A conventional AES round runs SubBytes, ShiftRows, MixColumns and AddRoundKey
one after another. Here SubBytes and MixColumns become one table lookup per
state byte, as in a "T-table" implementation. Encryption and decryption
share a single 512-entry table. Address bit 8 selects the half:

| address    | substituted byte | 32-bit column word                      |
|------------|------------------|-----------------------------------------|
| `{0, a}`   | S(a)             | {02·S(a), S(a), S(a), 03·S(a)}          |
| `{1, a}`   | S⁻¹(a)           | {0e·S⁻¹(a), 09·S⁻¹(a), 0d·S⁻¹(a), 0b·S⁻¹(a)} |

The column word is the MixColumns contribution of a byte that sits in row 0.
A byte in row r contributes the same word rotated right by r bytes. One
output column of a round is therefore the XOR of four rotated table words
and one round-key word. The plain substituted byte is kept for two users:

- the last round, which has no MixColumns;
- the key schedule's SubWord.

The table is computed from the GF(2⁸) definition of the S-box when the ROM is
initialised. No constants are typed in. The read is asynchronous, so each
round takes one clock. A block-RAM mapping would need a registered read and
one more cycle per round.

### Decryption by the equivalent inverse cipher

The decryption round runs InvSubBytes, InvShiftRows, InvMixColumns and then
AddRoundKey. This order lets decryption use the same table-plus-XOR structure
as encryption. The cost is that round keys 1 to 13 must be passed through
InvMixColumns. The key schedule (`aes_key_schedule`) stores all 60 expanded
words and does this transformation on its read port (`rd_invmix`). ShiftRows
and InvShiftRows are merged into one permutation in `aes_shiftrows_unified`.
Rows 0 and 2 are wired the same way in both directions, so only rows 1 and 3
need multiplexers.

### Unified XOR section (`unified_xor`)

- **N1** is a bank of 5-input XORs. In AES mode it adds up one output column:
  four table words plus the round-key word. In SHA-3 mode it computes θ-1,
  the column parities C[x] = A[x,0] ⊕ … ⊕ A[x,4].
- **N2** is a bank of 2-input XORs. In AES mode it performs key whitening
  (block ⊕ first round key) and the AddRoundKey of the last round. In SHA-3
  mode it computes θ-2, D[x] = C[x−1] ⊕ ROT(C[x+1], 1).

Each bank is max(128·NBLK, 320) = 512 bits wide. The only cost of sharing
them is the operand multiplexers.

### Six-input-equation (SixIE) network (`keccak_sixie`)

The rest of the Keccak round is θ-3 (A ⊕ D), ρ, π and χ. ρ and π are pure
wiring, so these four steps collapse into one expression per output bit:

    B[X][Y]  = ROT(A[x][y] ^ D[x], r[x][y]),  X = y, Y = 2x + 3y mod 5
    A'[X][Y] = B[X][Y] ^ (~B[X+1][Y] & B[X+2][Y])

Each output bit depends on exactly three state bits and three D bits. That
is six inputs, which fit one 6-input FPGA LUT. ι then XORs the round
constant into lane (0,0). One Keccak round takes one clock.

## Operation and timing (`hybrid_top`)

| port | meaning |
|------|---------|
| `start` | starts an operation; sampled only when idle (`busy` = 0) |
| `mode` | `MODE_AES` (1) or `MODE_SHA3` (0) |
| `enc` | 1 encrypt, 0 decrypt |
| `din[575:0]` | AES: block b in `din[575-128b -: 128]`, `din[63:0]` unused. SHA-3: 72 message bytes, byte 0 in `din[575:568]` |
| `key[255:0]` | AES-256 key, byte 0 in the top byte |
| `sha_first` | first block of a message: clear the state before absorbing |
| `sha_last`, `sha_len` | final block: only `sha_len` (0..71) bytes are message; the block is padded with 0x06 … 0x80 |
| `done`, `dout[511:0]` | `done` pulses for one clock; `dout` then holds the four result blocks or the digest (byte 0 in `dout[511:504]`) |
| `btn_next`, `led`, `led_page` | LED paging of the last result |

An n-byte message takes ⌊n/72⌋ + 1 SHA-3 operations. When n is a multiple of
72, the last operation carries only padding (`sha_len` = 0).

Latency, counted from the clock that samples `start` to the `done` pulse:

- **AES:** 70 cycles. These are 1 accept, 52 key expansion, 1 handover, 1 whitening,
  14 rounds and 1 output. The key is expanded again on every
  start.
- **SHA-3:** 26 cycles per block. These are 1 absorb, 24 rounds and 1 output.

`led_display` captures each result. The button steps through 32 pages of
16 bits each, starting at page 0 (bits [511:496]). The button goes through a
two-flop synchroniser and an edge detector, and the page count wraps from 31
to 0.

Reset (`rst_n`) is asynchronous and active low. Assertions check that the
final-block length is at most 71, that key expansion runs only in its own
state, and that `done` is a single-cycle pulse.

## Where this RTL departs from the source design

- **Widths of N1 and N2.** The source describes them as 128 bits for AES and
  160 bits for SHA-3, processing half of the state at a time. Those widths do
  not match four blocks or 64-bit lanes. Here the banks are sized to do one
  full round per clock.
- **Digest size.** The source mentions both a 576-bit and a 512-bit SHA-3
  output. This core outputs the standard 512-bit digest.
- **Control and timing.** The controller, handshake, latencies and the
  multi-block SHA-3 interface are this design's own. The source gives
  none of them.
- **Table read.** The table is meant for block RAM. Here it is read
  asynchronously.
- **Top-level ports.** The wide data ports are top-level ports. The source's
  19-pin board build is not reproduced.
- **Size and power.** The register count is about 4.6k flip-flops: the state,
  the 60-word key store, the result and the LED buffer. It is not comparable
  with the reported FPGA utilisation, and no FPGA results are claimed.

## Files

- `rtl/hybrid_pkg.sv`: shared types, GF(2⁸) helpers, and the Keccak
  round-constant and rotation-offset generators.
- `rtl/aes_itable.sv`, `rtl/aes_shiftrows_unified.sv`,
  `rtl/aes_key_schedule.sv`: the AES section.
- `rtl/unified_xor.sv`, `rtl/keccak_sixie.sv`, `rtl/sha3_padding.sv`: the
  shared XOR banks and the SHA-3 section.
- `rtl/led_display.sv`, `rtl/hybrid_top.sv`: LED output, and the
  controller with the state register.
- `tb/ref_pkg.sv`: reference models, written independently of the RTL. It
  has byte-wise AES-256 following FIPS-197, with the textbook inverse cipher,
  and Keccak-f[1600] with the FIPS 202 constant tables.
- `tb/<module>_tb.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M`.

`hybrid_top_tb` runs at the default size (four blocks). It covers:

- the FIPS-197 AES-256 vector;
- encryption and decryption round trips, including the 64-byte text
  "K.JANSHI LAKSHMI" ×4 under the key "SRI VENKATESWARA UNIVERSITY, TPT";
- the SHA3-512 digests of "" and "abc";
- 71-, 72- and 100-byte messages checked against the reference sponge;
- a start while busy;
- all LED pages.

It also checks both latencies.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl \
        rtl/hybrid_pkg.sv tb/ref_pkg.sv tb/hybrid_top_tb.sv --top-module hybrid_top_tb
    ./obj_dir/Vhybrid_top_tb

For a block testbench, replace the last file and the top module with the
block's testbench, for example `tb/keccak_sixie_tb.sv` and
`--top-module keccak_sixie_tb`. The full top build takes about two minutes
of C++ compilation, because the 68 table instances are expanded. The
simulation itself runs in well under a second.

`NBLK` (1..4) sets how many AES blocks are processed in parallel. Fewer
blocks shrink the table count and the XOR banks. The unused blocks of
`din` and `dout` are then ignored or read as zero.
