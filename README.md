# Byte-serial AES-128 crypto processor

This is a small-area AES-128 processor. Its data path is one byte wide. The
128-bit block and the 128-bit key sit in two register banks, the
**State-Register** and the **Key-Register**. One byte per clock cycle passes
between them through:

- a single S-box, shared by the cipher rounds, the key expansion and (in
  inverse mode) the decryption rounds;
- an 8-bit MixColumns unit that takes one byte in and gives one byte out per
  cycle;
- the AddRoundKey XOR.

ShiftRows has no logic of its own. It is a one-cycle reordering inside the
State-Register. Each register bank, the MixColumns registers and the
round-constant register has its own clock gate. Their clocks run only in the
cycles where they change, so the State-Register and MixColumns clocks are off
for the whole of each key-expansion period.

Around the cipher cores sits a unit for the five standard block-cipher modes
(ECB, CBC, CFB, OFB, CTR). The top level `AES_TOP_FINAL` encrypts each block
it is given and then decrypts the result again. That second result must
equal the input, so the host can check the processor as it works.

The architecture follows a published design: an 8-bit datapath, two register
banks, ShiftRows inside the State-Register, a shared S-box, an 8-bit
MixColumns with four internal registers, and clock gating on the State,
MixColumns, Key and RCON registers. That publication names these parts but
does not give their insides. The schedules, the inner structure of each unit
and the decryption side are this design's own, and are described below.

## How one block moves through the encryption core

`aes_enc_core` is built around **byte passes**. In a pass, the
State-Register shifts once per cycle. Byte `s[0]` leaves, goes through the
byte logic, and comes back in at `s[15]`. After 16 shifts every byte has been
processed once and is back in its place. Bytes are numbered as in FIPS-197:
byte `i` of the block is bits `[127-8i -: 8]`, and it sits at row `i%4`,
column `i/4`.

| phase | cycles | what happens |
|---|---|---|
| LOAD | 1 | block into the State-Register, key into the Key-Register, rcon = 01 (this is the `start` cycle) |
| SB | 16 | `s <= SubBytes(s)`; in round 1 only, `s <= SubBytes(s ^ K0)`, with the Key-Register rotating to supply K0 |
| SR | 1 | ShiftRows: the State-Register reloads a permutation of itself |
| KE | 16 | the Key-Register turns K(r-1) into K(r) using the shared S-box; the State and MixColumns clocks are off |
| MC | 20 | rounds 1–9 only: bytes stream through MixColumns, and each mixed byte goes straight through AddRoundKey with K(r) back into the register |
| ARK | 16 | round 10 only: `s <= s ^ K10` |

SB, SR and KE run in every round; MC runs in rounds 1–9 and ARK only in
round 10. `done` is high 527 cycles after the `start` cycle, counting that
cycle as 1:

    1 + 10·(16+1+16) + 9·20 + 16 = 527

Key expansion gets a period of its own, and is not overlapped with the
MixColumns pass. This keeps the shared S-box free for the key schedule and
lets the state clocks stop completely while it runs.

`tb_aes_round_trace` follows the FIPS-197 Appendix B example through round 1
inside the core. It checks these values:

| point in round 1 | value |
|---|---|
| after SubBytes | `d42711ae…` |
| after ShiftRows | `d4bf5d30…` |
| round key 1 | `a0fafe17…` |
| MixColumns output stream | `046681e5…` |
| after AddRoundKey | `a49c7ff2…` |

## The 8-bit MixColumns unit (`aes_mixcol8`)

MixColumns needs all four bytes of a column before it can produce any output
byte. Even so, this unit takes one byte in and gives one byte out every cycle
with only four byte registers, `r0..r3`. The registers form a queue:

- **Normal cycle:** `dout = r0`, the queue moves up by one, and `din` enters
  at `r3`.
- **Last byte of a column** (`last = 1`): `r1..r3` hold `a0..a2` and `din` is
  `a3`. The whole column is now known. All four registers are loaded with the
  mixed bytes `b0..b3` instead of moving.

Over the next four cycles `b0..b3` leave on `dout`, while the next column's
bytes fill the queue behind them. The queue always holds exactly four bytes:
the outputs still pending plus the inputs already received.

Output byte `b_i` appears exactly four cycles after input byte `a_i`. So a
16-byte MixColumns pass takes 20 shifts of the State-Register. The first four
bytes written back are discarded by the later shifts.

With `INVERSE=1` the same unit computes InvMixColumns, using coefficients
`0e 0b 0d 09` instead of `02 03 01 01`.

## Key-Register and on-the-fly key expansion (`aes_key_reg`, `aes_rcon`)

The Key-Register holds one round key and computes the next one a byte at a
time, with the same kind of byte shifting as the State-Register.

**Forward step (`KEY_EXP`).** Step `j` (0 to 15) takes old byte `k_j` from
position 0 and writes new byte `k'_j` into position 15:

- for `j < 4`: `k'_j = k_j ^ S(RotWord(w3))_j ^ (j==0 ? rcon : 0)`;
- for `j >= 4`: `k'_j = k_j ^ k'_{j-4}`, where `k'_{j-4}` is always at
  position 12.

The S-box input is position 13 for `j = 0..2` and position 9 for `j = 3`.

**Rotation (`KEY_ROT`).** Sixteen rotations stream the round key onto `kout`
for AddRoundKey and leave the register as it was.

**Inverse step (`KEY_IEXP`).** This step goes from K(r+1) back to K(r). It
shifts the other way and works from byte 15 down to byte 0:

- for `j >= 4`: `k_j = k'_j ^ k'_{j-4}`, read from positions 15 and 11;
- the first word then uses the freshly recovered `w3` through the S-box, read
  from position 12, or position 8 for `j = 3`.

**Round constant.** `aes_rcon` holds rcon. It steps forward by
multiplication by x (01, 02, …, 80, 1b, 36) or back by division by x, which
the decryption schedule needs.

## Shared S-box (`aes_sbox`)

One combinational unit gives both SubBytes and InvSubBytes, sharing the
GF(2^8) inverter between them:

    SubBytes(x)    = affine(x^254)
    InvSubBytes(x) = (inv_affine(x))^254

Only the two affine maps are separate; a mux picks between them. The encryption core uses the unit
in two ways: in state passes its input is `s[0]` (or `s[0] ^ key byte`); in
key-expansion periods its input comes from the Key-Register. The decryption
core uses it in inverse mode for the state and in forward mode for its key
schedule.

## Decryption core (`aes_dec_core`)

The decryption core mirrors the encryption core. Its MixColumns unit is set
to `INVERSE=1`, and the State-Register uses its InvShiftRows permutation.

Decryption needs the round keys in reverse order. The core therefore first
runs ten forward expansions, taking 160 cycles, to reach K10. After that it
steps back one round key per round with the inverse expansion. Schedule:

| phase | cycles | what happens |
|---|---|---|
| LOAD | 1 | ciphertext, key, rcon = 01 |
| KF | 160 | ten forward key expansions, K0 → K10 |
| ARK | 16 | `s <= s ^ K10` |
| ISR | 1 | InvShiftRows; rcon steps back |
| IKE | 16 | K(r+1) → K(r); state clocks off |
| ISB | 16 | `s <= InvSubBytes(s) ^ K(r)` |
| IMC | 20 | InvMixColumns; not run after the last ISB pass |

ISR, IKE, ISB and IMC repeat for r = 9 down to 0. `done` is high 687 cycles
after `start`.

## Modes of operation (`aes_modes`)

The modes unit has three parts:

- an XOR in front of the core;
- an XOR behind the core;
- a chaining register for each direction, loaded from `iv` by `init`.

In the table, F is the chaining register:

| mode | encrypt | decrypt |
|---|---|---|
| ECB | C = E(P) | P = D(C) |
| CBC | C = E(P⊕F), F ← C | P = D(C)⊕F, F ← C |
| CFB (128-bit) | C = P⊕E(F), F ← C | P = C⊕E(F), F ← C |
| OFB | O = E(F), C = P⊕O, F ← O | the same, with P and C swapped |
| CTR | C = P⊕E(F), F ← F+1 | the same, with P and C swapped |

Only ECB and CBC decryption use the decryption core. CFB, OFB and CTR use the
encryption core in both directions.

A request is `start` with `decrypt` and `din`. The result arrives with a
one-cycle `done` pulse:

- 528 cycles through the encryption core;
- 688 cycles through the decryption core.

The encrypt and decrypt directions have separate chaining registers, so a
stream can be encrypted and its ciphertext decrypted block by block,
interleaved.

## Top level (`AES_TOP_FINAL`)

| port | dir | width | meaning |
|---|---|---|---|
| clk | in | 1 | clock |
| rst | in | 1 | asynchronous reset, active high |
| kld | in | 1 | one-cycle strobe: take `key`, `mode`, `iv`; restart chaining |
| en | in | 1 | one-cycle strobe: take `text_in` and process it |
| key | in | 128 | cipher key |
| text_in | in | 128 | plaintext block |
| mode | in | 3 | 0 ECB, 1 CBC, 2 CFB, 3 OFB, 4 CTR |
| iv | in | 128 | initial vector / initial counter |
| enc_data | out | 128 | ciphertext of the last block |
| dec_data | out | 128 | decrypted `enc_data`; equals `text_in` |
| enc_complete | out | 1 | `enc_data` valid |
| dec_complete | out | 1 | `dec_data` valid |

`en` clears both complete flags.

- `enc_complete` is high 529 cycles after the `en` cycle.
- `dec_complete` follows another 688 cycles later for ECB and CBC, or 528
  cycles later for CFB, OFB and CTR.

Both flags stay high until the next `en` or `kld`. The processor ignores
`en` and `kld` while a block is in flight.

## Where this design departs from, or goes beyond, its source

- **Timing.** The source also mentions a core that computes one round per
  cycle, 10 cycles per block. That does not fit the 8-bit datapath it
  describes in detail, which is what is built here. This design takes 527
  cycles per encryption.
- **No masking.** The source mentions a masked variant, in which the
  plaintext is masked with a random mask that is removed after encryption.
  It does not say how the mask passes through SubBytes, so masking is not
  implemented. There is no side-channel protection.
- **128-bit keys only**, with 10 rounds. AES-192 and AES-256 are not
  supported.
- **Own choices.** The source does not define these, so they are this
  design's:
  - the meaning of `en` and `kld`;
  - the encrypt-then-decrypt sequencing of the top;
  - the `mode` and `iv` ports, which the published top-level symbol does not
    have;
  - the whole decryption architecture;
  - all cycle schedules.
- **Mode details.** The published mode diagrams give only the structure:
  XOR before the core, XOR after it, IV multiplexers and a pair of input
  registers for decryption. The modes here follow the standard NIST SP
  800-38A definitions.
- **Size.** The published FPGA result is 1,066 flip-flops. Coarse synthesis
  of this RTL gives 1,536 flip-flop bits for the whole top. Most of these are
  128-bit interface and chaining registers: two in the top, four in the mode
  unit. Each core alone has 309.
- **Clock gating.** The gating cell is a latch followed by an AND gate. On an
  FPGA it would be replaced by the vendor's clock-enable buffer, or by plain
  clock enables.

## Simulating

Every testbench checks itself and ends by printing
`TB_RESULT checks=N failures=M`. Each has a watchdog. The reference model
`tb/aes_ref_pkg.sv` is written independently of the RTL: it finds the S-box
inverse by search and transforms whole blocks at a time. The published test
vectors used are:

- FIPS-197 Appendices B and C.1;
- the first block of each NIST SP 800-38A AES-128 mode example.

To build and run one testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/aes_pkg.sv tb/aes_ref_pkg.sv -y rtl -y tb +libext+.sv \
        tb/tb_AES_TOP_FINAL.sv --top-module tb_AES_TOP_FINAL -Mdir obj
    ./obj/Vtb_AES_TOP_FINAL

| testbench | covers |
|---|---|
| `tb_AES_TOP_FINAL` | whole processor at its only configuration: every mode, four-block chained streams, re-keying, an `en` while busy, latencies; counts and requires key expansion with gated state clocks, the key schedule's use of the shared S-box, ShiftRows, InvShiftRows, MixColumns, InvMixColumns and the inverse key schedule |
| `tb_aes_round_trace` | round-1 intermediate values inside the encryption core |
| `tb_aes_modes` | five modes, encrypt and decrypt streams, published vectors, latency |
| `tb_aes_enc_core`, `tb_aes_dec_core` | known-answer and random blocks, latency 527 / 687 |
| `tb_aes_sbox` | all 256 inputs in both directions |
| `tb_aes_mixcol8` | streamed random columns, forward and inverse, pause with gated clock |
| `tb_aes_state_reg`, `tb_aes_key_reg`, `tb_aes_rcon`, `tb_aes_clock_gate` | the register banks and the gating cell |

The testbenches reach into the cores by hierarchical names, such as
`dut.u_modes.u_enc.st_en`, to count events. Renaming those instances means
updating the testbenches too.
