# AES-128 encryption core with a 32-bit word interface

This is an AES-128 encryption engine (FIPS-197) built to save pins and area.
The key, the plaintext and the ciphertext are all 128 bits wide, but each one
crosses the core boundary as four 32-bit words. Inside, the 128-bit state is
treated as four 32-bit columns ("packets"), and each packet gets its own
column unit. The target use is bulk encryption of image data: a host
processor loads one key and then streams pixel blocks through the core.

The architecture follows the article *Implementation of AES for Image
Cryptography Process on SoPC with Area Optimization*. That article describes
the block structure but gives no cycle-level detail. The timing, handshakes,
reset and key-storage choices below are this implementation's own. They are
marked as such.

## Block diagram

```
 key_word ─► aes_word_loader ─► aes_key_expansion ──(44 x 32-bit words)──► aes_key_select
 (4 x 32)     (128-bit reg)      one word / clock                           │    │     │
                                                                   rk_first │    │rk_round  │rk_last
                                                                            ▼    ▼     ▼
 pt_word  ─► aes_word_loader ─► aes_round_core:                                        
 (4 x 32)     (128-bit reg)       aes_initial_round (XOR)                              
                                    │                                                  
                                  128-bit state register ◄──────────────┐              
                                    │ split through ShiftRows            │ rounds 1..9  
                                    ├─ packet 0 ─► aes_column_round ─────┤              
                                    ├─ packet 1 ─► aes_column_round ─────┤              
                                    ├─ packet 2 ─► aes_column_round ─────┤              
                                    └─ packet 3 ─► aes_column_round ─────┘              
                                    │ round 10                                          
                                  aes_last_round (128-bit) ─► output register           
                                                                │                       
 ct_word  ◄── aes_word_unloader ◄───────────────────────────────┘                       
 (4 x 32)
```

`aes_enc_top` holds all of this. `aes_pkg` holds the shared types and the
GF(2^8) helpers.

## The state register and its four packets

This part is the least obvious. The round core keeps one 128-bit state
register. Byte `k = row + 4*column` sits at bits `[127-8k -: 8]`, the AES
standard order, so column `c` is the word at `[127-32c -: 32]`.

AES rounds 1 to 9 each apply SubBytes, ShiftRows, MixColumns and
AddRoundKey. Of these, only ShiftRows moves data between columns. It is
therefore done in the wiring. Packet `c` is gathered from the register as
row `r` of column `(c + r) mod 4`, using `aes_pkg::shifted_column`.
Everything after that stays inside one column. Each packet goes to an
`aes_column_round`, which does three things:

- Four S-box look-ups (SubBytes commutes with ShiftRows, so their order does not matter).
- MixColumns, built from four `xtime` multipliers and a 32-bit XOR network.
- XOR with the matching 32-bit word of the round key.

The unit has exactly 64 input bits (data and key) and 32 output bits. The
four unit outputs are written back to the register together, so one clock
completes one round.

The last round is a separate 128-bit unit, `aes_last_round`. It applies
ShiftRows, then SubBytes, then the last round key, with no MixColumns. It has
its own 16 S-box tables. The initial round is a plain 128-bit XOR, applied as
a block enters the register.

### Timing of one block

| clock edge after the block is accepted | register holds |
|---|---|
| 0 (accept) | plaintext ^ round key 0 |
| 1 … 9 | state after round 1 … 9 |
| 10 | last round result written to the output register; `out_valid` rises |

A block occupies the state register for 10 clocks. The register is free
again in the clock that runs round 10, so the next block is loaded on that
same edge. The result is **one block every 10 clocks**, with an 11-clock
latency from acceptance to `out_valid`.

While a block is in the rounds, the next plaintext is collected and the
previous ciphertext is sent, four words each. Four words take fewer than 10
clocks, so the word ports never limit throughput. This overlap of the 32-bit
transfers with the rounds is how this implementation reads the article's
"pipelining". There are no pipeline registers inside a round.

Suppose the previous ciphertext is still in the output register because the
receiver is not ready. Round 10 then waits and `stall` is high; no data is
lost.

At the top level, the first ciphertext word appears 13 clocks after the last
plaintext word is taken on an idle core:

- 1 clock to hand the block over;
- 11 clocks in the round core;
- 1 clock into the output word register.

## Key schedule and round-key selection

`aes_key_expansion` computes the standard AES-128 schedule one 32-bit word
per clock:

```
w[i] = w[i-4] ^ (i % 4 == 0 ? SubWord(RotWord(w[i-1])) ^ Rcon : w[i-1])
```

The input is the initial key as `w[0..3]`. Rcon starts at `0x01` and is
doubled in GF(2^8) each time it is used. So the schedule needs only four
S-box tables, and the 40 new words take 40 clocks. All 44 words stay in a
register array until the next key arrives.

`aes_key_select` then picks three keys from the stored words:

- the initial key, words 0 to 3;
- the key of the current round `r` (1 to 9, the "nine groups"), words `4r` to `4r+3`;
- the last key, words 40 to 43.

The article separates key expansion from key selection in the same way.
Storing the whole schedule once per key is this implementation's choice. It
suits image encryption, where one key serves many blocks. It costs 1408 flip-flops.
Generating round keys on the fly would save them.

A new key is taken only while the round core is idle. Plaintext blocks wait
in their loader while a key is pending or being expanded (`key_busy`). Every
block is therefore encrypted under one well-defined key.

## The S-box

SubBytes is a 256 x 8-bit look-up table (`aes_sbox`), as in the article. The
table is not written out as constants. It is computed at elaboration by
`aes_pkg::sbox_table()` from the definition:

- the multiplicative inverse in GF(2^8) modulo x^8+x^4+x^3+x+1, computed as a^254 (0 maps to 0);
- then the affine map `b ^ rotl(b,1) ^ rotl(b,2) ^ rotl(b,3) ^ rotl(b,4) ^ 0x63`.

Synthesis turns the constant table into LUTs or ROM. The design uses 36
tables in all:

| unit | tables |
|---|---|
| column units | 16 |
| last round | 16 |
| key schedule | 4 |

## Port interface (`aes_enc_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `key_valid` / `key_ready` / `key_word` | in/out/in | 1/1/32 | key words, column 0 first |
| `pt_valid` / `pt_ready` / `pt_word` | in/out/in | 1/1/32 | plaintext words, column 0 first |
| `ct_valid` / `ct_ready` / `ct_word` / `ct_last` | out/in/out/out | 1/1/32/1 | ciphertext words; `ct_ready` is the receiver's enable; `ct_last` marks the fourth word |
| `key_busy` | out | 1 | a key is waiting or being expanded |
| `stall` | out | 1 | a finished block is waiting for the ciphertext receiver |

All three streams use valid/ready: a word moves on a rising edge where both
are high. The first word of a block is the most significant, state column 0.
For the FIPS-197 Appendix B example, send `2b7e1516 28aed2a6 abf71588
09cf4f3c` as the key and `3243f6a8 885a308d 313198a2 e0370734` as the
plaintext. The ciphertext words are `3925841d 02dc09fb dc118597 196a0b32`.

## Departures from the article and what is not here

- **Cycle timing is this design's own.** The article states neither clock
  counts nor a clock frequency. Its pipelined version claims 5.25 Gbps. At 10
  clocks per block, this core would need about 410 MHz to match that.
- **S-box memory size.** The article quotes the S-box memory as
  "256x8bit = 1024 bit". The table here is 256 x 8 = 2048 bits.
- **Encryption only.** The article mentions image decryption and lists
  encryption/decryption support in its comparison table. It describes only
  the encryption datapath, so no inverse cipher is included.
- **System around the core.** The soft processor (MicroBlaze) and the RS232
  link to a PC are not part of this RTL. They would drive the three word
  streams.
- **Handshakes, reset and `ct_last`** are this design's choices. The article
  speaks only of "enable" signals.

## Files and testbenches

Each file in `rtl/` holds one module or package. Each `tb_*` file in `tb/` holds
one self-checking testbench, which prints `TB_RESULT checks=N failures=M`.
`tb/aes_ref_pkg.sv` is an independent reference model with its own
table-built S-box, key schedule and cipher. The testbenches also check it
against the FIPS-197 known answers.

| testbench | what it checks |
|---|---|
| `tb_aes_sbox` | all 256 entries, plus published values |
| `tb_aes_mix_column` | known MixColumns examples and 500 random columns |
| `tb_aes_column_round`, `tb_aes_initial_round`, `tb_aes_last_round` | FIPS-197 Appendix B steps and random data |
| `tb_aes_word_loader`, `tb_aes_word_unloader` | random valid/ready traffic, word order, `ct_last`, back-to-back blocks |
| `tb_aes_key_expansion` | Appendix A.1 words and random keys; `ready` exactly 40 clocks after the key is taken |
| `tb_aes_key_select` | round-key grouping for rounds 1 to 9 |
| `tb_aes_round_core` | ciphertexts, 11-clock latency, 10-clock block interval while streaming, stall on a blocked output, no block accepted without a key |
| `tb_aes_enc_top` | end to end at default configuration; see below |
| `tb_image_encrypt` | a generated 64 x 64 grey-scale image (256 blocks) streamed through the core; all blocks checked, repeated blocks give repeated ciphertexts, total 2611 clocks (10 per block plus start-up) |

`tb_aes_enc_top` runs the whole core with no parameters changed, through
its word ports. It uses the FIPS-197 Appendix B and C.1 vectors and 90 random
blocks, 92 blocks in all under four keys. It counts each of these mechanisms and
reports a failure if one never occurs:

- plaintext waiting for the key schedule;
- output stall;
- input and output transfers in the same clock;
- a 10-clock block interval;
- the 13-clock first-word latency.

To run a testbench with Verilator 5 from the directory that holds `rtl/` and
`tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_aes_enc_top rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_enc_top.sv
./obj_dir/Vtb_aes_enc_top
```

Change the `--top-module` and the last file for the other testbenches. Lint
with `verilator --lint-only -Wall -Irtl -y rtl rtl/aes_pkg.sv rtl/aes_enc_top.sv`.
Verilator reports `SYNCASYNCNET` on `rst_n`. This comes from the assertions'
`disable iff (!rst_n)` and the asynchronous reset sharing one net, and it is
harmless.

## Changing the design

- The word width and word count of the loaders are parameters (`W`,
  `WORDS`). The round core and key schedule are fixed to AES-128
  (`aes_pkg::NB`, `NK`, `NR`).
- The column units' 16 S-boxes are idle during round 10, so
  `aes_last_round` could share them and save 16 tables. The article draws
  the last round as a separate unit, so it is kept separate here.
- To drop the 44-word key store, compute round keys alongside the rounds.
