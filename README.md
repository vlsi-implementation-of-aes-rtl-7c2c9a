# AES-128 encryption/decryption engine with log-table MixColumns

This is an iterative AES-128 block cipher core. It encrypts or decrypts one
128-bit block at a time with a 128-bit key and computes one full round per
clock. Key, input block and result all pass through a 32-bit port, four words
per 128-bit value. The core follows a published FPGA design, and its main
idea is in the MixColumns step. The field multiplications are not built from
shift-and-XOR (`xtime`) networks. Each one goes through a **logarithm /
antilogarithm table pair**: `a·b = E[(L[a] + L[b]) mod 255]`. The source
article reports that this multiplier is much smaller and faster on a Spartan-3A
than its earlier MixColumns. This RTL reproduces the method, not those FPGA
figures.

Everything is plain synthesizable SystemVerilog with no vendor primitives.
No table is typed in by hand. The S-box, inverse S-box, log table and
antilog table are each computed at elaboration by a constant function from
their mathematical definition.

## Datapath

```
 key_word ─► aes_word_in ─► aes_key_expand ── 11 round keys (registers) ──┐
                                                                          │ rk[idx]
 in_word ──► aes_word_in ─► aes_add_round_key (initial) ─► st register    │
                                                            │      ▲      │
                                                            ▼      │      │
                                                       aes_round ◄─┴──────┘
                                                            │ (10 times)
                                              aes_word_out ◄┘ last round
                                                    │
                                                out_word
```

`aes_round` is combinational. It holds two complete chains and `decrypt`
picks one:

| direction | order of steps | last round |
|-----------|----------------|------------|
| encrypt   | SubBytes → ShiftRows → MixColumns → AddRoundKey | MixColumns skipped |
| decrypt   | InvShiftRows → InvSubBytes → AddRoundKey → InvMixColumns | InvMixColumns skipped |

The core uses two chains, not one shared set of units, because the two
directions run the steps in different orders. A shared set would need
multiplexers that close a combinational loop. With the mode tied to a constant
in each chain, synthesis removes the unused half of every unit: the inverse
S-boxes from the encrypt chain, the forward ones from the decrypt chain.

Decryption is the FIPS-197 "inverse cipher": the same steps, inverted, with
the round keys read from 10 down to 0. The source only says that decryption
uses "the same stages, inverted". The step order shown above is this design's
reading of that.

### State layout

Each 128-bit value is the AES state in FIPS-197 byte order. Byte *i* is
`[127-8i -: 8]`. Bytes fill the 4×4 matrix column by column, so byte *i* is row
`i%4` of column `i/4`. Column *c* is therefore the 32-bit slice
`[127-32c -: 32]` with row 0 at the top. On the 32-bit port, the first word
is bits `[127:96]`, which is column 0.

## MixColumns through logarithm tables

MixColumns multiplies each column by a fixed circulant matrix over GF(2⁸),
modulo `x⁸+x⁴+x³+x+1` (0x11B):

```
encrypt  02 03 01 01        decrypt  0E 0B 0D 09
         01 02 03 01                 09 0E 0B 0D
         01 01 02 03                 0D 09 0E 0B
         03 01 01 02                 0B 0D 09 0E
```

Every product in these matrices goes through `gf_mul_log`:

1. **Log lookup.** `gf_ltable` maps each nonzero operand to its discrete
   logarithm to the base 03, a value from 0 to 254. 03 generates the whole
   multiplicative group of this field, so every nonzero byte has a
   logarithm.
2. **Add.** The two logarithms are added as 9-bit integers. A sum of 255 or
   more has 255 subtracted once, giving the exponent modulo 255.
3. **Antilog lookup.** `gf_etable` returns `03^exponent`.
4. **Zero.** Zero has no logarithm. If either operand is 00, the product is
   forced to 00.

The source describes the "add" step as an XOR of the two table values. That
does not give the product: logarithms add as integers. This design uses the
integer sum modulo 255, which is what the tables require. The exhaustive
test of all 65 536 operand pairs confirms the result.

The source also describes bringing wide intermediate values back to 8 bits.
A 9-bit value is XORed with 0x11B. Each further bit above bit 8 is cleared
with 0x11B shifted left by that much, up to 13-bit values. The table method
never produces such values, because the antilog table's output is already a
byte. The reduction is still built, as `gf_reduce` (default width 13). Here it
doubles the key schedule's round constant: `Rcon ← reduce(Rcon << 1)`.

In `aes_mix_column` all 16 products of a column use their own multiplier,
and a mode multiplexer feeds in the matrix coefficients. One column therefore
has 32 log-ROM reads and 16 antilog-ROM reads. Many of those reads have
constant operands, and synthesis folds them. The RTL does not hand-share the
lookups. Doing so, for example sharing one `L[s]` per state byte, is the
obvious area optimisation if you need it.

### How the tables are made

All four tables come from `aes_pkg` constant functions. Each ROM module turns
one into a `localparam` and indexes it.

| table | definition | first entries |
|-------|------------|---------------|
| `E[i]` (`gf_etable`) | `03^i`, i.e. `E[i+1] = E[i]·02 ⊕ E[i]` | 01 03 05 0F 11 33 55 FF |
| `L[x]` (`gf_ltable`) | `i` with `E[i] = x`; `L[0] = 0` (unused) | – 00 19 01 32 02 1A C6 |
| `S[x]` (`aes_sbox`) | `b = x⁻¹ = E[255 − L[x]]` (0 ↦ 0), then `b ⊕ rotl(b,1) ⊕ rotl(b,2) ⊕ rotl(b,3) ⊕ rotl(b,4) ⊕ 63` | 63 7C 77 7B |
| `InvS` (`aes_inv_sbox`) | inverse permutation of `S` | 52 09 6A D5 |

For example, S(FD) = 54 and S(BC) = 65.

## Key schedule

`aes_key_expand` runs the standard AES-128 schedule. It makes one round key
per clock and stores all eleven (11 × 128 flip-flops). Decryption needs them
in reverse order, so they are kept rather than recomputed on the fly. Round
key *r+1* comes from round key *r* as follows:

```
w0' = w0 ⊕ SubWord(RotWord(w3)) ⊕ {Rcon,00,00,00}
w1' = w1 ⊕ w0'     w2' = w2 ⊕ w1'     w3' = w3 ⊕ w2'
```

`Rcon` starts at 01 and is doubled every round through `gf_reduce`. Four
forward S-boxes form `SubWord`. A new `start` restarts the expansion at any
time.

## Interface and timing (`aes_top`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `key_valid`, `key_word` | in | 1, 32 | four consecutive key words, most significant first |
| `key_ready` | out | 1 | all round keys of the current key are ready |
| `in_valid`, `in_word` | in | 1, 32 | four data words, most significant first; a word is taken when `in_valid && in_ready` |
| `in_ready` | out | 1 | core accepts data words |
| `decrypt` | in | 1 | 0 encrypts, 1 decrypts; the value given with the fourth word decides |
| `out_valid`, `out_word` | out | 1, 32 | four result words on consecutive clocks, most significant first; no back-pressure |

Timing counts the clock in which the fourth data word is accepted as clock 0.
The end-to-end test checks all of it:

| clock | activity |
|-------|----------|
| 1 | initial AddRoundKey (round key 0, or 10 when decrypting) |
| 2 … 11 | rounds 1 … 10, one per clock |
| 12 … 15 | `out_valid` with the four result words |

`in_ready` goes high again in clock 12. The next block can therefore load
while the previous result is still going out. With blocks back to back, one
block takes 15 clocks: 4 input words, 1 initial AddRoundKey and 10 rounds. After the fourth key word,
`key_ready` goes low and rises again 12 clocks later: 1 clock for word
assembly and 11 for the expansion. `in_ready` is low while key words arrive,
and for as long as no schedule is ready. A key may only be loaded when no
block is in flight, and an assertion in `aes_top` checks this.

## What comes from the source and what is this design's own

From the source article:
- the four round steps and their inverses
- the round counts
- the 32-bit framing of key, data and result
- the log/antilog table multiplier for MixColumns
- the 0x11B reduction
- electronic-codebook (ECB) operation: every block is ciphered on its own,
  with no chaining between blocks

This design's own choices:
- the iterative one-round-per-clock structure
- the valid/ready handshake and the output without back-pressure
- word order and reset behaviour
- storing the whole key schedule
- the decryption step order

Departures and limits:
- **AES-128 only.** The article's abstract mentions 128-, 192- and 256-bit
  keys. Its design section and conclusion fix the key at 128 bits and leave
  192/256 as future work. This core has `NR = 10` and a 128-bit key path. For
  AES-192/256 you would need a wider key schedule, 13 or 15 stored round keys
  and a round counter up to 12 or 14.
- **Log-table multiplication read as an integer sum modulo 255,** not the
  XOR that the article's prose describes (see above).
- **Table S-box.** The article's conclusion speaks of a "compact composite"
  S-box and of "reduced xtime" inverse MixColumns. It does not describe
  either, and they conflict with its own table-based description. This core
  uses lookup S-boxes and the log-table MixColumns.
- **No FPGA results.** The article's MixColumns figures (134 of 14 752 area
  units and 7.232 ns per round on a Spartan-3A) come from a vendor flow and
  are not reproduced. The earlier MixColumns it compares against is not
  built.

## Verification

Every module has its own self-checking testbench in `tb/`. Each ends by
printing `TB_RESULT checks=N failures=M`. `tb/aes_ref_pkg.sv` is a software
AES written independently of the RTL:
- bit-serial field multiplication
- inverse by search
- bitwise affine transforms

The testbenches compare against this model and against known values: the
FIPS-197 examples, the Appendix B round states, the MixColumns example
column and the S-box entries above. Highlights:

- `tb_gf_mul_log` checks all 65 536 operand pairs.
- `tb_aes_sbox`, `tb_aes_inv_sbox`, `tb_gf_etable` and `tb_gf_ltable` check
  every entry.
- `tb_aes_top` runs the whole core. It uses both FIPS-197 key/plaintext pairs
  in both directions, six random keys, and bursts of random blocks whose
  ciphertexts it decrypts again, 124 blocks in all. It checks both latencies
  and counts, and requires that each of these happens at least once:
  - encryption and decryption
  - a key reload
  - input stalls
  - input overlapping output
  - a last round without MixColumns

  The core has no size parameters, so this test runs at full size.

With Verilator 5, for example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_aes_top rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_top.sv
./obj_dir/Vtb_aes_top
```

Use the same command for any other testbench: change the top module and the
last file. Lint the RTL with
`verilator --lint-only -Wall -y rtl rtl/aes_pkg.sv rtl/aes_top.sv`.

## Files

| file | role |
|------|------|
| `rtl/aes_pkg.sv` | types and the table-generating functions |
| `rtl/aes_top.sv` | the core: word ports, controller, round register |
| `rtl/aes_key_expand.sv` | key schedule and round-key storage |
| `rtl/aes_round.sv` | one encrypt or decrypt round |
| `rtl/aes_sub_bytes.sv`, `aes_sbox.sv`, `aes_inv_sbox.sv` | (Inv)SubBytes |
| `rtl/aes_shift_rows.sv` | (Inv)ShiftRows |
| `rtl/aes_mix_columns.sv`, `aes_mix_column.sv` | (Inv)MixColumns |
| `rtl/gf_mul_log.sv`, `gf_ltable.sv`, `gf_etable.sv` | log/antilog multiplier and its tables |
| `rtl/gf_reduce.sv` | reduction modulo 0x11B |
| `rtl/aes_add_round_key.sv` | AddRoundKey |
| `rtl/aes_word_in.sv`, `aes_word_out.sv` | 32-bit ↔ 128-bit conversion |
| `tb/aes_ref_pkg.sv`, `tb/tb_util.svh` | reference model and check macros |
| `tb/tb_*.sv` | one testbench per module |

## Changing it

- For a pipelined core, unroll `aes_round` ten times and register between
  the copies. The round module is stateless, and the key store already has
  all the round keys.
- To trade the log tables for `xtime` logic, replace the `gf_mul_log`
  instance in `aes_mix_column`. Its ports are `a`, `b` and `p`.
- The output has no back-pressure. If the consumer can stall, put a FIFO or
  a ready input in `aes_word_out`.
