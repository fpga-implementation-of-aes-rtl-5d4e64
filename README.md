# AES-256 encryption and decryption in SystemVerilog

This RTL encrypts and decrypts 128-bit blocks with the Advanced Encryption
Standard (AES, FIPS-197) under a 256-bit private key. It models the two ends
of a secured link. A sender turns plaintext into ciphertext with its private
key. A receiver holding the same key turns the ciphertext back into plaintext.
Both ends sit side by side in one top module, `aes_top`. Each end is a
complete core with its own key expansion. Whatever carries the ciphertext
between them stays outside the design.

Each core uses a 128-bit parallel datapath. All sixteen bytes of the state
go through one full AES round in every clock. An AES-256 block therefore
takes 14 clocks. The same RTL also runs AES-128 (10 rounds) and AES-192
(12 rounds) through the `KEY_BITS` parameter.

## The cipher in brief

AES works on a 4x4 matrix of bytes, the *state*. Encryption first XORs the
plaintext with round key 0 (*AddRoundKey*). It then runs Nr rounds, where
Nr = 14 for a 256-bit key. Each round applies four steps:

| step | block | what it does |
|---|---|---|
| SubBytes | `aes_sub_bytes` (16 x `aes_sbox`) | replaces each byte with its multiplicative inverse in GF(2^8), followed by a fixed affine map |
| ShiftRows | `aes_shift_rows` | rotates row r left by r bytes |
| MixColumns | `aes_mix_columns` | multiplies each column by the matrix with first row {02 03 01 01} over GF(2^8) |
| AddRoundKey | `aes_add_round_key` | XORs the state with that round's 128-bit key |

The last round has no MixColumns. Decryption undoes these steps in reverse
order. Its blocks are `aes_inv_shift_rows`, `aes_inv_sub_bytes`,
`aes_add_round_key` and `aes_inv_mix_columns`, which uses the matrix with
first row {0e 0b 0d 09}. Decryption uses the round keys from Nr down to 0.

### Byte order

All 128-bit buses use the byte order of the standard. Byte 0 is bits
`[127:120]`. Bytes fill the state column by column, so byte `4*c + r` is
row `r`, column `c`. The 128-bit value `00112233...ff` is therefore the
column-major matrix
of the standard's examples. Keys follow the same rule: word 0 of the key is
its top 32 bits.

## Round datapath

`aes_encrypt` holds the state in one 128-bit register. Its combinational
path is SubBytes, then ShiftRows, then MixColumns. One shared AddRoundKey
sits in front of the register, behind a three-way multiplexer:

- when idle, the multiplexer selects the incoming plaintext, so the start clock does the initial key addition;
- in rounds 1 to Nr-1, it selects the MixColumns output;
- in round Nr, it selects the ShiftRows output, which skips MixColumns.

A 4-bit round counter drives the multiplexer. It also addresses the key
store. `aes_decrypt` mirrors this:

- its start clock XORs the ciphertext with round key Nr;
- each later clock applies InvShiftRows, InvSubBytes and AddRoundKey with round key r, then InvMixColumns;
- the counter runs r from Nr-1 down to 0;
- at r = 0 the InvMixColumns output is skipped.

Both orders follow the standard's definition of the inverse cipher.
This core does not use the equivalent inverse cipher, which would need
transformed round keys.

The critical path is one round: an S-box ROM, then the MixColumns XOR tree
(or the XOR and InvMixColumns), then the key XOR and the multiplexer.
InvMixColumns is the deeper of the two mixing networks. Its 9/11/13/14
multiples are built from three chained `xtime` steps.

## Key schedule and round-key store

`aes_key_expansion` turns the Nk-word key into 4*(Nr+1) words, with
Nk = KEY_BITS/32. For AES-256 that is 60 words. The words are kept in a
register array. It produces one word per clock with the standard
recurrence:

    w[i] = w[i-Nk] ^ temp
    temp = SubWord(RotWord(w[i-1])) ^ Rcon     if i mod Nk == 0
         = SubWord(w[i-1])                     if Nk == 8 and i mod Nk == 4
         = w[i-1]                              otherwise

One group of four S-boxes serves every SubWord. Rcon is a byte register
that starts at 01 and is multiplied by {02} each time it is used. A
`pos` counter tracks i mod Nk, because Nk = 6 is not a power of two.
Expansion takes 4*(Nr+1) - Nk clocks: 40, 46 or 52 for 128-, 192- or
256-bit keys. Round key j is words 4j..4j+3, read out combinationally for
the round the core is in.

The schedule is computed once per key and then kept, not regenerated during
the rounds. Decryption can therefore read the round keys in reverse with no
extra latency. The cost is 1,920 bits of key store per core.

## S-box generation

No S-box table is written out in the source. `aes_pkg::gen_sbox()` computes
the 256 entries at elaboration. It walks all non-zero field elements as
powers of the generator 3 (`p *= 3`). At the same time it walks their
inverses as powers of 3^-1 (`q /= 3`), so each step yields a pair
(x, x^-1). The affine map is then

    s = q ^ rotl(q,1) ^ rotl(q,2) ^ rotl(q,3) ^ rotl(q,4) ^ 0x63

and S(0) = 0x63. The inverse table is this table inverted. Each `aes_sbox`
instance is a 256 x 8 constant ROM, which synthesis maps to LUTs. The core
has 16 S-boxes in SubBytes plus 4 in the key expansion, so each end has 20.

## Interface and timing

The two cores have the same handshake. In `aes_top` the signals carry an
`enc_` or `dec_` prefix.

| signal | dir | meaning |
|---|---|---|
| `clk`, `rst_n` | in | clock; active-low asynchronous reset |
| `key_load`, `key[KEY_BITS-1:0]` | in | one-clock pulse that starts expansion of `key` |
| `key_ready` | out | schedule complete; cleared by `key_load` |
| `start`, data in `[127:0]` | in | one-clock pulse that takes a block |
| `busy` | out | rounds in progress |
| `done` | out | one-clock pulse; the result is valid |
| data out `[127:0]` | out | result, held until the next start |

Timing for AES-256:

- `key_ready` rises 52 clocks after the `key_load` clock.
- `start` is taken in a clock where `busy` is low and `key_ready` is high.
- `done` rises 14 clocks after the clock that took `start`.
- A new `start` may be given in the clock where `done` is high.
- Throughput is therefore one block per 15 clocks per end.
- A `start` while busy or before the key is ready is ignored.
- A `key_load` while busy is ignored.
- A `key_load` during an expansion restarts the expansion.

Assertions in the cores check two rules: `done` never coincides with
`busy`, and the round counter stays in range.

## How far to trust it

The round functions, key schedule and cores pass these checks:

- the known-answer vectors of FIPS-197 Appendix C, for all three key sizes;
- the round-1 intermediate values of Appendix B;
- the expanded-key values of Appendix A.1 and A.3;
- thousands of random vectors compared with an independent software model (`tb/aes_ref_pkg.sv`). That model finds inverses by search and multiplies by shift-and-add, so it shares no code with the RTL.

Every testbench also fails when its block is replaced by a deliberately
broken copy.

These parts of the design are its own choices, not fixed by any source:

- the one-round-per-clock schedule;
- the word-serial key expansion with a stored schedule;
- the load/start/done handshake;
- the reset style;
- separate keys and key expansion at each end.

A "parallel, highest-speed" architecture is read here as a 128-bit-wide
datapath that does a whole round per clock. It is not a fully unrolled
pipeline that takes a new block every clock. A pipelined version would
reuse the same round blocks, with Nr register stages and a key store per
stage. It is not provided.

No timing or area results for an FPGA are claimed. The design has been
simulated and synthesized generically, not placed and routed. A
generic synthesis of `aes_top` gives about 4,150 flip-flops and 40 S-box
ROMs.

Lint reports `SYNCASYNCNET` on `rst_n`. It is expected: `rst_n` is both the
asynchronous reset and the `disable iff` condition of the assertions.

## Files

| file | content |
|---|---|
| `rtl/aes_pkg.sv` | types, `xtime`, S-box and Rcon generation |
| `rtl/aes_sbox.sv` | one forward or inverse S-box (`INVERSE` parameter) |
| `rtl/aes_sub_bytes.sv`, `rtl/aes_inv_sub_bytes.sv` | 16 S-boxes across the state |
| `rtl/aes_shift_rows.sv`, `rtl/aes_inv_shift_rows.sv` | row rotations (wiring only) |
| `rtl/aes_mix_columns.sv`, `rtl/aes_inv_mix_columns.sv` | column mixing |
| `rtl/aes_add_round_key.sv` | state XOR round key |
| `rtl/aes_key_expansion.sv` | key schedule and round-key store |
| `rtl/aes_encrypt.sv`, `rtl/aes_decrypt.sv` | iterative cores |
| `rtl/aes_top.sv` | sender and receiver ends side by side |
| `tb/aes_ref_pkg.sv` | software reference model |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

`tb_aes_top` runs the top at its default size. It hands each ciphertext from
the encrypting end to the decrypting end and checks the round trip. The two
ends run overlapped. The test also counts the handshake corner cases and
fails if any was never exercised: a start while busy, a start before the key
is ready, a key_load while busy, back-to-back blocks, a rekey, and a wrong
key at the receiver.

## Simulating

Any testbench builds with Verilator 5. List the packages first:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/aes_pkg.sv tb/aes_ref_pkg.sv rtl/*.sv tb/tb_aes_top.sv \
        --top-module tb_aes_top
    ./obj_dir/Vtb_aes_top

Each testbench prints `TB_RESULT checks=N failures=M` and finishes. Every
run takes well under a second.

## Changing it

- **Key size:** set `KEY_BITS` to 128, 192 or 256 on `aes_top`, `aes_encrypt`, `aes_decrypt` or `aes_key_expansion`. Nr and the store size follow from it.
- **Faster key setup:** make `aes_key_expansion` produce more words per clock by chaining copies of the word step. Each copy needs its own four S-boxes.
- **Shared key store:** if both directions always use the same key, one `aes_key_expansion` could feed both cores. Give it a second read port.
- **Higher throughput:** instantiate the round blocks Nr times with a register between each pair. Feed each stage its own round key.
