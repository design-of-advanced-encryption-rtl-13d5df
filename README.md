# AES-128 encryption and decryption engine

This is a hardware implementation of the Advanced Encryption Standard (AES, Rijndael) with a
128-bit key and a 128-bit data block. Encryption turns a plain-text block into a cipher-text
block through an initial key XOR and ten rounds. Each round is built from four byte-level
transformations: SubBytes, ShiftRows, MixColumns and AddRoundKey. Decryption runs the inverse
transformations in reverse order.

The engine has three parts that share one set of round keys:

- a **key expansion unit** turns the cipher key into 11 round keys and stores them;
- an **encryption core** applies one round per clock;
- a **decryption core** applies one inverse round per clock.

The two cores are independent. Both can be busy at the same time, one encrypting and one
decrypting, under the same key.

```
            key_in ──► aes_key_schedule ──► 11 round keys (1408 bits, registers)
                                                 │                 │
 enc_in ──► aes_encrypt (state reg + aes_enc_round) ──► enc_out    │
 dec_in ──► aes_decrypt (state reg + aes_dec_round) ───────────────┴──► dec_out
```

## The state and its byte order

All blocks pass the 128-bit state around as one packed vector, `block_t` in `aes_pkg`. Byte 0
is bits `[127:120]`. The bytes fill a 4×4 matrix column by column, so the byte at row `r`,
column `c` is byte `r + 4c` (`aes_pkg::get_byte`). This is the byte order of the AES standard.
With it, the standard's published test vectors can be written directly as 128-bit hex
constants: `128'h3243f6a8...` means byte 0 is `32`.

## The round transformations

| Step | Module | What it does |
|---|---|---|
| SubBytes | `aes_sub_bytes` (16 × `aes_sbox`) | replaces each byte with S(x) = A·x⁻¹ ⊕ 63, where x⁻¹ is the inverse in GF(2⁸) and A is the AES affine matrix |
| ShiftRows | `aes_shift_rows` | rotates row r left by r bytes (wiring only) |
| MixColumns | `aes_mix_columns` | multiplies each column by the circulant matrix [02 03 01 01] in GF(2⁸) |
| AddRoundKey | `aes_add_round_key` | XORs in the 128-bit round key |
| InvSubBytes | `aes_inv_sub_bytes` (16 × `aes_inv_sbox`) | applies the inverse affine map, then the GF(2⁸) inverse |
| InvShiftRows | `aes_inv_shift_rows` | rotates row r right by r bytes |
| InvMixColumns | `aes_inv_mix_columns` | multiplies each column by the circulant matrix [0e 0b 0d 09] |

All arithmetic uses the field polynomial x⁸+x⁴+x³+x+1 (0x11b). `xtime` multiplies by 02. Every
other constant product is made from shifts and XORs.

**S-box.** The S-box is computed, not stored as a table. `aes_pkg::gf_inv` raises the byte to
the power 254, which is its inverse in GF(2⁸), through seven squarings and multiplies. The
affine step follows, and 0 maps to 0. Synthesis reduces each S-box to about 400 word-level
cells. If you want a ROM instead, replace the two S-box modules. Their ports stay the same.

**Rounds.** `aes_enc_round` chains SubBytes → ShiftRows → MixColumns → AddRoundKey. Its `last`
input bypasses MixColumns, which gives the tenth round. `aes_dec_round` uses the standard
inverse-cipher order: InvShiftRows → InvSubBytes → AddRoundKey → InvMixColumns. Its `last`
input bypasses InvMixColumns. Both rounds are purely combinational.

## Key expansion (`aes_key_schedule`)

The 128-bit key is read as four words, w0 to w3. Each new round key is made from the
previous one:

- take the last word and rotate it left by one byte (RotWord);
- pass each of its 4 bytes through an S-box (SubWord);
- XOR the round constant Rcon into the top byte;
- then `w[i] = w[i-4] ^ temp` for the first word, and `w[i] = w[i-4] ^ w[i-1]` for the other
  three.

Rcon starts at 01 and is doubled in GF(2⁸) each round: 01 02 04 08 10 20 40 80 1b 36.

Worked example: for the key `3243f6a8 885a308d 313198a2 e0370734`:

- RotWord(e0370734) = 370734e0;
- SubWord gives 9ac518e1;
- XOR with Rcon 01 gives 9bc518e1;
- XOR with w0 gives w4 = a986ee49.

Both testbenches check this value.

The unit produces one round key per clock and keeps all 11 in registers. The decryption core
needs them in reverse order, so this costs 1408 flip-flops instead of a second key path run
backwards.

## Timing and handshake (`aes_top`)

All flops share `clk` and are reset by the active-low asynchronous reset `rst_n`.

| Operation | Request | Busy indication | Result |
|---|---|---|---|
| Key expansion | `key_load` pulse with `key_in` | `key_ready` low | `key_ready` rises 10 clocks after the clock that accepted the load |
| Encryption | `enc_start` pulse with `enc_in` | `enc_busy` high | `enc_done` pulses 10 clocks after the accepting clock; `enc_out` is valid from then until the next accepted start |
| Decryption | `dec_start` pulse with `dec_in` | `dec_busy` high | same as encryption, on `dec_done` and `dec_out` |

In the clock that accepts a start, the core XORs the input with the first key: round key 0 to
encrypt, round key 10 to decrypt. It then applies one round in each of the next 10 clocks.

The top ignores three kinds of request:

- a start while the keys are not ready, or in the same clock as an accepted key load;
- a start to a core that is busy;
- a key load while either core is busy, because the round keys must not change under a
  running core.

Assertions check the handshake: `done` implies idle, the round counter stays in range, and
`key_ready` holds while a core is busy.

Throughput per core is one block every 11 clocks if starts come back to back. Each core's
critical path is one full round: 16 S-boxes plus MixColumns.

## Files

- `rtl/aes_pkg.sv`: types (`block_t`, `round_keys_t`), `NR = 10`, and the GF(2⁸) functions.
- `rtl/aes_sbox.sv`, `rtl/aes_inv_sbox.sv`: one-byte S-box and inverse S-box.
- The transformation modules listed in the table above.
- `rtl/aes_enc_round.sv`, `rtl/aes_dec_round.sv`: one round each.
- `rtl/aes_key_schedule.sv`, `rtl/aes_encrypt.sv`, `rtl/aes_decrypt.sv`, `rtl/aes_top.sv`.
- `tb/aes_ref_pkg.sv`: a reference model used by all the testbenches. It is written apart from
  the RTL:
  - the S-box comes from a table built by walking GF(2⁸)* with generator 03;
  - the state is handled as a byte array;
  - products use a bit-serial multiply.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each applies the AES standard's
  published vectors and then random vectors. Each prints `TB_RESULT checks=N failures=M`.

The published vectors used are:

- key `2b7e1516…09cf4f3c`, plain text `3243f6a8…e0370734` → cipher text `3925841d…196a0b32`,
  with the round-1 intermediate states and round keys 1 and 10;
- key `00010203…0c0d0e0f`, plain text `00112233…ccddeeff` → cipher text
  `69c4e0d8…70b4c55a`.

`tb_aes_top` runs the whole engine at its only configuration. It also counts each mechanism and
fails if one never happens:

- key expansion;
- encryption;
- decryption;
- both cores busy at once;
- the final round without (Inv)MixColumns;
- each kind of ignored request.

## Simulating

With Verilator 5, for example the end-to-end test:

```
verilator --binary --timing --assert -Irtl -Itb rtl/aes_pkg.sv tb/aes_ref_pkg.sv \
          tb/tb_aes_top.sv --top-module tb_aes_top -o sim
./obj_dir/sim
```

For another module, replace `tb_aes_top` with `tb_<module>`. The `-I` paths let Verilator find
the other modules by file name. All testbenches run in well under a second. Lint with
`verilator --lint-only -Wall -Irtl rtl/aes_pkg.sv rtl/aes_top.sv`. The only remaining warning
is `SYNCASYNCNET`: `rst_n` is used both as the asynchronous reset and in the assertions'
`disable iff`, which is harmless.

## How this relates to the AES description it follows

These parts follow the source description:

- AES-128 with 10 rounds and a 128-bit block;
- the four encryption steps, and no MixColumns in the last round;
- the initial AddRoundKey;
- key expansion with RotWord, SubWord and the Rcon table;
- the four inverse steps, including the InvMixColumns matrix.

This design makes its own choices where the description gives none:

- **Architecture.** The design is iterative, one round per clock. Round keys are expanded
  once and stored. Encryption and decryption get separate cores.
- **Byte order and handshake.** The byte order, the `start`/`busy`/`done` handshake, the
  latencies, the reset, and the rules for ignoring requests are this design's own.
- **Inverse cipher.** The description lists an "inverse key expansion" step. Here the forward
  round keys are read in reverse order instead, which gives the same keys. The inverse round
  uses the standard inverse-cipher order, with AddRoundKey before InvMixColumns.
- **S-boxes.** They are computed in logic rather than stored as tables.

Not included:

- **AES-192 and AES-256.** Both appear in the description's comparison of key sizes. The
  design it actually presents uses a 128-bit key only.
- **The PC-to-FPGA link.** The data transfer from a host PC application is only mentioned
  and not specified. Key and data are plain parallel ports of `aes_top` instead, ready to be
  fed by whatever link a system provides.
