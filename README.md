# LCS-PRESENT: a four-cycle PRESENT-80 engine for IoT sensor nodes

A sensor node that sends pictures over a radio link needs a cipher that costs
little logic and little energy. This design uses the lightweight block cipher
PRESENT. It encrypts 64-bit blocks under an 80-bit key in 31 rounds, and each
round is only a key XOR, sixteen 4-bit S-box lookups and a fixed bit
permutation. Its key schedule is just as cheap: one rotation and one S-box
lookup ("key rotation and key replacement"). An image is cut into 64-bit
blocks of eight 8-bit pixels. Each block is encrypted on the node and
decrypted at the receiver with the same key.

The engine takes **four clock cycles per encryption**. It unrolls eight
rounds into each clock cycle, so 8 + 8 + 8 + 7 = 31 rounds. The same hardware
also decrypts, in eight cycles. The key comes from an external key-generating
circuit, which enters the top level as a plain 80-bit port.

## Module map

```
lcs_present                 top: key register + handshake
└── present_core            controller, state/key registers, UNROLL-stage chain
    └── g_stage[0..UNROLL-1]
        ├── present_key_update   one key-schedule step, forward or inverse
        │   └── present_sbox     (1 lookup table)
        └── present_round        one cipher round, forward or inverse
            └── present_sbox x16
present_pkg                 widths, types, bit permutation
```

| File | Contents |
|---|---|
| `rtl/present_pkg.sv` | `BLOCK_W`=64, `KEY_W`=80, `NUM_ROUNDS`=31, `block_t`, `key_t`, `player()` / `inv_player()` |
| `rtl/present_sbox.sv` | 4-bit S-box and its inverse as a 16-entry table |
| `rtl/present_key_update.sv` | key step: rotate, replace top nibble, XOR round counter (and the inverse) |
| `rtl/present_round.sv` | round: add round key, S-box layer, permutation (and the inverse) |
| `rtl/present_core.sv` | the unrolled engine and its controller |
| `rtl/lcs_present.sv` | top level |

## The cipher as built

The state is `s` (64 bits). The key register is `K` (80 bits). The round key
is `K[79:16]`.

Encryption, for rounds r = 1..31:

```
s = P(S(s ^ K_r[79:16]))
K_{r+1} = update(K_r, r)
ciphertext = s ^ K_32[79:16]
```

- `S` applies the S-box `C56B90AD3EF84712` (value for inputs 0..F) to each
  nibble.
- `P` moves bit i to bit 16·i mod 63. Bit 63 stays in place.
- `update` does three things, in this order:
  - rotates the key left by 61;
  - passes bits 79:76 through the S-box;
  - XORs the 5-bit round number into bits 19:15.

All of this is the published PRESENT-80 cipher, unchanged. The testbenches
check it against the cipher's four published known-answer vectors. For
example, an all-zero key and all-zero plaintext give `5579C1387B228445`.

## How four cycles are reached (`present_core`)

`present_core` has one parameter, `ENC_CYCLES`, which defaults to 4. From it
the core computes `UNROLL = ceil(31 / ENC_CYCLES)` = 8. It then builds a
combinational chain of `UNROLL` stages. Each stage is one `present_round` and
one `present_key_update`. Together they carry the state and key through one
round.

A register `rnd_q` holds the round number of stage 0. Stage j handles round
`rnd_q + j`. A stage whose round number is past 31 passes its inputs through
unchanged. That happens in stage 7 of the last pass, which has only rounds
25..31 to do.

The cycle that accepts `start` already runs rounds 1..8, taking its inputs
straight from `din`/`key` rather than from the registers. So at the default:

| operation | clock edges from the `start` edge to `done` high |
|---|---|
| encrypt | 4 (rounds 1-8, 9-16, 17-24, 25-31 + final key XOR) |
| decrypt | 8 (4 key-expansion passes + 4 inverse-round passes) |

In general the latency is `ceil(31/UNROLL)` cycles. This equals `ENC_CYCLES`
for most values but can be lower: `ENC_CYCLES = 9` gives UNROLL = 4 and 8
cycles. `ENC_CYCLES = 31` gives a classic one-round-per-cycle engine.

## Decryption: walking the key schedule backwards

Decryption is the part of the design most worth understanding. The last round
key, K32, is needed first, and the engine stores no round keys. Instead it
decrypts in two phases, using the same stage chain:

1. **Key expansion (state `S_KEY`).** The chain runs the forward key schedule
   for rounds 1..31. The data half of every stage is bypassed, so the
   ciphertext waits in the state register. This takes `ENC_CYCLES` passes and
   leaves K32 in the key register.
2. **Inverse rounds (state `S_DEC`).** On the first pass the state is XORed
   with K32. Then stage j handles round `rnd_q - j`, counting down from 31.
   - The key stage runs the *inverse* update. It removes the round counter,
     applies the inverse S-box to the top nibble and rotates right by 61.
     This turns K_{r+1} back into K_r.
   - The data stage applies `P⁻¹`, then `S⁻¹`, then XORs with K_r.

   Stages whose round number would fall below 1 pass their inputs through.

Only one S-box table sits in each key stage. It is shared by both directions
because the inverse step looks up the same nibble position before rotating.
The sixteen S-boxes of a round are shared in the same way. Multiplexers in
front of and behind them choose `s ^ RK` → S → P for encryption, or P⁻¹ → S⁻¹
→ `^ RK` for decryption.

The engine does not cache K32 between decryptions. A stream of decryptions
under one key therefore pays the 4-cycle key expansion on every block.

## Top level and handshake (`lcs_present`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; synchronous active-low reset |
| `src_key` | in | 80 | key from the key-generating circuit |
| `src_key_load` | in | 1 | copy `src_key` into the key register; refused while `busy` |
| `key_loaded` | out | 1 | a key has been loaded since reset |
| `start` | in | 1 | begin one block; taken only when `ready` |
| `decrypt` | in | 1 | 0 encrypt, 1 decrypt; sampled with `start` |
| `din` | in | 64 | input block, sampled with `start` |
| `ready` | out | 1 | `key_loaded && !busy` |
| `busy` | out | 1 | a block is in progress |
| `done` | out | 1 | one-cycle pulse; `dout` is valid from then on |
| `dout` | out | 64 | result, held until the next result |

The key is loaded once and stays in force until the next load, for example
for one whole image. A key load while a block is in progress is ignored. This
stops the key from changing under a sequence of blocks at an unexpected
point. A `start` before any key is loaded is ignored as well.

`present_core` carries an assertion that `start` never arrives while the core
is busy. The top guarantees this by gating `start` with `ready`.

For images, eight 8-bit pixels are packed per block, first pixel in bits
63:56. Blocks are independent (electronic-codebook use), so equal plaintext
blocks give equal ciphertext blocks. In an image with a flat background the
outline of the picture therefore stays visible in the ciphered image. Adding
chaining would be a change at the block source, not inside this engine.

## How this relates to the published figures

The design was built from a description that gives the cipher's name, its
widths, its two key operations, a four-cycle delay and FPGA results. The
following points depart from that description or could not be confirmed:

- **Resources.** The description reports 130 LUTs, 115 flip-flops and 47
  slices on a Virtex-6, at 90.26 MHz. No full PRESENT-80 fits those numbers:
  the 64-bit state and the 80-bit key registers alone take 144 flip-flops.
  Eight unrolled rounds also need far more than 130 LUTs. This design keeps
  the four-cycle delay and accepts the larger area. For a small engine, set
  `ENC_CYCLES = 31`.
- **Key width.** The description mentions a 16-bit key produced by four LUTs
  in one place, and an 80-bit key everywhere else. This design uses the
  80-bit key of PRESENT-80. The 16-bit key generator is not built.
- **Key-generating circuit.** The circuit the cipher is paired with is named
  but not specified. Its output is the `src_key` port.
- **Decryption method, handshake, key register and reset** are this design's
  own choices, as is the inverse key step.
- The 90.26 MHz clock rate was not checked. No FPGA timing was run.

## Verification

Each testbench checks the design against an independent reference model in
`tb/tb_present_ref.sv` and prints `TB_RESULT checks=N failures=M`.

| testbench | what it checks |
|---|---|
| `tb_present_sbox` | all 16 entries both ways; S⁻¹(S(x)) = x |
| `tb_present_key_update` | full forward schedules for the all-0 and all-1 keys, the inverse walk back to the start, 500 random steps |
| `tb_present_round` | every single-bit input through P, random forward and inverse rounds, inverse(forward) = identity |
| `tb_present_core` | the four published known-answer vectors, 300 random encryptions and decryptions, latency of every request, at `ENC_CYCLES` = 4, 31 and 9 |
| `tb_lcs_present` | end to end at default parameters (see below) |

`tb_lcs_present` is the end-to-end test. It generates two synthetic 64×64
8-bit images with rings and dots, one per key. It encrypts all 512 blocks of
each image and checks them against the reference. It then decrypts them and
checks that the original pixels come back. It also checks 4-cycle encryption
and 8-cycle decryption on every block. It counts each of these mechanisms and
fails if any never occurs:

- key load;
- key load refused while busy;
- start ignored before a key is loaded;
- encryption;
- decryption with key expansion;
- re-keying between images.

## Simulating

With plain Verilator 5 from the repository root:

```sh
verilator --binary --timing --assert -y rtl -y tb +libext+.sv \
    rtl/present_pkg.sv tb/tb_present_ref.sv tb/tb_lcs_present.sv \
    --top-module tb_lcs_present
./obj_dir/Vtb_lcs_present
```

Replace `tb_lcs_present` with any other testbench name. Each run finishes in
well under a second. Every testbench has a cycle watchdog that reports a
failure if the run hangs.

## Changing it

- **Speed against area:** set `ENC_CYCLES` on `lcs_present` or
  `present_core`. Every intermediate value works, and the stages that run past
  round 31 are bypassed automatically.
- **Another key source:** drive `src_key` and pulse `src_key_load` while
  `busy` is low.
- **PRESENT-128:** change `KEY_W` and the key step in `present_key_update`
  (rotation, two S-box nibbles, counter position). The round datapath would
  stay as it is.
