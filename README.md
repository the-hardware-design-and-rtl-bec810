# A compact 64-bit Feistel block cipher with a key-dependent omega P-box

This is synthesizable SystemVerilog for a small block cipher aimed at
constrained devices such as RFID tags, and for an application around it that
encrypts a whole 480x272 image and decrypts it again.

The cipher encrypts 64-bit blocks under a 128-bit key in 8 rounds. It mixes
two classic structures:

- The outer structure is a Feistel network. Encryption and decryption
  therefore use the same hardware.
- Inside each Feistel function sits a small substitution-permutation step:
  key XOR, a 4-bit S-box layer (the PRESENT S-box), a permutation, and a
  second key XOR.

The unusual part is the permutation. It is not a fixed wiring. It is one
stage of an omega network: a perfect shuffle followed by sixteen 2x2 switches.
Each switch is set by a bit folded out of the round key, so the permutation
changes with the key and from round to round.

The core computes one full round per clock. A block takes 8 clocks, in either
direction. At the 337 MHz the design is reported to reach on a Virtex-6 FPGA,
that is 64 x 337 / 8 ≈ 2.7 Gbit/s.

## The round

The 64-bit state is split into halves L (bits 63:32) and R (bits 31:0). The
128-bit round key is split into four 32-bit words. **K0 is the most
significant word** (`key[127:96]`), then K1, K2 and K3 (`key[31:0]`). A round
has two stages:

```
stage 1:  L = L ^ K1 ^ P( S(R ^ K0), {K0,K1} )
stage 2:  R = R ^ K3 ^ P( S(L ^ K2), {K2,K3} )      (uses the new L)
```

`S` replaces each nibble `x[4i+3:4i]` of its 32-bit input by the PRESENT
S-box value:

```
x    0 1 2 3 4 5 6 7 8 9 A B C D E F
S[x] C 5 6 B 9 0 A D 3 E F 8 4 7 1 2
```

`P(x, k)` is the omega P-box, described in the next section. After 8 rounds
the block is output as **{R, L}**: the halves are swapped.

The swap is what makes decryption free. Feed a ciphertext {R8, L8} into the
same datapath and the core sees L = R8 and R = L8. It then runs the rounds
with the key words exchanged in each stage:

```
decryption stage 1:  uses K2, K3     decryption stage 2:  uses K0, K1
```

It also runs the round keys in reverse order. The core therefore undoes stage 2
of the last encryption round first, then stage 1, and so on. The result comes
out as {L0, R0}, the original plaintext, with no extra swap. Decryption differs
from encryption only in:

- the key-word multiplexers in front of the two stages (`lwbc_core`);
- the rotation direction of the key schedule.

## The key-dependent omega P-box (`pbox_omega`)

A one-stage omega network on 32 lines works in two steps:

1. **Perfect shuffle.** Input bit i moves to line 2i (for i < 16) or to line
   2(i−16)+1 (for i ≥ 16).
2. **Switches.** Sixteen 2x2 switches each take one adjacent pair of lines.

Switch j therefore sees S-box output bits j and j+16. It drives P-box output
bits 2j and 2j+1:

| KEY_BITS[j] | out[2j]  | out[2j+1] |
|-------------|----------|-----------|
| 0 (straight)| in[j]    | in[j+16]  |
| 1 (crossed) | in[j+16] | in[j]     |

Each switch is two 2-to-1 multiplexers with a common select line. The whole
network is 32 multiplexers driven by 16 select bits.

The 16 select bits are the XOR of the four 16-bit slices of the stage's two
key words:

```
KEY_BITS = k[63:48] ^ k[47:32] ^ k[31:16] ^ k[15:0],   k = {Ka, Kb}
```

Here `{Ka, Kb}` is `{K0, K1}` in encryption stage 1 and `{K2, K3}` in stage 2.
In decryption the two pairs swap stages. Because the round key rotates every
round, the permutation differs from round to round.

The network moves bits but never creates or drops them. The testbench checks
this: the number of one-bits in is always the number of one-bits out.

## Key schedule (`key_schedule`)

The user key sits in a 128-bit register and is only rotated. Encryption:

- round 1 uses the user key K;
- each later round uses the previous key rotated left by 25 bits;
- so round r uses K <<< 25(r−1).

Decryption:

- round 1 uses the user key rotated right by 81 bits;
- each later round uses the previous key rotated right by 25 bits.

Rotating right by 81 is the same as rotating left by 175 = 7 x 25. So
decryption starts at the eighth encryption round key and walks backwards. No
stored key expansion is needed: only wiring and one register.

The first round key is formed combinationally from the key input in the cycle
the block is accepted. In that cycle the register loads the second round key.
This is what lets round 1 run in the accepting cycle.

## Core interface and timing (`lwbc_core`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock |
| `reset`     | in  | 1     | synchronous, active high |
| `key`       | in  | 128   | user key |
| `data_in`   | in  | 64    | plaintext or ciphertext |
| `valid_in`  | in  | 1     | offer a block; it is accepted when `ready` is high |
| `enc_dec`   | in  | 1     | 0 = encrypt, 1 = decrypt |
| `ready`     | out | 1     | no block in flight |
| `data_out`  | out | 64    | result, held until the next block is accepted |
| `valid_out` | out | 1     | one-cycle pulse: `data_out` is new |

Latency and throughput:

- `data_in`, `key` and `enc_dec` are sampled on the edge where
  `valid_in && ready`.
- That same edge already computes round 1. Rounds 2 to 8 take the next 7
  edges.
- `valid_out` is high after the 8th edge, counting the accepting one.
- `ready` is high again in the same cycle as `valid_out`. A new block can
  therefore be accepted every 8 clocks.
- An assertion flags a `valid_in` raised while the core is busy.

The critical path is one full round: two S-box layers, two multiplexer stages
and a few XORs, plus the input multiplexer.

Test vectors (key `ABCDEF02758191AD185DABF04954C78A`):

| plaintext          | ciphertext         |
|--------------------|--------------------|
| `0000000000000000` | `D0EBBFB002FC211E` |
| `0000000000000001` | `A8013D5725FC8496` |
| `0000000000000002` | `1B9A72BACD398D34` |
| `0000000000000003` | `D25667B09B4DB802` |
| `0000000000000004` | `936F3EDA60197859` |
| `0000000000000005` | `8959DC899621A7CF` |
| `0000000000000006` | `EB5B8A40466BAEC6` |
| `0000000000000007` | `A88459CA673E9FA2` |
| `0000000000000008` | `8906477C8E40B4C7` |
| `0000000000000009` | `45AF2659DDC09CF5` |

## Image encryption/decryption application (`image_crypt_system`, top)

```
 image_rom ──► lwbc_core (encrypt) ──► block_ram (cipher)
                                            │
                   ┌────────────────────────┘
                   ▼
              lwbc_core (decrypt) ──► block_ram (plain)
                         image_crypt_ctrl sequences both passes
```

The image is 480x272 pixels, and each pixel is one 64-bit block. After
`start`:

1. The sequencer streams all 130,560 ROM blocks through the encrypting core
   into the cipher RAM.
2. It then streams the cipher RAM through the decrypting core into the plain
   RAM.
3. `done` rises.

A new block is issued in the same cycle the previous result is written, so
each core is busy every clock of its pass. A run takes 2 x 130,560 x 8 + 5 =
2,088,965 clocks, or 20.9 ms at a 10 ns clock. The 5 extra clocks are the
memory-read start-up of each pass and the write of the last result of each
pass. `cycles` reports the count.

Top-level ports:

- `clk`, `reset` (synchronous, active high), `start`.
- `key[127:0]`, shared by both cores.
- `busy`, `done`, `cycles[31:0]`.
- The display read port: `disp_sel[1:0]` selects the original (0), encrypted
  (1) or decrypted (2) image. `disp_addr` is the pixel index y·480+x.
  `disp_data` follows one clock later.

A display controller would attach to the display read port. It is not part of
this RTL. The port sees a memory only while the sequencer is not reading that
memory.

The image ROM holds a synthetic picture. Each pixel is 24-bit RGB,
zero-extended to 64 bits, and is computed from the address `a`:

- R = a[7:0]
- G = a[15:8]
- B = {a[16], a[6:0] ^ a[13:7]}

To use a real picture, replace the `pixel` function in `image_rom.sv` with a
table or an initialised array.

## Where this RTL departs from, or adds to, the cipher's description

- **Key-word and bit numbering.** The description numbers the key words as if
  K0 were the low word `K[31:0]`. The published test vectors only come out
  when K0 is the first-written, most significant word of the key as a hex
  number. The RTL follows the test vectors. The same holds for the P-box fold:
  each stage folds its own two key words.
- **P-box wiring.** The pairing of input bits to switches (j with j+16 onto
  outputs 2j, 2j+1) and the select polarity (1 = crossed) are this design's
  reading of the omega stage. They are the only such reading among those
  examined that reproduces the ten test vectors.
- **Output order {R, L}.** Chosen because it reproduces the test vectors and
  lets decryption run on the unmodified datapath.
- **This design's own choices:**
  - the handshake (`ready`, accept rule, `valid_out` pulse);
  - the `enc_dec` polarity;
  - the synchronous reset;
  - the one-block-per-pixel memory layout, which is inferred from the
    application's reported run time;
  - the synthetic image;
  - the one-clock memory latencies;
  - the display port;
  - the start/done sequencing.
- **Not built:** the LCD that shows the three images in turn.

## Files

Cipher:

- `rtl/lwbc_pkg.sv`: widths, types, S-box, key-word slicing, rotations.
- `rtl/add_round_key.sv`: AddRoundKey (32-bit XOR).
- `rtl/sbox_layer.sv`: 8 parallel S-boxes.
- `rtl/pbox_omega.sv`: key-dependent omega P-box.
- `rtl/feistel_stage.sv`: one stage (XOR, S, P, XOR, XOR into the other half).
- `rtl/key_schedule.sv`: rotating key register.
- `rtl/lwbc_core.sv`: iterative core.

Application:

- `rtl/image_rom.sv`: image ROM.
- `rtl/block_ram.sv`: cipher and plain image RAM.
- `rtl/image_crypt_ctrl.sv`: pass sequencer.
- `rtl/image_crypt_system.sv`: top.

Each `tb/<module>_tb.sv` is a self-checking testbench for that module. They
compare against `tb/lwbc_ref_pkg.sv`, a separate bit-level model of the cipher.
That model holds the published test vectors and writes decryption as the
explicit inverse of encryption. Every testbench ends by printing
`TB_RESULT checks=<n> failures=<n>`. Three further testbenches go beyond single modules:

- `tb/image_crypt_system_tb.sv` runs a 16x4 image twice with different keys.
  It checks all three images and the run length, and counts the mechanisms it
  exercised.
- `tb/lwbc_avalanche_tb.sv` measures the avalanche behaviour of the core.
  It flips single plaintext bits under random keys. The mean ciphertext
  distance is about 32 of 64 bits, and every output bit flips in 30–70 % of
  the trials.
- `tb/image_crypt_system_full_tb.sv` runs the full 480x272 image at default
  parameters (2.1 M clocks, a few seconds). It checks every pixel.

## Simulating

With Verilator 5, for example for the core:

```
verilator --binary --timing --assert -Irtl -Itb \
    rtl/lwbc_pkg.sv tb/lwbc_ref_pkg.sv tb/lwbc_core_tb.sv \
    --top-module lwbc_core_tb
./obj_dir/Vlwbc_core_tb
```

Replace the testbench name to run any other test. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/lwbc_pkg.sv rtl/<module>.sv`.

## How far it can be trusted

- The core reproduces all ten published test vectors in both directions.
- It also agrees with the independent reference model on random keys and
  blocks.
- The full-size application run decrypts every pixel back to the original.
- Latency and throughput (8 clocks per block) are checked cycle-exactly.
- What remains a reading rather than a given: the P-box line pairing and the
  key-word order. Both are pinned down by the test vectors, not by a legible
  description.
- FPGA area and clock rate have not been reproduced.
- No cryptanalysis of the cipher has been published.
