# A byte cipher built from reversible gates, with random 4-bit keys

This design encrypts 8-bit words with a small circuit made almost entirely of
reversible logic gates: SCL, Toffoli, Fredkin and CNOT (Feynman) gates. A
reversible gate maps its inputs one-to-one onto its outputs, so nothing is
lost on the way through. That is the reason to build a cipher from them: every
stage can be undone, and decryption is just the same gates in reverse order.
Secrecy comes from one 4-bit key, which is XORed onto both halves of the word
as the last encryption step. A fresh key is drawn for every word, and the
sender and the receiver share it.

The intended use is a binary image: 0/1 pixels, with a 32-bit watermark hidden
in the 3rd and 4th least significant bits. Eight pixels form one word, and the
words stream through the cipher one per clock. The watermarking and the image
handling are done in software before and after the hardware. Only the test
bench models them.

## The encryption path

```
            +-----+ A,B,C +---------+   +---------+   +-----+
 i[7:4] --->| SCL |------>| Toffoli |-->| Fredkin |-->| XOR |---> e[7:4]
            |     |-+     +---------+   +---------+ +>|  k  |
            +-----+ |S                  CNOT A ---+  +-----+
                    +--> +------+                     (4th line)
                         | CNOT |
                    +--> +------+
            +-----+ |S              CNOT A^B ---+    +-----+
 i[3:0] --->| SCL |-+     +---------+   +---------+ +>| XOR |---> e[3:0]
            |     |------>| Toffoli |-->| Fredkin |-->|  k  |
            +-----+ A,B,C +---------+   +---------+   +-----+
                                                     (CNOT on 1st line)
```

Each half of the word goes through its own SCL gate. The SCL gate's first
three outputs go through a Toffoli gate and then a Fredkin gate. The fourth
SCL output of each half feeds a single CNOT gate, which couples the two
halves. Each XOR stage then takes three Fredkin lines and one CNOT line, and
XORs them with the same 4-bit key `k`:

| ciphertext bits | source                                   |
|-----------------|------------------------------------------|
| `e[7:5]`        | upper Fredkin outputs P,Q,R XOR `k[3:1]` |
| `e[4]`          | CNOT output A (upper SCL's S) XOR `k[0]` |
| `e[3]`          | CNOT output A^B XOR `k[3]`               |
| `e[2:0]`        | lower Fredkin outputs P,Q,R XOR `k[2:0]` |

The gate equations used are the standard ones:

| gate        | outputs                                        |
|-------------|------------------------------------------------|
| SCL (4x4)   | P=A, Q=B, R=C, S=(A\|B\|C)^D                   |
| Toffoli     | P=A, Q=B, R=(A&B)^C                            |
| Fredkin     | P=A, Q = A ? C : B, R = A ? B : C              |
| CNOT        | P=A, Q=A^B                                     |

Each of them is its own inverse. In one half, a Toffoli gate followed by a
Fredkin gate reduces to `(a, b, c) -> (a, a ? b^c : b, a ? b : c)`. The test
benches use this closed form as their independent reference model.

## The decryption path

`rlgcd_decrypt` runs the path in mirror image:

1. XOR both halves with the key.
2. Send lines 1 to 3 of the upper half and lines 2 to 4 of the lower half
   through a Fredkin gate and then a Toffoli gate.
3. Send the two remaining lines through the CNOT (Feynman) gate.
4. Finish each half with an SCL gate, using the Feynman gate's outputs as the
   D inputs.

Each gate undoes itself and the stages come in reverse order, so the output
equals the plaintext exactly when the key matches. With a wrong key, no word
comes back correctly: the keyless part is a bijection, and a non-zero
`{Δk, Δk}` changes its input.

Note what the key does and does not do. The key enters only through the final
XOR. For a fixed plaintext, two ciphertexts under keys `k1` and `k2`
therefore always differ by exactly `{k1^k2, k1^k2}`. The original design's
published simulation shows the same relation. The cipher is a teaching-scale
construction with a 4-bit key, not a strong cipher.

## Random keys

`random_key_gen` is a 16-bit maximal-length LFSR
(x^16 + x^14 + x^13 + x^11 + 1, period 65,535). Its four low bits are the key,
so all sixteen key values occur at almost equal rates. Other supported widths
are 4, 8 and 32 bits. The state steps once per clock while `key_next` is high,
and a synchronous, active-low reset reloads `SEED` (default `16'hACE1`). The
original design only asks for "a random 4-bit key". The LFSR is this
implementation's choice of the simplest synthesizable source.

## Top level and timing

`rlgcd_top` connects the key generator, the encryptor and the decryptor. The
decryptor takes the encryptor's output and the same key, so the one module
shows both ends of the link:

| port       | dir | width | meaning                                   |
|------------|-----|-------|-------------------------------------------|
| `clk`      | in  | 1     | clock (only the key generator uses it)    |
| `rst_n`    | in  | 1     | synchronous active-low reset              |
| `key_next` | in  | 1     | step to a new key at the next rising edge |
| `plain_i`  | in  | 8     | plaintext word (8 binary pixels)          |
| `key_o`    | out | 4     | current key                               |
| `cipher_o` | out | 8     | ciphertext                                |
| `plain_o`  | out | 8     | decrypted word, equal to `plain_i`        |

The cipher datapath has no registers. A word is encrypted and decrypted within
the cycle in which it is applied, so the throughput is one word per clock with
no latency. Hold `key_next` high to get a new key for every word.

Parameters: `LFSR_W` (16) and `SEED` (`16'hACE1`), on both `rlgcd_top` and
`random_key_gen`. The word width (8) and the key width (4) are fixed by the
gate structure and live in `rlgcd_pkg`.

## Files

| file                     | contents                                              |
|--------------------------|-------------------------------------------------------|
| `rtl/rlgcd_pkg.sv`       | widths and word/nibble/key types                      |
| `rtl/scl_gate.sv`, `rtl/toffoli_gate.sv`, `rtl/fredkin_gate.sv`, `rtl/cnot_gate.sv` | the four reversible gates |
| `rtl/key_xor.sv`         | 4-bit key XOR stage                                   |
| `rtl/rlgcd_encrypt.sv`   | encryption block                                      |
| `rtl/rlgcd_decrypt.sv`   | decryption block                                      |
| `rtl/random_key_gen.sv`  | LFSR key source                                       |
| `rtl/rlgcd_top.sv`       | top level                                             |
| `tb/rlgcd_ref_pkg.sv`    | closed-form reference models (cipher, inverse, LFSR)  |
| `tb/tb_<module>.sv`      | one self-checking test bench per module               |
| `tb/tb_rlgcd_fig6.sv`    | replays the published 11-word simulation sequence     |
| `tb/tb_random_key_gen_widths.sv` | periods of the 4- and 8-bit LFSRs, steps of the 32-bit one |

What the test benches check:

- **Gates:** exhaustive truth tables, plus reversibility.
- **Cipher blocks:** all 4,096 word/key pairs against the reference model.
  They also check that each key gives a bijection, that decryption round-trips,
  and that a wrong key never decrypts.
- **Key generator:** a full 65,535-step period against a model LFSR, with a
  histogram of the key values.
- **`tb_rlgcd_top`:** runs at the default parameters. It builds a 64x64 binary
  image and embeds a 32-bit watermark (bits 3 and 2 of the first 16 words). It
  streams the image with a new key per word, then checks the recovered image,
  the recovered watermark and the one-word-per-cycle rate. It also exercises
  key hold, a mid-stream reset and a fixed-plaintext run. Each of these
  mechanisms must occur at least once.

Every test bench prints `TB_RESULT checks=N failures=M`.

## Simulating

With Verilator 5, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --timescale 1ns/1ps -y rtl -y tb \
    rtl/rlgcd_pkg.sv tb/rlgcd_ref_pkg.sv tb/tb_rlgcd_top.sv \
    --top-module tb_rlgcd_top -o sim
./obj_dir/sim
```

Replace `tb_rlgcd_top` with any other test bench name. Every test bench
finishes in well under a second.

## Where this implementation departs from, or fills in, the original design

- **Gate equations.** The original names the SCL, Toffoli, Fredkin and CNOT
  gates but gives no equations for them. The standard definitions above are
  used.
- **Published ciphertexts.** The original's simulation lists ciphertexts such
  as `11111111` under key `0001` giving `11101100`. These gate definitions do
  not reproduce them: here an all-ones word yields two ones per half before
  the key, where the published values need `1111` and `1101`. What does match
  is the key dependence: the pairwise differences of the published
  ciphertexts equal those of this design, and `tb_rlgcd_fig6` checks them.
  The decrypted words equal the plaintext, as in the original.
- **Line order.** The original does not give the bit order inside a half,
  which CNOT input is the control, or where the CNOT lines enter the XOR
  stages. Here the upper half takes `i[7:4]` and the lower half takes
  `i[3:0]`, each as A,B,C,D. The upper SCL output is the CNOT control. The
  CNOT lines enter the upper XOR stage last and the lower XOR stage first,
  following the block diagram. In that diagram the lower SCL's line to the
  CNOT is drawn from its top output. The text says it is the last output,
  and the text is followed.
- **Key source.** The original says only that the key is random. The LFSR,
  its width, its seed and the `key_next` strobe are this implementation's
  choices.
- **Resources.** The original reports 4 LUTs, 17 I/O pins and no flip-flops
  on a Spartan-3E for its build. This top has 31 I/O bits, about 34 gates for
  the two cipher blocks and 16 flip-flops for the key generator. It still
  fits the quoted device easily (1,920 LUTs, 66 I/Os), but it is not the same
  netlist.
- **Not hardware here.** Image reading, grey-scale and binary conversion,
  watermark embedding and the text files that carry the data belong to the
  software flow. `tb_rlgcd_top` generates its own image and watermark in
  place of that flow.
