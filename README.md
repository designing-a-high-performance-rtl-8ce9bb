# Hybrid RSA/ZUC decryptor for video streams

Live video needs a fast cipher. It also needs a way to hand out and change
keys without a separate key-exchange channel. This design does both:

- The video payload is encrypted with the **ZUC** stream cipher. ZUC
  produces one 32-bit keystream word per clock, so decryption is one XOR
  per word: 4.0 Gbit/s at 125 MHz.
- The 128-bit ZUC key travels inside the stream itself, encrypted with
  **1024-bit RSA**. A packet carries an encrypted key only when the key
  changes. This saves bandwidth when the key stays the same.
- A new key is decrypted **while video keeps flowing**. The RSA unit
  works on the next key while ZUC goes on decrypting with the current one.
  A later packet tells the hardware to switch keys. The switch costs only
  ZUC's 34-cycle initialisation.

Everything is SystemVerilog (IEEE 1800-2017) in `rtl/`, with
self-checking testbenches in `tb/`.

## Data flow

```
 in_wr/in_data ──► FIFO IN ──data_fr_fifo──┬──────────────────────────► XOR ──data_to_fifo──► FIFO OUT ──► out_rd/out_data
                      │                    │                             ▲
           almost_empty / rd_req           ├──ct_word──► RSA ──zuc_key──►ZUC (keystream, 32 bit)
                      ▼                    │   (rsa_core)   zuc_key_valid   ▲
                 DECRYPT CONTROLLER ───────┴── ct_wr, start ────────────────┘ load, next, ready
                      ▲ almost_full / wr_req (FIFO OUT)
```

| module | role |
|---|---|
| `cryptosystem_top` | the complete decryptor: the two FIFOs, the controller, RSA, ZUC and the XOR |
| `decrypt_controller` | parses packets and sequences RSA and ZUC |
| `rsa_core` | ciphertext register, exponentiator, 128-bit key output |
| `rsa_modexp` | left-to-right square-and-multiply on one Montgomery multiplier |
| `mont_mult` | carry-save Montgomery multiplier with a 32-bit final adder |
| `zuc_core` | ZUC cipher: key loader, LFSR, bit reorganisation, F, keystream register |
| `zuc_lfsr_update` | LFSR feedback by a carry-save tree modulo 2^31-1 |
| `zuc_f` | nonlinear function F with its registers R1 and R2 |
| `sync_fifo` | first-word-fall-through FIFO with almost-full and almost-empty flags |
| `crypto_pkg` | S-boxes, ZUC constants, modulo-(2^31-1) arithmetic, the signaling word type |

## Packet format and key changes

The stream is a sequence of 32-bit words. Each packet is:

```
 signaling word | encrypted key: 32 words, MS word first (only if bit 0) | VIDEO_WORDS video words
```

| signaling bit | meaning | controller action |
|---|---|---|
| 0 `key_follows` | an RSA-encrypted key follows the header | Wait until RSA is idle. Shift the 32 words into RSA. Start RSA. **Do not wait for the result.** |
| 1 `apply_key` | switch to the most recently decrypted key | Before this packet's video, wait for `zuc_key_valid`. Pulse `zuc_load`. Wait for ZUC to be ready. |

So `3` means "here is a key, use it now". It is used for the first key, and
the decryptor stalls until RSA finishes. `1` sends a key ahead of time. `2`
switches to it later. `0` is a plain video packet. The RSA plaintext `m`
carries the ZUC key in its low 128 bits. The ZUC IV is fixed for the
session and comes in on the `zuc_iv` port.

Video words move at one per clock. A word moves when FIFO IN is not
almost empty and FIFO OUT is not almost full. In that cycle the controller
raises `fifo_rd_req`, `fifo_wr_req` and `zuc_next` together, and the output
word is `data_fr_fifo ^ keystream`. Before any key has been applied, the
keystream register holds 0 and video passes through unchanged.

## The RSA datapath

### Montgomery multiplier (`mont_mult`)

This computes `z = x·y·r⁻¹ mod n` with `r = 2^(K+2)`. It is radix-2 and
uses no final subtraction. If both operands are below `2n`, the result is
also below `2n`, so results can be fed straight back as operands. The
partial result is kept as a sum/carry pair `(ps, pc)` of K+3 bits, which is
enough, because intermediate values stay below `6n`. Each of the K+2
iterations performs two carry-save additions:

```
(sc, ss) = ps + pc + x_i·y
(pc, ps) = (ss + sc + ss_0·n) / 2      -- the sum is even because n is odd
```

A 32-bit ripple-carry adder then forms `ps + pc`. It takes one word per
cycle, and the pair shifts right by 32 bits each cycle. The few bits above
bit K-1 are added in the last word's cycle. One product therefore takes
exactly **T = K + 3 + K/32 cycles**: 1 load, K+2 iterations and K/32
additions. That is 1059 cycles for K = 1024.

### Exponentiation (`rsa_modexp`)

```
a = MP(c, r² mod n)             -- c into Montgomery form
x = b = r mod n                 -- Montgomery 1
for i = K-1 downto 0:  x = MP(x, x);  if d_i: x = MP(x, a)
m = MP(x, 1)
```

There is a single multiplier. Operand x comes from a multiplexer `sel_2`
(b or the x register; the ciphertext is also selectable, for the first
product). Operand y comes from a 4-way multiplexer `sel_1`:
x = 00, a = 01, 1 = 10, r² mod n = 11. Each product starts in the same
cycle the previous one finishes, because the finished product bypasses the
x register, so the multiplier never idles. A decryption takes

```
T · (K + popcount(d) + 2) + 2 cycles   (from rsa_core start to decrypt_done)
```

With the test key that is 1,631,921 cycles, about 13 ms at 125 MHz. While
this runs, video keeps flowing with the old key.

The private exponent `d`, the modulus `n` and the two Montgomery constants
`r mod n` and `r² mod n` are inputs to the top. The host computes these
once per key pair.

## The ZUC datapath

`zuc_core` follows the three-layer structure of the ZUC cipher:

- **LFSR.** Sixteen 31-bit cells.
- **Bit reorganisation.** Forms `X0 = s15H‖s14L`, `X1 = s11L‖s9H`,
  `X2 = s7L‖s5H` and `X3 = s2L‖s0H` (H = bits 30..15, L = bits 15..0).
- **F.** Two 32-bit registers R1 and R2, the linear maps L1 and L2, and
  S-boxes S0/S1 applied as S0, S1, S0, S1 across the bytes.

The keystream word is `W ^ X3`, held in a 32-bit output register.

The speed-critical part is the LFSR feedback:

```
s16 = 2^15·s15 + 2^17·s13 + 2^21·s10 + 2^20·s4 + (1+2^8)·s0  [+ W>>1 during initialisation]   (mod 2^31-1)
```

Multiplying by `2^k` modulo `2^31-1` is a 31-bit rotation, so the five
taps become six rotated operands. `zuc_lfsr_update` reduces them with a
tree of 31-bit carry-save adders:

- two in parallel, on (A,B,C) and (D,E,F);
- two that merge the results;
- one that adds the output of the mode multiplexer (`W[31:1]` or 0).

Every carry-save adder rotates its carry vector left by one bit instead of
shifting it. This keeps each stage modulo 2^31-1 at the cost of one
full-adder delay. The tree ends in a single end-around-carry adder. A zero
result is replaced by 2^31-1, as the cipher requires.

Timing: the edge that samples `load` writes `s_i = k_i ‖ d_i ‖ iv_i`.
Then follow 32 initialisation rounds (one per clock), one working step
whose output is discarded, and one step that fills the keystream register.
`ready` rises 34 edges after the load edge. After that, each cycle with
`next` high delivers a new word.

The S-boxes, the 15-bit key-loading constants and L1/L2 are those of the
ZUC specification (version 1.6).

## How far it is verified

| testbench | what it shows |
|---|---|
| `tb_zuc_core` | ZUC test sets 1–4 (including word 2000 of set 4) and the keystreams of both keys used in the end-to-end test; 34-edge start-up; the register holds while `next` is low; re-keying in the middle of a stream |
| `tb_zuc_lfsr_update` | 20,000 random cases against 64-bit integer arithmetic, in both modes |
| `tb_zuc_f` | W and R1/R2 against a model of F written out independently |
| `tb_mont_mult` (K=64) | 300 products: `z·r ≡ x·y (mod n)`, `z < 2n`, latency T, back-to-back start |
| `tb_rsa_modexp` (K=64) | encrypt with e = 65537 in the testbench, decrypt in hardware; exact cycle count; special exponents |
| `tb_rsa_core` (K=128) | key recovery through the 32-bit word interface; `zuc_key_valid` behaviour; old key kept while busy; cycle count |
| `tb_sync_fifo` | data and all flags against a queue model, through full and empty |
| `tb_decrypt_controller` | packet parsing against models of the FIFOs, RSA and ZUC; counts each stall |
| `tb_cryptosystem_top` | see below |

`tb_cryptosystem_top` runs the **complete design at its default sizes**:
K = 1024, 256-word packets and 256-word FIFOs. It takes about 4 s in
Verilator. The testbench RSA-encrypts two ZUC keys and sends six packets
with signaling 3, 0, 1, 0, 2, 0. It checks every decrypted word against
the plaintext. The first six output words after each key switch match a
reference sequence. The test fails unless each of the following happens
at least once:

- a stall waiting for the first key;
- video decrypted while RSA works on the next key;
- a stall at the apply packet;
- FIFO OUT almost full;
- FIFO IN running dry during video;
- a pause through `enable`;
- a run of 200 or more words at one word per clock.

It also checks the RSA cycle count.

What is **not** verified: timing closure at 125 MHz, and any FPGA or
silicon resource figures. The design is written for synthesis, but it has
only been linted and elaborated, not placed and routed.

## Where this RTL makes its own choices

These points are not fixed by the architecture. Change them freely.

- **Packet format.** The header comes first and the encrypted key second.
  Packets have a fixed length `VIDEO_WORDS` (default 256). The bit
  assignment of the signaling word is `key_follows` = bit 0 and
  `apply_key` = bit 1.
- **Precomputation.** `a = c·r mod n` is computed on the exponentiator's
  own multiplier, so `r² mod n` must be supplied. This adds one product to
  the classic count of `(2·k_d + 1)` products. The schedule skips the
  multiply for zero exponent bits, so the real count is
  `K + popcount(d) + 2`.
- **Key bus.** The ZUC key passes from RSA to ZUC as one 128-bit bus.
  `zuc_key_valid` goes to the controller rather than straight to ZUC. The
  controller loads ZUC only when the key is valid and a header asks for
  the switch.
- **Key location.** The key is the low 128 bits of the RSA plaintext.
- **IV and private key.** Both come in on ports.
- **FIFO depth and flags.** FIFO depth is 256. FIFO IN's almost-empty
  level is 0, which makes it an empty flag, so every word is consumed.
  FIFO OUT's almost-full level is DEPTH-4.
- **Reset.** All state uses an asynchronous, active-low reset.
- **New key while RSA is busy.** If a key arrives while RSA is still
  working on the previous one, the controller waits.

## Outside this RTL

The surrounding system is not included: network input, DRAM buffers, DMA,
CPU, bus fabric, H.264 decoder and display. `cryptosystem_top` brings out
the FIFO IN write port, where a DMA engine would deliver the stream, and
the FIFO OUT read port, which a video decoder would drain.

## Simulating

Every testbench is self-contained. For example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/crypto_pkg.sv tb/tb_cryptosystem_top.sv \
          --top-module tb_cryptosystem_top -o sim && ./obj_dir/sim
```

Each testbench ends by printing `TB_RESULT checks=N failures=M`. A
watchdog stops it if it hangs. Parameters:

- `cryptosystem_top`: `K` (RSA size; a multiple of 32, at least 128),
  `VIDEO_WORDS`, `FIFO_DEPTH`.
- `sync_fifo`: `AF_LEVEL`, `AE_LEVEL`.
- `mont_mult` and `rsa_modexp`: `K`, down to 64.
