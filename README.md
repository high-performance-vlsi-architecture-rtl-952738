# Sub-pipelined AES-128-GCM

AES-GCM encrypts data and authenticates it in one pass. It does this with
AES in counter mode plus a GF(2^128) hash (GHASH) over the associated data
and the ciphertext. This design makes the AES part fast. It does not read
the S-box from a table: it computes the S-box with composite-field
arithmetic, GF(((2^2)^2)^2). It then cuts every AES round into **six
register stages**, so the critical path is one small piece of a round
rather than a whole round. All ten rounds are pipelined one after another.
The core therefore accepts a new 128-bit block on every clock and returns
its encryption 60 cycles later. Around this core sit a key schedule, the
GCM counter, a single-cycle GHASH multiplier and a controller. Together
they give authenticated encryption and decryption with tag generation and
tag checking.

It implements standard AES-128-GCM (NIST SP 800-38D) for messages made of
whole 128-bit blocks and a 96-bit IV.

## The composite-field S-box

The AES S-box maps a byte to its multiplicative inverse in GF(2^8) and then
applies an affine transform. Inverting directly in GF(2^8) costs a lot of
logic. Instead, the byte is first mapped by a linear isomorphism δ into a
tower of fields:

| level           | defining polynomial  | constant          |
|-----------------|----------------------|-------------------|
| GF(2^2)         | x^2 + x + 1          |                   |
| GF((2^2)^2)     | x^2 + x + φ          | φ = {10}          |
| GF(((2^2)^2)^2) | x^2 + x + λ          | λ = {1100}        |

In the tower, the byte is a pair of 4-bit elements (ah, al). Its inverse is

    d   = λ·ah² ⊕ (ah ⊕ al)·al          (one 4-bit value)
    inv = ( ah·d⁻¹ , (ah ⊕ al)·d⁻¹ )

So an 8-bit inversion becomes one squaring, one constant multiply, three
4-bit multiplies and one 4-bit inversion. The 4-bit multiplies are built
from 2-bit ones. Afterwards, δ⁻¹ maps the result back to GF(2^8). In this
design, δ⁻¹ and the AES affine transform are merged into one 8×8 XOR matrix
plus the constant {63}.

δ is the matrix that sends the AES polynomial's root to the tower element
{42}. The δ matrix, the merged δ⁻¹/affine matrix and the GF(2^4)
inversion formulas are in `aes_gcm_pkg.sv`. They were checked exhaustively
against the AES S-box for all 256 inputs. Another choice of tower
constants works equally well, but changes both matrices.

## The six stages of a round

`aes_round_sp` places one register after each of these steps. All sixteen
bytes are processed in parallel:

| stage | work                                                                          | register holds (per byte) |
|-------|-------------------------------------------------------------------------------|---------------------------|
| 1     | isomorphic mapping δ                                                          | 8 bits                    |
| 2     | square of ah, multiply by λ, (ah⊕al)·al, XOR → d                              | d, ah, ah⊕al (12 bits)    |
| 3     | inversion in GF(2^4): d⁻¹                                                     | d⁻¹, ah, ah⊕al (12 bits)  |
| 4     | two GF((2^2)^2) multipliers → 8-bit inverse                                   | 8 bits                    |
| 5     | δ⁻¹ + affine transform, then ShiftRows (wiring only)                          | 128-bit state             |
| 6     | MixColumns (xtime and XOR) and AddRoundKey                                    | 128-bit state             |

Stages 1–4, plus the combinational part of stage 5, form `sbox_sp`. The
last round has no MixColumns, but it keeps all six registers, so every
round has the same latency. `aes_pipe_sp` XORs round key 0 into the input
combinationally, in front of round 1. Its latency is therefore exactly
10 × 6 = 60 cycles. A valid bit runs alongside the data. Each round reads
its own round key at stage 6. The keys come from `aes_key_expand` and must
stay constant while blocks are in flight. The controller makes sure of
that, because it loads a new key only between operations.

## One GCM operation

`aes_gcm_top` runs one message per `start` pulse. The message has m AAD
blocks and n text blocks:

1. **KEYEXP.** The key schedule writes the eleven round keys, one per
   cycle. It takes 10 cycles after the load.
2. **H and J0.** The all-zero block and J0 = IV‖0³¹‖1 enter the AES
   pipeline on two consecutive cycles. Sixty cycles later they come out as
   the hash subkey H = E_K(0) and the tag mask E_K(J0).
3. **AAD.** Once H is known, the m AAD blocks are accepted through a
   valid/ready handshake. Each one is folded into the hash in one cycle:
   X ← (X ⊕ A_i)·H.
4. **TEXT.** For each accepted text block, the next counter value enters
   the pipeline. The counter adds one to its low 32 bits each time
   (inc32). The text block waits in a 64-entry FIFO. When the matching
   keystream block leaves the pipeline, the two are XORed to give
   `text_out`. The ciphertext is folded into the hash in the same cycle.
   When encrypting, the ciphertext is the output; when decrypting, it is
   the input. Up to 60 blocks are in flight at once. Back-to-back input
   gives one output block per cycle.
5. **LEN.** The block len(A)‖len(C) is folded in. Both lengths are in bits
   and are 64 bits each.
6. **TAG.** tag = X ⊕ E_K(J0). `tag_ok` reports whether it equals `tag_in`.
   `done` rises and stays high until the next `start`.

AAD is hashed completely before the first counter block is issued. As a
result, the GHASH multiplier never has two inputs in the same cycle. An
assertion in the top checks this.

### Timing

With inputs offered back to back, counting the cycle in which `start` is
high as cycle 0 (an output "at cycle k" is first valid during cycle k):

| event                                    | cycle             |
|------------------------------------------|-------------------|
| H available                              | 72                |
| first `text_out_valid`                   | 134 + m           |
| a text block, after the cycle it was accepted in | +61 (60 pipeline + 1 output register) |
| `done` (n ≥ 1)                           | 136 + m + n       |
| `done` (n = 0)                           | 76 + m            |

For one AAD block and one text block, the ciphertext is ready at cycle 135
and the tag at cycle 138. About 70 of these cycles are fixed start-up cost:
the key expansion plus filling the pipeline to obtain H. That start-up cost
is paid once per message, however long the message is.

## Interface of `aes_gcm_top`

All signals are synchronous to `clk`. `rst` is synchronous and active high.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `start` | in | 1 | one-cycle pulse; samples `decrypt`, `key`, `iv`, `m`, `n` (ignored while busy) |
| `decrypt` | in | 1 | 0 = encrypt, 1 = decrypt |
| `key`, `iv` | in | 128, 96 | AES-128 key, 96-bit IV |
| `m`, `n` | in | CNT_W (16) | number of AAD and text blocks |
| `aad`, `aad_valid`, `aad_ready` | in/in/out | 128,1,1 | AAD stream; a block is taken when valid and ready |
| `text_in`, `text_valid`, `text_ready` | in/in/out | 128,1,1 | plaintext (encrypt) or ciphertext (decrypt) stream |
| `text_out`, `text_out_valid` | out | 128, 1 | result blocks, in input order, one cycle each |
| `tag_in` | in | 128 | expected tag (decryption) |
| `tag`, `tag_ok`, `done` | out | 128, 1, 1 | tag, tag comparison, operation finished |

`text_out_valid` cannot be stalled: the consumer must take every output
block. Parameters: `CNT_W` (block-count width, default 16) and
`FIFO_DEPTH` (default 64, must be at least 60).

Synthesized with yosys (coarse, generic cells), the top has about 11,300
flip-flop bits plus the 8 Kbit text FIFO. Almost all of the flip-flops are
the 60 pipeline stages of the AES core.

## Modules

| file | role |
|------|------|
| `aes_gcm_pkg.sv` | types; GF(2^2)/GF(2^4) arithmetic, δ and δ⁻¹+affine, ShiftRows, xtime, an unpipelined S-box for the key schedule |
| `sbox_sp.sv` | S-box stages 1–4 (+ combinational stage-5 part) |
| `mix_columns.sv` | MixColumns, combinational |
| `aes_round_sp.sv` | one six-stage round (parameter `LAST`) |
| `aes_pipe_sp.sv` | 10-round, 60-cycle AES-128 encryption pipeline |
| `aes_key_expand.sv` | AES-128 key schedule, one round key per cycle |
| `gcm_incr.sv` | J0 load and inc32 counter |
| `ghash_mult.sv` | combinational GF(2^128) multiplier in GCM bit order |
| `sync_fifo.sv` | text FIFO with overflow/underflow assertions |
| `aes_gcm_top.sv` | controller and top level |

## Verification

Each module has a self-checking testbench in `tb/` (`tb_<module>.sv`). The
testbenches compare against reference models in `tb/aes_ref_pkg.sv`, which
were written independently of the RTL:

- the S-box by brute-force inversion in GF(2^8);
- rounds with a general GF(2^8) multiplier;
- the reference key schedule;
- GHASH products by carry-less multiplication and reduction.

Known-answer values come from FIPS-197 (a round, the key schedule, a full
encryption) and from the GCM specification (test cases 1 and 2). The other
expected values were computed with an independent AES-GCM library.

`tb_aes_gcm_top` runs the design at its default parameters. It covers:

- single-block encryptions;
- decryption with a matching tag, and with a modified ciphertext (tag
  mismatch);
- an 8-block message with 2 AAD blocks, with and without idle cycles on the
  inputs;
- messages with no AAD, and an empty message.

It also checks the per-block latency of 61 cycles and the `done` cycle
formula above. It fails if any of these never happen: idle inputs,
back-pressure, back-to-back outputs, decryption, tag mismatch, empty AAD,
empty text.

To run a testbench with plain Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb \
        rtl/aes_gcm_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_gcm_top.sv \
        --top-module tb_aes_gcm_top -o sim
    ./obj_dir/sim

Each testbench ends with a line `TB_RESULT checks=N failures=F`.

## Departures and limits

- **Only AES-128.** AES-192 and AES-256 (12 and 14 rounds) are not built.
- **Whole blocks only.** Partial final blocks are not supported. The
  lengths m and n count whole 128-bit blocks. Only 96-bit IVs are
  supported.
- **Latency differs from the published design.** The description this
  design follows reports the ciphertext after 122 cycles and the tag after
  186 cycles. That design's control schedule is not known, so those counts
  are not reproduced. This design gives 135 and 138 cycles for one AAD
  block and one text block.
- **Sample values.** The sample ciphertexts and tags published with the
  original architecture do not match standard AES-GCM for the inputs given
  with them. This RTL reproduces standard AES-GCM. For key
  00112233445566778899aabbccddeeff, plaintext 0123456789abcdef0123456789abcdef,
  AAD fedcba987654321fedcba98765432100 and IV ffeeddccbbaa998877665544, it
  gives ciphertext 5459ae52f843a513f237f18ab4bec861 and tag
  859d9f1bb1212094b65dafd86e511e3b.
- **Own design choices.** The architecture is specified only down to its
  stage contents. Everything below that level was chosen here:
  - the tower-field constants;
  - the merged δ⁻¹/affine matrix;
  - the key schedule at one round key per cycle;
  - the single-cycle GHASH multiplier;
  - the handshakes, the FIFO, the `decrypt`/`tag_in`/`tag_ok` ports and
    the phase order.
- **Not characterized.** Clock rate, power and FPGA mapping have not been
  measured for this RTL.
