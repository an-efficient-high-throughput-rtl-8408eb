# Pipelined IDEA encryption and decryption engine

IDEA (International Data Encryption Algorithm) enciphers 64-bit blocks under a
128-bit key. It has no lookup tables. Its strength and its hardware cost both
sit in one operation, multiplication modulo 2^16+1. This RTL is a pipelined
implementation that aims at high throughput without a sub-key memory. It is
built around three ideas:

* **A pipeline of eight round stages plus the output transformation.** Nine
  blocks are in flight at once.
* **Sub-keys taken straight from the key bits.** Each stage carries the 128-bit
  key of its block. The stage picks its six 16-bit sub-keys out of that key by
  fixed wiring, so there is no key RAM, and every block can use a different key.
* **A fast modular multiplier.** A Wallace tree of 3:2 compressors and a carry
  look-ahead adder form the 32-bit product. One subtraction then reduces it
  modulo 2^16+1.

Decryption uses the same round hardware. It needs inverted sub-keys, so a key
schedule unit computes the 18 multiplicative inverses with a 30-clock
Euler-theorem inverter.

The architecture follows the one published by M. Jayashree, I. Poonguzhali and
S. Selva Agnes ("An Efficient High Throughput Implementation of IDEA Encryption
Algorithm using VLSI", Aust. J. Basic & Appl. Sci. 10(1), 2016). The paper
leaves many details open. The sections below say what this RTL chose where that
is the case.

## The cipher in brief

A block is split into four 16-bit sub-blocks x1..x4. Three operations are used:

| symbol | operation |
|---|---|
| ⊕ | bitwise XOR |
| ⊞ | addition modulo 2^16 |
| ⊙ | multiplication modulo 2^16+1, where the value 0 stands for 2^16 |

One round with sub-keys K1..K6:

```
t1 = x1 ⊙ K1      t2 = x2 ⊞ K2      t3 = x3 ⊞ K3      t4 = x4 ⊙ K4
t7 = (t1 ⊕ t3) ⊙ K5
t8 = (t2 ⊕ t4) ⊞ t7
t9 = t8 ⊙ K6
t10 = t7 ⊞ t9
out = (t1 ⊕ t9,  t3 ⊕ t9,  t2 ⊕ t10,  t4 ⊕ t10)     -- inner two swapped
```

After eight rounds comes the output transformation with K49..K52:
`(x1 ⊙ K49, x3 ⊞ K50, x2 ⊞ K51, x4 ⊙ K52)`. Reading x3 before x2 undoes the
swap of the last round.

**Sub-keys.** The 52 sub-keys are the eight 16-bit words of the key, most
significant word first. Then come the words of the key rotated left by 25 bits,
then by 50 bits, and so on. `idea_pkg::enc_subkey(key, j)` expresses this, and
every sub-key is a fixed choice of key bits. For the key
`31323334353637383930313233343536` the schedule begins
`3132 3334 3536 3738 3930 3132 3334 3536 686a 6c6e ... dce0 e4c0 c4c8 ccd0`.

## Pipeline timing (`idea_enc`)

```
         +-----+   +---------+       +---------+   +-----------+
p_text ->| in  |-->| round 1 |-->...-| round 8 |-->| out_round |--> c_text
key_hold>| reg |   | enc_key |       | enc_key |   | enc_key   |
         +-----+   +---------+       +---------+   +-----------+
            the key register of each stage moves with its block
```

All stages advance together once every **3 clocks**. `phase_ctrl` counts
steps 0, 1, 2, and the stage registers load in step 2. The three steps are
used inside each round (`idea_round`):

| step | work |
|---|---|
| 0 | t1..t4: two multiplies and two adds |
| 1 | t7 and t8 |
| 2 | t9, t10 and the output XORs; the output register loads |

The round has only two modular multipliers. Both are used in step 0, and one
of them again in steps 1 and 2. The critical path of a step is one modular
multiplication plus an add and an XOR, not the three chained multiplications
of a whole round.

The rate is therefore 64 bits per 3 clocks. At 66.67 MHz that is 1.42 Gbit/s,
the throughput this architecture targets. The 3-step split of the round is this
RTL's way of reaching that figure. The source gives only the clock and the
throughput.

Interface and timing:

* `in_ready` is high in step 2 (one clock in three). A block offered with
  `in_valid` in that clock is taken.
* **Key register.** `key_valid` loads `key` into a key register in any clock,
  and the key is kept for every later block. A key offered together with a
  block applies to that block, so a key change costs no time: the next block
  simply goes through under the new key.
* **Output.** `out_valid` is a one-clock strobe. It comes **28 clocks** after
  the clock in which the block was taken: the input register, then 8 + 1
  stages of 3 clocks. `c_text` then holds for 3 clocks.
* **No back-pressure.** Empty slots travel as bubbles (valid = 0).
* Reset (`rst_n`, asynchronous, active low) clears the valid flags, the key
  register and the step counter.

## The modulo 2^16+1 multiplier (`mulmod`)

This is the part that sets the clock rate. `mul16` builds the 32-bit product
in three parts:

1. **`pp_gen`** forms the 16 partial products `a & b[i]`, each shifted by i.
2. **`wallace_tree`** reduces the rows with 3:2 compressors (`csa32`). Each
   compressor is a full adder per bit: sum = a⊕b⊕c at weight 2^n, carry =
   majority at weight 2^(n+1). The 16 rows shrink layer by layer:
   16 → 11 → 8 → 6 → 4 → 3 → 2.
3. **`cla_adder`** adds the last two rows. It uses 4-bit carry look-ahead
   blocks with g = x&y and p = x|y. The block carries are chained through
   block generate and propagate signals.

`mulmod` then uses the identity 2^16 ≡ −1 (mod 2^16+1). With lo = product mod
2^16 and hi = product div 2^16:

* if lo ≥ hi, the result is lo − hi;
* otherwise it is lo − hi + 2^16 + 1. In 16 bits that is lo − hi + 1.

An operand of 0 means 2^16, which is −1. The result is then 1 − (other
operand) modulo 2^16; this also covers 0 ⊙ 0 = 1. A true result of 2^16 comes
out as 0, as IDEA encodes it.

## Decryption (`idea_dec`, `dec_keygen`, `inv_mulmod`)

Decryption is the same pipeline run with the decryption sub-keys. Number the
encryption stages 1..9, stage 9 being the output transformation. Decryption
stage i then takes its keys as follows:

* its two multiplicative keys are the inverses, modulo 2^16+1, of those of
  encryption stage 10−i;
* its two additive keys are the negatives, modulo 2^16, of those of
  encryption stage 10−i; in stages 2..8 the two are also exchanged;
* its two MA-structure keys (K5, K6) are those of encryption round 9−i,
  unchanged.

The full formulas are in the header of `dec_keygen.sv`.

**The inverter (`inv_mulmod`).** 2^16+1 is prime, so
k^-1 = k^(2^16−1) = k^(1+2+4+…+2^15). The inverter has one `mulmod` and works
in two phases:

1. 15 squarings store k^2, k^4, …, k^32768.
2. 15 multiplications form `(((k ⊙ k^32768) ⊙ k^2) ⊙ k^4) … ⊙ k^16384`.

That is **30 clocks per inverse**, against 65535 for plain repeated
multiplication. The inverter accepts the next operand during its last
multiplication. So `dec_keygen` runs the 18 inverses back to back in
18 × 30 clocks. It writes the 34 negated or copied sub-keys in the clock that
takes the key. `keys_valid` rises **541 clocks** after the key is taken:
540 clocks of inverses plus one to store the last one.

**Interface rules:**

* A key is taken (`key_valid` while `key_ready`) only when no key computation
  runs and the pipeline is empty.
* While the sub-keys are being computed, `in_ready` stays low.
* Once `keys_valid` is high, blocks flow exactly as in encryption: one per
  3 clocks, with `out_valid` 28 clocks after the block is taken.
* The 52 decryption sub-keys are held in registers.

## Top level (`idea_top`)

`idea_top` holds the encryption engine and the decryption engine side by side.
Each has its own ports, prefixed `enc_` and `dec_`. They share `clk` and
`rst_n`.

Generic synthesis of the whole top gives:

* about 12.4k word-level cells;
* about 5k flip-flop bits, mostly the 128-bit key registers of the 10 stages
  and the 52 × 16 decryption sub-keys.

Module hierarchy:

```
idea_top
├── idea_enc ── phase_ctrl, enc_key ×9, idea_round ×8, out_round
└── idea_dec ── phase_ctrl, dec_keygen (inv_mulmod), idea_round ×8, out_round
idea_round / out_round / inv_mulmod ── mulmod ── mul16 ── pp_gen, wallace_tree (csa32), cla_adder
idea_pkg: block_t (x1 in the top 16 bits), key and sub-key array types, key-schedule helpers
```

## Simulating

Every testbench in `tb/` checks itself. It prints
`TB_RESULT checks=N failures=M` and stops. The expected values come from
`tb/idea_ref_pkg.sv`, a plain behavioural IDEA written with integer `%` and
`*`. Example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/idea_pkg.sv tb/idea_ref_pkg.sv \
          tb/tb_idea_top.sv --top-module tb_idea_top -o sim && ./obj_dir/sim
```

Replace `tb_idea_top` with any other testbench. The files for the
sub-modules are found through `-Irtl`. All runs take well under a second.

What the testbenches cover:

* **Arithmetic blocks** (`tb_csa32`, `tb_cla_adder`, `tb_pp_gen`,
  `tb_wallace_tree`, `tb_mul16`, `tb_mulmod`). Thousands of random operands
  plus corner cases: all ones, zero operands, and results of 2^16.
* **`tb_enc_key`**: the sub-key values listed above, and random keys.
* **`tb_idea_round`, `tb_out_round`**: one round and the output transformation
  against the reference; the output must not move before step 2.
* **`tb_inv_mulmod`**: exactly 30 clocks per inverse, k ⊙ k^-1 = 1, and
  back-to-back operation.
* **`tb_dec_keygen`**: all 52 sub-keys, and exactly 541 clocks.
* **`tb_idea_enc`**: the standard IDEA test vector (key 0001…0008, plaintext
  0000 0001 0002 0003 gives 11fb ed2b 0198 6de5). Also 28-clock latency, a
  3-clock output spacing in bursts, a full pipeline, the retained key, and a
  key change every fifth block.
* **`tb_idea_dec`**: the same vector backwards, a key load that must wait for
  the pipeline to drain, and input held off during the key computation.
* **`tb_idea_top`**: the whole design at its default size. It encrypts, checks
  each ciphertext and deciphers it back, under two keys. It counts each
  mechanism: key change, full pipeline, bubble, zero operand, decryption key
  load, and input held off. A mechanism that never happens counts as a
  failure.

## Choices made in this RTL and limits

* **Addition modulo 2^16.** The source once names this operation "addition
  modulo 2^16+1". IDEA adds modulo 2^16, and the standard test vector passes
  only with that. This RTL uses 2^16.
* **Zero operand of the multiplier.** The source's reduction formula does not
  cover the zero operand; the 0 = 2^16 rule is added as IDEA defines it.
* **The 3-step stage, the two shared multipliers per round and the handshakes**
  (`in_ready` one clock in three, a strobe on the output, no back-pressure) are
  this design's own.
* **Partial products.** The source draws partial-product generation as a
  carry-save array of full adders. Here the partial products are plain AND
  terms, and all summing is done by the Wallace tree.
* **Decryption details.** The order of the decryption sub-keys is standard
  IDEA, which the source does not spell out. So are the rules for loading a
  decryption key, and the choice of registers (not RAM) for the decryption
  sub-keys.
* **What is not checked.** The 66.67 MHz clock, the 1.77 mm² area and any
  timing figure are not checked: no cell library or timing analysis is
  involved. The 1.42 Gbit/s figure holds per clock (64 bits / 3 clocks). Meeting
  it at 66.67 MHz depends on one modular multiplication fitting in 15 ns.
