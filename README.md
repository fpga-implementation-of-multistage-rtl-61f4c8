# Multistage knapsack public-key cryptosystem in SystemVerilog

This is a three-stage Merkle–Hellman knapsack cryptosystem in hardware: an
encryption part and a decryption part, each a cascade of small,
self-timed stages. A single Merkle–Hellman knapsack is known to be breakable.
Cascading several of them, with the ciphertext of one stage used as the
plaintext of the next, gives a much harder problem for an attacker. Each
stage is still cheap: encryption is a conditional sum, and decryption is a
reduction and a greedy subtraction loop. Neither needs a multiplier.

The built-in configuration has three stages with block lengths 10, 15 and
19 bits. A 10-bit plaintext block becomes a 23-bit ciphertext, and the
decryption cascade turns it back into the block.

## The arithmetic of one stage

Stage *j* has these secret values:

* a **superincreasing** vector α₀ … α_{N−1}, in which each element is larger
  than the sum of all the elements before it;
* an odd modulus *m* that is larger than Σα;
* a multiplier *w* = 2^k.

Its public key is the "hard" knapsack a_i = α_i · 2^k mod m.

* **Encryption** of an N-bit block x: y = Σ x_i · a_i. Bit x_0 is the least
  significant bit of the block.
* **Decryption** runs in two steps:
  1. γ = y · w⁻¹ mod m. This gives γ = Σ x_i · α_i.
  2. For i = N−1 down to 0: if γ ≥ α_i, then set x_i = 1 and subtract α_i from γ.

  The second step is greedy. It works because α is superincreasing.

The key design choice is **w = 2^k**. With it, step 1 is a Montgomery
reduction by 2^k, which needs only an adder:

    repeat k times:  if γ is odd, γ ← (γ + m) / 2   else γ ← γ / 2

m is odd, so γ + m is even whenever γ is odd, and every halving is exact.
After each step γ is still congruent to y · 2^-i (mod m). After k steps
γ ≡ y · w⁻¹ (mod m), and γ < y/2^k + m.

These are the key sets that are built in (in `knapsack_pkg`):

| stage | N  | m      | w = 2^k | secret vector α |
|-------|----|--------|---------|-----------------|
| 1 | 10 | 4093   | 2^9  | 3 5 11 25 52 105 212 430 871 1750 |
| 2 | 15 | 44357  | 2^13 | 1 3 5 11 21 44 87 173 346 692 1384 2768 5540 11084 22174 |
| 3 | 19 | 680337 | 2^14 | 1 2 5 9 20 39 79 163 329 661 1325 2653 5311 10627 21257 42519 85041 170085 340173 |

Only α, m and k are stored. The package computes the public elements at
elaboration time with `pub_elem()` = α_i · 2^k mod m, so the encryption ROM
always matches the decryption ROM. It also derives every width:

* The ciphertext of stage *j* gets `cipher_w(j)` bits, enough for the sum of
  all its public elements. This is 15, 19 and 23 bits.
* Each of these fits the input block of the next stage (15 ≤ 15, 19 ≤ 19).
  That is a property the keys must have for the cascade to work.

Reference vectors: the message blocks {30, 843} encrypt to {6686, 14377}
after stage 1, {156918, 32029} after stage 2 and {4204879, 4287230} after
stage 3. Decryption walks back through the same values. Every testbench that
involves a whole stage checks these vectors.

## Hardware of a stage

All units use the same protocol:

* `start` is a one-cycle command. It is accepted only when the unit is idle
  (an assertion flags a violation).
* `ready` is a one-cycle pulse at the end of the operation.
* The result register holds its value until the next `start`.

Because `ready` is a pulse, it can drive the next unit's `start` directly.
This is how the stages of a cascade, and the two halves of a decryption
stage, are chained; there is no other control. Each unit has a two-state
controller (idle / run) and a step counter. Reset (`rst_n`) is asynchronous
and active low.

| module | what it is | clock edges per operation |
|---|---|---|
| `knapsack_key_rom` | Combinational key table, either public (`KEY_PUBLIC`) or secret (`KEY_SECRET`). Reads zero past the end. | – |
| `knapsack_enc_stage` | Shift register that shifts the block out LSB first, up-counter addressing the public ROM, and accumulator. | N + 1 = 11 / 16 / 20 |
| `knapsack_mont_reduce` | γ register, "+m" adder, mux and halving, with a step counter. | k + 1 = 10 / 14 / 15 |
| `knapsack_solver` | Down-counter addressing the secret ROM, remainder register and one subtractor. The subtractor's borrow is the γ ≥ α_i test. A shift register collects the bits, MSB first. | N + 1 = 11 / 16 / 20 |
| `knapsack_dec_stage` | `mont_reduce`, whose `ready` starts `solver`. | k + N + 2 = 21 / 30 / 35 |

The clock-edge counts include the edge that samples `start`. `ready` is high
in the cycle after the last edge.

**Final correction in the reduction.** The add-and-halve loop alone can
return a value between m and 2m. In the last step, `knapsack_mont_reduce`
therefore also subtracts m once if needed, at no extra cycle, so γ is always
fully reduced.

One condition makes a single subtraction enough: y < m · 2^k. It holds for
every ciphertext an encryption stage can produce, and an assertion checks it.
For the built-in keys the correction never fires on genuine ciphertexts:
all 1024 blocks were checked through the whole cascade. It does fire on
arbitrary inputs, and `tb_knapsack_mont_reduce` exercises it.

**Comparison is ≥.** If the solver tested γ > α_i instead, it would decode
wrongly whenever the remainder equals α_i exactly. That happens for every
non-zero block, at its lowest set bit.

## Cascades and pipelining

`knapsack_enc_chain` connects the encryption stages 1 → 2 → 3.
`knapsack_dec_chain` connects the decryption stages in reverse order, 3 → 2 → 1.
Both are generate loops over `NUM_STAGES`, which can be 1 to 3 with the
built-in keys. Data moves between stages on buses of the widest word,
`max_data_w`. Each stage's output and ready are brought out as `stage_y` /
`stage_x` and `stage_ready`.

Latency of one block through a cascade:

* encryption: 11 + 16 + 20 = **47** cycles
* decryption: 35 + 30 + 21 = **86** cycles

Each stage starts as soon as the previous one is ready, so several blocks can
be in a cascade at once, one per stage. A stage has no input buffer, though.
A block that reaches a busy stage would be lost.

`knapsack_top` prevents this with a `knapsack_issue_gate` in front of each
cascade. The gate admits one block every *L* cycles, where *L* is the latency
of the slowest stage: 20 for encryption, 35 for decryption. Blocks then enter
every stage at least *L* cycles apart, so no stage is ever started while
busy.

The resulting throughput is one 10-bit block per 20 cycles for encryption and
one per 35 cycles for decryption.

## Top level

`knapsack_top` places the two cascades side by side. They share only the
clock and reset.

* **Encryption side:** hold `enc_req` with the block on `enc_x`. The block is
  taken in the first cycle where `enc_can_start` is also high. The ciphertext
  appears on `enc_y` with the `enc_ready` pulse.
* **Decryption side:** works the same way with `dec_req` / `dec_y` /
  `dec_can_start`, and returns the plaintext on `dec_x` / `dec_ready`.

`*_busy` and the per-stage outputs are for observation.

## How far the design follows its source, and where it departs

The structure follows the published design:

* the stage datapaths (counter, ROM, shift register, adder and register; the
  reduction datapath; the solver datapath);
* chaining by start/ready;
* the reverse-order decryption cascade;
* the key values;
* encryption taking N + 1 cycles per stage.

These are choices of this design:

* reset;
* ready as a one-cycle pulse;
* the `busy` outputs;
* the combinational ROM read;
* the final correction in the reduction;
* the issue gate and its request/can-start interface;
* all bus widths.

For decryption the source gives only a per-stage figure of roughly two cycles
per key element (20, 30, 38). This design takes 21, 30 and 35,
because it runs the two halves one after the other. The source's synthesis
used vendor library components; here everything is plain RTL.

## Simulating

Every testbench checks itself. It ends by printing
`TB_RESULT checks=N failures=M`, and a watchdog stops it if it hangs. To run
one with Verilator 5:

    verilator --binary --timing --assert -Irtl -y rtl -y tb \
        rtl/knapsack_pkg.sv tb/tb_knapsack_top.sv --top-module tb_knapsack_top
    ./obj_dir/Vtb_knapsack_top

| testbench | covers |
|---|---|
| `tb_knapsack_key_rom` | All six tables, including zero past the end. |
| `tb_knapsack_enc_stage` | The three stages on the reference vectors plus 40 random blocks each. Latency N + 1. Restart in the cycle of ready. |
| `tb_knapsack_mont_reduce` | γ against y · w⁻¹ mod m using the inverses 1367 / 3395 / 5938. Latency. Inputs that force the final correction. |
| `tb_knapsack_solver` | One-hot blocks (the γ = α_i case), all-ones blocks and random blocks. Latency. |
| `tb_knapsack_dec_stage` | Inverts each encryption stage. Reference vectors. Latency k + N + 2. |
| `tb_knapsack_enc_chain`, `tb_knapsack_dec_chain` | Every intermediate reference value. Cascade latency 47 / 86. A pipelined stream, with a count of cycles where blocks overlap. |
| `tb_knapsack_top` | The published message and then all 1024 possible blocks, encrypted and looped back into decryption, at default parameters. Checks every ciphertext and every round trip. Counts issue-gate hold-offs, pipeline overlap and every stage hand-off, and each must be non-zero. |

## Changing the keys

To change the keys, edit `STAGE_N`, `STAGE_M`, `STAGE_KEXP` and `STAGE_ALPHA`
in `knapsack_pkg`. To add more stages, also raise `NUM_KEY_STAGES` and
`MAX_N`. Widths, public keys and latencies follow automatically.

A new key set must meet these conditions:

* α is superincreasing;
* m is odd and larger than Σα;
* each stage's `cipher_w` is at most the next stage's N.

The last condition is not checked at elaboration, so check it by hand when
choosing keys. The testbenches contain the published reference numbers for
the built-in keys, and those checks would need updating too.
