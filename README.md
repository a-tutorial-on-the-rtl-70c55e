# SPN block cipher engines: iterative, unrolled, parallel, pipelined, serial, decryption and modes

The same block cipher can be built into hardware in very different ways, and the choice trades area
against throughput. This design does that trade on one cipher: a substitution-permutation network
(SPN) in the style of PRESENT, with a 4-bit S-box, a bit permutation and an 80-bit key schedule. It
provides the cipher as five encryption engines that share their building blocks, plus a
decryption engine and the CTR and CBC modes of operation built on them:

| Engine | Module | Default size | Clocks per block | Blocks in flight |
|---|---|---|---|---|
| basic iterative | `spn_iterative` | 64-bit block, 80-bit key, 31 rounds | 31 | 1 |
| loop unrolled | `spn_unrolled` | 16-bit block, 20-bit key, 4 rounds, 4 rounds per clock | 1 | 1 |
| parallel | `spn_parallel` | 4 lanes of the 64-bit cipher | 31 (4 blocks) | 4 |
| pipelined | `spn_pipeline` | 64-bit, 31 stages | 1 (latency 31) | 31 |
| full serial | `spn_serial` | 16-bit, one 4-bit S-box | 21 | 1 |
| iterative decryption | `spn_iterative_decrypt` | 64-bit, stored round keys | 31 | 1 |
| CTR mode | `spn_ctr` | on the 64-bit pipeline | 1 (latency 31) | 31 |
| CBC mode | `spn_cbc` | on the 64-bit iterative engines, `DECRYPT` picks the side | 31 | 1 |

`spn_top` has no parameters. It places all engines side by side, and each engine has its own
ports with a prefix: `it_`, `ur_`, `pa_`, `pp_`, `se_` for the encryption engines, `dc_` for
decryption, `ct_` for CTR, `ce_` and `cd_` for the two CBC sides. The engines do not interact; the
top exists so that they can be built and compared together.

## The cipher

A block of B bits goes through R rounds. Rounds 1 to R-1 each do three things in turn:

1. **Key mixing**: XOR with the round key RK_r.
2. **Substitution**: B/4 copies of the S-box. S-box j takes state bits 4j+3..4j.
3. **Permutation**: bit i moves to `(i * B/4) mod (B-1)`, and bit B-1 stays where it is.

Round R is different. It has the key mixing and the substitution, but in place of the permutation it
has a second key mixing, with RK_{R+1}.

- **S-box** (inputs 0..F): `C 5 6 B 9 0 A D 3 E F 8 4 7 1 2`.
- **Inverse S-box**: `5 E F 8 C 2 1 D B 4 6 3 0 7 9 A`.
- **Permutation**: the closed form above covers the 16-bit and the 64-bit wiring. The 16-bit
  permutation is its own inverse. The 64-bit one is not: applied twice, it maps bit i to
  4i mod 63. So decryption needs the inverse wiring.
- **Key schedule**: the key register is κ bits wide and starts as the cipher key. The round key is
  its leftmost B bits. Each step does three things:
  1. rotate the register left by α;
  2. put its leftmost 4 bits through the S-box;
  3. XOR the 5-bit round count r into bits γ..γ-4.

Two configurations are used:

| | B | κ | R | α | γ |
|---|---|---|---|---|---|
| 64-bit (PRESENT-80 key schedule) | 64 | 80 | 31 | 61 | 19 |
| 16-bit teaching cipher | 16 | 20 | 4 | 13 | 8 |

**A reference vector for the 16-bit cipher.**
- Key: `6E790`.
- Round keys: `6E79 60DD 8EC3 D71E 71AA`.
- Plaintext `DEBE` encrypts to `2AA3`.

**How this relates to published PRESENT-80.** This cipher's last round has no permutation.
PRESENT instead runs 31 full rounds and then adds RK_32. The two ciphertexts are related by
`C_present = P(C xor RK_32) xor RK_32`, where P is the permutation. The testbench of the iterative
engine uses this relation and reproduces the four published PRESENT-80 test vectors.

All package-level pieces are in `spn_pkg`:
- the S-box tables;
- `perm_dest()`, the permutation as a function;
- `ks_ctrl_t`, the key schedule control bundle.

## Interface conventions

All engines use the same flags. Every flag is a single-clock pulse.

- `k_flag` loads the key on `k`. The engines accept no plaintext until a key has been loaded.
- `p_flag` with `p` starts a block. It is taken only while `ready` is high, and ignored otherwise.
- `c_flag` high means `c` holds the ciphertext. `c_flag` and `c` stay valid until the next block
  or the next key starts.

The pipeline is the exception. It has no `ready`; `key_ready` takes its place, and it accepts a
block in every clock once `key_ready` is high.

All registers use `clk`. The reset `rst_n` is asynchronous and active low. It clears controllers
and flags, but not data registers: the valid flags make those don't-cares.

## Building blocks

- **`spn_round`**: key XOR, then the S-box layer, then the permutation as wiring.
- **`spn_last_round`**: the *last round correction*. It takes the state register after R
  applications of `spn_round`, undoes the permutation by wiring, and XORs in RK_{R+1}. This lets
  the iterative engines re-use one round circuit for every round.
- **`spn_sbox`**: the S-box (or, with `INVERSE=1`, its inverse) as a table. Synthesis turns it
  into two-level logic, which is the fast choice.
- **`spn_sbox_compact`**: the same S-box as a sequence of 14 two-input gates plus one inverter.
  It has eight gate levels: less area, but slower. Every engine has a `COMPACT` parameter that
  picks this form. The serial engine uses it by default.
- **`spn_key_schedule`**: the on-the-fly key schedule (see below).
- **`spn_iter_ctrl`**: the controller of the iterative family.
- **`spn_iter_datapath`**: the shared datapath of the iterative family: input multiplexer, M
  chained rounds, state register and last round correction.

### The key schedule and its `start` and look-ahead

`spn_key_schedule` holds two registers: the cipher key, and the running key state. Its `rk[i]`
outputs are the round keys of the next `STEPS + LOOKAHEAD` rounds, read from a chain of
combinational schedule steps. The control bundle carries three signals:

- `load_key` captures a new cipher key.
- `advance` moves the state on by `STEPS` steps at the clock edge.
- `start` marks the clock that processes round 1. In that clock the chain starts from the stored
  cipher key, not from the state register, and the round count restarts at 1.

Because of `start`, an engine can begin a new block in the same clock in which the previous block's
ciphertext is on `c`. No clock is spent reloading the key. The iterative engine therefore sustains
one block every R clocks exactly.

- The unrolled engine sets `STEPS = M`, so one clock delivers the M round keys of M rounds.
- The serial engine sets `LOOKAHEAD = 1`, so it can see RK_{r+1} while it works on round r (see
  below).
- The round key of round R+1 appears as `rk_state`, the leftmost B bits of the state register. In
  the iterative engines this is the key the last round correction needs.

## Iterative family: basic, unrolled, parallel

`spn_iter_ctrl` is a four-state machine: NOKEY, IDLE, RUN, DONE. A block runs as follows:

1. In the `p_flag` clock the multiplexer takes `p` (`sel = 1`). Round 1 is computed from `p` and
   RK_1, and the result is loaded into the state register.
2. In the next `ITERS - 1` clocks the state is fed back through the round logic.
3. Then DONE raises `c_flag`. Here `c` is the last round correction applied to the register.

The three engines use this controller as follows:

- **`spn_iterative`**: `ITERS = R`, one round per clock. c_flag rises 31 clocks after `p_flag`.
- **`spn_unrolled`**: chains `M` round circuits, with `ITERS = R/M`. R must be a multiple of M
  (an assertion checks this). The 64-bit cipher's 31 rounds cannot be unrolled by 4, so the
  default is the 16-bit cipher with `M = R = 4`. There the whole block takes one clock, and
  `c_flag` is high in the clock after `p_flag`.
- **`spn_parallel`**: instantiates `M` datapaths (default 4) behind one controller and one key
  schedule. All lanes use the same key. `p[M]` and `c[M]` are arrays, and each lane produces one
  block every R clocks.

## Pipeline

`spn_pipeline` unrolls all R rounds. Each round is followed by a state register D_1..D_R, so up to
R blocks are in flight.

Every stage needs its own round key in the same clock. So the round keys are computed once per key
by `spn_round_key_setup`, and held in a register array of R+1 keys (2048 bits at the default):

1. `k_flag` starts the setup.
2. The setup runs the key schedule one step per clock and writes one key per clock.
3. `key_ready` rises 32 clocks after the `k_flag` clock.

While the pipeline is running:
- A valid bit travels with each block, and `c_flag` is the valid bit of the last stage. So the
  first R clocks, while the pipeline fills (is *primed*), produce no output.
- After that, one ciphertext comes out per clock, R clocks after its plaintext went in.
- A new key clears every valid bit, so blocks in flight under the old key are dropped.
- The data registers have no reset.

`RPS` (rounds per stage, default 1) groups consecutive rounds into one stage, with registers only
between stages. For example, R = 16 with `RPS = 2` gives 8 stages and a latency of 8 clocks: half
the registers, but a clock period long enough for two rounds. R must be a multiple of `RPS`.

## Full serial engine

This engine is the hardest one to follow. It processes the 16-bit cipher with a single S-box, one
4-bit sub-block per clock.

**`spn_selectable_register`** holds the state. Each 4-bit sub-block has its own 4:1 input
multiplexer, and one 4:1 output multiplexer picks the sub-block `sel[1:0]` for the S-box.

The 3-bit `sel` decodes as follows:

| sel | sub-block `sel[1:0]` | other sub-blocks |
|---|---|---|
| 0nn | S-box output | hold (feedback) |
| 100 | plaintext | plaintext |
| 101 | permuted register bits | permuted register bits |
| 110, 111 | unused (decoded like 101; the controller never drives them, an assertion checks) | |

The select of sub-block j is `{sel[2], sel[2] ? sel[1:0] != 0 : sel[1:0] != j}`. For the leftmost
sub-block, this reduces to "msb = sel[2], lsb = sel[1] OR sel[0]". There is also an `en` input,
which holds the register between blocks.

**`spn_serial_ctrl`** schedules the blocks:

1. The `p_flag` clock loads the plaintext (`sel = 100`) and starts the key schedule.
2. Each round then takes B/4 substitution clocks (`sel = 0,idx` for idx 0..3). The key nibble
   that matches idx is XORed in ahead of the S-box.
3. One permutation clock follows (`sel = 101`), and the key schedule advances.

A block therefore takes 1 + R·(B/4 + 1) clocks: 21 for the 16-bit cipher, 528 for a 64-bit
instance.

**The last round without a permutation.** The controller runs all R rounds identically, including
a permutation clock in round R. Two small additions make the result still equal the cipher:

- In round R, `last_round` is high. It XORs the matching nibble of RK_{R+1} into the S-box output
  before that output is written back. RK_{R+1} comes from the key schedule's look-ahead output.
- The output `c` is the register read through inverse-permutation wiring. This undoes the
  permutation of round R.

So no extra clock and no extra multiplexer input is needed for the final key mixing.

## Decryption

`spn_iterative_decrypt` runs the cipher backwards with the same structure as the encrypting
engine: an input multiplexer, one round circuit, the state register and a final correction stage.
It re-uses `spn_iter_ctrl` and `spn_iter_datapath`; `INVERSE=1` switches the round circuit to key
mixing, inverse S-boxes and inverse permutation, and the last stage to the forward permutation.

Getting the round keys right is the subtle part. Write P for the permutation and P⁻¹ for its
inverse. Decryption round i computes `d = P⁻¹(S⁻¹(d xor RK*_i))`, and the output is
`P(d) xor RK_1`. With encryption round keys RK_1..RK_{R+1}, the decryption keys are:

- RK*_1 = RK_{R+1} (it undoes the final key mixing, which has no permutation after it);
- RK*_i = P⁻¹(RK_{R+2-i}) for i = 2..R. The key of an encryption round sits in front of a
  permutation, so moving it behind the inverse permutation reorders its bits;
- RK_1 is mixed last, after the forward permutation.

The keys are needed in reverse order, which an on-the-fly schedule cannot give cheaply. So on
`k_flag` the engine fills all R+1 round keys through `spn_round_key_setup` (the same unit the
pipeline uses). `ready` rises 33 clocks after the `k_flag` clock. The reordered key of the next
round is registered one clock ahead, so no permutation wiring sits between the key array read and
the round circuit. The ports mirror encryption: `c_flag`/`c` in, `p_flag`/`p` out, 31 clocks later.

The 64-bit permutation is not its own inverse (see *The cipher*). An engine that reused the forward
wiring for decryption would only be correct for the 16-bit cipher.

## Modes of operation

**CTR (`spn_ctr`).** The pipeline encrypts counter values, not data. `ctr_flag`/`ctr` load the
starting counter. Each accepted block (`p_flag`, once `key_ready` is high and a counter is loaded)
sends the current counter into the pipeline and increments it by one, modulo 2^64. The block itself
travels beside the pipeline in a 31-stage delay line. When the encrypted counter comes out, the
block is XORed with it and appears on `c`, one result per clock and 31 clocks after its input.
Decryption is the same operation on the ciphertext from the same starting counter, so there is no
decryption hardware. A block presented before any counter is loaded, or in the clock a counter is
loaded, is dropped.

**CBC (`spn_cbc`).** Each block is chained to the previous ciphertext, so only one block can be in
the cipher at a time; the mode is built on the iterative engines, not on the pipeline.

- `DECRYPT=0` encrypts: the engine gets `din xor C_{i-1}`, and `dout` is C_i.
- `DECRYPT=1` decrypts: the engine gets C_i, and `dout` is the decrypted block XORed with C_{i-1}.
- `iv_flag`/`iv` load the initialisation vector (C_0) while `ready` is high and restart the chain.
- `in_flag`/`din` give a block while `ready` is high. `out_flag`/`dout` give the result 31
  clocks later and hold it until the next block starts.

A new block may be given in the very clock `out_flag` rises. At that moment the previous ciphertext
is only on the engine's output, not yet in the chaining register. So the encrypting side takes it
from the output directly in that clock, and from the register otherwise.

## Verification

Every block has a self-checking testbench `tb/tb_<module>.sv`. Each prints
`TB_RESULT checks=N failures=M`, and each has a watchdog. Expected values come from `spn_ref_pkg`,
a separate behavioural model. It is written differently from the RTL: it uses a case-table S-box
and writes the permutation in its other form, `o[(i%4)*(B/4) + i/4] = d[i]`.

| Testbench | What it checks |
|---|---|
| `tb_spn_sbox`, `tb_spn_sbox_compact` | all 16 inputs; inverse ∘ forward = identity |
| `tb_spn_round`, `tb_spn_last_round` | random vectors at 16 and 64 bits |
| `tb_spn_key_schedule` | the 16-bit round keys above; 64-bit keys; multi-step and look-ahead outputs |
| `tb_spn_iterative` | PRESENT-80 vectors; latency 31; back-to-back blocks; the 16-bit DEBE→2AA3 in 4 clocks |
| `tb_spn_unrolled`, `tb_spn_parallel` | random blocks, latency, every lane |
| `tb_spn_pipeline` | the 16-bit 4-stage pipeline register by register, clock by clock, for DEBE, BCA8, CC85, 662A, 8D0B (ciphertexts 2AA3, AB2F, C2BF, 6C2F, 8CA8); 64-bit streaming; latency; flush on key change; R = 16 at two rounds per stage (latency 8) |
| `tb_spn_serial`, `tb_spn_serial_ctrl`, `tb_spn_selectable_register` | the select sequence, the 21- and 528-clock block times, every select code |
| `tb_spn_iterative_decrypt` | the 16-bit 2AA3→DEBE; random 64-bit ciphertexts under several keys, back to back; key setup time; latency; the stored round keys |
| `tb_spn_ctr` | outputs against the reference keystream; latency; one output per clock; counter carry across 32 bits; round trip; blocks before a counter is loaded are dropped |
| `tb_spn_cbc` | ciphertexts against the reference chain; blocks with and without gaps; round trip through the decrypting side; restart on a new IV |
| `tb_spn_top` | all engines at their default sizes, end to end |

`tb_spn_top` also counts how often each mechanism happened, and fails the run if any count is
zero. The mechanisms are:
- iterative feedback rounds;
- a block started in the clock its predecessor finished;
- single-clock unrolled blocks;
- parallel lane results;
- pipeline key setup, priming, back-to-back outputs and the flush;
- serial sub-block clocks, permutation clocks and last-round key mixing;
- the 16-bit reference vector;
- decrypted blocks, CTR keystream blocks, and chained CBC blocks on each side.

To simulate with Verilator (5.x), from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
    rtl/spn_pkg.sv tb/spn_ref_pkg.sv tb/tb_spn_top.sv --top-module tb_spn_top
obj_dir/Vtb_spn_top
```

Replace `tb_spn_top` with any other testbench name. Every testbench finishes within seconds.

## Changing the design

- **Block size**: `B` must be a multiple of 16. The permutation, S-box layer and selectable
  register all follow it.
- **Key schedule**: `KAPPA`, `ALPHA` and `GAMMA` set it. `GAMMA` must be at least 4, and the
  round count is 5 bits wide, so R ≤ 31.
- **Unrolling**: `spn_unrolled`'s `M` must divide `R`.
- **Lanes**: `spn_parallel`'s `M` is the lane count.
- **Pipeline depth**: `spn_pipeline`'s `RPS` sets the rounds per stage.
- **S-box form**: `COMPACT` picks the gate-level S-box in any engine.

## Where this design departs from, or goes beyond, the description it follows

- The last round is kept without a permutation, as the SPN is defined. As a result, the 64-bit
  ciphertexts differ from published PRESENT by the mapping given above.
- The gate-level S-box uses OR in two places where a plain reading of the textbook gate sequence
  would give XOR. Only the OR version reproduces the S-box table.
- Added interface details that the source leaves open:
  - `ready`, `key_ready`, `keys_valid`;
  - the selectable register's enable;
  - flags that are ignored while busy;
  - the pipeline flush on a new key;
  - the asynchronous reset.
- The parallel engine's lane count (4) is a choice, since the source keeps it general. The unrolled
  engine's default is the 16-bit cipher, because 31 rounds cannot be unrolled by 4.
- The serial engine finishes the last round with a key XOR behind the S-box and output-side
  inverse wiring, not with an extra clock.
- The source says the inverse of the permutation equals the permutation, for the 64-bit cipher
  too. That holds only for the 16-bit permutation. This design follows the 64-bit permutation
  table and gives decryption the true inverse wiring and reordered round keys.
- CTR uses the full 64-bit block as keystream and a 64-bit counter incremented by one. The CBC
  chaining register, the IV load and the flags are this design's own.
- Not built:
  - decryption in the unrolled, parallel, pipelined or serial architectures (only the basic
    iterative one is built);
  - the *partial* serial variant with four S-boxes, which is only named in a comparison table;
  - software techniques such as table lookup and bit slicing.
