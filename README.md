# Triple AES-128 with Secure Double Rate Registers

This design computes Triple AES, `C = E_K1(D_K2(E_K1(P)))`, and its inverse,
`P = D_K1(E_K2(D_K1(C)))`, on 128-bit blocks. It is built from iterative
AES-128 cores whose pipeline registers are *secure double rate registers*
(SDRRs), a register-transfer-level countermeasure against power analysis
attacks. An SDRR holds one real and one random word at all times. Because
real and random words alternate through each register, the combinational
logic between registers spends every other clock cycle on random data. The
logic that handles real data is not duplicated, so the protection costs little
area: one multiplexer and one extra register per pipeline register.

## The secure double rate register (`rtl/sdrr.sv`)

```
            sel
             |
 data_in --0-|\
             | |--> [R1] --> [R2] --> data_out
 rnd_in  --1-|/     ck        ck
```

Both registers are clocked on every rising edge of `ck`. `ck` runs at **twice**
the rate of the unprotected design. `sel` is the clock of the unprotected
design: it toggles on every `ck` edge. Edges where `sel = 0` are called *real*
edges, and the other edges *random* edges.

* On a real edge, R1 captures the real result of the logic in front, and R2
  takes the random word that R1 held.
* On a random edge, R1 captures a fresh random word, and R2 takes the real
  word.

So `data_out` carries real data in every cycle with `sel = 0` and random data
in every cycle with `sel = 1`. The logic after the register sees that same
alternation. A real word written on one real edge is consumed by the next
stage on the next real edge. To the control logic, an SDRR therefore behaves
exactly like the plain register it replaces, clocked at the reference rate.
All the timing below is counted in **reference cycles** (pairs of `ck` cycles).
A core's controller advances only on real edges.

An SDRR has no enable. Every stage captures something on every edge, and the
round controller only decides which captured values matter.

## The AES-128 encryption core (`rtl/aes_enc_sdrr.sv`)

This is an iterative core with a four-stage internal pipeline, one stage per
round layer:

```
 st ─> SubBytes ─> [SDRR sb] ─> ShiftRows ─> [SDRR sr] ─> MixColumns ─> [SDRR mc] ─┐
 ^                                              │ (round 10 bypass)                  │
 │                  plaintext reg (round 0) ────┼─────────────┐                      │
 │                                              v             v                      v
 └──────────────── [SDRR st] <── XOR round key <── mux (round 0 / 10 / others) ──────┘
                        └──> output reg ct (after round 10)
```

Each round occupies four phases. A block takes 11 rounds × 4 = **44 reference
cycles** (88 `ck` cycles):

| round | phase 0 | phase 1 | phase 2 | phase 3 |
|---|---|---|---|---|
| 0 | – | – | – | st ← pt ⊕ rk0 |
| 1..9 | sb ← SubBytes(st) | sr ← ShiftRows(sb) | mc ← MixColumns(sr) | st ← mc ⊕ rk_r |
| 10 | sb ← SubBytes(st) | sr ← ShiftRows(sb) | st ← sr ⊕ rk10 | ct ← st, `done` |

Round 0 uses only its last phase, which keeps every round four phases long. In
round 10 the MixColumns stage is bypassed, so the final AddRoundKey happens one
phase early. The extra phase copies the AddRoundKey register to the output.
The round key register steps forward once per round, at phase 3 of rounds
0..9.

The four round registers are SDRRs. The plaintext register, the key register
and the output register are ordinary registers. They hold public data
(plaintext, ciphertext) or the key itself, not the round-0 and round-1
intermediates that the countermeasure targets. Each SDRR takes the `rng` word
rotated by a different multiple of 32 bits, so different stages receive
different random words in the same cycle.

## The AES-128 decryption core (`rtl/aes_dec_sdrr.sv`)

The decryption core mirrors the encryption core with the inverse layers, in
FIPS-197 inverse-cipher order:

```
 st ─> InvShiftRows ─> [SDRR isr] ─> InvSubBytes ─> [SDRR isb] ─> ⊕ rk ─> [SDRR ark] ─> InvMixColumns ─> mux ─> [SDRR st]
```

* Round 0 loads `ct ⊕ rk10` into the state.
* Rounds 1..9 apply InvMixColumns.
* Round 10 bypasses InvMixColumns and produces the plaintext.

The round keys are needed in reverse order, rk10 first. The key register
(`rtl/aes_key_sched.sv`) can step one round forward or one round backward.
After `start`, the decryption core first runs ten forward steps to reach rk10.
It then steps backward once per round. This costs 10 reference cycles, so a
decryption takes **54 reference cycles**. The benefit is that no table of 11
round keys is stored.

## Triple AES (`rtl/triple_aes_enc.sv`, `rtl/triple_aes_dec.sv`)

Each direction chains three cores:

* encryption: E (K1) → D (K2) → E (K1)
* decryption: D (K1) → E (K2) → D (K1)

`start` captures the block and both keys. Each stage is started by the `done`
pulse of the stage before it. A new block is accepted only when the whole
chain is idle, so blocks are not overlapped. If K1 = K2, the first two stages
cancel and the result equals single AES-128 with K1. Avoid equal keys when
triple strength is wanted. The testbenches check this case on purpose.

## Top level (`rtl/triple_aes_sdrr.sv`)

The top holds an encryption channel and a decryption channel side by side.
They share `key1`, `key2`, `rng` and the `sel` toggle flip-flop that the top
generates. The two channels are otherwise independent and can run at the same
time.

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | double-rate clock, asynchronous active-low reset |
| `rng` | in | 128 | random word. Supply a fresh one every `clk` cycle. The generator is not part of this design. |
| `key1`, `key2` | in | 128 | K1 and K2, sampled when a channel accepts `start` |
| `enc_start`, `enc_pt` | in | 1, 128 | start an encryption (ignored while `enc_busy`) |
| `enc_busy`, `enc_done`, `enc_ct` | out | 1, 1, 128 | busy flag, one-cycle done pulse, ciphertext (held) |
| `dec_start`, `dec_ct` | in | 1, 128 | start a decryption (ignored while `dec_busy`) |
| `dec_busy`, `dec_done`, `dec_pt` | out | 1, 1, 128 | busy flag, done pulse, plaintext (held) |

Latency is measured from the `clk` edge that accepts `start` to the edge that
sees `done`:

| operation | reference cycles | `clk` cycles |
|---|---|---|
| AES-128 encryption core | 44 | 88 or 89 |
| AES-128 decryption core | 54 | 108 or 109 |
| Triple AES encryption | 44 + 54 + 44 = 142 | 284 to 287 |
| Triple AES decryption | 54 + 44 + 54 = 152 | 304 to 307 |

The extra cycle per core depends on the phase of `sel` when the core starts.

## Shared code

`rtl/aes_pkg.sv` holds the state type, the cycle constants and the GF(2^8)
arithmetic. It also holds the S-box and the inverse S-box as functions. These are
computed as logic from their definition, `S(x) = A·x⁻¹ ⊕ 0x63`, with
`x⁻¹ = x^254`; the inverse applies the inverse affine map and then the same
inversion. No table is stored. The package also contains the
forward and backward key-expansion steps. The layers `aes_sub_bytes`,
`aes_shift_rows` and `aes_mix_columns` each have an `INVERSE` parameter. Byte
order follows FIPS-197: byte 0 of a block is bits [127:120], and byte `4c+r` is
row `r` of column `c`.

## Where this design makes its own choices

What follows the scheme and what is this design's own:

* The AES, triple-AES and SDRR structures, the 4-cycle round and the 44-cycle
  encryption follow the scheme.
* The decryption core's internal order and its 54-cycle schedule are this
  design's own.
* The on-the-fly forward and backward key schedule is this design's own.
* So are the start/busy/done handshake, the reset values and the sequential,
  non-overlapped triple chain.
* The random source is an input port. The scheme does not define one.
* Using the select as a toggling reference clock follows the description of
  the SDRR. A simulation of the original design instead drove the select as a
  static mode input, which encrypts the random word instead of the data.
  That behaviour is not reproduced.
* The unprotected reference core (plain registers in place of the SDRRs) is
  only a point of comparison and is not included.
* The original work reports delay and power on a Spartan-3 FPGA. Those numbers
  are properties of that implementation and are not reproduced here.
* No countermeasure evaluation (power traces, leakage tests) is included. The
  testbenches check functional correctness, timing and the real/random
  interleaving, not side-channel resistance.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`. The reference model `tb/aes_ref_pkg.sv` is an
independent behavioural AES-128: it finds inverses in GF(2^8) by search,
builds a full key expansion and runs the FIPS-197 cipher step by step.

* The layer and key-schedule tests use FIPS-197 example values and random
  data.
* The core tests use the FIPS-197 vectors (Appendix B and C.1) and random
  blocks. They also check the latency, that `start` is ignored while busy, and
  that the first SDRR outputs the random word in every `sel = 1` cycle.
* `tb/triple_aes_sdrr_tb.sv` runs the top end to end. It encrypts blocks,
  decrypts each ciphertext on the other channel while the next block is
  encrypted, and checks both results and latencies. It also counts the
  mechanisms the design has: both channels busy at once, starts ignored while
  busy, random cycles in all six cores, and equal keys.

To simulate with Verilator (5.x), for example the top-level test:

```
verilator --binary --timing -Wno-fatal --top-module triple_aes_sdrr_tb \
  -y rtl -y tb +libext+.sv rtl/aes_pkg.sv tb/aes_ref_pkg.sv tb/triple_aes_sdrr_tb.sv
./obj_dir/Vtriple_aes_sdrr_tb
```

Replace the top module and file name to run any other testbench. The top has
no parameters, so this run is the full-size configuration. It takes about 1.5
minutes to build and a fraction of a second to run.
