# First-order threshold-implementation AES-128, byte-serial, one shared S-box

This is an AES-128 encryption core protected against first-order
differential power analysis (DPA) by a *threshold implementation* (TI).
Every secret intermediate byte `x` exists in the circuit only as two
random shares, `x = x0 ^ x1`. Each share on its own is uniformly random,
so the power drawn by any one wire or register says nothing about `x`.

Linear steps (ShiftRows, MixColumns, AddRoundKey, the affine part of
SubBytes) work on each share on its own. The only non-linear step is
inversion in GF(2^8) inside the S-box. That step is built so that no
combinational cone ever sees both shares of the same value, and registers
stop glitches from spreading across stages.

The datapath is byte-serial and has **one** TI S-box. SubBytes (16 bytes)
and the key schedule's SubWord (4 bytes) share it, so a round costs 20
cycles. The S-box is pipelined, but its pipeline latency is hidden: the
four SubWord slots at the end of each round cover the time the last state
bytes need to drain. MixColumns, ShiftRows, inversion and the affine
output stage all run at the same time on different bytes. One block takes
217 cycles from `start` to `done`.

The design follows a published architecture for TI AES hardware:

* the d+1 (two-share) TI inversion with a single-cycle middle stage;
* separate isomorphism, inversion and affine stages;
* an unmasked key scheduler that borrows the TI S-box for SubWord;
* a 20-cycle round;
* an LFSR mask generator.

The exact cycle schedule, the field basis and the placement of the fresh
masks are choices made here. They are listed under *Departures*.

## The TI S-box (`ti_sbox`)

```
 a (2 shares, AES field)
   -> gf_iso        share-wise change of basis to GF((2^4)^2)
   -> ti_inversion  Stage 1 | reg | Stage 2 | reg | Stage 3 | reg
   -> sbox_affine   share-wise inverse basis change + AES affine (0x63 on share 0)
 s (2 shares)       valid 3 cycles after a
```

### Field

The tower field is `GF(2^4) = GF(2)[w]/(w^4+w+1)`, and
`GF(2^8) = GF(2^4)[Y]/(Y^2+Y+ν)` with `ν = w^3`. A tower byte is
`ah·Y + al`, with `ah` in bits 7:4 and `al` in bits 3:0. Its inverse is

```
d      = ν·ah² ⊕ ah·al ⊕ al²           (in GF(2^4))
a^-1   = (ah·Y ⊕ ah ⊕ al) · d^-1        i.e. high = ah·d^-1, low = (ah⊕al)·d^-1
```

The change of basis to and from the AES field is linear. It is given in
`ti_aes_pkg` as the images of the 8 basis bits, which come from the AES-field
roots `w = 0x5C` and `Y = 0xA2`.

### Three stages with two input shares

In each stage, a non-linear function of shared inputs is expanded into
*components*. Each component uses only one share of every input bit, which
is the non-completeness rule. The components are stored in registers and
only added back to two shares after the register.

| stage | computes | components | fresh mask bits |
|---|---|---|---|
| 1 | `d` (degree 2) | the 4 cross products `ah_i·al_j`. The linear part of share `i` is added to component `(i,i)` | 16 |
| 2 | `d^-1` in GF(2^4) (degree 3, one cycle) | 16: component `s` takes share `s[v]` of bit `v` of `d` | 64 |
| 3 | `ah·d^-1`, `(ah⊕al)·d^-1` (degree 2) | 4 cross products of (`ah`,`al` share `i`) with (`d^-1` share `j`) | 32 |

Stage 2 is the hard part. For a choice of shares `s` (one bit per input
bit), let `z_s` be the 4-bit vector with `z_s[v] = d_{s[v]}[v]`. Then

```
f_s = XOR over all U ⊆ s of  inv4(z_s with the bits in U cleared)
```

`f_s` collects exactly those monomials of `inv4` whose variable set covers
the set bits of `s`, each evaluated on the shares `s` selects. So every
monomial, with every choice of shares, lands in exactly one component, and
`XOR_s f_s = inv4(d0 ⊕ d1)`. Each `f_s` reads one share per bit, and the
top component (s = 1111) is identically zero because `inv4` is cubic. The
code builds this from an `inv4` function. It leaves the gate-level
factoring to synthesis.

Every registered set of `n` components is *ring-refreshed*: component `k`
is XORed with `r_k ^ r_(k+1 mod n)`. The masks cancel in the sum, and the
pattern re-randomises the split. `ah` and `al` are delayed two cycles, still
shared, so that Stage 3 multiplies matching data.

One S-box evaluation uses 112 fresh random bits per cycle. `lfsr_prng`
supplies them from a 128-bit LFSR (`x^128+x^126+x^101+x^99+1`) that is
stepped 112 times per clock.

## Round schedule (`aes_controller`, `ti_aes_top`)

The state is 16 shared bytes, byte `i` at column `i/4`, row `i%4`. Within a
round, cycle `c` runs from 0 to 19:

| c | S-box input | S-box output written | other |
|---|---|---|---|
| 0–15 | state byte `c`. Round 1 uses `state[c] ^ k0[c]`. Later rounds use `MixColumnsRow(column c/4, row c%4) ^ k[c]` | state byte `c-3` (for `c ≥ 3`) | key byte `c` of the new round key is made this cycle |
| 16–18 | key byte 13, 14, 15 (SubWord, RotWord order) | state bytes 13–15 | |
| 19 | key byte 12 | SubWord byte 0 → key buffer | ShiftRows on the whole state |
| 0–2 of the next round | | SubWord bytes 1–3 → key buffer | |

Why this works without a second state buffer:

* MixColumns is applied lazily, one output row per cycle, right in front
  of the S-box. Column `c/4` is read from the stored (already shifted)
  state.
* A slot is overwritten by its S-box result 3 cycles after it was read.
  By then, the column containing that slot has been read completely.
* The new round key byte `c` needs SubWord byte `c` only at cycles 0–3 of
  the next round. The S-box returns SubWord byte `c` exactly in time.

After round 10, a 16-cycle phase adds the last round key to the state, one
byte at a time, to share 0. `done` then pulses.

Latency: 1 (load) + 10 × 20 + 16 = **217 cycles** from the `start` edge to
`done`. The published architecture reports 219 cycles and 20 cycles per
round. The round length matches. The published total does not say how
its count breaks down.

## Key schedule (`key_scheduler`)

The key is not masked. Only the data path is protected. The key scheduler
holds the current round key and rewrites it one byte per cycle:

* bytes 0–3: `k'[i] = k[i] ^ SubWord(RotWord(w3))[i] ^ (i==0 ? rcon : 0)`;
* bytes 4–15: `k'[i] = k[i] ^ k'[i-4]`.

It presents each new byte in the cycle it is produced, so the byte can be
added to the S-box input at once. Key bytes enter the TI S-box as the
sharing `(k, 0)`. The two output shares are XORed back together before
they reach the key buffer.

## Interface (`ti_aes_top`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | one-cycle request. Ignored while `busy` |
| `pt_share0`, `pt_share1` | in | 128 | plaintext shares, FIPS-197 byte order (byte 0 = bits 127:120) |
| `key` | in | 128 | cipher key |
| `prng_seed_load`, `prng_seed` | in | 1, 128 | reseed the mask LFSR. An all-zero seed is replaced by a constant |
| `busy` | out | 1 | high from the cycle after `start` until the cycle in which `done` pulses |
| `done` | out | 1 | one-cycle pulse. `ct_share0 ^ ct_share1` is the ciphertext |
| `ct_share0`, `ct_share1` | out | 128 | ciphertext shares, held until the next `start` |

`pt_share*` and `key` are sampled only on the `start` edge. The caller must
supply a fresh random `pt_share1` for each block. The core does not mask
the plaintext itself.

## Departures from the published architecture

* **S-box latency 3, not 5.** The published S-box has five register
  stages, and where the extra two sit is not given. Here there is one
  register per inversion stage.
* **112 random bits per S-box, not 64.** Every registered component is
  refreshed. The published design places fewer masks, but not in a form
  that could be copied.
* **Total latency 217, not 219.** The 20-cycle round is kept.
* **Field basis.** The basis is a polynomial-basis GF((2^4)^2). The
  published area figures rely on hand-factored gates (OR/NOR merging in
  Stage 2), which are not reproduced. Area will therefore not match the
  published gate counts.
* **Interface.** The input/output format and the start/done handshake are
  choices made here.
* **Leakage checked only at register level.** Functional correctness is
  verified. Resistance to DPA on silicon or an FPGA depends on the netlist,
  placement and the quality of the masks, and needs power measurements;
  the original work used a t-test on measured traces. Simulation covers
  only register values (`tb_ti_aes_tvla`, below). The masks are assumed to
  be fresh and independent. An LFSR is a weak source for that, as it was
  in the original.

## Files

| file | contents |
|---|---|
| `rtl/ti_aes_pkg.sv` | shared types, field constants and functions (GF(2^4) multiply/invert, basis change, affine, xtime) |
| `rtl/ti_aes_top.sv` | the core |
| `rtl/aes_controller.sv` | round/cycle sequencer and S-box return delay line |
| `rtl/state_array.sv` | shared 16-byte state: read, write-back, ShiftRows, key addition |
| `rtl/mixcolumns_row.sv` | one MixColumns output byte, share-wise |
| `rtl/key_scheduler.sv` | byte-serial unmasked AES-128 key expansion |
| `rtl/ti_sbox.sv` | S-box = `gf_iso` + `ti_inversion` + `sbox_affine` |
| `rtl/ti_inversion.sv` | 3-stage two-share TI inversion |
| `rtl/gf_iso.sv`, `rtl/sbox_affine.sv` | basis change in; basis change out plus affine |
| `rtl/lfsr_prng.sv` | mask generator |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_ti_aes_tvla` |

## Simulation

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. It
also has a watchdog. For example:

```
verilator --binary --timing --assert -Irtl -Wno-fatal \
          rtl/ti_aes_pkg.sv $(ls rtl/*.sv | grep -v ti_aes_pkg) \
          tb/tb_ti_aes_top.sv --top-module tb_ti_aes_top
./obj_dir/Vtb_ti_aes_top
```

What the testbenches check:

* `tb_ti_aes_top` runs at the default parameters. It encrypts the FIPS-197
  Appendix B and C.1 vectors and 40 random blocks with random shares, and
  compares each with a reference AES-128 written in the testbench. It also
  checks:
  * the 217-cycle latency and the 20-cycle round period;
  * that repeated encryptions of the same input produce different output
    shares;
  * that `start` is ignored while busy;
  * that reseeding works.

  It counts each scheduling mechanism: first-round feeds, MixColumns-fed
  feeds, SubWord slots, write-backs that overlap a feed, ShiftRows and
  final key addition.
* `tb_ti_sbox` and `tb_ti_inversion` test all 256 inputs and random ones
  with random masks. They check the result exactly three cycles later
  against brute-force inversion. The inversion test also repeats with all
  masks at zero.
* `tb_gf_iso` checks the field-isomorphism properties (bijective,
  additive, multiplicative) without using the constants.
* `tb_key_scheduler` checks every round-key byte against a word-wise
  FIPS-197 expansion.
* `tb_lfsr_prng` checks the bit stream against the recurrence
  `b[n] = b[n-128] ^ b[n-126] ^ b[n-101] ^ b[n-99]`.
* `tb_aes_controller` checks every control strobe, cycle by cycle.
* `tb_ti_aes_tvla` is a fixed-versus-random leakage test on simulated
  register values, the logic-level counterpart of a TVLA power
  measurement. It runs 50,000 encryptions under one key, with the FIPS
  plaintext or random plaintexts in random order, and freshly shared
  inputs. Every cycle it records the Hamming weight of each share of the
  state register, and computes Welch's t between the two groups for each
  of the 217 cycles.
  * Both shares must stay below |t| = 4.5. In a typical run the largest
    value is about 3.3.
  * The unmasked state is also recorded, as a control, and must exceed
    4.5. It reaches several hundred, which shows the test would see
    leakage if there were any.
  * Glitch and coupling effects of a real netlist are beyond a logic
    simulation.
  * The run takes about a minute.

`NUM_ROUNDS` (default 10) exists for shortened experiments. AES-128 needs
10.
