# DES with an enhanced key generation unit

This is a DES (Data Encryption Standard) cipher in SystemVerilog. In front of it
sits a key generation unit that can replace the user's 64-bit key with one of
three derived keys. The idea comes from a published VHDL design: DES's 56-bit
key space is small, so you widen the ways a key can come about. A 2-bit select
`s` picks the key the cipher uses:

| `s` | key source | depends on |
|-----|------------|------------|
| 00 | direct: the user key unchanged | `inkey` |
| 01 | 64-bit LFSR (linear feedback shift register) | `inkey`, loaded as seed during reset; then the clock count |
| 10 | chaotic map (tent map) generator | the clock count since reset only |
| 11 | two's complement of the user key | `inkey` |

The cipher itself is a standard DES that runs one round per clock. It
encrypts or decrypts a 64-bit block in 16 clock cycles. With the direct key it
matches FIPS 46-3 bit for bit. For example, key 0000000000000000 and plaintext
8000000000000000 give 95F8A5E5DD31D900.

## Block structure

```
                    +------------------ key_gen_unit -------------------+
 inkey ------------>| direct ------------------------------------ 00 \  |
   |                | lfsr_keygen (seed = inkey during rst) ------ 01  | |
   |                | chaotic_keygen (free running) -------------- 10  |-+--> desin
   +--------------->| twos_comp_keygen ---------------------------- 11 /  |      |
 s ---------------->|                                      4:1 mux      |      |
                    +---------------------------------------------------+      |
                                                                               v
 indata, decipher, ds -->  des_core:  des_control (round counter, ready flags)
                                      des_key_schedule (PC-1, shifts, PC-2)
                                      des_ip -> L/R register -> des_f -> des_ip_inv
                                                     ^  (8 x des_sbox)     |
                                                     +---------------------+--> outdata, rdy*
```

`topdes112` is the top level. It only joins `key_gen_unit` to `des_core`.

## When the key is taken: the one thing to understand

The LFSR and chaotic sources change their value on every clock edge after
reset. The multiplexer output `desin` therefore changes from cycle to cycle.
The DES core captures `desin` on the clock edge that starts an operation
(`ds` high while idle). It then keeps that key in its key-schedule registers
for all 16 rounds. So:

* In modes 00 and 11 the key is a pure function of `inkey`. Encryption and
  decryption work like ordinary DES.
* In mode 01 the key is the LFSR state `n` steps after reset. `n` is the
  number of clock edges between the release of `rst` and the starting edge.
  The seed is whatever `inkey` held while `rst` was high.
* In mode 10 the key is the chaotic state `n` steps after reset. `inkey` plays
  no part at all.

To decrypt a block in modes 01 or 10, the receiver must reproduce the same
key. Reset with the same `inkey`, and raise `ds` the same number of cycles
after reset as the sender did. The end-to-end testbench does exactly this.
Any protocol that carries `n` between sender and receiver lies outside this
RTL.

With a zero seed the LFSR never leaves zero. With an all-zero user key, modes
00, 01 and 11 therefore all use the key 0, and all three give 95F8A5E5DD31D900
for the plaintext above.

## The chaotic generator

The map is the one-dimensional piecewise-linear tent map on [-1, 1]:

```
x(n+1) = 1 + 2 x(n)   if x(n) < 0
x(n+1) = 1 - 2 x(n)   if x(n) >= 0
```

`x` is a 64-bit two's complement number with 62 fraction bits, so 1.0 is
`64'h4000_0000_0000_0000`. The initial state is the parameter `SEED` (default
0.3). The 64-bit state itself is the key.

The published description does not cover one problem of finite precision.
Doubling is a left shift, so each step pushes one bit of information out of
the top and a zero in at the bottom. A plain fixed-point tent map reaches a
fixed point within about 64 steps and then produces the same key forever. To
keep the orbit going, bit 62 of the old state (the bit lost by doubling) is
XORed into bit 0 of the new state. In simulation this perturbed map showed no
repeated state in 200,000 steps from several seeds. That is an empirical
observation, not a proof of period, and no claim is made about the quality of
the generated keys. The generator is a key-diversity mechanism, not a vetted
random source.

## The LFSR

The LFSR is a Fibonacci register of 64 stages, B63 down to B0, shifting
towards B0. The new B63 is `B0 ^ B1 ^ B3 ^ B4`, which is the polynomial
x^64 + x^63 + x^61 + x^60 + 1, a maximal-length choice. The original
description says only that the feedback is a linear function of the stages;
the width and the taps are this design's choice. `rst` loads `inkey`, and
after that the register shifts on every clock.

## The DES core

`des_core` holds a 32+32-bit L/R register and the key schedule's 28+28-bit
C/D register.

* **Start** (`ds` high while idle): `L,R <= IP(indata)` and `C,D <= PC-1(key)`.
  `decipher` is latched at the same edge. After this edge, `indata`, the key
  and `decipher` may change freely.
* **Rounds 0..15**, one per clock: `L <= R` and `R <= L ^ F(R, K)`.
  * For encryption, K is PC-2 of C,D rotated left by the standard schedule.
  * For decryption, C,D start from the same loaded value, since the 16 shifts
    total 28. K = PC-2(C,D) is used first and C,D are then rotated right, so
    K16 comes first.
* **Round 15** also writes `outdata <= IP^-1(R16 L16)`.

`des_f` is the standard round function: expansion E, XOR with the round key,
eight S-boxes and the permutation P. Each `des_sbox` is two levels of
multiplexers:

* four 16:1 multiplexers of constants, one per table row, select by the
  middle four input bits;
* a 4:1 multiplexer then selects by the outer two bits.

The published design stresses this multiplexer-based S-box. The exact
multiplexer arrangement is this design's own.

All DES constants live in `rtl/des_pkg.sv`: IP, IP^-1, E, P, PC-1, PC-2, the
shift schedule and S1..S8. They are the FIPS 46-3 tables. DES bit 1 is the MSB
of every vector (`[63:0]`, bit 63 = DES bit 1), so hex values read exactly as
in the standard.

## Interface and timing (`topdes112`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk` | in | 1 | clock, all logic on the rising edge |
| `rst` | in | 1 | synchronous reset, active high; seeds the LFSR with `inkey` and the chaotic map with `SEED` |
| `indata` | in | 64 | plaintext or ciphertext |
| `inkey` | in | 64 | user key (parity bits ignored) |
| `s` | in | 2 | key source select, table above |
| `decipher` | in | 1 | 0 encrypt, 1 decrypt |
| `ds` | in | 1 | data strobe: starts an operation when idle; ignored while busy |
| `outdata` | out | 64 | result, held until the next result |
| `rdy_next_next_cycle` | out | 1 | high during round 14: `rdy` rises two edges later |
| `rdy_next_cycle` | out | 1 | high during round 15: `rdy` rises on the next edge |
| `rdy` | out | 1 | `outdata` valid; high from 16 edges after the starting edge until the next start |

These are 201 port bits, the pin count of the original FPGA build.

* Latency is 16 clock edges from the starting edge to `rdy`.
* Holding `ds` high starts a new operation on the edge after `rdy` rises.
  Throughput is therefore one block every 17 cycles.
* `des_control` holds two concurrent assertions: the starting edge leads to
  round 0, and the last round leads to idle with `rdy` high.

## Where this RTL departs from, or adds to, the original description

* **DES tables and key schedule.** These are the standard ones. The original
  description only names the permutations and the round keys.
* **Equation for the chaotic map.** The description gives `1 + 2x` on both
  branches. This design reads it as the standard tent map (`1 - 2x` for
  x >= 0).
* **Chaotic generator details.** The number format, seed and LSB perturbation
  are this design's own. The chaotic-mode ciphertexts therefore differ from
  the published ones.
* **Two's complement.** It is computed as one's complement plus one (2^64 - key).
  The published waveforms show `0111...1` for this source when the key is
  zero, which that formula cannot give. The formula was followed.
* **LFSR.** The width (64) and the taps are chosen here. So is seeding from
  `inkey` during reset.
* **Handshake.** These are this design's own choices:
  * reset is synchronous and active high;
  * `ds` is ignored while busy;
  * `rdy` is held until the next start;
  * the ready flags come one and two cycles ahead.

  The original description names these signals but does not define them.
* **Resources.** The original FPGA build reports 448 slice registers.
  Generic synthesis of this RTL gives 319 flip-flops. Nothing is known about
  what the original design stored in addition, so the two counts cannot be
  compared.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

* `tb_des_sbox` runs all 64 inputs of all eight boxes. It checks that every
  row is a permutation, some printed entries, and three weighted checksums per
  box.
* `tb_des_ip`, `tb_des_ip_inv` and `tb_des_f` check standard worked values, for
  example IP(0123456789ABCDEF) = CC00CCFFF0AAF0AA and
  F(F0AAF0AA, 1B02EFFC7072) = 234AA9BB. They also check random inputs against
  a behavioural reference.
* `tb_des_key_schedule` checks K1..K16 of key 133457799BBCDFF1 in both
  directions, plus random keys.
* `tb_des_control` checks round sequencing, the 16-cycle latency, the ready
  flags, that `ds` is ignored while busy, and back-to-back starts.
* `tb_des_core` runs the eight published variable-plaintext known-answer
  vectors (key 0), 0123456789ABCDEF / 133457799BBCDFF1 → 85E813540F0AB405,
  and random blocks. It decrypts every result and checks the latency.
* `tb_lfsr_keygen`, `tb_chaotic_keygen`, `tb_twos_comp_keygen` and
  `tb_key_gen_unit` compare each key source and the multiplexer, cycle by
  cycle, with reference models.
* `tb_topdes112` is the end-to-end test. It covers the published operating
  point in all four modes and random blocks, keys and start cycles in every
  mode, each encrypted and then decrypted after a fresh reset with the same
  timing. It also covers an ignored mid-operation `ds`, back-to-back
  operations and start-cycle-dependent keys. Each mechanism is counted and
  must occur. The top has no parameters, so this test runs the full design.
* `tb_fig_workload` replays the published stimulus: `ds` held high from reset,
  plaintext 8000000000000000 and key 0, in each of the four modes. It
  encrypts, then decrypts after a fresh reset with the same timing. Modes 00,
  01 and 11 give 95F8A5E5DD31D900. Mode 10 gives A42EFCC5F28A0065 with the
  default `SEED`. Every decryption returns the plaintext.

`tb/des_ref_pkg.sv` holds the reference models. They are a straight-line DES
that computes all round keys first, the LFSR polynomial, and the tent map in
signed integer arithmetic. They share only the constant tables with the RTL,
and the tables are pinned by the published known-answer vectors.

## Simulating

Every file is one module or package named after the file. With Verilator 5,
for example:

```
verilator --binary --timing --assert -Irtl -Itb rtl/des_pkg.sv tb/des_ref_pkg.sv \
          tb/tb_topdes112.sv --top-module tb_topdes112 -o sim
./obj_dir/sim
```

Replace `tb_topdes112` with any other testbench. Lint a module with
`verilator --lint-only -Wall -Irtl rtl/des_pkg.sv rtl/<module>.sv`. The only
warnings are unused package constants.

To change the chaotic start value, override `SEED` on `chaotic_keygen`. To use
other LFSR taps, edit the `feedback` line in `lfsr_keygen`; the testbench's
reference in `des_ref_pkg` uses the mask `64'h1B` and must change with it.
