# ANU-II block cipher: iterative two-rounds-per-clock encryption and decryption

ANU-II is a lightweight 64-bit Feistel block cipher meant for constrained
devices such as RFID tags and smart cards. It has 25 rounds, a 128-bit key
(an 80-bit key variant exists but is not built here) and only one 4-bit S-box.
This RTL implements it as a small iterative engine that computes **two rounds
per clock**, so a block is encrypted in **13 clocks**, with a companion
decryption engine of the same shape. Each engine holds the 64-bit state and
the 128-bit key in registers and nothing else: about 200 flip-flops, 20 four-bit
S-box lookup tables, XORs and free wiring for the rotations.

## The cipher

The 64-bit block is split into two 32-bit halves, L (bits 63..32) and R
(bits 31..0). Round *i* (i = 0..24) uses two 32-bit subkeys read from the
current 128-bit key register K: `rk1 = K[31:0]` and `rk2 = K[63:32]`.

```
t1 = S(L) ^ (R >>> 3) ^ rk1          S applied to all 8 nibbles of L, in place
t2 = (t1 <<< 10) ^ R ^ rk2
(L, R) <- (t2, t1)                   the two results swap halves
```

After the round the key register is updated:

```
K <- K <<< 13                        128-bit rotation
K[7:4] <- S(K[7:4]);  K[3:0] <- S(K[3:0])
K[63:59] <- K[63:59] ^ i             i is the 5-bit round number 0..24
```

The S-box (`anu2_pkg::SBOX`):

| x    | 0 | 1 | 2 | 3 | 4 | 5 | 6 | 7 | 8 | 9 | A | B | C | D | E | F |
|------|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|---|
| S(x) | E | 4 | B | 1 | 7 | 9 | C | A | D | 2 | 0 | F | 8 | 5 | 3 | 6 |

Every round, the 25th included, ends with the swap. The ciphertext is (L, R)
after round 24. Fixed rotations cost no logic: they are just wiring
(`anu2_rot`).

A known answer computed with this design and its independent testbench
model: plaintext 0 under key 0 gives ciphertext `5aac94c2b4dcb8c6`. No
published test vector was available to confirm it, so the bit-level conventions
above (nibble placement, the round number the key update uses, the swap in the
last round) are this design's reading of the cipher's description. A different
convention elsewhere would give different ciphertexts; see "Choices" below.

## Datapath of the encryption unit (`anu2_encrypt`)

```
 P_MSBi  P_LSBi  KEY
   |       |      |
  MUX     MUX    MUX  <-- load (S0) / feedback (S1)
   |       |      |
 [msb_q] [lsb_q] [key_q]          32 + 32 + 128 flip-flops
   |       |      |
   +--- slot 0: anu2_round + anu2_key_step (round rc)
   |       |      |
   +--- slot 1: anu2_round + anu2_key_step (round rc+1), bypassed when rc+1 = 25
   |       |      |
   +-------+------+--> back to the multiplexers
```

The registers feed a chain of `UNROLL` round slots (default 2). Slot *k*
computes round `rc + k` together with that round's key update, so one clock
advances both the state and the key by two rounds. 25 is odd: on the 13th
clock (rc = 24) slot 1 would compute a 26th round, so a multiplexer bypasses
it and state and key pass through unchanged. This bypass is what makes
13 clocks give exactly 25 rounds.

`C_MSBi`/`C_LSBi` are the half registers themselves; they hold the ciphertext
while `ANU_Ready` is high. `key_last` is the key register; once `ANU_Ready` is
high it holds the key after the 25th update, which is what decryption needs.

`UNROLL = 1` gives the one-round-per-clock variant (8 data S-boxes, 2 key
S-boxes, 25 clocks per block); the testbenches run it alongside the default.

## Controller and timing (`anu2_ctrl`)

Three states:

| state | meaning | leaves |
|-------|---------|--------|
| S0 | registers load plaintext and key | to S1 on the next enabled clock |
| S1 | UNROLL rounds per enabled clock, `rc += UNROLL` | to S2 when the advanced count exceeds 24 |
| S2 | `ANU_Ready = 1`, `rc = 0`, result held | only through `rst` |

`rst` is synchronous and active high; it forces S0 from any state. `ctr` is a
clock enable: with `ctr` low nothing changes (state, counter, data and key all
hold). The controller asserts that `rc` stays below 25 in S1 and is 0 elsewhere.

Timing of one encryption with `ctr` held high:

```
clock edge   1      2      3 ... 14     15
state       S0 ->  S1 ->  S1 ... S1 ->  S2
rc           0      0      2 ... 24      0
work       load   r0,r1  r2,r3  r24      (ANU_Ready high after edge 15)
```

That is, one load clock and 13 round clocks after `rst` falls. The inputs are
sampled only on the load clock and may change afterwards. To start the next
block, pulse `rst` again: a block costs 15 clocks from one reset to the next
result (1 reset, 1 load, 13 rounds). A throughput figure of 64 bits per
13 clocks counts only the round clocks.

## Decryption (`anu2_decrypt`)

Decryption has the same registers, controller and 13-clock timing. It needs the
subkeys in reverse order, last round first. Instead of storing 25 subkeys,
the unit takes the key that encryption leaves in its key register (the key
after the 25th update, `key_last`) and runs the key schedule backwards:
`anu2_key_step_inv` undoes one update (XOR the round number back into bits
63..59, inverse S-box on bits 7..0, rotate right by 13) and hands out the
subkeys of the recovered key. Slot *k* on the clock with counter `rc` undoes
encryption round `24 - rc - k`:

```
R = L' ^ (R' <<< 10) ^ rk2          (L', R') is the state after the round
L = S^-1(R' ^ (R >>> 3) ^ rk1)
```

(`anu2_round_inv`, using `anu2_sbox_inv`, whose table is computed from the
forward table at elaboration.) So decrypting a block needs the ciphertext
**and** the final key of its encryption, not the original key. Deriving that
final key from the original key takes one encryption-unit run of the key
schedule (or software).

## Top level (`anu2_top`)

The two units sit side by side with a shared `clk` and `rst` and separate
enables (`enc_ctr`, `dec_ctr`) and data ports. `enc_key_last` brings the
encryption key register out; connect it to `dec_key` to decrypt what was just
encrypted. The top does not connect them internally so that a stored
ciphertext/key pair can be decrypted on its own. Parameters `ROUNDS` (25) and
`UNROLL` (2) pass down to both units.

| port | dir | width | meaning |
|------|-----|-------|---------|
| clk, rst | in | 1 | clock, synchronous reset of both units |
| enc_ctr | in | 1 | encryption enable |
| enc_key | in | 128 | key |
| enc_p_msb, enc_p_lsb | in | 32 each | plaintext 63..32, 31..0 |
| enc_c_msb, enc_c_lsb | out | 32 each | ciphertext |
| enc_ready | out | 1 | ciphertext valid |
| enc_key_last | out | 128 | key after the last update |
| dec_ctr | in | 1 | decryption enable |
| dec_key | in | 128 | key after the last encryption update |
| dec_c_msb, dec_c_lsb | in | 32 each | ciphertext |
| dec_p_msb, dec_p_lsb | out | 32 each | plaintext |
| dec_ready | out | 1 | plaintext valid |

The encryption unit itself keeps the port names of the cipher core's
interface: `KEY`, `P_MSBi`, `P_LSBi`, `clk`, `ctr`, `rst`, `C_MSBi`, `C_LSBi`,
plus `ANU_Ready` and `key_last`.

## Choices and departures

Where the cipher's hardware description is silent or inconsistent, this design
chose:

- **Two rounds per clock.** The description gives both "8 S-boxes for the
  data layer, 2 for the key schedule" (one round's worth) and "two rounds per
  clock, 13 clocks per block". The 13-clock latency is followed, so the
  default engine has 16 + 4 S-boxes. `UNROLL = 1` is the 8 + 2 S-box variant.
- **Bypass of the unused 26th round slot** on the last clock (not described).
- **The key update of round i uses round number i** (0..24); round 0 uses the
  loaded key unchanged.
- **In-place nibbles:** S-box *k* takes and returns nibble *k*.
- **The 25th round swaps like the others.**
- **Synchronous reset, `ctr` as a clock enable, S2 left only by reset,** as
  the state diagram has it. There is no automatic restart.
- **Ports added:** `ANU_Ready` (named in the state diagram but absent from
  the port list) and `key_last`.
- **Backward key schedule for decryption**, and decryption taking the final
  key rather than the original key.
- Only the 128-bit key is built.

Reported FPGA figures (slices, frequency, power) are not something RTL
simulation can confirm.

## Files

| file | contents |
|------|----------|
| `rtl/anu2_pkg.sv` | widths, types, S-box table, inverse-S-box function |
| `rtl/anu2_sbox.sv`, `rtl/anu2_sbox_inv.sv` | 4-bit S-box and its inverse |
| `rtl/anu2_rot.sv` | fixed rotation (wiring only) |
| `rtl/anu2_round.sv`, `rtl/anu2_round_inv.sv` | one encryption / decryption round |
| `rtl/anu2_key_step.sv`, `rtl/anu2_key_step_inv.sv` | one key-schedule step forward / backward |
| `rtl/anu2_ctrl.sv` | S0/S1/S2 controller with round counter |
| `rtl/anu2_encrypt.sv`, `rtl/anu2_decrypt.sv` | the two iterative units |
| `rtl/anu2_top.sv` | both units side by side |
| `tb/anu2_ref_pkg.sv` | independent software model of the cipher |
| `tb/tb_*.sv` | one self-checking testbench per module |
| `tb/tb_anu2_throughput.sv` | back-to-back stream of 200 blocks, clocks per block |

## Verification and simulation

Every module has a self-checking testbench that compares against
`tb/anu2_ref_pkg.sv`, a bit-level model written separately (its own copy of
the S-box table, rotations written as shifts). They cover: all S-box entries
and the permutation property; the inverse S-box; the rotations; rounds, key
steps and their inverses on random data (inverses checked by round trip); the
controller's sequence for UNROLL 2 and 1, with stalls; both units on random
blocks, checking the result, the final key, the 13-clock (and 25-clock)
latency, stalls and the held result; and the top end to end at its default
parameters. In that last test 31 blocks are encrypted and then decrypted with
the unit's own final key. It counts the load, two-round clocks, the bypassed
slot, `ctr` stalls, the S2 hold, reset out of S2 and decryptions, and fails if
any never happened. `tb_anu2_throughput` encrypts 200 blocks back to back
and measures 13 round clocks and 15 clocks per block in total. It prints the
resulting rate at the clock frequencies reported for FPGA builds of this
architecture (305 to 778 MHz). Counting round clocks only, that gives
1502 to 3831 Mbit/s; counting reset to reset, 1302 to 3320 Mbit/s. Each test prints
`TB_RESULT checks=N failures=M`.

To run one with Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  --top-module tb_anu2_top rtl/anu2_pkg.sv tb/anu2_ref_pkg.sv tb/tb_anu2_top.sv
./obj_dir/Vtb_anu2_top
```

Replace `tb_anu2_top` by any other testbench name. Each runs in seconds.
