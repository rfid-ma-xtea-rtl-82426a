# RFID mutual authentication with XTEA in CBC mode

An RFID reader and a tag that share a 128-bit secret key prove to each other
that they hold it, without ever sending the key. They exchange random
64-bit nonces and run them through the XTEA block cipher in cipher block
chaining (CBC) mode. The reader turns the tag's nonce into a *challenge* by
decrypting it. The tag accepts the reader only if re-encrypting the challenge
gives back its own nonce. The tag then sends a *response*, and the reader
accepts the tag only if decrypting that response gives back the expected
nonce. Before this, a lighter *identification* step runs: the tag encrypts a
random identity, and the reader checks the ciphertext.

This SystemVerilog implements the reader, the tag, the XTEA cipher and the
two-block CBC unit as synthesizable RTL. It follows the scheme in the
article *"RFID-MA XTEA: Cost-Effective RFID-Mutual Authentication Design
Using XTEA Security on FPGA Platform"*. Where that description is
incomplete or contradicts itself, the choices made here are listed under
[Departures and open points](#departures-and-open-points).

## A session, message by message

`rfid_ma_top` holds one `rfid_reader` and one `rfid_tag`. A wired message
link joins them; there is no radio. A pulse on `start` runs one session:

| # | direction | message | computed before sending |
|---|-----------|---------|--------------------------|
| 1 | reader → tag | `id_req` | — |
| 2 | tag → reader | `SI`, `CT` | SI = RNG; CT = XTEA_Enc(SI), one block, no IV |
|   | reader | — | identified if XTEA_Dec(CT) = SI (`tag_id_ok`); otherwise stop |
| 3 | reader → tag | `rng_req` | — |
| 4 | tag → reader | `RN1` | RN1 = RNG |
| 5 | reader → tag | `CHG` (128 bit) | RN2 = RNG; CHG = {RC1, RC2} = CBC_Dec(RN1 ‖ RN2) |
|   | tag | — | TC = {TC1, TC2} = CBC_Enc(CHG); RN3 = RNG |
|   | tag | — | reader authenticated if TC1 = RN1 (`reader_auth`); otherwise send `nak` |
| 6 | tag → reader | `TR` (128 bit) | TR = CBC_Enc(RN3 ‖ TC1) |
|   | reader | — | RR = {RR1, RR2} = CBC_Dec(TR); tag authenticated if RR1 = RN2 (`tag_auth`) |

`‖` joins two 64-bit blocks. The first block always sits in bits 127:64.
Every message is a one-clock pulse whose data is valid in the same clock.
The tag accepts a new `id_req` whenever it is waiting for the reader.
So after a failed session, the next `start` begins cleanly.

### Why the reader check works

CBC decryption followed by CBC encryption, with the same key and IV, gives
back the original blocks. So TC = CBC_Enc(CBC_Dec(RN1 ‖ RN2)) = RN1 ‖ RN2.
Its first half, TC1, equals RN1 only if the reader holds the right key and IV.
The tag never sends RN1 encrypted in any other way, so only a reader with the
key can produce a challenge that passes.

### Why the tag check passes only with equal nonces

This is the least obvious part of the scheme, and it is implemented exactly
as specified. The reader decrypts TR = CBC_Enc(RN3 ‖ TC1) and gets
RR = RN3 ‖ TC1, so **RR1 is the tag's nonce RN3, not the reader's RN2**. The
check RR1 = RN2 passes only if the tag's third generator gives the same number
as the reader's generator. The reference simulation of the scheme shows
exactly that: all three generators print the same value. The generators here
are deterministic LFSRs (see below). The seeds `SEED_RN1`, `SEED_RN2` and
`SEED_RN3` default to the same value, and every generator steps once per
session, so RN1 = RN2 = RN3 in every session and the check passes. Give
`SEED_RN3` a different value and `tag_auth` stays 0, even with matching keys.
`rfid_ma_top_tb` tests both cases. If you build on this design, change the
tag check to something that uses information only the reader knew. One
option is RR2 = RN1, which holds with chained encryption. That would be a
change to the protocol.

## XTEA core: four phases per cycle

`xtea_core` is iterative. XTEA works on two 32-bit words. One *cycle* is two
Feistel rounds, and the 64 rounds take 32 cycles. A 2-bit phase counter
(`phase_e` in `xtea_pkg`) splits each cycle into four clocks:

| phase | data path | key schedule (`xtea_key_sched`) |
|-------|-----------|--------------------------------|
| 00 | Rin ← I1 | Kout ← sum + K[sum & 3] (enc) or sum + K[(sum≫11) & 3] (dec); sum ← sum ± δ |
| 01 | I0 ← I0 ± Rout | — |
| 10 | Rin ← I0 | Kout ← sum + K[(sum≫11) & 3] (enc) or sum + K[sum & 3] (dec) |
| 11 | I1 ← I1 ± Rout | — |

The round function (`xtea_round_fn`) is
Rout = Kout ^ (((Rin ≪ 4) ^ (Rin ≫ 5)) + Rin). δ is 0x9E3779B9. Encryption
adds and starts from sum = 0. Decryption subtracts and starts from
sum = δ·32. For decryption, the two input words are swapped on the way in
and out. This lets one data path serve both directions: for encryption
I1 = din[63:32] and I0 = din[31:0]. In standard XTEA notation a block is
{v1, v0}, with v0 in the low word, and the key is {K3, K2, K1, K0}, with K0
in bits 31:0. With that layout the core matches the published XTEA test
vectors; `xtea_core_tb` checks two of them.

A block takes 128 clocks from the `start` clock to `done`. `ed` selects the
direction (0 = encrypt) and is sampled with `start`. The key must stay
stable while the core is `busy`.

## The CBC pair and `CHAIN_ENC`

`xtea_cbc` holds two XTEA cores and works on two blocks at once.

* **Decryption** is true CBC: P1 = Dec(C1) ^ IV, P2 = Dec(C2) ^ C1. Both cores
  run in parallel, so it takes 129 clocks.
* **Encryption with `CHAIN_ENC = 1`** (default) is true CBC:
  C1 = Enc(P1 ^ IV), C2 = Enc(P2 ^ C1). Block 2 must wait for C1, so it takes
  258 clocks.
* **Encryption with `CHAIN_ENC = 0`** encrypts both blocks in parallel, each
  XORed with the IV: C1 = Enc(P1 ^ IV), C2 = Enc(P2 ^ IV). It takes 129 clocks.
  The source's timing table (same time for encryption as for decryption) and
  its simulation values (two equal response blocks from two equal inputs)
  fit this variant, not true CBC. It is kept as an option. It is not a secure
  mode.
* **`single = 1`** is one plain XTEA block of `din[127:64]`, with no IV. The
  identification step uses it.

The authentication works in both modes, because TC1 = Enc(RC1 ^ IV) = RN1
either way. What changes is TC2, TR2 and RR2, and the time each tag
encryption takes.

## Random numbers

`rng64` is a 64-bit Fibonacci LFSR with XNOR feedback from bits 63, 62, 60
and 59 (taps 64, 63, 61, 60). The all-zero state is legal. All ones is the
lock-up state, so never use it as a seed. Each request shifts the register
`STEPS` (default 30) times, then presents the value with a `valid` pulse, 31
clocks after the request. From a zero seed, the register fills with ones from
the bottom. 30 steps give 0x3FFF_FFFF, and 60 steps give 0x0FFF_FFFF_FFFF_FFFF,
the value the reference simulation shows for all three nonces. The generator
is deterministic after reset. A real tag needs a true entropy source in its
place.

## Timing

The source reports the time of each step at an unstated clock. Its 2.560 µs
for one CBC operation equals 128 clocks of 20 ns, which is exactly one XTEA
block here. The table below uses that 20 ns clock. The numbers are measured
by `rfid_ma_full_tb` at the default parameters (chained encryption):

| step | clocks | µs at 20 ns | source's time |
|------|--------|-------------|---------------|
| tag identification | 295 | 5.90 | not reported |
| RN1, then RN2 | 33 + 33 | 1.32 | 0.605 (both) |
| reader challenge (CBC decrypt) | 130 | 2.60 | 2.585 |
| tag challenge (CBC encrypt) | 260 | 5.20 | 2.580 |
| RN3 | 32 | 0.64 | 0.610 |
| reader authenticated | 1 | 0.02 | 0.020 |
| tag response (CBC encrypt) | 259 | 5.18 | 2.560 |
| reader response (CBC decrypt) | 131 | 2.62 | 2.580 |
| tag authenticated | 1 | 0.02 | 0.020 |
| **mutual authentication** | **880** | **17.6** | **11.555** |

With `CHAIN_ENC = 0`, each tag encryption drops to about 130 clocks, and the
mutual authentication takes 621 clocks (12.4 µs). The remaining gap comes
from the nonces: the source lists RN1 and RN2 as one step, while here the
reader draws RN2 only after RN1 has arrived, as the message order requires.

## Interfaces

`rfid_ma_top` parameters: `ROUNDS` (64), `CHAIN_ENC` (1), `RNG_STEPS` (30),
`SEED_SI`, `SEED_RN1`, `SEED_RN2`, `SEED_RN3`.

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | clock; asynchronous reset, active high |
| `start` | in | 1 | pulse: run one session (ignored while `busy`) |
| `reader_key`, `tag_key` | in | 128 | each side's copy of the key, {K3, K2, K1, K0} |
| `reader_iv`, `tag_iv` | in | 64 | each side's CBC IV (0 in the reference run) |
| `done` | out | 1 | pulse at the end of every session, pass or fail |
| `busy` | out | 1 | session running |
| `tag_id_ok`, `reader_auth`, `tag_auth` | out | 1 | outcomes; held until the next `start` |
| `secure_id`, `secure_id_ct` | out | 64 | SI and CT of the identification step |
| `random_gen1..3` | out | 64 | RN1, RN2, RN3 |
| `reader_challenge`, `tag_challenge` | out | 128 | CHG and TC |
| `tag_response`, `reader_response` | out | 128 | TR and RR |

The key and IV are separate for each side, so mismatches can be tested. A
wrong tag key fails identification. A wrong tag IV passes identification
(which uses no IV) but fails reader authentication.

The sub-units all use the same handshake. Pulse `start`/`req` while `busy` is
low, with inputs valid in that clock. `done`/`valid` pulses for one clock, and
the result holds until the next request. Assertions in `xtea_cbc`,
`rfid_tag` and `rfid_reader` check that no unit is started while busy.

## Departures and open points

* **Chained CBC by default.** The mode is defined with chaining, but the
  reported timing and simulation values fit parallel, unchained encryption.
  `CHAIN_ENC` selects between the two.
* **Which half is checked.** The source's algorithm, message diagram and
  text disagree on which half of TC is compared with RN1 (TC1 or TC2), which
  half of TC goes into the response, and which half of RR is compared with
  RN2. This design uses the first half (bits 127:64) everywhere. That is the
  reading its simulation confirms.
* **Equal nonces.** As explained above, tag authentication depends on RN3 =
  RN2. This is kept as specified.
* **Identification.** The source says the reader decrypts CT and compares
  it with SI, but not how the reader knows SI. Here the tag sends SI in the
  clear next to CT. This only proves the tag holds the key; it hides nothing.
* **Failure signalling.** The tag's `nak` message and its restart on a new
  `id_req` are additions. The source does not say what happens after a
  failed check.
* **Iterative, not pipelined.** The source calls its XTEA pipelined, with the
  key schedule running in parallel. Here the key schedule runs alongside the
  data path within each cycle, but one block occupies a core for all 64
  rounds, and there is no block-level pipeline.
* **Not built:** the back-end database server, which the source names but
  gives no role, and the radio front end. The reader and tag talk over plain
  wires.
* **FPGA results.** Resource counts, frequency and power for Spartan-3E and
  Artix-7 are not reproduced.

## Simulating

Every file is plain SystemVerilog-2017. With Verilator 5, from the directory
that holds `rtl/` and `tb/`:

```sh
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  --top-module rfid_ma_full_tb -y rtl -y tb +libext+.sv \
  rtl/xtea_pkg.sv tb/xtea_ref_pkg.sv tb/rfid_ma_full_tb.sv
./obj_dir/Vrfid_ma_full_tb
```

Replace the top module and the last file with any other testbench. Each one
ends by printing `TB_RESULT checks=<n> failures=<m>`.

| testbench | what it shows |
|-----------|---------------|
| `xtea_round_fn_tb` | round function against independent arithmetic, 2000 random pairs |
| `xtea_key_sched_tb` | every round key of full encryption and decryption runs |
| `xtea_core_tb` | published XTEA vectors, random encrypt/decrypt pairs, 128-clock latency |
| `xtea_cbc_tb` | chained and parallel CBC, decryption, single block, and their latencies |
| `rng64_tb` | LFSR sequence and latency; 30 and 60 steps from a zero seed |
| `rfid_tag_tb` | tag against a modelled reader: good and bad challenges, non-zero IV, restart |
| `rfid_reader_tb` | reader against a modelled tag: wrong CT, `nak`, wrong RN3, non-zero IV |
| `rfid_ma_top_tb` | whole sessions on three tops (chained, parallel, unequal RN3), key and IV mismatches, a count of every outcome, session lengths |
| `rfid_ma_full_tb` | one session at the default parameters with every value checked and the step times above |

The reference models in `tb/xtea_ref_pkg.sv` are written from the XTEA
algorithm itself, not from the RTL.

## Files

`rtl/xtea_pkg.sv` holds the shared types (`block_t`, `key_t`, `dblock_t`,
`phase_e`) and δ. Then, bottom-up: `xtea_round_fn`, `xtea_key_sched`,
`xtea_core`, `xtea_cbc`, `rng64`, `rfid_tag`, `rfid_reader`, `rfid_ma_top`.
