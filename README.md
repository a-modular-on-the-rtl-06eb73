# On-the-fly AES round key generator (128/192/256-bit keys, cipher and decipher)

An AES processor that runs one round per clock, or one round per pipeline
stage, needs a fresh 128-bit round key every clock. Storing the whole key
schedule costs up to 15 x 128 bits per key and a full expansion before the
first block. This design generates the round keys *on the fly*, in step with
the rounds. It supports all three AES key lengths and both directions. For the
decipher, it runs the key expansion backwards, from the last round key to the
first.

The two main generators are built from two small combinational cells:

* **Key_Exp_M**, the master cell. It holds the S-boxes and produces two key
  words.
* **Key_Exp_S**, the slave cell. It uses XORs only and produces two more key
  words.

Both cells compute the forward (cipher) and the reverse (decipher) expansion
on the same gates. Three generators are provided; the first two are wired
from these cells:

| generator | module | use |
|---|---|---|
| iterative | `round_key_gen` | non-pipelined processor: one Key_Exp_M and two Key_Exp_S, one expansion step per clock |
| pipelined | `rkg_pipelined` | fully pipelined processor: one registered cell group per round, a new key can enter every clock |
| pipelined, 128-bit only | `rkg_pipe128` | ten stages of the dedicated 128-bit cells `exp_128_e` and `exp_128_d` |

`aes_rkg_top` places the three generators side by side. The AES round datapath
that consumes the keys (SubBytes, ShiftRows, MixColumns, AddRoundKey) is not
part of this RTL. The keys leave through ports.

## The key expansion as a sliding window

The AES key expansion (FIPS-197) defines 32-bit words `w[i]`:

```
w[i] = w[i-Nk] ^ temp(w[i-1])
temp(x) = SubWord(RotWord(x)) ^ Rcon[i/Nk]   if i mod Nk == 0
        = SubWord(x)                         if Nk == 8 and i mod Nk == 4
        = x                                  otherwise
```

Here Nk = 4, 6 or 8 words, and Nr = 10, 12 or 14 rounds. Round key r is
`w[4r .. 4r+3]`.

The hardware keeps a window of Nk consecutive words as its state. The window
lives left justified in a 256-bit register, and its words are called T0..T7,
with T0 at bits [255:224]. The left-most four words are always the current
round key.

**One forward step** moves the window four words on:

* the right-most Nk-4 words slide to the left-most positions unchanged;
* four new words are computed.

**One reverse step** moves the window four words back. It uses the same
recurrence solved for the older word:

```
w[i-Nk] = w[i] ^ temp(w[i-1])
```

In a reverse step, the left-most Nk-4 words slide to the right-most positions.

Every new word needs the word just before it, so the four new words form an
XOR chain. At most one word in each step passes through the S-boxes.

Which word of the step that is depends on the key length and on the step:

| key length | cell types in each period | position of the S-box word |
|---|---|---|
| 128-bit | 1 type | the first new word, every step (with Rcon) |
| 192-bit | 3 types, E_1, E_2, E_3 | E_1: first new word (with Rcon). E_2: third new word (with Rcon). E_3: none |
| 256-bit | 2 types, E_1, E_2 | E_1: SubWord(RotWord) with Rcon. E_2: SubWord only |

The reverse steps use D cells. Each D cell inverts the forward cell that the
step undoes.

## The two cells

Key_Exp_M first transforms its `exp_in` word. The `sel` input picks one of
three transforms:

* `SEL_SUBROT`: `t = SubWord(RotWord(exp_in)) ^ {rc, 24'h0}`
* `SEL_SUB`: `t = SubWord(exp_in)`
* `SEL_PASS`: `t = exp_in`

Both cells then form two words. Key_Exp_S does the same with `t = sb_in` and
no S-box:

| e_mode | high word | low word |
|---|---|---|
| 0, cipher | `t ^ E1` | `t ^ E1 ^ E0` |
| 1, decipher | `t ^ D1` | `D1 ^ D0` |

In the forward direction:

* E1 and E0 are `w[i-Nk]` and `w[i+1-Nk]`;
* the outputs are `w[i]` and `w[i+1]`.

In the reverse direction:

* D1 and D0 are `w[i]` and `w[i+1]`;
* the outputs are `w[i-Nk]` and `w[i+1-Nk]`.

The reverse low word needs no S-box and no chaining.

Each cell has a `SPEEDUP` parameter:

* `SPEEDUP = 0` is the normal cell. The XORs are chained, so the longest path
  is SubWord + 3 XOR + 2 MUX.
* `SPEEDUP = 1` computes `E1 ^ E0` and `E1/D1 ^ Rcon` beside the S-boxes. Only
  one XOR then follows SubWord.

Both settings give the same results. The default is the normal cell.

## The iterative scheduler (`key_scheduler`, `key_sched_dp`)

Every clock, one forward or reverse step is computed from the state register
RK_R. The step uses Key_Exp_M (M), Key_Exp_S(1) (S1), Key_Exp_S(2) (S2) and
multiplexers in front of and behind them.

Three cells give six words, and a step needs four. Two pairings are used, and
never both at once:

* **M then S2.** M makes the first two words. In the cipher, M's low word
  feeds `sb_in` of S2. This pairing covers every cell except the two listed
  next.
* **S1 then M.** S1 makes two words first. This pairing covers 192-bit E_2,
  192-bit D_2 and the 128-bit decipher. In 192-bit E_2 and in the 128-bit
  decipher, S1's low word feeds `exp_in` of M, because RotWord there needs a
  word that is itself an XOR of two state words.

The full table of selections is below. T0..T7 are the state words. RX, RM and
RS are the 64-bit outputs of S1, M and S2, and `_L` marks the low word of an
output. Outputs are listed for RK_in[255:192], [191:128], [127:64] and
[63:0]. A dash marks a don't-care word.

| step | M exp_in / sel | M E or D inputs | S1 | S2 sb_in / inputs | RK_in words |
|---|---|---|---|---|---|
| 128 E | T3 / subrot | E: T0,T1 | – | RM_L / E: T2,T3 | RM, RS, –, – |
| 192 E_1 | T5 / subrot | E: T0,T1 | – | RM_L / E: T2,T3 | T4T5, RM, RS, – |
| 192 E_2 | RX_L / subrot | E: T2,T3 | sb=T5, E: T0,T1 | – | T4T5, RX, RM, – |
| 192 E_3 | T5 / pass | E: T0,T1 | – | RM_L / E: T2,T3 | T4T5, RM, RS, – |
| 256 E_1 | T7 / subrot | E: T0,T1 | – | RM_L / E: T2,T3 | T4T5, T6T7, RM, RS |
| 256 E_2 | T7 / sub | E: T0,T1 | – | RM_L / E: T2,T3 | T4T5, T6T7, RM, RS |
| 128 D | RX_L / subrot | D: T0,T1 | sb=T1, D: T2,T3 | – | RM, RX, –, – |
| 192 D_1 (inverts E_3) | T1 / pass | D: T2,T3 | – | T3 / D: T4,T5 | RM, RS, T0T1, – |
| 192 D_2 (inverts E_2) | T3 / subrot | D: T4,T5 | sb=T1, D: T2,T3 | – | RX, RM, T0T1, – |
| 192 D_3 (inverts E_1) | T1 / subrot | D: T2,T3 | – | T3 / D: T4,T5 | RM, RS, T0T1, – |
| 256 D_1 (inverts E_2) | T3 / sub | D: T4,T5 | – | T5 / D: T6,T7 | RM, RS, T0T1, T2T3 |
| 256 D_2 (inverts E_1) | T3 / subrot | D: T4,T5 | – | T5 / D: T6,T7 | RM, RS, T0T1, T2T3 |

The scheduler walks through the cell types with a counter:

* Forward step r uses cell r mod 3 for 192-bit keys and r mod 2 for 256-bit
  keys.
* A reverse pass starts with the inverse of the last forward step (forward
  step Nr-1) and counts down.

The round constant comes from `rc_gen`, an 8-bit LFSR in GF(2^8):

* it multiplies by x for the cipher, starting at Rcon[1] = 0x01;
* it divides by x for the decipher, starting at the last constant that the
  forward expansion used: Rcon[10] = 0x36, Rcon[8] = 0x80 or Rcon[7] = 0x40;
* it advances only on steps whose cell uses a constant.

## The decipher start key

The decipher starts from the last round key. That key cannot be computed from
the cipher key without running the whole expansion. The reverse expansion
also needs the Nk-4 words that follow the last round key. So `round_key_gen`
keeps a second 256-bit register, the **decipher start key**, which holds the
final Nk-word window.

It is filled in two ways:

* **Every cipher pass ends in the final window**, and the generator stores it
  for free. A decipher that follows an encryption with the same key therefore
  starts at once.
* **After a new key is written**, the stored start key is stale (`dec_ready`
  falls). A decipher start then first runs a silent forward pass, the
  pre-computation, which takes Nr + 1 extra clocks. The decipher pass follows
  on its own.

`rkg_pipelined` has no such register. For a decipher, the caller supplies the
final window as the entering key.

## Dedicated 128-bit cells (`exp_128_e`, `exp_128_d`, `rkg_pipe128`)

With 128-bit keys, every step has the same shape, so a simpler single-purpose
cell is enough. `exp_128_e` computes the next round key. It is an XOR chain
behind one SubWord(RotWord) and comes in three versions, chosen with
`VERSION`:

| VERSION | arrangement | longest path |
|---|---|---|
| 0, normal | `w4 = w0 ^ t`, `w5 = w1 ^ w4`, `w6 = w2 ^ w5`, `w7 = w3 ^ w6` | SubWord + 5 XOR |
| 1, speed-up (I) | the prefixes `w0`, `w0^w1`, `w0^w1^w2`, `w0^w1^w2^w3` are built beside the S-boxes | SubWord + 2 XOR |
| 2, speed-up (II) | Rcon is folded into the prefixes as well | SubWord + 1 XOR |

`exp_128_d` computes the previous round key:

* `w3 = w7 ^ w6`, `w2 = w6 ^ w5` and `w1 = w5 ^ w4`;
* `w0 = w4 ^ SubWord(RotWord(w3)) ^ Rcon`.

Its speed-up version forms `w4 ^ Rcon` beside the S-boxes.

Version (II) cannot be used inside the general Key_Exp_M. In 192-bit E_2, the
word entering RotWord is itself an XOR chain, so Key_Exp_M's speed-up follows
version (I).

`rkg_pipe128` chains ten stages. Stage s holds `exp_128_e` with Rcon[s+1] and
`exp_128_d` with Rcon[10-s]. A mode bit travels with each key and picks the
cell result. The round keys come out as in `rkg_pipelined`, but with 128-bit
keys only: a cipher entry gives round keys 1..10 and a decipher entry (round
key 10) gives 9..0.

## Interfaces and timing

### `round_key_gen`, iterative

| port | meaning |
|---|---|
| `key_wr`, `key_data[255:0]`, `key_len_in` | Write a cipher key. 128- and 192-bit keys are left justified. `key_len_e`: 0 = 128, 1 = 192, 2 = 256. Ignored while `busy`. |
| `start`, `e_mode` | Begin a pass. 0 = cipher, 1 = decipher. Accepted while idle. |
| `f_rk`, `f_rk_valid` | The first round key, for the initial AddRoundKey. It is valid in the cycle the pass starts: round key 0 for the cipher, round key Nr for the decipher. |
| `rk`, `rk_valid`, `rk_round` | One round key per clock for the next Nr clocks: rounds 1..Nr for the cipher, Nr-1..0 for the decipher. |
| `done` | High with the last round key. A new `start` is accepted on the next clock. |
| `busy`, `dec_ready`, `precomputing` | Status. |

The timeline of a cipher pass with a 128-bit key is:

| cycle | outputs |
|---|---|
| 0 | `start` is high and `f_rk` = RK0 |
| 1 to 10 | `rk` = RK1 to RK10 |
| 10 | `done` is high |

For a decipher without a stored start key:

| cycle | what happens |
|---|---|
| 0 | `start` is high; the pre-computation begins |
| 1 to Nr | the forward pass runs; no round keys are delivered |
| Nr+1 | `f_rk` = RK_Nr |
| Nr+2 to 2Nr+1 | `rk` = RK_(Nr-1) down to RK0 |

### `rkg_pipelined`, pipelined

| port | meaning |
|---|---|
| `in_valid`, `in_key`, `in_key_len`, `in_e_mode` | A key entering the pipeline. For a decipher, `in_key` is the final Nk-word window. |
| `f_rk` | `in_key[255:128]`, the first round key, in the entry cycle. |
| `rk[s]`, `rk_valid[s]` | Stage s, s+1 clocks after entry. It holds round key s+1 for the cipher, or Nr-1-s for the decipher. Stages beyond Nr hold the last key. |

`NSTAGE` defaults to 14, the number of rounds for 256-bit keys. Key length and
mode travel with each key, so keys of mixed length and direction can follow
each other clock by clock.

## Files

| file | contents |
|---|---|
| `rtl/aes_key_pkg.sv` | Types (`word_t`, `key_len_e`, `msel_e`). S-box computed from its definition: GF(2^8) inverse as a^254, then the affine map. SubWord, RotWord, Rcon and cell-sequencing functions. |
| `rtl/key_exp_m.sv`, `rtl/key_exp_s.sv` | The two cells. |
| `rtl/key_sched_dp.sv` | The combinational step: three cells and their multiplexers (the table above). |
| `rtl/rc_gen.sv` | The round-constant LFSR. |
| `rtl/key_scheduler.sv` | RK_R, `rc_gen`, the cell counter and `key_sched_dp`. |
| `rtl/rkg_ctrl.sv` | Control unit: passes and pre-computation. |
| `rtl/round_key_gen.sv` | The iterative generator. |
| `rtl/rkg_pipelined.sv` | The pipelined generator. |
| `rtl/exp_128_e.sv`, `rtl/exp_128_d.sv`, `rtl/rkg_pipe128.sv` | The dedicated 128-bit cells and their ten-stage pipeline. |
| `rtl/aes_rkg_top.sv` | The three generators side by side. |
| `tb/aes_ref_pkg.sv` | Reference key expansion for the testbenches, written independently of the RTL (its S-box is generated by walking powers of 3), plus the FIPS-197 Appendix A keys. |
| `tb/tb_*.sv` | One self-checking testbench per module. |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops. For example,
to run the end-to-end test of the top level at its default parameters:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb \
  rtl/aes_key_pkg.sv tb/aes_ref_pkg.sv tb/tb_aes_rkg_top.sv \
  --top-module tb_aes_rkg_top -o sim
./obj_dir/sim
```

What the testbenches cover:

* The cell tests compare random inputs with the reference S-box and the
  XOR equations.
* `tb_key_scheduler` runs cipher and decipher passes for all three key
  lengths, with the FIPS-197 keys and random keys. It compares the whole
  window after every clock, for both `SPEEDUP` settings, and it also pauses
  in mid pass.
* `tb_round_key_gen` and `tb_aes_rkg_top` also check:
  * the one-key-per-clock timing;
  * the pre-computation latency;
  * reuse of the stored start key;
  * that a key write during a pass is ignored.
* `tb_rkg_pipelined` and `tb_rkg_pipe128` stream back-to-back keys of mixed
  length and mode, with idle gaps, and check every stage every clock.

## What to trust, and where this RTL makes its own choices

The following are fixed by the AES standard and checked against FIPS-197:

* the cell equations;
* the sliding window with its bypasses;
* the per-length cell sequences, including the Rcon indices used by the first
  decipher cells.

The following are this design's own choices:

* the port protocol: key write, start, valid, done;
* the `e_mode`, `sel` and key-length encodings;
* the asynchronous active-low reset;
* the control states, and the rule that every forward pass refreshes the
  decipher start key;
* the backward step of the Rcon LFSR and its load bypass;
* in the pipelined generator, using the merged cipher/decipher cell in every
  stage, with the key length chosen per key, instead of one fixed chain for
  each length and mode;
* in `rkg_pipe128`, holding both the cipher and the decipher cell in each
  stage and choosing with a mode bit that travels with the key;
* the exact multiplexer selections in the scheduler table. They were derived
  from the key expansion itself and reproduce every FIPS-197 round key in
  both directions. The way the select signals are decoded is this design's
  own.

The S-box is written as arithmetic and left to synthesis. A ROM or a
composite-field S-box would change area and delay. The reference figures for
an implementation of this architecture are about 17,700 gates and 7.8 ns in a
0.25 um library. They were not reproduced here, and the RTL makes no timing
claim.

The gate arrangement of the speed-up cells was chosen to meet the stated
path lengths. It may differ in detail from other implementations of the same
idea.

The round datapath of the AES processor, and its input and output interfaces,
are not included.
