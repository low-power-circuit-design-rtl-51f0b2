# Clockless AES-128 encryption in Null Convention Logic

This is an AES-128 encryption engine (128-bit block, 128-bit key) built as an eleven-round
pipeline with **no clock at all**. Every bit travels on two wires. Data and "empty" phases
alternate through the pipeline, and each register stage decides for itself, through a
local handshake with its neighbours, when to accept the next phase. The aim of the style is
low power: nothing switches except where a data or empty phase is actually passing. A
clocked design, by contrast, toggles its clock tree and registers every cycle. The style
also has no clock skew or clock tree to design, and its power trace hardly depends on the
data.

The logic style is Null Convention Logic (NCL). It is delay-insensitive: the circuit
computes the right answer whatever the gate and wire delays are. The rest of this file
explains the dual-rail coding, the gates, the register handshake, how the AES functions are
mapped onto those gates, and how to drive and simulate the pipeline.

## Dual-rail values and wavefronts

Each logical bit `D` is a pair of wires, rail 1 and rail 0:

| rail 1 | rail 0 | meaning |
|---|---|---|
| 0 | 1 | DATA0 (logic 0) |
| 1 | 0 | DATA1 (logic 1) |
| 0 | 0 | NULL (no data) |
| 1 | 1 | illegal |

In the RTL, a dual-rail vector `x` is always a pair of plain vectors, `x1` (rail 1) and
`x0` (rail 0). Bit `i` of both vectors forms one dual-rail signal.

The circuit alternates between two kinds of wavefront. In a **DATA wavefront** every bit
of a word goes from NULL to DATA. In a **NULL wavefront** every bit goes back to NULL. A
word is *complete* when all its bits have made the transition. A stage can tell that its
input or output is complete just by looking at the wires; no timing assumption is needed.
Because a NULL wavefront always separates two DATA wavefronts, one block can never
overwrite the next.

## Threshold gates with hysteresis

All logic is made of threshold gates, `ncl_th`. A THmn gate has n inputs and threshold m.
Its output rises once at least m inputs are asserted. It then **holds** that value until
*all* its inputs have fallen back to 0; that holding is the hysteresis. In a weighted gate,
such as TH34w22, some inputs count more than once toward the threshold. Useful instances:

* TH12: an OR gate. With a threshold of 1, hysteresis has no effect.
* TH22: a Muller C-element.
* TH44: a 4-input C-element, used in completion trees.
* TH22n: a TH22 whose reset forces the output to 0. It is used in registers.

The hysteresis is what makes a block *input-complete*. Its outputs cannot all turn DATA
before all its inputs are DATA, and they cannot all return to NULL before all its inputs
are NULL. In the RTL each gate is a level-sensitive latch: set when the threshold is met,
clear when all inputs are 0, hold otherwise. `ncl_thv` is the same gate for a whole row
of gates at once. The caller computes each gate's "threshold met" and "any input
asserted" conditions.

## Registers, handshake and completion detection

`ncl_reg_bit` is one register bit: two TH22n gates, one per rail, each gated by `ki`, plus
a NOR of the two outputs that gives `ko`. `ki` comes from the next stage:

* `ki = 1` means "request for DATA": a DATA value on the input passes through.
* `ki = 0` means "request for NULL": a NULL on the input passes through.

Either way, the bit holds its value until the other kind of wavefront is requested.
`ko = 1` means the bit holds NULL; `ko = 0` means it holds DATA.

`ncl_reg` is a row of such bits (128 by default) with **completion detection**,
`ncl_completion`. The per-bit `ko` signals are combined by a tree of TH44 gates. For 128
bits the tree has four levels: 128 → 32 → 8 → 2 → 1, and the last gate is a TH22. The
register's `ko` falls only after every bit holds DATA and rises only after every bit is
NULL. The `ko` of each register drives the `ki` of the register before it. That one wire
is the whole flow control of the pipeline.

Reset (`rst`) loads NULL into every register, so every `ko` rises to 1. The NULLs then
flow through the rounds, and the pipeline is empty and asking for DATA.

## The pipeline

```
 pt,key ─► [stage 0] ─► round 0 ─► [stage 1] ─► round 1 ─► ... ─► round 9 ─► [stage 10] ─► round 10 ─► [stage 11] ─► ct
           first reg     initial    state+key     rounds 1..9                  state+key     final        ciphertext
           no CD         AddRoundKey                                                          round        reg, ki = own ko
```

| stage | module | width (dual-rail bits) | completion detection | its `ki` comes from |
|---|---|---|---|---|
| 0 | `ncl_reg_first` | 256 (plaintext, key) | none | `ko` of stage 1 |
| 1..10 | 2 × `ncl_reg` (state, key) + TH22 | 128 + 128 | two 4-level trees, merged by a TH22 | `ko` of the next stage |
| 11 | `ncl_reg` | 128 (ciphertext) | 4-level tree | its own `ko` |

This gives 12 registers, 11 rounds, and completion detection on stages 1 to 11.

* **The round key travels with the data.** Each round expands the key it receives into its
  own round key, uses that key, and passes it on. Stages 1 to 10 therefore store the state
  and the current round key side by side, as two 128-bit registers. Their `ko` outputs are
  merged by a TH22, so the stage acknowledges only when both halves are complete. Every
  block can carry its own key, and the key signals take part in the DATA/NULL alternation
  like any other signal, which the NCL gates need.
* **Stage 0 has no completion detection.** No round stands in front of it, so nobody needs
  its `ko`. The producer watches the `ko` of stage 1 instead; the top brings it out as
  `ki_in`.
* **Stage 11 acknowledges itself.** Its `ko` drives its own `ki`. It accepts the next
  ciphertext as soon as the previous wavefront is complete, and the consumer cannot stall
  the pipeline.

## Inside the rounds

| round | module | content |
|---|---|---|
| 0 | `ncl_round_init` | AddRoundKey(plaintext, key); the key is passed on unchanged |
| 1..9 | `ncl_round #(RND)` | SubBytes → ShiftRows → MixColumns → AddRoundKey, with KeyExpansion(`RND`) in parallel |
| 10 | `ncl_round_final` | SubBytes → ShiftRows → AddRoundKey, with KeyExpansion(10) |

The AES functions are mapped onto NCL gates as follows:

* **S-box (`ncl_sbox`)**: a delay-insensitive decoder feeding OR planes.
  * Each nibble of the input byte is decoded by 16 TH44 gates; exactly one fires for a
    DATA nibble.
  * 256 TH22 gates pair a high-nibble line with a low-nibble line to form the minterm of
    the byte value.
  * Rail 1 of output bit k is the OR of the minterms whose S-box value has bit k set. Rail 0
    is the OR of all the other minterms.
  * A minterm needs all eight input bits, so the S-box is input-complete.
  * The 256-entry table is not written out in the source. `ncl_pkg::sbox_table()` computes
    it at elaboration: the inverse in GF(2^8) comes from log/antilog tables of the
    generator 3, followed by the FIPS-197 affine map.
* **SubBytes (`ncl_subbytes`)**: 16 S-boxes.
* **ShiftRows**: no gates. The package function `ncl_pkg::shift_rows` reroutes both rails
  of each bit together inside the round modules; row r moves left by r bytes.
* **MixColumns (`ncl_mixcolumns`)**: per column, `t = a0^a1^a2^a3` and
  `out_r = a_r ^ t ^ xtime(a_r ^ a_(r+1))`, built only from dual-rail XOR gates.
  `xtime` is a shift plus three XOR gates.
* **XOR (`ncl_xor`)**: per bit, four TH22 gates detect the input combinations and two OR
  gates collect them: `z1 = (a1·b0) + (a0·b1)` and `z0 = (a0·b0) + (a1·b1)`.
* **AddRoundKey (`ncl_addroundkey`)**: 128 XOR gates.
* **KeyExpansion (`ncl_keyexp #(RND)`)**: RotWord, 4 S-boxes, then the round-constant
  XOR. XOR with a constant needs no gate in dual rail: the rails of each bit where the
  constant is 1 are swapped. The word chain `w0' = w0^t`, `w1' = w1^w0'`, and so on is
  built from XOR gates.

Byte order follows FIPS-197: byte 0 of the block is bits `[127:120]`, and byte n is row
n mod 4 of column n/4.

## Driving the pipeline

Ports of `ncl_aes_top`:

| port | dir | width | meaning |
|---|---|---|---|
| `rst` | in | 1 | high: all registers NULL |
| `pt1`/`pt0` | in | 128 | plaintext rails |
| `key1`/`key0` | in | 128 | key rails |
| `ki_in` | out | 1 | `ko` of stage 1: 1 = send DATA, 0 = send NULL |
| `ct1`/`ct0` | out | 128 | ciphertext rails |
| `ko_out` | out | 1 | `ko` of stage 11: 0 = `ct` holds complete DATA, 1 = `ct` is NULL |

The protocol is four-phase:

* **Producer.** Wait for `ki_in = 1`, then apply plaintext and key as DATA
  (`pt1 = p`, `pt0 = ~p`). Wait for `ki_in = 0`, then apply NULL (all rails 0). Repeat.
  The inputs may change only after `ki_in` has changed.
* **Consumer.** When `ko_out` falls, `ct1` is the ciphertext. When it rises, `ct` is NULL
  again. The consumer must take the result while `ko_out` is 0; it cannot hold the
  pipeline.

Up to about six blocks can be in flight at once, alternating with NULL wavefronts. The time
for one DATA wavefront plus one NULL wavefront is set by the slowest stage: twice the sum
of its combinational delay and its completion-detection delay. The latency is the sum of
the stage delays. There is no cycle count; everything depends on the gate delays of the
target technology.

## What the simulation shows, and what it does not

The RTL has no delays, so a simulator settles a whole wavefront in a single time step. A
DATA wavefront applied to an empty pipeline reaches the output in the same time step.
Consequently:

* the functional result, the DATA/NULL alternation, the handshake order and the
  input-completeness of every block are all checked;
* pipeline overlap, with several blocks in flight, and the throughput cannot be observed.
  They depend on gate delays that this RTL does not model.

The gates hold state, and neighbouring stages are tied together through `ko`/`ki`. Lint
tools therefore report latches (the gates' hysteresis) and circular logic (the handshake
loop and the gate feedback). Both are intended. Verilator settles the loops by iteration.
Because a simulator starts its latches at random values, apply `rst` with all inputs NULL
before use.

The RTL is synthesizable, but a standard synthesis flow maps each threshold gate to a latch
built from ordinary cells. A real NCL implementation would map them to a threshold-gate
cell library. The whole design contains roughly 92,000 hysteresis gates, plus their OR
trees:

* rounds 1 to 9: about 8,600 each, mostly S-box minterms;
* final round: about 6,800;
* initial round: 512;
* registers and completion trees: about 6,800.

## Choices made in this implementation

These points are not fixed by the NCL scheme or the AES standard; they were chosen here:

* The round key is stored with the state in every stage, as described above. Each stage
  has two 128-bit registers with their `ko` outputs merged, rather than a single 128-bit
  register.
* The internal gate structures were chosen for this implementation: the XOR from TH22 and
  OR gates, the S-box as decoder plus OR planes, and the MixColumns XOR network. Other
  NCL mappings, for example with TH24comp or TH34w22 gates, would work the same way.
* The first register holds plaintext and key together (256 bits).
* The last register's Ki is tied to its own Ko, so the output has no back-pressure. To let
  a consumer stall the pipeline, drive the `ki` of `u_reg_out` from a port instead.
* Completion trees with fewer than four signals left in a group use THkk gates of the
  group's size (a TH22 at the top of a 128-bit tree).

## Files

`rtl/` holds one module or package per file:

| file | content |
|---|---|
| `ncl_pkg.sv` | S-box table, ShiftRows wiring and round-constant functions |
| `ncl_th.sv` | generic THmn gate with weights and reset |
| `ncl_thv.sv` | row of threshold gates |
| `ncl_xor.sv` | dual-rail XOR |
| `ncl_reg_bit.sv` | register bit |
| `ncl_completion.sv` | TH44 completion tree |
| `ncl_reg.sv` | register with completion detection |
| `ncl_reg_first.sv` | first register, without completion detection |
| `ncl_sbox.sv`, `ncl_subbytes.sv` | S-box and SubBytes |
| `ncl_mixcolumns.sv` | MixColumns |
| `ncl_addroundkey.sv` | AddRoundKey |
| `ncl_keyexp.sv` | key-expansion step |
| `ncl_round_init.sv`, `ncl_round.sv`, `ncl_round_final.sv` | the three kinds of round |
| `ncl_aes_top.sv` | the pipeline |

`tb/` holds one self-checking testbench `tb_<module>.sv` per module, and `aes_ref_pkg.sv`.
That package is a plain Boolean AES reference model written independently of the RTL: it
computes the S-box inverse as x^254, and it provides dual-rail helpers.

## Simulating

With Verilator 5, from the folder that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb \
    rtl/ncl_pkg.sv tb/aes_ref_pkg.sv tb/tb_ncl_aes_top.sv --top-module tb_ncl_aes_top -j 8
./obj_dir/Vtb_ncl_aes_top
```

Replace `tb_ncl_aes_top` with any other testbench name. Each testbench ends with a line
`TB_RESULT checks=N failures=M` and has a watchdog. The full pipeline produces about
75 MB of C++ and takes about two minutes to build on 8 cores; it then runs in well under
a second.

What the testbenches check:

* **`tb_ncl_aes_top`**: the pipeline at its full size. It encrypts 12 blocks, each checked
  against the reference model:
  * the FIPS-197 example vectors;
  * the all-zero block and key;
  * plaintext `00112233445566778899aabbccddeeff` under key
    `00001111222233334444555566667777`, which gives `9c7373ae2c03c97f085291f55707e47b`;
  * random blocks, some with new keys.

  It also checks that the output returns to a clean NULL between blocks, and that a reset
  in the middle of an operation empties the pipeline. It counts DATA and NULL wavefronts,
  requests for NULL, key changes and resets, and fails if any of them never happened.
* **Gate- and register-level testbenches.** They test hysteresis exhaustively against a
  reference gate model. They also check the register handshake, with DATA held back while
  `ki = 0` and bits arriving one by one in random order, and that `ko` changes only with
  the last bit.
* **Round- and function-level testbenches.** They apply NULL → DATA with one bit missing
  → full DATA → NULL with one bit left → NULL. They check that the output never becomes
  complete early or returns to NULL early, and that the DATA result matches the reference
  model.
