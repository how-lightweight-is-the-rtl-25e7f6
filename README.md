# Quasigroup S-boxes (Q-S-boxes) and a PRESENT-80 cipher built on them

A 4-bit S-box is usually a 16-entry lookup table: cheap to reason about, but it
cannot be split, folded or serialized. A *Q-S-box* computes a strong 4-bit
bijection differently. It is built from a quasigroup of order 4: a 4x4 Latin
square over the 2-bit elements {0,1,2,3}, so each quasigroup operation `a*b` is
only a 4-input, 2-output table. The 4-bit input is treated as a string of two
elements, and the string goes through four *e-transformations* (layers), each
seeded by a fixed element called the leader. Each layer is a bijection of degree
at most 2. Four of them in a row give a bijection of higher degree, whose
cryptographic strength depends on the choice of quasigroup and leaders.

Because the S-box is a stack of identical layers, the hardware can trade time for
area. It can unroll all four layers, reuse one layer for four clock cycles, or go
down to a single 2-bit lookup table used eight times. In a round-based cipher the
layer-by-layer form costs almost no extra registers, since the cipher's state
register already exists. This RTL provides all three S-box forms, plus a
round-based PRESENT-80 encryptor whose S-layer is the single-layer form.

## The quasigroup and the sample S-box

The default quasigroup (`qsbox_pkg::QG_EX1`), with row `a` and column `b` giving `a*b`:

| * | 0 | 1 | 2 | 3 |
|---|---|---|---|---|
| 0 | 0 | 2 | 1 | 3 |
| 1 | 2 | 1 | 3 | 0 |
| 2 | 1 | 3 | 0 | 2 |
| 3 | 3 | 0 | 2 | 1 |

It is a non-linear quasigroup (algebraic degree 2). It is also symmetric, so `a*b = b*a`.

The leaders default to `1, 3, 1, 3` for layers 0..3 (`LEADERS_EX1`). With these
defaults every form computes

    x    : 0 1 2 3 4 5 6 7 8 9 A B C D E F
    S(x) : E 6 C B 0 1 8 2 D 3 A F 9 5 4 7

## How one layer works

Write the input nibble as `x = {L, R}`, with `L = x[3:2]` and `R = x[1:0]`. Let `l`
be the layer's leader.

* Even layers (0, 2) run left to right: `L' = l * L`, then `R' = L' * R`.
* Odd layers (1, 3) run right to left: `R' = l * R`, then `L' = R' * L`.

Each layer is a chain of two quasigroup lookups, so the second lookup depends on
the first. The direction alternates, so each output element depends on both input
elements in both directions. In `q_layer` the leader and the direction are
inputs. Multiplexers choose which element enters the first table and where each
result lands, so one layer instance can serve every round.

Worked example, input `0000` (`L=00, R=00`):

    layer 0 (l=1, L->R): 00 00 -> 10 01
    layer 1 (l=3, R->L): 10 01 -> 01 00
    layer 2 (l=1, L->R): 01 00 -> 01 10
    layer 3 (l=3, R->L): 01 10 -> 11 10   = E

## Modules

| module | what it is | timing |
|---|---|---|
| `qsbox_pkg` | types (`elem_t`, `nibble_t`, `qtable_t`, `leaders_t`), `QS_LAYERS = 4`, default quasigroup, leaders and S-box | — |
| `quasigroup_lut` | the 4x2 table `y = a*b` | combinational |
| `q_layer` | one e-transformation layer, with leader and direction as inputs | combinational |
| `qsbox_comb` | four layers unrolled (8 tables) | combinational |
| `qsbox_iter` | `LAYERS_PER_CYCLE` chained layers (default 1), an input multiplexer and a 4-bit register; a step counter selects leaders and directions | 4 cycles per substitution (2 with two layers per cycle) |
| `qsbox_serial` | one 4x2 table and two 2-bit registers; one quasigroup operation per cycle | 8 cycles + 1 load cycle |
| `present_q_cipher` | round-based PRESENT-80 encryption; 16 multi-round Q-S-boxes in the S-layer and one in the key schedule | 125 cycles per block (63 with two layers per cycle) |
| `present_q_top` | the cipher beside the three standalone S-box forms | — |

`qsbox_pkg` is tested by `tb_qsbox_pkg`.

Every module takes the quasigroup `QG` and the leader vector `LEADERS` as
parameters. You can get any other Q-S-box from the same circuit by changing them.
The number of layers is the package constant `QS_LAYERS`.

`qsbox_iter`, `present_q_cipher` and `present_q_top` also take
`LAYERS_PER_CYCLE`. It must divide `QS_LAYERS` and leave at least two steps, so
it is 1 or 2 when `QS_LAYERS = 4`.

* The default, 1, is the smallest form: one layer per S-box, and each cipher round takes 4 cycles.
* With 2, each S-box holds two chained layers and a cipher round takes 2 cycles.
  This doubles the S-layer area but halves the latency. In the area trade-off
  this is the weaker choice: the 2-layer S-box is about as large as a plain
  lookup-table S-box.

### Handshake (qsbox_iter, qsbox_serial, present_q_cipher)

* `start` is accepted only while `busy` is low. Inputs are sampled on that clock edge.
* A `start` raised while the block is busy is ignored.
* `done` is a one-cycle pulse. The result stays on the output until the next accepted `start`.
* `rst_n` is an active-low, synchronous reset. It clears every register and aborts a running operation.

Latency is counted in clock edges, from the edge that accepts `start` to the edge on which `done` rises:

* `qsbox_iter`: 3 (1 with two layers per cycle). The accepting edge already computes the first step from `din`.
* `qsbox_serial`: 8. The accepting edge only loads the two elements.
* `present_q_cipher`: 125, which is `31 x 4` layer cycles plus one final key addition (63 with two layers per cycle).

## The cipher: PRESENT-80 with a four-cycle S-layer

The datapath is PRESENT-80: a 64-bit state, an 80-bit key register and 31 rounds.
Each round applies addRoundKey (`state ^= K[79:16]`), the S-layer and the bit
permutation `P`, which moves bit `i` to bit `16*i mod 63` (bit 63 stays). The key
schedule rotates the key left by 61, substitutes its top nibble, and XORs the
round counter into bits 19..15. A final addRoundKey follows round 31.

The 16 S-boxes are single `q_layer` instances that all receive the same leader
and direction. A 2-bit phase counter steps them through the four layers, and the
state register holds the intermediate values:

| phase | state register | key register |
|---|---|---|
| 0 | `Q0(state ^ K[79:16])` | rotate left 61, top nibble through `Q0` |
| 1 | `Q1(state)` | top nibble through `Q1` |
| 2 | `Q2(state)` | top nibble through `Q2` |
| 3 | `P(Q3(state))` | top nibble through `Q3`, `K[19:15] ^= round` |

The key-schedule S-box is this design's own choice. It is a 17th single-layer
instance that uses the same four phases, so the cipher contains no
lookup-table S-box.

Because the S-box is replaced, the cipher is **not PRESENT**. Its ciphertexts
differ from PRESENT test vectors, and its security has not been analysed. It
shows how a Q-S-box fits into a round-based SP network.

## Where the RTL goes beyond or departs from its source description

The source describes a Q-S-box generator and its mapping to hardware. The following are choices made here:

* **Element order and layer direction.** These come from the worked example, and
  they reproduce the sample S-box table above exactly. The quasigroup is symmetric, so
  whether the leader is the left or the right operand cannot be observed. The RTL
  puts the leader on the left.
* **Placement of the direction multiplexers** in `q_layer`, and the one-layer-per-cycle
  sequencing in `qsbox_iter`.
* **Granularity of `qsbox_serial`.** One 2-bit quasigroup operation per cycle, 8
  cycles per substitution. No finer serialization is described.
* **PRESENT details.** The round count, the permutation and the key schedule are
  PRESENT-80's published ones. The description gives no cycle counts. Key-schedule
  S-box handling, decryption (not built), reset and the handshake are this
  design's own choices.
* **Not built.** A fully serialized PRESENT datapath using Q-S-boxes is only
  mentioned as a comparison, so it is not built. `qsbox_serial` is a standalone
  S-box only; it is not used inside the cipher.
* **Q-S-boxes with 8 layers or more leaders.** These need `QS_LAYERS = 8` and an 8-entry
  `LEADERS`. The modules are written for that, but only 4 layers have been simulated.

## Verification

Each module has a self-checking testbench in `tb/`. Every testbench ends with a
`TB_RESULT checks=N failures=M` line.

* `tb_quasigroup_lut`: checks all 16 operand pairs and the Latin-square property.
* `tb_q_layer`: checks all 16 inputs for every leader and both directions, and checks that each layer is a bijection.
* `tb_qsbox_comb`: checks all 16 inputs against the S-box table above and against a loop-based model.
* `tb_qsbox_iter`, `tb_qsbox_iter_2layer`, `tb_qsbox_serial`: check all 16 inputs, the latency, that a start while busy is ignored, and that a reset mid-operation aborts it.
* `tb_present_q_cipher`: first validates the behavioural reference (`tb/qref_pkg.sv`, `present_enc`) against the four published PRESENT-80 test vectors, using the original PRESENT S-box. It then compares 16 encryptions (corner cases and random) against that reference with the Q-S-box substituted, and checks the 125-cycle latency. `tb_present_q_cipher_2layer` repeats this with two layers per cycle, where the latency is 63 cycles.
* `tb_present_q_top`: runs the top at its default parameters, with all four units working at once. It counts each mechanism (both layer directions, round-key and final key additions, ignored starts, an aborted encryption) and fails if any of them never happens.

To run one with Verilator:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/qsbox_pkg.sv tb/qref_pkg.sv tb/tb_present_q_top.sv \
        --top-module tb_present_q_top -o sim
    ./obj_dir/sim

Verilator finds the other modules through `-Irtl`. Each testbench finishes in well under a second.
