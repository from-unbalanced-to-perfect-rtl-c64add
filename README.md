# Glitch-balanced unrolled Trivium and Kreyvium

Trivium and Kreyvium spend the least energy per encrypted bit when many
rounds are computed in one clock: Trivium at 288 rounds per clock, Kreyvium
at 256. In such an unrolled circuit, most of the dynamic power goes into
glitches. Every round is built from the same small combinational module, the
*strand*. Some strands get all their inputs from the state register. Others
get some inputs from earlier strands and the rest straight from the register.
In the mixed case the register inputs arrive early, and the strand output
toggles more than once before it settles.

This RTL evens out those arrival times. Each early input of a mixed strand
passes through a *redundant module* first. This is a copy of the strand wired
so that its output equals the register bit, and its output arrives after one
strand delay, like the other inputs. The cipher function does not change. The
extra gates cost area and leakage, and in exchange the strand inputs settle
together. The reported saving is about 4-7 % in energy per Mbit.

The repository holds both keystream generators with the redundant modules in
place, side by side in one top (`stream_cipher_top`).

## The strand

One Trivium round updates three state bits, each with the same kind of
function:

    y = x1 ^ x2 ^ (x3 & x4) ^ x5

`trivium_strand` builds this from four gates. You choose the structure with
`STYLE`:

| STYLE | gates | structure |
|---|---|---|
| 0 (default) | 1 NAND2, 3 XNOR2 | `XNOR(XNOR(x1,x2), XNOR(NAND(x3,x4), x5))` |
| 1 | 1 NAND2, 1 XNOR2, 1 XNOR3, 1 NOT | `XNOR3(NOT(XNOR(x1,x2)), NAND(x3,x4), x5)` |

The two structures compute the same function. The whole method assumes that
every strand has the same gates, and therefore the same delay, and that
synthesis keeps each strand as a separate block. The module carries a
`keep_hierarchy` attribute for this reason. When a tool flattens the design,
the redundant modules reduce to wires and the balancing is lost, though the
logic stays correct. Synthesize with strand boundaries preserved.

Kreyvium adds one bit of a rotating key register (K*) to t3 and one bit of a
rotating IV register (IV*) to t1. `kreyvium_strand` is the six-input version.
It keeps the Trivium strand's gates and XNORs x6 with x5 first, so that x5
and x6 enter at the same depth. t2 stays a plain `trivium_strand`.

## Unrolling: strands feeding strands

With the state bits numbered s1..s288, the three strands of round k are

    t1(k) = t3(k-66) + t3(k-93) + t3(k-91)·t3(k-92) + t1(k-78)
    t2(k) = t1(k-69) + t1(k-84) + t1(k-82)·t1(k-83) + t2(k-87)
    t3(k) = t2(k-66) + t2(k-111) + t2(k-109)·t2(k-110) + t3(k-69)

where, for m <= 0, `t1(m) = s(94-m)`, `t2(m) = s(178-m)` and
`t3(m) = s(1-m)`. In words, a value produced m rounds ago is still sitting
in the register. This single recursion describes the whole unrolled circuit.
`trivium_unrolled` builds it with generate loops:

* Round k is the generate scope `g_round[k]`, and it holds its three strand
  outputs `t[0..2]`.
* Each input port with tap X reads `g_round[k-X].t[j]` when `k - X >= 1`.
  Otherwise it reads register bit `s(base(j) - (k - X))`.
* The next state comes from the last rounds in the same way. Register bit n
  takes `t_j(R + base(j) - n)`.
* The keystream bit of round k is
  `s66 + s93 + s162 + s177 + s243 + s288` of the state before that round,
  expressed through the same history values. It appears in `ks_o[k-1]`.

Each round's outputs are named in their own generate scope. Simulators
therefore see no false combinational loop between the rounds. The tap and
history tables, written as constant functions, are in `stream_cipher_pkg`.

At R = 288 the network holds 864 strands. The longest path is 5 strands deep:
t1(288) depends on t3(222), which depends on t2(156), then t1(87), then
t3(21), which reads only register bits.

## Where the redundant modules go

Draw each strand as a tree. Its five inputs are the children, an input that
comes from another strand has that strand's inputs as its own children, and
the leaves are register bits. A tree whose leaves all lie at the same depth
is balanced, so its strand's inputs arrive together. A strand in round k
reads a strand output through each tap X < k and a register bit through each
tap X >= k. The tree is therefore unbalanced exactly when some taps are below
k and some are not.

`port_needs_redundant(i, k, p)` applies this rule. It counts the taps of
strand i that are smaller than k. If that count is neither 0 nor 5, each
port p with tap `X >= k` is driven through a `redundant_module` fed by the
register bit it would otherwise read. For t1(67), for example, tap 66 is
already a strand output, and ports x2..x5 (taps 93, 91, 92, 78) get
redundant modules.

The flagged rounds are these:

| strand | unbalanced rounds | redundant modules |
|---|---|---|
| t1 | 67..93 | 90 |
| t2 | 70..87 | 60 |
| t3 | 67..111 | 135 |
| total | | 285 |

Any R >= 111 therefore holds the same 285 modules. Each flagged tree has
height 3: two strand levels above the register. After the fix, every
flagged tree is a perfect tree of height 3. Taller trees are left as they
are. Balancing those would need five or more redundant modules per port,
and the method judges that not worth the area.

The Kreyvium network (`kreyvium_unrolled`) uses the same taps and the same
rule. The K*/IV* input of a strand always comes directly from its register
and is never delayed. `REDUNDANT = 0` builds either network without
redundant modules. This is the baseline circuit, and it computes the same
function.

## Keystream cores

`trivium_core` and `kreyvium_core` wrap the unrolled networks with their
registers and `cipher_ctrl`:

* **Load.** A one-cycle `start_i` loads key and IV at that clock edge, from
  any state. This also re-keys a running core.
  * For Trivium, key bit n (1..80) goes to s_n and IV bit n to s_(93+n), and
    s286..s288 are set to 1. Key bit n is `key_i[n-1]`.
  * For Kreyvium, K0..K92 go to s1..s93, IV0..IV83 to s94..s177, IV84..IV127
    to s178..s221, s222..s287 are set to 1 and s288 is 0. K* and IV* hold
    the key and IV in reversed order. Key bit n is `key_i[n]`.
* **Initialisation.** Both ciphers discard 1152 rounds. At R rounds per clock
  this takes `floor(1152/R)` blank cycles, during which `busy_o` is high.
* **Output.** `ks_valid_o` rises `floor(1152/R) + 1` cycles after `start_i`.
  A word of R keystream bits (first bit in bit 0) is then offered. The core
  advances to the next word in each cycle in which `ks_ready_i` is high.
  While `ks_ready_i` is low, the word and the state are held (a stall).
* **The partial first word.** 1152 is 4 x 288 but 4.5 x 256. At Kreyvium's
  R = 256 the first word still contains 128 initialisation rounds. For that
  word `ks_mask_o` has only bits 128..255 set. In every later word, and in
  every word when R divides 1152, the mask is all ones. As a result, some
  mask bits of the top's outputs are constant.

The keystream word is combinational from the state register through the
whole unrolled network. There is one register stage per R rounds. This is
the architecture the energy figures refer to.

| | Trivium | Kreyvium |
|---|---|---|
| rounds per clock (R) | 288 | 256 |
| blank cycles after start | 4 | 4 |
| first word | 288 bits | 128 bits (masked) |
| 1 Mbit (2^20 bits) | 3641 words, last in cycle 3645 | 1 + 4096 words, last in cycle 4101 |
| strands + redundant modules | 864 + 285 | 768 + 285 |
| flip-flops | 288 state + control | 288 + 128 + 128 + control |

The reported measurements were taken at 100 MHz. They give 87.2 nJ/Mbit for
Trivium and 111.6 nJ/Mbit for Kreyvium, both in a 90 nm library. RTL
simulation cannot reproduce these numbers, because they depend on
gate-level glitch activity in a particular cell library.

## What is specified and what is chosen here

These parts follow the published design:

* the strand function and its two gate structures
* the tap recursion
* the rule for placing redundant modules
* the redundant-module wiring (x1 = register bit, x2..x5 = 0)
* the degrees of unrolling (288 and 256)

These are taken from the Trivium and Kreyvium cipher specifications:

* key/IV loading
* the 1152 initialisation rounds
* the keystream equations
* the K*/IV* rotation

The following are choices made in this RTL:

* **Key/IV bit order.** The keystream has been checked against an
  independent bit-serial model in the testbenches, not against published
  test vectors. If you need compatibility with a particular reference
  implementation's byte order, check the mapping at the load ports.
* **Kreyvium six-input strand.** Its gate structure is a choice made here,
  and the K*/IV* inputs are never delayed.
* **Control.** The start / valid / ready / mask interface, the asynchronous
  active-low reset that clears all registers, and the masked first word.
* **Default strand structure.** `STYLE = 0` is the default.
* **Keystream terms.** They bypass the redundant modules, because the
  balancing only concerns the state-update strands.

## Simulation

Every testbench is self-checking. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog. The reference models
in `tb/cipher_ref_pkg.sv` run the ciphers one round at a time, directly from
the cipher equations.

| testbench | what it checks |
|---|---|
| `tb_trivium_strand`, `tb_kreyvium_strand` | all input combinations, both gate structures |
| `tb_redundant_module` | output equals the register bit |
| `tb_stream_cipher_pkg` | tap-to-register mapping, unbalanced ranges, t1(67) example, 285 modules |
| `tb_trivium_unrolled` | R = 288 with and without redundant modules, R = 100, R = 1, against the reference |
| `tb_kreyvium_unrolled` | R = 256 with and without redundant modules, R = 200, R = 1 |
| `tb_cipher_ctrl` | blank cycles, masks for R = 288 / 256 / 2048, stalls, restart |
| `tb_trivium_core`, `tb_kreyvium_core` | keystream after initialisation, first-word cycle, random stalls |
| `tb_stream_cipher_top` | both ciphers at full size. Redundant and plain tops agree, and re-key, stall and partial-word events are counted |
| `tb_encrypt_1mbit` | encrypts 2^20 bits with each cipher at default sizes and checks ciphertext and cycle counts |
| `tb_unroll_sweep` | both cores at R = 25, 80, 150, 200, 16 kbit each |

To run one with Verilator from the repository root (the package files come
first):

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/stream_cipher_pkg.sv tb/cipher_ref_pkg.sv \
        rtl/trivium_strand.sv rtl/kreyvium_strand.sv rtl/redundant_module.sv \
        rtl/trivium_unrolled.sv rtl/kreyvium_unrolled.sv rtl/cipher_ctrl.sv \
        rtl/trivium_core.sv rtl/kreyvium_core.sv rtl/stream_cipher_top.sv \
        tb/tb_encrypt_1mbit.sv --top-module tb_encrypt_1mbit -Mdir obj
    ./obj/Vtb_encrypt_1mbit

At full size the two top-level testbenches spend about two minutes in the
Verilator build. The simulations themselves take seconds.

## Changing the design

* **Another degree of unrolling.** Set `R` on a core, or `TRIV_R` / `KREY_R`
  on the top. Any R >= 1 works. The controller adapts the blank-cycle count
  and the first-word mask.
* **Another Trivium-like cipher.** Change the tap and history functions in
  `stream_cipher_pkg` (`tap`, `src`, `base`, `ztap`, `zsrc`, `owner`). The
  port search and the generate logic follow automatically.
* **A different redundant module.** Replace the body of `redundant_module`.
  Any block works if its output equals its input and its delay equals one
  strand's delay.
