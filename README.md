# HaF-256 hash core with duplication-with-comparison error detection

HaF-256 is an iterated 256-bit cryptographic hash function. Because it is
iterative, one wrong bit anywhere in the computation (a glitch, a particle
strike, or a fault deliberately injected by an attacker) spreads through the
following steps until about half of the bits of the hash are wrong. This
design is a hardware HaF-256 core that detects such faults concurrently, while
it hashes: every basic arithmetic operation inside the step function is built
twice, and a comparator flags any cycle in which the two copies disagree
(duplication with comparison, DWC).

The core follows the published structure of HaF-256: the block and word
sizes, the round and step structure, the rotations and the wiring of the step
function. The algorithm's tables and constants (the S-boxes, the masking
constant, the multiplier polynomials, the reduction polynomial and the
initial value) are **not** part of that structure. Here they are placeholder values,
collected in `rtl/haf_pkg.sv`. The core therefore computes a function with
exactly the shape of HaF-256, but it does not produce reference HaF-256 digests
until the real constants are put into that package (see
[Placeholders and departures](#placeholders-and-departures)).

## The algorithm as built

A message is padded and its length appended until it is a whole number of
256-bit blocks `M_0 .. M_(k-1)`. This formatting is not part of the core, which takes formatted
blocks. Each block is compressed together with a 256-bit salt `s` into the
256-bit chaining value `H`. `H_0 = IV`, and the hash is `H_k`.

Compression of one block:

1. `N = M_i xor s`, `H = H_i`.
2. **Round entry.** `t` = the 4 least significant bits of `N`. `N* = N <<< t`
   (rotation of the whole 256-bit string). The working value is `H xor N*`,
   cut into sixteen 16-bit words `A0 .. A15`, with `A0` the leftmost
   (most significant) word.
3. **16 steps** `F_0 .. F_15` on `A0..A15`. The result is `H*`.
4. **Swap.** `N = H*`, `H = N*`, then round entry and 16 steps again (steps are
   numbered 0..15 again).
5. **Feed-forward.** Each word of the result is added mod 2^16 to the word in
   the same position of `H_i`, the chaining value that entered step 1. This
   gives `H_(i+1)`.

Every 256-bit value in the design uses the same word order: `A0` in bits
255:240, `A15` in bits 15:0.

## The step function F_j

The step function is the heart of the design and where all the error
detection sits. One step moves every word down one place and computes one new
word:

```
A0' .. A14'  = A1 .. A15,  except  A9' = A10 <<< 7
A15'         = (S_j(Z) + Y) xor X

X = (alpha0 (x) A0) xor (alpha2 (x) A2) xor (alpha3 (x) A3) xor (alpha5 (x) A5)
Y = ((A1 + A6) . (A5 xor A7)) xor A8
Z = (A9 + A11 + A14) xor (c <<< j)
```

| symbol | operation | module |
|---|---|---|
| `+`   | addition mod 2^16 | `haf_add` |
| `xor` | bitwise XOR (addition mod 2) | `haf_xor` |
| `.`   | multiplication mod 2^16+1; the zero word stands for 2^16 | `haf_mulmod` |
| `(x)` | multiplication of polynomials over GF(2) mod R(x) | `haf_gfmul` |
| `S_j` | four 4-bit S-boxes on the four nibbles | `haf_sbox` |
| `<<<` | rotation left | wiring |

The shift and the 7-bit rotation of A10 can be checked against a published
trace of a round. `tb_haf_step` feeds eight consecutive published states
through the step and compares the fifteen words that do not depend on the
constants. The taps of the sum chain (A9, A11, A14) and the grouping of the
X and Y terms follow the published step diagram.

A step holds sixteen basic operations, numbered in data-flow order by
`haf_pkg::haf_stepop_e`:

| # | name | operation | kind |
|---|---|---|---|
| 0..3 | `S_M0 S_M2 S_M3 S_M5` | alpha_k (x) A_k | polynomial multiplication |
| 4..6 | `S_X02 S_X3 S_X5` | XOR chain giving X | XOR |
| 7 | `S_A16` | A1 + A6 | addition |
| 8 | `S_X57` | A5 xor A7 | XOR |
| 9 | `S_MUL` | (A1+A6) . (A5 xor A7) | multiplication mod 2^16+1 |
| 10 | `S_X8` | ... xor A8 = Y | XOR |
| 11 | `S_A9B` | A9 + A11 | addition |
| 12 | `S_A14` | ... + A14 | addition |
| 13 | `S_XC` | ... xor (c <<< j) = Z | XOR |
| 14 | `S_AS` | S_j(Z) + Y | addition |
| 15 | `S_XF` | ... xor X = A15' | XOR |

## Concurrent error detection

Each of the sixteen operations is a `dwc_op`. The operation block computes the
result that goes on through the datapath. An identical duplicate computes the
same function from the same operands, and `dwc_comparator` raises `error` when
the two differ. A fault inside one operation therefore shows up on its own
comparator in the cycle it happens. Comparators further down do not fire,
because both of their copies receive the same, already wrong, operand. So
`err_ops` points at the operation where the fault entered.

What DWC cannot see:

* a fault on an operand *before* it is split to the two copies (both copies
  then compute the same wrong result);
* the S-box, the rotations, the registers, the round-entry stage and the
  feed-forward adders, which are not duplicated.

The fault model behind the evaluation, in `fault_inject`, applies a 16-bit
error vector `E` to one operand of the first copy:

* bit flip: `x xor E`
* stuck-at-1: `x or E`
* stuck-at-0: `x and not E`

Every operation here is a bijection in each operand: the alphas are non-zero
and the zero word of the mod 2^16+1 multiplier stands for 2^16. So any bit-flip fault
changes the result and is always detected. A stuck-at fault is detected only when it
actually changes the operand: a bit already at its stuck value causes no
error. That is why a single stuck-at bit is caught about half the time, and
more often the more bits are stuck.

The fault port `fi` (`haf_pkg::fault_t`) on the top selects the operation, the
operand, the model and the vector. Hold `fi.en` for a whole block to model a
permanent fault, or raise it for one cycle for a transient one. Tie `fi` to
zero in normal use. With parameter `DWC = 0` the duplicates and comparators are
left out.

Fault coverage measured by `tb_haf_dwc_coverage` on the full core. Each
number is the percentage of step evaluations with the fault present that were
flagged, over 120 blocks per cell:

| operation | stuck-at, 1..5 faulty bits (permanent) | bit flip |
|---|---|---|
| a . b       | 49 / 75 / 87 / 93 / 97 | 100 |
| v xor w     | 50 / 74 / 88 / 94 / 97 | 100 |
| v + w       | 50 / 74 / 88 / 94 / 97 | 100 |
| p1 (x) p2   | 52 / 71 / 76 / 84 / 84 | 100 |

Transient faults give the same picture. The polynomial multiplications stay
lower because half of their faults land on the constant alpha operand, and
the placeholder alphas are mostly zero bits. A stuck-at-0 on those bits changes
nothing. For the addition, earlier measurements of this scheme
reported 57.9 / 80.3 / 90.3 / 95.3 / 96.8 % for stuck-at faults and 100 %
for bit flips.

`tb_haf_error_propagation` shows why detection matters. One flipped bit in A13
before step 0 leaves about a third of the 256 state bits wrong after one
round: 36 % here, 43 % in the published trace. One flipped message bit leaves
about half of the hash bits wrong (50 %).

## Core interface and timing (`haf256`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock, synchronous active-low reset |
| `start` | in | 1 | present a block; accepted in a cycle where `ready` is high |
| `first` | in | 1 | 1: first block of a message (start from IV); 0: continue from `hash` |
| `m_blk`, `salt` | in | 256 | formatted block and salt, sampled only on the accepting edge |
| `fi` | in | `fault_t` | fault injection, zero in normal use |
| `ready` | out | 1 | core idle |
| `done` | out | 1 | one-cycle pulse; `hash` now holds `H_(i+1)` |
| `hash` | out | 256 | chaining value, held until the next block finishes |
| `err` | out | 1 | some comparator fired in this step cycle |
| `err_ops` | out | 16 | comparator outputs, one per step operation |
| `err_flag` | out | 1 | sticky `err`, cleared when a block is accepted |

The core holds `N`, the working words, the saved `H_i` and the chaining value
in registers, and applies one step per clock with a single `haf_step`.
`haf_ctrl` sequences it:

```
IDLE --start--> R1 (16 cycles, j=0..15) -> SWAP -> R2 (16 cycles) -> FINAL -> IDLE (done=1)
```

* The accepting cycle applies the round-1 entry stage.
* SWAP applies the round-2 entry stage.
* FINAL adds the feed-forward and writes the chaining register.

`done` rises 34 clock edges after the accepting one. The next block can be
accepted in the same cycle as `done`, so back-to-back blocks take 35 cycles each.
This schedule, the handshake and the reset are choices of this design.

## Placeholders and departures

* **Constants.** The published structure does not include the values of `c`,
  `alpha0/2/3/5`, `R(x)`, the four S-boxes and `IV`. `haf_pkg` holds
  placeholders:
  * `c = B7E1`
  * alphas `x`, `x+1`, `x^2+1`, `x^2+x+1`
  * `R(x) = x^16+x^12+x^3+x+1`
  * four arbitrary 4-bit permutations
  * an arbitrary IV

  Replace them there to get the real function. `haf_step` also takes `c`, the
  alphas and `R(x)` as parameters, and `haf256` takes the IV.
* **S_j.** S_j consists of four S-boxes. Here each is a 4-bit box on one
  nibble, and nibble `k` uses box `(j + k) mod 4`. How `j` picks the boxes is this
  design's choice.
* **Multiplication mod 2^16+1** is defined for non-zero operands. The all-zero
  word is taken to mean 2^16, as in IDEA.
* **Message formatting** (padding bits and the length string) is not built,
  because its exact format is not given. Feed the core formatted blocks.
* **Sum-chain taps.** The taps of the sum chain (A9, A11, A14) are read from
  where the step diagram places them. With an A11 tap, a fault entering at
  A13 reaches the new A15 in step 2. The published fault trace marks the first
  wrong new A15 only at step 4, which an A11 tap would not give. This design
  follows the diagram.
* **DWC placement.** The evaluated scheme was shown on one addition. This core
  protects all sixteen operations of the four kinds evaluated: addition,
  XOR, multiplication mod 2^16+1 and polynomial multiplication. The S-box,
  the rotations, the registers and the feed-forward are not protected.

## Files

| file | contents |
|---|---|
| `rtl/haf_pkg.sv` | sizes, placeholder constants, operation and fault types |
| `rtl/haf256.sv` | top: registers, round entry, step, feed-forward, chaining |
| `rtl/haf_ctrl.sv` | sequencer |
| `rtl/haf_round_entry.sv` | `N <<< lsb4(N)` and XOR into H |
| `rtl/haf_step.sv` | step function with sixteen DWC operations |
| `rtl/haf_sbox.sv` | S_j |
| `rtl/dwc_op.sv`, `rtl/dwc_comparator.sv`, `rtl/fault_inject.sv` | error detection and fault model |
| `rtl/haf_op.sv` | selects one of the four operations by parameter |
| `rtl/haf_add.sv`, `haf_xor.sv`, `haf_mulmod.sv`, `haf_gfmul.sv` | basic operations |
| `rtl/haf_feedforward.sv` | final mod 2^16 additions |
| `tb/haf_ref_pkg.sv` | independent behavioural model of the whole function |
| `tb/tb_<module>.sv` | self-checking test of each module |
| `tb/tb_haf_dwc_coverage.sv` | fault-coverage experiment |
| `tb/tb_haf_error_propagation.sv` | error-spread experiment |

## Simulating

Every testbench prints `TB_RESULT checks=N failures=M` and stops itself. With
Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_haf256 \
  -y rtl -y tb +libext+.sv rtl/haf_pkg.sv tb/haf_ref_pkg.sv tb/tb_haf256.sv
./obj_dir/Vtb_haf256
```

`-Wno-fatal` keeps Verilator's style warnings from stopping the build. The
main one is ASCRANGE: word arrays are declared `[0:15]` on purpose, so that
index 0 is the leftmost word `A0`.

Replace `tb_haf256` with any other testbench name. What the tests cover:

* `tb_haf256` hashes 40 messages of one to four blocks at the default
  parameters and compares every chaining value with `haf_ref_pkg`. It also checks:
  * the 34-cycle latency
  * back-to-back blocks, and a held `start` being ignored
  * transient and permanent bit-flip faults, which must always be flagged
  * stuck-at faults, which must be flagged exactly when they change the hash

  It counts each of these mechanisms and fails if one never happened.
* The reference model in `tb/haf_ref_pkg.sv` is written independently of the
  RTL: `%` arithmetic, shift-and-reduce GF multiplication and bitwise
  rotations. It shares only the constants of `haf_pkg`. If you change the
  constants, both follow.
