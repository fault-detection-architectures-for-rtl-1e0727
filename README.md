# Fault-detecting hash engines for stateless hash-based signatures

Stateless hash-based signatures (the SPHINCS family) build everything from a
small hash function: one-time keys are hashed into leaves, the leaves are
hashed pairwise up a Merkle tree, and a signature is checked by recomputing
a root from a leaf and its authentication path. A single wrong bit anywhere
in that chain gives a wrong root. Worse, a faulty signer can leak secret
material to an attacker who injects faults on purpose. This RTL puts
concurrent error detection on the hash hardware so that a natural defect or
an injected fault raises a flag instead of silently giving a bad result.

Detection works at two levels:

* **Tree level: recomputation with swapped nodes (RESN).** Every tree level
  is hashed twice, the second time with the node pairs moved to a different
  hash unit, and the two results are compared.
* **Hash level.** Protection sits inside the hash itself:
  * three schemes for the ChaCha quarter round (used by the SPHINCS hashes F
    and H);
  * parity-based checks for the lightweight hash SPONGENT.

Everything is synthesizable SystemVerilog (IEEE 1800-2017). The default
parameters give a 32-leaf tree of 256-bit nodes, ChaCha with 20 rounds, and
SPONGENT-88/80/8.

## The node hashes F and H

The tree engines use two short-input hashes built on the ChaCha permutation
`pi`, a 512-bit state permuted by 20 rounds. Each round runs four quarter
rounds in parallel. Even rounds work on the columns of the 4x4 word matrix
and odd rounds on its diagonals. There is no feed-forward addition.

* `H(M1 || M2) = first 256 bits of pi( pi(M1 || C) xor (M2 || 0) )`, where
  each Mi is 256 bits.
* `F(M) = first 256 bits of pi(M || C)`.
* `C` is the 32-byte ASCII string `"expand 32-byte to 64-byte state!"`.

Little-endian word order is used throughout. Word 0 of the state is bits
31:0. "First 256 bits" means words 0 to 7.

`chacha_core` is the permutation. Its `SCHEME` parameter selects the
quarter-round implementation (`chacha_pkg::qr_scheme_e`). Every error flag
raised during a permutation is ORed into the core's `err`.

## Tree level: recomputation with swapped nodes

The tree engine (`resn_tree`) computes a level as

    N(i, j) = H( (N(2i, j-1) || N(2i+1, j-1)) xor Q_j )

Node pairs are numbered from the left, and `masks[j-1]` holds the 512-bit
bitmask `Q_j`.

The engine has one H unit per column: `NLEAF/2` units, 16 at the default
size. A level is built in two passes:

1. **Normal pass.** Unit `k` hashes pair `k`. The results go into the node
   memory.
2. **Swapped pass.** The same pairs are hashed again, but pair `k` now runs
   on a different unit. Each unit with a comparator checks its new result
   against the stored value for that pair.

This works because every pair of a level uses the same mask `Q_j` and the
same function H. A unit's result therefore depends only on the pair it
was given, not on where it sits. A permanent or transient fault in one unit
corrupts a different pair in each pass, so the comparison catches it.

Where pairs go in the swapped pass depends on `P`, the number of pairs on
the level:

| pairs on the level | swapped pass runs pair `k` on | article's term |
|---|---|---|
| even `P` | unit `k xor 1` (neighbours exchange) | swapping |
| odd `P` > 1 | unit `(k+1) mod P` | relocation |
| 1 (root level) | unit 1 (unit 0 computed it) | relocation |

### Options

* **Partial protection.** Comparators sit only on the columns whose bit is
  set in `CHECK_MASK`. The default is all columns.
  * Setting only the first and last columns, for example, saves area. It
    still detects any fault whose pair lands on a checked column during one
    of the two passes.
* **L-trees.** When `NLEAF` is not a power of two, the tree is unbalanced
  (an L-tree). A node with no right sibling is lifted unchanged to the next
  level. It is not hashed, so it is not checked either.
* **Plain Merkle trees.** With all masks set to zero the engine computes a
  plain Merkle tree. RESN works the same way there.
* **Ordering.** The `avail_first` input, sampled together with `start`,
  selects one of two orderings:
  * `0`: check each level before the next level starts. A fault is caught
    as early as possible.
  * `1`: compute all levels first and release the root (`root_valid`). The
    swapped passes for every level follow, and `done` ends the checks.
    The root is available half-way through the work, but the error flag
    arrives only at `done`.
* **Outputs.** `err_col` shows which comparators fired. `hash_err` collects
  the quarter-round flags of the H units. `err` is the OR of all flags.

One pass costs one H latency (two permutations) plus two cycles. With the
complementary scheme and 20 rounds this gives about 2,300 cycles for a
32-leaf tree: 5 levels with 2 passes each.

`auth_root` is the verifier's path: it recomputes the root from a leaf, its
index and the authentication path with a single H unit. Bit `j` of the index
says whether the running node is the left or the right child at level `j+1`.
The unit has no tree-level redundancy, so it relies on the protection
inside its quarter rounds. In the top it uses REEO.

## Inside the quarter round

The quarter round is four add-xor-rotate steps on the words a, b, c, d,
with rotations 16, 12, 8 and 7. The plain version is `chacha_qr`. Each
protected version has the same `qr_t` interface plus a valid handshake, and
returns a per-operation `err`.

### Complementary: run it backwards (`chacha_qr_comp`, `arx_step`)

Every step can be inverted:

* the rotation is undone by the opposite rotation;
* the XOR is undone by XOR;
* the addition is undone by subtraction, which is the same adder with one
  operand complemented and carry-in 1.

`arx_step` is one such step with a mode input. The forward run produces the
result. The same steps, in reverse order and in inverse mode, then map the
result back to the input. A mismatch with the saved input raises `err`.

The datapath is shared between the two runs, and one pipeline register
splits the four steps into halves (`PIPE=1`). An operation takes 5 cycles
and `busy` is high in between.

### REEO: recompute on rotated operands (`chacha_qr_reeo`, `gap_adder`)

The quarter round is run a second time on the input words rotated left by
`K=16`. The result is rotated back and compared with the first run.

XOR and the fixed rotations commute with a rotation of the operands. The
modular addition does not, because the carry would cross the rotation seam.
`gap_adder` handles this:

* A zero cell is imagined between bit `K-1` and bit `K` of the rotated
  word.
* On rotated operands the addition starts just above that cell. It runs
  through the upper part, wraps around into the lower part, and stops in
  the cell.
* The carry that falls into the cell is the carry-out of the original
  bit 31, so it is dropped.
* On plain operands the cell is bypassed, so one adder serves both runs.

A fault in one bit slice therefore hits different bits of the true result
in the two runs, and the comparison catches it.

Timing:

* The rotated run enters the pipeline one cycle after the plain one, so the
  two runs interleave as normal/encoded pairs.
* `STAGES` sets the sub-pipelining inside the quarter round:
  * `1`: one register halfway;
  * `2`: two registers.
* Latency is `STAGES+3` cycles.

### Self-checking adders (`chacha_qr_dr`, `sc_csel_adder`, `two_rail_checker`)

Each of the four modular adders is a carry-select adder. It has two ripple
adders, with carry-in 0 (sum S0) and carry-in 1 (sum S1), and the real
carry-in picks one of them. Since `S1 = S0 + 1`:

* bit `i` of S1 must be the complement of `S0[i] xnor (S0[i-1] & ... & S0[0])`;
* the carry-outs obey the same kind of relation.

These complementary pairs go into a tree of two-pair two-rail checker cells:

    z0 = a0 b0 | a1 b1
    z1 = a0 b1 | a1 b0

The tree ends in a single pair that stays complementary as long as every
pair is complementary. A non-complementary pair means a fault in either
ripple adder. This version keeps the one-cycle latency of the plain quarter
round (registered output).

### Cycle counts per permutation (20 rounds, default stages)

| scheme | cycles |
|---|---|
| unprotected (`QR_ORIG`) | 41 |
| self-checking adders (`QR_DR`) | 41 |
| REEO (`QR_REEO`, `QR_STAGE=1`) | 101 |
| complementary (`QR_COMP`) | 121 |

## SPONGENT with interleaved parities

`spongent_fd` is a sponge hash:

* **State.** A `B`-bit state starts at zero.
* **Absorb.** Each 8-bit message block is XORed into the low bits of the
  state, then `ROUNDS` rounds of the permutation run, one round per cycle.
* **Padding.** After the last block, one padding block (a 1 in its top bit)
  is absorbed.
* **Squeeze.** 8 bits are read per squeeze, with a permutation between
  squeezes. The first block read ends up in the most significant bits of
  `h`.

A round has three steps:

1. XOR the round counter into the two ends of the state.
2. Apply the 4-bit S-box to every nibble.
3. Apply the bit permutation `P(j) = j*B/4 mod (B-1)`, with the last bit
   fixed.

The round counter is an LFSR.

Detection uses interleaved parity. For a nibble `x` the signature is
`{x3^x2, x1^x0}`. The checks are:

* **S-box table** (`spongent_sbox_fd`). Each table entry also stores the
  signature of its output and of the input that addresses it. A lookup is
  checked against both:
  * a corrupted data bit fails the output signature;
  * a wrong address, or a faulty input, fails the input signature.
* **State** (`spongent_round_fd`). A predicted parity bit travels with the
  state. It is updated:
  * by each absorbed block;
  * by the counter bits;
  * by the stored S-box output signatures.

  The bit permutation does not change the parity, so every round compares
  the prediction with the state's actual parity. This catches faults in the
  state register and in the wiring.
* **Counter** (`spongent_lcounter`). The parity of the next counter value
  is predicted from the feedback bit and compared with the actual value.

The three flags come out as `err_flags = {counter, state parity, S-box}`.
They are sticky for one message and ORed into `err`.

Sizes:

* The default is SPONGENT-88/80/8: `B=88`, 45 rounds, 6-bit counter.
* SPONGENT-128/128/8 is a parameter set: `B=136`, `NH=128`, `ROUNDS=70`,
  `CW=7`, `CINIT=7'h7A`, `CTAPS=7'h60`.
* A new block is accepted every `ROUNDS` cycles.

## The top: `hbs_fd_top`

The top places four independent engines side by side. They share clock and
reset, and each keeps its own ports and handshake:

| engine | module | quarter-round scheme (parameter) | default |
|---|---|---|---|
| tree root with RESN | `resn_tree` | `TREE_SCHEME` | complementary |
| root from authentication path | `auth_root` | `AUTH_SCHEME` | REEO |
| chain hash F | `sphincs_f` | `F_SCHEME` | self-checking adders |
| SPONGENT-88/80/8 | `spongent_fd` | parity checks | |

The authentication-path unit shares the tree's bitmasks.

The engine/scheme pairing is just a way to put every scheme into one
netlist. Any scheme can go on any engine, and `QR_ORIG` turns protection
off. With the defaults, the plain `chacha_qr` is not instantiated.

The design is large: about 29k yosys cells and 82k flip-flop bits at the
defaults. Most of that is the 16 H units and the node memory.

## What is assumed, and where this departs from the schemes as described

* **Hash construction and tree size.** The construction of F and H, the
  constant `C`, `n = 256`, and the tree size of 32 leaves follow common
  SPHINCS practice; they are not fixed by the fault-detection schemes.
* **Masks.** Level `j` (1..h) uses mask `Q_j`. The left child meets the low
  256 bits of the mask.
* **Sub-pipelining.** The register placement inside the quarter round (one
  register for the complementary scheme; one or two for REEO) is a design
  choice. So are the REEO rotation `K=16` and the one-cycle offset between
  the plain and rotated runs.
* **Tree-level interleaving not built.** The tree engine does not interleave
  normal and swapped pairs inside a sub-pipelined H unit. Interleaving is
  done only inside the REEO quarter round. The tree runs the normal and the
  swapped pass of a level one after the other.
* **SPONGENT details.** The rate of 8 bits, the round counts, the LFSR
  constants, the padding and the bit order follow the SPONGENT
  specification.
* **Checking is done on the chip, not by a second model.**
  * Nothing recomputes a signature end to end.
  * Faults that leave a result unchanged, such as a stuck-at on a bit that
    already has that value, are not flagged. By design they do no harm.
* **Not included.** BLAKE's compression function (message schedule,
  initialization and finalization around the ChaCha-like G) is not part of
  this RTL. Only the ChaCha permutation and its quarter-round protections
  are.

## Simulating

All testbenches are self-checking. Each prints
`TB_RESULT checks=<n> failures=<m>` and stops, and each has a watchdog.

* Independent reference models live in `tb/tb_ref_pkg.sv`:
  * the ChaCha permutation;
  * F, H and tree roots;
  * SPONGENT.
* `chacha_core_tb` also checks the ChaCha20 block-function test vector of
  RFC 8439, with the feed-forward added in the testbench.
* Faults are injected with `force` on internal nets, and each testbench
  counts that they are detected.

With Verilator 5 (from the repository root):

    verilator --binary --timing --assert -Irtl -Itb \
      rtl/chacha_pkg.sv rtl/spongent_pkg.sv tb/tb_ref_pkg.sv \
      rtl/*.sv tb/resn_tree_tb.sv --top-module resn_tree_tb
    ./obj_dir/Vresn_tree_tb

To run another testbench, replace `resn_tree_tb` with its name. Each file in
`tb/` is one testbench, except `tb_ref_pkg.sv`, which is the shared
reference package. The main ones:

* **Units.** `chacha_qr_tb`, `arx_step_tb`, `gap_adder_tb`,
  `two_rail_checker_tb`, `sc_csel_adder_tb`.
* **Quarter rounds.** `chacha_qr_comp_tb`, `chacha_qr_reeo_tb`,
  `chacha_qr_dr_tb`. Each checks results against the reference, checks the
  latency, and checks that stuck-at faults are detected.
* **Hashes.** `chacha_core_tb` (all four schemes), `sphincs_h_tb`,
  `sphincs_f_tb`, `auth_root_tb`.
* **Tree.** `resn_tree_tb` covers:
  * swapping, relocation, lifting and both orderings;
  * partial comparators;
  * detection of forced faults.
* **SPONGENT.** `spongent_sbox_fd_tb`, `spongent_lcounter_tb`,
  `spongent_round_fd_tb`, `spongent_fd_tb` (both sizes).
* **Top.**
  * `hbs_fd_top_tb` runs the whole top at a reduced size (8 leaves, 2
    rounds). It counts every mechanism: swap, relocation, root-first
    ordering, and each detection path.
  * `hbs_fd_top_full_tb` runs one complete operation of every engine at the
    default parameters.

Simulation at the default size compiles in about half a minute and runs in
seconds.
