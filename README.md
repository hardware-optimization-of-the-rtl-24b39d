# PGDBF LDPC decoder with a short-register perturbation block

This is a fully parallel hard-decision decoder for a regular (3,6) quasi-cyclic
LDPC code of length 1296 on a binary symmetric channel. It runs one decoding
iteration per clock cycle. The algorithm is Probabilistic Gradient Descent
Bit-Flipping (PGDBF). In each iteration every bit whose "energy" is maximal
becomes a candidate, and a candidate flips only if its random bit is 1. That
randomness is what makes PGDBF stronger than plain GDBF. Giving each of the
1296 bits its own random generator is expensive.

The main idea of this design is to avoid that cost. The randomness comes from
a band of only S = 216 registers. The band is repeated across all 1296 bits by
fixed wiring and rotated by one place after every iteration. Two cheap ways of
filling the band are built:

* **IVRG** (the default) fills it with the complements of the first S
  check-node values of the received word, so it needs no random generator;
* **LFSR** fills it once after reset from a 32-bit LFSR with a threshold
  comparator.

## The decoding iteration

The code has N variable nodes (VNs, one per code bit) and M check nodes
(CNs, one per parity equation). With the defaults, N = 1296, M = 648 and
circulant size Z = 54. Every VN takes part in DV = 3 checks, and every check
covers DC = 6 bits. Let y be the received word and v the current estimate,
which starts as v = y. One clock cycle does all of the following:

1. Each CN computes the XOR of its 6 bits. A CN value of 1 means the check
   fails.
2. Each VN computes its energy E_n = (v_n XOR y_n) + (number of its 3 checks
   that fail). E lies between 0 and 4: a high energy means the bit is both
   suspicious and different from what was received.
3. The maximum finder computes E_max, the largest energy over all N VNs.
4. Every VN with E_n = E_max and R_n = 1 inverts v_n.

Decoding stops with success when every check holds. It stops with failure
after K_MAX = 300 iterations. Steps 1 to 3 are combinational from the v
registers, so the critical path runs from the VN registers through the check
XORs, the 3-bit adders and the maximum finder, then back through the equality
compare to the VN registers.

The **maximum finder** does not compare energies with each other. Each energy
is turned into a one-hot level vector with 5 entries. These vectors are ORed
over all VNs, which says which levels occur. Counting the leading zeros of
that 5-bit vector gives E_max. The circuit is one wide OR per level and a tiny
priority encoder, whatever N is.

## The perturbation block

The block holds the register band R' of S bits.

* **Hard connection network.** VN n gets R_n = R'[n mod S]. The band is
  repeated floor(N/S) times, then its first N mod S bits follow. With S = 216
  it is repeated exactly 6 times.
* **Rotation.** After each flipping iteration, R'[(i+1) mod S] takes R'[i].
  Every VN therefore sees a different bit in the next iteration, without any
  new random bits.
* **IVRG load.** On the first cycle of each word, R'[i] is loaded with
  NOT c_i, for CNs i = 0..S-1. A received word with few errors has mostly
  satisfied checks, so about 80-100 % of the bits are 1. That is the useful
  range for this code: about 800 to 1250 ones among the 1296 repeated bits.
  This method needs S <= M.
* **Serial LFSR load.** In LFSR mode, the band shifts the LFSR bit into R'[0]
  after reset, using the same register chain as the rotation. After S cycles
  it is full. The LFSR is x^32 + x^22 + x^2 + x + 1 in Fibonacci form, and its
  output bit is `state < LFSR_THRESHOLD`. The default threshold of 0.8 * 2^32
  gives about 80 % ones. The band is not reloaded between words; it keeps
  rotating.
* **Forced ones.** With `GDBF_ITERS` > 0, the first GDBF_ITERS iterations of
  each word set every R_n to 1, which is plain GDBF. Easy words then converge
  quickly, and PGDBF takes over for the hard ones. A value of 10 is the
  suggested setting. The default of 0 gives pure PGDBF.

The band costs S flip-flops plus one OR gate per VN for the forced-ones path.
A generator per VN would cost N generators.

## Parity-check matrix

The matrix is defined in `rtl/pgdbf_pkg.sv` as a 12 x 24 base matrix of Z x Z
circulants. Block column j, in half h = j / 12, has its three circulants
(layers l = 0, 1, 2) in these block rows:

    (j mod 12 + OFF[h][l]) mod 12,   OFF[0] = {0, 1, 3},  OFF[1] = {0, 5, 7}

Each circulant is the identity shifted by l*j mod Z. So the circulant has a 1
at (row a, column (a + s) mod Z), and the VN at offset t meets the CN at offset
(t - s) mod Z. The matrix has these properties:

* it is (3,6)-regular with rate 1/2;
* it has no 4-cycles for Z = 54 and for Z = 12, the size used in the short
  tests;
* no two block columns share all three block rows.

The last property matters. If several block columns sat on the same three
block rows, the code would split into independent small codes with
low-weight codewords, and noisy words would converge to the wrong codeword.

**This is not the published code of the same parameters.** The degrees, Z
and N match it, but its circulant shifts were not available. Error rates
measured with this RTL are therefore only indicative for that code. To use
another QC code, change `row_off`, `circ_shift`, `circ_row`, `vn_of_cn` and
`cn_of_vn` in the package. The rest of the RTL only uses the two index
functions.

## Interface and timing (`pgdbf_decoder`)

| port | dir | width | meaning |
|---|---|---|---|
| `clk`, `rst_n` | in | 1 | clock; asynchronous active-low reset |
| `start` | in | 1 | while `ready`, loads `y` and starts decoding |
| `y` | in | N | received hard-decision word |
| `ready` | out | 1 | idle, accepts `start` |
| `done` | out | 1 | one-cycle pulse: result valid |
| `success` | out | 1 | `v_out` satisfies every check |
| `iterations` | out | clog2(K_MAX+1) | flipping iterations used |
| `v_out` | out | N | decoded word (the VN registers) |

The decoder goes through these cycles for each word:

1. **Cycle 0.** `start` is sampled, and `y` is copied into the channel and
   value registers of every VN.
2. **Cycle 1 (FIRST, IVRG only).** The checks of the received word are
   evaluated, and their complements are loaded into R'. If the word is
   already a codeword, `done` follows in the next cycle. LFSR mode skips this
   cycle because its band is already full.
3. **Next cycles.** Each cycle is one iteration: flip, then rotate R'. One
   more cycle sees the zero syndrome, or notices that K_MAX iterations are
   used up.
4. **DONE.** `done` is high for one cycle. `ready` is also high in that
   cycle, so the next word can start at once.

`done` therefore comes after the start cycle:

* with IVRG, `iterations + 3` cycles later, or 2 cycles when the received
  word is already a codeword;
* with LFSR, `iterations + 2` cycles later.

Words can follow each other with no gap. In LFSR mode `ready` stays low for
S cycles after reset while the band fills. The results stay valid until the
next `start`.

The iteration itself takes one cycle. The per-word overhead of the load
cycle, the IVRG FIRST cycle and the cycle that detects the zero syndrome is
this design's choice. A throughput figure computed as N * f / k_avg, which
counts only the iterations, overstates what this RTL reaches. At 3.5 average
iterations with IVRG, the real figure is about 3.5 / 6.5 of it.

## Files

| file | contents |
|---|---|
| `rtl/pgdbf_pkg.sv` | constants (DV, DC, Z), energy type, init-method enum, parity-check index functions |
| `rtl/pgdbf_cn.sv` | one check node: 6-input XOR |
| `rtl/pgdbf_check_array.sv` | interconnection wiring, the M check nodes, `syndrome_zero` |
| `rtl/pgdbf_vn.sv` | one variable node: y and v registers, energy adder, compare, flip |
| `rtl/pgdbf_max_finder.sv` | E_max by level OR and leading-zero count |
| `rtl/pgdbf_perturbation.sv` | R' band, rotation, repetition network, IVRG and serial load, forced ones |
| `rtl/pgdbf_lfsr.sv` | 32-bit LFSR with threshold comparator |
| `rtl/pgdbf_ctrl.sv` | state machine: LFSR fill, load, FIRST, iterations, termination |
| `rtl/pgdbf_decoder.sv` | top level |
| `tb/pgdbf_ref_pkg.sv` | bit-exact reference decoder, a class used by the decoder testbenches |
| `tb/tb_*.sv` | one self-checking testbench per module, plus `tb_pgdbf_decoder_full` (default size) and `tb_pgdbf_workloads` (five full-size configurations) |

Parameters of the top:

* `Z` is 54; `N` is 24*Z; `M` is 12*Z;
* `S` is 4*Z;
* `INIT` is `INIT_IVRG`, and `INIT_LFSR` selects the LFSR;
* `K_MAX` is 300;
* `GDBF_ITERS` is 0;
* `LFSR_THRESHOLD` is 32'hCCCCCCCD;
* `LFSR_SEED` is a non-zero 32-bit value.

`S` may range from 2 to N, and IVRG needs S <= M. The sizes evaluated for
this architecture are S = Z, 4Z, 8Z, 12Z and 24Z. The overhead grows roughly
linearly with S. S = 4Z already matches the error rate of an ideal
independent random source. S = Z loses a little.

## Verification

Each testbench prints `TB_RESULT checks=<n> failures=<n>` and stops at a
watchdog limit.

* `tb_pgdbf_cn` tries all 64 input patterns.
* `tb_pgdbf_check_array` runs at Z = 12. It builds the matrix on its own and
  checks:
  * regularity and the absence of 4-cycles;
  * the CN values, the per-VN CN values and `syndrome_zero` against a direct
    matrix product.
* `tb_pgdbf_vn` and `tb_pgdbf_max_finder` drive random stimulus and compare
  with small models.
* `tb_pgdbf_perturbation` runs with S = 10 and N = 27, so the band repeats
  unevenly. It checks the loads, shifts, rotations and the forced-ones path
  every cycle.
* `tb_pgdbf_lfsr` compares the LFSR with an independent recurrence model. It
  checks that the share of ones follows the threshold (0.8 and 0.25).
* `tb_pgdbf_ctrl` runs both modes and checks:
  * the exact cycle counts, the stop at K and the one-time LFSR fill;
  * that the IVRG load comes only in the FIRST cycle;
  * that forced GDBF happens only in the first iterations.
* `tb_pgdbf_decoder` runs three decoders at Z = 12, side by side:
  * IVRG;
  * LFSR;
  * IVRG with K = 20 and three GDBF iterations.

  It sends 60 words at crossover 0 to 0.12 and compares every result bit for
  bit with the reference model: decoded word, success, iterations and latency.
  It also counts that every mechanism happens: the word is already a codeword,
  decoding succeeds after iterations, decoding stops at K, IVRG load, LFSR
  fill, rotation, forced GDBF, and a maximum-energy bit held back by R_n = 0.
* `tb_pgdbf_decoder_full` uses the default configuration, with no parameter
  overrides. It decodes 16 words at crossover 0.005, 0.01, 0.012 and 0.014 and
  compares them with the reference model. Every second word starts in the
  done cycle of the previous one. In the runs so far every word was
  recovered, with about 3.5 iterations on average.
* `tb_pgdbf_workloads` runs five full-size configurations side by side, all
  on the same 12 words (crossover 0.01 and 0.014), compared with the model.
  The table shows a sample run.

  | configuration | words recovered | mean iterations |
  |---|---|---|
  | LFSR, S = 4Z = 216 | 12 of 12 | 4.83 |
  | IVRG, S = Z = 54 | 12 of 12 | 3.50 |
  | IVRG, S = 12Z = 648 | 12 of 12 | 3.92 |
  | LFSR, S = 24Z = 1296 | 12 of 12 | 5.58 |
  | IVRG, S = 4Z, first 10 iterations GDBF | 12 of 12 | 2.25 |

  As expected for this architecture, IVRG converges in fewer iterations than
  LFSR, and running GDBF for the first iterations shortens decoding further.
  Twelve words say nothing about error rates.

The reference model is written independently of the RTL from the decoding
equations. It uses the same cycle conventions: the IVRG load from the first
checks, and rotation only after a flipping iteration.

Simulating with plain Verilator, for example the full-size test:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/pgdbf_pkg.sv tb/pgdbf_ref_pkg.sv tb/tb_pgdbf_decoder_full.sv \
        --top-module tb_pgdbf_decoder_full -o sim && ./obj_dir/sim

The other testbenches build the same way with their own top. The full-size
build takes about 20 s, and the five-decoder workload build about 100 s. Each
run takes under a second.

## Where this RTL makes its own choices

* **Parity-check matrix:** constructed here; see above.
* **Maximum finder:** a leading-zero-counting structure is the intended
  topology, but its details are unpublished. The level-OR plus leading-zero
  count is this design's reading of it.
* **LFSR:** the polynomial, seed, threshold value, the `<` comparison, and
  filling once after reset rather than per word are all choices of this
  design. The output bits are a threshold on a sliding 32-bit window, so
  neighbouring bits are correlated; the rotation spreads them.
* **IVRG pairing:** CN i feeds R'[i].
* **Handshake and I/O:** the handshake, the parallel N-bit input and output,
  the exact timing of the FIRST cycle and the reset values are not part of the original
  architecture description.
* **Not verified:** frame error rates at 1e-5 and below, which need far more
  words than RTL simulation can run, and area and clock-frequency figures.
  The area overheads quoted for this architecture were obtained in a 65 nm
  ASIC flow: about 6.7 % for S = 4Z over GDBF, and 3.5 % for S = Z.
