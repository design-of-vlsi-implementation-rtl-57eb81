# Partially parallel LDPC decoder for expanded base-matrix codes

A low-density parity-check (LDPC) code is hard to decode in hardware when its
parity-check matrix is random: a fully parallel decoder needs one processor
per node of the code graph and a huge random wiring network. This design
works the other way round. The code is chosen so that the decoder becomes a
small, regular array. Its parity-check matrix **H** is built from a small
`MS x NS` *base matrix*. Each base-matrix 1 at (u,v) is replaced by a `P x P`
identity matrix cyclically shifted right by `k(u,v)` columns. Each base-matrix
0 is replaced by a `P x P` zero matrix. Every base-matrix element then
becomes one piece of hardware:

| base matrix        | hardware                                              |
|--------------------|-------------------------------------------------------|
| row u              | check node unit `cnu` u (serves check nodes u*P .. u*P+P-1) |
| column v           | variable node unit `vnu` v, channel memory `cmem` v, decision memory `hdmem` v (variable nodes v*P .. v*P+P-1) |
| 1 at (u,v), shift k | decoding-message memory `dmem` (P words) plus its address counter `addr_gen`, wired only to CNU u and VNU v |

Each unit serves P graph nodes one after another, so the node logic is P
times smaller than a fully parallel decoder's, and all wires run between
fixed neighbours. The default instance decodes a (3,6)-regular rate-1/2
code of length 4096 (`MS = 32`, `NS = 64`, `P = 64`). It has 32 CNUs, 64
VNUs, 192 DMEMs and 64 CMEMs.

## How one iteration runs in 2P cycles

The decoder runs flooding belief propagation in its min-sum form. Messages
are 6-bit two's-complement log-likelihood ratios (LLRs); a positive value
means bit 0. Word `a` of `dmem(u,v)` belongs to the graph edge between
variable node `v*P + a` and the check node that block `T(u,v)` joins to it.
That word holds a variable-to-check or a check-to-variable message,
depending on the phase.

**Check node phase (P cycles).** Every DMEM holds variable-to-check
messages. Row r of the shifted identity `T(u,v)` has its 1 in column
`(r + k) mod P`. So to give CNU u all six messages of check node `u*P + t`
in cycle t, each DMEM is addressed by a counter that *starts at its own
shift k* and wraps at P. The CNU turns the six messages into six
check-to-variable messages. They are written back to the same addresses
in the same cycle (read, compute, write).

**Variable node phase (P cycles).** Every DMEM now holds check-to-variable
messages, and all counters start at 0. In cycle t, VNU v reads the channel
value of variable `v*P + t` from its CMEM and the three messages from its
three DMEMs. It writes back three extrinsic variable-to-check messages and
the new hard decision.

No memory is addressed by anything but a counter, and no crossbar exists.
The permutation of the code is held entirely in the start values of 192
six-bit counters. The memories read combinationally and write at the clock
edge, so read, compute and write fit in one cycle. An iteration is
therefore exactly `2*P` = 128 cycles, and the clock period must cover a
memory read, a node unit and a memory write.

### Node arithmetic

* `cnu`: min-sum. For each edge, the output sign is the product of the other
  five input signs. The output magnitude is the smallest of the other five
  magnitudes. The unit finds the smallest and the second smallest magnitude
  once, plus the position of the smallest. An input of -32 is treated as
  magnitude 31, so every message stays in the symmetric range ±31.
* `vnu`: `total = ch + Σ c2v`, computed exactly in 9 bits. Then
  `v2c[j] = sat(total − c2v[j])` to ±31, and the decision is `total < 0`.
  A total of exactly zero decides 0.

### Stopping: the syndrome comes for free

Each DMEM word is 7 bits wide: the message plus the current hard decision of
its variable. The decision is written in the load phase (the channel sign)
and in every variable node phase. In the check phase each CNU XORs the six
decision bits it reads. That XOR is the syndrome bit of the check node it is
processing. The controller ORs these bits over the phase, so every check
phase also tests whether the decisions of the previous iteration are
already a codeword. If they are, decoding stops. Otherwise it stops after
`MAX_ITER` = 20 iterations. The test costs no cycles, but there is one
consequence:

* a codeword that arrives error-free leaves after one check phase, with 0
  iterations;
* a codeword that converges after n iterations leaves after n+1 check
  phases;
* after 20 iterations the last decisions are not tested, and
  `out_converged` is 0 even if they happen to be correct.

## Controller and interface

`dec_ctrl` steps through four modes, given by `ldpc_pkg::mode_e`:

```
LOAD (P beats) -> CHECK (P) -> [syndrome zero] -> OUT (P beats) -> LOAD
                      |  ^
                      v  | (fewer than MAX_ITER iterations)
                     VAR (P) --(MAX_ITER reached)--> OUT
```

| port | dir | meaning |
|------|-----|---------|
| `clk`, `rst_n` | in | clock (rising edge); asynchronous active-low reset |
| `in_valid` / `in_ready` | in / out | channel beat handshake; `in_ready` is high in LOAD |
| `in_llr[NS]` (6-bit signed each) | in | beat t: LLR of variable `v*P + t` in element v |
| `out_valid` / `out_ready` | out / in | decision beat handshake; `out_valid` is high in OUT |
| `out_dec[NS]` | out | beat t: decision of variable `v*P + t` in bit v (1 = bit one) |
| `out_iter` | out | iterations run for this codeword (valid in OUT) |
| `out_converged` | out | 1 if the output satisfies every parity check |

The variable numbering is column-blocked: variable `n` lives in VNU `n / P`
at address `n mod P`. Beat t therefore carries one variable from each block
column, not NS consecutive bits.

In the load phase each beat writes the CMEMs, the DMEMs (the message and
its sign bit) and the decision memories, all at the common counter address
t. The DMEM counters are reloaded in the last cycle of each phase: to k
before a check phase, to 0 otherwise. Cycle counts, from the last input
beat to the first output beat:

* converged after n iterations: `P*(2n+1)`;
* not converged: `2*P*MAX_ITER` = 2560.

Load and output take P beats each and are not overlapped with decoding.

## The code: `ldpc_pkg`

Two functions define the code, and the decoder is generated from them:

* `base_row(v, j, MS)`: the row of the j-th 1 in base column v;
* `edge_shift(e, P)`: the shift of edge `e = v*DV + j`.

The CNU wiring comes from `cnu_edge`, which enumerates the 1s of each base
row. Elaboration stops with an error if a row does not have exactly `DC`
ones.

The intended codes come from an offline search that places the 1s of the
base matrix one at a time while keeping the shortest cycle as long as
possible. The shifts are drawn at random, and the best of several hundred
candidates is kept. Those specific matrices are not available here, so the
defaults are a stand-in with the same structure:

* the first MS base columns have 1s in rows `v + {0,1,3} mod MS`, and the
  other MS columns in rows `v + {0,4,9} mod MS`. The two offset sets have
  disjoint difference sets, so for `MS >= 19` no two base columns share two
  rows. The base graph then has girth at least 6, and H has no 4-cycles;
* the shifts are a fixed 32-bit integer hash of the edge number, modulo P.

To use another code of the same family, rewrite `base_row` and `edge_shift`.
Only `NS = 2*MS`, `DV = 3` and `DC = 6` are supported by the default
`base_row`. The hardware itself allows any degree distribution: irregular
codes would need per-unit degrees, which this RTL does not have.

## Parameters of `ldpc_decoder`

| parameter | default | meaning |
|-----------|---------|---------|
| `P` | 64 | expansion factor = depth of every memory = cycles per phase |
| `MS`, `NS` | 32, 64 | base matrix size (number of CNUs, VNUs) |
| `DV`, `DC` | 3, 6 | variable and check node degrees |
| `W` | 6 | message width |
| `MAX_ITER` | 20 | iteration limit |
| `EARLY_STOP` | 1 | stop when the syndrome is zero |

The length-8192 code of the same family is `MS = 64`, `NS = 128`, `P = 64`.
It needs 384 DMEMs, and the same RTL builds it from these parameters.

## What follows the reference architecture and what is this design's own

Taken from the architecture:

* the base-matrix expansion by shifted identities;
* MS CNUs, NS VNUs, one DMEM per base 1 and one CMEM per base column;
* the 2P-cycle iteration split into a check phase and a variable phase;
* the counter starting at k(u,v) in the check phase and at 0 in the
  variable phase;
* the code sizes and the limit of 20 iterations.

This design's own choices:

* min-sum rather than another form of belief propagation;
* 6-bit saturated messages;
* single-cycle read-compute-write memories;
* the decision bit kept in every DMEM word, and the zero-syndrome stop;
* the separate load and output phases and their valid/ready handshakes;
* the reset scheme (the controller and the counters are reset, the
  memories are not);
* the substitute base matrix and shifts.

The memories are register arrays with a combinational read. In a
standard-cell flow a real SRAM has a registered read. Using one would add a
pipeline stage to each phase, so an iteration would take `2P` plus a few
cycles, and there would be a read-after-write hazard at the phase
boundaries.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M`, and each has a cycle watchdog.

* `tb_cnu`, `tb_vnu`: random and corner-case vectors against brute-force
  integer models.
* `tb_dmem`, `tb_cmem`, `tb_hdmem`: read-modify-write and streaming
  accesses against shadow arrays.
* `tb_addr_gen`: sequences `(k+t) mod P` and `t` across phases, with stalls.
* `tb_dec_ctrl`: mode sequence, phase lengths, counter restarts, iteration
  count and converged flag, with syndrome pulses placed at random within a
  phase.
* `tb_ldpc_decoder`: the whole decoder at its default parameters. A bit-true
  reference decoder, written independently over the expanded H, runs the
  same flooding min-sum. The testbench compares every decoded bit, the
  iteration count, the converged flag and the latency. It uses:
  * a clean codeword, which stops before the first iteration;
  * noisy all-zero codewords, which stop after 2 to 8 iterations;
  * a noisy non-zero codeword, found by Gauss-Jordan elimination of H, which
    must come back exactly;
  * random values, which hit the iteration limit;
  * an all-zero codeword with 12 strong errors.

  Input and output stalls are random, and each mechanism is counted and
  must occur.
* `tb_ldpc_c2`: the same frames and checks for the length-8192
  configuration.
* `tb_ldpc_ber`: a short error-rate run of the default decoder with BPSK
  over an AWGN channel. It sends 25 frames of a non-zero codeword at each of
  four Eb/N0 points. The LLRs are `2y/σ²`, scaled by 2, rounded and
  saturated to ±31. Each frame is checked bit for bit against the reference.
  Typical output:

  | Eb/N0 | frame errors | bit error rate | average iterations |
  |-------|--------------|----------------|--------------------|
  | 1.5 dB | 25 / 25 | 8e-2 | 20 |
  | 2.0 dB | 5-6 / 25 | 6e-3 to 1e-2 | 15 |
  | 2.5 dB | 0 / 25 | 0 | 8.5-9 |
  | 3.0 dB | 0 / 25 | 0 | 6 |

  Plain min-sum with 6-bit messages loses a few tenths of a dB against
  floating-point belief propagation. A normalized or offset min-sum CNU would
  recover part of that. It is a local change inside `cnu`, but it is not
  made here.

With plain Verilator, from the directory that holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl rtl/ldpc_pkg.sv rtl/*.sv \
    tb/tb_ldpc_decoder.sv --top-module tb_ldpc_decoder -o sim
./obj_dir/sim
```

For a unit, pass `rtl/ldpc_pkg.sv`, the unit's file and its testbench. The
full-size decoder test builds in about 15 s and runs in well under a second.

Not verified: error-rate curves (those take millions of frames), timing,
any gate-level netlist, and `EARLY_STOP = 0`, which no testbench sets.
