# Folded polar encoder for long codes

A polar code of length N = 2^n encodes a message vector u with the n-fold
Kronecker power of the kernel F = [[1,0],[1,1]]. Written as a butterfly
network, encoding takes n stages of N/2 two-input XOR nodes. Built fully
parallel, that is (N/2)·log2 N XOR gates: 32 for N = 16, which is fine. For the
message lengths of storage systems (a 4096-byte sector is 32768 bits) it is
not. This encoder takes P message bits per clock cycle instead of N. It
reuses a few kernel units over time, so it needs only (P/2)·log2 N XOR gates
and N − P one-bit delay elements. It still encodes a frame every N/P cycles,
and it works for any power-of-two N and P.

The default configuration is N = 16, P = 4. It has 8 kernel units (two per
stage), 12 delay elements and 4 cycles per frame. The encoder streams, so
frames can follow each other without a gap.

## What is computed

For input u (index 0 … N−1) the encoder produces

    y = u · F^(⊗n),   i.e.   y[j] = XOR of u[i] over all i whose 1-bits include the 1-bits of j.

y is the polar codeword x = u·G_N (with G_N = B_N·F^(⊗n), B_N the bit-reversal
permutation) in bit-reversed order. The input arrives in natural order and no
reordering buffer is needed on either side. Choosing frozen bits (the zeros
in u) is left to whatever feeds the encoder.

## The butterfly network and how it is folded

Stage s (s = 1 … n) combines every pair of indices (i, i + 2^(s−1)) with bit
s−1 of i clear: the lower bit becomes the XOR of the two and the upper bit
passes unchanged (`polar_kernel_fu`). Input word t holds u[P·t … P·t+P−1], with
bit P·t+l on lane l. The stages then fall into two kinds:

* **Intra-word stages, s ≤ log2 P.** Both members of each pair are in the same
  word, on lanes l and l + 2^(s−1). Such a stage is P/2 kernel units on fixed
  wires. It has no storage and no multiplexer (`polar_intra_stage`).
* **Folded stages, s > log2 P.** The members are D = 2^(s−1)/P words apart on
  the same lane. The data of one word must be held until its partner word
  arrives, and the P/2 kernel units must be kept busy in every cycle
  (`polar_fold_stage`).

For N = 16 and P = 4, stages 1–2 are intra-word stages. Stages 3 and 4 are
folded, with D = 1 and D = 2.

## The delay–switch–delay network (the hard part)

Each folded stage pairs lane k with lane k + P/2 and puts that lane pair
through a `polar_commutator` with distance D:

    in_top ─────────────────┐           ┌── D delays ──► out_top ─┐
                            ├─ 2×2 mux ─┤                          ├─ kernel ─► lanes k, k+P/2
    in_bot ── D delays ─────┘  (swap)   └────────────────► out_bot ─┘

The select line `swap` is high during the second half of each 2D-cycle block
of the stage's incoming data. Within one block, call the first-lane bits of the
first half p and those of the second half p′; q and q′ are the same for the
second lane. The kernel then receives:

* (p, p′) in cycles D … 2D−1 of the block. p has waited D cycles in the output
  delay; p′ arrives directly through the switch.
* (q, q′) in the next D cycles, which overlap the start of the next block. q
  has waited 2D cycles; q′ has waited D cycles.

So each kernel unit does one pair per cycle with no idle slots. Each lane pair
uses 2D delay elements, so a stage has P·D = 2^(s−1), and the whole encoder
has N − P. For N = 16, P = 4 the unit on lanes 0/2 of stage 3 handles the
index pairs in this order:

| cycle (from frame start)     | 1     | 2     | 3      | 4 (= next frame's 0) |
|------------------------------|-------|-------|--------|----------------------|
| stage 3, unit on lanes 0/2   | (0,4) | (2,6) | (8,12) | (10,14)              |
| stage 4, unit on lanes 0/2   | –     | –     | (0,8)  | (2,10)  then (4,12), (6,14) |

Stage 4's schedule is stage 3's shifted by two more cycles. Each folded stage
adds its D cycles of latency, so the total latency is N/P − 1 cycles. A side
effect is that the commutator exchanges one index bit between "which word" and
"which lane". That is why the output words are not simply consecutive indices
(next section).

## Output order

Output word t (t = 0 … N/P−1), lane l, carries

    y[ (l mod P/2) + t·P/2 + (l div P/2)·N/2 ]

For N = 16, P = 4 the four output words are y[0,1,8,9], y[2,3,10,11],
y[4,5,12,13], y[6,7,14,15] on lanes 0–3. A consumer that wants y in natural
order needs a reorder buffer. In the other direction, to get x in natural
order, bit-reverse the index.

## Interface and timing (`polar_enc_top`)

| port        | dir | width | meaning |
|-------------|-----|-------|---------|
| `clk`       | in  | 1     | clock, rising edge |
| `rst`       | in  | 1     | synchronous, active-high reset of the control; drops frames in flight |
| `in_valid`  | in  | 1     | `in_data` holds a message word |
| `in_data`   | in  | P     | word t of the frame: bit l = u[P·t + l] |
| `out_valid` | out | 1     | `out_data` holds a codeword word |
| `out_last`  | out | 1     | last word of an output frame |
| `out_data`  | out | P     | codeword word, order as above |

* A frame is N/P consecutive cycles with `in_valid` high. Frames may follow
  back to back or with any gap between them. A frame may not pause once it has
  started; an assertion in `polar_enc_ctrl` reports a violation. There is no
  back-pressure.
* The first output word appears N/P − 1 cycles after the first input word (3
  cycles for the default). The frame's N/P output words are consecutive.
  Throughput is P bits per cycle.
* The path from `in_data` to `out_data` is combinational: it runs through one
  XOR per stage and the multiplexers of the folded stages. There are no
  pipeline registers beyond the delay elements. For large n, register the
  outputs (or insert registers between stages and delay `out_valid` to match).
* The delay elements are not reset. The valid flags make sure a stale bit is
  never used. Without the reset, long chains can map to shift-register or RAM
  primitives.

## Control (`polar_enc_ctrl`)

The select lines depend only on where a frame's data is in its passage
through the encoder. The data of a frame enters folded stage m (m = 0 for the
first folded stage) exactly 2^m − 1 cycles after the frame's first word, and
it reaches the output after N/P − 1 cycles. The control has four parts:

* A word counter: the first word of a frame is the cycle with `in_valid`
  high and the counter at 0.
* An age counter: cycles since the latest frame start, saturating at N/P.
* One run counter per folded stage and one for the output. Each starts when
  the age equals that tap's entry delay, then counts the frame's N/P words
  past the tap.
* The outputs: `swap[m]` is bit m of stage m's run counter while that run is
  active. `out_valid` and `out_last` come from the output tap.

Frames start at least N/P cycles apart and every entry delay is below N/P. A
tap has therefore always finished one frame before the next frame reaches it.
The cost is O(log²(N/P)) flip-flops rather than a delay line as long as the
latency.

## Cost

| N     | P  | kernel units (XOR) | delay elements | cycles/frame | latency |
|-------|----|--------------------|----------------|--------------|---------|
| 16    | 4  | 8                  | 12             | 4            | 3       |
| 32768 | 4  | 30                 | 32764          | 8192         | 8191    |
| 32768 | 16 | 120                | 32752          | 2048         | 2047    |
| 131072| 16 | 136                | 131056         | 8192         | 8191    |

A fully parallel encoder for N = 16 has 32 XOR gates.

## Files

`rtl/` (one module per file):

* `polar_enc_pkg.sv`: stage counts, distances and entry delays derived from N and P.
* `polar_kernel_fu.sv`: the 2×2 kernel, (a, b) → (a⊕b, b).
* `polar_intra_stage.sv`: an intra-word stage.
* `polar_delay.sv`: a chain of D delay elements.
* `polar_commutator.sv`: the delay–switch–delay network.
* `polar_fold_stage.sv`: a folded stage (commutators and kernel units).
* `polar_enc_ctrl.sv`: the select lines and the output flags.
* `polar_enc_top.sv`: the encoder. Parameters `N` (default 16) and `P`
  (default 4), with 2 ≤ P < N, both powers of two.

`tb/` (self-checking; each prints `TB_RESULT checks=… failures=…`):

* `tb_polar_kernel_fu`, `tb_polar_intra_stage`, `tb_polar_delay`,
  `tb_polar_commutator`, `tb_polar_fold_stage`, `tb_polar_enc_ctrl`: one per
  module. Each compares the module with a model written separately in the
  testbench.
* `tb_polar_enc_top`: the encoder at its defaults. It streams 60 random
  frames, back to back and after gaps, and resets once in the middle of a
  frame. Every cycle it checks `out_valid`, `out_last`, every output bit and
  the latency. It also counts how often each mechanism occurred, and counts a
  failure for any that never did.
* `tb_polar_enc_sweep`: N/P = 16/2, 32/8, 256/4 and 1024/16.
* `tb_polar_enc_long`: storage-sector sizes. N = 32768 (4096 bytes) runs with
  P = 4 and P = 16; N = 65536 and N = 131072 (8192 and 16384 bytes) run with
  P = 16.
* `tb_polar_enc_driver`: the shared stimulus and checker. Its reference
  uses the subset formula above; for N > 256 it uses a software butterfly,
  which is cross-checked against the subset formula at small N.

## Simulating

With Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb \
        rtl/polar_enc_pkg.sv tb/tb_polar_enc_top.sv --top-module tb_polar_enc_top
    ./obj_dir/Vtb_polar_enc_top

Any other testbench works the same way with its name in place of
`tb_polar_enc_top`. The package has to be given first; the other files are
found through `-I`. `tb_polar_enc_long` takes about a minute to build and
about as long to run. To use another size, set `N` and `P` on `polar_enc_top`; the driver
testbench takes the same two parameters.

## How far it has been checked, and what is this design's own

All testbenches pass under Verilator. All files also parse and elaborate in
Yosys with the slang front end. Each unit testbench was also run against a
deliberately broken copy of its module, and it failed. The encoder's output
matches an independent definition of u·F^(⊗n) for every configuration listed
above, up to N = 131072. It has not been run on an FPGA or checked for
timing.

These parts follow the architecture as it was proposed: the kernel units
(P/2 per stage, 8 in total), the split into multiplexer-free intra-word
stages and multiplexed folded stages, the order in which each unit serves its
pairs (the folding sets), the count of 12 delay elements for N = 16, P = 4, and
natural-order input with bit-reversed output. The design has 8 kernel units for
N = 16, P = 4, each one XOR gate.

These are choices of this design:

* the exact delay–switch–delay arrangement of the multiplexers and delays
  (it reproduces the published schedule and delay count);
* the lane pairing (k, k + P/2);
* the output word order that results from the two points above;
* the whole control: frame framing with `in_valid`, the run counters, and the
  `out_valid`/`out_last` flags;
* the synchronous reset;
* no reset on the delay elements;
* the absence of output pipeline registers.

The select line is generated inside the encoder, not brought in as a port.
