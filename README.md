# VB sphere decoder for a 4x4 16-QAM MIMO receiver

A MIMO receiver with four transmit and four receive antennas sees
`y = H s + n`: four 16-QAM symbols mixed by a 4x4 channel matrix and buried
in noise. The best decision, maximum likelihood (ML), is the symbol vector
whose image `H s` lies closest to `y`. Trying all 16^4 = 65536 candidates is
too slow, so this design runs the Viterbo-Boutros (VB) sphere search instead.
VB walks a tree of partial decisions, one antenna (layer) at a time. It only
enters branches that can still lie inside a sphere around the received
point, and it shrinks the sphere every time it finds a closer point. The
result is the exact ML decision at a fraction of the work.

The work is split between hardware and software. Everything that changes
only with the channel, or is too costly for logic, runs in software on an
embedded processor next to the logic:

- Cholesky factorisation of the Gram matrix;
- the inverse and the zero-forcing estimate;
- the initial radius.

The RTL here is the part that runs for every received vector: the
closest-point search itself, plus the 16-QAM mapping and demapping around it.
Three kinds of concurrency speed it up:

- the processor prepares the next problem while the hardware decodes the
  current one;
- the in-phase and quadrature parts are searched by two cores at once;
- inside a core, several algorithm steps share one clock cycle.

## The problem a search core solves

The channel is treated as real-valued, so the same real `H` acts on the
in-phase and on the quadrature parts. Each part is then an independent
4-dimensional real problem. On each axis a 16-QAM symbol is a 4-level PAM
value `s = 2u - 3` with an index `u` in 0..3. Working on indices turns the
problem into a search over the integer lattice:

    y' = y + 3 H 1 = (2H) u + n
    minimise  || R (rho - u) ||^2   over u in {0..3}^4

Here `R` is the upper-triangular Cholesky factor of `(2H)^T (2H)`, and
`rho = (2H)^-1 y'` is the unconstrained (zero-forcing) solution. The
processor hands each core these numbers:

| input      | meaning                                      |
|------------|----------------------------------------------|
| `qd[i]`    | `q_ii = r_ii^2`                              |
| `q[i][j]`  | `q_ij = r_ij / r_ii` for `i < j` (the rest is unused) |
| `iq[i]`    | `1 / q_ii`, so the hardware never divides    |
| `rho[i]`   | zero-forcing estimate in index space         |
| `radius`   | initial squared radius `C`                   |

With these, the squared distance splits into one term per layer:

    d(u) = sum_i q_ii (S_i - u_i)^2
    S_i  = rho_i + sum_{j>i} q_ij (rho_j - u_j)

`S_i` depends only on the layers above `i`, so the search fixes `u_3` first,
then `u_2`, and so on down to `u_0`.

`tb/vb_tb_pkg.sv` contains a reference implementation of this preprocessing
in real arithmetic. It also contains the channel model and an exhaustive ML
search, which the testbenches use to check the hardware.

## The search: states D, A, B, C

Each core (`vb_core`) keeps four values per layer `k`: the current index
`u_k`, the upper bound `L_k`, the centre `S_k` and the remaining squared
radius `T_k`. A controller (`vb_fsm`) moves it through four working states.
Layer 3 is searched first and layer 0 last.

- **D, bounds** (`vb_state_d`). The admissible indices of layer `k` satisfy
  `|S_k - u| <= sqrt(T_k / q_kk)`. D computes `r = sqrt(T_k * iq_k)`, then
  `lo = ceil(S_k - r)` and `L_k = floor(S_k + r)`, both clipped to 0..3.
  `lo` becomes the first candidate. If the interval is empty, the next state
  is C; otherwise it is A, or B on the last layer. D is the only expensive
  state, because of its square root.
- **A, descend** (`vb_state_a`). Computes `S_{k-1}` and
  `T_{k-1} = T_k - q_kk (S_k - u_k)^2` in one cycle, moves to layer `k-1`,
  then goes to D.
- **B, complete point** (`vb_state_b`). All indices are fixed. B computes
  `d_new = C - T_0 + q_00 (S_0 - u_0)^2`.
  - If `d_new < d_best`, the point is recorded and the radius becomes
    `C = d_new`. The search restarts at the top layer with the smaller
    sphere, through D.
  - Otherwise `u_0` is incremented. The next state is C if `u_0` passes
    `L_0`, and B again if not.
- **C, climb**. On the top layer the search is over. Otherwise the core
  moves up one layer and increments that layer's index. The next state is C
  again if the index passes its bound, and A if not.

The VB step "increment `u_i` and compare it with `L_i`" never gets a cycle
of its own:

- D hands over its lower bound as the first candidate;
- B and C increment and test in the same cycle as their other work.

This is the third kind of concurrency listed above.

Because the radius is set to the distance of the best point so far, every
point that reaches B lies inside the sphere, so in practice B almost always
finds a closer point. The search ends when C leaves the top layer. With
strict `<` comparisons it always terminates. If no lattice point lies
strictly inside the initial radius, the core ends with `found = 0` and
`u_best = 0`. The processor can then retry with a larger radius.

**Cycle cost.** Each visit to D costs `(W+F)/2/RB + 1` cycles, which is 16
cycles at the defaults. A, B and C cost one cycle each. The total number of
cycles depends on the data. Measured averages per received vector (both
cores, i.i.d. Gaussian channel):

| Eb/N0 | cycles per vector |
|-------|-------------------|
| 10 dB | 380               |
| 15 dB | 280               |
| 20 dB | 223               |

At 20 dB that is 16 bits per 223 cycles: 7.2 Mbit/s per 100 MHz of clock.

## Number format and numerical safeguards

All values are two's-complement fixed point: `W = 40` bit words with
`F = 20` fraction bits, so the integer range is ±524288 and the resolution
about 1e-6. The format had to be this wide because of nearly singular
channels. For such a channel, `rho` reaches thousands and the sum for `S_i`
cancels large terms. With 32-bit words and 12 fraction bits, the decisions
differed from ML on about one vector in a thousand at 15 dB. At 40/20 bits
they matched ML on all 3000 test vectors.

Two more safeguards handle the same channels:

- `q_kk (S_k - u_k)^2` is formed as a 3W-bit product and then saturated, in
  A and in B. A tiny `q_kk` multiplies a huge `S_k - u_k`, and squaring
  first would overflow.
- If `T_k / q_kk` exceeds the word range, D returns the whole constellation
  0..3. Clamping the root there could turn a full interval into an empty one.

The processor must saturate what it hands over. For example, `1/q_kk` of a
singular channel must be clipped to the largest word.

`RB`, the number of square-root bits decided per cycle, trades D's latency
against the depth of its logic. The root takes `(W+F)/RB` cycles, so a
visit to D costs 31 cycles with `RB = 1` and 16 with `RB = 2`.

## Receiver and transmitter around the cores

`vb_mimo_decoder` holds two cores, one for the in-phase indices and one for
the quadrature indices. Both take the same `q`, `qd` and `iq`, and each has
its own `rho` and radius. Both start on the same input transfer. The results
are registered and `out_valid` pulses once the slower core has finished.
Four `qam16_demod` instances then map the decided levels `2u-3` back to bits.
Each one picks the constellation point at minimum Euclidean distance, so it
also works as a hard slicer for unquantised symbols.

On the transmit side, `qam16_mod` maps 4 bits to one symbol:

- `bits[3:2]` select the in-phase level and `bits[1:0]` the quadrature level;
- each pair is Gray coded, 00, 01, 11, 10 → -3, -1, +1, +3.

`vb_mimo_top` places four modulators and the decoder side by side. The
radio channel lies between them and outside this design.

## Interface of `vb_mimo_top`

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst_n` | in | 1 | clock, asynchronous active-low reset |
| `tx_valid`, `tx_bits[4]` | in | 1, 4 each | four 4-bit stream words |
| `tx_sym_valid`, `tx_sym_i[4]`, `tx_sym_q[4]` | out | 1, 3 each (signed) | PAM levels, one cycle after `tx_valid` |
| `rx_valid` / `rx_ready` | in / out | 1 | handshake for one preprocessed problem; hold `rx_valid` until `rx_ready` |
| `q[4][4]`, `qd[4]`, `iq[4]` | in | W | VB coefficients, shared by both parts |
| `rho_re[4]`, `rho_im[4]`, `radius_re`, `radius_im` | in | W | per-part estimate and squared radius |
| `rx_out_valid` | out | 1 | one-cycle pulse; the results below hold until the next pulse |
| `rx_bits[4]` | out | 4 each | decided bits per antenna, `[3:2]` in-phase, `[1:0]` quadrature |
| `rx_u_re[4]`, `rx_u_im[4]` | out | 4 each (signed) | decided indices |
| `found_re`, `found_im`, `d_re`, `d_im` | out | 1, W | point found; squared distance of the decision |

All inputs are captured on the transfer, so the processor may change them
right away. `rx_ready` is low while either core is busy, and it returns in
the cycle `rx_out_valid` is high. The parameters `M`, `W`, `F`, `UMAX`, `UW`
and `RB` default to the values in `rtl/vb_pkg.sv`. Synthesised
coarse-grained, the top has about 1000 word-level cells and 3570 flip-flop
bits; almost all of it is the two cores' registers and multipliers.

## Relation to the published design

These points follow the published design:

- the 4x4 16-QAM configuration;
- the hardware/software split;
- the four VB states and their transitions, including the restart from the
  top layer with the new radius after every closer point;
- the three kinds of concurrency;
- a modulator with a 4-bit input;
- a demodulator that decides by minimum Euclidean distance.

These are this design's own choices, because the published description does
not give them:

- the number format, the square-root circuit and `RB`;
- how the step overlap inside the controller is arranged;
- squared distances and radii in place of distances, so that B needs no
  root;
- the index-space formulation and the coefficients the processor supplies;
- the Gray map and bit order;
- the valid/ready handshake and the reset.

Where the published step list is ambiguous about `u_i = L_i`, the last
admissible index is tried, as in standard VB.

The parallel real/imaginary search assumes a real-valued channel matrix.
For a general complex channel the two parts are coupled, and one
8-dimensional search would be needed. The core is written for a general
`M`, but only `M = 4` has been simulated.

These parts are not included:

- **The preprocessing software and the processor.** A real-arithmetic model
  lives in `tb/vb_tb_pkg.sv`.
- **The adaptive choice of the initial radius.** The testbenches use the
  distance of the rounded zero-forcing point plus a margin.
- **A second, modified VB decoder.** It would rebalance the work away from
  state D's square roots, but its algorithm is not specified.

The published decoding rate is 37.3 Mbit/s at 20 dB. No clock frequency or
channel statistics are given with it, so this RTL cannot be checked against
that figure. At the measured 223 cycles per vector, the rate would need a
520 MHz clock.

## Verification

Every module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a cycle watchdog.

| testbench | what it checks |
|-----------|----------------|
| `tb_qam16_mod`, `tb_qam16_demod` | exhaustive map; Gray neighbours; random points against a real-arithmetic nearest-level decision |
| `tb_vb_sqrt` | root bounds and exact latency, for `RB` = 2 and 1 |
| `tb_vb_state_a`, `tb_vb_state_b`, `tb_vb_state_d` | formulas against real arithmetic; D's latency; empty and overflowing intervals |
| `tb_vb_fsm` | every cycle against a transition table, under random status inputs |
| `tb_vb_core` | 300 searches against exhaustive ML; large radii (several radius shrinks in one search); radii too small to hold any point; inputs scrambled right after start |
| `tb_vb_mimo_decoder` | both parts against ML; bits; handshake |
| `tb_vb_mimo_top` | 200 vectors end to end at default parameters, see below |
| `tb_vb_ber_sweep` | 1000 vectors each at Eb/N0 = 10, 15 and 20 dB over i.i.d. Gaussian channels |

`tb_vb_mimo_top` sends the bits through the modulators, a channel model and
the preprocessing model, with the next problem offered while the receiver is
busy. Every decision is compared with ML. The testbench also requires each
of these to happen at least once:

- each of the states A, B, C and D;
- a radius shrink, and a search with several shrinks;
- an empty interval;
- an index step folded into B or C;
- a search that finds no point;
- one core waiting for the other;
- an overflowing interval on a nearly singular channel.

`tb_vb_ber_sweep` reports hardware and ML bit error rates and the cycles
per vector. Hardware BER equals ML BER at all three points: 1.06e-2,
8.75e-4 and 3.75e-4.

A near-tie in ML distance (within 0.02) may be resolved either way by fixed
point and is accepted.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert -Irtl -Itb rtl/vb_pkg.sv tb/vb_tb_pkg.sv \
        tb/tb_vb_mimo_top.sv --top-module tb_vb_mimo_top
    ./obj_dir/Vtb_vb_mimo_top

Substitute any other `tb_*` name. Each run takes well under a second of
simulation time.

## Files

| file | content |
|------|---------|
| `rtl/vb_pkg.sv` | default sizes and the controller state type |
| `rtl/vb_mimo_top.sv` | top: modulators and decoder |
| `rtl/vb_mimo_decoder.sv` | two cores, join, demodulators |
| `rtl/vb_core.sv` | one search engine: registers and the state units |
| `rtl/vb_fsm.sv` | search controller |
| `rtl/vb_state_a.sv`, `vb_state_b.sv`, `vb_state_d.sv` | datapaths of states A, B and D |
| `rtl/vb_sqrt.sv` | digit-serial square root |
| `rtl/qam16_mod.sv`, `qam16_demod.sv` | 16-QAM mapper and minimum-distance demapper |
| `tb/vb_tb_pkg.sv` | channel, preprocessing and ML reference models |
