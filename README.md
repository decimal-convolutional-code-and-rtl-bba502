# Decimal convolutional code: encoder and low-power Viterbi decoder

A convolutional code's error correction and its Viterbi decoder's cost both
grow with the constraint length K: each extra encoder flip-flop doubles the
number of trellis states the decoder tracks. A *decimal* convolutional code
sits between two integer constraint lengths. It encodes the first part of
every frame with constraint length K1 and, from a fixed *break stage* BS on,
with K2 = K1 - 1. The effective constraint length is

    K = K2 + (BS - 1) / L          (L = frame length in trellis stages)

With K1 = 7, L = 30 and BS = 10 this is 6 + 9/30 = 6.3, the code this RTL
builds by default. Once past the break stage, the decoder needs only half the
trellis states. Its path-metric updates, survivor memory and trace-back
logic all halve for the rest of the frame. That saving in power and area is
what the scheme is for.

This repository holds synthesizable SystemVerilog for the encoder, the
decoder and a self-contained test system: a random source, clock-phase
generators, the encoder, a channel stage with noise injection, the decoder and
a frame comparator.

## The frame

| symbol index | content | code |
|---|---|---|
| 0 .. BS-2 | stages 1 .. BS-1 | constraint length K1 (all K1 taps) |
| BS-1 .. BS-2+REP/2 | latent-bit repetitions, symbol = {latent, latent} | repetition |
| then | stages BS .. L | constraint length K1-1 (oldest tap dropped) |

* Each frame starts with the encoder register cleared.
* The last K1-2 stages are tail stages with input 0. The frame therefore ends
  in reduced state 0 and carries ND = L - (K1-2) data bits: 25 for the
  defaults. The plain K1 code would carry 24, because the shorter code after
  the break stage needs one tail bit fewer.
* Rate: ND data bits in L + REP/2 symbols of 2 bits each. The defaults give
  25 bits in 32 symbols.

**Latent bit.** At the break stage the encoder's oldest register bit stops
reaching the outputs. That bit is the input of stage BS-(K1-1), stage 4 for
the defaults. The decoder can no longer tell the two values of this bit
apart from the code, and that costs error-correction performance. To win most
of that back, the encoder sends the bit REP times (default 4) by plain
repetition, as REP/2 extra symbols just before the break stage. With REP = 0
the plain decimal code is sent.

**Generators.** The defaults are 171 and 133 octal, the usual K = 7 pair.
From the break stage on, both generators simply lose their oldest tap. The
encoder keeps all K1-1 register bits and masks that tap.

Bit conventions, used throughout the RTL and the test benches:

* A state holds past inputs with the MSB newest and the LSB oldest.
* The register vector of a stage is {u_t, state}.
* Generator bit K-1 taps u_t.
* A symbol is {c0, c1}, with c0 from G0, and c0 is sent first.

## The decoder and the break stage

`dcc_decoder` is made of the blocks below. It takes one received symbol per
`in_valid` and can be fed at any rate. A frame's result appears two cycles
after its last symbol.

**BMU (`bmu`).** Received values are Q-bit soft decisions (Q = 3 by
default): 0 means a sure "0" and 2^Q-1 a sure "1". A branch metric is the sum
of two distances: r for an expected 0, and (2^Q-1) - r for an expected 1.
Smaller is better. Q = 1 gives hard-decision Hamming metrics.

**PMU (`pmu`).** This is the part that differs most from an ordinary Viterbi
decoder. It has two banks of the same two-input ACS unit (`acs2`):

* **Before the break stage**, bank A (2^(K1-1) = 64 units) runs the full
  trellis.
* **At the break stage**, each new reduced state n (K1-2 bits) has *four*
  predecessors {n without its newest bit, x, y}:
  * x is the input bit that the short code still sees. It changes the branch
    metric.
  * y is the latent bit. It does not change the branch metric.

  A dedicated four-input ACS would be new hardware. Instead, two layers of
  the existing two-input units do the job:
  1. **Merge.** The lower half of bank A merges each pair of old states that
     differ only in y. Such a pair shares its branch metric, so the merge adds
     a zero branch metric.
  2. **Select.** Bank B (2^(K1-2) = 32 units) runs an ordinary ACS on the
     merged metrics, with the real branch metrics of the short code.

  The result equals the four-way minimum. The cost is a longer combinational
  path in that one stage.
* **After the break stage**, only bank B works. Bank A and the upper half of
  the metric registers are left idle. Units whose result a stage does not
  use get constant inputs (operand isolation), so they do not switch.

**Using the repetitions.** The decoder sums the soft values of the 2·(REP/2)
repeated latent copies and compares the sum with the midpoint:

* If the sum lies clearly on one side, the merge is *forced*: the path with
  the other latent value is given the largest metric.
* If the sum is exactly at the midpoint, the merge compares metrics as
  usual.

**Metrics.** They are not normalised. Each frame restarts from state 0 at
metric 0 and every other state at an "unreachable" value of 2^(PMW-1). PMW
(10 bits for the defaults) is wide enough for a whole frame, and `acs2` clips
its sums.

**SMU (`smu`).** One row of decision bits per stage, in registers:

| stages | bits per row |
|---|---|
| 1 .. BS-1 | 64 |
| BS | 32 branch decisions x + 32 latent decisions y (one per merged state) |
| BS+1 .. L | 32 |

From the break stage on, the memory per stage is halved.

**TBU (`tbu`, `tb_cell1`, `tb_cell2`).** A combinational chain with one cell
per stage. It walks back from reduced state 0 at the end of the frame:

1. Stages L .. BS+1 use `tb_cell1` at the reduced width. Each step's decoded
   bit is the newest state bit. The previous state is the current one
   shifted, with the stored decision as its new oldest bit.
2. The break stage uses `tb_cell2`. It reads x for the current state, forms
   the merged state, reads y for that merged state and returns the full-width
   predecessor {merged, y}.
3. Stages BS-1 .. 1 use `tb_cell1` at the full width.

The chain runs in the cycle after the last stage, and its ND data bits are
registered. The chain is the longest path in the decoder. The cells after
the break stage are narrower than those of a plain K1 decoder.

## The test system (`dcc_system`)

| part | clock phase | what it does |
|---|---|---|
| `clk_gen` | – | CLK1 = system clock / DIV (DIV = 2). CLK2 is CLK1 delayed by one system clock; CLK3 is CLK2 delayed by one more. All three are brought out. Inside, the design stays on the system clock and uses one-cycle strobes at their rising edges. |
| `lfsr_src` | CLK1 | 15-bit LFSR, x^15 + x^14 + 1. It offers a new bit only after the encoder has taken the previous one, so it stalls during the repetition symbols and the tail. |
| `dcc_encoder` | CLK2 | one symbol per CLK2 edge |
| channel stage | – | Maps each code bit to 0 or 2^Q-1, adds the signed `noise0`/`noise1` inputs and clips. With zero noise it is a direct connection. |
| `dcc_decoder` | CLK3 | takes each symbol on the CLK3 phase |
| comparator | – | Compares each decoded frame with the bits the source sent. It counts frames, wrong frames and wrong bits. |

One frame takes (L + REP/2) · DIV system cycles: 64 for the defaults.

## Parameters

| parameter | default | meaning |
|---|---|---|
| K1 | 7 | constraint length before the break stage; K2 = K1-1 (K1 ≥ 4) |
| L | 30 | trellis stages per frame |
| BS | 10 | break stage, 1 < BS < L |
| REP | 4 | latent-bit copies per frame (even; 0 = none) |
| G0, G1 | 171, 133 octal | generators of the K1 code, bit K1-1 taps the newest input |
| Q | 3 | soft-decision width |
| DIV | 2 | system clock cycles per symbol (`dcc_system`) |

The defaults K1 = 7, REP = 4 and DIV = 2 are those of the original design of this decoder.
L = 30 and BS = 10 are the values stated for the 3.3 sample code; they are
used for 6.3 because 6 + 9/30 = 6.3. The generators, Q, the LFSR polynomial,
the clock-phase delays, the frame layout of the repetitions, the tie rules
and the channel stage are this implementation's own choices.

The sample code of constraint length 3.3 is obtained with K1 = 4 (generators
15/17 octal are used in the tests).

## How far it is verified

Each block has a self-checking test bench in `tb/` that prints
`TB_RESULT checks=N failures=M`. The reference models in
`tb/dcc_ref_pkg.sv` are written from the code's definition, not from the
RTL. The reference encoder works from the list of past inputs. The reference
Viterbi runs one 64-state trellis for the whole frame, with the oldest tap
masked after the break stage, so it takes a plain four-way minimum there.

* `tb_dcc_encoder`: every symbol, the frame markers, and the symbol and
  data-bit counts, for the 6.3 code with repetition and the 3.3 code without.
* `tb_pmu`: every path metric of the active trellis against a direct
  four-way minimum. Also checks that every decision and a forced latent bit
  are consistent with the metrics.
* `tb_tbu`: random survivor paths, 6.3 and 3.3.
* `tb_dcc_decoder`:
  * Clean frames decode exactly.
  * Noisy frames: the decoded frame's soft distance to the received frame
    equals the reference maximum-likelihood distance, restricted to the
    latent value the repetitions indicate.
  * Ties in the repetitions are included.
  * Output latency is two cycles.
* `tb_dcc_system`: the whole system at its default parameters. It runs clean
  frames, one inverted code bit per frame, forced latent ties and heavy
  noise. It checks the frame rate and the error counters. It also counts
  source stalls, break stages, forced and tied latent decisions, and
  corrected frames.
* `tb_acs2`, `tb_bmu`, `tb_smu`, `tb_lfsr_src`, `tb_clk_gen`: unit tests.
* `tb_ber_awgn`: error rate over a Gaussian channel (next section).
* `tb_acs_activity`: switching activity of the path metric unit (below).

## Error rate at Eb/N0 = 4 dB

`tb_ber_awgn` runs three decoders side by side over an AWGN channel with
BPSK. Each gets 1500 random frames. Received values are quantised to 3 bits
over [-1, +1]. Eb is counted per data bit, so the tail and the repetition
symbols cost signal energy. One run gave:

| code | bit-error rate |
|---|---|
| 6.3 (K1 = 7), 4 latent copies | 4.1e-3 |
| 3.3 (K1 = 4), 4 latent copies | 5.5e-3 |
| 3.3 (K1 = 4), no latent copy | 4.1e-3 |
| uncoded BPSK, for comparison | 1.25e-2 |

The numbers vary a little with the random seed. At this frame length and
with this way of charging energy, the four repetitions cost about as much
energy as they recover.

The test bench checks only that every code beats uncoded BPSK. The absolute
rates depend on choices made here, above all the generators. Removing the
oldest tap of 171/133 leaves a weaker K = 6 code than the best K = 6 pair.
Other generator pairs can be set through G0/G1.

## Switching activity

Simulation cannot measure power. As a stand-in, `tb_acs_activity` counts bit
toggles on the inputs of all ACS units while three decoders decode noisy
frames:

| decoder | toggles per stage before / at / after the break stage | per frame, relative |
|---|---|---|
| 6.3 (break stage 10) | 603 / 713 / 330 | 0.69 |
| K1 = 7, break stage moved to 29 (almost plain K = 7) | 604 / 725 / 714 | 1.00 |
| K1 = 6, break stage at 29 (almost plain K = 6) | 301 / 365 / 365 | 0.50 |

Activity halves after the break stage, as intended. The break stage itself
costs a little more than an ordinary stage, because two layers of ACS units
switch. The count covers only the path metric unit. It leaves out the
survivor memory, the trace-back chain and the clock network.

Not reproduced: the power and delay figures of an FPGA implementation. The
RTL has not been run on an FPGA.

## Simulating

Any test bench builds with plain Verilator 5. Give the packages first:

    verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/dcc_pkg.sv tb/dcc_ref_pkg.sv tb/tb_dcc_system.sv --top-module tb_dcc_system
    ./obj_dir/Vtb_dcc_system

Lint a module the same way, with `--lint-only -Wall -y rtl rtl/dcc_pkg.sv
rtl/<module>.sv --top-module <module>`. Every test bench except
`tb_ber_awgn` finishes in well under a second of simulation time;
`tb_ber_awgn` takes about 15 seconds.
