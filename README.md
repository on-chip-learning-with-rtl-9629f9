# Digital oscillatory neural network with processor-side learning

This is the programmable-logic half of a small on-chip learning system built
around an **oscillatory neural network (ONN)**. An ONN computes with the
*phases* of coupled oscillators. Here it works as an auto-associative memory:
it stores a few binary images in its coupling weights. Given a noisy or
partly grey copy of one of them, it settles on the stored image.

The network has 15 neurons, one per pixel of a 5x3 image. A processor on the
same chip runs the learning rule (Hebbian or Storkey) in software. It talks to
this logic over AXI4-Lite. To learn, it puts the network in learning mode,
writes the 225 new weights as 38 bus words and leaves learning mode. To
recall, it writes an image as initial phases, starts a run and reads back the
final phases.

The RTL follows a published architecture for on-chip learning with a
15-neuron digital ONN on a ZYNQ device. These parts come from that
architecture:

- the partition into processor and logic;
- the 16-clock oscillation period;
- the phase encoding;
- the 5-bit signed weights;
- the packing of six weights per 32-bit word.

That architecture does not say how the coupling shifts a phase, what the
register map is, or when a run stops. Those parts are this design's own, as
described below.

## Phases, weights and what a run computes

- **Oscillators.** Every neuron outputs a square wave with a period of 16
  clocks, high for 8 clocks and low for 8. Its phase is a number 0..15: the
  clock in the period at which its wave rises. Phase 8 is 180 degrees, the
  exact opposite of phase 0.
- **Input image.** A white pixel loads phase 0 and a black pixel loads
  phase 8. Grey levels use the values in between, so 4 is mid-grey.
- **Weights.** `w[i][j]` is a signed 5-bit integer in -15..+15. It couples
  oscillator j into neuron i. A positive weight pulls the two neurons into
  phase. A negative weight pushes them into anti-phase.
- **Result.** Only phase *differences* carry information, so a pattern and
  its inverse are the same state of the network. The read-out
  `PATTERN_OUT[i]` is 1 when neuron i is more than a quarter period (4 steps)
  away from neuron 0. It is therefore the image XOR its pixel 0.

## How a neuron moves its phase

Every clock, neuron i forms the synapse sum

    S_i(t) = sum over j of ( osc_j(t) ? +w[i][j] : -w[i][j] )

This treats each oscillator as +1 or -1 (`onn_synapse_row`, a single
combinational adder). The sign of `S_i` is the waveform the coupling is
pulling the neuron towards: positive means high, negative means low, and zero
means "agree with myself".

The phase controller (`onn_phase_ctrl`) counts the clocks where this
reference disagrees with the neuron's own wave. It sorts them by where they
fall in the neuron's own cycle, `k = t - phase (mod 16)`:

- **late window**: k = 0..3 and 8..11, the first quarter of each half;
- **early window**: k = 4..7 and 12..15, the last quarter of each half.

Suppose the reference is a clean square wave lagging the neuron by d clocks.
Then the mismatches sit at the start of each half, in the late window. If it
leads, they sit at the end of each half, in the early window. At the last
clock of the period (t = 15) the controller decides:

| counts                                    | step                              |
|-------------------------------------------|-----------------------------------|
| late > early                              | DELAY: phase + 1, one clock later |
| early > late                              | ADVANCE: phase - 1                |
| equal, and more than 8 clocks mismatched  | DELAY (leave exact anti-phase)    |
| otherwise                                 | hold                              |

Lags 1..7 give DELAY and leads 1..7 give ADVANCE. At exactly 8 (anti-phase)
the two windows balance, and the tie rule moves the neuron off that balance
point. A neuron therefore moves at most one step (1/16 of a period) per
period. Turning a black pixel white takes 8 periods.

All neurons update at the same period boundary. Because the steps are small,
the network behaves like a slowly relaxing Hopfield network rather than a
synchronous one that can oscillate between two states.

## Run control (`onn_core`)

    IDLE/DONE --start--> LOAD (1 clock) --> RUN --stable or limit--> DONE

- **LOAD** copies the input phases into the oscillators and clears the
  phase-controller counters.
- **RUN** advances the shared period counter `t`. At the end of every period
  it counts the periods and checks whether any neuron stepped.
- **End of a run.** The run ends when no neuron has moved for `STABLE` (2)
  periods in a row. It also ends, with the `timeout` flag set, after `MAXP`
  (255) periods.
- **Run time.** A run lasts exactly `1 + 16 * periods` clocks.
- **`hold`** is learning mode. It abandons a run and makes `start` be ignored,
  so the network never computes with a half-written weight matrix.
- **DONE** keeps the phases until the next start.

## Learning path and register map (`onn_axi_lite`, `onn_weight_regs`)

The processor is the AXI4-Lite master. Data words are 32 bits wide and
addresses are bytes.

| address     | name        | access | contents |
|-------------|-------------|--------|----------|
| 0x000       | CTRL        | rw     | [0] LEARN; [1] START: write 1 to start a run, reads 0, ignored while LEARN=1 |
| 0x004       | STATUS      | ro     | [0] busy, [1] done, [2] timeout, [15:8] periods of the last run |
| 0x008/0x00C | PHASE_IN0/1 | rw     | initial phase of neurons 0..7 / 8..14, 4 bits each, neuron 0 in bits 3:0 |
| 0x010/0x014 | PHASE_OUT0/1| ro     | final phases, same layout |
| 0x018       | PATTERN_OUT | ro     | binary read-out, bit i = neuron i |
| 0x100+4k    | WEIGHT k    | rw     | k = 0..37: weights 6k..6k+5, weight 6k+m in bits [5m+4:5m] |

Weight number n is `w[i][j]` with `n = i*15 + j`, so rows are receiving
neurons. 225 weights fill 37.5 words. The unused fields of word 37 and
bits 31:30 of every word are ignored.

A weight write with LEARN clear is answered with SLVERR and dropped. Any
unmapped address, and any write to a read-only register, also gets SLVERR.
The weights reset to zero, which is the untrained state. They are held in
flip-flops because every synapse reads its weight every clock.

A learning step on the processor side:

1. Write CTRL = 1 (learning mode).
2. Write the 38 WEIGHT words.
3. Write CTRL = 0.

A recall:

1. Write PHASE_IN0 and PHASE_IN1.
2. Write CTRL = 2.
3. Poll STATUS until `done` is set.
4. Read PHASE_OUT or PATTERN_OUT.

**Bus timing.** The slave takes the write address and the write data
independently, with one buffer each. It answers one clock after holding both.
With the address and data presented together, the response arrives 3 clocks
after VALID. A read returns data one clock after the address is accepted. The
slave handles one transaction per channel at a time and ignores WSTRB and the
protection bits. Assertions in `onn_axi_lite` check that VALID and its payload
are held until READY on every channel.

## Files and hierarchy

    onn_top                 AXI4-Lite port + onn_done
    ├── onn_axi_lite        slave and register map
    ├── onn_weight_regs     225 x 5-bit weights, 6 per word
    └── onn_core            run controller, shared period counter
        └── onn_neuron x15
            ├── onn_oscillator   phase register; osc = ((t - phase) mod 16) < 8
            ├── onn_synapse_row  +/-w sum of all oscillators
            └── onn_phase_ctrl   early/late detector, one step per period
    onn_pkg                 sizes, register addresses, step/state enums

**Parameters.** `N` (neurons, 15), `PW`/`PHASE_W` (phase bits, 4, which gives
the 16-clock period) and `WW`/`WEIGHT_W` (weight bits, 5) match the source
architecture. `STABLE` (2) and `MAXP` (255) are this design's choices. The
number of weight words is derived from `N`.

**Clock and reset.** One clock drives everything. The active-low
asynchronous reset clears all state: weights 0, phases 0, network idle.

**Size.** About 1,480 flip-flops: 1,125 for the weights, plus phases, counters
and bus registers. The synapse adders (15 adders of 15 terms each) are most of
the logic.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

- `tb_onn_oscillator`: the waveform for every phase; load, delay and advance
  steps.
- `tb_onn_synapse_row`: random weights and levels against a direct sum.
- `tb_onn_phase_ctrl`: the decision for every lag 0..15 and for a zero sum;
  no step before the period end; the counters cleared.
- `tb_onn_neuron`: a neuron pulled into anti-phase walks 0 -> 8 in eight
  periods and then holds.
- `tb_onn_weight_regs`: reset, the word-to-weight mapping, read-back.
- `tb_onn_axi_lite`: the register map, responses, the START pulse, learning
  mode gating, write latency.
- `tb_onn_core`: the network on Hebbian weights for 0..3 stored digits,
  compared with the reference model (phases, read-out, period count, run
  length); retrieval; hold.
- `tb_onn_top`: end to end over AXI4-Lite. It learns the digits with Hebbian
  and then with Storkey, one pattern at a time, uploads the weights and runs
  all 15 test images after each step. It also exercises refused weight writes,
  a start ignored in learning mode, a run abandoned by learning mode,
  read-back, and timeouts on a second instance limited to 3 periods. It counts
  each of these and fails if one never happened.
- `tb_onn_top_full`: the same learning and recall flow with every parameter of
  `onn_top` at its default.

`tb/onn_ref_pkg.sv` holds what the testbenches check against:

- a period-by-period model of the network dynamics, written from the rules
  above rather than from the RTL;
- the processor's learning rules, kept in floating point. Hebbian adds
  x·xᵀ/N; Storkey uses the usual local-field form. Both keep a zero diagonal.
  The matrix is scaled to the weight format with `round(15 * w / max|w|)`.
- the test data.

`tb/axi_lite_if.sv` is the bus bundle with master tasks.

**Test data.** The test set uses these digits (rows top to bottom):

    0: 111 101 101 101 111    1: 110 010 010 010 111    2: 111 001 111 100 111

Each digit appears once clean and in four corrupted copies: two single-pixel
flips, one mid-grey pixel and one two-pixel flip. That makes 15 images.

**Results.** With all three digits stored, 14 of the 15 images are retrieved
(93.3 %) under both learning rules. The three clean digits are stable. The
corrupted images are this design's own, so this figure is a sanity check, not
a reproduction of a published accuracy.

Simulate with plain Verilator, for example:

    verilator --binary --timing --assert -Wno-fatal -y rtl -y tb +libext+.sv \
      -Irtl -Itb rtl/onn_pkg.sv tb/onn_ref_pkg.sv tb/tb_onn_top.sv \
      --top-module tb_onn_top -o sim && ./obj_dir/sim

Replace `tb_onn_top` with any other testbench name. Every simulation ends in
well under a second.

## How far to trust it, and where it departs from the source

- **The phase update is not the original's.** The source architecture reuses
  an earlier digital ONN whose neuron internals it does not describe. The
  early/late detector, the one-step-per-period rule, the anti-phase tie break
  and the treatment of a zero sum are all choices made here. They reproduce
  the expected auto-associative behaviour on the test set above. Recall
  results on other patterns may differ from the original hardware.
- **The interface details are this design's own:** the register map, the
  binary read-out relative to neuron 0, the stability rule (2 quiet periods),
  the 255-period limit and SLVERR for weight writes outside learning mode.
  Only the bus type, the 32-bit words and the 6-weights-per-word packing
  (38 words) come from the source.
- **Learning is not in hardware.** The Hebbian and Storkey rules run on the
  processor in the source architecture. Here they exist only in the testbench
  model. The weight scaling used there is also an assumption.
- **Resource use differs.** The source reports about 8,200 LUTs and
  3,300 flip-flops on its FPGA implementation. This RTL needs fewer
  flip-flops (about 1,480). The source does not describe its neuron
  internals, so the difference cannot be traced to a particular part.
- **Absent logic.** No switches, LEDs or push button are connected: in the
  source system they belong to the processor.
- **Learning time is not modelled.** The source reports 119 µs (Hebbian) and
  163 µs (Storkey) per learning step, of which 86 µs is the transfer. Those
  times are measured on the processor and do not follow from this logic. Here
  the 38 weight writes take 3 clocks each on an idle bus.
