# FCS-MPC current controller for a two-level three-phase inverter

This is the programmable-logic half of a finite-control-set model predictive
controller (FCS-MPC). The controller makes the three output currents of a
two-level voltage-source inverter follow a sinusoidal reference. The inverter
feeds an RL load. An inverter like this has only eight switching states. So in
each sampling interval the controller predicts the current that every state
would produce, scores each prediction with a cost function, and applies the
state with the lowest cost. It needs no modulator.

The design splits the work between a processor and logic:

- **Processor.** It reads the current and voltage ADC and writes the
  samples into a small register block.
- **Logic.** It does all the arithmetic. It also owns the timing: a sampling
  counter, the gate outputs and a small run/stop state machine.

Choosing a state takes 5 clocks with the parallel search and 37 clocks with
the sequential one. At 100 MHz that is 50 ns or 370 ns. Both are tiny next to
a 25 µs sampling interval (40 kHz), so the sampling rate is limited by the
ADC and the processor, not by the controller.

## One sampling interval

At interval k the load current i(k) is measured while the state S(k) is being
applied. The state chosen now is only applied at the next tick. So the
controller first predicts i(k+1) under S(k). That step compensates for the
one-interval computation delay. Then, for each of the eight candidates
S(k+1), it predicts i(k+2) and computes this cost:

    g = |i*dq − idq(k+2)|² + λ · (number of legs that change between S(k) and S(k+1))

The second term is the squared Euclidean distance between two 0/1 vectors.
It penalises switching: a larger λ gives a lower average switching frequency
at the price of current ripple. States 000 and 111 both give zero voltage,
but they are scored separately because they differ in how many legs must
switch.

In hardware, one interval runs as follows. Clock 0 is the first clock on which
the Flag register shows the new value.

| Clock | Block | What happens |
|---|---|---|
| — | `sample_counter` | Pulses `tick`. This is the processor's interrupt. At the same pulse `firing_pulses` applies the state stored in the previous interval. |
| — | processor | Reads the ADC, writes ia, ib, ic and vdc, then toggles the Flag bit. |
| 1 | `sync_signals` | Sees the toggle. Captures the currents and vdc. Also captures sin/cos of the previous k+1 angle, which is the angle of k now. |
| 2 | `clarke` | abc → αβ. In the same clock, `update_theta` advances the angle to k+1. |
| 3 | `park` | αβ → dq with sin/cos(k). In the same clock, `sincos_rom` delivers sin/cos(k+1). |
| 4 | `pred_k1` | idq(k+1) from idq(k), S(k) and vdc. |
| 5 | `pred_k2_parallel` | All eight costs and the minimum. The result is stored in `firing_pulses`. |
| 5…37 | `pred_k2_sequential` | Replaces the parallel block when `ESA_PARALLEL = 0`. |

Each stage registers its output and passes a valid bit to the next stage. No
stage can stall. The processor reads back the dq currents, the angle, the
chosen state and its cost whenever it likes.

## Number scales

Every signal is a 16-bit two's-complement word:

| Quantity | Unit of one LSB |
|---|---|
| Currents | 1 mA |
| Voltages | 0.1 V |
| Angle | 1/4096 of a turn (12-bit binary radians) |
| sin, cos and model gains | Q2.14 (16384 = 1.0) |

Rules for the arithmetic:

- Every product is 32 bits.
- A sum of products is shifted right by 14, which rounds toward −∞.
- The result is saturated back to 16 bits.
- The cost is 40 bits, unsigned, and is never saturated.

These scales are this design's choice. Any other scale works if ka, kw, kb
and λ are rescaled to match.

The load model is the continuous RL model in the rotating frame,
discretised with forward Euler (`mpc_pkg::model_step`):

    d' = (ka·d + kw·q + kb·vd) >>> 14
    q' = (ka·q − kw·d + kb·vq) >>> 14
    ka = 1 − R·Ts/L      kw = ω·Ts      kb = (Ts/L) · (0.1 V / 1 mA)   (all × 16384)

The inverter voltage in dq is vdc times the dq transform of the 0/1 switching
vector. The Clarke transform is the amplitude-invariant one: α = (2a − b − c)/3
and β = (b − c)/√3. The Park rotation puts the d axis on phase a at angle 0.
The k+1 prediction rotates with the angle of k. The k+2 prediction rotates
with the angle of k+1.

The reset values of the parameter registers are for R = 30 Ω, L = 20 mH,
vdc = 140 V, a 50 Hz reference frame and 40 kHz sampling at a 100 MHz clock:

| Register | Value |
|---|---|
| ka | 15770 |
| kw | 129 |
| kb | 2048 |
| phase step | 5 368 709 (2³² · 50/40000) |
| period | 2500 clocks |

Changing the sampling rate means writing the period, the phase step, ka, kw
and kb together.

`sincos_rom` is one 4096 × 16-bit table with two read ports, so it fits in two
block RAMs. Entry i holds round(16384 · sin(2πi/4096)) and is computed at
elaboration. The cosine is the same table read a quarter turn (1024 entries)
ahead.

## The two k+2 searches

**Parallel (`pred_k2_parallel`, the default).** Eight copies of
`k2_pred_unit` each score one state. `cost_argmin` picks the lowest cost,
with ties going to the lowest state number. The whole path is combinational
up to one output register, so the search takes one clock. It costs eight
times the multipliers: each unit has about ten 16×16 products.

**Sequential (`pred_k2_sequential`).** One `k2_pred_unit` is stepped through
the states by a small FSM. The FSM spends one clock in each step:

1. INIT
2. CALC: present the candidate.
3. CHECK: latch its cost.
4. DECIDE: compare the cost with the best so far.
5. INC

The search takes 33 clocks and 37 in total from the sample capture. The
comparison is strict, so the same state wins as in the parallel search; the
two searches give identical results bit for bit. `busy` is high during the
search. A new sample that arrives while busy is ignored, which cannot happen
at any sampling period longer than about 40 clocks.

The published measurement for the sequential loop is 400 ns, which is 40
clocks. How the loop is divided into clocks is not given, so the 37 clocks
here come from this design's own state split.

The `calc_busy` output of the top is high from the capture clock until the
state is stored: 5 clocks for the parallel search and 37 for the sequential
one. It is a probe, meant to be brought to a pin and timed with an
oscilloscope.

## Timing, commands and gates

- **Sampling counter.** `sample_counter` compares its count with the period
  register on every clock, so a new period takes effect at once. Periods
  below 2 are treated as 2. Its one-clock `tick` is the `irq` output.
- **Run/stop state machine.** `op_fsm` has two states, IDLE and RUN.
  - Writing 1 (START) to the command register enters RUN.
  - Writing 2 (STOP) returns to IDLE.
  - Writing 0 does nothing.
- **Gates.** `firing_pulses` latches each decision and applies it at the next
  tick. The six gates are {c_lo, c_hi, b_lo, b_hi, a_lo, a_hi}: upper =
  state bit, lower = its complement. There is **no dead time**, so a real
  bridge needs a dead-time generator after these outputs.
  - With the machine in IDLE all gates are off at once, and S(k) becomes 000
    at the next tick.
  - The controller keeps computing while stopped, so the processor can still
    watch the predictions.

## Register map

The AXI4-Lite slave has a 6-bit address and 32-bit words. Address bits [1:0]
are ignored. A word holding two values has the first value in [15:0].

| Byte | Name | Access | Contents |
|---|---|---|---|
| 0x00 | MEAS_IAB | RW | ia, ib (mA) |
| 0x04 | MEAS_ICV | RW | ic (mA), vdc (0.1 V) |
| 0x08 | FLAG | RW | [0]: toggle after each new sample |
| 0x0C | CMD | RW | [1:0]: 0 NOP, 1 START, 2 STOP; acted on when written |
| 0x10 | REF | RW | id*, iq* (mA) |
| 0x14 | COEF_A | RW | ka, kw (Q2.14) |
| 0x18 | COEF_B | RW | kb (Q2.14), λ (unsigned, mA² per changed leg) |
| 0x1C | PHASE_INC | RW | angle step per sample, 2³² = one turn |
| 0x20 | PERIOD | RW | sampling period in clocks |
| 0x24 | VARS_IDQ | RO | id(k), iq(k) |
| 0x28 | VARS_ST | RO | [11:0] θ(k+1), [18:16] chosen state, [22:20] applied S(k) |
| 0x2C | STATE | RO | [0] running, [1] gates enabled |
| 0x30 | VARS_COST | RO | low 32 bits of the chosen state's cost |

Bus details:

- A write is accepted when the address and the data are valid together.
- Only one response is outstanding at a time.
- Responses are always OKAY.
- Writes to read-only words are dropped.
- Unmapped words read 0.
- Assertions in `axi_regs` check that BVALID and RVALID are held until they
  are accepted.

A reference of amplitude A amperes in phase with the frame is id* = 1000·A,
iq* = 0.

## Files

- `rtl/mpc_pkg.sv`: widths, types, fixed-point helpers, the register map and
  the command codes.
- Datapath:
  - `sync_signals`, `clarke`, `park` and `update_theta`, wrapped by `dq_transf`.
  - `sincos_rom` and `pred_k1`.
  - `k2_pred_unit` and `cost_argmin`, used by `pred_k2_parallel` and
    `pred_k2_sequential`.
- Control and bus: `sample_counter`, `op_fsm`, `firing_pulses`, `axi_regs`.
- Top: `fcs_mpc_top`. Its parameter `ESA_PARALLEL` selects the search.
- `tb/tb_<module>.sv`: one self-checking testbench per module.
  - Each compares the module with an independent model in `tb/tb_ref_pkg.sv`
    (real-number trigonometry, plain integer arithmetic).
  - Each prints `TB_RESULT checks=… failures=…` at the end.
- `tb/tb_fcs_mpc_top.sv` (default parameters) and `tb/tb_fcs_mpc_top_seq.sv`
  (sequential search) are closed-loop tests.
  - Both share `tb/tb_mpc_system_body.svh`.
  - The plant is an RL load with R = 30 Ω, L = 20 mH and 140 V, simulated in
    real arithmetic. Its currents go through a 12-bit ±5 A ADC model.
  - A bus-master model plays the processor: `tb/axil_master_if.sv`.

What the closed-loop tests run:

- 40 kHz at a 1 A reference, then a step to 2 A.
- At 40, 80 and 140 kHz: λ = 0, 4000 and 12000. At each rate the switching
  rate must fall as λ rises.
- A stop and a restart.

What they check:

- Every decision against an exhaustive search, bit for bit.
- Every applied state against the decision of the interval before.
- The `calc_busy` width.

## Simulating

With Verilator 5, for any testbench `tb_X`:

    verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/mpc_pkg.sv tb/tb_ref_pkg.sv tb/tb_X.sv --top-module tb_X -o sim
    obj_dir/sim

Each closed-loop test runs about 23 600 sampling intervals in under a
minute. For each run it prints the rms dq tracking error and the average
switching frequency per leg, measured over one 20 ms grid cycle:

| Sampling | λ = 0 | λ = 4000 | λ = 12000 |
|---|---|---|---|
| 40 kHz | 43 mA, 15.4 kHz | 48 mA, 11.6 kHz | 74 mA, 6.1 kHz |
| 80 kHz | 21 mA, 30.9 kHz | 46 mA, 9.4 kHz | 98 mA, 4.1 kHz |
| 140 kHz | 13 mA, 54.1 kHz | 58 mA, 7.2 kHz | 155 mA, 2.5 kHz |

## How this departs from the published design

- **Processor side.** The processor software is not here: the ADC driver,
  the user interface and the Linux/bare-metal split. Neither is the SPI ADC.
  The top's AXI port and `irq` are where they connect.
- **Design choices not given.** The fixed-point scales, the register map,
  reset values and command codes are this design's own. So is the angle
  generator: a 32-bit phase accumulator whose top 12 bits address the table.
- **Sine table size.** The published table is described as holding 4095
  values. A 12-bit angle addresses 4096, and that is what is built.
- **Sequential timing.** The sequential search takes 37 clocks, not the
  published 40.
- **λ scale.** λ here is in mA² per changed leg. The published λ values
  (0.00425 to 0.015) are in a normalisation that is not stated, so they cannot
  be copied into the register directly. Choose λ by the switching frequency
  it produces.
- **Simulated switching frequencies.** They are higher than the published
  7 kHz at λ = 0. The published figure comes from hardware with dead time and
  real ADC delays, so the two cannot be compared.
- **Model.** The discretisation is forward Euler. The extrapolation of the
  reference to k+2 is not done: a constant dq reference needs none.
- **Gates.** There is no dead time on the gate outputs.
