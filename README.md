# FCS-MPC current controller for an interior permanent magnet motor

This is a current controller for a three-phase interior permanent magnet
synchronous motor (IPMSM) fed by a two-level inverter. It uses *finite control
set model predictive control* (FCS-MPC). A two-level inverter can produce only
eight switch states. So instead of computing a duty cycle, the controller tries
all eight once every control period:

1. Sample the three phase currents and the rotor angle and speed.
2. Predict where the dq currents will be one period later under each switch
   state.
3. Score each prediction.
4. Apply the best state directly to the gates.

The whole evaluation runs in fixed point in dedicated logic. It takes 68 clocks
(0.68 µs at 100 MHz), which is short against even a 125 kHz control period.
Because of that, the decision is applied in the same period it was computed in.
A processor-based controller needs a one-step delay compensation; this one does
not.

The repository also contains the fixed-point building blocks the motor model is
made of, and a small worked example built from the same blocks.

## Data flow

```
 encoder A/B/Z ─► incremental_decoder ─► theta (0..15999), omega (rad/s)
                                              │
 ADC bus ◄──────► adc_interface ─► ia,ib,ic   │
                        ▲              │      ▼
                        │              │   sine_lut ─► 6 × (2/3)·sin/cos
                 fcs_mpc_fsm ◄─────────┘      │
        (period, schedule, ranking)           ▼
            │  currents, then 8 vectors ─► clarke_park ─► d, q
            │                                   │
            │            Id(n),Iq(n),Vd,Vq,ω ─► motor_model ─► Id(n+1), Iq(n+1)
            │                                   │
            │                targets ─────► cost_function ─► cost
            ▼
   best state ─► gate_drive ─► 6 gate signals (deadtime, overcurrent trip)

 PC ◄─ USB FIFO bridge ◄──► usb_interface ─► enable, targets, fault clear
                                   ▲
                                   └── one log frame per decision
```

`fcs_mpc_top` wires these blocks together. It also holds the word-length
example circuit, which has its own ports and no link to the controller. Shared
widths and types are in `fcs_mpc_pkg`.

| Module | Role |
|---|---|
| `fcs_mpc_fsm` | control period, ADC and lookup timing, the 68-clock schedule, ranking of the costs |
| `incremental_decoder` | quadrature decoding; electrical angle and speed |
| `adc_interface` | drives a 4-channel simultaneous-sampling 16-bit ADC with a parallel bus; scales codes to amperes |
| `sine_lut` | 16000-entry table of (2/3)·sin; six values in three reads |
| `clarke_park` | abc → dq, 3 pipeline stages; shared by the currents and the eight voltage vectors |
| `motor_model` | one-step discrete IPMSM model from add/sub and multiply nodes, 5 stages deep |
| `cost_function` | \|Id* − Id(n+1)\| + \|Iq* − Iq(n+1)\|, 1 stage |
| `gate_drive` | gate signals with 1 µs deadtime per changed leg; overcurrent trip |
| `usb_interface` | PC link through a USB bridge chip in synchronous FIFO mode: run-time registers in, log frames out |
| `fxp_addsub_node`, `fxp_mul_node` | the fixed-point arithmetic nodes the model is built from |
| `equation_example` | D = A·B + C built from the two node types (a word-length example) |

## The control cycle and the 68-clock schedule

This is the part of the design that needs the most explanation.

A free-running counter divides the 100 MHz clock into control periods of
`CLK_HZ / FS_HZ` clocks (10 000 at the default 10 kHz). At each period tick
the sequencer does three things:

- It latches the current angle and speed.
- It starts the six-value sine lookup.
- It raises the ADC's convert-start line, which freezes all channels at the
  same instant.

The conversion and the three bus reads take 120 clocks. If the angle is not
yet valid, or the ADC did not answer, the cycle is skipped. The gates then
keep their previous state, and a counter (`skipped`) records the skip.
Otherwise a clock counter `c` runs the evaluation, which passes through one
shared transform unit and one model:

| c | event |
|---|---|
| 0 | sampled currents enter the abc→dq unit |
| 3 | Id(n), Iq(n) come out and are held for the whole evaluation; switch state 0 enters the unit |
| 3 + 8k | voltage vector of switch state k enters the unit (k = 0..7) |
| 6 + 8k | its Vd, Vq reach the motor model; they are held for 5 clocks |
| 11 + 8k | the prediction for state k enters the cost function |
| 12 + 8k | cost k is compared with the best so far |

The last cost arrives at c = 68. That is 3 clocks for the current transform,
plus 8 × (3 + 5) clocks for the vectors, plus 1 for the last cost. The cost
stage of one vector overlaps the transform of the next. An assertion in
`fcs_mpc_fsm` checks the 68, and the clock count is also a status output.

On ties the lowest state index wins. One clock later the chosen state goes to
`gate_drive` with a `sel_valid` strobe.

Switch state k = {a,b,c}. A phase whose bit is 1 has its upper switch on and
sees the 300 V DC link; a phase whose bit is 0 sees 0 V. States 0 and 7 both
give the zero vector.

Only one vector is in flight at a time, because the model's d and q paths have
different depths (4 and 5 registers). Feeding a new vector every clock would
need balanced pipelines. That would bring the evaluation down to about 20
clocks, but it is not done here.

## Fixed-point arithmetic

All signals are signed two's complement numbers written `Qi.f`: i integer bits,
f fractional bits, and a sign bit, for i + f + 1 bits in total.

**Add/subtract node** (`fxp_addsub_node`):

- Both operands are first shifted to the output's number of fractional bits.
  A right shift is arithmetic, so it rounds toward −∞.
- They are then added or subtracted.
- The result is cut to the output width by dropping integer bits, so overflow
  wraps.

**Multiply node** (`fxp_mul_node`):

- Only an operand with more fractional bits than the output is shifted down
  before the multiplication.
- The full product is then aligned to the output's fractional bits and cut to
  the output width.

Each node has one output register, so the depth of an expression graph is its
latency in clocks.

### Word sizes

The controller datapath keeps 16 fractional bits everywhere. The only exception
is the sine table, which uses Q0.15.

| Signal | Format | Range |
|---|---|---|
| phase currents and voltages | Q9.16 | ±10 A and 0..300 V |
| dq outputs of the transform | Q10.16 | |
| model current inputs | Q4.16 | saturated |
| model voltage inputs | Q8.16 | saturated |
| speed | Q9.16 rad/s | |
| predictions | Q5.16 | |
| cost | Q7.16 | |

### Motor model

`motor_model` evaluates the forward-Euler IPMSM model with Ts = 1/FS_HZ:

```
Id(n+1) = Id − C1·Id + C2·ω·Iq + C3·Vd
Iq(n+1) = Iq − C4·Iq − C5·ω·Id + C6·Vq − C7·ω
C1 = Ts·Rs/Ld  C2 = Ts·Lq/Ld  C3 = Ts/Ld
C4 = Ts·Rs/Lq  C5 = Ts·Ld/Lq  C6 = Ts/Lq  C7 = Ts·λ/Lq
```

The motor constants are Rs = 0.4 Ω, Ld = 11 mH, Lq = 14.3 mH and
λ = 0.3333 Wb. The constants C1..C7 are computed when the design is elaborated,
from these values and `FS_HZ`, and rounded down to Q0.16. So changing the
control rate means re-elaborating with a new `FS_HZ`. `FS_HZ` must be at least
10 kHz, or C3 and C6 no longer fit; elaboration stops with an error otherwise.

The q path is `((Iq − C4·Iq) − C5ω·Id + C6·Vq) − C7·ω`, five nodes deep. The
d path is four nodes deep.

### Word-length example

`equation_example` is D = A·B + C:

- A is Q3.8 and C is Q4.6.
- B is the constant 3.14159 in Q2.6, stored as 201.
- The product node is Q6.7; the sum node and the output D are Q6.6.

It shows how operands of different formats are aligned. Some descriptions of
this example scale B with 8 fractional bits (804). That value does not fit a
9-bit Q2.6 word, so the Q2.6 format is followed here.

## Angle, speed and the sine table

The encoder gives 320 000 edges per mechanical turn. The motor has 5 pole pairs,
so one electrical turn is 64 000 edges.

**Angle.** `incremental_decoder` behaves as follows:

- It synchronises A, B and Z and decodes the quadrature sequence. A leading B
  counts up.
- It counts modulo 64 000 and outputs `theta = count / 4`, which runs
  0..15999.
- The first rising edge of Z clears the count and makes `theta_valid` true.
  Every later rising edge of Z clears the count again.

**Speed.** The decoder counts signed edges in a 1 ms window (`WINDOW_CYCLES`).
It scales the count to rad/s with a constant computed at elaboration:

K = 2π / 64000 · CLK_HZ / WINDOW_CYCLES

That gives a resolution of 0.098 rad/s per edge.

**Sine table.** `sine_lut` holds one period of (2/3)·sin in 16 000 words of
Q0.15. The 2/3 factor of the amplitude-invariant transform is folded into the
table. Entry i is computed for angle step i + ½, so a lookup rounds to the
nearest step rather than down.

The table is one dual-port memory with registered outputs. Three clocks read
sin and cos (cos is read as sin at +¼ turn) for three angles: θ, θ − ⅓ turn and
θ + ⅓ turn. Since 16 000 is not divisible by 3, a third of a turn is rounded to
5333 entries. The table takes 256 000 bits and is filled at elaboration, so no
data file is needed.

`clarke_park` then computes:

```
d =  (2/3)·(a·cos θ + b·cos(θ−120°) + c·cos(θ+120°))
q = −(2/3)·(a·sin θ + b·sin(θ−120°) + c·sin(θ+120°))
```

It does this in three stages: products, partial sums, final sums.

## Current measurement

`adc_interface` controls a MAX11047-class converter as follows:

1. A start pulse raises `convst`, which holds all channels and converts in
   about 1 µs.
2. The converter pulls `eoc_n` low when it is done.
3. Channels 0..2 (phases a, b, c) are read with three `rd_n` strobes under
   `cs_n`.

The current sensors give 25 mV/A into a 0..5 V, 16-bit converter. One code is
therefore exactly 200/65536 A (3.052 mA), with 0 A at mid-scale (32768), for a
range of ±10 A. If `eoc_n` does not fall within 10 µs, the cycle is flagged as
an error and skipped.

## Gate drive and protection

`gate_drive` maps the chosen state to three complementary switch pairs:

- **Deadtime.** A leg whose state changes has both switches held off for
  `DEADTIME` clocks (1 µs) before the new switch turns on. Unchanged legs are
  left alone.
- **Overcurrent trip.** Every ADC sample is compared with `OC_LIMIT`, which
  defaults to the motor's 9.4 A rated current. A sample above it turns all six
  gates off at once and latches `fault` until a clear command arrives over USB.
- **Disable.** All gates are also off while `enable` is low and before the
  first decision after enable.
- **Restart.** Coming out of a trip or a disable, every leg passes a deadtime
  first.

An assertion checks that no leg ever has both switches on.

## Interface of the top

| Group | Ports |
|---|---|
| USB bridge (own 60 MHz clock) | `ft_clk`, `ft_rxf_n`, `ft_txe_n`, `ft_rd_n`, `ft_wr_n`, `ft_oe_n`, `ft_din[7:0]`, `ft_dout[7:0]`, `ft_doe` (data pad tristate enable) |
| Encoder (after the differential receiver) | `enc_a`, `enc_b`, `enc_z` |
| ADC bus | `adc_convst`, `adc_eoc_n`, `adc_cs_n`, `adc_rd_n`, `adc_db[15:0]` |
| Inverter | `gates` (struct `a_p, a_n, b_p, b_n, c_p, c_n`, 1 = on), `fault` |
| Example circuit | `eq_input_a` (Q3.8), `eq_input_c` (Q4.6), `eq_output_d` (Q6.6) |
| Status | run-time settings as set: `enable`, `id_target`, `iq_target` (Q4.16 A); `frames_dropped`; `theta`, `theta_valid`, `forward`, `omega`, `omega_valid`, raw `adc_code`, `dq_valid`, `sel_valid`/`sel_state`/`sel_cost`, `id_meas`/`iq_meas`, `compute_cycles`, `overrun`, `skipped` |

Top-level parameters: `FS_HZ` (control rate, default 10 000), `DEADTIME`
(clocks, default 100) and `WINDOW_CYCLES` (speed window, default 100 000).

## USB link

`usb_interface` talks to an FT232H-class bridge chip in its synchronous FIFO
mode. The chip supplies the 60 MHz FIFO clock. The byte protocol runs in that
clock domain.

The PC writes 4-byte commands: an address byte, then a 24-bit value, MSB
first.

| Address | Value |
|---|---|
| 0 | bit 0 enable, bit 1 clear a latched fault (one pulse), bit 2 logging on |
| 1 | Id target, Q4.16 A (low 21 bits) |
| 2 | Iq target, Q4.16 A (low 21 bits) |

Other addresses are ignored. Everything starts at zero after reset, so the
controller stays off until the PC enables it.

While logging is on, each decision is sent back as a 16-byte frame, with
multi-byte fields MSB first:

```
A5 5A | seq | flags: fault, angle valid, overrun, 0, 0, state[2:0] |
Id (3 bytes) | Iq (3 bytes) | theta (2 bytes) | omega (4 bytes)
```

`seq` counts every decision while logging is on, so the PC can tell from the
header and sequence number whether a frame was lost. At 10 kHz a frame uses
under 1 % of the link's time. If a decision arrives while the previous frame
is still being sent, the new frame is dropped and counted in `frames_dropped`.

Register values and frames cross between the two clocks with toggle
handshakes through three-flop synchronisers. A new frame is captured only
after the previous one has been acknowledged, so the frame register never
changes while the FIFO side is reading it.

## Where this design makes its own choices

The controller's algorithm, constants, word formats, latencies, table size,
deadtime and sensor scaling follow the original controller design. The points
below were not specified there and are this design's choices:

- **Model variant.** The motor model is the 16-fractional-bit reference
  variant. Versions with individually optimized word lengths per node are not
  included.
- **Model graph.** The order of operations inside the model was chosen only to
  meet the stated 5-stage depth.
- **Cycle handling.** Skip-on-invalid cycles, the tie rule, the saturation of
  transform outputs to the model formats and the status outputs.
- **ADC interface.** The bus sequence, the strobe widths, the 10 µs timeout and
  the mid-scale zero.
- **Overcurrent.** The trip level, the latching and the clear input.
- **Speed.** The 1 ms speed window; the speed output is signed.
- **Direction.** A leading B counts up.
- **USB link.** The register map, the command and frame formats, the choice
  of logged values, the handshakes and the drop rule. The original PC
  software is not part of this repository.

## Simulation

Every module has a self-checking testbench in `tb/`. Each one ends by printing
`TB_RESULT checks=<n> failures=<m>`. Testbench-only models:

- `tb/max11047_model.sv`: the ADC bus.
- `tb/quad_encoder_model.sv`: the encoder.
- `tb/ft232h_model.sv`: the FIFO side of the USB bridge chip, with a command
  queue, a received-byte log and a programmable busy rate.

To build and run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Wno-fatal \
  -y rtl -y tb rtl/fcs_mpc_pkg.sv tb/tb_fcs_mpc_top.sv \
  --top-module tb_fcs_mpc_top --Mdir obj -o sim && obj/sim
```

Replace `fcs_mpc_top` with any other module name to run that module's
testbench.

`tb_fcs_mpc_top` runs the whole controller at its default parameters, in
closed loop with a motor model integrated every 100 ns, an inverter with diode
conduction during deadtime, the encoder model, the ADC model and the USB
bridge model. Every setting is written as a USB command. It simulates
68 ms of operation in a few seconds, and goes through these phases:

- 100 RPM: Iq target 4 A, then a step to 5 A.
- A lost ADC conversion.
- An injected measurement error that trips the overcurrent protection, then a
  clear.
- A disable.
- 500 RPM steady state.

It checks:

- Every decision against a floating-point evaluation of the same eight
  predictions from the same samples, wherever the best two costs differ by
  more than 0.05 A.
- The 68-clock evaluation and nine transforms per cycle.
- Angle and speed tracking.
- Deadtime lengths and the absence of shoot-through.
- Gates off during a trip or a disable.
- Exactly one log frame per decision, in order, with the right state and dq
  currents.

It also checks the steady-state RMS error of Id and Iq. Typical results at
10 kHz are about 0.4 A for both, at 100 and 500 RPM, and the 4 → 5 A step
reaches 90 % in about 0.35 ms.

`tb_fcs_mpc_rate125k` runs the same closed loop with the top built for
125 kHz (`FS_HZ` = 125000, an 800-clock period). Only the motor-model
constants change. Over 20 ms at 100 and 500 RPM it checks every comparable
decision against the reference, finds no overrun, and checks one log frame per
decision. The steady-state RMS errors fall to about 0.04 A, because the
current moves much less in an 8 µs period than in a 100 µs one.

For comparison, the original controller's published simulation of its
16-bit version gives an Id RMS error at 100 RPM of roughly 0.42 A at 10 kHz
and 0.03 A at 125 kHz (read off a plot). These simulations give 0.40 A and
0.037 A.

The block testbenches use smaller settings where that helps:

- `tb_incremental_decoder` uses a 40-edge encoder and a short speed window.
- `tb_gate_drive` uses a 10-clock deadtime.
- `tb_fcs_mpc_fsm` runs the sequencer at 125 kHz against stand-ins for the
  datapath blocks.
- `tb_usb_interface` stalls the bridge 30 % of the time, and sends a burst
  of decisions every 20 clocks so that frames are dropped.
