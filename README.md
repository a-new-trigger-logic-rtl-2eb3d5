# TRLO II trigger logic in SystemVerilog

A nuclear-physics experiment with many detectors reads out its data only
when the detectors together indicate an interesting event. This trigger
logic makes that decision. The detector signals arrive on sixteen ECL
inputs. They are aligned in time and checked against a programmable table
of coincidences and anticoincidences. The logic then decides, within a few
clock cycles, whether to issue a **master start**, and which of fifteen
**read-out triggers** to send to the read-out trigger module (TRIVA). While
the read-out runs, the logic holds a **dead time** so that no second event
starts.

The design runs on one 100 MHz clock, so every length in it counts 10 ns
cycles. Besides the trigger decision it contains a general-purpose toolbox:
pulsers, gate delays, a second logic matrix, scalers, latches and a soft
scope. All of these can be wired to any front-panel connector through a
signal multiplexer.

## Signal flow

```
 front panel ──► anti_metastable ──┬──► fast_path ──tpat_red──► trigger_sm ──► accept/encoded trigger
 (16 ECL, 8 ECL IO, 2 LEMO)        │     ▲  │  master start      │  ▲             dead time
                                   │     │  └────────────────────┼──┼──► sum_out_mask outputs
                                   │     └── inhibit, arm ◄──────┘  │
                                   ▼                                │ pending / pulse / busy / TRIVA dead time
                              source vector (85) ──► signal_mux ──► destinations (112)
                                   ▲                                │
                                   └── pulsers, gate delays, 8x8 LMU, edge gates,
                                       downscalers, ORs, coincidences, scalers,
                                       timer/pattern latches, tracer
```

### Fast path (`fast_path`)

Each ECL trigger input is processed in this order:

1. It is delayed (`trig_delay`), with one of four modes:
   - ZERO: no delay.
   - ONE: one cycle.
   - DELAY_LINE: a 256-stage shift register tapped by `trig_delay[i]`.
   - TEST_INPUT: the input is replaced by the `TRIG_LMU_TEST` destination.
2. It is stretched (`pulse_stretcher`) to `trig_stretch[i] + 2` cycles.

The 16 shaped inputs and 4 auxiliary inputs then enter the **logic matrix
unit** (`lmu`). It has a register pair per output and input:

| Pair | Meaning          |
|------|------------------|
| 01   | must be present  |
| 10   | must be absent   |
| 00   | don't care       |

For each output, the violations of all inputs are OR-ed. The result is
XOR-ed with `trig_lmu_not[j]`. So an output in use needs `lmu_not = 1`, and
an unused output with an all-zero row and `lmu_not = 0` stays low.

The output is registered and then passes these stages:

- A leading-edge detector (one pulse per LMU pulse).
- The dead-time veto (`inhibit` from the state machine).
- The channel enable `tpat_enable`.
- A reduction by 2^`trig_red[j]` (`downscaler`, which passes the first of
  every 2^n pulses).

The result is the **trigger pattern after reduction**. It goes to the state
machine. Its OR, gated with `arm`, fires the master-start stretcher
(`sum_out_stretch + 2` cycles long).

`arm` is cleared by the first pattern and set again only when the state
machine returns to IDLE. So one event gives exactly one master start, even
if further LMU outputs fire during the window.

Four banks of 16 scalers count pulses at four points:

- before the LMU
- before the dead time
- after the dead time
- after reduction

Timing from the pin, with delay mode ZERO:

| Stage                      | Clocks |
|----------------------------|--------|
| Synchroniser               | 2      |
| Stretcher                  | 1      |
| LMU register               | 1      |
| Master-start stretcher     | 1      |
| **Total, to master start** | **5**  |

`tb_trlo_top` checks the total of 5 clocks (50 ns).

### Trigger state machine (`trigger_sm`)

This is the hardest part to follow. Its state numbers are the ones a front
panel display would show.

| No. | State | What happens |
|----|-------|--------------|
| 1 | IDLE | `arm` high. Inputs are checked in priority order (see below). |
| 2, 3 | START WINDOW, WINDOW | Later patterns are OR-ed into the latched pattern for `accept_window_len + 1` cycles. |
| 4 | END WINDOW | The internal dead time is set. It stays set until IDLE. |
| 7 | TRIGGER SELECTION | Each latched pattern bit requests read-out trigger `tpat_trig[bit]`. Pending triggers also request. |
| 5 | PULSE SELECTION | The same, for pending or pulse triggers only. |
| 8 | PRIORITY ENCODER | The lowest requested trigger number wins. A served pending trigger is cleared. |
| 9, A | START SEND, SEND | `accept_trig` (one-hot) and `encode_trig` (4 bits) are driven for 2 cycles. |
| B, C | BUSY START, BUSY | Waits `fast_busy_len + 1` cycles so the TRIVA can raise its own dead time. |
| D | WAIT TRIVA | Waits for the TRIVA dead time to drop. |
| E | TRIVA DONE | Described below. |
| F | PENDING/PULSE | A pattern arriving now goes to START WINDOW. Otherwise goes to PULSE SELECTION. |

In IDLE, the inputs are checked in this order:

1. A pattern goes to START WINDOW.
2. Otherwise, the TRIVA dead time goes to WAIT TRIVA.
3. Otherwise, busy goes to TRIVA DONE.
4. Otherwise, a pending or pulse trigger goes to PENDING/PULSE.

In TRIVA DONE:

- If the TRIVA dead time rises again, the machine goes back to WAIT TRIVA.
- Otherwise, if a pending trigger is waiting, it goes to PULSE SELECTION.
- Otherwise, it waits until the LMU OR and busy are both low, then goes to
  IDLE. This re-arms the fast path and clears the latched values.

Waiting for the LMU OR means a new event is never cut in half.

The `reason` output records which transition was taken:

| Reason | Transition |
|--------|------------|
| 1 | pattern in IDLE |
| 2 | pending trigger in IDLE |
| 3 | pulse trigger in IDLE |
| 4 | dead time in IDLE |
| 5 | busy in IDLE |
| 6 | dead time again in TRIVA DONE |
| 7 | pending trigger in TRIVA DONE |
| 8 | pattern in PENDING/PULSE |

There are two kinds of trigger request besides the detector pattern:

- A **pending** trigger is set by an edge on a `TRIG_PEND` destination or by
  the register interface. It stays set until served. It is meant for time
  calibrators and clocks.
- A **pulse** trigger on `TRIG_PULSE` counts only if it arrives while the
  machine is idle.

If a window ends without any mapped read-out trigger, the event is counted
anyway. After `max_multi_trig` such events, the trigger `multi_trigger` is
sent instead.

The state machine drives these status signals:

| Signal     | Definition                                      |
|------------|-------------------------------------------------|
| `deadtime` | internal dead time OR TRIVA dead time           |
| `inhibit`  | `deadtime` OR busy; this is the fast-path veto  |

### Signal multiplexer (`signal_mux`)

Each of the 112 destinations has a 7-bit register that selects one of the 85
sources. The index maps are in `trlo_pkg`.

- **Destinations:** the front-panel outputs and LEDs, and the inputs of every
  logic function. They also include the auxiliary LMU inputs, the 16
  pending-trigger and 16 pulse-trigger inputs, two dead-time inputs and one
  busy input.
- **Sources:** the synchronised inputs, constants, and the outputs of every
  function. They also include the accepted and encoded triggers, master
  start, dead time, accept pulse and LMU OR.

Routing takes two register stages: 20 ns.

Each of the 26 front outputs also has a **direct mode**:

- LOGIC
- DIRECT: a raw input pin, unclocked
- LOGIC OR DIRECT
- LOGIC AND DIRECT

The raw pin comes from `direct_mux`. Outputs selected in `sum_out_mask`
carry the master start without the multiplexer delay.

### Logic functions around the core

| Function | Module | Behaviour |
|----------|--------|-----------|
| 5 pulsers | `pulser` | one-cycle pulse every `period` cycles; 0 = off |
| timer tick | `pulser` | tick every `timer_period` cycles, for duration-in-ticks scalers |
| 8x8 logic matrix | `lmu` | same cell as the trigger LMU |
| 8 gate delays | `trig_delay` + `pulse_stretcher` | delay line, then stretcher with selectable restart mode |
| 2 edge-to-gate | `edge_gate` | set by a start edge, cleared by a stop edge; stop wins |
| 2 downscalers | `downscaler` | on the leading edge of their input |
| 4 masked ORs, 2 coincidences | `logic_functions` | over all 85 sources; coincidence = at least `coinc_level` masked sources high |
| 8 scalers | `scaler` | 32-bit: leading edge, trailing edge, duration in clocks, duration in ticks; reset and latch |
| timer and latches | `event_latches` | 32-bit timer; 4 timer latches on leading or trailing edge; 2 pattern latches of all sources |
| soft scope | `tracer` | see below |

### Tracer (soft scope, `tracer`)

The tracer is used to set the input delays. The traced pattern is written
every cycle into a 16-entry history ring (`PRE`). The record is always taken
from the oldest ring entry, so what is written lags the live inputs by
`PRE` cycles.

A capture works like this:

1. A control pulse starts the tracer.
2. It waits for any live input to rise.
3. For `tracer_len` cycles (at most 255) it writes a compact block of 32-bit
   words. Because of the ring, the block begins `PRE - 2` cycles *before*
   the rise that triggered it, so the quiet time ahead of the event is
   visible.

| Word | Contents |
|------|----------|
| `00` + 30-bit time | time of the block's first pattern sample |
| `01` + 12-bit dt + 18-bit pattern | one word for the first pattern and one per change; dt is measured from the first pattern word |
| `11` + 30-bit XOR | checksum of the block |

After a block it re-arms. A block is started only if `len + 4` words still
fit. `stop` halts the tracer and `clear` rewinds it. Reading is through a
one-cycle synchronous port. Setting `PRE = 0` removes the ring.

## Interface of the top (`trlo_top`)

The top has no parameters. Its sizes come from `trlo_pkg`.

- **Inputs:**
  - `setup`: a packed `trlo_setup_t` record holding every setup register
    (mux, modes, matrices, lengths, periods).
  - `ctrl`: a `trlo_pulse_t` record of one-cycle control pulses:
    - reset and latch of the general and the fast-path scalers
    - timer reset and latch
    - set and clear of pending triggers
    - set and clear of a software dead time and a software busy, which act
      exactly like the TRIVA dead time and the busy input
    - pattern-latch, edge-gate start and edge-gate stop pulses
    - a test pulse injected into the multiplexer sources or destinations
      selected by `pulse_mux_src_mask` / `pulse_mux_dest_mask`
    - tracer start, stop and clear
  - The raw front-panel pins.
- **Outputs:**
  - The front-panel outputs and LEDs.
  - The state-machine status.
  - All scalers and latches.
  - The tracer read port.

A VME (or other) register interface is expected to own `setup` and `ctrl`
and to read the outputs. The interface itself is not included.

## Where this design makes its own choices

The following points are not fixed by the original description. They were
chosen here and are stated in the file headers.

- **Synchroniser:** two rising-edge flip-flops AND-ed. A glitch shorter than
  two samples is ignored.
- **Register widths:**
  - delays and stretches: 8 bits
  - window and busy lengths: 16 bits
  - tracer length: 8 bits
  - tracer buffer: 1024 words
- **Reduction** passes the *first* of every 2^n pulses.
- **Priority:** the *lowest* read-out trigger number wins. Trigger 0 means
  "none".
- **PULSE SELECTION** uses display code 5.
- **Multi trigger:** `max_multi_trig` / `multi_trigger` are read as "after N
  events without a mapped trigger, send trigger M".
- **Two dead-time inputs:** `DEADTIME_IN(0)` and `DEADTIME_IN(1)` are OR-ed.
  Busy also vetoes the fast path.
- **Traced pattern:** the 16 shaped trigger inputs plus the two `TRACER`
  destinations. The history ring holds 16 cycles.
- **Control pulses:** the software dead time and busy, and the multiplexer
  test pulses, are read from their names only.
- **Reset:** all registers use an asynchronous active-low reset.

## Not included

- **Pseudo-random sources:** `PRNG_LFSR(0..1)` read as 0. Their generator is
  not specified.
- **Scaler "carry odd" mode:** this cascading mode is not built.
- **Packed trigger status word:** the status word with its parity bits is
  not built. Its fields are separate output ports.
- **Six destinations:** the multiplexer has 112 destinations. A register
  array of 118 would leave six destinations whose meaning is unknown.
- **Board-level parts:** the front-panel display driver, clock generation and
  VME interface are not part of the RTL.

## Verification

Each module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`. Each compares against values computed
independently in the testbench, with random stimulus from `$urandom` and a
watchdog.

| Testbench | What it covers |
|-----------|----------------|
| `tb_trlo_top` | The whole design at full size, set up like an experiment. It includes a behavioural TRIVA model that answers each encoded trigger with 50 cycles of dead time. See below. |
| `tb_lmu_s393` | The experiment's logic-matrix table: 8 beam triggers that need "spill on" and the beam detector, and 7 off-spill cosmic and calibration triggers that need both absent. Checked over 4000 random patterns. |
| `tb_trigger_sm` | Every path of the state diagram, with cycle counts for window and busy. |
| `tb_fast_path` | Latency, veto, ON/OFF, reduction and scalers. |

`tb_trlo_top` exercises each mechanism at least once and fails if one never
happened:

- window merge and priority
- anticoincidence
- reduction
- ON/OFF
- dead-time veto
- auxiliary input via the mux
- multi trigger
- pending trigger from a pulser
- pulse trigger
- busy
- all 8 reasons
- delay line
- direct output
- edge gate
- gate delay
- downscaler
- second LMU
- OR and coincidence
- timer latch
- tracer, including its history
- software dead time and busy
- source and destination test pulses
- edge-gate and pattern-latch pulses
- fast-path scaler latch

To run a testbench with Verilator:

```
verilator --binary --timing --assert -Irtl -Itb rtl/trlo_pkg.sv tb/tb_trlo_top.sv --top-module tb_trlo_top
./obj_dir/Vtb_trlo_top
```

Replace `tb_trlo_top` with any other testbench name. All testbenches finish
in seconds.

## Files

- `rtl/trlo_pkg.sv`: sizes, enums, mux index map, and the setup and control
  records.
- `rtl/trlo_top.sv`: top level.
- Fast path:
  - `rtl/fast_path.sv`
  - `rtl/anti_metastable.sv`
  - `rtl/trig_delay.sv`
  - `rtl/pulse_stretcher.sv`
  - `rtl/lmu.sv`
  - `rtl/downscaler.sv`
  - `rtl/scaler.sv`
- State machine:
  - `rtl/trigger_sm.sv`
  - `rtl/priority_encoder.sv`
- Routing and functions:
  - `rtl/signal_mux.sv`
  - `rtl/pulser.sv`
  - `rtl/edge_gate.sv`
  - `rtl/logic_functions.sv`
  - `rtl/event_latches.sv`
  - `rtl/tracer.sv`
- `tb/`: one testbench per module, plus `tb_trlo_top` and `tb_lmu_s393`.
