# Stochastic STDP neural cores with 1-bit synapses

This is a spiking neural network accelerator that learns without supervision, on-line, while
storing only one bit per synapse. Each neuron holds 1024 binary weights. It counts the input
events that arrive on synapses whose weight is 1, and it fires when the count reaches a
threshold. Learning is done by a single STDP unit that 256 neurons share.

Learning uses spike order, not spike time. When a neuron decides it should learn, the STDP unit:

1. Takes the addresses of the most recent input events, which it keeps in a pre-list.
2. Sets those synapses to 1 at random, each with a programmable probability.
3. Clears 1-weights at random all over the neuron, so that the number of 1-weights moves back
   to a fixed target.
4. Empties the pre-list.

No time stamps, multi-bit weights or per-synapse state are needed, so a neuron is little more
than its 1024-bit memory and three 12-bit counters.

The RTL is organised in three levels:

| level | module | contents |
|---|---|---|
| layer | `multi_core` (top) | `NUM_CORES` cores, one broadcast input, merged output, system-wide inhibition and STDP-event lines |
| core | `neural_core` | 256 neurons, AER filter, leak timer, Spike2AER output arbiter, STDP arbiter, one STDP unit, shared STDP bus |
| neuron / learning | `neuron_block`, `stdp_unit` | counters and synaptic memory; pre-list, random source, divider, learning state machine |

Helpers: `syn_weight_mem`, `circular_buffer`, `lfsr16`, `serial_divider`, `leak_timer`,
`aer_filter`, `spike2aer`, `stdp_arbiter`. The package `stdp_pkg` holds the shared widths, the
STDP bus struct, the per-core settings struct and the leak function.

## Numbers and encodings

- A synapse address is 10 bits (1024 synapses). A neuron index is 8 bits, and so is a core
  index.
- A probability is a 10-bit integer `p`, meaning p/1024. An update happens when 10 random bits,
  read as an unsigned number, are **strictly less** than `p`.
- Neuron states and thresholds are 12-bit counters.
- Input events to a core are `{core[7:0], synapse[9:0]}`. The core's output events carry the
  neuron index. The layer's output events are `{core[7:0], neuron[7:0]}`.
- Every register is reset by a synchronous, active-low `rst_n`. After reset, every synaptic
  weight is 1.

## The neuron (`neuron_block`)

Each neuron has three counters and a two-port synaptic memory.

**Counters:**

- The *firing state* counts input events that hit a 1-weight. While it is non-zero and
  `>= spike_threshold`, the neuron asserts `spike_out`. The next cycle, the firing state is
  cleared.
- The *learning state* counts the same events. It is compared with the neuron's own *STDP
  threshold*. While the learning state is non-zero and `>=` that threshold, and `stdp_activate`
  is high, the neuron asserts `stdp_req`.
  - Each request clears the learning state and raises the STDP threshold by one, saturating at
    `stdp_threshold_max`.
  - The threshold starts at `stdp_threshold_init`. Each threshold-leak tick moves it one step
    back down, but never below the initial value.
  - A neuron that keeps winning therefore learns less and less often, which leaves room for the
    others.

The two thresholds are separate on purpose: inference and learning can be tuned independently.

**Clearing:** `inh_event` (lateral inhibition) clears the firing state. `stdp_event` (any STDP
request in the layer) clears the learning state. The learning state also stays at zero while
learning is off.

**Synaptic memory:** 1024 bits in flip-flops, with two independent ports.

- Port A is read by the input event path.
- Port B belongs to the STDP bus. It reads and writes, driven by the STDP unit while this neuron
  is the one selected (`stdp_active_addr == neuron_addr`, registered).
- Both reads take three cycles, so an input event is applied to the counters three cycles after
  it enters the neuron.
- The neuron writes back on port B at the address it read five cycles earlier (a 5-stage delay
  on the address). The STDP unit therefore only needs to send the write enable and the data at
  the right time.

**Leak:** every `leak_event` tick subtracts a power of two from each non-zero state:

```
step = 2 ** max(0, msb(state) - LEAK_SHIFT)     (LEAK_SHIFT = 3)
state = (state > step) ? state - step : 0
```

Inside each octave of the state the decay is linear. Each time the state falls below a power of
two, the slope halves. The result is a piecewise-linear approximation of an exponential, built
from shifts only.

`neuron_active` gates integration, so a disabled neuron never counts up.

## The STDP unit (`stdp_unit`)

This is the only complex block. It holds three things:

- the **pre-list**, a 1024 x 10-bit circular buffer of the most recent input addresses;
- a **16-bit LFSR** (x^16+x^15+x^13+x^4+1), whose low 10 bits are the random number;
- a **restoring serial divider**.

While idle, it records every input event the core accepts. A request is accepted only while the
unit is idle. It latches the neuron index, which drives `STDP_active_addr` on the bus. The
process then runs as follows.

| phase | cycles | what happens |
|---|---|---|
| LTP | n + 8 | `n = min(num_potentiation, entries in the pre-list)`. The newest n pre-list addresses are read; the neuron's weight at each address is read. A weight that is 0 is written to 1 if `rnd < ltp_probability`. |
| SUM | 1029 | All 1024 weights of the neuron are read and the 1-weights counted: `Wsum`. |
| DIV | 25 | `p_LTD = 1024 * (Wsum - num_active_weights) / Wsum`, clipped to 1023. It is 0 when `Wsum <= num_active_weights` or `Wsum = 0`. |
| DEP | 1030 | All 1024 weights are read again. A weight that is 1 is written to 0 if `rnd < p_LTD`. |
| FLUSH | 1 | The pre-list pointers are reset; `done` pulses. |

The whole process keeps `busy` high for **n + 2093 cycles**. For the buffer size of 90 used on
the original FPGA, that is 2183 cycles, or 21.8 µs at 100 MHz. One STDP unit can therefore serve
about 45.8 k STDP events per second.

**Why it normalises:** the expected number of 1-weights cleared in DEP is
`Wsum * p_LTD / 1024 = Wsum - target`. A neuron always ends near `num_active_weights` 1-weights,
with binomial spread. This holds however many synapses LTP has just set. LTP makes the neuron's
weights resemble the recent input. LTD, in contrast, does not look at the input at all: it only
keeps the total constant.

**Pipeline:** each read on the bus costs one cycle for the registered `stdp_rd_addr`, three
cycles inside the neuron's memory, and one cycle for the registered read data. The write
decision is made on the registered data. It reaches the neuron exactly when the neuron's 5-stage
address delay presents the same address.

**Events during learning:** events that arrive while the unit is busy still drive the neurons,
but they are not added to the pre-list. A request that arrives while the unit is busy is
ignored. However, its STDP event still clears every learning state.

**Flushing** the pre-list after each process suits the strong winner-takes-all inhibition: older
events belong to a pattern that has already been learned or discarded.

## The neural core (`neural_core`)

**Input path:** the AER filter passes only events whose core field equals `core_addr`. The event
takes one register stage and is then broadcast to every neuron and to the STDP unit. One event
per cycle is accepted.

**Lateral inhibition:** while `inhibition_active` is high, two things clear the firing state of
every neuron in the core in that same cycle:

- any neuron's `spike_out`;
- `general_inhibition`.

The Spike2AER unit emits only the lowest-index spike of such a cycle. This gives winner takes
all. With inhibition off, simultaneous spikes all come out, one per cycle, in index order.

**Learning requests:** the STDP arbiter grants the lowest-index `stdp_req` and registers it into
`stdp_addr_v` / `stdp_req_addr`. Its pulse is the core's `stdp_event_out`. The OR of that pulse
and `stdp_event_in` clears the learning state of every neuron.

**STDP bus:** the bus is a struct (`stdp_bus_t`) of the active neuron index, read address, write
enable and write data, fanned out to all neurons. The read data line is the OR of the neurons'
read lines; only the selected neuron drives a 1. Per neuron, only `spike_out` and `stdp_req` are
routed individually.

**Leak timer:** two down-counters produce `leak_event` every `neuron_leak_rate` cycles and
`th_leak_event` every `threshold_leak_rate` cycles. A rate of 0 disables the tick.

## The multi-core layer (`multi_core`)

`NUM_CORES` cores form one fully connected layer.

- **Input:** the 10-bit input event is broadcast to all cores. Each core's filter is given its
  own address, so every core accepts every event.
- **Settings:** each core has its own settings (`core_params_t`: leak rates, the three
  thresholds, inhibition and learning enables, LTP probability, weight target, LTP count) and its
  own neuron enable vector.
- **System-wide lines:** the OR of all cores' output valids is returned to all cores as
  `general_inhibition`. The OR of all their STDP events is returned as `stdp_event_in`. A spike
  in one core therefore resets the firing states of every inhibiting core one cycle later. An
  STDP request anywhere clears every learning state in the layer.
- **Merger:** the merger turns the cores' outputs into one 16-bit stream. Each core has a
  one-entry pending register. The lowest-index core with an event is served, one event per
  cycle, its older pending event first. If a core produces a new event while its pending one is
  still unserved, the pending one is replaced and `merger_drop` pulses. With inhibition on, at
  most one spike per cycle leaves each core, and this is rare.

## Settings

| input | meaning | values used in the original experiments |
|---|---|---|
| `spike_threshold` | firing threshold | tuned per experiment |
| `stdp_threshold_init` / `_max` | initial and maximum STDP threshold | 10 / 100 (orientation); max 40–80 (MNIST) |
| `ltp_probability` | P_LTP x 1024 | 819 (80 %), 307 (30 %), 205 (20 %) |
| `num_active_weights` | target number of 1-weights per neuron | 16 – 256; 100 on the FPGA, 180 for orientation |
| `num_potentiation` | pre-list entries potentiated | 90 on the FPGA, 250 or 500 in software |
| `neuron_leak_rate`, `threshold_leak_rate` | tick periods in clock cycles, 0 = off | — |
| `inhibition_active`, `stdp_activate` | enables | — |

## Departures from the original design

- **STDP cycle count.** The original quotes 7 + N cycles for LTP and 1024 + 3 + 25 + 1024 + 7
  for LTD, 2090 + N in total. This pipeline takes n + 8, 1029 + 25 + 1030, plus one flush cycle:
  n + 2093. The three extra cycles come from the input and output registers around the bus and
  the separate flush cycle.
- **Random number generator.** The original describes the generator both as a 16-bit LFSR of
  which 10 bits are compared and as a 10-bit generator. This design uses a 16-bit LFSR and
  compares 10 bits. The polynomial, seed and bit choice are this design's.
- **Leak rule.** Leak rule, threshold relaxation (`th_leak_event` lowering the STDP threshold
  towards its initial value) and the meaning of the leak rates as periods are this design's
  reading of blocks the original only names.
- **Layer size.** The original arrangement has up to 256 cores (65 k neurons). `NUM_CORES`
  defaults to 128: elaborating 256 cores of 256 neurons in flip-flops needs about 27 GB in
  common lint and simulation tools. The parameter can be set to 256 unchanged.
- **Merger, arbiters, inhibition timing.** Merger, arbiters and the timing of cross-core
  inhibition are not specified in the original; they use fixed priority, and the merger can drop
  an event under heavy simultaneous output.
- **Not included.** The small on-line STDP classifier that followed the feature layer on the
  FPGA, and the event-player and interface boards around it, are not part of this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=<n> failures=<n>` and stops itself after a fixed number of cycles.

| testbench | size | what it checks |
|---|---|---|
| `tb_lfsr16` | full | next-state function against a reference, hold when disabled, period 65535 |
| `tb_serial_divider` | full | random and corner divisions against `/` and `%`, latency |
| `tb_circular_buffer` | 16 entries | read by age, wrap-around, count saturation, flush, read latency |
| `tb_leak_timer` | full | tick periods for several rates, rate 0 disables |
| `tb_aer_filter` | full | accept/reject against the core address |
| `tb_syn_weight_mem` | full | reset to 1, random reads and writes on both ports, 3-cycle latency |
| `tb_stdp_arbiter`, `tb_spike2aer` | full | lowest index wins, one cycle latency; every spike emitted once, or one per group with inhibition |
| `tb_neuron_block` | full | integration, both thresholds, saturation, resets, leak against a model, bus read/write timing |
| `tb_stdp_unit` | full | exact potentiation set, `p_LTD` formula, final weight count near target, flush, n + 2093 busy cycles, ignored requests |
| `tb_neural_core` | full core (256 neurons) | inference, winner takes all, general inhibition, filter, leak, 40 learning patterns with per-process weight-count checks; counts every mechanism |
| `tb_multi_core` | 3 cores x 4 neurons | broadcast, merger against a cycle-accurate model including drops, cross-core inhibition, shared STDP events |

The largest configuration simulated is one complete 256-neuron core (`tb_neural_core`, about
30 s). The multi-core layer is simulated at 3 cores. A 128-core layer holds 33.5 Mbit of
synaptic flip-flops, which is beyond what a cycle-based simulator runs in reasonable time.

Simulating with Verilator (5.x), from the repository root:

```
verilator --binary --timing -Wno-fatal --top-module tb_neural_core \
    rtl/stdp_pkg.sv $(ls rtl/*.sv | grep -v stdp_pkg) tb/tb_neural_core.sv -o sim
./obj_dir/sim
```

Replace `tb_neural_core` with any other testbench name. Lint the layer with
`verilator --lint-only -Wall -Irtl rtl/stdp_pkg.sv rtl/multi_core.sv -y rtl`. Pass
`-GNUM_CORES=4` to keep it quick.

Remaining lint warnings are unused status signals: the weight count, LTD probability and
pre-list count of the STDP unit, and the per-neuron counter outputs. They are there for
observation.
