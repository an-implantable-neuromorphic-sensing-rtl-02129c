# Event-driven neural sensing system: level-crossing ADC, spiking network and pulse body-channel transmitter

Nerve signals of interest here are sparse: a compound action potential (CAP)
lasts about a millisecond and arrives perhaps ten times a second, yet its
timing must be known to about 10 µs (for a conduction-velocity measurement, for
example). Sampling such a signal at tens of kilosamples per second wastes
almost all the energy spent on it. This design works on changes instead:

* a **level-crossing ADC** per channel emits an `UP` or `DN` event every time
  the input has moved one LSB since the last event, so nothing happens while
  the nerve is quiet;
* a **spiking neural network (SNN)** consumes those events directly and marks
  the three phases of a CAP with labels: **D** (depolarisation), **R**
  (repolarisation) and **H** (hyperpolarisation);
* an **event-driven transmitter** sends every event as one short packet over a
  galvanic body-channel link. The packet is a 3-bit address in Manchester code,
  driven as +/- current pulses into the tissue. The arrival time of the packet
  *is* the time stamp.

Two modes share the hardware. In **full-diagnosis** mode the raw `UP1/DN1/UP2/DN2`
events of both channels go out, and the receiver rebuilds each waveform by
counting (+1 per UP, -1 per DN). In **feature-extraction** mode only the D/R/H
labels go out.

The RTL is SystemVerilog-2017. The analog parts (comparator front end, power
amplifier) are behavioural models with `real` pins. Everything else is
synthesizable.

## Block map

```
           vin1 ─► lc_adc_frontend ─up/dn─► lcadc_ctrl ─ev_up/ev_dn─┐
                        ▲   dac_code, phi1..3   │                   │ UP1 DN1
           vin2 ─► lc_adc_frontend ─up/dn─► lcadc_ctrl ─────────────┤ UP2 DN2
                                                                    ▼
                     snn_core: pool1 (46, recurrent) ─► pool2 (46, recurrent) ─► out (8)
                                                                    │ D R H (out 0..2)
                                                                    ▼
                     bcc_tx: mode select ─► event queue ─► AER + Manchester ─► OH/OL ─► bcc_pa ─► OP/ON
```

| file | role |
|---|---|
| `rtl/nss_pkg.sv` | mode enum, AER codes, weight-write bus type |
| `rtl/lc_adc_frontend.sv` | *behavioural*: subtractor, pre-amp, charge adder, 2 comparators, 6-bit DAC, offset calibration |
| `rtl/lcadc_ctrl.sv` | ADC digital control: pulse latches, phase generator, anti-self-locking, DAC tracking |
| `rtl/spike_arbiter.sv` | round-robin arbiter (used in every SNN layer and in the transmitter queue) |
| `rtl/snn_neuron.sv` | weight selector + integrate-and-fire with ReLU and overflow firing |
| `rtl/snn_layer.sv` | arbiter + N neurons, optionally fully recurrent |
| `rtl/snn_core.sv` | 4 → 46 (recurrent) → 46 (recurrent) → 8 network |
| `rtl/bcc_tx.sv` | mode select, pending events, 3-bit AER, Manchester chips, reset gap |
| `rtl/bcc_pa.sv` | *behavioural*: differential PA with reset to VDD/2 |
| `rtl/nss_core.sv` | synthesizable digital core (2 × lcadc_ctrl, snn_core, bcc_tx) |
| `rtl/nss_top.sv` | whole chip: core + analog models, real-valued pins |

## Timing base

The original circuit has no system clock: the ADC control runs from a ring
oscillator that starts only when a comparator fires, and the SNN is
self-timed. This RTL replaces all of that with **one synchronous clock**,
assumed to be **8 MHz (125 ns)**. All timing below is given in cycles of that
clock. The ring oscillator becomes a clock enable (`osc_en`). The clock is
the largest departure from the original, and the reason all latencies are
whole cycles.

## Level-crossing ADC

### Analog front end (model)
`lc_adc_frontend` compares `vin` with `V_DAC = code · VLSB` (VLSB = 1 V / 64):

* `up_cmp` is high while `vin − V_DAC > +1 LSB`;
* `dn_cmp` is high while `vin − V_DAC < −1 LSB`.

The two comparators share one pre-amplifier (gain 10 dB). The comparators'
own offsets are therefore divided by that gain. The pre-amplifier's offset is
removed by a three-step switched-capacitor sequence:

1. `phi1` stores the reference with the offset (the DAC is forced to 2 LSB);
2. `phi2` stores the offset alone (the DAC is forced to 0);
3. `phi3` connects the two capacitors, which cancels the offset.

While `phi1` or `phi2` is high the model holds both comparators low. It
removes the pre-amp offset once a complete phi1 → phi2 → phi3 sequence has
run. Noise, bandwidth and the mode-dependent biasing are not modelled.

### Digital control (`lcadc_ctrl`)
The comparator levels are asynchronous and pass through two-flop
synchronisers. Then:

1. **Pulse latch.** If no conversion is running, a high `UP` sets the
   `Pulse_UP` latch (DN likewise). This emits a one-cycle `ev_up` and steps
   the DAC code by +1 (−1 for DN). The code saturates at 0 and 63 and resets
   to 32.
2. **Phase generator.** While a latch is set, a counter produces
   `phi1`, `phi2`, `phi3` (each `PHASE_CYC` = 2 cycles) and then `phi_r`
   (1 cycle), with an idle cycle between phases. `phi_r` clears the latch and
   the counter stops. A conversion takes `3·PHASE_CYC + 4` = 10 cycles
   (1.25 µs).
3. **Anti-self-locking.** The latch is not edge-triggered. If the comparator
   is still high after `phi_r`, the latch sets again in the next cycle. This
   happens when the input moved more than one LSB, or when the loop got stuck
   with the comparator high. Events and DAC steps then repeat every
   `3·PHASE_CYC + 5` = 11 cycles until the comparator falls. `relock` marks
   each such re-trigger.

Latency from a comparator edge to `ev_up`/`ev_dn` is 3 cycles. The fastest
input the converter can follow is therefore 1 LSB per 11 cycles
(1.375 µs at 8 MHz). A faster input is still followed, but with that
staircase slope.

## Spiking neural network

### Neuron (`snn_neuron`)
Each neuron stores one signed 8-bit weight per presynaptic source. When the
layer arbiter dispatches a spike from source *s*, every neuron of the layer
adds `w[s]` to its membrane accumulator (`ACC_W` = 8 bits, unsigned):

```
sum = v + w[s]
sum < 0          -> v = 0                      (ReLU)
sum >= 2^ACC_W   -> v = sum - 2^ACC_W, fire    (overflow is the spike)
otherwise        -> v = sum
```

There is no leak. The output spike `nout` is registered: it is high in the
cycle after the input spike.

### Layer (`snn_layer`) and arbitration
A layer has a single `spike_arbiter` in front of it. The arbiter's sources
are the layer's inputs and, in a recurrent pool, the pool's own neurons.
Every source has a pending flag. Each cycle the arbiter dispatches the first
pending source after the one served last (round-robin), and broadcasts its
address to all neurons of the layer. Spikes that arrive at the same moment
are therefore spread over consecutive cycles. A spike on a source that is
already pending is merged with it, and the layer's `merged` output reports
this.

Synapse numbering, which the weight bus also uses: inputs first
(`0..N_IN-1`), then pool neurons (`N_IN..N_IN+N_NEUR-1`).

### Network (`snn_core`)
| layer | inputs | neurons | sources arbitrated | weights |
|---|---|---|---|---|
| pool 1 | UP1, DN1, UP2, DN2 | 46, fully recurrent | 50 | 2300 |
| pool 2 | pool 1 | 46, fully recurrent | 92 | 4232 |
| output | pool 2 | 8, feed-forward | 46 | 368 |

That makes 6900 weights (55,200 bits), all stored in the neurons. Output
neurons 0, 1, 2 are the labels D, R, H. Each layer adds 2 cycles when spikes
do not collide, so the input-to-label latency is 6 cycles (0.75 µs).

Weights are written one per cycle through `snn_wr` (`nss_pkg::snn_wr_t`):
`layer` (0 = pool 1, 1 = pool 2, 2 = output), `neuron`, `syn`, `data`. The
weight registers have no reset, so load all of them before use. No trained
weight set comes with this RTL. The testbenches use hand-made chains
(input → one neuron per layer → label) that exercise the mechanics.

## Transmitter (`bcc_tx`) and PA (`bcc_pa`)

**Mode select.** In feature mode the sources are D, R, H. In diagnosis mode
they are UP1, DN1, UP2, DN2.

**Queue.** Each source has a pending flag. A 4-input round-robin arbiter
picks the next event when the link is free. A repeated event while waiting
is merged and flagged on `dropped`. A mode change discards all waiting
events.

**Packet.** The 3-bit address goes out MSB first. Each bit becomes two
chips: `1` → `+ −`, `0` → `− +`.

| feature mode | AER | chips | diagnosis mode | AER | chips |
|---|---|---|---|---|---|
| D | 110 | `+- +- -+` | UP1 | 011 | `-+ +- +-` |
| R | 101 | `+- -+ +-` | DN1 | 010 | `-+ +- -+` |
| H | 100 | `+- -+ -+` | UP2 | 001 | `-+ -+ +-` |
|   |     |            | DN2 | 000 | `-+ -+ -+` |

A `+` chip raises `OH`, so the PA pushes current into the tissue. A `−` chip
raises `OL`, so the PA pulls it out. Every packet has three of each, so it
leaves no net charge. After the six chips, `OH` and `OL` both stay low for
`treset_cyc` cycles. The PA then shorts both electrodes to VDD/2 to remove
residual charge. Only after that can the next packet start.

**Timing.**

```
T_packet = 6 · tbit_cyc + treset_cyc    (cycles)
```

The packet starts 2 cycles after the event when the link is idle. Waiting
events go out back to back, one every `6 · tbit_cyc + treset_cyc + 2` cycles.
`tbit_cyc` = 4…16 gives a 0.5…2 µs chip at 8 MHz, and `treset_cyc` = 32
gives a 4 µs reset. A packet then lasts 7 µs; with `treset_cyc` = 24 it
lasts 6 µs. Both values are sampled at the start of each packet.

This queue sets the limit on time resolution. Events arriving faster than one
per packet time wait, which shifts their time stamps. If the same event
occurs again while it is waiting, it is lost.

## Verification

Every block has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M`.

| testbench | what it establishes |
|---|---|
| `tb_spike_arbiter` | latency 1 cycle, round-robin order on collision, merge, flush; 3000 random cycles against a reference model |
| `tb_snn_neuron` | ReLU clamp, exact overflow, 4000 random spikes against an integer model |
| `tb_snn_layer` | full pool (4+46 sources) cycle-by-cycle against a model, recurrent traffic, 2-cycle latency |
| `tb_snn_core` | full network, spike counts `floor(127·x/256)` through all three layers, recurrent synapse, 6-cycle latency; then random weights and colliding random inputs, every membrane and spike of all three layers compared with an integer model each cycle |
| `tb_lcadc_ctrl` | 3-cycle event latency, phase order/lengths, DAC forced to 2/0, self-lock re-trigger period, step sizes, saturation, sine tracking |
| `tb_lc_adc_frontend` | thresholds, hold during calibration, offset removal |
| `tb_bcc_tx` | decoded codes for all 7 events, packet length, 2-cycle start latency, charge balance, merge, mode-change discard, random streams |
| `tb_bcc_pa` | +/−/reset outputs |
| `tb_nss_core` | digital core with integer comparator models: every event (diagnosis) and every label (feature) comes out as the right packet |
| `tb_nss_feature_timing` | whole chip in feature mode, 16 CAPs with random ±0.2 LSB offset and start time: spread of the first R label's packet time (measured 8.75 µs, must be ≤ 10 µs), R packet 2 cycles after the R spike |
| `tb_nss_top` | whole chip at full size with a synthetic triphasic CAP on two channels; reconstruction from the link equals the DAC codes, NRMSE vs. the input, data rate at least 125x below a 30 kS/s 10-bit converter (185x measured), event-to-packet delay within 10 µs (6 µs worst measured); counts calibration, self-lock, collisions, recurrent spikes, merges, labels, mode switches |

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
  --top-module tb_nss_top rtl/nss_pkg.sv tb/tb_nss_top.sv && ./obj_dir/Vtb_nss_top
```

`tb_nss_top` runs the design at its default size (the top has no parameters)
and takes about a second. It reports a reconstruction NRMSE of about 0.11
for a 16-LSB CAP. Its error is dominated by the one-LSB hysteresis of the
converter.

## Departures and open points

* **Clock.** One 8 MHz clock replaces the self-timed logic and the ring
  oscillator. Latencies are whole cycles: 1.25 µs per conversion, 2 cycles
  per SNN layer.
* **Accumulator width** (`ACC_W` = 8) and the remainder kept after a spike are
  choices of this implementation. The sizes of the network, the 8-bit weights
  and the 6-bit DAC are not.
* **Arbiter size.** Pool 2's arbiter serves 92 sources, its 46 inputs plus
  its own 46 neurons. An arbiter over the 46 feed-forward inputs alone
  would never dispatch the recurrent spikes.
* **Output layer** has 8 neurons, of which only 3 are used as labels.
  The other 5 are computed but not transmitted.
* **DN2 = 000** completes the diagnosis-mode code table.
* **Event queue** (pending flags, round-robin order, merge, discard on mode
  change) is this implementation's reading of "the following event must be
  delayed".
* **Weight loading** bus and the absence of trained weights: the labels are
  only as meaningful as the weights loaded.
* **Analog models** omit noise, bandwidth, settling, the mode-dependent
  biasing and the PA's drive strength.
