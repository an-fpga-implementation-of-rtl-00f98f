# Polychronous spiking neural network with programmable axonal delays

This is synthesizable SystemVerilog for a polychronous spiking neural network that stores spatio-temporal spike patterns
in the **delays of its axons** rather than in synaptic weights. Take a pattern: neuron A fires, then B 2.3 ms later, then
C, D, E and so on. It is stored by creating, for every spike in the pattern, four axons into that spike's neuron. They
come from the neurons of the four spikes before it, and each axon's delay equals the time from that earlier spike to
this one. Replay the first four spikes and every later neuron receives three or four pre-synaptic spikes at the same
moment. Its coincidence detector fires, and the rest of the pattern plays itself out.

The axons are created *de novo* while a pattern is trained. Nothing is wired in advance, and no connection is shared
between patterns, so the number of patterns the network can hold is set only by how many axons it has. At the default
size there are 70 × 4096 × 4 ≈ 1.15 M axons with 9-bit delays.

Delays can be set in two ways:

* **Delay programming.** One training presentation writes the measured interval straight into the axon.
* **Delay adaptation.** Each axon starts from a random delay. Over repeated presentations, the delay moves toward the
  interval it observes. This is the hardware analogue of spike-timing-dependent plasticity.

All timing assumes a 66 MHz clock. 1 ms is 66,000 clocks.

## Structure

```
              AER post-synaptic bus (12-bit address + 1 active line)
   +---------------------+---------------------------+---------------------+
   | pattern generator   |  neuron array output      |  noise generator    |
   +----------+----------+-------------^-------------+---------------------+
              |                        |
              v                        |
   +------------------------+   +-------------------------------+
   | 70 x tm_axon_array     |   | mux_neuron_array              |
   | (4096 virtual modules, |-->| controller + 128 physical     |
   |  4 delay paths each)   |   | coincidence-detector neurons  |
   +------------------------+   +-------------------------------+
         AER pre-synaptic bus (12-bit address + 4 active lines, one per synapse)

   pattern_checker: watches the neuron array's output against the pattern generator
```

| file | what it is |
|---|---|
| `rtl/pnn_pkg.sv` | widths, the AER bus structs `aer_post_t`/`aer_pre_t`, the mode and strategy enums |
| `rtl/pnn_system.sv` | top level |
| `rtl/tm_axon_array.sv` | time-multiplexed axon array |
| `rtl/axonal_delay_path.sv`, `delay_adaptor.sv`, `spike_generator.sv` | one of the four delay paths of the axon module |
| `rtl/ramp_generator.sv`, `aer_addr_latch.sv`, `prog_index_gen.sv`, `axon_index_gen.sv`, `sdp_ram.sv` | the other parts of the axon array |
| `rtl/mux_neuron_array.sv`, `neuron_controller.sv`, `physical_neuron_array.sv`, `physical_neuron.sv` | multiplexed neuron array |
| `rtl/aer_post_bus.sv`, `aer_pre_bus.sv` | bus merges |
| `rtl/pattern_generator.sv`, `pattern_checker.sv`, `lfsr.sv` | stimulus and scoring |

### The AER buses

Spikes travel as addresses on two address-event buses. Neither bus has a request/acknowledge handshake or an arbiter.

* **Post-synaptic bus.** An *active* line marks a valid address.
* **Pre-synaptic bus.** It has four active lines, one for each synapse of the target neuron.
* **Merging sources.** Sources are ORed, each address gated by its own active lines.
* **Collisions.** Two sources active together give a corrupted address. The design accepts this and does not prevent it.

To survive collisions, a pre-synaptic spike is held for 1–16 clocks (`pulse_width`). A short overlap then spoils only
part of the pulse. The `ev_post_collision` and `ev_pre_collision` outputs count these events.

## The time-multiplexed axon array

This is the core of the design and the least obvious part.

**Virtual modules.** An axon module has four parts:
* an input address: the neuron whose spike starts it;
* a 9-bit ramp;
* four delay paths;
* four output addresses.

The array does not build 4096 of them. It builds **one physical module** and keeps the state of 4096 virtual modules in
block RAMs:

| RAM | size | contents |
|---|---|---|
| `configured_address_array` | 4096 × 12 | input address of each module |
| `ramp_out_array` | 4096 × 9 | ramp of each module |
| `delay_array` | 4 × 4096 × 9 | one per delay path |

The axon-module index generator is a free-running counter. It picks one module per clock: the module is read, updated
and written back. Each module is therefore visited once every 4096 clocks (62 µs). That period is the time resolution
of every delay.

**Ramp.** The ramp of a module starts at 0 and rises by one step per visit. It saturates at 511, which also means
"idle". The longest delay is 511 × 62 µs ≈ 32 ms.

**One address per module.** Modules are configured in the order the training spikes arrive. Spike *p* of the training
stream gets programming index *p*, and its address is written to `configured_address_array[p]`. Output path *K* of
module *i* (K = 0..3) feeds synapse *K* of the neuron of spike *i+1+K*. So the four output addresses of module *i* are
just the input addresses of modules *i+1* to *i+4*, and only one address per module is stored. To have all five
addresses in the clock in which module *i* is processed, the address RAM is read four modules ahead. The last five
values are kept in a small shift window.

**Array boundary.** The last four modules of an array point past its end. Their targets are the first four spikes
after the array filled up. Four tail registers catch those spikes, and the programming index counts to N+4 for this
reason. The same spikes also configure the first modules of the next array.

**Training (delay programming), step by step:**
1. A training spike with index *p* starts module *p*'s ramp.
2. The spike is also held in the **AER address latch** for one full sweep, together with its programming index.
3. During that sweep, every module *i* whose path *K* has target *i+1+K = p* is visited once.
4. If that module's ramp is running, the ramp value is written into path *K*'s delay.

The ramp value is the time from spike *i* to spike *p* in 62 µs steps. In adaptation mode, step 4 writes a random value
(9-bit LFSR) instead.

**Recall.** A post-synaptic spike is latched for one sweep. Every configured module whose input address matches
restarts its ramp. A path fires when its running ramp **equals** the stored delay. Equality, rather than "greater than",
makes each path fire exactly once per ramp. The path's spike generator then drives the pre-synaptic bus for
`pulse_width` clocks, with the path's output address and its own active line. A fire that comes while that generator's
pulse is still out is dropped; `ev_axon_drop` counts these.

**Adaptation.** In `MODE_ADAPT`, a path adapts when two things hold:
* the latched post-synaptic address equals the path's output address;
* its ramp is running.

In other words, the target neuron fired at some time after this axon's input. The ramp value then is the delay the
axon should have had. The delay adaptor moves the stored delay toward it in one of three ways:

| strategy | step |
|---|---|
| `STRAT_ONE_STEP` | the whole difference (the same as programming) |
| `STRAT_UNIT_STEP` | ±1 |
| `STRAT_PROPORTIONAL` | half the difference, rounded away from zero so it always converges |

**Chaining arrays.** Array *a* may configure only while array *a−1* reports `full`. Training fills the arrays one
after another. In recall all arrays work in parallel on the same buses.

## The multiplexed neuron array

**Virtual neurons.** The network has 4096 virtual neurons, one per 12-bit address. At any moment only a few are
integrating input. So a **controller** maps active virtual addresses onto **128 physical neurons**. It has three parts:

* a register array of 128 virtual addresses;
* a timer array of 128 × 1 ms;
* a 7-bit round-robin neuron index generator.

**Routing a spike.** Each new event on the pre-synaptic bus is matched against all 128 registers at once. A new event
is a rising active line, or a changed address on the bus.

* If a register with a running timer holds the address, the spike goes to that physical neuron.
* Otherwise three things happen: the neuron named by the index generator takes the address, its timer restarts, and it
  receives the spike with an *assign* flag that clears its old state. The index then advances.
* If the neuron taken still had a running timer, it is evicted; `ev_neuron_evict` counts this.

**Output.** When a physical neuron fires, the controller sends the stored virtual address out on the post-synaptic
bus, one clock later.

**Physical neuron.** Each physical neuron is a coincidence detector with four synapse timers.
* A spike on a synapse starts that synapse's 1 ms timer. A repeat on a timer already running is ignored.
* When a third distinct synapse becomes active within 1 ms, the neuron schedules its output. It stands in for the
  integration time of a real neuron, so it is longer when the inputs are spread out. The delay is the sum of the
  elapsed times of the earlier running timers, shifted right by `INTEG_SHIFT` (default 4, i.e. in units of 16 clocks).
* Four simultaneous inputs fire at once.
* After firing, the neuron is refractory for 1 ms.

**Why `INTEG_SHIFT` is 4.** The scale of the integration delay is this design's own choice. Every neuron along a
recalled pattern adds its integration delay to the timing of the ones after it. With the sum used unscaled, in clock
units, the lag grew along a pattern until spikes fell outside the checker's window. With a shift of 4, long patterns
are recalled in full.

## Pattern generator and checker

**Pattern generator.**
* Two LFSRs make a pattern:
  * a 12-bit LFSR picks the neuron of each spike;
  * a 16-bit LFSR picks the interval to the next spike, `ISI_MIN + lfsr[7:0] × ISI_STEP`, which is 1 to 7.4 ms at the
    defaults.
* The two LFSRs are reloaded from `seed_idx`/`seed_isi` at every `start`, so training and recall see the same patterns.
* A 40 ms gap follows each pattern so that its ramps have ended before the next pattern begins.
* In training, every spike is sent onto the post-synaptic bus.
* In recall, only the first four spikes are sent. The rest are announced to the checker one interval ahead, as
  expected address and due time.
* A third LFSR makes noise spikes, which run whenever `noise_en` is set. Their interval is uniform on
  [0, 2·`noise_period`) and their address is the LFSR's low 12 bits.

**Pattern checker.**
* For each expected spike it opens a 4 ms window. The window starts 0.5–1 ms (a random offset) before the spike is due.
* A network spike with the expected address inside the window counts as a hit.
* When the pattern ends, it is *recalled* if `100·hits > threshold_pct·checked`.
* `n_seen` and `n_recalled` are running totals. `clear_stats` resets them.

## Using the top

1. Hold `rst_n` low, then set the run-time inputs:
   * `mode`, `strategy`, `pulse_width` (1–16);
   * `n_patterns`, `pat_len` (5–255 spikes);
   * the seeds;
   * `threshold_pct` (e.g. 70);
   * `noise_en`, `noise_period`.
2. **Training with delay programming:** `mode = MODE_PROGRAM`, `recall = 0`, `configure = 1`, pulse `start`. Wait for
   `gen_done`.
3. **Training with delay adaptation:**
   1. Set `mode = MODE_ADAPT`. Train once with `configure = 1`; this configures modules with random delays.
   2. Present the same patterns again (same seeds) with `configure = 0`. Each presentation adapts the delays.
4. **Recall:** `recall = 1`, `configure = 0`, pulse `start`. Each pattern ends with a `result_valid` strobe that
   carries `result_hits`, `result_checked` and `result_ok`.

The `ev_*` outputs are one-clock strobes, one for each mechanism, meant for counters or a logic analyser.

## Parameters

| parameter (top) | default | meaning |
|---|---|---|
| `N_ARRAYS` | 70 | axon arrays |
| `N_AXON` | 4096 | virtual modules per array (power of two); sweep = N_AXON clocks |
| `NP` | 128 | physical neurons |
| `WINDOW` | 66000 | coincidence window, timer length and refractory time (1 ms) |
| `INTEG_SHIFT` | 4 | integration delay = timer sum >> INTEG_SHIFT clocks |
| `ISI_MIN`, `ISI_STEP` | 66000, 1650 | pattern interval = ISI_MIN + 0..255 × ISI_STEP |
| `GAP` | 2640000 | silence after each pattern (40 ms) |
| `PULSE` | 264000 | checker window (4 ms) |
| `OFF_MIN`, `OFF_SPAN` | 33000, 33000 | window opens OFF_MIN..OFF_MIN+OFF_SPAN before the spike is due |

**Capacity.** Every training spike uses one axon module. A pattern of *L* spikes therefore uses *L* modules.
* At the defaults: 286,720 modules, for example 5621 patterns of 51 spikes or 13,653 of 21 spikes.
* A single array: 80 patterns of 51 spikes.

**Size.** The yosys generic synthesis of the full default top gives:
* about 57 k cells;
* about 32 k flip-flops;
* 16.3 Mbit of RAM, almost all of it in the 70 × 6 block RAMs of 4096 words.

## Where this design departs from, or adds to, its source description

* **Programming index.** It counts N+4 spikes, not N. The four tail spikes feed the tail registers that complete the
  last modules' paths. The source gives the counter but not this boundary case.
* **Programming rule.** Delays are programmed by programming index: path *K* of module *i* takes the ramp when spike
  *i+1+K* arrives. Adaptation, in contrast, matches by address.
* **Ramp and firing.** A path fires on ramp = delay, and the ramp saturates at 511, which is also its idle value.
* **Integration delay.** Its scale is `INTEG_SHIFT`; see above.
* **Neuron controller.** On a miss it takes the next neuron round-robin even if that neuron's timer still runs,
  clearing the neuron. Physical neurons that fire in the same clock collide, as on the AER bus.
* **Pattern intervals and gap.** The interval distribution (1–7.4 ms) and the 40 ms gap are this design's choices.
* **Noise.** Noise intervals are uniform, not exponential, so noise is only approximately Poisson.
* **Neuron index LFSR.** It is always 12 bits, so patterns always span all 4096 neurons. Networks of 128–2048 neurons,
  which need a narrower index LFSR, are not provided.
* **Debug and control.** The vendor debug cores used to control and observe the FPGA are not included. Their signals
  are the top's ports.
* **Alternatives not built.** A fully parallel neuron array, and a neuron array with a single time-multiplexed
  physical neuron, are alternatives to the multiplexed neuron array and are not built.

## Verification

Every testbench is self-checking. Each prints `TB_RESULT checks=N failures=M` and has a watchdog. Build and run one
with Verilator 5, from the repository root:

```
verilator --binary --timing --assert -Irtl -y rtl -y tb +libext+.sv \
    --top-module tb_pnn_system rtl/pnn_pkg.sv tb/tb_pnn_system.sv
./obj_dir/Vtb_pnn_system
```

| testbench | what it checks |
|---|---|
| `tb_tm_axon_array` | Uses 64- and 8-module arrays. Checks the programming index and the number of programmed paths (22 for 8 spikes). Replay fires each path once, at the trained interval to within two sweeps, with the right address and line. Checks the exact pulse width, that nothing fires after the ramps end, and that adaptation from random delays converges. Checks fill-up at N, counting to N+4, and the tail paths. |
| `tb_delay_adaptor` | 4000 random cases against a reference model of all modes and strategies. |
| `tb_spike_generator` | Pulse widths 1/4/16, 0 → 1, 31 → 16, address hold, dropped requests. |
| `tb_physical_neuron` | Fire time equals the timer sum. No fire for two inputs, a repeated synapse, another address, spread-out inputs, inputs while refractory, or after an assign. Four inputs fire at once. |
| `tb_mux_neuron_array` | Eight physical neurons. Fire delay, virtual address on output, refractory time, duplicate synapse, spread inputs, assignment count and round-robin eviction. |
| `tb_aer_pre_bus`, `tb_aer_post_bus` | Random traffic: single-source transparency, idle bus, collision flag. |
| `tb_pattern_generator` | Against an independent LFSR model: addresses and intervals in training and recall, 4-spike cue, expected-spike announcements, gap, noise. |
| `tb_pattern_checker` | Hits inside/outside the window, wrong address, threshold, totals. |
| `tb_pnn_system` | The whole system at reduced size: 2 arrays of 64 modules, 4 physical neurons, 1024-clock window. Runs, in order: programming of three 30-spike patterns across both arrays, recall, adaptation training and recall, then noise. Every mechanism is counted and must occur: programming, adaptation, ramp start, axon fire, dropped fire, neuron assign and evict, bus collisions, array switch-over, recalled pattern. About 15 s. |
| `tb_pnn_system_full` | The top at its defaults. Trains one 12-spike pattern, then recalls it from its first four spikes; all 8 remaining spikes come back. About 4 minutes of simulation. |
