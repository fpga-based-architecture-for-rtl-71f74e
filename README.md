# Event-driven STDP plasticity processor for a board of analog neurons

This is synthesizable SystemVerilog for the digital side of a neuromorphic board. The board
carries 25 analog (Hodgkin-Huxley) neurons and an FPGA. Several such boards share a backplane
bus and together form one network. Each time a neuron fires, the FPGA:

- updates the weights of the synapses that spike affects, by spike-timing-dependent plasticity
  (STDP);
- delivers the new weights to the analog neurons on the board;
- forwards the spike to boards that hold the neuron's other targets.

This must keep pace with biological time (milliseconds), so the work is event-driven. Nothing
happens between spikes except the slow decay of a few per-neuron traces.

The weight rule is a pair-based STDP model with spike efficacies and soft bounds:

    dw_ij/dt = eps_i eps_j { (W_LTP - w_ij) * sum P(t - t_j_last) delta(t - t_i)
                           - (w_ij - W_LTD) * sum Q(t - t_i_last) delta(t - t_j) }

    P(t)  = A+ exp(-t/tau_p)      eps_i = 1 - exp(-(t_i_last - t_i_prev)/tau_post)
    Q(t)  = A- exp(-t/tau_q)      eps_j = 1 - exp(-(t_j_last - t_j_prev)/tau_pre)

Here j is the pre-synaptic neuron and i the post-synaptic one. The rule has two cases:

- **LTP.** A post-synaptic spike shortly after a pre-synaptic one strengthens the synapse. The
  weight moves towards `W_LTP` by a fraction that shrinks with the delay, at time constant tau_p.
- **LTD.** A pre-synaptic spike shortly after a post-synaptic one weakens it. The weight moves
  towards `W_LTD`, at time constant tau_q.

Both steps are scaled by the efficacies. A neuron that fired very recently has a small
efficacy, so its next spike counts for less. The default time constants are tau_p = 14.8 ms,
tau_q = 33.8 ms, tau_pre = 28 ms and tau_post = 88 ms. Weights are 20-bit values. Their top 8
bits (0..255) are what a neuron receives, and the bounds are 0 and 255 on that scale.

## How the four exponentials are computed: one decay engine per function, shared by all neurons

Four functions of elapsed time appear in the rule: P, Q, eps_i and eps_j. Each is produced by
its own co-processor (`stdp_coproc`). Each co-processor holds one *trace* per neuron address in
a RAM (`exp_decay`). Nothing evaluates `exp()`: the traces decay in real time.

- Every `TICK_CYCLES` clock cycles the engine sweeps its RAM, one entry per cycle. It replaces
  each trace x by `x - ceil(x / 2^S)`, that is x times (1 - 2^-S), with S = `DECAY_SHIFT` = 8.
- The tick period sets the time constant:
  `TICK_CYCLES = round(tau * f_clk * -ln(1 - 2^-S))`. This is computed at elaboration from
  `TAU_US` and `CLK_KHZ`. At 50 MHz and S = 8 the periods are:

  | Function | tau     | `TICK_CYCLES` |
  |----------|---------|---------------|
  | P        | 14.8 ms | 2896          |
  | Q        | 33.8 ms | 6614          |
  | eps_j    | 28 ms   | 5479          |
  | eps_i    | 88 ms   | 17221         |

- A sweep of the 500-entry RAM takes 500 cycles. The remaining cycles of each tick are idle,
  and that idle time is what lets one engine serve every neuron. A longer time constant gives a
  longer tick, so each engine could serve more neurons. The elaboration check `N < TICK_CYCLES`
  enforces that a sweep fits in a tick.
- A trace is stored with 8 guard bits below its 16 visible bits. Without them the rounding of
  hundreds of decay steps would cost several percent of the value. Rounding each step up lets
  every trace reach exactly zero.
- While a sweep runs, the co-processor's `ready` is low. A request waits until the sweep ends
  (at most 500 cycles), and this is the only stall in the design. The scheduler's `stall`
  output shows it.

What a neuron's spike does to its traces:

- **P and Q** (`EFFICACY = 0`): a spike of neuron n loads 1.0 into n's trace. A read returns
  `A * trace`, which is `A exp(-(t - t_n_last)/tau)`. The default amplitudes are A+ = A- = 1/16.
- **eps_j and eps_i** (`EFFICACY = 1`): a spike of n first inverts the current trace with a
  bitwise NOT (1 - x in this format) and stores the result as n's efficacy in a second RAM. It
  then loads 1.0 into the trace. The stored value is therefore `1 - exp(-(t_last - t_prev)/tau)`
  and stays fixed until n's next spike. A neuron firing for the first time gets efficacy 1.0.

All traces and efficacies are unsigned 16-bit fractions in which all ones means 1.0.

## What one spike sets in motion

Spikes enter through `spike_encoder`, from two sources:

- local neurons (`spike_in`, one pulse per neuron), which get address `board_base + slot`;
- other boards, over the bus (`bus_rx_*`).

The encoder writes one sender address per cycle into `spike_fifo` (depth 16). Bus spikes go
first, then local spikes, lowest slot first. When the FIFO is full the encoder holds local
spikes as pending and refuses bus spikes, so nothing is lost.

`stdp_scheduler` takes one event at a time and works through these steps:

1. **Look up.** Pop the sender n and read its look-up-table column.
2. **Efficacies.** Send a SPIKE request for n to the eps_j and eps_i co-processors.
3. **Post-synaptic list of n.** For each target t:
   - **t on this board:** LTD on synapse n→t. Read Q(t), eps_i(t), eps_j(n) and the stored
     weight together. If the synapse is plastic, start `weight_update` and write the result
     back. Then send the new weight, with n's polarity, to neuron t through `neuron_decoder`
     (a one-cycle strobe on `syn_strobe[t]`, with the weight on `syn_weight` and the polarity
     on `syn_exc`). A non-plastic synapse delivers its stored weight unchanged.
   - **t on another board, n local:** forward (n, t) on the bus (`bus_tx_*`, valid/ready). The
     other board processes that synapse.
   - **t on another board, n from the bus:** nothing; the spike has already been forwarded.
4. **Pre-synaptic list of n** (only when n is local). For each source j: LTP on synapse j→n,
   using P(j), eps_j(j), eps_i(n) and the weight. Nothing is delivered.
5. **Traces.** Send a SPIKE request for n to the P and Q co-processors. This comes last, so a
   self-connection still sees n's previous spike.

The four co-processor reads of one synapse are issued in the same cycle. `weight_update`
evaluates one discrete step of the rule with one shared multiplier, in three passes:
`k = eps_i * eps_j`, then `k = k * P` (or `* Q`), then `d = k * (W_LTP - w)` (or
`k * (w - W_LTD)`). Each product is truncated to 16 fraction bits. The result comes back three
cycles after `start`.

Cycle costs without stalls:

| Work                                          | Cycles |
|-----------------------------------------------|--------|
| Plastic LTD synapse, including its delivery   | 10     |
| Non-plastic LTD synapse, including delivery   | 7      |
| Plastic LTP synapse                           | 8      |
| Non-plastic LTP synapse                       | 5      |
| Forward, bus ready at once                    | 4      |
| Overhead per event                            | 9      |

In the 25-neuron all-to-all test one spike touches 50 synapses. The slowest spike took 2,172
cycles, or 43 µs at 50 MHz, sweep stalls included.

## Network configuration

A network is described by three N×N matrices:

- **P:** whether a synapse is plastic;
- **W:** the initial weights;
- **S:** excitatory or inhibitory.

On a board this becomes a look-up table and a weight memory.

**`lookup_table`** has one column per neuron address (`lut_col_t` in `stdp_pkg`):

- `is_local`: whether the neuron is on this board;
- `excitatory`: the polarity of all its outgoing synapses;
- `post_base`, `post_len`: where its list of post-synaptic neurons starts, and its length;
- `pre_base`, `pre_len`: the same for its list of pre-synaptic neurons.

Both lists hold neuron addresses and live back to back in one list memory (32,768 entries).
Adding or removing list entries creates or prunes synapses. A synapse exists exactly when it
appears in the lists. Both sides must agree: j in i's pre list and i in j's post list.

**`weight_memory`** holds the 20-bit weight and the plastic flag of every synapse that ends on
one of this board's neurons. Entry `(pre address, local slot)` is at index `pre * 25 + slot`.
Synapses onto other boards' neurons are stored on those boards.

The host writes all of this through the `cfg_*` ports and reads weights back through
`host_rd_*` (one cycle of latency). The tables may be rewritten while the board runs, which creates or
prunes synapses. Do this while `busy` is low, so that no event reads a half-written column;
`tb_processor_delay` changes list lengths between spikes this way. The local slot of a neuron is `address - board_base`. So
local neurons must occupy addresses `board_base .. board_base + 24`, and their columns must
have `is_local` set.

Example, using the three-neuron network of `tb_plasticity_board`. Neurons 0 and 1 are local;
neuron 30 is on another board.

| Synapse | Weight | Plastic | Polarity    |
|---------|--------|---------|-------------|
| 0 → 1   | 23     | yes     | excitatory  |
| 1 → 30  | 33     | yes     | inhibitory  |
| 30 → 0  | 12     | yes     | excitatory  |
| 30 → 1  | 91     | no      | excitatory  |

| Neuron | Post list | Pre list |
|--------|-----------|----------|
| 0      | {1}       | {30}     |
| 1      | {30}      | {0, 30}  |
| 30     | {0, 1}    | {1}      |

This board's weight memory holds 0→1, 30→0 and 30→1. Synapse 1→30 lives on neuron 30's board;
here a spike of neuron 1 is forwarded there.

## Sizes and parameters

Defaults are in `stdp_pkg` and in the parameters of `plasticity_board`.

| Parameter | Default | Meaning |
|---|---|---|
| `N_NEURONS` | 500 | neuron addresses (20 boards × 25 neurons) |
| `N_LOCAL` | 25 | analog neurons on a board |
| `W_W` / `W_OUT_W` | 20 / 8 | internal weight width / width delivered to a neuron |
| `TRACE_W` | 16 | trace and efficacy width (plus 8 guard bits inside `exp_decay`) |
| `LIST_DEPTH` | 32768 | look-up-table list entries |
| `CLK_KHZ` | 50000 | clock frequency; it must match the real clock, since the traces decay in real time |
| `TAU_P_US`, `TAU_Q_US`, `TAU_PRE_US`, `TAU_POST_US` | 14800, 33800, 28000, 88000 | time constants |
| `DECAY_SHIFT` | 8 | decay per tick = 1 - 2^-8 |
| `A_PLUS`, `A_MINUS` | 4096 (1/16) | amplitudes of P and Q |
| `W_LTP`, `W_LTD` | 255, 0 | bounds on the 8-bit scale (in `weight_update`) |
| `FIFO_DEPTH` | 16 | spike FIFO |

After reset the co-processors spend `N_NEURONS` cycles clearing their RAMs (`ready` low), then
accept events. Configuration may be written during that time.

## Files

| File | Contents |
|---|---|
| `rtl/stdp_pkg.sv` | sizes, number formats, `lut_col_t`, co-processor opcodes |
| `rtl/plasticity_board.sv` | top: everything below, wired as one board |
| `rtl/spike_encoder.sv` | local and bus spikes → FIFO writes |
| `rtl/spike_fifo.sv` | event queue, first-word fall-through, sticky overflow flag |
| `rtl/lookup_table.sv` | neuron columns and list memory, one-cycle reads |
| `rtl/stdp_scheduler.sv` | the controller (steps 1-5 above) |
| `rtl/stdp_coproc.sv` | P/Q or efficacy co-processor around one decay engine |
| `rtl/exp_decay.sv` | the time-shared exponential decay engine |
| `rtl/weight_update.sv` | one LTP or LTD step of the rule |
| `rtl/weight_memory.sv` | weights and plastic flags of synapses onto local neurons |
| `rtl/neuron_decoder.sv` | weight event → strobe of one analog neuron |

## Verification

Every module has a self-checking testbench in `tb/`. Each prints
`TB_RESULT checks=N failures=M` and has a watchdog.

| Testbench | What it checks |
|---|---|
| `tb_spike_fifo` | random traffic against a queue model; full, empty and overflow |
| `tb_spike_encoder` | order, bus priority, back-pressure, no spike lost or duplicated |
| `tb_lookup_table` | the three-neuron example written and read back |
| `tb_exp_decay` | cycle-exact model of ticks, sweeps and rounding; ready low during clear and sweep; decay against `exp()`; decay to zero |
| `tb_stdp_coproc` | both kinds against a model; `1 - exp(-dt/tau)`; derived tick periods at the default sizes |
| `tb_weight_update` | bit-exact and real-valued LTP/LTD; bounds; clamping; latency |
| `tb_weight_memory` | random writes and reads; plastic flag kept on write-back |
| `tb_neuron_decoder` | one-hot strobe, weight and polarity, one cycle |
| `tb_stdp_scheduler` | the controller among behavioural models with random stalls and bus back-pressure; order of weight events, forwards, SPIKE requests and final weights on a random 10-neuron network |
| `tb_plasticity_board` | whole board at a 10 MHz clock on the three-neuron example over 12 firing rounds; every delivered weight and the final weights against a real-valued model of the rule (`tb/stdp_ref.svh`); forwards, non-plastic delivery, bus spikes, stalls and a full FIFO must all occur |
| `tb_plasticity_board_full` | whole board at default sizes, 25 neurons all-to-all (625 synapses, initial weight 127), neuron n+1 firing 2 ms after neuron n, 2 s of network time; every one of the 25,000 weight events and all 625 final weights against the model; the time per spike |
| `tb_processor_delay` | whole board at default sizes; one spike touching K connections, for K up to 499 (LTP, LTD, forward, plastic and non-plastic); the stall-free cycle count must equal the per-connection costs above exactly; update, event and forward counts; the delay table |

The board-level tests compare with a real-valued model, so they accept small deviations:

- A delivered 8-bit weight may lie up to 1.5 steps below the model's value and 0.5 above it,
  since the hardware truncates. In the full-size run this window is widened by 3% of the total
  change the model has applied to that synapse so far.
- A final 20-bit weight may differ from the model by 3% of that total change plus 64 (1/64 of an
  8-bit step).

These margins cover tick quantisation (at most one tick, under 0.4% of tau) and truncation in
the fixed-point products.

To run a testbench with Verilator 5:

    verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl -y tb +libext+.sv \
        rtl/stdp_pkg.sv tb/tb_plasticity_board.sv --top-module tb_plasticity_board
    ./obj_dir/Vtb_plasticity_board

The same command, with another file and top, runs every testbench in `tb/`. They build without
warnings. `tb_plasticity_board_full` takes about a minute; the others take seconds. The testbenches use
`$urandom`, so pass `+verilator+seed+N` to vary the traffic. Every module compiles on its own
as a top, with `verilator --lint-only -Wall` and with yosys' slang front end.

## Where this design departs from the published architecture, and what it adds

- **Controller.** The published processor runs its schedule as a program on a PicoBlaze 8-bit
  soft core. That program is not available. `stdp_scheduler` is a finite-state machine that
  performs the described schedule: scroll both lists of the sender; compute, update and deliver
  for local targets; forward for remote ones.
- **Decay engine.** The published text says only that one exponential block per function is
  time-multiplexed over all neurons, with RAMs keeping intermediate values. The tick/sweep
  scheme, the decay step `1 - 2^-8`, the guard bits and the efficacy RAM are this design's way
  of doing that.
- **Polarity.** The configuration matrix S gives a polarity per synapse, but the board's look-up
  table stores one polarity per neuron. This design follows the table, so all synapses leaving a
  neuron share its polarity. A per-synapse polarity would need one more bit beside each weight.
- **Existence of a synapse.** The matrices mark a missing synapse by P = 0 and W = 0 together.
  Here a synapse exists when it appears in the lists, so a listed non-plastic synapse with
  weight 0 still delivers 0.
- **Delivery path.** In the published block diagram the weight-update unit drives the output
  demultiplexer directly. Here the scheduler sends the weight event after the update, or
  directly for a non-plastic synapse.
- **Choices of this design** where the published description is silent:
  - clock frequency (50 MHz);
  - the amplitudes A+ = A- = 1/16;
  - trace width;
  - FIFO depth, list memory size and the 500-address network;
  - encoder priority;
  - the local slot mapping (`address - board_base`);
  - all handshakes;
  - skipping the pre list of spikes that arrive over the bus, since those synapses belong to
    the sender's board;
  - the order of the five steps.
- **Not built:**
  - the PicoBlaze core itself;
  - the analog neurons, whose inputs are the `syn_*` ports;
  - the backplane bus and network connector, left as the plain `bus_rx_*` / `bus_tx_*` ports;
  - the board's external memory chip.

## Performance and limits

- **Capacity.** One board stores up to 500 × 25 = 12,500 synapses onto its own neurons. The
  25-neuron all-to-all experiment (625 synapses) fits easily.
- **Speed.** At an assumed 50 MHz, a stall-free event costs 0.18 µs plus 0.16 µs per plastic LTP
  synapse or 0.2 µs per plastic LTD synapse. Each sweep the event meets adds up to 10 µs.
  `tb_processor_delay` measured these cases:

  | Connections in one spike | Delay, stalls included |
  |--------------------------|------------------------|
  | 24 LTD, local targets    | 5 µs                   |
  | 100 LTP                  | 16 µs                  |
  | 200 LTP                  | 49 µs                  |
  | 499 LTP (the most a spike can touch) | 110 µs     |

  In the all-to-all test the slowest spike (50 synapses) took 43 µs. All of this is far inside
  the millisecond timescale of the neurons. It is well short of 16,000 connections within
  0.8 ms, a figure reported for the original implementation. Even without stalls, 16,000
  synapses would take 2.6 ms here, and one board holds at most 12,500. How the original counts
  a connection is not known.
- **Where to gain speed.** Most of the cost is the unpipelined per-synapse schedule: 8 to 10
  cycles per synapse. The sweeps add 30 to 50% on long events, since each blocks a
  co-processor for 500 of every 2,896 or more cycles. Two routes would help: pipelining
  successive synapses through the gather and update stages, and giving the decay RAM a second
  port so that requests need not wait for a sweep.
- **Accuracy.** It is limited by the 16-bit traces and the truncating products. Larger
  `TRACE_W` or guard bits would improve it.
