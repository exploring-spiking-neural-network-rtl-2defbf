# Spiking neural network on a coarse-grain reconfigurable array

This is synthesizable SystemVerilog for a spiking neural network (SNN) built
from the cells of a coarse-grain reconfigurable array (CGRA). The array is
made of cells. Each cell has a register file, a datapath unit (DPU), circuit
switch boxes and a sequencer that holds the cell's configuration program.

Two extensions turn the cells into neurons:

* **In the cell.** The DPU and register file are extended with a time-step
  counter, an STDP (spike-timing-dependent plasticity) unit built around a
  double-precision divider, and a small state machine. Each cell is then one
  leaky integrate-and-fire (LIF) neuron that learns with STDP.
* **Between cells.** Neurons need point-to-point links, but each component
  has only two ports and can reach only nearby cells. The links are therefore
  time-multiplexed in a hierarchy:
  * cells form clusters;
  * one intermediate node per cluster collects the cluster's spikes, two
    cells at a time, under control of its sequencer program;
  * the intermediate nodes then pass the spikes on, one after another, to
    every neuron.

The default instance has 4 clusters of 6 cells, so 24 neurons. Every neuron
has a synapse from every other neuron.

## Spikes are time stamps

A spike travels as a 16-bit word: the number of the time step in which the
neuron fired. Step numbers start at 1, so the word 0 means "no spike".

Each neuron has a `time_counter` that resets to 1 and counts steps. A neuron
that fires in step k sets its output word `out_stamp` to `counter - 1 = k`
and keeps it until the next step. Using time stamps means a receiving
neuron needs no clock of its own to judge the timing. The stamp alone gives
the STDP time difference.

## One neuron cell (`snn_neuron`)

Per neuron i:

| storage | where | contents |
|---|---|---|
| `A[j]` | `regfile`, 64 x 16 | stamp of the last spike received from neuron j (0 = none yet) |
| `W[j]` | `regfile`, 64 x 16 | weight of the synapse from j, kept in [0, `W_MAX`] |
| `T_post` | register | stamp of this neuron's own last spike |
| `V` | `lif_dpu` | membrane potential, signed Q8.8 |
| `I` | register | input current gathered for the next step |

**Neuron model.** `lif_dpu` evaluates dV/dt = I + a - bV once per time step:

    V' = V + I + A_BIAS - (V >>> B_SHIFT)

The sum is saturated to 16 bits. If V' >= THETA the neuron fires and V
returns to 0. The defaults are a = 16 (1/16), b = 1/8 and THETA = 256 (1.0).
With no input, V settles at a/b = 128, below threshold, so an unstimulated
neuron stays silent.

**Learning rule.** With dt = T_post - T_pre in time steps:

    dt > 0 (pre before post):  dw = +A_PLUS  * exp(-dt / TAU_PLUS)
    dt < 0 (post before pre):  dw = -A_MINUS * exp(-|dt| / TAU_MINUS)

`stdp_unit` computes this in four stages:

1. It converts |dt| to an IEEE double.
2. It divides by tau in `fp64_div`, a restoring divider with
   round-to-nearest-even (58 cycles).
3. It truncates the quotient x to 1/16.
4. It forms exp(-x) as `EXP_INT[floor x] * EXP_FRAC[16 * frac x]`, two small
   Q1.15 tables (round(32768 * exp(-n)) and round(32768 * exp(-k/16))).

If x >= 8 the change is 0. If dt = 0, or if either side has never spiked,
dw = 0. Latency is 60 cycles, or 2 cycles when the divider is skipped.

**Sequencing (`snn_fsm`).** Two events start work:

* **Incoming spike** from neuron j with stamp t. The neuron stores
  `A[j] <- t`, then runs Fetch post spike, STDP with dt = T_post - t, and
  Weight update. This is a depression, because this neuron's last spike came
  earlier. The weight as it was before this update is added to I.
* **Own spike.** The neuron runs Ctr start, then loops over every synapse
  j < Nern: Fetch pre spike `A[j]`, STDP with dt = T_post - A[j], Weight
  update, Ctr++. These are potentiations. Nern is the `n_syn` input.

While the neuron is working, `busy` is high and it refuses spikes and steps.
It drops spikes that carry its own index or the stamp 0.

## Gathering a cluster (`cluster_hub`)

The intermediate node has a `sequencer` (64 x 36-bit program words), a
`switch_box` that connects its ports A and B to any two cells of the
cluster, and a register file. The collection program takes three
instructions per pair of cells:

    CONNECT a,b   port A <- cell a, port B <- cell b     1 cycle
    READ          latch the two words                    1 cycle
    COMBINE x,y   store them in registers x and y        1 cycle
    ...           (next pair)
    DONE

Six cells take 9 cycles, plus one cycle for DONE. The program is loaded
through the top-level `prog_*` port, and the same program goes to every
node.

Instruction format (`snn_pkg`): the opcode is in bits [35:32].

| op | code | fields |
|---|---|---|
| NOP | 0 | none |
| CONNECT | 1 | [31:28] = source of port A, [27:24] = source of port B |
| READ | 2 | none |
| COMBINE | 3 | [31:26] = register for A, [25:20] = register for B |
| JUMP | 4 | [5:0] = target |
| DONE | 5 | none |

`i_connect`, `i_read`, `i_combine`, `i_jump` and `i_done` in `snn_pkg` build
these words.

## Passing spikes between clusters (`inter_cluster_ctrl`)

The clusters take turns in order. For each cluster:

1. The link takes 2 reconfiguration cycles.
2. For each of the node's words:
   * one cycle reads the word from the node's register file;
   * one cycle transmits it as (source index, stamp) on a spike channel that
     every neuron listens to.

Neuron k of cluster c has index 6c + k. A non-empty word waits (stalls)
while any neuron is busy. An empty word is skipped at once. With no stalls,
a whole exchange takes 4 x (2 + 6 x 2) + 1 = 57 cycles.

## Rounds (`snn_cgra_top`)

While `run` is high the top repeats rounds. Each phase starts only when the
previous one has finished everywhere:

1. **STEP**: every neuron integrates, and may fire and run its post loop.
2. **COLLECT**: all nodes run their program.
3. **EXCHANGE**: every spike of the step reaches every neuron, and each one
   runs its pre-synaptic update.

`round_done` pulses at the end of a round and `round_cnt` counts rounds.
STDP dominates the time:

* a neuron that fires spends about 24 x 63 cycles in its post loop;
* each spike on the channel holds the channel for about 63 cycles while
  every neuron updates that synapse.

With all 24 neurons firing, a round takes roughly 3,000 cycles.

Other top-level ports:

* `w_*` loads and reads single weights (one-cycle read latency).
* `ext_i` adds an external current to each neuron at every step.
* The `ev_*` outputs pulse for firings, STDP updates, weight saturation,
  switch-box reconfigurations, link reconfigurations and channel stalls.

## Parameters

| parameter | default | origin |
|---|---|---|
| clusters x cells | 4 x 6 | the cluster arrangement of the design |
| register file depth | 64 | from the array; also the maximum number of neurons |
| sequencer | 64 x 36 bits | from the array |
| word width | 16 bits | chosen |
| A_BIAS, B_SHIFT, THETA | 16, 3, 256 | chosen |
| A_PLUS, A_MINUS, TAU_PLUS, TAU_MINUS | 64, 64, 20, 20 | chosen |
| W_MAX | 1024 | chosen |

`N_CLUSTERS * N_CELLS` must not exceed 64. Larger networks would keep the
pre-synaptic times in a separate distributed memory, which is not included
here.

## How far it follows the architecture, and where it departs

Taken from the architecture:

* the LIF equation;
* the STDP rule and its sign convention (pre before post strengthens);
* the double-precision divider in the STDP path;
* the counter and the time-stamp spikes (output = counter - 1);
* the two state-machine paths with their states and the Ctr < Nern loop;
* 64-register files with two ports and 64 x 36-bit sequencers;
* clusters of six cells around an intermediate node that collects two cells
  at a time through ports A and B;
* 2 reconfiguration cycles before each serial transfer between clusters.

Chosen here, because the architecture does not fix them:

* all widths, number formats and constants;
* the evaluation of exp() from tables;
* the instruction encoding, with one CONNECT word setting both ports;
* what COMBINE does;
* the shared one-to-all spike channel and its busy back-pressure;
* the round structure;
* adding the weight from before the update to the input current;
* the bounds on weights.

Cycle counts are those of this RTL, not of the original array. In
particular, the original collection sequence is quoted at 5 cycles for four
cells plus 2 cycles to reconfigure the switches. This node spends 3 cycles
per pair, so 6 cycles for four cells, because every instruction, including
each reconfiguration, takes one cycle.

In the original array the intermediate node is one of the six cells (cell 5)
and shares its resources with that cell's neuron. Here it is a separate
block beside the six neuron cells.

The base array's general DPU operations, its full row/column bus fabric and
its distributed memory are not modelled.

## Verification

Every module has a self-checking testbench in `tb/` that ends by printing
`TB_RESULT checks=N failures=M`:

* `tb_fp64_div` compares bit for bit with the simulator's double division,
  and checks the special cases and the latency.
* `tb_stdp_unit` sweeps dt from -200 to 200 against real exp().
* `tb_snn_neuron` runs random spikes and steps against a reference model.
* `tb_snn_cgra_top` runs the full default array for 30 rounds against a
  network-level model. Each round it checks every stamp, potential and all
  576 weights. It requires that firing, both STDP paths, saturation,
  switch-box and link reconfiguration, and channel stalls all occur.

The models use real-valued exp(), so weights are compared within one unit
per update.

`tb_workload_sizes` runs three networks: 20 neurons (4 x 5), 40 (8 x 5) and
60 (10 x 6). In each, every neuron fires in two successive rounds, and the
testbench checks one-to-all delivery and the resulting weights. The round
lengths it reports:

| neurons | round 1 (no weight change) | round 2 (every synapse potentiated) |
|---|---|---|
| 20 | 262 cycles | 1364 cycles |
| 40 | 502 cycles | 2764 cycles |
| 60 | 742 cycles | 4164 cycles |

Simulating with Verilator 5, for example the full design:

    verilator --binary --timing --assert -Irtl -y rtl --top-module tb_snn_cgra_top \
        rtl/snn_pkg.sv tb/tb_snn_cgra_top.sv
    ./obj_dir/Vtb_snn_cgra_top

The build takes about half a minute and the run under a second. For another
testbench, change the file and the top-module name. `tb_workload_sizes` also
needs `-y tb` for its helper `workload_run`.

Every file in `rtl/` passes `verilator --lint-only -Wall`; the remaining
warnings are unused signals and the reset being read by the assertions as well as by the flip-flops.
