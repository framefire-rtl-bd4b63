# FrameFire: a spiking-network accelerator that balances its PEs from keyframes

A spiking neural network (SNN) only does work where a neuron fired, so its
cost follows the spikes. That is cheap on average but uneven: some input
channels fire constantly and others barely at all. If each processing element
(PE) owns a fixed group of input channels, the PE holding the busy channels
sets the pace and the others wait.

In video, consecutive frames fire in similar patterns. FrameFire uses this
with a scheme called **Keyframe-dominated Workload Balance Schedule (KWBS)**:

1. On a *keyframe* the hardware counts the active connections (input spikes)
   of every input channel of every layer and keeps the counts in a
   **workload record table**.
2. The host reads the table, sorts the channels by workload and deals them out
   to the M PE groups so that each group gets about the same total. It writes
   the result into the **workload schedule table**.
3. The frames up to the next keyframe (one every K frames) use that schedule.

This repository holds synthesizable SystemVerilog for the accelerator: the
controller, the three on-chip buffers, the record-and-schedule unit, the data
collection unit (workload interpreter and spike schedulers) and the computing
unit (PE clusters with adder trees and reset-and-spike units). In the
end-to-end testbench, the balanced schedule cuts the cycles of a
deliberately unbalanced layer from 451 to 272 per timestep (1.66x).

## How a layer is computed

A layer run computes **one timestep of one layer**. The host starts each run
and orders the runs across layers, timesteps and frames.

**Inputs as neuron state lists.** The spikes of an input channel are stored in
the neuron state buffer as `lists_per_ch` consecutive words of `LIST_W` bits
(1 = fired). Input neuron number `i` of the layer is bit `i % LIST_W` of list
`i / LIST_W`, and channel `c` owns lists `c*lists_per_ch ...`. A layer is
treated as a weight matrix from these inputs to its output neurons. The host
must first unroll a convolution into such rows (im2col): the hardware does
not share 3x3 kernels across positions.

**Output passes.** There are N PE clusters. In pass `p`, cluster `n` computes
output neuron `p*N + n`, so a layer with `n_out` outputs needs
`n_pass = n_out / N` passes. `n_out` must be a multiple of N.

**Channel groups.** There are M spike schedulers, and each cluster has M PEs.
Scheduler `m` takes the `G = group_size` channels in slots `m*G ... m*G+G-1`
of the layer's schedule table row. In every pass it sends the weight address
of each spike in those channels to PE `m` of *every* cluster. The layer has
`M*G` input channels. With all clusters fed the same address stream, they
stay in lockstep.

```
 state buffer ──M read ports──► spike scheduler m ──beats──► PE m of cluster 0..N-1
                                     │                           │ (weight bank n, M read ports)
 schedule table ◄─ interpreter ◄─────┘ slot k                    ▼
 record table   ◄─ channel workload                 adder tree ─► reset-and-spike
                                                                   │ State(t+1), Vmem(t+1)
                                            state buffer, vmem buffer ◄─┘
```

## The spike scheduler

This unit carries most of the design's behaviour (`rtl/spike_scheduler.sv`).
It has an address side and a consume side, decoupled by the neuron state
list FIFO.

*Address side.* For slot `k` the **workload interpreter** reads schedule entry
`(layer, m*G + k)`. It returns the channel number `ch` and the address of the
channel's first list, `in_base + ch*lists_per_ch`. The **state address
generator** then issues that address and the `lists_per_ch - 1` addresses
after it to the state buffer. It issues one per cycle while the FIFO has
room, counting the read in flight. Each word enters the FIFO tagged with its
channel, its list number, "last list of channel", "first/last word of pass"
and the pass number. Loading a new channel costs one idle cycle on this side.

*Consume side.* The **non-zero detector** works on the FIFO head. It reports
one set bit per cycle, lowest first, and pops the word with its last set bit.
An all-zero word takes one cycle and produces no work. For each spike,
**index2addr** computes

```
waddr = w_base + pass*fan_in + (ch*lists_per_ch + list)*LIST_W + bit,   fan_in = M*G*lists_per_ch*LIST_W
```

and registers it. The scheduler's output is one registered **beat**
(`pe_item_t`) per cycle, with these flags:
- `init` on the first beat of a pass;
- `add` when the beat carries a spike's weight address;
- `last` on the final beat of a pass.

One beat may carry several flags. A pass always has at least one beat.

*Workload counting.* The **non-zero counter** counts the detector's hits. When
the last list of a channel is finished, it sends `(ch, count)` to the record
table. It does this only during pass 0 (so each timestep counts each channel
once) and only when `record_en` is set (keyframes).

*Flow control.* A scheduler can run ahead of the slowest PE by at most
`PSUM_CREDITS` passes. It spends a credit when it starts a pass and gets one
back on every adder-tree pop. Each PE's partial-sum FIFO therefore never
overflows.

*Rate.* A pass of scheduler `m` takes about `max(1, spikes)` cycles per list
word of its group, plus one cycle per channel that the FIFO may hide. The
cluster can pop a pass only when all M PEs have finished it. The slowest
group therefore sets the layer time, and that is the time KWBS shortens.

## PE cluster and firing

A **PE** (`rtl/pe.sv`) registers each beat because the weight buffer answers
one cycle later. The adder's second input is a multiplexer:
- on an `init` beat it restarts from Vmem(t) (PE 0 only, `USE_VMEM`) or from
  zero (all other PEs);
- otherwise it continues from the running partial sum.

An `add` beat adds the sign-extended weight. On a `last` beat the PE pushes
the finished partial sum into its FIFO. Since only PE 0 adds the old
potential, it is counted once.

The **adder tree** pops all M FIFOs as soon as each holds a sum. It adds them
in a balanced binary tree and registers the result: the temporary membrane
potential.

The **reset-and-spike** unit fires when the potential is *strictly* greater
than `vth`. The comparator output, ORed with `v_reset`, selects the reset
path:

| v_reset | fired | Vmem(t+1)          |
|---------|-------|--------------------|
| 0       | no    | unchanged          |
| 0       | yes   | potential − vth    |
| 1       | any   | 0 (global interval reset) |

The spike is sent out in every case. From pop to result takes two cycles.
The controller writes the N spikes of pass `p` as adjacent bits of state word
`out_base + p*N/LIST_W`, and the N potentials to word `vm_base + p` of the N
vmem banks. The output region has the same list layout as an input region,
so the next layer can read it directly (`in_base = previous out_base`).

## KWBS in practice: record table, schedule table, host

The record table and the schedule table each have `L_MAX` rows (layers) and
`C_MAX` entries (channels or slots).
- **Record table.** Reports from the M schedulers can land in the same cycle.
  They never collide, because the groups are disjoint. Counts *accumulate*
  over the timesteps of the keyframe. The host clears the table first (bit 1
  of `REG_CTRL`) and reads it through the host bus.
- **Schedule table.** Row `layer` lists channel numbers in slot order; group
  `m` is slots `m*G ... m*G+G-1`. Only equal-size groups are possible. The
  identity row (`slot s` = channel `s`) is the schedule without balancing.

The host step is software. The end-to-end testbench does it this way, and any
balancing method that writes a permutation works:
1. sort the channels by recorded workload, largest first;
2. give each channel in turn to the group with the smallest running total
   that still has fewer than G channels.

The interval K between keyframes is entirely up to the host. `tb_kwbs_sweep`
shows the trade-off on one 16-channel layer. It runs a 60-frame video whose
busy channels shift over time.
- Without balancing (K = 0) a frame takes 357 cycles.
- Rebalancing every one to eight frames brings this down to 218-230 cycles.
- Rare keyframes (K = 24, 40 and 50) give 242-256 cycles, because the
  schedule goes stale between keyframes.

The exact figures depend on the random seed.

## Host bus and running a layer

The top level has one simple bus: `host_we` / `host_re`, a 24-bit
`host_addr`, 32-bit data, and read data one cycle after `host_re` (with
`host_rvalid`). The address splits into `[23:20]` target, `[19:16]` bank and
`[15:0]` word:

| target | what | bank | word |
|---|---|---|---|
| 0 | registers | – | register number |
| 1 | neuron state buffer | – | list word |
| 2 | weight buffer (write only) | cluster n | weight address |
| 3 | vmem buffer | cluster n | potential address |
| 4 | schedule table (write only) | – | `layer*C_MAX + slot` |
| 5 | record table (read only) | – | `layer*C_MAX + channel` |

The registers:

| # | name | use |
|---|---|---|
| 0 | `REG_CTRL` | write bit0 = start a run, bit1 = clear record table; read bit0 = busy |
| 1 | `REG_LAYER` | layer number (row of both tables) |
| 2 | `REG_GROUP` | G, channels per scheduler |
| 3 | `REG_LPC` | list words per channel |
| 4 | `REG_NPASS` | output neurons / N |
| 5–8 | `REG_INB`, `REG_OUTB`, `REG_WB`, `REG_VMB` | base addresses of inputs, outputs, weights, potentials |
| 9 | `REG_VTH` | threshold (signed 16 bit) |
| 10 | `REG_FLAGS` | bit0 `v_reset` (global interval reset), bit1 `record_en` (keyframe) |
| 11 | `REG_CYCLES` | read: length in cycles of the last run |

Weights of output neuron `o` go to bank `o % N`, at row `o / N`:
`w_base + (o/N)*fan_in + i` for input `i`. Its potential is word
`vm_base + o/N` of bank `o % N`. To run a layer, write the configuration
registers, then `REG_CTRL = 1`. Wait for `done` (or for busy to read 0).
While busy, host writes to buffers and tables are ignored.

## Parameters (top level)

| parameter | default | meaning |
|---|---|---|
| `N` | 4 | PE clusters (output neurons per pass) |
| `M` | 4 | PEs per cluster = spike schedulers = channel groups |
| `C_MAX` | 32 | table entries per layer (the target network has at most 32 channels) |
| `L_MAX` | 6 | table rows (the target network has 6 layers) |
| `LIST_W` | 16 | bits per neuron state list; must be a multiple of N |
| `SB_DEPTH` | 4096 | neuron state buffer words |
| `WB_DEPTH` | 4096 | weight words per cluster bank |
| `VM_DEPTH` | 1024 | potentials per cluster bank |
| `VM_W`, `W_W` | 16, 8 | potential and weight width (signed, wrap-around) |
| `FIFO_DEPTH`, `PSUM_DEPTH` | 4, 4 | neuron state FIFO, partial-sum FIFO (= credits) |

The widths in `framefire_pkg` are fixed: 16-bit buffer addresses, up to 64
channels, up to 8 layers and 16-bit workload counts.

## What differs from the original accelerator, and how far to trust it

- **Sizes.** N, M, the widths and every buffer depth are choices made here.
  The published design gives none of them; it reports an FPGA build with 128
  block RAMs and no DSPs at 200 MHz.
- **Convolution.** It is not done in hardware. Layers are weight rows over
  channel lists, so convolutions must be unrolled by the host and weights are
  not shared. The published six-layer 160x80 lane-segmentation network
  (8-16-32-32-16-1 channels, 3x3 kernels) does not fit these buffers. Its
  first layer alone has about 102,400 neurons against 4,096 potential words.
- **Missing parts.** There is no DMA or DDR interface; the host bus loads
  every word. The sorting and regrouping of channels is host software, and
  only the testbench implements it.
- **Global reset interval.** The hardware does not count frames. The host
  keeps the interval and sets `v_reset` for the layer runs of the timestep
  that ends it.
- **Own choices.** These details are not specified by the original and were
  chosen here:
  - the host bus and register map;
  - the beat format and the credits;
  - the one-spike-per-cycle detector;
  - pass-0-only counting, with counts accumulated over the keyframe;
  - equal group sizes;
  - which PE adds Vmem(t);
  - all latencies.
- **Output split across clusters.** The original gives each cluster its own
  slice of the output channels. Here the clusters interleave output neurons:
  cluster n computes every neuron o with o mod N = n, one per pass. Together
  the N results of a pass fill one masked state-word write. Every cluster
  still works independently on its own weights and potentials.
- **Verification.** Each block has a self-checking testbench against an
  independent model. The end-to-end testbench runs at the default parameters:
  a two-layer network over four frames of three timesteps. It checks every
  spike and every potential, the record table contents and the speed-up, and
  makes each mechanism happen at least once:
  - workload recording and the schedule change;
  - regular and global reset;
  - empty lists;
  - adder-tree waits, credit stalls and a full state FIFO.

  No timing closure or FPGA build has been done.

## Simulating

Every testbench prints `TB_RESULT checks=<n> failures=<n>`. For example:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/framefire_pkg.sv tb/tb_framefire_top.sv --top-module tb_framefire_top -o sim
./obj_dir/sim
```

For another block, replace `tb_framefire_top` with its testbench `tb_<module>`.
The sync FIFO's testbench is `tb_sync_fifo`. The end-to-end run takes a few
seconds. Simulations do not depend on initial memory contents: every word
that is read is written first.

## Files

- `rtl/framefire_pkg.sv`: shared types (`layer_cfg_t`, `pe_item_t`,
  `workload_t`, host address map).
- `rtl/framefire_top.sv`: top level.
- `rtl/controller.sv`: host decoding, configuration registers, run
  sequencing, write-back.
- `rtl/state_buffer.sv`, `rtl/vmem_buffer.sv`, `rtl/weight_buffer.sv`: the
  buffers.
- `rtl/record_and_schedule.sv`: record and schedule tables.
- `rtl/data_collection.sv`, `rtl/workload_interpreter.sv`,
  `rtl/spike_scheduler.sv`, `rtl/state_addr_gen.sv`, `rtl/sync_fifo.sv`,
  `rtl/nonzero_detector.sv`, `rtl/index2addr.sv`, `rtl/nonzero_counter.sv`:
  the data collection unit.
- `rtl/computing_unit.sv`, `rtl/pe_cluster.sv`, `rtl/pe.sv`,
  `rtl/adder_tree.sv`, `rtl/reset_and_spike.sv`: the computing unit.
- `tb/tb_*.sv`: one testbench per module. `tb_framefire_top` is the
  end-to-end run; `tb_kwbs_sweep` measures frame time against the keyframe
  interval K.
