# Spiking CNN processor with neuron pruning in the temporal domain

A rate-coded spiking neural network (SNN) classifies one image over many
timesteps (128 here). In every timestep each neuron adds its input to its
membrane voltage, and it fires once that voltage reaches a threshold. Most of
the energy goes into updating membrane voltages. Many neurons, however,
receive mostly inhibitory input early in the frame. Their voltage sinks far
below zero and, in practice, never climbs back to the threshold before the
frame ends.

**Neuron pruning in the temporal domain (NPTD)** exploits this. Each layer
gets a negative *pruning threshold*. A neuron whose voltage falls below it is
marked *pruned* for the rest of the frame. It is then never updated, never
checked for firing, and never written to memory again. Pruned neurons are
also skipped in bulk: the controller reads the pruned flags of eight rows at
once and jumps over every row that is pruned in all lanes. The pruning
thresholds come from an offline search. They are not part of this RTL; they
are loaded as configuration.

Because pruned neurons need not be represented, the membrane voltage can use
a short word (11 bits) with a *dynamic fixed-point* format. Positive values
are stored as they are. Negative values are stored right-shifted by a
per-layer amount, which gives them range down to the pruning threshold.

The RTL implements the processor for the network
`48c5-AP2-96c5-AP2-96c5-AP2-10` on 32x32 (CIFAR-10) images. The first
convolution is computed outside the chip (direct input encoding) and its
spikes stream in every timestep. On chip are:

- conv2: 96 channels, 16x16 neurons;
- conv3: 96 channels, 8x8 neurons;
- the fully connected layer with 10 output neurons.

## Block structure

```
            in_* (conv1 spike records)
                 |
           +-----v-------------------+        +------------------+
           |  global_ctrl            |<------>|  spike_buffer    |
           |  INPUT / SFC scan /     |        |  (FIFO of spike  |
           |  MVU fan-out sequencer  |        |   records)       |
           +-----+-------------------+        +------------------+
                 | one command per cycle, broadcast     ^ win_all (AND of 48 flag windows)
     +-----------+-----------+---- ... ----+            | spike[47:0]
+----v----+ +----v----+ +----v----+   +----v----+
|sub_block| |sub_block| |sub_block|...|sub_block|  48 lanes, lock step
+---------+ +---------+ +---------+   +---------+
  each: 2 membrane banks (sp_ram), bias memory, weight memory,
        pruned_flag_mem (8 flag banks), sfc_unit, mvu_unit
                                          |
                                   class_argmax (output spike counters)
```

| File | Role |
|---|---|
| `snn_pkg.sv` | widths, layer configuration struct, lane opcodes, dynamic fixed-point encode/decode |
| `snn_top.sv` | top level: controller, buffer, 48 lanes, class counters, AND of the flag windows |
| `global_ctrl.sv` | frame/timestep/layer sequencing, SFC scan with skipping, MVU fan-out address generation |
| `sub_block.sv` | one lane: memories plus SFC and MVU units, two-stage pipeline |
| `sfc_unit.sv` | spike firing check: add bias, fire and reset, or prune |
| `mvu_unit.sv` | membrane voltage update: add weight unless pruned, re-encode |
| `sp_ram.sv` | single-port synchronous RAM (membrane, bias, weight memories) |
| `pruned_flag_mem.sv` | eight 1-bit flag banks with an eight-row window read |
| `spike_buffer.sv` | output spike buffer (FIFO) |
| `lead_one_cnt.sv` | counts consecutive ones from bit 0 (flag count, next lane of a record) |
| `class_argmax.sv` | output spike counters and the index of the largest |

## Where a neuron lives

All 48 lanes receive the same command each cycle and work in lock step.
Output channel `c` of a layer lives in lane `c mod 48`, in channel group
`g = c div 48`. conv2 and conv3 therefore have two groups each. Output neuron
`k` of the fully connected layer lives in lane `k`; lanes 10 to 47 are
disabled for that layer.

In lane `c mod 48`, neuron `(g, y, x)` of an `HxH` layer has the linear index
`i = (g*H + y)*H + x`. It is stored in membrane bank `(x + y) mod 2`, at row
`base + i div 2`. Each bank has 321 rows:

| Rows | Layer |
|---|---|
| 0–255 | conv2 |
| 256–319 | conv3 |
| 320 | fc (bank 0) |

The checkerboard choice of bank matters: horizontally adjacent kernel taps
fall into different banks, so consecutive updates alternate between banks.

Each lane holds these memories:

- **Bias memory.** One 8-bit bias per neuron, at address `{row, bank}`.
- **Weight memory.** 8736 8-bit words:

  | Addresses | Contents | Address of one weight |
  |---|---|---|
  | 0 | conv2 weights | `(g*48 + cin)*25 + ky*5 + kx` |
  | 2400 | conv3 weights | `2400 + (g*96 + cin)*25 + ky*5 + kx` |
  | 7200 | fc weights (lanes 0–9) | `7200 + cin*16 + py*4 + px` |

  Here `cin` is the source channel.
- **Pruned flags.** The flag of `(bank b, row r)` is in flag bank `r mod 8`,
  at row `2*(r div 8) + b`. Eight consecutive rows of one membrane bank can
  therefore be read in one cycle.

## A timestep

The controller states are `IDLE`, `INIT` (clear all membrane rows, flags and
counters at frame start), `INPUT`, `DRAIN` and `SFC`. Each timestep runs these
phases:

1. **INPUT.** Spike records of conv1 arrive on `in_*` and are pushed into the
   spike buffer. A record is `{group, y, x, 48-bit channel mask}` on the 32x32
   grid, and `in_last_i` marks the last one. The MVU sequencer drains the
   buffer at the same time. `in_ready_o` falls while the buffer is full.
2. **SFC scan, per layer** (conv2, then conv3, then fc). Every neuron's
   membrane voltage gets its bias added and is compared with the threshold
   and the pruning threshold.
3. When a layer's scan and all the fan-out updates of its spikes are done,
   the next layer is scanned. After fc the timestep counter advances.

### SFC scan with flag-count skipping (the hardest part)

The scan runs two streams, one per membrane bank. The even stream issues on
even cycles and the odd stream on odd cycles. Each bank is therefore read in
one cycle and written back in the next; the two banks act as a ping-pong
pair.

Before a stream issues, it reads an eight-row window of pruned flags starting
at its pointer. This window is ANDed over the enabled lanes. The number of
consecutive ones from the pointer (`lead_one_cnt`) is the *flag count*: the
number of rows that are pruned everywhere.

- If the flag count is below 8, the stream issues row `ptr + count` and its
  pointer moves to `ptr + count + 1`.
- If the flag count is 8, the stream issues nothing and jumps its pointer by
  8.

A fully pruned stretch of the layer thus costs one cycle per eight rows
instead of eight cycles.

A row that is issued performs the SFC operation in all 48 lanes at once. In
each lane:

```
v = decode(stored) + bias
v >= Vth            -> spike, store 0
v <  Pth (negative) -> set pruned flag, memory not written
otherwise           -> store encode(v)
```

A lane whose neuron is already pruned does nothing. The lanes that fired form
one spike record (a 48-bit lane mask), which is pushed into the spike buffer.
Output-layer spikes go to the class counters instead.

While the buffer is not empty or the MVU sequencer is busy, the scan pauses.
A layer's spikes are therefore fully propagated before the scan moves on.

### MVU fan-out

The MVU sequencer pops a record and takes its set lane bits one at a time,
lowest first (`lead_one_cnt` of the inverted mask). Each bit is one source
neuron, channel `g*48 + lane`, at position `(y, x)`.

- **Convolution target.** The 2x2 average pool maps the source to
  `(py, px) = (y/2, x/2)`. For each output group and each of the 25 taps
  `(ky, kx)`, the target neuron is `(py - ky + 2, px - kx + 2)`. This is a
  "same" convolution with zero padding 2. Each tap costs one cycle, in which
  all 48 lanes update their own output channel. Taps that fall into the
  padding cost a cycle but do nothing.
- **fc target.** One cycle per source: lane `k` adds weight
  `(cin, py, px)` to output neuron `k`.

The MVU operation adds the 8-bit weight to the decoded voltage and stores the
re-encoded result. It does nothing for a pruned neuron. If a target lies in
the bank still being written back by the previous update, the sequencer waits
one cycle (a bank-conflict stall).

The 1/4 factor of the average pool is not applied in hardware. Fold it into
the weights.

## Dynamic fixed point

Stored words are 11-bit two's complement. A layer's configuration
(`layer_cfg_t`) contains:

- `vth`: threshold, 10 bits, positive;
- `pth`: pruning threshold, 20-bit signed, negative;
- `shift`: 3 bits.

Decoding works as follows:

- A non-negative word is used as it is.
- A negative word is shifted left by `shift`.
- The results are 20-bit signed values.

Encoding works as follows:

- Positive results saturate at 1023.
- Negative results are shifted right arithmetically by `shift`, which floors
  them, and saturate at −1024.

Choose `shift = ceil(log2(|Pth| / Vth))` so that the pruning threshold still
fits in the negative range. With `shift = 0` the arithmetic is plain 11-bit
saturating integer arithmetic.

## Interface and use

1. **Load the memories.** Hold `ld_w_i` (weights) or `ld_b_i` (biases) for
   one cycle with `ld_lane_i`, `ld_addr_i` and `ld_data_i`. Biases are
   addressed `{row, bank}`.
2. **Start a frame.** Set `cfg_i[0..2]` for conv2, conv3 and fc, then pulse
   `start_i` with `num_steps_i`.
3. **Send the input spikes.** For each timestep, send that timestep's conv1
   spike records with `in_valid_i`/`in_ready_o`. Mark the last record with
   `in_last_i`; a timestep with no spikes is one record with an empty mask
   and `in_last_i` set.
4. **Read the result.** `done_o` pulses at the end of the frame. `class_o` is
   the output neuron with the most spikes (ties go to the lower index) and
   `cls_count_o` holds the spike counts.

`busy_o` and `step_o` report progress.

Every parameter of `snn_top` defaults to the network above. `LANES`, `IMG`,
`C1`, `C2`, `C3` and `NCLS` can be reduced together for fast simulation, as
long as `C2` and `C3` are multiples of `LANES`.

## Departures and choices not fixed by the design description

- **Skipping rule.** A row is skipped only when it is pruned in every lane.
  All lanes share one address, so a row pruned in some lanes but not all is
  still visited; the pruned lanes idle in that cycle.
- **Flag window.** The flag count is limited to 8, the number of flag banks.
- **No pruned-tap skipping in the MVU.** The MVU sequencer does not skip
  taps whose targets are pruned. It only suppresses their memory writes, so
  pruning saves memory accesses and energy in the MVU but not cycles.
- **Fan-out time.** A spike into a 96-channel layer takes 2 x 25 update
  cycles on the 48 lanes, one pass over the 5x5 kernel per group of 48
  output channels.
- **Off-chip and offline parts.** conv1 and the pruning-threshold search are
  not implemented in hardware.
- **Chosen values.** These are not given by the design description: weight
  and bias width (8 bits), spike buffer depth (16), the record format, "same"
  padding, reset to zero after firing, and firing at `v >= Vth`.
- **Bias.** The bias is added once per timestep during the SFC operation.
- **Memories.** All memories are plain synthesizable arrays. The flags use
  flip-flops so that eight rows can be read at once.

## Verification

Each block has a self-checking testbench in `tb/` that compares against an
independent model and ends with a `TB_RESULT checks=N failures=M` line:

- `tb_snn_top` runs a reduced network (4 lanes, 16x16 input, 12 timesteps).
  It compares every layer's spike and prune counts and the class counts with
  a behavioural reference. It also checks that every mechanism occurred:
  flag-count skip, 8-row jump, bank-conflict stall, scan pause, input
  back-pressure, and shifted negative voltages.
- `tb_snn_full` runs the full-size design (48 lanes, 32x32 input,
  96 channels, every parameter at its default) for one 128-step frame
  against the same reference. With about 1% input spike density it takes
  5.6 million cycles: about 28k conv2 spikes, 56k conv3 spikes, 24k conv2
  and 5k conv3 prunings, 46k flag-count skips, 4k eight-row jumps and 94k
  bank-conflict stalls. This takes about two minutes in Verilator.

To run one testbench with plain Verilator:

```
verilator --binary --timing -Wno-fatal --top-module tb_snn_top -o sim \
    rtl/snn_pkg.sv $(ls rtl/*.sv | grep -v snn_pkg) tb/tb_snn_top.sv
./obj_dir/sim
```

Replace `tb_snn_top` with any other testbench name. The package file must come
first.
