# Multi-core neural network computing unit

This unit evaluates multilayer perceptrons (fully connected, feed-forward
networks with a sigmoid activation) in an FPGA. The work is spread over several
identical **computing cores**. Each core computes the inner potential of one
neuron, `sum(w_i * x_i) + bias`, at one multiply-accumulate per clock. All
cores work on the same layer at once, each on a different neuron. The cores
receive the same input word at the same time, so one broadcast feeds N
multiply-accumulates per clock. Finished potentials go one at a time through a
single pipelined sigmoid, and the results are stored on chip. The next layer
reads them from there.

The sizes are those of a Xilinx Spartan-3 XC3S-200:

- 10 cores. Each core has one 18x18 multiplier and one 1024 x 18 block RAM for
  its weights, which gives 10,240 weights in total.
- One block RAM holds up to 1024 neuron values.
- One block RAM and one multiplier serve the activation function.

The number of cores is a parameter (`N`).

## Number format

Every word on every bus is 18 bits wide, two's complement, Q6.12: 6 integer
bits (sign included) and 12 fraction bits. The range is -32 .. +32 - 2^-12.
This format is used for network inputs, weights, biases, potentials and
activations. 18 bits is the width of the FPGA's multiplier inputs and of the
block RAMs' widest mode.

Inside a core, products (Q12.24) are summed exactly in a 48-bit accumulator
(`ACC_W`). The sum is reduced to one word only when the result is sent: it is
shifted right by 12 (truncation toward minus infinity) and saturated to
[-32, 32). The word format comes from the source design. The wide accumulator
and the rounding are this implementation's choice.

## Block structure

```
               cfg port (weights, tables, map)
                         |
 in_valid/in_data  +-----v--------+  cmd_bus[0..N-1] (one per core)
 ----------------->|              |---------------------------+
                   | control_logic|  data_bus (shared)        |
 out_valid/data    |  network map |---------------------+     |
 <-----------------|              |  weight_addr        |     |
                   +--^-------^---+  (shared)           |     |
                      |       |            |            v     v
            nmem read |       | nmem write v      +-------------------+
                      |       |   weight_memory[k]->  neuron_block[k] | x N
              +-------+-------+--+                +-------------------+
              | neuron_data_     |                    req | ^ grant
              | memory (2-port)  |              priority_decoder
              +-------^----------+                        |
                      |                           neuron_output_bus
                activation_function <---------------------+
```

| Module | Role |
|---|---|
| `ann_unit` | top level; wires everything and decodes the configuration port |
| `control_logic` | network map, command sequencing, input port, result storage, network response |
| `neuron_block` | computing core: multiply, accumulate, hold the result until granted |
| `weight_memory` | 1024 x 18 weights of one core, read by the shared weight address |
| `priority_decoder` | gives the shared output bus to one waiting core per clock, core 0 first |
| `neuron_output_bus` | AND-OR multiplexer of the granted result, registered |
| `activation_function` | sigmoid by table lookup and linear interpolation |
| `neuron_data_memory` | 1024 x 18 dual-port RAM of network inputs and neuron outputs |
| `ann_pkg` | word type, command encoding, configuration targets, shared constants |

## The computing core (`neuron_block`)

Each core has its own command bus. It carries one of five commands per clock:

| Command | Effect |
|---|---|
| `CMD_NOP` | nothing |
| `CMD_RESET` | clear the accumulator |
| `CMD_MAC` | accumulator += data * weight |
| `CMD_BIAS` | accumulator += weight * 1.0 (the bias is stored as the neuron's last weight) |
| `CMD_SEND` | copy the saturated potential to the result register and raise `req` |

The core is a register pipeline with these stages:

1. Input registers for command, data and weight.
2. The multiplier. It forms `data*weight` for MAC, `weight<<12` for BIAS and
   0 for anything else.
3. The adder and accumulator.
4. The result register with its request flag.

A result waits in the result register until the priority decoder's one-clock
grant, which clears `req`. RESET touches only the accumulator. A core can
therefore start its next neuron while its previous result still waits for the
bus, and this happens routinely.

A new SEND must not reach a core whose result has not been granted yet; an
assertion checks this. The control logic guarantees it.

## Output bus and activation function

The cores share one output bus. When several cores have results waiting, the
priority decoder grants them in index order, one per clock. No FIFO is needed,
because a core simply keeps its result until it is granted. The bus value is
registered (`neuron_output_bus`) and enters the activation function.

The activation function splits its 18-bit input `x` into two parts:

- `x[17:9]`, read as a signed interval number s = -256 .. 255, addresses two
  512-entry lookup RAMs. These give `offset[s]`, the function value at
  x = s/8, and `gradient[s]`, the rise of the function across that 1/8-wide
  interval.
- `x[8:0]` is the unsigned position inside the interval.

The result is

```
y = offset[s] + floor(gradient[s] * x[8:0] / 512)
```

This is a three-clock pipeline: table read, product (with the offset delayed
one clock), then the registered sum. Counted from the bus grant, the latency is
4 clocks, and one value can enter per clock.

The tables are RAM, loaded through the configuration port. For the unipolar
sigmoid 1/(1+e^-x):

```
offset[s]   = round(4096 / (1 + exp(-s/8)))
gradient[s] = round(4096 / (1 + exp(-(s+1)/8))) - offset[s]
```

Table addresses are the 9-bit two's-complement value of s. With these tables
the output stays within 2 LSB (5e-4) of the exact sigmoid for every one of
the 2^18 inputs.

Other functions can be loaded in the same way. For example, a step function
has `gradient = 0` and `offset` equal to 0 or 4096.

## The schedule (`control_logic`)

This part of the design decides how a network is mapped onto the hardware.
Read it before preparing weights.

### Network map

The map has `MAX_LAYERS` (8) entries of 11 bits:

- entry 0 is the number of network inputs;
- entry l is the number of neurons in layer l;
- the first zero entry ends the network.

Inputs and neurons are numbered consecutively: inputs first, then layer 1,
layer 2, and so on. Value number n is kept at address n of the neuron data
memory, so inputs plus neurons may not exceed 1024.

### Groups and commands

Each layer is computed in groups of N neurons. Neuron `g*N + k` of the layer
runs on core k. For each group, the control logic issues:

1. `RESET` to all cores;
2. one `MAC` per input of the layer. The input word goes on the shared data
   bus and the weight address on the shared weight select bus;
3. one `BIAS`, at the next weight address;
4. `SEND` to the cores that hold a neuron of this group.

In the last group of a layer, cores without a neuron receive only the RESET.

The data for the first group of layer 1 come from the input port. Every
accepted input is also written to the neuron data memory. All other groups
read their inputs from that memory.

### Weight layout (what the host must load)

All cores see the same weight address. That address starts at 0 when a
network evaluation starts and advances by one for every MAC and BIAS, through
all groups of all layers. So for each group, in order, every core k holds at
consecutive addresses:

```
w(neuron g*N+k, input 0), ..., w(neuron g*N+k, input n_in-1), bias(neuron g*N+k)
```

Each group takes `n_in + 1` addresses. The total over the network must fit in
1024 words. The hardware does not check this; an assertion reports an
overflow in simulation. Words for neurons that do not
exist (cores idle in a partly filled group) are never used.

### Stalls

The control logic waits in three situations:

- **Input starved.** In the first group, a MAC waits for `in_valid`. An input
  is refused in a clock in which the activation function writes a result,
  because both use the memory's write port. This cannot happen with the
  schedule here, and an assertion checks it.
- **Data hazard.** Results are written to the neuron data memory in neuron
  order by one write pointer. A MAC that reads from the memory waits until its
  address is below that pointer, so the next layer can start while the
  previous layer's last results are still in the activation pipeline.
- **Send held back.** A SEND waits until no core still holds an unsent result
  and the previous SEND has travelled the 6 clocks to the cores. This keeps
  results in neuron order. It only bites in layers with very few inputs.

### Timing

Addresses and commands are issued in the same clock. The command and data are
registered once more, so that they reach the cores together with the weight
RAM output.

For a network whose stalls do not bite, the time from `start` to `done` is:

```
1 + sum over groups of (n_in + 3) + 6 + (cores used in the last group) + 5
```

For the 88-40-10 handwritten-digit network on 10 cores, simulation measures
**429 clocks**: 1 + 4x91 + 43 + 6 + 10 + 5. The source design reports 396
clocks (88x4 + 40 + 4) for the same network. The difference of 33 clocks
(8%) has two causes:

- the separate reset, bias and send clocks of each group;
- the ten output results leaving the shared bus one per clock.

At the 133 MHz the source design reaches on a Spartan-3, 429 clocks are about
310,000 evaluations per second.

## Using the unit

1. Reset with `rst_n` low (asynchronous, active low).
2. Configure, one word per clock with `cfg_we` high:
   - `CFG_INTERVAL` and `CFG_GRADIENT`: the 512 table entries each, at
     `cfg_addr[8:0]`;
   - `CFG_MAP`: the map entries, at `cfg_addr[2:0]`;
   - `CFG_WEIGHT`: the weights of core `cfg_core`, in the layout above.
3. Pulse `start` while `busy` is low.
4. Offer the network inputs in order on `in_valid`/`in_data`. A word is taken
   in a clock in which `in_ready` is high.
5. The last layer's outputs appear on `out_valid`, `out_data` and `out_index`,
   in neuron order, one clock wide each. There is no back-pressure on this
   port.
6. `done` pulses after the last output, and the next `start` can follow at
   once. Weights, tables and map stay loaded.

`events` shows one-clock flags for input starvation, data-hazard stall, held
send and output-bus contention. They are useful when tuning a network's
layout.

## Where this design departs from or goes beyond the source

The source design describes the following:

- the block structure;
- the 18-bit Q6.12 format;
- the four core commands and their meaning, including that reset leaves a
  waiting result alone;
- the three-stage core pipeline;
- the shared output bus with a priority decoder;
- the interpolating activation function with its bit split;
- the memory sizes;
- ten cores.

Everything else is this implementation's own:

- **Control logic.** The source says only that the control logic holds a map
  of the network and issues data, weight addresses and commands from it. The
  map format, the group schedule, the weight layout, the stall rules and the
  storing of inputs in the neuron data memory are this implementation's.
- **Layers run one after another.** The source points out that separate
  command buses would let cores work on different layers at the same time.
  The command buses are separate here, but the schedule runs all cores in
  lock-step on one layer.
- **Timing.** The schedule needs 429 clocks for the 88-40-10 network instead
  of 396 (see Timing).
- **Number handling.** The accumulator width, truncation and saturation on
  SEND, and the meaning and scaling of the gradient table are chosen here.
- **Interfaces.** The configuration port, the input and output handshakes and
  the `events` flags are added.
- **Activation tables.** The tables are RAMs loaded by the host, not fixed
  ROM contents.

The design was written for clarity and checked by simulation. It has not been
timed or fitted on an FPGA. The 133 MHz figure is the source design's, not a
result for this RTL.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares against
reference values computed independently, and prints
`TB_RESULT checks=<n> failures=<n>`.

- `ann_ref_pkg` (in `tb/`) holds the bit-exact reference arithmetic: exact
  sums, floor division, saturation, and the table formulas above.
- `tb_neuron_block`: 300 random neurons with random idle clocks and late
  grants. It checks each result, the request timing (4 clocks after the SEND
  is sampled), saturation, and a reset while a result waits.
- `tb_activation_function`: all 2^18 inputs against the reference, the 3-clock
  latency, and at most 3 LSB from the exact sigmoid.
- `tb_priority_decoder`, `tb_neuron_output_bus`, `tb_weight_memory`,
  `tb_neuron_data_memory`: exhaustive or random checks of each small block.
- `tb_control_logic`: the sequencer, with behavioural stand-ins for the
  datapath. It runs a 5-7-4-2 network on 3 cores and checks outputs, SEND
  counts per core, and that every stall type occurs.
- `tb_ann_unit`: the whole unit with 4 cores, running a 9-11-6-3-5 network
  three times with gapped input. It checks every output and counts each
  mechanism: input starvation, data hazard, held send, bus contention, partly
  filled groups, saturation, and a core starting its next neuron while its
  result waits.
- `tb_ann_unit_full`: the unit at its default parameters running the 88-40-10
  network twice. It checks all outputs and the exact clock count of 429.
- `tb_ann_unit_100`: the unit with `N = 100` running an 88-100-10 network
  (225 clocks). It checks all outputs.

To simulate one testbench with Verilator 5, from the folder that holds `rtl/`
and `tb/`:

```
verilator --binary --timing --assert --timescale 1ns/1ps -Irtl -Itb -y rtl \
    rtl/ann_pkg.sv tb/ann_ref_pkg.sv tb/tb_ann_unit_full.sv \
    --top-module tb_ann_unit_full -o sim
./obj_dir/sim
```

Replace the testbench name to run another one. `-y rtl` lets Verilator find
the modules by name. Every testbench finishes in well under a second.
