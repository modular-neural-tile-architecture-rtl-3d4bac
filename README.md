# Modular Neural Tile: a 16:16 spiking neural network node for a mesh NoC

Spiking neural networks built on a packet-switched network on chip (NoC) spend
most of their silicon on *topology memory*: for every synapse, some tile must
store where a spike goes. The modular neural tile (MNT) cuts that memory by
putting a small, fixed network inside each tile. 32 leaky integrate-and-fire
(LIF) neurons form a two-layer, fully connected 16:16 feed-forward network. The
256 synapses between the two layers are plain wires, so they take no memory.
Only connections that leave the tile are stored, and the tile's topology memory
is shared among its 16 outputs through a lookup table. An output with many
destinations can take many memory blocks; an output with none takes nothing.

This repository holds synthesizable SystemVerilog for one tile, as it sits
behind a NoC router: packet decoder, configuration memory, topology memory,
the neural computing module (NCM) with its 32 neurons, and the packet encoder.
Neither the router nor the mesh is included (see *What is not here*).

```
                 PacketIn/Valid/Ack                           PacketOut/Valid/Ack
 router  ───────────────►┌────────────────┐                ┌────────────────┐──────► router
                         │ packet_decoder │                │ packet_encoder │
                         └──┬─────┬─────┬─┘                └──▲──────▲────▲─┘
          config byte write │     │     │ spike: neuron, wt,  │      │    │ byte reads
                ┌───────────▼─┐   │     │ SpikeIn             │ LUT  │  ┌─┴───────────────┐
                │config_memory│   │     ▼                     │ rows │  │ topology_memory │
                │ 2,816 bits  ├───┼─► ncm (16:16 LIF) ── spike_out   │  │ 4 KB, 2 ports   │
                └─────────────┘   │   weights, thresholds,    │      │  └─▲───────────────┘
                       ▲          │   decay period            │      │    │
                       └──────────┴──── topology byte write ──┴──────┴────┘
```

## Packets

The tile exchanges 32-bit words with its router. Bits 31:28 and 27:24 are the
X and Y address of the destination tile, and bits 23:21 give the packet type.

| type | bits 20:8 | bits 7:0 |
|------|-----------|----------|
| `010` configuration | 13-bit address | data byte |

| type | bits 20:12 | bits 11:8 | bits 7:5 | bits 4:0 |
|------|-----------|-----------|----------|----------|
| `001` spike | reserved (0) | input-layer neuron number | reserved (0) | synaptic weight |

A spike packet carries its own synaptic weight. The receiving tile therefore
needs no per-synapse weight storage or weight selection for its input layer:
the sender's topology entry holds the weight. The tile ignores the X/Y fields
of incoming packets, because the router only delivers packets meant for it.
Packets of any other type are acknowledged and dropped.

Configuration address bit 12 selects the memory: 0 for the configuration
memory, 1 for the topology memory. Bits 11:0 are a byte address.

## The neuron (`lif_neuron`)

Each neuron keeps a 16-bit unsigned membrane potential.

* **Input spike:** `spike_in` adds or subtracts the 5-bit weight. Bit 4 is the
  sign (1 = inhibitory) and bits 3:0 the magnitude. The carry or borrow of the
  17-bit sum clamps the result at 65535 or at 0.
* **Leak:** `mpot_decay` shifts the potential right by one. Halving at a
  programmable interval gives a stepwise exponential decay towards rest (0),
  with no multiplier.
* **Fire:** `spike_out = potential > threshold`. This is combinational. A spike
  caused by an input in cycle *n* shows in cycle *n+1*, and the same pulse
  clears the potential at the end of that cycle, so output spikes last exactly
  one cycle.
* **Priority** within one cycle: clear, then weight update, then decay.

A threshold of 0 and a positive weight make a neuron fire on every input
spike. That setting turns a tile into a spike repeater, which extends the
fan-out of another tile's output beyond one tile's topology memory.

## The neural computing module (`ncm`): why one multiplexer is enough

The module accepts at most one spike per cycle, addressed to one input neuron.
So in any cycle at most one input neuron can fire: the one that received a
spike in the previous cycle. The module uses this to avoid 256 separate
synapse circuits:

| cycle | what happens |
|-------|--------------|
| *n* | A 4:16 decoder, enabled by `spike_in`, applies `syn_wt` to input neuron `neuron_n`. `neuron_n` is saved in a 4-bit register. |
| *n+1* | The saved number drives a 16:1 multiplexer that picks that input neuron's spike output. It also drives one 16:1 five-bit multiplexer per output neuron *j*, which picks the weight `wt_out[j][i]`. All 16 output neurons receive the spike together, each with its own weight. |
| *n+2* | Any output neuron that crossed its threshold raises `spike_out[j]`. |

The pipeline accepts a new spike every cycle. All 32 neurons share one
`decay_strobe_gen`, which pulses every `decay_period` cycles; a period of 0
turns leakage off.

Input-layer neurons that cross their threshold without being selected (only
possible by lowering a threshold through configuration) clear themselves, but
their spike does not reach the output layer.

## Configuration memory (`config_memory`)

The configuration memory is a register file, not a RAM. Every bit drives the
NCM or the encoder directly: 1,280 bits of weights, 512 bits of thresholds and
1,024 bits of lookup table, 2,816 bits in all. A 16-bit decay period is added
to these. It is written one byte per configuration packet and cannot be read
back. Byte map (configuration address bit 12 = 0):

| address | contents |
|---------|----------|
| `0x000 + 16*j + i` | bits 4:0: weight from input neuron *i* to output neuron *j* |
| `0x100 + 2*k`, `+1` | threshold of neuron *k*, low byte then high byte; *k* = 0–15 input layer, 16–31 output layer |
| `0x140 + 8*r + b` | lookup row *r* (output *r*), byte *b*; bit *m* of the byte is block 8*b*+*m* |
| `0x1C0`, `0x1C1` | decay strobe period, low byte then high byte |

Other addresses are ignored. Reset clears everything: all thresholds 0, all
weights 0, no blocks allocated and no decay.

## Topology memory and the lookup table

This is the part that saves area, and the part that is hardest to follow.

The 4 KB topology memory (`topology_memory`) is split into **64 blocks of 16
entries**, 1,024 destinations in all. An entry is four bytes at byte address
`4*(16*block + entry)`, stored little-endian as a 32-bit word. The word uses
the spike packet layout: X, Y, type, the destination input neuron and the
weight. The type field doubles as a "used" flag. An entry is sent only when
its type is `001`; any other value marks a free slot. A block owned by an
output can therefore list anywhere from 0 to 16 destinations. The memory has
two ports: the decoder writes bytes on one, and the encoder reads bytes on the
other with one cycle of latency. The array is not reset, so configure every
entry of a block before you allocate the block.

The **lookup table** has one 64-bit row per NCM output. Bit *b* of row *r*
hands block *b* to output *r*. An output's fan-out is 16 × (number of set
bits), minus any free entries. Nothing in the hardware stops two rows from
claiming the same block. That is allowed: both outputs then send to the same
destinations.

## Packet encoder (`packet_encoder`): output flow control

1. Spikes from the 16 outputs are ORed into a 16-bit **pending** register.
2. When idle, the encoder takes the lowest pending output, clears its bit and
   copies that output's lookup row.
3. It walks the set bits of the copied row, lowest block first. For each block
   it reads the 16 entries one after another. Each entry takes four byte reads
   plus one cycle to check the type.
4. Each used entry is offered on `packet_out` with `packet_valid` high. Packet
   and valid hold until `packet_ack`. An assertion checks this rule.

Cost: taking an output 1 cycle; each allocated block 1 cycle; each entry 6
cycles, plus 1 for each packet sent while the router keeps `packet_ack` high;
1 cycle to finish the row.

A spike that arrives on an output whose pending bit is still set is **merged**
into it. The `spike_merged` output pulses when this happens. An output spiking
again while its own packets are going out is not merged: its bit is set again
and the output is served once more.

## Tile timing (`mnt_top`)

With the router always ready, a spike packet accepted in cycle *t* reaches the
NCM in *t+1*. The input neuron fires in *t+2*, the output spike shows on
`spike_out` in *t+3*, and the first outgoing packet is valid in *t+12*. The
router handshake is the same in both directions: a word moves in a cycle where
valid and ack are both high. The input side never stalls (`packet_in_ack` =
`packet_in_valid`). `spike_out`, `encoder_busy` and `spike_merged` are extra
outputs for observation.

## What follows the published tile, and what was chosen here

Taken from the published design:
* the block partitioning;
* the 16:16 fully connected NCM with fixed wiring;
* the neuron: 16-bit shift register, saturating adder/subtractor, comparator,
  clear on fire, decay strobe;
* the two-stage NCM pipeline with the neuron-number register, 4:16 decoder and
  16:1 multiplexers;
* the packet formats and type codes;
* the 2,816-bit configuration memory contents;
* the 4 KB dual-ported topology memory of 64 × 16 entries with byte ports;
* the 64-bit lookup table row per output;
* spike weights carried in packets.

Chosen here, because the source leaves them open:
* sign-magnitude weights and an unsigned potential;
* the priority of clear over update over decay;
* the configuration byte map;
* configuration address bit 12 as the memory select;
* the decay period register and its counter;
* the entry layout and the used flag in the type field;
* the encoder's pending register, service order, merge rule and byte-serial
  entry reads;
* the valid/ack transfer rule and the always-ready decoder;
* synchronous active-low reset of everything except the topology RAM.

The published tile puts the topology memory in a vendor dual-port RAM macro or
an FPGA block RAM. Here it is an inferred array.

## What is not here

* **NoC router and mesh.** The tile's router ports are top-level ports.
  Routing, buffering and a multi-tile array are outside this RTL, so a
  multi-tile application (for example 64 NCMs linked by repeater tiles) cannot
  be simulated here. One tile's capacity, 1,024 stored destinations, is built
  in full.
* **Spike-rate encoders and decoders** of the test setup, and the host-side
  training that found the weights. The XOR and robot testbenches contain
  small behavioural rate encoders and decoders; the robot testbench uses a
  simple behavioural robot in place of a robotics simulator.

## Simulating

Every file in `rtl/` is one module or package. `mnt_pkg.sv` must be compiled
first. Every testbench prints `TB_RESULT checks=N failures=M` and ends the
simulation itself. Example, the full-size end-to-end test:

```
verilator --binary --timing --assert -y rtl rtl/mnt_pkg.sv tb/tb_mnt_top.sv \
          --top-module tb_mnt_top -o sim && ./obj_dir/sim
```

| testbench | what it checks |
|-----------|----------------|
| `tb_lif_neuron` | cycle-by-cycle reference model of the neuron: saturation at both ends, decay, one-cycle fire and clear |
| `tb_decay_strobe_gen` | strobe spacing for several periods; period 0 stops it |
| `tb_ncm` | two-cycle latency; 32 000 random cycles against a reference model of the whole 16:16 network |
| `tb_config_memory` | random byte writes over the whole address space against a byte image and the map above |
| `tb_topology_memory` | random simultaneous reads and writes, read-before-write, read latency |
| `tb_packet_decoder` | all packet kinds, acknowledge, field extraction, memory select |
| `tb_packet_encoder` | exact packet order and cycle timing; random spikes with router stalls, checked as a multiset, with merges |
| `tb_mnt_top` | the whole tile at default size, configured only through packets: fan-out, first-packet latency of 12 cycles, integration to threshold, inhibition, leakage, back-pressure with merging, unknown packet type |
| `tb_xor_workload` | the tile as a spike-rate XOR gate with a hand-set 3-neuron configuration; all four input patterns must classify correctly (fitness 16 of 16) |
| `tb_robot_workload` | the tile as an obstacle-avoidance controller (front sonar and bias inputs, acceleration and turning outputs, hand-set): the open-loop control map, then 30 closed-loop windows with a behavioural robot that must not hit a wall |

All testbenches run at the default parameters. Each finishes in seconds.
