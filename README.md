# Neuromorphic processor with partial-sum routers (in-network computing)

A spiking neural network (SNN) layer often has more inputs than one neuron
core can take. The usual fix is *split and merge*. The layer is cut over
several cores, each core fires spikes from its own partial sum, and extra
"merge" cores combine those spikes. This loses precision, because each
partial sum is squeezed into a binary spike, and it costs extra cores.

This processor adds the partial sums inside the network instead. Each core
has a **partial-sum router with an adder**. Partial sums of one neuron travel
from core to core and are added on the way. Only the core where the total
arrives fires a spike. The result equals the software weighted sum, and no
merge cores are needed.

Both networks on chip (NoCs) are *software defined*. Every router follows
an instruction program computed offline and loaded by the host. The
hardware has no route computation, no arbitration and no flow control.

The RTL here describes the full chip: a 4 x 3 mesh of Neural Process Units
(NPUs). Each NPU has a 256 x 256 crossbar of 5-bit synapses.

## Architecture at a glance

```
            north edge (chip ports)
        +--------+--------+--------+
        | (0,0)  | (0,1)  | (0,2)  |      each NPU:
        +--------+--------+--------+        neuron_core  4 x synapse_subcore (128x128x5b)
west    | (1,0)  | (1,1)  | (1,2)  | east   spike_unit   256 membrane potentials
edge    +--------+--------+--------+ edge   psum_router  + router_cfg_mem (2048 x 16b)
        | (2,0)  | (2,1)  | (2,2)  |        spike_router + router_cfg_mem (2048 x 16b)
        +--------+--------+--------+        npu_fsm, clock_gate, host registers
        | (3,0)  | (3,1)  | (3,2)  |
        +--------+--------+--------+
            south edge (chip ports)
```

Neighbouring NPUs are joined by two links in each direction:

- a partial-sum link: a valid bit and an 18-bit two's-complement sum;
- a spike link: 1 bit.

The links at the mesh edge are chip ports. Through them the host sends
partial sums or spikes in and receives output spikes.

| Module            | Role |
|-------------------|------|
| `snn_chip`        | Top level. `ROWS` x `COLS` mesh of `npu`, host register bus, edge ports. |
| `npu`             | One tile. Ties together the blocks below, the host registers and the axon spike buffers. |
| `npu_fsm`         | Sequences one time step: swap, accumulate, route. |
| `neuron_core`     | 2 x 2 sub-cores plus Combine & MUX. Turns 256 input spikes into 256 local partial sums. |
| `synapse_subcore` | 128 x 128 weights held as 5 bit-plane banks. One row read per cycle. Can be power gated. |
| `psum_router`     | Input MUX, adder, sum register, output DEMUX. Runs CONSEC_ADD, SEND and BYPASS. |
| `spike_router`    | Registered 5 x 5 crossbar. Runs SEND (inject) and BYPASS, and issues fire requests. |
| `router_cfg_mem`  | 4 kB instruction memory, one 16-bit instruction per (neuron, step). |
| `spike_unit`      | Integrate-and-fire: membrane potential, threshold, spike, reset. |
| `clock_gate`      | Latch-based clock gate. The routers of an idle NPU stop toggling. |
| `snn_pkg`         | Sizes, instruction structs, port codes and the register map. |

## One time step

The host pulses `start`. Every NPU starts at once and all stay in lockstep.
The offline schedule depends on this: it knows in which cycle a value is on
which link. `npu_fsm` runs these phases:

| Phase | Cycles | What happens |
|-------|--------|--------------|
| SWAP  | 1 | The spikes gathered for this step (`axon_nxt`) move into the axon buffer. The 256 partial-sum accumulators are cleared. |
| ACC   | 128 | Row walk. In cycle r the upper sub-core pair reads row r if axon r spiked. The lower pair reads row r if axon 128+r spiked. |
| DRAIN | 1 | The last rows are added. Each accumulator now holds its neuron's local partial sum. |
| ROUTE | 256 x STEPS | The routers serve neuron n = 0..255 in turn, for STEPS = 8 cycles each. In step s both routers run their instruction at address {n, s}. |
| DONE  | 1 | `done` is high. |

`done` is high 3 + 128 + 256 x 8 = **2179 cycles** after the cycle that
samples `start`.

In the sub-core array a spike turns "weight x spike" into a memory read. The
local partial sum of neuron j is the sum of column j over the rows whose
axon spiked. The two sub-cores of one column read different axon halves in
the same cycle, so all 256 axons take 128 cycles.

The routers are time-multiplexed. One partial-sum router and one spike
router serve all 256 neurons, one neuron after the other. A neuron's
partial sums and spikes reach their destination before the routers move on
to the next neuron. A spike that arrives for neuron n is written to **axon
n** of the receiving NPU, in the buffer for the *next* time step. So a
layer fed by another layer runs one time step behind it.

## Router instructions

This part takes the most care when you write a mapping. Every instruction
is 16 bits. The top two bits are the type:

- `01`: partial-sum router;
- `00`: spike router;
- `10`: neuron core. This type is held in a register, not in the router
  memories.

Each router ignores instructions of another type, and an all-zero word is a
no-op in both memories.

Port codes, used by `in_sel`, `out_sel`, `op1` and `op2`:

| Code | Port | Meaning |
|------|------|---------|
| 0 | NONE  | nothing |
| 1 | N     | north link |
| 2 | S     | south link |
| 3 | E     | east link |
| 4 | W     | west link |
| 5 | LOCAL | the local partial sum of neuron n; for the spike router, neuron n's spike |
| 6 | SUM   | the partial-sum router's sum register |

### Partial-sum router: `{type, add_en, op1[3], op2[3], bypass, in_sel[3], out_sel[3]}`

| Operation | Fields | Effect at the clock edge |
|-----------|--------|--------------------------|
| CONSEC_ADD | add_en=1 | `sum <= op1 + op2`. If `out_sel` is a direction, the new sum is also sent there. |
| SEND       | add_en=0, bypass=0, in_sel=LOCAL or SUM | `out[out_sel] <= local psum` or `sum` |
| BYPASS     | bypass=1 | `out[out_sel] <= in[in_sel]` |

To add partial sums over a chain, start with op2 = LOCAL. Continue with
op2 = SUM, which feeds the registered sum back into the adder. The sum
register is also the "weighted sum" that the spiking unit can fire from.

Each hop takes one cycle, and that includes a bypass. A value sent in step s
is on the neighbour's input during step s+1.

An assertion (`a_add_operand_valid`) checks that a CONSEC_ADD never reads a
mesh input that carries no valid partial sum in that cycle. A schedule
error therefore stops the simulation.

### Spike router: `{type, spike_en, total_sum, inject, bypass, in_sel[3], out_sel[3], pad[4]}`

| Operation | Fields | Effect |
|-----------|--------|--------|
| fire   | spike_en=1 | The spiking unit adds to neuron n's potential: the sum register if `total_sum`=1, else the local partial sum. If the potential reaches the threshold, it emits a spike and resets the potential to 0. The decision is registered. |
| SEND   | inject=1 | `out[out_sel] <= spike of neuron n`. It must come at least one step after the fire. |
| BYPASS | bypass=1 | `out[out_sel] <= in[in_sel]`. With out_sel=LOCAL the spike goes into axon n of this NPU. |

### Neuron-core instruction: `{type=10, r_weight[4], w_weight[4], acc[4], pad[5]}`

Each field has one bit per sub-core. LOAD WEIGHT = `10 0000 1111 0000`
allows weight writes. ACCUMULATION = `10 1111 0000 1111` reads and
accumulates.

### Worked mapping: a 768 x 512 x 10 MLP

This is the mapping that `tb/tb_snn_chip.sv` runs.

- **Layer 1** uses the eight NPUs of columns 0 and 1. NPU (r, c) holds
  inputs 192r..192r+191 and neurons 256c..256c+255.
- **Layer 2** uses NPUs (0,2) and (1,2).

The same program runs for every neuron n:

| Step | Partial-sum NoC | Spike NoC |
|------|-----------------|-----------|
| 0 | (3,c), (1,c): SEND LOCAL -> N; (1,2): SEND LOCAL -> N | |
| 1 | (2,c): CONSEC_ADD S+LOCAL, send N; (0,c): CONSEC_ADD S+LOCAL; (0,2): CONSEC_ADD S+LOCAL | |
| 2 | (1,c): BYPASS S -> N | (0,2): fire from total sum |
| 3 | (0,c): CONSEC_ADD S+SUM (total of 4 cores) | (0,2): SEND -> N (chip output) |
| 4 | | (0,c): fire from total sum |
| 5 | | (0,0): SEND -> E; (0,1): SEND -> S |
| 6 | | (0,1): BYPASS W -> E; (1,1): BYPASS N -> E |
| 7 | | (0,2), (1,2): BYPASS W -> LOCAL |

The four partial sums of a layer-1 neuron form an adder tree inside the
network. The spikes of the 512 hidden neurons reach axons 0-255 of (0,2) and
of (1,2).

NPUs (2,2) and (3,2) are not used. They keep `noc_en` = 0, so their routers
are clock gated, and their sub-cores are switched off.

## Host register map (per NPU)

The host writes one register per cycle. It drives `cfg_we`, sets `cfg_core`
to the NPU number `r*COLS + c`, and puts the region in `cfg_addr[19:16]`
and an offset in `cfg_addr[15:0]`.

| Region | Name   | Offset | Data |
|--------|--------|--------|------|
| 0 | CTRL   | - | [3:0] sub-core power enables, [4] router clock enable (`noc_en`). Both reset to 0. |
| 1 | THRESH | - | firing threshold, 24-bit signed |
| 2 | CINSTR | - | neuron-core instruction (19 bits) |
| 3 | WEIGHT | {sub[1:0], row[6:0], col[6:0]} | 5-bit signed weight. Needs `w_weight` set for that sub-core. |
| 4 | PSMEM  | {neuron[7:0], step[2:0]} | partial-sum router instruction |
| 5 | SPMEM  | {neuron[7:0], step[2:0]} | spike router instruction |
| 6 | AXON   | axon[7:0] | [0] input spike for the next time step |
| 7 | VMEM   | neuron[7:0] | presets a membrane potential |

Sub-core k holds these weights:

| Sub-core | Axons   | Neurons |
|----------|---------|---------|
| 0 | 0-127   | 0-127   |
| 1 | 0-127   | 128-255 |
| 2 | 128-255 | 0-127   |
| 3 | 128-255 | 128-255 |

Within a sub-core, `row` is the axon and `col` is the neuron.

Load the router memories, weights and thresholds while the NPU is idle. The
router memories power up with unknown contents. So before you set `noc_en`,
write all 2048 entries of both memories of that NPU; unused entries get 0.

## Power features

- **Sub-core power gating.** `subc_en[k]` = 0 makes sub-core k read as zero
  and ignore writes. This is the logic-visible part of power gating. The
  power switches and SRAM sleep modes are analog features and are not
  modelled. Note that the model keeps a gated sub-core's contents, while a
  real gated array loses them.
- **Router clock gating.** `clock_gate` latches `noc_en` while the clock is
  low and ANDs it with the clock. Both routers of the NPU run on the gated
  clock. The latch is intended.

## Where this RTL departs from the source design, or fills gaps

These are choices of this implementation. The source describes the blocks
and the instruction fields but not these details.

- **One clock.** In the source, the routers run 256x faster than the neuron
  circuit, so all neurons are served within one neuron cycle. Here
  everything runs on one clock. The FSM gives each time step a routing
  phase of 256 x STEPS cycles.
- **STEPS = 8 router cycles per neuron.** With 16-bit instructions this
  makes exactly the 4 kB per router memory of the source. The source gives
  no step count.
- **Registered bypass.** The source describes a partial-sum bypass that
  passes adjacent cores "instantly". Here every hop takes one registered
  cycle. This avoids combinational loops through the mesh, and the schedule
  accounts for the extra cycle.
- **Encodings and widths.** The bit widths of the fields, the port codes,
  the 18-bit partial sum, the 24-bit membrane potential and the valid bit
  on partial-sum links are all choices of this RTL.
- **Neuron model.** Integrate-and-fire, no leak, reset to zero on a spike,
  one threshold per NPU. The source only says that the neuron makes a
  binary spiking decision and that thresholds are set by the host.
- **Synaptic memory.** Only the 40 kB of 5-bit weights is built. The
  source's "80 kB" bank figure has no further description. The SRAM macros
  are written as synchronous-read arrays.
- **Not built.** The host side (a MicroBlaze FPGA system with a CPU-SNN
  bridge), I/O pads, supplies and power switches. The host bus here is a
  simple register-write port.

## Simulating

Every testbench checks itself. It ends with
`TB_RESULT checks=<n> failures=<m>`. For example, the full chip at its
default size:

```
verilator --binary --timing --assert -Irtl -y rtl rtl/snn_pkg.sv \
    tb/tb_snn_chip.sv --top-module tb_snn_chip -Mdir obj
./obj/Vtb_snn_chip
```

Each block's test has the same form: `tb/tb_<module>.sv`, top
`tb_<module>`.

| Testbench | What it checks |
|-----------|----------------|
| `tb_snn_chip` | The MLP mapping above over 4 time steps, with random weights and inputs, at full size. It checks every layer-1 firing decision, every output spike and the 2179-cycle latency. It counts each mechanism and fails if one never occurs: in-network add, send, bypass, spike inject, spike bypass, axon delivery, firing and non-firing, clock gating and power gating. Takes about 25 s. |
| `tb_npu` | One full-size NPU with the neighbours driven by the testbench. Two time steps, including spikes received in one step and used in the next. |
| `tb_neuron_core` | All 65,536 weights. Accumulation against a reference, with sub-cores gated and masked. |
| `tb_psum_router`, `tb_spike_router` | Random instructions against a reference model, plus a directed CONSEC_ADD/SEND/BYPASS sequence. |
| `tb_npu_fsm` | The phase order and the cycle counts. |
| `tb_spike_unit`, `tb_synapse_subcore`, `tb_router_cfg_mem`, `tb_clock_gate` | The leaf behaviour. |

Parameters: `snn_chip #(ROWS, COLS, STEPS)` and `npu #(STEPS)`. STEPS must
be a power of two. The core sizes are the constants in `snn_pkg`: 256
neurons, 256 axons, 128 x 128 sub-cores and 5-bit weights.
