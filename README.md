# A synthesizable programmable logic core as next-state logic of a test-packet bridge

Chips sometimes need a small amount of logic that can change after fabrication: a packet
format that may be revised, a state machine whose transitions are not final. A
conventional embedded FPGA is a hard macro with its own layout, tools and sign-off. The
alternative built here is a *soft* programmable logic core (soft-PLC): an FPGA-like fabric
written as ordinary RTL and synthesized, placed and routed from standard cells together
with the rest of the chip. LUTs become multiplexer trees. Configuration SRAM becomes
flip-flops in one long shift register. Routing switches become wide multiplexers. This
costs far more area, delay and power than fixed logic, so it only makes sense for about a
hundred gates' worth of function. In return it drops into a normal ASIC flow unchanged.

This repository contains two things:

* `plc_gradual_fabric`, a parameterized soft-PLC in the **Gradual Architecture**, a LUT
  fabric designed for synthesis rather than for tiling. Its default size is 8 x 8 3-LUTs
  with 10 inputs, 13 outputs and 1762 configuration bits.
* `tam_bridge_top`, a bridge between a packet-based test access mechanism (TAM) and the
  test structures of one IP core. The next-state logic of its assembly controller is that
  soft-PLC, so the packet handling can be reprogrammed after fabrication.

## 1. The Gradual Architecture fabric

### Idea

In an island-style FPGA, signals can travel in any direction, and the fabric is a grid of
identical tiles. The Gradual Architecture instead lets signals flow only one way, from the
primary inputs on the left to the primary outputs on the right. It therefore has no
combinational loops, and static timing tools can analyse it as ordinary logic. Because
every column may need the results of all earlier columns, the number of horizontal wires
grows from left to right, and so does the width of the multiplexers. Logic blocks are bare
3-LUTs, with no flip-flop and no local feedback: state stays outside the core, in the
fixed logic.

### Geometry

```
 track row D   ══ W input tracks ══╪══ +1 route track ══╪══ +1 ... ══╗
 LUT row D-1        LUT(0,D-1)     │    LUT(1,D-1)       │           ║ output
 track row D-1 ══ W input tracks ══╪══ +1 route track ══╪══ ...      ║ muxes
   ...                             │                     │           ║
 LUT row 0          LUT(0,0)       │    LUT(1,0)         │           ║
 track row 0   ══ W input tracks ══╪══ +1 route track ══╪══ ...    ══╝
                 column 0        vertical channel:  column 1
                                 the D outputs of the previous column
```

* There are **D columns x D rows of 3-LUTs**. LUT row `r` lies between track row `r`
  (below it) and track row `r+1` (above it), so there are `D+1` track rows.
* In **column 0**, each track row gets `W` tracks, each driven by an *input mux* that picks
  one of the `NI` primary inputs. Each column-0 LUT picks its three inputs directly from
  the primary inputs.
* In **column c ≥ 1**:
  * Each LUT input has a *LUT mux*. It chooses among the tracks of the two neighbouring
    track rows and all `D` LUT outputs of column `c-1`.
  * Each track row gets one more track. A *route mux* drives it with one of the `D` LUT
    outputs of column `c-1`. That track is usable from column `c+1` on, and by the
    output muxes.
  * A LUT in column `c` therefore sees `T = W+c-1` tracks per neighbouring track row. Its
    LUT mux has `2T + D` inputs.
* **Output mux** `o` sits in LUT row `o mod D`. It chooses among the last-column LUT
  outputs and the `W+D-1` tracks of each of its two neighbouring track rows.

At the default size (D=8, W=3, NI=10, NO=13) the multiplexer widths are:

| element | count | inputs | select bits |
|---|---|---|---|
| input mux | 27 | 10 | 4 |
| LUT mux, column 0 | 24 | 10 | 4 |
| LUT mux, column c = 1..7 | 24 per column | 14, 16, 18, 20, 22, 24, 26 | 4, 4, 5, 5, 5, 5, 5 |
| route mux, columns 1..7 | 63 | 8 | 3 |
| output mux | 13 | 28 | 5 |
| LUT truth tables | 64 | | 8 each |

The total is **1762 configuration flip-flops**. The widest LUT mux (26 inputs) is in the
last column. Multiplexers of this width dominate the area of a synthesized core.

### Configuration

Each select is a binary number, stored least-significant bit first. A select value past
the last candidate drives 0, which is how unused muxes are parked. LUT truth-table bit
`i` is the output for inputs `{in2,in1,in0} = i`.

The flip-flops form one shift chain (`plc_config_chain`). On each rising `config_clk`
edge, `shift_in` enters bit 0 and every bit moves one place toward bit 1761. Loading a
bitstream therefore takes exactly 1762 edges, with the highest-numbered bit sent first.
After that, `config_clk` stops and the core is a purely combinational function from `pi`
to `po`. `shift_out` (the end of the chain) lets the bitstream be read back by shifting
further. The configuration flip-flops have no reset.

The order of the fields in the chain is given at the top of `rtl/plc_pkg.sv`, and the
offset functions there compute every field's position:

1. input muxes
2. column-0 LUT muxes
3. LUT muxes of columns 1..D-1
4. route muxes
5. truth tables
6. output muxes

Any tool that generates bitstreams must use those functions or the same layout.

**Partitioned chain (`CFG_PARTS > 1`).** While the core is loaded, every flip-flop in the
single chain toggles on every edge. Setting `CFG_PARTS = P` splits the chain into `P`
shorter chains. `chain_sel` picks the chain that receives `shift_in` and the configuration
clock, and only that chain's flip-flops move, which reduces configuration power. Chain
`p` holds bits `p*L .. p*L+L-1`, where `L = ceil(N/P)`. The clock of the chains that are
not selected is suppressed with a clock enable rather than a gated clock. The default is
the single chain.

### What the fabric does not contain

The fabric has no flip-flops in the user path and no carry logic. The tools that turn a
user circuit into a bitstream are also not part of it: technology mapping, placement,
routing and bitstream generation. The testbench package `tb/tb_plc_bits_pkg.sv` contains
setters for each element and a reference evaluator. `tb/tb_asm_fsm_pkg.sv` shows a
hand-mapped example.

## 2. The bridge around it

```
            ┌───────────── buffer management ─────────────┐     ┌──── assembly management ────┐
 TAM ──────►│ tam_buffer_ctrl ⇄ tam_buffer_mem (dual-clock)│──┐  │ assembly_ctrl (soft-PLC FSM) │
  (tam_clk) │                                              │  ├─►│          ⇅                   │──► IP core
      └────────────────────── bypass (buf_en = 0) ───────────┘  │ packet_assembly              │   (sys_clk)
                                                                └──────────────────────────────┘
```

* **Buffer** (`tam_buffer_mem` + `tam_buffer_ctrl`). This is a 16-word dual-clock FIFO.
  It uses Gray-coded pointers and two-flip-flop synchronizers, so the TAM (`tam_clk`) and
  the IP core (`sys_clk`) can run at unrelated frequencies. When it is full, `tam_ready`
  goes low.
* **Bypass multiplexer.** With `buf_en = 0`, the TAM word goes straight to packet
  assembly and `tam_ready` is the assembler's pop. In this mode the TAM must be clocked
  by `sys_clk`.
* **Packet format** (`rtl/tam_pkg.sv`). A 16-bit header word holds a header flag in bit
  [15], the destination core ID in bits [14:8] and the length LEN in bits [7:0]. It is
  followed by LEN data words.
* **Packet assembly** (`packet_assembly`). It executes the controller's commands:
  * latch the header: load the counter with LEN and record whether the ID equals
    `core_id`;
  * decrement the counter;
  * write the word to the IP core.

  It reports six status bits: word valid, header flag, ID match, count==1, core ready and
  count==0.
* **Assembly controller** (`assembly_ctrl`). The controller has a 4-bit state register
  and a soft-PLC with 10 inputs (4 state bits and 6 status bits) and 13 outputs (4
  next-state bits and 9 controls). Four state bits allow 16 states, where the fixed
  controller this replaces needed three bits for seven. The spare controls are brought
  out as `ctrl_spare`.

### Controller timing

```
 sys_clk   ‾‾‾‾|____|‾‾‾‾|____|‾‾‾‾
                    ↑ falling edge: {status, state} captured into the core's input register
                         ↑ rising edge: state <= next state, datapath executes the controls
```

The core's inputs come from a falling-edge register, and its outputs are used at the next
rising edge. The core therefore has **half a clock period** to settle. Its worst-case path
through the wide multiplexers is long, so this half period sets the clock rate of the
whole bridge. Functionally, the controller is an ordinary rising-edge Mealy machine whose
status inputs are sampled half a cycle before the edge.

With the example machine below, a packet of LEN words for this core takes LEN+2 core
cycles when the core is always ready: one cycle for the header, one for the decision and
one per data word.

### Programming the controller

The bridge does nothing until its core is loaded. Hold `rst_n` low, shift the bitstream
in on `config_clk`, then release reset. Reprogramming follows the same steps.

`tb/tb_asm_fsm_pkg.sv` contains a four-state example machine (IDLE, HDR, DATA, SKIP) with
two variants, both hand-mapped onto the 8 x 8 core:

* *address filtering*: deliver the data words of packets for this core and skip the
  rest;
* *broadcast*: deliver every packet.

The mapping uses 31 logic LUTs in four columns, 28 pass-through LUTs that carry the
results to the last column, and 4 input tracks. Switching between the two variants
changes one truth table.

## 3. How far to trust it, and where it is this design's own

The following follow the architecture as described:

* the fabric: unidirectional flow, W input muxes per track row in the first column, one
  route mux per track row per later column, LUT muxes over the neighbouring tracks plus
  the previous column, output muxes over the last column and neighbouring tracks;
* the default size: 8 x 8 LUTs, W=3, 10 inputs, 13 outputs;
* the serial configuration chain;
* the falling-edge / rising-edge controller timing;
* the bridge's block structure.

With these choices the widest LUT mux has 26 inputs, which is the widest multiplexer
quoted for such a core.

The following are this design's own choices:

* which tracks a LUT mux and an output mux see: the two neighbouring track rows;
* the placement of output muxes in rows `o mod D`. This makes the output muxes 28 inputs
  wide, so they, not the LUT muxes, are the widest multiplexers here;
* the binary select encoding and the bit order;
* the parking of out-of-range selects at 0;
* the enable-based partitioned chain;
* the whole packet format;
* the FIFO depth and width, and its dual-clock design;
* the valid/ready handshakes;
* the 4+6 / 4+9 split of the core's inputs and outputs;
* the example packet machine. The two next-state functions of the original test chip
  are not available.

Only the assembly direction, from TAM to core, exists. No response path is built from
the core back to the TAM.

The fabric is checked against an independent reference evaluator with random bitstreams,
and with directed mappings whose outputs are computed directly from the inputs. Timing,
area and power are not modelled: a soft-PLC's speed depends entirely on synthesis and
layout.

### Sizes of the MCNC benchmark cores

Small benchmark circuits, such as the MCNC set, need cores from D = 2 to 11 and W = 1 to 4. `plc_gradual_fabric #(.D(d), .W(w), .NI(i), .NO(o))` builds any of them.
`tb/tb_plc_benchmark_cores.sv` exercises several such sizes. At the default 8 x 8, W=3,
10-input, 13-output size, only the small benchmarks fit: cm82a, con1, cm138a and cm42a.
Most others have more than 10 inputs or need a core larger than 8 x 8.

## 4. Simulating and changing it

Each testbench is self-checking and ends with a `TB_RESULT checks=… failures=…` line.
With Verilator 5, run from the repository root:

```
verilator --binary --timing --assert -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/plc_pkg.sv rtl/tam_pkg.sv tb/tb_plc_bits_pkg.sv tb/tb_asm_fsm_pkg.sv \
  tb/tb_tam_bridge_top.sv --top-module tb_tam_bridge_top -Mdir obj
./obj/Vtb_tam_bridge_top
```

For another testbench, replace the last file and the top module. The packages are listed
first, and the modules are found by name in `rtl/` and `tb/`. Add
`+verilator+rand+reset+2 +verilator+seed+N` to the run to start every variable that has
no reset at a random value.

| testbench | what it shows |
|---|---|
| `tb_tam_bridge_top` | End to end at default sizes: load the core, buffered traffic on two clocks with a full buffer and core stalls, skipped, zero-length and stray packets, bypass mode with a timed packet, reprogramming to broadcast. |
| `tb_assembly_ctrl` | The controller against a golden model every cycle, including the half-cycle input timing. |
| `tb_plc_gradual_fabric` | Directed mappings, bitstream read-back, and random bitstreams against the reference evaluator. |
| `tb_plc_benchmark_cores` | The fabric at several benchmark core sizes against the reference evaluator. |
| `tb_plc_config_chain` | Single chain, and a 4-way partitioned chain loaded one part at a time. |
| `tb_plc_lut3`, `tb_plc_cfg_mux` | The primitives, exhaustively. |
| `tb_tam_buffer_mem`, `tb_tam_buffer_ctrl`, `tb_packet_assembly` | The datapath blocks. |

To change the core size, set `D`, `W` (and `CFG_PARTS`) on `tam_bridge_top`. Bitstream
offsets follow automatically from `plc_pkg`. The example mapping needs D ≥ 7 and W ≥ 2.
To change the number of core inputs and outputs, change `NSTATE`, `NSTAT` and `NCTRL` in
`tam_pkg`.
