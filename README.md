# Handshake-component FPGA fabric with complex and simple logic blocks

This is an asynchronous FPGA fabric whose logic blocks implement
*handshake components* directly. In handshake-component design, a circuit is a
network of small components (Sequence, Concur, Loop, Variable, Case, Encode,
BinaryFunc, ...) joined by four-phase request/acknowledge channels. Tools such
as Balsa compile a high-level description into that network. If the FPGA's
logic blocks are built around those components, a handshake circuit maps onto
the fabric almost one component per block.

The area-saving idea is to use two kinds of logic block:

* A **complex LB** holds every component module: BinaryFunction, Variable,
  Sequence, CallMUX, Case and Encode. Controllers go here.
* A **simple LB** holds only BinaryFunction, Variable and a C-element. Data
  paths go here, and they need nothing more.

Because most of an application is data path, most cells can be the cheaper
simple kind.

The RTL models the architecture at the logic level: the block structure,
terminals, module functions, routing and configuration. It does not model the
transistor-level 65 nm circuits.

## How asynchronous behaviour is modelled

The fabric has no clock; every component synchronises through handshakes. So
that it can be simulated with a two-state simulator and synthesised with
ordinary tools, this RTL uses a **sampling clock `clk` as a unit gate delay**:

* Every state-holding gate is an `always_ff` register. These are C-elements,
  the hysteresis of dual-rail gates, write acknowledges and controller states.
* Each routing segment is a register stage: a connection block registers the
  wires it sends on. This models wire delay.
* Everything else is combinational: switch blocks, the LBs' switch boxes,
  merge and encode logic, and read ports.

A handshake step therefore takes one or more clock cycles, and its result does
not depend on how many. The circuits are delay-insensitive by construction, so
the same configuration works with any mix of delays. Do not read cycle counts
as the fabric's real speed.

`rst_n` is an asynchronous active-low reset. It clears all state and all
configuration.

## Data encoding: four-phase dual-rail (FPDR)

Each data bit travels on two wires, written `(T,F)`:

| code | meaning |
|------|---------|
| (0,1) | data 0 |
| (1,0) | data 1 |
| (0,0) | spacer |

A valid code doubles as the request. The sender alternates valid data with the
spacer, and a third wire carries the acknowledge back. Control-only channels
use a single request wire plus an acknowledge. In the RTL, `hc_pkg::dr_t` is
the `(t,f)` pair. On bundles of single wires, a dual-rail bit takes two
adjacent wires, with F at the lower index.

Every channel follows the four-phase cycle:

1. The request (or valid data) rises.
2. The acknowledge rises.
3. The request returns to 0 (spacer).
4. The acknowledge returns to 0.

## Component modules (`rtl/`)

| module | component(s) | behaviour in this RTL |
|---|---|---|
| `binary_function` | BinaryFunc, UnaryFunc, BinaryFuncConstR (with Variable) | 3-input dual-rail LUT (8-bit truth table, index `{op2,op1,op0}`). It outputs the table entry once all operands are valid and `lut_ready` is high, and returns to spacer once all operands are spacer. It also produces the completion signals `data_valid` and `data_spacer`. |
| `variable_module` | Variable, BuiltinVariable | Two 1-bit variables. Bit 0 is written from the LUT result and bit 1 from `var_in`. `var_ready0/1` are the write acknowledges: each rises when its value is stored and falls on the spacer. There are two read ports, and each can read either bit (`rd0_src`, `rd1_src`). A read port returns the bit while its request is high and the spacer otherwise. |
| `sequence_module` | Sequence, Concur, Loop, While, FalseVariable (with Variable) | A four-phase controller with one passive activation channel and two active output channels. The mode is set by configuration. While fetches a dual-rail guard through output 0. FalseVariable runs output 1 as its "signal" handshake once the write is held, then raises `fv_ack`. |
| `callmux_module` | CallMUX, Call, Continue, ContinuePush | Merges four mutually exclusive 1-bit push channels (an OR of the rails). A C-element per input returns the acknowledge to the caller. |
| `case_module` | Case | A 2-bit dual-rail selector raises one of four output requests. The input is acknowledged after that output's acknowledge. A one-bit mode provides if/else. |
| `encode_module` | Encode | Four request inputs. The output is the active input's index as two dual-rail bits, with an acknowledge C-element per input. |
| `c_element` | (simple LB) | Muller C-element. In the simple LB it joins the two write acknowledges into one FalseVariable acknowledge. |

Components that the architecture realises with plain interconnect need no
hardware of their own. A Fetch, for example, is three wires:

1. The activation request becomes the source's read request.
2. The read data becomes the destination's write data.
3. The write acknowledge becomes the activation acknowledge.

Fork, Synch, Adapt, Slice and Combine are likewise wiring and fan-out.

## Logic blocks

`complex_lb` and `simple_lb` have the same terminals:

* Inputs: **N1, W, S, E1**
* Outputs: **N1, N2, S, E1, E2**

Each terminal is `TW = 6` single wires. Packed order is `term_in = {E1,S,W,N1}`
and `term_out = {E2,E1,S,N2,N1}`, with N1 in the low bits.

Inside each block:

* The **input switch box** gives every module input wire one terminal wire, or
  ties it low.
* The **output switch box** drives every output terminal wire from one module
  output, or ties it low.

Both boxes are `lb_switch_box` crossbars. Selection `0` means tied low, and
selection `j` means source `j-1`.

Some module inputs and outputs are wired directly rather than through the
switch boxes:

* the LUT result and its completion signals going to the Variable module
* `lut_ready` going back to the LUT
* the Variable module's write acknowledges going to the Sequence module (or to
  the C-element in the simple LB)

`hc_pkg` lists which module wire sits at which switch-box index (`MI_*` for
inputs, `MO_*` for outputs). The simple LB has only the first `SLB_MIN` inputs
and `SLB_MOUT` outputs. Its output 6 is the C-element.

## Cells, routing and the array

```
        SB ---- upper CB ---- SB           each cell (r,c) owns: its LB,
        |          |N1 N2     |            the upper CB (horizontal segment
        |          |          |            above the LB), the right CB
      right CB -W- LB -E1,E2- right CB     (vertical segment to its right)
      (of c-1)     |S                      and the SB at its top-right corner
                (upper CB of the cell below)
```

**Routing segments.** A segment has `NT = 8` single wires. `NH = 4` run
east/south ("fwd") and 4 run west/north ("bwd").

**Switch block.** A switch block drives every wire leaving it from one wire
arriving on one of its other three sides (`switch_block`). Side order is N, E,
S, W. Selection `j` picks wire `(j-1)%NH` of the `((j-1)/NH)`-th other side,
counting clockwise from the side after the output side.

**Connection block.** A connection block sits in the middle of a segment. For
each wire, it either passes on the value from the upstream switch block or
drives the wire from an LB output wire. It also feeds two LB input terminals
from the registered wires leaving it (`connection_block`).

* The **upper CB** is driven by N1 and N2 of its own LB and by S of the LB
  above. It feeds N1 of its own LB and S of the LB above.
* The **right CB** is driven by E1 and E2. It feeds E1 of its own LB and W of
  the LB to the right.

Two vertically or horizontally adjacent LBs can therefore talk through a single
CB without using a switch block.

**Array.** `hcfpga_array` is a `ROWS x COLS` mesh, 6 x 4 by default. Rows with
`r % CPLX_PERIOD == 0` (rows 0, 2 and 4) hold complex LBs, and the others hold
simple LBs. The default gives 12 complex and 12 simple cells. Wherever a cell
has no neighbour, its wires become pins: `west_*`, `east_*`, `north_*` and
`south_*`. The comment at the top of `hcfpga_array.sv` lists them.

**No combinational loops.** An FPGA's routing can be configured into rings,
such as four switch blocks around a tile, or an LB output routed back to its
own input. Every such path crosses a connection block, and each connection
block registers its outgoing segment wires. So the netlist has no
combinational loop under any configuration, and it synthesises as an ordinary
synchronous design. The cost is one clock of latency per segment, which the
handshakes absorb.

## Configuration

Each cell holds its configuration, a `hc_pkg::cell_cfg_t`, in a register. The
struct contains:

* `lb`: the LUT table, read-port sources, Sequence mode, FalseVariable
  join, one-bit Case, and both switch-box selections
* `cb_up`, `cb_rt`: segment and terminal selections for the two CBs
* `sb`: the switch-block selections

The register loads `cfg_wdata` when `cfg_we` is high and `cfg_row`/`cfg_col`
address the cell, one cell per clock. Load the configuration after reset,
before starting any handshake. `tb/hc_tb_pkg.sv` and the helper
functions in `tb/tb_hcfpga_array.sv` show how selection values are computed.

## Worked examples: four circuits on the fabric

`tb/tb_hcfpga_array.sv` places and routes four circuits by hand on the default
6 x 4 array and runs them.

**1. A one-bit counter** with the same handshake structure as the usual Balsa
counter:

```
activate -> Loop -> Sequence( Concur( q -> out , NOT q -> tmp ), tmp -> q )
```

Loop, Sequence and Concur are complex LBs (0,0), (0,1) and (0,2). `tmp` is the
simple LB (1,2), with a NOT LUT writing its bit 0. `q` is the simple LB (1,1),
bit 1, written from VarIn. Every Fetch is wiring, as described above. The
route exercises:

* direct neighbour links through one CB
* leftward and diagonal routes through switch blocks
* a three-switch-block route from `q` to the east pins of row 2

The testbench acknowledges each output value and checks the sequence
0, 1, 0, 1, ….

**2. Case feeding Encode**, on complex LBs (2,0) and (2,1). The Encode result
leaves over three switch blocks to the south pins and must equal the Case
selector.

**3. CallMUX and While in one complex LB** (4,0). Both modules are used at
once, with every channel on pins:

* Calls arrive at random on CallMUX inputs 0 and 1. The test checks that each
  value appears on the output and that only the calling input is
  acknowledged.
* The While controller runs 0 to 3 iterations per activation, as the guard
  values supplied by the test dictate. The test checks the body count and the
  final acknowledge.

**4. FalseVariable join in a simple LB** (5,3). The LUT and VarIn write the
two variable bits one after the other, in alternating order. The C-element
output must stay low after the first write and rise only after the second.
Both bits are then read back: one on the S terminal, the other through the
right CB.

The test counts how often each of these mechanisms happens, and fails if any
of them never happens:

* loop iterations, and Sequence and Concur completions
* LUT writes and VarIn writes
* uses of each Case output, and Encode results
* calls on each CallMUX input
* While bodies and While completions
* C-element joins

The 4-bit counter that is the architecture's reference workload needs 2
complex and 9 simple cells. That figure comes from dividing its reported transistor
count by the per-cell counts. The default array has 12 of each kind, so the
cell count fits. Only the one-bit counter above has been placed and simulated;
the 4-bit mapping, and whether the routing has room for it, have not been
checked.

## Simulating

Every testbench in `tb/` is self-checking. Each one prints a single line,
`TB_RESULT checks=N failures=M`. For example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb +libext+.sv \
    rtl/hc_pkg.sv tb/tb_hcfpga_array.sv --top-module tb_hcfpga_array
./obj_dir/Vtb_hcfpga_array
```

Unit tests cover every module: `tb_c_element`, `tb_binary_function`,
`tb_variable_module`, `tb_sequence_module`, `tb_callmux_module`,
`tb_case_module`, `tb_encode_module`, `tb_lb_switch_box`,
`tb_connection_block`, `tb_switch_block`, `tb_simple_lb`, `tb_complex_lb` and
`tb_hcfpga_cell`.

`tb_hcfpga_array` runs the full default-size array. Building it takes about a
minute, and the simulation takes seconds.

## What follows the architecture and what is this design's own

These parts follow the architecture:

* the cell structure: one LB, two CBs and one SB
* the LB terminal names and directions
* the module set of each LB kind
* the C-element in the simple LB
* the mapping of handshake components to modules
* FPDR data with three wires per bit
* the mesh with alternating complex and simple rows

The following choices are this design's own, because the architecture does not
fix them:

* **Sizes.** The LUT size (3 inputs), terminal width (6 wires), segment width
  (8 wires) and array size (6 x 4) are all assumed.
* **Module insides.** All module internals are new: the controller state
  machine, the two-bit Variable with two read ports, and the single-bit CallMUX
  and Case data.
* **Routing structure.** The switch boxes and CBs are full multiplexers, each
  CB registers its outgoing segment wires, the
  routing wires are unidirectional, and the switch-block pattern is
  "any wire of another side".
* **Configuration.** Configuration is held in registers with a write port, and
  signals at the array's edges become pins.
* **Timing model.** The sampling-clock emulation of asynchronous timing, as
  described above.
* **Variable interpretation.** Reading the Variable module's two outputs and
  two ready signals as two separate one-bit variables is an interpretation of
  the block diagram.
* **Sequence module ports.** The Sequence module's figure labels
  `FalseVariableOut.req` and `FalseVariable_ready_interim` are folded into a
  single activation channel plus the write acknowledges.

Not built:

* ActiveEager/PassiveEager FalseVariable
* the CaseFetch, CallDEMUX, DecisionWait, PassivatorPush and SynchPush variants
  that the Case module's hardware would also serve
* the transistor-level cell circuits

The architecture covers 39 of Balsa's 46 handshake components. This RTL covers
Sequence, Concur, Loop, While, FalseVariable, Variable, BinaryFunc/UnaryFunc,
CallMUX/Call, Case and Encode as hardware, plus the interconnect-only
components.
