# A data-flow signal processor in SystemVerilog

This is a processor with no program counter. The program is a data-flow
graph. Each operator of the graph, such as "multiply", "add" or "read a
sample", sits in its own **memory cell** together with its two operands.

A cell fires when its instruction and both operands are present. It sends
all three as one **instruction packet** to a shared **functional unit**. The
functional unit computes the result and sends one **result packet** to each
destination register named in the instruction. Those registers belong to
other cells, which may then fire in turn.

Many cells can be enabled at the same moment. Two packet-switched networks
carry their traffic: one from the cells to the functional units, and one from
the functional units back to the cells. The processor is built for
throughput: a handful of pipelined functional units are kept busy by the
many cells that feed them.

The RTL is synchronous. It uses one clock, an active-low asynchronous reset,
and valid/ready handshakes on every link. The architecture it implements was
described as a speed-independent asynchronous machine. The unit boundaries,
link types and packet formats are kept from that description.

```
              host commands                       input / output channels
                   |                                        |
              +----v-----+   command network (C)   +--------v---------+
              |controller|------------------------>| memory section   |
              |          |   control network (D)   | 8 cells x 3 regs |
              |          |------------------------>|                  |
              +----+-----+                         +--+------------^--+
                   | result packets                   | A[3]       | B[0,1]
                   |                           +------v------+     |
                   |                           | arbitration |     |
                   |                           | network     |     |
                   |                           +------+------+     |
                   |                                  | A[3M]      |
                   |                           +------v------+     |
                   |                           | 4 functional|     |
                   |                           | units       |     |
                   |                           +------+------+     |
                   |                                  | B[Q,M]     |
                   |                           +------v------+     |
                   +-------------------------->| distribution|-----+
                                               | network     |
                                               +-------------+
```

## Sizes and formats

All sizes and codes live in `rtl/dfp_pkg.sv`.

| name | value | meaning |
|---|---|---|
| `M` | 16 | word width of every register |
| `N_CELLS` | 8 | memory cells |
| `N_REGS` | 24 | registers (3 per cell) |
| `Q` | 5 | register address width |
| `NFU` | 4 | functional units |
| `NCH` | 2 | external input and output channels |

**Register addresses.** Register `r` belongs to cell `r / 3`.
- `r % 3 == 0` is the cell's instruction register.
- `r % 3 == 1` is operand x.
- `r % 3 == 2` is operand y.

**Instruction word** (16 bits, type `instr_t`):

```
 15 14 | 13 12 | 11  | 10..6 |  5  | 4..0
  fu   | spec  | d1v |  d1   | d2v |  d2
```

- `fu` selects the functional unit.
- `spec` selects a variant of the operation within that unit.
- `d1` and `d2` are destination register addresses.
- `d1v` and `d2v` say whether each destination is used. A result goes to
  zero, one or two registers.

| fu | unit | spec |
|---|---|---|
| 0 `FU_ADD` | adder | 0: x+y, 1: x-y, 2: x, 3: y (2 and 3 act as a copy operator) |
| 1 `FU_MUL` | multiplier | 0: low M bits of x*y, 1: signed fraction (x*y) >>> (M-1) |
| 2 `FU_IN` | input | result = next sample of input channel x |
| 3 `FU_OUT` | output | y is written to output channel x, and is also the result |

For the input and output units, operand x holds a channel number. That
register is normally a constant.

**Links.**

| name | used between | form |
|---|---|---|
| A[3] | cell to arbitration network | packet of M three-bit bytes. Byte i holds bit M-1-i of the instruction, x and y (MSB first). valid/ready/last |
| A[3M] | arbitration network to functional unit | the same packet as one 48-bit word `{instr, x, y}` |
| B[Q,M] | functional unit or controller to distribution network | address and value in parallel, valid/ready |
| B[0,1] | distribution network to register | the value bit-serially, MSB first, valid/ready/last |
| C | command network | valid/ack, four-phase, with a two-bit command (enter-constant, enter-variable, empty, idle) |
| D | control network | execution requests R and the final request RF (valid/ready, with a `final` bit); completion `done` / `done_ack`, four-phase |

"Four-phase" means the request rises, then the acknowledge rises, then the
request falls, then the acknowledge falls. On the C and D links the design
keeps this discipline so that a unit knows when a transaction has completely
finished.

## Registers: the part that makes data flow work

Read this section first. Almost everything else is plumbing.
`register_unit.sv` holds one 16-bit word in a `bit_pipeline`, a 16-bit FIFO.
Arriving bits are pushed in, and sending pops them out. A constant pushes
each popped bit straight back in, so it keeps its word. The register is
always in one of three modes:

- **idle**: the register is unused. It never delays its cell, and it
  contributes zero bits to the packet. A cell whose *instruction* register is
  idle is inactive and never fires.
- **constant**: the word goes into every packet the cell sends and stays in
  the register. Instructions, coefficients and channel numbers are constants.
- **variable**: the word goes into one packet and must then be replaced by a
  result packet. A result is accepted only while the register is an *empty*
  variable. A result for a register that is still full waits inside the
  distribution network. That waiting is the only flow control between a
  producer and its consumer.

Between runs, a variable is either **empty** or **full**, and the two behave
differently within one execution cycle of the cell:

| quiescent state | what happens in one cycle |
|---|---|
| empty variable | wait until a value arrives, send it, finish the cycle empty |
| full variable | send the value at once, then finish the cycle only after the next value has arrived, so it is full again |
| constant | send, finish |
| idle | finish at once |

A full variable is how a loop is started. In a recursive filter, y(t-1) must
exist before y(0) can be computed. Loading y(-1) as a full variable lets the
first cycle proceed. The register then waits for the new y before that cycle
counts as done.

**Commands** (from the controller, over the command network):

- `enter-constant a, v` and `enter-variable a, v`. The register empties
  itself, becomes an empty variable, and waits for the value v. The
  controller sends v through the distribution network like any result. When
  v has arrived, the register becomes a full constant or a full variable and
  acknowledges.
- `empty a`: the register becomes an empty variable at once. An idle register
  is activated by this.
- `idle a`: the register becomes idle.

## Memory cells and the execution cycle

`memory_cell.sv` holds three registers and a small control unit.

**Requests.** The controller hands out execution requests through the control
network. A "run v" command gives each cell v requests R followed by one final
request RF. The cell counts requests in an `event_pipeline` (8-bit count `pend`,
`REQW`) and records RF in a flag.

**One cycle**, taken for each request:

1. The cell waits until all three registers report that they can send
   (`cyc_e`).
2. It streams the packet out on its A[3] link: 16 bytes, each holding one bit
   of each register.
3. It tells the registers the packet has gone.
4. It waits for all three to report that their part of the cycle is done
   (`cyc_done`). A full variable must be refilled first.
5. It closes the cycle (`cyc_end`).

**Inactive cells.** If the instruction register is idle, each request is
simply counted off and no packet is sent.

**Completion.** Once RF has been taken and every earlier request has finished,
the cell raises `done` and holds it until `done_ack` arrives.

`memory_section.sv` is an array of `N_CELLS` cells with flat port arrays.

## Arbitration network: from cells to functional units

`arbitration_network.sv` has three ranks of two-input arbiters. For the
default 8 cells:

```
cell pairs -> arb -> s/p+buffer -> arb -> 4-way function switch -> arb (one per unit) -> unit
  (A[3])     x4        x4          x2         x2                      x4              (A[3M])
```

- **`arb_unit.sv`**
  - Merges its inputs packet by packet, round-robin.
  - Once the first byte of a packet has passed, the unit serves only that
    input until the byte marked `last`.
  - Selection is combinational, so a byte passes in the cycle it is offered.
- **`sp_buffer_unit.sv`**
  - Collects the 16 serial bytes into three 16-bit shift registers.
  - Offers the finished packet as one 48-bit word.
  - Takes no new input until that word has left. A half-received packet
    therefore never holds the next arbiter.
- **`function_switch_unit.sv`**
  - Steers each packet by its two `fu` bits to one of four outputs.

There is exactly one path from each cell to each functional unit. Packets
from one cell to one unit therefore stay in order.

The network is generated for any cell count that is a multiple of four. The
first two ranks always have two inputs. With more than 8 cells there are more
function switches, and each output arbiter gets one input per switch. No
further ranks are added.

## Functional units

In `functional_unit.sv` the operation is computed as the packet enters. The
result then travels `LAT` = 3 register stages, together with the two
destination addresses.

In the last stage, each present destination forms its own result packet. The
two packets leave independently, on ports `r_*[0]` and `r_*[1]`. The
pipeline advances whenever its last stage is empty or is being emptied.
Throughput is therefore one packet per clock, and latency is exactly `LAT`
clocks when the distribution network keeps up.

The input and output units stall their pipeline entry until the external
channel named by operand x is ready.

## Distribution network: from results back to registers

`distribution_network.sv` has 9 sources: two per functional unit plus the
controller. The structure is as follows:

1. Each source enters its own `dist_switch_unit`, which tests the top address
   bit.
2. Each half of the address space has one 9-input `arb_unit`, which merges the
   packets for that half.
3. A binary tree of switch units follows (`dist_tree.sv`, 15 switches per
   half). Each switch steers on its top address bit and deletes that bit.
4. Each leaf is a `ps_buffer_unit`. It holds one value and shifts it into its
   register bit by bit.

Each switch holds one packet, so packets pipeline through the tree. Leaves for
addresses 24 to 31, which have no register, absorb what reaches them.

The first-rank arbiters make the network shared. A packet waiting for a full
register holds its leaf buffer and, behind it, the switches on its path. That
matters for the next section.

## Running many cycles: the run-ahead hazard

"run v" with v > 1 hands every cell v requests at once. A cell that waits for
no variable operand, such as an input cell whose operands are the channel
number and an idle register, can fire all v times immediately. Its results
then queue in the distribution network behind a register that is still full.

A queued result holds the shared switches on its path. If another result
needs those switches to reach the consumer, the consumer never empties the
register, and the run never finishes. The hardware has no credit or
back-pressure mechanism that would prevent this.

The program must bound how far any cell can run ahead. The end-to-end test
does this with a token. The output cell also sends its result to the input
cell's y register, which is set up as a full variable. The input cell can
then fire only once per completed sample.

"run 1" repeated v times avoids the problem for a well-formed program. One "run v" with such a token is
much faster.

## Controller, command network and control network

**`controller.sv`** combines two units:

- **`command_interpreter.sv`** executes one host command at a time:
  - Enter commands send the value as a result packet and the enter command
    to the register at the same time. The command completes when the
    register acknowledges, which it does once the value has arrived.
  - Empty and idle send only the command.
  - Run passes v to the execution counter.
- **`execution_counter.sv`** sends v R requests then RF (RF goes out when the
  count would go below zero). It then waits for the four-phase completion
  handshake.

**Host port.** Present `host_cmd`, `host_addr` and `host_value` with
`host_valid`, and hold them. `host_ready` pulses for one clock when the
command has completely finished. For run, that is when every active cell has
done its v cycles.

**`command_network.sv`** is a combinational tree of
`register_select_unit.sv`:

- Each level decodes one address bit and drops it.
- The acknowledge of the chosen branch is passed back up.
- Addresses with no register are acknowledged at once.

**`control_network.sv`** is a tree of `run_enable_unit.sv`:

- Each unit accepts a request at once and passes it to both subtrees.
- It keeps a count of requests owed to each subtree (an `event_pipeline`),
  plus a flag for a pending RF, so many requests can be in flight.
- Its `done` output comes from a `c_module`: it rises when both subtrees are
  done and falls when both have dropped `done`.
- The acknowledge is passed to both subtrees.

## Example: the second-order recursive filter

`tb/tb_dataflow_processor.sv` runs y(t) = A x(t) + B y(t-1) + C y(t-2) with
A = 3, B = 2, C = -1. It uses 16-bit wrap-around arithmetic.

| cell | registers | instruction | x | y |
|---|---|---|---|---|
| 1 | 0-2 | input -> 4 | channel 0 (const) | idle |
| 2 | 3-5 | mult -> 13 | x(t) (empty var) | A |
| 3 | 6-8 | mult -> 14 | y(t-1) (empty var) | B |
| 4 | 9-11 | mult -> 16 | y(t-2) (full var, 0) | C |
| 5 | 12-14 | add -> 17 | empty var | empty var |
| 6 | 15-17 | add -> 19, 23 | empty var | empty var |
| 7 | 18-20 | copy x -> 7, 10 | y(t-1) (full var, 0) | idle |
| 8 | 21-23 | output | channel 0 (const) | empty var |

The program is loaded with 24 host commands. Six "run 1" commands then each
produce one sample. Cell 8 is then reloaded to also send to register 2, and
register 2 becomes a full variable: this is the token described above. A
single "run 20" then produces 20 more samples.

The input channel withholds samples and the output channel refuses samples at
random. Every output is compared with a reference computed in the testbench.
The test also counts the following events and fails if any never occurs:

- arbitration contention
- a result waiting for a full register
- functional-unit back-pressure
- input and output waits
- two-destination results
- several requests queued in one cell
- each host command type

## Files

- `rtl/dfp_pkg.sv`: sizes, instruction and packet types, command codes.
- Top level: `rtl/dataflow_processor.sv`.
- Memory: `register_unit`, `memory_cell`, `memory_section`.
- Arbitration network: `arb_unit`, `sp_buffer_unit`, `function_switch_unit`,
  `arbitration_network`.
- Functional units: `functional_unit`.
- Distribution network: `dist_switch_unit`, `ps_buffer_unit`, `dist_tree`,
  `distribution_network`.
- Controller: `command_interpreter`, `execution_counter`, `controller`.
- Command network: `register_select_unit`, `command_network`.
- Control network: `run_enable_unit`, `control_network`.
- Shared primitives: `c_module` (clocked C-element), `event_pipeline`
  (a queue of execution requests, kept as a counter) and `bit_pipeline`
  (the bit FIFO that holds a register's word).
- `tb/tb_<module>.sv`: one self-checking testbench per module, except
  `dist_tree`, which is tested through `distribution_network`. Each prints
  `TB_RESULT checks=<n> failures=<n>` and has a watchdog.

## Simulating

With Verilator 5, from the directory holding `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_dataflow_processor \
    -y rtl -y tb rtl/dfp_pkg.sv tb/tb_dataflow_processor.sv
./obj_dir/Vtb_dataflow_processor
```

Replace the top module name to run any other testbench. The end-to-end test
runs at the default sizes in well under a second. Among its output it prints
how many clocks the 20-cycle run took (about 4300) and the count of each
event listed above.

## Where this design departs from the architecture it follows

- **Clocked, not asynchronous.** Every four-wire enable/acknowledge group
  became a valid/ready pair or a four-phase level handshake. Three of the
  asynchronous primitives have clocked counterparts that are used as
  modules: `c_module` (a C-element that joins completion signals),
  `event_pipeline` (an event queue kept as a counter) and `bit_pipeline`
  (a bit FIFO). The others do not appear as modules: data switches, gates,
  select and sequencing modules, and arbiters with mutual-exclusion
  latches. Each unit implements their combined behaviour directly, for
  example round-robin grants in place of arbiters.
- **Own choices** where no value was given:
  - word width 16 and address width 5;
  - instruction field widths and the unit numbering;
  - the operation set of each unit;
  - MSB-first bit order;
  - pipeline depth 3;
  - request counter sizes;
  - the host port encoding.
- **Distribution network arrangement** (first-rank switches, one arbiter per
  half, switch trees) is reconstructed from a short description and may
  differ from the original drawing.
- **One serial-to-parallel stage** per pair of cells. A converter could also
  widen in several steps.
- **Round-robin** arbitration.
- **"empty"** activates an idle register. The architecture is not consistent
  on whether only the enter commands do this.
- **Not modelled:** the host, which is any source of commands. The testbenches
  drive the host port directly.
