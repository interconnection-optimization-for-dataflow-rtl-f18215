# synZEN: a control-driven dataflow coprocessor

synZEN computes by moving data, not by naming operations on registers. An
instruction is a bundle of *transport operations*. Each one connects an output
of one unit to an input of another for one cycle. A function unit starts
computing as soon as both of its operand registers are full. Its result goes
into a small ring buffer on its output, where a later transport picks it up, or
straight into another unit over a dedicated link. The program's control flow
decides which data moves where. The units themselves work as a dataflow
machine: they fire when their data is there and stall when it is not.

The interconnect is what matters in such a machine. A full crossbar between all
unit ports is expensive on an FPGA, where every switch becomes multiplexer
logic. synZEN keeps it small in three ways:

* **A partially connected network.** Each port has switches on only some of the
  six buses.
* **Few ports.** The ring buffers hold intermediate values, so the register
  file needs only one read and one write port.
* **Hard chaining.** Common operation chains (accumulate, multiply-accumulate,
  reuse of a result, a constant operand) run over short fixed links or sticky
  bits. They use no bus at all once they are set up.

This repository holds synthesizable SystemVerilog for the prototype
configuration of the architecture:

* two ALUs and one multiplier;
* a 16-entry register/constant unit;
* a branch unit controlled by the instruction register;
* three burst-capable load units and one store unit;
* six buses.

It also holds a self-checking testbench for every unit and one for the whole
coprocessor.

## Units and ports

| unit | sources (outputs) | destinations (inputs) |
|---|---|---|
| ALU 0, ALU 1 | result ring buffer | A (operation), B (chaining command) |
| multiplier | result ring buffer | A (operation), B (chaining command) |
| register/constant unit | register read, constant | register write |
| branch unit (BPU) | – | A, B (compare values) |
| load unit 0, 1, 2 | loaded-data ring buffer | A (address), B (burst length) |
| store unit | – | A (base address), B (data), C (offset) |

That gives 8 sources (3-bit source address) and 18 destinations. Destination
code 0 marks an empty slot, so destination addresses take 5 bits. The
numbering is in `synzen_pkg` (`src_e`, `dst_e`).

The network is not fully connected. `SRC_CONN_DEF` and `DST_CONN_DEF` in
`synzen_pkg` give, for every port, the buses it has a switch on. Both are
parameters of `synzen_top` and `xbar_net`, so other patterns can be tried.
The default pattern follows a simple rule: ports of single-instance or
frequently used units get more switches.

* On all six buses: the multiplier, the register/constant unit, the store unit
  and every function-unit output.
* On four buses: each ALU input and each load unit (ALU 0 and load unit 0 on
  buses 0–3, ALU 1 and load unit 1 on buses 2–5, load unit 2 on buses 0, 1, 4
  and 5).
* On three buses: the branch unit (buses 3–5).

Overlapping bus groups let every unit reach every other unit.

## The instruction word

An instruction is a branch field followed by six 16-bit transport operations.
Slot *i* always travels on bus *i*.

```
instr_t = { brop_t br (13 bits) , top_t tops[5:0] (6 x 16 bits) }   109 bits

top_t   = { dst[4:0] , dctrl[3:0] , src[2:0] , sctrl[3:0] }
brop_t  = { cond[3:0] , dyn , target[7:0] }
```

The control bits go along with the data to each end.

| where | control bits |
|---|---|
| function unit, operand A | `[3]` keep (constant storing), `[2:0]` operation (`alu_op_e` / `mul_op_e`) |
| function unit, operand B | `[3]` keep, `[2:0]` hard-chaining command (`chain_cmd_e`) |
| function unit, source | `[0]` release a shared result |
| register write / read | register number |
| constant source | the constant, sign-extended (−8 … 7) |
| load unit, operand A | `[3]` keep, `[0]` single load (no burst length needed) |
| load unit B, store unit A/B/C, BPU A/B | `[3]` keep |

Programs are built with the `T()`/`put()`/`emit()` helpers in
`tb/tb_synzen_top.sv`. `put()` places each transport on the first free bus
that both of its ports are switched to.

## Execution and stalling

`instr_fetch` keeps the instruction register full. Its memory is read
synchronously at the address of the *next* instruction, so a completed
instruction is followed by its successor, or by a branch target, in the next
cycle. A taken branch costs no extra cycle.

An instruction *issues* (all of its transports happen at once) in the first
cycle in which:

* every transport's source holds a value (its ring buffer is not empty);
* every transport's destination register is free, is being consumed this
  cycle, or holds a kept constant;
* the branch unit has the operands its condition needs.

Until then the whole instruction waits (`stall`). The function, load and store
units meanwhile keep working on whatever they already have. This is the
dataflow part of the machine.

The network drops a transport it cannot carry and raises `err_illegal`. There
are three such cases:

* its source or destination has no switch on the slot's bus;
* a lower slot already writes the same destination;
* it reads a source already read in this instruction with other source
  control bits.

A source port delivers one value per cycle: one register, one constant.
Several transports may read the same source with the same control bits, and
they all receive the same value.

Timing of a function unit:

* operands written at clock edge *t*;
* the unit fires at edge *t*+1, and the result can be read from the ring
  buffer after that edge;
* an operand register accepts a new value in the cycle it is consumed, so a
  unit fed every cycle fires every cycle.

## Hard chaining

Every function unit (`func_unit`) holds three pieces of chaining state. They
are set and cleared by the command sent with an operand-B transport, at the
moment of that transport.

| command (`chain_cmd_e`) | effect |
|---|---|
| `CH_BACK` | **operand backcoupling**: each result is written back into the unit's own operand A (accumulation) |
| `CH_CPL` | **direct coupling**: this unit accepts results of its coupling source into operand B |
| `CH_BACK_CPL` | both (multiply-accumulate) |
| `CH_SHARE` / `CH_UNSHARE` | **result sharing**: results are stored as shared ring-buffer entries |
| `CH_ANNUL` | clear backcoupling, coupling and sharing, and drop the kept operand A |

A result goes to exactly one place. The choices are checked in this order:

1. back into operand A, if backcoupling is set;
2. operand B of the next unit on the direct-coupling link, if that unit
   accepts coupled input;
3. the ring buffer.

There are two direct-coupling links: multiplier → ALU 0 and ALU 0 → ALU 1. A
coupled value has priority over a network write to the same operand B. The
source unit waits while the target's operand B is still full.

Backcoupling also ends as a side effect. A network write to operand A replaces
the accumulator and clears backcoupling.

**Result sharing.** A shared entry stays at the head of the ring buffer when
it is read. Several later transports can use it. The read that sets the
source's release bit removes it.

**Constant storing.** An operand written with control bit 3 set is not consumed
when the unit fires. The same bit works on the operand registers of the
branch, load and store units.

Multiply-accumulate of two streams, as run by the end-to-end testbench:

```
ALU0.A <- CONST 0 (ADD) ; ALU0.B <- CONST 0 (CH_BACK_CPL) ; LD0.A <- CONST 0
LD0.B <- CONST 6 ; LD1.A <- CONST 6 ; LD1.B <- CONST 6        // two 6-word bursts
MUL.A <- LD0 (MUL_LO) ; MUL.B <- LD1                           // x6
ALU0.B <- CONST 0 (CH_ANNUL)                                   // sum -> ALU0 ring buffer
```

After setup, each product moves over the coupling link into ALU 0. There it is
added to the backcoupled sum. Only the two operand transports per element use
buses. The annul ends both links, and the next firing (sum + 0) goes to the
ring buffer.

## Branches

The branch unit takes its operation from the instruction's branch field. It
needs only two network ports: the two values to compare.

* `BR_EQ`, `BR_NE`, `BR_LT`, `BR_GE`, `BR_LTU`, `BR_GEU` compare A with B.
* `BR_ALWAYS` jumps without operands.
* `BR_HALT` ends the program.

If a transport in the same instruction writes the BPU port, the comparison
uses the value on the bus. Otherwise it uses the operand register. A branch
and the transports of its operands can therefore share one instruction. A
static target is in the branch field and is decided in one cycle.

A computed target takes two instructions:

1. `BR_SETADDR` stores operand A as the dynamic target.
2. A later branch with `dyn = 1` jumps to it.

## Load, store, register/constant units

**Load unit.** It reads `B` consecutive words starting at address `A`, or a
single word when `A`'s control bit 0 is set. It puts them, in order, into its
ring buffer. It only issues a request when the buffer has room for that word
and for every word still in flight, so a slow consumer stalls the burst rather
than losing data. The memory port:

* `ld_req`/`ld_addr` are held until `ld_gnt`;
* the data returns in request order on `ld_rvalid`/`ld_rdata`, with any
  latency.

**Store unit.** It writes `B` to address `A + C` once all three operands are
present. The request is held until `st_gnt`. With A and C kept as constants, a
stream of stores needs only the data transport. Addresses count words.

**Register/constant unit.** It has sixteen registers, all reset to zero. The
register number is in the transport's control bits. A read in the cycle of a
write returns the old value. The constant source turns its four source control
bits into a sign-extended constant, so small constants need no register and no
memory.

## Top-level interface (`synzen_top`)

The main processor side:

* it writes the instruction memory through `imem_we`/`imem_waddr`/`imem_wdata`;
* it pulses `start` with `start_pc`;
* it waits for `done`, which a `BR_HALT` raises.

The data side is three load ports (`ld_*`, arrays of three) and one store
port (`st_*`). The memory management unit and data memory behind them are
outside this design.

| parameter | default | meaning |
|---|---|---|
| `W` | 32 | data width |
| `RB_DEPTH_P` | 4 | ring-buffer entries per unit |
| `AW` | 8 | instruction-memory address bits (256 instructions) |
| `SRC_CONN`, `DST_CONN` | see `synzen_pkg` | switch pattern of the network |

## Where this design departs from, or fills in, the architecture description

These come from the architecture description:

* the unit mix and counts, and the six buses;
* 8 source and 19 destination codes;
* the 16-bit transport operation (5+4 destination bits, 3+4 source bits) and
  the branch field beside it;
* the register file of 16 entries;
* the two direct-coupling links;
* constant storing and result sharing in every function unit;
* burst loads;
* the one-cycle static and two-cycle dynamic branches;
* multiplexer-based port selection (the centralized form);
* a partially connected network.

These are this design's own choices:

* Unit numbering starts at 0. The architecture's first and second ALU are
  `ALU 0` and `ALU 1` here, so its links "multiplier → first ALU" and
  "first ALU → second ALU" are `u_mul → u_alu0` and `u_alu0 → u_alu1`.
* The data width, the ring-buffer depth and the instruction-memory depth.
* All control-bit encodings, the operation sets and the branch conditions,
  including `BR_HALT`.
* The 19th destination code, used as the "empty slot" marker. The units
  account for 18 destination ports.
* The switch pattern. It follows the stated rule but is not a copy of the
  original connection matrix.
* Which operand register each bypass writes: backcoupling → A, coupling → B.
* Chaining state set at transport time, carried on operand B, and ended by
  `CH_ANNUL` or by a write to A.
* The meaning of the second register-unit output (constant source), of the
  store unit's third operand (offset) and of the load unit's second operand
  (burst length).
* The whole-instruction stall rule, the same-cycle branch-operand bypass and
  the handling of illegal transports.
* The start/halt/done handshake and the request/grant memory ports.

Not built:

* the transport-controlled three-port branch unit;
* the peripheral form of port selection;
* datapath serialization of the network;
* conditional transports.

The architecture mentions these only as alternatives or future work.

## Files

| file | content |
|---|---|
| `rtl/synzen_pkg.sv` | sizes, port numbering, instruction and transport formats, encodings, default switch pattern |
| `rtl/synzen_top.sv` | the coprocessor |
| `rtl/instr_fetch.sv` | PC, instruction memory, instruction register |
| `rtl/xbar_net.sv` | six-bus network: per-bus source multiplexers, per-port bus multiplexers, issue condition |
| `rtl/func_unit.sv` | ALU/multiplier unit: operand registers, firing, hard chaining |
| `rtl/alu_core.sv`, `rtl/mul_core.sv` | datapaths |
| `rtl/ring_buffer.sv` | output buffer with shared entries |
| `rtl/regconst_unit.sv` | register file and constant source |
| `rtl/bpu.sv` | branch unit |
| `rtl/load_unit.sv`, `rtl/store_unit.sv` | memory units |
| `tb/tb_<module>.sv` | one self-checking testbench per module |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and ends on its own. Each
has a watchdog. For example:

```
verilator --binary --timing --assert -Wno-fatal --top-module tb_synzen_top \
    -y rtl -y tb +libext+.sv rtl/synzen_pkg.sv tb/tb_synzen_top.sv
./obj_dir/Vtb_synzen_top
```

`tb_synzen_top` runs the coprocessor at its default parameters. It plays the
main processor, and a data memory with random grants and a two-cycle load
latency. It runs a program three times, with fixed and then random vectors.
The program contains:

* a dynamic branch over an instruction that must not execute;
* the multiply-accumulate above, with loads that wait for ring-buffer space;
* a count-down loop through the register file, with a kept constant, a shared
  result read twice and a conditional branch;
* a chain over the ALU 0 → ALU 1 link;
* a ring buffer filled until its ALU stalls;
* a halt.

It checks the data memory and the registers. It counts every mechanism and
fails if one never happens. It also checks that no cycle of a run passes
without an instruction in the register, so taken branches really cost nothing.
A run takes about 85–90 cycles for 46 instructions.

The unit testbenches compare against models in the testbench:

* `tb_xbar_net` and `tb_ring_buffer` use random traffic;
* `tb_alu_core` and `tb_mul_core` check against exact arithmetic;
* `tb_load_unit` and `tb_store_unit` use memories with random grants and
  latencies;
* `tb_func_unit` runs a directed sequence for each chaining mode, then a
  random stream of operations against a reference ALU;
* `tb_bpu` runs directed sequences for each branch form;
* `tb_instr_fetch` follows a model PC through random stalls and branches.

## How far it can be trusted

* Every testbench passes at the default parameters. The end-to-end testbench
  needs no parameter overrides.
* Each testbench has also been run against a copy of its module with one
  deliberate bug. Each run reported failures. The bugs were:
  * a shared ring-buffer entry removed on first read;
  * a signed compare made unsigned;
  * a burst address that does not advance;
  * the multiplier → ALU coupling switched off;
  * and similar single changes.
* The RTL goes through generic synthesis without latches. The result is about
  1800 cells and 2300 flip-flop bits. The instruction memory adds 256 × 109
  memory bits, and the ring buffers and register file add the rest. This is a
  size indication only; no FPGA place-and-route has been done.
* The architecture description gives no reference programs, results or
  cycle counts. Nothing here has been compared against published numbers.

## Limits

* Correctness of a program is the programmer's business. The hardware does
  not check whether a chaining mode is still set when a program expects
  otherwise. Nor does it check whether a result left in a ring buffer is later
  read by the wrong transport. An assertion flags transports the network
  cannot carry.
* The multiplier is a single-cycle combinational 32×32 product. On an FPGA
  it would normally be pipelined, which this RTL does not do.
* Clock frequency on the FPGA target is unknown. The longest path runs
  through the network decoder, the issue condition and the operand-ready
  logic of all units. It has not been timed.
