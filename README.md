# Branching CGRA with pipelined program counters

Most coarse-grained reconfigurable arrays (CGRAs) are driven by one global
modulo counter. Every unit replays the same `II`-cycle schedule forever,
where II is the initiation interval. An application with several execution
modes must therefore predicate all of them into one schedule, and
instructions on inactive paths waste issue slots. Two examples are a
detector that usually searches and only sometimes runs an expensive
localisation, and a wavelet transform with eight phases.

This array removes that restriction without making every cluster a
processor. Each **domain** (a small cluster of ALUs, LUTs, memory and a
register file) has its own 8-bit program counter. Only one domain, the
**leader**, decides what runs next. At the end of every iteration of the
current mode it either repeats the mode or branches to another. Each other
domain copies a neighbour's program counter a fixed number of cycles later.
So every domain follows the leader's exact sequence of modes, shifted by a
constant **offset**. One loop iteration is spread over domains with
different offsets. Different domains can be executing different iterations,
even of different modes, at the same moment. Prologue and epilogue code is
not needed: after the leader moves on, or stops, the later domains finish the
iterations already started.

The RTL is written in SystemVerilog and targets Verilator 5 and Yosys with
the slang front end.

## Contents of a domain

| resource | count | notes |
|---|---|---|
| ALU, 32 bit | 2 | single cycle; multiply takes two cycles |
| 4-input LUT | 2 | on the 1-bit network |
| data memory | 1 | 4 KB = 1024 × 32 bit, synchronous read |
| register file | 1 | 8 × 32 bit, ordinary (not rotating) |
| program counter | 1 | 8 bit, so up to 256 instructions per domain |
| input / output stream port | 1 / 1 | |
| instruction store | 1 | 256 instructions |
| word crossbar, bit crossbar | 1 / 1 | all outputs registered |
| switch box | 1 | 5 word + 5 bit tracks per direction, registered |
| retiming chain | one per incoming track | 0..3 cycles, set statically |

The default array is 5 × 5 domains (`ops_cgra_top`, parameters `ROWS` and
`COLS`). The per-domain composition is fixed in `ops_pkg`.

## The two networks

The **word network** carries 33-bit values: 32 data bits and a *valid* bit.
An ALU result is valid only if the operands it used were valid. A register
file write happens only when the arriving word is valid. A memory write needs
a valid address, valid data and a set write-enable bit. Because of this, a
value that was never produced, for example in a mode that did not run, does
not overwrite state.

The **bit network** carries single bits: LUT inputs and outputs, ALU flags,
the ALU control input (used by `SEL`), the memory write enable and the
branch input of the program counter.

Every multiplexer output is a register. That fixes the timing that a mapping
must respect:

- **Inside a domain**, a unit's result reaches another unit's input register
  in the same cycle. It can be used in the next cycle, so single-cycle
  operations can be chained back to back.
- **To a neighbour**, a value takes three cycles:
  1. It is registered in one of two crossbar *exit* ports.
  2. The switch box registers it onto an outgoing track.
  3. The neighbour passes it through its retiming chain (0 cycles at least)
     and registers it into a unit input.
- **Through a domain** that only passes the value on, each hop adds one
  switch-box register. The pass-through domain must be executing, because
  its switch box is configured by its current instruction.
- The **retiming chain** (0..3 cycles) on each incoming track lines up
  arrivals with the issue slot of the receiving domain. This matters because
  that domain runs at a different offset.

Unit latencies, counted from the cycle an instruction issues the operation to
the first cycle an instruction can route the result:

| operation | result routable in |
|---|---|
| ALU (not multiply), LUT | same cycle |
| multiply | next cycle |
| memory read | next cycle (address registered one cycle earlier) |
| register file read | same cycle (address comes from the instruction) |

## Program counters, modes and offsets

`ops_pc_unit` has four roles, set in the domain's static configuration:

- **Leader.** A mode is a range of instructions `base..last`, so its II is
  `last - base + 1`. The counter steps through the range. At `last` it jumps
  to the `base` of `next_t` if the branch bit is 1, or of `next_nt` if it is
  0; the next mode can be the same one. The mode table has 8 entries, each
  with two successors. This encodes a mode transition graph whose modes
  have at most two successors. Issuing starts in `start_mode` when `run`
  rises and stops when `run` falls.
- **Follower.** Outputs the program counter of neighbour `pc_src`, delayed
  by `pc_delay` (1..8) cycles. The domain's offset is its source's offset plus
  `pc_delay`. Offsets grow along a tree rooted at the leader, which has
  offset 0.
- **Modulo.** A free-running counter over one mode that ignores the branch
  bit. It is used for ordinary modulo-scheduled mappings. A leader whose only
  mode loops to itself behaves the same way for the whole array.
- **Idle.** Never valid.

A domain whose program counter is not valid executes the all-zero
instruction. That instruction is a no-operation: nothing is routed, written,
popped or emitted.

**The branch bit** is read from the bit-crossbar register at the moment the
leader is in the last slot of an iteration. That register was loaded by the
previous instruction. A condition therefore has to be computed and routed to
`PCBR` by the second-to-last slot. In practice the operands of the test are
routed in the last slot of the *previous* iteration. For example, an ALU can
look at the input stream word before it is popped.

### Thinking in offsets

Say a domain has offset `d` and the leader issued instruction `p` at cycle
`t`. Then that domain issues `p` at cycle `t + d`. Take a domain at offset
`d1` whose slot-`s` instruction routes a value to an exit port. Its slot
`s + 1` instruction must put the exit on a track. A neighbour at offset `d2`,
with retiming delay `r` on that track, must route the value from the track in
its slot `s + 2 + r − (d2 − d1)`, counted from the start of the same
iteration. Each pass-through domain adds 1. That slot can fall past the end
of the iteration. It then belongs to the *next* iteration, whose mode is only known at run time. The receiving instruction therefore
has to be present in the matching slot of **every** mode that can follow. The
same applies to a multiply or memory read issued in a mode's last slot. The
example below uses this deliberately: domain 3 emits each result in the first
slot of the mode that follows mode C.

A value that must outlive an unknown number of iterations is parked in a
register file. The valid bit decides when it is written, and it can be read
any number of times.

## Instructions and configuration

`instr_t` (in `ops_pkg`) holds one cycle's configuration:

- `wsel[sink]`: source of each word-crossbar sink.
  - Sinks: ALU0 A/B, ALU1 A/B, memory address, memory data, register-file
    write, output stream, exit 0/1.
  - Sources: none, the constant, ALU0, ALU1, memory, register file, input
    stream, the 20 incoming tracks.
- `bsel[sink]`: source of each bit-crossbar sink.
  - Sinks: ALU0/1 control, 4 inputs of each LUT, memory write enable, branch,
    exit 0/1.
  - Sources: 0, 1, ALU0/1 flag, LUT0/1, the 20 incoming bit tracks.
- `sbw`, `sbb`: source of each outgoing word/bit track. Each track can take
  nothing, any incoming track, or an exit port.
- `alu_op[2]`, `lut_tt[2]`, `rf_raddr`, `rf_waddr`, `sin_pop` and one 32-bit
  constant `imm`.

Incoming track `(dir, t)` is numbered `dir*5 + t`, with N = 0, E = 1, S = 2,
W = 3. The ALU operations are NOP, PASS, ADD, SUB, MUL, AND, OR, XOR, SHL,
SHR, SRA, EQ, LT, LTU, SEL and MAX. An ALU's flag is 1 when its result is
valid and nonzero.

The static configuration `static_cfg_t` holds:

- the program-counter role, source neighbour and delay;
- the start mode and mode table;
- the retiming delay of every incoming track.

Both are loaded through the top-level bus (`cfg_we`, `cfg_dom`,
`cfg_static`, `cfg_addr`, `cfg_instr`, `cfg_scfg`) before `run` is raised.
Nothing is reconfigured while the array runs.

## Stream ports

The **input port** is a one-word buffer with a valid/ready handshake toward
the producer. An instruction with `sin_pop` consumes the word. The word is
visible to the crossbar before it is popped, so it can be inspected a cycle
early. Popping an empty buffer gives an invalid word and pulses
`sin_underflow`.

The **output port** emits each valid word routed to it, one cycle later. The
schedule cannot stall, so a word emitted while `sout_ready` is low is lost
and sets the sticky `sout_overflow` flag.

## Worked example (`tb/tb_ops_cgra_top.sv`)

Each input packet is `v1 … vk 0`. For each packet the array outputs
`3·Σv` and stores it in memory. The example uses the mode graph
A → B, B → B | C, C → A with IIs 2, 2 and 3, preceded by a one-cycle init
mode I. It also runs an independent modulo-scheduled domain.

| domain | position | role, offset | work |
|---|---|---|---|
| 0 | (0,0) | leader, 0 | pops a word per A/B iteration and sends it east; `word == 0` → branch to C |
| 1 | (0,1) | follower, 3 | running sum in a 2-cycle ALU0 → ALU1 loop; west retiming 2; sends the sum in C |
| 2 | (0,2) | follower, 4 | pass-through west → east |
| 3 | (0,3) | follower, 6 | ×3 (multiply), stream out, `mem[packet#] =`; packet counter in its register file |
| 12 | (2,2) | modulo, II 2 | stream → memory → stream |

The testbench checks:

- every result and memory word;
- the followers' counters against the leader's, delayed by 3, 4 and 6 cycles;
- the distance between results, which must be `5 + 2k` cycles.

It also confirms that each of these happened at least once: a mode switch,
an inter-domain transfer, a pass-through, retiming, a multiply, a register
file write, a memory write, a memory read, a stream word, modulo counting,
and a result produced after the leader had already stopped (epilogue).

## Two smaller scenarios

`tb/tb_ops_fig5_join.sv` uses a 1 × 2 array and the graph
A → (B | C) → D → A:

- A produces `x`. The branch goes to C when `x` is odd and to B otherwise.
- The follower domain parks `x` in a register for D.
- It computes `y` in B (`x + 100`) or in C (`2x`) into one shared register.
- D reads both registers.

Here `y` has two producers on two paths, and both must end up in the same
place. The join costs nothing in hardware: both producers write the same
register, with the same read configuration afterwards, and the valid bit
ensures that only the path that actually ran writes it.

`tb/tb_ops_ort_fig1.sv` records when a leader and a follower at offset 2
issue the slots of three modes with IIs 2, 3 and 1. It rebuilds the
offset reservation table from simulation. The leader's slots are at 0..II−1
and the follower's are the same slots 2 cycles later.

## Files

| file | block |
|---|---|
| `rtl/ops_pkg.sv` | sizes, source/sink codes, `instr_t`, `static_cfg_t` |
| `rtl/ops_cgra_top.sv` | the array (top) |
| `rtl/ops_domain.sv` | one domain |
| `rtl/ops_pc_unit.sv` | program counter: leader/follower/modulo |
| `rtl/ops_config_mem.sv` | 256-entry instruction store |
| `rtl/ops_xbar.sv` | registered crossbar (word, bit, switch box) |
| `rtl/ops_alu.sv`, `ops_lut4.sv`, `ops_mem.sv`, `ops_regfile.sv` | units |
| `rtl/ops_retime.sv` | 0..3 cycle retiming chain |
| `rtl/ops_stream_in.sv`, `ops_stream_out.sv` | stream ports |
| `tb/tb_<module>.sv` | self-checking testbench of each module |
| `tb/tb_ops_fig5_join.sv`, `tb/tb_ops_ort_fig1.sv` | the two scenarios above |
| `tb/ops_tb_pkg.sv` | helpers for writing instructions by hand |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M`. Example for the full
array at its default size. The build takes about 40 s; the run takes under a
second.

```
verilator --binary --timing --assert -Irtl -Itb \
  rtl/ops_pkg.sv tb/ops_tb_pkg.sv tb/tb_ops_cgra_top.sv \
  --top-module tb_ops_cgra_top -Mdir obj -o sim
./obj/sim
```

For a unit, replace the testbench and top module, for example
`tb/tb_ops_pc_unit.sv` with `--top-module tb_ops_pc_unit`.

## What is specified and what is chosen here

**Taken from the architecture this design implements:**

- the pipelined program counter scheme: one leader, followers taking the
  counter from an adjacent domain, each offset larger than the offset of the
  neighbour it follows;
- II-long iterations that repeat or branch;
- the modulo-counter option;
- the domain's resource mix and sizes;
- single-cycle ALU operations, except for the two-cycle multiply;
- the 0..3 cycle retiming chains at the domain inputs;
- the registered multiplexer outputs;
- the separate 32-bit-plus-valid network and 1-bit network, and what each
  connects;
- tracks made of a word and a bit in each direction;
- the three-cycle neighbour latency;
- the 8-bit program counter with 256 instructions;
- register file writes enabled by the valid bit;
- standard (not rotating) register files.

**Chosen here, where the architecture leaves it open:**

- the ALU operation set and flag;
- the valid-propagation rule;
- the crossbar source and sink lists;
- two exit ports per width;
- full crossbars;
- the switch-box organisation;
- 5 tracks per direction;
- the mode-table encoding: 8 modes with two successors chosen by one branch
  bit;
- a maximum offset step of 8;
- the synchronous memory read;
- one read and one write register-file port;
- the stream-port handshakes;
- the configuration bus;
- static (not per-instruction) retiming delays;
- the 5 × 5 mesh.

## Limits

- **Track count.** The mappings that motivated the architecture needed about
  5 tracks on average, but up to 20 on the smallest devices. With 5 tracks,
  such mappings do not fit. Raise `TRACKS` in `ops_pkg` for them.
- **Mode table.** A mode with more than two successors needs a wider branch
  input and a larger table.
- **No mapping tools.** There is no scheduler, placer or router.
  Configurations are written by hand, as in the testbenches. The benchmark
  applications the architecture was evaluated with (Bayer filter, DCT, DWT,
  k-means, PET event detection) have not been mapped or simulated.
- **No collision checks.** The hardware does not detect a multiply result
  that collides with a single-cycle result of the same ALU, or a schedule
  that reads a stream word that is not there. Only the stream ports flag
  their own errors.
