# HEP: a processor-based logic emulation engine in SystemVerilog

This is an engine that emulates a synchronous digital design. It does not map
the design onto FPGA fabric gate for gate. The design is first compiled into
a list of 4-input look-up-table operations, and an array of 64 small
processors evaluates those operations one step at a time. Each processor,
called a *hybrid emulation processor* (HEP), has:

- a 4-input LUT,
- two 128x1 data memories,
- a 128-instruction program.

All 64 processors step through their programs in lock-step. In every step,
each processor can take in one bit produced by any processor. A pass through
the program (steps 0 to `last_step`, at most 128 steps) emulates one clock
cycle of the design. Bits that stay in the data memories from one pass to the
next play the role of the design's flip-flops. The engine has no routing,
placement or partitioning problem: a design that fits in 64 x 128 LUT
operations, scheduled in at most 128 steps, always fits.

The RTL follows a published architecture: a 64-processor module with a
non-blocking interconnect, a download manager, signal traps and an
interface to the target system. That source
gives the instruction set, field layout, state sequence, memory sizes and
timing. Where it leaves something open, or contradicts itself, this
implementation makes a choice. Every such choice is listed in
[Departures and choices](#departures-and-choices).

## Structure

```
hep_emulation_engine            top
├── hep_download_manager        streams the program into all control memories, then starts the processors
├── hep_target_io               target-system inputs into every processor, trapped values out
├── hep_emulation_module        N_PROC processors + interconnect bus
│   └── hep_processor  x N_PROC
│       ├── hep_program_counter        local copy of the global sequencer (7 bits)
│       ├── hep_control_mem (18 bit)   left control memory, 128 words
│       ├── hep_control_mem (38 bit)   right control memory, 128 words
│       ├── hep_data_ram               LDR, Local Data RAM, 128x1
│       ├── hep_data_ram               IDR, Input Data RAM, 128x1
│       └── hep_control_unit           9-state one-hot FSM + datapath registers
│           ├── hep_lut4               16x1 function table + 16:1 mux
│           └── hep_input_switch       64:1 node bit-in multiplexer
└── hep_signal_trap    x N_PROC        7-bit step comparator + capture flip-flop
```

`hep_pkg` holds the opcodes, the field positions, the word types and the
one-hot state encoding.

## The instruction word

Each instruction is a pair of words stored at the same step address. The left
word is 18 bits and the right word is 38 bits. The opcode is in `left[17:16]`.

| opcode | name   | what it produces                                   | left word                                   | right word used |
|--------|--------|----------------------------------------------------|---------------------------------------------|-----------------|
| `01`   | LUTOP  | `left[15:0]` indexed by the 4 operands             | `[15:0]` function table                     | operand addresses A `[6:0]`, B `[13:7]`, C `[20:14]`, D `[27:21]`; sources `[31:28]` (bit 28+k: 0 = LDR, 1 = IDR); node `[37:32]` |
| `11`   | RAMREF | one bit of LDR or IDR                              | –                                           | address `[6:0]`, source `[28]`, node `[37:32]` |
| `10`   | ROMREF | one static bit from the right control memory       | `[6:0]` word address, `[10:7]` bit address  | node `[37:32]`; bits `[15:0]` of the addressed word hold the data |
| `00`   | NOP    | nothing (output keeps its value)                   | –                                           | node `[37:32]` |

The LUT index is `{D,C,B,A}`, with operand A as the least significant bit.
For example, table `0001001000110100` with A..D = 1,0,1,0 gives index 5 and
output 1.

There are no jumps and no conditions. The only control flow is the program
counter wrapping from `last_step` back to 0.

## What happens in one step

This is the part that decides whether a compiled program is correct.

Every instruction takes exactly **9 system clocks**, whatever its type. That
keeps the 64 local program counters equal without any shared counter. The
control unit is a one-hot ring of nine states. The shorter instructions leave
some states idle.

| clock | state | LUTOP                         | RAMREF                 | ROMREF                               | NOP |
|-------|-------|-------------------------------|------------------------|--------------------------------------|-----|
| 1     | FETCH | left/right words at `pc` into the control registers (all) | | | |
| 2     | OPA   | table ← `left[15:0]`; read operand A | bit ← LDR/IDR[addr] | table ← right memory word `left[6:0]` | – |
| 3     | OPB   | read operand B                | –                      | bit ← table[`left[10:7]`]            | – |
| 4     | OPC   | read operand C                | –                      | –                                    | – |
| 5     | OPD   | read operand D                | –                      | –                                    | – |
| 6     | EVAL  | bit ← LUT output; **IDR[pc] ← node bit-in** (all) | | | |
| 7     | XFER  | –                             |                        |                                      |     |
| 8     | OUT   | **node_bit_out ← bit**; LDR[pc] ← bit | node_bit_out ← bit | node_bit_out ← bit; LDR[pc] ← bit | – |
| 9     | DONE  | `pc` advances, or wraps after `last_step` (all); signal traps sample | | | |

What this timing means for a program:

- **A bit from another processor is one step old.** IDR is written in
  clock 6, and outputs change only in clock 8. So in step *s*, a processor
  that selects node *n* stores in `IDR[s]` the bit processor *n* produced in
  step *s-1*. A value must be picked up in the step right after it is
  produced. It can be picked up later only if the producer executes NOPs in
  between, because a NOP keeps its output. This is why programs contain NOPs:
  a processor that needs several remote inputs spends several steps
  collecting them, one per step.
- **Operands are read before the step's own writes.** Reading address *s* in
  step *s* gives the value written at step *s* of the *previous* pass. In
  general, reading an address at or after the current step gives last
  cycle's value (a flip-flop output). Reading an earlier address gives this
  cycle's value (a combinational signal).
- **What is stored where:**
  - LDR holds the bits the processor produced (LUTOP and ROMREF results).
  - IDR holds the bits it received, written in every step, NOP included.
  - RAMREF results appear on the output but are not stored in LDR.
- **Clearing at reset:** the data memories are cleared by reset, so every
  emulated flip-flop starts at 0 after a download.

An emulated clock therefore takes `9 x (last_step + 1)` system clocks: at
most 1152.

## Interconnect

Processor *i* drives bit *i* of a 64-bit bus (`node_bits`). Each processor's
`hep_input_switch` selects any bit of that bus, its own included, with the
6-bit node address of the current instruction. Every processor has its own
selector, so no two transfers ever compete: the network is non-blocking. The
cost is 64 multiplexers of 64 inputs each, and a single pickup per processor
per step.

## Program download and start

`hep_download_manager` takes the program as a stream of (left, right) word
pairs with a valid/ready handshake:

- Order: processor 0 steps 0..127, then processor 1, and so on.
- A `dl_start` pulse begins a download, from any state.
- Each pair takes three clocks: accept, write, hold. A full download of
  64 x 128 pairs takes 24576 clocks, about 127 µs at 193 MHz.
- The processors are held in reset while idle and during the download. They
  are released together, with `dl_done` pulsing on the last reset clock.
  From then on `running` is high.

## Signal traps

Each processor has one `hep_signal_trap`. It compares the processor's
program counter with a reference step (`trap_ref[i]`). On a match, in the
last clock of that instruction, it captures the processor's node bit-out. So
`trap_q[i]` shows the value of one chosen emulated signal as of the last time
that step ran. `trap_hit[i]` pulses on each capture.

## Target-system inputs and outputs

An emulator stands in for a chip inside a real system, so the emulated
design needs live inputs. The processors cannot take these over the
interconnect: all 64 inputs of a processor's switch are processor outputs.
`hep_target_io` brings them in through the control memories instead.

- **Where the inputs go.** Each processor receives `IN_W` = 16 target input
  bits. The interface writes them into the right control word at
  `IO_ADDR` = 127, with a NOP left word, using the memory write port that
  the download manager uses for downloads. The emulated design reads an
  input with `ROMREF 127, bit k`, exactly as it reads a constant.
- **When they are written.**
  - Once in the clock where a download ends, so the first emulated clock
    already sees them.
  - Then in the last system clock of every emulation cycle.

  Each emulated clock therefore sees the inputs sampled at its start, and
  they stay constant during it. No control-memory read happens in that
  clock. An input that changes during emulated clock *k* is seen in clock
  *k+1*.
- **Reserved word.** A program must end before step 127, or leave it as the
  input word. It then executes as a NOP.
- **Outputs.** `target_out` is the trap values, registered one clock after
  each cycle ends, after the last step's capture. All outputs therefore
  change together, once per emulated clock. To drive a design output to the
  target, point a trap at the step where the output is produced.

## Top-level interface (`hep_emulation_engine`)

| port | dir | width | meaning |
|------|-----|-------|---------|
| `clk`, `rst` | in | 1 | system clock; synchronous engine reset (active high) |
| `dl_start` | in | 1 | begin a program download |
| `prog_valid`, `prog_ready` | in/out | 1 | stream handshake; a pair is taken on a clock with both high |
| `prog_left`, `prog_right` | in | 18 / 38 | instruction word pair |
| `dl_done`, `loading`, `running` | out | 1 | download finished (pulse); download in progress; processors executing |
| `last_step` | in | 7 | last step of an emulation cycle |
| `trap_ref` | in | `[N_PROC]` x 7 | reference step per signal trap |
| `trap_q`, `trap_hit` | out | N_PROC | trapped values; capture pulses |
| `node_bits` | out | N_PROC | all processor outputs (the interconnect bus) |
| `step` | out | 7 | current step (processor 0's program counter) |
| `cycle_done` | out | 1 | pulses in the last clock of each emulation cycle |
| `target_in` | in | `[N_PROC]` x IN_W | target-system inputs, written to word IO_ADDR of each processor |
| `target_out` | out | N_PROC | trapped values, updated once per emulated clock |

The parameters are:

- `N_PROC`, the number of processors (default 64, at most 64),
- `IN_W`, the inputs per processor (16, at most 16 readable by ROMREF),
- `IO_ADDR`, the input word (127).

The program depth (128), the word widths and the 9-clock cycle are fixed by
the instruction format in `hep_pkg`.

## Mapping a design: the multiplier example

`tb_hep_workload_multiplier` compiles a small sequential design by hand
rules and runs it on the full-size engine. The way it lays out a program
shows one workable convention for flip-flops and interconnect.

The design is a 4x4 shift-and-add multiplier:

- Ports: multiplicand, multiplier, Start, and an 8-bit product.
- Start begins a multiplication when idle. done stays set until Start is
  lowered.
- State: 16 flip-flops:
  - A[3:0], the multiplicand,
  - P[7:0], the product and shift register,
  - a 2-bit iteration count,
  - busy and done.

Its logic is 30 four-input LUTs: an add-and-gate chain plus the next-state
multiplexers. The primary inputs are 9 constant bits.

The program layout, for an emulation cycle of 25 steps:

1. **Steps 0–16: publish last clock's state.**
   - In step *f*, the processor that computes flip-flop *f*'s next state
     executes a RAMREF. The RAMREF reads the LDR word where that next-state
     LUT left its result in the previous pass.
   - In step *f+1*, every processor selects that processor's output. Every
     processor therefore holds the whole state in `IDR[1..16]` for the rest
     of the cycle.
   - Because the RAMREF comes before the LUT that overwrites the word, the
     value read is last clock's value.
2. **Step 17 on: evaluate the logic, in dependency order.**
   - A LUT whose inputs were produced on the same processor reads them from
     LDR.
   - An input from another processor must be picked up in the step right
     after it was produced, into IDR at that step. The LUT then reads it
     from there.
   - Each processor has one pickup per step, so two remote inputs produced
     in the same step cannot both go to one processor. The placement has to
     avoid that.
   - The next-state LUTs are just the last LUTs of this phase. What they
     leave in LDR becomes the state for the next pass.
3. **Inputs.** Each primary input is a ROMREF of one bit of the input word
   (address 127), which the target I/O interface refreshes every emulated
   clock. The testbench plays the target system. It downloads once, then
   raises Start with new operands, waits for done and lowers Start, eight
   times.

With a greedy placement (earliest feasible step, fewest new pickups), the
netlist occupies 15 processors and 25 steps. Seventeen of those steps are
the state broadcast. A scheduler that sends flip-flop values only to the
processors that read them would need far fewer: published results for a
4x4 multiplier on this architecture report 14 steps. The testbench checks
every flip-flop after every emulated clock against a behavioural model, and
the final product against the arithmetic one.

## Capacity

The engine has 64 x 128 = 8192 LUT slots, and a program of at most 128 steps
per emulated clock. The ten largest MCNC benchmark circuits, once mapped to
4-LUTs and scheduled, need between 802 and 7362 LUTs and between 27 and 121
steps, so all of them fit. The largest step count is 121, which comes to 1089
system clocks per emulated clock. A small 4x4 sequential multiplier needs 99
LUTs in 14 steps. These figures come from the mapping and scheduling
published for this architecture. The scheduler itself is software and is not
part of this repository.

Speed follows from the same count. Processor clocks of 193 to 301 MHz have
been reported for FPGA builds of this architecture. With a full 128-step
program, 1152 system clocks per emulated clock give an emulated clock of
about 168 to 262 kHz. A shorter program runs proportionally faster. No
timing analysis has been run on this RTL.

One of those builds split the 64 processors over two FPGAs, 32 in each. This
RTL holds all `N_PROC` processors in a single module. It does not model a
link between devices.

## Departures and choices

Where the source description is silent or inconsistent:

- **One fixed 9-state cycle for all instructions.** The source lists a
  separate state sequence for each instruction:
  - RAMREF has 4 states.
  - ROMREF has 5 states.
  - NOP has 3 states.

  It then says they were combined into 9 one-hot states, with the counter
  advancing every 9 clocks. This implementation places each sequence's
  actions on the nine LUTOP slots, as shown in the table above. The program
  counter advances in the 9th clock for every instruction. In the source it
  advanced in the 7th, 3rd or 5th state of the sequence.
- **Operand source bits and operand addresses come from the right word**
  (bits 31:28 and 27:0). One passage of the state description says these are
  taken from the left word. That cannot hold, because the left word has only
  18 bits.
- **NOP does not write LDR.** One general statement says LDR is written in
  every instruction except RAMREF. The NOP state sequence writes only IDR,
  and NOP produces no output, so that sequence is followed.
- **Data memories are cleared by reset.** The source does not say what they
  hold at start-up.
- **Memories have asynchronous read and synchronous write**, in
  distributed-RAM style. The source avoided vendor memory blocks, and its
  read waveforms change together with the address.
- **The download manager's protocol is this design's own.** Its stream order
  and handshake are not given by the source. The three clocks per word are
  inferred from the source's upload time (127 µs for the Virtex-II build)
  and from its write waveforms. The source's Virtex-4 figure of 77 µs does
  not match 24576 clocks at 301 MHz (81.6 µs), so that figure is not
  reproduced.
- **Signal-trap clocking.** The source's trap clocks its flip-flop with the
  comparator output. Here the flip-flop runs on the system clock, with an
  enable in the last clock of the step.
- **Emulation-cycle length is an input.** `last_step` (the "predetermined
  maximum step") and the trap reference values are top-level inputs; the
  source does not say how they are set.
- **The target I/O interface is this design's own.** The source gives only
  its task: sample the target system and hand the samples to the processors
  in the right emulation cycles. Writing them into a reserved control word
  at run time departs from the statement that the control memories are
  loaded only once. The alternative would be an extra input path into every
  processor, which the source does not have.
- **Not built:**
  - The emulation supervisory unit, which halts the processors.
  - The read-back of trapped values.
  - The compiler and scheduler that produce programs.

## Simulation

Every file in `rtl/` and `tb/` holds one module or package. Every testbench
is self-checking and ends with a `TB_RESULT checks=N failures=M` line. Build
a testbench with Verilator, the package first, for example:

```
verilator --binary --timing --assert -Wno-fatal -Irtl -Itb -y rtl -y tb \
    rtl/hep_pkg.sv tb/hep_tb_pkg.sv tb/tb_hep_emulation_engine.sv \
    --top-module tb_hep_emulation_engine
./obj_dir/Vtb_hep_emulation_engine
```

- `tb/hep_tb_pkg.sv` is an instruction-level reference model of a whole
  emulation module. It executes each step for all processors, using only the
  instruction-set rules above. The processor, module and engine testbenches
  compare every node bit-out after every instruction against it.
- `tb_hep_emulation_engine` runs at full size (64 processors, 128 steps, no
  parameter overrides) and takes well under a minute. It runs in two parts:
  1. A random program is downloaded through the stream interface, with gaps
     in the stream. Three full emulation cycles run with all 64 traps
     checked. Every processor also reads the target inputs with ROMREF. The
     inputs change after the first cycle, and the test checks that the
     change takes effect exactly one emulated clock later. `target_out` is
     checked after every cycle.
  2. While the engine runs, a new program is loaded: a 4-bit counter held in
     processor 0's LDR. Its bits are sent over the interconnect to processor
     1, which computes their parity. A ROMREF constant runs on processor 2
     and a RAMREF copy of the low bit on processor 3. The traps are checked
     against `count = k mod 16` over 20 emulated clocks.

  Every emulation cycle must last exactly `9 x (last_step + 1)` clocks. Each
  mechanism is counted, and the test fails if one never occurs:
  - stream gaps,
  - downloads and reloads,
  - each instruction type,
  - remote bit-ins,
  - reads of previous-cycle state,
  - wraps of both cycle lengths,
  - trap captures,
  - input writes and output updates.
- `tb_hep_workload_multiplier` runs the multiplier described above at full
  size, from a single download. It starts with an idle stretch with Start
  low, then runs 8 operand pairs, and compares the bus with the reference
  model after every instruction.
- The unit testbenches (`tb_hep_lut4`, `tb_hep_input_switch`,
  `tb_hep_data_ram`, `tb_hep_control_mem`, `tb_hep_program_counter`,
  `tb_hep_signal_trap`, `tb_hep_control_unit`, `tb_hep_download_manager`,
  `tb_hep_target_io`)
  each check their block against values computed in the testbench. For the
  LUT, the switch and the control memories, those values include the
  published example waveforms. The control-unit test checks the clock in
  which each write, the counter advance and the output change happen.

Assertions in the RTL check three things:

- the state register stays one-hot,
- all processors of a module wrap together,
- downloads and input writes never use the memory write port in the same
  clock.
