# An 8-bit accumulator processor with an eight-phase instruction cycle

This is a small load/store processor of the classic teaching kind. It has one
data register, the accumulator, and a 32 x 8-bit memory that holds program and
data together. Every instruction is one 8-bit word: a 3-bit opcode and a 5-bit
memory address. The main idea is uniform timing. Every instruction takes the
same eight clock cycles: four to fetch the word and four to execute it. One
combinational decoder therefore drives the whole machine from two inputs, the
current phase and the opcode.

The RTL is synthesizable SystemVerilog (IEEE 1800-2017) with a single clock.
It follows a published design description: the block structure, the opcode
table, the control table and the behaviour of each block. Where that
description is silent or could not be followed literally, this implementation
makes its own choice. Those choices are listed in
[Departures and choices](#departures-and-choices).

## Instruction set

| opcode | mnemonic | effect |
|-------:|----------|--------|
| `000` | HLT | stop; `halt` rises and stays high until reset |
| `001` | SKZ | if the accumulator is zero, skip the next instruction |
| `010` | ADD | `acc <= acc + mem[a]` (8-bit result, carry dropped) |
| `011` | AND | `acc <= acc & mem[a]` |
| `100` | XOR | `acc <= acc ^ mem[a]` |
| `101` | LDA | `acc <= mem[a]` |
| `110` | STO | `mem[a] <= acc` |
| `111` | JMP | `pc <= a` |

`a` is the instruction's bits 4:0 and the opcode is bits 7:5. There are no
flags other than "accumulator is zero", no carry and no stack. Execution starts
at address 0, and the program counter wraps from 31 to 0.

## The eight-phase instruction cycle

The clock generator counts phases 0 to 7, one per `clk` cycle. It brings the
count out as three level signals, each the inverted bit of the counter:

| phase | name | `fetch` | `clk2` | `clk1` |
|------:|------|:-:|:-:|:-:|
| 0 | address setup | 1 | 1 | 1 |
| 1 | instruction fetch | 1 | 1 | 0 |
| 2 | instruction load | 1 | 0 | 1 |
| 3 | idle | 1 | 0 | 0 |
| 4 | address setup (execute) | 0 | 1 | 1 |
| 5 | operand fetch | 0 | 1 | 0 |
| 6 | ALU operation | 0 | 0 | 1 |
| 7 | store result | 0 | 0 | 0 |

`clk1` toggles every cycle, `clk2` every two cycles and `fetch` every four.
`fetch` changes only when `clk2` rises. The names come from the original
design, where these signals were divided clocks. Here they are ordinary
signals sampled on the rising edge of `clk`.

`fetch` also steers the address multiplexer. In phases 0 to 3 the program
counter addresses memory. In phases 4 to 7 the address field of the
instruction register does.

The decoder (`rtl/decoder.sv`) produces these controls. Each entry lists the
signals that are high in that phase:

| phase | all opcodes | ADD/AND/XOR/LDA | SKZ, acc = 0 | STO | JMP |
|------:|---|---|---|---|---|
| 0 | - | | | | |
| 1 | `mrd` | | | | |
| 2 | `mrd ldir` | | | | |
| 3 | `mrd ldir` | | | | |
| 4 | `pclk` | | | | |
| 5 | | `mrd` | | | |
| 6 | `aclk` | `mrd ldac` | `pclk` | | `ldpc` |
| 7 | | `mrd ldac` | `pclk` | `mwr` | `ldpc pclk` |

Several controls stay high for two phases: `ldir`, `ldac`, `ldpc` and `pclk`.
For three of them a repeated action is harmless, because the second load
stores the same value. `pclk` is different. It is the program counter's
increment, and in the original design it was the counter's clock. So a
two-phase SKZ pulse must count **once**. `program_counter` keeps the previous
value of `pclk` and increments only in the cycle where `pclk` rises. When
`ldpc` and `pclk` are high together, the load wins, which makes JMP work.

Here is one instruction step by step, ADD at address `a`:

* Phases 1 to 3: memory reads `mem[pc]`. The instruction register loads it at
  the ends of phases 2 and 3.
* Phase 4: the program counter increments.
* Phases 5 and 6: memory reads `mem[a]` onto the bus. At the end of phase 6
  the ALU registers `acc + mem[a]`, because `aclk` is high.
* End of phase 7: the accumulator takes the ALU result. The load at the end of
  phase 6 only rewrites the previous ALU result. That value always equals the
  accumulator, because the ALU passes the accumulator through for every
  non-ALU opcode.

The ALU result is registered, so the zero flag is **not** taken from it.
`zr` is `acc == 0`, computed combinationally. SKZ therefore tests the
accumulator as it stands when SKZ executes.

## The data bus and the IO buffer

The original design has one bidirectional 8-bit data bus. The memory drives it
on reads, and the IO buffer drives the ALU result onto it. The buffer's enable
is `not (mrd | fetch | clk2)`. With the phase code above, the buffer drives
only in phases 6 and 7 of instructions that do not read memory. That is exactly
where STO writes the accumulator. The ALU passes the accumulator through for
STO, and the memory writes the bus at the end of phase 7.

The RTL has no tri-state nets. `io_buffer` resolves the bus as a multiplexer:
the ALU result when the buffer drives, the memory's read data when the memory
drives, and zero otherwise. An immediate assertion in `io_buffer` reports any
cycle in which both would drive.

The original description also calls the IO buffer a queue between the processor
and outside devices, but it gives the queue no size and no interface. Only the
bus driver is built here.

## Reset, program loading and halt

* `rstreq` (active high) is registered into the internal active-low `rst`.
  While `rst` is low, every register is cleared and the phase counter is held
  at 0. The memory is not cleared.
* While `rstreq` is high, `ewr`/`ead`/`edat` write one memory word per `clk`.
  This external port is ignored while the processor runs.
* `rst` rises in the cycle after `rstreq` is released. That cycle is phase 0 of
  the first instruction, at address 0.
* A HLT instruction runs its eight phases. The phase counter then freezes in
  phase 7 and the `halt` output rises. Only `rstreq` restarts the processor.

## Blocks and files

| file | block |
|------|-------|
| `rtl/risc8_pkg.sv` | widths, `opcode_e`, `phase_e` |
| `rtl/clock_generator.sv` | phase counter, `clk1`/`clk2`/`fetch`, reset register, halt freeze |
| `rtl/decoder.sv` | control table |
| `rtl/instruction_register.sv` | opcode / address split |
| `rtl/program_counter.sv` | 5-bit PC with load and edge-counted increment |
| `rtl/multiplexer.sv` | PC or IR address to memory, by `fetch` |
| `rtl/memory.sv` | 32 x 8 array, combinational read, synchronous write, external load port |
| `rtl/alu.sv` | ADD/AND/XOR/LDA, pass-through, registered result, zero flag |
| `rtl/accumulator.sv` | 8-bit register |
| `rtl/io_buffer.sv` | bus driver and bus resolution |
| `rtl/risc8_top.sv` | the processor: `clk`, `rstreq`, `ead[4:0]`, `edat[7:0]`, `ewr` in, `halt` out |

Every file opens with a comment that describes its interface and timing. The
top has 17 IO bits, the same count as the original design's implementation.
The `halt` output is this implementation's choice for the seventeenth.

## Departures and choices

* **One clock edge.** The original design clocks the ALU on the falling edge
  with its own `aclk`, and drives the program counter from `pclk`. Here
  everything runs on the rising edge of `clk`. `aclk` is a one-cycle enable.
  `pclk` is edge-detected inside the program counter, which keeps its "one
  pulse, one count" meaning.
* **Zero flag.** The description stores `zr` together with the ALU result.
  Here it is combinational from the accumulator, so that SKZ is correct.
* **Phase code.** The polarity and order of `clk1`/`clk2`/`fetch` are chosen.
  The polarity of `clk2` is fixed by a requirement: the IO buffer must drive
  during STO's store phase.
* **Reset release.** The original releases `rst` at a particular `clk2` edge.
  Here `rst` follows `rstreq` one cycle later, and the phase counter is held at
  0, so the first instruction always starts cleanly.
* **Halt.** The description lists HLT as an opcode but does not say how the
  machine stops. The freeze in the clock generator and the `halt` output are
  this implementation's design.
* **Instruction timing.** The source's introduction speaks of one-cycle
  execution. Its control table, which this RTL follows, takes eight clock
  cycles per instruction.
* **Storage.** The original's implementation reports 296 registers. This one
  has 35 flip-flop bits plus the 256 memory bits, 291 in all.
* **Not built:** the IO buffer's queue (no size or interface given), and the
  timing and power figures of the original implementation. Those are
  tool-specific results: a 4.983 ns minimum period and 14.14 mW on an FPGA.

## Verification

Each block has a self-checking testbench in `tb/` (`tb_<block>.sv`). Each one
ends with a line `TB_RESULT checks=N failures=M` and has a watchdog:

* `tb_decoder` checks every phase, opcode and zero-flag combination against
  the control table typed in independently.
* `tb_clock_generator` checks the phase sequence, that `fetch` changes only
  when `clk2` rises, the reset release, and the halt freeze.
* `tb_program_counter` checks load priority, and that a held `pclk` counts
  once.
* `tb_alu`, `tb_accumulator`, `tb_instruction_register`, `tb_memory`,
  `tb_multiplexer` and `tb_io_buffer` use random or exhaustive stimulus
  against reference models in the testbench.
* `tb_risc8_top` runs the whole processor at its default size. It uses an
  instruction-level reference model in lockstep. At the start of every
  instruction it compares the PC and the accumulator, and it checks that each
  instruction takes exactly 8 cycles. After a halt it compares all 32 memory
  words and the total cycle count (`8 x instructions + 4`). It runs one
  directed program and 40 random programs. It also counts each mechanism: every
  opcode, a skip taken and not taken, a jump, a store, an ADD overflow, a halt,
  the IO buffer driving the bus and operand reads. Any mechanism that never
  occurs counts as a failure.

Simulate with Verilator 5, package first:

```sh
verilator --binary --timing --assert -Irtl rtl/risc8_pkg.sv \
    rtl/clock_generator.sv rtl/decoder.sv rtl/instruction_register.sv \
    rtl/program_counter.sv rtl/multiplexer.sv rtl/memory.sv rtl/alu.sv \
    rtl/accumulator.sv rtl/io_buffer.sv rtl/risc8_top.sv \
    tb/tb_risc8_top.sv --top-module tb_risc8_top -Mdir obj_top
./obj_top/Vtb_risc8_top
```

For a single block, give the package, the block's file and its testbench. The
whole-processor test finishes in well under a second.

## Changing it

The widths come from `risc8_pkg` (`DATA_W`, `ADDR_W`, `OP_W`). The
instruction format assumes `OP_W + ADDR_W == DATA_W`. A wider machine
therefore needs a wider word or fewer address bits, and both the decoder's
table and the testbench's reference model must change with it. To add an
opcode, edit `opcode_e`, the ALU's `case`, `is_alu_op` if the new opcode
writes the accumulator, and the decoder's phase table.
