# WileE240: a multi-cycle 16-bit processor in SystemVerilog

The WileE240 is a small teaching processor. It runs every instruction as a
sequence of simple register transfers through a single ALU. A state machine
(the *controlpath*) issues one 14-bit control word per clock cycle. A
datapath of eight general registers, a stack pointer, a program counter,
memory address and data registers, an instruction register and four condition
codes carries each word out. Program and data share one memory of 256 16-bit
words. A host computer loads this memory over a PC parallel port while the
processor is held in reset.

This RTL follows the original WileE240 datapath and control sequences state by
state. The original sources leave out some details: the numeric encodings, the
flag rules, the memory and its loader. Those details are this design's own
choices. The last sections list them.

## Machine state and instruction format

| Register | Width | Role |
|---|---|---|
| R0..R7 | 16 | general registers |
| PC | 16 | program counter, reset to 0 |
| SP | 16 | stack pointer, reset to 0; the stack grows downward and SP points at the top word |
| MAR | 16 | memory address; only bits [7:0] address the 256 words |
| MDR | 16 | memory data: written to memory, or loaded from it |
| IR | 16 | instruction register |
| CC | 4 | condition codes Z C N V (Z is bit 3, V is bit 0) |

An instruction is one 16-bit word, sometimes followed by one operand word:

```
 15   12 11        6 5    3 2    0
+-------+-----------+------+------+
| 0000  |  opcode   |  Ra  |  Rb  |
+-------+-----------+------+------+
```

Ra is the first operand. It is also the destination of every instruction that
writes a register. Rb is the second operand. After fetch the controlpath jumps
to the state whose 10-bit code equals IR[15:6]. Every opcode is therefore the
code of its instruction's first state (see "State encoding" below).

## Instruction set

Cycles include the four of fetch and decode. `imm` is the word after the
instruction. Instructions marked "cc" load all four condition codes from the
ALU.

| Opcode | Mnemonic | Operation | cc | Cycles |
|---|---|---|---|---|
| 00 | nop | (an all-zero word decodes straight back to fetch) | | 4 |
| 01 | ldi Ra, imm | Ra = imm | cc | 7 |
| 02 | add Ra, Rb | Ra = Ra + Rb | cc | 5 |
| 03 | sub Ra, Rb | Ra = Ra - Rb | cc | 5 |
| 04 | incr Ra | Ra = Ra + 1 | cc | 5 |
| 05 | decr Ra | Ra = Ra - 1 | cc | 5 |
| 06 | ldr Ra, Rb | Ra = mem[Rb] | cc | 7 |
| 07 | bra imm | PC = imm | | 7 |
| 08 | brn imm | if N: PC = imm | | 7 taken / 6 not |
| 09 | brz imm | if Z: PC = imm | | 7 / 6 |
| 0A | stop | halt; output `w` goes high | | - |
| 0B | brc imm | if C: PC = imm | | 7 / 6 |
| 0C | brv imm | if V: PC = imm | | 7 / 6 |
| 0D | and Ra, Rb | Ra = Ra & Rb | cc | 5 |
| 0E | not Ra | Ra = ~Ra | cc | 5 |
| 0F | or Ra, Rb | Ra = Ra \| Rb | cc | 5 |
| 10 | xor Ra, Rb | Ra = Ra ^ Rb | cc | 5 |
| 11 | cmi Ra, imm | flags of Ra - imm | cc | 7 |
| 12 | cmr Ra, Rb | flags of Ra - Rb | cc | 5 |
| 13 | ashr Ra | arithmetic shift right by 1 | cc | 5 |
| 14 | lshl Ra | shift left by 1 | cc | 5 |
| 15 | lshr Ra | logical shift right by 1 | cc | 5 |
| 16 | rol Ra | rotate left by 1 | cc | 5 |
| 17 | mov Ra, Rb | Ra = Rb | | 5 |
| 18 | lda Ra, imm | Ra = mem[imm] | cc | 9 |
| 19 | sta Rb, imm | mem[imm] = Rb (note: the **B** field) | | 9 |
| 1A | str Ra, Rb | mem[Ra] = Rb | | 7 |
| 1B | jsr imm | mem[--SP] = address after imm; PC = imm | | 10 |
| 1C | ldsf Ra, imm | Ra = mem[SP + imm] | | 9 |
| 1D | ldsp Ra | SP = Ra | | 5 |
| 1E | pop Ra | Ra = mem[SP++] | | 7 |
| 1F | push Ra | mem[--SP] = Ra | | 7 |
| 20 | rtn | PC = mem[SP++] | | 7 |
| 21 | stsf Ra, imm | mem[SP + imm] = Ra | | 9 |
| 22 | addsp imm | SP = SP + imm | | 7 |
| 23 | stsp Ra | Ra = SP | | 5 |
| 24 | neg Ra | Ra = -Ra (as ~Ra, then +1) | | 6 |

A taken branch, and `bra`, take their target from the operand word. An
untaken branch skips that word. `bra` and a taken branch do not advance PC
past the operand; they overwrite PC with it. The operation names, the register
transfers and the cycle counts follow the original. The opcode numbers are this
design's own.

## How an instruction runs: the control word

Each state drives one control word (`ctrl_t` in `wile_pkg`), most significant
field first:

| Bits | Field | Meaning |
|---|---|---|
| 13:10 | fn | ALU function: A, B, A+1, A-1, A+B, A-B, and, or, xor, not, ashr, shl, lshr, rol |
| 9:8 | a_sel | ALU input A: register port A, SP, PC or MDR |
| 7:6 | b_sel | ALU input B: register port B, SP, PC or MDR |
| 5:3 | dest | register that loads the ALU result: none, Ra, SP, PC, MDR, MAR, IR |
| 2 | cc_load | condition codes load the ALU flags |
| 1 | mem_rd | MDR loads mem[MAR] |
| 0 | mem_wr | mem[MAR] = MDR |

Each cycle, the ALU computes from the two selected sources. At most one
destination register takes the result on the clock edge. The MDR instead
takes the memory word when `mem_rd` is set. The state machine never asserts a
memory read and an MDR destination together. An assertion in `mdr_bus`
checks that.

The subtle part is memory timing. It decides which register values each step
sees:

* **Reads are combinational.** The word at MAR is always on the memory output.
  In a `mem_rd` state the MDR captures it at the end of the same cycle. So
  `fetch1` can increment PC and read the old PC's word in one cycle, because
  `fetch` put PC into MAR one cycle earlier.
* **Writes happen on the clock edge and use the MAR and MDR of that cycle.** A
  write state may already load MAR or MDR with something new; the write still
  uses the old values. `jsr` relies on this. Its states are:

| State | Transfer |
|---|---|
| jsr | SP = SP - 1 |
| jsr1 | MAR = SP |
| jsr2 | MDR = PC + 1 (the return address, past the operand word) |
| jsr3 | MAR = PC, **and** mem[old MAR] = MDR |
| jsr4 | MDR = mem[PC] (the operand word: the subroutine address) |
| jsr5 | PC = MDR |

* Conditional branches test the flags during their first state. An untaken
  branch then only increments PC past the operand.

Fetch is the same for every instruction: `fetch` (MAR = PC), `fetch1`
(PC = PC + 1, MDR = mem[MAR]), `fetch2` (IR = MDR), then `decode` (no
transfer; next state = IR[15:6]).

### State encoding

States are 10 bits wide: `{step[3:0], opcode[5:0]}`. The first state of an
instruction is step 0, so its code is the opcode. The following states count
the step up. Fetch, fetch1, fetch2 and decode are steps 0 to 3 of opcode 0.
A state code that no state uses returns to fetch. However, an
instruction word whose IR[15:6] names a later step of some instruction enters
that instruction mid-sequence. A correct program never does this.

### Condition codes

Z is set when the result is zero. N is result bit 15. C is the carry out of
additions (A+B, A+1). For subtractions (A-B, A-1, the compares) C is the
*borrow*, set when A < B unsigned. For the shifts and the rotate, C is the bit
shifted out. V is two's-complement overflow for the four arithmetic
functions. For a left shift V is a change of the sign bit. All other functions
clear C and V. The flags load only in states marked cc in the table above. So
`mov`, `pop`, `ldsf`, `neg` and the stack instructions leave them unchanged.
The original names the flags and their order (ZCNV) but does not define them.
These rules are this design's.

## Loading a program: the parallel port

The memory's loader is a peripheral for a PC printer port. The signal names
(`pport` data, `stbl` strobe, `ackl` acknowledge, `busy`, `pe` paper end,
`addr_p`, and the 25 MHz sampling clock `clk25`) are the original's. The
protocol below is this design's:

1. Keep `reset` high (CPU running) for at least three `clk25` cycles. The
   loader then rewinds to address 0 and drives `busy` high.
2. Pull `reset` low. The CPU is held, the loader enters load mode, and `busy`
   falls.
3. For each byte: wait for `busy` low, put the byte on `pport`, then pulse
   `stbl` low for at least three `clk25` cycles. The loader samples `stbl`
   through a synchroniser and latches the byte on its falling edge. It raises
   `busy` and later pulses `ackl` low for `ACK_CYCLES` (4) `clk25` cycles.
   `busy` falls when the pulse ends.
4. Bytes come in pairs, **high byte first**. Each pair is written to the
   memory word shown on `addr_p`, and `addr_p` then advances. After 256 words
   `pe` goes high; further bytes are acknowledged and dropped.
5. Raise `reset`. The CPU starts at address 0.

Words cross from the `clk25` domain to the CPU clock through a toggle
handshake. The loader holds address and data steady and toggles a request
line. The memory synchronises the toggle with two flops, writes the word, and
echoes the toggle back. The two clocks need no fixed relation. The memory
needs a few CPU clock cycles to follow a change of `reset`, so the CPU clock
should not be much slower than `clk25`.

## Module map

```
wilee240                 top: controlpath + datapath
├── controlpath          state machine, control word, stop flag w
└── datapath
    ├── reg_file         8 x 16 registers, read ports A, B, C, write at A
    ├── mux4 (x2)        ALU source selects
    ├── alu              14 functions, ZCNV flags
    ├── dest_decoder     destination code -> one load enable
    ├── mdr_bus          MDR input: ALU result or memory word, and its load enable
    ├── clocked_reg (x6) PC, MDR, MAR, IR, SP (16 bit), CC (4 bit)
    └── data_memory      256 x 16 memory
        └── parport_loader
wile_pkg                 shared types: ctrl_t, cc_t, alu_fn_t, opcodes, st(), instr()
```

Ports of the top: `clock`, active-low `reset`, `clk25`, the parallel port
(`pport`, `stbl`, `ackl`, `busy`, `pe`, `addr_p`), and `RegSelC`/`RegC` to read
any register. Brought out for observation: PC, IR, SP, MAR (`MemAddr`), MDR
(`MemData`), the ALU inputs and result, the register selects, the condition
codes, the control word, the current and next state, and `w` (high once
`stop` is reached).

All parameters default to the original sizes: 16-bit words, 8 registers and
256 memory words. The only parameter the original does not give is the
acknowledge pulse length, `ACK_CYCLES` (4).

## Simulating

Each testbench is self-checking and ends with a line
`TB_RESULT checks=N failures=M`. With Verilator 5, from the directory that
holds `rtl/` and `tb/`:

```
verilator --binary --timing --assert -Irtl -Itb rtl/wile_pkg.sv \
    tb/wile_iss.sv tb/tb_wilee240.sv -y rtl +libext+.sv \
    --top-module tb_wilee240 -o sim
./obj_dir/sim
```

Replace `tb_wilee240` with any other `tb/tb_*.sv`. Only `tb_wilee240` needs
`tb/wile_iss.sv`.

* `tb_wilee240` runs the whole processor at its default size. It downloads a
  complete 256-word image over the parallel port (so `pe` rises each time),
  runs the program to `stop`, and compares the result with an instruction-level
  reference model (`tb/wile_iss.sv`). The comparison covers all registers, SP,
  PC, flags, every memory word and the exact cycle count. It runs one
  hand-written program, which reaches all 37 opcodes, both outcomes of each
  conditional branch, a subroutine with a stack frame and a counted loop. It
  then runs twelve random programs with forward branches, subroutine calls,
  and stack and memory traffic. It fails if an instruction, a branch
  outcome, a download, the memory-full indication or a memory write never
  occurred. It takes a few seconds.
* `tb_controlpath` checks each instruction's sequence of destinations,
  memory strobes and CC loads, its cycle count, and both branch outcomes for
  each flag.
* `tb_datapath` loads four words through the port, then drives hand-written
  control words and checks each register transfer.
* `tb_alu`, `tb_reg_file`, `tb_mux4`, `tb_dest_decoder`, `tb_clocked_reg`,
  `tb_mdr_bus`, `tb_data_memory` and `tb_parport_loader` test the parts on
  their own, against models written separately from the RTL.

To write programs, use `instr(op, ra, rb)` from `wile_pkg`, as the top-level
testbench does.

## How far to trust it, and where it departs from the original

Everything here compiles cleanly in Verilator's lint and in Yosys (through
its slang front end) and synthesises without latches. The register
transfers, the state sequences, the datapath structure and the
control-word layout follow the original closely. The points below are
this design's decisions. Check them first if this RTL must match existing
WileE240 software or hardware:

* **Encodings.** Opcodes and state codes, ALU function codes, mux select codes
  and destination codes are all new. Binaries for another WileE240
  implementation will not run unchanged.
* **MDR load enable.** This design loads the MDR when it is the destination
  *or* when memory is read. The sequences need both: fetch reads into the
  MDR, and `push`/`jsr`/`sta` write the ALU result into it.
* **No internal tri-states.** The original drives the MDR input from two
  tri-state drivers. Here a multiplexer does it, and an assertion checks that
  the two sources are never enabled together.
* **Flag rules** (C as borrow on subtraction, C and V on shifts) are assumed;
  see "Condition codes".
* **Resets.** The condition codes and the general registers are cleared by
  reset like the other registers. SP starts at 0, so the first push goes to
  address 255.
* **Memory and loader.** The memory timing (combinational read, write on the
  clock edge) follows from the state sequences. The loader protocol, byte
  order, the meanings of `pe` and `addr_p`, loading under reset, and the
  clock-domain crossing are all invented here. The original's memory also had
  a build variant without the CPU clock; here the memory always writes on the
  CPU clock.
* **Halt.** In the original's simulation the `stop` state prints the cycle
  count and dumps the registers. Here the RTL only holds the machine and raises
  `w`; the testbenches do the counting and reading.
* **Shift amount.** All shifts and the rotate move by one place.
* `IRIn[5:0]` is unused by the controlpath, which only decodes the opcode
  (Verilator reports it as an unused signal). `reset` is used asynchronously
  by the CPU registers and through synchronisers by the memory and loader.
  This is intended, and Verilator notes it.
