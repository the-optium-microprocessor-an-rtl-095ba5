# Optium: a small pipelined 8-bit processor with branch prediction

Optium is an 8-bit accumulator machine small enough for a few hundred FPGA
logic cells. It still shows the ideas behind larger processors: a two-stage
pipeline, instruction buffering so that two-byte instructions arrive whole,
and static plus dynamic branch prediction with a branch target buffer (BTB).
This repository holds a synthesizable SystemVerilog model of the processor,
with a self-checking testbench for every unit and one for the whole design.

## Programmer's view

- One 8-bit accumulator `A`, a carry flag `C` and a zero flag `Z`. A program
  cannot read the flags; it can only test them with conditional jumps.
- 256 bytes of on-chip memory in two separate halves:
  - `0x00-0x7F` is program memory. Execution starts at address 0 after reset.
  - `0x80-0xFF` is data memory.

  Each unit ignores the top address bit, so a jump can never land in data and
  a store can never overwrite code.
- One 8-bit input port `IN` and one 8-bit output port `OUT`. A 4-bit port
  number `N` in the instruction is brought out so that outside logic can
  decode it.

### Instruction formats

```
single byte:  | opcode[7:4] (bit7=1) | N[3:0]              |
double byte:  | opcode[7:4] (bit7=0) | AM[3:2] | JC[1:0]   |   | m[7:0] |
```

| opcode | instruction    | operation                       | flags |
|--------|----------------|---------------------------------|-------|
| 0000   | `LOAD A,m`     | A <- operand                    | Z     |
| 0001   | `STORE m,A`    | data at the addressed byte <- A |       |
| 0010   | `ADD A,m`      | A <- A + operand, C <- carry    | C,Z   |
| 0011   | `AND A,m`      | A <- A & operand                | Z     |
| 0100   | `JUMP m`       | PC <- m                         |       |
| 0101   | `JUMP t,m`     | PC <- m if t holds, else next   |       |
| 1000   | `CPL A`        | A <- ~A                         | Z     |
| 1001   | `RRC A`        | C <- A[0], A <- A >> 1          | C,Z   |
| 1010   | `LOAD A,$N`    | A <- IN                         | Z     |
| 1011   | `STORE $N,A`   | OUT strobe with port N          |       |

The AM field selects the addressing mode:

| AM | mode      | operand      | cycles |
|----|-----------|--------------|--------|
| 00 | immediate | m            | 1      |
| 01 | absolute  | mem[m]       | 1      |
| 11 | indirect  | mem[mem[m]]  | 2      |

The JC field selects the jump condition: `00` carry set, `01` carry clear,
`10` zero set, `11` zero clear. These cases are a one-cycle NOP that leaves
the flags alone:

- any other opcode;
- AM `10`;
- `STORE` with immediate AM;
- a jump whose AM is not absolute.

A NOP still occupies its one or two bytes. A `JUMP` to its own address is
the usual way to halt.

## The pipeline

```
           +-------------------- redirect / BTB correction --------------------+
           v                                                                   |
 program  +-----------------------+  fd_instr_t   +---------------------------+
 memory ->| fetch/decode unit      |-------------->| execution unit            |<-> data memory
 (0-7F)   |  PC, held byte, BTB   |  valid / ack  |  IR, A, C, Z, ALU, AMU,   |<-  IN[7:0]
          +-----------------------+               |  control unit             |->  OUT[7:0]
                                                  +---------------------------+
```

### Fetch/decode (`fetch_decode_unit`)

The program memory has a single byte-wide read port, so fetch reads one byte
per clock.

- A single-byte instruction goes straight into the output register.
- The first byte of a two-byte instruction is held until its operand byte
  has been read. The two bytes are then handed over together in one transfer.
  This is the "burst" access. The execution unit never waits between the two
  halves of an instruction, and it has both bytes before it starts.
- The output register carries a valid bit. The execution unit takes the
  instruction with `ack`. A full output register that is not taken stalls
  the PC.

Fetch needs two clocks for a two-byte instruction, while execution needs one.
A stream of only two-byte instructions is therefore fetch-bound, at one
instruction per two clocks. A single-byte instruction, or the second clock of
an indirect instruction, gives fetch a clock to catch up. Overall, a program
runs at about one clock per program byte or one clock per execution cycle,
whichever is larger.

Control transfer is handled in this stage:

- **`JUMP m`** loads the PC with `m`. It is never passed on and costs no
  execution cycle.
- **`JUMP t,m`** must be predicted, because the flags it tests may still be
  changed by instructions ahead of it in the pipeline. The unit looks up the
  jump's own address in the BTB:
  - *Miss (first encounter): static prediction.* The jump is predicted taken
    if its target is below the jump's address (a loop back-edge) and not
    taken otherwise. This prediction is written into the BTB.
  - *Hit: dynamic prediction.* The stored bit is used.

  Fetch then continues down the predicted path. The jump is passed on with
  three extra fields: the prediction, its own address and the address of the
  other path (`alt_pc`).

### Execution (`execution_unit`)

The instruction registers hold one complete instruction. The unit executes it
in one clock, or in two for an indirect operand. Because it executes in
program order, one instruction at a time, the flags are always up to date
when a conditional jump arrives. It takes the next instruction in the last
cycle of the current one, so it runs back to back with no gap.

The unit is built from four parts:

- **Control unit** (`control_unit`). It is a pair of ROMs, written as case
  statements:
  - The instruction decoder maps the opcode and AM bits to a state.
  - The state decoder maps a state to the command variables `ctrl_t` for
    that cycle. These are the ALU operation, the register write enables, the
    memory write, the pointer load and the port strobes.

  An indirect instruction first passes through the pointer state. Its
  operation state is registered, and that register drives the state decoder
  in the second cycle.
- **AMU** (`amu`). It forms the data address and the operand:
  - immediate: `m`;
  - absolute: `mem[m]`;
  - indirect: the first cycle reads `mem[m]` into a pointer register, and
    the second cycle uses `mem[pointer]`.

  A `STORE` uses the same address. Data memory reads are combinational, so an
  absolute operand costs no extra cycle.
- **ALU** (`alu`). It does pass, add, and, complement and shift right. Its
  second operand is the AMU result or the input port.
- **Jump check.** For `JUMP t,m` the condition is evaluated from `C` and `Z`.
  If it differs from the prediction, a misprediction is handled in the same
  clock:
  - The BTB entry of that jump is overwritten with the actual outcome.
  - `redirect` with `alt_pc` is sent to fetch. Fetch drops its held byte and
    its output register and restarts at `alt_pc`.
  - The instruction on offer in that clock is refused, because it lies on the
    wrong path.

### Timing summary

| event                                 | cost                                      |
|---------------------------------------|-------------------------------------------|
| single-byte instruction               | 1 clock                                   |
| two-byte, immediate or absolute       | 1 clock of execution, 2 clocks of fetch   |
| indirect operand                      | 2 clocks of execution                     |
| `JUMP m`                              | no execution clock; the fetch restarts    |
| correctly predicted `JUMP t,m`        | 1 clock                                   |
| mispredicted `JUMP t,m`               | 1 clock plus about 3 refill clocks        |

### BTB (`btb`)

The BTB has `ENTRIES` entries (default 4). It is fully associative: each entry
is tagged with the full 8-bit jump address and holds one prediction bit.
Entries are replaced round-robin. Lookup is combinational. Allocation (from
fetch, on a miss) and correction (from execution, on a misprediction) are
written at the clock edge. A correction for an entry that has since been
replaced is dropped. The target is not stored, because it is always the
second byte of the jump itself.

### Memory (`memory_unit`)

The memory is two 128x8 arrays. Each has a combinational read port and a
synchronous write. The program half has one read port for fetch. The data
half has one read/write port for the execution unit. A load port and a
debug read port, both using the full 8-bit address, let a program and its
data be placed while the processor is held in reset.

## Interface of the top (`optium_top`)

| port                                  | dir  | meaning                                           |
|---------------------------------------|------|---------------------------------------------------|
| `clk`, `rst`                          | in   | clock; synchronous active-high reset (PC, A, C, Z, BTB cleared) |
| `load_we`, `load_addr[7:0]`, `load_wdata[7:0]` | in | write one memory byte; bit 7 of the address selects data (1) or program (0) |
| `dbg_addr[7:0]` / `dbg_rdata[7:0]`    | in/out | read any memory byte                            |
| `in_port[7:0]`                        | in   | IN port, sampled in the cycle `in_rd` is high     |
| `in_rd`, `in_n[3:0]`                  | out  | `LOAD A,$N` strobe and its port number            |
| `out_port[7:0]`                       | out  | OUT port; always shows the accumulator            |
| `out_wr`, `out_n[3:0]`                | out  | `STORE $N,A` strobe and its port number           |
| `acc`, `flag_c`, `flag_z`             | out  | register values, for observation                  |
| `stat_*`                              | out  | one-cycle event pulses: `retire`, `burst`, `mispredict`, `static_pred`, `btb_pred`, `jump`, `indirect`, `fd_stall` |

To run a program:

1. Hold `rst` high.
2. Write the program bytes to `0x00-0x7F` and the data bytes to `0x80-0xFF`.
3. Release `rst`.

Parameters: `AW` (default 7, giving 128-byte halves) and `BTB_ENTRIES`
(default 4).

## Where this model makes its own choices

The instruction set, the memory split, the two pipeline stages, the burst
hand-over, the static rule (backward taken) followed by the BTB, and the
correction of the BTB by the execution unit all follow the original
processor description. It leaves the following open, and they were decided
here:

- **Field positions.** The order `opcode | AM | JC` and `opcode | N` is
  given, but not the bit numbers. The most significant bit is taken to be on
  the left.
- **`RRC`.** It is specified as `A <- A/2, C <- A0`. It is implemented
  literally, as a logical shift with bit 7 cleared. It is not a rotate
  through carry, although the mnemonic suggests one.
- **`JUMP t,m`.** When the condition fails, execution continues at the
  instruction after the jump.
- **Memory timing.** Reads are asynchronous and writes synchronous, as in
  distributed FPGA RAM. This is what makes one-cycle absolute operands
  possible.
- **Buffering.** The depth is one held byte plus one instruction register.
  Fetch reads one byte per clock.
- **BTB.** The size (4), the associativity, the one-bit state and the
  replacement policy are all choices made here.
- **Added ports.** The load and debug ports, the port-number and strobe
  outputs, and the `stat_*` pulses are additions for use and observation.
- **Illegal forms.** `STORE` with immediate AM is decoded as a NOP. So is a
  jump with a non-absolute AM.
- **Reset.** Reset is synchronous and clears the PC, A, C, Z and the BTB.
  Memory is not cleared.

## Files

- `rtl/optium_pkg.sv`: opcodes, AM and JC codes, ALU operations, control
  states, `ctrl_t` and `fd_instr_t`.
- `rtl/memory_unit.sv`, `rtl/btb.sv`, `rtl/fetch_decode_unit.sv`,
  `rtl/control_unit.sv`, `rtl/alu.sv`, `rtl/amu.sv`,
  `rtl/execution_unit.sv`, `rtl/optium_top.sv`.
- `tb/tb_<module>.sv`: one self-checking testbench per module. Each prints
  `TB_RESULT checks=N failures=M` and has a cycle watchdog.

The unit testbenches compare each unit with a reference model written from
the instruction set, using random stimulus:

- ALU: every operation.
- AMU: every addressing mode, including the two-cycle indirect access.
- Control unit: all 256 first bytes.
- BTB: against a model table.
- Fetch/decode: the delivered instruction stream, with random back-pressure
  and mispredictions, and the delivery rate.
- Execution: the architectural state, the redirects and the exact cycle
  count.

`tb_optium_top` runs the whole processor at its default sizes:

- One directed program: a counted loop with indirect loads and stores, port
  I/O, forward and backward jumps and illegal forms.
- A full-rate timing check.
- 40 random programs wrapped in an outer loop.

It compares the final A, C and Z, all of data memory, the input reads and the
sequence of OUT writes with an instruction-level model. It also checks that
every executed instruction retires once. Finally, it checks that each pipeline
mechanism occurred at least once: burst hand-over, static prediction, BTB
prediction, misprediction, `JUMP`, the indirect cycle, a stalled hand-over,
input and output.

`tb_optium_encoder` uses the processor as a data encoder and decoder:

1. An encoder loop reads 100 bytes from `IN`, encodes each one as
   `~(x + key)`, writes the code to `OUT` and stores it in a buffer.
2. The program half is then reloaded with a decoder, leaving the data half
   as it is. The decoder recovers the original bytes from the buffer.

The testbench checks every byte. It also checks the branch statistics of each
loop: one static prediction, 99 BTB predictions and one misprediction at the
exit. Both loops are fetch-bound. They take about one clock per program byte
of the loop body: 21 clocks per byte to encode and 20 to decode.

Simulate with Verilator, for example:

```
verilator --binary --timing --assert -Irtl -y rtl +libext+.sv \
    rtl/optium_pkg.sv tb/tb_optium_top.sv --top-module tb_optium_top
./obj_dir/Vtb_optium_top
```

## Limits

- This is a behavioural-RTL reconstruction, not the original schematic
  design. Cycle behaviour outside the points listed above, such as the exact
  misprediction penalty, is this model's own.
- No I/O devices are modelled beyond the port strobes.
- The assembler and emulator that accompanied the original processor are
  software and are not part of this repository. Programs must be written as
  bytes, as the testbenches do.
