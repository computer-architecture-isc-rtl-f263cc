# ISC — Incredibly Simple Computer, in SystemVerilog

The ISC is a teaching computer, introduced by Robert Keller in his computer
architecture course notes. It shows how a processor is just a set of
finite-state machines that share a clock. The design has a single internal
bus. Every register sits on that bus, and a control sequencer moves one word
across it per clock cycle by turning on one bus driver and strobing one or
more registers to load. An instruction is a short script of such transfers:
three fetch steps that every instruction shares, then a few steps of its
own, chosen by the opcode in the instruction register.

This repository holds synthesizable RTL for the processor and its memory,
an instruction-level reference model, and self-checking testbenches. These
include two example programs for the ISC: summing an array and a recursive
factorial that keeps a stack in memory.

## Machine model

- One memory. It holds program and data together, as 32-bit words with word
  addresses. The default size is 2^16 words.
- 32 general registers, R0..R31. All of them are ordinary; none is wired to
  zero.
- Special registers:
  - IP, the instruction pointer.
  - IR, the instruction register.
  - MAR, the memory address register. It drives the address bus.
  - MDR, the memory data register. It sits between the internal bus and the
    memory data bus.
  - ALU_in[0] and ALU_in[1], the two ALU operand registers.
  - ALU_out, the ALU result register. It holds one extra bit, the ALU *test
    bit*. The sequencer reads that bit to decide conditional jumps.

```
            address bus <- MAR <--------------------+
  data bus <-> MDR  <-------------------------------+
               MDR  ---------> internal bus         |
               IP   <-- inc    (one driver/cycle) --+--> MAR, MDR, IP, IR,
               IP   --------->                      |    R[wr], ALU_in[0],
               R[rd]--------->                      |    ALU_in[1]
               IR.C (constant)->                    |
               ALU_out ------>                      |
   ALU_in[0], ALU_in[1] -> ALU -> ALU_out{test,result}
   IR -> control sequencer <- ALU_out.test
```

### Instructions

Ra, Rb and Rc are register numbers. C is a signed constant.

| group | instructions | effect |
|---|---|---|
| arithmetic/logic | `add sub mul div and or` Ra Rb Rc | R[Ra] = R[Rb] op R[Rc] |
| unary | `comp shr shl` Ra Rb | R[Ra] = ~R[Rb], R[Rb]>>1, R[Rb]<<1 |
| immediate | `lim` Ra C / `aim` Ra C | R[Ra] = C / R[Ra] += C |
| move | `copy` Ra Rb | R[Ra] = R[Rb] |
| memory | `load` Ra Rb / `store` Ra Rb | R[Ra] = M[R[Rb]] / M[R[Ra]] = R[Rb] |
| conditional jump | `jeq jne jlt jgt jlte jgte` Ra Rb Rc | if R[Rb] cmp R[Rc]: IP = R[Ra] |
| jump | `junc` Ra | IP = R[Ra] |
| subroutine call | `jsub` Ra Rb | R[Rb] = address of next instruction; IP = R[Ra] |

There is no halt instruction. A program stops by jumping to itself.

The bit layout is this implementation's own. It is defined in `rtl/isc_pkg.sv`:

```
 31    27 26   22 21   17 16   12 11          0
 [opcode] [ Ra  ] [ Rb  ] [ Rc  ] [  unused   ]
 [opcode] [ Ra  ] [ C (22-bit two's complement) ]     lim, aim
```

Opcodes 0..21 follow the order of the table: add=0 … shl=8, lim=9, aim=10,
load=11, store=12, copy=13, jeq=14 … jgte=19, junc=20, jsub=21.

## Control sequencing

The sequencer (`rtl/isc_control.sv`) is the heart of the design. Each state
outputs one control word (`isc_pkg::ctrl_t`). A control word holds a one-hot
set of bus-driver enables and the load strobes of the registers, the ALU
function, and the memory read and write strobes. Each step below takes one
clock cycle. Every load happens at the clock edge that ends its step.

Fetch, shared by every instruction. These steps follow the original ISC:

| step | transfer |
|---|---|
| F1 | IP → bus, load MAR (the `fetch` output is high here) |
| F2 | read memory: MDR ← M[MAR] |
| F3 | MDR → bus, load IR; at the same time increment IP |

After F3 the sequencer branches on the opcode. The `add` subsequence is the
one the ISC gives as its worked example. Every other subsequence was written
for this implementation out of the same kinds of transfers:

| instruction | EX0 | EX1 | EX2 | EX3 | cycles incl. fetch |
|---|---|---|---|---|---|
| add…shl | Rb → ALU_in[0] | Rc → ALU_in[1] | ALU function → ALU_out | ALU_out → Ra | 7 |
| aim | Ra → ALU_in[0] | C → ALU_in[1] | add → ALU_out | ALU_out → Ra | 7 |
| lim | C → Ra | | | | 4 |
| copy | Rb → Ra | | | | 4 |
| load | Rb → MAR | MDR ← M[MAR] | MDR → Ra | | 6 |
| store | Ra → MAR | Rb → MDR | M[MAR] ← MDR | | 6 |
| jeq…jgte | Rb → ALU_in[0] | Rc → ALU_in[1] | compare → test bit | if test: Ra → IP | 7 |
| junc | Ra → IP | | | | 4 |
| jsub | IP → Rb | Ra → IP | | | 5 |

Details that are easy to miss:

- IP is incremented during fetch. So every later step sees IP pointing at
  the next instruction. That is why `jsub` can store IP directly as the
  return address.
- The register file has separate read and write indices. This lets one bus
  cycle move one register into another (`copy`). The index fields come from
  IR, picked by the control word (`rf_rd_sel`, `rf_wr_sel`).
- `jsub` writes Rb before it reads Ra. If Ra and Rb are the same register,
  the call falls through to the next instruction.
- The unary ALU instructions still run the Rc step. Their length stays 7
  cycles, and the value loaded is ignored.
- An unused opcode (22–31) takes one empty step and counts as a 4-cycle
  no-op.

## ALU

`rtl/isc_alu.sv` is combinational, and its arithmetic is two's-complement
signed:

- `mul` keeps the low 32 bits.
- `div` truncates toward zero.
- A division by zero gives 0.
- The single overflowing quotient, −2^31 / −1, wraps to −2^31.
- `shr` is a logical shift by one bit, and `shl` also shifts by one bit.
- The comparisons are signed. They only set the test bit; the result word is
  0.

## Internal bus

`rtl/isc_internal_bus.sv` models the three-state bus as an AND-OR multiplexer
over its five sources: IP, MDR, the register file, IR's constant field and
ALU_out. If no source is enabled, the bus reads 0. A concurrent assertion
fails if two sources are ever enabled in the same cycle.

## Memory and system interface

`rtl/isc_top.sv` joins `isc_cpu` to `isc_memory` and has one parameter,
`MEM_AW` (the memory holds 2^MEM_AW words, default 16). The memory reads
combinationally and writes on the clock edge. The processor ignores address
bits above MEM_AW, so addresses wrap.

- **Loading a program.** Hold `rst_n` low. While it is low, the host port
  (`host_we`, `host_addr`, `host_wdata`, `host_rdata`) owns the memory. Write
  the program from address 0 and its data wherever it expects them. Reset
  puts every register, including IP, at 0.
- **Running.** Release `rst_n` at a falling clock edge. The cycle in which it
  is released is the first F1. `fetch` pulses at the start of every
  instruction, and `ip` shows the instruction pointer.
- **Observing.** `dbg_idx`/`dbg_data` read any general register at any time.
  To read memory back, assert `rst_n` low again and use `host_rdata`. Doing
  so also resets the processor.

## Where this implementation goes beyond the original ISC

The original fixes the instruction set, the register structure, the
one-bus datapath, the fetch sequence and the `add` subsequence. The
following choices are this implementation's own:

- the 32-bit word and the instruction encoding;
- the memory size and its single-cycle read;
- reset values;
- the meaning of `comp`, `shr` and `shl`;
- division corner cases;
- all subsequences other than fetch and `add`;
- the host loading port and the debug register port;
- the split of the bidirectional data bus into read and write wires.

The original's memory bus is labelled as carrying I/O as well, but no I/O
device is defined. None is built here.

## Verification

Each module has a self-checking testbench in `tb/`. Each one prints
`TB_RESULT checks=N failures=M` and has a watchdog.

- `tb_isc_alu`: corner cases and random operands against a 64-bit reference.
- `tb_isc_regfile`, `tb_isc_bus_reg`, `tb_isc_ip`, `tb_isc_mdr`,
  `tb_isc_memory`, `tb_isc_internal_bus`: random stimulus against shadow
  models.
- `tb_isc_control`: the exact fetch and `add` steps, plus the cycle count and
  key strobes of every opcode. Conditional jumps are run with the test bit
  both set and clear.
- `tb_isc_cpu`: the processor against a testbench memory, running the
  instruction test and factorial(5) = 120.
- `tb_isc_top`: the whole system at its default size, running three
  programs:
  - an instruction test that uses all 22 instructions and both outcomes of
    every conditional jump;
  - the array summation of 5, 3, 6, 2, 9. It checks the loop-head states
    count 2/sum 14, count 1/sum 16 and the final count 0/sum 25/value 9.
  - the recursive factorial of 4 = 24, with the stack pointer back at its
    start.

  At every instruction boundary the processor's IP and all 32 registers are
  compared with `isc_ref`, an instruction-at-a-time model in
  `tb/isc_ref_pkg.sv`. The cycle count of every instruction is checked too.
  The test programs are assembled by the functions in `tb/isc_asm_pkg.sv`.

To run a testbench with Verilator 5:

```
verilator --binary --timing --assert --timescale 1ns/1ps --top-module tb_isc_top \
  -y rtl -y tb +libext+.sv -Irtl -Itb \
  rtl/isc_pkg.sv tb/isc_asm_pkg.sv tb/isc_ref_pkg.sv tb/tb_isc_top.sv
./obj_dir/Vtb_isc_top
```

Substitute another `tb_*` name for the other tests. The packages listed
before the testbench are needed by the processor-level tests. Every
testbench passes, and each one fails when a single deliberate bug is put
into the module it tests. The full-system test at the default size runs in
well under a second.

## Files

- `rtl/isc_pkg.sv`: types, opcodes, ALU functions, control word.
- `rtl/isc_top.sv`, `rtl/isc_cpu.sv`, `rtl/isc_control.sv`,
  `rtl/isc_alu.sv`, `rtl/isc_regfile.sv`, `rtl/isc_internal_bus.sv`,
  `rtl/isc_ip.sv`, `rtl/isc_mdr.sv`, `rtl/isc_bus_reg.sv` (used for MAR, IR,
  ALU_in[0], ALU_in[1] and ALU_out), `rtl/isc_memory.sv`.
- `tb/isc_asm_pkg.sv` (assembler functions), `tb/isc_ref_pkg.sv` (reference
  model and programs), and `tb/tb_*.sv`.
