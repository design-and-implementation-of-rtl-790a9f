# PLX-64: a five-stage subword-parallel soft processor with a double-precision FPU

This is a 64-bit processor for the PLX 1.1 instruction set, written in
synthesizable SystemVerilog. PLX is a small RISC ISA for multimedia work. Most
integer instructions treat a 64-bit register as eight bytes, four 16-bit
halves, two 32-bit words or one 64-bit word, and work on every subword at once.
Every instruction is predicated. The core adds a floating-point unit (FPU) for
IEEE-754 double precision: add, subtract, multiply and divide. The FPU shares
the execute stage with the integer units and the 64-bit register file, so
doubles need no separate register set.

The design targets an FPGA-style flow. The instruction and data memories are
plain arrays that map onto block RAM. All sequential logic is clocked on the
rising edge with a synchronous active-high reset.

## The pipeline

| Stage | What happens |
|-------|--------------|
| S1 fetch | The program counter addresses a 512 x 32 instruction memory with an asynchronous read. The word is captured in the IF/ID register. |
| S2 decode | The operation decoder turns the instruction into a control word. The register file is read on two ports. Results from S3, S4 and S5 are forwarded. The immediate is extended. **Jumps are resolved here.** |
| S3 execute | The ALU, subword multiplier, mix unit, shifter and FPU all see the operands. The result multiplexer picks one. The instruction's predicate is read here, and a false predicate turns the instruction into a bubble. Compare, test bit and changepr update the predicate file. |
| S4 memory | 1024 x 64 data memory with one port and byte write enables. |
| S5 write back | The register input unit merges partial results (loadi, extract, deposit) into the old Rd value. The register file is written. |

The top level is `plx_cpu`. Its ports:

| Port | Dir | Width | Meaning |
|------|-----|-------|---------|
| `clk`, `reset` | in | 1 | clock and synchronous reset |
| `init` | in | 1 | program loading: the processor is stalled and one word per clock is written |
| `init_addr`, `init_data` | in | 9, 32 | address and instruction word written while `init` is high |
| `illegal` | out | 1 | one-cycle pulse: an undefined opcode was decoded |
| `trap` | out | 1 | one-cycle pulse: a trap instruction, or test bit found its bit set |
| `ALU_OU` | out | 8 | one-cycle per-byte ALU overflow; the bit at the top byte of each overflowing subword is set |
| `FPU_OU` | out | 2 | one-cycle `{underflow, overflow}` of an FPU operation |
| `pc` | out | 64 | current program counter |

**Running a program.**
1. Hold `reset` for a cycle.
2. Raise `init` and present one instruction per clock on `init_addr`/`init_data`, starting at address 0.
3. Drop `init`. Execution starts at address 0.

The usual way to end a program is a jump to itself (`jmp` with offset -1).

## Instruction word

```
 31   29 28      23 22    18 17    13 12     8 7           0
+-------+----------+--------+--------+--------+-------------+
| pred  |  opcode  |   Rd   |  Rs1   |  Rs2   |   sub-op    |
+-------+----------+--------+--------+--------+-------------+
```

The immediate forms replace `Rs2` and the sub-op field with a 13-bit immediate `[12:0]`.

Other layouts:
- `jmp`: 23-bit signed word offset in `[22:0]`.
- `loadi`: subword index `k` in `[17:16]` and a 16-bit constant in `[15:0]`.
- `cmp`/`cmpi`/`testbit`: destination predicates Pd1 `[9:7]` and Pd2 `[6:4]`, and the condition in `[3:0]`. `cmp` reads its second register through `[22:18]`. `cmpi` uses the signed 8-bit immediate `{[22:18],[12:10]}`. `testbit` takes the bit number from `{[12:10],[2:0]}`.
- `changepr`: new predicate-set number in `[3:0]`.
- `extract`/`deposit`: position in `[11:6]`, length in `[5:0]` (0 means 64).

The decoder sees only `{instr[28:23], instr[17:16], instr[7:0]}`.

The opcodes of `jmp` (000000), `loadi` (000101), `and` (110000) and
`addf`/`subf`/`multf`/`divf` (101100-101111) are the published ones. **The rest
of the opcode map, and the meaning of the sub-op bits, are this design's own.**
The full PLX encoding tables were not available. All assignments are listed in
`rtl/plx_pkg.sv`. Code written for another PLX implementation will not run
unchanged.

Each unit's control word uses the bit layout of the PLX control tables:
ALU 20 bits, shifter 8, mix 5, multiplier 7 and FPU 3. The layouts are listed
in the unit files. To add an instruction, assign an opcode in `plx_pkg` and a
case in `op_decoder`.

## Timing: stalls, forwarding and jumps

This is the part that most needs care when you read or change the core.

**Issue times.** Most instructions issue one per cycle. The exceptions follow
the published cycle counts:

| Instruction | Cycles | Mechanism |
|-------------|--------|-----------|
| cmp, cmpi, testbit | 3 | issue gap of 2 |
| load.n, loadu.n, loadx, loadi | 5 | issue gap of 4 |
| extract, deposit | 5 | issue gap of 4 (design choice, like loadi) |
| changepr | 2 | issue gap of 1 (design choice) |
| jmp / jmpr taken | 2 | fetched instruction flushed |
| psub, paddincr | 2 | global stall until the ALU reports done |
| psubdecr | 3 | global stall |
| addf, subf | 3 | global stall until the FPU reports done |
| multf | 1 | combinational multiplier |
| divf | 55 | global stall |

**Two kinds of stall** come from `stall_unit`:

- **Hold (PC stall).** When an instruction with a gap *g* leaves S2, a counter is
  loaded with *g*. While the counter is non-zero, the PC and the instruction
  waiting in S2 are held, and bubbles (NOPs) enter S3. The gaps make sure a
  compare's predicates are written before the next instruction reads them. They
  also make sure a load, or a partial-register write, has reached the register
  file before the next instruction reads it. No forwarding is needed for those
  cases.
- **Freeze (global stall).** A multi-cycle operation in S3 freezes S1-S3 until
  its unit raises `done`. Bubbles go into S4 meanwhile, so the operation is
  written back exactly once. Loading the instruction memory (`init`) also
  freezes the core. The freeze does not use up a pending hold count.

**Forwarding.** The S2 operand multiplexers take a value from S3, S4 or S5 when
that stage will write the register being read. The nearest stage wins, and R0
is never forwarded. Only final values are forwarded:
- not a load's address in S3;
- not a loadi, extract or deposit result before S5.

The register file also writes through: a read in the same cycle as the write
returns the new value.

**Jumps** are resolved in S2. `jmp` adds the signed offset and `jmpr` adds
register Rd. In both cases the offset is relative to the address after the jump
(target = jump address + 1 + offset). A taken jump squashes the one instruction
already fetched behind it. The jump's predicate is read through a second port of
the predicate file. An illegal opcode still flows through the pipeline as a
bubble and only raises `illegal`.

A worked example (tested): eight `loadi` instructions build two 64-bit
constants in R1 and R2, then `and R3 = R1, R2`. That takes 8 x 5 = 40 cycles for
the loadis plus 4 cycles for the `and` to reach write back. R3 is written 44
clock edges after the edge that fetched the first instruction.

## Predication

The predicate file holds 16 sets of eight 1-bit predicates, and one set is
active at a time. `changepr` selects the active set.

- P0 always reads 1, so predicate field 0 means "always".
- A compare or test bit writes its outcome to Pd1 and the complement to Pd2 in the active set.
- An instruction whose predicate is 0 reaches S3 and becomes a bubble there: no register, memory or predicate write.
- Reset selects set 0 and clears all predicates.

## Execution units

- **ALU** (`alu`).
  - Eight byte adders with carries cut at subword boundaries. This gives padd/psub in modular, signed-saturating and unsigned-saturating forms, with optional increment/decrement, and averages.
  - A logic unit: and, andcm, or, xor, not.
  - A 64-bit comparator (ten conditions) and a subword comparator (pcmp.eq/gt, pmax, pmin; bytes compare unsigned for max/min, wider subwords signed).
  - Test bit, and the address adder for loads and stores.
  - The result is computed in one pass. A step counter reproduces the 2- and 3-cycle timings of subtract, add-increment and subtract-decrement.
- **Multiplier** (`multiplier`).
  - `pmul` multiplies the odd or the even 16-bit subword pairs into two 32-bit products.
  - `pmulshr` keeps 16 bits of each of the four products after a right shift of 0, 8, 15 or 16.
  - The `.a` variant is taken as signed.
- **Mix unit** (`mix_unit`). mix.l/mix.r at 1, 2 and 4 bytes; mux rev, mix, shuf, alt and the two broadcasts; permute of 16-bit subwords by an 8-bit selector. The mux byte orders are those of the IA-64 `mux1` instruction.
- **Shifter** (`shifter`). Subword shifts at 2, 4 and 8 bytes by register or immediate amount; `pshiftadd` (shift a 16-bit subword by 1-3 and add with signed saturation); `shrp`, `slli`, `srai`, `srli`.
- **FPU** (`fpu`, `fpu_adder`, `fpu_multiplier`, `fpu_divider`, `fp_pkg`).
  - The adder takes 3 cycles: align, then add and normalise, then round and pack.
  - The multiplier is one combinational 53 x 53 significand product.
  - The divider produces one quotient bit per cycle for 54 bits (shift and compare-subtract), then rounds: 55 cycles.
  - All round to nearest even.
  - Subnormal inputs read as zero; subnormal results flush to zero and set underflow.
  - Overflow gives infinity and sets overflow.
  - Invalid operations give the quiet NaN `0x7FF8000000000000`.
  - x/0 gives a signed infinity with the overflow flag.
  - Hold `ENABLE` with stable operands until `done`.

## Where this departs from the published design

- All logic uses the rising edge. In the original, the PC, the register-file read
  and the data memory use the falling edge so that fetch and register read each
  fit in one cycle. Here the instruction memory, the register-file read and the
  data-memory read are asynchronous, which gives the same cycle counts.
- The published text gives paddincr as 2 cycles in one place and 3 in another.
  This core uses 2.
- The square-root instruction (59 cycles) is only named in the original, with no
  algorithm or interface. This core leaves it out; its opcode is illegal.
- The opcode map and sub-op bits are this design's own (see above).
- Behaviour the original does not specify is this design's choice:
  - the issue times of testbit, extract, deposit and changepr;
  - byte-lane stores;
  - the extract/deposit field semantics;
  - the subnormal handling;
  - the flags lasting one cycle. They are registered, so they appear one cycle
    after the event instead of in the same cycle.

## Verification

Every module has a self-checking testbench in `tb/`. Each compares the module
against a reference written independently in the testbench: wide-integer lane
models for the ALU, multiplier, mix unit and shifter, and the simulator's own
`real` arithmetic for the FPU. Cycle counts are checked wherever a latency is
specified: ALU 1/2/3 cycles, FPU 3/1/55 cycles, issue gaps of 3 and 5 cycles,
and 44 cycles for the sample program.

Each testbench prints `TB_RESULT checks=<n> failures=<m>` and has a watchdog.

`tb_plx_cpu` runs the core at its default size. It loads two programs through
the `init` port:
1. the loadi/and example;
2. a program that makes every mechanism happen.

The second program covers:
- forwarding from S3, S4 and S5;
- multi-cycle ALU and FPU stalls (the total number of stall cycles is checked);
- issue-gap stalls;
- taken and not-taken jumps, both `jmp` and `jmpr`;
- predicated squash and predicate-set switching;
- store and load;
- extract;
- ALU and FPU overflow flags;
- the trap and illegal flags.

Each mechanism is counted, and one that never happens counts as a failure.

To simulate with Verilator (packages first):

```
verilator --binary --timing -Irtl rtl/plx_pkg.sv rtl/fp_pkg.sv \
    $(ls rtl/*.sv | grep -v _pkg) tb/tb_plx_cpu.sv --top-module tb_plx_cpu
./obj_dir/Vtb_plx_cpu
```

Replace `tb_plx_cpu` with any other testbench name to run one unit.

Not verified:
- timing closure or resource use on a real FPGA;
- the `illegal`/`trap` flags as an exception mechanism: they are only outputs, and nothing redirects the PC.

## Files

- `rtl/plx_pkg.sv`: opcodes, control-word type, shared enums.
- `rtl/fp_pkg.sv`: IEEE-754 helpers and the rounding function.
- `rtl/plx_cpu.sv`: the top level and pipeline registers.
- `rtl/control_unit.sv`: groups the six control blocks:
  - `op_decoder`: instruction to control word;
  - `bypass_unit`: forwarding selects;
  - `predicate_signals_unit`: predicate-qualified execute, busy, predicate-write and jump-taken signals;
  - `stall_unit`: hold, freeze and flush;
  - `flag_unit`: the registered flags;
  - `multiplexers_unit`: the M1 and M5 selects and the PC source.
- `rtl/program_counter.sv`, `rtl/instruction_memory.sv`, `rtl/register_file.sv`, `rtl/sign_extension.sv`, `rtl/predicate_file.sv`, `rtl/data_memory.sv`, `rtl/register_input.sv`: the datapath pieces named above.
- `rtl/alu.sv`, `rtl/multiplier.sv`, `rtl/mix_unit.sv`, `rtl/shifter.sv`: the integer execution units.
- `rtl/fpu.sv`, `rtl/fpu_adder.sv`, `rtl/fpu_multiplier.sv`, `rtl/fpu_divider.sv`: the FPU.
- `tb/tb_<module>.sv`: one testbench per module.
