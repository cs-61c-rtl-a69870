# MIPS-lite single-cycle processor and its datapath building blocks

This is a processor that runs every instruction in one clock cycle. It handles
six MIPS instructions: `addu`, `subu`, `ori`, `lw`, `sw` and `beq`. It is built
the way an introductory computer-architecture course builds it, bottom-up:

1. one-bit adders and one-bit multiplexers;
2. an N-bit ripple-carry adder, an adder/subtractor and wide multiplexers;
3. a four-function ALU, a register, a register file and an idealized memory;
4. the datapath, the control unit, and finally the processor.

Alongside the processor are three small examples from the same material:

- a finite state machine that detects three consecutive 1s;
- a summation circuit (an accumulator);
- the half adder used for the least significant bit of a sum.

All four designs sit side by side in `cs61c_top`. They share only the clock and the reset.

Everything is synthesizable SystemVerilog. Two-state simulation runs it as is,
and every module has a self-checking testbench.

## The single-cycle idea

The processor's state is the PC, the register file and the data memory. On each
rising clock edge, this happens:

1. The PC takes the next address. The instruction memory then puts the
   instruction on its output without waiting for a clock, because its read is
   combinational.
2. The instruction's fields drive the control unit and the register file read ports.
3. The ALU computes. The data memory is read, again combinationally.
4. By the next rising edge, the register file write, the data memory write and
   the new PC all settle, and they are captured together.

So the clock period must cover the longest of these paths, plus the
clock-to-Q and setup times. The slowest instruction is `lw`. Its path is:
PC → instruction memory → register file → ALU (32-bit ripple carry) → data memory → MemtoReg mux → register file setup.

The ALU's adder is a true ripple-carry chain of 32 full adders, so its carry
chain dominates the logic depth.

## Instruction formats and encodings

| field  | bits  | R-format          | I-format             |
|--------|-------|-------------------|----------------------|
| op     | 31:26 | 0                 | opcode               |
| rs     | 25:21 | first source      | base / source        |
| rt     | 20:16 | second source     | destination (ori, lw) or store data / compare (sw, beq) |
| rd     | 15:11 | destination       | (part of immediate)  |
| shamt  | 10:6  | ignored           |                      |
| funct  | 5:0   | operation         |                      |
| imm16  | 15:0  |                   | immediate            |

The design uses the standard MIPS numbers, which are listed in `mips_pkg`:

| instruction | op   | funct | meaning |
|-------------|------|-------|---------|
| addu rd,rs,rt | 0x00 | 0x21 | R[rd] ← R[rs] + R[rt] |
| subu rd,rs,rt | 0x00 | 0x23 | R[rd] ← R[rs] − R[rt] |
| ori rt,rs,imm | 0x0D | –    | R[rt] ← R[rs] \| zero_ext(imm) |
| lw rt,imm(rs) | 0x23 | –    | R[rt] ← MEM[R[rs] + sign_ext(imm)] |
| sw rt,imm(rs) | 0x2B | –    | MEM[R[rs] + sign_ext(imm)] ← R[rt] |
| beq rs,rt,imm | 0x04 | –    | if R[rs] = R[rt]: PC ← PC + 4 + (sign_ext(imm) << 2) |

No instruction overflows or traps, and the unsigned ops simply wrap.

Any other opcode or funct writes nothing and advances the PC by 4. This
includes the all-zero word, which therefore acts as a no-op.

## Control

`control` decodes `op` (and `funct` for R-type) into the `ctrl_t` bundle:

| instr | RegDst | ALUSrc | MemtoReg | RegWr | MemWr | Branch | ExtOp | ALUctr |
|-------|:-----:|:-----:|:-------:|:----:|:----:|:-----:|:-----:|:------:|
| addu  | 1 (rd) | 0 (busB) | 0 (ALU) | 1 | 0 | 0 | – | ADD |
| subu  | 1 | 0 | 0 | 1 | 0 | 0 | – | SUB |
| ori   | 0 (rt) | 1 (imm) | 0 | 1 | 0 | 0 | zero | OR |
| lw    | 0 | 1 | 1 (mem) | 1 | 0 | 0 | sign | ADD |
| sw    | – | 1 | – | 0 | 1 | 0 | sign | ADD |
| beq   | – | 0 | – | 0 | 0 | 1 | – | SUB |

A "–" means don't care, and the RTL drives those entries to 0.

The fetch unit's `nPC_sel` is `Branch AND Zero`. `Zero` is 1 when the ALU
result is zero, which for `beq` means the subtraction R[rs] − R[rt] gave 0.
Splitting this into a separate `Branch` signal is this design's choice.

The ALU is the four-function ALU from the same material. `ALUctr` values use its
encoding:

| S / ALUctr | operation |
|:---:|---|
| 00 | ADD |
| 01 | SUB |
| 10 | AND (never used by the control unit) |
| 11 | OR |

## Block by block

| module | what it is |
|---|---|
| `half_adder` | s = a⊕b, c = a·b |
| `full_adder` | s = a⊕b⊕cin, cout = majority(a, b, cin) |
| `ripple_adder` | N full adders, carry i−1 → carry-in i; also outputs the carry into the MSB |
| `add_sub` | A ± B: B XOR sub, sub as carry-in; carry out and signed overflow |
| `mux2` | N one-bit muxes, c = s̄a + sb |
| `mux4` | three `mux2`: two on s[0], one on s[1] |
| `alu` | `add_sub`, AND, OR and a `mux4`; `zero` output |
| `wr_register` | N flip-flops with write enable and synchronous reset value |
| `regfile` | 32 × 32, reads RA→busA and RB→busB combinationally, writes RW←busW on the edge when enabled |
| `ideal_memory` | word array, combinational read, write on the edge; used for both memories |
| `extender` | imm16 → 32 bits, zero (ext_op=0) or sign (ext_op=1) |
| `ifu` | PC register, a +4 adder, a branch adder (PC+4 + offset·4) and the nPC_sel mux |
| `control` | the table above |
| `datapath` | RegDst mux, register file, extender, ALUSrc mux, ALU, MemtoReg mux, `ifu` |
| `single_cycle_cpu` | `control` + `datapath` + instruction memory + data memory |
| `three_ones_fsm` | 2-bit state, NS0 = PS̄1·PS̄0·In, NS1 = PS̄1·PS0·In, Out = PS1·PS̄0·In |
| `summation` | S ← S + Xi every edge (a `ripple_adder` and a `wr_register`) |
| `cs61c_top` | all of the above side by side |

The shared types live in `mips_pkg`: the instruction formats, the ALU operation
enum, the opcodes, and the control bundle.

### Program counter

The PC register holds only bits 31:2, and its two low bits are the constant `00`.
The fetch unit's adders are full 32-bit ripple-carry adders:

- the first computes `PC + 4`;
- the second adds `sign_ext(imm16) || 00` to that result.

The instruction memory is indexed by `PC[IAW+1:2]`, so the PC wraps modulo the
memory size.

### Memories

Both memories are `ideal_memory` instances of 1024 32-bit words (4 KiB each).
Each has a parameter for its size: `IMEM_WORDS` and `DMEM_WORDS`.

They are word-addressed, so byte addresses are truncated:

- the low two bits are dropped. `lw` and `sw` are meant for aligned addresses,
  and nothing checks alignment;
- address bits above the memory size are also dropped, so accesses alias.

The instruction memory's write port is brought out as `imem_we` / `imem_waddr`
/ `imem_wdata`, which is how a program is loaded. Hold `rst` while loading. The
write takes a word address. Fetch uses the memory's second, read-only port.

The data memory's second read port is brought out as `dmem_dbg_addr` /
`dmem_dbg_data`, and the register file has a third read port, `dbg_raddr` /
`dbg_rdata`. Both exist only for observation.

Both memory arrays are cleared to zero at time 0. Reset does not clear them.

### Three-ones detector

`three_ones_fsm` is a Mealy machine. Its state counts consecutive 1s: 00, then
01, then 10.

`out_bit` is 1 in the same cycle that the third 1 is on the input. The state
then returns to 00, so a run of six 1s is two detections, not four. A 0 always
returns the state to 00.

The unused state 11 goes to 00, as the logic equations give. The present state
is brought out as `fsm_state`.

### Summation circuit

`summation` adds `sum_x` into the register `sum_s` on every edge. The sum wraps
modulo 2^32. `rst` clears it.

The input must settle an adder delay plus the setup time before the edge.

## Reset and timing summary

- There is one clock, and every register is clocked on its rising edge.
- `rst` is synchronous and active high. It sets the PC to 0, the processor
  registers to 0, and the FSM state and the sum to 0. Data memory writes are
  blocked while it is held.
- Each instruction takes exactly one cycle, so CPI = 1. The instruction at `pc`
  is visible on `instr` in the same cycle.
- Register 0 always reads as zero, and writes to it are discarded.

## Where this design adds to or departs from its source

The course material gives these parts and nothing more:

- the instruction subset and its register transfers;
- the instruction formats;
- the datapath structure and its control signal names and meanings;
- the ALU operation table;
- the full-adder, multiplexer and FSM equations;
- the register file organisation.

Everything below is a choice made here:

- the opcode and funct numbers (standard MIPS);
- register 0 hardwired to zero (MIPS convention);
- the synchronous reset of every sequential element;
- memory sizes, which are 1024 words each;
- the program-load port and the debug read ports;
- clearing the memories at time 0;
- the extra `zero` output of the ALU, the carry/overflow outputs of the adders
  and the `c_msb` output of `ripple_adder`;
- driving don't-care control entries to 0, and treating unknown instructions as no-ops;
- which input of the next-PC mux is the branch (nPC_sel = 1).

The input and output devices of the classic "processor, memory, input,
output" picture are not modelled.

## Simulating

Each module `X` has a testbench `tb/tb_X.sv`. Every testbench prints
`TB_RESULT checks=N failures=M` and has a cycle-count watchdog. The processor
testbenches also need `tb/mips_asm_pkg.sv`, which provides instruction encoders
and an instruction-level reference model. For example:

```
verilator --binary --timing --assert -y rtl -y tb \
    rtl/mips_pkg.sv tb/mips_asm_pkg.sv tb/tb_cs61c_top.sv \
    --top-module tb_cs61c_top -o sim
./obj_dir/sim
```

Some things are not set up for you:

- The two packages must be listed first. Verilator finds every other module
  through `-y`, by its file name.
- Replace `tb_cs61c_top` with `tb_X` to run another block's test. For the leaf
  blocks, the package files are only needed when the block imports them.
- Everything starts from a known state, except storage that reset does not
  touch. Memories are cleared at time 0.
- To write a program, use the encoder functions in `mips_asm_pkg` (`addu`,
  `subu`, `ori`, `lw`, `sw`, `beq`). Then write the words through the
  instruction memory port under reset.

What the tests establish:

- **Leaf blocks**: `tb_half_adder` and `tb_full_adder` test every input
  combination. The adders, muxes, ALU and extender get thousands of random
  vectors, compared with arithmetic done in the testbench. The storage blocks
  are compared with reference arrays.
- **`tb_datapath`**: 5000 random instructions with control settings from the
  testbench's own table. The PC and one register are checked every cycle, and
  the whole memory at the end.
- **`tb_single_cycle_cpu`**: a directed loop program and then a 2000-cycle
  random program. Both use 256-word memories and run in lockstep with the
  reference model. The PC, the fetched word and a register are checked every
  cycle. The full register file and data memory are checked at the end.
- **`tb_cs61c_top`**: runs all four designs at their default sizes.
  - The processor program fills a 16-word table, copies it backwards with
    negative offsets and adds it up. The result is compared with a hand-worked
    value.
  - At the same time, the FSM, the summation circuit and the half adder run
    against models.
  - The test counts each mechanism and fails if any never occurs: every
    instruction kind, branch taken and not taken, a write to register 0, a
    three-ones detection, a summation wrap-around, and a half-adder carry.

## Limits

- There are no jumps, shifts, slt, exceptions, byte or halfword accesses, or
  unaligned-access checks. Only the six instructions above exist.
- There is no pipelining. The material mentions two-cycle and five-cycle
  versions only as later topics.
- The memories are idealized: combinational read, no wait states. A real
  memory or cache with a registered read would need a different clocking
  scheme.
- The design has not been timed or placed. The clock-rate discussion above is
  qualitative.
