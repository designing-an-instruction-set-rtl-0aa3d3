# From a programmable data path to a stored-program RISC: the A/B engine and the Beta

This RTL contains two small machines. Together they show the step from a data path that is
*programmed by a control table* to a computer that is *programmed by instructions held in
memory*.

1. **The A/B engine.** This is a two-register data path (A, B, a multiplier and a
   decrementer) run by a control FSM. The FSM's entire behaviour is a writable table. Load one
   table and the hardware computes N·(N−1). Load another and the same hardware computes N!.
2. **The Beta.** This is a 32-bit RISC processor in the von Neumann style, with one memory that
   holds both program and data. It has 32 registers, two fixed 32-bit instruction formats, ALU
   operations with a register or a 16-bit constant operand, word loads and stores, and
   conditional branches. It runs one instruction per clock.

The two machines share only a clock. The top module `isa_top` places them side by side, and
each has its own ports.

## The A/B engine

### Data path (`ab_datapath`)

```
   A*B ──┐  1 ──┐               N ──┐  B-1 ──┐
        [0]    [1]  <- A_SEL       [0]     [1]  <- B_SEL
         └──┬───┘                   └──┬────┘
        A (load when A_LE)          B (load when B_LE)
            │  └──────────┐  ┌─────────┤
            │            [ * ]        [-1]──> =0? ──> Z
         ANSWER
```

* A loads either the product A·B (mux input 0) or the constant 1 (input 1).
* B loads either the operand N (input 0) or B−1 (input 1).
* Both registers are `W` bits wide (default 32). The product is truncated to `W` bits.
* `z` is 1 when **B−1** equals zero, not when B equals zero. The test sits on the decrementer's
  output. So in a step that multiplies by B and decrements B, `z = 1` means "this multiply is the
  last one".

### Control FSM (`ab_control_fsm`)

The control FSM has no fixed behaviour. It holds a state register S and a table with
2^(ST_W+1) rows, indexed by `{Z, S}`. Each row gives:

| field     | meaning                         |
|-----------|---------------------------------|
| next      | state after this clock          |
| A_SEL     | A mux select                    |
| A_LE      | A load enable                   |
| B_SEL     | B mux select                    |
| B_LE      | B load enable                   |

* The row at `{z, S}` drives the four controls combinationally, and S takes `next` at the clock
  edge.
* A program that ignores Z writes the same row at Z = 0 and at Z = 1.
* The table can be written only while `rst` is high. This keeps a running program from being
  changed under the FSM.
* Reset puts S in state 0 and forces all controls to 0.

### The three programs

These tables are what gets loaded. They live in `tb/ab_programs_pkg.sv`.

N·(N−1), one operation per step (halts in S4 after 4 clocks):

| S | next | A_SEL | A_LE | B_SEL | B_LE | effect        |
|---|------|-------|------|-------|------|---------------|
| 0 | 1    | 1     | 1    | 0     | 1    | A←1, B←N      |
| 1 | 2    | 0     | 1    | 0     | 0    | A←A·B         |
| 2 | 3    | 0     | 0    | 1     | 1    | B←B−1         |
| 3 | 4    | 0     | 1    | 0     | 0    | A←A·B         |
| 4 | 4    | 0     | 0    | 0     | 0    | halt          |

N·(N−1), with the independent steps merged (halts in S3 after 3 clocks):

| S | next | A_SEL | A_LE | B_SEL | B_LE | effect          |
|---|------|-------|------|-------|------|-----------------|
| 0 | 1    | 1     | 1    | 0     | 1    | A←1, B←N        |
| 1 | 2    | 0     | 1    | 1     | 1    | A←A·B, B←B−1    |
| 2 | 3    | 0     | 1    | 0     | 0    | A←A·B           |
| 3 | 3    | 0     | 0    | 0     | 0    | halt            |

N! (halts in S2 after N+1 clocks):

| Z | S | next | A_SEL | A_LE | B_SEL | B_LE | effect                  |
|---|---|------|-------|------|-------|------|-------------------------|
| – | 0 | 1    | 1     | 1    | 0     | 1    | A←1, B←N                |
| 0 | 1 | 1    | 0     | 1    | 1     | 1    | A←A·B, B←B−1, loop      |
| 1 | 1 | 2    | 0     | 1    | 1     | 1    | A←A·B, B←B−1, exit      |
| – | 2 | 2    | 0     | 0     | 0    | 0    | halt                    |

The factorial program assumes N ≥ 1. With N = 0 it first sees Z = 1 only after B has wrapped
around.

To use the engine (`ab_machine`), do the following:

1. Hold `rst` high.
2. Write all 16 rows through `prog_we`, `prog_addr` = `{Z, S}`, `prog_next` and `prog_ctl`.
3. Set `n` and drop `rst`.
4. Read `answer` once `state` reaches the program's halt state.

## The Beta processor

### Programmer's view

* 32 registers, r0 to r31, each 32 bits wide. r31 always reads 0, and writes to it are
  discarded.
* Memory is addressed in bytes, but only whole 32-bit words are accessed. The two low address
  bits are ignored, so consecutive words are 4 apart.
* The PC is a byte address with its two low bits always 00. Each instruction moves it to PC+4
  unless a branch is taken.

### Instruction formats

```
 31     26 25   21 20   16 15   11 10           0
+---------+-------+-------+-------+--------------+
| opcode  |  rc   |  ra   |  rb   |   unused     |   register form
+---------+-------+-------+-------+--------------+
| opcode  |  rc   |  ra   |  16-bit signed literal |   literal form
+---------+-------+-------+------------------------+
```

| instruction                | operation                                          |
|----------------------------|----------------------------------------------------|
| OP(ra, rb, rc)             | Reg[rc] = Reg[ra] op Reg[rb]                       |
| OPC(ra, C, rc)             | Reg[rc] = Reg[ra] op sxt(C)                        |
| LD(ra, C, rc)              | Reg[rc] = Mem[Reg[ra] + sxt(C)]                    |
| ST(rc, C, ra)              | Mem[Reg[ra] + sxt(C)] = Reg[rc]                    |
| BEQ(ra, label, rc)         | Reg[rc] = PC+4; if Reg[ra] == 0: PC = PC+4 + 4·sxt(C) |
| BNE(ra, label, rc)         | Reg[rc] = PC+4; if Reg[ra] != 0: PC = PC+4 + 4·sxt(C) |

There are 13 ALU operations: ADD, SUB, MUL, DIV, CMPEQ, CMPLT, CMPLE, AND, OR, XOR, SHL, SHR
and SAR. Each has a register form and a constant form (ADDC, SUBC, …, SARC).

### Opcode map

The original description fixes only ADD = `100000` and ADDC = `110000`. The other values are
this design's choice. They follow the customary Beta opcode map, in which the constant form of
an operation is its register form plus `010000`.

| opcode | op    | opcode | op     | opcode | op    |
|--------|-------|--------|--------|--------|-------|
| 011000 | LD    | 100000 | ADD    | 101000 | AND   |
| 011001 | ST    | 100001 | SUB    | 101001 | OR    |
| 011101 | BEQ   | 100010 | MUL    | 101010 | XOR   |
| 011110 | BNE   | 100011 | DIV    | 101100 | SHL   |
|        |       | 100100 | CMPEQ  | 101101 | SHR   |
|        |       | 100101 | CMPLT  | 101110 | SAR   |
|        |       | 100110 | CMPLE  | 11xxxx | constant forms |

All other opcodes are outside the instruction set. They raise `illop`, write nothing and fall
through to PC+4. There is no trap mechanism.

### ALU semantics (choices where only the operation names are given)

* MUL keeps the low 32 bits of the product.
* DIV is signed and truncates toward zero. Division by zero returns `0xFFFFFFFF`, and
  −2³¹ / −1 returns −2³¹.
* CMPEQ, CMPLT and CMPLE return 1 or 0. CMPLT and CMPLE compare as signed values.
* Shifts use the low 5 bits of the second operand. SHR fills with zeros and SAR with copies of
  the sign bit.

### How an instruction executes (`beta_cpu`)

The Beta is unpipelined, and every instruction completes in exactly one clock.

```
PC ──> Mem (instruction port) ──> inst
inst[31:26] ──> beta_decode ──> control word
inst.ra ──> regfile port 1 ──> A operand ──┐
inst.rb / inst.rc (ST) ──> port 2 ──┬──> B operand (or sxt literal) ──> ALU ──> data address / result
                                    └──> store data
write-back to Reg[rc]: ALU result | loaded word | PC+4
next PC: PC+4 | PC+4+4·sxt(literal) when the branch is taken
```

* Both memory reads are combinational, and the register write, the memory write and the PC
  update all happen at the same rising edge.
* A taken branch costs no extra cycle. So the factorial loop below runs in 4n+4 clocks from
  reset to its final store.
* `retire` is high in every cycle after reset.

### Memory (`beta_mem`)

`beta_mem` is a single array of `MEM_WORDS` 32-bit words (default 4096, i.e. 16 KiB; it must
be a power of two). It has three ports:

* **Instruction port**: read only, used for fetch.
* **Data port**: read and write, used by LD and ST.
* **Host port**: read and write, used to load programs and read results. Use it while the CPU
  is held in reset.

Address bits above the memory size are ignored, so addresses wrap. A host write and a data
write to the same word in the same cycle: the host wins. The memory and the registers are not
reset.

### Example program: factorial

```
n = 0x1000, ans = 0x1004
0x00        ADDC(r31, 1, r1)      r1 = 1
0x04        LD(r31, n, r2)        r2 = n
0x08 loop:  BEQ(r2, done, r31)    while r2 != 0
0x0C        MUL(r1, r2, r1)         r1 = r1 * r2
0x10        SUBC(r2, 1, r2)         r2 = r2 - 1
0x14        BEQ(r31, loop, r31)   always taken
0x18 done:  ST(r1, ans, r31)      ans = r1
0x1C        BEQ(r31, 0x1C, r31)   halt: branch to itself
```

Branch literals count words from PC+4. For example, `BEQ(r31, loop, r31)` at 0x14 encodes
(0x08 − 0x18)/4 = −4.

## Top level (`isa_top`)

| group | ports |
|-------|-------|
| clock | `clk` |
| Beta  | `beta_rst`; host port `host_we`, `host_addr`, `host_wdata`, `host_rdata`; status `beta_retire`, `beta_illop`, `beta_pc`, `beta_dwe`, `beta_daddr` |
| A/B   | `ab_rst`, `ab_n`; program port `ab_prog_we`, `ab_prog_addr`, `ab_prog_next`, `ab_prog_ctl`; `ab_answer`, `ab_state`, `ab_ctl`, `ab_z` |

Parameters:

* `MEM_WORDS` (4096)
* `BETA_RESET_PC` (0)
* `AB_W` (32)
* `AB_STATE_W` (3)

There are no I/O devices. The host port on main memory is the only way in or out of the Beta.

## Files

| file | content |
|------|---------|
| `rtl/beta_pkg.sv` | word and register types, opcode and ALU-function enums, control word, field and encoding helpers |
| `rtl/beta_alu.sv`, `beta_regfile.sv`, `beta_decode.sv`, `beta_pc.sv` | the Beta's data path pieces and control unit |
| `rtl/beta_mem.sv` | main memory |
| `rtl/beta_cpu.sv` | the processor |
| `rtl/ab_pkg.sv`, `ab_datapath.sv`, `ab_control_fsm.sv`, `ab_machine.sv` | the A/B engine |
| `rtl/isa_top.sv` | top |
| `tb/*_tb.sv` | one self-checking testbench per module |
| `tb/beta_ref_pkg.sv` | instruction-level reference model of the Beta, a small assembler and the example programs |
| `tb/ab_programs_pkg.sv` | the three A/B control programs |

## Simulating

Each testbench prints `TB_RESULT checks=N failures=M` and stops itself. All of them run with
plain Verilator 5. For example, the end-to-end test at default sizes:

```
verilator --binary --timing -Irtl -Itb -y rtl -y tb +libext+.sv \
  rtl/beta_pkg.sv rtl/ab_pkg.sv tb/beta_ref_pkg.sv tb/ab_programs_pkg.sv \
  tb/isa_top_tb.sv --top-module isa_top_tb -o sim
./obj_dir/sim
```

For another testbench, replace `isa_top_tb`. The packages listed above must come first on the
command line.

## What is verified

Every module's testbench compares its outputs with values computed independently in the
testbench:

* The ALU is checked against a 64-bit model on corner cases and 20 000 random operand pairs.
* The decoder is checked on all 64 opcodes.
* The register file, PC and memory are checked against model arrays.
* `beta_cpu_tb` runs the CPU in lockstep with an instruction-level reference model. It compares
  the PC and every store on every clock, then compares final memory. It covers the example
  programs (N·(N−1), y = x·37, y = (x−3)·(y+123456), factorial for n up to 123) and 40 random
  200-instruction programs. It also checks the one-instruction-per-clock timing.
* `ab_machine_tb` runs all three control programs for N = 1…25 and checks the answer and the
  exact clock count.
* `isa_top_tb` drives both machines through the top-level ports at default parameters. It counts
  each mechanism: taken and untaken branches, loads, stores, both ALU forms, illegal opcodes,
  r31 writes, A/B reprogramming, and the Z = 0 loop and Z = 1 exit. It fails if any of them
  never happens.

Each testbench was also run against a deliberately broken copy of its module and fails on it.

## Where this RTL departs from, or adds to, the original description

* **Opcodes.** All opcodes except ADD and ADDC are this design's choice (see the opcode map).
* **ALU semantics.** The signed compares, the DIV corner cases, MUL truncation and the shift
  count width are choices, not given.
* **Microarchitecture.** The single-cycle organisation, the second read port's rb/rc mux for
  ST, and the write-back mux are this design's. The original gives the instruction set and a
  generic "registers, ALU, control unit" picture.
* **PC increment.** A sketch of the fetch loop shows the PC incremented by 1. Since memory is
  byte-addressed, the PC here adds 4, as the instruction-set definition says.
* **ALU condition codes.** A generic data-path sketch shows condition-code outputs from the ALU.
  No Beta instruction uses them, so none are built.
* **Instructions not built.** Only ALU, LD, ST, BEQ and BNE are described, so JMP, LDR,
  interrupts and traps are absent.
* **Addressing modes.** The other addressing modes discussed (indexed, memory-indirect,
  autoincrement, scaled) are alternatives that were considered and rejected for the Beta. They
  are not built. Absolute, indirect and displacement addressing all come from LD/ST with a
  suitable ra and literal.
* **Sizes and interfaces.** The memory size, the host port, the reset scheme, the A/B data width
  (32) and the table-load port of the control FSM are this design's choices.
* **I/O devices.** The von Neumann model names I/O devices but describes none. None are built.
